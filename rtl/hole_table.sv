// hole_table: the MMU's hole table, first-fit allocation from holes kept in
// order of increasing address.
//
// Entries 0..count-1 hold {location, size} of the unused regions of the
// workspace (in words), sorted by location. ALLOCATE(S) scans the entries
// from the lowest address, one per cycle, and takes the first hole with
// size >= S: an equal hole is removed (count-1), a larger one is shrunk from
// its low end (count unchanged). If no hole fits, 'gc_needed' is raised
// with fail. RELEASE(L,S) finds the insertion point by the same scan and
// applies the augmentation rules: a released segment touching the hole
// below and the hole above joins them (count-1); touching one of them it
// extends that hole (count unchanged); otherwise a new hole is inserted
// (count+1). When the table is full (count = M) and a new hole would be
// needed the release fails with 'overflow', which calls for a garbage
// collection. Alongside, the pair of neighbouring holes with the least
// storage between them is kept up to date combinationally (gc_pair_idx,
// gc_pair_gap): the two holes a collection would merge.
// After reset the table holds one hole {INIT_LOC, INIT_SIZE}.
// The first-fit address-ordered policy, the augmentation rules and the
// nominal 64 entries follow the document; the one-entry-per-cycle scan and
// the interface are this design's.
module hole_table #(
  parameter int M         = 64,
  parameter int AW        = 28,          // word address width (2**28 words)
  parameter logic [AW-1:0] INIT_LOC  = '0,
  parameter logic [AW-1:0] INIT_SIZE = {AW{1'b1}}
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req_valid,
  input  logic          req_release,   // 0: allocate, 1: release
  input  logic [AW-1:0] req_loc,
  input  logic [AW-1:0] req_size,
  output logic          ack,           // pulse: request done
  output logic          fail,          // pulse with ack
  output logic [AW-1:0] alloc_loc,
  output logic          gc_needed,     // allocation found no hole
  output logic          overflow,      // release needed a new entry in a full table
  output logic [$clog2(M+1)-1:0] count,
  output logic [$clog2(M)-1:0]   gc_pair_idx,
  output logic [AW-1:0]          gc_pair_gap,
  output logic          gc_pair_valid,
  output logic [AW:0]   free_words
);
  localparam int IW = $clog2(M);
  localparam int CW = $clog2(M+1);

  logic [AW-1:0] hl [M];
  logic [AW-1:0] hs [M];
  logic [CW-1:0] n;
  logic [CW-1:0] i;
  assign count = n;

  typedef enum logic [1:0] {H_IDLE, H_SCAN, H_DONE} hstate_e;
  hstate_e st;

  logic [IW-1:0] ii;
  assign ii = i[IW-1:0];

  // neighbours for a release at insertion point i (holes i-1 and i)
  logic below_touch, above_touch;
  always_comb begin
    below_touch = (i != '0) && (hl[ii - 1'b1] + hs[ii - 1'b1] == req_loc);
    above_touch = (i < n) && (req_loc + req_size == hl[ii]);
  end

  // closest pair of neighbouring holes
  always_comb begin
    gc_pair_idx   = '0;
    gc_pair_gap   = '1;
    gc_pair_valid = 1'b0;
    for (int k = 0; k < M - 1; k++) begin
      if (CW'(k + 1) < n && (hl[k + 1] - (hl[k] + hs[k])) < gc_pair_gap) begin
        gc_pair_gap   = hl[k + 1] - (hl[k] + hs[k]);
        gc_pair_idx   = IW'(k);
        gc_pair_valid = 1'b1;
      end
    end
  end

  always_comb begin
    free_words = '0;
    for (int k = 0; k < M; k++)
      if (CW'(k) < n) free_words = free_words + (AW+1)'(hs[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= H_IDLE; n <= CW'(1); i <= '0;
      ack <= 1'b0; fail <= 1'b0; alloc_loc <= '0; gc_needed <= 1'b0; overflow <= 1'b0;
      for (int k = 0; k < M; k++) begin hl[k] <= '0; hs[k] <= '0; end
      hl[0] <= INIT_LOC;
      hs[0] <= INIT_SIZE;
    end else begin
      ack <= 1'b0; fail <= 1'b0;
      unique case (st)
        H_IDLE: if (req_valid) begin
          i  <= '0;
          gc_needed <= 1'b0;
          overflow  <= 1'b0;
          st <= H_SCAN;
        end
        H_SCAN: begin
          if (!req_release) begin
            // first fit
            if (i >= n) begin
              gc_needed <= 1'b1; fail <= 1'b1; ack <= 1'b1; st <= H_DONE;
            end else if (hs[ii] == req_size) begin
              alloc_loc <= hl[ii];
              for (int k = 0; k < M - 1; k++)
                if (k >= int'(i)) begin hl[k] <= hl[k + 1]; hs[k] <= hs[k + 1]; end
              n <= n - 1'b1;
              ack <= 1'b1; st <= H_DONE;
            end else if (hs[ii] > req_size) begin
              alloc_loc <= hl[ii];
              hl[ii] <= hl[ii] + req_size;
              hs[ii] <= hs[ii] - req_size;
              ack <= 1'b1; st <= H_DONE;
            end else i <= i + 1'b1;
          end else begin
            // insertion point: first hole above the released segment
            if (i < n && hl[ii] < req_loc) i <= i + 1'b1;
            else begin
              if (below_touch && above_touch) begin
                hs[ii - 1'b1] <= hs[ii - 1'b1] + req_size + hs[ii];
                for (int k = 0; k < M - 1; k++)
                  if (k >= int'(i)) begin hl[k] <= hl[k + 1]; hs[k] <= hs[k + 1]; end
                n <= n - 1'b1;
              end else if (below_touch) begin
                hs[ii - 1'b1] <= hs[ii - 1'b1] + req_size;
              end else if (above_touch) begin
                hl[ii] <= req_loc;
                hs[ii] <= hs[ii] + req_size;
              end else if (n == CW'(M)) begin
                overflow <= 1'b1; fail <= 1'b1;
              end else begin
                for (int k = 1; k < M; k++)
                  if (k > int'(i)) begin hl[k] <= hl[k - 1]; hs[k] <= hs[k - 1]; end
                hl[ii] <= req_loc;
                hs[ii] <= req_size;
                n <= n + 1'b1;
              end
              ack <= 1'b1; st <= H_DONE;
            end
          end
        end
        default: if (!req_valid) st <= H_IDLE;   // wait for the request to drop
      endcase
    end
  end
endmodule
