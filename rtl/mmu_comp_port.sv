// mmu_comp_port: reads or writes one array component at a bit address.
//
// A component of 16 bits or more is a run of whole words starting at a
// word-aligned address, least significant word at the lowest address;
// each word is translated separately, so a component may cross a page.
// A component shorter than a word (1, 2 or 8 bits) lies inside one word at
// bit offset vaddr[3:0]; it is read right-justified with leading zeros, and
// written by read-modify-write of its word. Per word the port translates
// the address (mmu_pager, one cycle on an associative-cell hit), reads the
// word (one cycle) and, for writes, writes it back.
// Interface: the command (req, we, vaddr, bits, wdata) is held until 'ack',
// which pulses with rdata (reads) or after the last write. A black-hole
// page ends the command with ack and 'fault'.
// The right justification and zero fill of subword components follow the
// document; the word order of long components and the sequencing are this
// design's choices.
module mmu_comp_port #(
  parameter int PA_W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req,
  input  logic         we,
  input  logic [31:0]  vaddr,
  input  logic [31:0]  bits,
  input  logic [127:0] wdata,
  output logic         ack,
  output logic         fault,
  output logic [127:0] rdata,
  // pager
  output logic         tr_req,
  output logic [31:0]  tr_vaddr,
  input  logic         tr_ack,
  input  logic         tr_fault,
  input  logic [PA_W-1:0] tr_paddr,
  // memory
  output logic         mem_en,
  output logic         mem_we,
  output logic [PA_W-1:0] mem_addr,
  output logic [15:0]  mem_wdata,
  input  logic [15:0]  mem_rdata
);
  typedef enum logic [2:0] {C_IDLE, C_XLATE, C_READ, C_MERGE, C_WRITE, C_DONE} cstate_e;
  cstate_e st;

  logic [3:0]  k;        // word index within the component
  logic [3:0]  nwords;
  logic        sub;      // subword component
  logic [PA_W-1:0] pa;
  logic [15:0] mask;

  assign sub    = (bits < 32'd16);
  assign nwords = sub ? 4'd1 : 4'(bits[7:4] + (bits[3:0] != 4'd0 ? 4'd1 : 4'd0));
  assign mask   = (bits >= 32'd16) ? 16'hFFFF : 16'((17'd1 << bits[4:0]) - 17'd1);

  assign tr_req   = (st == C_XLATE);
  assign tr_vaddr = {vaddr[31:4] + 28'(k), vaddr[3:0]};

  always_comb begin
    mem_en = 1'b0; mem_we = 1'b0; mem_addr = pa; mem_wdata = '0;
    if (st == C_READ) mem_en = 1'b1;
    if (st == C_WRITE) begin
      mem_en = 1'b1; mem_we = 1'b1;
      if (sub) mem_wdata = (mem_rdata & ~(mask << vaddr[3:0])) |
                           ((wdata[15:0] & mask) << vaddr[3:0]);
      else     mem_wdata = wdata[16*k +: 16];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; k <= '0; pa <= '0; ack <= 1'b0; fault <= 1'b0; rdata <= '0;
    end else begin
      ack <= 1'b0;
      unique case (st)
        C_IDLE: if (req) begin
          k <= '0; fault <= 1'b0; rdata <= '0;
          st <= C_XLATE;
        end
        C_XLATE: if (tr_ack) begin
          if (tr_fault) begin
            fault <= 1'b1; ack <= 1'b1; st <= C_DONE;
          end else begin
            pa <= tr_paddr;
            // full-word writes need no read
            st <= (we && !sub) ? C_WRITE : C_READ;
          end
        end
        C_READ: st <= C_MERGE;   // memory data valid next cycle
        C_MERGE: begin
          if (we) st <= C_WRITE;
          else begin
            if (sub) rdata[15:0] <= (mem_rdata >> vaddr[3:0]) & mask;
            else     rdata[16*k +: 16] <= mem_rdata;
            if (k + 1'b1 >= nwords) begin ack <= 1'b1; st <= C_DONE; end
            else begin k <= k + 1'b1; st <= C_XLATE; end
          end
        end
        C_WRITE: begin
          if (k + 1'b1 >= nwords) begin ack <= 1'b1; st <= C_DONE; end
          else begin k <= k + 1'b1; st <= C_XLATE; end
        end
        default: if (!req) st <= C_IDLE;
      endcase
    end
  end
endmodule
