// mmu_pager: virtual-to-real translation of the MMU with its Relocation
// Vector (RV), single associative cell and Free List (FL).
//
// A 32-bit bit address splits into virtual page [31:16], word in page
// [15:4] and bit [3:0]. RV maps each virtual page to a real page number;
// the value 0 marks a "black hole" (no real memory), so real page 0 is
// never handed out. The associative cell remembers the last virtual page
// and its real page: a request to the same page is answered in the same
// cycle (tr_ack combinational), any other page costs one cycle to index RV
// and reload the cell. A black hole answers with tr_fault.
// The FL is a stack of totally free real pages. FILL vp pops a page from
// FL into RV[vp] (expanding a system object into a black hole); RELEASE vp
// pushes RV[vp] back onto FL and makes vp a black hole again.
// After reset the pager clears RV, one entry per cycle (init_busy high for
// 2**VPAGE_W cycles), and FL holds real pages 1..2**RPAGE_W-1.
// The document gives RV, FL, the zero black-hole marker and the single
// cell; the page-op interface and the initial state are this design's.
module mmu_pager #(
  parameter int VPAGE_W = 16,   // 2**16 virtual pages
  parameter int RPAGE_W = 8     // real pages of 4096 words: 2**8 for 1M words
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        init_busy,
  // translation
  input  logic        tr_req,
  input  logic [31:0] tr_vaddr,
  output logic        tr_ack,
  output logic        tr_fault,
  output logic [RPAGE_W+11:0] tr_paddr,    // real word address
  output logic        tr_miss,             // pulses when RV had to be indexed
  // page operations
  input  logic        op_valid,
  input  logic        op_release,          // 0: FILL, 1: RELEASE
  input  logic [VPAGE_W-1:0] op_vpage,
  output logic        op_done,
  output logic        op_fail,
  output logic [RPAGE_W-1:0] op_rpage,
  output logic [RPAGE_W:0]   free_pages
);
  localparam int NVP = 1 << VPAGE_W;
  localparam int NRP = 1 << RPAGE_W;

  logic [RPAGE_W-1:0] rv [NVP];
  logic [RPAGE_W-1:0] fl [NRP];
  logic [RPAGE_W:0]   fl_sp;       // number of pages on FL
  logic [RPAGE_W-1:0] fl_top;
  assign fl_top = fl_sp[RPAGE_W-1:0] - 1'b1;

  logic [VPAGE_W:0]   init_ptr;
  assign init_busy  = !init_ptr[VPAGE_W];
  assign free_pages = fl_sp;

  // associative cell
  logic               cell_v;
  logic [VPAGE_W-1:0] cell_vp;
  logic [RPAGE_W-1:0] cell_rp;

  logic [VPAGE_W-1:0] req_vp;
  assign req_vp = tr_vaddr[16 +: VPAGE_W];

  logic hit;
  assign hit      = cell_v && (cell_vp == req_vp);
  assign tr_ack   = tr_req && !init_busy && hit;
  assign tr_fault = (cell_rp == '0);
  assign tr_paddr = {cell_rp, tr_vaddr[15:4]};
  logic unused_bit;   // the bit offset inside a word is not the pager's concern
  assign unused_bit = ^tr_vaddr[3:0];

  logic loading;   // RV read in flight for the cell
  logic [RPAGE_W-1:0] rv_rd;

  always_ff @(posedge clk) rv_rd <= rv[req_vp];

  typedef enum logic [1:0] {P_IDLE, P_RD, P_WR} pstate_e;
  pstate_e pst;
  logic [RPAGE_W-1:0] op_rv;

  always_ff @(posedge clk) op_rv <= rv[op_vpage];

  always_ff @(posedge clk) begin
    if (init_busy) rv[init_ptr[VPAGE_W-1:0]] <= '0;
    else if (pst == P_RD && op_valid) begin
      if (!op_release && op_rv == '0 && fl_sp != '0) rv[op_vpage] <= fl[fl_top];
      else if (op_release && op_rv != '0)            rv[op_vpage] <= '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_ptr <= '0;
      cell_v <= 1'b0; cell_vp <= '0; cell_rp <= '0;
      loading <= 1'b0; tr_miss <= 1'b0;
      pst <= P_IDLE; op_done <= 1'b0; op_fail <= 1'b0; op_rpage <= '0;
      fl_sp <= (RPAGE_W+1)'(NRP - 1);
      for (int i = 0; i < NRP; i++) fl[i] <= RPAGE_W'(NRP - 1 - i);  // top of stack = page 1
    end else begin
      tr_miss <= 1'b0;
      op_done <= 1'b0;
      op_fail <= 1'b0;
      if (init_busy) init_ptr <= init_ptr + 1'b1;
      // cell reload
      if (!init_busy && tr_req && !hit && pst == P_IDLE) begin
        if (!loading) loading <= 1'b1;
        else begin
          loading <= 1'b0;
          cell_v  <= 1'b1;
          cell_vp <= req_vp;
          cell_rp <= rv_rd;
          tr_miss <= 1'b1;
        end
      end else loading <= 1'b0;
      // page operations (one read cycle, then update)
      unique case (pst)
        P_IDLE: if (op_valid && !init_busy && !(tr_req && !hit)) pst <= P_RD;
        P_RD: begin
          if (!op_release) begin
            if (op_rv == '0 && fl_sp != '0) begin
              op_rpage <= fl[fl_top];
              fl_sp    <= fl_sp - 1'b1;
            end else op_fail <= 1'b1;
          end else begin
            if (op_rv != '0) begin
              fl[fl_sp[RPAGE_W-1:0]] <= op_rv;
              fl_sp    <= fl_sp + 1'b1;
              op_rpage <= op_rv;
            end else op_fail <= 1'b1;
          end
          if (cell_vp == op_vpage) cell_v <= 1'b0;
          op_done <= 1'b1;
          pst <= P_WR;
        end
        default: pst <= P_IDLE;   // one idle cycle so op_valid can drop
      endcase
    end
  end
endmodule
