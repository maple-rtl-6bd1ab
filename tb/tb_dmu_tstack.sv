// tb_dmu_tstack: self-checking test of the DMU temporary stack.
//
// The stack is driven directly with STALLOC/TPUSH/TPOP. Two small models
// stand in for the rest of the DMU: a pager that answers page fills and
// releases after a few cycles (and keeps the set of pages attached), and a
// component memory keyed by bit address that answers after a random delay
// and flags any access to a page that is not attached. Checked: LIFO
// order and truncation to the component size for 8-, 16- and 32-bit
// components; one page fill at the first push into each page and one
// release at the pop that empties it; overflow beyond the maximum depth,
// pop of an empty stack, push before allocation, STALLOC of a non-empty
// stack, bad size codes, other opcodes, and a refused page fill.
module tb_dmu_tstack;
  import maple_pkg::*;
  localparam int VPW = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_ready;
  dmu_instr_t  in_instr = '0;
  logic [15:0] in_d0 = 0, in_d1 = 0;
  logic        done, err;
  logic [31:0] result;
  logic        pg_valid, pg_release;
  logic [VPW-1:0] pg_vpage;
  logic        pg_done = 0, pg_fail = 0;
  logic        mem_req, mem_we;
  addr_t       mem_addr;
  logic [31:0] mem_bits, mem_wdata;
  logic        mem_ack = 0;
  logic [31:0] mem_data = 0;
  logic [31:0] depth, pages_held;

  dmu_tstack #(.VPAGE_W(VPW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- pager model ----
  bit       attached [int];
  int       n_fill = 0, n_rel = 0, bad_pg = 0;
  bit       refuse = 0;
  int       pwait = 0;
  always @(posedge clk) if (rst_n) begin
    pg_done <= 1'b0;
    if (pg_valid && !pg_done) begin
      if (pwait < 3) pwait <= pwait + 1;
      else begin
        pwait   <= 0;
        pg_done <= 1'b1;
        pg_fail <= refuse && !pg_release;
        if (pg_release) begin
          if (!attached.exists(int'(pg_vpage))) bad_pg++;
          attached.delete(int'(pg_vpage));
          n_rel++;
        end else if (!refuse) begin
          if (attached.exists(int'(pg_vpage))) bad_pg++;
          attached[int'(pg_vpage)] = 1;
          n_fill++;
        end
      end
    end
  end

  // ---- component memory model ----
  logic [31:0] store [addr_t];
  int          mwait = 0, bad_mem = 0;
  always @(posedge clk) if (rst_n) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      if (mwait > 0) mwait <= mwait - 1;
      else begin
        mwait   <= $urandom_range(0, 2);
        mem_ack <= 1'b1;
        if (!attached.exists(int'(mem_addr[16 +: VPW]))) bad_mem++;
        if (mem_we) store[mem_addr] = mem_wdata & ((mem_bits >= 32) ? 32'hFFFF_FFFF : ((32'd1 << mem_bits) - 1));
        else mem_data <= store.exists(mem_addr) ? store[mem_addr] : 32'hDEAD_BEEF;
      end
    end
  end

  // ---- driver ----
  task automatic issue(input dmu_op_e op, input logic [15:0] a, input logic [15:0] b,
                       output logic e, output logic [31:0] r);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    in_instr = '0; in_instr.code = op; in_d0 = a; in_d1 = b; in_valid = 1;
    @(posedge clk);
    in_valid = 0;
    while (!done) @(posedge clk);
    e = err; r = result;
  endtask

  logic        e;
  logic [31:0] r;
  int          bits;
  logic [31:0] model [$];
  logic [31:0] v, mask;

  task automatic run_size(input int code, input int n, input int cbits);
    issue(OP_STALLOC, 16'(code), 16'(n), e, r);
    check(!e, $sformatf("STALLOC code %0d", code));
    mask = (cbits >= 32) ? 32'hFFFF_FFFF : ((32'd1 << cbits) - 1);
    model.delete();
    for (int i = 0; i < n; i++) begin
      v = $urandom;
      issue(OP_TPUSH, v[31:16], v[15:0], e, r);
      check(!e, "TPUSH accepted");
      model.push_back(v & mask);
    end
    check(depth == 32'(n), "depth after pushes");
    check(pages_held == 32'((n * cbits + 65535) / 65536), "pages held after pushes");
    issue(OP_TPUSH, 16'h1, 16'h2, e, r);
    check(e, "push beyond maximum depth is refused");
    for (int i = 0; i < n; i++) begin
      issue(OP_TPOP, 0, 0, e, r);
      check(!e && r == model.pop_back(), $sformatf("TPOP %0d value %h", i, r));
    end
    check(depth == 0 && pages_held == 0, "stack empty, all pages released");
    check(attached.num() == 0, "pager holds no stack pages");
    issue(OP_TPOP, 0, 0, e, r);
    check(e, "pop of an empty stack is refused");
  endtask

  initial begin
    #200000000 $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    issue(OP_TPUSH, 0, 5, e, r);
    check(e, "push before STALLOC is refused");
    issue(OP_TPOP, 0, 0, e, r);
    check(e, "pop before STALLOC is refused");
    issue(OP_READ, 0, 0, e, r);
    check(e, "other opcode is refused");
    issue(OP_STALLOC, 16'd5, 16'd4, e, r);
    check(e, "48-bit components refused");

    // 16-bit components: 4096 per page, so 9000 pushes span three pages
    run_size(3, 9000, 16);
    check(n_fill == 3 && n_rel == 3, $sformatf("fills %0d releases %0d", n_fill, n_rel));
    // 32-bit components: 2048 per page
    run_size(4, 2100, 32);
    // 8-bit components
    run_size(2, 300, 8);

    // STALLOC while not empty, and a refused page fill
    issue(OP_STALLOC, 16'd3, 16'd10, e, r);
    check(!e, "STALLOC 16-bit depth 10");
    issue(OP_TPUSH, 0, 16'h1234, e, r);
    check(!e, "push one");
    issue(OP_STALLOC, 16'd4, 16'd10, e, r);
    check(e, "STALLOC of a non-empty stack is refused");
    issue(OP_TPOP, 0, 0, e, r);
    check(!e && r == 32'h1234, "pop after refused STALLOC");
    refuse = 1;
    issue(OP_TPUSH, 0, 16'h7, e, r);
    check(e && depth == 0, "push with no free page is refused");
    refuse = 0;
    issue(OP_TPUSH, 0, 16'h7, e, r);
    issue(OP_TPOP, 0, 0, e, r);
    check(!e && r == 32'h7, "push and pop after a refused fill");

    check(bad_pg == 0, "page operations consistent");
    check(bad_mem == 0, "all accesses inside attached pages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
