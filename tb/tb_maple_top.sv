// tb_maple_top: end-to-end test of the MAPLE top level. The testbench
// plays the EXU (it sends instructions on the instruction bus, acknowledges
// interrupts, and sources and sinks data streams on logical unit 0) and a
// minimal IOU (an interrupt requester placed after the DMU on the chain).
// The program it runs:
//   1. describe and ALLOCATE four 4x4 arrays X, Y, Z, R and a one-page
//      spacer between X and Y (hole-table allocation; every address comes
//      back by interrupt and is checked against first-fit placement)
//   2. stream X and Y in from the EXU (sink streams; the EXU's Ready line
//      is toggled so the controller has to skip it)
//   3. MTRANSPOSE X, set the ALU to +, and run the three streams X, Y -> ALU
//      and ALU -> Z at the same time (component interleaving, page misses
//      since X and Y sit on different pages)
//   4. stream Z back to the EXU and compare with Y + transpose(X)
//   5. set the ALU ratio to 4 and stream Z -> ALU, ALU -> R: +/ along rows
//   6. MROTATE Z along its last axis and read it back reversed
//   7. READ a descriptor field (result by interrupt); allocate the
//      temporary stack, push three values and pop them back by interrupt
//      (the stack's page is filled from the Free List and released again);
//      let the IOU take an interrupt; send an unimplemented opcode to see
//      the error flag; pop the now empty stack (refused, nothing returned)
// Every mechanism is counted and must happen at least once. With FULL = 1
// the top is instantiated with its default (document) sizes.
module tb_maple_top #(parameter bit FULL = 0);
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  logic dmu_ready, dmu_err;
  logic [15:0] ibus = '0;
  logic [1:0]  uid = '0;
  logic        is = 0;
  logic        dmu_iq_full, intr_req, intr_ack, ret_oe;
  logic [15:0] ret_data;
  logic [1:0]  ret_uid;
  logic        tdl, csl, eos, exu_ready, iou_ready = 0;
  logic [2:0]  lua;
  logic [15:0] dbus, exu_dbus, iou_dbus = '0;
  logic        dbus_oe;
  logic        iou_intr_req = 0, iou_intr_ack;
  logic [31:0] n_components, n_skips, n_eos, n_switches, n_page_misses;
  logic [31:0] alu_cnt_x, alu_cnt_y, alu_cnt_z;
  logic        alu_overflow, gc_needed, ht_overflow;

  if (FULL) begin : g_full
    maple_top dut (.*);
  end else begin : g_small
    maple_top #(.MEM_LOG2(16), .VPAGE_W(8), .WS_PAGES(12)) dut (.*);
  end

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("%0t FAIL %s", $time, what); end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- EXU model: data streams on LUA 0 ----------------
  logic [15:0] feed [$];
  logic [15:0] got  [$];
  logic [15:0] lfsr = 16'hACE1;
  logic        exu_gate = 0;        // 1: Ready follows the LFSR
  int          exu_not_ready_seen = 0;
  int          eos_seen [8];
  assign exu_ready = exu_gate ? lfsr[0] | lfsr[3] : 1'b1;
  int          fi = 0;              // next word of 'feed' to offer
  assign exu_dbus  = (fi < feed.size()) ? feed[fi] : 16'h0;
  always @(posedge clk) if (rst_n) begin
    lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    if (lua == LUA_EXU && !exu_ready && tdl == 1'b0 && !csl) exu_not_ready_seen++;
    if (csl && lua == LUA_EXU && !tdl) fi <= fi + 1;
    if (csl && lua == LUA_EXU && tdl) got.push_back(dbus);
    if (eos) eos_seen[lua]++;
  end

  // ---------------- interrupts ----------------
  logic [31:0] ret_val [$];
  logic [15:0] ret_hi;
  logic        ret_ph = 0;
  int          iou_grants = 0;
  assign intr_ack = intr_req;      // the EXU always accepts
  always @(posedge clk) if (rst_n) begin
    if (rst_n && ret_oe && ret_uid == UID_DMU) begin
      if (!ret_ph) begin ret_hi <= ret_data; ret_ph <= 1; end
      else begin ret_val.push_back({ret_hi, ret_data}); ret_ph <= 0; end
    end
    if (iou_intr_req && iou_intr_ack) iou_grants++;
  end

  // ---------------- instruction bus ----------------
  int iq_full_seen = 0;
  task automatic bus_word(input logic [1:0] u, input logic [15:0] w);
    @(negedge clk);
    ibus = w; uid = u; is = 1;
    @(negedge clk);
    is = 0; uid = '0; ibus = '0;
  endtask
  function automatic logic [15:0] iw(input dmu_op_e op, input int rd, input int rs, input int m);
    return {op, 4'(rd), 4'(rs), 2'(m)};
  endfunction
  task automatic dmu_instr(input dmu_op_e op, input int rd, input int rs, input int m,
                           input int nd, input logic [15:0] a = 0, input logic [15:0] b = 0,
                           input logic [15:0] c = 0);
    @(negedge clk);
    if (dmu_iq_full) iq_full_seen++;
    while (dmu_iq_full) @(negedge clk);
    bus_word(UID_DMU, iw(op, rd, rs, m));
    if (nd > 0) bus_word(UID_DMU, a);
    if (nd > 1) bus_word(UID_DMU, b);
    if (nd > 2) bus_word(UID_DMU, c);
  endtask
  task automatic write_field(input int r, input desc_field_e f, input int axis, input logic [31:0] v);
    dmu_instr(OP_WRITE, 0, r, 0, 3, {8'd0, f, 6'(axis)}, v[31:16], v[15:0]);
  endtask
  // describe an integer 16-bit array of the given shape
  task automatic describe(input int r, input int rank, input int r0, input int r1);
    write_field(r, FLD_RT, 0, 32'((rank << 8) | 3));
    write_field(r, FLD_RHO, 0, 32'(r0));
    if (rank > 1) write_field(r, FLD_RHO, 1, 32'(r1));
  endtask
  task automatic wait_ret(output logic [31:0] v);
    int n = 0;
    while (ret_val.size() == 0 && n < 200000) begin @(posedge clk); n++; end
    check(ret_val.size() > 0, "interrupt return arrived");
    v = ret_val.size() ? ret_val.pop_front() : '0;
  endtask
  task automatic wait_eos(input int u, input int target);
    int n = 0;
    while (eos_seen[u] < target && n < 400000) begin @(posedge clk); n++; end
    check(eos_seen[u] >= target, $sformatf("end of stream on unit %0d", u));
  endtask
  task automatic alu_instr(input int op, input int xw, input int zw);
    bus_word(UID_ALU, {6'(op), 2'(xw), 2'(zw), 6'd0});
  endtask

  // ---------------- program ----------------
  logic [15:0] X [4][4], Y [4][4], Z [4][4];
  logic [31:0] a_x, a_sp, a_y, a_z, a_r, v;
  int i, j, s;
  time t0;

  initial begin
    // mechanism counters taken at the end
    int n_alloc = 0, n_ret = 0, n_stack = 0;
    for (int u = 0; u < 8; u++) eos_seen[u] = 0;
    for (i = 0; i < 4; i++) for (j = 0; j < 4; j++) begin
      X[i][j] = 16'(i * 4 + j + 1);
      Y[i][j] = 16'(100 * (i + 1) + 10 * j);
    end
    #23 rst_n = 1;
    // instructions sent before the DMU is ready wait in its queue
    describe(1, 2, 4, 4);
    begin
      int n = 0;
      while (!dmu_ready && n < 1_000_000) begin @(posedge clk); n++; end
    end
    check(dmu_ready, "DMU start-up finished");

    // 1. allocation
    dmu_instr(OP_ALLOCATE, 0, 1, 0, 0);  wait_ret(a_x);  n_alloc++;
    describe(5, 1, 4096, 0);
    dmu_instr(OP_ALLOCATE, 0, 5, 0, 0);  wait_ret(a_sp); n_alloc++;
    describe(2, 2, 4, 4);
    dmu_instr(OP_ALLOCATE, 0, 2, 0, 0);  wait_ret(a_y);  n_alloc++;
    describe(3, 2, 4, 4);
    dmu_instr(OP_ALLOCATE, 0, 3, 0, 0);  wait_ret(a_z);  n_alloc++;
    describe(4, 1, 4, 0);
    dmu_instr(OP_ALLOCATE, 0, 4, 0, 0);  wait_ret(a_r);  n_alloc++;
    check(a_x == 0 && a_sp == 32'd16 * 16 && a_y == 32'(16 + 4096) * 16 &&
          a_z == 32'(32 + 4096) * 16 && a_r == 32'(48 + 4096) * 16,
          $sformatf("first-fit addresses %h %h %h %h %h", a_x, a_sp, a_y, a_z, a_r));

    // 2. load X and Y from the EXU, Ready toggling
    exu_gate = 1;
    for (i = 0; i < 4; i++) for (j = 0; j < 4; j++) feed.push_back(X[i][j]);
    dmu_instr(OP_SETUP, 0, 1, 0, 1, 16'(LUA_EXU));
    wait_eos(LUA_EXU, 1);
    for (i = 0; i < 4; i++) for (j = 0; j < 4; j++) feed.push_back(Y[i][j]);
    dmu_instr(OP_SETUP, 0, 2, 0, 1, 16'(LUA_EXU));
    wait_eos(LUA_EXU, 2);
    check(fi == 32, "all loaded words taken");

    // 3. Z = Y + transpose X on the ALU, three streams at once
    dmu_instr(OP_MTRANS, 0, 1, 0, 0);
    alu_instr(63, 0, 0);
    alu_instr(1, 0, 0);
    t0 = $time;
    dmu_instr(OP_SETUP, 0, 1, 1, 1, 16'(LUA_ALU_X));
    dmu_instr(OP_SETUP, 0, 2, 1, 1, 16'(LUA_ALU_Y));
    dmu_instr(OP_SETUP, 0, 3, 0, 1, 16'(LUA_ALU_Z));
    wait_eos(LUA_ALU_Z, 1);
    $display("Z = Y + X: 48 components in %0d cycles", ($time - t0) / 10);
    check(alu_cnt_x == 16 && alu_cnt_y == 16 && alu_cnt_z == 16,
          $sformatf("ALU counters %0d %0d %0d", alu_cnt_x, alu_cnt_y, alu_cnt_z));

    // 4. read Z back
    got.delete();
    dmu_instr(OP_SETUP, 0, 3, 1, 1, 16'(LUA_EXU));
    wait_eos(LUA_EXU, 3);
    check(got.size() == 16, $sformatf("Z words back %0d", got.size()));
    for (i = 0; i < 4; i++) for (j = 0; j < 4; j++) begin
      Z[i][j] = Y[i][j] + X[j][i];
      check(got.size() > i * 4 + j && got[i * 4 + j] == Z[i][j],
            $sformatf("Z[%0d][%0d]", i, j));
    end

    // 5. R = +/ Z (ratio 4)
    bus_word(UID_ALU, {6'd62, 10'd0});
    bus_word(UID_ALU, 16'd4);
    alu_instr(1, 0, 0);
    dmu_instr(OP_SETUP, 0, 3, 1, 1, 16'(LUA_ALU_X));
    dmu_instr(OP_SETUP, 0, 4, 0, 1, 16'(LUA_ALU_Z));
    wait_eos(LUA_ALU_Z, 2);
    check(alu_cnt_x == 16 && alu_cnt_z == 4, "reduction 16 in, 4 out");
    got.delete();
    dmu_instr(OP_SETUP, 0, 4, 1, 1, 16'(LUA_EXU));
    wait_eos(LUA_EXU, 4);
    for (i = 0; i < 4; i++) begin
      s = 0;
      for (j = 0; j < 4; j++) s += Z[i][j];
      check(got.size() > i && got[i] == 16'(s), $sformatf("R[%0d]", i));
    end

    // 6. MROTATE Z along its last axis, read back reversed rows
    dmu_instr(OP_MROTATE, 0, 3, 0, 1, 16'd1);
    got.delete();
    dmu_instr(OP_SETUP, 0, 3, 1, 1, 16'(LUA_EXU));
    wait_eos(LUA_EXU, 5);
    for (i = 0; i < 4; i++) for (j = 0; j < 4; j++)
      check(got.size() > i * 4 + j && got[i * 4 + j] == Z[i][3 - j],
            $sformatf("rotated Z[%0d][%0d]", i, j));

    // 7. READ a field; IOU interrupt; bad opcode
    dmu_instr(OP_READ, 0, 1, 0, 1, {8'd0, FLD_JUMP, 6'd0});
    wait_ret(v);
    check(v == 32'd16, $sformatf("J[0] of transposed X = %0d", v));
    // temporary stack: a page filled at the first push, released at the last pop
    dmu_instr(OP_STALLOC, 0, 0, 0, 2, 16'd3, 16'd8);
    for (int k = 0; k < 3; k++) dmu_instr(OP_TPUSH, 0, 0, 0, 2, 16'hFFFF, 16'(16'h0A00 + k));
    for (int k = 0; k < 3; k++) begin
      dmu_instr(OP_TPOP, 0, 0, 0, 0);
      wait_ret(v);
      check(v == 32'(16'h0A02 - k), $sformatf("TPOP %0d = %h", k, v));
    end
    n_stack = 3;
    n_ret = 9;
    @(negedge clk) iou_intr_req = 1;
    repeat (3) @(negedge clk);
    iou_intr_req = 0;
    check(!dmu_err, "no error so far");
    dmu_instr(OP_CATENATE, 1, 2, 0, 1, 16'd0);
    repeat (20) @(posedge clk);
    check(dmu_err, "unimplemented opcode flags error");
    dmu_instr(OP_TPOP, 0, 0, 0, 0);
    repeat (20) @(posedge clk);
    check(ret_val.size() == 0, "pop of the emptied stack returns nothing");
    // a burst of instructions fills the queue
    for (int k = 0; k < 6; k++) dmu_instr(OP_ALLOCATE, 0, 4, 0, 0);
    repeat (2000) @(posedge clk);
    while (ret_val.size()) void'(ret_val.pop_front());

    // ---------------- mechanism coverage ----------------
    $display("mechanisms: alloc=%0d returns=%0d components=%0d skips=%0d eos=%0d switches=%0d page_misses=%0d exu_not_ready=%0d iq_full=%0d iou_grants=%0d stack=%0d",
             n_alloc, n_ret, n_components, n_skips, n_eos, n_switches, n_page_misses,
             exu_not_ready_seen, iq_full_seen, iou_grants, n_stack);
    check(n_alloc >= 1, "hole-table allocation");
    check(n_ret >= 1, "result return by interrupt");
    check(n_stack == 3, "temporary stack push and pop");
    check(n_components == 16 * 2 + 16 * 3 + 16 + 16 + 4 + 4 + 16,
          $sformatf("component transfers %0d", n_components));
    check(n_skips >= 1, "unit not ready skipped");
    check(n_eos == 10, $sformatf("end-of-stream cycles %0d", n_eos));
    check(n_switches >= 1, "stream switching");
    check(n_page_misses >= 2, "associative cell misses");
    check(exu_not_ready_seen >= 1, "EXU not ready");
    check(iq_full_seen >= 1, "instruction queue full");
    check(iou_grants >= 1, "interrupt passed down the chain");
    check(!alu_overflow, "no ALU overflow");
    check(!gc_needed && !ht_overflow, "no collection needed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
