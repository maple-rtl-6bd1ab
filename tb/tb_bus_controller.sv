// tb_bus_controller: drives the bus controller's command port and checks
// the status and data bus cycle by cycle: PROBE reports the Ready line of
// the unit on LUA (EXU, ALU, IOU), XFER waits for Ready, raises CSL with
// word 0 and sends the remaining words in the following cycles (TDL = 1)
// or samples them from the unit (TDL = 0), and EOS is one cycle with LUA.
module tb_bus_controller;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_tdl = 0, done, ok, tdl, csl, eos, dbus_oe;
  logic [1:0] cmd_op = 0;
  logic [2:0] cmd_lua = 0, lua, ready = 0;
  logic [3:0] cmd_nwords = 1;
  logic [127:0] cmd_wdata = 0, rdata;
  logic [15:0] dbus_out, dbus_in = 0;
  int checks = 0, failures = 0;
  bus_controller dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("%0t FAIL %s", $time, what); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // issue one command, return after done
  task automatic cmd(input int op, input bit t, input int u, input int n, input logic [127:0] wd);
    @(negedge clk);
    check(cmd_ready, "idle before command");
    cmd_valid = 1; cmd_op = 2'(op); cmd_tdl = t; cmd_lua = 3'(u); cmd_nwords = 4'(n); cmd_wdata = wd;
    @(negedge clk);
    cmd_valid = 0;
  endtask
  int csl_n, word_n, eos_n;
  logic [15:0] seen [$];
  always @(posedge clk) if (rst_n) begin
    if (csl) csl_n++;
    if (eos) eos_n++;
    if (dbus_oe) seen.push_back(dbus_out);
  end
  initial begin
    csl_n = 0; eos_n = 0;
    #12 rst_n = 1;
    // probes
    for (int u = 0; u < 6; u++) begin
      ready = 3'b101;                       // EXU and IOU ready, ALU not
      cmd(0, 0, u, 1, 0);
      while (!done) @(posedge clk);
      check(ok == (lua_phys(3'(u)) != 2'd1), $sformatf("probe LUA %0d", u));
    end
    // write 3 words to ALU X, ALU becomes ready after a few cycles
    ready = 3'b000; seen.delete(); csl_n = 0;
    cmd(1, 1, LUA_ALU_X, 3, {80'd0, 16'hC003, 16'hB002, 16'hA001});
    repeat (4) begin @(negedge clk); check(!csl && !dbus_oe && lua == LUA_ALU_X && tdl, "waiting for Ready"); end
    ready = 3'b010;
    #1 check(csl && dbus_oe && dbus_out == 16'hA001, "CSL with word 0");
    @(negedge clk); check(!csl && dbus_out == 16'hB002, "word 1");
    @(negedge clk); check(!csl && dbus_out == 16'hC003, "word 2");
    @(posedge clk); #1 check(done && ok, "write done");
    check(seen.size() == 3 && csl_n == 1, "three words, one CSL");
    // read 2 words from the EXU
    ready = 3'b001;
    cmd(1, 0, LUA_EXU, 2, 0);
    dbus_in = 16'h1234;
    #1 check(csl && !dbus_oe && !tdl, "read cycle start");
    @(negedge clk); dbus_in = 16'h5678;
    @(posedge clk); #1 check(done && rdata[31:0] == 32'h5678_1234, $sformatf("read data %h", rdata[31:0]));
    // end of stream
    cmd(2, 0, LUA_IOU_O, 1, 0);
    check(eos_n == 0, "no EOS before");
    @(posedge clk); #1 check(eos_n == 1 && done, "one EOS cycle");
    repeat (3) @(posedge clk);
    check(eos_n == 1, "EOS not repeated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
