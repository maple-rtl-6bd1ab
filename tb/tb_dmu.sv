// tb_dmu: the whole DMU driven over its buses by a model of the EXU here:
// a descriptor is written field by field, ALLOCATE returns the array's
// address by interrupt, a sink stream loads the array from the EXU, MROTATE
// reverses its first axis and a source stream sends it back, which must
// come out with the rows in reverse order; READ returns a RHO value by
// interrupt; an allocation larger than the workspace fails, sets the error
// flag and asks for garbage collection. Start-up (clearing the Relocation
// Vector, mapping the workspace) is waited for, and page misses and EOS
// cycles are counted.
module tb_dmu;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ready_out, err, iq_full, intr_req, intr_ack_in, intr_ack_out, ret_oe;
  logic [15:0] ibus_in = 0, ret_data, dbus_out, dbus_in;
  logic [1:0] uid_in = 0, ret_uid;
  logic is = 0, tdl, csl, eos, dbus_oe, gc_needed, ht_overflow;
  logic [2:0] lua, unit_ready;
  logic [31:0] n_components, n_skips, n_eos, n_switches, n_page_misses;
  int checks = 0, failures = 0;
  dmu #(.MEM_LOG2(16), .VPAGE_W(8), .WS_PAGES(12)) dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("%0t FAIL %s", $time, what); end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // EXU model
  int fi = 0, eos0 = 0;
  logic [15:0] got [$];
  logic [31:0] rets [$];
  logic [15:0] hi;
  logic ph = 0;
  assign unit_ready  = 3'b001;
  assign dbus_in     = 16'h0300 + 16'(fi);
  assign intr_ack_in = intr_req;
  always @(posedge clk) if (rst_n) begin
    if (csl && lua == 0 && !tdl) fi <= fi + 1;
    if (csl && lua == 0 && tdl) got.push_back(dbus_out);
    if (eos && lua == 0) eos0++;
    if (ret_oe) begin
      if (!ph) begin hi <= ret_data; ph <= 1; end
      else begin rets.push_back({hi, ret_data}); ph <= 0; end
    end
  end
  task automatic word(input logic [15:0] w);
    @(negedge clk); while (iq_full) @(negedge clk);
    ibus_in = w; uid_in = UID_DMU; is = 1;
    @(negedge clk); is = 0; uid_in = 0;
  endtask
  task automatic wr(input int s, input desc_field_e f, input int ax, input logic [31:0] v);
    word({OP_WRITE, 4'd0, 4'(s), 2'd0}); word({8'd0, f, 6'(ax)}); word(v[31:16]); word(v[15:0]);
  endtask
  task automatic wait_ret(output logic [31:0] v);
    int n = 0;
    while (rets.size() == 0 && n < 5000) begin @(posedge clk); n++; end
    check(rets.size() > 0, "result returned");
    v = rets.size() ? rets.pop_front() : 0;
  endtask
  logic [31:0] v;
  initial begin
    #12 rst_n = 1;
    while (!ready_out) @(posedge clk);
    check(!err, "no error after start-up");
    wr(1, FLD_RT, 0, 32'h0203); wr(1, FLD_RHO, 0, 3); wr(1, FLD_RHO, 1, 5);
    word({OP_ALLOCATE, 4'd0, 4'd1, 2'd0});
    wait_ret(v); check(v == 0, $sformatf("allocated at %h", v));
    word({OP_SETUP, 4'd0, 4'd1, 2'd0}); word(16'(LUA_EXU));
    while (eos0 < 1) @(posedge clk);
    check(fi == 15, $sformatf("15 components loaded, %0d", fi));
    word({OP_MROTATE, 4'd0, 4'd1, 2'd0}); word(16'd0);
    word({OP_SETUP, 4'd0, 4'd1, 2'd1}); word(16'(LUA_EXU));
    while (eos0 < 2) @(posedge clk);
    check(got.size() == 15, "15 components returned");
    for (int i = 0; i < 3; i++) for (int j = 0; j < 5; j++)
      check(got.size() > i * 5 + j && got[i * 5 + j] == 16'h0300 + 16'((2 - i) * 5 + j),
            $sformatf("row-reversed [%0d][%0d]", i, j));
    word({OP_READ, 4'd0, 4'd1, 2'd0}); word({8'd0, FLD_RHO, 6'd1});
    wait_ret(v); check(v == 5, "READ RHO[1]");
    check(n_eos == 2 && n_components == 30, "counters");
    check(n_page_misses >= 1, "page translated through the cell");
    check(!err && !gc_needed, "no error yet");
    wr(2, FLD_RT, 0, 32'h0105); wr(2, FLD_RHO, 0, 32'd20000);   // 20000 x 48 bits > workspace
    word({OP_ALLOCATE, 4'd0, 4'd2, 2'd0});
    repeat (300) @(posedge clk);
    check(err && gc_needed, "oversized allocation fails and asks for collection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
