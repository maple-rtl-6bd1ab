// tb_dmu_instr_if: sends DMU instructions of one to four words over the
// instruction bus, interleaved with words for other units, and checks that
// they leave the FIFO whole and in order with the right data words; that
// 'iq_full' rises when the queue is nearly full; and that a result is
// returned by interrupt as high then low half with UID = DMU, while an
// acknowledge passes down the chain when the DMU is not requesting.
module tb_dmu_instr_if;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] ibus_in = 0, out_d0, out_d1, out_d2, ret_data;
  logic [1:0] uid_in = 0, ret_uid;
  logic is = 0, iq_full, out_valid, out_ready = 0, res_valid = 0;
  logic intr_req, intr_ack_in = 0, intr_ack_out, ret_oe;
  dmu_instr_t out_instr;
  logic [31:0] res_data = 0;
  int checks = 0, failures = 0;
  dmu_instr_if dut (.*);
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
  task automatic word(input logic [1:0] u, input logic [15:0] w);
    @(negedge clk); ibus_in = w; uid_in = u; is = 1;
    @(negedge clk); is = 0; uid_in = 0;
  endtask
  typedef struct { logic [15:0] w0, d0, d1, d2; } ins_t;
  ins_t sent [$];
  task automatic send(input dmu_op_e op, input int nd);
    ins_t x;
    x.w0 = {op, 4'($urandom), 4'($urandom), 2'($urandom)};
    x.d0 = nd > 0 ? 16'($urandom) : 16'd0;
    x.d1 = nd > 1 ? 16'($urandom) : 16'd0;
    x.d2 = nd > 2 ? 16'($urandom) : 16'd0;
    sent.push_back(x);
    word(UID_DMU, x.w0);
    word(UID_ALU, 16'hFFFF);                 // not for the DMU
    if (nd > 0) word(UID_DMU, x.d0);
    if (nd > 1) word(UID_DMU, x.d1);
    if (nd > 2) word(UID_DMU, x.d2);
  endtask
  task automatic drain(input int n);
    for (int k = 0; k < n; k++) begin
      ins_t x;
      @(negedge clk);
      check(out_valid, "instruction waiting");
      x = sent.pop_front();
      check(out_instr == x.w0 && out_d0 == x.d0 && out_d1 == x.d1 && out_d2 == x.d2,
            $sformatf("instruction %h %h %h %h vs %h %h %h %h", out_instr, out_d0, out_d1, out_d2,
                      x.w0, x.d0, x.d1, x.d2));
      out_ready = 1; @(negedge clk); out_ready = 0;
    end
  endtask
  logic [15:0] hi, lo;
  initial begin
    #12 rst_n = 1;
    send(OP_COPY, 0); send(OP_SETUP, 1); send(OP_STALLOC, 2);
    @(negedge clk); check(iq_full, "queue nearly full after three");
    drain(3);
    @(negedge clk); check(!out_valid && !iq_full, "queue empty");
    send(OP_WRITE, 3); drain(1);
    send(OP_READ, 1); send(OP_MTRANS, 0); drain(2);
    // an acknowledge passes down when not requesting
    @(negedge clk); intr_ack_in = 1; #1 check(intr_ack_out && !ret_oe, "ack passed on");
    intr_ack_in = 0;
    // result return
    @(negedge clk); res_data = 32'hDEAD_BEEF; res_valid = 1;
    @(negedge clk); res_valid = 0;
    check(intr_req, "interrupt requested");
    repeat (3) @(negedge clk);
    check(intr_req && !ret_oe, "request held until acknowledged");
    intr_ack_in = 1;
    #1 check(ret_oe && ret_uid == UID_DMU && !intr_ack_out, "granted, ack not passed");
    hi = ret_data;
    @(negedge clk); #1 lo = ret_data; check(ret_oe, "second half");
    @(negedge clk); intr_ack_in = 0;
    check({hi, lo} == 32'hDEAD_BEEF, $sformatf("returned %h%h", hi, lo));
    check(!intr_req, "request dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
