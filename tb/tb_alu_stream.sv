// tb_alu_stream: plays the DMU's side of the status and data bus against
// the ALU. For each function it sends Y and X components (one or two words),
// reads Z back and compares with a reference computed here: + - x max min
// residue, comparisons, logic, the monadic functions, 32-bit components,
// the overflow flag, the Ready handshake (Z not ready before a result, X not
// ready while full) and reductions with a ratio (+/ and the alternating -/).
module tb_alu_stream;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] ibus_in = 0, dbus_in = 0, dbus_out;
  logic [1:0] uid_in = 0;
  logic is = 0, tdl = 0, csl = 0, eos = 0, ready, dbus_oe, overflow;
  logic [2:0] lua = 0;
  logic [31:0] cnt_x, cnt_y, cnt_z, n_eos;
  int checks = 0, failures = 0;
  alu_stream dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("%0t FAIL %s", $time, what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic instr(input logic [15:0] w);
    @(negedge clk); ibus_in = w; uid_in = UID_ALU; is = 1;
    @(negedge clk); is = 0; uid_in = 0;
  endtask
  task automatic set_fn(input int op, input int w);
    instr({6'(op), 2'(w), 2'(w), 6'd0});
  endtask
  task automatic put(input logic [2:0] u, input logic [31:0] v, input int w);
    int n = 0;
    @(negedge clk); lua = u; tdl = 1;
    #1 while (!ready && n < 50) begin @(negedge clk); n++; #1; end
    check(ready, "input ready");
    csl = 1; dbus_in = v[15:0];
    @(negedge clk); csl = 0;
    if (w == 2) begin dbus_in = v[31:16]; @(negedge clk); end
    lua = 0; tdl = 0;
  endtask
  task automatic get(output logic [31:0] v, input int w);
    int n = 0;
    @(negedge clk); lua = LUA_ALU_Z; tdl = 0;
    #1 while (!ready && n < 50) begin @(negedge clk); n++; #1; end
    check(ready, "result ready");
    csl = 1; #1 v[15:0] = dbus_out; check(dbus_oe, "ALU drives Z");
    @(negedge clk); csl = 0; v[31:16] = 16'(signed'(v[15:0]) >>> 16);
    if (w == 2) begin #1 v[31:16] = dbus_out; @(negedge clk); end
    lua = 0;
  endtask
  function automatic int ref_f(int op, int y, int x);
    case (op)
      1: return y + x;  2: return y - x;  3: return y * x;
      4: return y > x ? y : x;  5: return y < x ? y : x;
      6: begin int r; if (y == 0) return x; r = x % y; if (r != 0 && ((r < 0) != (y < 0))) r += y; return r; end
      7: return int'(x == y); 8: return int'(x != y); 9: return int'(y < x);
      10: return int'(y <= x); 11: return int'(y > x); 12: return int'(y >= x);
      13: return y[0] & x[0]; 14: return y[0] | x[0];
      15: return int'(!(y[0] & x[0])); 16: return int'(!(y[0] | x[0]));
      32: return -x; 33: return int'(!x[0]); 34: return x < 0 ? -x : x;
      35: return x > 0 ? 1 : x < 0 ? -1 : 0;
      default: return x;
    endcase
  endfunction
  logic [31:0] z;
  initial begin
    int ops[21] = '{1,2,3,4,5,6,7,8,9,10,11,12,13,14,15,16,32,33,34,35,36};
    int ys[4] = '{7, -3, 0, 1000};
    int xs[4] = '{5, 4, -9, -17};
    #12 rst_n = 1;
    // dyadic and monadic functions, 16-bit components
    foreach (ops[o]) begin
      set_fn(ops[o], 0);
      for (int t = 0; t < 4; t++) begin
        if (ops[o] < 32) put(LUA_ALU_Y, 32'(ys[t]), 1);
        put(LUA_ALU_X, 32'(xs[t]), 1);
        get(z, 1);
        check(z == 32'(16'(ref_f(ops[o], ys[t], xs[t]))) || z == 32'(ref_f(ops[o], ys[t], xs[t])),
              $sformatf("op %0d y=%0d x=%0d z=%0d", ops[o], ys[t], xs[t], signed'(z)));
      end
    end
    // Ready: Z not ready with nothing computed, X not ready while full
    @(negedge clk); lua = LUA_ALU_Z; #1 check(!ready, "Z empty not ready");
    set_fn(1, 0);
    put(LUA_ALU_X, 1, 1);
    @(negedge clk); lua = LUA_ALU_X; #1 check(!ready, "X full not ready");
    put(LUA_ALU_Y, 2, 1);
    get(z, 1); check(z == 3, "late Y");
    // 32-bit components and overflow
    instr({6'd63, 10'd0});
    set_fn(3, 1);
    put(LUA_ALU_Y, 32'd100000, 2); put(LUA_ALU_X, 32'd3000, 2); get(z, 2);
    check(z == 32'd300000000 && !overflow, "32-bit multiply");
    put(LUA_ALU_Y, 32'd100000, 2); put(LUA_ALU_X, 32'd300000, 2); get(z, 2);
    check(overflow, "multiply overflow flagged");
    // reductions with ratio 3
    instr({6'd62, 10'd0}); instr(16'd3);
    set_fn(1, 0);
    foreach (xs[t]) if (t < 3) put(LUA_ALU_X, 32'(xs[t]), 1);
    get(z, 1); check(signed'(z) == 5 + 4 - 9, "+/ 5 4 -9");
    set_fn(2, 0);
    foreach (xs[t]) if (t < 3) put(LUA_ALU_X, 32'(xs[t]), 1);
    get(z, 1); check(signed'(z) == 5 - (4 - (-9)), "-/ 5 4 -9");
    set_fn(4, 0);
    for (int t = 1; t < 4; t++) put(LUA_ALU_X, 32'(xs[t]), 1);
    get(z, 1); check(signed'(z) == 4, "max/ 4 -9 -17");
    check(cnt_x == 9 && cnt_z == 3 && cnt_y == 0, $sformatf("counters %0d %0d %0d", cnt_x, cnt_y, cnt_z));
    @(negedge clk); eos = 1; @(negedge clk); eos = 0;
    check(n_eos == 1, "EOS counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
