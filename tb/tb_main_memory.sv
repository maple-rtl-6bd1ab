// tb_main_memory: writes a pseudo-random pattern to scattered addresses of
// a reduced memory, reads it back (one-cycle read latency) and checks that
// an untouched word reads as zero.
module tb_main_memory;
  localparam int L = 12;
  logic clk = 0, en = 0, we = 0;
  logic [L-1:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [15:0] model [1 << L];

  main_memory #(.WORDS_LOG2(L)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < (1 << L); k++) model[k] = '0;
    @(negedge clk);
    for (int k = 0; k < 300; k++) begin
      en = 1; we = 1; addr = L'(k * 37 + 5); wdata = 16'($urandom);
      model[addr] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int k = 0; k < (1 << L); k += 7) begin
      en = 1; addr = L'(k);
      @(negedge clk);
      checks++;
      if (rdata != model[k]) begin
        failures++;
        $display("addr %0d: %h expected %h", k, rdata, model[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
