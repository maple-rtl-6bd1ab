// tb_comp_size_rom: checks every one of the 32 size codes against the
// component size table: real sizes 1, 8, 16, 32, 48, 64 bits for codes
// 1..6, twice those for the complex codes 9..14, unassigned elsewhere.
module tb_comp_size_rom;
  logic [4:0]  code;
  logic [31:0] bits;
  logic        valid;
  int checks = 0, failures = 0;

  comp_size_rom dut (.code, .bits, .valid);

  function automatic int expected(input int c);
    int real_sz[7] = '{0, 1, 8, 16, 32, 48, 64};
    if (c >= 1 && c <= 6)  return real_sz[c];
    if (c >= 9 && c <= 14) return 2 * real_sz[c - 8];
    return 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 32; c++) begin
      code = 5'(c);
      #1;
      checks++;
      if (int'(bits) != expected(c) || valid != (expected(c) != 0)) begin
        failures++;
        $display("code %0d: bits %0d valid %0b, expected %0d", c, bits, valid, expected(c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
