// comp_size_rom: the component size table held in every MAPLE unit.
//
// The 5-bit size code of a rank-type word indexes a table of 32-bit bit
// sizes. Codes 1..6 are the real sizes 1, 8, 16, 32, 48 and 64 bits; codes
// 9..14 are the complex (ordered pair) sizes, twice the size of the code
// with bit 3 cleared: 2, 16, 32, 64, 96, 128 bits. Every other code is
// unassigned and reads as size 0, flagged by 'valid' low. The table
// contents follow the document; the 'valid' flag is this design's addition.
// Purely combinational.
module comp_size_rom (
  input  logic [4:0]  code,
  output logic [31:0] bits,
  output logic        valid
);
  always_comb begin
    unique case (code)
      5'd1:    bits = 32'd1;
      5'd2:    bits = 32'd8;
      5'd3:    bits = 32'd16;
      5'd4:    bits = 32'd32;
      5'd5:    bits = 32'd48;
      5'd6:    bits = 32'd64;
      5'd9:    bits = 32'd2;
      5'd10:   bits = 32'd16;
      5'd11:   bits = 32'd32;
      5'd12:   bits = 32'd64;
      5'd13:   bits = 32'd96;
      5'd14:   bits = 32'd128;
      default: bits = 32'd0;
    endcase
    valid = (bits != 32'd0);
  end
endmodule
