// main_memory: MAPLE's main store, an array of 16-bit words.
//
// Single port, synchronous: a read returns rdata one cycle after
// en && !we; a write with en && we stores wdata at the clock edge. Words
// are addressed by real word address (real page number, word in page).
// The document sizes main memory at 1 to 256 million 16-bit words; the
// default WORDS_LOG2 = 20 is the low end of that range. Contents are
// cleared to zero at start of simulation by an initial loop so that reads
// are defined; the RAM itself has no reset.
module main_memory #(
  parameter int WORDS_LOG2 = 20
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic                  we,
  input  logic [WORDS_LOG2-1:0] addr,
  input  logic [15:0]           wdata,
  output logic [15:0]           rdata
);
  logic [15:0] mem [1 << WORDS_LOG2];

  initial begin
    for (int k = 0; k < (1 << WORDS_LOG2); k++) mem[k] = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end
endmodule
