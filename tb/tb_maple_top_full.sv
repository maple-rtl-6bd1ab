// tb_maple_top_full: the end-to-end program of tb_maple_top run on the top
// level with its default sizes (1M words of memory, 16-bit virtual page
// numbers, 64-entry hole table); start-up alone clears 65536 Relocation
// Vector entries and maps 252 workspace pages.
module tb_maple_top_full;
  tb_maple_top #(.FULL(1)) u_tb ();
endmodule
