// tb_mmu_comp_port: random reads and writes of components of 1, 2, 8, 16,
// 32, 48, 64 and 128 bits through the component port into a real
// main_memory, with a translation model here (virtual page 0 -> real page
// 2, page 1 -> real page 1, other pages black holes). Every read is
// compared with a bit-level model of the virtual space; components that
// n_cross the page boundary and a black-hole access (fault) are included.
module tb_mmu_comp_port;
  localparam int PA_W = 14;
  logic clk = 0, rst_n = 0;
  logic req = 0, we = 0, ack, fault;
  logic [31:0] vaddr = 0, bits = 16;
  logic [127:0] wdata = 0, rdata;
  logic tr_req, tr_ack, tr_fault;
  logic [31:0] tr_vaddr;
  logic [PA_W-1:0] tr_paddr;
  logic mem_en, mem_we;
  logic [PA_W-1:0] mem_addr;
  logic [15:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  mmu_comp_port #(.PA_W(PA_W)) dut (.*);
  main_memory #(.WORDS_LOG2(PA_W)) u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
                                          .wdata(mem_wdata), .rdata(mem_rdata));
  // translation model
  logic [15:0] vp;
  assign vp       = tr_vaddr[31:16];
  assign tr_ack   = tr_req;
  assign tr_fault = tr_req && vp > 16'd1;
  assign tr_paddr = PA_W'({(vp == 16'd0) ? 2'd2 : 2'd1, tr_vaddr[15:4]});

  always #5 clk = ~clk;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("%0t FAIL %s", $time, what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] model [8192];   // virtual words of pages 0 and 1
  task automatic access(input bit w, input logic [31:0] a, input int b, input logic [127:0] d,
                        output logic [127:0] r, output logic f);
    int n = 0;
    @(negedge clk);
    req = 1; we = w; vaddr = a; bits = 32'(b); wdata = d;
    #1 while (!ack && n < 200) begin @(negedge clk); n++; #1; end
    check(ack, "ack");
    r = rdata; f = fault;
    @(negedge clk); req = 0;
  endtask
  function automatic logic [127:0] model_read(logic [31:0] a, int b);
    logic [127:0] v = '0;
    int wa = int'(a[31:4]);
    if (b < 16) begin
      logic [15:0] word_v = model[wa];
      for (int i = 0; i < b; i++) v[i] = word_v[int'(a[3:0]) + i];
    end else
      for (int k = 0; k < (b + 15) / 16; k++) v[16 * k +: 16] = model[wa + k];
    return b >= 128 ? v : v & ((128'd1 << b) - 1);
  endfunction
  task automatic model_write(logic [31:0] a, int b, logic [127:0] d);
    int wa = int'(a[31:4]);
    if (b < 16) for (int i = 0; i < b; i++) model[wa][int'(a[3:0]) + i] = d[i];
    else for (int k = 0; k < (b + 15) / 16; k++) model[wa + k] = d[16 * k +: 16];
  endtask

  initial begin
    int sizes[8] = '{1, 2, 8, 16, 32, 48, 64, 128};
    logic [127:0] r, d;
    logic f;
    int n_cross = 0, subw = 0;
    for (int i = 0; i < 8192; i++) model[i] = '0;
    #12 rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      int b, wa;
      logic [31:0] a;
      b  = sizes[$urandom_range(0, 7)];
      wa = (t % 50 == 7) ? 4096 - 2 : $urandom_range(0, 8180);
      a = {4'd0, 28'(wa)} << 4;
      if (b < 16) a[3:0] = 4'($urandom_range(0, 16 / b - 1) * b);
      d = {$urandom, $urandom, $urandom, $urandom};
      if (b < 128) d &= (128'd1 << b) - 1;
      if ($urandom_range(0, 1)) begin
        access(1, a, b, d, r, f);
        model_write(a, b, d);
      end else begin
        access(0, a, b, 0, r, f);
        check(r == model_read(a, b), $sformatf("read %0d bits at %h: %h vs %h", b, a, r, model_read(a, b)));
        if (b < 16) subw++;
        if (wa + (b + 15) / 16 > 4096 && wa < 4096) n_cross++;
      end
      check(!f, "no fault");
    end
    // a 128-bit component across the page boundary
    d = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210;
    access(1, 32'(4092) << 4, 128, d, r, f); model_write(32'(4092) << 4, 128, d);
    access(0, 32'(4092) << 4, 128, 0, r, f);
    check(r == d, "page-crossing component"); n_cross++;
    access(0, 32'(4096) << 4, 32, 0, r, f);
    check(r == 128'h89AB_CDEF, "its second page holds the high words");
    check(subw > 10 && n_cross > 0, $sformatf("subword reads %0d, page-crossing reads %0d", subw, n_cross));
    access(0, 32'h0002_0000, 16, 0, r, f);
    check(f, "black hole faults");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
