// tb_mmu_pager: a reduced pager (64 virtual pages, 16 real pages).
// Checks the start-up clear of the Relocation Vector, FILL taking real
// pages 1, 2, 3... from the Free List, translation of bit addresses to
// real word addresses, same-page hits answered without indexing RV and
// page changes costing one RV access, black-hole faults, RELEASE returning
// a page that the next FILL reuses (stack order), and FILL failing once
// the Free List is empty.
module tb_mmu_pager;
  localparam int VW = 6, RW = 4;
  logic clk = 0, rst_n = 0;
  logic init_busy, tr_req = 0, tr_ack, tr_fault, tr_miss;
  logic [31:0] tr_vaddr = '0;
  logic [RW+11:0] tr_paddr;
  logic op_valid = 0, op_release = 0, op_done, op_fail;
  logic [VW-1:0] op_vpage = '0;
  logic [RW-1:0] op_rpage;
  logic [RW:0] free_pages;
  int checks = 0, failures = 0, misses = 0;
  int map[64];

  mmu_pager #(.VPAGE_W(VW), .RPAGE_W(RW)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && tr_miss) misses++;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("%0t FAIL %s", $time, what); end
  endtask

  task automatic page_op(input bit rel, input int vp, output bit fl, output int rp);
    @(negedge clk);
    op_valid = 1; op_release = rel; op_vpage = VW'(vp);
    do @(posedge clk); while (!op_done);
    fl = op_fail; rp = int'(op_rpage);
    @(negedge clk) op_valid = 0;
  endtask

  // returns the number of cycles until ack
  task automatic translate(input int vp, input int word, input int bitn,
                           output int cyc, output bit flt, output int pa);
    @(negedge clk);
    tr_req = 1; tr_vaddr = {16'(vp), 12'(word), 4'(bitn)};
    #1 cyc = 0;
    while (!tr_ack) begin @(negedge clk); #1 cyc++; end
    flt = tr_fault; pa = int'(tr_paddr);
    tr_req = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit fl, flt;
    int rp, cyc, pa, m0;
    #12 rst_n = 1;
    @(posedge clk);
    check(init_busy, "clearing RV after reset");
    wait (!init_busy);
    check(int'(free_pages) == 15, "15 free real pages");
    foreach (map[v]) map[v] = 0;
    // fill vpages 3, 10, 11 -> real 1, 2, 3
    page_op(0, 3, fl, rp);  check(!fl && rp == 1, "fill vp3 -> 1"); map[3] = rp;
    page_op(0, 10, fl, rp); check(!fl && rp == 2, "fill vp10 -> 2"); map[10] = rp;
    page_op(0, 11, fl, rp); check(!fl && rp == 3, "fill vp11 -> 3"); map[11] = rp;
    page_op(0, 10, fl, rp); check(fl, "fill of a mapped page fails");
    check(int'(free_pages) == 12, "12 free pages left");
    // translation
    m0 = misses;
    translate(3, 17, 5, cyc, flt, pa);
    check(!flt && pa == (1 << 12) + 17 && cyc == 2, $sformatf("vp3 miss: pa %0h cyc %0d", pa, cyc));
    translate(3, 4095, 0, cyc, flt, pa);
    check(!flt && pa == (1 << 12) + 4095 && cyc == 0, $sformatf("vp3 hit in the associative cell %0d %0h %0d", flt, pa, cyc));
    translate(10, 0, 0, cyc, flt, pa);
    check(!flt && pa == (2 << 12) && cyc == 2, "vp10 page change");
    translate(11, 100, 3, cyc, flt, pa);
    check(!flt && pa == (3 << 12) + 100, "vp11");
    translate(5, 0, 0, cyc, flt, pa);
    check(flt, "vp5 is a black hole");
    @(posedge clk); #1;
    check(misses - m0 == 4, $sformatf("RV indexed on page changes only (%0d)", misses - m0));
    // release vp10, then the next fill reuses real page 2
    page_op(1, 10, fl, rp); check(!fl && rp == 2, "release vp10 returns page 2");
    translate(10, 0, 0, cyc, flt, pa);
    check(flt, "vp10 black hole after release");
    page_op(1, 10, fl, rp); check(fl, "release of a black hole fails");
    page_op(0, 40, fl, rp); check(!fl && rp == 2, "fill reuses the released page");
    translate(40, 9, 0, cyc, flt, pa);
    check(!flt && pa == (2 << 12) + 9, "vp40 -> page 2");
    // exhaust the free list
    for (int v = 50; v < 62; v++) begin
      page_op(0, v, fl, rp);
      check(!fl, $sformatf("fill vp%0d", v));
    end
    check(free_pages == 0, "free list empty");
    page_op(0, 62, fl, rp); check(fl, "fill fails on an empty free list");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
