// tb_hole_table: random allocations and releases against a reference model
// of a first-fit, address-ordered hole table with augmentation, on a small
// table (8 entries) so that table overflow and failed allocations occur.
// After every request the whole table, the count, the allocated location,
// the fail/overflow/gc flags and the closest-pair output are compared.
module tb_hole_table;
  localparam int M = 8;
  localparam int AW = 16;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_release = 0;
  logic [AW-1:0] req_loc = '0, req_size = '0;
  logic ack, fail, gc_needed, overflow, gc_pair_valid;
  logic [AW-1:0] alloc_loc, gc_pair_gap;
  logic [$clog2(M+1)-1:0] count;
  logic [$clog2(M)-1:0] gc_pair_idx;
  logic [AW:0] free_words;
  int checks = 0, failures = 0;
  int n_alloc = 0, n_exact = 0, n_merge2 = 0, n_overflow = 0, n_gc = 0;

  hole_table #(.M(M), .AW(AW), .INIT_LOC(16'd0), .INIT_SIZE(16'd1000)) dut (.*);
  always #5 clk = ~clk;

  logic got_fail;
  int hl[$], hs[$];           // model holes
  int sl[$], ss[$];           // allocated segments

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("%0t FAIL %s", $time, what); end
  endtask

  task automatic request(input bit rel, input int loc, input int size);
    req_valid = 1; req_release = rel; req_loc = AW'(loc); req_size = AW'(size);
    do @(posedge clk); while (!ack);
    got_fail = fail;
    #1 req_valid = 0;
    @(posedge clk); #1;
  endtask

  task automatic compare_table();
    check(int'(count) == hl.size(), $sformatf("count %0d vs %0d", count, hl.size()));
    for (int k = 0; k < hl.size() && k < M; k++)
      check(int'(dut.hl[k]) == hl[k] && int'(dut.hs[k]) == hs[k],
            $sformatf("entry %0d {%0d,%0d} vs {%0d,%0d}", k, dut.hl[k], dut.hs[k], hl[k], hs[k]));
    if (hl.size() > 1) begin
      int best = 1 << 30, bi = 0;
      for (int k = 0; k + 1 < hl.size(); k++)
        if (hl[k+1] - (hl[k] + hs[k]) < best) begin best = hl[k+1] - (hl[k] + hs[k]); bi = k; end
      check(gc_pair_valid && int'(gc_pair_idx) == bi && int'(gc_pair_gap) == best, "closest pair");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hl.push_back(0); hs.push_back(1000);
    #12 rst_n = 1;
    @(posedge clk); #1;
    for (int it = 0; it < 1200; it++) begin
      bit do_alloc;
      do_alloc = (sl.size() == 0) || ($urandom % 100 < 55);
      if (do_alloc) begin
        int s, k, eloc;
        bit found;
        s = 1 + $urandom % 120;
        found = 0; eloc = 0;
        for (k = 0; k < hl.size(); k++) if (hs[k] >= s) begin found = 1; break; end
        if (found) begin
          eloc = hl[k];
          if (hs[k] == s) begin hl.delete(k); hs.delete(k); n_exact++; end
          else begin hl[k] += s; hs[k] -= s; end
          sl.push_back(eloc); ss.push_back(s);
        end
        request(0, 0, s);
        n_alloc++;
        check(got_fail == !found && gc_needed == !found, "alloc fail flag");
        if (!found) n_gc++;
        if (found) check(int'(alloc_loc) == eloc, $sformatf("alloc loc %0d vs %0d", alloc_loc, eloc));
      end else begin
        int j, L, S, k;
        bit below, above, ovf;
        j = $urandom % sl.size();
        L = sl[j]; S = ss[j];
        for (k = 0; k < hl.size(); k++) if (hl[k] >= L) break;
        below = (k > 0) && (hl[k-1] + hs[k-1] == L);
        above = (k < hl.size()) && (L + S == hl[k]);
        ovf = 0;
        if (below && above) begin hs[k-1] += S + hs[k]; hl.delete(k); hs.delete(k); n_merge2++; end
        else if (below) hs[k-1] += S;
        else if (above) begin hl[k] = L; hs[k] += S; end
        else if (hl.size() == M) ovf = 1;
        else begin hl.insert(k, L); hs.insert(k, S); end
        if (!ovf) begin sl.delete(j); ss.delete(j); end
        else n_overflow++;
        request(1, L, S);
        check(overflow == ovf && got_fail == ovf, "release overflow flag");
      end
      compare_table();
    end
    check(n_overflow > 0, "table overflow exercised");
    check(n_merge2 > 0, "two-hole augmentation exercised");
    check(n_exact > 0, "exact fit exercised");
    $display("allocs %0d exact %0d merges %0d overflows %0d gc %0d", n_alloc, n_exact, n_merge2, n_overflow, n_gc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
