// tb_omu_agen: drives the AC3 address generator from a descriptor model
// held in the testbench and compares every generated address with the
// direct formula base + sum(index[k] * J[k]) taken in row-major order.
// Three streams run interleaved component by component (a 3x4 matrix, a
// 2x3x5 array with a negative jump, a scalar), so the sets are switched
// every cycle. Checks the count of components per stream, the 'fin'
// pulse for each, one cycle per component inside a row and, for the
// rank-3 array, the extra cycles of the row and plane changes.
module tb_omu_agen;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  logic setup_valid = 0, setup_src = 0;
  logic [3:0] setup_set = '0, sel_set = '0, fin_set, ag_set;
  logic [2:0] setup_lua = '0, cur_lua;
  addr_t cur_addr, ag_base;
  logic [31:0] cur_bits, ag_rho;
  logic cur_active, cur_src, adv = 0, adv_ready, fin;
  logic [15:0] active_vec;
  logic [4:0] ag_axis;
  logic signed [31:0] ag_jump;
  rank_type_t ag_rt;
  int checks = 0, failures = 0;

  omu_agen dut (.*);
  always #5 clk = ~clk;

  // descriptor model
  addr_t      m_base [16];
  int         m_rank [16];
  int         m_rho  [16][32];
  int         m_j    [16][32];
  assign ag_base = m_base[ag_set];
  assign ag_rho  = 32'(m_rho[ag_set][ag_axis]);
  assign ag_jump = 32'(m_j[ag_set][ag_axis]);
  always_comb begin
    ag_rt = '0;
    ag_rt.rank = 5'(m_rank[ag_set]);
    ag_rt.size_code = 5'd3;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("%0t FAIL %s", $time, what); end
  endtask

  // expected address list of a set
  addr_t exp_q [16][$];
  task automatic expect_stream(input int s);
    int idx[32];
    int total = 1;
    exp_q[s].delete();
    for (int k = 0; k < m_rank[s]; k++) total *= m_rho[s][k];
    for (int k = 0; k < 32; k++) idx[k] = 0;
    for (int n = 0; n < total; n++) begin
      longint a = longint'(m_base[s]);
      for (int k = 0; k < m_rank[s]; k++) a += longint'(idx[k]) * m_j[s][k];
      exp_q[s].push_back(addr_t'(a));
      for (int k = m_rank[s] - 1; k >= 0; k--) begin
        idx[k]++;
        if (idx[k] < m_rho[s][k]) break;
        idx[k] = 0;
      end
    end
  endtask

  task automatic do_setup(input int s);
    @(negedge clk);
    setup_valid = 1; setup_set = 4'(s); setup_src = 1; setup_lua = 3'(s);
    @(negedge clk);
    setup_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int got [16];
  int fins [16];
  always @(posedge clk) if (rst_n && fin) fins[fin_set]++;

  initial begin
    int sets[3] = '{2, 5, 9};
    int busy_cycles, cycles, served;
    foreach (m_base[s]) begin m_base[s] = '0; m_rank[s] = 0; got[s] = 0; fins[s] = 0;
      for (int k = 0; k < 32; k++) begin m_rho[s][k] = 0; m_j[s][k] = 0; end end
    // set 2: 3x4 matrix of 16-bit components, row-major
    m_base[2] = 32'd1000; m_rank[2] = 2; m_rho[2][0] = 3; m_rho[2][1] = 4; m_j[2][0] = 64; m_j[2][1] = 16;
    // set 5: 2x3x5 array, middle axis reversed (negative jump)
    m_base[5] = 32'h0002_0000; m_rank[5] = 3;
    m_rho[5][0] = 2; m_rho[5][1] = 3; m_rho[5][2] = 5;
    m_j[5][0] = 240; m_j[5][1] = -80; m_j[5][2] = 16;
    // set 9: scalar
    m_base[9] = 32'h0000_4440; m_rank[9] = 0;
    foreach (sets[i]) expect_stream(sets[i]);
    #12 rst_n = 1;
    foreach (sets[i]) do_setup(sets[i]);
    check(active_vec == 16'h0224, "three sets armed");
    // serve round robin until all finish
    cycles = 0; served = 0; busy_cycles = 0;
    while (active_vec != '0 && cycles < 2000) begin
      @(negedge clk);
      adv = 0;
      if (!adv_ready) busy_cycles++;
      else begin
        for (int t = 0; t < 3; t++) begin
          int s;
          s = sets[(served + t) % 3];
          if (active_vec[s]) begin
            sel_set = 4'(s);
            #1;
            if (cur_active) begin
              check(exp_q[s].size() > 0 && cur_addr == exp_q[s][0],
                    $sformatf("set %0d component %0d: %h vs %h", s, got[s], cur_addr,
                              exp_q[s].size() ? exp_q[s][0] : 0));
              if (exp_q[s].size()) void'(exp_q[s].pop_front());
              got[s]++;
              adv = 1;
              served = served + t + 1;
            end
            break;
          end
        end
      end
      cycles++;
    end
    @(negedge clk); adv = 0;
    @(negedge clk);
    check(got[2] == 12 && got[5] == 30 && got[9] == 1,
          $sformatf("component counts %0d %0d %0d", got[2], got[5], got[9]));
    check(fins[2] == 1 && fins[5] == 1 && fins[9] == 1, "one fin per stream");
    // row changes: set 2 has 2 row changes (1 cycle each) + final carry (2);
    // set 5: 5 row changes within planes (1), 1 plane change (2), final carry (3)
    check(busy_cycles == 2 * 1 + 2 + 4 * 1 + 1 * 2 + 3,
          $sformatf("LP1 update cycles %0d", busy_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
