// tb_omu_desc: executes descriptor instructions on the OMU descriptor engine
// and checks each result by reading the descriptor back (READ of base, rank,
// RHO and jumps) and expanding it into the list of component addresses,
// which must equal the addresses of the selected components of the
// original array, computed here directly from the APL definition. Covered:
// WRITE/READ, COPY, MTRANSPOSE, MROTATE, TAKE (incl. negative), DROP,
// DTRANSPOSE (diagonal), RESHAPE of a vector, RAVEL (and its refusal of a
// non-contiguous array), ALLOCATE with the hole-table handshake, SETUP's
// output to the address generator, and the error of an overtake and of an
// instruction the engine does not execute. The left-argument vectors are
// read from a memory model on the engine's component port.
module tb_omu_desc;
  import maple_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, done, err;
  dmu_instr_t in_instr = '0;
  logic [15:0] in_d0 = 0, in_d1 = 0, in_d2 = 0;
  logic [31:0] result;
  logic setup_valid, setup_src;
  logic [3:0] setup_set, ag_set = 0;
  logic [2:0] setup_lua;
  logic [4:0] ag_axis = 0;
  logic [31:0] ag_rho;
  logic signed [31:0] ag_jump;
  addr_t ag_base;
  rank_type_t ag_rt;
  logic mem_req, mem_ack = 0;
  addr_t mem_addr;
  logic [31:0] mem_bits, mem_data = 0;
  logic alloc_req, alloc_ack = 0, alloc_fail = 0;
  logic [31:0] alloc_words, alloc_addr = 0;
  int checks = 0, failures = 0;
  omu_desc dut (.*);
  always #5 clk = ~clk;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("%0t FAIL %s", $time, what); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model for left-argument vectors: 16-bit integers
  logic [15:0] vmem [int];
  always @(posedge clk) if (rst_n) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      mem_ack  <= 1'b1;
      mem_data <= vmem.exists(int'(mem_addr)) ? 32'(vmem[int'(mem_addr)]) : 32'd0;
    end
  end
  // hole-table model: always grants at word 500 unless told to fail
  int alloc_seen_words = 0;
  bit alloc_refuse = 0;
  always @(posedge clk) if (rst_n) begin
    alloc_ack <= 0; alloc_fail <= 0;
    if (alloc_req && !alloc_ack && !alloc_fail) begin
      alloc_seen_words = int'(alloc_words);
      if (alloc_refuse) alloc_fail <= 1; else begin alloc_ack <= 1; alloc_addr <= 32'd500; end
    end
  end

  task automatic op(input dmu_op_e c, input int rd, input int rs, input int m,
                    input logic [15:0] a = 0, input logic [15:0] b = 0, input logic [15:0] d = 0,
                    output logic [31:0] res, output logic e);
    int n = 0;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    in_valid = 1; in_instr = {c, 4'(rd), 4'(rs), 2'(m)}; in_d0 = a; in_d1 = b; in_d2 = d;
    @(negedge clk); in_valid = 0;
    while (!done && n < 2000) begin @(posedge clk); #1; n++; end
    res = result; e = err;
  endtask
  logic [31:0] r; logic e;
  task automatic wr(input int s, input desc_field_e f, input int ax, input logic [31:0] v);
    op(OP_WRITE, 0, s, 0, {8'd0, f, 6'(ax)}, v[31:16], v[15:0], r, e);
  endtask
  task automatic rd(input int s, input desc_field_e f, input int ax, output logic [31:0] v);
    op(OP_READ, 0, s, 0, {8'd0, f, 6'(ax)}, 0, 0, r, e);
    v = r;
  endtask
  // describe an array of 16-bit integers; jumps row-major from base
  task automatic make(input int s, input addr_t base, input int rank, input int sh[]);
    int jj = 16;
    wr(s, FLD_RT, 0, 32'((rank << 8) | 3));
    wr(s, FLD_BASE, 0, base);
    for (int a = rank - 1; a >= 0; a--) begin
      wr(s, FLD_RHO, a, 32'(sh[a]));
      wr(s, FLD_JUMP, a, 32'(jj));
      jj *= sh[a];
    end
  endtask
  // read back and expand into an address list, row-major
  task automatic expand(input int s, output addr_t q[$], output int shape[$]);
    logic [31:0] rt, base, rho[32], jmp[32];
    int rank, idx[32], total = 1;
    q.delete(); shape.delete();
    rd(s, FLD_RT, 0, rt);
    rd(s, FLD_BASE, 0, base);
    rank = int'(rt[12:8]);
    for (int a = 0; a < rank; a++) begin
      rd(s, FLD_RHO, a, rho[a]); rd(s, FLD_JUMP, a, jmp[a]);
      shape.push_back(int'(rho[a])); total *= int'(rho[a]); idx[a] = 0;
    end
    for (int n = 0; n < total; n++) begin
      int ad = int'(base);
      for (int a = 0; a < rank; a++) ad += idx[a] * int'(signed'(jmp[a]));
      q.push_back(addr_t'(ad));
      for (int a = rank - 1; a >= 0; a--) begin
        idx[a]++;
        if (idx[a] < int'(rho[a])) break;
        idx[a] = 0;
      end
    end
  endtask
  task automatic compare(input int s, input addr_t want[$], input int wshape[$], input string what);
    addr_t got[$]; int gs[$];
    expand(s, got, gs);
    check(gs == wshape, $sformatf("%s shape", what));
    check(got == want, $sformatf("%s addresses (%0d vs %0d)", what, got.size(), want.size()));
  endtask
  task automatic vec(input int s, input addr_t base, input int v[]);
    int sh[1];
    sh[0] = v.size();
    foreach (v[i]) vmem[int'(base) + 16 * i] = 16'(v[i]);
    make(s, base, 1, sh);
  endtask
  // address of A[i][j] for the 3x4 matrix at base 1000
  function automatic addr_t A(int i, int j); return addr_t'(1000 + 64 * i + 16 * j); endfunction

  initial begin
    addr_t w[$]; int ws[$];
    #12 rst_n = 1;
    // A: 3x4 in register 1
    make(1, 1000, 2, '{3, 4});
    w.delete(); for (int i = 0; i < 3; i++) for (int j = 0; j < 4; j++) w.push_back(A(i, j));
    compare(1, w, '{3, 4}, "WRITE/READ");
    op(OP_COPY, 2, 1, 0, 0, 0, 0, r, e); compare(2, w, '{3, 4}, "COPY");
    op(OP_MTRANS, 0, 2, 0, 0, 0, 0, r, e);
    w.delete(); for (int j = 0; j < 4; j++) for (int i = 0; i < 3; i++) w.push_back(A(i, j));
    compare(2, w, '{4, 3}, "MTRANSPOSE");
    op(OP_COPY, 2, 1, 0, 0, 0, 0, r, e);
    op(OP_MROTATE, 0, 2, 0, 16'd1, 0, 0, r, e);
    w.delete(); for (int i = 0; i < 3; i++) for (int j = 0; j < 4; j++) w.push_back(A(i, 3 - j));
    compare(2, w, '{3, 4}, "MROTATE last axis");
    // TAKE 2 -3
    vec(9, 5000, '{2, -3});
    op(OP_COPY, 2, 1, 0, 0, 0, 0, r, e);
    op(OP_TAKE, 2, 9, 0, 0, 0, 0, r, e); check(!e, "take ok");
    w.delete(); for (int i = 0; i < 2; i++) for (int j = 1; j < 4; j++) w.push_back(A(i, j));
    compare(2, w, '{2, 3}, "TAKE 2 -3");
    // DROP 1 -1
    vec(9, 5000, '{1, -1});
    op(OP_COPY, 2, 1, 0, 0, 0, 0, r, e);
    op(OP_DROP, 2, 9, 0, 0, 0, 0, r, e);
    w.delete(); for (int i = 1; i < 3; i++) for (int j = 0; j < 3; j++) w.push_back(A(i, j));
    compare(2, w, '{2, 3}, "DROP 1 -1");
    // overtake is refused
    vec(9, 5000, '{4, 1});
    op(OP_COPY, 2, 1, 0, 0, 0, 0, r, e);
    op(OP_TAKE, 2, 9, 0, 0, 0, 0, r, e); check(e, "overtake flags error");
    // DTRANSPOSE 0 0: diagonal
    vec(9, 5000, '{0, 0});
    op(OP_COPY, 2, 1, 0, 0, 0, 0, r, e);
    op(OP_DTRANS, 2, 9, 0, 0, 0, 0, r, e); check(!e, "dtranspose ok");
    w.delete(); for (int i = 0; i < 3; i++) w.push_back(A(i, i));
    compare(2, w, '{3}, "DTRANSPOSE 0 0");
    // DTRANSPOSE 1 0 = transpose
    vec(9, 5000, '{1, 0});
    op(OP_COPY, 2, 1, 0, 0, 0, 0, r, e);
    op(OP_DTRANS, 2, 9, 0, 0, 0, 0, r, e);
    w.delete(); for (int j = 0; j < 4; j++) for (int i = 0; i < 3; i++) w.push_back(A(i, j));
    compare(2, w, '{4, 3}, "DTRANSPOSE 1 0");
    // RAVEL of A, then RESHAPE 2 6 of the vector
    op(OP_COPY, 3, 1, 0, 0, 0, 0, r, e);
    op(OP_RAVEL, 0, 3, 0, 0, 0, 0, r, e); check(!e, "ravel ok");
    w.delete(); for (int i = 0; i < 3; i++) for (int j = 0; j < 4; j++) w.push_back(A(i, j));
    compare(3, w, '{12}, "RAVEL");
    vec(9, 5000, '{2, 6});
    op(OP_RESHAPE, 3, 9, 0, 0, 0, 0, r, e); check(!e, "reshape ok");
    compare(3, w, '{2, 6}, "RESHAPE 2 6");
    op(OP_COPY, 3, 1, 0, 0, 0, 0, r, e);
    op(OP_MTRANS, 0, 3, 0, 0, 0, 0, r, e);
    op(OP_RAVEL, 0, 3, 0, 0, 0, 0, r, e); check(e, "ravel of a transposed view refused");
    // ALLOCATE a 5x7 array shaped like register 4
    make(4, 0, 2, '{5, 7});
    op(OP_ALLOCATE, 0, 4, 0, 0, 0, 0, r, e);
    check(!e && r == 32'd500 * 16, $sformatf("allocate base %0d", r));
    check(alloc_seen_words == 35, $sformatf("asked for %0d words", alloc_seen_words));
    w.delete(); for (int i = 0; i < 5; i++) for (int j = 0; j < 7; j++) w.push_back(addr_t'(8000 + 112 * i + 16 * j));
    compare(4, w, '{5, 7}, "ALLOCATE layout");
    alloc_refuse = 1;
    op(OP_ALLOCATE, 0, 4, 0, 0, 0, 0, r, e); check(e, "allocation failure reported");
    // SETUP
    fork
      op(OP_SETUP, 0, 4, 1, 16'd3, 0, 0, r, e);
      begin
        int n = 0;
        while (!setup_valid && n < 20) begin @(posedge clk); #1; n++; end
        check(setup_valid && setup_set == 4 && setup_src && setup_lua == 3, "setup output");
      end
    join
    // the address generator port reads the registers combinationally
    ag_set = 4; ag_axis = 1; #1;
    check(ag_rho == 7 && ag_jump == 16 && ag_base == 8000 && ag_rt.rank == 2, "generator read port");
    // unimplemented
    op(OP_CATENATE, 1, 2, 0, 0, 0, 0, r, e); check(e, "unimplemented instruction flags error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
