// tb_dmu_stream_ctrl: the stream controller with the real address
// generator, bus controller, component port and memory around it; address
// translation is the identity and the descriptors come from a model here.
// Two streams run at once: set 3 sources a 2x3 array to unit LUA 1 and
// set 7 sinks six components from unit LUA 0 into another array. The units
// are modelled here with Ready lines that drop at random. Checked: the
// words each unit receives and the memory contents written, one EOS per
// stream naming its unit, skips of units that are not ready, switching
// between the two streams, the component count and a descriptor-engine
// read served in the middle of streaming.
module tb_dmu_stream_ctrl;
  import maple_pkg::*;
  localparam int PA = 12;
  logic clk = 0, rst_n = 0;
  // generator
  logic setup_valid = 0, setup_src = 0;
  logic [3:0] setup_set = 0, sel_set, fin_set, ag_set;
  logic [2:0] setup_lua = 0, cur_lua;
  addr_t cur_addr, ag_base;
  logic [31:0] cur_bits, ag_rho;
  logic cur_active, cur_src, adv, adv_ready, fin;
  logic [15:0] active_vec;
  logic [4:0] ag_axis;
  logic signed [31:0] ag_jump;
  rank_type_t ag_rt;
  // aux
  logic aux_req = 0, aux_we = 0, aux_ack;
  logic [31:0] aux_wdata = 0;
  addr_t aux_addr = 0;
  logic [31:0] aux_bits = 16, aux_data;
  // port and bus
  logic cp_req, cp_we, cp_ack, cp_fault;
  addr_t cp_vaddr;
  logic [31:0] cp_bits;
  logic [127:0] cp_wdata, cp_rdata, bc_wdata, bc_rdata;
  logic bc_valid, bc_ready, bc_tdl, bc_done, bc_ok;
  logic [1:0] bc_op;
  logic [2:0] bc_lua, lua, ready;
  logic [3:0] bc_nwords;
  logic tdl, csl, eos, dbus_oe;
  logic [15:0] dbus_out, dbus_in;
  logic tr_req, tr_ack, tr_fault;
  logic [31:0] tr_vaddr;
  logic [PA-1:0] tr_paddr, mem_addr;
  logic mem_en, mem_we;
  logic [15:0] mem_wdata, mem_rdata;
  logic [31:0] n_components, n_skips, n_eos, n_switches;
  int checks = 0, failures = 0;

  dmu_stream_ctrl dut (.*);
  omu_agen u_ag (.clk, .rst_n, .setup_valid, .setup_set, .setup_src, .setup_lua,
                 .sel_set, .cur_addr, .cur_bits, .cur_active, .cur_src, .cur_lua,
                 .adv, .adv_ready, .fin, .fin_set, .active_vec,
                 .ag_set, .ag_axis, .ag_rho, .ag_jump, .ag_base, .ag_rt);
  bus_controller u_bc (.clk, .rst_n, .cmd_valid(bc_valid), .cmd_ready(bc_ready), .cmd_op(bc_op),
                       .cmd_tdl(bc_tdl), .cmd_lua(bc_lua), .cmd_nwords(bc_nwords), .cmd_wdata(bc_wdata),
                       .done(bc_done), .ok(bc_ok), .rdata(bc_rdata),
                       .tdl, .lua, .csl, .eos, .ready, .dbus_out, .dbus_oe, .dbus_in);
  mmu_comp_port #(.PA_W(PA)) u_cp (.clk, .rst_n, .req(cp_req), .we(cp_we), .vaddr(cp_vaddr),
                       .bits(cp_bits), .wdata(cp_wdata), .ack(cp_ack), .fault(cp_fault), .rdata(cp_rdata),
                       .tr_req, .tr_vaddr, .tr_ack, .tr_fault, .tr_paddr,
                       .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);
  main_memory #(.WORDS_LOG2(PA)) u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
                       .wdata(mem_wdata), .rdata(mem_rdata));
  assign tr_ack = tr_req;
  assign tr_fault = 1'b0;
  assign tr_paddr = tr_vaddr[PA+3:4];

  // descriptors: set 3 = 2x3 at word 100, set 7 = 6-vector at word 200
  always_comb begin
    ag_base = '0; ag_rho = 0; ag_jump = 0; ag_rt = '0; ag_rt.size_code = 5'd3;
    if (ag_set == 4'd3) begin
      ag_base = 32'd100 * 16; ag_rt.rank = 2;
      ag_rho  = (ag_axis == 0) ? 32'd2 : 32'd3;
      ag_jump = (ag_axis == 0) ? 32'sd48 : 32'sd16;
    end else if (ag_set == 4'd7) begin
      ag_base = 32'd200 * 16; ag_rt.rank = 1; ag_rho = 32'd6; ag_jump = 32'sd16;
    end
  end

  always #5 clk = ~clk;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("%0t FAIL %s", $time, what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // unit models
  logic [15:0] lfsr = 16'h1D0F;
  logic [15:0] to_unit1 [$];
  int fed = 0, eos1 = 0, eos0 = 0;
  assign ready   = {1'b0, lfsr[1] | lfsr[5], lfsr[2] | lfsr[7]};
  assign dbus_in = 16'h0A00 + 16'(fed);
  always @(posedge clk) if (rst_n) begin
    lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    if (csl && lua == 3'd1 && tdl) to_unit1.push_back(dbus_out);
    if (csl && lua == 3'd0 && !tdl) fed <= fed + 1;
    if (eos && lua == 3'd1) eos1++;
    if (eos && lua == 3'd0) eos0++;
  end

  task automatic setup(input int s, input bit src, input int u);
    @(negedge clk); setup_valid = 1; setup_set = 4'(s); setup_src = src; setup_lua = 3'(u);
    @(negedge clk); setup_valid = 0;
  endtask

  initial begin
    #1;
    for (int i = 0; i < 6; i++) u_mem.mem[100 + i] = 16'h0100 + 16'(i);
    u_mem.mem[300] = 16'hBEEF;
    #11 rst_n = 1;
    setup(3, 1, 1);
    setup(7, 0, 0);
    repeat (12) @(negedge clk);
    aux_addr = 32'd300 * 16; aux_bits = 16; aux_req = 1;
    while (!aux_ack) @(negedge clk);
    check(aux_data[15:0] == 16'hBEEF, "descriptor-engine read");
    aux_req = 0;
    begin
      int n = 0;
      while ((eos0 == 0 || eos1 == 0) && n < 5000) begin @(negedge clk); n++; end
    end
    repeat (5) @(negedge clk);
    check(eos0 == 1 && eos1 == 1 && n_eos == 2, "one EOS per stream");
    check(to_unit1.size() == 6, "six components to unit 1");
    foreach (to_unit1[i]) check(to_unit1[i] == 16'h0100 + 16'(i), $sformatf("unit 1 word %0d", i));
    for (int i = 0; i < 6; i++)
      check(u_mem.mem[200 + i] == 16'h0A00 + 16'(i), $sformatf("stored word %0d = %h", i, u_mem.mem[200 + i]));
    check(n_components == 12, $sformatf("components %0d", n_components));
    check(n_skips > 0, "not-ready units skipped");
    check(n_switches > 2, "streams interleaved");
    check(active_vec == 0, "all streams finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
