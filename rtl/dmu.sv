// dmu: the Data Manipulation Unit, MAPLE's memory machine.
//
// The DMU holds the whole workspace and is the only unit that touches main
// memory. It is built from:
//   dmu_instr_if     instruction bus receiver, instruction FIFO, result return
//   omu_desc         Object Manipulation Unit: 16 descriptor register files
//                    and the descriptor (selection) instruction engine
//   omu_agen         OMU address generator (AC3), multiplexed over 16 sets
//   dmu_stream_ctrl  interleaves the active streams one component at a time
//   bus_controller   status bus (TDL, LUA, CSL, EOS, Ready) and data bus
//   mmu_comp_port    component access at a bit address
//   mmu_pager        Relocation Vector, associative cell and Free List
//   hole_table       first-fit hole table used by ALLOCATE
//   dmu_tstack       temporary stack (STALLOC, TPUSH, TPOP) in paged memory
//   main_memory      2**MEM_LOG2 16-bit words
// After reset the pager clears its Relocation Vector, then the DMU maps the
// user workspace, virtual pages 0..WS_PAGES-1, to real pages taken from the
// Free List; the remaining real pages stay free for system objects.
// 'ready_out' rises when this is done; instructions sent before are held
// in the FIFO. The hole table starts with one hole covering the workspace.
// Instructions run one at a time: stack instructions in the temporary
// stack, all others in the descriptor engine. Results of READ, ALLOCATE and
// TPOP return over the instruction bus by interrupt; a failed instruction
// sets the sticky 'err'. After start-up the pager's page operations belong
// to the temporary stack, which fills and releases the pages of its own
// virtual subspace (starting at the middle of the virtual space).
// The split into OMU, MMU and bus controller follows the document; the
// start-up mapping and the counters brought out for observation are this
// design's.
module dmu
  import maple_pkg::*;
#(
  parameter int MEM_LOG2 = 20,                 // 1M words
  parameter int VPAGE_W  = 16,
  parameter int WS_PAGES = (1 << (MEM_LOG2 - 12)) - 4,
  parameter int HT_SIZE  = 64,
  parameter int IQ_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        ready_out,
  output logic        err,
  // instruction bus
  input  logic [15:0] ibus_in,
  input  logic [1:0]  uid_in,
  input  logic        is,
  output logic        iq_full,
  output logic        intr_req,
  input  logic        intr_ack_in,
  output logic        intr_ack_out,
  output logic [15:0] ret_data,
  output logic [1:0]  ret_uid,
  output logic        ret_oe,
  // status bus
  output logic        tdl,
  output logic [2:0]  lua,
  output logic        csl,
  output logic        eos,
  input  logic [2:0]  unit_ready,
  // data bus
  output logic [15:0] dbus_out,
  output logic        dbus_oe,
  input  logic [15:0] dbus_in,
  // observation
  output logic [31:0] n_components,
  output logic [31:0] n_skips,
  output logic [31:0] n_eos,
  output logic [31:0] n_switches,
  output logic [31:0] n_page_misses,
  output logic        gc_needed,
  output logic        ht_overflow
);
  localparam int RPAGE_W = MEM_LOG2 - 12;
  localparam int SW = $clog2(NREGS);
  localparam int AW = $clog2(MAX_AXES);

  // ---------------- instruction interface ----------------
  logic        iv, ir;
  dmu_instr_t  ii;
  logic [15:0] d0, d1, d2;
  logic        res_valid;
  logic [31:0] res_data;

  dmu_instr_if #(.IQ_DEPTH(IQ_DEPTH)) u_if (
    .clk, .rst_n, .ibus_in, .uid_in, .is, .iq_full,
    .out_valid(iv), .out_ready(ir), .out_instr(ii), .out_d0(d0), .out_d1(d1), .out_d2(d2),
    .res_valid, .res_data, .intr_req, .intr_ack_in, .intr_ack_out, .ret_data, .ret_uid, .ret_oe
  );

  // ---------------- OMU ----------------
  logic        od_ready, od_done, od_err;
  logic [31:0] od_result;
  logic        su_valid, su_src;
  logic [SW-1:0] su_set;
  logic [2:0]  su_lua;
  logic [SW-1:0] ag_set;
  logic [AW-1:0] ag_axis;
  logic [31:0] ag_rho;
  logic signed [31:0] ag_jump;
  addr_t       ag_base;
  rank_type_t  ag_rt;
  logic        aux_req, aux_we, aux_ack;
  addr_t       aux_addr;
  logic [31:0] aux_bits, aux_data, aux_wdata;
  logic        al_req, al_ack, al_fail;
  logic [31:0] al_words, al_addr;

  logic        is_stk, ts_ready, ts_done, ts_err;
  logic [31:0] ts_result;
  assign is_stk = (ii.code == OP_STALLOC) || (ii.code == OP_TPUSH) || (ii.code == OP_TPOP);
  assign ir = od_ready && ts_ready && ready_out;

  logic        od_aux_req;
  addr_t       od_aux_addr;
  logic [31:0] od_aux_bits;

  omu_desc u_desc (
    .clk, .rst_n,
    .in_valid(iv && ready_out && !is_stk && ts_ready), .in_ready(od_ready), .in_instr(ii),
    .in_d0(d0), .in_d1(d1), .in_d2(d2),
    .done(od_done), .err(od_err), .result(od_result),
    .setup_valid(su_valid), .setup_set(su_set), .setup_src(su_src), .setup_lua(su_lua),
    .ag_set, .ag_axis, .ag_rho, .ag_jump, .ag_base, .ag_rt,
    .mem_req(od_aux_req), .mem_addr(od_aux_addr), .mem_bits(od_aux_bits),
    .mem_ack(aux_ack && od_aux_req), .mem_data(aux_data),
    .alloc_req(al_req), .alloc_words(al_words), .alloc_ack(al_ack), .alloc_fail(al_fail),
    .alloc_addr(al_addr)
  );

  // the result of the instruction that just finished
  dmu_op_e last_op;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_op <= OP_NOP;
    else if (iv && ir) last_op <= ii.code;
  end
  assign res_valid = (od_done && !od_err && (last_op == OP_READ || last_op == OP_ALLOCATE)) ||
                     (ts_done && !ts_err && last_op == OP_TPOP);
  assign res_data  = ts_done ? ts_result : od_result;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err <= 1'b0;
    else if ((od_done && od_err) || (ts_done && ts_err)) err <= 1'b1;
  end

  // ---------------- temporary stack ----------------
  logic               pg_valid, pg_release, pg_done, pg_fail, pg_init_busy;
  logic               ts_pg_valid, ts_pg_release;
  logic [VPAGE_W-1:0] ts_pg_vpage;
  logic               ts_mem_req, ts_mem_we;
  addr_t              ts_mem_addr;
  logic [31:0]        ts_mem_bits, ts_mem_wdata, ts_depth, ts_pages;

  dmu_tstack #(.VPAGE_W(VPAGE_W)) u_ts (
    .clk, .rst_n,
    .in_valid(iv && ready_out && is_stk && od_ready), .in_ready(ts_ready), .in_instr(ii),
    .in_d0(d0), .in_d1(d1), .done(ts_done), .err(ts_err), .result(ts_result),
    .pg_valid(ts_pg_valid), .pg_release(ts_pg_release), .pg_vpage(ts_pg_vpage),
    .pg_done(pg_done && ready_out), .pg_fail(pg_fail),
    .mem_req(ts_mem_req), .mem_we(ts_mem_we), .mem_addr(ts_mem_addr), .mem_bits(ts_mem_bits),
    .mem_wdata(ts_mem_wdata), .mem_ack(aux_ack && ts_mem_req), .mem_data(aux_data),
    .depth(ts_depth), .pages_held(ts_pages)
  );

  // the two never run at once: one instruction at a time
  assign aux_req   = od_aux_req | ts_mem_req;
  assign aux_we    = ts_mem_req & ts_mem_we;
  assign aux_addr  = ts_mem_req ? ts_mem_addr : od_aux_addr;
  assign aux_bits  = ts_mem_req ? ts_mem_bits : od_aux_bits;
  assign aux_wdata = ts_mem_wdata;

  logic [SW-1:0] sel_set, fin_set;
  addr_t       cur_addr;
  logic [31:0] cur_bits;
  logic        cur_active, cur_src, adv, adv_ready, fin;
  logic [2:0]  cur_lua;
  logic [NREGS-1:0] active_vec;

  omu_agen u_agen (
    .clk, .rst_n,
    .setup_valid(su_valid), .setup_set(su_set), .setup_src(su_src), .setup_lua(su_lua),
    .sel_set, .cur_addr, .cur_bits, .cur_active, .cur_src, .cur_lua,
    .adv, .adv_ready, .fin, .fin_set, .active_vec,
    .ag_set, .ag_axis, .ag_rho, .ag_jump, .ag_base, .ag_rt
  );

  // ---------------- stream control and bus ----------------
  logic         cp_req, cp_we, cp_ack, cp_fault;
  addr_t        cp_vaddr;
  logic [31:0]  cp_bits;
  logic [127:0] cp_wdata, cp_rdata;
  logic         bc_valid, bc_ready, bc_tdl, bc_done, bc_ok;
  logic [1:0]   bc_op;
  logic [2:0]   bc_lua;
  logic [3:0]   bc_nwords;
  logic [127:0] bc_wdata, bc_rdata;

  dmu_stream_ctrl u_sc (
    .clk, .rst_n,
    .sel_set, .cur_addr, .cur_bits, .cur_active, .cur_src, .cur_lua,
    .adv, .adv_ready, .fin, .fin_set, .active_vec,
    .aux_req, .aux_we, .aux_addr, .aux_bits, .aux_wdata, .aux_ack, .aux_data,
    .cp_req, .cp_we, .cp_vaddr, .cp_bits, .cp_wdata, .cp_ack, .cp_rdata,
    .bc_valid, .bc_ready, .bc_op, .bc_tdl, .bc_lua, .bc_nwords, .bc_wdata,
    .bc_done, .bc_ok, .bc_rdata,
    .n_components, .n_skips, .n_eos, .n_switches
  );

  bus_controller u_bc (
    .clk, .rst_n,
    .cmd_valid(bc_valid), .cmd_ready(bc_ready), .cmd_op(bc_op), .cmd_tdl(bc_tdl),
    .cmd_lua(bc_lua), .cmd_nwords(bc_nwords), .cmd_wdata(bc_wdata),
    .done(bc_done), .ok(bc_ok), .rdata(bc_rdata),
    .tdl, .lua, .csl, .eos, .ready(unit_ready),
    .dbus_out, .dbus_oe, .dbus_in
  );

  // ---------------- MMU ----------------
  logic               tr_req, tr_ack, tr_fault, tr_miss;
  logic [31:0]        tr_vaddr;
  logic [MEM_LOG2-1:0] tr_paddr;
  logic [VPAGE_W-1:0] pg_vpage;
  logic [RPAGE_W-1:0] pg_rpage;
  logic [RPAGE_W:0]   free_pages;
  logic               mem_en, mem_we;
  logic [MEM_LOG2-1:0] mem_addr;
  logic [15:0]        mem_wdata, mem_rdata;

  mmu_comp_port #(.PA_W(MEM_LOG2)) u_cp (
    .clk, .rst_n,
    .req(cp_req), .we(cp_we), .vaddr(cp_vaddr), .bits(cp_bits), .wdata(cp_wdata),
    .ack(cp_ack), .fault(cp_fault), .rdata(cp_rdata),
    .tr_req, .tr_vaddr, .tr_ack, .tr_fault, .tr_paddr,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  mmu_pager #(.VPAGE_W(VPAGE_W), .RPAGE_W(RPAGE_W)) u_pager (
    .clk, .rst_n, .init_busy(pg_init_busy),
    .tr_req, .tr_vaddr, .tr_ack, .tr_fault, .tr_paddr, .tr_miss,
    .op_valid(pg_valid), .op_release(pg_release), .op_vpage(pg_vpage),
    .op_done(pg_done), .op_fail(pg_fail), .op_rpage(pg_rpage), .free_pages
  );

  main_memory #(.WORDS_LOG2(MEM_LOG2)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  // start-up: map the workspace pages
  logic [VPAGE_W:0] map_ptr;
  logic             map_wait;
  assign pg_vpage   = ready_out ? ts_pg_vpage : map_ptr[VPAGE_W-1:0];
  assign pg_valid   = ready_out ? ts_pg_valid : (!pg_init_busy && !map_wait);
  assign pg_release = ready_out && ts_pg_release;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map_ptr <= '0; ready_out <= 1'b0; map_wait <= 1'b0;
    end else if (!ready_out && !pg_init_busy) begin
      if (map_wait) map_wait <= 1'b0;            // let the page op return to idle
      else if (pg_done) begin
        map_wait <= 1'b1;
        if (map_ptr + 1'b1 >= (VPAGE_W+1)'(WS_PAGES)) ready_out <= 1'b1;
        else map_ptr <= map_ptr + 1'b1;
      end
    end
  end

  // hole table (sizes in words)
  logic ht_ack, ht_fail;
  logic [27:0] ht_loc;
  logic [$clog2(HT_SIZE+1)-1:0] ht_count;
  logic [$clog2(HT_SIZE)-1:0]   ht_gc_idx;
  logic [27:0]                  ht_gc_gap;
  logic                         ht_gc_valid;
  logic [28:0]                  ht_free;
  hole_table #(
    .M(HT_SIZE), .AW(28), .INIT_LOC('0), .INIT_SIZE(28'(WS_PAGES * 4096))
  ) u_ht (
    .clk, .rst_n,
    .req_valid(al_req), .req_release(1'b0), .req_loc('0), .req_size(al_words[27:0]),
    .ack(ht_ack), .fail(ht_fail), .alloc_loc(ht_loc),
    .gc_needed, .overflow(ht_overflow),
    .count(ht_count), .gc_pair_idx(ht_gc_idx), .gc_pair_gap(ht_gc_gap), .gc_pair_valid(ht_gc_valid),
    .free_words(ht_free)
  );
  assign al_ack  = ht_ack && !ht_fail;
  assign al_fail = ht_fail;
  assign al_addr = {4'd0, ht_loc};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_page_misses <= '0;
    else if (tr_miss) n_page_misses <= n_page_misses + 1'b1;
  end

  logic unused;
  assign unused = ^{cp_fault, pg_rpage, free_pages, al_words[31:28], ts_depth, ts_pages,
                   ht_count, ht_gc_idx, ht_gc_gap, ht_gc_valid, ht_free};
endmodule
