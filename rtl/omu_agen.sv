// omu_agen: the OMU's address generator, algorithm AC3 of the access
// appendix, time-multiplexed over NR access sets.
//
// Each access set holds, per axis, the running offset T and a counter,
// plus the current component address and the address of the current row.
// RHO and jump values are read from the descriptor register file through
// a single (set, axis) read port. Address generation along a row (the
// inner loop LP2) costs one cycle per component: 'adv' adds J[last axis]
// to the address. When a row is finished the outer loop LP1 walks the
// axes from rank-2 down, one axis per cycle: T[a] += J[a] until the axis
// counter reaches RHO[a], then T[a] and the counter are cleared and the
// carry moves to axis a-1. The row address is kept as base + sum T by
// adding or subtracting the changed T, so no multiply is needed. A carry
// out of axis 0 ends the stream ('fin' pulses for one cycle with its set).
// Switching between sets is just a change of 'sel_set', so successive
// cycles may serve different streams.
// Interface: 'setup_*' arms a set (one cycle, T and counters cleared);
// 'sel_set' selects the set whose address, size and stream data are shown;
// 'adv' (accepted when adv_ready) consumes the shown address. Arrays are
// assumed non-empty. Counters count up to RHO rather than down from it so
// that a set can be armed in one cycle; this and the one-axis-per-cycle
// update are this design's choices.
module omu_agen
  import maple_pkg::*;
#(
  parameter int NR   = NREGS,
  parameter int AXES = MAX_AXES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        setup_valid,
  input  logic [$clog2(NR)-1:0] setup_set,
  input  logic        setup_src,
  input  logic [2:0]  setup_lua,
  // query / advance
  input  logic [$clog2(NR)-1:0] sel_set,
  output addr_t       cur_addr,
  output logic [31:0] cur_bits,
  output logic        cur_active,
  output logic        cur_src,
  output logic [2:0]  cur_lua,
  input  logic        adv,
  output logic        adv_ready,
  output logic        fin,
  output logic [$clog2(NR)-1:0] fin_set,
  output logic [NR-1:0] active_vec,
  // descriptor read port
  output logic [$clog2(NR)-1:0]   ag_set,
  output logic [$clog2(AXES)-1:0] ag_axis,
  input  logic [31:0] ag_rho,
  input  logic signed [31:0] ag_jump,
  input  addr_t       ag_base,
  input  rank_type_t  ag_rt
);
  localparam int SW = $clog2(NR);
  localparam int AW = $clog2(AXES);

  addr_t       addr_q [NR];
  addr_t       row_q  [NR];
  logic [31:0] cnt_q  [NR][AXES];
  logic signed [31:0] t_q [NR][AXES];
  logic [NR-1:0] act_q;
  logic [NR-1:0] src_q;
  logic [2:0]    lua_q [NR];

  logic          busy;
  logic [SW-1:0] upd_set;
  logic [AW:0]   upd_axis;   // axis being updated; MSB set = carried out of axis 0
  // a setup arriving while LP1 runs waits here
  logic          pend_v;
  logic [SW-1:0] pend_set;
  logic          pend_src;
  logic [2:0]    pend_lua;
  logic          su_v;
  logic [SW-1:0] su_set;
  logic          su_src;
  logic [2:0]    su_lua;
  assign su_v   = pend_v | setup_valid;
  assign su_set = pend_v ? pend_set : setup_set;
  assign su_src = pend_v ? pend_src : setup_src;
  assign su_lua = pend_v ? pend_lua : setup_lua;

  assign active_vec = act_q;
  assign adv_ready  = !busy && !su_v;

  // descriptor port steering
  always_comb begin
    if (busy) begin
      ag_set  = upd_set;
      ag_axis = upd_axis[AW-1:0];
    end else if (su_v) begin
      ag_set  = su_set;
      ag_axis = '0;
    end else begin
      ag_set  = sel_set;
      ag_axis = (ag_rt.rank == 5'd0) ? '0 : AW'(ag_rt.rank - 5'd1);
    end
  end

  logic [31:0] bits_w;
  logic        bits_ok;
  comp_size_rom u_size (.code(ag_rt.size_code), .bits(bits_w), .valid(bits_ok));

  assign cur_addr   = addr_q[sel_set];
  assign cur_bits   = bits_w;
  assign cur_active = act_q[sel_set] && !busy && !su_v;
  assign cur_src    = src_q[sel_set];
  assign cur_lua    = lua_q[sel_set];

  logic [AW-1:0] ua;
  assign ua = upd_axis[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q <= '0; src_q <= '0; busy <= 1'b0;
      pend_v <= 1'b0; pend_set <= '0; pend_src <= 1'b0; pend_lua <= '0; upd_set <= '0; upd_axis <= '0;
      fin <= 1'b0; fin_set <= '0;
      for (int r = 0; r < NR; r++) begin
        addr_q[r] <= '0; row_q[r] <= '0; lua_q[r] <= '0;
        for (int a = 0; a < AXES; a++) begin
          cnt_q[r][a] <= '0;
          t_q[r][a]   <= '0;
        end
      end
    end else begin
      fin <= 1'b0;
      if (setup_valid && (busy || pend_v)) begin
        pend_v <= 1'b1; pend_set <= setup_set; pend_src <= setup_src; pend_lua <= setup_lua;
      end else if (!busy && pend_v) begin
        pend_v <= 1'b0;
      end
      if (busy) begin
        // LP1: carry through the axes above the row axis
        if (upd_axis[AW]) begin
          // carried out of axis 0: stream complete
          act_q[upd_set] <= 1'b0;
          fin     <= 1'b1;
          fin_set <= upd_set;
          busy    <= 1'b0;
        end else if (cnt_q[upd_set][ua] + 32'd1 < ag_rho) begin
          cnt_q[upd_set][ua] <= cnt_q[upd_set][ua] + 32'd1;
          t_q[upd_set][ua]   <= t_q[upd_set][ua] + ag_jump;
          row_q[upd_set]     <= row_q[upd_set] + addr_t'(ag_jump);
          addr_q[upd_set]    <= row_q[upd_set] + addr_t'(ag_jump);
          busy <= 1'b0;
        end else begin
          cnt_q[upd_set][ua] <= '0;
          t_q[upd_set][ua]   <= '0;
          row_q[upd_set]     <= row_q[upd_set] - addr_t'(t_q[upd_set][ua]);
          upd_axis <= upd_axis - 1'b1;
        end
      end else if (su_v) begin
        act_q[su_set]  <= 1'b1;
        src_q[su_set]  <= su_src;
        lua_q[su_set]  <= su_lua;
        addr_q[su_set] <= ag_base;
        row_q[su_set]  <= ag_base;
        for (int a = 0; a < AXES; a++) begin
          cnt_q[su_set][a] <= '0;
          t_q[su_set][a]   <= '0;
        end
      end else if (adv && act_q[sel_set]) begin
        if (ag_rt.rank == 5'd0) begin
          act_q[sel_set] <= 1'b0;
          fin     <= 1'b1;
          fin_set <= sel_set;
        end else if (cnt_q[sel_set][ag_axis] + 32'd1 < ag_rho) begin
          // LP2: next component along the row
          cnt_q[sel_set][ag_axis] <= cnt_q[sel_set][ag_axis] + 32'd1;
          addr_q[sel_set] <= addr_q[sel_set] + addr_t'(ag_jump);
        end else begin
          cnt_q[sel_set][ag_axis] <= '0;
          busy     <= 1'b1;
          upd_set  <= sel_set;
          upd_axis <= (AW+1)'(ag_rt.rank) - (AW+1)'(2);
        end
      end
    end
  end

  logic unused;
  assign unused = ^{bits_ok, ag_rt.ss, ag_rt.dsize, ag_rt.dclass, ag_rt.rsvd};
endmodule
