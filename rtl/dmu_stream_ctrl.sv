// dmu_stream_ctrl: sequences the DMU's data streams, one component at a
// time, over the shared memory port and data bus.
//
// Active access sets are served round-robin, so the streams of several
// units are interleaved component by component on the one data bus (time
// division multiplexing). For the next active set the controller probes
// the set's logical unit on the status bus; a unit that is not Ready is
// skipped until the next round. For a source stream (DMU to unit) it reads
// the component at the address from the address generator, sends it with
// one bus transfer and advances the generator; for a sink stream it
// receives a component and writes it. When the generator reports a stream
// finished, an EOS cycle is sent for its unit before any other transfer.
// Component reads and writes requested by the descriptor engine and the
// temporary stack (aux_*) are served between transfers, ahead of streaming.
// The round-robin order and the probe-before-fetch sequence are this
// design's; the document gives the multiplexing of streams and EOS.
module dmu_stream_ctrl
  import maple_pkg::*;
#(
  parameter int NR = NREGS
) (
  input  logic         clk,
  input  logic         rst_n,
  // address generator
  output logic [$clog2(NR)-1:0] sel_set,
  input  addr_t        cur_addr,
  input  logic [31:0]  cur_bits,
  input  logic         cur_active,
  input  logic         cur_src,
  input  logic [2:0]   cur_lua,
  output logic         adv,
  input  logic         adv_ready,
  input  logic         fin,
  input  logic [$clog2(NR)-1:0] fin_set,
  input  logic [NR-1:0] active_vec,
  // auxiliary component reads and writes (descriptor engine, temporary stack)
  input  logic         aux_req,
  input  logic         aux_we,
  input  addr_t        aux_addr,
  input  logic [31:0]  aux_bits,
  input  logic [31:0]  aux_wdata,
  output logic         aux_ack,
  output logic [31:0]  aux_data,
  // component port
  output logic         cp_req,
  output logic         cp_we,
  output addr_t        cp_vaddr,
  output logic [31:0]  cp_bits,
  output logic [127:0] cp_wdata,
  input  logic         cp_ack,
  input  logic [127:0] cp_rdata,
  // bus controller
  output logic         bc_valid,
  input  logic         bc_ready,
  output logic [1:0]   bc_op,
  output logic         bc_tdl,
  output logic [2:0]   bc_lua,
  output logic [3:0]   bc_nwords,
  output logic [127:0] bc_wdata,
  input  logic         bc_done,
  input  logic         bc_ok,
  input  logic [127:0] bc_rdata,
  // statistics
  output logic [31:0]  n_components,
  output logic [31:0]  n_skips,
  output logic [31:0]  n_eos,
  output logic [31:0]  n_switches
);
  localparam int SW = $clog2(NR);

  typedef enum logic [3:0] {
    T_IDLE, T_AUX, T_EOS, T_PROBE, T_FETCH, T_SEND, T_RECV, T_STORE, T_ADV
  } tstate_e;
  tstate_e st;

  logic [NR-1:0]  eos_pend;
  logic [SW-1:0]  rr;        // next set to look at
  logic [SW-1:0]  cur;       // set being served
  logic [SW-1:0]  last_served;
  logic [127:0]   buf_q;
  logic           issued;    // command handed to bus controller / port
  logic [3:0]     nw;

  assign nw = (cur_bits < 32'd16) ? 4'd1 : 4'(cur_bits[7:4] + (cur_bits[3:0] != 4'd0 ? 4'd1 : 4'd0));

  // lowest pending EOS
  logic          eos_any;
  logic [SW-1:0] eos_set;
  always_comb begin
    eos_any = |eos_pend;
    eos_set = '0;
    for (int s = NR - 1; s >= 0; s--) if (eos_pend[s]) eos_set = SW'(s);
  end

  // next active set at or after rr
  logic          pick_any;
  logic [SW-1:0] pick_set;
  always_comb begin
    pick_any = 1'b0;
    pick_set = '0;
    for (int d = NR - 1; d >= 0; d--) begin
      if (active_vec[SW'(int'(rr) + d)]) begin
        pick_any = 1'b1;
        pick_set = SW'(int'(rr) + d);
      end
    end
  end

  always_comb begin
    sel_set = cur;
    if (st == T_IDLE) sel_set = eos_any ? eos_set : pick_set;
  end

  assign adv = (st == T_ADV) && adv_ready;

  always_comb begin
    cp_req = 1'b0; cp_we = 1'b0; cp_vaddr = cur_addr; cp_bits = cur_bits; cp_wdata = buf_q;
    if (st == T_AUX) begin
      cp_req = 1'b1; cp_we = aux_we; cp_vaddr = aux_addr; cp_bits = aux_bits;
      cp_wdata = {96'd0, aux_wdata};
    end else if (st == T_FETCH) cp_req = 1'b1;
    else if (st == T_STORE) begin cp_req = 1'b1; cp_we = 1'b1; end
  end
  assign aux_ack  = (st == T_AUX) && cp_ack;
  assign aux_data = cp_rdata[31:0];

  always_comb begin
    bc_valid = 1'b0; bc_op = 2'd0; bc_tdl = cur_src; bc_lua = cur_lua; bc_nwords = nw; bc_wdata = buf_q;
    if (!issued) begin
      unique case (st)
        T_EOS:   begin bc_valid = 1'b1; bc_op = 2'd2; end
        T_PROBE: begin bc_valid = 1'b1; bc_op = 2'd0; end
        T_SEND, T_RECV: begin bc_valid = 1'b1; bc_op = 2'd1; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; eos_pend <= '0; rr <= '0; cur <= '0; last_served <= '0; buf_q <= '0; issued <= 1'b0;
      n_components <= '0; n_skips <= '0; n_eos <= '0; n_switches <= '0;
    end else begin
      if (fin) eos_pend[fin_set] <= 1'b1;
      if (bc_valid && bc_ready) issued <= 1'b1;
      unique case (st)
        T_IDLE: begin
          issued <= 1'b0;
          if (aux_req) st <= T_AUX;
          else if (eos_any) begin
            cur <= eos_set; st <= T_EOS;
          end else if (pick_any && adv_ready) begin
            cur <= pick_set; st <= T_PROBE;
          end
        end
        T_AUX: if (cp_ack) st <= T_IDLE;
        T_EOS: if (issued && bc_done) begin
          eos_pend[cur] <= 1'b0;
          if (fin && fin_set == cur) eos_pend[cur] <= 1'b1;
          n_eos <= n_eos + 1'b1;
          issued <= 1'b0;
          st <= T_IDLE;
        end
        T_PROBE: if (issued && bc_done) begin
          issued <= 1'b0;
          if (!bc_ok || !cur_active) begin
            n_skips <= n_skips + 1'b1;
            rr <= cur + 1'b1;
            st <= T_IDLE;
          end else st <= cur_src ? T_FETCH : T_RECV;
        end
        T_FETCH: if (cp_ack) begin
          buf_q <= cp_rdata; st <= T_SEND;
        end
        T_SEND: if (issued && bc_done) begin
          issued <= 1'b0; st <= T_ADV;
        end
        T_RECV: if (issued && bc_done) begin
          issued <= 1'b0; buf_q <= bc_rdata; st <= T_STORE;
        end
        T_STORE: if (cp_ack) st <= T_ADV;
        default: if (adv_ready) begin  // T_ADV
          n_components <= n_components + 1'b1;
          if (cur != last_served) n_switches <= n_switches + 1'b1;
          last_served <= cur;
          rr <= cur + 1'b1;
          st <= T_IDLE;
        end
      endcase
    end
  end
endmodule
