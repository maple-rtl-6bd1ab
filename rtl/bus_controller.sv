// bus_controller: the DMU's Bus Controller, the finite state machine that
// drives the status bus and moves one component over the data bus.
//
// Status bus lines driven by the DMU: TDL (transfer direction, 1 = the DMU
// writes to the unit, 0 = the DMU reads from it), LUA[2:0] (logical unit
// address), CSL (cycle start, strobes the first word of a component) and
// EOS (end of stream, with LUA naming the stream's unit). Each of the EXU,
// ALU and IOU returns a Ready line, which answers for the logical unit
// currently on LUA. Commands, one at a time (cmd_valid && cmd_ready):
//   PROBE  drive LUA/TDL for one cycle and report the addressed unit's Ready
//   XFER   drive LUA/TDL and wait for Ready, then CSL with word 0 and words
//          1..n-1 in the following cycles: n cycles for an n-word component
//          once Ready is seen. For TDL=1 the words go out on dbus_out, for
//          TDL=0 the unit drives dbus_in in the same cycles.
//   EOS    one cycle of EOS with LUA
// 'done' pulses when a command ends, with 'ok' (PROBE result) and 'rdata'
// (words read). The signal set follows the document; the cycle timing, the
// probe command and the split of the bidirectional data bus into dbus_out
// and dbus_in are this design's. The assertions below use rst_n as a
// synchronous disable while the flops use it as an asynchronous reset;
// a linter reports this mix, and it has no effect on the circuit.
module bus_controller
  import maple_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // command
  input  logic         cmd_valid,
  output logic         cmd_ready,
  input  logic [1:0]   cmd_op,       // 0 PROBE, 1 XFER, 2 EOS
  input  logic         cmd_tdl,
  input  logic [2:0]   cmd_lua,
  input  logic [3:0]   cmd_nwords,   // 1..8
  input  logic [127:0] cmd_wdata,
  output logic         done,
  output logic         ok,
  output logic [127:0] rdata,
  // status bus
  output logic         tdl,
  output logic [2:0]   lua,
  output logic         csl,
  output logic         eos,
  input  logic [2:0]   ready,        // {IOU, ALU, EXU}
  // data bus
  output logic [15:0]  dbus_out,
  output logic         dbus_oe,
  input  logic [15:0]  dbus_in
);
  localparam logic [1:0] C_PROBE = 2'd0;
  localparam logic [1:0] C_XFER  = 2'd1;
  localparam logic [1:0] C_EOS   = 2'd2;

  typedef enum logic [1:0] {B_IDLE, B_PROBE, B_XFER, B_EOS} bstate_e;
  bstate_e st;

  logic         q_tdl;
  logic [2:0]   q_lua;
  logic [3:0]   q_n;
  logic [127:0] q_data;
  logic [3:0]   k;
  logic         unit_ready;

  assign unit_ready = ready[lua_phys(q_lua)];
  assign cmd_ready  = (st == B_IDLE);

  always_comb begin
    tdl = 1'b0; lua = '0; csl = 1'b0; eos = 1'b0; dbus_out = '0; dbus_oe = 1'b0;
    if (st != B_IDLE) begin
      lua = q_lua;
      tdl = q_tdl;
    end
    if (st == B_EOS) eos = 1'b1;
    if (st == B_XFER && (k != '0 || unit_ready)) begin
      csl = (k == '0);
      if (q_tdl) begin
        dbus_oe  = 1'b1;
        dbus_out = q_data[16*k[2:0] +: 16];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE; q_tdl <= 1'b0; q_lua <= '0; q_n <= '0; q_data <= '0; k <= '0;
      done <= 1'b0; ok <= 1'b0; rdata <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        B_IDLE: if (cmd_valid) begin
          q_tdl <= cmd_tdl; q_lua <= cmd_lua; q_n <= cmd_nwords; q_data <= cmd_wdata; k <= '0;
          unique case (cmd_op)
            C_PROBE: st <= B_PROBE;
            C_XFER:  begin st <= B_XFER; rdata <= '0; end
            C_EOS:   st <= B_EOS;
            default: st <= B_EOS;   // code 3 is unused and taken as EOS
          endcase
        end
        B_PROBE: begin
          ok <= unit_ready; done <= 1'b1; st <= B_IDLE;
        end
        B_XFER: if (k != '0 || unit_ready) begin
          if (!q_tdl) rdata[16*k[2:0] +: 16] <= dbus_in;
          if (k + 1'b1 >= q_n) begin
            ok <= 1'b1; done <= 1'b1; st <= B_IDLE;
          end else k <= k + 1'b1;
        end
        default: begin  // B_EOS
          ok <= 1'b1; done <= 1'b1; st <= B_IDLE;
        end
      endcase
    end
  end

  // a component is never longer than eight words
  a_nwords: assert property (@(posedge clk) disable iff (!rst_n)
      (cmd_valid && cmd_ready && cmd_op == C_XFER) |-> (cmd_nwords inside {[4'd1:4'd8]}));
  // CSL only together with a driven logical unit address and no EOS
  a_csl_eos: assert property (@(posedge clk) disable iff (!rst_n) !(csl && eos));
endmodule
