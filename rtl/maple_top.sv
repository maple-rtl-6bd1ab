// maple_top: the MAPLE machine, a loosely coupled multiprocessor for
// direct APL execution.
//
// Four units share three buses: a 16-bit instruction bus driven by the
// EXU (with UID, IS and a daisy-chained interrupt request/acknowledge), a
// status bus driven by the DMU (TDL, LUA, CSL, EOS, one Ready line back
// from each other unit) and a 16-bit data bus on which every transfer is
// between the DMU and one other unit. This top holds the DMU and the ALU.
// The EXU (a conventional microprocessor) and the IOU are outside: their
// bus connections are the ports below.
//   EXU side: ibus/uid/is drive the instruction bus; intr_req,
//     intr_ack, ret_* carry interrupt returns (DMU results); exu_ready
//     and exu_dbus answer data transfers addressed to LUA 0.
//   IOU side: iou_ready, iou_dbus answer transfers to LUA 4/5;
//     iou_intr_req and iou_intr_ack are its link of the interrupt chain,
//     placed after the DMU.
// The bidirectional data bus is split into the DMU's drive (dbus) and
// the word the DMU receives, selected from the unit named on LUA. The
// interconnect follows the document; the splitting of bidirectional lines
// into one-way ports is this design's. A linter reports rst_n as both
// synchronous and asynchronous: the synchronous use is only the disable of
// the bus controller's assertions.
module maple_top
  import maple_pkg::*;
#(
  parameter int MEM_LOG2 = 20,
  parameter int VPAGE_W  = 16,
  parameter int WS_PAGES = (1 << (MEM_LOG2 - 12)) - 4
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        dmu_ready,
  output logic        dmu_err,
  // instruction bus (EXU)
  input  logic [15:0] ibus,
  input  logic [1:0]  uid,
  input  logic        is,
  output logic        dmu_iq_full,
  output logic        intr_req,
  input  logic        intr_ack,
  output logic [15:0] ret_data,
  output logic [1:0]  ret_uid,
  output logic        ret_oe,
  // status bus
  output logic        tdl,
  output logic [2:0]  lua,
  output logic        csl,
  output logic        eos,
  input  logic        exu_ready,
  input  logic        iou_ready,
  // data bus
  output logic [15:0] dbus,
  output logic        dbus_oe,
  input  logic [15:0] exu_dbus,
  input  logic [15:0] iou_dbus,
  // IOU interrupt link
  input  logic        iou_intr_req,
  output logic        iou_intr_ack,
  // observation
  output logic [31:0] n_components,
  output logic [31:0] n_skips,
  output logic [31:0] n_eos,
  output logic [31:0] n_switches,
  output logic [31:0] n_page_misses,
  output logic [31:0] alu_cnt_x,
  output logic [31:0] alu_cnt_y,
  output logic [31:0] alu_cnt_z,
  output logic        alu_overflow,
  output logic        gc_needed,
  output logic        ht_overflow
);
  logic        alu_ready;
  logic [15:0] alu_dbus;
  logic        alu_oe;
  logic [15:0] dmu_dbus_in;
  logic        dmu_intr_req;
  logic [31:0] alu_n_eos;

  always_comb begin
    unique case (lua_phys(lua))
      2'd0:    dmu_dbus_in = exu_dbus;
      2'd1:    dmu_dbus_in = alu_oe ? alu_dbus : 16'd0;
      default: dmu_dbus_in = iou_dbus;
    endcase
  end

  assign intr_req = dmu_intr_req | iou_intr_req;

  dmu #(.MEM_LOG2(MEM_LOG2), .VPAGE_W(VPAGE_W), .WS_PAGES(WS_PAGES)) u_dmu (
    .clk, .rst_n, .ready_out(dmu_ready), .err(dmu_err),
    .ibus_in(ibus), .uid_in(uid), .is, .iq_full(dmu_iq_full),
    .intr_req(dmu_intr_req), .intr_ack_in(intr_ack), .intr_ack_out(iou_intr_ack),
    .ret_data, .ret_uid, .ret_oe,
    .tdl, .lua, .csl, .eos, .unit_ready({iou_ready, alu_ready, exu_ready}),
    .dbus_out(dbus), .dbus_oe, .dbus_in(dmu_dbus_in),
    .n_components, .n_skips, .n_eos, .n_switches, .n_page_misses,
    .gc_needed, .ht_overflow
  );

  alu_stream u_alu (
    .clk, .rst_n,
    .ibus_in(ibus), .uid_in(uid), .is,
    .tdl, .lua, .csl, .eos, .ready(alu_ready),
    .dbus_in(dbus), .dbus_out(alu_dbus), .dbus_oe(alu_oe),
    .cnt_x(alu_cnt_x), .cnt_y(alu_cnt_y), .cnt_z(alu_cnt_z), .overflow(alu_overflow),
    .n_eos(alu_n_eos)
  );

  logic unused;
  assign unused = ^alu_n_eos;
endmodule
