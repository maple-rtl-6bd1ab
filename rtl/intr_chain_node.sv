// intr_chain_node: one link of the daisy chain that arbitrates interrupt
// requests to the EXU.
//
// The requesting units share one request line to the EXU; the EXU answers
// with an acknowledge that enters the first unit of the chain. A unit that
// is requesting keeps the acknowledge ('grant') and then drives the UID
// lines and the instruction bus; a unit that is not requesting passes the
// acknowledge on to the next unit. The unit nearest the EXU thus has the
// highest priority. Purely combinational. The daisy chain and the
// request/acknowledge pair follow the document; the gate-level form is
// this design's.
module intr_chain_node (
  input  logic req,       // this unit wants to interrupt the EXU
  input  logic ack_in,    // acknowledge from the EXU or the previous unit
  output logic grant,     // this unit owns the acknowledge
  output logic ack_out    // acknowledge passed down the chain
);
  assign grant   = ack_in & req;
  assign ack_out = ack_in & ~req;
endmodule
