// dmu_instr_if: the DMU's side of the instruction bus.
//
// The EXU places a 16-bit word on the instruction bus with the unit's code
// on the UID lines and strobes IS. The first word of a DMU instruction is
// {CODE[5:0], Rd[3:0], Rs[3:0], m[1:0]}; the opcode fixes how many data
// words follow (0 to 3, so instructions are 1 to 4 words long). Complete
// instructions enter a FIFO of IQ_DEPTH entries, so the EXU can send the
// next instruction while the DMU executes earlier ones; 'iq_full' tells
// the EXU to hold off. Results (a READ value, the address from ALLOCATE)
// go back by interrupt: the interface raises its request into the daisy
// chain and, once granted, drives UID = DMU and the high then the low
// half of the 32-bit result on two consecutive cycles (ret_oe high).
// The word format, the 1-4 word length and the return by interrupt follow
// the document; the data-word counts per opcode, the FIFO and the
// two-cycle return are this design's.
module dmu_instr_if
  import maple_pkg::*;
#(
  parameter int IQ_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction bus from the EXU
  input  logic [15:0] ibus_in,
  input  logic [1:0]  uid_in,
  input  logic        is,
  output logic        iq_full,
  // to the OMU
  output logic        out_valid,
  input  logic        out_ready,
  output dmu_instr_t  out_instr,
  output logic [15:0] out_d0,
  output logic [15:0] out_d1,
  output logic [15:0] out_d2,
  // result return
  input  logic        res_valid,
  input  logic [31:0] res_data,
  output logic        intr_req,
  input  logic        intr_ack_in,
  output logic        intr_ack_out,
  output logic [15:0] ret_data,
  output logic [1:0]  ret_uid,
  output logic        ret_oe
);
  localparam int QW = $clog2(IQ_DEPTH);

  function automatic logic [1:0] data_words(input dmu_op_e op);
    case (op)
      OP_SETUP, OP_ACCESS, OP_SCONFORM, OP_READ, OP_REDUCE, OP_MROTATE,
      OP_DROTATE, OP_CATENATE: return 2'd1;
      OP_STALLOC, OP_TPUSH:    return 2'd2;
      OP_WRITE:                return 2'd3;
      default:                 return 2'd0;
    endcase
  endfunction

  // assembly of one instruction
  logic [15:0] w [4];
  logic [1:0]  wcnt;   // words taken so far minus one
  logic [1:0]  need;   // data words still expected
  logic        assembling;

  // FIFO
  logic [63:0] q [IQ_DEPTH];
  logic [QW:0] q_n;
  logic [QW-1:0] q_rd, q_wr;
  logic        push;
  logic [63:0] push_data;

  assign iq_full   = (q_n >= (QW+1)'(IQ_DEPTH - 1));
  assign out_valid = (q_n != '0);
  assign out_instr = dmu_instr_t'(q[q_rd][63:48]);
  assign out_d0    = q[q_rd][47:32];
  assign out_d1    = q[q_rd][31:16];
  assign out_d2    = q[q_rd][15:0];

  logic take_word;
  assign take_word = is && (uid_in == UID_DMU);

  always_comb begin
    push = 1'b0;
    push_data = {w[0], w[1], w[2], w[3]};
    if (take_word) begin
      if (!assembling && data_words(dmu_op_e'(ibus_in[15:10])) == 2'd0) begin
        push = 1'b1;
        push_data = {ibus_in, 48'd0};
      end else if (assembling && need == 2'd1) begin
        push = 1'b1;
        push_data = {w[0],
                     (wcnt == 2'd0) ? ibus_in : w[1],
                     (wcnt == 2'd1) ? ibus_in : w[2],
                     (wcnt == 2'd2) ? ibus_in : w[3]};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      assembling <= 1'b0; wcnt <= '0; need <= '0;
      for (int j = 0; j < 4; j++) w[j] <= '0;
      q_n <= '0; q_rd <= '0; q_wr <= '0;
      for (int j = 0; j < IQ_DEPTH; j++) q[j] <= '0;
    end else begin
      if (take_word) begin
        if (!assembling) begin
          w[0] <= ibus_in; w[1] <= '0; w[2] <= '0; w[3] <= '0;
          wcnt <= '0;
          need <= data_words(dmu_op_e'(ibus_in[15:10]));
          assembling <= (data_words(dmu_op_e'(ibus_in[15:10])) != 2'd0);
        end else begin
          w[wcnt + 2'd1] <= ibus_in;
          wcnt <= wcnt + 2'd1;
          need <= need - 2'd1;
          if (need == 2'd1) assembling <= 1'b0;
        end
      end
      if (push && q_n != (QW+1)'(IQ_DEPTH)) begin
        q[q_wr] <= push_data;
        q_wr <= q_wr + 1'b1;
      end
      if (out_valid && out_ready) q_rd <= q_rd + 1'b1;
      q_n <= q_n + (QW+1)'(push && q_n != (QW+1)'(IQ_DEPTH)) - (QW+1)'(out_valid && out_ready);
    end
  end

  // result return by interrupt
  logic        grant;
  logic        ret_pend;
  logic        ret_phase;
  logic [31:0] ret_q;

  assign intr_req = ret_pend;
  intr_chain_node u_chain (.req(ret_pend), .ack_in(intr_ack_in), .grant(grant), .ack_out(intr_ack_out));

  assign ret_oe   = grant;
  assign ret_uid  = UID_DMU;
  assign ret_data = ret_phase ? ret_q[15:0] : ret_q[31:16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ret_pend <= 1'b0; ret_phase <= 1'b0; ret_q <= '0;
    end else begin
      if (grant) begin
        if (ret_phase) begin ret_pend <= 1'b0; ret_phase <= 1'b0; end
        else ret_phase <= 1'b1;
      end
      if (res_valid) begin ret_pend <= 1'b1; ret_q <= res_data; ret_phase <= 1'b0; end
    end
  end
endmodule
