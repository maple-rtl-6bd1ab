// omu_desc: descriptor register files of the Object Manipulation Unit and
// the engine that executes the DMU's descriptor instructions.
//
// Each of the NREGS register files holds one storage-state-one descriptor:
// a base bit address, the rank-type word, and per axis a RHO value and a
// signed jump value. Jumps are kept in bits, so address generation only
// adds (no multiply). Selection primitives are done by rewriting the
// descriptor, following the algorithms of the access appendix:
//   MTRANSPOSE Rs      reverse the order of RHO and jumps            (1 cycle)
//   MROTATE Rs;I       base += J[I]*(RHO[I]-1), J[I] = -J[I]          (1 cycle)
//   TAKE Rd,Rs         base += sum J*(X<0)*(RHO-|X|), RHO = |X|       (no overtake)
//   DROP Rd,Rs         base += sum J*(X>0)*|X|,       RHO = RHO-|X|
//   DTRANSPOSE Rd,Rs   RHO'[i] = min RHO[k], J'[i] = sum J[k] over X[k]=i
//   RESHAPE Rd,Rs      vector Rd reshaped to X without cycling: row-major jumps
//   RAVEL Rs           contiguous array to a vector
//   COPY Rd,Rs / READ Rs;I / WRITE Rs;I,D   move whole descriptors or fields
//   ALLOCATE Rs        new storage-state-zero array shaped like Rs (asks the
//                      hole table for ceil(count*bits/16) words)
//   SETUP Rs,ss,u      hand Rs to the address generator as a stream
// For the dyadic forms X is the integer vector described by Rs; the engine
// reads it from memory one component per request on the mem_* port
// (req held until ack; data sign-extended from the component size).
// Other opcodes raise 'err' for one cycle with 'done'.
// Interface: an instruction is taken when in_valid && in_ready; 'done'
// pulses when it has finished, with 'result' valid for READ.
// The document gives the algorithms and register counts; the field index
// encoding of READ/WRITE and the cycle-by-cycle sequencing are this
// design's own.
module omu_desc
  import maple_pkg::*;
#(
  parameter int NR   = NREGS,
  parameter int AXES = MAX_AXES
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction
  input  logic        in_valid,
  output logic        in_ready,
  input  dmu_instr_t  in_instr,
  input  logic [15:0] in_d0,
  input  logic [15:0] in_d1,
  input  logic [15:0] in_d2,
  output logic        done,
  output logic        err,
  output logic [31:0] result,
  // stream setup to the address generator
  output logic        setup_valid,
  output logic [$clog2(NR)-1:0] setup_set,
  output logic        setup_src,     // 1: DMU sources data to the unit
  output logic [2:0]  setup_lua,
  // read port for the address generator
  input  logic [$clog2(NR)-1:0]   ag_set,
  input  logic [$clog2(AXES)-1:0] ag_axis,
  output logic [31:0] ag_rho,
  output logic signed [31:0] ag_jump,
  output addr_t       ag_base,
  output rank_type_t  ag_rt,
  // component reads for the left argument vector
  output logic        mem_req,
  output addr_t       mem_addr,
  output logic [31:0] mem_bits,
  input  logic        mem_ack,
  input  logic [31:0] mem_data,
  // storage allocation
  output logic        alloc_req,
  output logic [31:0] alloc_words,
  input  logic        alloc_ack,
  input  logic        alloc_fail,
  input  logic [31:0] alloc_addr
);
  localparam int SW = $clog2(NR);
  localparam int AW = $clog2(AXES);

  addr_t             base_q [NR];
  rank_type_t        rt_q   [NR];
  logic [31:0]       rho_q  [NR][AXES];
  logic signed [31:0] jmp_q [NR][AXES];

  assign ag_rho  = rho_q[ag_set][ag_axis];
  assign ag_jump = jmp_q[ag_set][ag_axis];
  assign ag_base = base_q[ag_set];
  assign ag_rt   = rt_q[ag_set];

  typedef enum logic [3:0] {
    S_IDLE, S_FETCH, S_APPLY, S_DTR_COPY, S_COUNT, S_ALLOC, S_CONVERT, S_RAVEL, S_DONE
  } state_e;
  state_e state;

  dmu_instr_t      cur;
  logic [15:0]     cd0;
  logic [AW:0]     k;              // axis / element counter
  logic [AW:0]     xlen;
  logic signed [31:0] xv [AXES];   // fetched left argument
  logic [31:0]     tr_rho [AXES];  // dyadic transpose scratch
  logic signed [31:0] tr_jmp [AXES];
  logic [5:0]      tr_rank;
  addr_t           fetch_addr;
  logic [63:0]     acc;            // element count / running product
  logic            err_q;

  logic [31:0] xbits;
  logic        xbits_ok;
  comp_size_rom u_xsize (.code(rt_q[cur.rs].size_code), .bits(xbits), .valid(xbits_ok));
  logic [31:0] dbits;
  logic        dbits_ok;
  comp_size_rom u_dsize (.code(rt_q[cur.rs].size_code), .bits(dbits), .valid(dbits_ok));

  logic [4:0] rank_d;   // rank of Rd
  logic [4:0] rank_s;   // rank of Rs
  assign rank_d = rt_q[cur.rd].rank;
  assign rank_s = rt_q[cur.rs].rank;

  assign in_ready = (state == S_IDLE);
  assign mem_req  = (state == S_FETCH) && (k < xlen);
  assign mem_addr = fetch_addr;
  assign mem_bits = xbits;
  assign alloc_req   = (state == S_ALLOC);
  assign alloc_words = 32'((acc + 64'd15) >> 4);

  // sign extension of a fetched integer component
  function automatic logic signed [31:0] sext(input logic [31:0] v, input logic [31:0] nb);
    case (nb)
      32'd8:   return 32'(signed'(v[7:0]));
      32'd16:  return 32'(signed'(v[15:0]));
      default: return signed'(v);
    endcase
  endfunction

  function automatic logic [31:0] iabs(input logic signed [31:0] v);
    return (v < 0) ? 32'(-v) : 32'(v);
  endfunction

  logic [AW-1:0] ka;
  assign ka = k[AW-1:0];

  // field selected by the index word of READ / WRITE
  logic [1:0]    f_sel;
  logic [AW-1:0] f_axis;
  assign f_sel  = in_d0[7:6];
  assign f_axis = in_d0[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done <= 1'b0; err <= 1'b0; result <= '0;
      setup_valid <= 1'b0; setup_set <= '0; setup_src <= 1'b0; setup_lua <= '0;
      cur <= '0; cd0 <= '0; k <= '0; xlen <= '0; fetch_addr <= '0; acc <= '0;
      err_q <= 1'b0; tr_rank <= '0;
      for (int r = 0; r < NR; r++) begin
        base_q[r] <= '0;
        rt_q[r]   <= '0;
        for (int a = 0; a < AXES; a++) begin
          rho_q[r][a] <= '0;
          jmp_q[r][a] <= '0;
        end
      end
      for (int a = 0; a < AXES; a++) begin
        xv[a] <= '0; tr_rho[a] <= '0; tr_jmp[a] <= '0;
      end
    end else begin
      done <= 1'b0; err <= 1'b0; setup_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          cur <= in_instr; cd0 <= in_d0; err_q <= 1'b0; k <= '0;
          unique case (in_instr.code)
            OP_COPY: begin
              base_q[in_instr.rd] <= base_q[in_instr.rs];
              rt_q[in_instr.rd]   <= rt_q[in_instr.rs];
              for (int a = 0; a < AXES; a++) begin
                rho_q[in_instr.rd][a] <= rho_q[in_instr.rs][a];
                jmp_q[in_instr.rd][a] <= jmp_q[in_instr.rs][a];
              end
              state <= S_DONE;
            end
            OP_SETUP: begin
              setup_valid <= 1'b1;
              setup_set   <= in_instr.rs[SW-1:0];
              setup_src   <= in_instr.m[0];
              setup_lua   <= in_d0[2:0];
              state <= S_DONE;
            end
            OP_READ: begin
              unique case (f_sel)
                FLD_BASE: result <= base_q[in_instr.rs];
                FLD_RHO:  result <= rho_q[in_instr.rs][f_axis];
                FLD_JUMP: result <= jmp_q[in_instr.rs][f_axis];
                default:  result <= {16'd0, rt_q[in_instr.rs]};
              endcase
              state <= S_DONE;
            end
            OP_WRITE: begin
              unique case (f_sel)
                FLD_BASE: base_q[in_instr.rs] <= {in_d1, in_d2};
                FLD_RHO:  rho_q[in_instr.rs][f_axis] <= {in_d1, in_d2};
                FLD_JUMP: jmp_q[in_instr.rs][f_axis] <= {in_d1, in_d2};
                default:  rt_q[in_instr.rs] <= in_d2;
              endcase
              state <= S_DONE;
            end
            OP_MTRANS: begin
              for (int a = 0; a < AXES; a++)
                if (a < int'(rt_q[in_instr.rs].rank)) begin
                  rho_q[in_instr.rs][a] <= rho_q[in_instr.rs][int'(rt_q[in_instr.rs].rank) - 1 - a];
                  jmp_q[in_instr.rs][a] <= jmp_q[in_instr.rs][int'(rt_q[in_instr.rs].rank) - 1 - a];
                end
              rt_q[in_instr.rs].ss <= 1'b1;
              state <= S_DONE;
            end
            OP_MROTATE: begin
              base_q[in_instr.rs] <= base_q[in_instr.rs] +
                  addr_t'(jmp_q[in_instr.rs][in_d0[AW-1:0]] *
                          signed'(rho_q[in_instr.rs][in_d0[AW-1:0]] - 32'd1));
              jmp_q[in_instr.rs][in_d0[AW-1:0]] <= -jmp_q[in_instr.rs][in_d0[AW-1:0]];
              rt_q[in_instr.rs].ss <= 1'b1;
              state <= S_DONE;
            end
            OP_TAKE, OP_DROP, OP_DTRANS, OP_RESHAPE: begin
              // left argument: vector in Rs
              xlen       <= (AW+1)'(rho_q[in_instr.rs][0] > 32'(AXES) ? AXES : rho_q[in_instr.rs][0]);
              fetch_addr <= base_q[in_instr.rs];
              state      <= S_FETCH;
            end
            OP_RAVEL: begin
              acc <= 64'd1;
              state <= S_RAVEL;
            end
            OP_ALLOCATE: begin
              acc <= 64'd1;
              state <= S_COUNT;
            end
            default: begin
              err_q <= 1'b1;
              state <= S_DONE;
            end
          endcase
        end

        S_FETCH: begin
          if (k >= xlen) begin
            k <= '0;
            if (cur.code == OP_DTRANS) begin
              // new rank = 1 + max X; initialise scratch
              tr_rank <= 6'd0;
              for (int a = 0; a < AXES; a++) begin
                tr_rho[a] <= 32'hFFFF_FFFF;
                tr_jmp[a] <= '0;
              end
            end
            if (cur.code == OP_RESHAPE) begin
              if (rank_d != 5'd1) err_q <= 1'b1;
              acc <= 64'd1;
            end else if (xlen != (AW+1)'(rank_d)) err_q <= 1'b1;
            state <= S_APPLY;
          end else if (mem_ack) begin
            xv[ka]     <= sext(mem_data, xbits);
            fetch_addr <= fetch_addr + addr_t'(jmp_q[cur.rs][0]);
            k          <= k + 1'b1;
          end
        end

        S_APPLY: begin
          if (err_q) begin
            state <= S_DONE;
          end else if (cur.code == OP_RESHAPE) begin
            // walk X from the last axis, building row-major jumps
            if (k >= xlen) begin
              if (acc > 64'(rho_q[cur.rd][0])) err_q <= 1'b1;
              else begin
                rt_q[cur.rd].rank <= 5'(xlen);
                rt_q[cur.rd].ss   <= 1'b1;
                for (int a = 0; a < AXES; a++)
                  if (a < int'(xlen)) begin
                    rho_q[cur.rd][a] <= tr_rho[a];
                    jmp_q[cur.rd][a] <= tr_jmp[a];
                  end
              end
              state <= S_DONE;
            end else begin
              tr_rho[xlen - 1 - k] <= 32'(xv[xlen - 1 - k]);
              tr_jmp[xlen - 1 - k] <= jmp_q[cur.rd][0] * signed'(acc[31:0]);
              acc <= acc * 64'(iabs(xv[xlen - 1 - k]));
              k <= k + 1'b1;
            end
          end else if (k >= xlen) begin
            if (cur.code == OP_DTRANS) state <= S_DTR_COPY;
            else begin
              rt_q[cur.rd].ss <= 1'b1;
              state <= S_DONE;
            end
          end else begin
            unique case (cur.code)
              OP_TAKE: begin
                if (iabs(xv[ka]) > rho_q[cur.rd][ka]) err_q <= 1'b1;   // overtake
                else begin
                  if (xv[ka] < 0)
                    base_q[cur.rd] <= base_q[cur.rd] +
                        addr_t'(jmp_q[cur.rd][ka] * signed'(rho_q[cur.rd][ka] - iabs(xv[ka])));
                  rho_q[cur.rd][ka] <= iabs(xv[ka]);
                end
              end
              OP_DROP: begin
                if (iabs(xv[ka]) > rho_q[cur.rd][ka]) rho_q[cur.rd][ka] <= '0;
                else begin
                  if (xv[ka] > 0)
                    base_q[cur.rd] <= base_q[cur.rd] + addr_t'(jmp_q[cur.rd][ka] * xv[ka]);
                  rho_q[cur.rd][ka] <= rho_q[cur.rd][ka] - iabs(xv[ka]);
                end
              end
              default: begin // OP_DTRANS
                if (xv[ka] < 0 || xv[ka] >= 32'(AXES)) err_q <= 1'b1;
                else begin
                  if (rho_q[cur.rd][ka] < tr_rho[xv[ka][AW-1:0]])
                    tr_rho[xv[ka][AW-1:0]] <= rho_q[cur.rd][ka];
                  tr_jmp[xv[ka][AW-1:0]] <= tr_jmp[xv[ka][AW-1:0]] + jmp_q[cur.rd][ka];
                  if (6'(xv[ka]) + 6'd1 > tr_rank) tr_rank <= 6'(xv[ka]) + 6'd1;
                end
              end
            endcase
            k <= k + 1'b1;
          end
        end

        S_DTR_COPY: begin
          for (int a = 0; a < AXES; a++)
            if (a < int'(tr_rank)) begin
              rho_q[cur.rd][a] <= tr_rho[a];
              jmp_q[cur.rd][a] <= tr_jmp[a];
            end
          // every new axis must be named by X
          for (int a = 0; a < AXES; a++)
            if (a < int'(tr_rank) && tr_rho[a] == 32'hFFFF_FFFF) err_q <= 1'b1;
          rt_q[cur.rd].rank <= tr_rank[4:0];
          rt_q[cur.rd].ss   <= 1'b1;
          state <= S_DONE;
        end

        S_RAVEL: begin
          // contiguous when J[a] = J[a+1]*RHO[a+1] for all a < rank-1
          if (k + 1 >= (AW+1)'(rank_s)) begin
            if (rank_s != 5'd0) begin
              rho_q[cur.rs][0] <= 32'(acc * 64'(rho_q[cur.rs][0]));
              jmp_q[cur.rs][0] <= jmp_q[cur.rs][rank_s - 5'd1];
            end else begin
              rho_q[cur.rs][0] <= 32'd1;
              jmp_q[cur.rs][0] <= '0;
            end
            rt_q[cur.rs].rank <= 5'd1;
            state <= S_DONE;
          end else begin
            if (jmp_q[cur.rs][ka] != jmp_q[cur.rs][ka + 1] * signed'(rho_q[cur.rs][ka + 1]))
              err_q <= 1'b1;
            acc <= acc * 64'(rho_q[cur.rs][ka + 1]);
            k <= k + 1'b1;
            if (jmp_q[cur.rs][ka] != jmp_q[cur.rs][ka + 1] * signed'(rho_q[cur.rs][ka + 1]))
              state <= S_DONE;
          end
        end

        S_COUNT: begin
          // acc = component count * component bits
          if (k >= (AW+1)'(rank_s)) begin
            acc <= acc * 64'(dbits);
            if (!dbits_ok) begin err_q <= 1'b1; state <= S_DONE; end
            else state <= S_ALLOC;
          end else begin
            acc <= acc * 64'(rho_q[cur.rs][ka]);
            k <= k + 1'b1;
          end
        end

        S_ALLOC: begin
          if (alloc_ack) begin
            base_q[cur.rs]  <= {alloc_addr[27:0], 4'd0};
            rt_q[cur.rs].ss <= 1'b0;
            acc <= 64'(dbits);
            k   <= (AW+1)'(rank_s);
            state <= S_CONVERT;
          end else if (alloc_fail) begin
            err_q <= 1'b1;
            state <= S_DONE;
          end
        end

        S_CONVERT: begin
          // row-major jumps of a storage-state-zero array, last axis first
          if (k == '0) state <= S_DONE;
          else begin
            jmp_q[cur.rs][ka - 1'b1] <= signed'(acc[31:0]);
            acc <= acc * 64'(rho_q[cur.rs][ka - 1'b1]);
            k <= k - 1'b1;
          end
        end

        default: begin // S_DONE
          done  <= 1'b1;
          err   <= err_q;
          if (cur.code == OP_ALLOCATE && !err_q) result <= base_q[cur.rs];
          state <= S_IDLE;
        end
      endcase
    end
  end

  logic unused;
  assign unused = ^{cd0, xbits_ok, alloc_addr[31:28], cur.m};
endmodule
