// dmu_tstack: the DMU's temporary stack, a LIFO of scalar components that
// other units use to collect data of unknown length.
//
// The stack is a system object: it owns a fixed virtual subspace starting
// at virtual page STK_VP0, large enough for its maximum depth, but real
// memory is attached only for the pages it currently uses. A push that
// starts a new page first fills that page's black hole with a real page
// from the Free List; a pop that empties a page releases it back. So the
// stack never moves and holds no more real memory than its depth needs.
// Instructions (taken when in_valid && in_ready, 'done' pulses at the end):
//   STALLOC  d0 = component size code, d1 = maximum depth S
//            (only while the stack is empty; codes of 1 to 32 bits)
//   TPUSH    {d0, d1} = the 32-bit datum, truncated to the component size
//   TPOP     'result' = the last component pushed, zero-extended
// 'err' comes with 'done' for a push beyond S, a pop of an empty stack, a
// stack that was never allocated, a bad size code or no free real page.
// Memory is reached through a component read/write port (mem_*, request
// held until ack) and the pager's page operations (pg_*, request held
// until pg_done, then dropped for a cycle).
// The paging of system objects and the three instructions follow the
// document; the virtual placement, the 32-bit limit on components and the
// error cases are this design's.
module dmu_tstack
  import maple_pkg::*;
#(
  parameter int VPAGE_W = 16,
  parameter int STK_VP0 = 1 << (VPAGE_W - 1)   // first virtual page of the stack
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction
  input  logic        in_valid,
  output logic        in_ready,
  input  dmu_instr_t  in_instr,
  input  logic [15:0] in_d0,
  input  logic [15:0] in_d1,
  output logic        done,
  output logic        err,
  output logic [31:0] result,
  // pager page operations
  output logic        pg_valid,
  output logic        pg_release,
  output logic [VPAGE_W-1:0] pg_vpage,
  input  logic        pg_done,
  input  logic        pg_fail,
  // component port
  output logic        mem_req,
  output logic        mem_we,
  output addr_t       mem_addr,
  output logic [31:0] mem_bits,
  output logic [31:0] mem_wdata,
  input  logic        mem_ack,
  input  logic [31:0] mem_data,
  // observation
  output logic [31:0] depth,
  output logic [31:0] pages_held
);
  typedef enum logic [2:0] {K_IDLE, K_FILL, K_WRITE, K_READ, K_FREE, K_DONE} kstate_e;
  kstate_e st;

  logic        allocated;
  logic [31:0] max_depth;
  logic [31:0] cbits;
  logic [31:0] datum;
  logic        err_q;
  addr_t       a_q;       // address of the component being pushed or popped

  localparam addr_t BASE = addr_t'(STK_VP0) << 16;

  logic [31:0] code_bits;
  logic        code_ok;
  comp_size_rom u_size (.code(in_d0[4:0]), .bits(code_bits), .valid(code_ok));

  addr_t push_addr, pop_addr;
  assign push_addr = BASE + addr_t'(depth * cbits);
  assign pop_addr  = BASE + addr_t'((depth - 32'd1) * cbits);

  assign in_ready   = (st == K_IDLE);
  assign pg_valid   = (st == K_FILL || st == K_FREE);
  assign pg_release = (st == K_FREE);
  assign pg_vpage   = a_q[16 +: VPAGE_W];
  assign mem_req    = (st == K_WRITE || st == K_READ);
  assign mem_we     = (st == K_WRITE);
  assign mem_addr   = a_q;
  assign mem_bits   = cbits;
  assign mem_wdata  = datum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= K_IDLE; allocated <= 1'b0; max_depth <= '0; cbits <= 32'd16; datum <= '0;
      err_q <= 1'b0; a_q <= '0; depth <= '0; pages_held <= '0;
      done <= 1'b0; err <= 1'b0; result <= '0;
    end else begin
      done <= 1'b0;
      err  <= 1'b0;
      unique case (st)
        K_IDLE: if (in_valid) begin
          err_q <= 1'b0;
          datum <= {in_d0, in_d1};
          st    <= K_DONE;
          unique case (in_instr.code)
            OP_STALLOC: begin
              if (depth != '0 || !code_ok || code_bits > 32'd32) err_q <= 1'b1;
              else begin
                allocated <= 1'b1;
                cbits     <= code_bits;
                max_depth <= 32'(in_d1);
              end
            end
            OP_TPUSH: begin
              if (!allocated || depth >= max_depth) err_q <= 1'b1;
              else begin
                a_q <= push_addr;
                // a component never straddles a page: every size divides 2**16 bits
                st  <= (push_addr[15:0] == 16'd0) ? K_FILL : K_WRITE;
              end
            end
            OP_TPOP: begin
              if (!allocated || depth == '0) err_q <= 1'b1;
              else begin
                a_q <= pop_addr;
                st  <= K_READ;
              end
            end
            default: err_q <= 1'b1;
          endcase
        end
        K_FILL: if (pg_done) begin
          if (pg_fail) begin err_q <= 1'b1; st <= K_DONE; end
          else begin pages_held <= pages_held + 1'b1; st <= K_WRITE; end
        end
        K_WRITE: if (mem_ack) begin
          depth <= depth + 1'b1;
          st    <= K_DONE;
        end
        K_READ: if (mem_ack) begin
          result <= mem_data & ((cbits >= 32'd32) ? 32'hFFFF_FFFF : ((32'd1 << cbits[4:0]) - 32'd1));
          depth  <= depth - 1'b1;
          st     <= (a_q[15:0] == 16'd0) ? K_FREE : K_DONE;
        end
        K_FREE: if (pg_done) begin
          pages_held <= pages_held - 1'b1;
          st <= K_DONE;
        end
        default: begin  // K_DONE: one cycle, so a page request can drop
          done <= 1'b1;
          err  <= err_q;
          st   <= K_IDLE;
        end
      endcase
    end
  end

  // only the opcode field of the instruction word matters here
  logic unused;
  assign unused = ^{in_instr.rd, in_instr.rs, in_instr.m};
endmodule
