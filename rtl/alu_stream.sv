// alu_stream: MAPLE's ALU reduced to integer scalar functions on component
// streams.
//
// The ALU has three logical units on the status bus: the left argument
// stream Y (LUA 2), the right argument stream X (LUA 1) and the result
// stream Z (LUA 3). Its Ready line answers for the logical unit on LUA:
// X or Y ready when that one-component input buffer is empty, Z ready when
// a result waits. A component moves in the cycle of CSL and the following
// cycles, one 16-bit word per cycle, least significant word first; Z is
// driven on dbus_out with oe while the DMU reads it (TDL = 0).
// Each result is Z = Y f X for a dyadic f, or f X for a monadic one, on
// 32-bit two's complement integers (comparisons and logic give 0 or 1).
// With a ratio N > 1 (the number of input components per output
// component) a dyadic f becomes the reduction f/ over each group of N
// X components: + x max min and or = != fold directly, - gives the
// alternating sum that APL's right-to-left -/ equals. Three 32-bit
// counters count the X, Y and Z transfers; an overflow of + - x sets a
// sticky flag.
// Instructions come over the instruction bus (UID = ALU, IS strobe):
//   {op[5:0], xw[1:0], zw[1:0], 6'b0}   set the function; xw+1 and zw+1 are
//                                         the X/Y and Z component lengths in words
//   {6'd62, 10'b0} then one word          set the ratio N (counters cleared)
//   {6'd63, 10'b0}                        clear the counters and buffers
// The document lists the scalar functions, the three counters and the
// ratio; it leaves the ALU's insides open. This integer-only datapath, the
// opcode numbers and the instruction format are this design's; floating
// point, complex, transcendental and random functions are not built.
module alu_stream
  import maple_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // instruction bus
  input  logic [15:0] ibus_in,
  input  logic [1:0]  uid_in,
  input  logic        is,
  // status and data bus
  input  logic        tdl,
  input  logic [2:0]  lua,
  input  logic        csl,
  input  logic        eos,
  output logic        ready,
  input  logic [15:0] dbus_in,
  output logic [15:0] dbus_out,
  output logic        dbus_oe,
  // observation
  output logic [31:0] cnt_x,
  output logic [31:0] cnt_y,
  output logic [31:0] cnt_z,
  output logic        overflow,
  output logic [31:0] n_eos
);
  typedef enum logic [5:0] {
    F_ADD = 6'd1, F_SUB = 6'd2, F_MUL = 6'd3, F_MAX = 6'd4, F_MIN = 6'd5, F_RES = 6'd6,
    F_EQ = 6'd7, F_NE = 6'd8, F_LT = 6'd9, F_LE = 6'd10, F_GT = 6'd11, F_GE = 6'd12,
    F_AND = 6'd13, F_OR = 6'd14, F_NAND = 6'd15, F_NOR = 6'd16,
    F_NEG = 6'd32, F_NOT = 6'd33, F_ABS = 6'd34, F_SGN = 6'd35, F_IDENT = 6'd36,
    F_RATIO = 6'd62, F_CLEAR = 6'd63
  } fn_e;

  fn_e         fn;
  logic [1:0]  xw, zw;
  logic [31:0] ratio;
  logic        ratio_next;

  logic        monadic;
  assign monadic = fn[5] && (fn != F_RATIO) && (fn != F_CLEAR);

  // input / output buffers
  logic [31:0] xb, yb, zb;
  logic        xv, yv, zv;
  logic [1:0]  wk;          // word index inside a transfer
  logic        in_xfer;
  logic [2:0]  xfer_lua;
  logic [31:0] acc;
  logic [31:0] grp;         // components folded into acc

  always_comb begin
    unique case (lua)
      LUA_ALU_X: ready = !xv;
      LUA_ALU_Y: ready = !yv && !monadic;
      LUA_ALU_Z: ready = zv;
      default:   ready = 1'b0;
    endcase
  end

  logic        zsel;
  logic [1:0]  zk;
  assign zsel     = (csl && lua == LUA_ALU_Z && !tdl) || (in_xfer && xfer_lua == LUA_ALU_Z);
  assign zk       = (csl && lua == LUA_ALU_Z) ? 2'd0 : wk;
  assign dbus_oe  = zsel;
  assign dbus_out = zsel ? ((zk == 2'd0) ? zb[15:0] : (zk == 2'd1) ? zb[31:16] : 16'd0) : 16'd0;

  // scalar function
  function automatic logic [32:0] f(input fn_e op, input logic signed [31:0] y,
                                    input logic signed [31:0] x);
    logic signed [32:0] wide;
    case (op)
      F_ADD:   begin wide = 33'(y) + 33'(x); return {(wide[32] != wide[31]), wide[31:0]}; end
      F_SUB:   begin wide = 33'(y) - 33'(x); return {(wide[32] != wide[31]), wide[31:0]}; end
      F_MUL:   begin
                 logic signed [63:0] p;
                 p = 64'(y) * 64'(x);
                 return {(p[63:31] != {33{1'b0}} && p[63:31] != {33{1'b1}}), p[31:0]};
               end
      F_MAX:   return {1'b0, (y > x) ? y : x};
      F_MIN:   return {1'b0, (y < x) ? y : x};
      F_RES:   begin
                 // APL residue y|x: x - y*floor(x/y), result has the sign of y
                 logic signed [31:0] r;
                 if (y == 0) return {1'b0, x};
                 r = x % y;
                 if (r != 0 && ((r < 0) != (y < 0))) r = r + y;
                 return {1'b0, r};
               end
      F_EQ:    return {32'd0, x == y};
      F_NE:    return {32'd0, x != y};
      F_LT:    return {32'd0, y <  x};
      F_LE:    return {32'd0, y <= x};
      F_GT:    return {32'd0, y >  x};
      F_GE:    return {32'd0, y >= x};
      F_AND:   return {32'd0, y[0] & x[0]};
      F_OR:    return {32'd0, y[0] | x[0]};
      F_NAND:  return {32'd0, ~(y[0] & x[0])};
      F_NOR:   return {32'd0, ~(y[0] | x[0])};
      F_NEG:   return {1'b0, -x};
      F_NOT:   return {32'd0, ~x[0]};
      F_ABS:   return {1'b0, (x < 0) ? -x : x};
      F_SGN:   return {1'b0, (x > 0) ? 32'sd1 : (x < 0) ? -32'sd1 : 32'sd0};
      default: return {1'b0, x};
    endcase
  endfunction

  // sign extension of an input component by its length
  function automatic logic [31:0] sx(input logic [31:0] v, input logic [1:0] words);
    return (words == 2'd0) ? 32'(signed'(v[15:0])) : v;
  endfunction

  logic [32:0] fz;       // f of the buffered operands
  logic [32:0] fred;     // reduction step
  logic        alt_neg;  // -/ : odd positions enter negated
  always_comb begin
    fz      = f(fn, signed'(sx(yb, xw)), signed'(sx(xb, xw)));
    alt_neg = (fn == F_SUB) && grp[0];
    if (fn == F_SUB)
      fred = alt_neg ? f(F_SUB, signed'(acc), signed'(sx(xb, xw)))
                     : f(F_ADD, signed'(acc), signed'(sx(xb, xw)));
    else
      fred = f(fn, signed'(acc), signed'(sx(xb, xw)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fn <= F_IDENT; xw <= 2'd1; zw <= 2'd1; ratio <= 32'd1; ratio_next <= 1'b0;
      xb <= '0; yb <= '0; zb <= '0; xv <= 1'b0; yv <= 1'b0; zv <= 1'b0;
      wk <= '0; in_xfer <= 1'b0; xfer_lua <= '0; acc <= '0; grp <= '0;
      cnt_x <= '0; cnt_y <= '0; cnt_z <= '0; overflow <= 1'b0; n_eos <= '0;
    end else begin
      // instructions
      if (is && uid_in == UID_ALU) begin
        if (ratio_next) begin
          ratio <= (ibus_in == 16'd0) ? 32'd1 : 32'(ibus_in);
          ratio_next <= 1'b0;
          cnt_x <= '0; cnt_y <= '0; cnt_z <= '0; grp <= '0;
        end else if (fn_e'(ibus_in[15:10]) == F_RATIO) ratio_next <= 1'b1;
        else if (fn_e'(ibus_in[15:10]) == F_CLEAR) begin
          cnt_x <= '0; cnt_y <= '0; cnt_z <= '0; grp <= '0;
          xv <= 1'b0; yv <= 1'b0; zv <= 1'b0; overflow <= 1'b0;
        end else begin
          fn <= fn_e'(ibus_in[15:10]);
          xw <= ibus_in[9:8];
          zw <= ibus_in[7:6];
        end
      end
      if (eos) n_eos <= n_eos + 1'b1;

      // bus transfers
      if (csl && (lua == LUA_ALU_X || lua == LUA_ALU_Y || lua == LUA_ALU_Z)) begin
        xfer_lua <= lua;
        if (lua == LUA_ALU_X && tdl) xb[15:0] <= dbus_in;
        if (lua == LUA_ALU_Y && tdl) yb[15:0] <= dbus_in;
        if (lua != LUA_ALU_Z && xw == 2'd0) begin
          if (lua == LUA_ALU_X) begin xv <= 1'b1; xb[31:16] <= '0; cnt_x <= cnt_x + 1'b1; end
          else begin yv <= 1'b1; yb[31:16] <= '0; cnt_y <= cnt_y + 1'b1; end
        end else if (lua == LUA_ALU_Z && zw == 2'd0) begin
          zv <= 1'b0; cnt_z <= cnt_z + 1'b1;
        end else begin
          in_xfer <= 1'b1; wk <= 2'd1;
        end
      end else if (in_xfer) begin
        logic last;
        last = (wk == ((xfer_lua == LUA_ALU_Z) ? zw : xw));
        if (xfer_lua == LUA_ALU_X && wk == 2'd1) xb[31:16] <= dbus_in;
        if (xfer_lua == LUA_ALU_Y && wk == 2'd1) yb[31:16] <= dbus_in;
        if (last) begin
          in_xfer <= 1'b0;
          unique case (xfer_lua)
            LUA_ALU_X: begin xv <= 1'b1; cnt_x <= cnt_x + 1'b1; end
            LUA_ALU_Y: begin yv <= 1'b1; cnt_y <= cnt_y + 1'b1; end
            default:   begin zv <= 1'b0; cnt_z <= cnt_z + 1'b1; end
          endcase
        end else wk <= wk + 1'b1;
      end

      // compute
      if (!zv && xv && !in_xfer && !csl) begin
        if (ratio == 32'd1) begin
          if (monadic || yv) begin
            zb <= fz[31:0];
            if (fz[32]) overflow <= 1'b1;
            zv <= 1'b1;
            xv <= 1'b0;
            if (!monadic) yv <= 1'b0;
          end
        end else begin
          // reduction over groups of 'ratio' X components
          xv <= 1'b0;
          if (grp == 32'd0) acc <= sx(xb, xw);
          else begin
            acc <= fred[31:0];
            if (fred[32]) overflow <= 1'b1;
          end
          if (grp + 1'b1 == ratio) begin
            zb  <= (grp == 32'd0) ? sx(xb, xw) : fred[31:0];
            zv  <= 1'b1;
            grp <= '0;
          end else grp <= grp + 1'b1;
        end
      end
    end
  end
endmodule
