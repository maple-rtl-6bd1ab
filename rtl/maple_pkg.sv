// maple_pkg: types and constants shared by the MAPLE units.
//
// Memory is 16-bit words addressed at bit level with 32-bit addresses:
// bits [3:0] select a bit in a word, [15:4] a word in a 4096-word page and
// [31:16] one of 65536 virtual pages. Descriptors (storage state one form)
// carry a base bit address, a rank in [0,31], one RHO and one jump value per
// axis, and the rank-type word. DMU instructions are one 16-bit word
// {CODE[5:0], Rd[3:0], Rs[3:0], m[1:0]} followed by up to three data words;
// the opcode numbers follow the order of the DMU instruction list.
// Some constants (the IOU's logical-unit and unit codes, the page size in
// bits) are not used inside this RTL: they name codes for the units outside
// it and for the testbenches, so a linter reports them as unused.
// The layout of the fields follows the document; the codes are this
// design's.
package maple_pkg;

  localparam int WORD_W    = 16;   // memory, data bus and instruction bus width
  localparam int ADDR_W    = 32;   // bit address width
  localparam int MAX_AXES  = 32;   // rank 0..31 -> 32 axis slots per register set
  localparam int NREGS     = 16;   // descriptor register files / access sets
  localparam int PAGE_WBITS = 12;  // 4096 words per page

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [WORD_W-1:0] word_t;

  // Rank-type word. Rank and size code sit at the same bit positions of
  // the high and low byte.
  typedef struct packed {
    logic       ss;        // 0: storage state zero, 1: higher storage state
    logic [1:0] dsize;     // width of RHO entries in the stored descriptor: 0=8 1=16 2=32
    logic [4:0] rank;
    logic [1:0] dclass;    // data class
    logic       rsvd;
    logic [4:0] size_code; // component size code
  } rank_type_t;

  typedef enum logic [1:0] {
    CLS_NUMERIC = 2'd0,
    CLS_GRAPHIC = 2'd1,
    CLS_LIST    = 2'd2,
    CLS_FUNC    = 2'd3
  } data_class_e;

  typedef enum logic [5:0] {
    OP_NOP      = 6'd0,
    OP_COPY     = 6'd1,
    OP_SETUP    = 6'd2,
    OP_ACCESS   = 6'd3,
    OP_SCONFORM = 6'd4,
    OP_NAME     = 6'd5,
    OP_ALLOCATE = 6'd6,
    OP_READ     = 6'd7,
    OP_WRITE    = 6'd8,
    OP_REDUCE   = 6'd9,
    OP_MTRANS   = 6'd10,
    OP_MROTATE  = 6'd11,
    OP_RAVEL    = 6'd12,
    OP_RHO      = 6'd13,
    OP_EXPOSE   = 6'd14,
    OP_IMBED    = 6'd15,
    OP_PUSH     = 6'd16,
    OP_POP      = 6'd17,
    OP_OUTER    = 6'd18,
    OP_IREF     = 6'd19,
    OP_DREF     = 6'd20,
    OP_DTRANS   = 6'd21,
    OP_DROTATE  = 6'd22,
    OP_TAKE     = 6'd23,
    OP_DROP     = 6'd24,
    OP_CATENATE = 6'd25,
    OP_COMPRESS = 6'd26,
    OP_EXPAND   = 6'd27,
    OP_INDEX    = 6'd28,
    OP_RESHAPE  = 6'd29,
    OP_STALLOC  = 6'd30,
    OP_TPUSH    = 6'd31,
    OP_TPOP     = 6'd32
  } dmu_op_e;

  typedef struct packed {
    dmu_op_e    code;
    logic [3:0] rd;
    logic [3:0] rs;
    logic [1:0] m;
  } dmu_instr_t;

  // Descriptor field selector used by READ and WRITE (index word):
  // {field[1:0], axis[5:0]} in the low 8 bits.
  typedef enum logic [1:0] {
    FLD_BASE = 2'd0,
    FLD_RHO  = 2'd1,
    FLD_JUMP = 2'd2,
    FLD_RT   = 2'd3
  } desc_field_e;

  // Logical unit addresses on the status bus.
  localparam logic [2:0] LUA_EXU   = 3'd0;
  localparam logic [2:0] LUA_ALU_X = 3'd1;
  localparam logic [2:0] LUA_ALU_Y = 3'd2;
  localparam logic [2:0] LUA_ALU_Z = 3'd3;
  localparam logic [2:0] LUA_IOU_I = 3'd4;
  localparam logic [2:0] LUA_IOU_O = 3'd5;

  // Physical unit of a logical unit address: 0 EXU, 1 ALU, 2 IOU.
  function automatic logic [1:0] lua_phys(input logic [2:0] lua);
    case (lua)
      LUA_EXU:                       return 2'd0;
      LUA_ALU_X, LUA_ALU_Y, LUA_ALU_Z: return 2'd1;
      default:                       return 2'd2;
    endcase
  endfunction

  // Unit identifiers on the instruction bus UID lines.
  localparam logic [1:0] UID_DMU = 2'd1;
  localparam logic [1:0] UID_ALU = 2'd2;
  localparam logic [1:0] UID_IOU = 2'd3;

endpackage
