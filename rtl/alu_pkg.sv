// alu_pkg: widths, opcodes and inter-stage structs of the 32-bit adaptive ALU.
//
// The ALU takes two 32-bit operands a, b and a 5-bit operation select s, and
// keeps its results in a 512-bit output z. The widths of a, b, s and z are
// those of the published ALU block. The list of 32 operations and the
// organisation of z as 16 slots of 32 bits (a result lands in slot s[3:0])
// are this design's own choice: the source describes neither.
//
// The structs carry the values latched between the logic clouds of the
// five-stage pipeline: decode_t after operand conditioning (stage B) and
// core_t after the function units (stage C).
package alu_pkg;

  localparam int unsigned DATA_W   = 32;
  localparam int unsigned SEL_W    = 5;
  localparam int unsigned Z_W      = 512;
  localparam int unsigned SLOTS    = Z_W / DATA_W;     // 16 result slots
  localparam int unsigned SLOT_W   = $clog2(SLOTS);    // 4
  localparam int unsigned SHAMT_W  = $clog2(DATA_W);   // 5
  localparam int unsigned N_STAGES = 5;                // stages A..E

  // s = 0..15: arithmetic and compare, s = 16..31: logic, shift and bit count.
  typedef enum logic [SEL_W-1:0] {
    OP_ADD   = 5'd0,   // a + b
    OP_SUB   = 5'd1,   // a - b
    OP_RSUB  = 5'd2,   // b - a
    OP_INC   = 5'd3,   // a + 1
    OP_DEC   = 5'd4,   // a - 1
    OP_NEG   = 5'd5,   // -a
    OP_ABS   = 5'd6,   // |a| (signed)
    OP_AVGU  = 5'd7,   // (a + b) >> 1, unsigned, carry kept
    OP_MUL   = 5'd8,   // low 32 bits of a * b
    OP_MULHU = 5'd9,   // high 32 bits of a * b, unsigned
    OP_SLT   = 5'd10,  // a < b signed ? 1 : 0
    OP_SLTU  = 5'd11,  // a < b unsigned ? 1 : 0
    OP_MIN   = 5'd12,  // signed minimum
    OP_MAX   = 5'd13,  // signed maximum
    OP_MINU  = 5'd14,  // unsigned minimum
    OP_MAXU  = 5'd15,  // unsigned maximum
    OP_AND   = 5'd16,
    OP_OR    = 5'd17,
    OP_XOR   = 5'd18,
    OP_NAND  = 5'd19,
    OP_NOR   = 5'd20,
    OP_XNOR  = 5'd21,
    OP_NOTA  = 5'd22,  // ~a
    OP_PASSA = 5'd23,  // a
    OP_SLL   = 5'd24,  // a << b[4:0]
    OP_SRL   = 5'd25,  // a >> b[4:0], logical
    OP_SRA   = 5'd26,  // a >>> b[4:0], arithmetic
    OP_ROL   = 5'd27,  // rotate a left by b[4:0]
    OP_ROR   = 5'd28,  // rotate a right by b[4:0]
    OP_POPC  = 5'd29,  // number of ones in a
    OP_CLZ   = 5'd30,  // leading zeros of a (32 for a = 0)
    OP_PASSB = 5'd31   // b
  } alu_op_e;

  // Output of operand conditioning: adder operands x + y + cin, shift amount.
  typedef struct packed {
    alu_op_e             op;
    logic [DATA_W-1:0]   a;
    logic [DATA_W-1:0]   b;
    logic [DATA_W-1:0]   x;
    logic [DATA_W-1:0]   y;
    logic                cin;
    logic [SHAMT_W-1:0]  shamt;
  } decode_t;

  // Output of the function units, all evaluated in parallel.
  typedef struct packed {
    alu_op_e             op;
    logic                a_msb;    // sign of a, for signed compares
    logic                b_msb;    // sign of b
    logic [DATA_W-1:0]   a;
    logic [DATA_W-1:0]   b;
    logic [DATA_W:0]     sum;      // x + y + cin with carry out
    logic [2*DATA_W-1:0] prod;     // a * b, unsigned
    logic [DATA_W-1:0]   land;
    logic [DATA_W-1:0]   lor;
    logic [DATA_W-1:0]   lxor;
    logic [DATA_W-1:0]   shl;
    logic [DATA_W-1:0]   shr;
    logic [DATA_W-1:0]   sra;
    logic [DATA_W-1:0]   rol;
    logic [DATA_W-1:0]   ror;
    logic [SHAMT_W:0]    popc;     // 0..32
    logic [SHAMT_W:0]    clz;      // 0..32
  } core_t;

endpackage
