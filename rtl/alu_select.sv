// alu_select: result multiplexer, the third logic cloud.
//
// Picks the 32-bit result of the selected operation from the function-unit
// outputs. Compares come from the subtraction a - b formed by the adder:
// unsigned a < b is the absence of a carry out; signed a < b is the sign of
// a when the signs differ, and the unsigned answer when they agree. The
// destination slot of the 512-bit result store is opcode[3:0].
//
// Purely combinational. The slot rule is this design's choice.
module alu_select
  import alu_pkg::*;
(
  input  core_t             res,
  output logic [DATA_W-1:0] y,
  output logic [SLOT_W-1:0] slot
);

  logic lt_u, lt_s;

  always_comb begin
    lt_u = ~res.sum[DATA_W];
    lt_s = (res.a_msb != res.b_msb) ? res.a_msb : lt_u;
  end

  always_comb begin
    slot = res.op[SLOT_W-1:0];
    unique case (res.op)
      OP_ADD, OP_SUB, OP_RSUB, OP_INC, OP_DEC, OP_NEG, OP_ABS:
                 y = res.sum[DATA_W-1:0];
      OP_AVGU:   y = res.sum[DATA_W:1];
      OP_MUL:    y = res.prod[DATA_W-1:0];
      OP_MULHU:  y = res.prod[2*DATA_W-1:DATA_W];
      OP_SLT:    y = DATA_W'(lt_s);
      OP_SLTU:   y = DATA_W'(lt_u);
      OP_MIN:    y = lt_s ? res.a : res.b;
      OP_MAX:    y = lt_s ? res.b : res.a;
      OP_MINU:   y = lt_u ? res.a : res.b;
      OP_MAXU:   y = lt_u ? res.b : res.a;
      OP_AND:    y = res.land;
      OP_OR:     y = res.lor;
      OP_XOR:    y = res.lxor;
      OP_NAND:   y = ~res.land;
      OP_NOR:    y = ~res.lor;
      OP_XNOR:   y = ~res.lxor;
      OP_NOTA:   y = ~res.a;
      OP_PASSA:  y = res.a;
      OP_SLL:    y = res.shl;
      OP_SRL:    y = res.shr;
      OP_SRA:    y = res.sra;
      OP_ROL:    y = res.rol;
      OP_ROR:    y = res.ror;
      OP_POPC:   y = DATA_W'(res.popc);
      OP_CLZ:    y = DATA_W'(res.clz);
      OP_PASSB:  y = res.b;
      default:   y = '0;
    endcase
  end

endmodule
