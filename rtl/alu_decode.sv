// alu_decode: operand conditioning, the first logic cloud of the ALU.
//
// Every add, subtract, increment, negate, absolute value and compare goes
// through one adder computing x + y + cin. This block sets x, y and cin
// for the operation: subtraction is x + ~y + 1, compares are done as a - b,
// |a| picks -a or a from the sign of a. The shift amount is b[4:0]. The
// operands and the opcode travel on for the later clouds.
//
// Purely combinational. That the ALU is split into decode, function units
// and result select (to fill the clouds between five pipeline stages) is
// this design's choice; the source gives the ALU's ports, not its insides.
module alu_decode
  import alu_pkg::*;
(
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  alu_op_e           op,
  output decode_t           dec
);

  always_comb begin
    dec.op    = op;
    dec.a     = a;
    dec.b     = b;
    dec.shamt = b[SHAMT_W-1:0];
    dec.x     = a;
    dec.y     = b;
    dec.cin   = 1'b0;
    unique case (op)
      OP_SUB, OP_SLT, OP_SLTU, OP_MIN, OP_MAX, OP_MINU, OP_MAXU: begin
        dec.y   = ~b;
        dec.cin = 1'b1;
      end
      OP_RSUB: begin
        dec.x   = b;
        dec.y   = ~a;
        dec.cin = 1'b1;
      end
      OP_INC: begin
        dec.y   = '0;
        dec.cin = 1'b1;
      end
      OP_DEC: dec.y = '1;
      OP_NEG: begin
        dec.x   = '0;
        dec.y   = ~a;
        dec.cin = 1'b1;
      end
      OP_ABS: begin
        if (a[DATA_W-1]) begin
          dec.x   = '0;
          dec.y   = ~a;
          dec.cin = 1'b1;
        end else begin
          dec.y   = '0;
        end
      end
      default: ;   // ADD, AVGU and the non-adder operations use x = a, y = b
    endcase
  end

endmodule
