// alu_core: the ALU's function units, the second logic cloud.
//
// All units work in parallel on the decoded operands: a 33-bit adder
// (x + y + cin with carry out), a 32 x 32 unsigned multiplier giving 64 bits,
// AND / OR / XOR, logical and arithmetic shifts and both rotates by
// shamt, a population count and a leading-zero count of a. The operands'
// sign bits and the opcode are passed on for the result select.
//
// Purely combinational. The set of units follows from the operation list
// chosen for this design (see alu_pkg).
module alu_core
  import alu_pkg::*;
(
  input  decode_t dec,
  output core_t   res
);

  // Rotates: a shift by shamt ORed with the opposite shift by (-shamt) mod 32.
  logic [SHAMT_W-1:0] shamt_neg;
  assign shamt_neg = SHAMT_W'(-dec.shamt);

  always_comb begin
    res.op    = dec.op;
    res.a     = dec.a;
    res.b     = dec.b;
    res.a_msb = dec.a[DATA_W-1];
    res.b_msb = dec.b[DATA_W-1];
    res.sum   = {1'b0, dec.x} + {1'b0, dec.y} + {{DATA_W{1'b0}}, dec.cin};
    res.prod  = {{DATA_W{1'b0}}, dec.a} * {{DATA_W{1'b0}}, dec.b};
    res.land  = dec.a & dec.b;
    res.lor   = dec.a | dec.b;
    res.lxor  = dec.a ^ dec.b;
    res.shl   = dec.a << dec.shamt;
    res.shr   = dec.a >> dec.shamt;
    res.sra   = $signed(dec.a) >>> dec.shamt;
    res.rol   = (dec.a << dec.shamt) | (dec.a >> shamt_neg);
    res.ror   = (dec.a >> dec.shamt) | (dec.a << shamt_neg);
  end

  // Population count and leading-zero count of a.
  always_comb begin
    logic seen_one;
    res.popc = '0;
    res.clz  = '0;
    seen_one = 1'b0;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      res.popc = res.popc + (SHAMT_W+1)'(dec.a[i]);
      if (dec.a[i]) seen_one = 1'b1;
      if (!seen_one) res.clz = res.clz + 1'b1;
    end
  end

endmodule
