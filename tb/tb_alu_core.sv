// tb_alu_core: checks every function unit of the ALU core against
// independently computed values for random and corner-case operands.
module tb_alu_core;
  import alu_pkg::*;
  import alu_ref_pkg::*;

  decode_t dec;
  core_t   res;
  int checks = 0, failures = 0;

  alu_core dut (.dec, .res);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h sh=%0d", what, dec.a, dec.b, dec.shamt);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] want_sum;
    logic [31:0] want_sra;
    int unsigned sh;
    for (int n = 0; n < 2000; n++) begin
      dec.op    = alu_op_e'($urandom % 32);
      dec.a     = pick_operand($urandom);
      dec.b     = pick_operand($urandom);
      dec.x     = pick_operand($urandom);
      dec.y     = pick_operand($urandom);
      dec.cin   = 1'($urandom);
      dec.shamt = 5'($urandom);
      #1;
      sh = dec.shamt;
      want_sum = 33'(dec.x) + 33'(dec.y) + 33'(dec.cin);
      check(res.sum == want_sum, "adder");
      check(res.prod == 64'(dec.a) * 64'(dec.b), "multiplier");
      check(res.land == (dec.a & dec.b) && res.lor == (dec.a | dec.b) && res.lxor == (dec.a ^ dec.b), "logic");
      check(res.shl == dec.a << sh && res.shr == dec.a >> sh, "logical shifts");
      want_sra = $signed(dec.a) >>> sh;
      check(res.sra == want_sra, "arithmetic shift");
      check(res.rol == rot_left(dec.a, sh), "rotate left");
      check(res.ror == rot_left(dec.a, (32 - sh) % 32), "rotate right");
      check(32'(res.popc) == $countones(dec.a), "population count");
      check(32'(res.clz) == count_lz(dec.a), "leading zeros");
      check(res.op == dec.op && res.a == dec.a && res.b == dec.b &&
            res.a_msb == dec.a[31] && res.b_msb == dec.b[31], "pass-through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
