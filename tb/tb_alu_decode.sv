// tb_alu_decode: checks the operand conditioning of the ALU.
// For every opcode and many operand pairs it checks that the adder inputs
// x + y + cin give the arithmetic result the operation needs (a - b for all
// compares), and that a, b, opcode and the shift amount are passed on.
module tb_alu_decode;
  import alu_pkg::*;
  import alu_ref_pkg::*;

  logic [31:0] a, b;
  alu_op_e     op;
  decode_t     dec;
  int checks = 0, failures = 0;

  alu_decode dut (.a, .b, .op, .dec);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s op=%0d a=%h b=%h", what, op, a, b);
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
    logic [31:0] sum, want;
    for (int n = 0; n < 2000; n++) begin
      op = alu_op_e'(n % 32);
      a  = pick_operand($urandom);
      b  = pick_operand($urandom);
      #1;
      sum = dec.x + dec.y + 32'(dec.cin);
      case (op)
        OP_ADD, OP_SUB, OP_RSUB, OP_INC, OP_DEC, OP_NEG, OP_ABS:
          check(sum == ref_alu(op, a, b), "adder operands");
        OP_SLT, OP_SLTU, OP_MIN, OP_MAX, OP_MINU, OP_MAXU:
          check(sum == a - b && dec.x == a && dec.y == ~b && dec.cin, "compare operands");
        OP_AVGU:
          check(dec.x == a && dec.y == b && !dec.cin, "average operands");
        default: ;
      endcase
      want = 32'(b[4:0]);
      check(dec.a == a && dec.b == b && dec.op == op && 32'(dec.shamt) == want, "pass-through");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
