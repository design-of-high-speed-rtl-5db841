// tb_alu_select: feeds the result multiplexer with function-unit outputs
// computed in the testbench and checks the selected result against the
// reference model of every operation, and the destination slot.
module tb_alu_select;
  import alu_pkg::*;
  import alu_ref_pkg::*;

  core_t       res;
  logic [31:0] y;
  logic [3:0]  slot;
  int checks = 0, failures = 0;

  alu_select dut (.res, .y, .slot);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b, x, yy, want;
    logic        cin;
    int unsigned sh;
    logic [4:0]  op;
    for (int n = 0; n < 4000; n++) begin
      op = 5'(n % 32);
      a  = pick_operand($urandom);
      b  = pick_operand($urandom);
      sh = b[4:0];
      // adder inputs as the operation needs them
      x = a; yy = b; cin = 0;
      case (op)
        1, 10, 11, 12, 13, 14, 15: begin yy = ~b; cin = 1; end
        2: begin x = b; yy = ~a; cin = 1; end
        3: begin yy = 0; cin = 1; end
        4: yy = '1;
        5: begin x = 0; yy = ~a; cin = 1; end
        6: if (a[31]) begin x = 0; yy = ~a; cin = 1; end else yy = 0;
        default: ;
      endcase
      res.op    = alu_op_e'(op);
      res.a     = a;
      res.b     = b;
      res.a_msb = a[31];
      res.b_msb = b[31];
      res.sum   = 33'(x) + 33'(yy) + 33'(cin);
      res.prod  = 64'(a) * 64'(b);
      res.land  = a & b;
      res.lor   = a | b;
      res.lxor  = a ^ b;
      res.shl   = a << sh;
      res.shr   = a >> sh;
      res.sra   = $signed(a) >>> sh;
      res.rol   = rot_left(a, sh);
      res.ror   = rot_left(a, (32 - sh) % 32);
      res.popc  = 6'($countones(a));
      res.clz   = 6'(count_lz(a));
      #1;
      want = ref_alu(op, a, b);
      checks++;
      if (y !== want || slot !== op[3:0]) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%h b=%h y=%h want=%h slot=%0d", op, a, b, y, want, slot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
