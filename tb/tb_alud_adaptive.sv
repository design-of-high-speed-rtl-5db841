// tb_alud_adaptive: end-to-end test of the adaptive ALU at its default size.
//
// A new operation enters every clock cycle: a, b and s are set during the
// high phase, before the falling edge that opens stage A. For about a third
// of the operations operand a is changed again just after that falling
// edge, while stage A is open: a late arrival. The testbench keeps its own
// copy of the 16 result slots, computed with the reference model, and
//   - checks all 512 bits of z in every cycle, both just before and just
//     after the falling edge where a result is due, so the two-cycle
//     latency is checked as well as the value (late values included: time
//     borrowing must deliver them with no extra cycle),
//   - checks that stage_err[0] rises at the rising edge after each late
//     arrival and at no other time, that the other stages never flag
//     (their inputs come from latches and are never late), and err,
//   - counts late arrivals, error flags, writes that leave a non-zero
//     neighbour slot untouched, and every opcode; each must occur.
module tb_alud_adaptive;
  import alu_pkg::*;
  import alu_ref_pkg::*;

  localparam int unsigned N_OPS = 3000;

  logic             clk = 1'b1;
  logic             rst_n;
  logic [31:0]      a, b;
  logic [4:0]       s;
  logic [Z_W-1:0]   z;
  logic [4:0]       stage_err;
  logic             err;

  always #5 clk = ~clk;   // falls at 5, 15, ...; rises at 10, 20, ...

  alud_adaptive dut (.clk, .rst_n, .a, .b, .s, .z, .stage_err, .err);

  typedef struct {
    logic [4:0]  op;
    logic [31:0] a;
    logic [31:0] b;
    bit          late;
  } entry_t;

  entry_t         hist [$];
  logic [Z_W-1:0] model;
  int checks = 0, failures = 0;
  int n_late = 0, n_err_flag = 0, n_hold = 0;
  int op_seen [32];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s stage_err=%b", $time, what, stage_err);
    end
  endtask

  initial begin
    repeat (N_OPS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    entry_t e;
    bit     prev_late;
    rst_n = 1'b0;
    a = '0; b = '0; s = '0;
    model = '0;
    prev_late = 0;
    foreach (op_seen[i]) op_seen[i] = 0;
    @(posedge clk);
    #1;
    check(z == '0 && stage_err == '0 && !err, "reset");
    rst_n = 1'b1;
    for (int k = 0; k < N_OPS + 2; k++) begin
      // just after the rising edge: error of the previous cycle's entry
      check(stage_err == {4'b0, prev_late}, "stage error flags");
      check(err == prev_late, "err output");
      if (stage_err[0]) n_err_flag++;
      // result of entry k-2 must not be visible yet
      check(z == model, "z before the falling edge");
      // present operation k on time
      e.op   = (k < 64) ? 5'(k) : 5'($urandom);
      e.a    = pick_operand($urandom);
      e.b    = pick_operand($urandom);
      e.late = (k < N_OPS) && ($urandom % 3 == 0);
      a = e.a; b = e.b; s = e.op;
      @(negedge clk);
      #2;
      if (e.late) begin
        e.a = e.a ^ (32'h1 << ($urandom % 32));
        a   = e.a;
        n_late++;
      end
      if (k < N_OPS) hist.push_back(e);
      else begin
        hist.push_back('{op: 5'd31, a: '0, b: '0, late: 0});
        e.late = 0;
      end
      #1;
      // the entry from two cycles ago arrives in z after this falling edge
      if (k >= 2) begin
        entry_t o;
        logic [31:0] old_neighbour;
        o = hist.pop_front();
        old_neighbour = model[((32'(o.op[3:0]) + 1) % 16) * 32 +: 32];
        model[o.op[3:0] * 32 +: 32] = ref_alu(o.op, o.a, o.b);
        op_seen[o.op]++;
        if (old_neighbour != 0) n_hold++;
      end
      check(z == model, "z after the falling edge");
      prev_late = e.late;
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_late == 0 || n_err_flag == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    foreach (op_seen[i]) begin
      checks++;
      if (op_seen[i] == 0) begin
        failures++;
        $display("FAIL opcode %0d never executed", i);
      end
    end
    $display("late arrivals=%0d stage A error flags=%0d slot holds=%0d", n_late, n_err_flag, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
