// tb_tep_stage: checks both phases of the TEP stage element.
// Index 0 is a PH_LOW element (open while clk is low), index 1 a PH_HIGH
// element. For each transfer the testbench sets d while the latch is closed
// and, for a late arrival, changes d again just after the opening edge. It
// checks that
//   - d changes while closed do not reach q,
//   - q follows d while open, so a late value still gets through (time
//     borrowing), and q holds the last value after the closing edge,
//   - err rises exactly at the closing edge after a late transfer, stays 0
//     after an on-time one or with en = 0, and keeps its value until then,
//   - reset clears q and err.
module tb_tep_stage;
  import tep_pkg::*;

  localparam int unsigned W = 32;

  logic         clk = 1'b1;
  logic         rst_n;
  logic [1:0]   en;
  logic [W-1:0] d [2];
  logic [W-1:0] q [2];
  logic [1:0]   err;
  int checks = 0, failures = 0;
  int n_late = 0, n_ontime = 0, n_hold = 0;

  always #5 clk = ~clk;   // falls at 5, 15, ...; rises at 10, 20, ...

  tep_stage #(.WIDTH(W), .PHASE(PH_LOW)) u_low (
    .clk, .rst_n, .en(en[0]), .d(d[0]), .q(q[0]), .err(err[0])
  );
  tep_stage #(.WIDTH(W), .PHASE(PH_HIGH)) u_high (
    .clk, .rst_n, .en(en[1]), .d(d[1]), .q(q[1]), .err(err[1])
  );

  task automatic check(bit ok, string what, int i);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t elem=%0d %s q=%h err=%b", $time, i, what, q[i], err[i]);
    end
  endtask

  task automatic open_edge(int i);
    if (i == 0) @(negedge clk); else @(posedge clk);
  endtask

  task automatic close_edge(int i);
    if (i == 0) @(posedge clk); else @(negedge clk);
  endtask

  logic [W-1:0] prev_q  [2];
  bit           prev_err[2];

  // One transfer through element i; called just after a closing edge.
  task automatic transfer(int i, bit load, bit late);
    logic [W-1:0] v1, v2, want;
    v1 = $urandom;
    v2 = v1 ^ (32'h1 << ($urandom % W));   // differs from v1
    en[i] = load;
    d[i]  = v1;
    #1 check(q[i] == prev_q[i], "changed while closed", i);
    open_edge(i);
    #1;
    if (late) d[i] = v2;
    want = load ? (late ? v2 : v1) : prev_q[i];
    #1 check(q[i] == want, "does not follow d while open", i);
    check(err[i] == prev_err[i], "err changed before closing edge", i);
    // last change of d while still open, then back: latch must follow
    #1 d[i] = want ^ 32'hFFFF_FFFF;
    #1 d[i] = want;
    close_edge(i);
    #1;
    d[i] = $urandom;                       // closed: must not pass
    #1 check(q[i] == want, "did not hold value after closing edge", i);
    check(err[i] == (load && late), "wrong err after closing edge", i);
    if (load && late) n_late++;
    else if (load)    n_ontime++;
    else              n_hold++;
    prev_q[i]   = want;
    prev_err[i] = load && late;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = '0;
    d[0] = '0;
    d[1] = '0;
    rst_n = 1'b0;
    #12;
    check(q[0] == '0 && err[0] == 1'b0, "reset", 0);
    check(q[1] == '0 && err[1] == 1'b0, "reset", 1);
    rst_n = 1'b1;
    prev_q[0] = '0; prev_q[1] = '0;
    prev_err[0] = 0; prev_err[1] = 0;
    for (int i = 0; i < 2; i++) begin
      close_edge(i);
      for (int n = 0; n < 200; n++) begin
        int unsigned r;
        r = $urandom % 4;
        transfer(i, r != 3, r == 1 || r == 2);
      end
      // fixed sequence: late, then on time (err must fall again), then hold
      transfer(i, 1, 1);
      transfer(i, 1, 0);
      transfer(i, 1, 1);
      transfer(i, 0, 0);
    end
    checks++;
    if (n_late == 0 || n_ontime == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL a case never happened: late=%0d ontime=%0d hold=%0d", n_late, n_ontime, n_hold);
    end
    $display("late=%0d ontime=%0d hold=%0d", n_late, n_ontime, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
