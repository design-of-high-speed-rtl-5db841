// tep_stage: timing-error-prevention stage element (error detection plus
// time borrowing) for one pipeline stage boundary.
//
// Data path: a transparent latch. A PH_LOW element is open while clk is low
// (opening edge = falling edge, closing edge = rising edge); a PH_HIGH
// element is open while clk is high. Data that arrives after the opening
// edge but before the closing edge still passes through the open latch: the
// stage borrows that time from the next stage, and q is correct at the
// closing edge.
//
// Error detection: a shadow flip-flop samples d at the opening edge, the
// moment by which the data should have arrived. At the closing edge an XOR
// of latch and shadow is stored in the error flip-flop: err = 1 for one
// cycle after every transfer whose data arrived late. The late (correct)
// value is kept; nothing is replayed.
//
// en loads the element (1 in a plain pipeline stage, a slot select in the
// result store). A transfer with en = 0 holds q and cannot raise err.
// rst_n clears latch, shadow and error flip-flops asynchronously.
//
// Following the source: latch-based time borrowing on alternating clock
// phases and an XOR plus flip-flop around each stage to verify it. The
// clock edges of the shadow and error flip-flops, the enable and the reset
// are this design's choices.
//
// The latch in this module is intended: it is the time-borrowing element.
// It is written on the internal q_l and then assigned to q.
module tep_stage
  import tep_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter phase_e      PHASE = PH_LOW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             err
);

  logic             open_phase;
  logic [WIDTH-1:0] shadow;
  logic             en_sampled;

  assign open_phase = (PHASE == PH_HIGH) ? clk : ~clk;

  // Main latch: transparent for the whole open phase (time borrowing).
  logic load;
  assign load = open_phase && en;

  logic [WIDTH-1:0] q_l;
  always_latch begin
    if (!rst_n)    q_l = '0;
    else if (load) q_l = d;
  end
  assign q = q_l;

  if (PHASE == PH_HIGH) begin : g_high
    // Opening edge is the rising edge, closing edge the falling edge.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        shadow     <= '0;
        en_sampled <= 1'b0;
      end else begin
        en_sampled <= en;
        if (en) shadow <= d;
      end
    end
    always_ff @(negedge clk or negedge rst_n) begin
      if (!rst_n) err <= 1'b0;
      else        err <= en_sampled && (|(q ^ shadow));
    end
  end else begin : g_low
    // Opening edge is the falling edge, closing edge the rising edge.
    always_ff @(negedge clk or negedge rst_n) begin
      if (!rst_n) begin
        shadow     <= '0;
        en_sampled <= 1'b0;
      end else begin
        en_sampled <= en;
        if (en) shadow <= d;
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) err <= 1'b0;
      else        err <= en_sampled && (|(q ^ shadow));
    end
  end

endmodule
