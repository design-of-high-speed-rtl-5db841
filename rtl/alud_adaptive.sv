// alud_adaptive: 32-bit ALU inside a five-stage, two-phase latch pipeline of
// timing-error-prevention (TEP) stage elements.
//
// The ALU block has the published interface: operands a and b (32 bits), an
// operation select s (5 bits), a clock and a 512-bit result output z. Its
// logic is cut into four clouds placed between five stages A..E, each stage
// a tep_stage (latch for time borrowing, shadow flip-flop and XOR for error
// detection):
//
//   A (PH_LOW)  latches {s, a, b}
//       -> alu_decode  operand conditioning
//   B (PH_HIGH) latches the decoded operands
//       -> alu_core    adder, multiplier, logic, shifter, bit counts
//   C (PH_LOW)  latches all unit results
//       -> alu_select  result multiplexer
//   D (PH_HIGH) latches the 32-bit result and its slot s[3:0]
//       -> one-hot slot decode
//   E (PH_LOW)  z: 16 slots of 32 bits; only the selected slot loads
//
// Consecutive stages are open on opposite clock phases, so each cloud has a
// half cycle and may borrow into the next half cycle. Timing: a, b, s valid
// before a falling edge are in z just after the falling edge two cycles
// later; a new operation can enter every cycle. An input that changes
// after the falling edge, while stage A is still open, still reaches z with
// the new value, and raises stage_err[0] at the next rising edge.
// stage_err[k] is the registered error flag of stage k (A = 0 .. E = 4);
// err is their OR, the signal a supply-voltage controller would use.
//
// From the source: the interface and widths, five stages, latch-based time
// borrowing with error detection at every stage, and the falling-edge
// latches that drive z. This design's own choices: the operation list, the
// 16-slot organisation of z, where the ALU is cut, the reset and the
// error outputs.
module alud_adaptive
  import alu_pkg::*;
  import tep_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DATA_W-1:0]   a,
  input  logic [DATA_W-1:0]   b,
  input  logic [SEL_W-1:0]    s,
  output logic [Z_W-1:0]      z,
  output logic [N_STAGES-1:0] stage_err,
  output logic                err
);

  localparam int unsigned A_W = SEL_W + 2 * DATA_W;
  localparam int unsigned B_W = $bits(decode_t);
  localparam int unsigned C_W = $bits(core_t);
  localparam int unsigned D_W = DATA_W + SLOT_W;

  // ---- Stage A: inputs ----
  logic [A_W-1:0] a_q;
  tep_stage #(.WIDTH(A_W), .PHASE(PH_LOW)) u_stage_a (
    .clk, .rst_n, .en(1'b1), .d({s, a, b}), .q(a_q), .err(stage_err[0])
  );

  // ---- Cloud 1: operand conditioning ----
  decode_t dec_d;
  alu_decode u_decode (
    .a  (a_q[2*DATA_W-1:DATA_W]),
    .b  (a_q[DATA_W-1:0]),
    .op (alu_op_e'(a_q[A_W-1:2*DATA_W])),
    .dec(dec_d)
  );

  // ---- Stage B: decoded operands ----
  logic [B_W-1:0] b_q;
  tep_stage #(.WIDTH(B_W), .PHASE(PH_HIGH)) u_stage_b (
    .clk, .rst_n, .en(1'b1), .d(dec_d), .q(b_q), .err(stage_err[1])
  );

  // ---- Cloud 2: function units ----
  core_t core_d;
  alu_core u_core (
    .dec(decode_t'(b_q)),
    .res(core_d)
  );

  // ---- Stage C: unit results ----
  logic [C_W-1:0] c_q;
  tep_stage #(.WIDTH(C_W), .PHASE(PH_LOW)) u_stage_c (
    .clk, .rst_n, .en(1'b1), .d(core_d), .q(c_q), .err(stage_err[2])
  );

  // ---- Cloud 3: result select ----
  logic [DATA_W-1:0] y_d;
  logic [SLOT_W-1:0] slot_d;
  alu_select u_select (
    .res (core_t'(c_q)),
    .y   (y_d),
    .slot(slot_d)
  );

  // ---- Stage D: result and destination slot ----
  logic [D_W-1:0] d_q;
  tep_stage #(.WIDTH(D_W), .PHASE(PH_HIGH)) u_stage_d (
    .clk, .rst_n, .en(1'b1), .d({slot_d, y_d}), .q(d_q), .err(stage_err[3])
  );

  // ---- Cloud 4: slot decode ----
  logic [SLOTS-1:0] slot_en;
  always_comb begin
    slot_en = '0;
    slot_en[d_q[D_W-1:DATA_W]] = 1'b1;
  end

  // Exactly one result slot loads per operation.
  a_one_slot: assert property (@(negedge clk) $onehot(slot_en));

  // ---- Stage E: the 512-bit result store z ----
  logic [SLOTS-1:0]  slot_err;
  logic [DATA_W-1:0] slot_q [SLOTS];
  for (genvar k = 0; k < SLOTS; k++) begin : g_slot
    tep_stage #(.WIDTH(DATA_W), .PHASE(PH_LOW)) u_stage_e (
      .clk, .rst_n,
      .en (slot_en[k]),
      .d  (d_q[DATA_W-1:0]),
      .q  (slot_q[k]),
      .err(slot_err[k])
    );
    assign z[k*DATA_W +: DATA_W] = slot_q[k];
  end
  assign stage_err[4] = |slot_err;

  assign err = |stage_err;

endmodule
