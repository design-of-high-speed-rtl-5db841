// tep_pkg: latch phase of a timing-error-prevention (TEP) stage element.
//
// The pipeline alternates latches that are open while the clock is low
// (PH_LOW, opened by the falling edge) and latches open while it is high
// (PH_HIGH, opened by the rising edge). Alternating phases let a stage
// borrow time from the next half-cycle without data racing through two
// stages at once.
package tep_pkg;

  typedef enum logic {
    PH_LOW  = 1'b0,   // transparent while clk = 0
    PH_HIGH = 1'b1    // transparent while clk = 1
  } phase_e;

endpackage
