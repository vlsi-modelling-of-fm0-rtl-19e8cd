// sols_unbalanced: single-flip-flop FM0 / Manchester encoder with shared
// logic, unbalanced form, clocked by the pulse generator.
//
// The CLK-high half-bit comes from MUX_2 followed by an inverter ("logic
// for A(t) / ~X"): ~Q = A(t) in FM0 mode, ~X in Manchester mode. The CLK-low
// half-bit comes from one XOR of X and Q ("logic for B(t) / X"): B(t) in FM0
// mode, X in Manchester mode, where DFF_B is held cleared. MUX_1, selected by
// CLK, gives the code. The two paths have different depths (mux plus
// inverter against a single XOR), hence unbalanced; the function is the
// same as the balanced form. DFF_B keeps B(t-1) for the next bit.
//
// Interface and timing: DFF_B loads on the rising edge of clk_pulse, right
// after CLK rises, and takes the CLK-low input of MUX_1, which is the value
// the code line held as CLK rose, i.e. B of the bit just sent. X is coded in
// the cycle it is presented and must be steady for the whole cycle. clr_n
// (active low, asynchronous) clears DFF_B; the enclosing design holds it low
// in Manchester mode, and an assertion checks that it does.
//
// The gates, connections and mux input numbering follow the circuit
// description. Loading DFF_B from the CLK-low input of MUX_1 and using an
// edge-triggered flop for the pulse-triggered one are this design's
// choices. CLK is used as data (mux select) by design.
module sols_unbalanced
  import encoder_pkg::*;
(
  input  logic  clk,        // bit clock CLK, MUX_1 select
  input  logic  clk_pulse,  // pulse clock of DFF_B
  input  logic  clr_n,      // CLR of DFF_B, active low
  input  mode_e mode,       // MUX_2 select
  input  logic  x,          // data bit X
  output logic  code        // FM0 / Manchester code
);

  timeunit 1ns;
  timeprecision 1ps;

  logic q_b;        // DFF_B
  logic high_half;  // logic for A(t) / ~X
  logic low_half;   // logic for B(t) / X

  assign high_half = ~((mode == MODE_MANCHESTER) ? x : q_b);  // MUX_2, inverter
  assign low_half  = x ^ q_b;                                 // XOR
  assign code      = clk ? high_half : low_half;              // MUX_1

  always_ff @(posedge clk_pulse or negedge clr_n) begin
    if (!clr_n) q_b <= 1'b0;
    else        q_b <= low_half;
  end

  // Rule of use: in Manchester mode DFF_B must be held cleared, otherwise
  // the CLK-low half-bit just sent was X xor Q instead of X.
  a_clear_in_manchester: assert property (
    @(posedge clk_pulse) (mode == MODE_MANCHESTER) |-> (q_b == 1'b0)
  ) else $error("DFF_B not cleared in Manchester mode");

endmodule
