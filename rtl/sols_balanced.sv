// sols_balanced: single-flip-flop FM0 / Manchester encoder with shared
// logic, balanced form, clocked by the pulse generator.
//
// Both codes are built from the same two half-bit paths. While CLK is high
// the code is the inverse of MUX_2's output: ~Q = A(t) in FM0 mode, ~X in
// Manchester mode. While CLK is low it is the inverse of XNOR(X, Q), that is
// X xor Q: B(t) in FM0 mode, and X in Manchester mode, where DFF_B is held
// cleared (Q = 0). One inverter after MUX_1 serves both paths, so each path
// sees the same mux-plus-gate depth; that is what makes this form balanced.
// DFF_B keeps the last half-bit B(t-1) for the next bit.
//
// Interface and timing: DFF_B loads on the rising edge of clk_pulse, which
// comes right after CLK rises, and takes the value that the code line held
// at the end of the CLK-low half (the inverted CLK-low input of MUX_1), i.e.
// B of the bit just sent. X is coded in the cycle it is presented and must
// be steady for the whole cycle. clr_n (active low, asynchronous) clears
// DFF_B; the enclosing design holds it low in Manchester mode, and an
// assertion checks that it does.
//
// The gates, connections and mux input numbering follow the circuit
// description. Loading DFF_B from the CLK-low input of MUX_1 rather than
// from its output models the instant at which the flop samples, and the
// edge-triggered flop stands for the pulse-triggered one; both are this
// design's choices. CLK is used as data (mux select) by design.
module sols_balanced
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

  logic q_b;       // DFF_B
  logic mux2_out;  // logic for A(t) / ~X, before the shared inverter
  logic xnor_out;  // logic for B(t) / X, before the shared inverter
  logic low_half;  // code while CLK is low

  assign mux2_out = (mode == MODE_MANCHESTER) ? x : q_b;  // MUX_2
  assign xnor_out = ~(x ^ q_b);                           // XNOR
  assign low_half = ~xnor_out;
  assign code     = ~(clk ? mux2_out : xnor_out);         // MUX_1, inverter

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
