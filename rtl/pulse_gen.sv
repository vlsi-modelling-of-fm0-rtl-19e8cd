// pulse_gen: behavioural model of the explicit pulse generator that clocks
// the encoder flip-flops. It is a timing model, not synthesizable logic: the
// pulse width is set by an analog delay element.
//
// How it works. Each stage is the classic clock-chopper: CLK is ANDed with a
// delayed, inverted copy of itself, so every rising edge of CLK produces a
// pulse whose ON time equals the delay, and a clock buffer drives it out.
// The stages form a chain: stage k sees CLK delayed by k * PULSE_STEP_NS,
// so one clock edge yields N_PULSES consecutive, non-overlapping pulses
// (index 0 first, then 1, 2, ...), all inside the CLK-high phase when
// PULSE_STEP_NS * N_PULSES is below half a clock period.
//
// Interface: clk in; clk_pulse[N_PULSES-1:0] out. clk_pulse[0] rises
// together with clk and is the pulse used to clock the encoders.
//
// Source of the numbers: the gate structure (delay, inverter, AND, buffer)
// and the five consecutive pulse outputs follow the circuit description.
// The delay values are this model's own choice, since none are specified;
// they are parameters so they can be matched to a target clock rate.

module pulse_gen #(
  parameter int  N_PULSES       = 5,    // number of consecutive pulse outputs
  parameter real PULSE_WIDTH_NS = 1.0,  // ON time of each pulse (delay element)
  parameter real PULSE_STEP_NS  = 1.0   // spacing between consecutive pulses
) (
  input  logic                clk,
  output logic [N_PULSES-1:0] clk_pulse
);

  timeunit 1ns;
  timeprecision 1ps;

  // clk_tap[k]: CLK delayed by k * PULSE_STEP_NS (the sub-stage chain).
  logic [N_PULSES-1:0] clk_tap;
  // clk_late[k]: clk_tap[k] passed through the pulse-width delay element.
  logic [N_PULSES-1:0] clk_late;

  assign clk_tap[0] = clk;

  for (genvar k = 0; k < N_PULSES; k++) begin : g_stage
    if (k > 0) begin : g_chain
      assign #(PULSE_STEP_NS) clk_tap[k] = clk_tap[k-1];
    end
    assign #(PULSE_WIDTH_NS) clk_late[k] = clk_tap[k];
    // Clock-pulse circuit (AND of CLK and inverted delayed CLK) and the
    // clock buffer, modelled as a plain assignment.
    assign clk_pulse[k] = clk_tap[k] & ~clk_late[k];
  end

endmodule
