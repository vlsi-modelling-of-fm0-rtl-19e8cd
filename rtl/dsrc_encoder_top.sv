// dsrc_encoder_top: transmit-side line coder of a DSRC baseband, with one
// pulse generator clocking three FM0 / Manchester encoders.
//
// The three encoders are alternative realisations of the same function and
// stand side by side on shared inputs, each with its own output:
//   code_2ff   - separate FM0 and Manchester logic, two flip-flops;
//                FM0 output one cycle after the bit; its FM0 and
//                Manchester codes are also brought out before MUX_2;
//   code_bal   - shared logic, one flip-flop, balanced paths;
//   code_unbal - shared logic, one flip-flop, unbalanced paths.
// The two single-flop encoders code a bit in the cycle it is presented.
// All flops are clocked by the first pulse of the pulse generator, which
// rises with CLK.
//
// Interface and timing: one data bit x per CLK cycle, changed shortly after
// CLK rises (after the clock pulse) and held for the cycle. The code is sent
// as two half-bits, the first while CLK is high. mode selects FM0 (0) or
// Manchester (1) for all three. rst_n resets all flops asynchronously.
// The single-flop encoders' CLR is held active in Manchester mode, which
// the shared XOR path needs to pass X unchanged; driving CLR from Mode is
// this design's choice, as is rst_n.
module dsrc_encoder_top
  import encoder_pkg::*;
#(
  parameter int N_PULSES = 5  // pulse outputs of the pulse generator
) (
  input  logic                clk,
  input  logic                rst_n,
  input  mode_e               mode,
  input  logic                x,
  output logic [N_PULSES-1:0] clk_pulse,
  output logic                code_2ff,
  output logic                fm0_2ff,         // two-flop encoder, FM0 code
  output logic                manchester_2ff,  // two-flop encoder, Manchester code
  output logic                code_bal,
  output logic                code_unbal
);

  timeunit 1ns;
  timeprecision 1ps;

  logic sols_clr_n;

  pulse_gen #(.N_PULSES(N_PULSES)) u_pulse_gen (
    .clk       (clk),
    .clk_pulse (clk_pulse)
  );

  fm0_manchester_2ff u_2ff (
    .clk             (clk),
    .clk_pulse       (clk_pulse[0]),
    .rst_n           (rst_n),
    .mode            (mode),
    .x               (x),
    .fm0_code        (fm0_2ff),
    .manchester_code (manchester_2ff),
    .code            (code_2ff)
  );

  assign sols_clr_n = rst_n && (mode == MODE_FM0);

  sols_balanced u_bal (
    .clk       (clk),
    .clk_pulse (clk_pulse[0]),
    .clr_n     (sols_clr_n),
    .mode      (mode),
    .x         (x),
    .code      (code_bal)
  );

  sols_unbalanced u_unbal (
    .clk       (clk),
    .clk_pulse (clk_pulse[0]),
    .clr_n     (sols_clr_n),
    .mode      (mode),
    .x         (x),
    .code      (code_unbal)
  );

endmodule
