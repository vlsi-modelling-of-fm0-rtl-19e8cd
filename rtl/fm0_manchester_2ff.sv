// fm0_manchester_2ff: FM0 / Manchester encoder with separate FM0 and
// Manchester logic and two flip-flops, clocked by the pulse generator.
//
// FM0 (bi-phase space) sends each bit as two half-bits, A(t) while CLK is
// high and B(t) while CLK is low. The level always flips at a bit boundary,
// A(t) = ~B(t-1); a 0 also flips in mid-bit and a 1 does not, which gives
// B(t) = X xor B(t-1). DFF_B stores B through XOR_1, DFF_A stores A through
// an inverter of DFF_B's output, and MUX_1, selected by CLK, sends A in the
// high half and B in the low half. Manchester code is X xor CLK (XOR_2).
// MUX_2 picks one of the two codes by Mode (0 FM0, 1 Manchester).
//
// Interface and timing: both flops load on the rising edge of clk_pulse,
// which comes right after CLK rises. They sample the bit presented in the
// cycle that just ended, so the FM0 code of a bit is sent one CLK cycle
// after the bit, while the Manchester code (combinational) is sent in the
// same cycle. X must be steady around the pulse. rst_n clears both flops,
// so the first FM0 half-bit after reset is 1.
//
// The gates, their connections and the mux input numbering follow the
// circuit description; modelling the pulse-clocked flops as edge-triggered
// flops and adding rst_n are this design's choices. CLK is used as data
// (mux select and XOR input): that is the circuit as described, not an
// oversight.
module fm0_manchester_2ff
  import encoder_pkg::*;
(
  input  logic  clk,             // bit clock CLK
  input  logic  clk_pulse,       // pulse clock of DFF_A and DFF_B
  input  logic  rst_n,           // asynchronous reset, active low
  input  mode_e mode,            // MUX_2 select
  input  logic  x,               // data bit X
  output logic  fm0_code,        // MUX_1 output
  output logic  manchester_code, // XOR_2 output
  output logic  code             // MUX_2 output
);

  timeunit 1ns;
  timeprecision 1ps;

  logic q_a;  // DFF_A: first half-bit A(t)
  logic q_b;  // DFF_B: second half-bit B(t)

  always_ff @(posedge clk_pulse or negedge rst_n) begin
    if (!rst_n) begin
      q_a <= 1'b0;
      q_b <= 1'b0;
    end else begin
      q_b <= x ^ q_b;  // XOR_1
      q_a <= ~q_b;     // inverter
    end
  end

  assign fm0_code        = clk ? q_a : q_b;                 // MUX_1
  assign manchester_code = x ^ clk;                         // XOR_2
  assign code            = (mode == MODE_MANCHESTER) ? manchester_code
                                                     : fm0_code; // MUX_2

endmodule
