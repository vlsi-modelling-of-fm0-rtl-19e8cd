// tb_sols_unbalanced: self-checking testbench of the unbalanced single-flop FM0 / Manchester
// encoder.
//
// The bench makes a 20 ns bit clock and, in place of the pulse generator,
// a 1 ns clock pulse at every rising edge of CLK. A new bit is driven 2 ns
// after each rising edge and held for the cycle. The code is sampled in the
// middle of each half-bit and compared with a reference computed here from
// the coding rules: FM0 first half = inverse of the previous second half,
// second half = first half for a 1 and its inverse for a 0; Manchester =
// X xor CLK, i.e. ~X then X. The encoder codes a bit in the same cycle it is
// presented; the reference assumes exactly that, so a shifted code fails.
//
// Sequences: the five-bit example 0,1,1,0,1 in FM0 (half-bits 01 00 11 01
// 00 after a leading 1) and in Manchester (10 01 01 10 01), compared with
// those constants; then a random stream with random mode switches; CLR is
// held active in Manchester mode, as the enclosing design does.
module tb_sols_unbalanced;
  import encoder_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N_RANDOM   = 600;
  localparam int WATCHDOG   = 2000;  // CLK cycles
  localparam logic [4:0] EXAMPLE = 5'b01101;  // example bits, first at MSB

  logic  clk = 1'b0;
  logic  clk_pulse = 1'b0;
  logic  clr_n = 1'b0;
  logic  x = 1'b0;
  mode_e mode = MODE_FM0;
  logic  code;

  int checks = 0;
  int failures = 0;
  int n_fm0_zero = 0, n_fm0_one = 0, n_manchester = 0, n_switch = 0;
  logic ref_prev_b = 1'b0;  // reference: last FM0 half-bit sent

  sols_unbalanced dut (
    .clk       (clk),
    .clk_pulse (clk_pulse),
    .clr_n     (clr_n),
    .mode      (mode),
    .x         (x),
    .code      (code)
  );

  always #10 clk = ~clk;

  always @(posedge clk) begin
    clk_pulse = 1'b1;
    #1 clk_pulse = 1'b0;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: code=%0b expected %0b", what, $time, got, exp);
    end
  endtask

  // Present one bit for one cycle (called 2 ns after a rising CLK edge,
  // returns 2 ns after the next one). half_bits = {first half, second half}.
  task automatic send(input logic b, input mode_e m, output logic [1:0] half_bits);
    logic eh, el;
    if (m != mode) n_switch++;
    x = b;
    mode = m;
    clr_n = (m == MODE_FM0);
    if (m == MODE_MANCHESTER) begin
      eh = ~b;
      el = b;
      ref_prev_b = 1'b0;
      n_manchester++;
    end else begin
      eh = ~ref_prev_b;
      el = b ? eh : ~eh;
      ref_prev_b = el;
      if (b) n_fm0_one++; else n_fm0_zero++;
    end
    #3;
    half_bits[1] = code;
    check(code, eh, "first half");
    @(negedge clk);
    #5;
    half_bits[0] = code;
    check(code, el, "second half");
    @(posedge clk);
    #2;
  endtask

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [1:0] hb;
    logic [9:0] wave;
    mode_e m;
    // Hold CLR for two cycles.
    repeat (2) @(posedge clk);
    #2;
    // FM0 example: a leading 1 sets the line so the example starts low.
    send(1'b1, MODE_FM0, hb);
    for (int i = 4; i >= 0; i--) begin
      send(EXAMPLE[i], MODE_FM0, hb);
      wave = {wave[7:0], hb};
    end
    checks++;
    if (wave != 10'b01_00_11_01_00) begin
      failures++;
      $display("FAIL FM0 example: got %b", wave);
    end
    // Manchester example.
    for (int i = 4; i >= 0; i--) begin
      send(EXAMPLE[i], MODE_MANCHESTER, hb);
      wave = {wave[7:0], hb};
    end
    checks++;
    if (wave != 10'b10_01_01_10_01) begin
      failures++;
      $display("FAIL Manchester example: got %b", wave);
    end
    // Random stream with occasional mode switches.
    m = MODE_FM0;
    for (int i = 0; i < N_RANDOM; i++) begin
      if ($urandom_range(15) == 0) m = (m == MODE_FM0) ? MODE_MANCHESTER : MODE_FM0;
      send(1'($urandom_range(1)), m, hb);
    end
    // Every mechanism must have been exercised.
    checks++;
    if (n_fm0_zero == 0 || n_fm0_one == 0 || n_manchester == 0 || n_switch < 2) begin
      failures++;
      $display("FAIL coverage: fm0 0s=%0d 1s=%0d manchester=%0d switches=%0d",
               n_fm0_zero, n_fm0_one, n_manchester, n_switch);
    end
    $display("coverage: fm0 0s=%0d 1s=%0d manchester=%0d switches=%0d",
             n_fm0_zero, n_fm0_one, n_manchester, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
