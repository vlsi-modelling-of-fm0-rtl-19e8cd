// tb_fm0_manchester_2ff: self-checking testbench of the two-flip-flop
// FM0 / Manchester encoder.
//
// The bench makes a 20 ns bit clock and, in place of the pulse generator,
// a 1 ns clock pulse at every rising edge of CLK. A new bit is driven 2 ns
// after each rising edge and held for the cycle. All three outputs are
// sampled in the middle of each half-bit and compared with a reference
// worked out here from the coding rules:
//   FM0: first half = inverse of the previous second half; second half =
//        first half for a 1, its inverse for a 0. The flops take the bit at
//        the pulse that ends its cycle, so the FM0 code of a bit is expected
//        exactly one cycle after the bit (this checks the latency).
//   Manchester: X xor CLK in the same cycle.
//   code: FM0 or Manchester by mode.
// After reset both flops are 0, so the FM0 output is 0 for the cycle in
// which reset is released. The five-bit example 0,1,1,0,1 is checked
// against its known FM0 half-bits 01 00 11 01 00 (after a leading 1),
// then a random stream with random mode switches follows, with one reset
// in the middle.
module tb_fm0_manchester_2ff;
  import encoder_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N_RANDOM = 600;
  localparam int WATCHDOG = 2000;  // CLK cycles
  localparam logic [4:0] EXAMPLE = 5'b01101;  // example bits, first at MSB

  logic  clk = 1'b0;
  logic  clk_pulse = 1'b0;
  logic  rst_n = 1'b0;
  logic  x = 1'b0;
  mode_e mode = MODE_FM0;
  logic  fm0_code, manchester_code, code;

  int checks = 0;
  int failures = 0;
  int n_fm0_zero = 0, n_fm0_one = 0, n_manchester = 0, n_switch = 0, n_reset = 0;

  // Reference state.
  logic ref_prev_b = 1'b0;  // last FM0 second half sent
  logic ref_x_prev = 1'b0;  // bit presented in the previous cycle
  logic ref_valid = 1'b0;   // a bit has been taken since reset

  fm0_manchester_2ff dut (
    .clk             (clk),
    .clk_pulse       (clk_pulse),
    .rst_n           (rst_n),
    .mode            (mode),
    .x               (x),
    .fm0_code        (fm0_code),
    .manchester_code (manchester_code),
    .code            (code)
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
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  // Present one bit for one cycle (called 2 ns after a rising CLK edge,
  // returns 2 ns after the next one). fm0_half = FM0 half-bits seen in this
  // cycle, which belong to the previous bit.
  task automatic send(input logic b, input mode_e m, output logic [1:0] fm0_half);
    logic fh, fl;
    if (m != mode) n_switch++;
    // FM0 code of the bit of the previous cycle.
    if (ref_valid) begin
      fh = ~ref_prev_b;
      fl = ref_x_prev ? fh : ~fh;
      ref_prev_b = fl;
    end else begin
      fh = 1'b0;
      fl = 1'b0;
    end
    x = b;
    mode = m;
    if (m == MODE_MANCHESTER) n_manchester++;
    else if (b) n_fm0_one++;
    else n_fm0_zero++;
    #3;
    fm0_half[1] = fm0_code;
    check(fm0_code, fh, "fm0 first half");
    check(manchester_code, ~b, "manchester first half");
    check(code, (m == MODE_MANCHESTER) ? ~b : fh, "code first half");
    @(negedge clk);
    #5;
    fm0_half[0] = fm0_code;
    check(fm0_code, fl, "fm0 second half");
    check(manchester_code, b, "manchester second half");
    check(code, (m == MODE_MANCHESTER) ? b : fl, "code second half");
    @(posedge clk);
    #2;
    ref_x_prev = b;
    ref_valid = 1'b1;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    ref_prev_b = 1'b0;
    ref_valid = 1'b0;
    n_reset++;
    @(posedge clk);
    #2;
    rst_n = 1'b1;
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
    @(posedge clk);
    #2;
    do_reset();
    // Leading 1, the example, and one more bit to flush its last code out.
    send(1'b1, MODE_FM0, hb);
    for (int i = 4; i >= 0; i--) begin
      send(EXAMPLE[i], MODE_FM0, hb);
      if (i < 4) wave = {wave[7:0], hb};
    end
    send(1'b0, MODE_FM0, hb);
    wave = {wave[7:0], hb};
    checks++;
    if (wave != 10'b01_00_11_01_00) begin
      failures++;
      $display("FAIL FM0 example: got %b", wave);
    end
    // Random stream with mode switches and one reset.
    m = MODE_FM0;
    for (int i = 0; i < N_RANDOM; i++) begin
      if ($urandom_range(15) == 0) m = (m == MODE_FM0) ? MODE_MANCHESTER : MODE_FM0;
      if (i == N_RANDOM / 2) do_reset();
      send(1'($urandom_range(1)), m, hb);
    end
    checks++;
    if (n_fm0_zero == 0 || n_fm0_one == 0 || n_manchester == 0 || n_switch < 2 || n_reset < 2) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("coverage: fm0 0s=%0d 1s=%0d manchester=%0d switches=%0d resets=%0d",
             n_fm0_zero, n_fm0_one, n_manchester, n_switch, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
