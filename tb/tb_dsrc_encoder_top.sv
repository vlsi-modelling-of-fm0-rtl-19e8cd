// tb_dsrc_encoder_top: end-to-end testbench of the encoder top level at its
// default parameters, with the real pulse generator clocking all encoders.
//
// A 20 ns bit clock drives the design; a new bit and mode are applied 2 ns
// after each rising edge (after the first clock pulse has loaded the flops)
// and held for the cycle. Each output is sampled in the middle of both
// half-bits and compared with references computed here from the coding
// rules:
//   code_bal, code_unbal: FM0 (first half = inverse of the previous second
//     half, second half = first half for a 1 and its inverse for a 0) or
//     Manchester (~X then X), coding the bit of the same cycle; the line
//     state restarts from 0 after reset and after Manchester mode.
//   fm0_2ff: FM0 of the bit of the previous cycle (one cycle latency);
//     its state keeps running in Manchester mode.
//   manchester_2ff: X xor CLK; code_2ff: one of the two by mode.
// Also checked: one pulse per clock cycle on each pulse output, in order.
// Workloads: the five-bit example 0,1,1,0,1 in FM0 (half-bits 01 00 11 01
// 00 after a leading 1) and in Manchester (10 01 01 10 01), then a random
// stream with mode switches and resets. Each mechanism (FM0 mid-bit
// transition for a 0, FM0 hold for a 1, Manchester bit, switch to
// Manchester, switch back to FM0, reset, pulse train) is counted and a
// failure is counted for any that never happened.
module tb_dsrc_encoder_top;
  import encoder_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N_PULSES = 5;
  localparam int N_RANDOM = 2000;
  localparam int WATCHDOG = 5000;  // CLK cycles
  localparam logic [4:0] EXAMPLE = 5'b01101;  // example bits, first at MSB

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  mode_e               mode = MODE_FM0;
  logic                x = 1'b0;
  logic [N_PULSES-1:0] clk_pulse;
  logic                code_2ff, fm0_2ff, manchester_2ff, code_bal, code_unbal;

  int checks = 0;
  int failures = 0;
  int n_fm0_zero = 0, n_fm0_one = 0, n_manchester = 0;
  int n_to_manchester = 0, n_to_fm0 = 0, n_reset = 0, n_pulse_cycles = 0;

  // Reference state.
  logic sols_prev_b = 1'b0;  // single-flop encoders: last FM0 second half
  logic ff2_prev_b = 1'b0;   // two-flop encoder: last FM0 second half
  logic ff2_x_prev = 1'b0;   // bit of the previous cycle
  logic ff2_valid = 1'b0;    // two-flop encoder has taken a bit since reset

  dsrc_encoder_top dut (
    .clk            (clk),
    .rst_n          (rst_n),
    .mode           (mode),
    .x              (x),
    .clk_pulse      (clk_pulse),
    .code_2ff       (code_2ff),
    .fm0_2ff        (fm0_2ff),
    .manchester_2ff (manchester_2ff),
    .code_bal       (code_bal),
    .code_unbal     (code_unbal)
  );

  always #10 clk = ~clk;

  // Pulse train: count rising edges per cycle and check their order.
  int pulse_seen;
  logic armed = 1'b0;  // set once the delay line has settled
  always @(posedge clk) pulse_seen = 0;
  for (genvar k = 0; k < N_PULSES; k++) begin : g_mon
    always @(posedge clk_pulse[k]) begin
      if (armed) begin
        checks++;
        if (pulse_seen != k) begin
          failures++;
          $display("FAIL pulse %0d out of order at %0t", k, $time);
        end
        pulse_seen++;
      end
    end
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  // One bit cycle; called 2 ns after a rising CLK edge, returns 2 ns after
  // the next. hb_sols / hb_2ff: half-bits seen on code_bal and fm0_2ff.
  task automatic send(input logic b, input mode_e m,
                      output logic [1:0] hb_sols, output logic [1:0] hb_2ff);
    logic sh, sl, fh, fl;
    if (m == MODE_MANCHESTER && mode == MODE_FM0) n_to_manchester++;
    if (m == MODE_FM0 && mode == MODE_MANCHESTER) n_to_fm0++;
    // Two-flop encoder: FM0 code of the previous bit.
    if (ff2_valid) begin
      fh = ~ff2_prev_b;
      fl = ff2_x_prev ? fh : ~fh;
      ff2_prev_b = fl;
    end else begin
      fh = 1'b0;
      fl = 1'b0;
    end
    // Single-flop encoders: code of this bit.
    if (m == MODE_MANCHESTER) begin
      sh = ~b;
      sl = b;
      sols_prev_b = 1'b0;
      n_manchester++;
    end else begin
      sh = ~sols_prev_b;
      sl = b ? sh : ~sh;
      sols_prev_b = sl;
      if (b) n_fm0_one++; else n_fm0_zero++;
    end
    x = b;
    mode = m;
    #3;
    hb_sols[1] = code_bal;
    hb_2ff[1] = fm0_2ff;
    check(code_bal, sh, "code_bal first half");
    check(code_unbal, sh, "code_unbal first half");
    check(fm0_2ff, fh, "fm0_2ff first half");
    check(manchester_2ff, ~b, "manchester_2ff first half");
    check(code_2ff, (m == MODE_MANCHESTER) ? ~b : fh, "code_2ff first half");
    @(negedge clk);
    #5;
    hb_sols[0] = code_bal;
    hb_2ff[0] = fm0_2ff;
    check(code_bal, sl, "code_bal second half");
    check(code_unbal, sl, "code_unbal second half");
    check(fm0_2ff, fl, "fm0_2ff second half");
    check(manchester_2ff, b, "manchester_2ff second half");
    check(code_2ff, (m == MODE_MANCHESTER) ? b : fl, "code_2ff second half");
    checks++;
    if (pulse_seen != N_PULSES || !armed) begin
      failures++;
      $display("FAIL %0d pulses in cycle ending %0t", pulse_seen, $time);
    end else begin
      n_pulse_cycles++;
    end
    @(posedge clk);
    #2;
    ff2_x_prev = b;
    ff2_valid = 1'b1;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    sols_prev_b = 1'b0;
    ff2_prev_b = 1'b0;
    ff2_valid = 1'b0;
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
    logic [1:0] hs, h2;
    logic [9:0] wave_sols, wave_2ff, wave_man;
    mode_e m;
    @(negedge clk);
    armed = 1'b1;
    @(posedge clk);
    #2;
    do_reset();
    // FM0 example on all encoders; the two-flop one shows each bit a cycle
    // later, so one extra bit flushes its last code out.
    send(1'b1, MODE_FM0, hs, h2);
    for (int i = 4; i >= 0; i--) begin
      send(EXAMPLE[i], MODE_FM0, hs, h2);
      wave_sols = {wave_sols[7:0], hs};
      if (i < 4) wave_2ff = {wave_2ff[7:0], h2};
    end
    send(1'b0, MODE_FM0, hs, h2);
    wave_2ff = {wave_2ff[7:0], h2};
    checks += 2;
    if (wave_sols != 10'b01_00_11_01_00) begin
      failures++;
      $display("FAIL FM0 example, single-flop: %b", wave_sols);
    end
    if (wave_2ff != 10'b01_00_11_01_00) begin
      failures++;
      $display("FAIL FM0 example, two-flop: %b", wave_2ff);
    end
    // Manchester example.
    for (int i = 4; i >= 0; i--) begin
      send(EXAMPLE[i], MODE_MANCHESTER, hs, h2);
      wave_man = {wave_man[7:0], hs};
    end
    checks++;
    if (wave_man != 10'b10_01_01_10_01) begin
      failures++;
      $display("FAIL Manchester example: %b", wave_man);
    end
    // Random stream with mode switches and resets.
    m = MODE_FM0;
    for (int i = 0; i < N_RANDOM; i++) begin
      if ($urandom_range(15) == 0) m = (m == MODE_FM0) ? MODE_MANCHESTER : MODE_FM0;
      if ($urandom_range(499) == 0) do_reset();
      send(1'($urandom_range(1)), m, hs, h2);
    end
    $display("mechanisms: fm0 0-bits=%0d fm0 1-bits=%0d manchester bits=%0d to_manchester=%0d to_fm0=%0d resets=%0d pulse cycles=%0d",
             n_fm0_zero, n_fm0_one, n_manchester, n_to_manchester, n_to_fm0, n_reset, n_pulse_cycles);
    if (n_fm0_zero == 0)      begin failures++; $display("FAIL no FM0 0-bit"); end
    if (n_fm0_one == 0)       begin failures++; $display("FAIL no FM0 1-bit"); end
    if (n_manchester == 0)    begin failures++; $display("FAIL no Manchester bit"); end
    if (n_to_manchester == 0) begin failures++; $display("FAIL no switch to Manchester"); end
    if (n_to_fm0 == 0)        begin failures++; $display("FAIL no switch to FM0"); end
    if (n_reset == 0)         begin failures++; $display("FAIL no reset"); end
    if (n_pulse_cycles == 0)  begin failures++; $display("FAIL no pulse train"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
