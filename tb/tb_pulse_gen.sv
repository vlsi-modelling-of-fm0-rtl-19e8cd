// tb_pulse_gen: self-checking testbench of the pulse generator model.
//
// A 20 ns clock drives the generator at its default parameters (five
// outputs, 1 ns pulses, 1 ns apart). In each clock cycle the bench samples
// all outputs in the middle of each 1 ns slot after the rising edge and in
// the CLK-low phase: in slot k exactly output k must be high (one-hot), and
// all outputs must be low while CLK is low. It also counts rising edges of
// every output per cycle, which must be exactly one, and measures the time
// from the CLK edge to each pulse's rising and falling edge.
module tb_pulse_gen;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int  N_PULSES  = 5;
  localparam real WIDTH_NS  = 1.0;
  localparam real STEP_NS   = 1.0;
  localparam int  N_CYCLES  = 50;
  localparam int  WATCHDOG  = 500;

  logic                clk = 1'b0;
  logic [N_PULSES-1:0] clk_pulse;

  int checks = 0;
  int failures = 0;
  int rises [N_PULSES];
  realtime t_edge;
  logic armed = 1'b0;  // edge monitors start once the delay line has settled

  pulse_gen dut (
    .clk       (clk),
    .clk_pulse (clk_pulse)
  );

  always #10 clk = ~clk;

  always @(posedge clk) t_edge = $realtime;

  for (genvar k = 0; k < N_PULSES; k++) begin : g_mon
    always @(posedge clk_pulse[k]) if (armed) begin
      rises[k]++;
      checks++;
      if ($realtime - t_edge != k * STEP_NS) begin
        failures++;
        $display("FAIL pulse %0d rises %0.3f ns after CLK", k, $realtime - t_edge);
      end
    end
    always @(negedge clk_pulse[k]) if (armed) begin
      checks++;
      if ($realtime - t_edge != k * STEP_NS + WIDTH_NS) begin
        failures++;
        $display("FAIL pulse %0d falls %0.3f ns after CLK", k, $realtime - t_edge);
      end
    end
  end

  task automatic check(input logic [N_PULSES-1:0] got, input logic [N_PULSES-1:0] exp,
                       input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: %b expected %b", what, $time, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    foreach (rises[k]) rises[k] = 0;
    @(posedge clk);  // let the delay line settle over one cycle
    @(negedge clk);
    armed = 1'b1;
    for (int c = 0; c < N_CYCLES; c++) begin
      foreach (rises[k]) rises[k] = 0;
      @(posedge clk);
      for (int k = 0; k < N_PULSES; k++) begin
        #(STEP_NS / 2.0);
        check(clk_pulse, N_PULSES'(1) << k, "slot");
        #(STEP_NS / 2.0);
      end
      @(negedge clk);
      #5;
      check(clk_pulse, '0, "CLK low");
      foreach (rises[k]) begin
        checks++;
        if (rises[k] != 1) begin
          failures++;
          $display("FAIL pulse %0d rose %0d times in one cycle", k, rises[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
