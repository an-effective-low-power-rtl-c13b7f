// tb_adpll_wander: long closed-loop run of the ADPLL at its default
// parameters (50 MHz reference, L = 3 / L+1 = 4) for 2 ms.
//
// The loop has no proportional path, so it does not settle; this testbench
// records where it goes. For each 2 us window it measures the oscillator
// frequency from its rising edges and compares it with the frequency
// predicted from the mean control word over the same window,
//   f = 1 / (2 * t_de * (L + 1 - mean(N)/M)),
// within 1 %. It also checks that N never reaches either end of its range
// and prints the range of N and of the window frequencies.
module tb_adpll_wander;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int  TDE = int'(adpll_pkg::TDE_PS);
  localparam int  M   = 256;
  localparam int  L   = 3;
  localparam time WIN = 2_000_000;

  int checks = 0, failures = 0;

  logic f_ref = 1'b0, rst_n = 1'b1, enable = 1'b0;
  logic [3:0] ring_ctrl;
  logic f_dco, shift_left, shift_right, msb, bo, co;
  logic [7:0] n;

  adpll_top dut (
    .f_ref(f_ref), .rst_n(rst_n), .enable(enable), .l_code(4'b0100), .l1_code(4'b1000),
    .f_dco(f_dco), .shift_left(shift_left), .shift_right(shift_right), .n(n), .msb(msb),
    .ring_ctrl(ring_ctrl), .bo(bo), .co(co));

  always #10000 f_ref = ~f_ref;

  initial begin
    #3_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Rising edges of f_dco in the current window, and the sum of N over them.
  int     edges;
  time    t_first, t_last;
  longint nsum;
  always @(posedge f_dco) begin
    if (edges == 0) t_first = $time;
    else            nsum += n;   // N in force during the cycle just ended
    t_last = $time;
    edges++;
  end

  initial begin
    int  n_min = M, n_max = -1;
    real f_min = 1.0e9, f_max = 0.0, f_sum = 0.0;
    #1 rst_n = 1'b0;
    #5000 rst_n = 1'b1;
    #1 enable = 1'b1;
    for (int w = 0; w < 1000; w++) begin
      real f_meas, f_pred, n_mean;
      edges = 0; nsum = 0;
      #(WIN);
      f_meas = 1.0e6 * real'(edges - 1) / real'(t_last - t_first);
      n_mean = real'(nsum) / real'(edges - 1);
      f_pred = 1.0e6 / (2.0 * TDE * (L + 1 - n_mean / M));
      checks++;
      if (f_meas < 0.99 * f_pred || f_meas > 1.01 * f_pred) begin
        failures++;
        $display("FAIL window %0d: %0.2f MHz measured, %0.2f MHz predicted", w, f_meas, f_pred);
      end
      checks++;
      if (n == 8'd0 || n == 8'd255) begin
        failures++;
        $display("FAIL window %0d: N at the end of its range (%0d)", w, n);
      end
      if (int'(n) < n_min) n_min = int'(n);
      if (int'(n) > n_max) n_max = int'(n);
      if (f_meas < f_min) f_min = f_meas;
      if (f_meas > f_max) f_max = f_meas;
      f_sum += f_meas;
    end
    $display("over 2 ms: N %0d..%0d, f_dco %0.1f..%0.1f MHz, mean %0.1f MHz",
             n_min, n_max, f_min, f_max, f_sum / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
