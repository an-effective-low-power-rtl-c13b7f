// tb_pd_delay_element: toggles the input at random intervals longer than
// the delay and checks that the output repeats the input exactly DELAY_PS
// later; then checks that a pulse shorter than the delay is swallowed.
module tb_pd_delay_element;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned D = 200;
  int checks = 0, failures = 0;
  logic a = 1'b0, y;
  logic stim_done = 1'b0;
  logic y0;
  logic hist[$];  // input value sampled every ps, for the reference

  pd_delay_element #(.DELAY_PS(D)) dut (.a(a), .y(y));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input stimulus: random pulse widths from 250 to 1000 ps in 10 ps steps.
  initial begin
    repeat (200) begin
      #(10 * (25 + $urandom % 76));
      a = ~a;
    end
    stim_done = 1'b1;
  end

  // The input changes only on multiples of 10 ps; sample 5 ps after each
  // and compare with the input D earlier.
  initial begin
    #5;
    for (int t = 0; t < 10000; t++) begin
      hist.push_back(a);
      if (t >= int'(D) / 10) begin
        checks++;
        if (y != hist[0]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d y=%0d expected %0d", t, y, hist[0]);
        end
        void'(hist.pop_front());
      end
      #10;
    end
    // A 100 ps pulse is shorter than the delay and must not reach y.
    wait (stim_done);
    #2000;
    y0 = y;
    a = ~a;
    #100;
    a = ~a;
    for (int t = 0; t < 50; t++) begin
      #10;
      checks++;
      if (y != y0) begin
        failures++;
        $display("FAIL short pulse passed at +%0d ps", 10 * t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
