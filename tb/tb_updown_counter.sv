// tb_updown_counter: random up/down requests against a reference model with
// saturation at 0 and 2**W-1; a 4-bit counter is used so that both limits
// are reached often. Also checks the reset value.
module tb_updown_counter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 4;
  int checks = 0, failures = 0;
  int hits_max = 0, hits_min = 0;

  logic clk = 1'b0, rst_n, up, dn, at_max, at_min;
  logic [W-1:0] n;
  int model;

  updown_counter #(.W(W), .RESET_VALUE(4'd5)) dut (
    .clk(clk), .rst_n(rst_n), .up(up), .dn(dn), .n(n), .at_max(at_max), .at_min(at_min));

  always #10000 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1; up = 1'b0; dn = 1'b0;
    #1 rst_n = 1'b0;  // a falling edge, whatever the start value
    #15000;
    checks++;
    if (n != 4'd5) begin failures++; $display("FAIL reset value %0d", n); end
    rst_n = 1'b1;
    model = 5;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // Bias the direction in long runs so that both limits are reached.
      if ((i / 100) % 2 == 0) begin up = ($urandom % 4) != 0; dn = ($urandom % 4) == 0; end
      else                    begin up = ($urandom % 4) == 0; dn = ($urandom % 4) != 0; end
      @(posedge clk);
      if (up && !dn && model < 2 ** W - 1) model++;
      else if (dn && !up && model > 0)     model--;
      #1;
      checks++;
      if (int'(n) != model) begin
        failures++;
        $display("FAIL step %0d up=%0d dn=%0d n=%0d expected %0d", i, up, dn, n, model);
      end
      checks++;
      if (at_max != (model == 2 ** W - 1) || at_min != (model == 0)) begin
        failures++;
        $display("FAIL flags at n=%0d", n);
      end
      if (model == 2 ** W - 1) hits_max++;
      if (model == 0)          hits_min++;
    end
    checks++;
    if (hits_max == 0 || hits_min == 0) begin
      failures++;
      $display("FAIL saturation not exercised max=%0d min=%0d", hits_max, hits_min);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
