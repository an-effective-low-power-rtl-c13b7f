// tb_frac_accumulator: clocks the accumulator with a free-running clock,
// feeds it N and N-M (computed here) and checks the register and carry
// against a reference model every cycle. For each N it also checks that over
// M cycles the sign bit is 0 in N cycles (within one), the property that
// gives the oscillator its fractional period.
module tb_frac_accumulator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 8;
  localparam int          M = 2 ** W;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n, msb, co;
  logic [W-1:0] n;
  logic signed [W:0] n_minus_m, acc;
  int model, zeros;

  frac_accumulator #(.W(W)) dut (
    .f_dco(clk), .rst_n(rst_n), .n(n), .n_minus_m(n_minus_m),
    .msb(msb), .co(co), .acc(acc));

  assign n_minus_m = (W+1)'(int'(n) - M);

  always #3500 clk = ~clk;

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nv [8] = '{0, 1, 64, 128, 171, 200, 254, 255};
    rst_n = 1'b1; n = '0;
    #1 rst_n = 1'b0;  // a falling edge, whatever the start value
    #10000;
    checks++;
    if (acc != 0) begin failures++; $display("FAIL reset acc=%0d", acc); end
    model = 0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 8 + 20; k++) begin
      n = (k < 8) ? W'(nv[k]) : W'($urandom);
      zeros = 0;
      for (int c = 0; c < M; c++) begin
        int addend, sum;
        @(negedge clk);
        checks++;
        if (msb != (model < 0)) begin failures++; $display("FAIL msb=%0d acc=%0d model=%0d at %0t", msb, acc, model, $time); end
        addend = (model < 0) ? int'(n) : int'(n) - M;
        sum = model + addend;
        // Carry out of the (W+1)-bit unsigned addition of the two words.
        checks++;
        if (co != ((((model & (2*M-1)) + (addend & (2*M-1))) >> (W+1)) & 1)) begin
          failures++; $display("FAIL co acc=%0d addend=%0d", model, addend);
        end
        if (model >= 0) zeros++;
        @(posedge clk);
        model = sum;
        #1;
        checks++;
        if (int'(acc) != model) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d acc=%0d expected %0d", n, acc, model);
        end
        checks++;
        if (model < -M || model > M - 1) begin failures++; $display("FAIL range %0d", model); end
      end
      checks++;
      if (zeros < int'(n) - 1 || zeros > int'(n) + 1) begin
        failures++;
        $display("FAIL n=%0d: sign 0 in %0d of %0d cycles", n, zeros, M);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
