// tb_full_subtractor: exhaustive check of N-M and the borrow for every N of
// the default 8-bit counter word and for a non-power-of-two modulus.
module tb_full_subtractor;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 8;
  int checks = 0, failures = 0;

  logic [W-1:0]      n;
  logic signed [W:0] d_a, d_b;
  logic              bo_a, bo_b;

  full_subtractor #(.W(W))             dut_a (.n(n), .n_minus_m(d_a), .bo(bo_a));
  full_subtractor #(.W(W), .M(200))    dut_b (.n(n), .n_minus_m(d_b), .bo(bo_b));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s n=%0d got %0d expected %0d", what, n, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2 ** W; i++) begin
      n = W'(i);
      #10;
      check("diff M=256", longint'(d_a), longint'(i) - 256);
      check("bo   M=256", longint'(bo_a), 1);
      // M = 200: results below -256 would not fit, so only N-200 >= -256 holds.
      check("diff M=200", longint'(d_b), longint'(i) - 200);
      check("bo   M=200", longint'(bo_b), (i < 200) ? 1 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
