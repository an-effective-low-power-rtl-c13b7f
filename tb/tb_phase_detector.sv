// tb_phase_detector: drives random levels on f_out and f_out_de before each
// reference edge and checks the decisions against a reference model: one
// decision window every second reference cycle, shift_left when both
// samples are low, shift_right when both are high, nothing when they
// differ. Also counts that every case occurred.
module tb_phase_detector;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_dead = 0, n_off = 0;

  logic f_ref = 1'b0, rst_n, f_out, f_out_de, shift_left, shift_right;
  pd_decision_e decision;
  logic m_toggle;

  phase_detector dut (
    .f_ref(f_ref), .rst_n(rst_n), .f_out(f_out), .f_out_de(f_out_de),
    .shift_left(shift_left), .shift_right(shift_right), .decision(decision));

  always #10000 f_ref = ~f_ref;   // 50 MHz reference

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(logic el, logic er, string what);
    checks++;
    if (shift_left !== el || shift_right !== er) begin
      failures++;
      $display("FAIL %s: left=%0d right=%0d expected %0d %0d", what, shift_left, shift_right, el, er);
    end
    checks++;
    if (decision != (el ? PD_LEFT : er ? PD_RIGHT : PD_HOLD)) begin
      failures++;
      $display("FAIL %s: decision %s", what, decision.name());
    end
  endtask

  // Reference model of the decision window: high in every second cycle,
  // starting with the first reference edge after reset.
  always @(posedge f_ref or negedge rst_n)
    if (!rst_n) m_toggle <= 1'b0;
    else        m_toggle <= ~m_toggle;

  initial begin
    logic so, sd;
    rst_n = 1'b1; f_out = 1'b0; f_out_de = 1'b0;
    #1 rst_n = 1'b0;  // a falling edge, whatever the start value
    #25000;
    expect_out(1'b0, 1'b0, "reset");
    rst_n = 1'b1;
    m_toggle = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge f_ref);
      so = 1'($urandom); sd = 1'($urandom);
      f_out = so; f_out_de = sd;
      @(posedge f_ref);
      #100;
      // Outputs must not change while the inputs move between edges.
      f_out = ~so; f_out_de = ~sd;
      #100;
      if (!m_toggle) begin
        expect_out(1'b0, 1'b0, "off cycle");
        n_off++;
      end else begin
        expect_out(!so && !sd, so && sd, "decision cycle");
        if (!so && !sd)     n_left++;
        else if (so && sd)  n_right++;
        else                n_dead++;
      end
    end
    checks++;
    if (n_left == 0 || n_right == 0 || n_dead == 0 || n_off == 0) begin
      failures++;
      $display("FAIL case not exercised: left=%0d right=%0d dead=%0d off=%0d", n_left, n_right, n_dead, n_off);
    end
    $display("cases: left=%0d right=%0d dead-zone=%0d off=%0d", n_left, n_right, n_dead, n_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
