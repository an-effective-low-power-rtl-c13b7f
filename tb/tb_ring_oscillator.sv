// tb_ring_oscillator: checks that the ring rests high while disabled, and
// that for each one-hot chain-length word (L = 1..4) the period is
// 2*L*t_de with a 50 % duty cycle. Then it alternates the word between L and
// L+1 on each rising edge and checks the mean period.
module tb_ring_oscillator;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TDE = 1000;
  int checks = 0, failures = 0;

  logic enable, f_osc;
  logic [3:0] ctrl;
  time t_en;
  time t_rise [$];
  time t_fall [$];

  ring_oscillator #(.STAGES(4), .TDE(TDE)) dut (.enable(enable), .ctrl(ctrl), .f_osc(f_osc));

  always @(posedge f_osc) t_rise.push_back($time);
  always @(negedge f_osc) t_fall.push_back($time);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    enable = 1'b0; ctrl = 4'b0001;
    #20000;
    check("disabled output", longint'(f_osc), 1);
    check("no edges while disabled", t_fall.size(), 0);
    for (int l = 1; l <= 4; l++) begin
      enable = 1'b0;
      ctrl = 4'b0001 << (l - 1);
      #20000;
      t_rise.delete(); t_fall.delete();
      t_en = $time;
      enable = 1'b1;
      #(40 * l * TDE);
      // Steady state: take the last rising edges and the falling edge
      // between them.
      check($sformatf("L=%0d period", l),
            longint'(t_rise[$] - t_rise[$-1]), longint'(2 * l * TDE));
      check($sformatf("L=%0d high time", l),
            longint'(t_fall[$] - t_rise[$-1]), longint'(l * TDE));
      check($sformatf("L=%0d first fall after enable", l),
            longint'(t_fall[0] - t_en), 0);
    end
    // Switch between L=2 and L=3 on each rising edge: mean period 5*t_de.
    enable = 1'b0;
    ctrl = 4'b0010;
    #20000;
    t_rise.delete();
    enable = 1'b1;
    repeat (41) begin
      @(posedge f_osc);
      ctrl = (ctrl == 4'b0010) ? 4'b0100 : 4'b0010;
    end
    #1;
    check("alternating L/L+1 mean period x40",
          longint'(t_rise[$] - t_rise[$-40]), longint'(40 * 5 * TDE));
    enable = 1'b0;
    #20000;
    check("stopped output", longint'(f_osc), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
