// tb_adpll_top: end-to-end test of the ADPLL at its default parameters
// (4 ring elements, 8-bit control word, t_de = 1006 ps, DE = 200 ps) with a
// 50 MHz reference.
//
// Two runs are made, with chain lengths L = 3 / L+1 = 4 and then L = 1 /
// L+1 = 2. During each, the testbench checks independently of the RTL:
//   * the oscillator rests high while disabled and starts on enable;
//   * every oscillator cycle is either 2*L*t_de or 2*(L+1)*t_de long, with
//     equal high and low halves;
//   * over every window of 256 oscillator cycles the number of short (L)
//     cycles equals the sum of N/M over those cycles within 2 -- the
//     fractional-divider property that gives a mean period of
//     2*t_de*(L + 1 - N/M);
//   * the phase detector's decisions: the oscillator output and its copy
//     200 ps earlier are sampled on each reference edge and, in every second
//     cycle, both low must give shift_left, both high shift_right, and
//     different levels neither;
//   * the counter moves by one on each decision and saturates at 0 and 255.
// With L = 3 it also checks the start-up frequency at mid-scale N, 142 MHz.
// It counts how often each mechanism occurred (up, down, dead-zone hold,
// off cycles, short and long chain, windows checked) and counts a failure
// for any that never did; how often the counter sat at a limit is only
// reported. The frequency reached is printed.
module tb_adpll_top;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int TDE = int'(adpll_pkg::TDE_PS);
  localparam int DE  = int'(adpll_pkg::DE_PS);
  localparam int M   = 256;

  int checks = 0, failures = 0;
  int c_up = 0, c_dn = 0, c_dead = 0, c_off = 0, c_short = 0, c_long = 0;
  int c_sat = 0, c_win = 0;

  logic f_ref = 1'b0, rst_n = 1'b1, enable = 1'b0;
  logic [3:0] l_code, l1_code, ring_ctrl;
  logic f_dco, shift_left, shift_right, msb;
  logic [7:0] n;

  adpll_top dut (
    .f_ref(f_ref), .rst_n(rst_n), .enable(enable), .l_code(l_code), .l1_code(l1_code),
    .f_dco(f_dco), .shift_left(shift_left), .shift_right(shift_right), .n(n), .msb(msb),
    .ring_ctrl(ring_ctrl));

  always #10000 f_ref = ~f_ref;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
  endtask

  initial begin
    #400_000_000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- oscillator cycle checks ----------------
  int  l_now;           // current L of the run
  bit  running = 1'b0;  // checks enabled
  time t_rise = 0, t_fall = 0;
  int  n_at_rise;
  int  cyc = 0, win_short = 0;
  longint win_nsum = 0;

  always @(negedge f_dco) t_fall = $time;

  always @(posedge f_dco) begin
    time hi, lo, per;
    if (running && t_rise != 0 && t_fall > t_rise) begin
      hi  = t_fall - t_rise;
      lo  = $time - t_fall;
      per = $time - t_rise;
      checks++;
      if (hi != lo) fail($sformatf("unequal halves %0d/%0d", hi, lo));
      checks++;
      if (per == time'(2 * l_now * TDE)) begin
        c_short++; win_short++;
      end else if (per == time'(2 * (l_now + 1) * TDE)) begin
        c_long++;
      end else begin
        fail($sformatf("period %0d ps for L=%0d", per, l_now));
      end
      // N in force during the cycle that just ended.
      win_nsum += n_at_rise;
      cyc++;
      if (cyc == M) begin
        checks++;
        c_win++;
        // short cycles * M must be within 2*M of the sum of N.
        if (longint'(win_short) * M - win_nsum > 2 * M ||
            win_nsum - longint'(win_short) * M > 2 * M)
          fail($sformatf("window: %0d short cycles, sum N/M = %0.2f", win_short,
                         real'(win_nsum) / M));
        cyc = 0; win_short = 0; win_nsum = 0;
      end
    end
    t_rise    = $time;
    n_at_rise = int'(n);
  end

  // ---------------- phase detector and counter checks ----------------
  // Value of f_dco DE ps ago, from the last edge times.
  time e_t [4];
  logic e_v [4];
  always @(f_dco) begin
    for (int i = 3; i > 0; i--) begin e_t[i] = e_t[i-1]; e_v[i] = e_v[i-1]; end
    e_t[0] = $time; e_v[0] = f_dco;
  end
  function automatic logic dco_at(time t);
    for (int i = 0; i < 4; i++) if (e_t[i] <= t) return e_v[i];
    return e_v[3];
  endfunction

  logic m_toggle, exp_left, exp_right;
  int   n_prev;
  bit   pd_on = 1'b0;

  always @(posedge f_ref) begin
    logic so, sd;
    if (pd_on) begin
      // Counter: the decision shown in the cycle that just ended is applied now.
      #1;
      checks++;
      if (exp_left && n_prev < M - 1)  n_prev++;
      else if (exp_right && n_prev > 0) n_prev--;
      if (int'(n) != n_prev) fail($sformatf("counter %0d expected %0d", n, n_prev));
      if (n_prev == M - 1 || n_prev == 0) c_sat++;
      // Phase detector: samples taken at this edge.
      so = dco_at($time - 1);
      sd = dco_at($time - 1 - DE);
      m_toggle = ~m_toggle;
      exp_left  = m_toggle && !so && !sd;
      exp_right = m_toggle &&  so &&  sd;
      checks++;
      if (shift_left != exp_left || shift_right != exp_right)
        fail($sformatf("pd left=%0d right=%0d expected %0d %0d", shift_left, shift_right,
                       exp_left, exp_right));
      if (!m_toggle)        c_off++;
      else if (exp_left)    c_up++;
      else if (exp_right)   c_dn++;
      else                  c_dead++;
    end
  end

  task automatic run(int l, int cycles_ref);
    l_now   = l;
    l_code  = 4'b0001 << (l - 1);
    l1_code = 4'b0001 << l;
    enable  = 1'b0;
    running = 1'b0;
    pd_on   = 1'b0;
    // Reset just after a reference edge.
    @(posedge f_ref);
    #1 rst_n = 1'b0;
    #2000;
    checks++;
    if (f_dco !== 1'b1) fail("oscillator not at rest while disabled");
    checks++;
    if (n != 8'd128) fail($sformatf("counter reset value %0d", n));
    @(negedge f_ref);
    #1 rst_n = 1'b1;
    #4000 enable = 1'b1;     // f_dco edges fall between reference edges
    m_toggle = 1'b0; exp_left = 1'b0; exp_right = 1'b0; n_prev = 128;
    pd_on = 1'b1;
    t_rise = 0; cyc = 0; win_short = 0; win_nsum = 0;
    running = 1'b1;
    // Start-up frequency: N is at mid-scale after reset, so the mean period
    // is 2*t_de*(L + 0.5) (7.042 ns, 142 MHz for L = 3). Over the first
    // 400 ns N moves by at most 10 codes, i.e. 1.1 % of the period.
    begin
      time t0;
      int  k;
      real p_meas, p_exp;
      @(posedge f_dco); @(posedge f_dco);
      t0 = $time; k = 0;
      while ($time - t0 < 400_000) begin @(posedge f_dco); k++; end
      p_meas = real'($time - t0) / k;
      p_exp  = 2.0 * TDE * (l + 0.5);
      $display("L=%0d: start-up period %0.1f ps (%0.1f MHz), expected %0.1f ps",
               l, p_meas, 1.0e6 / p_meas, p_exp);
      checks++;
      if (p_meas < 0.98 * p_exp || p_meas > 1.02 * p_exp)
        fail($sformatf("start-up period %0.1f ps, expected %0.1f", p_meas, p_exp));
    end
    repeat (cycles_ref) @(negedge f_ref);
    edges_in = 0;
    repeat (100) @(negedge f_ref);
    $display("L=%0d: N=%0d, f_dco over the last 2 us: %0.1f MHz", l, n, edges_in / 2.0);
  endtask

  int edges_in;
  always @(posedge f_dco) edges_in++;

  initial begin
    run(3, 1500);
    run(1, 600);
    // Disable: the ring must stop with its output high.
    running = 1'b0;
    pd_on = 1'b0;
    enable = 1'b0;
    #10000;
    edges_in = 0;
    #20000;
    checks++;
    if (f_dco !== 1'b1 || edges_in != 0) fail("oscillator did not stop");
    $display("mechanisms: up=%0d down=%0d dead-zone=%0d off-cycles=%0d short=%0d long=%0d at-limit=%0d windows=%0d",
             c_up, c_dn, c_dead, c_off, c_short, c_long, c_sat, c_win);
    checks++;
    if (c_up == 0 || c_dn == 0 || c_dead == 0 || c_off == 0 || c_short == 0 ||
        c_long == 0 || c_win == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
