// tb_resize_ctrl: self-checking test of the miss-period controller.
//
// Drives random miss start/done pulses and random "extension empty" flags
// under both policies, and compares every cycle against a reference model
// kept in the testbench: pending counts, the miss-period condition (>= 1 L2
// miss, or >= 2 L1 data misses under L2ML1RS), and the per-resource up state
// (set in the cycle after a miss period, cleared once the period is over and
// the extension is empty). Also checks a directed case: a single L1 miss never
// upsizes, two do under L2ML1RS only.
module tb_resize_ctrl;
  import rr_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  policy_e policy;
  logic l2s, l2d, d1s, d1d;
  logic [2:0] uempty;  // rob, iq, rf
  logic mp, rob_up, iq_up, rf_up, rob_grow, iq_grow, rf_grow;
  logic [3:0] l2p, d1p;
  int checks = 0, failures = 0;
  int m_l2 = 0, m_d1 = 0;
  logic [2:0] m_up = '0;
  int n_up = 0, n_down = 0, n_dl1_only = 0;

  resize_ctrl dut (.clk, .rst_n, .policy, .l2_miss_start(l2s), .l2_miss_done(l2d),
    .dl1_miss_start(d1s), .dl1_miss_done(d1d),
    .rob_upper_empty(uempty[0]), .iq_upper_empty(uempty[1]), .rf_upper_empty(uempty[2]),
    .miss_period(mp), .rob_up, .iq_up, .rf_up, .rob_grow, .iq_grow, .rf_grow,
    .l2_pending(l2p), .dl1_pending(d1p));

  always #5 clk = ~clk;

  function automatic logic model_mp();
    return (m_l2 > 0) || (policy == POLICY_L2ML1RS && m_d1 >= 2);
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic step_cycle();
    logic exp_mp;
    exp_mp = model_mp();
    check("miss_period", mp == exp_mp);
    check("l2_pending", int'(l2p) == m_l2);
    check("dl1_pending", int'(d1p) == m_d1);
    check("up state", {rf_up, iq_up, rob_up} == m_up);
    check("grow", {rf_grow, iq_grow, rob_grow} == (m_up & {3{exp_mp}}));
    if (exp_mp && !(m_l2 > 0)) n_dl1_only++;
    @(posedge clk);
    for (int r = 0; r < 3; r++) begin
      logic nxt;
      nxt = exp_mp | (m_up[r] & ~uempty[r]);
      if (nxt && !m_up[r]) n_up++;
      if (!nxt && m_up[r]) n_down++;
      m_up[r] = nxt;
    end
    m_l2 += int'(l2s) - int'(l2d);
    m_d1 += int'(d1s) - int'(d1d);
    #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    policy = POLICY_L2ML1RS;
    {l2s, l2d, d1s, d1d} = '0;
    uempty = '1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    // directed: one DL1 miss does not start a miss period, two do (L2ML1RS)
    d1s = 1; step_cycle(); d1s = 0; step_cycle();
    check("one dl1 miss: no period", mp == 1'b0);
    d1s = 1; step_cycle(); d1s = 0;
    check("two dl1 misses: period", mp == 1'b1);
    step_cycle();
    check("upsized after period start", rob_up && iq_up && rf_up);
    policy = POLICY_L2RS; #1;
    check("L2RS ignores dl1 misses", mp == 1'b0);
    d1d = 1; step_cycle(); step_cycle(); d1d = 0; step_cycle();
    // random phase
    for (int pol = 0; pol < 2; pol++) begin
      policy = pol ? POLICY_L2ML1RS : POLICY_L2RS;
      for (int c = 0; c < 4000; c++) begin
        l2s = (m_l2 < 6)  && ($urandom_range(0, 99) < 4);
        l2d = (m_l2 > 0)  && ($urandom_range(0, 99) < 5);
        d1s = (m_d1 < 6)  && ($urandom_range(0, 99) < 12);
        d1d = (m_d1 > 0)  && ($urandom_range(0, 99) < 14);
        uempty = 3'($urandom_range(0, 7)) | 3'($urandom_range(0, 7));
        #1;
        step_cycle();
      end
    end
    check("upsizing seen", n_up > 0);
    check("downsizing seen", n_down > 0);
    check("dl1-only period seen", n_dl1_only > 0);
    $display("upsizes=%0d downsizes=%0d dl1_only_cycles=%0d", n_up, n_down, n_dl1_only);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
