// tb_power_manager: self-checking test of the power manager.
//
// Three instances run the same stimulus: the full configuration with the
// Crusoe-like voltage table (3700-cycle activation delay), the same with
// the XScale-like table (2100 cycles), and one with frequency adjustment,
// voltage scaling and gating all switched off. Each is followed by
// pm_ref_check, which recomputes every output each base cycle. The
// stimulus activates the benchmark threads (25, 30, 3 and 2 percent) one
// after the other, deactivates them, cancels a pending activation and
// drives the scheduler's `needed` at random, with pipeline ticks that skip
// base cycles. Directed checks add the values the design must settle at
// (divider 1.5 and 1.05 V for 60 percent, interval lengths in pipeline cycles,
// the moment the voltage rises ahead of the thread) and require that every
// mechanism was exercised.
module tb_power_manager;
  import pm_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick = 1'b0;
  logic needed = 1'b0;
  logic [N-1:0] act_req = '0, deact_req = '0;
  pct_t pct [N];

  int checks = 0;
  int failures = 0;

  // Outputs of the three instances.
  logic [N-1:0] active [3], pending [3];
  logic         interval_start [3], div_load [3], of_en [3], ex_en [3];
  div_e         div_next [3], div_cur [3];
  count_t       count_left [3];
  sum_t         sum_cur [3];
  mv_t          vdd_mv [3];

  localparam tech_e TECHS [3] = '{TECH_CRUSOE, TECH_XSCALE, TECH_CRUSOE};
  localparam bit    ENS   [3] = '{1'b1, 1'b1, 1'b0};

  for (genvar g = 0; g < 3; g++) begin : g_dut
    power_manager #(
      .NUM_THREADS (N),
      .TECH        (TECHS[g]),
      .EN_FREQ     (ENS[g]),
      .EN_VOLT     (ENS[g]),
      .EN_GATE     (ENS[g])
    ) dut (
      .clk, .rst_n, .tick, .act_req, .deact_req, .pct, .needed,
      .active         (active[g]),
      .pending        (pending[g]),
      .interval_start (interval_start[g]),
      .div_load       (div_load[g]),
      .div_next       (div_next[g]),
      .div_cur        (div_cur[g]),
      .count_left     (count_left[g]),
      .sum_cur        (sum_cur[g]),
      .vdd_mv         (vdd_mv[g]),
      .of_en          (of_en[g]),
      .ex_en          (ex_en[g])
    );
    pm_ref_check #(
      .N       (N),
      .XSCALE  (TECHS[g] == TECH_XSCALE),
      .DELAY   (ENS[g] ? ((TECHS[g] == TECH_XSCALE) ? 2100 : 3700) : 0),
      .EN_FREQ (ENS[g]),
      .EN_VOLT (ENS[g]),
      .EN_GATE (ENS[g])
    ) chk (
      .clk, .rst_n, .tick, .needed, .act_req, .deact_req, .pct,
      .active         (active[g]),
      .pending        (pending[g]),
      .interval_start (interval_start[g]),
      .div_load       (div_load[g]),
      .div_next       (div_next[g]),
      .div_cur        (div_cur[g]),
      .vdd_mv         (vdd_mv[g]),
      .of_en          (of_en[g]),
      .ex_en          (ex_en[g])
    );
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic finish_tb();
    checks   += g_dut[0].chk.checks + g_dut[1].chk.checks + g_dut[2].chk.checks;
    failures += g_dut[0].chk.failures + g_dut[1].chk.failures + g_dut[2].chk.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish_tb();
  end

  // Pipeline ticks with occasional gaps; a tick every base cycle while
  // `steady` is set for the interval-length measurement.
  bit steady = 1'b0;
  always @(negedge clk) begin
    tick   <= steady ? 1'b1 : ($urandom_range(0, 7) != 0);
    needed <= ($urandom_range(0, 2) != 0);
  end

  task automatic pulse(input logic [N-1:0] a, input logic [N-1:0] d);
    @(negedge clk);
    act_req   = a;
    deact_req = d;
    @(negedge clk);
    act_req   = '0;
    deact_req = '0;
  endtask

  // Pipeline cycles between two interval starts of instance g (ticks every cycle).
  task automatic interval_len(input int g, output int len);
    while (!(interval_start[g] && tick)) @(negedge clk);
    @(negedge clk);
    len = 1;
    while (!(interval_start[g] && tick)) begin
      @(negedge clk);
      len++;
    end
  endtask

  initial begin
    int len, t;
    pct[0] = 7'd25; pct[1] = 7'd30; pct[2] = 7'd3; pct[3] = 7'd2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (300) @(negedge clk);
    check(div_cur[0] == DIV_15 && vdd_mv[0] == 11'd800, "idle: divider 15, 0.8 V");
    check(div_cur[2] == DIV_1 && vdd_mv[2] == 11'd1300, "disabled: divider 1, 1.3 V");

    // Thread 1 (30 %): voltage first, thread after 3700 cycles.
    pulse(4'b0010, 4'b0000);
    check(pending[0] == 4'b0010 && vdd_mv[0] == 11'd850, "crusoe: pending, 0.85 V at once");
    check(active[2] == 4'b0010, "disabled: active at once");
    t = 0;
    while (!active[0][1]) begin
      @(negedge clk);
      t++;
    end
    check(t == 3700, $sformatf("crusoe activation delay %0d", t));
    check(active[1][1], "xscale active earlier");
    repeat (400) @(negedge clk);
    check(div_cur[0] == DIV_3, "30 % -> divider 3");

    // Thread 0 (25 %) -> 55 %, then threads 2, 3 -> 60 %.
    pulse(4'b0001, 4'b0000);
    check(vdd_mv[0] == 11'd1050 && div_cur[0] == DIV_3, "voltage raised before the divider");
    check(vdd_mv[1] == 11'd1000, "xscale 1.0 V for 55 %");
    repeat (4000) @(negedge clk);
    pulse(4'b1100, 4'b0000);
    repeat (4000) @(negedge clk);
    check(div_cur[0] == DIV_1_5 && vdd_mv[0] == 11'd1050, "60 % -> divider 1.5, 1.05 V");
    check(sum_cur[0] == 11'd60, "sum 60");
    steady = 1'b1;
    repeat (3) @(negedge clk);
    interval_len(0, len);
    check(len == 66, $sformatf("interval at divider 1.5 lasts %0d ticks (66 expected)", len));
    interval_len(2, len);
    check(len == 100, $sformatf("disabled interval %0d ticks", len));
    steady = 1'b0;

    // Drop thread 0: 35 % -> divider 2.5; voltage falls only with the divider.
    pulse(4'b0000, 4'b0001);
    check(vdd_mv[0] == 11'd1050, "voltage held until the divider changes");
    repeat (300) @(negedge clk);
    check(div_cur[0] == DIV_2_5 && vdd_mv[0] == 11'd875, "35 % -> divider 2.5, 0.875 V");

    // Cancel a pending activation.
    pulse(4'b0001, 4'b0000);
    repeat (1000) @(negedge clk);
    pulse(4'b0000, 4'b0001);
    repeat (4000) @(negedge clk);
    check(!active[0][0], "cancelled activation stays inactive");

    // Only thread 3 (2 %), then nothing.
    pulse(4'b0000, 4'b0110);
    repeat (300) @(negedge clk);
    check(div_cur[0] == DIV_15, "2 % -> divider 15");
    pulse(4'b0000, 4'b1000);
    repeat (300) @(negedge clk);

    // Every mechanism happened.
    check(g_dut[0].chk.n_div_change >= 5, "divider changes");
    check(g_dut[0].chk.n_vdd_raise >= 2, "voltage raises");
    check(g_dut[0].chk.n_vdd_drop >= 2, "voltage drops");
    check(g_dut[0].chk.n_delayed_act >= 4, "delayed activations");
    check(g_dut[0].chk.n_cancel >= 1, "cancelled activation");
    check(g_dut[0].chk.n_gated >= 100, "gated cycles");
    check(g_dut[2].chk.n_gated == 0, "no gating when disabled");
    $display("crusoe: %0d intervals, %0d divider changes, %0d gated cycles",
             g_dut[0].chk.n_interval, g_dut[0].chk.n_div_change, g_dut[0].chk.n_gated);
    finish_tb();
  end

endmodule
