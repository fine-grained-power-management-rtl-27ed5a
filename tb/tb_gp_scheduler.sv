// tb_gp_scheduler: self-checking test of the Guaranteed Percentage
// scheduler.
//
// Part 1 runs the benchmark percentages 25/30/3/2 with all threads always
// ready in 100-cycle intervals and checks that every thread gets exactly
// its percentage per interval, that all granted cycles come first and the
// rest of the interval is a stall (`needed` low). Part 2 drives random
// activity, readiness, tick gaps and interval lengths and compares every
// decision with a reference model of the rule: a thread qualifies when
// active since the interval start, ready and below its percentage; the
// first qualifying thread after the last granted one wins.
module tb_gp_scheduler;
  import pm_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick = 1'b0;
  logic interval_start = 1'b0;
  logic [N-1:0] active = '0;
  logic [N-1:0] ready = '0;
  pct_t pct [N];
  logic grant_valid;
  logic [1:0] grant_tid;
  logic needed;
  pct_t used [N];

  int checks = 0;
  int failures = 0;

  gp_scheduler #(.NUM_THREADS(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state.
  int m_used [N];
  int m_last;
  bit m_member [N];

  initial begin
    int got [N];
    int first_idle;
    for (int i = 0; i < N; i++) pct[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- Part 1: benchmark percentages, fixed 100-cycle intervals ----
    pct[0] = 7'd25; pct[1] = 7'd30; pct[2] = 7'd3; pct[3] = 7'd2;
    active = 4'hF;
    ready  = 4'hF;
    tick   = 1'b1;
    for (int iv = 0; iv < 5; iv++) begin
      for (int i = 0; i < N; i++) got[i] = 0;
      first_idle = -1;
      for (int c = 0; c < 100; c++) begin
        interval_start = (c == 0);
        #1;
        if (grant_valid) begin
          got[grant_tid]++;
          check(first_idle < 0, "grant after an idle cycle in the same interval");
        end else if (first_idle < 0) first_idle = c;
        check(needed == grant_valid, "needed equals grant_valid");
        @(negedge clk);
      end
      for (int i = 0; i < N; i++)
        check(got[i] == int'(pct[i]), $sformatf("interval %0d thread %0d got %0d of %0d",
                                               iv, i, got[i], pct[i]));
      check(first_idle == 60, $sformatf("stall begins at cycle %0d, expected 60", first_idle));
    end

    // ---- Part 2: random traffic against the reference model ----
    interval_start = 1'b1;
    tick = 1'b1;
    @(negedge clk);          // leaves the counters at the first grant
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      m_used[i] = 0;
      m_member[i] = 0;
    end
    m_last = N - 1;
    begin
      int left;
      left = 0;
      for (int c = 0; c < 20000; c++) begin
        int exp_tid;
        bit exp_valid;
        bit cur_member [N];
        tick = ($urandom_range(0, 3) != 0);
        interval_start = (left == 0);
        if ($urandom_range(0, 15) == 0) active = 4'($urandom);
        ready  = 4'($urandom) | 4'($urandom);
        if (c % 500 == 0) for (int i = 0; i < N; i++) pct[i] = 7'($urandom_range(0, 40));
        // model
        if (interval_start) for (int i = 0; i < N; i++) m_used[i] = 0;
        for (int i = 0; i < N; i++) begin
          cur_member[i] = active[i] && (interval_start || m_member[i]);
        end
        exp_valid = 1'b0;
        exp_tid = 0;
        for (int k = 1; k <= N; k++) begin
          int idx;
          idx = (m_last + k) % N;
          if (!exp_valid && cur_member[idx] && ready[idx] && m_used[idx] < int'(pct[idx])) begin
            exp_valid = 1'b1;
            exp_tid = idx;
          end
        end
        #1;
        check(grant_valid == exp_valid, $sformatf("cycle %0d grant_valid", c));
        if (exp_valid) check(int'(grant_tid) == exp_tid,
                             $sformatf("cycle %0d grant %0d expected %0d", c, grant_tid, exp_tid));
        check(needed == exp_valid, "needed");
        @(negedge clk);
        if (tick) begin
          m_member = cur_member;
          if (exp_valid) begin
            m_used[exp_tid]++;
            m_last = exp_tid;
          end
          left = interval_start ? $urandom_range(5, 100) - 1 : left - 1;
          for (int i = 0; i < N; i++)
            check(int'(used[i]) == m_used[i], "used counters");
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
