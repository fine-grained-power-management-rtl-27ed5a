// tb_priority_manager: self-checking test of the priority manager with a
// frequency divider producing its pipeline ticks.
//
// Percentages are written through the configuration port (one value above
// 100 checks the clamp). Threads are activated and deactivated over time.
// pm_ref_check recomputes the power-management outputs every base cycle.
// The testbench itself checks the scheduling: in every interval each active
// thread whose window is always ready receives exactly its percentage of
// pipeline cycles, no thread ever receives more, and no inactive or empty
// window is ever granted. It also checks that an interval lasts
// count x factor base cycles, e.g. 66 x 1.5 = 99 for 60 percent.
module tb_priority_manager;
  import pm_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick;
  logic cfg_we = 1'b0;
  logic [1:0] cfg_tid = '0;
  pct_t cfg_pct = '0;
  logic [N-1:0] act_req = '0, deact_req = '0;
  logic [N-1:0] iw_ready = '1;
  logic grant_valid;
  logic [1:0] grant_tid;
  logic needed, of_en, ex_en, div_load, interval_start;
  div_e div_next, div_cur, div_o;
  mv_t vdd_mv;
  logic [N-1:0] active, pending;
  count_t count_left;
  sum_t sum_cur;
  pct_t used [N];
  logic [6:0] shadow [N];

  int checks = 0;
  int failures = 0;

  freq_divider u_div (.clk, .rst_n, .load(div_load), .div_i(div_next), .tick, .div_o);

  priority_manager #(.NUM_THREADS(N)) dut (.*);

  pm_ref_check #(.N(N)) chk (
    .clk, .rst_n, .tick, .needed, .act_req, .deact_req, .pct(shadow),
    .active, .pending, .interval_start, .div_load, .div_next, .div_cur, .vdd_mv, .of_en, .ex_en
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic finish_tb();
    checks += chk.checks;
    failures += chk.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    finish_tb();
  end

  // ---- scheduling monitor ----
  int got [N];
  bit full_ready [N];        // thread active and ready for the whole interval
  int base_cycles = 0;
  int n_intervals = 0;
  int n_exact = 0;
  int n_len_checked = 0;
  bit random_ready = 1'b0;
  div_e iv_div;

  always @(posedge clk) begin
    if (rst_n) begin
      base_cycles++;
      if (tick && interval_start) begin
        // close the previous interval
        if (n_intervals > 0) begin
          for (int i = 0; i < N; i++) begin
            check(got[i] <= int'(shadow[i]), $sformatf("thread %0d got %0d > %0d", i, got[i], shadow[i]));
            if (full_ready[i] && int'(sum_cur) <= int'(count_of(iv_div))) begin
              check(got[i] == int'(shadow[i]),
                    $sformatf("thread %0d got %0d of %0d", i, got[i], shadow[i]));
              n_exact++;
            end
          end
          if (n_intervals > 1) begin
            check(base_cycles * 2 == int'(count_of(iv_div)) * int'(half_div_of(iv_div)),
                  $sformatf("interval of %0d base cycles at factor idx %0d", base_cycles, iv_div));
            n_len_checked++;
          end
        end
        n_intervals++;
        base_cycles = 0;
        iv_div = div_next;
        for (int i = 0; i < N; i++) begin
          got[i] = 0;
          full_ready[i] = active[i];
        end
      end
      for (int i = 0; i < N; i++) if (!active[i] || !iw_ready[i]) full_ready[i] = 1'b0;
      if (tick && grant_valid) begin
        check(active[grant_tid] && iw_ready[grant_tid], "grant to an inactive or empty window");
        got[grant_tid]++;
      end
    end
  end

  always @(negedge clk) if (random_ready) iw_ready <= 4'($urandom) | 4'($urandom);

  task automatic write_pct(input int t, input int v);
    @(negedge clk);
    cfg_we = 1'b1;
    cfg_tid = 2'(t);
    cfg_pct = 7'(v);
    @(negedge clk);
    cfg_we = 1'b0;
    shadow[t] = (v > 100) ? 7'd100 : 7'(v);
  endtask

  task automatic pulse(input logic [N-1:0] a, input logic [N-1:0] d);
    @(negedge clk);
    act_req = a;
    deact_req = d;
    @(negedge clk);
    act_req = '0;
    deact_req = '0;
  endtask

  initial begin
    for (int i = 0; i < N; i++) shadow[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    write_pct(0, 25);
    write_pct(1, 30);
    write_pct(2, 3);
    write_pct(3, 120);
    check(dut.pct_q[3] == 7'd100, "percentage clamped to 100");
    write_pct(3, 2);

    pulse(4'b1111, 4'b0000);
    repeat (6000) @(negedge clk);
    check(div_cur == DIV_1_5 && sum_cur == 11'd60, "60 %: divider 1.5");
    pulse(4'b0000, 4'b0010);
    repeat (1000) @(negedge clk);
    check(div_cur == DIV_3, "30 %: divider 3");
    pulse(4'b0000, 4'b1101);
    repeat (500) @(negedge clk);
    check(div_cur == DIV_15, "0 %: divider 15");
    // 90 % and 100 %: full speed
    write_pct(0, 45);
    write_pct(1, 45);
    pulse(4'b0011, 4'b0000);
    repeat (5000) @(negedge clk);
    check(div_cur == DIV_1, "90 %: divider 1");
    write_pct(2, 10);
    pulse(4'b0100, 4'b0000);
    repeat (5000) @(negedge clk);
    check(sum_cur == 11'd100, "100 %");
    // random readiness
    random_ready = 1'b1;
    pulse(4'b0000, 4'b0001);
    repeat (8000) @(negedge clk);
    random_ready = 1'b0;

    check(n_exact > 100, $sformatf("exact-share intervals checked: %0d", n_exact));
    check(n_len_checked > 100, "interval lengths checked");
    check(chk.n_div_change >= 4, "divider changes");
    check(chk.n_gated > 0, "gated cycles");
    finish_tb();
  end

endmodule
