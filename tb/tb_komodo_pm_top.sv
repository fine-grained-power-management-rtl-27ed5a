// tb_komodo_pm_top: end-to-end test of the power-managed core front end at
// its default configuration (four threads, Crusoe-like voltage table,
// 3700-cycle activation delay, all three techniques on).
//
// Four threads with the benchmark percentages (25, 30, 3, 2) run programs
// of consecutive bytecode bytes from a behavioural memory. A schedule of
// activations and deactivations, shaped like the camera / line-detection /
// steering / PWM threads of a line-following vehicle, moves the demand
// between 0 and 60 percent (dividers 15, 4, 3, 2.5 and 1.5). A behavioural regulator follows the voltage
// request at a fixed slew rate. The testbench checks:
//   * every byte leaving the execute stage is the next byte of its thread's
//     program (nothing is lost or duplicated by gating);
//   * per interval, a thread never executes more than its percentage, and
//     a thread that is active for the whole interval executes exactly its
//     percentage;
//   * an interval lasts count x factor base cycles;
//   * the divider is the slowest that covers the demand;
//   * a thread starts exactly 3700 base cycles after its request;
//   * the regulator output is never below the level the running clock
//     needs, i.e. the voltage always rises before the frequency;
// and counts that each mechanism occurred: divider changes, voltage raises
// and drops, delayed activations, gated cycles, stalls at the end of an
// interval and window refills. It prints the energy relative to running at
// full speed and top voltage, sum(F * U^2) over base cycles.
module tb_komodo_pm_top;
  import pm_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [1:0] cfg_tid = '0;
  pct_t cfg_pct = '0;
  logic [N-1:0] act_req = '0, deact_req = '0;
  logic pc_load = 1'b0;
  logic [1:0] pc_load_tid = '0;
  logic [31:0] pc_load_addr = '0;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [31:0] mem_req_addr, mem_rsp_data;
  logic id_valid, ex_valid;
  logic [1:0] id_tid, ex_tid;
  logic [7:0] id_instr, ex_instr;
  logic pipe_tick, of_en, ex_en, interval_start;
  div_e div_cur;
  mv_t vdd_mv;
  count_t count_left;
  sum_t sum_cur;
  logic [N-1:0] active, pending;

  int checks = 0;
  int failures = 0;

  komodo_pm_top dut (.*);

  fetch_mem_model #(.MAX_LAT(1), .RANDOM_READY(1'b0)) mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid),
    .req_ready (mem_req_ready),
    .req_addr  (mem_req_addr),
    .rsp_valid (mem_rsp_valid),
    .rsp_data  (mem_rsp_data)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [7:0] byte_at(input logic [31:0] a);
    return a[7:0] ^ a[15:8] ^ {a[4:0], a[7:5]} ^ 8'h3c;
  endfunction

  // Independent tables: interval count, twice the factor, Crusoe voltage.
  int unsigned T_CNT [11] = '{100, 66, 50, 40, 33, 28, 25, 22, 20, 10, 6};
  int unsigned T_2F  [11] = '{2, 3, 4, 5, 6, 7, 8, 9, 10, 20, 30};
  int unsigned T_MV  [11] = '{1300, 1050, 950, 875, 850, 800, 800, 800, 800, 800, 800};
  int          PCT   [N]  = '{25, 30, 3, 2};
  logic [31:0] BASE  [N]  = '{32'h0000_1000, 32'h0000_4000, 32'h0000_8000, 32'h0000_A000};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- behavioural regulator: 1 mV per 7 base cycles ----
  int vreg = 1300;
  int slew_cnt = 0;
  always @(posedge clk) begin
    if (++slew_cnt == 7) begin
      slew_cnt = 0;
      if (vreg < int'(vdd_mv)) vreg++;
      else if (vreg > int'(vdd_mv)) vreg--;
    end
  end

  // ---- mechanism counters and checks ----
  int n_div_change = 0, n_raise = 0, n_drop = 0, n_delayed = 0, n_gated = 0;
  int n_stall = 0, n_refill = 0, n_exact = 0, n_intervals = 0, n_executed = 0;
  int div_seen [11];
  int last_mv = 1300;
  int base_cycles = 0;
  int iv_div = 0;
  int got [N];
  bit whole [N];
  logic [31:0] next_addr [N];
  int req_time [N];
  int cyc = 0;
  logic [N-1:0] active_d = '0;
  real energy = 0.0, energy_full = 0.0;

  always @(posedge clk) begin
    if (rst_n) begin
      base_cycles++;
      // regulator must already carry the level the running clock needs
      check(vreg >= int'(T_MV[div_cur]),
            $sformatf("supply %0d mV below %0d mV needed by divider idx %0d", vreg, T_MV[div_cur], div_cur));
      if (int'(vdd_mv) > last_mv) n_raise++;
      if (int'(vdd_mv) < last_mv) n_drop++;
      last_mv = int'(vdd_mv);
      if (mem_req_valid && mem_req_ready) n_refill++;
      energy += (2.0 / real'(T_2F[div_cur])) * (real'(vreg) / 1300.0) ** 2;
      energy_full += 1.0;

      if (pipe_tick) begin
        if (!of_en) n_gated++;
        if (!dut.grant_valid && active != '0) n_stall++;
        if (ex_valid) begin
          n_executed++;
          check(ex_instr == byte_at(next_addr[ex_tid]),
                $sformatf("thread %0d executed %h, expected %h", ex_tid, ex_instr, byte_at(next_addr[ex_tid])));
          next_addr[ex_tid]++;
        end
        if (id_valid) got[id_tid]++;   // decision of the previous tick
        if (interval_start) begin
          int sum, exp_div;
          if (n_intervals > 0) begin
            for (int i = 0; i < N; i++) begin
              check(got[i] <= PCT[i], $sformatf("thread %0d ran %0d > %0d", i, got[i], PCT[i]));
              if (whole[i]) begin
                check(got[i] == PCT[i], $sformatf("thread %0d ran %0d of %0d", i, got[i], PCT[i]));
                n_exact++;
              end
            end
            if (n_intervals > 1)
              check(2 * base_cycles == int'(T_CNT[iv_div] * T_2F[iv_div]),
                    $sformatf("interval %0d base cycles at divider idx %0d", base_cycles, iv_div));
          end
          // divider for the interval now starting
          sum = 0;
          for (int i = 0; i < N; i++) if (active[i]) sum += PCT[i];
          exp_div = 0;
          for (int d = 0; d < 11; d++) if (sum <= int'(T_CNT[d])) exp_div = d;
          check(int'(dut.div_next) == exp_div, $sformatf("divider %0d for %0d %%, expected %0d",
                                                        dut.div_next, sum, exp_div));
          if (exp_div != iv_div) n_div_change++;
          div_seen[exp_div]++;
          iv_div = exp_div;
          n_intervals++;
          base_cycles = 0;
          for (int i = 0; i < N; i++) begin
            got[i] = 0;
            whole[i] = active[i];
          end
        end
      end
      for (int i = 0; i < N; i++) if (!active[i]) whole[i] = 1'b0;
      // activation delay: active rises exactly 3700 base cycles after the
      // edge that took the request (seen here one edge later)
      for (int i = 0; i < N; i++) begin
        if (active[i] && !active_d[i]) begin
          check(cyc - 1 - req_time[i] == 3700,
                $sformatf("thread %0d started %0d cycles after its request", i, cyc - 1 - req_time[i]));
          n_delayed++;
        end
        if (act_req[i] && !active[i] && !pending[i] && !deact_req[i]) req_time[i] = cyc;
      end
      active_d = active;
      cyc++;
    end
  end

  task automatic pulse(input logic [N-1:0] a, input logic [N-1:0] d);
    @(negedge clk);
    act_req = a;
    deact_req = d;
    @(negedge clk);
    act_req = '0;
    deact_req = '0;
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      got[i] = 0;
      whole[i] = 1'b0;
      next_addr[i] = BASE[i];
      req_time[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_tid = 2'(i); cfg_pct = 7'(PCT[i]);
      pc_load = 1'b1; pc_load_tid = 2'(i); pc_load_addr = BASE[i];
    end
    @(negedge clk);
    cfg_we = 1'b0;
    pc_load = 1'b0;

    // camera thread receives a picture (25 %)
    wait_cycles(500);
    pulse(4'b0001, 4'b0000);
    wait_cycles(6000);
    // line detection joins (55 %), then steering and PWM (60 %)
    pulse(4'b0010, 4'b0000);
    wait_cycles(5000);
    pulse(4'b1100, 4'b0000);
    wait_cycles(6000);
    // camera done: 35 %
    pulse(4'b0000, 4'b0001);
    wait_cycles(3000);
    // steering and PWM done: line detection alone, 30 %
    pulse(4'b0000, 4'b1100);
    wait_cycles(2000);
    // next picture arrives while the line is still being detected: 55 %
    pulse(4'b0001, 4'b0000);
    wait_cycles(5000);
    // everything done: idle
    pulse(4'b0000, 4'b0011);
    wait_cycles(1500);
    // PWM alone (2 %)
    pulse(4'b1000, 4'b0000);
    wait_cycles(5000);
    pulse(4'b0000, 4'b1000);
    wait_cycles(1000);

    check(n_div_change >= 5, $sformatf("divider changes: %0d", n_div_change));
    check(n_raise >= 2, "voltage raised");
    check(n_drop >= 3, "voltage lowered");
    check(n_delayed >= 5, "delayed activations");
    check(n_gated > 0, "gated pipeline cycles");
    check(n_stall > 0, "GP stalls at the end of an interval");
    check(n_refill > 100, "instruction window refills");
    check(n_exact > 200, $sformatf("exact-share thread intervals: %0d", n_exact));
    check(n_executed > 5000, "instructions executed");
    for (int d = 0; d < 11; d++)
      if (d == 1 || d == 3 || d == 4 || d == 6 || d == 10)  // 1.5, 2.5, 3, 4, 15
        check(div_seen[d] > 0, $sformatf("divider idx %0d used", d));
    $display("intervals %0d, divider changes %0d, raises %0d, drops %0d, gated %0d, stalls %0d",
             n_intervals, n_div_change, n_raise, n_drop, n_gated, n_stall);
    $display("executed %0d, refills %0d, energy vs. full speed: %0.3f", n_executed, n_refill,
             energy / energy_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
