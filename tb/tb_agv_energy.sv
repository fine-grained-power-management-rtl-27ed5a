// tb_agv_energy: energy workload. Eight copies of the core run the same
// line-following-vehicle thread model (agv_system) for four camera frames,
// 3.2 million base cycles: gating only, frequency only, frequency and
// voltage, and all three techniques, each with the XScale-like and the
// Crusoe-like voltage table (and their 2100 / 3700-cycle activation delays).
//
// The thread model and its instruction counts are this design's own
// synthetic stand-in for a recorded camera trace; only the thread
// percentages, the run length and the energy formula follow the source
// design. Printed energies are therefore to be compared for their ordering
// and rough size, not digit by digit, with the published energies (0.454,
// 0.26, 0.183, 0.164 for XScale; 0.454, 0.259, 0.14, 0.127 for Crusoe),
// which are printed alongside.
//
// Checks:
//   * every copy finishes every frame's job chain before the next frame's
//     camera work is done (no deadline miss) and completes at least three
//     frames; all copies are given the same work;
//   * the overall pipeline utilisation is in the range of a lightly loaded
//     controller (10 to 35 percent);
//   * gating only costs exactly util + 0.3 x (1 - util) of full energy
//     (within 1e-6), the same for both tables;
//   * each added technique lowers the energy: gating only > frequency only
//     > frequency and voltage > all three, for both tables;
//   * the Crusoe-like table, with more voltage steps at low speed, beats the
//     XScale-like one once voltage scaling is on.
module tb_agv_energy;
  import pm_pkg::*;

  localparam int  RUN = 3200000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cyc = 0;
  int   checks = 0;
  int   failures = 0;

  // index = 4 * table + variant; variant 0 gate, 1 freq, 2 freq+volt, 3 all
  agv_system #(.TECH(TECH_XSCALE), .EN_FREQ(0), .EN_VOLT(0), .EN_GATE(1)) s0 (.clk, .rst_n, .cyc);
  agv_system #(.TECH(TECH_XSCALE), .EN_FREQ(1), .EN_VOLT(0), .EN_GATE(0)) s1 (.clk, .rst_n, .cyc);
  agv_system #(.TECH(TECH_XSCALE), .EN_FREQ(1), .EN_VOLT(1), .EN_GATE(0)) s2 (.clk, .rst_n, .cyc);
  agv_system #(.TECH(TECH_XSCALE), .EN_FREQ(1), .EN_VOLT(1), .EN_GATE(1)) s3 (.clk, .rst_n, .cyc);
  agv_system #(.TECH(TECH_CRUSOE), .EN_FREQ(0), .EN_VOLT(0), .EN_GATE(1)) s4 (.clk, .rst_n, .cyc);
  agv_system #(.TECH(TECH_CRUSOE), .EN_FREQ(1), .EN_VOLT(0), .EN_GATE(0)) s5 (.clk, .rst_n, .cyc);
  agv_system #(.TECH(TECH_CRUSOE), .EN_FREQ(1), .EN_VOLT(1), .EN_GATE(0)) s6 (.clk, .rst_n, .cyc);
  agv_system #(.TECH(TECH_CRUSOE), .EN_FREQ(1), .EN_VOLT(1), .EN_GATE(1)) s7 (.clk, .rst_n, .cyc);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (RUN + 100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  real e [8];
  real util [8];
  int  miss [8], done [8], given [8];
  real published [8] = '{0.454, 0.26, 0.183, 0.164, 0.454, 0.259, 0.14, 0.127};
  string names [4] = '{"gating only      ", "frequency only   ", "frequency+voltage", "all three        "};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (RUN) @(negedge clk);
    e[0] = s0.energy_norm; util[0] = real'(s0.useful) / real'(s0.base);
    e[1] = s1.energy_norm; util[1] = real'(s1.useful) / real'(s1.base);
    e[2] = s2.energy_norm; util[2] = real'(s2.useful) / real'(s2.base);
    e[3] = s3.energy_norm; util[3] = real'(s3.useful) / real'(s3.base);
    e[4] = s4.energy_norm; util[4] = real'(s4.useful) / real'(s4.base);
    e[5] = s5.energy_norm; util[5] = real'(s5.useful) / real'(s5.base);
    e[6] = s6.energy_norm; util[6] = real'(s6.useful) / real'(s6.base);
    e[7] = s7.energy_norm; util[7] = real'(s7.useful) / real'(s7.base);
    miss  = '{s0.deadline_miss, s1.deadline_miss, s2.deadline_miss, s3.deadline_miss,
              s4.deadline_miss, s5.deadline_miss, s6.deadline_miss, s7.deadline_miss};
    done  = '{s0.frames_done, s1.frames_done, s2.frames_done, s3.frames_done,
              s4.frames_done, s5.frames_done, s6.frames_done, s7.frames_done};
    given = '{s0.work_given, s1.work_given, s2.work_given, s3.work_given,
              s4.work_given, s5.work_given, s6.work_given, s7.work_given};

    $display("                     XScale-like        Crusoe-like");
    $display("                     here   published   here   published");
    for (int v = 0; v < 4; v++)
      $display("%s    %0.3f  %0.3f       %0.3f  %0.3f", names[v], e[v], published[v], e[4 + v], published[4 + v]);
    $display("utilisation %0.3f, frames done %0d", util[0], done[0]);

    for (int i = 0; i < 8; i++) begin
      check(miss[i] == 0, $sformatf("copy %0d missed %0d deadlines", i, miss[i]));
      check(done[i] >= 3, $sformatf("copy %0d finished %0d frames", i, done[i]));
    end
    // every copy was handed the same work once the frame chain is in step
    check(given[1] == given[0] && given[2] == given[0] && given[3] == given[0] &&
          given[5] == given[4] && given[6] == given[4] && given[7] == given[4],
          "same work per table");
    check(util[0] > 0.10 && util[0] < 0.35, $sformatf("utilisation %0.3f", util[0]));
    for (int t = 0; t < 2; t++) begin
      real g;
      g = util[4 * t] + 0.3 * (1.0 - util[4 * t]);
      check(e[4 * t] > g - 1e-6 && e[4 * t] < g + 1e-6,
            $sformatf("gating only %0.6f, expected %0.6f", e[4 * t], g));
      check(e[4 * t] > e[4 * t + 1], "frequency only below gating only");
      check(e[4 * t + 1] > e[4 * t + 2], "voltage scaling lowers energy");
      check(e[4 * t + 2] > e[4 * t + 3], "gating on top lowers energy");
    end
    check(e[0] > e[4] - 0.01 && e[0] < e[4] + 0.01, "gating only equal for both tables");
    check(e[6] < e[2], "Crusoe-like table below XScale-like, frequency and voltage");
    check(e[7] < e[3], "Crusoe-like table below XScale-like, all three");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
