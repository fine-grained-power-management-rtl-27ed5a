// tb_freq_divider: self-checking test of the fractional pipeline clock
// divider.
//
// For every division factor the test loads the factor on a tick and checks
// the position of each of the following ticks against the closed form: the
// k-th tick after a load comes ceil(k * 2f / 2) base cycles after it, where
// f is the factor. It also checks the example of a 66-cycle interval at
// factor 1.5 lasting 99 base cycles, that a factor is only taken together
// with a tick, and that the divider ticks every cycle after reset.
module tb_freq_divider;
  import pm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  div_e div_i = DIV_1;
  logic tick;
  div_e div_o;

  int checks = 0;
  int failures = 0;

  // Twice each factor, written out independently of the package.
  int unsigned twice_f [11] = '{2, 3, 4, 5, 6, 7, 8, 9, 10, 20, 30};

  freq_divider dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Load factor d on the next tick; returns after the loading edge.
  task automatic load_div(input int d);
    while (!tick) @(negedge clk);
    load  = 1'b1;
    div_i = div_e'(d);
    @(negedge clk);
    load  = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // After reset: one tick per base cycle.
    for (int i = 0; i < 10; i++) begin
      check(tick == 1'b1, "tick every cycle after reset");
      @(negedge clk);
    end

    for (int d = 10; d >= 0; d--) begin
      int m, k;
      load_div(d);
      check(div_o == div_e'(d), $sformatf("div_o after loading %0d", d));
      m = 1;
      k = 1;
      while (k <= 24) begin
        if (tick) begin
          check(m == (k * twice_f[d] + 1) / 2,
                $sformatf("factor idx %0d: tick %0d at %0d, expected %0d", d, k, m,
                          (k * twice_f[d] + 1) / 2));
          k++;
        end
        m++;
        @(negedge clk);
      end
    end

    // 66 pipeline cycles at factor 1.5 take 99 base cycles.
    begin
      int m, k;
      load_div(int'(DIV_1_5));
      m = 1;
      k = 0;
      while (k < 66) begin
        if (tick) k++;
        if (k < 66) begin
          m++;
          @(negedge clk);
        end
      end
      check(m == 99, $sformatf("66 ticks at 1.5 took %0d base cycles", m));
    end

    // A load request without a tick is ignored.
    load_div(int'(DIV_15));
    @(negedge clk);
    check(!tick, "no tick right after loading factor 15");
    load  = 1'b1;
    div_i = DIV_1;
    @(negedge clk);
    load  = 1'b0;
    check(div_o == DIV_15, "load without tick ignored");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
