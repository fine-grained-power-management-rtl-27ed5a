// pm_ref_check: reference model and checker for power_manager, used by
// the power manager and priority manager testbenches.
//
// It watches the inputs and outputs of one power_manager instance and
// recomputes, every base clock edge, what the outputs must be: interval
// boundaries every `count` pipeline cycles, the slowest divider whose
// interval count still covers the sum of active percentages, the voltage
// of that divider from the XScale or Crusoe table (raised immediately for
// threads waiting out the activation delay), activation exactly DELAY base
// cycles after the request, and the OF/EX enables one and two pipeline
// cycles after a needed decode slot. The tables are written out here from
// the published numbers, not taken from the design's package. It counts
// checks, failures and how often each mechanism occurred.
module pm_ref_check #(
  parameter int N       = 4,
  parameter bit XSCALE  = 1'b0,
  parameter int DELAY   = 3700,
  parameter bit EN_FREQ = 1'b1,
  parameter bit EN_VOLT = 1'b1,
  parameter bit EN_GATE = 1'b1
) (
  input logic         clk,
  input logic         rst_n,
  input logic         tick,
  input logic         needed,
  input logic [N-1:0] act_req,
  input logic [N-1:0] deact_req,
  input logic [6:0]   pct [N],
  input logic [N-1:0] active,
  input logic [N-1:0] pending,
  input logic         interval_start,
  input logic         div_load,
  input logic [3:0]   div_next,
  input logic [3:0]   div_cur,
  input logic [10:0]  vdd_mv,
  input logic         of_en,
  input logic         ex_en
);

  int unsigned CNT [11] = '{100, 66, 50, 40, 33, 28, 25, 22, 20, 10, 6};
  int unsigned VXS [11] = '{1100, 1000, 1000, 1000, 850, 850, 850, 850, 850, 850, 850};
  int unsigned VCR [11] = '{1300, 1050, 950, 875, 850, 800, 800, 800, 800, 800, 800};

  int checks = 0;
  int failures = 0;
  int n_div_change = 0;     // divider changed at an interval start
  int n_vdd_raise = 0;      // voltage request rose
  int n_vdd_drop = 0;       // voltage request fell
  int n_delayed_act = 0;    // activation completed after the delay
  int n_gated = 0;          // pipeline cycles with OF gated
  int n_cancel = 0;         // pending activation cancelled
  int n_interval = 0;
  int div_seen [11];

  int          cyc = 0;
  int          m_left = 0;
  int          m_div = 0;
  bit          m_nd1 = 0, m_nd2 = 0;
  bit [N-1:0]  m_act = '0, m_pend = '0;
  int          m_t0 [N];
  int unsigned last_vdd = 0;

  function automatic int sel(int sum);
    int d;
    d = 0;
    for (int i = 0; i < 11; i++) if (sum <= int'(CNT[i])) d = i;
    return d;
  endfunction

  function automatic int unsigned volt(int d);
    return XSCALE ? VXS[d] : VCR[d];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [%m] cycle %0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc = 0; m_left = 0; m_div = 0; m_nd1 = 0; m_nd2 = 0; m_act = '0; m_pend = '0;
    end else begin
      int sum_act, sum_all, exp_next;
      int unsigned exp_v;
      cyc++;
      sum_act = 0;
      sum_all = 0;
      for (int i = 0; i < N; i++) begin
        if (m_act[i]) sum_act += int'(pct[i]);
        if (m_act[i] || m_pend[i]) sum_all += int'(pct[i]);
      end
      exp_next = EN_FREQ ? sel(sum_act) : 0;
      if (!EN_VOLT) exp_v = volt(0);
      else begin
        exp_v = volt(m_div);
        if (EN_FREQ && volt(sel(sum_all)) > exp_v) exp_v = volt(sel(sum_all));
      end

      check(active == m_act, $sformatf("active %b expected %b", active, m_act));
      check(pending == m_pend, $sformatf("pending %b expected %b", pending, m_pend));
      check(interval_start == (m_left == 0), "interval_start");
      check(div_load == (tick && m_left == 0), "div_load");
      check(int'(div_cur) == m_div, $sformatf("div_cur %0d expected %0d", div_cur, m_div));
      check(int'(div_next) == exp_next, $sformatf("div_next %0d expected %0d (sum %0d)",
                                                 div_next, exp_next, sum_act));
      check(int'(vdd_mv) == int'(exp_v), $sformatf("vdd %0d expected %0d", vdd_mv, exp_v));
      check(of_en == (tick && (m_nd1 || !EN_GATE)), "of_en");
      check(ex_en == (tick && (m_nd2 || !EN_GATE)), "ex_en");

      if (vdd_mv > last_vdd && last_vdd != 0) n_vdd_raise++;
      if (vdd_mv < last_vdd) n_vdd_drop++;
      last_vdd = vdd_mv;
      if (tick && !of_en) n_gated++;

      if (tick) begin
        if (m_left == 0) begin
          n_interval++;
          if (exp_next != m_div) n_div_change++;
          m_div = exp_next;
          div_seen[exp_next]++;
          m_left = int'(CNT[exp_next]) - 1;
        end else m_left--;
        m_nd2 = m_nd1;
        m_nd1 = needed;
      end

      for (int i = 0; i < N; i++) begin
        if (deact_req[i]) begin
          if (m_pend[i]) n_cancel++;
          m_act[i] = 0;
          m_pend[i] = 0;
        end else if (act_req[i] && !m_act[i] && !m_pend[i]) begin
          if (DELAY == 0) m_act[i] = 1;
          else begin
            m_pend[i] = 1;
            m_t0[i] = cyc;
          end
        end else if (m_pend[i] && cyc - m_t0[i] >= DELAY) begin
          m_pend[i] = 0;
          m_act[i] = 1;
          n_delayed_act++;
        end
      end
    end
  end

endmodule
