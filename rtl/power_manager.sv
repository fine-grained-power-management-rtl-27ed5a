// power_manager: hardware power management driven by the GP scheduling
// parameters.
//
// What it does: at the start of every scheduling interval it adds up the
// percentages of all active threads. That sum is the pipeline cycles the
// threads need in the next ~100 base clock cycles, so it picks the
// slowest clock divider whose interval still offers that many cycles, loads
// the interval length (the count, floor(100 / factor) pipeline cycles) and
// requests the supply voltage that belongs to that divider. Cycles the
// scheduler does not need are gated out of the operand fetch and execute
// stages. All of this follows the source design's procedure; the
// divider/voltage table lives in pm_pkg.
//
// Raising the voltage takes time, so a thread that is (re)activated does
// not start at once: the voltage request is raised immediately to the
// level the new sum of percentages needs, and the thread becomes active
// only after ACT_DELAY base clock cycles (2100 for the XScale-like
// characteristic, 3700 for the Crusoe-like one, as in the source). Only
// then does it enter the sum, so the frequency can rise no earlier than the
// voltage. Lowering works the other way round: the divider changes first
// and the voltage follows with it.
//
// The source evaluates four variants; the enables select them:
//   EN_FREQ  frequency adjustment (else divider 1, interval 100 cycles)
//   EN_VOLT  voltage scaling (else the highest voltage and no activation delay)
//   EN_GATE  pipeline gating (else the OF/EX enables follow every tick)
//
// Interface and timing: `tick` marks a pipeline cycle. `interval_start`
// is high while the current pipeline cycle is the first of an interval;
// on that tick `div_load` asks the frequency divider to switch to
// `div_next`. `act_req` / `deact_req` are sampled every base cycle; a
// deactivation takes effect at the next clock edge. `needed` comes from
// the scheduler for the current tick; the decision to gate moves down the
// pipeline with the empty slot, so `of_en` is the tick of the cycle after
// an unneeded decode slot is dropped and `ex_en` the one after that (this
// staging is this design's choice; the source says only which stages are
// gated). Choices of this design where the source is silent: percentages
// change only while their thread is inactive; a deactivation request
// cancels a pending activation; equal demand and interval count select the
// slower clock ("not below" the required frequency).
module power_manager
  import pm_pkg::*;
#(
  parameter int unsigned NUM_THREADS = NUM_THREADS_DEF,
  parameter tech_e       TECH        = TECH_CRUSOE,
  parameter int unsigned ACT_DELAY   = act_delay_of(TECH),
  parameter bit          EN_FREQ     = 1'b1,
  parameter bit          EN_VOLT     = 1'b1,
  parameter bit          EN_GATE     = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   tick,
  input  logic [NUM_THREADS-1:0] act_req,
  input  logic [NUM_THREADS-1:0] deact_req,
  input  pct_t                   pct [NUM_THREADS],
  input  logic                   needed,
  output logic [NUM_THREADS-1:0] active,
  output logic [NUM_THREADS-1:0] pending,
  output logic                   interval_start,
  output logic                   div_load,
  output div_e                   div_next,
  output div_e                   div_cur,
  output count_t                 count_left,
  output sum_t                   sum_cur,      // sum used for the current interval
  output mv_t                    vdd_mv,       // requested supply voltage
  output logic                   of_en,
  output logic                   ex_en
);

  localparam int unsigned DELAY = EN_VOLT ? ACT_DELAY : 0;
  localparam int unsigned DLY_W = (DELAY > 1) ? $clog2(DELAY) : 1;

  logic [NUM_THREADS-1:0] active_q, pending_q;
  logic [DLY_W-1:0]       dly_q [NUM_THREADS];
  count_t                 cnt_q;
  div_e                   div_q;
  sum_t                   sum_q;
  logic                   needed_d1_q, needed_d2_q;

  sum_t sum_active, sum_all;
  count_t count_next;

  // Demand of the active threads, and of active plus pending threads.
  always_comb begin
    sum_active = '0;
    sum_all    = '0;
    for (int i = 0; i < NUM_THREADS; i++) begin
      if (active_q[i])                sum_active = sum_active + sum_t'(pct[i]);
      if (active_q[i] || pending_q[i]) sum_all   = sum_all + sum_t'(pct[i]);
    end
  end

  assign interval_start = (cnt_q == '0);
  assign div_load       = tick && interval_start;
  assign div_next       = EN_FREQ ? select_div(sum_active) : DIV_1;
  assign count_next     = count_of(div_next);

  // Interval counter and divider selection (pipeline clock).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      div_q <= DIV_1;
      sum_q <= '0;
    end else if (tick) begin
      if (interval_start) begin
        cnt_q <= count_next - 1'b1;
        div_q <= div_next;
        sum_q <= sum_active;
      end else begin
        cnt_q <= cnt_q - 1'b1;
      end
    end
  end

  // Thread activation with the activation delay (base clock).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_q  <= '0;
      pending_q <= '0;
      for (int i = 0; i < NUM_THREADS; i++) dly_q[i] <= '0;
    end else begin
      for (int i = 0; i < NUM_THREADS; i++) begin
        if (deact_req[i]) begin
          active_q[i]  <= 1'b0;
          pending_q[i] <= 1'b0;
        end else if (act_req[i] && !active_q[i] && !pending_q[i]) begin
          if (DELAY == 0) begin
            active_q[i] <= 1'b1;
          end else begin
            pending_q[i] <= 1'b1;
            dly_q[i]     <= DLY_W'(DELAY - 1);
          end
        end else if (pending_q[i]) begin
          if (dly_q[i] == '0) begin
            pending_q[i] <= 1'b0;
            active_q[i]  <= 1'b1;
          end else begin
            dly_q[i] <= dly_q[i] - 1'b1;
          end
        end
      end
    end
  end

  // Voltage request: the level of the running divider, raised at once to
  // the level that active plus pending threads will need.
  always_comb begin
    mv_t v_run, v_all;
    v_run = vdd_of(TECH, div_q);
    v_all = vdd_of(TECH, EN_FREQ ? select_div(sum_all) : DIV_1);
    if (!EN_VOLT)          vdd_mv = vdd_of(TECH, DIV_1);
    else if (v_all > v_run) vdd_mv = v_all;
    else                   vdd_mv = v_run;
  end

  // Pipeline gating: the unneeded slot travels OF -> EX.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      needed_d1_q <= 1'b0;
      needed_d2_q <= 1'b0;
    end else if (tick) begin
      needed_d1_q <= needed;
      needed_d2_q <= needed_d1_q;
    end
  end

  assign of_en = tick && (needed_d1_q || !EN_GATE);
  assign ex_en = tick && (needed_d2_q || !EN_GATE);

  assign active     = active_q;
  assign pending    = pending_q;
  assign div_cur    = div_q;
  assign count_left = cnt_q;
  assign sum_cur    = sum_q;

  // The running frequency never exceeds what the requested voltage allows.
  a_vdd: assert property (@(posedge clk) disable iff (!rst_n) vdd_mv >= vdd_of(TECH, div_q))
    else $error("power_manager: voltage below the level of the running divider");

endmodule
