// gp_scheduler: Guaranteed Percentage (GP) real-time thread scheduler.
//
// Each thread slot has a percentage: the number of pipeline cycles it is
// granted in every scheduling interval. In every pipeline cycle the
// scheduler picks one thread that is active, has an instruction waiting in
// its instruction window and has not yet used up its cycles in this
// interval; that thread's window is decoded next. When no thread
// qualifies, the cycle is not needed: the pipeline stalls until the
// interval ends, and the power manager gates the unused cycle. The per-
// interval budget, the stall at the end of the interval and the meaning of
// "needed" follow the source design.
//
// How it works: one cycle counter per thread, cleared at the start of each
// interval, counts granted cycles. Among the eligible threads the choice
// is round robin, starting after the thread granted last; the source does
// not say how GP orders threads inside an interval, so the round robin is
// this design's choice.
//
// A thread that becomes active in the middle of an interval waits for the
// next interval start before it is scheduled: the clock divider of the
// running interval was chosen without its percentage, so letting it run
// would take cycles reserved for the others. This rule is this design's
// choice; the source only states that each thread's share is guaranteed.
//
// Interface and timing: everything advances on `tick` (one pipeline clock
// cycle). `interval_start` marks the tick that opens a new interval; the
// counters read as zero in that cycle, so the first cycle of an interval
// can already be granted. `grant_valid`, `grant_tid` and `needed` are
// combinational outputs for the current tick.
module gp_scheduler
  import pm_pkg::*;
#(
  parameter int unsigned NUM_THREADS = NUM_THREADS_DEF,
  localparam int unsigned TID_W = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   tick,
  input  logic                   interval_start,
  input  logic [NUM_THREADS-1:0] active,
  input  logic [NUM_THREADS-1:0] ready,
  input  pct_t                   pct [NUM_THREADS],
  output logic                   grant_valid,
  output logic [TID_W-1:0]       grant_tid,
  output logic                   needed,
  output pct_t                   used [NUM_THREADS]   // cycles granted this interval
);

  pct_t                   used_q   [NUM_THREADS];
  pct_t                   used_eff [NUM_THREADS];
  logic [NUM_THREADS-1:0] eligible;
  logic [NUM_THREADS-1:0] member_q;     // active since the interval start
  logic [NUM_THREADS-1:0] member;
  logic [TID_W-1:0]       last_q;

  always_comb begin
    for (int i = 0; i < NUM_THREADS; i++) begin
      used_eff[i] = interval_start ? '0 : used_q[i];
      member[i]   = active[i] && (interval_start || member_q[i]);
      eligible[i] = member[i] && ready[i] && (used_eff[i] < pct[i]);
    end
  end

  // Round robin: first eligible thread after the last granted one.
  always_comb begin
    logic [TID_W-1:0] idx;
    grant_valid = 1'b0;
    grant_tid   = '0;
    for (int k = NUM_THREADS; k >= 1; k--) begin
      idx = TID_W'((32'(last_q) + 32'(k)) % NUM_THREADS);
      if (eligible[idx]) begin
        grant_valid = 1'b1;
        grant_tid   = TID_W'(idx);
      end
    end
  end

  assign needed = grant_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_THREADS; i++) used_q[i] <= '0;
      last_q   <= TID_W'(NUM_THREADS - 1);
      member_q <= '0;
    end else if (tick) begin
      member_q <= member;
      for (int i = 0; i < NUM_THREADS; i++) begin
        used_q[i] <= (grant_valid && 32'(grant_tid) == i) ? used_eff[i] + 1'b1 : used_eff[i];
      end
      if (grant_valid) last_q <= grant_tid;
    end
  end

  assign used = used_q;

  // A thread never receives more cycles than its percentage in one interval.
  a_budget: assert property (@(posedge clk) disable iff (!rst_n)
                             tick && grant_valid |-> used_eff[grant_tid] < pct[grant_tid])
    else $error("gp_scheduler: thread %0d granted beyond its percentage", grant_tid);

endmodule
