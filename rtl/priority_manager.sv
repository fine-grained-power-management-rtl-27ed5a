// priority_manager: the decode-stage unit that schedules threads and
// manages power.
//
// It holds one GP percentage per thread slot, the Guaranteed Percentage
// scheduler that chooses the instruction window decoded next, and the power
// manager that uses the same percentages to choose clock divider, interval
// length and supply voltage and to gate unused pipeline cycles. Placing
// both in the priority manager, and keeping it ungated because it decides
// the gating, follows the source design.
//
// Interface and timing: `tick` marks a pipeline clock cycle. Percentages
// are written through `cfg_we` / `cfg_tid` / `cfg_pct` (values above 100
// are stored as 100); how software sets them is not specified by the
// source, so this write port is this design's choice. `iw_ready` says
// which instruction windows hold an instruction. `grant_valid` /
// `grant_tid` name the window to decode in the current tick and are
// combinational. Thread activation requests go through the power manager's
// activation delay before the thread becomes `active`.
module priority_manager
  import pm_pkg::*;
#(
  parameter int unsigned NUM_THREADS = NUM_THREADS_DEF,
  parameter tech_e       TECH        = TECH_CRUSOE,
  parameter int unsigned ACT_DELAY   = act_delay_of(TECH),
  parameter bit          EN_FREQ     = 1'b1,
  parameter bit          EN_VOLT     = 1'b1,
  parameter bit          EN_GATE     = 1'b1,
  localparam int unsigned TID_W = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   tick,
  // percentage configuration
  input  logic                   cfg_we,
  input  logic [TID_W-1:0]       cfg_tid,
  input  pct_t                   cfg_pct,
  // thread control (from the signal unit)
  input  logic [NUM_THREADS-1:0] act_req,
  input  logic [NUM_THREADS-1:0] deact_req,
  // instruction windows
  input  logic [NUM_THREADS-1:0] iw_ready,
  output logic                   grant_valid,
  output logic [TID_W-1:0]       grant_tid,
  // power management
  output logic                   needed,
  output logic                   of_en,
  output logic                   ex_en,
  output logic                   div_load,
  output div_e                   div_next,
  output div_e                   div_cur,
  output mv_t                    vdd_mv,
  output logic [NUM_THREADS-1:0] active,
  output logic [NUM_THREADS-1:0] pending,
  output logic                   interval_start,
  output count_t                 count_left,
  output sum_t                   sum_cur,
  output pct_t                   used [NUM_THREADS]   // cycles granted this interval
);

  pct_t pct_q [NUM_THREADS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_THREADS; i++) pct_q[i] <= '0;
    end else if (cfg_we) begin
      pct_q[cfg_tid] <= (cfg_pct > pct_t'(100)) ? pct_t'(100) : cfg_pct;
    end
  end

  gp_scheduler #(.NUM_THREADS(NUM_THREADS)) u_sched (
    .clk            (clk),
    .rst_n          (rst_n),
    .tick           (tick),
    .interval_start (interval_start),
    .active         (active),
    .ready          (iw_ready),
    .pct            (pct_q),
    .grant_valid    (grant_valid),
    .grant_tid      (grant_tid),
    .needed         (needed),
    .used           (used)
  );

  power_manager #(
    .NUM_THREADS (NUM_THREADS),
    .TECH        (TECH),
    .ACT_DELAY   (ACT_DELAY),
    .EN_FREQ     (EN_FREQ),
    .EN_VOLT     (EN_VOLT),
    .EN_GATE     (EN_GATE)
  ) u_pm (
    .clk            (clk),
    .rst_n          (rst_n),
    .tick           (tick),
    .act_req        (act_req),
    .deact_req      (deact_req),
    .pct            (pct_q),
    .needed         (needed),
    .active         (active),
    .pending        (pending),
    .interval_start (interval_start),
    .div_load       (div_load),
    .div_next       (div_next),
    .div_cur        (div_cur),
    .count_left     (count_left),
    .sum_cur        (sum_cur),
    .vdd_mv         (vdd_mv),
    .of_en          (of_en),
    .ex_en          (ex_en)
  );

endmodule
