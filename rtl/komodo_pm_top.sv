// komodo_pm_top: power-managed front end of a four-slot multithreaded
// microcontroller core.
//
// The core interleaves up to four hardware threads in a four-stage
// pipeline (instruction fetch, decode, operand fetch, execute / memory
// access / I/O access). Real-time threads are scheduled by Guaranteed
// Percentage: each gets a fixed share of the pipeline cycles of every
// ~100-base-cycle interval. Because the scheduler knows those shares, the
// same hardware sets the pipeline clock divider and the supply voltage to
// what the active threads need, and gates the cycles nobody needs, with no
// software involved.
//
// This module wires:
//   * freq_divider      base clock -> pipeline clock enable `pipe_tick`
//   * priority_manager  GP scheduler + power manager (decode stage)
//   * instruction_fetch PCs and instruction windows (fetch stage)
//   * the decode, operand-fetch and execute stage registers. The decoder,
//     microcode ROM, operand fetch, execute, memory/I/O access units and
//     stack register sets are not part of this RTL; the instruction word and
//     thread number travel through the stage registers so that these units
//     can be attached at `id_*` (decode input) and `ex_*` (execute result).
//     The operand-fetch and execute registers load only on `of_en` /
//     `ex_en`, the gated pipeline cycles; a synthesis flow maps these
//     enables to clock gates.
//
// Interface and timing: everything runs on the base clock `clk`; pipeline
// registers advance when `pipe_tick` is high. `id_valid`, `ex_valid` hold
// for one pipeline cycle, so they are counted once per `pipe_tick`.
// `vdd_mv` is the supply voltage request for an external regulator, which
// must settle within the activation delay. Thread activation
// (`act_req`, from the signal unit) becomes effective ACT_DELAY base
// cycles later; deactivation at the next edge. Pipeline stage structure,
// divider factors, voltage tables, interval rule and activation delays
// follow the source design; ports, widths and the window sizes are this
// design's choices. The fetch stage's PCs, the scheduler's per-thread cycle
// counters and its `needed` flag are kept for observation inside the
// hierarchy and are not brought out, so lint reports them as unused.
module komodo_pm_top
  import pm_pkg::*;
#(
  parameter int unsigned NUM_THREADS  = NUM_THREADS_DEF,
  parameter tech_e       TECH         = TECH_CRUSOE,
  parameter int unsigned ACT_DELAY    = act_delay_of(TECH),
  parameter bit          EN_FREQ      = 1'b1,
  parameter bit          EN_VOLT      = 1'b1,
  parameter bit          EN_GATE      = 1'b1,
  parameter int unsigned IW_DEPTH     = 8,
  parameter int unsigned IW_THRESHOLD = 4,
  parameter int unsigned ADDR_W       = 32,
  parameter int unsigned INSTR_W      = 8,
  parameter int unsigned FETCH_W      = 32,
  localparam int unsigned TID_W = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // percentage configuration
  input  logic                   cfg_we,
  input  logic [TID_W-1:0]       cfg_tid,
  input  pct_t                   cfg_pct,
  // thread control (signal unit)
  input  logic [NUM_THREADS-1:0] act_req,
  input  logic [NUM_THREADS-1:0] deact_req,
  // PC load (thread start, branches)
  input  logic                   pc_load,
  input  logic [TID_W-1:0]       pc_load_tid,
  input  logic [ADDR_W-1:0]      pc_load_addr,
  // instruction memory interface
  output logic                   mem_req_valid,
  input  logic                   mem_req_ready,
  output logic [ADDR_W-1:0]      mem_req_addr,
  input  logic                   mem_rsp_valid,
  input  logic [FETCH_W-1:0]     mem_rsp_data,
  // decode stage slot (towards the decoder)
  output logic                   id_valid,
  output logic [TID_W-1:0]       id_tid,
  output logic [INSTR_W-1:0]     id_instr,
  // execute stage slot
  output logic                   ex_valid,
  output logic [TID_W-1:0]       ex_tid,
  output logic [INSTR_W-1:0]     ex_instr,
  // power management
  output logic                   pipe_tick,
  output logic                   of_en,
  output logic                   ex_en,
  output div_e                   div_cur,
  output mv_t                    vdd_mv,
  output logic                   interval_start,
  output count_t                 count_left,     // pipeline cycles left in the interval
  output sum_t                   sum_cur,
  output logic [NUM_THREADS-1:0] active,
  output logic [NUM_THREADS-1:0] pending
);

  typedef struct packed {
    logic [TID_W-1:0]   tid;
    logic [INSTR_W-1:0] instr;
  } slot_t;

  logic                   div_load;
  div_e                   div_next, div_pm, div_fd;
  logic [NUM_THREADS-1:0] iw_ready;
  logic [INSTR_W-1:0]     iw_head [NUM_THREADS];
  logic [ADDR_W-1:0]      pc      [NUM_THREADS];
  pct_t                   used    [NUM_THREADS];
  logic                   grant_valid, needed;
  logic [TID_W-1:0]       grant_tid;
  slot_t                  id_q, of_q, ex_q;
  logic                   id_v, of_v, ex_v;

  freq_divider u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (div_load),
    .div_i (div_next),
    .tick  (pipe_tick),
    .div_o (div_fd)
  );

  priority_manager #(
    .NUM_THREADS (NUM_THREADS),
    .TECH        (TECH),
    .ACT_DELAY   (ACT_DELAY),
    .EN_FREQ     (EN_FREQ),
    .EN_VOLT     (EN_VOLT),
    .EN_GATE     (EN_GATE)
  ) u_pm (
    .clk            (clk),
    .rst_n          (rst_n),
    .tick           (pipe_tick),
    .cfg_we         (cfg_we),
    .cfg_tid        (cfg_tid),
    .cfg_pct        (cfg_pct),
    .act_req        (act_req),
    .deact_req      (deact_req),
    .iw_ready       (iw_ready),
    .grant_valid    (grant_valid),
    .grant_tid      (grant_tid),
    .needed         (needed),
    .of_en          (of_en),
    .ex_en          (ex_en),
    .div_load       (div_load),
    .div_next       (div_next),
    .div_cur        (div_pm),
    .vdd_mv         (vdd_mv),
    .active         (active),
    .pending        (pending),
    .interval_start (interval_start),
    .count_left     (count_left),
    .sum_cur        (sum_cur),
    .used           (used)
  );

  instruction_fetch #(
    .NUM_THREADS  (NUM_THREADS),
    .IW_DEPTH     (IW_DEPTH),
    .IW_THRESHOLD (IW_THRESHOLD),
    .ADDR_W       (ADDR_W),
    .INSTR_W      (INSTR_W),
    .FETCH_W      (FETCH_W)
  ) u_if (
    .clk           (clk),
    .rst_n         (rst_n),
    .ce            (pipe_tick),
    .pc_load       (pc_load),
    .pc_load_tid   (pc_load_tid),
    .pc_load_addr  (pc_load_addr),
    .pop           (grant_valid),
    .pop_tid       (grant_tid),
    .iw_ready      (iw_ready),
    .iw_head       (iw_head),
    .pc            (pc),
    .mem_req_valid (mem_req_valid),
    .mem_req_ready (mem_req_ready),
    .mem_req_addr  (mem_req_addr),
    .mem_rsp_valid (mem_rsp_valid),
    .mem_rsp_data  (mem_rsp_data)
  );

  // Stage registers. The decode slot runs on every pipeline cycle (the
  // priority manager is never gated); operand fetch and execute data load
  // only on their gated cycles, their valid flags follow every cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_v <= 1'b0;
      of_v <= 1'b0;
      ex_v <= 1'b0;
    end else if (pipe_tick) begin
      id_v <= grant_valid;
      of_v <= id_v;
      ex_v <= of_v;
    end
  end

  always_ff @(posedge clk) begin
    if (pipe_tick) begin
      id_q.tid   <= grant_tid;
      id_q.instr <= iw_head[grant_tid];
    end
    if (of_en) begin
      of_q.tid   <= id_q.tid;
      of_q.instr <= id_q.instr;
    end
    if (ex_en) begin
      ex_q.tid   <= of_q.tid;
      ex_q.instr <= of_q.instr;
    end
  end

  assign id_valid = id_v;
  assign id_tid   = id_q.tid;
  assign id_instr = id_q.instr;
  assign ex_valid = ex_v;
  assign ex_tid   = ex_q.tid;
  assign ex_instr = ex_q.instr;
  assign div_cur  = div_fd;

  // The divider in the clock generator and the one the power manager
  // accounts for are the same.
  a_div_match: assert property (@(posedge clk) disable iff (!rst_n) div_fd == div_pm)
    else $error("komodo_pm_top: divider mismatch");
  // A gated stage never holds a valid instruction.
  a_of_gate: assert property (@(posedge clk) disable iff (!rst_n) pipe_tick && id_v |-> of_en)
    else $error("komodo_pm_top: operand fetch gated while holding an instruction");
  a_ex_gate: assert property (@(posedge clk) disable iff (!rst_n) pipe_tick && of_v |-> ex_en)
    else $error("komodo_pm_top: execute gated while holding an instruction");

endmodule
