// agv_system: one power-managed core (komodo_pm_top) with a behavioural
// memory and a behavioural model of the four real-time threads of a
// line-following vehicle. Used by the energy workload testbench; it has no
// checks of its own, only counters read hierarchically.
//
// Thread model (this design's own, shaped like the vehicle's control loop):
//   * camera (25 %): every PIXEL_PERIOD base cycles of the first
//     PIXELS x PIXEL_PERIOD cycles of a frame a pixel arrives and adds
//     PIX_WORK instructions of work;
//   * line detection (30 %): once all pixels of a frame are processed it gets
//     LINE_WORK instructions; it may overlap the camera of the next frame;
//   * steering (3 %) then PWM (2 %): STEER_WORK and PWM_WORK instructions
//     after line detection. A frame counts as done when PWM finishes; the
//     chain must be done before the camera finishes the next frame.
// A thread with work is requested (act_req) when it is neither active nor
// pending; it is deactivated as soon as its work is done, as the vehicle's
// threads deactivate themselves. Work is consumed by instructions leaving
// the execute stage.
//
// Energy: E = sum over pipeline cycles of U^2 (equivalently, sum over base
// cycles of F * U^2), U the requested supply relative to the top level of
// the chosen table. With gating on, a pipeline cycle whose operand-fetch
// stage is gated costs GATED_COST of a running one. energy_norm divides E
// by the base-cycle count, i.e. relative to always running at full speed
// and top voltage.
module agv_system #(
  parameter pm_pkg::tech_e TECH = pm_pkg::TECH_CRUSOE,
  parameter bit  EN_FREQ      = 1'b1,
  parameter bit  EN_VOLT      = 1'b1,
  parameter bit  EN_GATE      = 1'b1,
  parameter int  FRAME_CYCLES = 800000,
  parameter int  PIXELS       = 128,
  parameter int  PIXEL_PERIOD = 2500,
  parameter int  PIX_WORK     = 150,
  parameter int  LINE_WORK    = 150000,
  parameter int  STEER_WORK   = 900,
  parameter int  PWM_WORK     = 600,
  parameter real GATED_COST   = 0.3
) (
  input logic clk,
  input logic rst_n,
  input int   cyc          // base cycles since the end of reset, shared
);
  import pm_pkg::*;

  localparam int N = 4;
  localparam int PCT [N] = '{25, 30, 3, 2};

  logic cfg_we;
  logic [1:0] cfg_tid;
  pct_t cfg_pct;
  logic [N-1:0] act_req, deact_req;
  logic pc_load;
  logic [1:0] pc_load_tid;
  logic [31:0] pc_load_addr;
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

  komodo_pm_top #(
    .TECH    (TECH),
    .EN_FREQ (EN_FREQ),
    .EN_VOLT (EN_VOLT),
    .EN_GATE (EN_GATE)
  ) core (.*);

  fetch_mem_model #(.MAX_LAT(1), .RANDOM_READY(1'b0)) mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid),
    .req_ready (mem_req_ready),
    .req_addr  (mem_req_addr),
    .rsp_valid (mem_rsp_valid),
    .rsp_data  (mem_rsp_data)
  );

  // ---- counters read by the testbench ----
  int  work [N];            // instructions still owed per thread
  int  pixels_in = 0;       // pixels arrived in the current frame
  bit  cam_frame_open = 0;  // pixels of the current frame not all processed
  int  chain = 0;           // 0 idle, 1 line detection, 2 steering, 3 PWM
  int  frames_done = 0;
  int  deadline_miss = 0;
  int  work_given = 0;
  int  work_done = 0;
  int  executed = 0;
  longint ticks = 0;
  longint useful = 0;       // pipeline cycles with the operand stage enabled
  longint base = 0;
  real energy = 0.0;
  real energy_norm = 0.0;
  real u2 = 0.0;
  int  setup = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      cfg_we <= 1'b0;
      pc_load <= 1'b0;
      act_req <= '0;
      deact_req <= '0;
      setup = 0;
      for (int i = 0; i < N; i++) work[i] = 0;
    end else begin
      int fc;
      // configuration in the first cycles; the first pixel comes later
      cfg_we <= setup < N;
      pc_load <= setup < N;
      if (setup < N) begin
        cfg_tid <= 2'(setup);
        cfg_pct <= 7'(PCT[setup]);
        pc_load_tid <= 2'(setup);
        pc_load_addr <= 32'h1000 * 32'(setup + 1);
        setup++;
      end
      fc = cyc % FRAME_CYCLES;
      if (fc == 0) begin
        pixels_in = 0;
        cam_frame_open = 1'b1;
      end
      if (fc > 0 && fc % PIXEL_PERIOD == 0 && pixels_in < PIXELS) begin
        pixels_in++;
        work[0] += PIX_WORK;
        work_given += PIX_WORK;
      end
      if (pipe_tick && ex_valid) begin
        executed++;
        if (work[ex_tid] > 0) begin
          work[ex_tid]--;
          work_done++;
        end
      end
      // camera has processed the whole frame: hand it to line detection
      if (cam_frame_open && pixels_in == PIXELS && work[0] == 0) begin
        cam_frame_open = 1'b0;
        if (chain != 0) deadline_miss++;
        chain = 1;
        work[1] = LINE_WORK;
        work_given += LINE_WORK;
      end
      if (chain == 1 && work[1] == 0) begin
        chain = 2;
        work[2] = STEER_WORK;
        work_given += STEER_WORK;
      end
      if (chain == 2 && work[2] == 0) begin
        chain = 3;
        work[3] = PWM_WORK;
        work_given += PWM_WORK;
      end
      if (chain == 3 && work[3] == 0) begin
        chain = 0;
        frames_done++;
      end
      // request threads with work, release threads without
      for (int i = 0; i < N; i++) begin
        act_req[i]   <= (work[i] > 0) && !active[i] && !pending[i] && !act_req[i];
        deact_req[i] <= (work[i] == 0) && (active[i] || pending[i]) && !deact_req[i];
      end
      // energy
      base++;
      if (pipe_tick) begin
        u2 = real'(vdd_mv) / real'(vdd_of(TECH, DIV_1));
        u2 = u2 * u2;
        ticks++;
        if (of_en) useful++;
        energy += (EN_GATE && !of_en) ? GATED_COST * u2 : u2;
      end
      energy_norm = energy / real'(base);
    end
  end

endmodule
