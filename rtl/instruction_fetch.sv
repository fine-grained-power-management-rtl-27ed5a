// instruction_fetch: the multithreaded instruction fetch (IF) stage.
//
// One program counter and one instruction window (IW, a small FIFO of
// bytecode bytes) per hardware thread slot. Whenever a window's filling
// level falls below IW_THRESHOLD the stage fetches the next memory word for
// that thread and appends its FETCH_W/INSTR_W bytes (lowest address first,
// little-endian within the word), so the IF stage works only on demand and
// needs no gating. The four PCs and windows and the threshold rule follow
// the source design; window depth, threshold, word widths, byte order, the
// memory handshake, the round robin among windows that need refilling and
// the PC load port are this design's choices, since the source leaves them
// open.
//
// Interface and timing:
//  * Memory: a valid/ready request (`mem_req_*`, word address in bytes) and
//    a response (`mem_rsp_valid` / `mem_rsp_data`) that is always accepted.
//    At most one request is outstanding. A new request is decided only on a
//    pipeline cycle (`ce`); the handshakes themselves complete on any base
//    clock edge.
//  * `pc_load` sets a thread's PC, marks it fetchable and empties its
//    window; a response still in flight for that thread is dropped.
//  * The decode stage reads `iw_head[t]` and removes it with `pop` /
//    `pop_tid` on a pipeline cycle; `iw_ready[t]` says the window is not
//    empty. Each window entry is one bytecode byte, handed to decode one
//    per pipeline cycle; the PC advances by FETCH_W/8 per fetch. IW_DEPTH
//    must be a power of two and at least IW_THRESHOLD - 1 + FETCH_W/INSTR_W
//    so that a refill always fits.
module instruction_fetch
  import pm_pkg::*;
#(
  parameter int unsigned NUM_THREADS  = NUM_THREADS_DEF,
  parameter int unsigned IW_DEPTH     = 8,
  parameter int unsigned IW_THRESHOLD = 4,
  parameter int unsigned ADDR_W       = 32,
  parameter int unsigned INSTR_W      = 8,
  parameter int unsigned FETCH_W      = 32,
  localparam int unsigned TID_W  = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1,
  localparam int unsigned PTR_W  = (IW_DEPTH > 1) ? $clog2(IW_DEPTH) : 1,
  localparam int unsigned FILL_W = $clog2(IW_DEPTH + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ce,
  // PC load
  input  logic                   pc_load,
  input  logic [TID_W-1:0]       pc_load_tid,
  input  logic [ADDR_W-1:0]      pc_load_addr,
  // instruction windows towards decode
  input  logic                   pop,
  input  logic [TID_W-1:0]       pop_tid,
  output logic [NUM_THREADS-1:0] iw_ready,
  output logic [INSTR_W-1:0]     iw_head [NUM_THREADS],
  output logic [ADDR_W-1:0]      pc [NUM_THREADS],
  // memory interface
  output logic                   mem_req_valid,
  input  logic                   mem_req_ready,
  output logic [ADDR_W-1:0]      mem_req_addr,
  input  logic                   mem_rsp_valid,
  input  logic [FETCH_W-1:0]     mem_rsp_data
);

  localparam int unsigned PC_STEP = FETCH_W / 8;
  localparam int unsigned NB      = FETCH_W / INSTR_W;   // entries per fetch

  if ((IW_DEPTH & (IW_DEPTH - 1)) != 0 || IW_DEPTH < IW_THRESHOLD - 1 + NB) begin : g_bad_depth
    $error("instruction_fetch: IW_DEPTH must be a power of two holding a whole refill");
  end

  logic [INSTR_W-1:0]     iw_q   [NUM_THREADS][IW_DEPTH];
  logic [PTR_W-1:0]       rd_q   [NUM_THREADS];
  logic [PTR_W-1:0]       wr_q   [NUM_THREADS];
  logic [FILL_W-1:0]      fill_q [NUM_THREADS];
  logic [ADDR_W-1:0]      pc_q   [NUM_THREADS];
  logic [NUM_THREADS-1:0] fetchable_q;

  logic                   req_q;        // request waiting for mem_req_ready
  logic                   busy_q;       // request issued, response outstanding
  logic                   drop_q;       // discard the outstanding response
  logic [TID_W-1:0]       tid_q;        // thread of the outstanding fetch
  logic [ADDR_W-1:0]      addr_q;
  logic [TID_W-1:0]       last_q;

  logic [NUM_THREADS-1:0] want;
  logic                   pick_valid;
  logic [TID_W-1:0]       pick_tid;
  logic                   push;
  logic [NUM_THREADS-1:0] do_push, do_pop;


  always_comb begin
    for (int i = 0; i < NUM_THREADS; i++) begin
      want[i]     = fetchable_q[i] && (32'(fill_q[i]) < IW_THRESHOLD);
      iw_ready[i] = (fill_q[i] != '0);
      iw_head[i]  = iw_q[i][rd_q[i]];
      pc[i]       = pc_q[i];
      do_push[i]  = push && (32'(tid_q) == i);
      do_pop[i]   = ce && pop && (32'(pop_tid) == i) && (fill_q[i] != '0);
    end
  end

  // Round robin among windows that need refilling.
  always_comb begin
    logic [TID_W-1:0] idx;
    pick_valid = 1'b0;
    pick_tid   = '0;
    for (int k = NUM_THREADS; k >= 1; k--) begin
      idx = TID_W'((32'(last_q) + 32'(k)) % NUM_THREADS);
      if (want[idx]) begin
        pick_valid = 1'b1;
        pick_tid   = TID_W'(idx);
      end
    end
  end

  assign mem_req_valid = req_q;
  assign mem_req_addr  = addr_q;
  assign push          = busy_q && !req_q && mem_rsp_valid && !drop_q
                         && !(pc_load && pc_load_tid == tid_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_q       <= 1'b0;
      busy_q      <= 1'b0;
      drop_q      <= 1'b0;
      tid_q       <= '0;
      addr_q      <= '0;
      last_q      <= TID_W'(NUM_THREADS - 1);
      fetchable_q <= '0;
      for (int i = 0; i < NUM_THREADS; i++) begin
        rd_q[i]   <= '0;
        wr_q[i]   <= '0;
        fill_q[i] <= '0;
        pc_q[i]   <= '0;
      end
    end else begin
      // Request / response sequencing.
      if (req_q) begin
        if (mem_req_ready) req_q <= 1'b0;
      end else if (busy_q) begin
        if (mem_rsp_valid) begin
          busy_q <= 1'b0;
          drop_q <= 1'b0;
        end
      end else if (ce && pick_valid && !pc_load) begin
        req_q  <= 1'b1;
        busy_q <= 1'b1;
        drop_q <= 1'b0;
        tid_q  <= pick_tid;
        addr_q <= pc_q[pick_tid];
        last_q <= pick_tid;
        pc_q[pick_tid] <= pc_q[pick_tid] + ADDR_W'(PC_STEP);
      end

      // Window contents.
      for (int i = 0; i < NUM_THREADS; i++) begin
        if (pc_load && 32'(pc_load_tid) == i) begin
          rd_q[i]        <= '0;
          wr_q[i]        <= '0;
          fill_q[i]      <= '0;
          pc_q[i]        <= pc_load_addr;
          fetchable_q[i] <= 1'b1;
          if (busy_q && tid_q == pc_load_tid) drop_q <= 1'b1;
        end else begin
          if (do_push[i]) wr_q[i] <= wr_q[i] + PTR_W'(NB);
          if (do_pop[i])  rd_q[i] <= rd_q[i] + 1'b1;
          fill_q[i] <= fill_q[i] + (do_push[i] ? FILL_W'(NB) : '0) - (do_pop[i] ? FILL_W'(1) : '0);
        end
      end
    end
  end

  // Window storage (no reset needed: fill_q guards every read).
  always_ff @(posedge clk) begin
    if (push) begin
      for (int b = 0; b < NB; b++)
        iw_q[tid_q][wr_q[tid_q] + PTR_W'(b)] <= mem_rsp_data[b*INSTR_W +: INSTR_W];
    end
  end

  // Decode only pops a window that holds an instruction.
  a_pop: assert property (@(posedge clk) disable iff (!rst_n) ce && pop |-> fill_q[pop_tid] != '0)
    else $error("instruction_fetch: pop from empty window %0d", pop_tid);

endmodule
