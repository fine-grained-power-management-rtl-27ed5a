// tb_instruction_fetch: self-checking test of the multithreaded fetch
// stage.
//
// Four threads are started at different addresses; a behavioural memory
// answers with random readiness and latency, and the pipeline enable and
// the decode pops come at random. Every byte popped from a window must be
// the next byte of that thread's program (predicted from the memory's
// mixing function), a window must never exceed its depth, a fetch may only
// start for a window below the threshold, and a PC reload must make the
// window continue from the new address. Untouched thread slots must never
// fetch.
module tb_instruction_fetch;
  import pm_pkg::*;

  localparam int N = 4;
  localparam int DEPTH = 8;
  localparam int THR = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ce = 1'b0;
  logic pc_load = 1'b0;
  logic [1:0] pc_load_tid = '0;
  logic [31:0] pc_load_addr = '0;
  logic pop = 1'b0;
  logic [1:0] pop_tid = '0;
  logic [N-1:0] iw_ready;
  logic [7:0] iw_head [N];
  logic [31:0] pc [N];
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [31:0] mem_req_addr, mem_rsp_data;

  int checks = 0;
  int failures = 0;

  instruction_fetch #(.NUM_THREADS(N), .IW_DEPTH(DEPTH), .IW_THRESHOLD(THR)) dut (.*);

  fetch_mem_model #(.MAX_LAT(4)) mem (
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
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] byte_at(input logic [31:0] a);
    return a[7:0] ^ a[15:8] ^ {a[4:0], a[7:5]} ^ 8'h3c;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] next_addr [N];   // address of the next byte expected per thread
  int popped [N];

  // Fetch requests only for windows below the threshold, and only for
  // started threads.
  logic [N-1:0] started = '0;
  always @(posedge clk) begin
    if (rst_n && mem_req_valid && mem_req_ready) begin
      int t;
      t = int'(dut.tid_q);
      check(started[t], "fetch for a thread that was never started");
      check(mem_req_addr[1:0] == 2'b00, "word-aligned fetch address");
    end
    if (rst_n) for (int i = 0; i < N; i++)
      check(int'(dut.fill_q[i]) <= DEPTH, "window overflow");
  end

  task automatic load_pc(input int t, input logic [31:0] a);
    @(negedge clk);
    pc_load = 1'b1;
    pc_load_tid = 2'(t);
    pc_load_addr = a;
    @(negedge clk);
    pc_load = 1'b0;
    next_addr[t] = a;
    started[t] = 1'b1;
  endtask

  initial begin
    for (int i = 0; i < N; i++) popped[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    check(mem.n_req == 0, "no fetch before any PC is loaded");
    load_pc(0, 32'h0000_1000);
    load_pc(1, 32'h0000_2000);
    load_pc(2, 32'h0001_0040);

    for (int c = 0; c < 30000; c++) begin
      @(negedge clk);
      pop = 1'b0;
      if (c == 5000)  load_pc(3, 32'h0000_8000);
      if (c == 12000) load_pc(1, 32'h0000_3004);   // branch
      if (c == 20000) load_pc(0, 32'h0000_0100);
      ce  = ($urandom_range(0, 2) != 0);
      if ($urandom_range(0, 3) != 0) begin
        pop_tid = 2'($urandom_range(0, N - 1));
        pop = iw_ready[pop_tid];
      end
      #1;
      if (ce && pop) begin
        check(iw_head[pop_tid] == byte_at(next_addr[pop_tid]),
              $sformatf("thread %0d byte at %h: %h expected %h", pop_tid, next_addr[pop_tid],
                        iw_head[pop_tid], byte_at(next_addr[pop_tid])));
        next_addr[pop_tid] = next_addr[pop_tid] + 1;
        popped[pop_tid]++;
      end
    end
    pop = 1'b0;
    for (int i = 0; i < N; i++)
      check(popped[i] > 1000, $sformatf("thread %0d made progress (%0d bytes)", i, popped[i]));
    $display("bytes popped: %0d %0d %0d %0d, fetches %0d", popped[0], popped[1], popped[2],
             popped[3], mem.n_req);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A request may only start for a window below the threshold.
  always @(posedge clk) begin
    if (rst_n && !dut.req_q && !dut.busy_q && ce && dut.pick_valid && !pc_load)
      check(int'(dut.fill_q[dut.pick_tid]) < THR, "fetch started above the threshold");
  end

endmodule
