// fetch_mem_model: behavioural instruction memory for the fetch-stage and
// end-to-end testbenches.
//
// It accepts one request at a time (mem_req_ready high at random when
// RANDOM_READY is set, else always), waits 1 to MAX_LAT base cycles and
// returns a 32-bit word whose four bytes are byte_at(addr + b), b = 0..3,
// lowest address in the lowest byte. byte_at() is a fixed mixing function
// of the byte address, so a testbench can predict every fetched byte.
module fetch_mem_model #(
  parameter int MAX_LAT      = 3,
  parameter bit RANDOM_READY = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [31:0] req_addr,
  output logic        rsp_valid,
  output logic [31:0] rsp_data
);

  function automatic logic [7:0] byte_at(input logic [31:0] a);
    return a[7:0] ^ a[15:8] ^ {a[4:0], a[7:5]} ^ 8'h3c;
  endfunction

  bit          busy = 1'b0;
  int          lat = 0;
  logic [31:0] addr = '0;
  int          n_req = 0;

  initial begin
    req_ready = 1'b0;
    rsp_valid = 1'b0;
    rsp_data  = '0;
  end

  always @(posedge clk) begin
    rsp_valid <= 1'b0;
    if (!rst_n) begin
      busy = 1'b0;
      req_ready <= 1'b0;
    end else if (!busy) begin
      if (req_valid && req_ready) begin
        busy = 1'b1;
        n_req++;
        addr = req_addr;
        lat = $urandom_range(0, MAX_LAT - 1);
        req_ready <= 1'b0;
      end else begin
        req_ready <= RANDOM_READY ? 1'($urandom_range(0, 1)) : 1'b1;
      end
    end else if (lat == 0) begin
      busy = 1'b0;
      rsp_valid <= 1'b1;
      rsp_data  <= {byte_at(addr + 3), byte_at(addr + 2), byte_at(addr + 1), byte_at(addr)};
      req_ready <= RANDOM_READY ? 1'($urandom_range(0, 1)) : 1'b1;
    end else begin
      lat--;
    end
  end

endmodule
