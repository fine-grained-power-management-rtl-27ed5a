// freq_divider: fractional clock divider for the pipeline clock.
//
// The divider runs at the base (oscillator) clock and emits `tick`, a
// one-base-cycle pulse that marks each pipeline clock cycle. The pipeline
// and the priority manager use `tick` as their clock enable, so a
// synthesis flow turns it into a gated clock; keeping one clock in the
// RTL avoids a derived clock domain. Factors 1, 1.5, 2, 2.5, 3, 3.5, 4,
// 4.5, 5, 10 and 15 are supported, as in the source design.
//
// How it works: a phase accumulator counts in half base cycles. Every base
// cycle it gains 2; when it reaches twice the factor (`HALF_DIV` in
// pm_pkg) a tick is issued and twice the factor is subtracted. Factor 1.5
// therefore ticks twice in every three base cycles, factor 2.5 twice in
// every five, and n ticks always take exactly n * factor base cycles when n
// times the factor is whole.
//
// Interface and timing: `tick` is combinational from the registers. `load`
// (sampled only together with a tick) takes `div_i` as the new factor and
// clears the accumulator, so the next tick follows exactly one new period
// later and an interval of n ticks starting at the load lasts n * factor
// base cycles. After reset the factor is 1 (a tick every base cycle). The
// accumulator form is this design's choice; the source names only the
// factors.
module freq_divider
  import pm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic load,     // take div_i as the new factor (with a tick)
  input  div_e div_i,
  output logic tick,     // one pipeline clock cycle
  output div_e div_o     // factor in use
);

  logic [4:0] half_div_q;
  logic [5:0] acc_q;
  logic [5:0] acc_next;

  always_comb begin
    acc_next = acc_q + 6'd2;
    tick     = (acc_next >= {1'b0, half_div_q});
    if (tick) acc_next = acc_next - {1'b0, half_div_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half_div_q <= 5'd2;
      acc_q      <= '0;
      div_o      <= DIV_1;
    end else if (tick && load) begin
      half_div_q <= half_div_of(div_i);
      acc_q      <= '0;
      div_o      <= div_i;
    end else begin
      acc_q <= acc_next;
    end
  end

endmodule
