// pm_pkg: types, tables and helper functions shared by the power-managed
// multithreaded core.
//
// The core divides its base clock by one of eleven factors (1, 1.5, 2, 2.5,
// 3, 3.5, 4, 4.5, 5, 10, 15). A factor is carried as an enum index; the
// tables below give, per index, twice the factor (so that half-integer
// factors stay integers), the number of pipeline cycles that make up one
// scheduling interval (floor(100 / factor), so that an interval lasts about
// 100 base clock cycles), and the supply voltage in millivolts for the two
// voltage characteristics the design supports (XScale-like and
// Crusoe-like). The factors, the interval counts 6, 66 and 100 and both
// voltage columns follow the source design; the remaining interval counts
// follow from the same floor(100 / factor) rule and are this design's
// reading of it.
package pm_pkg;

  // Number of hardware thread slots (program counters / instruction windows).
  localparam int unsigned NUM_THREADS_DEF = 4;

  // Percentages run from 0 to 100, so seven bits hold one.
  localparam int unsigned PCT_W = 7;
  typedef logic [PCT_W-1:0] pct_t;

  // Sum of up to 16 percentages.
  localparam int unsigned SUM_W = 11;
  typedef logic [SUM_W-1:0] sum_t;

  // Pipeline cycles left in an interval (0..100).
  typedef logic [6:0] count_t;

  // Supply voltage in millivolts.
  typedef logic [10:0] mv_t;

  // Clock division factors, fastest first.
  typedef enum logic [3:0] {
    DIV_1   = 4'd0,
    DIV_1_5 = 4'd1,
    DIV_2   = 4'd2,
    DIV_2_5 = 4'd3,
    DIV_3   = 4'd4,
    DIV_3_5 = 4'd5,
    DIV_4   = 4'd6,
    DIV_4_5 = 4'd7,
    DIV_5   = 4'd8,
    DIV_10  = 4'd9,
    DIV_15  = 4'd10
  } div_e;

  localparam int unsigned NUM_DIVS = 11;

  // Voltage characteristic of the target process.
  typedef enum logic {
    TECH_XSCALE = 1'b0,
    TECH_CRUSOE = 1'b1
  } tech_e;

  // Twice the division factor.
  localparam int unsigned HALF_DIV [NUM_DIVS] = '{2, 3, 4, 5, 6, 7, 8, 9, 10, 20, 30};

  // Pipeline cycles per interval: floor(100 / factor).
  localparam int unsigned INTERVAL_COUNT [NUM_DIVS] = '{100, 66, 50, 40, 33, 28, 25, 22, 20, 10, 6};

  // Supply voltage per division factor, in millivolts.
  localparam int unsigned VDD_XSCALE_MV [NUM_DIVS] =
    '{1100, 1000, 1000, 1000, 850, 850, 850, 850, 850, 850, 850};
  localparam int unsigned VDD_CRUSOE_MV [NUM_DIVS] =
    '{1300, 1050, 950, 875, 850, 800, 800, 800, 800, 800, 800};

  // Thread activation delay in base clock cycles for each characteristic.
  localparam int unsigned ACT_DELAY_XSCALE = 2100;
  localparam int unsigned ACT_DELAY_CRUSOE = 3700;

  function automatic int unsigned act_delay_of(tech_e t);
    return (t == TECH_XSCALE) ? ACT_DELAY_XSCALE : ACT_DELAY_CRUSOE;
  endfunction

  // Slowest clock whose interval still offers at least `sum` pipeline
  // cycles, i.e. the frequency nearest to the demand but not below it.
  function automatic div_e select_div(sum_t sum);
    div_e d;
    d = DIV_1;
    for (int i = 0; i < NUM_DIVS; i++) begin
      if (32'(sum) <= INTERVAL_COUNT[i]) d = div_e'(i);
    end
    return d;
  endfunction

  function automatic count_t count_of(div_e d);
    return count_t'(INTERVAL_COUNT[d]);
  endfunction

  function automatic logic [4:0] half_div_of(div_e d);
    return 5'(HALF_DIV[d]);
  endfunction

  function automatic mv_t vdd_of(tech_e t, div_e d);
    return (t == TECH_XSCALE) ? mv_t'(VDD_XSCALE_MV[d]) : mv_t'(VDD_CRUSOE_MV[d]);
  endfunction

endpackage
