// arbitrary_waveform_generator: a one-bit waveform whose period steps through
// a table.
//
// How it works. A free-running cycle counter measures the current period.
// When it reaches PERIODS[period_index] - 1 it restarts at zero, the output
// is set high and period_index moves to the next table entry (from the last
// entry back to the first). When the counter reaches HIGH_TIME - 1 inside a
// period, the output is cleared. So every period starts with a rising edge
// and, if the period is longer than HIGH_TIME, has HIGH_TIME cycles high and
// PERIODS[k] - HIGH_TIME cycles low. A period no longer than HIGH_TIME never
// reaches the clear point: the output stays high through it. The end-of-period
// test takes priority over the high-time test.
//
// With the default table (10M..100M cycles, HIGH_TIME = 25M) and a 100 MHz
// clock, the output after reset is low for 100 ms, then high for 450 ms
// (periods 0 and 1 are both shorter than the high time and period 2 begins
// high), then alternates 50/250/150/250/250/... ms; one full sequence is
// 550M cycles (5.5 s).
//
// Interface and timing.
//   clk           rising-edge clock (100 MHz on the target board).
//   reset         asynchronous, active high. Clears the counter and the
//                 output. It does not touch period_index, which starts at 0
//                 only at power-up (an initial value, as FPGA registers
//                 allow); after a reset the sequence resumes at the entry
//                 it was on, with a low first period.
//   waveform_out  registered output; it changes on the clock edge that ends
//                 a period (to 1) or on the edge that ends the high time
//                 (to 0).
//
// The counter width, table, high time, reset behaviour and priority of the
// two tests follow the original design. The table being a parameter (the
// original has fixed constants) and the assertions are this implementation's
// additions.
//
// period_index is declared with an initial value and written in the
// asynchronous-reset process without being reset, so lint reports a
// procedural assignment to an initialised variable: this is deliberate. On
// the FPGA the value is the register's configuration value, and reset acts on
// it only as a hold (it does not advance while reset is high). Lint also
// notes that reset is used both as an asynchronous reset and synchronously:
// the synchronous use is only the disable condition of the assertions.
module arbitrary_waveform_generator
  import awg_pkg::*;
#(
  parameter int unsigned CNT_W       = 32,
  parameter int unsigned NUM_PERIODS = DEFAULT_NUM_PERIODS,
  parameter period_t     PERIODS [NUM_PERIODS] = DEFAULT_PERIODS,
  parameter period_t     HIGH_TIME   = DEFAULT_HIGH_TIME
) (
  input  logic clk,
  input  logic reset,
  output logic waveform_out
);

  localparam int unsigned IDX_W = (NUM_PERIODS > 1) ? $clog2(NUM_PERIODS) : 1;
  localparam logic [IDX_W-1:0] LAST_INDEX = IDX_W'(NUM_PERIODS - 1);

  logic [CNT_W-1:0] counter;
  // Power-up value only; the reset input leaves it alone.
  logic [IDX_W-1:0] period_index = '0;

  logic [CNT_W-1:0] period_last;   // PERIODS[period_index] - 1
  logic             period_end;
  logic             high_end;

  always_comb begin
    period_last = CNT_W'(PERIODS[period_index] - 1);
    period_end  = (counter == period_last);
    high_end    = (counter == CNT_W'(HIGH_TIME - 1));
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      counter      <= '0;
      waveform_out <= 1'b0;
    end else if (period_end) begin
      counter      <= '0;
      waveform_out <= 1'b1;
      period_index <= (period_index == LAST_INDEX) ? '0 : period_index + 1'b1;
    end else begin
      counter      <= counter + 1'b1;
      if (high_end)
        waveform_out <= 1'b0;
    end
  end

  // Table entries must be at least one cycle long and fit the counter.
  for (genvar k = 0; k < NUM_PERIODS; k++) begin : g_check
    if (PERIODS[k] == 0 || (CNT_W < 32 && 64'(PERIODS[k]) > (64'd1 << CNT_W))) begin : g_bad
      $error("PERIODS[%0d] = %0d does not fit a %0d-bit counter", k, PERIODS[k], CNT_W);
    end
  end

  // The counter never passes the end of the current period and the index
  // stays inside the table. Both are checked only outside reset, since the
  // counter holds no defined value before the first reset.
  a_index_in_table: assert property (@(posedge clk) disable iff (reset)
    period_index <= LAST_INDEX);
  a_counter_in_period: assert property (@(posedge clk) disable iff (reset)
    counter <= period_last);

endmodule
