// awg_pkg: shared constants of the arbitrary waveform generator.
//
// The generator steps through a table of NUM_PERIODS periods. Its default
// table is arithmetic: period k (k = 0..9) lasts (k + 1) * 10,000,000 clock
// cycles, i.e. 100 ms to 1 s at the 100 MHz board clock. Each period opens
// with a high pulse of DEFAULT_HIGH_TIME = 25,000,000 cycles (250 ms at
// 100 MHz). These numbers are those of the original design; the table type
// is this implementation's own choice (32-bit unsigned, as wide as the
// generator's cycle counter).
package awg_pkg;

  // One table entry: a period length in clock cycles.
  typedef int unsigned period_t;

  localparam int unsigned DEFAULT_NUM_PERIODS = 10;

  localparam period_t DEFAULT_PERIODS [DEFAULT_NUM_PERIODS] = '{
    32'd10_000_000, 32'd20_000_000, 32'd30_000_000, 32'd40_000_000,
    32'd50_000_000, 32'd60_000_000, 32'd70_000_000, 32'd80_000_000,
    32'd90_000_000, 32'd100_000_000
  };

  localparam period_t DEFAULT_HIGH_TIME = 32'd25_000_000;

endpackage
