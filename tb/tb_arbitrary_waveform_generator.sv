// tb_arbitrary_waveform_generator: self-checking test of the period-stepping
// waveform generator at a reduced time scale.
//
// The table is scaled down by 10^6 (periods 10, 20, ..., 100 cycles, high
// time 25 cycles), which keeps the ratios of the full-size design, including
// the two periods that are shorter than the high time. The expected output
// is worked out from the description of the waveform, not from a copy of
// the counter: after a reset the first period (whatever table entry the
// sequence is on) is low; every later period starts high and falls HIGH_TIME
// cycles in if it is longer than that. The output is compared after every
// clock edge. Two asynchronous resets are applied mid-sequence, one of them
// between clock edges, to check that the output clears at once and that the
// sequence resumes at the table entry it was on.
//
// Counted mechanisms (each must occur): rising edge at a period start,
// falling edge at the end of the high time, a period boundary crossed while
// high (period not longer than the high time), wrap from the last table
// entry to the first, asynchronous reset mid-sequence.
module tb_arbitrary_waveform_generator;
  import awg_pkg::*;

  localparam int unsigned N  = 10;
  localparam period_t     P [N] = '{10, 20, 30, 40, 50, 60, 70, 80, 90, 100};
  localparam period_t     H  = 25;
  localparam int          WATCHDOG_CYCLES = 20000;

  logic clk;
  logic reset;

  initial begin
    clk   = 1'b0;
    reset = 1'b1;
  end
  logic waveform_out;

  int checks = 0;
  int failures = 0;
  int n_rise = 0, n_fall = 0, n_stay_high = 0, n_wrap = 0, n_reset = 0;

  arbitrary_waveform_generator #(
    .CNT_W(32), .NUM_PERIODS(N), .PERIODS(P), .HIGH_TIME(H)
  ) dut (
    .clk(clk), .reset(reset), .waveform_out(waveform_out)
  );

  always #5 clk = ~clk;

  // Expected output after e clock edges since reset release, when the
  // sequence was on table entry k0 at the release. Also returns the table
  // entry in force and the position inside its period.
  function automatic logic expected(input longint e, input int k0,
                                    output int k, output longint m);
    longint s = 0;
    bit first = 1'b1;
    k = k0;
    forever begin
      if (e < s + longint'(P[k])) begin
        m = e - s;
        if (first) return 1'b0;
        if (H < P[k] && m >= longint'(H)) return 1'b0;
        return 1'b1;
      end
      s += longint'(P[k]);
      k = (k + 1) % N;
      first = 1'b0;
    end
  endfunction

  longint e = 0;        // clock edges since reset release
  int     k0 = 0;       // table entry at the last reset release
  int     k_now = 0;
  int     k_prev = 0;
  longint m_now;
  logic   exp_out, prev_out = 1'b0;

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: edge %0d entry %0d got %0b want %0b", what, e, k_now, got, want);
    end
  endtask

  // Run n clock edges, comparing the output after each one.
  task automatic run(input int n);
    repeat (n) begin
      @(posedge clk);
      e++;
      #1;
      exp_out = expected(e, k0, k_now, m_now);
      check(waveform_out, exp_out, "waveform");
      if (!prev_out && waveform_out) n_rise++;
      if (prev_out && !waveform_out && m_now == longint'(H)) n_fall++;
      if (prev_out && waveform_out && m_now == 0) n_stay_high++;
      if (k_prev == N - 1 && k_now == 0) n_wrap++;
      prev_out = waveform_out;
      k_prev   = k_now;
    end
  endtask

  // Apply reset at a point between clock edges; the output must clear
  // before the next edge.
  task automatic async_reset(input int hold_cycles);
    @(negedge clk);
    #2;
    reset = 1'b1;
    #1;
    check(waveform_out, 1'b0, "asynchronous clear");
    n_reset++;
    repeat (hold_cycles) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    // The entry in force when reset hit is where the sequence resumes.
    k0 = k_now;
    e = 0;
    prev_out = 1'b0;
    k_prev = k0;
  endtask

  initial begin
    // Power-up: the sequence starts at table entry 0.
    repeat (5) @(negedge clk);
    reset = 1'b0;
    check(waveform_out, 1'b0, "low after reset");
    run(1400);               // more than two full sequences (550 cycles each)
    async_reset(3);          // lands inside some entry other than 0
    run(700);
    async_reset(1);
    run(600);

    checks++; if (n_rise == 0)      begin failures++; $display("FAIL no rising edge seen"); end
    checks++; if (n_fall == 0)      begin failures++; $display("FAIL no high-time fall seen"); end
    checks++; if (n_stay_high == 0) begin failures++; $display("FAIL no period crossed while high"); end
    checks++; if (n_wrap == 0)      begin failures++; $display("FAIL no wrap to entry 0"); end
    checks++; if (n_reset == 0)     begin failures++; $display("FAIL no mid-run reset"); end
    $display("mechanisms: rise=%0d high_time_fall=%0d stay_high=%0d wrap=%0d reset=%0d",
             n_rise, n_fall, n_stay_high, n_wrap, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
