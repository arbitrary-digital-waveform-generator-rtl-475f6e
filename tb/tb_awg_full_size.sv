// tb_awg_full_size: the generator at its default parameters (periods of
// 10M..100M cycles, 25M-cycle high time) run through one complete sequence
// of the ten table entries and on into the next, 612M clock cycles (6.12 s
// of a 100 MHz clock).
//
// To keep the run short the testbench does nothing per clock cycle: it waits
// for the output to change and converts the simulation time of each change
// into a clock-edge count. Every change must land on the next edge in a list
// of expected transitions built from the default table: after reset the
// first period is low; each later period starts with a rise (unless the
// output is still high from a period no longer than the high time) and
// falls 25M cycles in if the period is longer than that. The intervals
// between rising edges (50M, 40M, 50M, ..., 100M, 60M cycles) and the total count
// of transitions are checked as well.
module tb_awg_full_size;
  import awg_pkg::*;

  localparam int unsigned N = DEFAULT_NUM_PERIODS;
  localparam longint      RUN_EDGES = 612_000_010;
  localparam realtime     T_CLK = 10.0;

  logic clk;
  logic reset;

  initial begin
    clk   = 1'b0;
    reset = 1'b1;
  end
  logic waveform_out;

  int checks = 0;
  int failures = 0;

  arbitrary_waveform_generator dut (
    .clk(clk), .reset(reset), .waveform_out(waveform_out)
  );

  always #(T_CLK / 2) clk = ~clk;

  // Expected transitions: clock-edge number and new value.
  longint exp_edge [$];
  logic   exp_val  [$];

  task automatic build_expected();
    longint s = 0;
    logic   level = 1'b0;
    int     k = 0;
    bit     first = 1'b1;
    while (s <= RUN_EDGES) begin
      if (!first) begin
        if (!level) begin exp_edge.push_back(s); exp_val.push_back(1'b1); end
        level = 1'b1;
        if (DEFAULT_HIGH_TIME < DEFAULT_PERIODS[k]) begin
          if (s + longint'(DEFAULT_HIGH_TIME) <= RUN_EDGES) begin
            exp_edge.push_back(s + longint'(DEFAULT_HIGH_TIME));
            exp_val.push_back(1'b0);
          end
          level = 1'b0;
        end
      end
      s += longint'(DEFAULT_PERIODS[k]);
      k = (k + 1) % N;
      first = 1'b0;
    end
  endtask

  realtime t_release;
  longint  last_rise = -1;
  int      idx = 0;

  // The interval between successive rises expected from the table. The
  // first rise ends the low first period (entry 0); entries 1 and 2, and
  // after the wrap entries 0, 1 and 2, merge into one high stretch.
  longint rise_gap [$] = '{50_000_000, 40_000_000, 50_000_000, 60_000_000,
                           70_000_000, 80_000_000, 90_000_000, 100_000_000,
                           60_000_000};
  int gap_idx = 0;

  initial begin
    build_expected();
    repeat (5) @(negedge clk);
    reset = 1'b0;
    t_release = $realtime;
    checks++;
    if (waveform_out !== 1'b0) begin
      failures++; $display("FAIL output not low after reset");
    end
    fork
      begin
        forever begin
          longint e;
          @(waveform_out);
          // Posedges after release fall at t_release + T/2 + (e-1)*T.
          e = longint'(($realtime - t_release - T_CLK / 2) / T_CLK) + 1;
          checks++;
          if (idx >= exp_edge.size()) begin
            failures++;
            $display("FAIL unexpected transition to %0b at edge %0d", waveform_out, e);
          end else if (e != exp_edge[idx] || waveform_out !== exp_val[idx]) begin
            failures++;
            $display("FAIL transition %0d: edge %0d value %0b, want edge %0d value %0b",
                     idx, e, waveform_out, exp_edge[idx], exp_val[idx]);
          end
          idx++;
          if (waveform_out) begin
            if (last_rise >= 0) begin
              checks++;
              if (gap_idx >= rise_gap.size() || e - last_rise != rise_gap[gap_idx]) begin
                failures++;
                $display("FAIL rise-to-rise interval %0d cycles (rise %0d)", e - last_rise, gap_idx);
              end
              gap_idx++;
            end
            last_rise = e;
          end
        end
      end
      begin
        #(T_CLK * RUN_EDGES);
      end
    join_any
    disable fork;
    checks++;
    if (idx != exp_edge.size()) begin
      failures++;
      $display("FAIL saw %0d transitions, want %0d", idx, exp_edge.size());
    end
    checks++;
    if (gap_idx != rise_gap.size()) begin
      failures++;
      $display("FAIL saw %0d rise intervals, want %0d", gap_idx, rise_gap.size());
    end
    $display("transitions checked: %0d, rise intervals checked: %0d", idx, gap_idx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: a little beyond the planned run.
  initial begin
    #(T_CLK * (RUN_EDGES + 1000));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
