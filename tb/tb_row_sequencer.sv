// tb_row_sequencer: self-checking test of the row/frame sequencer.
//
// A reference model counts clocks since the start of the current frame and
// predicts, for every clock, the selected row (clock / dwell), the frame
// count, the sync-error count and when the run ends. The test covers:
//  - a run of a fixed number of frames, including the exact clock on which
//    the sequencer stops and de-selects;
//  - num_rows clamped to 1 and to NUM_ROWS;
//  - a free run with Sync pulses both on the frame boundary (no error) and
//    off it (sync error, frame restarted), ended by STOP;
//  - single-row mode holding one row, and an out-of-range row selecting
//    nothing.
module tb_row_sequencer;
  import ac_pkg::*;

  localparam int unsigned NR = 41;

  logic clk = 0, rst_n = 0;
  logic start = 0, stop = 0, sync_pulse = 0;
  addr_mode_e mode = MODE_CYCLE;
  logic [7:0]  num_rows = 0, fix_row = 0;
  logic [15:0] dwell = 0, num_frames = 0;
  logic running, sel_valid, row_adv, frame_done;
  addr_mode_e run_mode;
  logic [7:0] sel_row;
  logic [15:0] frame_cnt, sync_err;

  int checks = 0, failures = 0;
  int n_ontime = 0, n_offtime = 0, n_done_stop = 0;

  row_sequencer #(.NUM_ROWS(NR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%0t %s = %0d, expected %0d", $time, what, got, exp);
    end
  endtask

  // Run MODE_CYCLE with the reference model for `cycles` clocks.
  // sync_at: list of frame-relative times at which to pulse Sync (-1: none)
  task automatic run_cycle(input int nr, input int dw, input int frames, input int cycles,
                           input int sync_every, input bit do_stop);
    int eff_nr, F, t, fr, err, n;
    bit run;
    eff_nr = (nr == 0) ? 1 : (nr > NR ? NR : nr);
    F = eff_nr * (dw == 0 ? 1 : dw);
    @(negedge clk);
    mode = MODE_CYCLE; num_rows = 8'(nr); dwell = 16'(dw); num_frames = 16'(frames);
    start = 1;
    @(negedge clk);
    start = 0;
    t = 0; fr = 0; err = 0; run = 1;
    for (n = 0; n < cycles; n++) begin
      // state after the start edge (t, fr, err, run) is visible now
      expect_eq("running", running, run);
      expect_eq("sel_valid", sel_valid, run);
      if (run) expect_eq("sel_row", sel_row, t / (dw == 0 ? 1 : dw));
      expect_eq("frame_cnt", frame_cnt, fr);
      expect_eq("sync_err", sync_err, err);
      if (!run) break;
      // decide on Sync for this clock
      sync_pulse = 0;
      if (sync_every > 0 && n % sync_every == sync_every - 1) sync_pulse = 1;
      if (sync_every < 0 && t == F - 1 && fr % 2 == 1) sync_pulse = 1;  // on-time syncs
      @(negedge clk);
      if (sync_pulse && t == F - 1) n_ontime++;
      if (sync_pulse && t != F - 1) begin n_offtime++; err++; end
      if (t == F - 1 || sync_pulse) begin
        t = 0; fr++;
        if (frames != 0 && fr == frames) begin run = 0; n_done_stop++; end
      end else t++;
      sync_pulse = 0;
    end
    if (do_stop) begin
      stop = 1;
      @(negedge clk);
      stop = 0;
      expect_eq("running after stop", running, 0);
      expect_eq("sel_valid after stop", sel_valid, 0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq("sel_valid at reset", sel_valid, 0);
    // fixed number of frames, ends by itself
    run_cycle(5, 3, 4, 1000, 0, 0);
    run_cycle(NR, 4, 2, 10000, 0, 0);
    // clamping
    run_cycle(0, 2, 3, 1000, 0, 0);
    run_cycle(200, 1, 1, 1000, 0, 0);
    // free run with on-time Syncs, then off-time Syncs, stopped
    run_cycle(7, 5, 0, 400, -1, 1);
    run_cycle(7, 5, 0, 400, 23, 1);
    run_cycle(3, 2, 6, 400, 10, 0);
    // single-row mode
    @(negedge clk);
    mode = MODE_FIXED; fix_row = 8'd17; start = 1;
    @(negedge clk);
    start = 0;
    repeat (500) begin
      @(negedge clk);
      expect_eq("fixed sel_valid", sel_valid, 1);
      expect_eq("fixed sel_row", sel_row, 17);
    end
    sync_pulse = 1;   // Sync does not move a held row
    @(negedge clk);
    sync_pulse = 0;
    expect_eq("fixed sel_row after sync", sel_row, 17);
    stop = 1;
    @(negedge clk);
    stop = 0;
    expect_eq("fixed stopped", sel_valid, 0);
    fix_row = 8'd60; start = 1;
    @(negedge clk);
    start = 0;
    expect_eq("fixed out of range", sel_valid, 0);
    expect_eq("fixed running", running, 1);
    checks += 3;
    if (n_ontime == 0)    begin failures++; $display("no on-time sync"); end
    if (n_offtime == 0)   begin failures++; $display("no off-time sync"); end
    if (n_done_stop == 0) begin failures++; $display("no frame-count stop"); end
    $display("ontime=%0d offtime=%0d framestop=%0d", n_ontime, n_offtime, n_done_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
