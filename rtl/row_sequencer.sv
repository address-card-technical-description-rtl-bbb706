// row_sequencer: chooses which row is selected, cycle by cycle.
//
// Generalised addressing mode (MODE_CYCLE): after `start` the sequencer
// selects rows 0, 1, ... num_rows-1, each for `dwell` clocks, then wraps to
// row 0; each wrap completes one frame. It stops by itself, de-selecting all
// rows, once `num_frames` frames are done (num_frames = 0 runs until `stop`).
// The frame timing is strict so that it stays in step with the other cards,
// and an external Sync pulse re-aligns it: a Sync that arrives on the last
// clock of a frame is on time; any other Sync counts a sync error, ends the
// frame early and restarts at row 0. Single-row mode (MODE_FIXED) holds
// `fix_row` selected until `stop`.
//
// The modes, the frame/row/rate settings and the Sync re-alignment follow the
// card's description. The exact rule for an on-time Sync, the sync-error
// counter, latching the settings at `start`, and clamping num_rows to
// 1..NUM_ROWS and dwell to >= 1 are this design's choices.
//
// Interface: start/stop/sync are single-clock pulses. sel_valid/sel_row give
// the row that should be selected now; row_adv pulses on each clock where
// sel_row or sel_valid changes. All outputs are registered.
module row_sequencer
  import ac_pkg::*;
#(
  parameter int unsigned NUM_ROWS = NUM_ROWS_DEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stop,
  input  addr_mode_e  mode,
  input  logic [7:0]  num_rows,
  input  logic [15:0] dwell,
  input  logic [15:0] num_frames,
  input  logic [7:0]  fix_row,
  input  logic        sync_pulse,
  output logic        running,
  output addr_mode_e  run_mode,
  output logic        sel_valid,
  output logic [7:0]  sel_row,
  output logic        row_adv,
  output logic        frame_done,   // pulses when a frame completes
  output logic [15:0] frame_cnt,
  output logic [15:0] sync_err
);

  logic [7:0]  last_row;   // num_rows - 1, latched at start
  logic [15:0] last_cnt;   // dwell - 1, latched at start
  logic [15:0] frames;     // num_frames, latched at start
  logic [15:0] cnt;

  wire frame_end = (cnt == last_cnt) && (sel_row == last_row);
  wire cycling   = running && (run_mode == MODE_CYCLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      run_mode   <= MODE_CYCLE;
      sel_valid  <= 1'b0;
      sel_row    <= '0;
      row_adv    <= 1'b0;
      frame_done <= 1'b0;
      frame_cnt  <= '0;
      sync_err   <= '0;
      last_row   <= '0;
      last_cnt   <= '0;
      frames     <= '0;
      cnt        <= '0;
    end else begin
      row_adv    <= 1'b0;
      frame_done <= 1'b0;
      if (stop) begin
        running   <= 1'b0;
        sel_valid <= 1'b0;
        row_adv   <= sel_valid;
      end else if (start) begin
        running   <= 1'b1;
        run_mode  <= mode;
        frame_cnt <= '0;
        sync_err  <= '0;
        cnt       <= '0;
        frames    <= num_frames;
        last_cnt  <= (dwell == 0) ? 16'd0 : dwell - 16'd1;
        if (num_rows == 0)                    last_row <= 8'd0;
        else if (32'(num_rows) > NUM_ROWS)    last_row <= 8'(NUM_ROWS - 1);
        else                                  last_row <= num_rows - 8'd1;
        row_adv <= 1'b1;
        if (mode == MODE_FIXED) begin
          sel_row   <= fix_row;
          sel_valid <= 32'(fix_row) < NUM_ROWS;
        end else begin
          sel_row   <= '0;
          sel_valid <= 1'b1;
        end
      end else if (cycling) begin
        if (frame_end || sync_pulse) begin
          // Frame boundary, on schedule or forced by Sync
          if (sync_pulse && !frame_end) sync_err <= sync_err + 16'd1;
          cnt        <= '0;
          sel_row    <= '0;
          frame_cnt  <= frame_cnt + 16'd1;
          frame_done <= 1'b1;
          row_adv    <= 1'b1;
          if (frames != 0 && frame_cnt + 16'd1 == frames) begin
            running   <= 1'b0;
            sel_valid <= 1'b0;
          end
        end else if (cnt == last_cnt) begin
          cnt     <= '0;
          sel_row <= sel_row + 8'd1;
          row_adv <= 1'b1;
        end else begin
          cnt <= cnt + 16'd1;
        end
      end
    end
  end

endmodule
