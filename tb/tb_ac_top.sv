// tb_ac_top: end-to-end test of the Address Card FPGA at its default sizes.
//
// The test plays the Clock Card: it sends requests over the serial Cmd line,
// decodes the replies from the reply line, pulses the Sync line, and watches
// the 41 row-select DACs through behavioural DAC models on the card's 11
// shared data buses. A DS18S20 model sits on the 1-Wire line. Steps:
//   1. program distinct on/off codes for all 41 rows, read some back;
//   2. run two frames of 41 rows in addressing mode and check, from the DAC
//      outputs alone, that rows come on one at a time in order 0..40, that
//      each row stays on for the programmed dwell (allowing the two extra
//      clocks a shared-bus change takes, and the all-off refresh before the
//      first row), and that all rows end off;
//   3. free-run with one Sync on the frame boundary (no error) and one off it
//      (sync error, row 0 restarted), then STOP;
//   4. hold one row in single-row mode, then STOP;
//   5. send a request with a bad checksum, one cut short, and one with an
//      unknown opcode, and check the error replies;
//   6. read the sensor's temperature and ROM code, the slot number and the
//      firmware version through the card;
//   7. check the JTAG chain link both ways.
// Each mechanism (all-off refresh, one-slot select/de-select, shared-bus
// two-slot change, frame-count stop, on-time and off-time Sync, single-row
// hold, each error reply, sensor read) is counted and must happen at least
// once. The top keeps every parameter at its default.
module tb_ac_top;
  import ac_pkg::*;

  localparam int unsigned NR    = NUM_ROWS_DEF;
  localparam int unsigned W     = DAC_W_DEF;
  localparam int unsigned DPB   = DACS_PER_BUS_DEF;
  localparam int unsigned NB    = (NR + DPB - 1) / DPB;
  localparam int unsigned CPB   = 8;      // ac_top default CLKS_PER_BIT
  localparam int unsigned TPU   = 50;     // ac_top default TICKS_PER_US
  localparam logic [7:0]  ID    = 8'h01;  // ac_top default CARD_ID
  localparam int unsigned DWELL = 20;
  localparam logic [63:0] ROM   = 64'h2800_0801_89AB_CD10;
  localparam logic [15:0] TEMP  = 16'h0037;

  logic clk = 0, rst_n = 0;
  logic cmd_rx = 1, reply_tx, sync_in = 0;
  logic [W-1:0] dac_data [NB];
  logic [NR-1:0] dac_clk;
  logic ow_low, dev_low;
  wire  line = !(ow_low || dev_low);
  logic bb_tck = 0, bb_tms = 0, bb_tdi = 0, bb_tdo, jtag_divert = 0;
  logic dev_tck, dev_tms, dev_tdi, dev_tdo = 0;
  logic running, row_on;
  logic [7:0] row_sel;

  ac_top dut (
    .clk, .rst_n, .cmd_rx, .reply_tx, .sync_in, .slot_id(4'd1), .dac_data, .dac_clk,
    .ow_in(line), .ow_low, .bb_tck, .bb_tms, .bb_tdi, .bb_tdo, .jtag_divert,
    .dev_tck, .dev_tms, .dev_tdi, .dev_tdo, .running, .row_on, .row_sel);

  logic [W-1:0] code [NR];
  int unsigned  i_ua [NR];
  for (genvar r = 0; r < NR; r++) begin : g_dac
    ad9744_model #(.BITS(W)) u_dac (.clk(dac_clk[r]), .d(dac_data[r / DPB]),
                                    .code(code[r]), .i_ua(i_ua[r]));
  end

  ds18s20_model #(.TICKS_PER_US(TPU), .ROM(ROM), .TEMP(TEMP)) u_sensor (
    .clk, .line, .pull_low(dev_low));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%0t %s = %0h, expected %0h", $time, what, got, exp); end
  endtask

  // ---------------- row codes and DAC observation ----------------
  function automatic logic [W-1:0] on_of(input int r);  return W'(14'h2000 + r * 37); endfunction
  function automatic logic [W-1:0] off_of(input int r); return W'(14'h0100 + r * 3);  endfunction

  // rows currently on, as seen on the DACs
  int  n_on;
  int  on_row;
  always_comb begin
    n_on = 0; on_row = -1;
    for (int r = 0; r < NR; r++) if (code[r] == on_of(r)) begin n_on++; on_row = r; end
  end

  int   act_row [$];     // rows in order of switching on
  longint act_time [$];
  longint cyc = 0;
  int   last_on = -1;
  int   n_two = 0;
  always @(posedge clk) begin
    cyc++;
    #1;
    if (n_on > 1) n_two++;
    if (n_on == 1 && on_row != last_on) begin
      act_row.push_back(on_row);
      act_time.push_back(cyc);
    end
    last_on = (n_on == 1) ? on_row : -1;
  end

  // mechanism counters, all taken from the card's pins: an all-off refresh
  // slot raises the latch clocks of (nearly) every bus at once, a one-slot
  // row change raises exactly two; shared-bus changes are counted where the
  // row timing of step 2 confirms them
  int m_ref_slots = 0, m_refresh = 0, m_par = 0, m_ser = 0, m_sync_on = 0, m_sync_off = 0;
  int m_frame_stop = 0, m_fixed = 0, m_badchk = 0, m_trunc = 0, m_badcmd = 0, m_temp = 0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(dac_clk) >= NB - 1) m_ref_slots++;
    if ($countones(dac_clk) == 2)      m_par++;
    m_refresh = m_ref_slots / DPB;
  end

  // ---------------- serial link ----------------
  logic [7:0] rpl_q [$];
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge reply_tx);
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        b[i] = reply_tx;
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (reply_tx !== 1'b1) begin failures++; $display("reply stop bit missing"); end
      rpl_q.push_back(b);
    end
  end

  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      cmd_rx = f[i];
      repeat (CPB) @(negedge clk);
    end
    cmd_rx = 1;
    repeat (2) @(negedge clk);
  endtask

  task automatic send_raw(input logic [7:0] op, param, input logic [15:0] d, input logic [7:0] flip,
                          input int nbytes);
    logic [7:0] p [7];
    p = '{REQ_PREAMBLE, ID, op, param, d[15:8], d[7:0], 8'h00};
    p[6] = p[1] ^ p[2] ^ p[3] ^ p[4] ^ p[5] ^ flip;
    rpl_q.delete();
    for (int i = 0; i < nbytes; i++) send_byte(p[i]);
  endtask

  // wait for a reply of n bytes; check framing; return status and data
  task automatic get_reply(input int n, input logic [7:0] op, output logic [7:0] st,
                           output logic [15:0] d);
    int t = 0;
    logic [7:0] x;
    while (rpl_q.size() < n && t < 20000) begin @(negedge clk); t++; end
    repeat (4 * CPB) @(negedge clk);
    st = 8'hEE; d = '0;
    checks++;
    if (rpl_q.size() != n) begin
      failures++;
      $display("%0t reply of %0d bytes, expected %0d", $time, rpl_q.size(), n);
      return;
    end
    expect_eq("reply preamble", rpl_q[0], RPL_PREAMBLE);
    expect_eq("reply card", rpl_q[1], ID);
    expect_eq("reply op", rpl_q[2], op);
    st = rpl_q[3];
    x = 0;
    for (int i = 1; i < n - 1; i++) x ^= rpl_q[i];
    expect_eq("reply checksum", rpl_q[n - 1], x);
    if (n == 7) d = {rpl_q[4], rpl_q[5]};
  endtask

  task automatic wr(input logic [7:0] param, input logic [15:0] d);
    logic [7:0] st;
    logic [15:0] x;
    send_raw(OP_WRITE, param, d, 0, 7);
    get_reply(5, OP_WRITE, st, x);
    expect_eq("write status", st, ST_OK);
  endtask

  task automatic rd(input logic [7:0] param, output logic [15:0] d);
    logic [7:0] st;
    send_raw(OP_READ, param, 0, 0, 7);
    get_reply(7, OP_READ, st, d);
    expect_eq("read status", st, ST_OK);
  endtask

  task automatic ctl(input logic [7:0] op);
    logic [7:0] st;
    logic [15:0] x;
    send_raw(op, 0, 0, 0, 7);
    get_reply(5, op, st, x);
    expect_eq("control status", st, ST_OK);
  endtask

  task automatic expect_all_off(input string what);
    for (int r = 0; r < NR; r++) expect_eq({what, " row off"}, code[r], off_of(r));
  endtask

  // ---------------- the run ----------------
  initial begin
    logic [15:0] d;
    logic [7:0]  st;
    int k;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);

    // 1. row codes
    for (int r = 0; r < NR; r++) begin
      wr(P_ON_BASE + 8'(r), 16'(on_of(r)));
      wr(P_OFF_BASE + 8'(r), 16'(off_of(r)));
    end
    for (int r = 0; r < NR; r += 8) begin
      rd(P_ON_BASE + 8'(r), d);  expect_eq("read on", d, on_of(r));
      rd(P_OFF_BASE + 8'(r), d); expect_eq("read off", d, off_of(r));
    end

    // 2. two frames of all rows
    wr(P_MODE, 16'(MODE_CYCLE));
    wr(P_NUM_ROWS, 16'(NR));
    wr(P_DWELL, 16'(DWELL));
    wr(P_NUM_FRM, 16'd2);
    act_row.delete(); act_time.delete();
    ctl(OP_GO);
    k = 0;
    while (running && k < 100000) begin @(negedge clk); k++; end
    repeat (20) @(negedge clk);
    if (!running) m_frame_stop++;
    expect_eq("rows switched on", act_row.size(), 2 * NR);
    for (int i = 0; i < act_row.size(); i++) begin
      expect_eq("row order", act_row[i], i % NR);
      if (i > 0) begin
        int lat_prev, lat_now;
        lat_prev = (i > 1 && act_row[i - 2] / DPB == act_row[i - 1] / DPB) ? 5 : 3;
        // the first row of a run follows the all-off refresh (one slot per bus position)
        if (i == 1) lat_prev = 3 + 2 * DPB;
        lat_now  = (act_row[i - 1] / DPB == act_row[i] / DPB) ? 5 : 3;
        expect_eq("row dwell", act_time[i] - act_time[i - 1], DWELL + lat_now - lat_prev);
        if (lat_now == 5 && act_time[i] - act_time[i - 1] == DWELL + lat_now - lat_prev) m_ser++;
      end
    end
    expect_eq("never two rows on", n_two, 0);
    expect_all_off("after frames");
    rd(P_FRM_CNT, d); expect_eq("frames done", d, 2);

    // 3. free run with Sync
    wr(P_NUM_FRM, 16'd0);
    act_row.delete(); act_time.delete();
    ctl(OP_GO);
    // on-time Sync: raise it so the synchronised pulse lands on the frame's
    // last clock. The last row's DAC is latched 2 clocks after the sequencer
    // moves to it, and the Sync synchroniser adds 2 more.
    k = 0;
    while (!(act_row.size() > 0 && act_row[$] == NR - 1) && k < 100000) begin
      @(negedge clk); k++;
    end
    repeat (DWELL - 5) @(negedge clk);
    sync_in = 1; repeat (4) @(negedge clk); sync_in = 0;
    repeat (10) @(negedge clk);
    rd(P_SYNC_ERR, d);
    expect_eq("on-time sync no error", d, 0);
    if (d == 0) m_sync_on++;
    // off-time Sync in the middle of a frame
    k = 0;
    act_row.delete(); act_time.delete();
    while (!(act_row.size() > 0 && act_row[$] == 12) && k < 100000) begin @(negedge clk); k++; end
    repeat (6) @(negedge clk);
    act_row.delete(); act_time.delete();
    sync_in = 1; repeat (4) @(negedge clk); sync_in = 0;
    repeat (15) @(negedge clk);
    expect_eq("row after off-time sync", act_row.size() > 0 ? act_row[0] : -1, 0);
    rd(P_SYNC_ERR, d);
    expect_eq("off-time sync counted", d, 1);
    if (d == 1) m_sync_off++;
    ctl(OP_STOP);
    repeat (20) @(negedge clk);
    expect_eq("running after stop", running, 0);
    expect_all_off("after stop");

    // 4. single-row hold
    wr(P_MODE, 16'(MODE_FIXED));
    wr(P_FIX_ROW, 16'd17);
    ctl(OP_GO);
    repeat (5 * DWELL * NR) @(negedge clk);
    for (int r = 0; r < NR; r++) expect_eq("fixed row", code[r], r == 17 ? on_of(r) : off_of(r));
    rd(P_STATUS, d);
    expect_eq("status row", d[7:0], 17);
    expect_eq("status mode", d[13:10], MODE_FIXED);
    if (code[17] == on_of(17)) m_fixed++;
    ctl(OP_STOP);
    repeat (20) @(negedge clk);
    expect_all_off("after hold");

    // 5. garbled and wrong requests
    send_raw(OP_WRITE, P_DWELL, 16'd5, 8'h40, 7);
    get_reply(5, OP_WRITE, st, d);
    expect_eq("bad checksum status", st, ST_BAD_CHK);
    if (st == ST_BAD_CHK) m_badchk++;
    send_raw(OP_WRITE, P_DWELL, 16'd5, 8'h00, 4);
    get_reply(5, OP_WRITE, st, d);
    expect_eq("truncated status", st, ST_TRUNCATED);
    if (st == ST_TRUNCATED) m_trunc++;
    send_raw(8'h7E, 0, 0, 0, 7);
    get_reply(5, 8'h7E, st, d);
    expect_eq("bad opcode status", st, ST_BAD_CMD);
    if (st == ST_BAD_CMD) m_badcmd++;
    rd(P_DWELL, d); expect_eq("dwell unchanged by bad requests", d, DWELL);

    // 6. sensor
    wr(P_TEMP_REQ, 16'd0);
    k = 0;
    do begin
      repeat (20000) @(negedge clk);
      rd(P_STATUS, d);
      k++;
    end while (d[14] && k < 200);
    rd(P_TEMP, d); expect_eq("temperature", d, TEMP);
    if (d == TEMP) m_temp++;
    for (int i = 0; i < 4; i++) begin
      rd(P_ID0 + 8'(i), d);
      expect_eq("rom id word", d, ROM[16 * i +: 16]);
    end
    rd(P_SLOT, d);   expect_eq("slot number", d, 1);
    rd(P_FW_VER, d); expect_eq("firmware version", d, 16'h0100);

    // 7. JTAG chain link
    for (int v = 0; v < 8; v++) begin
      {jtag_divert, bb_tdi, dev_tdo} = 3'(v);
      #1;
      expect_eq("jtag tdo", bb_tdo, jtag_divert ? dev_tdo : bb_tdi);
      expect_eq("jtag tdi", dev_tdi, jtag_divert ? bb_tdi : 1'b1);
    end

    // mechanisms
    $display("refresh=%0d parallel=%0d shared_bus=%0d frame_stop=%0d sync_on=%0d sync_off=%0d",
             m_refresh, m_par, m_ser, m_frame_stop, m_sync_on, m_sync_off);
    $display("fixed=%0d bad_chk=%0d truncated=%0d bad_cmd=%0d sensor=%0d",
             m_fixed, m_badchk, m_trunc, m_badcmd, m_temp);
    checks += 11;
    if (m_refresh < 2)    begin failures++; $display("refresh never happened"); end
    if (m_par == 0)       begin failures++; $display("one-slot change never happened"); end
    if (m_ser == 0)       begin failures++; $display("shared-bus change never happened"); end
    if (m_frame_stop == 0) begin failures++; $display("frame-count stop never happened"); end
    if (m_sync_on == 0)   begin failures++; $display("on-time sync never happened"); end
    if (m_sync_off == 0)  begin failures++; $display("off-time sync never happened"); end
    if (m_fixed == 0)     begin failures++; $display("single-row hold never happened"); end
    if (m_badchk == 0)    begin failures++; $display("checksum error never happened"); end
    if (m_trunc == 0)     begin failures++; $display("truncation never happened"); end
    if (m_badcmd == 0)    begin failures++; $display("bad command never happened"); end
    if (m_temp == 0)      begin failures++; $display("sensor read never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
