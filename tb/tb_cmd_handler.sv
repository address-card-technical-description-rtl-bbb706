// tb_cmd_handler: self-checking test of the command/reply protocol engine.
//
// Feeds request bytes straight into the handler (no serial line), with a row
// bias table attached, and collects the reply bytes through a transmitter
// stand-in that accepts a byte every few clocks. Every reply is compared
// with one built independently by the test from the packet rules. Covered:
// writes and reads of row on/off codes and of every addressing register,
// status/counter/sensor/identity read-back, GO/STOP/sensor-request pulses, broadcast
// and other-card addressing, leading junk bytes, and each kind of bad
// request (checksum, framing error, truncation, unknown opcode, read-only
// or unknown parameter).
module tb_cmd_handler;
  import ac_pkg::*;

  localparam int unsigned NR  = 41;
  localparam int unsigned W   = 14;
  localparam logic [7:0]  ID  = 8'h01;
  localparam int unsigned TMO = 60;

  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data = 0;
  logic rx_valid = 0, rx_ferr = 0;
  logic [7:0] tx_data;
  logic tx_valid, tx_ready = 0;
  tbl_wr_t tbl_wr;
  logic [7:0] tbl_rd_row;
  logic tbl_rd_off, tbl_rd_valid;
  logic [W-1:0] tbl_rd_data;
  addr_mode_e mode, run_mode = MODE_FIXED;
  logic [7:0] num_rows, fix_row, sel_row = 8'd23;
  logic [15:0] dwell, num_frames, frame_cnt = 16'h1234, sync_err = 16'h0042;
  logic go, halt, running = 1, sel_valid = 1;
  logic temp_req, temp_busy = 0;
  logic [15:0] temp_data = 16'h00AA;
  logic [63:0] rom_id = 64'h1122334455667788;
  logic [3:0]  slot_id = 4'd9;
  logic ev_bad_pkt, ev_reply;
  logic [W-1:0] on_code [NR];
  logic [W-1:0] off_code [NR];

  int checks = 0, failures = 0;
  int n_go = 0, n_halt = 0, n_treq = 0, n_bad = 0;

  cmd_handler #(.NUM_ROWS(NR), .DAC_W(W), .CARD_ID(ID), .TIMEOUT(TMO),
                .FW_VERSION(16'hBEEF)) dut (.*);

  row_bias_table #(.NUM_ROWS(NR), .DAC_W(W)) u_tbl (
    .clk, .rst_n, .wr(tbl_wr), .rd_row(tbl_rd_row), .rd_off(tbl_rd_off),
    .rd_data(tbl_rd_data), .rd_valid(tbl_rd_valid), .on_code, .off_code);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitter stand-in
  logic [7:0] rq_q [$];
  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) rq_q.push_back(tx_data);
    tx_ready <= ($urandom_range(0, 2) == 0);
    if (rst_n && go) n_go++;
    if (rst_n && halt) n_halt++;
    if (rst_n && temp_req) n_treq++;
    if (rst_n && ev_bad_pkt) n_bad++;
  end

  task automatic send_byte(input logic [7:0] b, input logic fe = 0);
    @(negedge clk);
    rx_data = b; rx_valid = 1; rx_ferr = fe;
    @(negedge clk);
    rx_valid = 0; rx_ferr = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic send_req(input logic [7:0] card, op, param, input logic [15:0] d,
                          input logic [7:0] chk_flip = 0, input int fe_at = -1);
    logic [7:0] p [7];
    p = '{REQ_PREAMBLE, card, op, param, d[15:8], d[7:0], 8'h00};
    p[6] = p[1] ^ p[2] ^ p[3] ^ p[4] ^ p[5] ^ chk_flip;
    rq_q.delete();
    for (int i = 0; i < 7; i++) send_byte(p[i], i == fe_at);
  endtask

  task automatic expect_reply(input string what, input logic [7:0] op, input logic [7:0] st,
                              input bit with_data = 0, input logic [15:0] d = 0);
    logic [7:0] e [$];
    repeat (60) @(negedge clk);
    e = '{RPL_PREAMBLE, ID, op, st};
    if (with_data) begin
      e.push_back(d[15:8]); e.push_back(d[7:0]);
      e.push_back(ID ^ op ^ st ^ d[15:8] ^ d[7:0]);
    end else e.push_back(ID ^ op ^ st);
    checks++;
    if (rq_q.size() != e.size()) begin
      failures++;
      $display("%s: reply of %0d bytes, expected %0d", what, rq_q.size(), e.size());
    end else begin
      for (int i = 0; i < e.size(); i++) begin
        checks++;
        if (rq_q[i] !== e[i]) begin
          failures++;
          $display("%s: reply byte %0d = %h, expected %h", what, i, rq_q[i], e[i]);
        end
      end
    end
  endtask

  task automatic expect_no_reply(input string what);
    repeat (60) @(negedge clk);
    checks++;
    if (rq_q.size() != 0) begin failures++; $display("%s: unexpected reply", what); end
  endtask

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s = %0d, expected %0d", what, got, exp); end
  endtask

  logic [W-1:0] m_on [NR];
  logic [W-1:0] m_off [NR];

  initial begin
    for (int r = 0; r < NR; r++) begin m_on[r] = 0; m_off[r] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // row codes: write, then read back
    for (int n = 0; n < 40; n++) begin
      int r;
      bit off;
      logic [15:0] d;
      r = $urandom_range(0, NR - 1);
      off = 1'($urandom);
      d = 16'($urandom_range(0, (1 << W) - 1));
      send_req(ID, OP_WRITE, (off ? P_OFF_BASE : P_ON_BASE) + 8'(r), d);
      expect_reply("write row", OP_WRITE, ST_OK);
      if (off) m_off[r] = W'(d); else m_on[r] = W'(d);
      expect_eq("table on", on_code[r], m_on[r]);
      expect_eq("table off", off_code[r], m_off[r]);
      send_req((n % 3 == 0) ? CARD_BCAST : ID, OP_READ, (off ? P_OFF_BASE : P_ON_BASE) + 8'(r), 0);
      expect_reply("read row", OP_READ, ST_OK, 1, 16'(off ? m_off[r] : m_on[r]));
    end

    // addressing registers
    send_req(ID, OP_WRITE, P_MODE, 16'd1);      expect_reply("mode", OP_WRITE, ST_OK);
    send_req(ID, OP_WRITE, P_NUM_ROWS, 16'd33); expect_reply("nrows", OP_WRITE, ST_OK);
    send_req(ID, OP_WRITE, P_DWELL, 16'd777);   expect_reply("dwell", OP_WRITE, ST_OK);
    send_req(ID, OP_WRITE, P_NUM_FRM, 16'd9);   expect_reply("nfrm", OP_WRITE, ST_OK);
    send_req(ID, OP_WRITE, P_FIX_ROW, 16'd12);  expect_reply("fixrow", OP_WRITE, ST_OK);
    expect_eq("mode", mode, 1);
    expect_eq("num_rows", num_rows, 33);
    expect_eq("dwell", dwell, 777);
    expect_eq("num_frames", num_frames, 9);
    expect_eq("fix_row", fix_row, 12);
    send_req(ID, OP_READ, P_DWELL, 0);    expect_reply("rd dwell", OP_READ, ST_OK, 1, 16'd777);
    send_req(ID, OP_READ, P_NUM_ROWS, 0); expect_reply("rd nrows", OP_READ, ST_OK, 1, 16'd33);
    send_req(ID, OP_READ, P_FRM_CNT, 0);  expect_reply("rd frm", OP_READ, ST_OK, 1, 16'h1234);
    send_req(ID, OP_READ, P_SYNC_ERR, 0); expect_reply("rd syncerr", OP_READ, ST_OK, 1, 16'h0042);
    send_req(ID, OP_READ, P_STATUS, 0);
    expect_reply("rd status", OP_READ, ST_OK, 1, {1'b1, 1'b0, 4'd1, 1'b1, 1'b0, 8'd23});
    send_req(ID, OP_READ, P_TEMP, 0);     expect_reply("rd temp", OP_READ, ST_OK, 1, 16'h00AA);
    send_req(ID, OP_READ, P_ID0 + 8'd2, 0); expect_reply("rd id2", OP_READ, ST_OK, 1, 16'h3344);
    send_req(ID, OP_READ, P_SLOT, 0);     expect_reply("rd slot", OP_READ, ST_OK, 1, 16'd9);
    send_req(ID, OP_READ, P_FW_VER, 0);   expect_reply("rd fw", OP_READ, ST_OK, 1, 16'hBEEF);
    send_req(ID, OP_WRITE, P_FW_VER, 16'd1); expect_reply("wr fw", OP_WRITE, ST_BAD_CMD);

    // control
    send_req(ID, OP_GO, 0, 0);   expect_reply("go", OP_GO, ST_OK);
    send_req(ID, OP_STOP, 0, 0); expect_reply("stop", OP_STOP, ST_OK);
    send_req(ID, OP_WRITE, P_TEMP_REQ, 0); expect_reply("treq", OP_WRITE, ST_OK);
    expect_eq("go pulses", n_go, 1);
    expect_eq("stop pulses", n_halt, 1);
    expect_eq("sensor requests", n_treq, 1);

    // addressing
    send_req(8'h05, OP_GO, 0, 0); expect_no_reply("other card");
    expect_eq("go for other card", n_go, 1);
    send_req(CARD_BCAST, OP_GO, 0, 0); expect_reply("bcast go", OP_GO, ST_OK);
    expect_eq("bcast go pulses", n_go, 2);

    // junk before the preamble
    rq_q.delete();
    send_byte(8'h13); send_byte(8'h00);
    send_req(ID, OP_READ, P_FIX_ROW, 0); expect_reply("junk", OP_READ, ST_OK, 1, 16'd12);

    // garbled requests
    send_req(ID, OP_WRITE, P_ON_BASE + 8'd3, 16'h0abc, 8'h10);
    expect_reply("bad chk", OP_WRITE, ST_BAD_CHK);
    expect_eq("garbled write ignored", on_code[3], m_on[3]);
    send_req(ID, OP_WRITE, P_ON_BASE + 8'd4, 16'h0abc, 0, 4);
    expect_reply("framing", OP_WRITE, ST_BAD_CHK);
    expect_eq("framing write ignored", on_code[4], m_on[4]);
    send_req(8'h07, OP_GO, 0, 0, 8'h01);    // garbled, whoever it was for
    expect_reply("bad chk other card", OP_GO, ST_BAD_CHK);
    expect_eq("garbled go ignored", n_go, 2);
    // truncated: preamble and three bytes, then silence
    rq_q.delete();
    send_byte(REQ_PREAMBLE); send_byte(ID); send_byte(OP_STOP); send_byte(8'h00);
    repeat (TMO + 10) @(negedge clk);
    expect_reply("truncated", OP_STOP, ST_TRUNCATED);
    expect_eq("truncated stop ignored", n_halt, 1);
    expect_eq("bad packets", n_bad, 4);
    // well-formed but wrong
    send_req(ID, 8'h09, 0, 0);                      expect_reply("bad op", 8'h09, ST_BAD_CMD);
    send_req(ID, OP_WRITE, P_FRM_CNT, 16'd5);       expect_reply("ro param", OP_WRITE, ST_BAD_CMD);
    send_req(ID, OP_READ, 8'h3F, 0);                expect_reply("no row", OP_READ, ST_BAD_CMD);
    send_req(ID, OP_WRITE, P_OFF_BASE + 8'd41, 16'd5); expect_reply("no off row", OP_WRITE, ST_BAD_CMD);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
