// ac_top: Address Card FPGA.
//
// The Address Card turns on one row of first-stage SQUIDs at a time in a
// row-multiplexed SQUID readout: each of its 41 row-select lines is driven by
// a 14-bit current DAC, the selected row gets its 'on' current and all others
// their 'off' (nulling) current. This module is the card's FPGA logic:
//
//   cmd line -> uart_rx -> cmd_handler -> uart_tx -> reply line
//                              |  registers, GO/STOP
//                              v
//   sync line -> sync_edge -> row_sequencer --(wanted row)--> dac_ctrl -> DAC buses
//                              ^                                 ^
//                       row_bias_table (on/off code per row) ---+
//
//   ow_master (temperature / silicon ID sensor), jtag_bypass (JTAG chain link)
//
// The Clock Card configures the per-row codes and the frame settings with
// WRITE requests, starts addressing with GO (which first re-writes every
// row's off code) and ends it with STOP; the sequencer then walks the rows
// frame by frame, re-aligned by pulses on the Sync line, or holds one row in
// single-row mode. The DAC controller turns every change of the wanted row
// into latch-clocked writes on the shared data buses. The CC can also read
// the card's identity: slot number (slot_id pins), serial number (the
// sensor's ROM code) and firmware version (FW_VERSION).
//
// Outputs to the DACs: dac_data[b] is data bus b (rows 4b..4b+3), dac_clk[r]
// is row r's latch clock (rising edge latches). The block structure and the
// DAC array sizes follow the card's description; the serial line format,
// packet layout, clock rates and sensor sequence are this design's choices
// (see each block).
module ac_top
  import ac_pkg::*;
#(
  parameter int unsigned NUM_ROWS     = NUM_ROWS_DEF,
  parameter int unsigned DAC_W        = DAC_W_DEF,
  parameter int unsigned DACS_PER_BUS = DACS_PER_BUS_DEF,
  parameter int unsigned CLKS_PER_BIT = 8,
  parameter logic [7:0]  CARD_ID      = 8'h01,
  parameter int unsigned RX_TIMEOUT   = 40 * CLKS_PER_BIT,
  parameter int unsigned TICKS_PER_US = 50,
  parameter logic [15:0] FW_VERSION   = 16'h0100,
  localparam int unsigned NUM_BUS     = (NUM_ROWS + DACS_PER_BUS - 1) / DACS_PER_BUS
) (
  input  logic                clk,
  input  logic                rst_n,
  // CC links
  input  logic                cmd_rx,
  output logic                reply_tx,
  input  logic                sync_in,
  // backplane slot number (strapping pins)
  input  logic [3:0]          slot_id,
  // row-select DACs
  output logic [DAC_W-1:0]    dac_data [NUM_BUS],
  output logic [NUM_ROWS-1:0] dac_clk,
  // temperature / ID sensor (open drain)
  input  logic                ow_in,
  output logic                ow_low,
  // JTAG chain
  input  logic                bb_tck,
  input  logic                bb_tms,
  input  logic                bb_tdi,
  output logic                bb_tdo,
  input  logic                jtag_divert,
  output logic                dev_tck,
  output logic                dev_tms,
  output logic                dev_tdi,
  input  logic                dev_tdo,
  // status
  output logic                running,
  output logic                row_on,
  output logic [7:0]          row_sel
);

  // serial links
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, rx_ferr, tx_valid, tx_ready;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rx(cmd_rx), .data(rx_data), .valid(rx_valid), .ferr(rx_ferr));

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_data), .valid(tx_valid), .ready(tx_ready), .tx(reply_tx));

  // command handling
  tbl_wr_t     tbl_wr;
  logic [7:0]  tbl_rd_row;
  logic        tbl_rd_off, tbl_rd_valid;
  logic [DAC_W-1:0] tbl_rd_data;
  addr_mode_e  mode, run_mode;
  logic [7:0]  num_rows, fix_row, sel_row;
  logic [15:0] dwell, num_frames, frame_cnt, sync_err;
  logic        go, halt, sel_valid;
  logic        temp_req, temp_busy;
  logic [15:0] temp_data;
  logic [63:0] rom_id;

  cmd_handler #(
    .NUM_ROWS(NUM_ROWS), .DAC_W(DAC_W), .CARD_ID(CARD_ID), .TIMEOUT(RX_TIMEOUT),
    .FW_VERSION(FW_VERSION)
  ) u_cmd (
    .clk, .rst_n,
    .rx_data, .rx_valid, .rx_ferr,
    .tx_data, .tx_valid, .tx_ready,
    .tbl_wr, .tbl_rd_row, .tbl_rd_off, .tbl_rd_data, .tbl_rd_valid,
    .mode, .num_rows, .dwell, .num_frames, .fix_row, .go, .halt,
    .running, .run_mode, .sel_valid, .sel_row, .frame_cnt, .sync_err,
    .temp_req, .temp_data, .rom_id, .slot_id, .temp_busy,
    .ev_bad_pkt(), .ev_reply()
  );

  // per-row codes
  logic [DAC_W-1:0] on_code  [NUM_ROWS];
  logic [DAC_W-1:0] off_code [NUM_ROWS];

  row_bias_table #(.NUM_ROWS(NUM_ROWS), .DAC_W(DAC_W)) u_tbl (
    .clk, .rst_n, .wr(tbl_wr), .rd_row(tbl_rd_row), .rd_off(tbl_rd_off),
    .rd_data(tbl_rd_data), .rd_valid(tbl_rd_valid), .on_code, .off_code);

  // frame timing
  logic sync_pulse;
  sync_edge u_sync (.clk, .rst_n, .d(sync_in), .pulse(sync_pulse));

  row_sequencer #(.NUM_ROWS(NUM_ROWS)) u_seq (
    .clk, .rst_n, .start(go), .stop(halt), .mode, .num_rows, .dwell, .num_frames,
    .fix_row, .sync_pulse, .running, .run_mode, .sel_valid, .sel_row,
    .row_adv(), .frame_done(), .frame_cnt, .sync_err);

  // DAC drive
  logic cur_valid;
  logic [7:0] cur_row;

  dac_ctrl #(.NUM_ROWS(NUM_ROWS), .DAC_W(DAC_W), .DACS_PER_BUS(DACS_PER_BUS)) u_dac (
    .clk, .rst_n, .on_code, .off_code, .tgt_valid(sel_valid), .tgt_row(sel_row),
    .refresh(go), .dac_data, .dac_clk, .cur_valid, .cur_row, .busy(),
    .ev_parallel(), .ev_serial(), .ev_refresh());

  assign row_on  = cur_valid;
  assign row_sel = cur_row;

  // temperature / ID sensor
  ow_master #(.TICKS_PER_US(TICKS_PER_US)) u_ow (
    .clk, .rst_n, .start(temp_req), .ow_in, .ow_low, .busy(temp_busy),
    .done(), .no_device(), .temp(temp_data), .rom_id);

  // JTAG chain link
  jtag_bypass u_jtag (
    .bb_tck, .bb_tms, .bb_tdi, .bb_tdo, .divert(jtag_divert),
    .dev_tck, .dev_tms, .dev_tdi, .dev_tdo);

endmodule
