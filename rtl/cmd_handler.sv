// cmd_handler: the card's side of the command/reply protocol with the
// Clock Card (CC).
//
// The CC is the master: it sends a request, every card the request applies
// to answers it, and a card that receives a garbled request answers with an
// error notice so the CC can send it again. Reads return the data asked for;
// every other reply is a short string. These rules follow the card's
// description. The packet layout is this design's own:
//
//   request : A5  CARD  OP  PARAM  DHI  DLO  CHK        (7 bytes)
//   reply   : 5A  CARD  OP  STATUS [DHI DLO]  CHK        (5 or 7 bytes)
//
// CHK is the XOR of every byte between the preamble and CHK. CARD is the
// card address (CARD_ID, or FF for all cards); OP is WRITE, READ, GO or STOP;
// PARAM selects a row code or an addressing register (map in ac_pkg). The
// card's identity is readable too: the sensor's 64-bit ROM code serves as
// its serial number, the slot pins give its backplane slot and FW_VERSION
// its firmware version.
// Bytes before a preamble are skipped. A request is garbled if its checksum
// is wrong, a byte had a framing error, or the line falls silent for
// TIMEOUT clocks in the middle of it; a garbled request is answered with
// status BAD_CHK or TRUNCATED whatever its CARD byte. A well-formed request
// for another card gets no reply. An unknown opcode, an unknown or
// read-only PARAM for WRITE, or an unknown PARAM for READ gets BAD_CMD.
//
// Timing: the request executes on the clock after its last byte; the reply
// is handed to the transmitter byte by byte (valid/ready). A request that
// completes while the previous reply is still going out is dropped, since
// the CC waits for each reply before sending again.
module cmd_handler
  import ac_pkg::*;
#(
  parameter int unsigned NUM_ROWS = NUM_ROWS_DEF,
  parameter int unsigned DAC_W    = DAC_W_DEF,
  parameter logic [7:0]  CARD_ID  = 8'h01,
  parameter int unsigned TIMEOUT  = 200,
  parameter logic [15:0] DWELL_RST = 16'd100,
  parameter logic [15:0] FW_VERSION = 16'h0100
) (
  input  logic        clk,
  input  logic        rst_n,
  // received bytes
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_ferr,
  // reply bytes
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  input  logic        tx_ready,
  // row bias table
  output tbl_wr_t     tbl_wr,
  output logic [7:0]  tbl_rd_row,
  output logic        tbl_rd_off,
  input  logic [DAC_W-1:0] tbl_rd_data,
  input  logic        tbl_rd_valid,
  // addressing registers and control
  output addr_mode_e  mode,
  output logic [7:0]  num_rows,
  output logic [15:0] dwell,
  output logic [15:0] num_frames,
  output logic [7:0]  fix_row,
  output logic        go,
  output logic        halt,
  // status
  input  logic        running,
  input  addr_mode_e  run_mode,
  input  logic        sel_valid,
  input  logic [7:0]  sel_row,
  input  logic [15:0] frame_cnt,
  input  logic [15:0] sync_err,
  // temperature / ID sensor
  output logic        temp_req,
  input  logic [15:0] temp_data,
  input  logic [63:0] rom_id,
  input  logic [3:0]  slot_id,     // static strapping pins, read without synchronising
  input  logic        temp_busy,
  // event pulses (for diagnostics)
  output logic        ev_bad_pkt,
  output logic        ev_reply
);

  // ---------------- request assembly ----------------
  logic [7:0]  rq [1:REQ_LEN-1];   // CARD OP PARAM DHI DLO CHK
  logic [2:0]  idx;                // bytes received after the preamble + 1
  logic        ferr_seen;
  logic [15:0] tmo;
  logic        pkt_done, pkt_trunc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      ferr_seen <= 1'b0;
      tmo       <= '0;
      pkt_done  <= 1'b0;
      pkt_trunc <= 1'b0;
      for (int i = 1; i < REQ_LEN; i++) rq[i] <= '0;
    end else begin
      pkt_done  <= 1'b0;
      pkt_trunc <= 1'b0;
      if (rx_valid) begin
        tmo <= '0;
        if (idx == 0) begin
          if (rx_data == REQ_PREAMBLE && !rx_ferr) begin
            idx       <= 3'd1;
            ferr_seen <= 1'b0;
          end
        end else begin
          rq[idx]   <= rx_data;
          ferr_seen <= ferr_seen | rx_ferr;
          if (32'(idx) == REQ_LEN - 1) begin
            idx      <= '0;
            pkt_done <= 1'b1;
          end else idx <= idx + 3'd1;
        end
      end else if (idx != 0) begin
        if (32'(tmo) == TIMEOUT - 1) begin
          idx       <= '0;
          tmo       <= '0;
          pkt_trunc <= 1'b1;
        end else tmo <= tmo + 16'd1;
      end
    end
  end

  wire [7:0] q_card  = rq[1];
  wire [7:0] q_op    = rq[2];
  wire [7:0] q_param = rq[3];
  wire [15:0] q_data = {rq[4], rq[5]};
  wire [7:0] q_chk   = rq[6];
  wire       chk_ok  = ((rq[1] ^ rq[2] ^ rq[3] ^ rq[4] ^ rq[5]) == q_chk) && !ferr_seen;
  wire       for_me  = (q_card == CARD_ID) || (q_card == CARD_BCAST);

  // ---------------- parameter decode ----------------
  wire is_on_row  = (32'(q_param - P_ON_BASE)  < NUM_ROWS);
  wire is_off_row = (q_param >= P_OFF_BASE) && (32'(q_param - P_OFF_BASE) < NUM_ROWS);

  assign tbl_rd_row = is_off_row ? q_param - P_OFF_BASE : q_param - P_ON_BASE;
  assign tbl_rd_off = is_off_row;

  logic        rd_ok;
  logic [15:0] rd_val;
  always_comb begin
    rd_ok  = 1'b1;
    rd_val = '0;
    if (is_on_row || is_off_row) begin
      rd_ok  = tbl_rd_valid;
      rd_val = 16'(tbl_rd_data);
    end else begin
      unique case (q_param)
        P_MODE:     rd_val = 16'(mode);
        P_NUM_ROWS: rd_val = 16'(num_rows);
        P_DWELL:    rd_val = dwell;
        P_NUM_FRM:  rd_val = num_frames;
        P_FIX_ROW:  rd_val = 16'(fix_row);
        P_STATUS:   rd_val = {running, temp_busy, 4'(run_mode), sel_valid, 1'b0, sel_row};
        P_FRM_CNT:  rd_val = frame_cnt;
        P_SYNC_ERR: rd_val = sync_err;
        P_TEMP:     rd_val = temp_data;
        P_ID0:      rd_val = rom_id[15:0];
        P_ID0 + 1:  rd_val = rom_id[31:16];
        P_ID0 + 2:  rd_val = rom_id[47:32];
        P_ID0 + 3:  rd_val = rom_id[63:48];
        P_SLOT:     rd_val = 16'(slot_id);
        P_FW_VER:   rd_val = FW_VERSION;
        default:    rd_ok  = 1'b0;
      endcase
    end
  end

  wire wr_reg = (q_param == P_MODE) || (q_param == P_NUM_ROWS) || (q_param == P_DWELL) ||
                (q_param == P_NUM_FRM) || (q_param == P_FIX_ROW) || (q_param == P_TEMP_REQ);
  wire wr_ok  = is_on_row || is_off_row || wr_reg;

  // Outcome of the request just completed
  status_e st;
  logic    reply, with_data, exec_ok;
  always_comb begin
    st        = ST_OK;
    reply     = 1'b1;
    with_data = 1'b0;
    if (pkt_trunc)    st = ST_TRUNCATED;
    else if (!chk_ok) st = ST_BAD_CHK;
    else if (!for_me) reply = 1'b0;
    else begin
      unique case (q_op)
        OP_WRITE: if (!wr_ok) st = ST_BAD_CMD;
        OP_READ:  if (!rd_ok) st = ST_BAD_CMD; else with_data = 1'b1;
        OP_GO, OP_STOP: ;
        default:  st = ST_BAD_CMD;
      endcase
    end
    exec_ok = reply && (st == ST_OK);
  end

  // ---------------- execute and reply ----------------
  logic [7:0] rp [7];
  logic [2:0] rp_len, rp_idx;
  logic       sending;

  function automatic logic [7:0] xor4(input logic [7:0] a, b, c, d);
    return a ^ b ^ c ^ d;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode       <= MODE_CYCLE;
      num_rows   <= 8'(NUM_ROWS);
      dwell      <= DWELL_RST;
      num_frames <= '0;
      fix_row    <= '0;
      go         <= 1'b0;
      halt       <= 1'b0;
      temp_req   <= 1'b0;
      tbl_wr     <= '0;
      sending    <= 1'b0;
      rp_len     <= '0;
      rp_idx     <= '0;
      ev_bad_pkt <= 1'b0;
      ev_reply   <= 1'b0;
      for (int i = 0; i < 7; i++) rp[i] <= '0;
    end else begin
      go         <= 1'b0;
      halt       <= 1'b0;
      temp_req   <= 1'b0;
      tbl_wr     <= '0;
      ev_bad_pkt <= 1'b0;
      ev_reply   <= 1'b0;

      if (sending && tx_ready) begin
        if (rp_idx == rp_len - 3'd1) sending <= 1'b0;
        rp_idx <= rp_idx + 3'd1;
      end

      if (!sending && (pkt_done || pkt_trunc)) begin
        if (exec_ok) begin
          unique case (q_op)
            OP_WRITE: begin
              if (is_on_row || is_off_row) begin
                tbl_wr.en     <= 1'b1;
                tbl_wr.is_off <= is_off_row;
                tbl_wr.row    <= tbl_rd_row;
                tbl_wr.data   <= q_data;
              end else begin
                unique case (q_param)
                  P_MODE:     mode       <= addr_mode_e'(q_data[0]);
                  P_NUM_ROWS: num_rows   <= q_data[7:0];
                  P_DWELL:    dwell      <= q_data;
                  P_NUM_FRM:  num_frames <= q_data;
                  P_FIX_ROW:  fix_row    <= q_data[7:0];
                  default:    temp_req   <= 1'b1;   // P_TEMP_REQ
                endcase
              end
            end
            OP_GO:   go   <= 1'b1;
            OP_STOP: halt <= 1'b1;
            default: ;
          endcase
        end
        ev_bad_pkt <= (st == ST_TRUNCATED) || (st == ST_BAD_CHK);
        if (reply) begin
          ev_reply <= 1'b1;
          sending  <= 1'b1;
          rp_idx   <= '0;
          rp[0] <= RPL_PREAMBLE;
          rp[1] <= CARD_ID;
          rp[2] <= q_op;
          rp[3] <= st;
          if (with_data) begin
            rp_len <= 3'd7;
            rp[4]  <= rd_val[15:8];
            rp[5]  <= rd_val[7:0];
            rp[6]  <= xor4(CARD_ID, q_op, st, rd_val[15:8] ^ rd_val[7:0]);
          end else begin
            rp_len <= 3'd5;
            rp[4]  <= xor4(CARD_ID, q_op, st, 8'h00);
          end
        end
      end
    end
  end

  assign tx_valid = sending;
  assign tx_data  = rp[rp_idx];

endmodule
