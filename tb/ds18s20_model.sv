// ds18s20_model: behavioural model of a DS18S20 1-Wire temperature sensor
// (simulation only).
//
// It watches the open-drain line on a clock of TICKS_PER_US cycles per
// microsecond. A low pulse of 400 us or more is a reset: the model answers
// with a presence pulse (low from 30 to 130 us after the line rises). After
// a reset it takes a ROM command (READ ROM 33h: send the 64-bit ROM code;
// SKIP ROM CCh: take a function command), and then CONVERT T 44h (answer
// CONV_SLOTS read slots with 0, then 1) or READ SCRATCHPAD BEh (send the
// nine scratchpad bytes, temperature first). A written bit is 1 if the
// master's low pulse was shorter than 15 us. To send a 0 in a read slot the
// model holds the line low for 30 us from the master's falling edge.
// Bits travel LSB first.
module ds18s20_model #(
  parameter int unsigned TICKS_PER_US = 2,
  parameter logic [63:0] ROM          = 64'hC400_0801_2345_6710,
  parameter logic [15:0] TEMP         = 16'h0032,
  parameter int unsigned CONV_SLOTS   = 5
) (
  input  logic clk,
  input  logic line,
  output logic pull_low
);

  typedef enum {M_IDLE, M_ROMCMD, M_TXROM, M_FNCMD, M_CONV, M_TXSP, M_DONE} mstate_e;
  mstate_e st = M_IDLE;

  logic        line_d = 1, own_d = 0;
  int unsigned t_fall = 0, now = 0, drive_until = 0, drive_from = 0;
  logic [7:0]  rx_byte = 0;
  int          nbit = 0, conv_left = 0;
  logic [71:0] sp;
  int          n_reset = 0, n_cmd = 0;

  initial pull_low = 0;
  assign sp = {8'hA5, 8'h10, 8'h0C, 8'hFF, 8'hFF, 8'h46, 8'h4B, TEMP};

  function automatic logic tx_bit(input mstate_e s, input int n);
    if (s == M_TXROM) return ROM[n];
    if (s == M_TXSP)  return sp[n];
    return conv_left == 0;
  endfunction

  always @(posedge clk) begin
    now++;
    line_d <= line;
    own_d  <= pull_low;
    pull_low <= (now >= drive_from) && (now < drive_until);
    if (line_d && !line && !pull_low) begin
      // master falling edge
      t_fall = now;
      if (st == M_TXROM || st == M_TXSP || st == M_CONV) begin
        if (!tx_bit(st, nbit)) begin
          drive_from  = now;
          drive_until = now + 30 * TICKS_PER_US;
        end
        if (st == M_CONV) begin
          if (conv_left > 0) conv_left--;
        end else begin
          nbit++;
          if (st == M_TXROM && nbit == 64) st = M_DONE;
          if (st == M_TXSP && nbit == 72)  st = M_DONE;
        end
      end
    end
    if (!line_d && line && !own_d) begin
      // master rising edge
      int unsigned low_us;
      low_us = (now - t_fall) / TICKS_PER_US;
      if (low_us >= 400) begin
        n_reset++;
        drive_from  = now + 30 * TICKS_PER_US;
        drive_until = now + 130 * TICKS_PER_US;
        st = M_ROMCMD; nbit = 0;
      end else if (st == M_ROMCMD || st == M_FNCMD) begin
        rx_byte = {(low_us < 15) ? 1'b1 : 1'b0, rx_byte[7:1]};
        nbit++;
        if (nbit == 8) begin
          n_cmd++;
          nbit = 0;
          if (st == M_ROMCMD)
            st = (rx_byte == 8'h33) ? M_TXROM : (rx_byte == 8'hCC) ? M_FNCMD : M_DONE;
          else if (rx_byte == 8'h44) begin st = M_CONV; conv_left = CONV_SLOTS; end
          else if (rx_byte == 8'hBE) st = M_TXSP;
          else st = M_DONE;
        end
      end
    end
  end

endmodule
