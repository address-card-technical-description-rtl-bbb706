// uart_tx: transmitter for the card's replies to the Clock Card.
//
// Sends bytes in the same 8-N-1 format the receiver accepts (idle high,
// start bit, eight data bits LSB first, stop bit) at CLKS_PER_BIT clocks per
// bit, so replies are always whole bytes. The framing is this design's
// choice; the card's description only asks for byte-aligned replies.
//
// Handshake: a byte is taken when `valid` and `ready` are both high; `ready`
// stays low until its stop bit has been sent. `tx` idles high.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       tx
);

  logic [9:0]  shreg;    // stop, data[7:0], start
  logic [3:0]  bits_left;
  logic [15:0] cnt;

  assign ready = (bits_left == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      tx        <= 1'b1;
    end else if (bits_left == 0) begin
      tx <= 1'b1;
      if (valid) begin
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        cnt       <= '0;
        tx        <= 1'b0;     // start bit goes out at once
      end
    end else if (32'(cnt) == CLKS_PER_BIT - 1) begin
      cnt       <= '0;
      bits_left <= bits_left - 4'd1;
      shreg     <= {1'b1, shreg[9:1]};
      tx        <= (bits_left == 1) ? 1'b1 : shreg[1];
    end else begin
      cnt <= cnt + 16'd1;
    end
  end

endmodule
