// uart_rx: receiver for the serial Cmd line from the Clock Card.
//
// The Clock Card sends commands to every card over a shared (multi-dropped)
// serial line. The line format is this design's choice, since the card's
// description leaves the physical protocol to other documents: asynchronous
// 8-N-1 framing (idle high, one start bit, eight data bits LSB first, one
// stop bit) at CLKS_PER_BIT system clocks per bit.
//
// The input is synchronised through two flip-flops. A falling edge starts a
// frame; the start bit is confirmed half a bit later, and each following bit
// is sampled in the middle of its bit time. At the stop bit the receiver
// pulses `valid` with the byte, and also `ferr` if the stop bit was low (a
// framing error, reported upward as a garbled transmission).
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       ferr
);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;
  rstate_e state;

  logic [1:0]  sync_ff;
  logic [15:0] cnt;
  logic [2:0]  bitn;
  logic [7:0]  shreg;

  wire rxs = sync_ff[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_ff <= 2'b11;
      state   <= R_IDLE;
      cnt     <= '0;
      bitn    <= '0;
      shreg   <= '0;
      data    <= '0;
      valid   <= 1'b0;
      ferr    <= 1'b0;
    end else begin
      sync_ff <= {sync_ff[0], rx};
      valid   <= 1'b0;
      ferr    <= 1'b0;
      unique case (state)
        R_IDLE: begin
          cnt <= '0;
          if (!rxs) state <= R_START;
        end
        R_START: begin
          if (32'(cnt) == CLKS_PER_BIT / 2 - 1) begin
            cnt   <= '0;
            bitn  <= '0;
            state <= rxs ? R_IDLE : R_DATA;   // glitch: back to idle
          end else cnt <= cnt + 16'd1;
        end
        R_DATA: begin
          if (32'(cnt) == CLKS_PER_BIT - 1) begin
            cnt   <= '0;
            shreg <= {rxs, shreg[7:1]};
            bitn  <= bitn + 3'd1;
            if (bitn == 3'd7) state <= R_STOP;
          end else cnt <= cnt + 16'd1;
        end
        R_STOP: begin
          if (32'(cnt) == CLKS_PER_BIT - 1) begin
            cnt   <= '0;
            data  <= shreg;
            valid <= 1'b1;
            ferr  <= !rxs;
            state <= R_IDLE;
          end else cnt <= cnt + 16'd1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
