// ow_master: reads the card's DS18S20 temperature sensor / silicon ID.
//
// The card carries one DS18S20 on a 1-Wire line; it serves both as the board
// temperature sensor and as the card's silicon serial number, and the Clock
// Card asks the card for it. The card's description names the part and its
// two uses only; the 1-Wire sequence below follows the sensor's published
// protocol and the whole block is this design's own.
//
// One `start` pulse runs the full read:
//   reset/presence, READ ROM (33h), read 64-bit ROM code      -> rom_id
//   reset/presence, SKIP ROM (CCh), CONVERT T (44h),
//   read time slots until the sensor returns 1 (conversion done)
//   reset/presence, SKIP ROM (CCh), READ SCRATCHPAD (BEh),
//   read 16 bits (temperature LSB then MSB)                  -> temp
// `done` pulses at the end; `no_device` is set if a reset saw no presence
// pulse (the sequence then stops). Bits go LSB first.
//
// Timing, in microseconds of TICKS_PER_US clocks each: reset low 480, sample
// presence 70 after release, slot 70 long; write-1 and read pull the line low
// for 6, write-0 for 60; a read samples at 15. The line is open-drain:
// `ow_low` = 1 pulls it low, `ow_in` is the line level (synchronised here).
module ow_master #(
  parameter int unsigned TICKS_PER_US = 50
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        ow_in,
  output logic        ow_low,
  output logic        busy,
  output logic        done,
  output logic        no_device,
  output logic [15:0] temp,
  output logic [63:0] rom_id
);

  // ---------------- bit engine ----------------
  typedef enum logic [1:0] {K_RST, K_W0, K_W1, K_RD} kind_e;

  kind_e       kind;
  logic        bit_go, bit_busy, bit_done, bit_val;
  logic [15:0] tick;
  logic [9:0]  us;
  logic [1:0]  in_ff;

  logic [9:0] t_low, t_smp, t_end;
  always_comb begin
    unique case (kind)
      K_RST:   begin t_low = 10'd480; t_smp = 10'd550; t_end = 10'd960; end
      K_W0:    begin t_low = 10'd60;  t_smp = 10'd15;  t_end = 10'd70;  end
      default: begin t_low = 10'd6;   t_smp = 10'd15;  t_end = 10'd70;  end
    endcase
  end

  wire us_tick = (32'(tick) == TICKS_PER_US - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_ff    <= 2'b11;
      tick     <= '0;
      us       <= '0;
      bit_busy <= 1'b0;
      bit_done <= 1'b0;
      bit_val  <= 1'b0;
      ow_low   <= 1'b0;
    end else begin
      in_ff    <= {in_ff[0], ow_in};
      bit_done <= 1'b0;
      if (bit_go) begin
        bit_busy <= 1'b1;
        tick     <= '0;
        us       <= '0;
        ow_low   <= 1'b1;
      end else if (bit_busy) begin
        tick <= us_tick ? 16'd0 : tick + 16'd1;
        if (us_tick) begin
          us <= us + 10'd1;
          if (us + 10'd1 == t_low) ow_low <= 1'b0;
          if (us + 10'd1 == t_smp) bit_val <= in_ff[1];
          if (us + 10'd1 == t_end) begin
            bit_busy <= 1'b0;
            bit_done <= 1'b1;
          end
        end
      end
    end
  end

  // ---------------- transaction sequencer ----------------
  typedef enum logic [3:0] {
    Q_IDLE, Q_RST1, Q_RDROM_CMD, Q_RDROM, Q_RST2, Q_SKIP2, Q_CONV, Q_POLL,
    Q_RST3, Q_SKIP3, Q_RDSP_CMD, Q_RDSP, Q_DONE
  } step_e;

  step_e      step;
  logic       wait_bit;    // a bit slot is in flight
  logic [6:0] nbit;        // bits done in this step

  // command byte and bit count of the current step
  logic [7:0] cmd;
  logic [6:0] nbits;
  always_comb begin
    cmd   = 8'h00;
    nbits = 7'd8;
    unique case (step)
      Q_RDROM_CMD:                cmd = 8'h33;
      Q_SKIP2, Q_SKIP3:           cmd = 8'hCC;
      Q_CONV:                     cmd = 8'h44;
      Q_RDSP_CMD:                 cmd = 8'hBE;
      Q_RDROM:                    nbits = 7'd64;
      Q_RDSP:                     nbits = 7'd16;
      default: ;
    endcase
  end

  wire is_rst   = (step == Q_RST1) || (step == Q_RST2) || (step == Q_RST3);
  wire is_read  = (step == Q_RDROM) || (step == Q_RDSP) || (step == Q_POLL);
  wire step_end = is_rst || (step == Q_POLL) || (nbit + 7'd1 == nbits);

  assign busy = (step != Q_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step      <= Q_IDLE;
      wait_bit  <= 1'b0;
      nbit      <= '0;
      bit_go    <= 1'b0;
      kind      <= K_RST;
      done      <= 1'b0;
      no_device <= 1'b0;
      temp      <= '0;
      rom_id    <= '0;
    end else begin
      bit_go <= 1'b0;
      done   <= 1'b0;
      if (step == Q_IDLE) begin
        if (start) begin
          step      <= Q_RST1;
          nbit      <= '0;
          no_device <= 1'b0;
        end
      end else if (step == Q_DONE) begin
        done <= 1'b1;
        step <= Q_IDLE;
      end else if (!wait_bit) begin
        // launch the next slot of this step
        wait_bit <= 1'b1;
        bit_go   <= 1'b1;
        if (is_rst)       kind <= K_RST;
        else if (is_read) kind <= K_RD;
        else              kind <= cmd[nbit[2:0]] ? K_W1 : K_W0;
      end else if (bit_done) begin
        wait_bit <= 1'b0;
        if (step == Q_RDROM) rom_id <= {bit_val, rom_id[63:1]};
        if (step == Q_RDSP)  temp   <= {bit_val, temp[15:1]};
        if (is_rst && bit_val) begin
          // no presence pulse: nobody answered
          no_device <= 1'b1;
          step      <= Q_DONE;
        end else if (step == Q_POLL) begin
          if (bit_val) step <= Q_RST3;   // conversion finished
        end else if (step_end) begin
          nbit <= '0;
          step <= step_e'(step + 4'd1);
        end else begin
          nbit <= nbit + 7'd1;
        end
      end
    end
  end

endmodule
