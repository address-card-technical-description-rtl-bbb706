// dac_ctrl: drives the row-select DACs through shared data buses.
//
// The card has one 14-bit DAC per row. Four DACs share each 14-bit data bus
// and every DAC has its own clock-latch line, so row r sits on bus r / 4 at
// position r % 4, and 41 rows need 11 buses (the last holds one DAC). A DAC
// takes the code on its bus at the rising edge of its clock.
//
// One "write slot" loads up to one code per bus and then pulses the clock of
// the chosen DAC on each bus: the data is put on the bus on one clock
// (SETUP), the latch clocks go high on the next (CLK) and low again on the
// one after, when the next slot's data may already be loaded. A slot is
// therefore two clocks long, with data stable one clock either side of the
// latch edge.
//
// When the wanted row (tgt_valid/tgt_row) differs from the row now selected,
// the controller de-selects the old row by writing its 'off' code and selects
// the new row by writing its 'on' code. If the two rows are on different
// buses both writes go in one slot (simultaneous select/de-select, as the
// shared-bus arrangement allows); if they share a bus the de-select slot
// goes first and the select slot follows. After reset, and on every
// `refresh` pulse, it first writes every row's 'off' code, one slot per bus
// position (four slots), leaving no row selected.
//
// The bus sharing, one clock per DAC, 14-bit straight-binary codes and
// per-row on/off codes follow the card's description; the slot timing, the
// order de-select-then-select on a shared bus and the refresh sequence are
// this design's choices. A request that arrives while a transition runs is
// taken up as soon as it ends, so the sequencer's dwell should be at least five
// clocks.
module dac_ctrl
  import ac_pkg::*;
#(
  parameter int unsigned NUM_ROWS     = NUM_ROWS_DEF,
  parameter int unsigned DAC_W        = DAC_W_DEF,
  parameter int unsigned DACS_PER_BUS = DACS_PER_BUS_DEF,
  localparam int unsigned NUM_BUS     = (NUM_ROWS + DACS_PER_BUS - 1) / DACS_PER_BUS,
  localparam int unsigned SEL_W       = (DACS_PER_BUS > 1) ? $clog2(DACS_PER_BUS) : 1,
  localparam int unsigned RW          = (NUM_ROWS > 1) ? $clog2(NUM_ROWS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DAC_W-1:0]  on_code  [NUM_ROWS],
  input  logic [DAC_W-1:0]  off_code [NUM_ROWS],
  input  logic              tgt_valid,
  input  logic [7:0]        tgt_row,
  input  logic              refresh,
  output logic [DAC_W-1:0]  dac_data [NUM_BUS],
  output logic [NUM_ROWS-1:0] dac_clk,
  output logic              cur_valid,   // a row is selected on the DACs
  output logic [7:0]        cur_row,
  output logic              busy,
  output logic              ev_parallel, // pulse: select and de-select in one slot
  output logic              ev_serial,   // pulse: shared bus, two slots needed
  output logic              ev_refresh   // pulse: all-off refresh finished
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_CLK} state_e;
  state_e state;

  logic              slot_en  [NUM_BUS];
  logic [SEL_W-1:0]  slot_sel [NUM_BUS];
  logic              refresh_pend;   // all-off refresh requested
  logic              in_refresh;
  logic [SEL_W:0]    ref_k;          // bus position being refreshed
  logic              sel_pend;       // second slot (select) still to do
  logic              nxt_valid;
  logic [7:0]        nxt_row;

  function automatic int unsigned bus_of(input logic [7:0] row);
    return 32'(row) / DACS_PER_BUS;
  endfunction
  function automatic logic [SEL_W-1:0] pos_of(input logic [7:0] row);
    return SEL_W'(32'(row) % DACS_PER_BUS);
  endfunction

  // Transition planning from the current to the wanted row
  logic tgt_ok;
  logic want_des, want_sel, same_bus, change;
  always_comb begin
    tgt_ok   = tgt_valid && (32'(tgt_row) < NUM_ROWS);
    want_des = cur_valid && (!tgt_ok || tgt_row != cur_row);
    want_sel = tgt_ok && (!cur_valid || tgt_row != cur_row);
    same_bus = want_des && want_sel && (bus_of(cur_row) == bus_of(tgt_row));
    change   = want_des || want_sel;
  end

  assign busy = (state != S_IDLE) || refresh_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      refresh_pend <= 1'b1;
      in_refresh   <= 1'b0;
      ref_k        <= '0;
      sel_pend     <= 1'b0;
      nxt_valid    <= 1'b0;
      nxt_row      <= '0;
      cur_valid    <= 1'b0;
      cur_row      <= '0;
      dac_clk      <= '0;
      ev_parallel  <= 1'b0;
      ev_serial    <= 1'b0;
      ev_refresh   <= 1'b0;
      for (int b = 0; b < NUM_BUS; b++) begin
        dac_data[b] <= '0;
        slot_en[b]  <= 1'b0;
        slot_sel[b] <= '0;
      end
    end else begin
      ev_parallel <= 1'b0;
      ev_serial   <= 1'b0;
      ev_refresh  <= 1'b0;
      if (refresh) refresh_pend <= 1'b1;
      unique case (state)
        S_IDLE: begin
          dac_clk <= '0;
          if (refresh_pend || refresh) begin
            // Start the all-off refresh: slot 0 writes position 0 of every bus
            refresh_pend <= 1'b0;
            in_refresh   <= 1'b1;
            ref_k        <= '0;
            for (int b = 0; b < NUM_BUS; b++) begin
              slot_en[b]  <= (b * DACS_PER_BUS) < NUM_ROWS;
              slot_sel[b] <= '0;
              if ((b * DACS_PER_BUS) < NUM_ROWS) dac_data[b] <= off_code[b * DACS_PER_BUS];
            end
            state <= S_SETUP;
          end else if (change) begin
            nxt_valid <= tgt_ok;
            nxt_row   <= tgt_row;
            sel_pend  <= same_bus;
            ev_serial <= same_bus;
            ev_parallel <= want_des && want_sel && !same_bus;
            for (int b = 0; b < NUM_BUS; b++) slot_en[b] <= 1'b0;
            if (want_sel && !same_bus) begin
              slot_en[bus_of(tgt_row)]  <= 1'b1;
              slot_sel[bus_of(tgt_row)] <= pos_of(tgt_row);
              dac_data[bus_of(tgt_row)] <= on_code[tgt_row[RW-1:0]];
            end
            if (want_des) begin
              slot_en[bus_of(cur_row)]  <= 1'b1;
              slot_sel[bus_of(cur_row)] <= pos_of(cur_row);
              dac_data[bus_of(cur_row)] <= off_code[cur_row[RW-1:0]];
            end
            state <= S_SETUP;
          end
        end
        S_SETUP: begin
          // Data has been on the buses for one clock: latch it
          for (int b = 0; b < NUM_BUS; b++)
            for (int p = 0; p < DACS_PER_BUS; p++)
              if (b * DACS_PER_BUS + p < NUM_ROWS)
                dac_clk[b * DACS_PER_BUS + p] <= slot_en[b] && (32'(slot_sel[b]) == p);
          state <= S_CLK;
        end
        S_CLK: begin
          dac_clk <= '0;
          if (in_refresh && 32'(ref_k) + 1 < DACS_PER_BUS) begin
            ref_k <= ref_k + 1'b1;
            for (int b = 0; b < NUM_BUS; b++) begin
              slot_en[b]  <= (b * DACS_PER_BUS + 32'(ref_k) + 1) < NUM_ROWS;
              slot_sel[b] <= SEL_W'(32'(ref_k) + 1);
              if ((b * DACS_PER_BUS + 32'(ref_k) + 1) < NUM_ROWS)
                dac_data[b] <= off_code[b * DACS_PER_BUS + 32'(ref_k) + 1];
            end
            state <= S_SETUP;
          end else if (in_refresh) begin
            in_refresh <= 1'b0;
            cur_valid  <= 1'b0;
            ev_refresh <= 1'b1;
            state      <= S_IDLE;
          end else if (sel_pend) begin
            sel_pend <= 1'b0;
            for (int b = 0; b < NUM_BUS; b++) slot_en[b] <= 1'b0;
            slot_en[bus_of(nxt_row)]  <= 1'b1;
            slot_sel[bus_of(nxt_row)] <= pos_of(nxt_row);
            dac_data[bus_of(nxt_row)] <= on_code[nxt_row[RW-1:0]];
            state <= S_SETUP;
          end else begin
            cur_valid <= nxt_valid;
            cur_row   <= nxt_row;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Shared-bus rule: at most one latch clock high per data bus
  for (genvar b = 0; b < NUM_BUS; b++) begin : g_bus_rule
    localparam int unsigned LO = b * DACS_PER_BUS;
    localparam int unsigned HI = ((b + 1) * DACS_PER_BUS < NUM_ROWS) ?
                                 (b + 1) * DACS_PER_BUS - 1 : NUM_ROWS - 1;
    a_one_clk_per_bus: assert property (@(posedge clk) disable iff (!rst_n)
      $countones(dac_clk[HI:LO]) <= 1);
  end

endmodule
