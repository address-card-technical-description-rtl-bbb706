// row_bias_table: per-row 'on' and 'off' DAC codes.
//
// Selecting a row means driving its DAC with the row's selection current and
// every other row's DAC with that row's de-selection (nulling) current; both
// may differ from row to row, so the card keeps two codes per row. This
// block holds them in two register arrays of NUM_ROWS x DAC_W bits. One write
// port (from the command handler) updates one code per clock. Every code is
// visible at once on the on_code/off_code outputs, so the DAC controller can
// fetch one code per data bus in the same cycle; rd_row/rd_off give a
// combinational read port for command read-back.
//
// Timing: a write takes effect on the next clock edge. Reset clears every
// code to zero (0 mA); the reset value is this design's choice.
module row_bias_table
  import ac_pkg::*;
#(
  parameter int unsigned NUM_ROWS = NUM_ROWS_DEF,
  parameter int unsigned DAC_W    = DAC_W_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  tbl_wr_t              wr,
  input  logic [7:0]           rd_row,
  input  logic                 rd_off,
  output logic [DAC_W-1:0]     rd_data,
  output logic                 rd_valid,   // rd_row is a real row
  output logic [DAC_W-1:0]     on_code  [NUM_ROWS],
  output logic [DAC_W-1:0]     off_code [NUM_ROWS]
);

  localparam int unsigned RW = (NUM_ROWS > 1) ? $clog2(NUM_ROWS) : 1;  // row index width

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_ROWS; r++) begin
        on_code[r]  <= '0;
        off_code[r] <= '0;
      end
    end else if (wr.en && 32'(wr.row) < NUM_ROWS) begin
      if (wr.is_off) off_code[wr.row[RW-1:0]] <= wr.data[DAC_W-1:0];
      else           on_code[wr.row[RW-1:0]]  <= wr.data[DAC_W-1:0];
    end
  end

  always_comb begin
    rd_valid = 32'(rd_row) < NUM_ROWS;
    rd_data  = '0;
    if (rd_valid) rd_data = rd_off ? off_code[rd_row[RW-1:0]] : on_code[rd_row[RW-1:0]];
  end

endmodule
