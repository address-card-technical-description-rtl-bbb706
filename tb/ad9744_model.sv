// ad9744_model: behavioural model of one AD9744 14-bit current-output DAC
// as used on the row-select lines (not synthesizable intent; simulation only).
//
// The part latches its straight-binary input word on the rising edge of its
// clock and drives a current proportional to it, 0 to 20 mA full scale.
// The model keeps the latched code and gives the output current in
// microamps as an integer (code * 20000 / 16383, rounded down). The output
// settles immediately; analog settling is not modelled.
module ad9744_model #(
  parameter int unsigned BITS = 14
) (
  input  logic            clk,
  input  logic [BITS-1:0] d,
  output logic [BITS-1:0] code,
  output int unsigned     i_ua
);

  initial code = '0;

  always @(posedge clk) code <= d;

  assign i_ua = (32'(code) * 20000) / ((1 << BITS) - 1);

endmodule
