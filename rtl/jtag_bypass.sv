// jtag_bypass: the card's link in the backplane JTAG chain.
//
// The JTAG chain runs point to point through the cards, and each card is a
// removable link in it. TCK and TMS are shared by every device (multi-tapped)
// while TDI and TDO are diverted: with the card inserted the chain's data
// passes through the card's own devices (FPGA, configuration device); with
// it absent, or its devices held out of the chain, the backplane keeps the
// chain continuous. This block is the logic view of that switch, following
// the card's description; the `divert` control input and the purely
// combinational path are this design's choices.
//
// Ports: bb_* are the backplane side, dev_* the card's device chain. When
// `divert` is high, bb_tdi feeds dev_tdi and dev_tdo drives bb_tdo; when low,
// bb_tdi goes straight to bb_tdo and the card's chain sees TDI held high
// (JTAG's idle level).
module jtag_bypass (
  input  logic bb_tck,
  input  logic bb_tms,
  input  logic bb_tdi,
  output logic bb_tdo,
  input  logic divert,
  output logic dev_tck,
  output logic dev_tms,
  output logic dev_tdi,
  input  logic dev_tdo
);

  assign dev_tck = bb_tck;
  assign dev_tms = bb_tms;
  assign dev_tdi = divert ? bb_tdi  : 1'b1;
  assign bb_tdo  = divert ? dev_tdo : bb_tdi;

endmodule
