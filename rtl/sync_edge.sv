// sync_edge: brings an asynchronous level into the clock domain and pulses
// on its rising edge.
//
// Two flip-flops remove metastability; a third holds the previous value, and
// `pulse` is high for one clock after each low-to-high change. Latency from
// the input edge to the pulse is two to three clocks.
module sync_edge (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic pulse
);

  logic [2:0] ff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ff <= '0;
    else        ff <= {ff[1:0], d};
  end

  assign pulse = ff[1] && !ff[2];

endmodule
