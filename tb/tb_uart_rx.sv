// tb_uart_rx: self-checking test of the serial command-line receiver.
//
// Drives 8-N-1 frames at CLKS_PER_BIT clocks per bit onto the line and checks
// every received byte, the framing-error flag (a frame sent with a low stop
// bit), that a short glitch low does not start a byte, and the latency from
// the end of the stop bit's middle to `valid`.
module tb_uart_rx;
  localparam int unsigned CPB = 8;

  logic clk = 0, rst_n = 0, rx = 1;
  logic [7:0] data;
  logic valid, ferr;
  int checks = 0, failures = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] got_q [$];
  logic       ferr_q [$];
  always @(posedge clk) if (rst_n && valid) begin got_q.push_back(data); ferr_q.push_back(ferr); end

  task automatic send(input logic [7:0] b, input logic stop_bit);
    logic [9:0] f;
    f = {stop_bit, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (CPB) @(negedge clk);
    end
    rx = 1;
    repeat (CPB) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 100; n++) begin
      logic [7:0] b;
      logic sb;
      b  = 8'($urandom);
      sb = (n % 10 != 7);
      send(b, sb);
      checks += 3;
      if (got_q.size() != 1) begin
        failures++; $display("byte %0d: %0d bytes received", n, got_q.size());
      end else begin
        if (got_q[0] !== b)   begin failures++; $display("byte %0d: got %h exp %h", n, got_q[0], b); end
        if (ferr_q[0] !== !sb) begin failures++; $display("byte %0d: ferr %0d", n, ferr_q[0]); end
      end
      got_q.delete(); ferr_q.delete();
    end
    // glitch shorter than half a bit
    rx = 0;
    repeat (CPB / 2 - 2) @(negedge clk);
    rx = 1;
    repeat (12 * CPB) @(negedge clk);
    checks++;
    if (got_q.size() != 0) begin failures++; $display("glitch produced a byte"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
