// tb_uart_tx: self-checking test of the reply transmitter.
//
// Hands random bytes to the transmitter with the valid/ready handshake,
// samples the line in the middle of each bit time and checks start bit, the
// eight data bits LSB first and the stop bit. Also checks that each byte
// occupies exactly 10 bit times (ready returns 10 x CLKS_PER_BIT clocks after
// the byte is taken) and that the line idles high.
module tb_uart_tx;
  localparam int unsigned CPB = 8;

  logic clk = 0, rst_n = 0;
  logic [7:0] data = 0;
  logic valid = 0, ready, tx;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (tx !== 1'b1 || !ready) begin failures++; $display("not idle after reset"); end
    for (int n = 0; n < 100; n++) begin
      logic [7:0] b;
      logic [9:0] f;
      int cyc;
      b = 8'($urandom);
      wait (ready);
      @(negedge clk);
      data = b; valid = 1;
      @(negedge clk);            // byte taken at this edge, start bit now on tx
      valid = 0; data = 8'($urandom);
      cyc = 0;
      repeat (CPB / 2 - 1) @(negedge clk);
      cyc += CPB / 2 - 1;
      for (int i = 0; i < 10; i++) begin
        f[i] = tx;
        if (i < 9) begin repeat (CPB) @(negedge clk); cyc += CPB; end
      end
      checks += 3;
      if (f[0] !== 1'b0) begin failures++; $display("byte %0d: no start bit", n); end
      if (f[9] !== 1'b1) begin failures++; $display("byte %0d: no stop bit", n); end
      if (f[8:1] !== b)  begin failures++; $display("byte %0d: sent %h exp %h", n, f[8:1], b); end
      while (!ready && cyc < 20 * CPB) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 10 * CPB) begin failures++; $display("byte %0d: took %0d clocks", n, cyc); end
    end
    repeat (3 * CPB) @(negedge clk);
    checks++;
    if (tx !== 1'b1) begin failures++; $display("line not idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
