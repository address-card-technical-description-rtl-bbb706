// tb_ow_master: self-checking test of the 1-Wire sensor reader.
//
// Connects the master to a DS18S20 behavioural model through a wired-AND
// line and runs the full read twice: the ROM code and temperature word must
// match the model's, `no_device` must stay low, the model must see three
// resets and five command bytes per read, and the master's reset pulse must
// last 480 us. Every low pulse the master drives must be a 6 us slot, a
// 60 us write-0 or a 480 us reset, in the numbers the command bytes and bit
// counts give. A run with the sensor absent must end with no_device, and a
// run after it returns must succeed again.
module tb_ow_master;
  localparam int unsigned TPU = 2;
  localparam logic [63:0] ROM  = 64'hC400_0801_2345_6710;
  localparam logic [15:0] TEMP = 16'h0032;

  logic clk = 0, rst_n = 0, start = 0;
  logic ow_low, busy, done, no_device;
  logic [15:0] temp;
  logic [63:0] rom_id;
  logic dev_low, present = 1;
  wire  line = !(ow_low || (dev_low && present));
  logic ow_in;
  assign ow_in = line;

  int checks = 0, failures = 0;

  ow_master #(.TICKS_PER_US(TPU)) dut (.*);
  ds18s20_model #(.TICKS_PER_US(TPU), .ROM(ROM), .TEMP(TEMP)) u_sensor (
    .clk, .line, .pull_low(dev_low));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // longest low pulse the master drives, and the pulses sorted by length:
  // 6 us (write 1 or read slot), 60 us (write 0), 480 us (reset)
  int low_run = 0, max_low = 0;
  int n_short = 0, n_w0 = 0, n_rst = 0, n_odd = 0;
  always @(posedge clk) begin
    if (ow_low) low_run++;
    else if (low_run > 0) begin
      if (low_run == 6 * TPU)        n_short++;
      else if (low_run == 60 * TPU)  n_w0++;
      else if (low_run == 480 * TPU) n_rst++;
      else                           n_odd++;
      low_run = 0;
    end
    if (low_run > max_low) max_low = low_run;
  end

  // zero bits among the command bytes of one read: 33 CC 44 CC BE
  function automatic int zeros_in_cmds();
    logic [7:0] cmds [5] = '{8'h33, 8'hCC, 8'h44, 8'hCC, 8'hBE};
    int z = 0;
    foreach (cmds[i]) z += 8 - $countones(cmds[i]);
    return z;
  endfunction

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s = %h, expected %h", what, got, exp); end
  endtask

  task automatic run_read();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 2; k++) begin
      run_read();
      expect_eq("rom_id", rom_id, ROM);
      expect_eq("temp", temp, TEMP);
      expect_eq("no_device", no_device, 0);
      expect_eq("resets seen", u_sensor.n_reset, 3 * (k + 1));
      expect_eq("commands seen", u_sensor.n_cmd, 5 * (k + 1));
      expect_eq("busy after done", busy, 0);
    end
    expect_eq("reset pulse clocks", max_low, 480 * TPU);
    // per read: 3 resets; 40 command bits; 64 ROM, 16 temperature and
    // CONV_SLOTS + 1 polling read slots (the model's default is 5)
    expect_eq("reset pulses", n_rst, 2 * 3);
    expect_eq("write-0 pulses", n_w0, 2 * zeros_in_cmds());
    expect_eq("short pulses", n_short, 2 * ((40 - zeros_in_cmds()) + 64 + 16 + 6));
    expect_eq("pulses of other lengths", n_odd, 0);
    present = 0;
    run_read();
    expect_eq("no_device without sensor", no_device, 1);
    expect_eq("rom_id kept without sensor", rom_id, ROM);
    // the sensor comes back: the next read succeeds and clears no_device
    present = 1;
    run_read();
    expect_eq("no_device after sensor returns", no_device, 0);
    expect_eq("temp after sensor returns", temp, TEMP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
