// tb_dac_ctrl: self-checking test of the shared-bus row-select DAC driver.
//
// Forty-one DAC models hang on the controller's 11 data buses and 41 latch
// clocks exactly as on the card (row r on bus r/4). The test gives every row
// random on/off codes, then:
//  - after reset, checks that every DAC holds its row's off code;
//  - steps the wanted row through random rows (and "no row"), and after each
//    change checks that exactly the wanted row's DAC holds its on code and all
//    others their off codes;
//  - checks the latency of each change: 3 clocks when the old and new rows
//    are on different buses (one write slot), 5 when they share a bus;
//  - issues a refresh and checks that every row is off again;
//  - counts how often each kind of transition happened and fails if one
//    never did.
module tb_dac_ctrl;
  localparam int unsigned NR  = 41;
  localparam int unsigned W   = 14;
  localparam int unsigned DPB = 4;
  localparam int unsigned NB  = (NR + DPB - 1) / DPB;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] on_code [NR];
  logic [W-1:0] off_code [NR];
  logic tgt_valid = 0, refresh = 0;
  logic [7:0] tgt_row = 0;
  logic [W-1:0] dac_data [NB];
  logic [NR-1:0] dac_clk;
  logic cur_valid, busy, ev_parallel, ev_serial, ev_refresh;
  logic [7:0] cur_row;

  logic [W-1:0] code [NR];
  int unsigned  i_ua [NR];

  int checks = 0, failures = 0;
  int n_par = 0, n_ser = 0, n_ref = 0, n_single = 0;

  dac_ctrl #(.NUM_ROWS(NR), .DAC_W(W), .DACS_PER_BUS(DPB)) dut (.*);

  for (genvar r = 0; r < NR; r++) begin : g_dac
    ad9744_model #(.BITS(W)) u_dac (.clk(dac_clk[r]), .d(dac_data[r / DPB]),
                                    .code(code[r]), .i_ua(i_ua[r]));
  end

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (ev_parallel) n_par++;
    if (ev_serial)   n_ser++;
    if (ev_refresh)  n_ref++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_dacs(input logic sel_v, input int sel_r);
    for (int r = 0; r < NR; r++) begin
      logic [W-1:0] exp;
      exp = (sel_v && r == sel_r) ? on_code[r] : off_code[r];
      checks++;
      if (code[r] !== exp) begin
        failures++;
        $display("%0t row %0d DAC code %h expected %h", $time, r, code[r], exp);
      end
    end
    checks++;
    if (i_ua[sel_v ? sel_r : 0] != (32'(code[sel_v ? sel_r : 0]) * 20000) / 16383) failures++;
  endtask

  task automatic wait_idle();
    int n = 0;
    while (busy && n < 100) begin @(posedge clk); n++; end
    @(negedge clk);
  endtask

  initial begin
    logic cv;
    int   cr;
    for (int r = 0; r < NR; r++) begin
      on_code[r]  = W'($urandom);
      off_code[r] = W'($urandom);
      if (on_code[r] == off_code[r]) on_code[r] = ~off_code[r];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    wait_idle();
    check_dacs(0, 0);
    cv = 0; cr = 0;
    for (int n = 0; n < 200; n++) begin
      logic nv;
      int   nr, lat, exp_lat;
      nv = ($urandom_range(0, 9) != 0);
      nr = $urandom_range(0, NR - 1);
      if (n % 5 == 0 && cv) nr = (cr / DPB) * DPB + ((cr + 1) % DPB);  // force same bus
      if (nr >= NR) nr = cr;
      @(negedge clk);
      tgt_valid = nv; tgt_row = 8'(nr);
      if (!nv && !cv) continue;
      if (nv && cv && nr == cr) continue;
      exp_lat = (nv && cv && (nr / DPB) == (cr / DPB)) ? 5 : 3;
      if (!(nv && cv)) n_single++;
      lat = 0;
      do begin @(posedge clk); lat++; #1; end
      while (!(cur_valid == nv && (!nv || cur_row == 8'(nr))) && lat < 50);
      checks++;
      if (lat != exp_lat) begin
        failures++;
        $display("row %0d->%0d latency %0d expected %0d", cr, nr, lat, exp_lat);
      end
      wait_idle();
      check_dacs(nv, nr);
      cv = nv; cr = nr;
    end
    // refresh: everything off
    @(negedge clk);
    refresh = 1;
    @(negedge clk);
    refresh = 0;
    tgt_valid = 0;
    @(posedge clk);
    wait_idle();
    checks++;
    if (cur_valid) begin failures++; $display("row still selected after refresh"); end
    check_dacs(0, 0);
    checks += 4;
    if (n_par == 0)    begin failures++; $display("no parallel transition seen"); end
    if (n_ser == 0)    begin failures++; $display("no shared-bus transition seen"); end
    if (n_ref < 2)     begin failures++; $display("refresh count %0d", n_ref); end
    if (n_single == 0) begin failures++; $display("no select-only/deselect-only change"); end
    $display("parallel=%0d serial=%0d single=%0d refresh=%0d", n_par, n_ser, n_single, n_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
