// tb_jtag_bypass: self-checking test of the card's JTAG chain link.
//
// Applies every combination of the inputs and checks each output against
// the chain rules: TCK and TMS always reach the card's devices; with
// `divert` high TDI goes to the devices and their TDO back to the chain;
// with it low the chain's TDI loops straight to its TDO and the devices see
// TDI high. A second pass shifts a random bit stream through a one-bit
// "device" register to check the chain end to end in both settings.
module tb_jtag_bypass;
  logic bb_tck, bb_tms, bb_tdi, bb_tdo, divert;
  logic dev_tck, dev_tms, dev_tdi, dev_tdo;
  int checks = 0, failures = 0;

  jtag_bypass dut (.*);

  task automatic expect_eq(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s = %b, expected %b", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {bb_tck, bb_tms, bb_tdi, divert, dev_tdo} = 5'(v);
      #1;
      expect_eq("dev_tck", dev_tck, bb_tck);
      expect_eq("dev_tms", dev_tms, bb_tms);
      expect_eq("dev_tdi", dev_tdi, divert ? bb_tdi : 1'b1);
      expect_eq("bb_tdo",  bb_tdo,  divert ? dev_tdo : bb_tdi);
    end
    // end to end: a one-bit device register clocked by dev_tck
    for (int d = 0; d < 2; d++) begin
      logic dreg, prev;
      divert = 1'(d);
      dreg = 0; prev = 0;
      bb_tck = 0; bb_tms = 0;
      for (int n = 0; n < 64; n++) begin
        bb_tdi = 1'($urandom);
        dev_tdo = dreg;
        #1;
        // with the card in the chain, TDO shows last clock's TDI
        expect_eq("chain tdo", bb_tdo, divert ? prev : bb_tdi);
        bb_tck = 1; #1;
        if (dev_tck) dreg = dev_tdi;
        prev = bb_tdi;
        bb_tck = 0; #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
