// tb_row_bias_table: self-checking test of the per-row on/off code table.
//
// Writes random on and off codes into every row through the single write
// port, mirrors them in a local model, and after each write compares all
// 2 x NUM_ROWS outputs and the read-back port with the model. Also checks
// that writes to rows past the end are ignored and that reset clears the
// table.
module tb_row_bias_table;
  import ac_pkg::*;

  localparam int unsigned NR = 41;
  localparam int unsigned W  = 14;

  logic clk = 0, rst_n = 0;
  tbl_wr_t wr;
  logic [7:0] rd_row;
  logic rd_off, rd_valid;
  logic [W-1:0] rd_data;
  logic [W-1:0] on_code [NR];
  logic [W-1:0] off_code [NR];

  logic [W-1:0] m_on [NR];
  logic [W-1:0] m_off [NR];
  int checks = 0, failures = 0;

  row_bias_table #(.NUM_ROWS(NR), .DAC_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int r = 0; r < NR; r++) begin
      checks += 2;
      if (on_code[r] !== m_on[r])   begin failures++; $display("on[%0d] %h exp %h", r, on_code[r], m_on[r]); end
      if (off_code[r] !== m_off[r]) begin failures++; $display("off[%0d] %h exp %h", r, off_code[r], m_off[r]); end
    end
  endtask

  initial begin
    wr = '0; rd_row = 0; rd_off = 0;
    for (int r = 0; r < NR; r++) begin m_on[r] = 0; m_off[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    compare_all();
    for (int n = 0; n < 300; n++) begin
      logic [7:0] row;
      logic off;
      logic [15:0] d;
      row = 8'($urandom_range(0, NR + 5));
      off = 1'($urandom);
      d   = 16'($urandom);
      @(negedge clk);
      wr.en = 1; wr.is_off = off; wr.row = row; wr.data = d;
      @(negedge clk);
      wr = '0;
      if (row < NR) begin
        if (off) m_off[row] = d[W-1:0]; else m_on[row] = d[W-1:0];
      end
      compare_all();
      // read-back port
      rd_row = 8'($urandom_range(0, NR + 5));
      rd_off = 1'($urandom);
      #1;
      checks++;
      if (rd_row < NR) begin
        if (!rd_valid || rd_data !== (rd_off ? m_off[rd_row] : m_on[rd_row])) begin
          failures++; $display("readback row %0d off %0d got %h", rd_row, rd_off, rd_data);
        end
      end else if (rd_valid) begin
        failures++; $display("row %0d reported valid", rd_row);
      end
    end
    rst_n = 0;
    #1;
    for (int r = 0; r < NR; r++) begin m_on[r] = 0; m_off[r] = 0; end
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
