// tb_scan_cell: random test of one scan latch against a reference model.
// Each cycle drives random ce, se, si, d; the expected q is kept by the
// testbench (hold when ce = 0, si when se = 1, d otherwise) and compared.
// Also checks the asynchronous reset.
module tb_scan_cell;
  logic clk = 1'b0, rst_n = 1'b1;
  logic ce, se, si, d, q;
  logic exp_q;
  int checks = 0, failures = 0;

  scan_cell dut (.clk, .rst_n, .ce, .se, .si, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {ce, se, si, d} = '0;
    #1 rst_n = 1'b0;
    #1;
    checks++; if (q !== 1'b0) begin failures++; $display("reset value wrong"); end
    @(negedge clk); rst_n = 1'b1;
    exp_q = 1'b0;
    repeat (400) begin
      @(negedge clk);
      ce = 1'($urandom); se = 1'($urandom); si = 1'($urandom); d = 1'($urandom);
      @(posedge clk);
      if (ce) exp_q = se ? si : d;
      #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("mismatch ce=%b se=%b si=%b d=%b q=%b exp=%b", ce, se, si, d, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
