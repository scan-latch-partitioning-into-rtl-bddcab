// tb_chain_select_sr: checks the one-hot chain select register for three
// chains. Random restart/advance requests are applied; the testbench keeps
// the index of the selected chain (restart -> 0, advance -> index+1 mod 3,
// restart first) and compares the one-hot output with it every cycle.
module tb_chain_select_sr;
  localparam int unsigned NCH = 3;
  logic clk = 1'b0, rst_n = 1'b1;
  logic restart = 1'b0, advance = 1'b0;
  logic [NCH-1:0] sel;
  int unsigned idx;
  int checks = 0, failures = 0;
  int wraps = 0;

  chain_select_sr #(.NCH(NCH)) dut (.clk, .rst_n, .restart, .advance, .sel);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #1;
    checks++; if (sel !== 3'b001) begin failures++; $display("reset: sel=%b", sel); end
    @(negedge clk); rst_n = 1'b1;
    idx = 0;
    repeat (500) begin
      @(negedge clk);
      restart = ($urandom_range(0, 9) == 0);
      advance = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (restart) idx = 0;
      else if (advance) begin
        if (idx == NCH - 1) wraps++;
        idx = (idx + 1) % NCH;
      end
      #1;
      checks++;
      if (sel !== NCH'(1 << idx)) begin
        failures++;
        $display("sel=%b expected chain %0d", sel, idx);
      end
    end
    checks++; if (wraps == 0) begin failures++; $display("no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
