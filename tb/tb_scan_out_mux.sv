// tb_scan_out_mux: exhaustive test of the scan-out selector for four chains:
// for every one-hot select and every pattern of chain outputs, ScanOut must
// equal the output of the selected chain.
module tb_scan_out_mux;
  localparam int unsigned NCH = 4;
  logic [NCH-1:0] sel, chain_out;
  logic scan_out;
  int checks = 0, failures = 0;

  scan_out_mux #(.NCH(NCH)) dut (.sel, .chain_out, .scan_out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < NCH; c++)
      for (int p = 0; p < (1 << NCH); p++) begin
        sel = NCH'(1 << c);
        chain_out = NCH'(p);
        #1;
        checks++;
        if (scan_out !== chain_out[c]) begin
          failures++;
          $display("sel=%b chain_out=%b scan_out=%b", sel, chain_out, scan_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
