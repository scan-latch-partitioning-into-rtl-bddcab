// tb_fig3_comb: exhaustive test of the two-latch example logic. Also checks
// that both extra test vectors 0X and X0 hold z0 at 0 for every latch value.
module tb_fig3_comb;
  logic [1:0] x, y;
  logic t0, t1, z0;
  int checks = 0, failures = 0;

  fig3_comb dut (.x, .y, .t0, .t1, .z0);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x, y} = 4'(v);
      #1;
      checks++;
      if (t0 !== (y == 2'b11) || t1 !== (x == 2'b11) || z0 !== (x == 2'b11 && y == 2'b11)) begin
        failures++;
        $display("x=%b y=%b t0=%b t1=%b z0=%b", x, y, t0, t1, z0);
      end
      if (x[0] == 1'b0 || x[1] == 1'b0) begin
        checks++;
        if (z0 !== 1'b0) begin failures++; $display("z0 not frozen x=%b", x); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
