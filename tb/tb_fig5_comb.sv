// tb_fig5_comb: exhaustive test of the independent-latch example logic with
// its default gate functions (t0 = y0 AND y1, t1 = y2 OR y3, Y4 = t0 AND t1,
// z0 = t0).
module tb_fig5_comb;
  logic [3:0] y;
  logic t0, t1, z0, y4_next;
  logic e0, e1;
  int checks = 0, failures = 0;

  fig5_comb dut (.y, .t0, .t1, .z0, .y4_next);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      y = 4'(v);
      #1;
      e0 = (y[1:0] == 2'b11);
      e1 = (y[3:2] != 2'b00);
      checks++;
      if (t0 !== e0 || t1 !== e1 || z0 !== e0 || y4_next !== (e0 && e1)) begin
        failures++;
        $display("y=%b t0=%b t1=%b z0=%b Y4=%b", y, t0, t1, z0, y4_next);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
