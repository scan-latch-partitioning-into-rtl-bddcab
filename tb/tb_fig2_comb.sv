// tb_fig2_comb: exhaustive test of the six-latch example logic, plus the
// property the chain partition relies on: with EV0 (x0 = 0, x1 = 0) the
// outputs z0, z2, z3 do not depend on y0, y2, y3, and with EV1 (x0 = 1,
// x2 = 1) z1, z4, z5 do not depend on y1, y4, y5.
module tb_fig2_comb;
  logic [2:0] x;
  logic [5:0] y, z, e;
  int checks = 0, failures = 0;

  fig2_comb dut (.x, .y, .z);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {x, y} = 9'(v);
      #1;
      e[0] = x[0] ? y[0] : 1'b0;
      e[1] = x[0] ? 1'b1 : y[1];
      e[2] = x[1] ? y[2] : 1'b0;
      e[3] = x[1] ? y[3] : 1'b0;
      e[4] = x[2] ? 1'b1 : y[4];
      e[5] = x[2] ? 1'b1 : y[5];
      checks++;
      if (z !== e) begin failures++; $display("x=%b y=%b z=%b exp=%b", x, y, z, e); end
      // frozen outputs under the extra test vectors
      if (x[1:0] == 2'b00) begin
        checks++;
        if ({z[3], z[2], z[0]} !== 3'b000) begin failures++; $display("EV0 not frozen"); end
      end
      if (x[0] && x[2]) begin
        checks++;
        if ({z[5], z[4], z[1]} !== 3'b111) begin failures++; $display("EV1 not frozen"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
