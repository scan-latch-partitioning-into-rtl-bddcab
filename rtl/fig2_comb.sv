// fig2_comb: combinational part C of the six-latch example circuit with two
// compatible scan chains.
//
// Each output gate has one input from a present-state line and one from a
// primary input:
//   z0 = y0 AND x0    z1 = y1 OR x0
//   z2 = y2 AND x1    z3 = y3 AND x1
//   z4 = y4 OR  x2    z5 = y5 OR  x2
// The gate types follow from the controlling values named in the published example
// (0 for z0, z2, z3; 1 for z1, z4, z5). x0 = 0 freezes z0 but x0 = 1 freezes
// z1, so S0 and S1 cannot share a chain; x1 = 0 freezes z2 and z3 together,
// x2 = 1 freezes z4 and z5 together. With SC0 = {S0,S2,S3} under EV0 = 00X
// and SC1 = {S1,S4,S5} under EV1 = 1X1 no latch shift reaches an output.
// Purely combinational. Bit i of x, y, z is xi, yi, zi.
module fig2_comb (
  input  logic [2:0] x,
  input  logic [5:0] y,
  output logic [5:0] z
);

  always_comb begin
    z[0] = y[0] & x[0];
    z[1] = y[1] | x[0];
    z[2] = y[2] & x[1];
    z[3] = y[3] & x[1];
    z[4] = y[4] | x[2];
    z[5] = y[5] | x[2];
  end

endmodule
