// fig3_comb: combinational part C of the two-latch example circuit in which
// part of the spurious transitions cannot be removed.
//
//   t0 = y0 AND y1     (both inputs from scan latches: cannot be frozen)
//   t1 = x0 AND x1     (primary inputs only: the freezing signal)
//   z0 = t0 AND t1
// Holding x0 = 0 or x1 = 0 (extra test vector 0X or X0) forces t1 = 0 and
// freezes z0, so S0 and S1 are compatible and share one chain, but t0 still
// toggles while they shift. t0 and t1 are brought out so that their
// transitions can be observed. The gate types of t0, t1 and z0 follow from
// the text (t0 is an AND gate; 0 is the controlling value of t1 and of z0).
// Purely combinational.
module fig3_comb (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic       t0,
  output logic       t1,
  output logic       z0
);

  always_comb begin
    t0 = y[0] & y[1];
    t1 = x[0] & x[1];
    z0 = t0 & t1;
  end

endmodule
