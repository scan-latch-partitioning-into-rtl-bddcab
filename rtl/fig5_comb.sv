// fig5_comb: combinational part C of the example circuit with independent
// scan latches.
//
//   t0 = G_T0(y0, y1)   drives the output z0
//   t1 = G_T1(y2, y3)
//   Y4 = G_Y4(t0, t1)   next state of latch S4
// No gate has an input that a primary input can set, so no extra test vector
// can freeze the transitions coming from S0..S3: they are independent latches
// and belong in the extra scan chain. The published example does not state the three
// gate functions, so they are parameters; the defaults (AND, OR, AND) are
// this design's choice, and the classification holds for any choice.
// Purely combinational. Bit i of y is yi.
module fig5_comb
  import msc_pkg::*;
#(
  parameter gate_e G_T0 = G_AND,
  parameter gate_e G_T1 = G_OR,
  parameter gate_e G_Y4 = G_AND
) (
  input  logic [3:0] y,
  output logic       t0,
  output logic       t1,
  output logic       z0,
  output logic       y4_next
);

  always_comb begin
    t0      = gate_eval(G_T0, y[0], y[1]);
    t1      = gate_eval(G_T1, y[2], y[3]);
    z0      = t0;
    y4_next = gate_eval(G_Y4, t0, t1);
  end

endmodule
