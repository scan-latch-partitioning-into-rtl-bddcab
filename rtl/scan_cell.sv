// scan_cell: one scan latch of a full-scan circuit (multiplexed-D flip-flop).
//
// On a rising clk edge with ce high the cell loads either the serial input si
// (se = 1, shift) or the functional next-state value d (se = 0, capture).
// With ce low it holds its value. ce stands for the gated scan clock of the
// MSC architecture: only the cells of the chain that is being shifted are
// clocked, so the other chains hold their contents and cause no transitions.
// Writing the gate as a clock enable (rather than an AND on the clock) is a
// choice of this design; a library clock-gating cell can replace it.
// The asynchronous active-low reset to 0 is also this design's choice.
//
// Ports: clk, rst_n, ce (clock enable), se (scan enable), si (scan in),
//        d (next state from the combinational part), q (present state).
// Timing: q follows si/d one cycle after ce is sampled high.
module scan_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  logic se,
  input  logic si,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (ce) q <= se ? si : d;
  end

endmodule
