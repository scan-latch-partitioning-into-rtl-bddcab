// chain_select_sr: one-hot ring shift register that picks the scan chain
// whose scan clock is enabled.
//
// The register has one flip-flop per scan chain. restart sets it to chain 0
// (bit 0); advance rotates the single 1 to the next chain, wrapping from the
// last chain back to chain 0. Its outputs gate the scan clock of each chain
// so that chains shift one after another and never together, and they steer
// the scan-out multiplexer. restart has priority over advance. Reset puts the
// register at chain 0, so it is one-hot from the first cycle on.
// A shift register with one flip-flop per chain that gates the scan clocks is
// what the scheme prescribes; the ring form and the restart/advance controls
// are this design's choice.
//
// Ports: sel[NCH] one-hot chain select. Timing: sel changes one cycle after
//        restart/advance.
module chain_select_sr #(
  parameter int unsigned NCH = 2   // number of scan chains (six-latch example: 2)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           restart,
  input  logic           advance,
  output logic [NCH-1:0] sel
);

  if (NCH == 1) begin : g_one
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sel <= 1'b1;
      else        sel <= 1'b1;
    end
  end else begin : g_ring
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)       sel <= NCH'(1);
      else if (restart) sel <= NCH'(1);
      else if (advance) sel <= {sel[NCH-2:0], sel[NCH-1]};
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(sel))
    else $error("chain select is not one-hot");

endmodule
