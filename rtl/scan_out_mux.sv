// scan_out_mux: ScanOut selector of the MSC architecture.
//
// All chains share ScanIn; ScanOut is taken from the last latch of the chain
// that is shifting. The select is the one-hot word of chain_select_sr, so the
// multiplexer is an AND-OR: ScanOut = OR over c of (sel[c] AND chain_out[c]).
// This multiplexer (with the select register) is the test area overhead of
// the scheme. The multiplexer is prescribed; the AND-OR form on a one-hot
// select is this design's choice. Purely combinational.
module scan_out_mux #(
  parameter int unsigned NCH = 2   // number of scan chains (six-latch example: 2)
) (
  input  logic [NCH-1:0] sel,
  input  logic [NCH-1:0] chain_out,
  output logic           scan_out
);

  assign scan_out = |(sel & chain_out);

endmodule
