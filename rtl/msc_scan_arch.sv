// msc_scan_arch: the multiple-scan-chain DFT architecture around the
// combinational part C of a full-scan circuit.
//
// NUM_SL scan latches are split into NUM_SC ordinary chains SC0..SC(NUM_SC-1)
// and an extra chain ESC (chain index NUM_SC). CHAIN_OF[i] names the chain of
// latch i; within a chain the latches are ordered by index, the lowest index
// taking ScanIn and the highest driving the chain output. Every chain takes
// the single ScanIn pin; ScanOut is multiplexed from the chain outputs
// (scan_out_mux). A one-hot shift register with one flip-flop per non-empty
// chain (chain_select_sr) gates the scan clock, so only the selected chain
// shifts on a shift cycle and all others hold their state. On a capture cycle
// every latch loads its next state from C.
//
// Interface:
//   shift     scan clock pulse for the selected chain (scan enable)
//   capture   functional clock for every latch (load the test response)
//   restart   select chain 0 from the next cycle on
//   advance   select the next chain from the next cycle on
//   scan_in   the common ScanIn pin
//   next_state[i]    Yi from C;  present_state[i]  yi to C
//   scan_out  ScanOut; shows the last latch of the selected chain
//   chain_sel one-hot chain select (bit NUM_SC is ESC when ESC is non-empty)
// Timing: latches change on the clk edge at the end of a shift or capture
// cycle; scan_out is combinational from the latches and chain_sel.
//
// Shared ScanIn, the scan-out multiplexer and the one-hot clock-gating
// register follow the published scheme. Latch order inside a chain, clock enables in
// place of gated clocks, and reset are this design's choices. A regular chain
// must not be empty; ESC may be.
module msc_scan_arch #(
  parameter int unsigned NUM_SL = 6,                         // scan latches
  parameter int unsigned NUM_SC = 2,                         // ordinary chains k
  parameter int unsigned CHAIN_OF [NUM_SL] = '{0, 1, 0, 0, 1, 1},
  // derived: number of non-empty chains (ESC counted only when used)
  localparam int unsigned NCH = NUM_SC + ((count_in(NUM_SC) > 0) ? 1 : 0)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift,
  input  logic              capture,
  input  logic              restart,
  input  logic              advance,
  input  logic              scan_in,
  input  logic [NUM_SL-1:0] next_state,
  output logic [NUM_SL-1:0] present_state,
  output logic              scan_out,
  output logic [NCH-1:0]    chain_sel
);

  // number of latches assigned to chain c
  function automatic int unsigned count_in(int unsigned c);
    int unsigned n = 0;
    for (int unsigned i = 0; i < NUM_SL; i++) if (CHAIN_OF[i] == c) n++;
    return n;
  endfunction

  // latch feeding latch i in its chain, or -1 when i is first (takes ScanIn)
  function automatic int prev_of(int unsigned i);
    int p = -1;
    for (int unsigned j = 0; j < i; j++) if (CHAIN_OF[j] == CHAIN_OF[i]) p = int'(j);
    return p;
  endfunction

  // last latch of chain c (drives the chain output)
  function automatic int last_of(int unsigned c);
    int p = 0;
    for (int unsigned j = 0; j < NUM_SL; j++) if (CHAIN_OF[j] == c) p = int'(j);
    return p;
  endfunction

  logic [NCH-1:0] chain_out;

  chain_select_sr #(.NCH(NCH)) u_sel (
    .clk, .rst_n, .restart, .advance, .sel(chain_sel)
  );

  for (genvar i = 0; i < NUM_SL; i++) begin : g_latch
    localparam int PREV = prev_of(i);
    logic si, ce;
    if (PREV < 0) begin : g_head
      assign si = scan_in;
    end else begin : g_body
      assign si = present_state[PREV];
    end
    // gated scan clock: the latch's own chain selected, or a capture
    assign ce = capture | (shift & chain_sel[CHAIN_OF[i]]);
    scan_cell u_cell (
      .clk, .rst_n, .ce, .se(shift), .si, .d(next_state[i]), .q(present_state[i])
    );
  end

  for (genvar c = 0; c < NCH; c++) begin : g_out
    assign chain_out[c] = present_state[last_of(c)];
  end

  scan_out_mux #(.NCH(NCH)) u_mux (.sel(chain_sel), .chain_out, .scan_out);

  // parameter rules: every latch names an existing chain, no regular chain empty
  initial begin
    for (int unsigned i = 0; i < NUM_SL; i++)
      assert (CHAIN_OF[i] <= NUM_SC) else $error("latch %0d: chain %0d out of range", i, CHAIN_OF[i]);
    for (int unsigned c = 0; c < NUM_SC; c++)
      assert (count_in(c) > 0) else $error("scan chain %0d is empty", c);
  end

  a_no_shift_and_capture: assert property (@(posedge clk) disable iff (!rst_n) !(shift && capture))
    else $error("shift and capture in the same cycle");

endmodule
