// msc_test_sequencer: applies test vectors to a full-scan circuit with the
// multiple-scan-chain strategy (one vector per handshake).
//
// For each test vector V (present-state part vec_ps, primary-input part
// vec_pi) it runs:
//   for each ordinary chain SCj, j = 0..NUM_SC-1:
//     drive the primary inputs with the extra test vector EVj and shift the
//     bits of vec_ps that belong to SCj into SCj (one bit per cycle);
//   drive the primary inputs with vec_pi and shift the ESC bits into ESC;
//   with vec_pi still applied, pulse capture so every latch loads its next
//   state (skipped when vec_capture = 0, which only unloads).
// While a chain shifts in the new bits, its old contents (the response to the
// previous vector) come out on scan_out; they are collected per latch and
// presented on resp with a one-cycle resp_valid pulse at the end of the shift
// phases, provided a capture preceded them.
//
// EVj is given as EV_VAL[j] and EV_CARE[j]; a primary input whose care bit is
// 0 is a don't-care and keeps the value it already had, so that filling it
// causes no extra input transition (this fill rule is this design's choice).
// Latch i is loaded with vec_ps[i]: in a chain the first bit shifted in is
// the one for the last latch. The vector handshake (vec_valid/vec_ready), one
// idle cycle per vector, the response format and the primary-input register
// are choices of this design; the order of the phases follows the published scheme.
//
// Timing: a vector takes 1 (accept) + NUM_SL (shift) + 1 (capture) cycles.
// x, shift, capture, restart, advance and scan_in are meant for msc_scan_arch
// with the same NUM_SL, NUM_SC and CHAIN_OF.
module msc_test_sequencer
  import msc_pkg::*;
#(
  parameter int unsigned NUM_SL = 6,
  parameter int unsigned NUM_PI = 3,
  parameter int unsigned NUM_SC = 2,
  parameter int unsigned CHAIN_OF [NUM_SL] = '{0, 1, 0, 0, 1, 1},
  localparam int unsigned EV_N = (NUM_SC > 0) ? NUM_SC : 1,
  // bit k of a vector is primary input xk: EV0 = x0x1x2 = 00X, EV1 = 1X1
  parameter logic [NUM_PI-1:0] EV_VAL  [EV_N] = '{3'b000, 3'b101},
  parameter logic [NUM_PI-1:0] EV_CARE [EV_N] = '{3'b011, 3'b101},
  localparam int unsigned NCH  = NUM_SC + ((count_in(NUM_SC) > 0) ? 1 : 0),
  localparam int unsigned CW   = (NCH > 1) ? $clog2(NCH) : 1,
  localparam int unsigned NW   = $clog2(NUM_SL + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // test vector in
  input  logic              vec_valid,
  output logic              vec_ready,
  input  logic [NUM_SL-1:0] vec_ps,
  input  logic [NUM_PI-1:0] vec_pi,
  input  logic              vec_capture,
  // response out
  output logic              resp_valid,
  output logic [NUM_SL-1:0] resp,
  // to the circuit and its scan architecture
  output logic [NUM_PI-1:0] x,
  output logic              shift,
  output logic              capture,
  output logic              restart,
  output logic              advance,
  output logic              scan_in,
  input  logic              scan_out,
  // status
  output msc_phase_e        phase,
  output logic [CW-1:0]     chain
);

  function automatic int unsigned count_in(int unsigned c);
    int unsigned n = 0;
    for (int unsigned i = 0; i < NUM_SL; i++) if (CHAIN_OF[i] == c) n++;
    return n;
  endfunction

  // position of latch i in its chain, 0 = next to ScanIn
  function automatic int unsigned pos_of(int unsigned i);
    int unsigned p = 0;
    for (int unsigned j = 0; j < i; j++) if (CHAIN_OF[j] == CHAIN_OF[i]) p++;
    return p;
  endfunction

  msc_phase_e        phase_q;
  logic [CW-1:0]     chain_q;
  logic [NW-1:0]     cnt_q;
  logic [NUM_SL-1:0] ps_q, resp_q;
  logic [NUM_PI-1:0] pi_q, x_q;
  logic              cap_q, have_resp_q, resp_valid_q;

  logic [NW-1:0]     lenm1;        // length of the current chain minus 1
  logic [NW-1:0]     pos;          // position of the latch addressed this cycle
  logic              shifting, last_bit, last_chain;

  always_comb begin
    lenm1 = '0;
    for (int unsigned c = 0; c < NCH; c++)
      if (chain_q == CW'(c)) lenm1 = NW'(count_in(c) - 1);
    pos        = lenm1 - cnt_q;
    shifting   = (phase_q == PH_SHIFT_SC) || (phase_q == PH_SHIFT_ESC);
    last_bit   = shifting && (cnt_q == lenm1);
    last_chain = (chain_q == CW'(NCH - 1));
  end

  // serial bit for the latch at position pos of the current chain
  always_comb begin
    scan_in = 1'b0;
    for (int unsigned i = 0; i < NUM_SL; i++)
      if (shifting && chain_q == CW'(CHAIN_OF[i]) && pos == NW'(pos_of(i)))
        scan_in = ps_q[i];
  end

  // primary-input value for chain c: EVc merged over the held inputs, or the
  // vector's own inputs for ESC
  function automatic logic [NUM_PI-1:0] x_for(logic [CW-1:0] c,
                                              logic [NUM_PI-1:0] hold,
                                              logic [NUM_PI-1:0] pi);
    logic [NUM_PI-1:0] r = pi;
    for (int unsigned j = 0; j < NUM_SC; j++)
      if (c == CW'(j)) r = (EV_VAL[j] & EV_CARE[j]) | (hold & ~EV_CARE[j]);
    return r;
  endfunction

  assign vec_ready = (phase_q == PH_IDLE);
  assign restart   = vec_ready && vec_valid;
  assign advance   = last_bit && !last_chain;
  assign shift     = shifting;
  assign capture   = (phase_q == PH_CAPTURE);
  assign x         = x_q;
  assign phase     = phase_q;
  assign chain     = chain_q;
  assign resp      = resp_q;
  assign resp_valid = resp_valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q      <= PH_IDLE;
      chain_q      <= '0;
      cnt_q        <= '0;
      ps_q         <= '0;
      pi_q         <= '0;
      x_q          <= '0;
      cap_q        <= 1'b0;
      resp_q       <= '0;
      have_resp_q  <= 1'b0;
      resp_valid_q <= 1'b0;
    end else begin
      resp_valid_q <= 1'b0;
      unique case (phase_q)
        PH_IDLE: if (vec_valid) begin
          ps_q    <= vec_ps;
          pi_q    <= vec_pi;
          cap_q   <= vec_capture;
          chain_q <= '0;
          cnt_q   <= '0;
          x_q     <= x_for('0, x_q, vec_pi);
          phase_q <= (NUM_SC > 0) ? PH_SHIFT_SC : PH_SHIFT_ESC;
        end
        PH_SHIFT_SC, PH_SHIFT_ESC: begin
          for (int unsigned i = 0; i < NUM_SL; i++)
            if (chain_q == CW'(CHAIN_OF[i]) && pos == NW'(pos_of(i)))
              resp_q[i] <= scan_out;
          if (!last_bit) begin
            cnt_q <= cnt_q + 1'b1;
          end else if (!last_chain) begin
            cnt_q   <= '0;
            chain_q <= chain_q + 1'b1;
            x_q     <= x_for(chain_q + 1'b1, x_q, pi_q);
            phase_q <= (32'(chain_q) + 1 < NUM_SC) ? PH_SHIFT_SC : PH_SHIFT_ESC;
          end else begin
            cnt_q        <= '0;
            resp_valid_q <= have_resp_q;
            have_resp_q  <= 1'b0;
            if (cap_q) begin
              x_q     <= pi_q;
              phase_q <= PH_CAPTURE;
            end else begin
              phase_q <= PH_IDLE;
            end
          end
        end
        PH_CAPTURE: begin
          have_resp_q <= 1'b1;
          phase_q     <= PH_IDLE;
        end
      endcase
    end
  end

  a_advance_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    advance |-> (32'(chain_q) + 1 < NCH))
    else $error("advance past the last chain");

endmodule
