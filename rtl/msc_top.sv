// msc_top: the three example full-scan circuits of the multiple-scan-chain
// scheme, each with its scan architecture and its test sequencer, side by side.
//
//   f2_*  six-latch circuit (fig2_comb), 3 primary inputs, two chains
//         SC0 = {S0,S2,S3} under EV0 = 00X and SC1 = {S1,S4,S5} under
//         EV1 = 1X1, empty ESC. Every spurious transition is removed.
//   f3_*  two-latch circuit (fig3_comb), 2 primary inputs, one chain
//         SC0 = {S0,S1} under EV0 = 0X, empty ESC. The output gate is frozen;
//         the internal gate t0 fed only by latches still toggles.
//   f5_*  five-latch circuit (fig5_comb) with no primary input: every latch is
//         independent and sits in ESC, so it is ordinary single-chain scan.
//         The sequencer's one primary-input pin (f5_x) drives nothing.
//
// In each system the sequencer (msc_test_sequencer) takes a test vector on a
// valid/ready handshake, drives the primary inputs x and the shift/capture
// controls of msc_scan_arch, and returns the unloaded response of the previous
// vector on resp/resp_valid. The circuit outputs (z, and the internal nodes
// t0/t1 so that their transitions can be watched) are brought out.
//
// The published examples show only the gates driven by the latches, not the functions
// that produce the latches' next states (except Y4 of the five-latch circuit).
// Those next-state lines are therefore inputs of this top (fN_next_state):
// whatever drives them is loaded into the latches on a capture cycle.
// All ports are plain signals; bit i of a vector belongs to latch Si or input xi.
module msc_top
  import msc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,

  // six-latch circuit
  input  logic       f2_vec_valid,
  output logic       f2_vec_ready,
  input  logic [5:0] f2_vec_ps,
  input  logic [2:0] f2_vec_pi,
  input  logic       f2_vec_capture,
  output logic       f2_resp_valid,
  output logic [5:0] f2_resp,
  input  logic [5:0] f2_next_state,
  output logic [2:0] f2_x,
  output logic [5:0] f2_y,
  output logic [5:0] f2_z,
  output logic       f2_scan_out,
  output logic [1:0] f2_chain_sel,
  output msc_phase_e f2_phase,

  // two-latch circuit
  input  logic       f3_vec_valid,
  output logic       f3_vec_ready,
  input  logic [1:0] f3_vec_ps,
  input  logic [1:0] f3_vec_pi,
  input  logic       f3_vec_capture,
  output logic       f3_resp_valid,
  output logic [1:0] f3_resp,
  input  logic [1:0] f3_next_state,
  output logic [1:0] f3_x,
  output logic [1:0] f3_y,
  output logic       f3_t0,
  output logic       f3_t1,
  output logic       f3_z0,
  output logic       f3_scan_out,
  output logic       f3_chain_sel,
  output msc_phase_e f3_phase,

  // five-latch circuit (latches S0..S3 take their next state from outside)
  input  logic       f5_vec_valid,
  output logic       f5_vec_ready,
  input  logic [4:0] f5_vec_ps,
  input  logic       f5_vec_capture,
  output logic       f5_resp_valid,
  output logic [4:0] f5_resp,
  input  logic [3:0] f5_next_state,
  output logic [4:0] f5_y,
  output logic       f5_t0,
  output logic       f5_t1,
  output logic       f5_y4_next,     // Y4, next state of S4
  output logic       f5_z0,
  output logic       f5_scan_out,
  output logic       f5_chain_sel,
  output msc_phase_e f5_phase
);

  // ---------------- six-latch circuit: two chains, no ESC ----------------
  localparam int unsigned F2_CHAIN_OF [6] = '{0, 1, 0, 0, 1, 1};
  localparam logic [2:0]  F2_EV_VAL   [2] = '{3'b000, 3'b101};  // 00X, 1X1
  localparam logic [2:0]  F2_EV_CARE  [2] = '{3'b011, 3'b101};
  logic f2_shift, f2_capture, f2_restart, f2_advance, f2_scan_in;

  msc_test_sequencer #(
    .NUM_SL(6), .NUM_PI(3), .NUM_SC(2), .CHAIN_OF(F2_CHAIN_OF),
    .EV_VAL(F2_EV_VAL), .EV_CARE(F2_EV_CARE)
  ) u_f2_seq (
    .clk, .rst_n,
    .vec_valid(f2_vec_valid), .vec_ready(f2_vec_ready), .vec_ps(f2_vec_ps),
    .vec_pi(f2_vec_pi), .vec_capture(f2_vec_capture),
    .resp_valid(f2_resp_valid), .resp(f2_resp),
    .x(f2_x), .shift(f2_shift), .capture(f2_capture), .restart(f2_restart),
    .advance(f2_advance), .scan_in(f2_scan_in), .scan_out(f2_scan_out),
    .phase(f2_phase), .chain()
  );

  msc_scan_arch #(.NUM_SL(6), .NUM_SC(2), .CHAIN_OF(F2_CHAIN_OF)) u_f2_scan (
    .clk, .rst_n, .shift(f2_shift), .capture(f2_capture), .restart(f2_restart),
    .advance(f2_advance), .scan_in(f2_scan_in), .next_state(f2_next_state),
    .present_state(f2_y), .scan_out(f2_scan_out), .chain_sel(f2_chain_sel)
  );

  fig2_comb u_f2_comb (.x(f2_x), .y(f2_y), .z(f2_z));

  // ---------------- two-latch circuit: one chain ----------------
  localparam int unsigned F3_CHAIN_OF [2] = '{0, 0};
  localparam logic [1:0]  F3_EV_VAL   [1] = '{2'b00};   // EV0 = x0x1 = 0X
  localparam logic [1:0]  F3_EV_CARE  [1] = '{2'b01};
  logic f3_shift, f3_capture, f3_restart, f3_advance, f3_scan_in;

  msc_test_sequencer #(
    .NUM_SL(2), .NUM_PI(2), .NUM_SC(1), .CHAIN_OF(F3_CHAIN_OF),
    .EV_VAL(F3_EV_VAL), .EV_CARE(F3_EV_CARE)
  ) u_f3_seq (
    .clk, .rst_n,
    .vec_valid(f3_vec_valid), .vec_ready(f3_vec_ready), .vec_ps(f3_vec_ps),
    .vec_pi(f3_vec_pi), .vec_capture(f3_vec_capture),
    .resp_valid(f3_resp_valid), .resp(f3_resp),
    .x(f3_x), .shift(f3_shift), .capture(f3_capture), .restart(f3_restart),
    .advance(f3_advance), .scan_in(f3_scan_in), .scan_out(f3_scan_out),
    .phase(f3_phase), .chain()
  );

  msc_scan_arch #(.NUM_SL(2), .NUM_SC(1), .CHAIN_OF(F3_CHAIN_OF)) u_f3_scan (
    .clk, .rst_n, .shift(f3_shift), .capture(f3_capture), .restart(f3_restart),
    .advance(f3_advance), .scan_in(f3_scan_in), .next_state(f3_next_state),
    .present_state(f3_y), .scan_out(f3_scan_out), .chain_sel(f3_chain_sel)
  );

  fig3_comb u_f3_comb (.x(f3_x), .y(f3_y), .t0(f3_t0), .t1(f3_t1), .z0(f3_z0));

  // ---------------- five-latch circuit: everything in ESC ----------------
  // chain index NUM_SC = 0 is ESC
  localparam int unsigned F5_CHAIN_OF [5] = '{0, 0, 0, 0, 0};
  localparam logic [0:0]  F5_EV_NONE  [1] = '{1'b0};    // no ordinary chain
  logic f5_shift, f5_capture, f5_restart, f5_advance, f5_scan_in;
  logic f5_x;

  msc_test_sequencer #(
    .NUM_SL(5), .NUM_PI(1), .NUM_SC(0), .CHAIN_OF(F5_CHAIN_OF),
    .EV_VAL(F5_EV_NONE), .EV_CARE(F5_EV_NONE)
  ) u_f5_seq (
    .clk, .rst_n,
    .vec_valid(f5_vec_valid), .vec_ready(f5_vec_ready), .vec_ps(f5_vec_ps),
    .vec_pi(1'b0), .vec_capture(f5_vec_capture),
    .resp_valid(f5_resp_valid), .resp(f5_resp),
    .x(f5_x), .shift(f5_shift), .capture(f5_capture), .restart(f5_restart),
    .advance(f5_advance), .scan_in(f5_scan_in), .scan_out(f5_scan_out),
    .phase(f5_phase), .chain()
  );

  msc_scan_arch #(.NUM_SL(5), .NUM_SC(0), .CHAIN_OF(F5_CHAIN_OF)) u_f5_scan (
    .clk, .rst_n, .shift(f5_shift), .capture(f5_capture), .restart(f5_restart),
    .advance(f5_advance), .scan_in(f5_scan_in),
    .next_state({f5_y4_next, f5_next_state}),
    .present_state(f5_y), .scan_out(f5_scan_out), .chain_sel(f5_chain_sel)
  );

  fig5_comb u_f5_comb (
    .y(f5_y[3:0]), .t0(f5_t0), .t1(f5_t1), .z0(f5_z0), .y4_next(f5_y4_next)
  );

endmodule
