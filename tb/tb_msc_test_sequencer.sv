// tb_msc_test_sequencer: checks the test application sequence for the default
// six-latch partition (SC0 = {S0,S2,S3} with EV0 = 00X, SC1 = {S1,S4,S5} with
// EV1 = 1X1, no ESC, 3 primary inputs).
//
// The scan chains are a reference model in the testbench (chain orders written
// out by hand), clocked by the sequencer's shift/capture/restart/advance. The
// testbench checks, per cycle:
//   - while SC0 shifts: x0 = 0, x1 = 0, x2 keeps its earlier value;
//     while SC1 shifts: x0 = 1, x2 = 1, x1 keeps its earlier value;
//     on the capture cycle: x = the vector's primary inputs;
//   - after the shift phases the model latches hold exactly vec_ps;
//   - the response returned with the next vector equals what was captured
//     (the capture loads a next state computed by the testbench);
//   - a vector takes 8 cycles from acceptance to the next acceptance
//     (1 + 6 shift + 1 capture).
// The last vector is an unload-only vector (vec_capture = 0).
module tb_msc_test_sequencer;
  import msc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic vec_valid, vec_ready, vec_capture;
  logic [5:0] vec_ps;
  logic [2:0] vec_pi;
  logic resp_valid;
  logic [5:0] resp;
  logic [2:0] x;
  logic shift, capture, restart, advance, scan_in, scan_out;
  msc_phase_e phase;
  logic chain;

  msc_test_sequencer dut (
    .clk, .rst_n, .vec_valid, .vec_ready, .vec_ps, .vec_pi, .vec_capture,
    .resp_valid, .resp, .x, .shift, .capture, .restart, .advance, .scan_in,
    .scan_out, .phase, .chain
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sc0 = 0, n_sc1 = 0, n_adv = 0, n_cap = 0, n_resp = 0, n_unload = 0;

  // reference scan chains
  logic [5:0] st;
  int cur;
  int ord [2][$];
  logic [2:0] x_prev;
  logic [5:0] captured;
  logic have_captured;
  int t_accept, t_last_accept;
  int cyc = 0;

  always @(posedge clk) cyc++;

  assign scan_out = st[ord[cur][ord[cur].size()-1]];

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("%0d: FAIL %s", cyc, what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // controls sampled mid-cycle, applied to the model at the next rising edge
  logic s_shift, s_capture, s_restart, s_advance, s_scan_in;
  logic [2:0] s_x;
  always @(negedge clk) begin
    s_shift = shift; s_capture = capture; s_restart = restart;
    s_advance = advance; s_scan_in = scan_in; s_x = x;
  end

  // per-cycle model and checks
  always @(posedge clk) if (rst_n) begin
    if (s_shift) begin
      if (cur == 0) begin
        check("EV0 on inputs", s_x[1:0] == 2'b00 && s_x[2] == x_prev[2]);
        n_sc0++;
      end else begin
        check("EV1 on inputs", s_x[0] == 1'b1 && s_x[2] == 1'b1 && s_x[1] == x_prev[1]);
        n_sc1++;
      end
      for (int p = ord[cur].size() - 1; p > 0; p--) st[ord[cur][p]] = st[ord[cur][p-1]];
      st[ord[cur][0]] = s_scan_in;
    end
    if (s_capture) begin
      check("vector inputs applied at capture", s_x == vec_pi_q);
      check("no shift during capture", !s_shift);
      captured = st ^ {s_x, s_x};     // testbench-chosen next state
      st = captured;
      n_cap++;
    end
    if (s_restart) cur = 0;
    else if (s_advance) begin cur = (cur + 1) % 2; n_adv++; end
    x_prev = s_x;
  end

  logic [2:0] vec_pi_q;
  logic [5:0] vec_ps_q;

  initial begin
    ord[0] = '{0, 2, 3}; ord[1] = '{1, 4, 5};
    st = '0; cur = 0; x_prev = '0; have_captured = 0;
    vec_valid = 0; vec_ps = '0; vec_pi = '0; vec_capture = 0;
    #1 rst_n = 1'b0;
    #1;
    @(negedge clk); rst_n = 1'b1;
    t_last_accept = -1;
    for (int v = 0; v < 40; v++) begin
      @(negedge clk);
      vec_valid = 1;
      vec_ps = 6'($urandom);
      vec_pi = 3'($urandom);
      vec_capture = (v != 39);
      // wait for acceptance
      while (!vec_ready) @(negedge clk);
      @(posedge clk);
      vec_pi_q = vec_pi; vec_ps_q = vec_ps;
      t_accept = cyc;
      if (t_last_accept >= 0) check("8 cycles per vector", t_accept - t_last_accept == 8);
      t_last_accept = t_accept;
      #1 vec_valid = 0;
      // shift phases: 6 cycles, then the response appears
      repeat (6) @(posedge clk);
      #1;
      check("vector loaded into the latches", st == vec_ps_q);
      check("resp_valid iff a capture preceded", resp_valid == have_captured);
      if (have_captured) begin
        check("response equals the captured state", resp == captured);
        n_resp++;
      end
      have_captured = vec_capture;
      if (!vec_capture) n_unload++;
    end
    repeat (3) @(posedge clk);
    check("SC0 shifted", n_sc0 > 0);
    check("SC1 shifted", n_sc1 > 0);
    check("chain advanced", n_adv > 0);
    check("captured", n_cap > 0);
    check("responses returned", n_resp > 0);
    check("unload-only vector", n_unload > 0);
    $display("sc0 %0d sc1 %0d adv %0d cap %0d resp %0d", n_sc0, n_sc1, n_adv, n_cap, n_resp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
