// tb_msc_top: end-to-end test of the three example circuits with their
// multiple-scan-chain architecture and test sequencers (top at its defaults).
//
// For each circuit a stream of random test vectors is applied through the
// sequencer; the last vector only unloads. The next-state inputs are tied to
// circuit nodes chosen here, so each captured response is a known function of
// the vector, computed independently below:
//   six-latch:  Y = z            (z0 = y0&x0, z1 = y1|x0, z2 = y2&x1, ...)
//   two-latch:  Y0 = z0, Y1 = t0
//   five-latch: Y0 = y1, Y1 = y0, Y2 = t0, Y3 = t1 (Y4 comes from the circuit)
// Every response returned on resp is compared with that expectation.
//
// Transitions are watched between consecutive cycles that shift the same
// chain (primary inputs unchanged, so any change is a spurious transition
// caused by the shifting latches):
//   six-latch:  no output may change (all spurious transitions removed); the
//               same latch values with the vector's own inputs applied
//               instead of EVj are also evaluated, to show how many output
//               transitions the extra test vectors avoid;
//   two-latch:  z0 may not change; t0 does change (cannot be frozen);
//   five-latch: all latches are in ESC and t0/t1/Y4 do change.
// A node transition count in the form of the usual power estimate (gate
// output transitions weighted by fan-out, here 1 for every output, plus 2 for
// each clocked scan latch whose value stays and 6 for one whose value
// changes) is accumulated for the six-latch circuit as run, and for a
// reference model of the same vectors applied through a single chain
// S0..S5 with the vector's inputs held while shifting. The multiple-chain
// count must be the lower one.
// Each mechanism (SC0/SC1 shifting with their EVs, chain advance, ESC shift,
// capture, response unload, frozen outputs, unfreezable and independent
// transitions) is counted and must occur.
module tb_msc_top;
  import msc_pkg::*;
  localparam int NVEC = 60;

  logic clk = 1'b0, rst_n = 1'b1;

  logic       f2_vec_valid, f2_vec_ready, f2_vec_capture, f2_resp_valid, f2_scan_out;
  logic [5:0] f2_vec_ps, f2_resp, f2_next_state, f2_y, f2_z;
  logic [2:0] f2_vec_pi, f2_x;
  logic [1:0] f2_chain_sel;
  msc_phase_e f2_phase;

  logic       f3_vec_valid, f3_vec_ready, f3_vec_capture, f3_resp_valid, f3_scan_out;
  logic [1:0] f3_vec_ps, f3_vec_pi, f3_resp, f3_next_state, f3_x, f3_y;
  logic       f3_t0, f3_t1, f3_z0, f3_chain_sel;
  msc_phase_e f3_phase;

  logic       f5_vec_valid, f5_vec_ready, f5_vec_capture, f5_resp_valid, f5_scan_out;
  logic [4:0] f5_vec_ps, f5_resp, f5_y;
  logic [3:0] f5_next_state;
  logic       f5_t0, f5_t1, f5_y4_next, f5_z0, f5_chain_sel;
  msc_phase_e f5_phase;

  msc_top dut (.*);

  assign f2_next_state = f2_z;
  assign f3_next_state = {f3_t0, f3_z0};
  assign f5_next_state = {f5_t1, f5_t0, f5_y[0], f5_y[1]};

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("%0d: FAIL %s", cyc, what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- expected responses ----------------
  function automatic logic [5:0] f2_expect(logic [5:0] ps, logic [2:0] pi);
    return {ps[5] | pi[2], ps[4] | pi[2], ps[3] & pi[1], ps[2] & pi[1],
            ps[1] | pi[0], ps[0] & pi[0]};
  endfunction
  function automatic logic [1:0] f3_expect(logic [1:0] ps, logic [1:0] pi);
    return {ps[0] & ps[1], ps[0] & ps[1] & pi[0] & pi[1]};
  endfunction
  function automatic logic [4:0] f5_expect(logic [4:0] ps);
    logic a = ps[0] & ps[1];
    logic b = ps[2] | ps[3];
    return {a & b, b, a, ps[0], ps[1]};
  endfunction

  // ---------------- mechanism counters ----------------
  int n_f2_sc0 = 0, n_f2_sc1 = 0, n_f2_adv = 0, n_f2_frozen = 0;
  int n_f2_conv_toggles = 0, n_f2_msc_toggles = 0;
  int n_f3_frozen = 0, n_f3_t0_toggles = 0;
  int n_f5_esc = 0, n_f5_toggles = 0;
  int n_cap = 0, n_resp = 0, n_unload = 0;
  int ntc_msc = 0, ntc_single = 0, ntc_cycles = 0;
  localparam logic [5:0] SC0_MASK = 6'b001101, SC1_MASK = 6'b110010;

  function automatic int latch_ntc(logic [5:0] clocked, logic [5:0] old_v, logic [5:0] new_v);
    int n = 0;
    for (int i = 0; i < 6; i++) if (clocked[i]) n += (old_v[i] == new_v[i]) ? 2 : 6;
    return n;
  endfunction

  // samples of the previous cycle
  msc_phase_e p2_phase, p3_phase, p5_phase;
  logic [1:0] p2_sel;
  logic [5:0] p2_y, p2_z;
  logic [2:0] p2_x;
  logic p3_z0, p3_t0;
  logic p5_t0, p5_t1, p5_y4n;
  logic [2:0] f2_cur_pi;          // primary-input part of the vector being shifted
  logic started = 1'b0;

  function automatic logic [5:0] f2_logic(logic [5:0] y, logic [2:0] x);
    return f2_expect(y, x);
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (started) begin
      // six-latch circuit
      if (f2_phase == PH_SHIFT_SC) begin
        if (f2_chain_sel == 2'b01) begin
          n_f2_sc0++;
          check("EV0 = 00X on the inputs", f2_x[1:0] == 2'b00);
        end else begin
          n_f2_sc1++;
          check("EV1 = 1X1 on the inputs", f2_x[0] && f2_x[2]);
        end
      end
      if (p2_phase == PH_SHIFT_SC && f2_phase == PH_SHIFT_SC && f2_chain_sel != p2_sel)
        n_f2_adv++;
      if (p2_phase == PH_SHIFT_SC && f2_phase == PH_SHIFT_SC && f2_chain_sel == p2_sel) begin
        check("inputs steady inside a chain's shift", f2_x == p2_x);
        check("six-latch outputs frozen while shifting", f2_z == p2_z);
        n_f2_msc_toggles += $countones(f2_z ^ p2_z);
        n_f2_conv_toggles += $countones(f2_logic(f2_y, f2_cur_pi) ^ f2_logic(p2_y, f2_cur_pi));
        n_f2_frozen++;
      end
      // two-latch circuit
      if (p3_phase == PH_SHIFT_SC && f3_phase == PH_SHIFT_SC) begin
        check("two-latch output frozen while shifting", f3_z0 == p3_z0);
        n_f3_frozen++;
        if (f3_t0 != p3_t0) n_f3_t0_toggles++;
      end
      // five-latch circuit
      if (p5_phase == PH_SHIFT_ESC && f5_phase == PH_SHIFT_ESC) begin
        n_f5_esc++;
        n_f5_toggles += (f5_t0 != p5_t0) + (f5_t1 != p5_t1) + (f5_y4_next != p5_y4n);
      end
      // node transition count of the six-latch circuit as run
      begin
        logic [5:0] clocked;
        clocked = '0;
        if (p2_phase == PH_SHIFT_SC) clocked = (p2_sel == 2'b01) ? SC0_MASK : SC1_MASK;
        if (p2_phase == PH_CAPTURE)  clocked = '1;
        ntc_msc += $countones(f2_z ^ p2_z) + latch_ntc(clocked, p2_y, f2_y);
      end
      n_cap += (f2_phase == PH_CAPTURE) + (f3_phase == PH_CAPTURE) + (f5_phase == PH_CAPTURE);
    end
    p2_phase = f2_phase; p2_sel = f2_chain_sel; p2_y = f2_y; p2_z = f2_z; p2_x = f2_x;
    p3_phase = f3_phase; p3_z0 = f3_z0; p3_t0 = f3_t0;
    p5_phase = f5_phase; p5_t0 = f5_t0; p5_t1 = f5_t1; p5_y4n = f5_y4_next;
  end

  // ---------------- drivers ----------------
  task automatic run_f2();
    logic [5:0] exp_r = '0;
    logic have = 0;
    logic [5:0] cs = '0, cn;          // single-chain reference: latch values
    logic [2:0] cpi = '0;             // and applied inputs
    for (int v = 0; v < NVEC; v++) begin
      @(negedge clk);
      f2_vec_valid = 1; f2_vec_ps = 6'($urandom); f2_vec_pi = 3'($urandom);
      f2_vec_capture = (v != NVEC - 1);
      // single chain, vector inputs held while shifting
      ntc_single += $countones(f2_logic(cs, f2_vec_pi) ^ f2_logic(cs, cpi));
      cpi = f2_vec_pi;
      for (int c = 0; c < 6; c++) begin
        cn = {cs[4:0], f2_vec_ps[5 - c]};
        ntc_single += $countones(f2_logic(cn, cpi) ^ f2_logic(cs, cpi)) + latch_ntc('1, cs, cn);
        cs = cn;
      end
      ntc_cycles += 6;
      if (f2_vec_capture) begin
        cn = f2_logic(cs, cpi);
        ntc_single += $countones(f2_logic(cn, cpi) ^ f2_logic(cs, cpi)) + latch_ntc('1, cs, cn);
        cs = cn;
        ntc_cycles += 1;
      end
      while (!f2_vec_ready) @(negedge clk);
      @(posedge clk);
      f2_cur_pi = f2_vec_pi;
      #1 f2_vec_valid = 0;
      repeat (6) @(posedge clk);
      #1;
      check("six-latch resp_valid", f2_resp_valid == have);
      if (have) begin
        check("six-latch response", f2_resp == exp_r);
        n_resp++;
      end
      exp_r = f2_expect(f2_vec_ps, f2_vec_pi);
      have = f2_vec_capture;
      if (!f2_vec_capture) n_unload++;
    end
  endtask

  task automatic run_f3();
    logic [1:0] exp_r = '0;
    logic have = 0;
    for (int v = 0; v < NVEC; v++) begin
      @(negedge clk);
      f3_vec_valid = 1; f3_vec_ps = 2'($urandom); f3_vec_pi = 2'($urandom);
      f3_vec_capture = (v != NVEC - 1);
      while (!f3_vec_ready) @(negedge clk);
      @(posedge clk);
      #1 f3_vec_valid = 0;
      repeat (2) @(posedge clk);
      #1;
      check("two-latch resp_valid", f3_resp_valid == have);
      if (have) begin
        check("two-latch response", f3_resp == exp_r);
        n_resp++;
      end
      exp_r = f3_expect(f3_vec_ps, f3_vec_pi);
      have = f3_vec_capture;
    end
  endtask

  task automatic run_f5();
    logic [4:0] exp_r = '0;
    logic have = 0;
    for (int v = 0; v < NVEC; v++) begin
      @(negedge clk);
      f5_vec_valid = 1; f5_vec_ps = 5'($urandom);
      f5_vec_capture = (v != NVEC - 1);
      while (!f5_vec_ready) @(negedge clk);
      @(posedge clk);
      #1 f5_vec_valid = 0;
      repeat (5) @(posedge clk);
      #1;
      check("five-latch resp_valid", f5_resp_valid == have);
      if (have) begin
        check("five-latch response", f5_resp == exp_r);
        n_resp++;
      end
      exp_r = f5_expect(f5_vec_ps);
      have = f5_vec_capture;
    end
  endtask

  initial begin
    f2_vec_valid = 0; f2_vec_ps = '0; f2_vec_pi = '0; f2_vec_capture = 0; f2_cur_pi = '0;
    f3_vec_valid = 0; f3_vec_ps = '0; f3_vec_pi = '0; f3_vec_capture = 0;
    f5_vec_valid = 0; f5_vec_ps = '0; f5_vec_capture = 0;
    #1 rst_n = 1'b0;
    #1;
    @(negedge clk); rst_n = 1'b1;
    started = 1'b1;
    fork
      run_f2();
      run_f3();
      run_f5();
    join
    repeat (3) @(posedge clk);
    check("six-latch SC0 shifted under EV0", n_f2_sc0 > 0);
    check("six-latch SC1 shifted under EV1", n_f2_sc1 > 0);
    check("chain advance", n_f2_adv > 0);
    check("frozen shift cycles seen", n_f2_frozen > 0 && n_f3_frozen > 0);
    check("no output transitions under MSC", n_f2_msc_toggles == 0);
    check("conventional application would toggle outputs", n_f2_conv_toggles > 0);
    check("unfreezable t0 transitions seen", n_f3_t0_toggles > 0);
    check("ESC shift with transitions seen", n_f5_esc > 0 && n_f5_toggles > 0);
    check("captures", n_cap > 0);
    check("responses unloaded", n_resp > 0);
    check("unload-only vector", n_unload > 0);
    check("lower transition count than single-chain application", ntc_msc < ntc_single);
    $display("six-latch node transition count: %0d with multiple chains, %0d single chain (%0d shift/capture cycles): %.1f vs %.1f per cycle, %.1f%% lower",
             ntc_msc, ntc_single, ntc_cycles, real'(ntc_msc) / ntc_cycles,
             real'(ntc_single) / ntc_cycles, 100.0 * (1.0 - real'(ntc_msc) / ntc_single));
    $display("six-latch: SC0 %0d SC1 %0d advances %0d; output transitions while shifting: %0d with EVs, %0d with the vector's inputs",
             n_f2_sc0, n_f2_sc1, n_f2_adv, n_f2_msc_toggles, n_f2_conv_toggles);
    $display("two-latch: t0 toggles %0d; five-latch: ESC cycles %0d, node toggles %0d; captures %0d responses %0d",
             n_f3_t0_toggles, n_f5_esc, n_f5_toggles, n_cap, n_resp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
