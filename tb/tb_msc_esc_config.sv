// tb_msc_esc_config: the scan architecture and test sequencer in a
// configuration with several ordinary chains and a non-empty extra chain,
// sized like the smallest such entry of the published results: 14 scan
// latches, 3 primary inputs, 3 ordinary chains and an ESC of 5 latches.
// The circuit itself is not available, so chain membership and the extra
// test vectors below are made up; the combinational part is replaced by a
// next-state function chosen here: Y = ~y ^ {x, x, x, x, x}[13:0].
//
// Checked per cycle: the primary inputs while each chain shifts (EVj with
// don't-cares holding, then the vector's own inputs for ESC and capture),
// that only the selected chain moves, that each vector lands in the latches,
// that every response equals the captured next state, and that a vector takes
// 1 + 14 + 1 = 16 cycles.
module tb_msc_esc_config;
  import msc_pkg::*;
  localparam int unsigned NUM_SL = 14, NUM_PI = 3, NUM_SC = 3;
  localparam int unsigned CHAIN_OF [NUM_SL] = '{0, 1, 2, 3, 0, 1, 2, 3, 3, 0, 1, 2, 3, 3};
  // x0x1x2: EV0 = 0X1, EV1 = X10, EV2 = 1XX   (bit k = xk)
  localparam logic [NUM_PI-1:0] EV_VAL  [NUM_SC] = '{3'b100, 3'b010, 3'b001};
  localparam logic [NUM_PI-1:0] EV_CARE [NUM_SC] = '{3'b101, 3'b110, 3'b001};
  localparam int NVEC = 50;

  logic clk = 1'b0, rst_n = 1'b1;
  logic vec_valid, vec_ready, vec_capture, resp_valid;
  logic [NUM_SL-1:0] vec_ps, resp, next_state, present_state;
  logic [NUM_PI-1:0] vec_pi, x;
  logic shift, capture, restart, advance, scan_in, scan_out;
  logic [3:0] chain_sel;
  msc_phase_e phase;
  logic [1:0] chain;

  msc_test_sequencer #(
    .NUM_SL(NUM_SL), .NUM_PI(NUM_PI), .NUM_SC(NUM_SC), .CHAIN_OF(CHAIN_OF),
    .EV_VAL(EV_VAL), .EV_CARE(EV_CARE)
  ) u_seq (
    .clk, .rst_n, .vec_valid, .vec_ready, .vec_ps, .vec_pi, .vec_capture,
    .resp_valid, .resp, .x, .shift, .capture, .restart, .advance, .scan_in,
    .scan_out, .phase, .chain
  );

  msc_scan_arch #(.NUM_SL(NUM_SL), .NUM_SC(NUM_SC), .CHAIN_OF(CHAIN_OF)) u_arch (
    .clk, .rst_n, .shift, .capture, .restart, .advance, .scan_in, .next_state,
    .present_state, .scan_out, .chain_sel
  );

  assign next_state = ~present_state ^ {x[1:0], x, x, x, x};

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  int n_shift [4] = '{0, 0, 0, 0};
  int n_resp = 0, n_cap = 0;
  always @(posedge clk) cyc++;

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

  // per-cycle checks on mid-cycle samples
  logic [NUM_PI-1:0] x_prev, cur_pi;
  logic [NUM_SL-1:0] y_prev;
  logic prev_shift = 0;
  int   prev_chain = 0;
  always @(negedge clk) if (rst_n) begin
    if (shift) begin
      int c = 0;
      for (int k = 0; k < 4; k++) if (chain_sel[k]) c = k;
      n_shift[c]++;
      if (c < NUM_SC)
        check("EVj on the inputs",
              x == ((EV_VAL[c] & EV_CARE[c]) | (x_prev & ~EV_CARE[c])));
      else
        check("vector inputs during ESC shift", x == cur_pi);
      // only latches of the chain that shifted in the previous cycle moved
      if (prev_shift)
        for (int i = 0; i < NUM_SL; i++)
          if (CHAIN_OF[i] != prev_chain)
            check("latch outside the shifting chain held", present_state[i] == y_prev[i]);
      prev_chain = c;
    end
    if (capture) begin
      check("vector inputs at capture", x == cur_pi);
      n_cap++;
    end
    prev_shift = shift;
    x_prev = x;
    y_prev = present_state;
  end

  initial begin
    logic [NUM_SL-1:0] exp_r;
    logic have;
    int t_acc, t_last;
    vec_valid = 0; vec_ps = '0; vec_pi = '0; vec_capture = 0; cur_pi = '0;
    have = 0; exp_r = '0; t_last = -1;
    #1 rst_n = 1'b0;
    #1;
    @(negedge clk); rst_n = 1'b1;
    for (int v = 0; v < NVEC; v++) begin
      @(negedge clk);
      vec_valid = 1; vec_ps = NUM_SL'($urandom); vec_pi = NUM_PI'($urandom);
      vec_capture = (v != NVEC - 1);
      while (!vec_ready) @(negedge clk);
      @(posedge clk);
      t_acc = cyc;
      if (t_last >= 0) check("16 cycles per vector", t_acc - t_last == 16);
      t_last = t_acc;
      cur_pi = vec_pi;
      #1 vec_valid = 0;
      repeat (NUM_SL) @(posedge clk);
      #1;
      check("vector loaded into the latches", present_state == vec_ps);
      check("resp_valid", resp_valid == have);
      if (have) begin
        check("response equals the captured next state", resp == exp_r);
        n_resp++;
      end
      exp_r = ~vec_ps ^ {vec_pi[1:0], vec_pi, vec_pi, vec_pi, vec_pi};
      have = vec_capture;
    end
    repeat (3) @(posedge clk);
    for (int c = 0; c < 4; c++) check("every chain shifted", n_shift[c] > 0);
    check("captures", n_cap > 0);
    check("responses", n_resp > 0);
    $display("shift cycles per chain %0d %0d %0d ESC %0d, captures %0d, responses %0d",
             n_shift[0], n_shift[1], n_shift[2], n_shift[3], n_cap, n_resp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
