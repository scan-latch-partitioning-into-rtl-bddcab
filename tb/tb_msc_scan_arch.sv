// tb_msc_scan_arch: random test of the multiple-scan-chain architecture.
//
// Two instances are checked against a reference model that keeps the latch
// values and the selected chain:
//   A: default six-latch partition, SC0 = {S0,S2,S3}, SC1 = {S1,S4,S5}
//   B: five latches, SC0 = {S0,S2}, ESC = {S1,S3,S4}
// The chain orders are written out by hand here (latch next to ScanIn first).
// Each cycle a random operation is applied: shift (optionally with advance or
// restart), capture with random next-state values, restart, or nothing. The
// model shifts only the selected chain; every cycle the testbench compares
// present_state, chain_sel and scan_out (last latch of the selected chain).
// Counts that shifts of every chain, captures and chain wrap-arounds happened.
module tb_msc_scan_arch;
  logic clk = 1'b0, rst_n = 1'b1;

  // instance A
  logic a_shift, a_capture, a_restart, a_advance, a_scan_in, a_scan_out;
  logic [5:0] a_next, a_ps;
  logic [1:0] a_sel;
  // instance B
  logic b_shift, b_capture, b_restart, b_advance, b_scan_in, b_scan_out;
  logic [4:0] b_next, b_ps;
  logic [1:0] b_sel;

  localparam int unsigned B_CHAIN_OF [5] = '{0, 1, 0, 1, 1};

  msc_scan_arch dut_a (
    .clk, .rst_n, .shift(a_shift), .capture(a_capture), .restart(a_restart),
    .advance(a_advance), .scan_in(a_scan_in), .next_state(a_next),
    .present_state(a_ps), .scan_out(a_scan_out), .chain_sel(a_sel)
  );

  msc_scan_arch #(.NUM_SL(5), .NUM_SC(1), .CHAIN_OF(B_CHAIN_OF)) dut_b (
    .clk, .rst_n, .shift(b_shift), .capture(b_capture), .restart(b_restart),
    .advance(b_advance), .scan_in(b_scan_in), .next_state(b_next),
    .present_state(b_ps), .scan_out(b_scan_out), .chain_sel(b_sel)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int shifts_a [2] = '{0, 0};
  int shifts_b [2] = '{0, 0};
  int captures = 0;

  // reference state
  logic [5:0] ma;
  logic [4:0] mb;
  int ca, cb;   // selected chain
  int ord_a [2][$];
  int ord_b [2][$];

  task automatic check(string who, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%0t %s: got %b expected %b", $time, who, got, exp);
    end
  endtask

  // apply a random operation to one instance's control inputs
  task automatic pick(output logic sh, cap, rs, adv, si);
    int r = $urandom_range(0, 9);
    sh = 0; cap = 0; rs = 0; adv = 0; si = 1'($urandom);
    if (r < 6) begin
      sh = 1;
      adv = ($urandom_range(0, 3) == 0);
    end else if (r == 6) cap = 1;
    else if (r == 7) rs = 1;
    else if (r == 8) adv = 1;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ord_a[0] = '{0, 2, 3}; ord_a[1] = '{1, 4, 5};
    ord_b[0] = '{0, 2};    ord_b[1] = '{1, 3, 4};
    {a_shift, a_capture, a_restart, a_advance, a_scan_in} = '0;
    {b_shift, b_capture, b_restart, b_advance, b_scan_in} = '0;
    a_next = '0; b_next = '0;
    #1 rst_n = 1'b0;
    #1;
    ma = '0; mb = '0; ca = 0; cb = 0;
    @(negedge clk); rst_n = 1'b1;
    repeat (1500) begin
      @(negedge clk);
      pick(a_shift, a_capture, a_restart, a_advance, a_scan_in);
      pick(b_shift, b_capture, b_restart, b_advance, b_scan_in);
      a_next = 6'($urandom); b_next = 5'($urandom);
      #1;
      // combinational outputs before the edge
      check("A present_state", a_ps == ma, 1'b1);
      check("B present_state", b_ps == mb, 1'b1);
      check("A chain_sel", a_sel == 2'(1 << ca), 1'b1);
      check("B chain_sel", b_sel == 2'(1 << cb), 1'b1);
      check("A scan_out", a_scan_out, ma[ord_a[ca][ord_a[ca].size()-1]]);
      check("B scan_out", b_scan_out, mb[ord_b[cb][ord_b[cb].size()-1]]);
      @(posedge clk);
      // model update
      if (a_capture) begin ma = a_next; captures++; end
      else if (a_shift) begin
        for (int p = ord_a[ca].size() - 1; p > 0; p--) ma[ord_a[ca][p]] = ma[ord_a[ca][p-1]];
        ma[ord_a[ca][0]] = a_scan_in;
        shifts_a[ca]++;
      end
      if (a_restart) ca = 0; else if (a_advance) ca = (ca + 1) % 2;
      if (b_capture) begin mb = b_next; captures++; end
      else if (b_shift) begin
        for (int p = ord_b[cb].size() - 1; p > 0; p--) mb[ord_b[cb][p]] = mb[ord_b[cb][p-1]];
        mb[ord_b[cb][0]] = b_scan_in;
        shifts_b[cb]++;
      end
      if (b_restart) cb = 0; else if (b_advance) cb = (cb + 1) % 2;
    end
    @(negedge clk);
    a_shift = 0; a_capture = 0; b_shift = 0; b_capture = 0;
    // every mechanism seen
    check("A SC0 shifts seen", shifts_a[0] > 0, 1'b1);
    check("A SC1 shifts seen", shifts_a[1] > 0, 1'b1);
    check("B SC0 shifts seen", shifts_b[0] > 0, 1'b1);
    check("B ESC shifts seen", shifts_b[1] > 0, 1'b1);
    check("captures seen", captures > 0, 1'b1);
    $display("shifts A %0d/%0d B %0d/%0d captures %0d", shifts_a[0], shifts_a[1],
             shifts_b[0], shifts_b[1], captures);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
