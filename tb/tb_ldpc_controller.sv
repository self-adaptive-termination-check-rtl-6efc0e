// tb_ldpc_controller: self-checking test of the LDPC controller on its own,
// at a small size (4 lanes, Z = 64, 5 iterations, 4 delta-min samples).
//
// The testbench plays the datapath: it drives the CN units' delta-min
// values and the termination check result, and watches the controller's
// memory strobes. Frames:
//   A  all delta-min 0             -> every check skipped but the last
//   B  delta-min sum exactly 12    -> average 0.75 = bound, no skip;
//                                     the third check passes
//   C  delta-min sum 11 (< 12)     -> skipped like A
//   D  like B but the first check passes
// For each frame it checks the status outputs, the skip pulses, the cycle
// count from the last input word to the first output word, the number of
// C2V, z and hard-decision writes and of termination-check cycles, the
// order of the C2V write addresses, and the output handshake (with stalls).
//
// The skip rule (below the bound and not the last iteration) and the stop
// rule (syndrome zero or last iteration) follow the published scheme; the
// phase timing it checks is this design's own.
module tb_ldpc_controller;
  import ldpc_pkg::*;

  localparam int unsigned P = 4, Z = 64, MAX_ITER = 5, NS = 4;
  localparam int unsigned W = Z / P, AW = $clog2(W), LW = $clog2(P);
  localparam int unsigned ITW = $clog2(MAX_ITER + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, out_last;
  logic [$clog2(COLS)-1:0] out_bank, vn_col;
  logic [$clog2(ROWS)-1:0] cn_row;
  logic [COLS-1:0] f_we, z_we, hd_we;
  logic [ROWS-1:0] c2v_we;
  logic [AW-1:0] f_waddr, z_waddr, hd_waddr, c2v_waddr;
  logic [AW-1:0] f_raddr [COLS], z_raddr [COLS], hd_raddr [COLS], c2v_raddr [ROWS];
  logic z_wsel_load, cn_first_iter, tc_clear, tc_valid, tc_syndrome_ok, busy, skip_now;
  logic [LW-1:0] cn_rot [COLS], vn_rot [ROWS], tc_rot [COLS];
  mag_t cn_dmin [P];
  logic [ITW-1:0] iter, stat_iters, stat_skips, stat_checks;
  logic stat_success;
  logic [MW+1:0] delta_minima;

  ldpc_controller #(.P(P), .Z(Z), .MAX_ITER(MAX_ITER), .DMIN_BOUND(3), .NUM_SAMPLES(NS)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobe counters
  int n_c2v_we, n_z_we_vn, n_hd_we, n_tc_valid, n_clear, n_skip, ok_after;
  int c2v_seq_err;
  int c2v_k;
  always @(posedge clk) if (rst_n) begin
    if (|c2v_we) begin
      int r, g;
      r = (c2v_k / W) % ROWS; g = c2v_k % W;
      if (!(c2v_we === ROWS'(1 << r) && c2v_waddr === AW'(g))) c2v_seq_err++;
      c2v_k++;
      n_c2v_we++;
    end
    if (|z_we && !z_wsel_load) n_z_we_vn++;
    if (|hd_we) n_hd_we++;
    if (tc_valid) n_tc_valid++;
    if (tc_clear) n_clear++;
    if (skip_now) n_skip++;
  end
  assign tc_syndrome_ok = (n_clear >= ok_after);

  task automatic run_frame(string name, int d0, int d1, int d2, int d3, int okaf,
                           int exp_iters, int exp_skips, int exp_checks, bit exp_succ);
    int cyc, nout, exp_cyc;
    cn_dmin[0] = mag_t'(d0); cn_dmin[1] = mag_t'(d1);
    cn_dmin[2] = mag_t'(d2); cn_dmin[3] = mag_t'(d3);
    ok_after = okaf;
    n_c2v_we = 0; n_z_we_vn = 0; n_hd_we = 0; n_tc_valid = 0; n_clear = 0; n_skip = 0;
    c2v_seq_err = 0; c2v_k = 0;
    for (int k = 0; k < COLS * W; k++) begin
      @(negedge clk);
      in_valid = 1;
      while (!in_ready) @(negedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    check(busy, {name, ": busy after load"});
    cyc = 0;
    while (!out_valid) begin
      @(negedge clk);
      cyc++;
    end
    exp_cyc = exp_iters * (9 * W + 2) + exp_checks * (3 * W + 2) + 1;
    check(cyc === exp_cyc, $sformatf("%s: %0d cycles, expected %0d", name, cyc, exp_cyc));
    check(stat_iters === ITW'(exp_iters), $sformatf("%s: iters %0d", name, stat_iters));
    check(stat_skips === ITW'(exp_skips), $sformatf("%s: skips %0d", name, stat_skips));
    check(stat_checks === ITW'(exp_checks), $sformatf("%s: checks %0d", name, stat_checks));
    check(stat_success === exp_succ, {name, ": success"});
    check(n_skip === exp_skips, {name, ": skip pulses"});
    check(n_c2v_we === exp_iters * ROWS * W, $sformatf("%s: c2v writes %0d", name, n_c2v_we));
    check(n_z_we_vn === exp_iters * COLS * W, $sformatf("%s: z writes %0d", name, n_z_we_vn));
    check(n_hd_we === exp_iters * COLS * W, $sformatf("%s: hd writes %0d", name, n_hd_we));
    check(n_tc_valid === exp_checks * ROWS * W, $sformatf("%s: tc cycles %0d", name, n_tc_valid));
    check(c2v_seq_err === 0, {name, ": c2v write order"});
    // unload with stalls
    nout = 0;
    for (int guard = 0; guard < 10 * COLS * W && nout < COLS * W; guard++) begin
      bit fire;
      out_ready = ($urandom_range(3) != 0);
      fire = out_ready && out_valid;   // both stable until the next rising edge
      if (fire) check(out_last === (nout == COLS * W - 1), {name, ": out_last"});
      @(negedge clk);
      if (fire) nout++;
    end
    out_ready = 0;
    check(nout === COLS * W, $sformatf("%s: %0d output words", name, nout));
    check(!busy && in_ready, {name, ": back to load"});
  endtask

  initial begin
    in_valid = 0; out_ready = 0; ok_after = 1000;
    for (int q = 0; q < P; q++) cn_dmin[q] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame("A", 0, 0, 0, 0, 1000, MAX_ITER, MAX_ITER - 1, 1, 0);
    run_frame("B", 3, 3, 3, 3, 3,    3, 0, 3, 1);
    run_frame("C", 3, 3, 3, 2, 1000, MAX_ITER, MAX_ITER - 1, 1, 0);
    run_frame("D", 3, 3, 3, 3, 1,    1, 0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
