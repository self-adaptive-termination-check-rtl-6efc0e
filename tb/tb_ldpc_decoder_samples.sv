// tb_ldpc_decoder_samples: end-to-end test of the decoder with 64 sampled
// delta-min values per iteration instead of the default 16, at the full
// code size (N = 9216, 16 lanes, 30 iterations).
//
// The published scheme evaluates delta-minima taken from 4 to 64 sampled
// check nodes and finds that more than eight samples approximate the full
// average well. 64 is the largest count it evaluates; with W = 96 words per
// circulant the samples are then 4 CN steps apart and the sum needs
// 7 + 6 = 13 bits. (The controller's own test covers 4 samples.)
//
// Frames of the all-zero codeword over AWGN at Eb/N0 from 0 to 3 dB, LLR =
// 2y/sigma^2 in steps of 0.25, are decoded by the RTL and by a reference
// model written independently of it (global node numbers, uncompressed
// edge messages, the same 64 sampled check nodes). Decoded bits, status,
// skip pulses and the cycle count of every frame are compared; the
// iterations and skipped checks per Eb/N0 point are printed. It counts a
// failure unless some check is skipped, some check fails, and some frame
// terminates early. The matrix, the Eb/N0 points and the
// interface timing are this design's own.
module tb_ldpc_decoder_samples;
  import ldpc_pkg::*;

  localparam int unsigned P           = 16;
  localparam int unsigned Z           = 1536;
  localparam int unsigned MAX_ITER    = 30;
  localparam int unsigned DMIN_BOUND  = 3;
  localparam int unsigned NUM_SAMPLES = 64;
  localparam int unsigned W    = Z / P;
  localparam int unsigned N    = COLS * Z;
  localparam int unsigned M    = ROWS * Z;
  localparam int unsigned ITW  = $clog2(MAX_ITER + 1);
  localparam int unsigned AVW  = MW + $clog2(NUM_SAMPLES);
  localparam int unsigned NFRAMES = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            in_valid, in_ready;
  llr_t [P-1:0]    in_llr;
  logic            out_valid, out_ready, out_last;
  logic [P-1:0]    out_hd;
  logic            busy, stat_success, skip_now;
  logic [ITW-1:0]  stat_iters, stat_skips, stat_checks, cur_iter;
  logic [AVW-1:0]  delta_minima;
  logic [15:0]     tc_fails;

  ldpc_decoder #(.NUM_SAMPLES(NUM_SAMPLES)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_llr,
    .out_valid, .out_ready, .out_hd, .out_last, .busy,
    .stat_iters, .stat_skips, .stat_checks, .stat_success,
    .delta_minima, .skip_now, .cur_iter, .tc_fails
  );

  int checks = 0;
  int failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (NFRAMES * (MAX_ITER * 1200 + 2 * COLS * W * 4) + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------------
  // Reference model
  // ---------------------------------------------------------------------
  int f_llr   [N];
  int z_ref   [N];
  int emsg    [M][DC];   // C2V value of check j towards its k-th neighbour
  int dmin_r  [M];
  int nb      [M][DC];   // global variable index of neighbour k of check j
  bit hd_ref  [N];
  int ref_iters, ref_skips, ref_checks;
  bit ref_success;
  int n_sat;

  // base-matrix shifts of the code
  int shifts [3][6] = '{'{1508, 1053, 287, 861, 709, 1019},
                        '{1285, 1346, 1236, 1049, 697, 840},
                        '{272, 863, 788, 1023, 715, 497}};

  function automatic int shift_ref(int r, int c);
    return shifts[r][c] % Z;
  endfunction

  function automatic int sat127(int v);
    if (v > 127) return 127;
    if (v < -127) return -127;
    return v;
  endfunction

  task automatic build_graph();
    for (int r = 0; r < ROWS; r++)
      for (int jl = 0; jl < Z; jl++)
        for (int c = 0; c < COLS; c++)
          nb[r*Z + jl][c] = c * Z + (jl + shift_ref(r, c)) % Z;
  endtask

  task automatic ref_decode();
    int l;
    bit done;
    for (int i = 0; i < N; i++) z_ref[i] = f_llr[i];
    ref_skips = 0; ref_checks = 0; done = 0; l = 1;
    while (!done) begin
      // check-node update
      for (int j = 0; j < M; j++) begin
        int v [DC];
        int mags [DC];
        int m1, m2, amin, s1, s2;
        bit tot;
        tot = 0; m1 = 1000; m2 = 1000; amin = 0;
        for (int k = 0; k < DC; k++) begin
          int raw;
          raw  = z_ref[nb[j][k]] - ((l == 1) ? 0 : emsg[j][k]);
          v[k] = sat127(raw);
          if (raw != v[k]) n_sat++;
          mags[k] = (v[k] < 0) ? -v[k] : v[k];
          tot ^= (v[k] < 0);
          if (mags[k] < m1) begin m2 = m1; m1 = mags[k]; amin = k; end
          else if (mags[k] < m2) m2 = mags[k];
        end
        s1 = (3 * m1) / 4;
        s2 = (3 * m2) / 4;
        dmin_r[j] = (m1 == 127) ? 127 : s2 - s1;
        for (int k = 0; k < DC; k++) begin
          int mag;
          bit sg;
          mag = (k == amin) ? s2 : s1;
          sg  = tot ^ (v[k] < 0);
          emsg[j][k] = sg ? -mag : mag;
        end
      end
      // variable-node update
      for (int i = 0; i < N; i++) z_ref[i] = f_llr[i];
      for (int j = 0; j < M; j++)
        for (int k = 0; k < DC; k++) z_ref[nb[j][k]] += emsg[j][k];
      for (int i = 0; i < N; i++) hd_ref[i] = (z_ref[i] < 0);
      // delta-minima from the sampled check nodes
      begin
        int sum, stride;
        sum = 0;
        stride = (ROWS * W) / NUM_SAMPLES;
        for (int s = 0; s < NUM_SAMPLES; s++) begin
          int t, r, g, lane;
          t = s * stride; r = t / W; g = t % W; lane = s % P;
          sum += dmin_r[r*Z + lane*W + g];
        end
        if (sum < DMIN_BOUND * NUM_SAMPLES && l < MAX_ITER) begin
          ref_skips++;
          l++;
          continue;
        end
      end
      // termination check
      begin
        bit ok;
        ok = 1;
        ref_checks++;
        for (int j = 0; j < M; j++) begin
          bit par;
          par = 0;
          for (int k = 0; k < DC; k++) par ^= hd_ref[nb[j][k]];
          if (par) ok = 0;
        end
        if (ok || l == MAX_ITER) begin
          done = 1;
          ref_iters = l;
          ref_success = ok;
        end else begin
          l++;
        end
      end
    end
  endtask

  // ---------------------------------------------------------------------
  // Channel: all-zero codeword, BPSK +1, AWGN, quantised to 0.25 steps
  // ---------------------------------------------------------------------
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(32'hFFFF_FFFE)) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  task automatic make_frame(real ebn0_db);
    real sigma2, y;
    int q;
    sigma2 = 1.0 / (2.0 * 0.5 * (10.0 ** (ebn0_db / 10.0)));
    for (int i = 0; i < N; i++) begin
      y = 1.0 + $sqrt(sigma2) * gauss();
      // LLR = 2y / sigma^2 in steps of 0.25
      q = int'($floor(2.0 * y / sigma2 * 4.0 + 0.5));
      f_llr[i] = sat127(q);
    end
  endtask

  // ---------------------------------------------------------------------
  // Stimulus
  // ---------------------------------------------------------------------
  int n_skip_seen, n_fail_check, n_early, n_maxiter, n_bubble, n_stall;
  int skip_pulses;

  always @(posedge clk) if (rst_n && skip_now) skip_pulses++;

  real snr_db [NFRAMES] = '{0.0, 1.0, 1.5, 2.1, 2.5, 3.0};

  initial begin
    int start_cyc, end_cyc, cyc;
    in_valid  = 1'b0;
    out_ready = 1'b0;
    in_llr    = '0;
    n_sat = 0;
    build_graph();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int fr = 0; fr < NFRAMES; fr++) begin
      make_frame(snr_db[fr]);
      ref_decode();
      skip_pulses = 0;
      // load
      for (int k = 0; k < COLS * W; k++) begin
        int c, w;
        c = k / W; w = k % W;
        @(negedge clk);
        if ($urandom_range(7) == 0) begin
          in_valid = 1'b0;
          n_bubble++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        for (int p = 0; p < P; p++) in_llr[p] = llr_t'(f_llr[c*Z + p*W + w]);
        while (!in_ready) @(negedge clk);
        // the transfer happens at the next rising emsg
      end
      @(negedge clk);
      in_valid = 1'b0;
      // decode: measure the cycles until output
      cyc = 0;
      while (!out_valid) begin
        @(negedge clk);
        cyc++;
      end
      begin
        int exp_cyc;
        // per iteration: CN (3W+1) + VN (6W+1), plus TC (3W+1) + 1 when run
        exp_cyc = ref_iters * (9 * W + 2) + ref_checks * (3 * W + 2) + 1;
        check(cyc === exp_cyc, $sformatf("frame %0d: %0d cycles to first output, expected %0d",
                                        fr, cyc, exp_cyc));
      end
      // unload
      for (int k = 0; k < COLS * W; k++) begin
        int c, w;
        c = k / W; w = k % W;
        @(negedge clk);
        if ($urandom_range(5) == 0) begin
          out_ready = 1'b0;
          n_stall++;
          @(negedge clk);
        end
        out_ready = 1'b1;
        while (!out_valid) @(negedge clk);
        begin
          logic [P-1:0] exp_w;
          for (int p = 0; p < P; p++) exp_w[p] = hd_ref[c*Z + p*W + w];
          check(out_hd === exp_w, $sformatf("frame %0d word %0d: got %h expected %h",
                                          fr, k, out_hd, exp_w));
          check(out_last === (k == COLS * W - 1), $sformatf("frame %0d word %0d: out_last", fr, k));
        end
      end
      @(negedge clk);
      out_ready = 1'b0;

      check(stat_iters   === ITW'(ref_iters),  $sformatf("frame %0d iters %0d vs %0d", fr, stat_iters, ref_iters));
      check(stat_skips   === ITW'(ref_skips),  $sformatf("frame %0d skips %0d vs %0d", fr, stat_skips, ref_skips));
      check(stat_checks  === ITW'(ref_checks), $sformatf("frame %0d checks %0d vs %0d", fr, stat_checks, ref_checks));
      check(stat_success === ref_success,      $sformatf("frame %0d success", fr));
      check(skip_pulses  === ref_skips,        $sformatf("frame %0d skip pulses", fr));
      $display("frame %0d: Eb/N0 %.1f dB, iterations %0d, skipped checks %0d, checks run %0d, success %0d",
               fr, snr_db[fr], ref_iters, ref_skips, ref_checks, ref_success);

      if (ref_skips > 0) n_skip_seen++;
      n_fail_check += ref_checks - int'(ref_success);
      if (ref_success && ref_iters < MAX_ITER) n_early++;
      if (!ref_success && ref_iters == MAX_ITER) n_maxiter++;
    end

    $display("mechanisms: skips %0d, failed checks %0d, early stops %0d, max-iteration stops %0d, saturations %0d, bubbles %0d, stalls %0d",
             n_skip_seen, n_fail_check, n_early, n_maxiter, n_sat, n_bubble, n_stall);
    check(n_skip_seen  > 0, "no termination check was skipped");
    check(n_fail_check > 0, "no termination check failed");
    check(n_early      > 0, "no frame terminated early");
    check(n_bubble     > 0, "no input bubble");
    check(n_stall      > 0, "no output stall");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
