// ldpc_controller: schedule of the self-adaptive min-sum decoder.
//
// Runs one frame through the phases
//   LOAD -> { CN -> VN -> [TC -> DECIDE] } x iterations -> OUT_PRE -> OUT
//   LOAD : accepts COLS*W words of P channel LLRs (in_valid/in_ready) and
//          writes each into the channel-LLR bank and the a-posteriori bank.
//   CN   : ROWS*W steps; step (r, g) reads, from every column bank c, the word
//          (g + s_lo) mod W and rotates it by s_hi (+1 on wrap), so lane q
//          holds the neighbour in block column c of check r*Z + q*W + g.
//          Together with the old C2V word (r, g) the P CN units compute new
//          C2V messages, written back to (r, g) one clock later. In the first
//          iteration the old C2V messages count as zero.
//   VN   : COLS*W steps; step (c, w) reads, from every row bank r, the C2V
//          word (w - s_lo) mod W, rotated the other way, plus the channel
//          LLRs; the P VN units write z and the hard decisions of (c, w).
//   TC   : ROWS*W steps addressed like CN on the hard-decision banks; the
//          termination check unit XORs six bits per check node.
//   OUT  : streams the COLS*W hard-decision words (out_valid/out_ready).
// Every phase issues its reads, then spends one drain cycle while the last
// registered read is processed and written.
//
// Self-adaptive termination check. During the CN phase the delta-minima
// unit (instantiated here, as the decoder's block diagram places it in the
// controller) accumulates NUM_SAMPLES delta-min values, one every
// ROWS*W/NUM_SAMPLES steps, taken from CN unit (sample number mod P). At the
// end of the VN phase the controller compares their average with
// DMIN_BOUND: if it is lower and the iteration is not the last one, the
// termination check is skipped and the next iteration starts at once;
// otherwise the TC phase runs, and decoding stops if all parity checks hold
// or the iteration is the last (MAX_ITER). This is the decoder's algorithm;
// the phase order, sampling positions and drain cycles are this design's.
//
// Cycle counts: LOAD COLS*W transfers; an iteration costs
// (ROWS*W + 1) + (COLS*W + 1) cycles, plus (ROWS*W + 1) + 1 if the check
// runs; OUT_PRE 1 cycle, then COLS*W transfers.
//
// Status (iterations used, skipped checks, checks run, success) is updated
// when a frame finishes and held until the next one finishes.
module ldpc_controller
  import ldpc_pkg::*;
#(
  parameter int unsigned P           = 16,
  parameter int unsigned Z           = 1536,
  parameter int unsigned MAX_ITER    = 30,
  parameter int unsigned DMIN_BOUND  = (3 << FRAC_BITS) / 4,  // 0.75
  parameter int unsigned NUM_SAMPLES = 16,
  localparam int unsigned W   = Z / P,
  localparam int unsigned AW  = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned LW  = $clog2(P),
  localparam int unsigned ITW = $clog2(MAX_ITER + 1),
  localparam int unsigned SW  = $clog2(NUM_SAMPLES),
  localparam int unsigned AVW = MW + SW
) (
  input  logic               clk,
  input  logic               rst_n,
  // input stream handshake
  input  logic               in_valid,
  output logic               in_ready,
  // output stream handshake
  output logic               out_valid,
  input  logic               out_ready,
  output logic               out_last,
  output logic [$clog2(COLS)-1:0] out_bank,
  // channel-LLR banks
  output logic [COLS-1:0]    f_we,
  output logic [AW-1:0]      f_waddr,
  output logic [AW-1:0]      f_raddr [COLS],
  // a-posteriori banks
  output logic [COLS-1:0]    z_we,
  output logic [AW-1:0]      z_waddr,
  output logic               z_wsel_load,   // 1: write channel LLR, 0: VN result
  output logic [AW-1:0]      z_raddr [COLS],
  // hard-decision banks
  output logic [COLS-1:0]    hd_we,
  output logic [AW-1:0]      hd_waddr,
  output logic [AW-1:0]      hd_raddr [COLS],
  // C2V banks
  output logic [ROWS-1:0]    c2v_we,
  output logic [AW-1:0]      c2v_waddr,
  output logic [AW-1:0]      c2v_raddr [ROWS],
  // CN datapath (valid in the cycle after the read)
  output logic [$clog2(ROWS)-1:0] cn_row,
  output logic               cn_first_iter,
  output logic [LW-1:0]      cn_rot [COLS],
  // VN datapath (valid in the cycle after the read)
  output logic [$clog2(COLS)-1:0] vn_col,
  output logic [LW-1:0]      vn_rot [ROWS],
  // termination check unit
  output logic               tc_clear,
  output logic               tc_valid,
  output logic [LW-1:0]      tc_rot [COLS],
  input  logic               tc_syndrome_ok,
  // delta-min of every CN unit
  input  mag_t               cn_dmin [P],
  // status
  output logic               busy,
  output logic [ITW-1:0]     iter,
  output logic [ITW-1:0]     stat_iters,
  output logic [ITW-1:0]     stat_skips,
  output logic [ITW-1:0]     stat_checks,
  output logic               stat_success,
  output logic [AVW-1:0]     delta_minima,
  output logic               skip_now       // one-cycle pulse when a check is skipped
);

  localparam int unsigned CN_STEPS = ROWS * W;
  localparam int unsigned STRIDE   = (CN_STEPS / NUM_SAMPLES > 0) ? CN_STEPS / NUM_SAMPLES : 1;
  localparam int unsigned STW      = $clog2(STRIDE + 1);
  localparam int unsigned RBW      = $clog2(ROWS);
  localparam int unsigned CBW      = $clog2(COLS);

  initial begin
    assert (Z % P == 0) else $error("Z must be a multiple of P");
    assert (P >= 2) else $error("P must be at least 2");
  end

  // ---------------------------------------------------------------------
  // Circulant shift tables: s = s_hi * W + s_lo
  // ---------------------------------------------------------------------
  typedef logic [ROWS*COLS-1:0][AW-1:0] lo_tab_t;
  typedef logic [ROWS*COLS-1:0][LW-1:0] hi_tab_t;

  function automatic lo_tab_t make_lo();
    lo_tab_t t;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        t[r*COLS+c] = AW'(shift_of(r, c, Z) % W);
    return t;
  endfunction

  function automatic hi_tab_t make_hi();
    hi_tab_t t;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        t[r*COLS+c] = LW'(shift_of(r, c, Z) / W);
    return t;
  endfunction

  localparam lo_tab_t S_LO = make_lo();
  localparam hi_tab_t S_HI = make_hi();

  // ---------------------------------------------------------------------
  // State
  // ---------------------------------------------------------------------
  typedef enum logic [2:0] {
    S_LOAD, S_CN, S_VN, S_TC, S_DECIDE, S_OUT_PRE, S_OUT
  } state_t;

  state_t          state;
  logic [CBW-1:0]  blk;       // block row (CN, TC) or block column (others)
  logic [AW-1:0]   word;
  logic            drain;     // all reads of the phase issued
  logic            first_iter;
  logic [STW-1:0]  stride_cnt;
  logic [SW:0]     samp_idx;
  logic [ITW-1:0]  skip_cnt;   // checks skipped in the current frame
  logic [ITW-1:0]  check_cnt;  // checks run in the current frame

  // registered copies for the cycle after a read
  logic            cn_v_d, vn_v_d, tc_v_d;
  logic [CBW-1:0]  blk_d;
  logic [AW-1:0]   word_d;
  logic            samp_en_d;
  logic [LW-1:0]   samp_lane_d;
  logic [LW-1:0]   cn_rot_d [COLS];
  logic [LW-1:0]   vn_rot_d [ROWS];

  logic            last_word, last_blk_cn, last_blk_col;
  logic            in_fire, out_fire;
  logic            dm_below;
  logic            dm_clear;
  logic [SW:0]     dm_taken;

  assign last_word    = (word == AW'(W - 1));
  assign last_blk_cn  = (blk == CBW'(ROWS - 1));
  assign last_blk_col = (blk == CBW'(COLS - 1));
  assign in_ready     = (state == S_LOAD);
  assign in_fire      = in_valid && in_ready;
  assign out_valid    = (state == S_OUT);
  assign out_fire     = out_valid && out_ready;
  assign out_last     = (state == S_OUT) && last_word && last_blk_col;
  assign out_bank     = blk;
  assign busy         = (state != S_LOAD);

  // ---------------------------------------------------------------------
  // Read address generation (combinational, from blk/word)
  // ---------------------------------------------------------------------
  logic [LW-1:0] cn_rot_now [COLS];
  logic [LW-1:0] vn_rot_now [ROWS];
  logic [AW-1:0] cn_addr [COLS];
  logic [AW-1:0] vn_addr [ROWS];
  logic [AW-1:0] word_next;

  assign word_next = last_word ? '0 : word + 1'b1;

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      logic [AW:0] sum;
      logic [LW:0] rot;
      sum = {1'b0, word} + {1'b0, S_LO[int'(blk) % ROWS * COLS + c]};
      rot = {1'b0, S_HI[int'(blk) % ROWS * COLS + c]};
      if (sum >= (AW+1)'(W)) begin
        sum = sum - (AW+1)'(W);
        rot = rot + 1'b1;
      end
      cn_addr[c]    = sum[AW-1:0];
      cn_rot_now[c] = LW'(rot % (LW+1)'(P));
    end
    for (int r = 0; r < ROWS; r++) begin
      logic [AW:0] dif;
      logic [LW:0] rot;
      dif = {1'b0, word} - {1'b0, S_LO[r * COLS + int'(blk)]};
      rot = {1'b0, S_HI[r * COLS + int'(blk)]};
      if (dif[AW]) begin
        dif = dif + (AW+1)'(W);
        rot = rot + 1'b1;
      end
      vn_addr[r]    = dif[AW-1:0];
      vn_rot_now[r] = LW'(((LW+1)'(P) - (rot % (LW+1)'(P))) % (LW+1)'(P));
    end
  end

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      z_raddr[c]  = cn_addr[c];
      f_raddr[c]  = word;
      hd_raddr[c] = (state == S_OUT) ? (out_fire ? word_next : word)
                  : (state == S_OUT_PRE) ? '0 : cn_addr[c];
    end
    for (int r = 0; r < ROWS; r++)
      c2v_raddr[r] = (state == S_VN) ? vn_addr[r] : word;
  end

  // ---------------------------------------------------------------------
  // Writes and datapath controls (from the registered step)
  // ---------------------------------------------------------------------
  always_comb begin
    f_we        = '0;
    z_we        = '0;
    hd_we       = '0;
    c2v_we      = '0;
    z_wsel_load = (state == S_LOAD);
    f_waddr     = word;
    z_waddr     = (state == S_LOAD) ? word : word_d;
    hd_waddr    = word_d;
    c2v_waddr   = word_d;
    if (in_fire) begin
      f_we[blk] = 1'b1;
      z_we[blk] = 1'b1;
    end
    if (vn_v_d) begin
      z_we[blk_d]  = 1'b1;
      hd_we[blk_d] = 1'b1;
    end
    if (cn_v_d) c2v_we[blk_d[RBW-1:0]] = 1'b1;
  end

  assign cn_row        = blk_d[RBW-1:0];
  assign cn_first_iter = first_iter;
  assign cn_rot        = cn_rot_d;
  assign vn_col        = blk_d;
  assign vn_rot        = vn_rot_d;
  assign tc_rot        = cn_rot_d;
  assign tc_valid      = tc_v_d;

  // ---------------------------------------------------------------------
  // delta-minima computation
  // ---------------------------------------------------------------------
  delta_minima_unit #(.P(P), .NUM_SAMPLES(NUM_SAMPLES)) u_dm (
    .clk, .rst_n,
    .clear       (dm_clear),
    .sample_en   (samp_en_d),
    .sample_lane (samp_lane_d),
    .dmin        (cn_dmin),
    .avg         (delta_minima),
    .n_taken     (dm_taken)
  );

  assign dm_below = (delta_minima < AVW'(DMIN_BOUND << SW));

  // ---------------------------------------------------------------------
  // Sequencer
  // ---------------------------------------------------------------------
  logic issuing;
  assign issuing = !drain && (state == S_CN || state == S_VN || state == S_TC);

  always_comb begin
    dm_clear = 1'b0;
    tc_clear = 1'b0;
    skip_now = 1'b0;
    if (state == S_CN && blk == '0 && word == '0 && !drain) dm_clear = 1'b1;
    if (state == S_TC && blk == '0 && word == '0 && !drain) tc_clear = 1'b1;
    if (state == S_VN && drain && dm_below && iter < ITW'(MAX_ITER)) skip_now = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_LOAD;
      blk          <= '0;
      word         <= '0;
      drain        <= 1'b0;
      first_iter   <= 1'b0;
      iter         <= '0;
      stride_cnt   <= '0;
      samp_idx     <= '0;
      cn_v_d       <= 1'b0;
      vn_v_d       <= 1'b0;
      tc_v_d       <= 1'b0;
      blk_d        <= '0;
      word_d       <= '0;
      samp_en_d    <= 1'b0;
      samp_lane_d  <= '0;
      skip_cnt     <= '0;
      check_cnt    <= '0;
      stat_iters   <= '0;
      stat_skips   <= '0;
      stat_checks  <= '0;
      stat_success <= 1'b0;
      for (int c = 0; c < COLS; c++) cn_rot_d[c] <= '0;
      for (int r = 0; r < ROWS; r++) vn_rot_d[r] <= '0;
    end else begin
      // pipeline registers
      cn_v_d    <= issuing && (state == S_CN);
      vn_v_d    <= issuing && (state == S_VN);
      tc_v_d    <= issuing && (state == S_TC);
      blk_d     <= blk;
      word_d    <= word;
      cn_rot_d  <= cn_rot_now;
      vn_rot_d  <= vn_rot_now;
      samp_en_d <= issuing && (state == S_CN) && (stride_cnt == '0)
                   && (samp_idx < (SW+1)'(NUM_SAMPLES));
      samp_lane_d <= LW'(samp_idx % (SW+1)'(P));

      // sampling position counters (CN phase only)
      if (issuing && state == S_CN) begin
        if (stride_cnt == STW'(STRIDE - 1)) begin
          stride_cnt <= '0;
        end else begin
          stride_cnt <= stride_cnt + 1'b1;
        end
        if (stride_cnt == '0 && samp_idx < (SW+1)'(NUM_SAMPLES))
          samp_idx <= samp_idx + 1'b1;
      end

      // step counter of the issuing phases
      if (issuing) begin
        word <= word_next;
        if (last_word) begin
          if ((state == S_VN) ? last_blk_col : last_blk_cn) begin
            drain <= 1'b1;
            blk   <= '0;
          end else begin
            blk <= blk + 1'b1;
          end
        end
      end

      unique case (state)
        S_LOAD: begin
          if (in_fire) begin
            word <= word_next;
            if (last_word) begin
              if (last_blk_col) begin
                blk        <= '0;
                state      <= S_CN;
                iter       <= ITW'(1);
                first_iter <= 1'b1;
                skip_cnt   <= '0;
                check_cnt  <= '0;
                stride_cnt <= '0;
                samp_idx   <= '0;
              end else begin
                blk <= blk + 1'b1;
              end
            end
          end
        end
        S_CN: begin
          if (drain) begin
            drain      <= 1'b0;
            first_iter <= 1'b0;
            state      <= S_VN;
          end
        end
        S_VN: begin
          if (drain) begin
            drain <= 1'b0;
            if (dm_below && iter < ITW'(MAX_ITER)) begin
              iter       <= iter + 1'b1;
              skip_cnt   <= skip_cnt + 1'b1;
              stride_cnt <= '0;
              samp_idx   <= '0;
              state      <= S_CN;
            end else begin
              state <= S_TC;
            end
          end
        end
        S_TC: begin
          if (drain) begin
            drain <= 1'b0;
            state <= S_DECIDE;
          end
        end
        S_DECIDE: begin
          check_cnt <= check_cnt + 1'b1;
          if (tc_syndrome_ok || iter == ITW'(MAX_ITER)) begin
            stat_iters   <= iter;
            stat_skips   <= skip_cnt;
            stat_checks  <= check_cnt + 1'b1;
            stat_success <= tc_syndrome_ok;
            state        <= S_OUT_PRE;
          end else begin
            iter       <= iter + 1'b1;
            stride_cnt <= '0;
            samp_idx   <= '0;
            state      <= S_CN;
          end
        end
        S_OUT_PRE: begin
          blk   <= '0;
          word  <= '0;
          state <= S_OUT;
        end
        S_OUT: begin
          if (out_fire) begin
            word <= word_next;
            if (last_word) begin
              if (last_blk_col) begin
                blk   <= '0;
                state <= S_LOAD;
              end else begin
                blk <= blk + 1'b1;
              end
            end
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // Rules of the schedule
  logic out_stall_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_stall_q <= 1'b0;
    else        out_stall_q <= out_valid && !out_ready;
  end

  always_ff @(posedge clk) begin
    // an offered output word is held until it is taken
    if (rst_n && out_stall_q) assert (out_valid) else $error("out_valid dropped");
    // never more samples than configured, never past the last iteration
    if (rst_n) assert (dm_taken <= (SW+1)'(NUM_SAMPLES)) else $error("too many samples");
    if (rst_n) assert (iter <= ITW'(MAX_ITER)) else $error("iteration past MAX_ITER");
  end

endmodule
