// ldpc_decoder: partially parallel min-sum LDPC decoder with a self-adaptive
// termination check.
//
// A min-sum decoder normally runs a termination check (hard decision plus a
// full parity check) after every iteration. This decoder skips that check
// whenever the iteration is very unlikely to have succeeded: the CN units
// find the first two minima of their inputs anyway, and the gap between
// them (delta-min) stays small while decoding is failing. The controller
// averages a sample of delta-min values (delta-minima) and runs the check
// only when that average reaches DMIN_BOUND, or in the last iteration.
//
// Structure (the decoder's block diagram): P CN units, P VN units, a
// memory block and the LDPC controller with its delta-minima computation,
// plus the termination check unit and the lane rotators that route memory
// words to the units. The code is a (3,6)-regular quasi-cyclic LDPC code of
// length N = 6*Z (9216 for Z = 1536), rate 1/2; see ldpc_pkg for its
// circulant shifts, which are this design's own. Messages are compressed as
// {signs, min1 index, min1, delta-min}; the min-sum is scaled by 0.75.
//
// Interface.
//   in_valid/in_ready, in_llr : 6*W words (W = Z/P) of P channel LLRs,
//       8-bit two's complement with 2 fractional bits, range -127..+127
//       (-31.75..+31.75; a positive value favours bit 0). Word k = c*W + w
//       carries variable nodes c*Z + p*W + w in lane p.
//   out_valid/out_ready, out_hd, out_last : 6*W words of P decoded bits,
//       same order as the input.
//   stat_* : iterations used, termination checks skipped and run, and
//       whether the last check passed; valid from the first output word of
//       a frame until the next frame finishes. busy is high from the last
//       input word to the last output word. cur_iter is the running
//       iteration, tc_fails the unsatisfied checks of the latest check, and
//       skip_now pulses for one clock whenever a check is skipped.
// Timing: an iteration takes 9*W + 2 cycles when the check is skipped and
// 12*W + 4 when it runs (866 and 1156 cycles at the default W = 96).
// Loading and unloading take 6*W transfers each.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned P           = 16,    // CN/VN units (16-level parallel)
  parameter int unsigned Z           = 1536,  // circulant size, N = 6*Z = 9216
  parameter int unsigned MAX_ITER    = 30,
  parameter int unsigned DMIN_BOUND  = (3 << FRAC_BITS) / 4,  // 0.75
  parameter int unsigned NUM_SAMPLES = 16,
  localparam int unsigned ITW = $clog2(MAX_ITER + 1),
  localparam int unsigned AVW = MW + $clog2(NUM_SAMPLES)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  llr_t [P-1:0]    in_llr,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [P-1:0]    out_hd,
  output logic            out_last,
  output logic            busy,
  output logic [ITW-1:0]  stat_iters,
  output logic [ITW-1:0]  stat_skips,
  output logic [ITW-1:0]  stat_checks,
  output logic            stat_success,
  output logic [AVW-1:0]  delta_minima,
  output logic            skip_now,
  output logic [ITW-1:0]  cur_iter,
  output logic [15:0]     tc_fails
);

  localparam int unsigned W  = Z / P;
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1;
  localparam int unsigned LW = $clog2(P);

  // controller <-> memory
  logic [COLS-1:0] f_we, z_we, hd_we;
  logic [ROWS-1:0] c2v_we;
  logic [AW-1:0]   f_waddr, z_waddr, hd_waddr, c2v_waddr;
  logic [AW-1:0]   f_raddr [COLS];
  logic [AW-1:0]   z_raddr [COLS];
  logic [AW-1:0]   hd_raddr [COLS];
  logic [AW-1:0]   c2v_raddr [ROWS];
  logic            z_wsel_load;

  llr_t  [P-1:0]   f_rdata [COLS];
  zllr_t [P-1:0]   z_rdata [COLS];
  logic  [P-1:0]   hd_rdata [COLS];
  c2v_t  [P-1:0]   c2v_rdata [ROWS];

  zllr_t [P-1:0]   z_wdata;
  logic  [P-1:0]   hd_wdata;
  c2v_t  [P-1:0]   c2v_wdata;

  // controller <-> datapath
  logic [$clog2(ROWS)-1:0] cn_row;
  logic [$clog2(COLS)-1:0] vn_col, out_bank;
  logic                    cn_first_iter;
  logic [LW-1:0]           cn_rot [COLS];
  logic [LW-1:0]           vn_rot [ROWS];
  logic [LW-1:0]           tc_rot [COLS];
  logic                    tc_clear, tc_valid, tc_syndrome_ok;
  mag_t                    cn_dmin [P];

  ldpc_controller #(
    .P(P), .Z(Z), .MAX_ITER(MAX_ITER), .DMIN_BOUND(DMIN_BOUND),
    .NUM_SAMPLES(NUM_SAMPLES)
  ) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready,
    .out_valid, .out_ready, .out_last, .out_bank,
    .f_we, .f_waddr, .f_raddr,
    .z_we, .z_waddr, .z_wsel_load, .z_raddr,
    .hd_we, .hd_waddr, .hd_raddr,
    .c2v_we, .c2v_waddr, .c2v_raddr,
    .cn_row, .cn_first_iter, .cn_rot,
    .vn_col, .vn_rot,
    .tc_clear, .tc_valid, .tc_rot, .tc_syndrome_ok,
    .cn_dmin,
    .busy, .iter(cur_iter),
    .stat_iters, .stat_skips, .stat_checks, .stat_success,
    .delta_minima, .skip_now
  );

  ldpc_mem_block #(.P(P), .W(W)) u_mem (
    .clk,
    .f_we, .f_waddr, .f_wdata(in_llr), .f_raddr, .f_rdata,
    .z_we, .z_waddr, .z_wdata, .z_raddr, .z_rdata,
    .hd_we, .hd_waddr, .hd_wdata, .hd_raddr, .hd_rdata,
    .c2v_we, .c2v_waddr, .c2v_wdata, .c2v_raddr, .c2v_rdata
  );

  // ---------------------------------------------------------------------
  // CN path: rotate the six z words onto the check lanes, form V2C, run
  // the P CN units.
  // ---------------------------------------------------------------------
  zllr_t [P-1:0] z_rot [COLS];
  c2v_t  [P-1:0] c2v_old;

  for (genvar c = 0; c < COLS; c++) begin : g_zrot
    lane_rotate #(.P(P), .LW(ZW)) u_rot (
      .din(z_rdata[c]), .amt(cn_rot[c]), .dout(z_rot[c])
    );
  end

  assign c2v_old = c2v_rdata[cn_row];

  for (genvar q = 0; q < P; q++) begin : g_cn
    zllr_t z_in [DC];
    llr_t  v2c  [DC];
    for (genvar c = 0; c < COLS; c++) begin : g_in
      assign z_in[c] = z_rot[c][q];
    end
    v2c_gen u_v2c (
      .z(z_in), .c2v_old(c2v_old[q]), .first_iter(cn_first_iter), .v2c
    );
    cn_unit u_cn (
      .v2c, .c2v(c2v_wdata[q]), .delta_min(cn_dmin[q])
    );
  end

  // ---------------------------------------------------------------------
  // VN path: rotate the three C2V words onto the variable lanes, run the
  // P VN units.
  // ---------------------------------------------------------------------
  c2v_t [P-1:0] c2v_rot [ROWS];

  for (genvar r = 0; r < ROWS; r++) begin : g_crot
    lane_rotate #(.P(P), .LW(C2VW)) u_rot (
      .din(c2v_rdata[r]), .amt(vn_rot[r]), .dout(c2v_rot[r])
    );
  end

  zllr_t [P-1:0] vn_z;

  for (genvar p = 0; p < P; p++) begin : g_vn
    c2v_t msgs [DV];
    for (genvar r = 0; r < ROWS; r++) begin : g_in
      assign msgs[r] = c2v_rot[r][p];
    end
    vn_unit u_vn (
      .f_llr(f_rdata[vn_col][p]), .c2v(msgs), .pos(IDXW'(vn_col)),
      .z(vn_z[p]), .hd(hd_wdata[p])
    );
  end

  always_comb begin
    for (int p = 0; p < P; p++)
      z_wdata[p] = z_wsel_load ? zllr_t'(in_llr[p]) : vn_z[p];
  end

  // ---------------------------------------------------------------------
  // Termination check path
  // ---------------------------------------------------------------------
  logic [P-1:0]          hd_rot [COLS];
  logic [P-1:0][DC-1:0]  tc_bits;

  for (genvar c = 0; c < COLS; c++) begin : g_hrot
    lane_rotate #(.P(P), .LW(1)) u_rot (
      .din(hd_rdata[c]), .amt(tc_rot[c]), .dout(hd_rot[c])
    );
  end

  always_comb begin
    for (int q = 0; q < P; q++)
      for (int c = 0; c < COLS; c++)
        tc_bits[q][c] = hd_rot[c][q];
  end

  term_check_unit #(.P(P)) u_tc (
    .clk, .rst_n,
    .clear(tc_clear), .valid(tc_valid), .hd(tc_bits),
    .syndrome_ok(tc_syndrome_ok), .fail_count(tc_fails)
  );

  assign out_hd = hd_rdata[out_bank];

endmodule
