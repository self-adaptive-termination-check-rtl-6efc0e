// cn_unit: check-node operation unit of the min-sum decoder.
//
// Takes the DC = 6 variable-to-check (V2C) messages of one check node and
// produces its check-to-variable (C2V) reply in compressed form
// {output signs, index of min1, min1, delta-min}:
//   * sign part: the output sign towards neighbour k is the XOR of all input
//     signs except sign k (total XOR, then XOR with sign k);
//   * magnitude part: the first two minima of the input magnitudes are found
//     by a tree: three pairwise comparators, then two merge stages that keep
//     (min1, min2, index of min1). Neighbour idx then receives min2, every
//     other neighbour min1;
//   * both minima are scaled by k = 0.75 (floor(3m/4)) before compaction, and
//     delta-min is scaled(min2) - scaled(min1), so delta-min is the value the
//     stored message carries.
// The sign XOR, the two-minima rule, the 0.75 scale factor, the tree
// structure and the compressed message format follow the decoder description;
// the rounding of the scaling, the tie rule (lower index wins) and the
// clamping of a -128 input to magnitude 127 are this design's choices.
//
// Purely combinational; the surrounding datapath registers it. delta_min is
// brought out separately for the delta-minima computation. It equals the
// stored delta-min except when all six input magnitudes are saturated: the
// true gap is then unknown, and the check node is plainly confident, so
// delta_min reports the largest value instead of 0. Without this rule a
// frame whose messages saturate (a clean channel) would never reach the
// bound and would always run to the last iteration. This rule is this
// design's fixed-point choice.
module cn_unit
  import ldpc_pkg::*;
(
  input  llr_t  v2c [DC],
  output c2v_t  c2v,
  output mag_t  delta_min
);

  typedef struct packed {
    mag_t            m1;
    mag_t            m2;
    logic [IDXW-1:0] idx;
  } two_min_t;

  function automatic mag_t abs_sat(llr_t v);
    logic [QW-1:0] a;
    a = v[QW-1] ? QW'(-v) : QW'(v);
    return a[QW-1] ? mag_t'('1) : a[MW-1:0];
  endfunction

  function automatic two_min_t merge(two_min_t a, two_min_t b);
    two_min_t o;
    if (a.m1 <= b.m1) begin
      o.m1  = a.m1;
      o.idx = a.idx;
      o.m2  = (a.m2 <= b.m1) ? a.m2 : b.m1;
    end else begin
      o.m1  = b.m1;
      o.idx = b.idx;
      o.m2  = (b.m2 <= a.m1) ? b.m2 : a.m1;
    end
    return o;
  endfunction

  mag_t             mag [DC];
  logic [DC-1:0]    sgn;
  logic             total_sign;
  two_min_t         leaf [DC/2];
  two_min_t         lvl1;
  two_min_t         root;
  mag_t             m1s, m2s;

  always_comb begin
    for (int k = 0; k < DC; k++) begin
      mag[k] = abs_sat(v2c[k]);
      sgn[k] = v2c[k][QW-1];
    end
    total_sign = ^sgn;

    // stage 1: pairwise comparators
    for (int k = 0; k < DC / 2; k++) begin
      if (mag[2*k] <= mag[2*k+1]) begin
        leaf[k].m1  = mag[2*k];
        leaf[k].m2  = mag[2*k+1];
        leaf[k].idx = IDXW'(2*k);
      end else begin
        leaf[k].m1  = mag[2*k+1];
        leaf[k].m2  = mag[2*k];
        leaf[k].idx = IDXW'(2*k+1);
      end
    end
    // stages 2 and 3: merge
    lvl1 = merge(leaf[0], leaf[1]);
    root = merge(lvl1, leaf[2]);

    m1s = scale_k(root.m1);
    m2s = scale_k(root.m2);

    c2v.signs = sgn ^ {DC{total_sign}};
    c2v.idx   = root.idx;
    c2v.min1  = m1s;
    c2v.dmin  = m2s - m1s;
    delta_min = (root.m1 == '1) ? '1 : (m2s - m1s);
  end

endmodule
