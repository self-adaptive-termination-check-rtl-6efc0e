// v2c_gen: forms the variable-to-check messages one check node reads.
//
// The decoder stores one a-posteriori LLR z_i per variable node instead of
// DV separate V2C messages. The V2C message from variable i to check j is
// F_i plus the C2V messages from all checks but j, which equals
// z_i - C2V(j -> i) with the C2V value of the previous iteration. For each of
// the DC neighbours k this block decompresses the stored C2V message of the
// check for position k, subtracts it from z and saturates the result to the
// symmetric V2C range [-127, +127]. In the first iteration (first_iter = 1)
// there is no previous C2V message and the V2C message is z itself, which is
// then the channel LLR F_i.
//
// Rewriting the variable-node update z - C2V is this design's way of
// computing the decoder's V2C equation; the saturation bound is its own
// choice. Purely combinational.
module v2c_gen
  import ldpc_pkg::*;
(
  input  zllr_t z [DC],
  input  c2v_t  c2v_old,
  input  logic  first_iter,
  output llr_t  v2c [DC]
);

  always_comb begin
    for (int k = 0; k < DC; k++) begin
      logic signed [ZW:0] d;
      llr_t               prev;
      prev = first_iter ? llr_t'(0) : c2v_value(c2v_old, IDXW'(k));
      d    = (ZW+1)'(z[k]) - (ZW+1)'(prev);
      if (d > (ZW+1)'(QMAX))       v2c[k] = llr_t'(QMAX);
      else if (d < -(ZW+1)'(QMAX)) v2c[k] = llr_t'(-QMAX);
      else                         v2c[k] = llr_t'(d);
    end
  end

endmodule
