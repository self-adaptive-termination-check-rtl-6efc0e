// vn_unit: variable-node operation unit of the min-sum decoder.
//
// Computes the a-posteriori LLR of one variable node,
//     z = F + sum over its DV = 3 checks of C2V(j -> i),
// and its tentative hard decision (1 when z < 0, else 0). Each incoming C2V
// message arrives in the compressed form {signs, min1 index, min1,
// delta-min}; the unit decompresses it for its own position `pos` inside the
// check (the block column of the variable node): min1 + delta-min if pos is
// the min1 index, min1 otherwise, with the stored output sign for pos.
// The V2C messages of the next iteration are later formed as z - C2V, so z
// is all this unit has to store.
//
// The sum, the hard-decision rule and the compressed input follow the
// decoder description; the 8-bit width of z is this design's choice and
// is wide enough that the sum never overflows (see ldpc_pkg). Purely
// combinational.
module vn_unit
  import ldpc_pkg::*;
(
  input  llr_t            f_llr,
  input  c2v_t            c2v [DV],
  input  logic [IDXW-1:0] pos,
  output zllr_t           z,
  output logic            hd
);

  always_comb begin
    z = zllr_t'(f_llr);
    for (int r = 0; r < DV; r++)
      z = z + zllr_t'(c2v_value(c2v[r], pos));
    hd = z[ZW-1];
  end

endmodule
