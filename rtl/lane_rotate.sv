// lane_rotate: cyclic lane rotator (barrel shifter) between the memory
// banks and the P parallel processing units.
//
// The parity-check matrix is built of circulant permutations, so the P
// values a group of P units needs from one memory word are that word with its
// lanes cyclically rotated: dout[q] = din[(q + amt) mod P]. The rotation
// amount is computed by the controller from the circulant shift. Built as
// log2(P) stages of fixed rotations by 1, 2, 4, ... lanes. LW is the width of
// one lane. Purely combinational. The published decoder is only described as
// partially parallel with 16 units; this routing is this design's own.
module lane_rotate #(
  parameter int unsigned P  = 16,
  parameter int unsigned LW = 8,
  localparam int unsigned RW = (P > 1) ? $clog2(P) : 1
) (
  input  logic [P-1:0][LW-1:0] din,
  input  logic [RW-1:0]        amt,
  output logic [P-1:0][LW-1:0] dout
);

  logic [P-1:0][LW-1:0] stage [RW+1];

  always_comb begin
    stage[0] = din;
    for (int b = 0; b < RW; b++) begin
      for (int q = 0; q < P; q++) begin
        if (amt[b]) stage[b+1][q] = stage[b][(q + (1 << b)) % P];
        else        stage[b+1][q] = stage[b][q];
      end
    end
    dout = stage[RW];
  end

endmodule
