// ldpc_pkg: types, widths and code-structure helpers shared by the
// self-adaptive min-sum LDPC decoder.
//
// Code structure. The decoder targets a regular rate-1/2 LDPC code with
// check-node degree 6 and variable-node degree 3, as in the 9216-bit code the
// design is sized for. The parity-check matrix is quasi-cyclic: a 3 x 6 array
// of Z x Z circulant permutation matrices. The circulant shifts are this
// design's own choice: the 3 x 6 table SHIFT_TAB below, taken modulo Z.
// The values were picked at random and kept because the Tanner graph then
// has neither 4-cycles nor 6-cycles (girth 8) both at Z = 1536 and at
// Z = 64, the size used for quick tests: a circulant shift sum around any
// 2- or 3-row closed path is nonzero modulo Z.
//
// Index mapping. With P lanes and W = Z / P words per circulant, variable
// node i = c*Z + p*W + w (block column c, lane p, word w) and check node
// j = r*Z + q*W + g (block row r, lane q, word g). Check j_local connects to
// variable (j_local + s(r,c)) mod Z of block column c.
//
// Number format. Messages are two's-complement with FRAC_BITS fractional
// bits (LSB = 0.25 LLR units). V2C messages and channel LLRs are QW = 8
// bits and are kept within +/-127 (+/-31.75) so their magnitude fits
// MW = 7 bits. A-posteriori sums are ZW = 10 bits:
// |F| + 3 * max|C2V| = 127 + 3*95 = 412 < 511, so the sum never overflows.
// All widths are this design's choice.
package ldpc_pkg;

  // Code structure (node degrees of the rate-1/2 code)
  localparam int unsigned DC   = 6;   // check-node degree = block columns
  localparam int unsigned DV   = 3;   // variable-node degree = block rows
  localparam int unsigned COLS = DC;
  localparam int unsigned ROWS = DV;

  // Fixed-point formats
  localparam int unsigned QW        = 8;  // channel LLR and V2C width
  localparam int unsigned MW        = QW - 1;  // magnitude width
  localparam int unsigned ZW        = 10;  // a-posteriori LLR width
  localparam int unsigned FRAC_BITS = 2;  // fractional bits of all LLRs
  localparam int unsigned IDXW      = $clog2(DC);
  localparam int signed   QMAX      = (1 <<< (QW - 1)) - 1;  // +127

  typedef logic signed [QW-1:0] llr_t;
  typedef logic signed [ZW-1:0] zllr_t;
  typedef logic [MW-1:0]        mag_t;

  // Compressed C2V message of one check node:
  // output sign towards every neighbour, position of min1, scaled min1 and
  // the difference between scaled min2 and scaled min1.
  typedef struct packed {
    logic [DC-1:0]   signs;
    logic [IDXW-1:0] idx;
    mag_t            min1;
    mag_t            dmin;
  } c2v_t;

  localparam int unsigned C2VW = $bits(c2v_t);

  // Circulant shifts of the base matrix (block row r, block column c).
  localparam int unsigned SHIFT_TAB [DV][DC] = '{
    '{1508, 1053,  287,  861,  709, 1019},
    '{1285, 1346, 1236, 1049,  697,  840},
    '{ 272,  863,  788, 1023,  715,  497}
  };

  // Circulant shift of block row r, block column c for circulant size z.
  function automatic int unsigned shift_of(int unsigned r, int unsigned c,
                                           int unsigned z);
    return SHIFT_TAB[r][c] % z;
  endfunction

  // Scaling by k = 0.75, rounded down: floor(3m/4).
  function automatic mag_t scale_k(mag_t m);
    logic [MW+1:0] t;
    t = {2'b00, m} + {1'b0, m, 1'b0};
    return mag_t'(t >> 2);
  endfunction

  // Value of a compressed C2V message as seen by neighbour position k.
  function automatic llr_t c2v_value(c2v_t msg, logic [IDXW-1:0] k);
    logic [MW:0] mag;
    mag = (msg.idx == k) ? ({1'b0, msg.min1} + {1'b0, msg.dmin})
                         : {1'b0, msg.min1};
    return msg.signs[k] ? -llr_t'(mag) : llr_t'(mag);
  endfunction

endpackage
