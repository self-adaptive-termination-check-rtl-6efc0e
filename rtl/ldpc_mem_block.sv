// ldpc_mem_block: the decoder's memory block.
//
// Holds four groups of banks, each bank W = Z / P words deep and one word
// holding P lanes (one lane per processing unit):
//   f   : COLS banks of channel LLRs F_i            (P x QW bits per word)
//   z   : COLS banks of a-posteriori LLRs z_i       (P x ZW bits per word)
//   hd  : COLS banks of tentative hard decisions    (P bits per word)
//   c2v : ROWS banks of compressed C2V messages     (P x C2VW bits per word)
// Bank c of f/z/hd holds block column c of the code, bank r of c2v holds
// block row r; word w, lane p of a column bank is variable node
// c*Z + p*W + w. One bank per block column (row) lets the CN phase read all
// six neighbours of P check nodes, and the VN phase all three C2V messages
// of P variable nodes, in one cycle without conflicts.
//
// Every bank has its own read address; within a group, banks share the write
// address and write data and have their own write enable, since the
// controller writes one bank of a group per cycle. Read data is registered
// (one clock latency). The figure of the decoder names a single memory block;
// the banking and word layout are this design's choices.
module ldpc_mem_block
  import ldpc_pkg::*;
#(
  parameter int unsigned P = 16,
  parameter int unsigned W = 96,
  localparam int unsigned AW = (W > 1) ? $clog2(W) : 1
) (
  input  logic                  clk,
  // channel LLRs
  input  logic [COLS-1:0]       f_we,
  input  logic [AW-1:0]         f_waddr,
  input  llr_t  [P-1:0]         f_wdata,
  input  logic [AW-1:0]         f_raddr [COLS],
  output llr_t  [P-1:0]         f_rdata [COLS],
  // a-posteriori LLRs
  input  logic [COLS-1:0]       z_we,
  input  logic [AW-1:0]         z_waddr,
  input  zllr_t [P-1:0]         z_wdata,
  input  logic [AW-1:0]         z_raddr [COLS],
  output zllr_t [P-1:0]         z_rdata [COLS],
  // hard decisions
  input  logic [COLS-1:0]       hd_we,
  input  logic [AW-1:0]         hd_waddr,
  input  logic [P-1:0]          hd_wdata,
  input  logic [AW-1:0]         hd_raddr [COLS],
  output logic [P-1:0]          hd_rdata [COLS],
  // compressed C2V messages
  input  logic [ROWS-1:0]       c2v_we,
  input  logic [AW-1:0]         c2v_waddr,
  input  c2v_t  [P-1:0]         c2v_wdata,
  input  logic [AW-1:0]         c2v_raddr [ROWS],
  output c2v_t  [P-1:0]         c2v_rdata [ROWS]
);

  for (genvar c = 0; c < COLS; c++) begin : g_col
    ram_1r1w #(.DEPTH(W), .WIDTH(P * QW)) u_f (
      .clk, .we(f_we[c]), .waddr(f_waddr), .wdata(f_wdata),
      .raddr(f_raddr[c]), .rdata(f_rdata[c])
    );
    ram_1r1w #(.DEPTH(W), .WIDTH(P * ZW)) u_z (
      .clk, .we(z_we[c]), .waddr(z_waddr), .wdata(z_wdata),
      .raddr(z_raddr[c]), .rdata(z_rdata[c])
    );
    ram_1r1w #(.DEPTH(W), .WIDTH(P)) u_hd (
      .clk, .we(hd_we[c]), .waddr(hd_waddr), .wdata(hd_wdata),
      .raddr(hd_raddr[c]), .rdata(hd_rdata[c])
    );
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    ram_1r1w #(.DEPTH(W), .WIDTH(P * C2VW)) u_c2v (
      .clk, .we(c2v_we[r]), .waddr(c2v_waddr), .wdata(c2v_wdata),
      .raddr(c2v_raddr[r]), .rdata(c2v_rdata[r])
    );
  end

endmodule
