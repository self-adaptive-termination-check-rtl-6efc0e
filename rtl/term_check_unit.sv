// term_check_unit: termination (parity) check unit.
//
// Each cycle it receives, for P check nodes in parallel, the DC = 6 tentative
// hard decisions of their neighbouring variable nodes, already routed to the
// right lanes by the lane rotators. A lane's parity is the XOR of its six
// bits; the check node is satisfied when the parity is 0. The unit ANDs the
// result of every valid cycle into `syndrome_ok`, so after all M check nodes
// have passed, syndrome_ok = 1 exactly when H * c^T = 0. `clear` starts a new
// check (syndrome_ok <= 1), `fail_count` counts unsatisfied checks since the
// last clear for observation.
//
// The 6-input parity checks follow the decoder description; the serial
// accumulation over P lanes per cycle is this design's partially parallel
// arrangement. Timing: results of the `valid` cycle are visible on the
// outputs one clock later.
module term_check_unit
  import ldpc_pkg::*;
#(
  parameter int unsigned P   = 16,
  parameter int unsigned FCW = 16    // width of the failure counter
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  valid,
  input  logic [P-1:0][DC-1:0]  hd,
  output logic                  syndrome_ok,
  output logic [FCW-1:0]        fail_count
);

  logic [P-1:0]         parity;
  logic [$clog2(P+1)-1:0] n_fail;

  always_comb begin
    n_fail = '0;
    for (int q = 0; q < P; q++) begin
      parity[q] = ^hd[q];
      n_fail    = n_fail + ($clog2(P+1))'(parity[q]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      syndrome_ok <= 1'b1;
      fail_count  <= '0;
    end else if (clear) begin
      syndrome_ok <= 1'b1;
      fail_count  <= '0;
    end else if (valid) begin
      syndrome_ok <= syndrome_ok & ~(|parity);
      fail_count  <= fail_count + FCW'(n_fail);
    end
  end

endmodule
