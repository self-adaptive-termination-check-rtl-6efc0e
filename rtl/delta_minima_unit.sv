// delta_minima_unit: delta-minima computation of the LDPC controller.
//
// delta-minima is the average of delta-min (the gap between the first two
// minima) over a sample of check nodes; the controller compares it with the
// bound to decide whether the termination check of the iteration is run.
// Averaging all check nodes would need a wide adder tree, so only
// NUM_SAMPLES values are taken: on each cycle with sample_en = 1 the
// delta-min of CN unit `sample_lane` is added to an accumulator. Because
// NUM_SAMPLES is a power of two the average is the accumulated sum with
// log2(NUM_SAMPLES) extra fractional bits, so no divider is needed: `avg`
// is that sum, read as a fixed-point number with FRAC_BITS +
// log2(NUM_SAMPLES) fractional bits. `clear` empties the accumulator at the
// start of an iteration; `n_taken` counts the samples since then.
//
// Sampling delta-min from the CN units and averaging follow the decoder
// description; the serial accumulate-one-per-cycle structure and the
// power-of-two sample count are this design's choices. avg changes one clock
// after a sample_en cycle.
module delta_minima_unit
  import ldpc_pkg::*;
#(
  parameter int unsigned P           = 16,
  parameter int unsigned NUM_SAMPLES = 16,
  localparam int unsigned SW  = $clog2(NUM_SAMPLES),
  localparam int unsigned LW  = $clog2(P),
  localparam int unsigned AVW = MW + SW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              sample_en,
  input  logic [LW-1:0]     sample_lane,
  input  mag_t              dmin [P],
  output logic [AVW-1:0]    avg,
  output logic [SW:0]       n_taken
);

  initial begin
    assert (NUM_SAMPLES == (1 << SW))
      else $error("NUM_SAMPLES must be a power of two");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avg     <= '0;
      n_taken <= '0;
    end else if (clear) begin
      avg     <= '0;
      n_taken <= '0;
    end else if (sample_en && n_taken < (SW+1)'(NUM_SAMPLES)) begin
      avg     <= avg + AVW'(dmin[sample_lane]);
      n_taken <= n_taken + 1'b1;
    end
  end

endmodule
