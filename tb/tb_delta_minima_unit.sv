// tb_delta_minima_unit: self-checking test of the delta-minima computation.
//
// Random delta-min values on all lanes, sample enables at random cycles and
// random lanes; the expected sum (= average with 4 extra fractional bits for
// 16 samples) and sample count are kept here. Also checks that samples
// beyond NUM_SAMPLES are ignored and that clear restarts the average.
//
// Averaging sampled delta-min values follows the published scheme; the serial
// one-sample-per-cycle accumulator and its one-clock latency are this
// design's own.
module tb_delta_minima_unit;
  import ldpc_pkg::*;

  localparam int unsigned P  = 16;
  localparam int unsigned NS = 16;

  logic        clk = 0, rst_n = 0;
  logic        clear, sample_en;
  logic [3:0]  sample_lane;
  mag_t        dmin [P];
  logic [MW+3:0] avg;
  logic [4:0]  n_taken;

  delta_minima_unit #(.P(P), .NUM_SAMPLES(NS)) dut (
    .clk, .rst_n, .clear, .sample_en, .sample_lane, .dmin, .avg, .n_taken
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; sample_en = 0; sample_lane = 0;
    for (int q = 0; q < P; q++) dmin[q] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 300; run++) begin
      int sum, n;
      sum = 0; n = 0;
      clear = 1;
      @(negedge clk);
      clear = 0;
      check(avg === '0 && n_taken === '0, "clear");
      for (int s = 0; s < 40; s++) begin
        for (int q = 0; q < P; q++) dmin[q] = mag_t'($urandom_range((run % 3 == 0) ? 127 : 8));
        sample_en   = ($urandom_range(2) == 0);
        sample_lane = 4'($urandom);
        if (sample_en && n < NS) begin
          sum += int'(dmin[sample_lane]);
          n++;
        end
        @(negedge clk);
        check(avg === (MW+4)'(sum), $sformatf("avg %0d vs %0d", avg, sum));
        check(n_taken === 5'(n), "sample count");
      end
      sample_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
