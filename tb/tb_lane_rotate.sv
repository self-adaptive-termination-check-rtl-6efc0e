// tb_lane_rotate: self-checking test of the lane rotator, at the default
// 16 lanes and at 6 lanes (a lane count that is not a power of two).
//
// The rotator is this design's own routing between memory words and units;
// the expected output is dout[q] = din[(q + amt) mod P], checked after each
// new input (combinational).
module tb_lane_rotate;
  localparam int unsigned LW = 8;

  logic [15:0][LW-1:0] din16, dout16;
  logic [3:0]          amt16;
  logic [5:0][LW-1:0]  din6, dout6;
  logic [2:0]          amt6;

  lane_rotate #(.P(16), .LW(LW)) dut16 (.din(din16), .amt(amt16), .dout(dout16));
  lane_rotate #(.P(6),  .LW(LW)) dut6  (.din(din6),  .amt(amt6),  .dout(dout6));

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int q = 0; q < 16; q++) din16[q] = LW'($urandom);
      for (int q = 0; q < 6; q++)  din6[q]  = LW'($urandom);
      amt16 = 4'(t % 16);
      amt6  = 3'(t % 6);
      #1;
      for (int q = 0; q < 16; q++) begin
        checks++;
        if (dout16[q] !== din16[(q + int'(amt16)) % 16]) failures++;
      end
      for (int q = 0; q < 6; q++) begin
        checks++;
        if (dout6[q] !== din6[(q + int'(amt6)) % 6]) failures++;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
