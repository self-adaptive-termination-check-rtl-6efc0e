// tb_vn_unit: self-checking test of the variable-node unit.
//
// Random channel LLRs and three random compressed C2V messages (as the CN
// units can produce them: min1 + delta-min <= 95) for every position; the
// expected a-posteriori LLR is F plus the three decompressed values,
// computed here with integers, and the hard decision its sign.
//
// The a-posteriori sum z = F + sum of C2V messages and the sign decision
// follow the published min-sum equations; the widths are this design's own.
// Combinational: outputs are sampled 1 ns after each new input.
module tb_vn_unit;
  import ldpc_pkg::*;

  llr_t            f_llr;
  c2v_t            c2v [DV];
  logic [IDXW-1:0] pos;
  zllr_t           z;
  logic            hd;

  vn_unit dut (.f_llr, .c2v, .pos, .z, .hd);

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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int f, exp_z;
      f = $urandom_range(254) - 127;
      f_llr = llr_t'(f);
      pos = IDXW'($urandom_range(DC - 1));
      exp_z = f;
      for (int r = 0; r < DV; r++) begin
        int m1, dm, mag;
        m1 = $urandom_range(95);
        dm = $urandom_range(95 - m1);
        c2v[r].min1  = mag_t'(m1);
        c2v[r].dmin  = mag_t'(dm);
        c2v[r].idx   = IDXW'($urandom_range(DC - 1));
        c2v[r].signs = DC'($urandom);
        mag = (c2v[r].idx == pos) ? m1 + dm : m1;
        exp_z += c2v[r].signs[pos] ? -mag : mag;
      end
      #1;
      check(z === zllr_t'(exp_z), $sformatf("z %0d vs %0d", z, exp_z));
      check(hd === (exp_z < 0), "hard decision");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
