// tb_cn_unit: self-checking test of the check-node unit.
//
// Drives random V2C vectors (with many ties, zeros, saturated values and the
// value -128) and compares every output with a reference computed here from
// first principles: sort the six magnitudes, scale both minima by 0.75
// (floor), give each neighbour the minimum over the others with the product
// of the others' signs. The compressed message is decompressed by this
// testbench, not by package helpers.
//
// The expected behaviour (sign rule, two minima, 0.75 scaling, compressed
// format) follows the published min-sum scheme; the floor rounding and the
// saturated-delta-min rule it checks are this design's own. Combinational:
// outputs are sampled 1 ns after each new input.
module tb_cn_unit;
  import ldpc_pkg::*;

  llr_t v2c [DC];
  c2v_t c2v;
  mag_t delta_min;

  cn_unit dut (.v2c, .c2v, .delta_min);

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

  function automatic int rand_v2c(int mode);
    case (mode)
      0: return $urandom_range(255) - 128;           // anything, incl. -128
      1: return $urandom_range(6) - 3;               // small: many ties
      2: return ($urandom_range(1) != 0) ? 127 : -127;  // saturated
      default: return $urandom_range(40) - 20;
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int v [DC];
      int mag [DC];
      int s1, s2, m1, m2, tot;
      int mode;
      mode = t % 4;
      for (int k = 0; k < DC; k++) begin
        v[k] = rand_v2c(mode);
        v2c[k] = llr_t'(v[k]);
        mag[k] = (v[k] < 0) ? ((-v[k] > 127) ? 127 : -v[k]) : v[k];
      end
      #1;
      m1 = 1000; m2 = 1000; tot = 0;
      for (int k = 0; k < DC; k++) begin
        if (mag[k] < m1) begin m2 = m1; m1 = mag[k]; end
        else if (mag[k] < m2) m2 = mag[k];
        tot ^= int'(v[k] < 0);
      end
      s1 = (3 * m1) / 4;
      s2 = (3 * m2) / 4;
      check(c2v.min1 === mag_t'(s1), $sformatf("min1 %0d vs %0d", c2v.min1, s1));
      check(c2v.dmin === mag_t'(s2 - s1), $sformatf("dmin %0d vs %0d", c2v.dmin, s2 - s1));
      check(delta_min === mag_t'((m1 == 127) ? 127 : s2 - s1), "delta_min output");
      check(mag[c2v.idx] === m1, "index does not point at a minimum");
      for (int k = 0; k < DC; k++) begin
        int others_min, sg, got_mag, got;
        others_min = 1000;
        sg = 0;
        for (int o = 0; o < DC; o++)
          if (o != k) begin
            if (mag[o] < others_min) others_min = mag[o];
            sg ^= int'(v[o] < 0);
          end
        got_mag = int'(c2v.min1) + ((int'(c2v.idx) == k) ? int'(c2v.dmin) : 0);
        got = c2v.signs[k] ? -got_mag : got_mag;
        check(got === (sg ? -((3 * others_min) / 4) : (3 * others_min) / 4),
              $sformatf("t %0d position %0d: got %0d", t, k, got));
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
