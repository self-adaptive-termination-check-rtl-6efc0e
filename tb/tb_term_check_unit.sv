// tb_term_check_unit: self-checking test of the termination check unit.
//
// Runs many checks of random length. Each cycle the lanes get random
// six-bit hard-decision groups, mostly of even parity so that whole checks
// pass, sometimes with one odd lane. The expected pass flag and count of
// unsatisfied checks are accumulated here and compared one clock later.
//
// The six-input parity per check follows the published decoder; the per-cycle
// accumulation and the fail count are this design's own.
module tb_term_check_unit;
  import ldpc_pkg::*;

  localparam int unsigned P = 16;

  logic                 clk = 0, rst_n = 0;
  logic                 clear, valid;
  logic [P-1:0][DC-1:0] hd;
  logic                 syndrome_ok;
  logic [15:0]          fail_count;

  term_check_unit #(.P(P)) dut (.clk, .rst_n, .clear, .valid, .hd, .syndrome_ok, .fail_count);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_pass = 0, n_fail = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DC-1:0] even_group();
    logic [DC-1:0] g;
    g = DC'($urandom);
    g[0] = ^g[DC-1:1];
    return g;
  endfunction

  initial begin
    clear = 0; valid = 0; hd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 400; run++) begin
      bit exp_ok;
      int exp_cnt, len;
      exp_ok = 1; exp_cnt = 0;
      len = 1 + $urandom_range(30);
      @(negedge clk);
      clear = 1; valid = 0;
      @(negedge clk);
      clear = 0;
      for (int s = 0; s < len; s++) begin
        valid = ($urandom_range(3) != 0);
        for (int q = 0; q < P; q++) begin
          hd[q] = even_group();
          if ((run % 2 == 1) && $urandom_range(60) == 0) hd[q][$urandom_range(DC - 1)] ^= 1'b1;
          if (valid && ^hd[q]) begin exp_ok = 0; exp_cnt++; end
        end
        @(negedge clk);
        check(syndrome_ok === exp_ok, $sformatf("run %0d step %0d: ok %0d", run, s, syndrome_ok));
        check(fail_count === 16'(exp_cnt), $sformatf("run %0d: count %0d vs %0d", run, fail_count, exp_cnt));
      end
      valid = 0;
      if (exp_ok) n_pass++; else n_fail++;
    end
    check(n_pass > 0 && n_fail > 0, "both outcomes seen");
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
endmodule
