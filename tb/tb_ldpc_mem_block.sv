// tb_ldpc_mem_block: self-checking test of the memory block.
//
// Writes random words into every bank of the four groups, then reads them
// back through each bank's own read port (one clock latency), with all
// banks of a group read at different addresses in the same cycle, and
// checks each word against a shadow copy. Also checks that a read of a
// word written in the same cycle returns the old contents.
//
// The memory organisation is this design's own; the published decoder only places a
// memory block beside the units.
module tb_ldpc_mem_block;
  import ldpc_pkg::*;

  localparam int unsigned P  = 16;
  localparam int unsigned W  = 96;
  localparam int unsigned AW = $clog2(W);

  logic clk = 0;
  always #5 clk = ~clk;

  logic [COLS-1:0] f_we, z_we, hd_we;
  logic [ROWS-1:0] c2v_we;
  logic [AW-1:0]   f_waddr, z_waddr, hd_waddr, c2v_waddr;
  llr_t  [P-1:0]   f_wdata;
  zllr_t [P-1:0]   z_wdata;
  logic  [P-1:0]   hd_wdata;
  c2v_t  [P-1:0]   c2v_wdata;
  logic [AW-1:0]   f_raddr [COLS], z_raddr [COLS], hd_raddr [COLS], c2v_raddr [ROWS];
  llr_t  [P-1:0]   f_rdata [COLS];
  zllr_t [P-1:0]   z_rdata [COLS];
  logic  [P-1:0]   hd_rdata [COLS];
  c2v_t  [P-1:0]   c2v_rdata [ROWS];

  ldpc_mem_block #(.P(P), .W(W)) dut (.*);

  logic [P*QW-1:0]   f_sh   [COLS][W];
  logic [P*ZW-1:0]   z_sh   [COLS][W];
  logic [P-1:0]      hd_sh  [COLS][W];
  logic [P*C2VW-1:0] c2v_sh [ROWS][W];

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [P*C2VW-1:0] rnd_wide();
    logic [P*C2VW-1:0] v;
    for (int i = 0; i < P * C2VW; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f_we = '0; z_we = '0; hd_we = '0; c2v_we = '0;
    // fill every bank
    for (int b = 0; b < COLS; b++)
      for (int w = 0; w < W; w++) begin
        logic [P*C2VW-1:0] r1, r2, r3, r4;
        @(negedge clk);
        r1 = rnd_wide(); r2 = rnd_wide(); r3 = rnd_wide(); r4 = rnd_wide();
        f_we = '0; z_we = '0; hd_we = '0; c2v_we = '0;
        f_we[b] = 1; z_we[b] = 1; hd_we[b] = 1;
        if (b < ROWS) c2v_we[b] = 1;
        f_waddr = AW'(w); z_waddr = AW'(w); hd_waddr = AW'(w); c2v_waddr = AW'(w);
        f_wdata = r1[P*QW-1:0]; z_wdata = r2[P*ZW-1:0]; hd_wdata = r3[P-1:0];
        c2v_wdata = r4;
        f_sh[b][w] = r1[P*QW-1:0]; z_sh[b][w] = r2[P*ZW-1:0]; hd_sh[b][w] = r3[P-1:0];
        if (b < ROWS) c2v_sh[b][w] = r4;
      end
    @(negedge clk);
    f_we = '0; z_we = '0; hd_we = '0; c2v_we = '0;
    // random parallel reads
    for (int t = 0; t < 2000; t++) begin
      int fa [COLS], za [COLS], ha [COLS], ca [ROWS];
      for (int b = 0; b < COLS; b++) begin
        fa[b] = $urandom_range(W - 1); za[b] = $urandom_range(W - 1); ha[b] = $urandom_range(W - 1);
        f_raddr[b] = AW'(fa[b]); z_raddr[b] = AW'(za[b]); hd_raddr[b] = AW'(ha[b]);
      end
      for (int r = 0; r < ROWS; r++) begin
        ca[r] = $urandom_range(W - 1);
        c2v_raddr[r] = AW'(ca[r]);
      end
      @(negedge clk);
      for (int b = 0; b < COLS; b++) begin
        check(f_rdata[b] === f_sh[b][fa[b]], "f read");
        check(z_rdata[b] === z_sh[b][za[b]], "z read");
        check(hd_rdata[b] === hd_sh[b][ha[b]], "hd read");
      end
      for (int r = 0; r < ROWS; r++) check(c2v_rdata[r] === c2v_sh[r][ca[r]], "c2v read");
    end
    // read during write of the same word returns the old word
    c2v_raddr[1] = AW'(5);
    c2v_waddr = AW'(5);
    c2v_wdata = ~c2v_sh[1][5];
    c2v_we = 3'b010;
    @(negedge clk);
    c2v_we = '0;
    check(c2v_rdata[1] === c2v_sh[1][5], "read-during-write returns old data");
    @(negedge clk);
    check(c2v_rdata[1] === ~c2v_sh[1][5], "new data after the write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
