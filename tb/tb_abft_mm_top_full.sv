// tb_abft_mm_top_full: one complete multiplication at the design's default
// size: 32-bit data, 128 x 128-word memories, 4 processing elements, TMR
// controller, and the largest matrix that fits with its checksums, n = 127.
//
// Random A and B are loaded through the host port; the run must end after
// 2n^2 + (n+1)^2 * (ceil(n/P) + 1) + 4*DRAIN_CYCLES + 1 cycles without an
// error, and every element of the 128 x 128 checksum product, the checksum row
// of A and the checksum column of B must equal the values computed here. A
// second run with one upset word in A during the multiplication must be
// detected.
module tb_abft_mm_top_full;
  import abft_pkg::*;
  localparam int unsigned W = DATA_W_DEF, DIM = DIM_DEF, P = PE_DEF, CW = $clog2(DIM);
  localparam int NN = DIM - 1;

  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst_n, start;
  logic [CW-1:0] n;
  logic [W-1:0]  threshold;
  logic          busy, done, error_found, tmr_mismatch;
  phase_e        phase;
  logic          host_we;
  mat_sel_e      host_wsel, host_rsel;
  logic [CW-1:0] host_wrow, host_wcol, host_rrow, host_rcol;
  logic [W-1:0]  host_wdata, host_rdata;

  abft_mm_top dut (.*);

  logic [W-1:0] ma [DIM][DIM];
  logic [W-1:0] mb [DIM][DIM];
  int checks = 0, failures = 0, mismatches = 0;

  task automatic chk(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hread(mat_sel_e sel, int r, int c, output logic [W-1:0] d);
    @(negedge clk);
    host_rsel = sel; host_rrow = CW'(r); host_rcol = CW'(c);
    @(negedge clk);
    d = host_rdata;
  endtask

  task automatic run_to_done(output int cycles);
    @(negedge clk);
    start = 1; n = CW'(NN);
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    @(negedge clk);
  endtask

  initial begin
    int cycles, expc;
    logic [W-1:0] d, e;
    rst_n = 0; start = 0; n = '0; threshold = '0;
    host_we = 0; host_wsel = MAT_A; host_wrow = 0; host_wcol = 0; host_wdata = 0;
    host_rsel = MAT_A; host_rrow = 0; host_rcol = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int r = 0; r < NN; r++)
      for (int c = 0; c < NN; c++) begin
        ma[r][c] = $urandom;
        mb[r][c] = $urandom;
        @(negedge clk);
        host_we = 1; host_wsel = MAT_A; host_wrow = CW'(r); host_wcol = CW'(c); host_wdata = ma[r][c];
        @(negedge clk);
        host_wsel = MAT_B; host_wdata = mb[r][c];
      end
    @(negedge clk);
    host_we = 0;
    for (int c = 0; c < NN; c++) begin
      ma[NN][c] = '0;
      for (int r = 0; r < NN; r++) ma[NN][c] += ma[r][c];
    end
    for (int r = 0; r < NN; r++) begin
      mb[r][NN] = '0;
      for (int c = 0; c < NN; c++) mb[r][NN] += mb[r][c];
    end

    run_to_done(cycles);
    expc = 2 * NN * NN + (NN + 1) * (NN + 1) * ((NN + P - 1) / P + 1) + 4 * DRAIN_CYCLES + 1;
    chk("start->done cycles", W'(cycles), W'(expc));
    chk("no error on clean run", W'(error_found), 0);
    $display("full-size run: n=%0d, %0d cycles", NN, cycles);

    for (int c = 0; c < NN; c++) begin
      hread(MAT_A, NN, c, d);
      chk("A checksum", d, ma[NN][c]);
      hread(MAT_B, c, NN, d);
      chk("B checksum", d, mb[c][NN]);
    end
    for (int i = 0; i <= NN; i++)
      for (int j = 0; j <= NN; j++) begin
        e = '0;
        for (int k = 0; k < NN; k++) e += ma[i][k] * mb[k][j];
        hread(MAT_C, i, j, d);
        chk($sformatf("C[%0d][%0d]", i, j), d, e);
      end

    // second run: one upset word in A during the multiplication
    fork
      run_to_done(cycles);
      begin
        while (phase != PH_MM) @(negedge clk);
        repeat (1000) @(negedge clk);
        host_we = 1; host_wsel = MAT_A; host_wrow = CW'(NN - 1); host_wcol = CW'(17);
        host_wdata = ma[NN - 1][17] ^ W'(1);
        @(negedge clk);
        host_we = 0;
      end
    join
    chk("upset in A detected", W'(error_found), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
