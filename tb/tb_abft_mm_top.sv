// tb_abft_mm_top: end-to-end test of the hybrid ABFT matrix multiplier at a
// reduced memory size (16 x 16 words, 4 processing elements, TMR controller).
//
// The testbench loads random A and B through the host port, runs the
// multiplier and reads back the whole (n+1) x (n+1) result, comparing it with
// a checksum-augmented product computed here, together with the checksum row
// of A and column of B. It then exercises each protection mechanism:
//   * a memory upset in A during the multiplication  -> error_found
//   * a memory upset in C after it was written        -> error_found
//   * an upset in the adder-tree register of the datapath -> error_found
//   * an upset in the checksum accumulator while it generates the checksums
//     of A                                            -> error_found
//   * a small error within the threshold (tolerated), and the same error with
//     a lower threshold (detected)
//   * a fault in one controller replica during the run -> masked by the voter
//     (tmr_mismatch seen, results still correct, no error)
// Each mechanism is counted; one that never happened counts as a failure. The
// start-to-done cycle count is checked for every run.
module tb_abft_mm_top;
  import abft_pkg::*;
  localparam int unsigned W = 32, DIM = 16, P = 4, CW = $clog2(DIM);

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

  abft_mm_top #(.W(W), .DIM(DIM), .P(P), .TMR_CTRL(1'b1)) dut (.*);

  logic [W-1:0] ma [DIM][DIM];   // A with checksum row (reference)
  logic [W-1:0] mb [DIM][DIM];   // B with checksum column (reference)
  logic [W-1:0] mc [DIM][DIM];   // expected full checksum product

  int checks = 0, failures = 0;
  int n_clean = 0, n_partial_groups = 0, n_detect_a = 0, n_detect_c = 0;
  int n_tolerated = 0, n_thresh_detect = 0, n_tmr_masked = 0;
  int n_detect_dp = 0, n_detect_cs = 0;

  task automatic chk(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hwrite(mat_sel_e sel, int r, int c, logic [W-1:0] d);
    @(negedge clk);
    host_we = 1; host_wsel = sel; host_wrow = CW'(r); host_wcol = CW'(c); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic hread(mat_sel_e sel, int r, int c, output logic [W-1:0] d);
    @(negedge clk);
    host_rsel = sel; host_rrow = CW'(r); host_rcol = CW'(c);
    @(negedge clk);
    d = host_rdata;
  endtask

  // Load n x n matrices (mode 0: full-range random, 1: small values, 2: small
  // B with only B[n-1][0] = 3 in the last row) and compute the reference.
  task automatic load(int nn, int mode);
    for (int r = 0; r < nn; r++)
      for (int c = 0; c < nn; c++) begin
        ma[r][c] = (mode == 0) ? W'($urandom) : W'($urandom_range(9));
        mb[r][c] = (mode == 0) ? W'($urandom) : W'($urandom_range(3));
        if (mode == 2 && r == nn - 1) mb[r][c] = (c == 0) ? W'(3) : W'(0);
        hwrite(MAT_A, r, c, ma[r][c]);
        hwrite(MAT_B, r, c, mb[r][c]);
      end
    for (int c = 0; c < nn; c++) begin
      ma[nn][c] = '0;
      for (int r = 0; r < nn; r++) ma[nn][c] += ma[r][c];
    end
    for (int r = 0; r < nn; r++) begin
      mb[r][nn] = '0;
      for (int c = 0; c < nn; c++) mb[r][nn] += mb[r][c];
    end
    for (int i = 0; i <= nn; i++)
      for (int j = 0; j <= nn; j++) begin
        mc[i][j] = '0;
        for (int k = 0; k < nn; k++) mc[i][j] += ma[i][k] * mb[k][j];
      end
  endtask

  // Start a run and wait for done, checking the cycle count.
  task automatic launch(int nn);
    @(negedge clk);
    start = 1; n = CW'(nn);
    @(negedge clk);
    start = 0;
  endtask

  task automatic finish_run(int nn, int start_cycle_ofs);
    int cycles, groups, expc;
    groups = (nn + P - 1) / P;
    expc = 2 * nn * nn + (nn + 1) * (nn + 1) * (groups + 1) + 4 * DRAIN_CYCLES + 1;
    cycles = start_cycle_ofs;
    while (!done && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
    chk($sformatf("start->done cycles n=%0d", nn), W'(cycles), W'(expc));
    @(negedge clk);
    chk("busy low after done", W'(busy), 0);
  endtask

  task automatic verify_memories(int nn);
    logic [W-1:0] d;
    for (int c = 0; c < nn; c++) begin
      hread(MAT_A, nn, c, d);
      chk($sformatf("A checksum col %0d", c), d, ma[nn][c]);
    end
    for (int r = 0; r < nn; r++) begin
      hread(MAT_B, r, nn, d);
      chk($sformatf("B checksum row %0d", r), d, mb[r][nn]);
    end
    for (int i = 0; i <= nn; i++)
      for (int j = 0; j <= nn; j++) begin
        hread(MAT_C, i, j, d);
        chk($sformatf("C[%0d][%0d]", i, j), d, mc[i][j]);
      end
  endtask

  task automatic reset_dut();
    @(negedge clk);
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  task automatic wait_phase(phase_e ph, output int waited);
    waited = 0;
    while (phase != ph) begin
      @(negedge clk);
      waited++;
    end
  endtask

  initial begin
    int w;
    logic [W-1:0] d;
    rst_n = 0; start = 0; n = '0; threshold = '0;
    host_we = 0; host_wsel = MAT_A; host_wrow = 0; host_wcol = 0; host_wdata = 0;
    host_rsel = MAT_A; host_rrow = 0; host_rcol = 0;
    reset_dut();

    // ---------------- clean runs at several sizes
    for (int t = 0; t < 6; t++) begin
      int sizes [6] = '{1, 3, 4, 7, 8, DIM - 1};
      int nn;
      nn = sizes[t];
      load(nn, 0);
      launch(nn);
      finish_run(nn, 1);
      chk("no error on clean run", W'(error_found), 0);
      verify_memories(nn);
      if (!error_found) n_clean++;
      if (nn % P != 0) n_partial_groups++;
    end

    // ---------------- memory upset in A during the multiplication
    load(7, 0);
    launch(7);
    wait_phase(PH_MM, w);
    @(negedge clk);
    host_we = 1; host_wsel = MAT_A; host_wrow = CW'(6); host_wcol = CW'(2);
    host_wdata = ma[6][2] ^ W'(32'h0000_0100);
    @(negedge clk);
    host_we = 0;
    finish_run(7, w + 3);
    chk("A upset detected", W'(error_found), 1);
    if (error_found) n_detect_a++;
    reset_dut();
    chk("reset clears error", W'(error_found), 0);

    // ---------------- memory upset in C after its element was written
    load(6, 0);
    launch(6);
    wait_phase(PH_MM, w);
    repeat (20) @(negedge clk);
    while (dut.de_we) @(negedge clk);
    host_we = 1; host_wsel = MAT_C; host_wrow = 0; host_wcol = 0;
    host_wdata = mc[0][0] + W'(1);
    @(negedge clk);
    host_we = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    chk("C upset detected", W'(error_found), 1);
    if (error_found) n_detect_c++;
    reset_dut();

    // ---------------- upset in the datapath: adder-tree output register
    load(7, 0);
    launch(7);
    wait_phase(PH_MM, w);
    repeat (9) @(negedge clk);
    while (!dut.u_dot.tag2_q.valid) @(negedge clk);
    dut.u_dot.sum_q = dut.u_dot.sum_q ^ W'(32'h0001_0000);
    while (!done) @(negedge clk);
    @(negedge clk);
    chk("datapath upset detected", W'(error_found), 1);
    if (error_found) n_detect_dp++;
    reset_dut();

    // ---------------- upset in the checksum accumulator while generating
    load(6, 0);
    launch(6);
    wait_phase(PH_GEN_A, w);
    repeat (3) @(negedge clk);
    dut.u_abft.acc_q = dut.u_abft.acc_q ^ W'(32'h8000_0000);
    while (!done) @(negedge clk);
    @(negedge clk);
    chk("checksum-generation upset detected", W'(error_found), 1);
    if (error_found) n_detect_cs++;
    reset_dut();

    // ---------------- error within the threshold, then beyond it
    for (int t = 0; t < 2; t++) begin
      load(7, 2);
      threshold = (t == 0) ? W'(3) : W'(2);
      launch(7);
      wait_phase(PH_MM, w);
      @(negedge clk);
      host_we = 1; host_wsel = MAT_A; host_wrow = CW'(1); host_wcol = CW'(6);
      host_wdata = ma[1][6] + W'(1);           // C changes by B[6][j] <= 3
      @(negedge clk);
      host_we = 0;
      while (!done) @(negedge clk);
      @(negedge clk);
      hread(MAT_C, 1, 0, d);
      chk("corrupted element really differs", d, mc[1][0] + W'(3));
      if (t == 0) begin
        chk("difference 3 tolerated at threshold 3", W'(error_found), 0);
        if (!error_found) n_tolerated++;
      end else begin
        chk("difference 3 detected at threshold 2", W'(error_found), 1);
        if (error_found) n_thresh_detect++;
      end
      reset_dut();
    end
    threshold = '0;

    // ---------------- fault in one controller replica, masked by the voter
    for (int t = 0; t < 2; t++) begin
      bit seen;
      load(5, 0);
      launch(5);
      wait_phase(t == 0 ? PH_MM : PH_GEN_A, w);
      repeat (3) @(negedge clk);
      // upset one counter bit of one replica (a direct write to that
      // instance's register; the replica's own logic carries on from it)
      if (t == 0) dut.g_rep[1].g_on.u_ctrl.j_q = dut.g_rep[1].g_on.u_ctrl.j_q ^ CW'(2);
      else        dut.g_rep[2].g_on.u_ctrl.i_q = dut.g_rep[2].g_on.u_ctrl.i_q ^ CW'(1);
      seen = 0;
      while (!done) begin
        if (tmr_mismatch) seen = 1;
        @(negedge clk);
      end
      @(negedge clk);
      chk("replica disagreement observed", W'(seen), 1);
      chk("no error with masked controller fault", W'(error_found), 0);
      verify_memories(5);
      if (seen && !error_found) n_tmr_masked++;
      reset_dut();   // resynchronise the replicas
    end

    $display("mechanisms: clean=%0d partial_groups=%0d detect_A=%0d detect_C=%0d detect_datapath=%0d detect_checksum_gen=%0d tolerated=%0d threshold_detect=%0d tmr_masked=%0d",
             n_clean, n_partial_groups, n_detect_a, n_detect_c, n_detect_dp, n_detect_cs, n_tolerated, n_thresh_detect, n_tmr_masked);
    chk("datapath upset detection happened", W'(n_detect_dp > 0), 1);
    chk("checksum-generation upset detection happened", W'(n_detect_cs > 0), 1);
    chk("clean runs happened", W'(n_clean > 0), 1);
    chk("partial lane groups happened", W'(n_partial_groups > 0), 1);
    chk("A upset detection happened", W'(n_detect_a > 0), 1);
    chk("C upset detection happened", W'(n_detect_c > 0), 1);
    chk("threshold tolerance happened", W'(n_tolerated > 0), 1);
    chk("threshold detection happened", W'(n_thresh_detect > 0), 1);
    chk("TMR masking happened", W'(n_tmr_masked > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
