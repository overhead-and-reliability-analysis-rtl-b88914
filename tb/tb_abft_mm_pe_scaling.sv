// tb_abft_mm_pe_scaling: the multiplier with 2, 8 and 16 processing elements
// (the scaling range of the design), each with 32 x 32-word memories. The
// 8-element instance is built without the triplicated controller
// (TMR_CTRL = 0, plain ABFT), the others with it.
// The three instances share the host and control inputs, so they receive the
// same matrices and start together. For n = 31 and n = 20 each must finish
// after 2n^2 + (n+1)^2 * (ceil(n/P) + 1) + 4*DRAIN_CYCLES + 1 cycles, report
// no error, and hold the checksum product computed here. An upset word in A
// during the multiplication must then be detected by all three.
module tb_abft_mm_pe_scaling;
  import abft_pkg::*;
  localparam int unsigned W = 32, DIM = 32, CW = $clog2(DIM);
  localparam int NP = 3;
  localparam int PES [NP] = '{2, 8, 16};

  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst_n, start;
  logic [CW-1:0] n;
  logic [W-1:0]  threshold;
  logic          host_we;
  mat_sel_e      host_wsel, host_rsel;
  logic [CW-1:0] host_wrow, host_wcol, host_rrow, host_rcol;
  logic [W-1:0]  host_wdata;

  logic [NP-1:0] busy, done, error_found, tmr_mismatch;
  phase_e        phase [NP];
  logic [W-1:0]  host_rdata [NP];

  for (genvar k = 0; k < NP; k++) begin : g_dut
    abft_mm_top #(.W(W), .DIM(DIM), .P(PES[k]), .TMR_CTRL(k != 1)) dut (
      .clk, .rst_n, .start, .n, .threshold,
      .busy(busy[k]), .done(done[k]), .error_found(error_found[k]),
      .phase(phase[k]), .tmr_mismatch(tmr_mismatch[k]),
      .host_we, .host_wsel, .host_wrow, .host_wcol, .host_wdata,
      .host_rsel, .host_rrow, .host_rcol, .host_rdata(host_rdata[k]));
  end

  logic [W-1:0] ma [DIM][DIM];
  logic [W-1:0] mb [DIM][DIM];
  int checks = 0, failures = 0;

  task automatic chk(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(int nn);
    for (int r = 0; r < nn; r++)
      for (int c = 0; c < nn; c++) begin
        ma[r][c] = $urandom;
        mb[r][c] = $urandom;
        @(negedge clk);
        host_we = 1; host_wsel = MAT_A; host_wrow = CW'(r); host_wcol = CW'(c); host_wdata = ma[r][c];
        @(negedge clk);
        host_wsel = MAT_B; host_wdata = mb[r][c];
      end
    @(negedge clk);
    host_we = 0;
  endtask

  // Start all instances; record for each the cycle its done pulse appears.
  task automatic run(int nn, output int cyc [NP]);
    int t;
    @(negedge clk);
    start = 1; n = CW'(nn);
    @(negedge clk);
    start = 0;
    t = 1;
    for (int k = 0; k < NP; k++) cyc[k] = -1;
    while (cyc[0] < 0 || cyc[1] < 0 || cyc[2] < 0) begin
      for (int k = 0; k < NP; k++)
        if (done[k] && cyc[k] < 0) cyc[k] = t;
      @(negedge clk);
      t++;
      if (t > 200000) break;
    end
    @(negedge clk);
  endtask

  initial begin
    int cyc [NP];
    int sizes [2] = '{31, 20};
    rst_n = 0; start = 0; n = '0; threshold = '0;
    host_we = 0; host_wsel = MAT_A; host_wrow = 0; host_wcol = 0; host_wdata = 0;
    host_rsel = MAT_A; host_rrow = 0; host_rcol = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    foreach (sizes[s]) begin
      int nn;
      nn = sizes[s];
      load(nn);
      run(nn, cyc);
      for (int k = 0; k < NP; k++) begin
        int expc;
        expc = 2 * nn * nn + (nn + 1) * (nn + 1) * ((nn + PES[k] - 1) / PES[k] + 1) + 4 * DRAIN_CYCLES + 1;
        chk($sformatf("cycles P=%0d n=%0d", PES[k], nn), W'(cyc[k]), W'(expc));
        chk($sformatf("no error P=%0d", PES[k]), W'(error_found[k]), 0);
      end
      for (int i = 0; i <= nn; i++)
        for (int j = 0; j <= nn; j++) begin
          logic [W-1:0] e, ai, bj;
          e = '0;
          for (int k = 0; k < nn; k++) begin
            ai = ma[i][k];
            if (i == nn) begin ai = '0; for (int r = 0; r < nn; r++) ai += ma[r][k]; end
            bj = mb[k][j];
            if (j == nn) begin bj = '0; for (int c = 0; c < nn; c++) bj += mb[k][c]; end
            e += ai * bj;
          end
          @(negedge clk);
          host_rsel = MAT_C; host_rrow = CW'(i); host_rcol = CW'(j);
          @(negedge clk);
          for (int k = 0; k < NP; k++)
            chk($sformatf("P=%0d C[%0d][%0d]", PES[k], i, j), host_rdata[k], e);
        end
    end

    // upset in A during the multiplication, all instances
    fork
      run(20, cyc);
      begin
        while (phase[2] != PH_MM) @(negedge clk);
        repeat (5) @(negedge clk);
        host_we = 1; host_wsel = MAT_A; host_wrow = CW'(19); host_wcol = CW'(3);
        host_wdata = ma[19][3] + W'(12345);
        @(negedge clk);
        host_we = 0;
      end
    join
    for (int k = 0; k < NP; k++)
      chk($sformatf("upset detected P=%0d", PES[k]), W'(error_found[k]), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
