// tb_mm_addr_gen: self-checking test of the phase sequencer / address
// generator.
// For several matrix sizes the testbench builds, from nested loops of its own,
// the expected per-cycle sequence of reads (A column walk, B row walk, grouped
// A-row/B-column reads with lane masks, C column walk) and drain gaps, and
// compares every cycle's read addresses, and the registered tags one cycle
// later, with it. It also checks the total cycle count from start to done:
// 2n^2 + (n+1)^2 * ceil(n/P) + (n+1)^2 + 4*DRAIN_CYCLES + 1.
module tb_mm_addr_gen;
  import abft_pkg::*;
  localparam int unsigned DIM = 16, P = 4, CW = $clog2(DIM);

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, start;
  logic [CW-1:0] n;
  logic busy, done;
  phase_e phase;
  logic a_rd_en, b_rd_en, c_rd_en;
  logic [CW-1:0] a_rd_row, a_rd_col, b_rd_row, b_rd_col, c_rd_row, c_rd_col;
  logic mm_valid, mm_first, mm_last;
  logic [P-1:0] mm_mask;
  logic [CW-1:0] mm_row, mm_col;
  logic cs_valid, cs_first, cs_last, cs_check;
  mat_sel_e cs_src;
  logic [CW-1:0] cs_dst_row, cs_dst_col;

  mm_addr_gen #(.DIM(DIM), .P(P)) dut (.*);

  typedef struct {
    logic ae, be, ce;
    int   ar, ac, br, bc, cr, cc;
    logic mv, mf, ml; logic [P-1:0] mm; int mr, mc;
    logic cv, cf, cl, ck; mat_sel_e cs; int dr, dc;
  } step_t;
  step_t exp_q[$];

  int checks = 0, failures = 0;

  function automatic step_t idle_step();
    step_t s;
    s = '{ae: 0, be: 0, ce: 0, ar: 0, ac: 0, br: 0, bc: 0, cr: 0, cc: 0,
          mv: 0, mf: 0, ml: 0, mm: '0, mr: 0, mc: 0,
          cv: 0, cf: 0, cl: 0, ck: 0, cs: MAT_A, dr: 0, dc: 0};
    return s;
  endfunction

  task automatic build(input int nn);
    step_t s;
    int groups;
    groups = (nn + P - 1) / P;
    exp_q.delete();
    for (int j = 0; j < nn; j++)
      for (int i = 0; i < nn; i++) begin
        s = idle_step(); s.ae = 1; s.ar = i; s.ac = j;
        s.cv = 1; s.cf = (i == 0); s.cl = (i == nn - 1); s.cs = MAT_A; s.dr = nn; s.dc = j;
        exp_q.push_back(s);
      end
    repeat (DRAIN_CYCLES) exp_q.push_back(idle_step());
    for (int k = 0; k < nn; k++)
      for (int j = 0; j < nn; j++) begin
        s = idle_step(); s.be = 1; s.br = k; s.bc = j;
        s.cv = 1; s.cf = (j == 0); s.cl = (j == nn - 1); s.cs = MAT_B; s.dr = k; s.dc = nn;
        exp_q.push_back(s);
      end
    repeat (DRAIN_CYCLES) exp_q.push_back(idle_step());
    for (int i = 0; i <= nn; i++)
      for (int j = 0; j <= nn; j++)
        for (int g = 0; g < groups; g++) begin
          s = idle_step();
          s.ae = 1; s.ar = i; s.ac = g * P;
          s.be = 1; s.br = g * P; s.bc = j;
          s.mv = 1; s.mf = (g == 0); s.ml = (g == groups - 1); s.mr = i; s.mc = j;
          for (int l = 0; l < P; l++) s.mm[l] = (g * P + l) < nn;
          exp_q.push_back(s);
        end
    repeat (DRAIN_CYCLES) exp_q.push_back(idle_step());
    for (int j = 0; j <= nn; j++)
      for (int i = 0; i <= nn; i++) begin
        s = idle_step(); s.ce = 1; s.cr = i; s.cc = j;
        s.cv = 1; s.cf = (i == 0); s.ck = (i == nn); s.cs = MAT_C; s.dr = i; s.dc = j;
        exp_q.push_back(s);
      end
    repeat (DRAIN_CYCLES) exp_q.push_back(idle_step());
  endtask

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nn);
    int cycles, exp_cycles, groups;
    step_t prev, cur;
    bit have_prev;
    build(nn);
    groups = (nn + P - 1) / P;
    exp_cycles = 2 * nn * nn + (nn + 1) * (nn + 1) * (groups + 1) + 4 * DRAIN_CYCLES + 1;
    @(negedge clk);
    start = 1; n = CW'(nn);
    @(negedge clk);
    start = 0; n = '0;
    cycles = 1;
    have_prev = 0;
    while (!done) begin
      cur = (exp_q.size() > 0) ? exp_q.pop_front() : idle_step();
      // read addresses in this cycle (only compared where enabled)
      chk("a_rd_en", a_rd_en, cur.ae);
      chk("b_rd_en", b_rd_en, cur.be);
      chk("c_rd_en", c_rd_en, cur.ce);
      if (cur.ae) begin chk("a_rd_row", a_rd_row, cur.ar); chk("a_rd_col", a_rd_col, cur.ac); end
      if (cur.be) begin chk("b_rd_row", b_rd_row, cur.br); chk("b_rd_col", b_rd_col, cur.bc); end
      if (cur.ce) begin chk("c_rd_row", c_rd_row, cur.cr); chk("c_rd_col", c_rd_col, cur.cc); end
      chk("busy", busy, 1);
      // tags of the previous cycle's reads
      if (have_prev) begin
        chk("mm_valid", mm_valid, prev.mv);
        if (prev.mv) begin
          chk("mm_first", mm_first, prev.mf); chk("mm_last", mm_last, prev.ml);
          chk("mm_mask", mm_mask, prev.mm);
          chk("mm_row", mm_row, prev.mr); chk("mm_col", mm_col, prev.mc);
        end
        chk("cs_valid", cs_valid, prev.cv);
        if (prev.cv) begin
          chk("cs_first", cs_first, prev.cf); chk("cs_last", cs_last, prev.cl);
          chk("cs_check", cs_check, prev.ck); chk("cs_src", cs_src, prev.cs);
          chk("cs_dst_row", cs_dst_row, prev.dr); chk("cs_dst_col", cs_dst_col, prev.dc);
        end
      end
      prev = cur;
      have_prev = 1;
      @(negedge clk);
      cycles++;
      if (cycles > 100000) break;
    end
    chk("all steps issued", exp_q.size(), 0);
    chk($sformatf("cycles start->done n=%0d", nn), cycles, exp_cycles);
    @(negedge clk);
    chk("done is one pulse", done, 0);
    chk("idle after done", busy, 0);
  endtask

  initial begin
    rst_n = 0; start = 0; n = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    chk("idle after reset", busy, 0);
    run(1);
    run(3);
    run(4);
    run(6);
    run(DIM - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
