// tb_mm_matrix_ram: self-checking test of the banked matrix memory.
// Two instances (banked by column and by row) are filled through the write
// port with random words mirrored in a testbench array; every element is then
// read back, and the returned word and the whole P-wide group are compared
// with the mirror, one cycle after the read. A read with rd_en low must hold
// the previous data.
module tb_mm_matrix_ram;
  localparam int unsigned W = 32, DIM = 16, P = 4, CW = $clog2(DIM);

  logic clk = 0;
  always #5 clk = ~clk;

  logic                rd_en, we;
  logic [CW-1:0]       rd_row, rd_col, wr_row, wr_col;
  logic [W-1:0]        wr_data;
  logic [P-1:0][W-1:0] vec_c, vec_r;
  logic [W-1:0]        word_c, word_r;

  logic [W-1:0] model [DIM][DIM];
  int checks = 0, failures = 0;

  mm_matrix_ram #(.W(W), .DIM(DIM), .P(P), .BANK_ON_ROW(1'b0)) dut_c (
    .clk, .rd_en, .rd_row, .rd_col, .rd_vec(vec_c), .rd_word(word_c),
    .we, .wr_row, .wr_col, .wr_data);
  mm_matrix_ram #(.W(W), .DIM(DIM), .P(P), .BANK_ON_ROW(1'b1)) dut_r (
    .clk, .rd_en, .rd_row, .rd_col, .rd_vec(vec_r), .rd_word(word_r),
    .we, .wr_row, .wr_col, .wr_data);

  task automatic expect_eq(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; we = 0; rd_row = 0; rd_col = 0; wr_row = 0; wr_col = 0; wr_data = 0;
    // fill
    for (int r = 0; r < DIM; r++)
      for (int c = 0; c < DIM; c++) begin
        model[r][c] = $urandom;
        @(negedge clk);
        we = 1; wr_row = CW'(r); wr_col = CW'(c); wr_data = model[r][c];
      end
    @(negedge clk) we = 0;
    // read back in random order
    for (int t = 0; t < 600; t++) begin
      int r, c, rb, cb;
      r = $urandom_range(DIM - 1);
      c = $urandom_range(DIM - 1);
      @(negedge clk);
      rd_en = 1; rd_row = CW'(r); rd_col = CW'(c);
      @(negedge clk);
      rd_en = 0; rd_row = CW'($urandom); rd_col = CW'($urandom);
      expect_eq("word/col-banked", word_c, model[r][c]);
      expect_eq("word/row-banked", word_r, model[r][c]);
      cb = c - (c % P);
      rb = r - (r % P);
      for (int l = 0; l < P; l++) begin
        expect_eq("vec/col-banked", vec_c[l], model[r][cb + l]);
        expect_eq("vec/row-banked", vec_r[l], model[rb + l][c]);
      end
      // hold while rd_en is low
      @(negedge clk);
      expect_eq("hold", word_c, model[r][c]);
      // occasional overwrite, read in the same cycle returns the old word
      if (t % 7 == 0) begin
        logic [W-1:0] nv;
        nv = $urandom;
        we = 1; wr_row = CW'(r); wr_col = CW'(c); wr_data = nv;
        rd_en = 1; rd_row = CW'(r); rd_col = CW'(c);
        @(negedge clk);
        we = 0; rd_en = 0;
        expect_eq("read-during-write old", word_r, model[r][c]);
        model[r][c] = nv;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
