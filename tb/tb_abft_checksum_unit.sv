// tb_abft_checksum_unit: self-checking test of the ABFT accumulator.
// Generation: random lines are streamed in; the sum (mod 2^32) and the
// destination tag must appear on gen_we exactly one cycle after the last
// element. Validation: columns are streamed with a correct checksum (no
// error), with a checksum off by less than or equal to the threshold (no
// error), and off by more (error_found set, and held through later good
// columns until reset).
module tb_abft_checksum_unit;
  localparam int unsigned W = 32, TAG_W = 16;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic             in_valid, in_first, in_last, in_check;
  logic [W-1:0]     in_data, threshold, gen_data;
  logic [TAG_W-1:0] in_tag, gen_tag;
  logic             gen_we, cmp_valid, cmp_fail, error_found;

  abft_checksum_unit #(.W(W), .TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stream one column of len data words and, if with_check, a checksum word
  // equal to the true sum plus offset. Returns the true sum.
  task automatic stream(input int len, input bit with_check, input logic [W-1:0] offset,
                        input logic [TAG_W-1:0] tag, output logic [W-1:0] sum);
    sum = '0;
    for (int i = 0; i < len; i++) begin
      logic [W-1:0] d;
      d = (len % 2) ? W'($urandom) : W'($urandom_range(1000));
      sum += d;
      @(negedge clk);
      in_valid = 1; in_first = (i == 0); in_last = (i == len - 1) && !with_check;
      in_check = 0; in_data = d; in_tag = tag;
      // gen result of the previous cycle must not be present mid-line
      if (i > 0) expect_true("no gen_we mid-line", gen_we == 1'b0);
    end
    if (with_check) begin
      @(negedge clk);
      in_first = 0; in_last = 0; in_check = 1; in_data = sum + offset;
    end
    @(negedge clk);
    in_valid = 0; in_check = 0; in_last = 0; in_first = 0;
  endtask

  initial begin
    logic [W-1:0] s;
    rst_n = 0;
    in_valid = 0; in_first = 0; in_last = 0; in_check = 0; in_data = 0; in_tag = 0;
    threshold = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- generation: result one cycle after the last element
    for (int t = 0; t < 60; t++) begin
      int len;
      logic [TAG_W-1:0] tag;
      len = $urandom_range(30, 1);
      tag = TAG_W'($urandom);
      s = '0;
      for (int i = 0; i < len; i++) begin
        logic [W-1:0] d;
        d = W'($urandom);
        s += d;
        @(negedge clk);
        in_valid = 1; in_first = (i == 0); in_last = (i == len - 1);
        in_check = 0; in_data = d; in_tag = tag;
        if (i > 0) expect_true("no gen_we mid-line", !gen_we);
      end
      @(negedge clk);
      in_valid = 0; in_last = 0;
      expect_true("gen_we one cycle after last", gen_we);
      expect_true("gen sum", gen_data == s);
      expect_true("gen tag", gen_tag == tag);
      expect_true("no compare in generation", !cmp_valid && !error_found);
      // back-to-back lines half of the time: no gap
      if (t % 2) begin @(negedge clk); expect_true("gen_we single", !gen_we); end
    end

    // ---- validation, correct checksums
    for (int t = 0; t < 20; t++) begin
      stream($urandom_range(20, 1), 1'b1, '0, '0, s);
      expect_true("compare strobe", cmp_valid);
      expect_true("no error on good column", !cmp_fail && !error_found);
    end

    // ---- validation within threshold, both signs
    threshold = 5;
    stream(8, 1'b1, W'(5), '0, s);
    expect_true("within threshold +5", !cmp_fail && !error_found);
    stream(8, 1'b1, W'(-5), '0, s);
    expect_true("within threshold -5", !cmp_fail && !error_found);

    // ---- beyond threshold
    stream(8, 1'b1, W'(-6), '0, s);
    expect_true("beyond threshold detected", cmp_fail && error_found);
    threshold = 0;
    stream(9, 1'b1, '0, '0, s);
    expect_true("error held after good column", !cmp_fail && error_found);

    // ---- reset clears; single-bit difference detected with threshold 0
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    expect_true("reset clears error", !error_found);
    stream(12, 1'b1, W'(1) << 31, '0, s);
    expect_true("MSB difference detected", error_found);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
