// tb_tmr_voter: self-checking test of the 2-of-3 majority voter.
// Drives random replica words, some identical, some with one replica
// corrupted, some with all three different, and compares y and mismatch with
// a bit-by-bit vote counted in the testbench.
module tb_tmr_voter;
  localparam int unsigned W = 24;

  logic [W-1:0] a, b, c, y;
  logic         mismatch;
  int checks = 0, failures = 0;

  tmr_voter #(.W(W)) dut (.a, .b, .c, .y, .mismatch);

  task automatic check_one();
    logic [W-1:0] exp_y;
    logic         exp_mm;
    int           ones;
    exp_mm = 1'b0;
    for (int k = 0; k < W; k++) begin
      ones = int'(a[k]) + int'(b[k]) + int'(c[k]);
      exp_y[k] = (ones >= 2);
      if (ones == 1 || ones == 2) exp_mm = 1'b1;
    end
    #1;
    checks++;
    if (y !== exp_y || mismatch !== exp_mm) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h y=%h exp=%h mm=%b exp=%b", a, b, c, y, exp_y, mismatch, exp_mm);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      a = W'($urandom);
      unique case (t % 4)
        0: begin b = a; c = a; end                          // all agree
        1: begin b = a; c = a ^ W'(1 << (t % W)); end       // c upset
        2: begin b = a ^ W'($urandom); c = a; end           // b upset
        default: begin b = W'($urandom); c = W'($urandom); end
      endcase
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
