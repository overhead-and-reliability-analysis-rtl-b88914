// tb_mm_dot_engine: self-checking test of the P-lane multiply / adder-tree /
// accumulate datapath.
// Random dot products of random length n (1..40) are fed back to back as
// ceil(n/P) groups per element, with the lanes past n masked and filled with
// garbage. The testbench computes each dot product itself (modulo 2^32) and
// checks value, position tags and that each result appears exactly 3 cycles
// after its last group, i.e. one result per ceil(n/P) cycles.
module tb_mm_dot_engine;
  localparam int unsigned W = 32, P = 4, CW = 7;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic                in_valid, in_first, in_last;
  logic [P-1:0]        in_mask;
  logic [CW-1:0]       in_row, in_col;
  logic [P-1:0][W-1:0] a_vec, b_vec;
  logic                c_we;
  logic [CW-1:0]       c_row, c_col;
  logic [W-1:0]        c_data;

  mm_dot_engine #(.W(W), .P(P), .CW(CW)) dut (.*);

  typedef struct {
    logic [W-1:0]  data;
    logic [CW-1:0] row, col;
    longint        cycle;
  } exp_t;
  exp_t   expq[$];
  longint cyc = 0;
  int     checks = 0, failures = 0, results = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // Output monitor.
  always @(negedge clk) begin
    if (rst_n && c_we) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected result %h", c_data);
      end else begin
        e = expq.pop_front();
        results++;
        if (c_data !== e.data || c_row !== e.row || c_col !== e.col || cyc != e.cycle) begin
          failures++;
          $display("FAIL got %h (%0d,%0d) at %0d, expected %h (%0d,%0d) at %0d",
                   c_data, c_row, c_col, cyc, e.data, e.row, e.col, e.cycle);
        end
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0;
    rst_n = 0;
    in_valid = 0; in_first = 0; in_last = 0; in_mask = 0; in_row = 0; in_col = 0;
    a_vec = '0; b_vec = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int n, groups;
      logic [W-1:0] acc;
      n = (t < 8) ? t + 1 : $urandom_range(40, 1);
      groups = (n + P - 1) / P;
      acc = '0;
      for (int g = 0; g < groups; g++) begin
        @(negedge clk);
        in_valid = 1;
        in_first = (g == 0);
        in_last  = (g == groups - 1);
        in_row   = CW'(t);
        in_col   = CW'(t * 3);
        for (int l = 0; l < P; l++) begin
          // small operands some of the time, full-range the rest
          a_vec[l] = (t % 2) ? W'($urandom) : W'($urandom_range(20)) - W'(10);
          b_vec[l] = (t % 2) ? W'($urandom) : W'($urandom_range(20)) - W'(10);
          in_mask[l] = (g * P + l) < n;
          if (in_mask[l]) acc += a_vec[l] * b_vec[l];
        end
        if (in_last) begin
          exp_t e;
          e.data = acc; e.row = in_row; e.col = in_col; e.cycle = cyc + 3;
          expq.push_back(e);
          sent++;
        end
      end
      // an idle gap now and then
      if (t % 5 == 0) begin
        @(negedge clk);
        in_valid = 0;
        a_vec = {P{W'($urandom)}};
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++;
    if (results != sent || expq.size() != 0) begin
      failures++;
      $display("FAIL %0d results for %0d dot products", results, sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
