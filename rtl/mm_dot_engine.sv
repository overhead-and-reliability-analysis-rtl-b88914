// mm_dot_engine: the inner-loop parallel datapath of the matrix multiplier.
//
// P processing elements each multiply one element of a row of A with the
// matching element of a column of B; an adder tree sums the P products, and an
// accumulator adds these partial dot products over ceil(N/P) consecutive
// groups into one element of C, which is then written to the C memory. This is
// the structure of the inner-loop parallel architecture (multipliers feeding an
// adder tree feeding an accumulator). All arithmetic is W-bit two's-complement
// integer arithmetic modulo 2^W, which keeps the ABFT checksums exact.
//
// Interface: one group per cycle on in_valid with its tags. in_first marks the
// first group of a dot product, in_last the final one, in_mask the lanes that
// hold real elements (lanes past column/row N-1 are zeroed), in_row/in_col the
// position of the C element the group belongs to.
// Timing: three register stages (products, tree sum, accumulator). An element
// whose last group is presented in cycle t appears on c_we/c_row/c_col/c_data
// in cycle t+3, a one-cycle write strobe for the C memory. Groups may be
// presented back to back, so one C element is produced every ceil(N/P) cycles.
//
// The pipeline depth is this implementation's choice. P must be a power of two.
module mm_dot_engine #(
  parameter int unsigned W  = 32,
  parameter int unsigned P  = 4,
  parameter int unsigned CW = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_first,
  input  logic                 in_last,
  input  logic [P-1:0]         in_mask,
  input  logic [CW-1:0]        in_row,
  input  logic [CW-1:0]        in_col,
  input  logic [P-1:0][W-1:0]  a_vec,
  input  logic [P-1:0][W-1:0]  b_vec,
  output logic                 c_we,
  output logic [CW-1:0]        c_row,
  output logic [CW-1:0]        c_col,
  output logic [W-1:0]         c_data
);

  typedef struct packed {
    logic          valid;
    logic          first;
    logic          last;
    logic [CW-1:0] row;
    logic [CW-1:0] col;
  } tag_t;

  // Stage 1: one multiplier per processing element.
  logic [P-1:0][W-1:0] prod_q;
  tag_t                tag1_q, tag2_q;

  always_ff @(posedge clk) begin
    for (int l = 0; l < P; l++)
      prod_q[l] <= in_mask[l] ? W'(a_vec[l] * b_vec[l]) : '0;
  end

  // Stage 2: balanced adder tree, node n has children 2n and 2n+1, the
  // products are the leaves P..2P-1, the root is node 1.
  logic [W-1:0] tree [1:2*P-1];
  logic [W-1:0] sum_q;

  always_comb begin
    for (int l = 0; l < P; l++)
      tree[P+l] = prod_q[l];
    for (int n = P - 1; n >= 1; n--)
      tree[n] = tree[2*n] + tree[2*n+1];
  end

  always_ff @(posedge clk)
    sum_q <= tree[1];

  // Stage 3: accumulator over the groups of one dot product.
  logic [W-1:0] acc_q, acc_next;

  assign acc_next = tag2_q.first ? sum_q : acc_q + sum_q;

  always_ff @(posedge clk) begin
    if (tag2_q.valid)
      acc_q <= acc_next;
    c_data <= acc_next;
    c_row  <= tag2_q.row;
    c_col  <= tag2_q.col;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag1_q <= '0;
      tag2_q <= '0;
      c_we   <= 1'b0;
    end else begin
      tag1_q <= '{valid: in_valid, first: in_first, last: in_last, row: in_row, col: in_col};
      tag2_q <= tag1_q;
      c_we   <= tag2_q.valid && tag2_q.last;
    end
  end

endmodule
