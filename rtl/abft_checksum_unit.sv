// abft_checksum_unit: the extra ABFT accumulator, shared by checksum
// generation and checksum validation.
//
// Generation: the elements of one column of A (or one row of B) are streamed
// in with in_first on the first and in_last on the final element. The unit sums
// them and, one cycle after the final element, raises gen_we with the sum in
// gen_data and the destination tag (where the checksum is to be written) in
// gen_tag.
// Validation: the data elements of one column of C are streamed in (in_first on
// the first), followed by the stored checksum element of that column, marked
// with in_check. The unit forms the difference of the recomputed sum and the
// stored checksum and, if its magnitude exceeds threshold, sets error_found.
// error_found stays set until rst_n; threshold = 0 detects every mismatch.
// cmp_valid/cmp_fail pulse one cycle after each comparison (for monitoring).
//
// Timing: one element per cycle, no stalls; results are registered.
// The accumulate / compare-against-threshold behaviour and the sticky flag
// follow the reference design; the tag mechanism and the signed-magnitude
// difference are this implementation's choices. Arithmetic is modulo 2^W, as
// in the multiplier datapath, so a fault-free product always matches exactly.
module abft_checksum_unit #(
  parameter int unsigned W     = 32,
  parameter int unsigned TAG_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_first,
  input  logic              in_last,
  input  logic              in_check,
  input  logic [W-1:0]      in_data,
  input  logic [TAG_W-1:0]  in_tag,
  input  logic [W-1:0]      threshold,
  output logic              gen_we,
  output logic [W-1:0]      gen_data,
  output logic [TAG_W-1:0]  gen_tag,
  output logic              cmp_valid,
  output logic              cmp_fail,
  output logic              error_found
);

  logic [W-1:0] acc_q, acc_next, diff, diff_mag;
  logic         mismatch;

  assign acc_next = (in_first ? '0 : acc_q) + in_data;
  assign diff     = acc_q - in_data;
  assign diff_mag = diff[W-1] ? W'(-diff) : diff;
  assign mismatch = diff_mag > threshold;

  always_ff @(posedge clk) begin
    if (in_valid && !in_check)
      acc_q <= acc_next;
    gen_data <= acc_next;
    gen_tag  <= in_tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_we      <= 1'b0;
      cmp_valid   <= 1'b0;
      cmp_fail    <= 1'b0;
      error_found <= 1'b0;
    end else begin
      gen_we    <= in_valid && in_last && !in_check;
      cmp_valid <= in_valid && in_check;
      cmp_fail  <= in_valid && in_check && mismatch;
      if (in_valid && in_check && mismatch)
        error_found <= 1'b1;
    end
  end

endmodule
