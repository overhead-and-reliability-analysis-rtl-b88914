// mm_addr_gen: address generator and phase state machine of the ABFT matrix
// multiplier.
//
// After start (with the matrix size n, 1 <= n <= DIM-1) it runs four phases,
// separated by DRAIN_CYCLES idle cycles so that all writes of a phase land
// before the next phase reads:
//   GEN_A : for each column j < n, read A[0..n-1][j] one per cycle; the
//           checksum unit writes the sum to A[n][j]          (n*n cycles)
//   GEN_B : for each row k < n, read B[k][0..n-1]; the sum goes to B[k][n]
//                                                            (n*n cycles)
//   MM    : for each i <= n, j <= n and group g < ceil(n/P), read the group
//           A[i][gP..gP+P-1] and B[gP..gP+P-1][j]; the dot engine writes
//           C[i][j]                               ((n+1)^2 * ceil(n/P) cycles)
//   VAL   : for each column j <= n, read C[0..n][j]; rows 0..n-1 are summed
//           and row n, the stored checksum, is compared    ((n+1)^2 cycles)
// then pulses done for one cycle and returns to idle.
//
// Outputs: the read addresses (x_rd_en/x_rd_row/x_rd_col) are driven in the
// cycle the read is issued. The datapath tags (mm_* for the dot engine, cs_*
// for the checksum unit) are registered, so they are valid in the next cycle,
// together with the data the RAMs return. cs_src selects which memory feeds the
// checksum unit; cs_dst_row/cs_dst_col say where a generated checksum goes.
// busy is high from start until done.
//
// The phase order and the work of each phase follow the reference design
// (generate checksums of A, then of B, multiply, validate the columns of C);
// the loop orders, drain gaps and interface are this implementation's choices.
// The module holds all the control state of the design, which is why it is
// the part that is triplicated in the hybrid configuration.
module mm_addr_gen
  import abft_pkg::*;
#(
  parameter int unsigned DIM = 128,
  parameter int unsigned P   = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [$clog2(DIM)-1:0]  n,
  output logic                    busy,
  output logic                    done,
  output phase_e                  phase,
  // read addresses, same cycle
  output logic                    a_rd_en,
  output logic [$clog2(DIM)-1:0]  a_rd_row,
  output logic [$clog2(DIM)-1:0]  a_rd_col,
  output logic                    b_rd_en,
  output logic [$clog2(DIM)-1:0]  b_rd_row,
  output logic [$clog2(DIM)-1:0]  b_rd_col,
  output logic                    c_rd_en,
  output logic [$clog2(DIM)-1:0]  c_rd_row,
  output logic [$clog2(DIM)-1:0]  c_rd_col,
  // dot-engine tags, one cycle later
  output logic                    mm_valid,
  output logic                    mm_first,
  output logic                    mm_last,
  output logic [P-1:0]            mm_mask,
  output logic [$clog2(DIM)-1:0]  mm_row,
  output logic [$clog2(DIM)-1:0]  mm_col,
  // checksum-unit tags, one cycle later
  output logic                    cs_valid,
  output logic                    cs_first,
  output logic                    cs_last,
  output logic                    cs_check,
  output mat_sel_e                cs_src,
  output logic [$clog2(DIM)-1:0]  cs_dst_row,
  output logic [$clog2(DIM)-1:0]  cs_dst_col
);

  localparam int unsigned CW = $clog2(DIM);
  localparam int unsigned BW = $clog2(P);
  localparam int unsigned DW = $clog2(DRAIN_CYCLES + 1);

  typedef logic [CW-1:0] idx_t;

  phase_e state_q, next_q;      // current phase, phase after a drain
  idx_t   n_q;                  // matrix size
  idx_t   gmax_q;               // index of the last P-wide group, (n-1)/P
  idx_t   i_q, j_q, g_q;        // loop counters
  logic [DW-1:0] drain_q;

  // Loop-end conditions of the current element.
  logic i_end_n1, j_end_n1, i_end_n, j_end_n, g_end;
  assign i_end_n1 = (i_q == n_q - idx_t'(1));
  assign j_end_n1 = (j_q == n_q - idx_t'(1));
  assign i_end_n  = (i_q == n_q);
  assign j_end_n  = (j_q == n_q);
  assign g_end    = (g_q == gmax_q);

  idx_t gbase;                  // first k of the current group
  assign gbase = idx_t'(g_q << BW);

  // ---------------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= PH_IDLE;
      next_q  <= PH_IDLE;
      n_q     <= '0;
      gmax_q  <= '0;
      i_q     <= '0;
      j_q     <= '0;
      g_q     <= '0;
      drain_q <= '0;
    end else begin
      unique case (state_q)
        PH_IDLE: begin
          if (start) begin
            n_q    <= n;
            gmax_q <= idx_t'((n - idx_t'(1)) >> BW);
            i_q    <= '0;
            j_q    <= '0;
            g_q    <= '0;
            state_q <= (n == '0) ? PH_DONE : PH_GEN_A;
          end
        end
        PH_GEN_A: begin             // j outer, i inner
          if (i_end_n1) begin
            i_q <= '0;
            if (j_end_n1) begin
              j_q <= '0;
              state_q <= PH_DRAIN;
              next_q  <= PH_GEN_B;
              drain_q <= DW'(DRAIN_CYCLES - 1);
            end else
              j_q <= j_q + idx_t'(1);
          end else
            i_q <= i_q + idx_t'(1);
        end
        PH_GEN_B: begin             // i (row of B) outer, j inner
          if (j_end_n1) begin
            j_q <= '0;
            if (i_end_n1) begin
              i_q <= '0;
              state_q <= PH_DRAIN;
              next_q  <= PH_MM;
              drain_q <= DW'(DRAIN_CYCLES - 1);
            end else
              i_q <= i_q + idx_t'(1);
          end else
            j_q <= j_q + idx_t'(1);
        end
        PH_MM: begin                // i outer, j middle, g inner
          if (g_end) begin
            g_q <= '0;
            if (j_end_n) begin
              j_q <= '0;
              if (i_end_n) begin
                i_q <= '0;
                state_q <= PH_DRAIN;
                next_q  <= PH_VAL;
                drain_q <= DW'(DRAIN_CYCLES - 1);
              end else
                i_q <= i_q + idx_t'(1);
            end else
              j_q <= j_q + idx_t'(1);
          end else
            g_q <= g_q + idx_t'(1);
        end
        PH_VAL: begin               // j outer, i inner (0..n, n = checksum row)
          if (i_end_n) begin
            i_q <= '0;
            if (j_end_n) begin
              j_q <= '0;
              state_q <= PH_DRAIN;
              next_q  <= PH_DONE;
              drain_q <= DW'(DRAIN_CYCLES - 1);
            end else
              j_q <= j_q + idx_t'(1);
          end else
            i_q <= i_q + idx_t'(1);
        end
        PH_DRAIN: begin
          if (drain_q == '0)
            state_q <= next_q;
          else
            drain_q <= drain_q - DW'(1);
        end
        PH_DONE:  state_q <= PH_IDLE;
        default:  state_q <= PH_IDLE;
      endcase
    end
  end

  assign phase = state_q;
  assign busy  = (state_q != PH_IDLE);
  assign done  = (state_q == PH_DONE);

  // ------------------------------------------------------------ read addresses
  always_comb begin
    a_rd_en  = 1'b0;  a_rd_row = i_q;    a_rd_col = j_q;
    b_rd_en  = 1'b0;  b_rd_row = i_q;    b_rd_col = j_q;
    c_rd_en  = 1'b0;  c_rd_row = i_q;    c_rd_col = j_q;
    unique case (state_q)
      PH_GEN_A: a_rd_en = 1'b1;
      PH_GEN_B: b_rd_en = 1'b1;
      PH_MM: begin
        a_rd_en  = 1'b1;  a_rd_col = gbase;
        b_rd_en  = 1'b1;  b_rd_row = gbase;
      end
      PH_VAL:   c_rd_en = 1'b1;
      default: ;
    endcase
  end

  // --------------------------------------------------- registered datapath tags
  logic [P-1:0] mask_c;
  always_comb begin
    for (int l = 0; l < P; l++)
      mask_c[l] = (32'(gbase) + 32'(l)) < 32'(n_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mm_valid <= 1'b0;  mm_first <= 1'b0;  mm_last <= 1'b0;
      mm_mask  <= '0;    mm_row   <= '0;    mm_col  <= '0;
      cs_valid <= 1'b0;  cs_first <= 1'b0;  cs_last <= 1'b0;  cs_check <= 1'b0;
      cs_src   <= MAT_A; cs_dst_row <= '0;  cs_dst_col <= '0;
    end else begin
      mm_valid <= (state_q == PH_MM);
      mm_first <= (g_q == '0);
      mm_last  <= g_end;
      mm_mask  <= mask_c;
      mm_row   <= i_q;
      mm_col   <= j_q;

      cs_valid <= 1'b0;
      cs_first <= 1'b0;
      cs_last  <= 1'b0;
      cs_check <= 1'b0;
      unique case (state_q)
        PH_GEN_A: begin
          cs_valid <= 1'b1;  cs_first <= (i_q == '0);  cs_last <= i_end_n1;
          cs_src   <= MAT_A; cs_dst_row <= n_q;  cs_dst_col <= j_q;
        end
        PH_GEN_B: begin
          cs_valid <= 1'b1;  cs_first <= (j_q == '0);  cs_last <= j_end_n1;
          cs_src   <= MAT_B; cs_dst_row <= i_q;  cs_dst_col <= n_q;
        end
        PH_VAL: begin
          cs_valid <= 1'b1;  cs_first <= (i_q == '0);  cs_check <= i_end_n;
          cs_src   <= MAT_C; cs_dst_row <= i_q;  cs_dst_col <= j_q;
        end
        default: ;
      endcase
    end
  end

  initial begin
    assert ((1 << BW) == P && P >= 2)
      else $error("mm_addr_gen: P must be a power of two of at least 2");
  end

endmodule
