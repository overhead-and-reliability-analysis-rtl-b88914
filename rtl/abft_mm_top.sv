// abft_mm_top: hybrid ABFT/TMR integer matrix multiplier.
//
// Computes C = A * B for n x n matrices of W-bit integers (n <= DIM-1) with
// algorithm-based fault tolerance. Before multiplying, an extra accumulator
// (the checksum unit) appends the column checksums of A as row n of A and the
// row checksums of B as column n of B. The inner-loop parallel datapath (P
// multipliers, adder tree, accumulator) then forms the full (n+1) x (n+1)
// checksum matrix C, whose row n must equal the column sums of C. Finally the
// checksum unit recomputes every column sum of C and compares it with row n;
// a difference larger than `threshold` raises error_found, which stays high
// until reset. The datapath and the memories are protected by these
// checksums; the address generator and its state machine, which checksums
// cannot protect, are triplicated and majority-voted (TMR_CTRL = 1, the hybrid
// configuration; TMR_CTRL = 0 gives the plain extra-MAC ABFT design).
//
// Interface:
//   host write port (host_we/host_wsel/host_wrow/host_wcol/host_wdata) loads A
//   and B (and can write C) one word per cycle. While a run is busy, a write of
//   the checksum unit or dot engine to the same memory in the same cycle takes
//   precedence and the host word is dropped.
//   host read port (host_rsel/host_rrow/host_rcol) returns host_rdata one cycle
//   later; it is meant for use while busy is low.
//   start (one cycle, while busy is low) with n starts a run; busy is high
//   during it; done pulses one cycle at its end, error_found is then final.
//   phase shows the current phase; tmr_mismatch is high while the three
//   controller replicas disagree (a masked control fault; it is an addition
//   of this implementation and stays low with TMR_CTRL = 0).
// Timing: done is high 2n^2 + (n+1)^2*ceil(n/P) + (n+1)^2 + 4*DRAIN_CYCLES + 1
// cycles after the clock edge that samples start (572,955 cycles for n = 127,
// P = 4). The multiplication itself takes (n+1)^2*ceil(n/P) cycles; checksum
// generation and validation add about 3n^2.
//
// Storage follows the evaluated configuration: three memories of DIM x DIM
// words, A banked by column and B banked by row so that P elements can be read
// per cycle. Checksums are stored in row/column n of the same memories, so the
// largest data matrix is (DIM-1) x (DIM-1). Only detection is implemented, not
// correction.
module abft_mm_top
  import abft_pkg::*;
#(
  parameter int unsigned W        = DATA_W_DEF,
  parameter int unsigned DIM      = DIM_DEF,
  parameter int unsigned P        = PE_DEF,
  parameter bit          TMR_CTRL = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // run control
  input  logic                    start,
  input  logic [$clog2(DIM)-1:0]  n,
  input  logic [W-1:0]            threshold,
  output logic                    busy,
  output logic                    done,
  output logic                    error_found,
  output phase_e                  phase,         // current phase (voted)
  output logic                    tmr_mismatch,  // controller replicas disagree
  // host access to the matrix memories
  input  logic                    host_we,
  input  mat_sel_e                host_wsel,
  input  logic [$clog2(DIM)-1:0]  host_wrow,
  input  logic [$clog2(DIM)-1:0]  host_wcol,
  input  logic [W-1:0]            host_wdata,
  input  mat_sel_e                host_rsel,
  input  logic [$clog2(DIM)-1:0]  host_rrow,
  input  logic [$clog2(DIM)-1:0]  host_rcol,
  output logic [W-1:0]            host_rdata
);

  localparam int unsigned CW    = $clog2(DIM);
  localparam int unsigned TAG_W = 2 + 2 * CW;              // {src, row, col}
  // Width of all controller outputs packed together (see pack order below).
  localparam int unsigned CTRL_W = 2 + 3 + 3 * (1 + 2 * CW)   // busy, done, phase, 3 read ports
                                 + 3 + P + 2 * CW              // dot-engine tags
                                 + 4 + 2 + 2 * CW;             // checksum tags

  typedef logic [CW-1:0] idx_t;

  // ------------------------------------------------------------ controller(s)
  logic [CTRL_W-1:0] ctrl_bus [3];
  logic [CTRL_W-1:0] ctrl_v;
  logic              ctrl_mismatch;
  localparam int unsigned NREP = TMR_CTRL ? 3 : 1;

  for (genvar r = 0; r < 3; r++) begin : g_rep
    if (r < NREP) begin : g_on
      logic     busy_r, done_r;
      phase_e   phase_r;
      logic     a_en, b_en, c_en;
      idx_t     a_row, a_col, b_row, b_col, c_row, c_col;
      logic     mmv, mmf, mml;
      logic [P-1:0] mmm;
      idx_t     mmr, mmc;
      logic     csv, csf, csl, csk;
      mat_sel_e css;
      idx_t     csr, csc;

      mm_addr_gen #(.DIM(DIM), .P(P)) u_ctrl (
        .clk, .rst_n, .start, .n,
        .busy(busy_r), .done(done_r), .phase(phase_r),
        .a_rd_en(a_en), .a_rd_row(a_row), .a_rd_col(a_col),
        .b_rd_en(b_en), .b_rd_row(b_row), .b_rd_col(b_col),
        .c_rd_en(c_en), .c_rd_row(c_row), .c_rd_col(c_col),
        .mm_valid(mmv), .mm_first(mmf), .mm_last(mml), .mm_mask(mmm),
        .mm_row(mmr), .mm_col(mmc),
        .cs_valid(csv), .cs_first(csf), .cs_last(csl), .cs_check(csk),
        .cs_src(css), .cs_dst_row(csr), .cs_dst_col(csc)
      );

      assign ctrl_bus[r] = {busy_r, done_r, phase_r,
                            a_en, a_row, a_col, b_en, b_row, b_col, c_en, c_row, c_col,
                            mmv, mmf, mml, mmm, mmr, mmc,
                            csv, csf, csl, csk, css, csr, csc};
    end else begin : g_off
      assign ctrl_bus[r] = ctrl_bus[0];
    end
  end

  tmr_voter #(.W(CTRL_W)) u_voter (
    .a(ctrl_bus[0]), .b(ctrl_bus[1]), .c(ctrl_bus[2]),
    .y(ctrl_v), .mismatch(ctrl_mismatch)
  );

  // Voted controller outputs.
  logic     busy_v, done_v;
  phase_e   phase_v;
  logic     a_rd_en, b_rd_en, c_rd_en;
  idx_t     a_rd_row, a_rd_col, b_rd_row, b_rd_col, c_rd_row, c_rd_col;
  logic     mm_valid, mm_first, mm_last;
  logic [P-1:0] mm_mask;
  idx_t     mm_row, mm_col;
  logic     cs_valid, cs_first, cs_last, cs_check;
  mat_sel_e cs_src;
  idx_t     cs_dst_row, cs_dst_col;

  assign {busy_v, done_v, phase_v,
          a_rd_en, a_rd_row, a_rd_col, b_rd_en, b_rd_row, b_rd_col, c_rd_en, c_rd_row, c_rd_col,
          mm_valid, mm_first, mm_last, mm_mask, mm_row, mm_col,
          cs_valid, cs_first, cs_last, cs_check, cs_src, cs_dst_row, cs_dst_col} = ctrl_v;

  assign busy         = busy_v;
  assign done         = done_v;
  assign phase        = phase_v;
  assign tmr_mismatch = ctrl_mismatch;

  // ------------------------------------------------------------------ memories
  logic [P-1:0][W-1:0] a_vec, b_vec, c_vec;
  logic [W-1:0]        a_word, b_word, c_word;

  logic a_ren, b_ren, c_ren;
  idx_t a_rrow, a_rcol, b_rrow, b_rcol, c_rrow, c_rcol;
  logic a_we, b_we, c_we;
  idx_t a_wrow, a_wcol, b_wrow, b_wcol, c_wrow, c_wcol;
  logic [W-1:0] a_wdata, b_wdata, c_wdata;

  // checksum unit and dot engine results
  logic         gen_we;
  logic [W-1:0] gen_data;
  logic [TAG_W-1:0] gen_tag;
  mat_sel_e     gen_sel;
  idx_t         gen_row, gen_col;
  logic         de_we;
  idx_t         de_row, de_col;
  logic [W-1:0] de_data;

  assign {gen_sel, gen_row, gen_col} = gen_tag;

  // Read-port muxes: the sequencer when it reads, otherwise the host.
  always_comb begin
    a_ren = a_rd_en || (host_rsel == MAT_A);
    b_ren = b_rd_en || (host_rsel == MAT_B);
    c_ren = c_rd_en || (host_rsel == MAT_C);
    {a_rrow, a_rcol} = a_rd_en ? {a_rd_row, a_rd_col} : {host_rrow, host_rcol};
    {b_rrow, b_rcol} = b_rd_en ? {b_rd_row, b_rd_col} : {host_rrow, host_rcol};
    {c_rrow, c_rcol} = c_rd_en ? {c_rd_row, c_rd_col} : {host_rrow, host_rcol};
  end

  // Write-port muxes: internal results first, then the host.
  logic gen_a, gen_b;
  assign gen_a = gen_we && gen_sel == MAT_A;
  assign gen_b = gen_we && gen_sel == MAT_B;

  always_comb begin
    a_we = gen_a || (host_we && host_wsel == MAT_A);
    b_we = gen_b || (host_we && host_wsel == MAT_B);
    c_we = de_we || (host_we && host_wsel == MAT_C);
    {a_wrow, a_wcol, a_wdata} = gen_a ? {gen_row, gen_col, gen_data} : {host_wrow, host_wcol, host_wdata};
    {b_wrow, b_wcol, b_wdata} = gen_b ? {gen_row, gen_col, gen_data} : {host_wrow, host_wcol, host_wdata};
    {c_wrow, c_wcol, c_wdata} = de_we ? {de_row, de_col, de_data}    : {host_wrow, host_wcol, host_wdata};
  end

  mm_matrix_ram #(.W(W), .DIM(DIM), .P(P), .BANK_ON_ROW(1'b0)) u_ram_a (
    .clk, .rd_en(a_ren), .rd_row(a_rrow), .rd_col(a_rcol), .rd_vec(a_vec), .rd_word(a_word),
    .we(a_we), .wr_row(a_wrow), .wr_col(a_wcol), .wr_data(a_wdata)
  );

  mm_matrix_ram #(.W(W), .DIM(DIM), .P(P), .BANK_ON_ROW(1'b1)) u_ram_b (
    .clk, .rd_en(b_ren), .rd_row(b_rrow), .rd_col(b_rcol), .rd_vec(b_vec), .rd_word(b_word),
    .we(b_we), .wr_row(b_wrow), .wr_col(b_wcol), .wr_data(b_wdata)
  );

  mm_matrix_ram #(.W(W), .DIM(DIM), .P(P), .BANK_ON_ROW(1'b0)) u_ram_c (
    .clk, .rd_en(c_ren), .rd_row(c_rrow), .rd_col(c_rcol), .rd_vec(c_vec), .rd_word(c_word),
    .we(c_we), .wr_row(c_wrow), .wr_col(c_wcol), .wr_data(c_wdata)
  );

  // Host read data: the memory selected in the previous cycle.
  mat_sel_e rsel_q;
  always_ff @(posedge clk) rsel_q <= host_rsel;

  always_comb begin
    unique case (rsel_q)
      MAT_A:   host_rdata = a_word;
      MAT_B:   host_rdata = b_word;
      default: host_rdata = c_word;
    endcase
  end

  // ------------------------------------------------------- main MM datapath
  mm_dot_engine #(.W(W), .P(P), .CW(CW)) u_dot (
    .clk, .rst_n,
    .in_valid(mm_valid), .in_first(mm_first), .in_last(mm_last), .in_mask(mm_mask),
    .in_row(mm_row), .in_col(mm_col), .a_vec(a_vec), .b_vec(b_vec),
    .c_we(de_we), .c_row(de_row), .c_col(de_col), .c_data(de_data)
  );

  // ------------------------------------------------ ABFT checksum unit (extra MAC)
  logic [W-1:0] cs_data;
  logic         cmp_valid, cmp_fail;   // per-column compare strobes, for monitoring

  always_comb begin
    unique case (cs_src)
      MAT_A:   cs_data = a_word;
      MAT_B:   cs_data = b_word;
      default: cs_data = c_word;
    endcase
  end

  abft_checksum_unit #(.W(W), .TAG_W(TAG_W)) u_abft (
    .clk, .rst_n,
    .in_valid(cs_valid), .in_first(cs_first), .in_last(cs_last), .in_check(cs_check),
    .in_data(cs_data), .in_tag({cs_src, cs_dst_row, cs_dst_col}), .threshold,
    .gen_we, .gen_data, .gen_tag,
    .cmp_valid, .cmp_fail, .error_found
  );

endmodule
