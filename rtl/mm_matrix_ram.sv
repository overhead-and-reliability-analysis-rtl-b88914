// mm_matrix_ram: banked storage for one DIM x DIM matrix of W-bit words.
//
// The inner-loop parallel multiplier needs P consecutive elements of a row of
// A, or of a column of B, in every cycle. The matrix is therefore split over P
// banks (one simple dual-port RAM each, one write and one read port), so that
// the P elements of an aligned group along the banked dimension lie in
// different banks:
//   BANK_ON_ROW = 0 : element (r,c) lives in bank c mod P  (matrix A: row reads)
//   BANK_ON_ROW = 1 : element (r,c) lives in bank r mod P  (matrix B: column reads)
// The same memory also serves single-element accesses (checksum generation,
// checksum validation, host access).
//
// Read: present rd_en, rd_row, rd_col; one clock later rd_vec holds the whole
// aligned group that contains (rd_row, rd_col) (lane l = element at offset l
// along the banked dimension) and rd_word holds the addressed element itself.
// The read data registers hold their value while rd_en is low.
// Write: we, wr_row, wr_col, wr_data, written at the clock edge. A read of the
// address being written in the same cycle returns the old word.
//
// Banking and the two access widths follow from the parallel architecture;
// the exact address mapping is this implementation's choice. The memory
// contents are not reset (BlockRAM); P must be a power of two, at least 2.
module mm_matrix_ram #(
  parameter int unsigned W           = 32,
  parameter int unsigned DIM         = 128,
  parameter int unsigned P           = 4,
  parameter bit          BANK_ON_ROW = 1'b0
) (
  input  logic                       clk,
  // read port
  input  logic                       rd_en,
  input  logic [$clog2(DIM)-1:0]     rd_row,
  input  logic [$clog2(DIM)-1:0]     rd_col,
  output logic [P-1:0][W-1:0]        rd_vec,
  output logic [W-1:0]               rd_word,
  // write port
  input  logic                       we,
  input  logic [$clog2(DIM)-1:0]     wr_row,
  input  logic [$clog2(DIM)-1:0]     wr_col,
  input  logic [W-1:0]               wr_data
);

  localparam int unsigned CW    = $clog2(DIM);
  localparam int unsigned BW    = $clog2(P);
  localparam int unsigned DEPTH = DIM * DIM / P;
  localparam int unsigned AW    = $clog2(DEPTH);

  typedef logic [AW-1:0] addr_t;
  typedef logic [BW-1:0] bank_t;

  // Bank number and address within the bank of element (r, c).
  function automatic bank_t bank_of(input logic [CW-1:0] r, input logic [CW-1:0] c);
    return BANK_ON_ROW ? r[BW-1:0] : c[BW-1:0];
  endfunction

  function automatic addr_t addr_of(input logic [CW-1:0] r, input logic [CW-1:0] c);
    return BANK_ON_ROW ? addr_t'({r[CW-1:BW], c}) : addr_t'({r, c[CW-1:BW]});
  endfunction

  addr_t rd_addr, wr_addr;
  bank_t wr_bank, sel_q;

  assign rd_addr = addr_of(rd_row, rd_col);
  assign wr_addr = addr_of(wr_row, wr_col);
  assign wr_bank = bank_of(wr_row, wr_col);

  for (genvar b = 0; b < P; b++) begin : g_bank
    logic [W-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (we && wr_bank == bank_t'(b))
        mem[wr_addr] <= wr_data;
      if (rd_en)
        rd_vec[b] <= mem[rd_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en)
      sel_q <= bank_of(rd_row, rd_col);
  end

  assign rd_word = rd_vec[sel_q];

  initial begin
    assert (P >= 2 && (1 << BW) == P)
      else $error("mm_matrix_ram: P must be a power of two of at least 2");
    assert ((1 << CW) == DIM)
      else $error("mm_matrix_ram: DIM must be a power of two");
  end

endmodule
