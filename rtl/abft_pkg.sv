// abft_pkg: types and constants shared by the ABFT matrix-multiplication design.
//
// The design multiplies two N x N integer matrices A and B with algorithm-based
// fault tolerance: A is augmented with a row of column checksums, B with a
// column of row checksums, and the (N+1) x (N+1) product C then carries its own
// checksums, which are validated after the multiplication. The default sizes
// follow the configuration evaluated in the reference design: 32-bit integers,
// 4 processing elements, matrix memories of 128 x 128 words.
//
// The phase encoding, the memory-select encoding and the drain length are
// choices of this implementation.
package abft_pkg;

  // Defaults of the evaluated configuration.
  localparam int unsigned DATA_W_DEF = 32;   // 32-bit integer precision
  localparam int unsigned DIM_DEF    = 128;  // matrix memory holds 128 x 128 words
  localparam int unsigned PE_DEF     = 4;    // processing elements (multipliers)

  // Idle cycles the sequencer inserts between phases so that every write of
  // the previous phase has reached its RAM before the next phase reads.
  // The longest path is read issue -> RAM -> 3-stage dot engine -> C write,
  // i.e. 5 cycles; 6 leaves one cycle of margin.
  localparam int unsigned DRAIN_CYCLES = 6;

  // Processing phases of one multiplication.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_GEN_A = 3'd1,  // column checksums of A -> row N of A
    PH_GEN_B = 3'd2,  // row checksums of B    -> column N of B
    PH_MM    = 3'd3,  // (N+1) x (N+1) product C = A_C * B_R
    PH_VAL   = 3'd4,  // column checksums of C compared with row N of C
    PH_DRAIN = 3'd5,  // pipeline drain between phases
    PH_DONE  = 3'd6
  } phase_e;

  // Selects one of the three matrix memories.
  typedef enum logic [1:0] {
    MAT_A = 2'd0,
    MAT_B = 2'd1,
    MAT_C = 2'd2
  } mat_sel_e;

endpackage
