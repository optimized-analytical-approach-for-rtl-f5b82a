// fold_pkg: types, sizes and the prefix operator shared by the folded-tree
// prefix-sum processor.
//
// The processor computes an exclusive parallel-prefix sum of N_IN sensor
// samples on a binary tree that is folded onto N_PE processing elements
// (PEs). Both tree phases (trunk: leaves to root, twig: root to leaves)
// take LOG2_N stages. The 8-input / 4-PE / 3-stage size, the 4-bit sample,
// the 8-bit PE operand and the 9-bit adder result are the sizes of the
// original design; the stage encoding is this implementation's own.
//
// pg_combine() is the group propagate/generate operator of a carry
// look-ahead adder, (P_i,G_i) o (P_j,G_j) = (P_i.P_j, G_i + P_i.G_j), where
// (P_i,G_i) is the more significant group and (P_j,G_j) the less
// significant one.
package fold_pkg;

  localparam int unsigned N_IN   = 8;             // samples per block (tree leaves)
  localparam int unsigned N_PE   = N_IN / 2;      // PEs in the folded tree
  localparam int unsigned LOG2_N = $clog2(N_IN);  // stages per phase
  localparam int unsigned N_LSAVE = N_IN - 1;     // saved left operands (one per tree node)

  localparam int unsigned DIN_W  = 4;             // sensor sample width
  localparam int unsigned DATA_W = 8;             // PE operand width
  localparam int unsigned SUM_W  = DATA_W + 1;    // adder result width (with carry out)

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [SUM_W-1:0]  sum_t;

  // Stage of a phase. IDLE means the phase holds its results.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_1    = 2'd1,
    ST_2    = 2'd2,
    ST_3    = 2'd3
  } stage_e;

  // Group propagate/generate pair.
  typedef struct packed {
    logic p;
    logic g;
  } pg_t;

  function automatic pg_t pg_combine(pg_t hi, pg_t lo);
    pg_t r;
    r.p = hi.p & lo.p;
    r.g = hi.g | (hi.p & lo.g);
    return r;
  endfunction

endpackage
