// Shared constants and types of the histogram peak-climbing clustering processor.
//
// The processor clusters J feature vectors of N dimensions each. Every dimension
// is quantised into Q = 3..8 cells, so a histogram cell index per dimension fits
// in three bits. The defaults are those of the main configuration: 22-dimensional
// feature vectors and J = 24882 vectors per video frame. The 16-bit feature word
// (two's complement, covering [-1, +1)) is this design's own choice.
package cluster_pkg;

  parameter int unsigned N_DIM  = 22;     // feature dimensions
  parameter int unsigned J_VEC  = 24882;  // feature vectors per frame
  parameter int unsigned FEAT_W = 16;     // feature word width
  parameter int unsigned IDX_W  = 3;      // bits of a cell index per dimension
  parameter int unsigned Q_W    = 4;      // width of the quantization-level input

  // Bits needed to number J items (at least 1).
  function automatic int unsigned id_width(int unsigned j);
    return (j > 1) ? $clog2(j) : 1;
  endfunction

  // Number of adder layers of the ones compressor after its full-adder layer.
  function automatic int unsigned cmp_levels(int unsigned j);
    int unsigned n = (j + 2) / 3;
    int unsigned l = 0;
    while (n > 1) begin
      n = (n + 1) / 2;
      l++;
    end
    return l;
  endfunction

  // Output width of the ones compressor: 2 bits from the full adders, one more per layer.
  function automatic int unsigned cmp_width(int unsigned j);
    return 2 + cmp_levels(j);
  endfunction

  // Phases of the global controller, in the order they run.
  typedef enum logic [3:0] {
    PH_IDLE,
    PH_MIN,      // min pass over the frame
    PH_MAX,      // max pass over the frame
    PH_CS,       // cell size per dimension
    PH_INDEX,    // histogram cell index of every vector
    PH_ALLOC,    // allocate vectors to histogram bins
    PH_LINK,     // link every bin to its densest larger neighbour
    PH_ASSIGN,   // follow links to the peaks
    PH_GROUP,    // label clusters and count them
    PH_MAP,      // write labels to the output matrix
    PH_DONE
  } phase_e;

endpackage
