// aco_pkg: constants shared by the ant colony core.
//
// The defaults describe the configuration the design is sized for: a 16-node
// problem searched by 3 ants for 20 iterations, the reference configuration
// of the architecture (clocked at 50 MHz). Word widths, the evaporation shifts and the initial and
// deposited pheromone levels are this design's own choices (the algorithm only
// fixes that all arithmetic stays in unsigned integers and that shifts replace
// multiplications).
package aco_pkg;

  localparam int unsigned DEF_N_NODES     = 16;   // cities / nodes
  localparam int unsigned DEF_N_ANTS      = 3;    // ants searching in parallel
  localparam int unsigned DEF_N_ITER      = 20;   // iterations of one run
  localparam int unsigned DEF_PH_W        = 8;    // pheromone word
  localparam int unsigned DEF_D_W         = 8;    // distance word
  localparam int unsigned DEF_RHO_SHIFT   = 3;    // global update rate 1/8
  localparam int unsigned DEF_LOCAL_SHIFT = 4;    // local update rate 1/16
  localparam int unsigned DEF_TAU0        = 32;   // initial / local-update level
  localparam int unsigned DEF_DEPOSIT     = 255;  // delta-tau of the global update

  // Tour length needs room for N_NODES distances.
  function automatic int unsigned cost_width(int unsigned d_w, int unsigned n_nodes);
    return d_w + $clog2(n_nodes);
  endfunction

  // Per-ant LFSR seed: distinct, never zero.
  function automatic logic [15:0] ant_seed(int unsigned k);
    return 16'hACE1 ^ (16'h1F35 * 16'(k + 1)) | 16'h0001;
  endfunction

endpackage
