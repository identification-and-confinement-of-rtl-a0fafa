// qdi_tb_pkg: helpers shared by the pipeline testbenches.
//
// word_of(k) is the k-th data word the data generator sends and the checker
// expects; both compute it from the word index alone, so the checker never
// looks at what the pipeline was given. The fault classes are ordered by
// importance; an experiment is reported as the most important class seen.
package qdi_tb_pkg;

  // Scrambled but fully deterministic word sequence.
  function automatic logic [31:0] word_of(input int unsigned k);
    logic [31:0] h;
    h = k * 32'h9E37_79B1;
    return h ^ (h >> 13) ^ (h >> 7);
  endfunction

  typedef enum int {
    FC_NONE     = 0,
    FC_TIMING   = 1,
    FC_VALUE    = 2,
    FC_CODE     = 3,
    FC_GLITCH   = 4,
    FC_DEADLOCK = 5
  } fault_class_e;

  localparam int NUM_FC = 6;

endpackage
