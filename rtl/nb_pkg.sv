// nb_pkg -- shared constants and types of the n-gram / Naive Bayes malware
// detector.
//
// The detector classifies each packet payload as benign (class 0) or malware
// (class 1). Model parameters are base-2 logarithms held as signed fixed-point
// numbers. The number of parallel processing units (62) is the configuration
// the design is built around; the n-gram length, vocabulary size and all
// widths below are this design's own choices.
package nb_pkg;

  // Two-class detection.
  localparam int unsigned NUM_CLASSES  = 2;
  localparam int unsigned CLASS_BENIGN  = 0;
  localparam int unsigned CLASS_MALWARE = 1;

  // Defaults shared by the modules.
  localparam int unsigned DEF_NGRAM_LEN    = 2;    // bytes per n-gram
  localparam int unsigned DEF_NUM_FEATURES = 248;  // vocabulary size (4 groups of 62)
  localparam int unsigned DEF_N_PU         = 62;   // parallel processing units
  localparam int unsigned DEF_COUNT_W      = 8;    // saturating n-gram count
  localparam int unsigned DEF_LL_W         = 16;   // log2 probability word
  localparam int unsigned DEF_LL_FRAC      = 10;   // fraction bits of that word
  localparam int unsigned DEF_ACC_W        = 32;   // class score accumulator

  // Stages of the inference pipeline: read, multiply, adder-tree low,
  // adder-tree high, accumulate, compare. The result of a vector appears
  // PIPE_STAGES cycles after its last group is issued.
  localparam int unsigned PIPE_STAGES = 6;

endpackage
