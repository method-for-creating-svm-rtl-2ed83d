// svm_pkg: types and helpers shared by the SVM accelerator.
// All arithmetic in the accelerator uses one signed 32-bit fixed-point word
// with 16 fraction bits (Q16.16), the width of the processor and AXI data bus.
// The set of kernels (linear, polynomial, RBF) is the one the design evaluates;
// the number format and the register-level configuration record are this
// design's own choices.
package svm_pkg;

  localparam int FX_W    = 32;
  localparam int FX_FRAC = 16;

  typedef logic signed [FX_W-1:0] fx_t;

  localparam fx_t FX_ONE = 32'sd65536;

  typedef enum logic [1:0] {
    K_LINEAR = 2'd0,
    K_POLY   = 2'd1,
    K_RBF    = 2'd2
  } kernel_e;

  // Configuration written by the processor into the work registers.
  typedef struct packed {
    kernel_e     kernel;
    logic [3:0]  degree;     // polynomial degree
    logic        src_stream; // 1: data set arrives on the AXI4-Stream input, not from DDR
    logic        z_mode;     // 0: z as the support-vector average, 1: class max/min midpoint
    fx_t         gamma;      // kernel scale
    fx_t         coef0;      // polynomial offset
    fx_t         c;          // box bound of the alphas
    fx_t         eps;        // stop tolerance on the KKT gap
    logic [15:0] max_iter;   // iteration limit of the optimiser
    logic [15:0] num_train;  // m, training vectors
    logic [15:0] num_test;   // t, test vectors
    logic [7:0]  num_feat;   // features per vector
    logic [31:0] src_addr;   // DDR byte address of the data set
    logic [31:0] dst_addr;   // DDR byte address of the results
  } svm_cfg_t;

  // Q16.16 product, truncated toward minus infinity.
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = 64'(a) * 64'(b);
    return fx_t'(p >>> FX_FRAC);
  endfunction

endpackage
