// rbn_pkg: shared types, widths and arithmetic helpers of the approximate
// randomization-based network (RBN) inference engine.
//
// Number formats: input features x_j and the parameters w_nj, b_n and beta_n
// are 8-bit two's-complement integers and the neuron multiply-accumulate works
// on 16-bit two's-complement integers; both widths follow the published
// architecture. The saturating adder used by the accumulators, the encoding of
// the operating mode and of the parameter-load selector are choices of this
// implementation.
package rbn_pkg;

  // Data widths
  localparam int unsigned DATA_W = 8;   // x_j, w_nj, b_n, beta_n
  localparam int unsigned ACC_W  = 16;  // neuron multiply-accumulate
  localparam int unsigned EB_W   = 8;   // energy-budget word seen by the controller

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Operating mode. COMPLETE: every term w_nj*x_j is accumulated.
  // APPROX: only the terms whose relevance bit u_nj is set are accumulated.
  typedef enum logic {
    MODE_COMPLETE = 1'b0,
    MODE_APPROX   = 1'b1
  } mode_e;

  // Which parameter memory a load-port write goes to.
  typedef enum logic [1:0] {
    MEM_W    = 2'd0,  // hidden weights w_nj, address n*D + j
    MEM_B    = 2'd1,  // hidden biases b_n, address n
    MEM_BETA = 2'd2,  // output weights beta_n, address n
    MEM_U    = 2'd3   // relevance bits u_nj (bit 0 of the data), address n*D + j
  } mem_sel_e;

  // Two's-complement addition that clamps to the representable range of the
  // result width instead of wrapping, so a long accumulation cannot flip the
  // sign that the threshold activation looks at.
  function automatic acc_t sat_add_acc(input acc_t a, input acc_t b);
    logic signed [ACC_W:0] s;
    s = {a[ACC_W-1], a} + {b[ACC_W-1], b};
    if (s[ACC_W] != s[ACC_W-1])
      return s[ACC_W] ? {1'b1, {(ACC_W-1){1'b0}}} : {1'b0, {(ACC_W-1){1'b1}}};
    else
      return s[ACC_W-1:0];
  endfunction

endpackage
