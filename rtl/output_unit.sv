// output_unit: the Output module of the RBN engine. It accumulates the network
// output y(x) = sum_n beta_n * phi_n(x) as the neuron activations arrive, one
// per neuron, and reports y and the class sign(y) after the last neuron.
//
// On each phi_valid pulse from the Neuron module, beta_n is read from Mem beta
// (asynchronous read at the index phi_n), the Sign Unit turns it into
// +beta_n or -beta_n according to the sign of the neuron accumulator, and the
// add-and-accumulate register adds the term. The term of neuron 0 replaces the
// old contents, so no clear cycle is needed between inferences. After neuron
// N-1 the result is held in y and y_valid pulses for one cycle.
//
// Timing: phi_valid in cycle t -> y updated at the end of t; y_valid in t+1.
// y_pos is 1 when y >= 0 (class +1). The accumulator is Y_W bits wide, enough
// for N terms of magnitude up to 128 with no overflow; this width, the
// zero-counts-positive rule and the handshake are choices of this
// implementation. Mem beta, the Sign Unit and the adder/accumulator follow
// the published architecture.
module output_unit
  import rbn_pkg::*;
#(
  parameter int unsigned N = 500,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned Y_W = DATA_W + 2 + $clog2(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // load port of Mem beta
  input  logic                  beta_we,
  input  logic [NW-1:0]         beta_waddr,
  input  data_t                 beta_wdata,
  // from the Neuron module
  input  logic                  phi_valid,
  input  logic [NW-1:0]         phi_n,
  input  acc_t                  acc,
  // result
  output logic                  y_valid,
  output logic signed [Y_W-1:0] y,
  output logic                  y_pos
);

  data_t                  beta_rd;
  logic signed [DATA_W:0] term;
  logic signed [Y_W-1:0]  term_x;

  param_mem #(.DEPTH(N), .WIDTH(DATA_W)) beta_mem (
    .clk  (clk),
    .we   (beta_we),
    .waddr(beta_waddr),
    .wdata(beta_wdata),
    .raddr(phi_n),
    .rdata(beta_rd)
  );

  sign_unit u_sign (
    .beta   (beta_rd),
    .acc_neg(acc[ACC_W-1]),
    .term   (term)
  );

  assign term_x = Y_W'(term);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      if (phi_valid) y <= (phi_n == '0) ? term_x : y + term_x;
      y_valid <= phi_valid && (32'(phi_n) == N - 1);
    end
  end

  assign y_pos = ~y[Y_W-1];

endmodule
