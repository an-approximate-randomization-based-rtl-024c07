// sign_unit: the Sign Unit of the RBN Output module. It forms the term
// beta_n * phi_n of the network output, where phi_n = sign(acc) is the
// threshold activation of neuron n.
//
// Because phi_n is +1 or -1, the product reduces to passing beta_n or its
// negation; the sign bit of the neuron accumulator selects which. The result is
// one bit wider than beta_n so that -(-128) is representable. An accumulator
// equal to zero counts as positive (phi_n = +1), a choice of this
// implementation. Purely combinational.
module sign_unit
  import rbn_pkg::*;
(
  input  data_t                   beta,
  input  logic                    acc_neg,  // sign bit of the neuron accumulator
  output logic signed [DATA_W:0]  term      // beta * phi
);

  logic signed [DATA_W:0] beta_x;

  always_comb begin
    beta_x = {beta[DATA_W-1], beta};
    term   = acc_neg ? -beta_x : beta_x;
  end

endmodule
