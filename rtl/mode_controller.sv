// mode_controller: the Controller of the RBN engine. It decides, from the
// energy budget currently available, whether the next inference runs in
// Complete mode (all D terms of every neuron) or in Approximate mode (only the
// relevant terms, fewer multiplications, less energy).
//
// The decision is a comparison: Approximate mode is chosen when the budget
// word is below a programmable threshold. It is taken once per inference, on
// the start pulse from the sequencer, and held in a register that drives the
// S/A select of the Enable module, so a mode change never splits an inference
// and the weights need not be reloaded. Both the comparison rule and the
// once-per-inference update are choices of this implementation: the published
// architecture gives only the controller's role.
//
// Timing: start in cycle c -> mode valid from cycle c+1.
module mode_controller
  import rbn_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,          // an inference begins this cycle
  input  logic [EB_W-1:0] energy_budget,  // available energy, larger is more
  input  logic [EB_W-1:0] budget_thr,     // below this, use Approximate mode
  output mode_e           mode
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     mode <= MODE_COMPLETE;
    else if (start) mode <= (energy_budget < budget_thr) ? MODE_APPROX : MODE_COMPLETE;
  end

endmodule
