// rbn_top: inference engine for a single-hidden-layer randomization-based
// neural network (RBN) with threshold activations whose neurons can switch, at
// run time and without reloading any weight, between a Complete and an
// Approximate activation to fit the energy available.
//
//   y(x) = sum_n beta_n * sign(b_n + sum_j e_nj * w_nj * x_j),  class = sign(y)
//
// e_nj is 1 for every term in Complete mode; in Approximate mode it is the
// off-line relevance bit u_nj, which drops the terms that contribute little to
// the neuron's sum, so fewer multiplications are made.
//
// Blocks: input_memory (Input), enable_unit (Enable: Mem U and the S/A
// multiplexer), neuron (Mem w, Mem b, one multiplier, accumulator),
// output_unit (Mem beta, Sign Unit, accumulator), mode_controller (Controller)
// and sequencer (the finite-state machine). One term is processed per cycle.
//
// Interface:
//   Loading: while busy is low, load_en writes load_data into the memory chosen
//     by load_sel (rbn_pkg::mem_sel_e) at load_addr (n*D + j for Mem w and
//     Mem U, n for Mem b and Mem beta; Mem U takes bit 0).
//   Inference: features x_1..x_D are presented on x_data with x_valid and are
//     accepted while x_ready is high. The first feature starts the inference;
//     energy_budget is compared with budget_thr at that moment and the
//     inference runs in Approximate mode if the budget is below the threshold
//     (mode shows the choice). y_valid pulses when y and y_pos are ready.
// Timing: with one feature per cycle, y_valid comes N*D + 3 cycles after the
//   first feature, in either mode.
//
// The block structure, the data widths and the per-term enable follow the
// published architecture; the load port, the handshake and the mode rule are
// choices of this implementation.
//
// Lint note: the two assertions at the end use rst_n in "disable iff", so
// the lint tool reports rst_n as used both as an asynchronous reset and
// synchronously; this is intended and affects no logic.
module rbn_top
  import rbn_pkg::*;
#(
  parameter int unsigned N = 500,
  parameter int unsigned D = 100,
  localparam int unsigned NW  = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned JW  = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned LW  = ($clog2(N*D) > 0) ? $clog2(N*D) : 1,
  localparam int unsigned Y_W = DATA_W + 2 + $clog2(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // parameter load port
  input  logic                  load_en,
  input  mem_sel_e              load_sel,
  input  logic [LW-1:0]         load_addr,
  input  data_t                 load_data,
  // energy budget
  input  logic [EB_W-1:0]       energy_budget,
  input  logic [EB_W-1:0]       budget_thr,
  output mode_e                 mode,
  // input stream
  input  logic                  x_valid,
  input  data_t                 x_data,
  output logic                  x_ready,
  // result
  output logic                  busy,
  output logic                  y_valid,
  output logic signed [Y_W-1:0] y,
  output logic                  y_pos
);

  logic          start, issue_valid, first, last;
  logic [NW-1:0] n;
  logic [JW-1:0] j;
  logic [LW-1:0] lin_addr;
  logic          x_acc;
  data_t         x_rd;
  logic [JW-1:0] x_wr_idx;
  logic          sample_done;
  logic          e_nj;
  logic          phi_valid;
  logic [NW-1:0] phi_n;
  acc_t          acc;

  assign x_acc = x_valid && x_ready;

  sequencer #(.N(N), .D(D)) u_seq (
    .clk        (clk),
    .rst_n      (rst_n),
    .x_valid    (x_valid),
    .x_ready    (x_ready),
    .y_done     (y_valid),
    .start      (start),
    .issue_valid(issue_valid),
    .n          (n),
    .j          (j),
    .lin_addr   (lin_addr),
    .first      (first),
    .last       (last),
    .busy       (busy)
  );

  mode_controller u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (start),
    .energy_budget(energy_budget),
    .budget_thr   (budget_thr),
    .mode         (mode)
  );

  input_memory #(.D(D)) u_in (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_en      (x_acc),
    .wr_data    (x_data),
    .rd_addr    (j),
    .rd_data    (x_rd),
    .wr_idx     (x_wr_idx),
    .sample_done(sample_done)
  );

  enable_unit #(.N(N), .D(D)) u_en (
    .clk        (clk),
    .rst_n      (rst_n),
    .u_we       (load_en && load_sel == MEM_U),
    .u_waddr    (load_addr),
    .u_wdata    (load_data[0]),
    .issue_valid(issue_valid),
    .rd_addr    (lin_addr),
    .mode       (mode),
    .e_nj       (e_nj)
  );

  neuron #(.N(N), .D(D)) u_neuron (
    .clk        (clk),
    .rst_n      (rst_n),
    .w_we       (load_en && load_sel == MEM_W),
    .w_waddr    (load_addr),
    .w_wdata    (load_data),
    .b_we       (load_en && load_sel == MEM_B),
    .b_waddr    (NW'(load_addr)),
    .b_wdata    (load_data),
    .issue_valid(issue_valid),
    .lin_addr   (lin_addr),
    .n          (n),
    .first      (first),
    .last       (last),
    .e_nj       (e_nj),
    .x_in       (x_rd),
    .phi_valid  (phi_valid),
    .phi_n      (phi_n),
    .acc        (acc)
  );

  output_unit #(.N(N)) u_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .beta_we   (load_en && load_sel == MEM_BETA),
    .beta_waddr(NW'(load_addr)),
    .beta_wdata(load_data),
    .phi_valid (phi_valid),
    .phi_n     (phi_n),
    .acc       (acc),
    .y_valid   (y_valid),
    .y         (y),
    .y_pos     (y_pos)
  );

  // Parameters may only be loaded while no inference is running, and the
  // input memory's own pointer must follow the feature index of neuron 0.
  assert property (@(posedge clk) disable iff (!rst_n) load_en |-> !busy)
    else $error("parameter load during an inference");
  assert property (@(posedge clk) disable iff (!rst_n) x_acc |-> x_wr_idx == j)
    else $error("input pointer out of step with the sequencer");

  logic unused;
  assign unused = sample_done;

endmodule
