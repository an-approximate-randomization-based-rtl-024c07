// sequencer: the finite-state machine that runs one inference of the RBN
// engine. It steps the neuron index n and the feature index j through the
// N x D terms of the network, one term per clock cycle, and issues each term
// to the Enable and Neuron modules together with its linear address n*D + j.
//
// States:
//   IDLE  - waiting; the first feature x_1 of a sample starts an inference
//           (start pulse) and is issued at once as term (0, 0).
//   FIRST - neuron 0: term (0, j) is issued in the cycle in which x_j is
//           acquired, so input acquisition and the first neuron overlap. If
//           no feature arrives, nothing is issued (an input stall).
//   RUN   - neurons 1..N-1: the sample is in the input memory, a term is
//           issued every cycle.
//   WAIT  - all terms issued; waits for the output module to report y.
// x_ready is high in IDLE and FIRST, when a feature is accepted.
//
// The one-term-per-cycle flow and the overlap of input and first neuron follow
// the published processing flow; the state encoding, the stall behaviour and
// the handshake are choices of this implementation.
module sequencer #(
  parameter int unsigned N = 500,
  parameter int unsigned D = 100,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned JW = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned LW = ($clog2(N*D) > 0) ? $clog2(N*D) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_valid,     // a feature is presented
  output logic          x_ready,     // the feature is accepted this cycle
  input  logic          y_done,      // output module finished the inference
  output logic          start,       // first term of an inference is issued
  output logic          issue_valid,
  output logic [NW-1:0] n,
  output logic [JW-1:0] j,
  output logic [LW-1:0] lin_addr,    // n*D + j
  output logic          first,       // j == 0
  output logic          last,        // j == D-1
  output logic          busy
);

  typedef enum logic [1:0] {IDLE, FIRST, RUN, WAIT} state_e;

  state_e          state;
  logic [NW-1:0]   n_q;
  logic [JW-1:0]   j_q;
  logic [LW-1:0]   lin_q;

  logic j_last, n_last;

  assign j_last = (32'(j_q) == D - 1);
  assign n_last = (32'(n_q) == N - 1);

  assign x_ready     = (state == IDLE) || (state == FIRST);
  assign issue_valid = ((state == IDLE || state == FIRST) && x_valid) || (state == RUN);
  assign start       = (state == IDLE) && x_valid;
  assign n           = n_q;
  assign j           = j_q;
  assign lin_addr    = lin_q;
  assign first       = (j_q == '0);
  assign last        = j_last;
  assign busy        = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      n_q   <= '0;
      j_q   <= '0;
      lin_q <= '0;
    end else begin
      if (issue_valid) begin
        if (j_last) begin
          j_q <= '0;
          n_q <= n_last ? '0 : n_q + 1'b1;
        end else begin
          j_q <= j_q + 1'b1;
        end
        lin_q <= (j_last && n_last) ? '0 : lin_q + 1'b1;
      end
      unique case (state)
        IDLE, FIRST: if (x_valid) begin
          if (j_last) state <= n_last ? WAIT : RUN;
          else        state <= FIRST;
        end
        RUN:  if (j_last && n_last) state <= WAIT;
        WAIT: if (y_done) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

endmodule
