// neuron: the Neuron module of the RBN engine. A single multiplier and an
// accumulator compute, term by term, the activation of one hidden neuron,
//   acc_n = b_n + sum_j e_nj * w_nj * x_j,   phi_n = sign(acc_n),
// where e_nj = 1 for every term in Complete mode and only for the relevant
// terms in Approximate mode.
//
// Pipeline (cycle c is the issue cycle of term (n, j) from the sequencer):
//   c   : address n*D + j, n and the first/last flags are registered.
//   c+1 : e_nj and x_j arrive; w_nj is read from Mem w. If e_nj = 1 the x_j and
//         w_nj registers load, otherwise they keep their old values, so the
//         multiplier inputs do not toggle and the term costs no dynamic energy.
//         A flip-flop delays e_nj by one cycle to stay aligned with the product.
//   c+2 : the product x_j*w_nj is added to the accumulator if the delayed e_nj
//         is set. On the first term of a neuron the accumulator is loaded with
//         b_n (from Mem b) plus the product, or with b_n alone.
//   c+3 : after the last term, phi_valid pulses for one cycle with acc holding
//         acc_n and phi_n holding its neuron index.
// One term is processed per cycle, so a neuron takes D cycles and consecutive
// neurons follow each other without a gap; the latency of a whole inference
// is the same in both modes.
//
// The registers enabled by e_nj, the flip-flop on e_nj, the single multiplier,
// the accumulator initialised with b_n, 8-bit operands and a 16-bit
// accumulator follow the published architecture. Saturating (rather than
// wrapping) accumulation is a choice of this implementation.
//
// Lint note: the assertion that skipped terms leave the operand registers
// unchanged uses rst_n in "disable iff", so the lint tool reports rst_n as
// used both asynchronously and synchronously; this affects no logic.
module neuron
  import rbn_pkg::*;
#(
  parameter int unsigned N = 500,
  parameter int unsigned D = 100,
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned LW = ($clog2(N*D) > 0) ? $clog2(N*D) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // load ports of Mem w and Mem b
  input  logic          w_we,
  input  logic [LW-1:0] w_waddr,
  input  data_t         w_wdata,
  input  logic          b_we,
  input  logic [NW-1:0] b_waddr,
  input  data_t         b_wdata,
  // issue stage (cycle c)
  input  logic          issue_valid,
  input  logic [LW-1:0] lin_addr,
  input  logic [NW-1:0] n,
  input  logic          first,
  input  logic          last,
  // term stage (cycle c+1)
  input  logic          e_nj,
  input  data_t         x_in,
  // result
  output logic          phi_valid,
  output logic [NW-1:0] phi_n,
  output acc_t          acc
);

  // issue -> term stage
  logic [LW-1:0] lin_q;
  logic [NW-1:0] n_q;
  logic          first_q, last_q;
  // term -> accumulate stage
  data_t         x_reg, w_reg;
  logic          e_ff;
  logic [NW-1:0] n_qq;
  logic          first_qq, last_qq;

  data_t w_rd, b_rd;
  acc_t  prod, addend, base;

  param_mem #(.DEPTH(N*D), .WIDTH(DATA_W)) w_mem (
    .clk  (clk),
    .we   (w_we),
    .waddr(w_waddr),
    .wdata(w_wdata),
    .raddr(lin_q),
    .rdata(w_rd)
  );

  param_mem #(.DEPTH(N), .WIDTH(DATA_W)) b_mem (
    .clk  (clk),
    .we   (b_we),
    .waddr(b_waddr),
    .wdata(b_wdata),
    .raddr(n_qq),
    .rdata(b_rd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lin_q    <= '0;
      n_q      <= '0;
      first_q  <= 1'b0;
      last_q   <= 1'b0;
      x_reg    <= '0;
      w_reg    <= '0;
      e_ff     <= 1'b0;
      n_qq     <= '0;
      first_qq <= 1'b0;
      last_qq  <= 1'b0;
      acc      <= '0;
      phi_valid <= 1'b0;
      phi_n    <= '0;
    end else begin
      // issue -> term
      lin_q   <= lin_addr;
      n_q     <= n;
      first_q <= issue_valid & first;
      last_q  <= issue_valid & last;
      // term -> accumulate: operand registers enabled by e_nj
      if (e_nj) begin
        x_reg <= x_in;
        w_reg <= w_rd;
      end
      e_ff     <= e_nj;
      n_qq     <= n_q;
      first_qq <= first_q;
      last_qq  <= last_q;
      // accumulate
      if (first_qq || e_ff) acc <= sat_add_acc(base, addend);
      phi_valid <= last_qq;
      if (last_qq) phi_n <= n_qq;
    end
  end

  // A term that is not enabled must not disturb the multiplier inputs.
  assert property (@(posedge clk) disable iff (!rst_n) !e_nj |=> $stable(x_reg) && $stable(w_reg))
    else $error("operand registers changed on a skipped term");

  always_comb begin
    prod   = acc_t'(x_reg) * acc_t'(w_reg);
    addend = e_ff ? prod : '0;
    base   = first_qq ? acc_t'(b_rd) : acc;
  end

endmodule
