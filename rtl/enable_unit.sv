// enable_unit: the Enable module of the RBN engine. It produces e_nj, the
// signal that lets term w_nj*x_j into the neuron's multiply-accumulate.
//
// Mem U holds one relevance bit u_nj per connection (n, j), set off-line when
// the relevance c_nj of the term exceeds the threshold alpha. In the cycle a
// term is issued its bit is read and captured in the u_nj register; in the
// following cycle a multiplexer drives e_nj with constant 1 in Complete mode
// or with u_nj in Approximate mode (select S/A from the controller). e_nj is
// also gated by the issue-valid bit, delayed alongside u_nj, so that no
// register is enabled in a cycle that carries no term.
//
// Timing: issue at cycle c (rd_addr, issue_valid) -> e_nj valid in cycle c+1.
// Mem U, the u_nj register and the multiplexer follow the published
// architecture; the valid gating is a choice of this implementation.
module enable_unit
  import rbn_pkg::*;
#(
  parameter int unsigned N = 500,
  parameter int unsigned D = 100,
  localparam int unsigned LW = ($clog2(N*D) > 0) ? $clog2(N*D) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // load port of Mem U
  input  logic          u_we,
  input  logic [LW-1:0] u_waddr,
  input  logic          u_wdata,
  // issue stage
  input  logic          issue_valid,
  input  logic [LW-1:0] rd_addr,     // n*D + j
  // mode from the controller (S/A select of the multiplexer)
  input  mode_e         mode,
  // term stage (one cycle after issue)
  output logic          e_nj
);

  logic u_rd;
  logic u_nj;
  logic valid_q;

  param_mem #(.DEPTH(N*D), .WIDTH(1)) u_mem (
    .clk  (clk),
    .we   (u_we),
    .waddr(u_waddr),
    .wdata(u_wdata),
    .raddr(rd_addr),
    .rdata(u_rd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_nj    <= 1'b0;
      valid_q <= 1'b0;
    end else begin
      u_nj    <= u_rd;
      valid_q <= issue_valid;
    end
  end

  always_comb begin
    unique case (mode)
      MODE_COMPLETE: e_nj = valid_q;
      MODE_APPROX:   e_nj = valid_q & u_nj;
      default:       e_nj = valid_q;
    endcase
  end

endmodule
