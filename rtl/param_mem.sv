// param_mem: one parameter memory of the RBN engine (Mem w, Mem b, Mem beta or
// Mem U of the architecture).
//
// The network parameters are trained off-line and stored on chip; this memory
// holds one kind of them. It has a single synchronous write port, used to load
// the trained values while the engine is idle, and an asynchronous read port,
// so the word addressed in a cycle is available to the register that captures
// it at the end of that cycle (the small memories map to LUT RAM or flip-flops,
// as they do on the FPGA the architecture was evaluated on).
//
// Interface: we/waddr/wdata write on the rising edge of clk; rdata follows
// raddr combinationally. There is no reset: contents are defined only after
// they have been loaded. Depth and width are parameters; the write port and
// the read style are choices of this implementation.
module param_mem #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
