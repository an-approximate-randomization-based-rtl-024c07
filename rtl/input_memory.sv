// input_memory: the Input module of the RBN engine, which acquires the D
// features of one input sample serially and serves them to the Neuron module.
//
// Features arrive one per wr_en pulse, x_1 first; an internal write pointer
// places them at addresses 0..D-1 and wraps to 0 after the last one, so the
// next sample starts cleanly. The read port is synchronous (rd_data holds the
// word addressed in the previous cycle) and write-first: a feature that is
// written in the same cycle in which it is read is forwarded. That lets the
// first neuron consume feature j in the cycle right after it is acquired,
// which is the overlap of the input and neuron phases of the processing flow.
//
// Serial acquisition into a memory follows the published architecture; the
// pointer, its reset, the synchronous write-first read and sample_done are
// choices of this implementation.
module input_memory
  import rbn_pkg::*;
#(
  parameter int unsigned D = 100,
  localparam int unsigned JW = (D > 1) ? $clog2(D) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,       // a feature is presented this cycle
  input  data_t         wr_data,
  input  logic [JW-1:0] rd_addr,
  output data_t         rd_data,     // feature at rd_addr of the previous cycle
  output logic [JW-1:0] wr_idx,      // index the next feature will be written to
  output logic          sample_done  // the feature written this cycle is x_D
);

  data_t mem [D];

  assign sample_done = wr_en && (32'(wr_idx) == D - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           wr_idx <= '0;
    else if (sample_done) wr_idx <= '0;
    else if (wr_en)       wr_idx <= wr_idx + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_idx] <= wr_data;
    if (wr_en && wr_idx == rd_addr) rd_data <= wr_data;
    else                            rd_data <= mem[rd_addr];
  end

endmodule
