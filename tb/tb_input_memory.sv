// tb_input_memory: features are written serially with random gaps and must
// land at consecutive addresses, the pointer must wrap after x_D (with
// sample_done on that write), the read port must return the word addressed
// in the previous cycle, and a read of the word being written must return
// the new value (write-first forwarding).
module tb_input_memory;
  import rbn_pkg::*;

  localparam int unsigned D  = 5;
  localparam int unsigned JW = $clog2(D);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          wr_en = 1'b0;
  data_t         wr_data = '0;
  logic [JW-1:0] rd_addr = '0;
  data_t         rd_data;
  logic [JW-1:0] wr_idx;
  logic          sample_done;

  input_memory #(.D(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model[D];
  int ptr = 0;
  int n_fwd = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int exp_rd;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < D; i++) model[i] = 0;
    // fill once so every word is defined
    for (int i = 0; i < D; i++) begin
      wr_en = 1; wr_data = data_t'($urandom); rd_addr = '0;
      #1;
      check(int'(wr_idx) == ptr, "write index");
      check(sample_done == (i == D - 1), "sample_done");
      @(negedge clk);
      model[ptr] = int'(wr_data); ptr = (ptr + 1) % D;
    end
    for (int k = 0; k < 1000; k++) begin
      wr_en   = $urandom_range(0, 2) != 0;
      wr_data = data_t'($urandom);
      rd_addr = ($urandom_range(0, 1) == 0) ? JW'(ptr) : JW'($urandom_range(0, D - 1));
      #1;
      check(int'(wr_idx) == ptr, "write index");
      check(sample_done == (wr_en && ptr == D - 1), "sample_done");
      if (wr_en && int'(rd_addr) == ptr) begin
        exp_rd = int'(wr_data);
        n_fwd++;
      end else exp_rd = model[rd_addr];
      @(negedge clk);
      check(int'(rd_data) == exp_rd, $sformatf("read %0d got %0d expected %0d", rd_addr, rd_data, exp_rd));
      if (wr_en) begin
        model[ptr] = int'(wr_data);
        ptr = (ptr + 1) % D;
      end
    end
    check(n_fwd > 0, "forwarding exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
