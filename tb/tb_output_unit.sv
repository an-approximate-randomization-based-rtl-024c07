// tb_output_unit: feeds sequences of N neuron results (random accumulators,
// random gaps between them) and checks the running sum of +/-beta_n after
// every neuron, the final y and class bit, and that y_valid pulses exactly
// once, one cycle after the last neuron's result.
module tb_output_unit;
  import rbn_pkg::*;

  localparam int unsigned N   = 5;
  localparam int unsigned NW  = $clog2(N);
  localparam int unsigned Y_W = DATA_W + 2 + $clog2(N);

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  beta_we = 1'b0;
  logic [NW-1:0]         beta_waddr = '0;
  data_t                 beta_wdata = '0;
  logic                  phi_valid = 1'b0;
  logic [NW-1:0]         phi_n = '0;
  acc_t                  acc = '0;
  logic                  y_valid;
  logic signed [Y_W-1:0] y;
  logic                  y_pos;

  output_unit #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int beta[N];
  int n_pos = 0, n_neg = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int sum;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 60; r++) begin
      // new output weights every few rounds, extremes included
      if (r % 5 == 0) begin
        for (int i = 0; i < N; i++) begin
          beta[i] = (r == 10) ? -128 : $urandom_range(0, 255) - 128;
          @(negedge clk);
          beta_we = 1; beta_waddr = NW'(i); beta_wdata = data_t'(beta[i]);
        end
        @(negedge clk); beta_we = 0;
      end
      sum = 0;
      for (int i = 0; i < N; i++) begin
        while ($urandom_range(0, 2) == 0) begin
          phi_valid = 0;
          @(negedge clk);
          check(!y_valid, "no y_valid between neurons");
        end
        phi_valid = 1; phi_n = NW'(i);
        acc = acc_t'($urandom_range(0, 65535));
        if (i == 0 && r % 3 == 0) acc = '0;
        sum += acc[ACC_W-1] ? -beta[i] : beta[i];
        @(negedge clk);
        phi_valid = 0;
        check(int'(y) == sum, $sformatf("partial y=%0d expected %0d", y, sum));
        check(y_valid == (i == N - 1), "y_valid only after the last neuron");
      end
      check(y_pos == (sum >= 0), "class bit");
      if (sum >= 0) n_pos++; else n_neg++;
      @(negedge clk);
      check(!y_valid, "y_valid is a single pulse");
    end
    check(n_pos > 0 && n_neg > 0, "both classes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
