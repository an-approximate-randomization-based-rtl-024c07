// tb_sequencer: runs several inferences through the control FSM with random
// gaps in the feature stream and random delay of the output's done signal.
// Checks that the N*D terms are issued once each, in order, with the right
// n, j, linear address and first/last flags; that neuron 0 issues exactly
// when a feature is accepted; that later neurons issue every cycle; that
// x_ready is low from neuron 1 on; that start pulses once per inference; and
// that busy stays high until y_done.
module tb_sequencer;

  localparam int unsigned N  = 3;
  localparam int unsigned D  = 4;
  localparam int unsigned NW = $clog2(N);
  localparam int unsigned JW = $clog2(D);
  localparam int unsigned LW = $clog2(N*D);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          x_valid = 1'b0;
  logic          x_ready;
  logic          y_done = 1'b0;
  logic          start, issue_valid;
  logic [NW-1:0] n;
  logic [JW-1:0] j;
  logic [LW-1:0] lin_addr;
  logic          first, last, busy;

  sequencer #(.N(N), .D(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0;

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
    int k, starts, run_start, run_cycles;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 20; r++) begin
      #1;
      check(!busy && x_ready, "idle and ready before an inference");
      k = 0; starts = 0;
      // neuron 0: paced by the features
      while (k < D) begin
        x_valid = (k == 0) || ($urandom_range(0, 2) != 0);
        if (!x_valid) n_stall++;
        #1;
        check(x_ready, "ready during neuron 0");
        check(issue_valid == x_valid, "neuron 0 issues with each feature");
        check(start == (k == 0), "start only with the first feature");
        if (start) starts++;
        if (issue_valid) begin
          check(int'(n) == 0 && int'(j) == k && int'(lin_addr) == k, "term order (neuron 0)");
          check(first == (k == 0) && last == (k == D - 1), "first/last (neuron 0)");
          k++;
        end
        @(negedge clk);
      end
      x_valid = 1'b1;  // offered but must not be taken while busy
      run_cycles = 0;
      while (k < N*D) begin
        #1;
        check(issue_valid && !x_ready && !start && busy, "later neurons issue every cycle");
        check(int'(n) == k / D && int'(j) == k % D && int'(lin_addr) == k, "term order");
        check(first == (k % D == 0) && last == (k % D == D - 1), "first/last");
        k++; run_cycles++;
        @(negedge clk);
      end
      check(run_cycles == (N - 1) * D, "neurons 1..N-1 take (N-1)*D cycles");
      // wait for done
      repeat ($urandom_range(0, 4)) begin
        #1;
        check(busy && !issue_valid && !x_ready, "waiting for the output");
        @(negedge clk);
      end
      x_valid = 1'b0;
      y_done = 1'b1;
      @(negedge clk);
      y_done = 1'b0;
      check(starts == 1, "one start per inference");
    end
    check(n_stall > 0, "input stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
