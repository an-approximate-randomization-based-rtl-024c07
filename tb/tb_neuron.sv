// tb_neuron: self-checking test of the Neuron module (single multiplier,
// accumulator initialised with b_n, operand registers enabled by e_nj).
//
// Configuration N = 3 neurons, D = 3 features. Round 0 replays the worked
// example of the published functional simulation: x = [1, 2, 3],
// w_1 = [6, 5, 4], w_2 = [3, 2, 1], b = 0, Approximate mode with the third
// term of neuron 2 skipped, for which the accumulator must read 0x0006,
// 0x0010, 0x001C and then 0x0003, 0x0007, 0x0007. Further rounds use random
// values, random enables and neurons with large weights so the 16-bit
// accumulator saturates. Every cycle the accumulator is compared with a
// reference partial sum three cycles after the term was issued, and phi_valid
// must pulse exactly three cycles after a neuron's last term.
module tb_neuron;
  import rbn_pkg::*;

  localparam int unsigned N  = 3;
  localparam int unsigned D  = 3;
  localparam int unsigned NW = $clog2(N);
  localparam int unsigned LW = $clog2(N*D);
  localparam int unsigned T  = N*D;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          w_we = 1'b0, b_we = 1'b0;
  logic [LW-1:0] w_waddr = '0;
  data_t         w_wdata = '0;
  logic [NW-1:0] b_waddr = '0;
  data_t         b_wdata = '0;
  logic          issue_valid = 1'b0;
  logic [LW-1:0] lin_addr = '0;
  logic [NW-1:0] n = '0;
  logic          first = 1'b0, last = 1'b0;
  logic          e_nj = 1'b0;
  data_t         x_in = '0;
  logic          phi_valid;
  logic [NW-1:0] phi_n;
  acc_t          acc;

  neuron #(.N(N), .D(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sat = 0, n_skip = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int sat16(input int v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  int w[T], b[N], x[D], e[T];
  int partial[T];

  task automatic run_round();
    int a;
    // reference
    for (int nn = 0; nn < N; nn++) begin
      a = b[nn];
      for (int jj = 0; jj < D; jj++) begin
        int s;
        if (e[nn*D+jj] != 0) begin
          s = a + w[nn*D+jj] * x[jj];
          if (sat16(s) != s) n_sat++;
          a = sat16(s);
        end else n_skip++;
        partial[nn*D+jj] = a;
      end
    end
    // load
    for (int i = 0; i < T; i++) begin
      @(negedge clk); w_we = 1; w_waddr = LW'(i); w_wdata = data_t'(w[i]);
    end
    for (int i = 0; i < N; i++) begin
      @(negedge clk); w_we = 0; b_we = 1; b_waddr = NW'(i); b_wdata = data_t'(b[i]);
    end
    @(negedge clk); b_we = 0; w_we = 0;
    // stream: at each negedge check the current cycle, then drive the next
    for (int k = 0; k <= T + 2; k++) begin
      // drive cycle k: issue term k, enable/x of term k-1
      issue_valid = (k < T);
      if (k < T) begin
        lin_addr = LW'(k);
        n        = NW'(k / D);
        first    = (k % D) == 0;
        last     = (k % D) == D - 1;
      end
      if (k >= 1 && k - 1 < T) begin
        e_nj = e[k-1] != 0;
        x_in = data_t'(x[(k-1) % D]);
      end else begin
        e_nj = 1'b0;
        x_in = data_t'($urandom);
      end
      @(negedge clk);
      // now in cycle k+1, three cycles after the issue of term k-2, whose
      // partial sum must be in the accumulator
      if (k >= 2 && k - 2 < T) begin
        check(int'(acc) == partial[k-2],
              $sformatf("acc after term %0d = %0d expected %0d", k-2, acc, partial[k-2]));
      end
      check(phi_valid == (k >= 2 && k - 2 < T && ((k - 2) % D) == D - 1),
            $sformatf("phi_valid in cycle %0d", k + 1));
      if (phi_valid) check(int'(phi_n) == (k - 2) / D, "phi_n");
    end
  endtask

  // Inputs change at the falling edge, half a cycle before the rising edge
  // that samples them; "cycle k" is the cycle in which term k is issued.
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // round 0: the published example (neuron 3 is an extra random neuron)
    x = '{1, 2, 3};
    w = '{6, 5, 4, 3, 2, 1, -7, 9, 11};
    b = '{0, 0, -20};
    e = '{1, 1, 1, 1, 1, 0, 1, 0, 1};
    run_round();
    check(partial[0] == 'h06 && partial[1] == 'h10 && partial[2] == 'h1C &&
          partial[3] == 'h03 && partial[4] == 'h07 && partial[5] == 'h07,
          "reference matches the published example");
    // random rounds
    for (int r = 0; r < 40; r++) begin
      for (int i = 0; i < T; i++) begin
        w[i] = $urandom_range(0, 255) - 128;
        e[i] = $urandom_range(0, 3) != 0;
      end
      for (int i = 0; i < N; i++) b[i] = $urandom_range(0, 255) - 128;
      for (int i = 0; i < D; i++) x[i] = $urandom_range(0, 255) - 128;
      if (r % 4 == 0) begin
        for (int i = 0; i < T; i++) begin w[i] = -128; e[i] = 1; end
        for (int i = 0; i < D; i++) x[i] = (r % 8 == 0) ? -128 : 127;
      end
      run_round();
    end
    check(n_sat > 0, "saturation exercised");
    check(n_skip > 0, "skipped terms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
