// tb_rbn_top: end-to-end test of the RBN inference engine at its default size
// (N = 500 hidden neurons, D = 100 features).
//
// The testbench draws random network parameters (weights w_nj, biases b_n,
// output weights beta_n, relevance bits u_nj) and random input samples, loads
// the parameters through the load port and runs a series of inferences:
// Complete and Approximate mode, with the mode switched between inferences,
// with features streamed one per cycle and with random gaps (input stalls).
// A reference model in the testbench computes every neuron's accumulator with
// the same saturating 16-bit arithmetic and the output sum, and the result is
// compared with y and y_pos. It also checks the latency (N*D + 3 cycles plus
// the stall cycles, equal in both modes) and counts the multiplications that
// were enabled (N*D in Complete mode, the number of set u_nj in Approximate
// mode). Each mechanism (both modes, a mode switch, an input stall, a skipped
// term, accumulator saturation, a negative activation, both output classes)
// must occur at least once, and in every cycle without an enabled term the
// multiplier's operand registers must keep their values.
module tb_rbn_top;
  import rbn_pkg::*;

  localparam int unsigned N   = 500;
  localparam int unsigned D   = 100;
  localparam int unsigned LW  = $clog2(N*D);
  localparam int unsigned Y_W = DATA_W + 2 + $clog2(N);
  localparam int          NINF = 6;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  load_en = 1'b0;
  mem_sel_e              load_sel = MEM_W;
  logic [LW-1:0]         load_addr = '0;
  data_t                 load_data = '0;
  logic [EB_W-1:0]       energy_budget = 8'd200;
  logic [EB_W-1:0]       budget_thr = 8'd100;
  mode_e                 mode;
  logic                  x_valid = 1'b0;
  data_t                 x_data = '0;
  logic                  x_ready;
  logic                  busy;
  logic                  y_valid;
  logic signed [Y_W-1:0] y;
  logic                  y_pos;

  rbn_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model state
  int w   [N*D];
  int u   [N*D];
  int b   [N];
  int beta[N];
  int x   [D];

  // mechanism counters
  int n_complete = 0, n_approx = 0, n_switch = 0, n_stall = 0, n_skip = 0;
  int n_sat = 0, n_negphi = 0, n_pos = 0, n_neg = 0;

  // enabled multiplications counted at the neuron's enable
  longint mult_count = 0;
  always @(posedge clk) if (dut.e_nj) mult_count <= mult_count + 1;

  // A skipped term must leave the multiplier operands untouched: whenever
  // e_nj is 0 at a clock edge, the x_j and w_nj registers keep their values.
  int n_hold = 0, n_hold_bad = 0;
  always @(posedge clk) begin
    automatic bit    en = dut.e_nj;
    automatic data_t xo = dut.u_neuron.x_reg;
    automatic data_t wo = dut.u_neuron.w_reg;
    #1;
    if (rst_n && !en) begin
      n_hold++;
      if (dut.u_neuron.x_reg != xo || dut.u_neuron.w_reg != wo) n_hold_bad++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int sat16(input int v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic load(input mem_sel_e sel, input int addr, input int data);
    @(negedge clk);
    load_en   = 1'b1;
    load_sel  = sel;
    load_addr = LW'(addr);
    load_data = data_t'(data);
    @(negedge clk);
    load_en   = 1'b0;
  endtask

  // Runs one inference; stall_pct is the chance of a gap before each feature.
  task automatic infer(input bit approx, input int stall_pct);
    int exp_y, a, nsat, nmul, stalls;
    longint t0, t1, m0;
    bit sat_hit;
    exp_y = 0; nmul = 0; stalls = 0;
    for (int j = 0; j < D; j++) x[j] = $urandom_range(0, 127);
    // reference model
    for (int n = 0; n < N; n++) begin
      a = b[n];
      sat_hit = 0;
      for (int j = 0; j < D; j++) begin
        if (!approx || u[n*D+j] != 0) begin
          int s;
          s = a + w[n*D+j] * x[j];
          if (sat16(s) != s) sat_hit = 1;
          a = sat16(s);
          nmul++;
        end else begin
          n_skip++;
        end
      end
      if (sat_hit) n_sat++;
      if (a < 0) begin
        n_negphi++;
        exp_y -= beta[n];
      end else begin
        exp_y += beta[n];
      end
    end
    energy_budget = approx ? 8'd20 : 8'd220;
    m0 = mult_count;
    // stream the features
    for (int j = 0; j < D; j++) begin
      @(negedge clk);
      while (j > 0 && ($urandom_range(0, 99) < stall_pct)) begin
        x_valid = 1'b0;
        stalls++;
        n_stall++;
        @(negedge clk);
      end
      x_valid = 1'b1;
      x_data  = data_t'(x[j]);
      if (j == 0) t0 = cycle;
      while (!x_ready) @(negedge clk);
    end
    @(negedge clk);
    x_valid = 1'b0;
    while (!y_valid) @(negedge clk);
    t1 = cycle;
    check(mode == (approx ? MODE_APPROX : MODE_COMPLETE), "mode chosen from budget");
    check(int'(y) == exp_y, $sformatf("y=%0d expected %0d", y, exp_y));
    check(y_pos == (exp_y >= 0), "class bit");
    check(t1 - t0 == longint'(N*D + 3 + stalls),
          $sformatf("latency %0d expected %0d", t1 - t0, N*D + 3 + stalls));
    @(negedge clk);
    check(mult_count - m0 == longint'(nmul),
          $sformatf("multiplications %0d expected %0d", mult_count - m0, nmul));
    check(!busy, "idle after the result");
    if (approx) n_approx++; else n_complete++;
    if (exp_y >= 0) n_pos++; else n_neg++;
    $display("inference approx=%0d y=%0d multiplications=%0d of %0d latency=%0d",
             approx, exp_y, nmul, N*D, t1 - t0);
  endtask

  bit prev_mode;

  initial begin
    // parameters: most neurons have small weights, every 8th full-range ones
    for (int n = 0; n < N; n++) begin
      b[n]    = $urandom_range(0, 255) - 128;
      beta[n] = $urandom_range(0, 255) - 128;
      for (int j = 0; j < D; j++) begin
        if (n % 8 == 7) w[n*D+j] = $urandom_range(0, 255) - 128;
        else            w[n*D+j] = $urandom_range(0, 31) - 16;
        u[n*D+j] = ($urandom_range(0, 99) < 50) ? 1 : 0;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N*D; i++) load(MEM_W, i, w[i]);
    for (int i = 0; i < N*D; i++) load(MEM_U, i, u[i]);
    for (int n = 0; n < N; n++) load(MEM_B, n, b[n]);
    for (int n = 0; n < N; n++) load(MEM_BETA, n, beta[n]);

    for (int k = 0; k < NINF; k++) begin
      bit ap;
      ap = (k % 3 == 1) || (k == 4);
      if (k > 0 && ap != prev_mode) n_switch++;
      prev_mode = ap;
      infer(ap, (k >= 2) ? 10 : 0);
    end

    check(n_complete > 0, "Complete-mode inference ran");
    check(n_approx > 0,   "Approximate-mode inference ran");
    check(n_switch > 0,   "mode switched between inferences");
    check(n_stall > 0,    "input stall occurred");
    check(n_skip > 0,     "terms skipped");
    check(n_sat > 0,      "accumulator saturated");
    check(n_negphi > 0,   "negative activation");
    check(n_pos > 0 && n_neg > 0, "both output classes");
    check(n_hold > 0 && n_hold_bad == 0,
          $sformatf("operands held on skipped terms (%0d cycles, %0d changed)", n_hold, n_hold_bad));
    $display("mechanisms: complete=%0d approx=%0d switch=%0d stall=%0d skip=%0d sat=%0d negphi=%0d pos=%0d neg=%0d",
             n_complete, n_approx, n_switch, n_stall, n_skip, n_sat, n_negphi, n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
