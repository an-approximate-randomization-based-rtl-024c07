// rbn_workload_runner: testbench helper that owns one RBN engine of size
// N x D and runs on it networks shaped like the evaluated classification
// tasks and the five (D, N) energy-study configurations, skipping the shapes
// with D <= MIN_D and those that do not fit.
//
// A smaller network runs on a larger engine by zero padding: unused weights,
// biases, output weights and relevance bits are zero, so unused neurons add
// nothing to y and unused features add nothing to a neuron. Each network gets
// random parameters and one random sample and is run in Complete and in
// Approximate mode; y is compared with a reference model with the same
// saturating arithmetic, and the number of enabled multiplications with the
// number of relevant terms. For the task-shaped networks about 70% of the
// terms are marked relevant; for the energy-study configurations every other
// term (D/2 per neuron, on average for odd D), as in that study, and each is
// fed thirty random samples, the stimulus of that study. The counts of
// checks and failures are outputs; done rises when all shapes have run.
module rbn_workload_runner
  import rbn_pkg::*;
#(
  parameter int unsigned N     = 500,
  parameter int unsigned D     = 100,
  parameter int          MIN_D = 0     // run only the shapes with more than MIN_D features
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned LW  = $clog2(N*D);
  localparam int unsigned Y_W = DATA_W + 2 + $clog2(N);
  localparam int          NW  = 15;

  logic                  clk = 1'b0, rst_n = 1'b0;
  logic                  load_en = 1'b0;
  mem_sel_e              load_sel = MEM_W;
  logic [LW-1:0]         load_addr = '0;
  data_t                 load_data = '0;
  logic [EB_W-1:0]       energy_budget = '0;
  logic [EB_W-1:0]       budget_thr = 8'd128;
  mode_e                 mode;
  logic                  x_valid = 1'b0;
  data_t                 x_data = '0;
  logic                  x_ready;
  logic                  busy;
  logic                  y_valid;
  logic signed [Y_W-1:0] y;
  logic                  y_pos;

  rbn_top #(.N(N), .D(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin done = 0; checks = 0; failures = 0; end
  longint mult_count = 0;
  always @(posedge clk) if (dut.e_nj) mult_count <= mult_count + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int sat16(input int v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic load(input mem_sel_e sel, input int addr, input int data);
    @(negedge clk);
    load_en = 1; load_sel = sel; load_addr = LW'(addr); load_data = data_t'(data);
    @(negedge clk);
    load_en = 0;
  endtask

  // workload shapes: name, D, N, half (exactly D/2 relevant terms per neuron)
  string wl_name[NW] = '{"CreditCard", "Magic", "Occupancy", "Biodeg", "Pima", "HTRU",
                         "MNIST81", "DetectMalicious", "ds2os", "fog",
                         "cfg_5_100", "cfg_50_100", "cfg_100_100", "cfg_5_500", "cfg_100_500"};
  int    wl_d[NW]    = '{23, 10, 5, 41, 8, 8, 80, 503, 11, 9, 5, 50, 100, 5, 100};
  int    wl_n[NW]    = '{500, 500, 435, 425, 207, 485, 435, 110, 500, 500, 100, 100, 100, 500, 500};

  int w[N*D], u[N*D], b[N], beta[N], x[D];

  task automatic run(input int d, input int nn, input bit approx, output int nmul_exp,
                     output longint nmul_got, output bit ok);
    int a, exp_y;
    longint m0;
    exp_y = 0; nmul_exp = 0;
    for (int n = 0; n < nn; n++) begin
      a = b[n];
      for (int j = 0; j < d; j++)
        if (!approx || u[n*D+j] != 0) begin
          a = sat16(a + w[n*D+j] * x[j]);
          nmul_exp++;
        end
      exp_y += (a < 0) ? -beta[n] : beta[n];
    end
    if (!approx) nmul_exp = N*D;  // Complete mode enables every term, padding included
    energy_budget = approx ? 8'd5 : 8'd250;
    m0 = mult_count;
    for (int j = 0; j < D; j++) begin
      @(negedge clk);
      x_valid = 1; x_data = data_t'(x[j]);
    end
    @(negedge clk);
    x_valid = 0;
    while (!y_valid) @(negedge clk);
    @(negedge clk);
    nmul_got = mult_count - m0;
    ok = (int'(y) == exp_y) && (y_pos == (exp_y >= 0));
    check(ok, $sformatf("y=%0d expected %0d", y, exp_y));
    check(nmul_got == longint'(nmul_exp), "multiplication count");
  endtask

  initial begin
    int pd, pn, ec, ea;
    longint gc, ga;
    bit okc, oka;
    int ran, nok, nsamp;
    longint sum_a;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // clear every parameter once
    for (int i = 0; i < N*D; i++) begin
      w[i] = 0; u[i] = 0;
      load(MEM_W, i, 0); load(MEM_U, i, 0);
    end
    for (int n = 0; n < N; n++) begin
      b[n] = 0; beta[n] = 0;
      load(MEM_B, n, 0); load(MEM_BETA, n, 0);
    end
    pd = 0; pn = 0; ran = 0;
    for (int k = 0; k < NW; k++) begin
      int d, nn;
      d = wl_d[k]; nn = wl_n[k];
      if (d <= MIN_D) continue;
      if (d > D || nn > N) begin
        $display("workload %-16s D=%0d N=%0d: does not fit (D > %0d), skipped", wl_name[k], d, nn, D);
        continue;
      end
      // clear the previous network's region, then write this one
      for (int n = 0; n < pn; n++) begin
        for (int j = 0; j < pd; j++) begin
          w[n*D+j] = 0; u[n*D+j] = 0;
          load(MEM_W, n*D+j, 0); load(MEM_U, n*D+j, 0);
        end
        b[n] = 0; beta[n] = 0;
        load(MEM_B, n, 0); load(MEM_BETA, n, 0);
      end
      for (int n = 0; n < nn; n++) begin
        for (int j = 0; j < d; j++) begin
          w[n*D+j] = $urandom_range(0, 63) - 32;
          if (k >= 10) u[n*D+j] = (j % 2 == n % 2) ? 1 : 0;
          else         u[n*D+j] = ($urandom_range(0, 99) < 70) ? 1 : 0;
          load(MEM_W, n*D+j, w[n*D+j]); load(MEM_U, n*D+j, u[n*D+j]);
        end
        b[n] = $urandom_range(0, 255) - 128; beta[n] = $urandom_range(0, 255) - 128;
        load(MEM_B, n, b[n]); load(MEM_BETA, n, beta[n]);
      end
      pd = d; pn = nn;
      // task shapes: one sample; energy-study shapes: thirty random samples
      nok = 0; nsamp = (k >= 10) ? 30 : 1; sum_a = 0;
      for (int s = 0; s < nsamp; s++) begin
        for (int j = 0; j < D; j++) x[j] = (j < d) ? $urandom_range(0, 127) : 0;
        run(d, nn, 0, ec, gc, okc);
        run(d, nn, 1, ea, ga, oka);
        if (okc && oka) nok++;
        sum_a += ga;
      end
      $display("workload %-16s D=%0d N=%0d: %0d of %0d samples correct in both modes, Approximate-mode products %0d of %0d per inference (%0d%%)",
               wl_name[k], d, nn, nok, nsamp, sum_a / nsamp, d*nn, (100*sum_a)/(nsamp*d*nn));
      ran++;
    end
    check(ran > 0, "at least one workload ran");
    done = 1;
  end

endmodule
