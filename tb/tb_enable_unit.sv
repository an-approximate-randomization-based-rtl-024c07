// tb_enable_unit: the enable e_nj must follow, one cycle after a term is
// issued, the rule e_nj = valid & (Complete ? 1 : u_nj), with u_nj the bit
// stored in Mem U at the term's address. Random relevance bits, random issue
// addresses and gaps, and the mode switched at random.
module tb_enable_unit;
  import rbn_pkg::*;

  localparam int unsigned N  = 3;
  localparam int unsigned D  = 4;
  localparam int unsigned LW = $clog2(N*D);

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          u_we = 1'b0;
  logic [LW-1:0] u_waddr = '0;
  logic          u_wdata = 1'b0;
  logic          issue_valid = 1'b0;
  logic [LW-1:0] rd_addr = '0;
  mode_e         mode = MODE_COMPLETE;
  logic          e_nj;

  enable_unit #(.N(N), .D(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int u[N*D];
  int n_off = 0, n_on_approx = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pv;
    int pa;
    bit exp_e;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N*D; i++) begin
      u[i] = $urandom_range(0, 1);
      u_we = 1; u_waddr = LW'(i); u_wdata = u[i][0];
      @(negedge clk);
    end
    u_we = 0;
    pv = 0; pa = 0;
    for (int k = 0; k < 2000; k++) begin
      // drive this cycle's issue and mode
      issue_valid = $urandom_range(0, 4) != 0;
      rd_addr     = LW'($urandom_range(0, N*D - 1));
      if ($urandom_range(0, 7) == 0) mode = (mode == MODE_COMPLETE) ? MODE_APPROX : MODE_COMPLETE;
      #1;
      exp_e = pv && ((mode == MODE_COMPLETE) || (u[pa] != 0));
      checks++;
      if (e_nj != exp_e) begin
        failures++;
        $display("FAIL: cycle %0d e_nj=%0d expected %0d", k, e_nj, exp_e);
      end
      if (pv && mode == MODE_APPROX && !exp_e) n_off++;
      if (pv && mode == MODE_APPROX && exp_e) n_on_approx++;
      pv = issue_valid; pa = int'(rd_addr);
      @(negedge clk);
    end
    checks++;
    if (n_off == 0 || n_on_approx == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
