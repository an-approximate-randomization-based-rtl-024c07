// tb_rbn_example: the small worked example used to illustrate the architecture,
// run through the whole engine: D = 3 features, N = 2 neurons,
// x = [01h, 02h, 03h], w_1 = [06h, 05h, 04h], w_2 = [03h, 02h, 01h],
// b_1 = b_2 = 0, and in Approximate mode the term w_23*x_3 is skipped.
// The operand registers of the neuron must take the pairs (01h,06h),
// (02h,05h), (03h,04h), (01h,03h), (02h,02h) and then hold, and the
// accumulator must take the values 0006h, 0010h, 001Ch, 0003h, 0007h.
// The same network is then run in Complete mode, where neuron 2 reaches 000Ah.
// Output weights beta = [5, -3] give y = 2 in both modes. Latency N*D + 3.
module tb_rbn_example;
  import rbn_pkg::*;

  localparam int unsigned N   = 2;
  localparam int unsigned D   = 3;
  localparam int unsigned LW  = $clog2(N*D);
  localparam int unsigned Y_W = DATA_W + 2 + $clog2(N);

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

  int checks = 0, failures = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // trace of the neuron registers
  int acc_q[$];
  int ops_q[$];
  always @(posedge clk) begin
    automatic bit acc_upd = dut.u_neuron.first_qq || dut.u_neuron.e_ff;
    automatic bit op_upd  = dut.e_nj;
    #1;
    if (acc_upd) acc_q.push_back(int'(dut.u_neuron.acc));
    if (op_upd)  ops_q.push_back(int'(dut.u_neuron.x_reg) * 256 + int'(dut.u_neuron.w_reg));
  end

  task automatic load(input mem_sel_e sel, input int addr, input int data);
    @(negedge clk);
    load_en = 1; load_sel = sel; load_addr = LW'(addr); load_data = data_t'(data);
    @(negedge clk);
    load_en = 0;
  endtask

  task automatic run(input bit approx, output longint lat);
    longint t0;
    t0 = 0;
    energy_budget = approx ? 8'd10 : 8'd250;
    acc_q.delete(); ops_q.delete();
    for (int j = 0; j < D; j++) begin
      @(negedge clk);
      x_valid = 1; x_data = data_t'(j + 1);
    end
    @(negedge clk);
    x_valid = 0;
    lat = D;
    while (!y_valid) begin @(negedge clk); lat++; end
  endtask

  int ws[N*D] = '{6, 5, 4, 3, 2, 1};
  int us[N*D] = '{1, 1, 1, 1, 1, 0};

  initial begin
    longint lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N*D; i++) begin load(MEM_W, i, ws[i]); load(MEM_U, i, us[i]); end
    load(MEM_B, 0, 0);    load(MEM_B, 1, 0);
    load(MEM_BETA, 0, 5); load(MEM_BETA, 1, -3);

    run(1, lat);
    check(mode == MODE_APPROX, "approximate mode selected");
    check(ops_q.size() == 5, "five products in Approximate mode");
    if (ops_q.size() == 5)
      check(ops_q[0] == 'h0106 && ops_q[1] == 'h0205 && ops_q[2] == 'h0304 &&
            ops_q[3] == 'h0103 && ops_q[4] == 'h0202, "operand register sequence");
    check(acc_q.size() == 5, "five accumulator updates");
    if (acc_q.size() == 5)
      check(acc_q[0] == 'h06 && acc_q[1] == 'h10 && acc_q[2] == 'h1C &&
            acc_q[3] == 'h03 && acc_q[4] == 'h07, "accumulator sequence");
    check(int'(dut.u_neuron.x_reg) == 2 && int'(dut.u_neuron.w_reg) == 2, "registers held on the skipped term");
    check(int'(y) == 2 && y_pos, "y in Approximate mode");
    check(lat == N*D + 3, $sformatf("latency %0d", lat));

    @(negedge clk);
    run(0, lat);
    check(mode == MODE_COMPLETE, "complete mode selected");
    check(ops_q.size() == 6, "six products in Complete mode");
    check(acc_q.size() == 6 && acc_q[5] == 'h0A, "neuron 2 complete sum");
    check(int'(y) == 2 && y_pos, "y in Complete mode");
    check(lat == N*D + 3, $sformatf("latency %0d", lat));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
