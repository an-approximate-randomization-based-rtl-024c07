// tb_param_mem: random test of the parameter memory against an array model.
// Writes land on the rising edge, reads are combinational, every address
// including the last one is written and read, and reads beyond the depth
// return zero.
module tb_param_mem;

  localparam int unsigned DEPTH = 10;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic             clk = 1'b0;
  logic             we = 1'b0;
  logic [AW-1:0]    waddr = '0;
  logic [WIDTH-1:0] wdata = '0;
  logic [AW-1:0]    raddr = '0;
  logic [WIDTH-1:0] rdata;

  param_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model[DEPTH];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    // fill every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = WIDTH'($urandom); model[i] = int'(wdata);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = AW'(i); #1;
      check(int'(rdata) == model[i], $sformatf("read %0d", i));
    end
    // random traffic
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      wdata = WIDTH'($urandom);
      raddr = AW'($urandom_range(0, DEPTH - 1));
      #1;
      check(int'(rdata) == model[raddr], $sformatf("read %0d", raddr));
      @(posedge clk);
      if (we) model[waddr] = int'(wdata);
    end
    @(negedge clk); we = 0;
    for (int a = DEPTH; a < (1 << AW); a++) begin
      raddr = AW'(a); #1;
      check(rdata == '0, "read beyond depth");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
