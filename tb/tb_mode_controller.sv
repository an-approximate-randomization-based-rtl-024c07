// tb_mode_controller: the mode must change only on a start pulse, to
// Approximate when the energy budget is below the threshold and to Complete
// otherwise (equal counts as enough budget). Random traffic plus the
// boundary cases.
module tb_mode_controller;
  import rbn_pkg::*;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic            start = 1'b0;
  logic [EB_W-1:0] energy_budget = '0, budget_thr = '0;
  mode_e           mode;

  mode_controller dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  mode_e model = MODE_COMPLETE;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit s, input int eb, input int th);
    @(negedge clk);
    start = s; energy_budget = EB_W'(eb); budget_thr = EB_W'(th);
    @(negedge clk);
    if (s) model = (eb < th) ? MODE_APPROX : MODE_COMPLETE;
    checks++;
    if (mode != model) begin
      failures++;
      $display("FAIL: start=%0d eb=%0d th=%0d mode=%0d", s, eb, th, mode);
    end
    start = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (mode != MODE_COMPLETE) failures++;
    rst_n = 1'b1;
    step(1, 10, 11);   // below: approximate
    step(0, 200, 11);  // no start: stays
    step(1, 11, 11);   // equal: complete
    step(1, 0, 0);
    step(1, 254, 255);
    step(1, 255, 255);
    for (int k = 0; k < 400; k++)
      step($urandom_range(0, 2) == 0, $urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
