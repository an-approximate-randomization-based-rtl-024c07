// tb_sign_unit: exhaustive test of the Sign Unit. For every 8-bit beta and
// both accumulator signs the output must be beta (accumulator >= 0) or
// -beta (accumulator < 0), including -(-128) = +128.
module tb_sign_unit;
  import rbn_pkg::*;

  data_t                  beta;
  logic                   acc_neg;
  logic signed [DATA_W:0] term;

  sign_unit dut (.*);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int bv = -128; bv < 128; bv++) begin
      for (int s = 0; s < 2; s++) begin
        beta = data_t'(bv);
        acc_neg = s[0];
        #1;
        checks++;
        if (int'(term) != (s ? -bv : bv)) begin
          failures++;
          $display("FAIL: beta=%0d neg=%0d term=%0d", bv, s, term);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
