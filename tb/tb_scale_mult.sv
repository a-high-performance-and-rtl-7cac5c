// tb_scale_mult: self-checking test of the 9/7 scaling multiplier.
//
// Random Q11.5 samples, alternately low and high, go through the multiplier.
// Each output must equal the input times 2*K1 (low) or 2*K2/delta (high),
// computed here in real arithmetic from the printed coefficient values and
// rounded down to 1/32, one cycle after the input (valid and band flag
// delayed with it).
module tb_scale_mult;
  import dwt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic in_valid, in_hi, out_valid, out_hi;
  sample_t in_data, out_data;

  scale_mult u_dut (.clk, .rst_n, .in_valid, .in_data, .in_hi,
                    .out_valid, .out_data, .out_hi);

  logic    exp_v, exp_h;
  sample_t exp_d;

  function automatic sample_t expect_of(sample_t x, logic hi);
    real k = hi ? 5.546875 : 1.62548828125;
    real y = $floor(real'(x) * k);
    return sample_t'(longint'(y));
  endfunction

  initial begin
    in_valid = 0; in_hi = 0; in_data = '0; exp_v = 0; exp_h = 0; exp_d = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      // check the output for the input driven at the previous negedge
      if (exp_v || out_valid) begin
        checks++;
        if (out_valid !== exp_v || (exp_v && (out_data != exp_d || out_hi != exp_h))) begin
          failures++;
          $display("FAIL %0d: got v%0d %0d h%0d, expected v%0d %0d h%0d", i, out_valid,
                   out_data, out_hi, exp_v, exp_d, exp_h);
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      in_hi    = i[0];
      in_data  = sample_t'($urandom_range(0, 5000)) - sample_t'(2500);
      exp_v = in_valid;
      exp_h = in_hi;
      exp_d = expect_of(in_data, in_hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
