// scale_mult: scaling step of the 9/7 transform.
//
// A single multiplier whose coefficient is selected per sample: low-pass
// samples (in_hi = 0) are multiplied by K_LOW, high-pass samples by K_HIGH.
// With the defaults it turns the second lifting step's outputs s^2/2 and
// delta*d^2/2 into the sub-band coefficients s = K1*s^2 and d = K2*d^2
// (K_LOW = 2*K1, K_HIGH = 2*K2/delta). The product is truncated to the
// Q11.5 sample format.
//
// Interface: a valid/data/hi stream in and the same stream out, one sample
// per cycle, one cycle of latency (registered output). The coefficient mux
// and the shared multiplier follow the 9/7 processor diagrams; the output
// register is this design's own choice.
module scale_mult
  import dwt_pkg::*;
#(
  parameter coef_t K_LOW  = C97_K1,
  parameter coef_t K_HIGH = C97_K2_DELTA
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  input  logic    in_hi,
  output logic    out_valid,
  output sample_t out_data,
  output logic    out_hi
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hi    <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_hi    <= in_hi;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) out_data <= mul_coef(in_data, in_hi ? K_HIGH : K_LOW);
  end
endmodule
