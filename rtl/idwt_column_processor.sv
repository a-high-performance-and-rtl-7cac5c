// idwt_column_processor: 1-D inverse DWT of every column (the inverse
// counterpart of column_processor).
//
// Input: columns of interleaved coefficients s_0, d_0, s_1, d_1, ... (low-pass
// at even, high-pass at odd positions, as the forward processor produces
// them), columns back to back, one sample per cycle. Output: the
// reconstructed samples x(0), x(1), ..., same order.
//   FILTER = F53: one reversible inverse PE (c_s = 1/2, c_d = -1/8); the
//                 result is bit-exact integer 5/3 synthesis.
//   FILTER = F97: K2^-1 on the high-pass input -> inverse PE
//                 ((gamma*K1^-1)/2, -(delta*gamma)/2, d halved on the adder
//                 path) -> inverse PE ((alpha/gamma)/2, -(beta*alpha)/2,
//                 k = 2) -> scaling multiplier ((alpha^-1)*4 on even, 2 on odd
//                 samples).
// In the 9/7 chain the first PE outputs gamma*s^1/2 and d^1/2, the second
// alpha*s^0/4 and d^0/2; the last multiplier restores s^0 and d^0. The input
// multiplier is combinational and feeds the first PE's input register.
// The first PE's odd-sample flag is unused: the second PE tracks the sample
// order itself.
//
// Timing: the last output of a column of N samples leaves N+5 (5/3) or N+11
// (9/7) cycles after its first sample, as in the forward processor. A frame
// must arrive on consecutive cycles while in_ready is high; cfg_n (even,
// >= 2) is the column length. The inverse cascade and its six constant
// multipliers follow the published inverse equations and coefficient table;
// the placement of the halvings and the extra doubling of odd outputs in
// the last multiplier are this design's own.
module idwt_column_processor
  import dwt_pkg::*;
#(
  parameter filter_e     FILTER = F97,
  parameter int unsigned MAX_N  = 512
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic [$clog2(MAX_N+1)-1:0] cfg_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    in_ready,
  output logic    out_valid,
  output sample_t out_data,
  output logic    out_odd,
  output logic    busy
);
  localparam int unsigned MAX_PAIRS = MAX_N / 2;
  localparam int unsigned PW = $clog2(MAX_PAIRS+1);

  logic [PW-1:0] pairs;
  assign pairs = PW'(cfg_n >> 1);

  if (FILTER == F53) begin : g_53
    ilift_pe #(
      .MAX_ROWS (1), .MAX_PAIRS (MAX_PAIRS), .LOSSLESS (1'b1),
      .SHR_EVEN (1'b0), .H_SUB (1'b0), .H_SHL (1'b0),
      .C_S (C53I_S), .C_D (C53I_D)
    ) u_pe1 (
      .clk, .rst_n, .cfg_rows (1'b1), .cfg_pairs (pairs),
      .in_valid, .in_data, .in_ready,
      .out_valid, .out_data, .out_odd, .busy
    );
  end else begin : g_97
    // K2^-1 on the high-pass samples; low-pass samples pass unchanged
    // (K1^-1 is merged into the next coefficient).
    logic    in_hi;
    sample_t pre;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                     in_hi <= 1'b0;
      else if (in_valid && in_ready)  in_hi <= !in_hi;
    end
    assign pre = in_hi ? mul_coef(in_data, C97I_K2_INV) : in_data;

    logic    v1, o1, b1, v2, o2, b2, r2;
    sample_t d1, d2;
    ilift_pe #(
      .MAX_ROWS (1), .MAX_PAIRS (MAX_PAIRS), .LOSSLESS (1'b0),
      .SHR_EVEN (1'b1), .H_SUB (1'b1), .H_SHL (1'b0),
      .C_S (C97I_GAMMA_K1), .C_D (C97I_DELTA_GAMMA)
    ) u_pe1 (
      .clk, .rst_n, .cfg_rows (1'b1), .cfg_pairs (pairs),
      .in_valid, .in_data (pre), .in_ready,
      .out_valid (v1), .out_data (d1), .out_odd (o1), .busy (b1)
    );
    ilift_pe #(
      .MAX_ROWS (1), .MAX_PAIRS (MAX_PAIRS), .LOSSLESS (1'b0),
      .SHR_EVEN (1'b0), .H_SUB (1'b1), .H_SHL (1'b1), .IN_REG (1'b0),
      .C_S (C97I_ALPHA_GAMMA), .C_D (C97I_BETA_ALPHA)
    ) u_pe2 (
      .clk, .rst_n, .cfg_rows (1'b1), .cfg_pairs (pairs),
      .in_valid (v1), .in_data (d1), .in_ready (r2),
      .out_valid (v2), .out_data (d2), .out_odd (o2), .busy (b2)
    );
    scale_mult #(.K_LOW (C97I_ALPHA_INV), .K_HIGH (C_TWO)) u_scale (
      .clk, .rst_n, .in_valid (v2), .in_data (d2), .in_hi (o2),
      .out_valid, .out_data, .out_hi (out_odd)
    );
    assign busy = b1 || b2 || v2 || out_valid || in_hi;
    // The second PE never refuses data: the first PE stops only at frames.
    always_ff @(posedge clk) if (rst_n && v1) assert (r2) else $error("idwt_column_processor: PE2 overrun");
  end
endmodule
