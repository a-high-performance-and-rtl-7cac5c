// column_processor: 1-D forward DWT of every image column.
//
// The image arrives column by column (x(0,c), x(1,c), ..., x(N-1,c), then
// column c+1), one sample per cycle. Each column is transformed by cascaded
// lifting PEs whose state lives in registers:
//   FILTER = F53: one reversible PE (beta = 1/4, beta*alpha = -1/8);
//                 output s^1, d^1 of each column pair.
//   FILTER = F97: PE (beta, beta*alpha) -> PE ((delta/beta)/2,
//                 (delta*gamma)/2, even path halved) -> scaling multiplier
//                 (2*K1 on low, 2*K2/delta on high); output s, d.
// The output keeps the input order: s_0, d_0, s_1, d_1, ... for each column,
// columns back to back, so the next stage sees column-processed data
// x_c(i,c) with even i low-pass and odd i high-pass.
//
// Timing: one sample per cycle in and out. The last output of a column of
// N samples leaves N+5 cycles (5/3) or N+11 cycles (9/7) after its first
// sample. A frame must arrive on consecutive cycles; cfg_n (even, >= 2) is
// the column length. The cascade of PEs and the scaling multiplier follow
// the published 9/7 column processor; the stream handshake is this design's.
module column_processor
  import dwt_pkg::*;
#(
  parameter filter_e     FILTER = F97,
  parameter int unsigned MAX_N  = 512    // longest column
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic [$clog2(MAX_N+1)-1:0] cfg_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    in_ready,
  output logic    out_valid,
  output sample_t out_data,
  output logic    out_hi,
  output logic    busy
);
  localparam int unsigned MAX_PAIRS = MAX_N / 2;
  localparam int unsigned PW = $clog2(MAX_PAIRS+1);

  logic [PW-1:0] pairs;
  assign pairs = PW'(cfg_n >> 1);

  logic    v1;
  sample_t d1;
  logic    h1, r1, b1;

  lift_pe #(
    .MAX_ROWS (1), .MAX_PAIRS (MAX_PAIRS),
    .LOSSLESS (FILTER == F53), .SHR_EVEN (1'b0),
    .C_EVEN   ((FILTER == F53) ? C53_BETA_ALPHA : C97_BETA_ALPHA),
    .C_ODD    ((FILTER == F53) ? C53_BETA       : C97_BETA)
  ) u_pe1 (
    .clk, .rst_n, .cfg_rows (1'b1), .cfg_pairs (pairs),
    .in_valid, .in_data, .in_ready (r1),
    .out_valid (v1), .out_data (d1), .out_hi (h1), .busy (b1)
  );

  assign in_ready = r1;

  if (FILTER == F97) begin : g_97
    logic    v2, h2, b2, r2;
    sample_t d2;
    lift_pe #(
      .MAX_ROWS (1), .MAX_PAIRS (MAX_PAIRS),
      .LOSSLESS (1'b0), .SHR_EVEN (1'b1), .IN_REG (1'b0),
      .C_EVEN   (C97_DELTA_GAMMA), .C_ODD (C97_DELTA_BETA)
    ) u_pe2 (
      .clk, .rst_n, .cfg_rows (1'b1), .cfg_pairs (pairs),
      .in_valid (v1), .in_data (d1), .in_ready (r2),
      .out_valid (v2), .out_data (d2), .out_hi (h2), .busy (b2)
    );
    scale_mult #(.K_LOW (C97_K1), .K_HIGH (C97_K2_DELTA)) u_scale (
      .clk, .rst_n, .in_valid (v2), .in_data (d2), .in_hi (h2),
      .out_valid, .out_data, .out_hi
    );
    assign busy = b1 || b2 || v2 || out_valid;
    // The second PE never refuses data: the first PE stops only at frames.
    always_ff @(posedge clk) if (rst_n && v1) assert (r2) else $error("column_processor: PE2 overrun");
  end else begin : g_53
    assign out_valid = v1;
    assign out_data  = d1;
    assign out_hi    = h1;
    assign busy      = b1;
  end
endmodule
