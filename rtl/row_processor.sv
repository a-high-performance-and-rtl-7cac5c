// row_processor: 1-D forward DWT along the rows, N rows at once.
//
// The input is the transposing buffer's stream: for each column pair
// (2j, 2j+1) the pairs of all rows in turn, x(0,2j), x(0,2j+1), x(1,2j),
// x(1,2j+1), ..., x(N-1,2j+1). As soon as a row's two new samples are in,
// that row's transform is advanced by one pair: the partial results a row
// carries between pairs are kept in two N-word memories (Sum_MEM, T_MEM) per
// PE, so only 2N words per lifting step are needed instead of all pipeline
// registers times N.
//   FILTER = F53: one reversible row PE.
//   FILTER = F97: two row PEs and the scaling multiplier, as in the column
//                 processor.
// The output has the same row-interleaved pair order: for each output pair
// index p, rows 0..N-1 each give L then H. The right-boundary pairs of a
// frame come out after the last input pair, through N flush slots (2N
// cycles) that each PE runs when no new frame follows at once.
//
// cfg_rows = N (even, >= 2) rows, cfg_cols = M (even, >= 2) columns; a frame
// must arrive on consecutive cycles. Memory organisation follows the published
// row processor; the flush and handshake are this design's own.
module row_processor
  import dwt_pkg::*;
#(
  parameter filter_e     FILTER   = F97,
  parameter int unsigned MAX_ROWS = 512,
  parameter int unsigned MAX_COLS = 512
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic [$clog2(MAX_ROWS+1)-1:0] cfg_rows,
  input  logic [$clog2(MAX_COLS+1)-1:0] cfg_cols,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    in_ready,
  output logic    out_valid,
  output sample_t out_data,
  output logic    out_hi,
  output logic    busy
);
  localparam int unsigned MAX_PAIRS = MAX_COLS / 2;
  localparam int unsigned PW = $clog2(MAX_PAIRS+1);

  logic [PW-1:0] pairs;
  assign pairs = PW'(cfg_cols >> 1);

  logic    v1;
  sample_t d1;
  logic    h1, r1, b1;

  lift_pe #(
    .MAX_ROWS (MAX_ROWS), .MAX_PAIRS (MAX_PAIRS),
    .LOSSLESS (FILTER == F53), .SHR_EVEN (1'b0),
    .C_EVEN   ((FILTER == F53) ? C53_BETA_ALPHA : C97_BETA_ALPHA),
    .C_ODD    ((FILTER == F53) ? C53_BETA       : C97_BETA)
  ) u_pe1 (
    .clk, .rst_n, .cfg_rows, .cfg_pairs (pairs),
    .in_valid, .in_data, .in_ready (r1),
    .out_valid (v1), .out_data (d1), .out_hi (h1), .busy (b1)
  );

  assign in_ready = r1;

  if (FILTER == F97) begin : g_97
    logic    v2, h2, b2, r2;
    sample_t d2;
    lift_pe #(
      .MAX_ROWS (MAX_ROWS), .MAX_PAIRS (MAX_PAIRS),
      .LOSSLESS (1'b0), .SHR_EVEN (1'b1), .IN_REG (1'b0),
      .C_EVEN   (C97_DELTA_GAMMA), .C_ODD (C97_DELTA_BETA)
    ) u_pe2 (
      .clk, .rst_n, .cfg_rows, .cfg_pairs (pairs),
      .in_valid (v1), .in_data (d1), .in_ready (r2),
      .out_valid (v2), .out_data (d2), .out_hi (h2), .busy (b2)
    );
    scale_mult #(.K_LOW (C97_K1), .K_HIGH (C97_K2_DELTA)) u_scale (
      .clk, .rst_n, .in_valid (v2), .in_data (d2), .in_hi (h2),
      .out_valid, .out_data, .out_hi
    );
    assign busy = b1 || b2 || v2 || out_valid;
    always_ff @(posedge clk) if (rst_n && v1) assert (r2) else $error("row_processor: PE2 overrun");
  end else begin : g_53
    assign out_valid = v1;
    assign out_data  = d1;
    assign out_hi    = h1;
    assign busy      = b1;
  end
endmodule
