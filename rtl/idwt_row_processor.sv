// idwt_row_processor: 1-D inverse DWT of N interleaved lines at once (the
// inverse counterpart of row_processor).
//
// Input: the transposing buffer's stream, for each coefficient pair index j
// the pair (s_j, d_j) of every line in turn, one sample per cycle. Each line
// is advanced by one pair as its two samples arrive; the partial results a
// line carries between pairs sit in two N-word memories (E_MEM, T_MEM) per
// inverse PE.
//   FILTER = F53: one reversible inverse PE.
//   FILTER = F97: K2^-1 on the high-pass input -> inverse PE -> inverse PE
//                 -> scaling multiplier, with the coefficients of
//                 idwt_column_processor.
// Output: for each pair slot of each line, the previous pair's odd sample
// x(2j-1) (out_odd = 1) and then the even sample x(2j); a line's last odd
// sample comes in the slot of its next pair index (next frame, or a flush
// slot). Within each kind (even, odd) the order is pair index by pair
// index, lines 0..N-1 within each.
//
// The first 9/7 PE gives (D_{j-1}, G_j) per slot, but the second one needs
// (s_j, d_j) of the same j: the first PE therefore runs with REALIGN, which
// keeps each line's G for one slot in a further N-word memory (5N words in
// all for 9/7, 2N for 5/3). This realignment is this design's own choice;
// the published inverse data path is stated to have the same structure as
// the forward one.
//
// The first PE's odd-sample flag is unused: after realignment the second PE
// tracks the sample order itself.
//
// cfg_rows = N lines (>= 1), cfg_cols = line length (even, >= 2); a frame
// must arrive on consecutive cycles while in_ready is high.
module idwt_row_processor
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
  output logic    out_odd,
  output logic    busy
);
  localparam int unsigned MAX_PAIRS = MAX_COLS / 2;
  localparam int unsigned PW = $clog2(MAX_PAIRS+1);

  logic [PW-1:0] pairs;
  assign pairs = PW'(cfg_cols >> 1);

  if (FILTER == F53) begin : g_53
    ilift_pe #(
      .MAX_ROWS (MAX_ROWS), .MAX_PAIRS (MAX_PAIRS), .LOSSLESS (1'b1),
      .SHR_EVEN (1'b0), .H_SUB (1'b0), .H_SHL (1'b0),
      .C_S (C53I_S), .C_D (C53I_D)
    ) u_pe1 (
      .clk, .rst_n, .cfg_rows, .cfg_pairs (pairs),
      .in_valid, .in_data, .in_ready,
      .out_valid, .out_data, .out_odd, .busy
    );
  end else begin : g_97
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
      .MAX_ROWS (MAX_ROWS), .MAX_PAIRS (MAX_PAIRS), .LOSSLESS (1'b0),
      .SHR_EVEN (1'b1), .H_SUB (1'b1), .H_SHL (1'b0), .REALIGN (1'b1),
      .C_S (C97I_GAMMA_K1), .C_D (C97I_DELTA_GAMMA)
    ) u_pe1 (
      .clk, .rst_n, .cfg_rows, .cfg_pairs (pairs),
      .in_valid, .in_data (pre), .in_ready,
      .out_valid (v1), .out_data (d1), .out_odd (o1), .busy (b1)
    );
    ilift_pe #(
      .MAX_ROWS (MAX_ROWS), .MAX_PAIRS (MAX_PAIRS), .LOSSLESS (1'b0),
      .SHR_EVEN (1'b0), .H_SUB (1'b1), .H_SHL (1'b1), .IN_REG (1'b0),
      .C_S (C97I_ALPHA_GAMMA), .C_D (C97I_BETA_ALPHA)
    ) u_pe2 (
      .clk, .rst_n, .cfg_rows, .cfg_pairs (pairs),
      .in_valid (v1), .in_data (d1), .in_ready (r2),
      .out_valid (v2), .out_data (d2), .out_odd (o2), .busy (b2)
    );
    scale_mult #(.K_LOW (C97I_ALPHA_INV), .K_HIGH (C_TWO)) u_scale (
      .clk, .rst_n, .in_valid (v2), .in_data (d2), .in_hi (o2),
      .out_valid, .out_data, .out_hi (out_odd)
    );
    assign busy = b1 || b2 || v2 || out_valid || in_hi;
    always_ff @(posedge clk) if (rst_n && v1) assert (r2) else $error("idwt_row_processor: PE2 overrun");
  end
endmodule
