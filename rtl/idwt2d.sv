// idwt2d: one-level inverse 2-D discrete wavelet transform, 5/3 or 9/7.
//
// The input is the coefficient array of an N x M image in the interleaved
// layout the forward transform defines (row 2i / 2i+1 = vertical low / high,
// column 2j / 2j+1 = horizontal low / high, so LL sits at even row and even
// column), scanned row by row, one sample per cycle. The same three parts as
// the forward transform run concurrently:
//   - idwt_column_processor undoes the horizontal transform of each scanned
//     row (a row is a "column" of M samples for this processor);
//   - transpose_buffer (1.5M words) pairs rows 2i and 2i+1 position by
//     position;
//   - idwt_row_processor undoes the vertical transform of all M image
//     columns in step as those pairs arrive.
// Scanning row by row lets the same column-then-row structure undo the
// forward transform (columns first, rows second) in the exact reverse order,
// which makes the reversible 5/3 result bit-exact.
//
// Output: the reconstructed samples (Q11.5) with their row and column. Even
// rows come out in the order row 0, 2, 4, ..., each with columns 0..M-1,
// odd rows likewise, the two kinds interleaved; a frame's odd row N-1 comes
// out last, after 2M flush cycles when no frame follows at once.
//
// Frame protocol: set cfg_rows = N, cfg_cols = M (both even, >= 2), then
// present the N*M coefficients on consecutive cycles while in_ready is
// high; done pulses with the last output, N*M + 3M + 10 (5/3) or
// N*M + 5M + 21 (9/7) cycles after the first input.
//
// The inverse column processor's odd-sample flag is left open: the
// transposing buffer needs only the sample order.
//
// The inverse data path in column-row order with the same components follows
// the published inverse architecture; the row-by-row scan, the output
// addressing and the handshake are this design's own.
module idwt2d
  import dwt_pkg::*;
#(
  parameter filter_e     FILTER   = F97,
  parameter int unsigned MAX_ROWS = 512,   // N, image height
  parameter int unsigned MAX_COLS = 512,   // M, image width
  localparam int unsigned RW = $clog2(MAX_ROWS+1),
  localparam int unsigned CW = $clog2(MAX_COLS+1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [RW-1:0] cfg_rows,
  input  logic [CW-1:0] cfg_cols,
  input  logic          in_valid,
  input  sample_t       in_data,
  output logic          in_ready,
  output logic          out_valid,
  output logic [RW-1:0] out_row,
  output logic [CW-1:0] out_col,
  output sample_t       out_data,
  output logic          done,
  output logic          busy
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic [RW-1:0] in_r;
  logic [CW-1:0] in_c;
  logic          accept, last_in, last_out, cp_ready;

  assign in_ready = (state != S_DRAIN) && cp_ready;
  assign accept   = in_valid && in_ready;
  assign last_in  = accept && (in_r == cfg_rows - 1'b1) && (in_c == cfg_cols - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      in_r <= '0; in_c <= '0;
    end else begin
      if (accept) begin
        if (in_c == cfg_cols - 1'b1) begin
          in_c <= '0;
          in_r <= (in_r == cfg_rows - 1'b1) ? '0 : in_r + 1'b1;
        end else begin
          in_c <= in_c + 1'b1;
        end
      end
      unique case (state)
        S_IDLE:  if (accept) state <= last_in ? S_DRAIN : S_RUN;
        S_RUN:   if (last_in) state <= S_DRAIN;
        S_DRAIN: if (last_out) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  logic    c_v, c_busy, t_v, t_busy, r_v, r_odd, r_busy, r_ready;
  sample_t c_d, t_d, r_d;

  idwt_column_processor #(.FILTER (FILTER), .MAX_N (MAX_COLS)) u_col (
    .clk, .rst_n, .cfg_n (cfg_cols),
    .in_valid (accept), .in_data, .in_ready (cp_ready),
    .out_valid (c_v), .out_data (c_d), .out_odd (), .busy (c_busy)
  );

  transpose_buffer #(.MAX_ROWS (MAX_COLS)) u_tb (
    .clk, .rst_n, .cfg_rows (cfg_cols),
    .in_valid (c_v), .in_data (c_d),
    .out_valid (t_v), .out_data (t_d), .busy (t_busy)
  );

  idwt_row_processor #(.FILTER (FILTER), .MAX_ROWS (MAX_COLS), .MAX_COLS (MAX_ROWS)) u_row (
    .clk, .rst_n, .cfg_rows (cfg_cols), .cfg_cols (cfg_rows),
    .in_valid (t_v), .in_data (t_d), .in_ready (r_ready),
    .out_valid (r_v), .out_data (r_d), .out_odd (r_odd), .busy (r_busy)
  );

  // Output addressing: even and odd outputs each run through (pair, column)
  // on their own counters.
  logic [CW-1:0] e_c, o_c;
  logic [RW-1:0] e_p, o_p, half_rows;
  assign half_rows = cfg_rows >> 1;
  assign last_out  = r_v && r_odd && (o_c == cfg_cols - 1'b1) && (o_p == half_rows - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_c <= '0; e_p <= '0; o_c <= '0; o_p <= '0; done <= 1'b0;
    end else begin
      done <= last_out;
      if (r_v && !r_odd) begin
        if (e_c == cfg_cols - 1'b1) begin
          e_c <= '0;
          e_p <= (e_p == half_rows - 1'b1) ? '0 : e_p + 1'b1;
        end else begin
          e_c <= e_c + 1'b1;
        end
      end
      if (r_v && r_odd) begin
        if (o_c == cfg_cols - 1'b1) begin
          o_c <= '0;
          o_p <= (o_p == half_rows - 1'b1) ? '0 : o_p + 1'b1;
        end else begin
          o_c <= o_c + 1'b1;
        end
      end
    end
  end

  assign out_valid = r_v;
  assign out_data  = r_d;
  assign out_row   = r_odd ? RW'({o_p, 1'b1}) : RW'({e_p, 1'b0});
  assign out_col   = r_odd ? o_c : e_c;

  assign busy = (state != S_IDLE) || c_busy || t_busy || r_busy;

  always_ff @(posedge clk) if (rst_n && t_v) assert (r_ready) else $error("idwt2d: row processor overrun");
endmodule
