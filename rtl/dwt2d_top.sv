// dwt2d_top: one-level forward and inverse 2-D discrete wavelet transform,
// 5/3 or 9/7.
//
// An N x M image enters column by column, one sample per cycle, either as
// raw 8-bit pixels or, for a further decomposition level, as LL samples read
// back from an external N/2 x M/2 RAM (src_sel). The column processor
// transforms each column, the transposing buffer (1.5N words) turns the
// column-processed data into pairs of neighbouring columns, and the row
// processor (2N words of partial-result memory per lifting step) transforms
// all N rows in step as those pairs arrive. The three run concurrently.
// LL coefficients leave through a write port meant for the external RAM
// (address = row * M/2 + column of the LL band); the LH, HL and HH
// coefficients leave through the hp_* port with their band and position.
//
// FILTER = F53 uses one PE per processor (reversible integer 5/3);
// FILTER = F97 cascades two PEs and a scaling multiplier per processor.
//
// Frame protocol: set cfg_rows = N, cfg_cols = M (both even, >= 2,
// N <= MAX_ROWS, M <= MAX_COLS) and src_sel, then present the frame's M*N
// samples on consecutive cycles while in_ready is high (in_valid must not
// drop inside a frame). After the last sample in_ready stays low until every
// coefficient is out; done pulses with the last one. ll_rd_addr gives the
// external-RAM address of the sample expected in the current cycle, so an
// asynchronous-read RAM can drive ll_data directly.
//
// Timing: the first row-transformed pair appears about 2N cycles after the
// first input (N for the transposing buffer, N for the first column pair of
// all rows). A frame of M*N samples takes about M*N + 3N cycles plus the
// processor latencies (5 per 5/3 processor, 11 per 9/7 processor); the last
// 2N of these are the rows' right-boundary pairs.
//
// Sample format: Q11.5 (see dwt_pkg). Raw pixels are taken as unsigned
// integers without level shift.
//
// The inverse transform (idwt2d, inv_* ports) sits beside the forward one
// with its own frame interface: it takes the interleaved coefficient array
// of a level row by row and returns the reconstructed samples with their
// positions. It is built from the same three kinds of parts (column
// processor, transposing buffer, row processor) as the forward transform,
// but as separate hardware, so both can run at once; sharing one set of
// parts between the two directions is not done here.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter filter_e     FILTER   = F97,
  parameter int unsigned MAX_ROWS = 512,   // N, image height
  parameter int unsigned MAX_COLS = 512,   // M, image width
  localparam int unsigned RW = $clog2(MAX_ROWS+1),
  localparam int unsigned CW = $clog2(MAX_COLS+1),
  localparam int unsigned AW = $clog2(MAX_ROWS*MAX_COLS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [RW-1:0]      cfg_rows,
  input  logic [CW-1:0]      cfg_cols,
  input  logic               src_sel,     // 0: raw pixels, 1: LL from RAM
  input  logic               in_valid,
  input  logic [PIX_W-1:0]   raw_pix,
  input  sample_t            ll_data,
  output logic               in_ready,
  output logic [AW-1:0]      ll_rd_addr,
  // LL band to the external RAM
  output logic               ll_wr_en,
  output logic [AW-1:0]      ll_wr_addr,
  output sample_t            ll_wr_data,
  // LH, HL, HH bands
  output logic               hp_valid,
  output band_e              hp_band,
  output logic [RW-1:0]      hp_row,      // row within the sub-band
  output logic [CW-1:0]      hp_col,      // column within the sub-band
  output sample_t            hp_data,
  output logic               done,
  output logic               busy,
  // Inverse transform (idwt2d), side by side with the forward one
  input  logic [RW-1:0]      inv_cfg_rows,
  input  logic [CW-1:0]      inv_cfg_cols,
  input  logic               inv_in_valid,
  input  sample_t            inv_in_data,
  output logic               inv_in_ready,
  output logic               inv_out_valid,
  output logic [RW-1:0]      inv_out_row,
  output logic [CW-1:0]      inv_out_col,
  output sample_t            inv_out_data,
  output logic               inv_done,
  output logic               inv_busy
);
  // ---------------- frame control ----------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e state;

  logic [RW-1:0] in_r;           // position of the next input sample
  logic [CW-1:0] in_c;
  logic [AW-1:0] rd_col_base;    // in_c, as a RAM address offset
  logic          accept, last_in, last_out;
  logic          cp_ready;

  assign in_ready = (state != S_DRAIN) && cp_ready;
  assign accept   = in_valid && in_ready;
  assign last_in  = accept && (in_r == cfg_rows - 1'b1) && (in_c == cfg_cols - 1'b1);

  // The stored LL band of the previous level is row-major, cfg_cols wide.
  assign ll_rd_addr = AW'(in_r) * AW'(cfg_cols) + rd_col_base;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      in_r <= '0; in_c <= '0; rd_col_base <= '0;
    end else begin
      if (accept) begin
        if (in_r == cfg_rows - 1'b1) begin
          in_r <= '0;
          if (in_c == cfg_cols - 1'b1) begin
            in_c <= '0;
            rd_col_base <= '0;
          end else begin
            in_c <= in_c + 1'b1;
            rd_col_base <= rd_col_base + 1'b1;
          end
        end else begin
          in_r <= in_r + 1'b1;
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

  // ---------------- input multiplexer ------------------------------------
  sample_t in_sample;
  assign in_sample = src_sel ? ll_data
                             : sample_t'({{(DATA_W-PIX_W-FRAC_W){1'b0}}, raw_pix, {FRAC_W{1'b0}}});

  // ---------------- the three components ---------------------------------
  logic    c_v, c_h, c_busy, t_v, t_busy, r_v, r_h, r_busy, r_ready;
  sample_t c_d, t_d, r_d;

  column_processor #(.FILTER (FILTER), .MAX_N (MAX_ROWS)) u_col (
    .clk, .rst_n, .cfg_n (cfg_rows),
    .in_valid (accept), .in_data (in_sample), .in_ready (cp_ready),
    .out_valid (c_v), .out_data (c_d), .out_hi (c_h), .busy (c_busy)
  );

  transpose_buffer #(.MAX_ROWS (MAX_ROWS)) u_tb (
    .clk, .rst_n, .cfg_rows,
    .in_valid (c_v), .in_data (c_d),
    .out_valid (t_v), .out_data (t_d), .busy (t_busy)
  );

  row_processor #(.FILTER (FILTER), .MAX_ROWS (MAX_ROWS), .MAX_COLS (MAX_COLS)) u_row (
    .clk, .rst_n, .cfg_rows, .cfg_cols,
    .in_valid (t_v), .in_data (t_d), .in_ready (r_ready),
    .out_valid (r_v), .out_data (r_d), .out_hi (r_h), .busy (r_busy)
  );

  // ---------------- output routing ---------------------------------------
  // Row-processor output order: for pair index p, rows 0..N-1, L then H.
  logic [RW-1:0] o_r;
  logic [CW-1:0] o_p;
  logic [CW-1:0] half_cols;
  assign half_cols = cfg_cols >> 1;
  assign last_out  = r_v && r_h && (o_r == cfg_rows - 1'b1) && (o_p == half_cols - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_r <= '0; o_p <= '0; done <= 1'b0;
    end else begin
      done <= last_out;
      if (r_v && r_h) begin
        if (o_r == cfg_rows - 1'b1) begin
          o_r <= '0;
          o_p <= (o_p == half_cols - 1'b1) ? '0 : o_p + 1'b1;
        end else begin
          o_r <= o_r + 1'b1;
        end
      end
    end
  end

  band_e band;
  assign band       = band_e'({o_r[0], r_h});
  assign ll_wr_en   = r_v && (band == BAND_LL);
  assign ll_wr_addr = AW'(o_r >> 1) * AW'(half_cols) + AW'(o_p);
  assign ll_wr_data = r_d;
  assign hp_valid   = r_v && (band != BAND_LL);
  assign hp_band    = band;
  assign hp_row     = o_r >> 1;
  assign hp_col     = o_p;
  assign hp_data    = r_d;

  assign busy = (state != S_IDLE) || c_busy || t_busy || r_busy;

  // ---------------- inverse transform ------------------------------------
  idwt2d #(.FILTER (FILTER), .MAX_ROWS (MAX_ROWS), .MAX_COLS (MAX_COLS)) u_inv (
    .clk, .rst_n, .cfg_rows (inv_cfg_rows), .cfg_cols (inv_cfg_cols),
    .in_valid (inv_in_valid), .in_data (inv_in_data), .in_ready (inv_in_ready),
    .out_valid (inv_out_valid), .out_row (inv_out_row), .out_col (inv_out_col),
    .out_data (inv_out_data), .done (inv_done), .busy (inv_busy)
  );

  // The row processor takes the transposing buffer's stream as it comes.
  always_ff @(posedge clk) if (rst_n && t_v) assert (r_ready) else $error("dwt2d_top: row processor overrun");
endmodule
