// transpose_buffer: reorders column-processed data into row pairs.
//
// Input: the column processor's output, column by column, x_c(0,c) ...
// x_c(N-1,c), one sample per cycle. Output: for each column pair (c, c+1),
// x_c(0,c), x_c(0,c+1), x_c(1,c), x_c(1,c+1), ..., x_c(N-1,c+1), which is
// what the row processor consumes.
//
// An even column is written into Even_MEM (N words). When the first sample of
// the following odd column arrives, output starts and then runs at one
// sample per cycle: the even samples come from Even_MEM and the odd samples
// from Odd_MEM (N/2 words), which only has to hold the odd samples that
// arrive faster than they can leave. Both memories are read and written in
// first-in first-out order, so a simple wrapping pointer addresses each.
// While the odd column's second half is still being output, the next even
// column is already being written behind it. Output sample k of a column
// pair leaves N+k cycles after the pair's first input sample (latency N);
// the output is continuous over a frame and ends N cycles after the input.
//
// cfg_rows = N (even, >= 2). The memory split (N + N/2 words), the start of
// output at the first odd-column sample and the cycle-by-cycle order follow
// the published description and data-flow table; the FIFO addressing is this
// design's own.
module transpose_buffer
  import dwt_pkg::*;
#(
  parameter int unsigned MAX_ROWS = 512
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic [$clog2(MAX_ROWS+1)-1:0] cfg_rows,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_data,
  output logic    busy
);
  localparam int unsigned EW = $clog2(MAX_ROWS);
  localparam int unsigned OW = (MAX_ROWS > 2) ? $clog2(MAX_ROWS/2) : 1;
  localparam int unsigned CW = $clog2(2*MAX_ROWS+1);

  sample_t even_mem [MAX_ROWS];
  sample_t odd_mem  [MAX_ROWS/2];

  logic [EW-1:0] ewr, erd;       // Even_MEM write / read pointers
  logic [OW-1:0] owr, ord;       // Odd_MEM write / read pointers
  logic [EW-1:0] in_row;         // row of the incoming sample
  logic          in_odd;         // incoming sample belongs to an odd column
  logic [CW-1:0] owed;           // outputs still to produce
  logic          out_odd;        // next output comes from Odd_MEM
  logic [EW-1:0] half_m1, rows_m1;

  assign rows_m1 = EW'(cfg_rows - 1'b1);
  assign half_m1 = EW'((cfg_rows >> 1) - 1'b1);

  // Output starts in the cycle the first odd-column sample arrives.
  logic start;
  assign start     = in_valid && in_odd && (in_row == '0);
  assign out_valid = (owed != '0) || start;
  assign out_data  = out_odd ? odd_mem[ord] : even_mem[erd];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ewr <= '0; erd <= '0; owr <= '0; ord <= '0;
      in_row <= '0; in_odd <= 1'b0; owed <= '0; out_odd <= 1'b0;
    end else begin
      if (in_valid) begin
        if (in_row == rows_m1) begin
          in_row <= '0;
          in_odd <= !in_odd;
        end else begin
          in_row <= in_row + 1'b1;
        end
        if (!in_odd) ewr <= (ewr == rows_m1) ? '0 : ewr + 1'b1;
        else         owr <= (owr == OW'(half_m1)) ? '0 : owr + 1'b1;
      end
      if (out_valid) begin
        owed    <= owed + (start ? CW'(2 * cfg_rows) : '0) - 1'b1;
        out_odd <= !out_odd;
        if (out_odd) ord <= (ord == OW'(half_m1)) ? '0 : ord + 1'b1;
        else         erd <= (erd == rows_m1) ? '0 : erd + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !in_odd) even_mem[ewr] <= in_data;
    if (in_valid &&  in_odd) odd_mem[owr]  <= in_data;
  end

  assign busy = (owed != '0) || in_odd || (in_row != '0);
endmodule
