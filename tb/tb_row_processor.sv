// tb_row_processor: self-checking test of the row processor.
//
// A 5/3 and a 9/7 row processor (4 rows, 8 columns) receive data in the
// transposing buffer's order: for each column pair, the pair of every row in
// turn. Two frames go back to back (the second frame's first column pair
// finishes the first frame's rows), then a pause lets each PE flush the last
// frame on its own. Outputs must come in the same order (pair index, row,
// low then high) and match the reference lifting of each row: exact for 5/3,
// within 2.0 for 9/7. The first frame's first output must appear once the
// second column pair of row 0 is in, 2N+5 cycles (5/3) after the first input.
module tb_row_processor;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 4, M = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid;
  sample_t in_data;
  logic r53, v53, h53, b53, r97, v97, h97, b97;
  sample_t d53, d97;

  row_processor #(.FILTER(F53), .MAX_ROWS(N), .MAX_COLS(M)) u_r53 (
    .clk, .rst_n, .cfg_rows(3'(N)), .cfg_cols(4'(M)), .in_valid, .in_data, .in_ready(r53),
    .out_valid(v53), .out_data(d53), .out_hi(h53), .busy(b53));
  row_processor #(.FILTER(F97), .MAX_ROWS(N), .MAX_COLS(M)) u_r97 (
    .clk, .rst_n, .cfg_rows(3'(N)), .cfg_cols(4'(M)), .in_valid, .in_data, .in_ready(r97),
    .out_valid(v97), .out_data(d97), .out_hi(h97), .busy(b97));

  int  q53[$];
  real q97[$];
  bit  qh[$], qh97[$];
  real maxerr = 0.0;
  int unsigned first_in, first53;
  bit seen53 = 0;

  task automatic send_frame();
    int x[N][M];
    int y53[N][M];
    real y97[N][M];
    for (int r = 0; r < N; r++) begin
      int xi[]; int t[]; real xr[]; real tr[];
      xi = new[M]; xr = new[M];
      for (int c = 0; c < M; c++) begin
        x[r][c] = $urandom_range(0, 600) - 300;
        xi[c] = x[r][c];
        xr[c] = real'(x[r][c]);
      end
      lift53_1d(xi, t);
      lift97_1d(xr, tr);
      for (int c = 0; c < M; c++) begin y53[r][c] = t[c]; y97[r][c] = tr[c]; end
    end
    for (int p = 0; p < M/2; p++)
      for (int r = 0; r < N; r++)
        for (int k = 0; k < 2; k++) begin
          q53.push_back(y53[r][2*p+k]); qh.push_back(k[0]);
          q97.push_back(y97[r][2*p+k]); qh97.push_back(k[0]);
        end
    for (int p = 0; p < M/2; p++)
      for (int r = 0; r < N; r++)
        for (int k = 0; k < 2; k++) begin
          in_valid = 1; in_data = sample_t'(x[r][2*p+k] * 32);
          @(negedge clk);
        end
    in_valid = 0;
  endtask

  int  e_i;
  real e_r, diff;
  bit  eh;
  always @(posedge clk) if (rst_n) begin
    if (v53) begin
      if (!seen53) begin first53 = cyc; seen53 = 1; end
      checks++;
      if (q53.size() == 0) begin failures++; $display("FAIL 5/3 unexpected output"); end
      else begin
        e_i = q53.pop_front();
        eh = qh.pop_front();
        if (d53 != sample_t'(e_i * 32) || h53 != eh) begin
          failures++; $display("FAIL 5/3 got %0d expected %0d", d53 / 32, e_i);
        end
      end
    end
    if (v97) begin
      checks++;
      if (q97.size() == 0) begin failures++; $display("FAIL 9/7 unexpected output"); end
      else begin
        e_r = q97.pop_front();
        eh = qh97.pop_front();
        diff = real'(d97) / 32.0 - e_r;
        if (diff < 0) diff = -diff;
        if (diff > maxerr) maxerr = diff;
        if (diff > 2.0 || h97 != eh) begin
          failures++; $display("FAIL 9/7 got %f expected %f", real'(d97) / 32.0, e_r);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    first_in = cyc;
    send_frame();
    send_frame();
    repeat (60) @(negedge clk);
    checks++;
    if (first53 - first_in != 2*N + 4) begin
      failures++; $display("FAIL first output after %0d cycles, want %0d", first53 - first_in, 2*N + 4);
    end
    send_frame();
    repeat (60) @(negedge clk);
    checks++;
    if (q53.size() != 0 || q97.size() != 0 || b53 || b97) begin
      failures++; $display("FAIL outputs missing or still busy");
    end
    $display("9/7 largest error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
