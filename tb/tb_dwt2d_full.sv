// tb_dwt2d_full: one complete 512 x 512 frame through the default top
// (9/7 filter, 512 x 512 maximum image).
//
// The image is a smooth gradient with a random texture added, 8-bit. All
// 262144 coefficients are compared with the double-precision reference
// transform: each must be within 4.0 of it and the rms error over the frame
// must stay below 1.0 (keeping 5 fraction bits after every multiplication
// gives about 0.6 rms and a worst case near 3). Each position must be
// produced once, and the frame must take M*N + 5N + 20 cycles from first
// input to done. The coefficients as produced then go through the inverse
// transform, row by row: each sample must be within 2.0 of the reference
// inverse of those coefficients (rms below 1.0), the rms difference to the
// original image must stay below 1.0, and the inverse frame must take
// M*N + 5M + 21 cycles. The watchdog allows 2*M*N + 40N cycles.
module tb_dwt2d_full;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 512, M = 512;
  localparam int RW = $clog2(513), CW = $clog2(513), AW = $clog2(512*512);

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [RW-1:0] cfg_rows = RW'(N);
  logic [CW-1:0] cfg_cols = CW'(M);
  logic in_valid = 0;
  logic [7:0] raw_pix = '0;
  logic rdy, llw, hpv, done, busy;
  logic [AW-1:0] rda, lla;
  sample_t llwd, hpd;
  band_e hpb;
  logic [RW-1:0] hpr;
  logic [CW-1:0] hpc;

  dwt2d_top u_top (
    .clk, .rst_n, .cfg_rows, .cfg_cols, .src_sel(1'b0), .in_valid, .raw_pix,
    .ll_data('0), .in_ready(rdy), .ll_rd_addr(rda),
    .ll_wr_en(llw), .ll_wr_addr(lla), .ll_wr_data(llwd),
    .hp_valid(hpv), .hp_band(hpb), .hp_row(hpr), .hp_col(hpc), .hp_data(hpd),
    .done, .busy,
    .inv_cfg_rows(cfg_rows), .inv_cfg_cols(cfg_cols), .inv_in_valid(iv), .inv_in_data(idata),
    .inv_in_ready(irdy), .inv_out_valid(ov), .inv_out_row(orow), .inv_out_col(ocol),
    .inv_out_data(odata), .inv_done(idone), .inv_busy(ibusy));

  logic iv = 0;
  sample_t idata = '0;
  logic irdy, ov, idone, ibusy;
  logic [RW-1:0] orow;
  logic [CW-1:0] ocol;
  sample_t odata;

  real exp_y[];
  bit  got[];
  int  xi[];
  real maxerr = 0.0, sqerr = 0.0;
  int  nout = 0;
  sample_t cy[];      // coefficients as produced
  real inv_exp[];     // reference inverse of cy
  bit  inv_got[];
  real inv_maxerr = 0.0, inv_sqerr = 0.0, pix_sqerr = 0.0;
  int  inv_nout = 0;

  task automatic check_coef(band_e b, int row, int col, sample_t d);
    int r, c, k;
    real diff;
    r = 2 * row + int'(b[1]);
    c = 2 * col + int'(b[0]);
    k = r * M + c;
    nout++;
    if (got[k]) begin
      failures++; checks++;
      $display("FAIL repeated coefficient (%0d,%0d)", r, c);
      return;
    end
    got[k] = 1;
    cy[k] = d;
    diff = real'(d) / 32.0 - exp_y[k];
    if (diff < 0) diff = -diff;
    sqerr += diff * diff;
    if (diff > maxerr) maxerr = diff;
    if (diff > 4.0) begin
      failures++; checks++;
      if (failures < 10) $display("FAIL (%0d,%0d) got %f expected %f", r, c, real'(d) / 32.0, exp_y[k]);
    end
  endtask

  always @(posedge clk) if (rst_n && ov) begin
    int k;
    real v, diff;
    k = int'(orow) * M + int'(ocol);
    v = real'(odata) / 32.0;
    inv_nout++;
    if (inv_got[k]) begin
      failures++; checks++;
      $display("FAIL repeated inverse sample (%0d,%0d)", orow, ocol);
    end else begin
      inv_got[k] = 1;
      diff = v - inv_exp[k];
      if (diff < 0) diff = -diff;
      inv_sqerr += diff * diff;
      if (diff > inv_maxerr) inv_maxerr = diff;
      if (diff > 2.0) begin
        failures++; checks++;
        if (failures < 10) $display("FAIL inverse (%0d,%0d) got %f expected %f", orow, ocol, v, inv_exp[k]);
      end
      pix_sqerr += (v - real'(xi[k])) * (v - real'(xi[k]));
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (llw) check_coef(BAND_LL, int'(lla) / (M / 2), int'(lla) % (M / 2), llwd);
    if (hpv) check_coef(hpb, int'(hpr), int'(hpc), hpd);
  end

  initial begin
    real xr[];
    int unsigned t0;
    xi = new[N*M]; xr = new[N*M]; got = new[N*M]; cy = new[N*M]; inv_got = new[N*M];
    for (int r = 0; r < N; r++)
      for (int c = 0; c < M; c++) begin
        int v;
        v = (r + c) / 4 + $urandom_range(0, 127);
        xi[r*M + c] = (v > 255) ? 255 : v;
        xr[r*M + c] = real'(xi[r*M + c]);
      end
    dwt97_2d(xr, N, M, exp_y);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    t0 = cyc;
    for (int c = 0; c < M; c++)
      for (int r = 0; r < N; r++) begin
        in_valid = 1; raw_pix = 8'(xi[r*M + c]);
        @(negedge clk);
      end
    in_valid = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != N*M + 5*N + 20) begin
      failures++; $display("FAIL frame took %0d cycles, want %0d", cyc - t0, N*M + 5*N + 20);
    end
    checks++;
    if (nout != N*M) begin failures++; $display("FAIL %0d coefficients, want %0d", nout, N*M); end
    checks += nout;
    checks++;
    if ($sqrt(sqerr / real'(N*M)) > 1.0) begin failures++; $display("FAIL rms error too large"); end
    $display("frame cycles %0d, largest error %f, rms error %f", cyc - t0, maxerr, $sqrt(sqerr / real'(N*M)));

    // Inverse of the coefficients as produced, row by row.
    begin
      real yr[];
      yr = new[N*M];
      foreach (cy[i]) yr[i] = real'(cy[i]) / 32.0;
      idwt97_2d(yr, N, M, inv_exp);
    end
    repeat (2) @(negedge clk);
    t0 = cyc;
    for (int i = 0; i < N*M; i++) begin
      iv = 1; idata = cy[i];
      @(negedge clk);
    end
    iv = 0;
    while (!idone) @(negedge clk);
    checks++;
    if (cyc - t0 != N*M + 5*M + 21) begin
      failures++; $display("FAIL inverse frame took %0d cycles, want %0d", cyc - t0, N*M + 5*M + 21);
    end
    checks++;
    if (inv_nout != N*M) begin failures++; $display("FAIL %0d inverse samples, want %0d", inv_nout, N*M); end
    checks += inv_nout;
    checks++;
    if ($sqrt(inv_sqerr / real'(N*M)) > 1.0) begin failures++; $display("FAIL inverse rms error too large"); end
    checks++;
    if ($sqrt(pix_sqerr / real'(N*M)) > 1.0) begin failures++; $display("FAIL round-trip rms error too large"); end
    $display("inverse frame cycles %0d, largest error %f, rms error %f; round trip rms error %f (PSNR %f dB)",
             cyc - t0, inv_maxerr, $sqrt(inv_sqerr / real'(N*M)), $sqrt(pix_sqerr / real'(N*M)),
             10.0 * $log10(255.0 * 255.0 / (pix_sqerr / real'(N*M))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2*N*M + 40*N) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
