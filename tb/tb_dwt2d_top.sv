// tb_dwt2d_top: end-to-end test of the one-level 2-D DWT, both filters.
//
// Two tops are tested one after the other: the default 9/7 design and a 5/3
// design. Each runs a multi-level decomposition: level 1 on a random raw
// image, and each further level on the LL band that the previous level wrote
// to the external RAM, read back through the LL input (the RAM is modelled
// here as two banks used in turn). Every coefficient is compared with the
// reference 2-D transform of that level's input (exact for 5/3, within 3.0
// for 9/7), and each sub-band position must be written exactly once. The
// frame time from first input to done must be M*N + 3N + 10 cycles for 5/3
// and M*N + 5N + 20 for 9/7 (each row PE waits 2N cycles for the second
// column pair before its first output).
//
// After each level-1 frame the coefficients as produced go through the
// inverse transform, row by row: the 5/3 result must be the original image
// exactly, the 9/7 result within 2.0 of the reference inverse of those
// coefficients; every position must come out once and the inverse frame
// time must be M*N + 3M + 10 (5/3) or M*N + 5M + 21 (9/7) cycles.
//
// Mechanisms counted (each must occur): frames from raw pixels, frames from
// the LL feedback path, inverse frames, column-pair hand-over inside the
// transposing buffer (odd-column output start), self-flush of a row PE at
// frame end, LL writes and LH/HL/HH outputs of every band.
module tb_dwt2d_top;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int RW = $clog2(513), CW = $clog2(513), AW = $clog2(512*512);

  // Shared stimulus
  logic [RW-1:0] cfg_rows;
  logic [CW-1:0] cfg_cols;
  logic src_sel;
  logic [7:0] raw_pix;
  logic v97, v53;
  // Inverse side
  logic iv97, iv53;
  sample_t idata;
  logic irdy97, irdy53, ov97, ov53, idone97, idone53, ibusy97, ibusy53;
  logic [RW-1:0] orow97, orow53;
  logic [CW-1:0] ocol97, ocol53;
  sample_t odata97, odata53;

  // ---------------- 9/7 top (all defaults) --------------------------------
  logic rdy97, llw97, hpv97, done97, busy97;
  logic [AW-1:0] rda97, lla97;
  sample_t lld97, llwd97, hpd97;
  band_e hpb97;
  logic [RW-1:0] hpr97;
  logic [CW-1:0] hpc97;
  dwt2d_top u_top97 (
    .clk, .rst_n, .cfg_rows, .cfg_cols, .src_sel, .in_valid(v97), .raw_pix,
    .ll_data(lld97), .in_ready(rdy97), .ll_rd_addr(rda97),
    .ll_wr_en(llw97), .ll_wr_addr(lla97), .ll_wr_data(llwd97),
    .hp_valid(hpv97), .hp_band(hpb97), .hp_row(hpr97), .hp_col(hpc97), .hp_data(hpd97),
    .done(done97), .busy(busy97),
    .inv_cfg_rows(cfg_rows), .inv_cfg_cols(cfg_cols), .inv_in_valid(iv97), .inv_in_data(idata),
    .inv_in_ready(irdy97), .inv_out_valid(ov97), .inv_out_row(orow97), .inv_out_col(ocol97),
    .inv_out_data(odata97), .inv_done(idone97), .inv_busy(ibusy97));

  // ---------------- 5/3 top ----------------------------------------------
  logic rdy53, llw53, hpv53, done53, busy53;
  logic [AW-1:0] rda53, lla53;
  sample_t lld53, llwd53, hpd53;
  band_e hpb53;
  logic [RW-1:0] hpr53;
  logic [CW-1:0] hpc53;
  dwt2d_top #(.FILTER(F53)) u_top53 (
    .clk, .rst_n, .cfg_rows, .cfg_cols, .src_sel, .in_valid(v53), .raw_pix,
    .ll_data(lld53), .in_ready(rdy53), .ll_rd_addr(rda53),
    .ll_wr_en(llw53), .ll_wr_addr(lla53), .ll_wr_data(llwd53),
    .hp_valid(hpv53), .hp_band(hpb53), .hp_row(hpr53), .hp_col(hpc53), .hp_data(hpd53),
    .done(done53), .busy(busy53),
    .inv_cfg_rows(cfg_rows), .inv_cfg_cols(cfg_cols), .inv_in_valid(iv53), .inv_in_data(idata),
    .inv_in_ready(irdy53), .inv_out_valid(ov53), .inv_out_row(orow53), .inv_out_col(ocol53),
    .inv_out_data(odata53), .inv_done(idone53), .inv_busy(ibusy53));

  // ---------------- external RAM model: two banks -------------------------
  localparam int RAM_WORDS = 64 * 64;
  sample_t ram97 [2][RAM_WORDS];
  sample_t ram53 [2][RAM_WORDS];
  int wr_bank = 0;  // bank the current level writes; the other is read
  assign lld97 = ram97[1 - wr_bank][rda97 % RAM_WORDS];
  assign lld53 = ram53[1 - wr_bank][rda53 % RAM_WORDS];
  always @(posedge clk) begin
    if (llw97) ram97[wr_bank][lla97 % RAM_WORDS] <= llwd97;
    if (llw53) ram53[wr_bank][lla53 % RAM_WORDS] <= llwd53;
  end

  // ---------------- expected results of the current level -----------------
  real exp_y[];   // y[r*M + c], 9/7 reference or 5/3 integers
  bit  got[];
  sample_t cy[];  // coefficients as produced, for the inverse run
  int  n_inv_frames = 0;
  int  cur_m;
  bit  cur_53;
  real maxerr = 0.0;
  int  n_band[4];
  int  n_raw_frames = 0, n_ll_frames = 0, n_tb_starts = 0, n_flush = 0;

  task automatic check_coef(band_e b, int row, int col, sample_t d);
    int r, c, k;
    real diff;
    r = 2 * row + int'(b[1]);
    c = 2 * col + int'(b[0]);
    k = r * cur_m + c;
    checks++;
    n_band[b]++;
    if (k >= exp_y.size() || got[k]) begin
      failures++;
      $display("FAIL band %0d (%0d,%0d): out of range or repeated", b, row, col);
      return;
    end
    got[k] = 1;
    cy[k] = d;
    diff = real'(d) / 32.0 - exp_y[k];
    if (diff < 0) diff = -diff;
    if (!cur_53 && diff > maxerr) maxerr = diff;
    if (cur_53 ? (diff != 0.0) : (diff > 3.0)) begin
      failures++;
      $display("FAIL %s band %0d (%0d,%0d): got %f expected %f", cur_53 ? "5/3" : "9/7",
               b, row, col, real'(d) / 32.0, exp_y[k]);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (llw97) check_coef(BAND_LL, int'(lla97) / (cur_m / 2), int'(lla97) % (cur_m / 2), llwd97);
    if (hpv97) check_coef(hpb97, int'(hpr97), int'(hpc97), hpd97);
    if (llw53) check_coef(BAND_LL, int'(lla53) / (cur_m / 2), int'(lla53) % (cur_m / 2), llwd53);
    if (hpv53) check_coef(hpb53, int'(hpr53), int'(hpc53), hpd53);
    if (u_top97.u_tb.start || u_top53.u_tb.start) n_tb_starts++;
    if ((u_top97.u_row.u_pe1.flush_now && !u_top97.u_row.u_pe1.flushing) ||
        (u_top53.u_row.u_pe1.flush_now && !u_top53.u_row.u_pe1.flushing)) n_flush++;
  end

  // Run one level on an n x m input. level 1: random raw pixels; otherwise
  // the previous level's LL from the RAM bank not being written.
  task automatic run_level(input bit is53, input int n, input int m, input bit from_ll);
    real xr[]; int xi[]; int yi[];
    int unsigned t_start, t_done, want;
    xr = new[n*m]; xi = new[n*m];
    for (int r = 0; r < n; r++)
      for (int c = 0; c < m; c++) begin
        if (from_ll) begin
          sample_t s;
          s = is53 ? ram53[1 - wr_bank][r*m + c] : ram97[1 - wr_bank][r*m + c];
          xr[r*m + c] = real'(s) / 32.0;
          xi[r*m + c] = int'(s) / 32;
        end else begin
          xi[r*m + c] = $urandom_range(0, 255);
          xr[r*m + c] = real'(xi[r*m + c]);
        end
      end
    if (is53) begin
      dwt53_2d(xi, n, m, yi);
      exp_y = new[n*m];
      foreach (yi[i]) exp_y[i] = real'(yi[i]);
    end else begin
      dwt97_2d(xr, n, m, exp_y);
    end
    got = new[n*m];
    cy = new[n*m];
    cur_m = m; cur_53 = is53;
    cfg_rows = RW'(n); cfg_cols = CW'(m); src_sel = from_ll;
    if (from_ll) n_ll_frames++; else n_raw_frames++;
    t_start = cyc;
    for (int c = 0; c < m; c++)
      for (int r = 0; r < n; r++) begin
        raw_pix = from_ll ? 8'h00 : 8'(xi[r*m + c]);
        if (is53) v53 = 1; else v97 = 1;
        @(negedge clk);
        checks++;
        if (!(is53 ? rdy53 : rdy97) && !(r == n - 1 && c == m - 1)) begin
          failures++; $display("FAIL in_ready dropped inside a frame");
        end
      end
    v53 = 0; v97 = 0;
    while (!(is53 ? done53 : done97)) @(negedge clk);
    t_done = cyc;
    want = is53 ? (n*m + 3*n + 10) : (n*m + 5*n + 20);
    checks++;
    if (t_done - t_start != want) begin
      failures++;
      $display("FAIL frame %0dx%0d took %0d cycles, want %0d", n, m, t_done - t_start, want);
    end
    foreach (got[i]) if (!got[i]) begin
      failures++; $display("FAIL coefficient %0d never produced", i); break;
    end
    repeat (3) @(negedge clk);
    checks++;
    if (is53 ? busy53 : busy97) begin failures++; $display("FAIL busy after done"); end
    wr_bank = 1 - wr_bank;
    if (!from_ll) run_inverse(is53, n, m, xi);
  endtask

  // Inverse of the level just produced: the coefficients as the forward
  // transform gave them go in row by row; the 5/3 result must be the
  // original pixels, the 9/7 one within 2.0 of the reference inverse of
  // those coefficients.
  real inv_exp[];
  bit  inv_got[];
  real inv_maxerr = 0.0;
  int  inv_n_out = 0;

  always @(posedge clk) if (rst_n) begin
    if (ov97 || ov53) begin
      int k;
      real v, diff;
      k = (ov97 ? int'(orow97) : int'(orow53)) * cur_m + (ov97 ? int'(ocol97) : int'(ocol53));
      v = real'(ov97 ? odata97 : odata53) / 32.0;
      checks++;
      inv_n_out++;
      if (k >= inv_exp.size() || inv_got[k]) begin
        failures++; $display("FAIL inverse position %0d out of range or repeated", k);
      end else begin
        inv_got[k] = 1;
        diff = v - inv_exp[k];
        if (diff < 0) diff = -diff;
        if (!cur_53 && diff > inv_maxerr) inv_maxerr = diff;
        if (cur_53 ? (diff != 0.0) : (diff > 2.0)) begin
          failures++;
          $display("FAIL inverse %s sample %0d: got %f expected %f", cur_53 ? "5/3" : "9/7", k, v, inv_exp[k]);
        end
      end
    end
  end

  task automatic run_inverse(input bit is53, input int n, input int m, input int xi[]);
    real yr[];
    int unsigned t_start, t_done, want;
    inv_got = new[n*m];
    if (is53) begin
      inv_exp = new[n*m];
      foreach (xi[i]) inv_exp[i] = real'(xi[i]);
    end else begin
      yr = new[n*m];
      foreach (cy[i]) yr[i] = real'(cy[i]) / 32.0;
      idwt97_2d(yr, n, m, inv_exp);
    end
    inv_n_out = 0;
    n_inv_frames++;
    t_start = cyc;
    for (int i = 0; i < n*m; i++) begin
      idata = cy[i];
      if (is53) iv53 = 1; else iv97 = 1;
      @(negedge clk);
      checks++;
      if (!(is53 ? irdy53 : irdy97) && i != n*m - 1) begin
        failures++; $display("FAIL inverse in_ready dropped inside a frame");
      end
    end
    iv53 = 0; iv97 = 0;
    while (!(is53 ? idone53 : idone97)) @(negedge clk);
    t_done = cyc;
    want = is53 ? (n*m + 3*m + 10) : (n*m + 5*m + 21);
    checks++;
    if (t_done - t_start != want) begin
      failures++;
      $display("FAIL inverse frame %0dx%0d took %0d cycles, want %0d", n, m, t_done - t_start, want);
    end
    checks++;
    if (inv_n_out != n*m) begin
      failures++; $display("FAIL inverse gave %0d samples, want %0d", inv_n_out, n*m);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (is53 ? ibusy53 : ibusy97) begin failures++; $display("FAIL inverse busy after done"); end
  endtask

  initial begin
    cfg_rows = 8; cfg_cols = 8; src_sel = 0; raw_pix = 0; v97 = 0; v53 = 0;
    iv97 = 0; iv53 = 0; idata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int f = 0; f < 2; f++) begin
      bit is53;
      is53 = (f == 1);
      run_level(is53, 16, 24, 1'b0);
      run_level(is53, 8, 12, 1'b1);
      run_level(is53, 4, 6, 1'b1);
      run_level(is53, 2, 2, 1'b0);
      run_level(is53, 6, 10, 1'b0);
    end
    $display("frames raw %0d, from LL %0d, inverse %0d, buffer pair starts %0d, row flushes %0d",
             n_raw_frames, n_ll_frames, n_inv_frames, n_tb_starts, n_flush);
    $display("inverse 9/7 largest error %f", inv_maxerr);
    $display("outputs LL %0d HL %0d LH %0d HH %0d, 9/7 largest error %f",
             n_band[0], n_band[1], n_band[2], n_band[3], maxerr);
    checks++;
    if (n_raw_frames == 0 || n_ll_frames == 0 || n_inv_frames == 0 || n_tb_starts == 0 || n_flush == 0 ||
        n_band[0] == 0 || n_band[1] == 0 || n_band[2] == 0 || n_band[3] == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
