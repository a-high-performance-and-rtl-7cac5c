// tb_idwt2d: self-checking test of the inverse 2-D transform.
//
// A 5/3 and a 9/7 instance (up to 8 x 8) each get the forward 2-D transform
// of random 8-bit images, computed by the reference models, scanned row by
// row. The 5/3 output must be the original image exactly. The 9/7 input is
// the reference result rounded down to 5 fraction bits; the output must be
// within 2.0 of the double-precision inverse of that input (each of the two
// 1-D passes costs up to about 0.6 through the floored products, and the
// first pass's error is amplified by the second). Every position must be
// output exactly once per frame and done must pulse once per frame.
// Frames: 8 x 6 three times back to back, then (after each previous frame
// is out, as the size changes) 4 x 8 after a pause and 2 x 2 at once.
module tb_idwt2d;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int MAXR = 8, MAXC = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [3:0] cfg_rows [2];
  logic [3:0] cfg_cols [2];
  logic       in_valid [2];
  sample_t    in_data  [2];
  logic       in_ready [2], out_valid [2], done [2], busy [2];
  logic [3:0] out_row  [2], out_col [2];
  sample_t    out_data [2];

  idwt2d #(.FILTER (F53), .MAX_ROWS (MAXR), .MAX_COLS (MAXC)) u53 (
    .clk, .rst_n, .cfg_rows (cfg_rows[0]), .cfg_cols (cfg_cols[0]),
    .in_valid (in_valid[0]), .in_data (in_data[0]), .in_ready (in_ready[0]),
    .out_valid (out_valid[0]), .out_row (out_row[0]), .out_col (out_col[0]),
    .out_data (out_data[0]), .done (done[0]), .busy (busy[0]));
  idwt2d #(.FILTER (F97), .MAX_ROWS (MAXR), .MAX_COLS (MAXC)) u97 (
    .clk, .rst_n, .cfg_rows (cfg_rows[1]), .cfg_cols (cfg_cols[1]),
    .in_valid (in_valid[1]), .in_data (in_data[1]), .in_ready (in_ready[1]),
    .out_valid (out_valid[1]), .out_row (out_row[1]), .out_col (out_col[1]),
    .out_data (out_data[1]), .done (done[1]), .busy (busy[1]));

  // Expected outputs of the frames of each instance, in frame order.
  localparam int NF = 5;
  int   fr_n [NF] = '{8, 8, 8, 4, 2};
  int   fr_m [NF] = '{6, 6, 6, 8, 2};
  int   fr_gap [NF] = '{0, 0, 0, 50, 0};     // idle cycles before the frame
  real  expv [2][NF][MAXR*MAXC];
  int   seen [2][MAXR*MAXC];
  int   ofr [2] = '{0, 0};                   // frame being output
  int   ocnt [2] = '{0, 0};
  real  maxerr = 0.0;

  always @(posedge clk) if (rst_n) begin
    for (int f = 0; f < 2; f++) begin
      if (out_valid[f]) begin
        int idx;
        real got, err;
        idx = out_row[f] * fr_m[ofr[f]] + out_col[f];
        got = $itor(out_data[f]) / 32.0;
        err = got - expv[f][ofr[f]][idx];
        if (err < 0) err = -err;
        if (f == 1 && err > maxerr) maxerr = err;
        checks++;
        if (out_row[f] >= fr_n[ofr[f]] || out_col[f] >= fr_m[ofr[f]]) begin
          failures++;
          $display("FAIL filter %0d frame %0d: position (%0d,%0d) out of range", f, ofr[f], out_row[f], out_col[f]);
        end else begin
          if (seen[f][idx] != ofr[f]) begin
            failures++;
            $display("FAIL filter %0d frame %0d: position (%0d,%0d) twice", f, ofr[f], out_row[f], out_col[f]);
          end
          seen[f][idx] = ofr[f] + 1;
          if (err > ((f == 0) ? 0.0 : 2.0)) begin
            failures++;
            $display("FAIL filter %0d frame %0d (%0d,%0d): got %f expected %f", f, ofr[f],
                     out_row[f], out_col[f], got, expv[f][ofr[f]][idx]);
          end
        end
        ocnt[f]++;
      end
      if (done[f]) begin
        checks++;
        if (ocnt[f] != fr_n[ofr[f]] * fr_m[ofr[f]]) begin
          failures++;
          $display("FAIL filter %0d frame %0d: %0d outputs before done", f, ofr[f], ocnt[f]);
        end
        ocnt[f] = 0;
        ofr[f]++;
        if (ofr[f] < NF) for (int i = 0; i < MAXR*MAXC; i++) seen[f][i] = ofr[f];
      end
    end
  end

  task automatic drive(input int f, input int y53 [NF][MAXR*MAXC], input real y97 [NF][MAXR*MAXC]);
    for (int k = 0; k < NF; k++) begin
      // A new size waits until the previous frame is out.
      if (k > 0 && (fr_n[k] != fr_n[k-1] || fr_m[k] != fr_m[k-1]))
        while (ofr[f] < k) @(posedge clk);
      repeat (fr_gap[k]) @(posedge clk);
      cfg_rows[f] <= 4'(fr_n[k]);
      cfg_cols[f] <= 4'(fr_m[k]);
      for (int i = 0; i < fr_n[k] * fr_m[k]; i++) begin
        in_valid[f] <= 1'b1;
        in_data[f]  <= (f == 0) ? sample_t'(y53[k][i] * 32) : sample_t'($floor(y97[k][i] * 32.0));
        @(posedge clk);
        while (!in_ready[f]) @(posedge clk);
      end
      in_valid[f] <= 1'b0;
    end
  endtask

  int  y53 [NF][MAXR*MAXC];
  real y97 [NF][MAXR*MAXC];

  initial begin
    for (int f = 0; f < 2; f++) begin
      in_valid[f] = 0; in_data[f] = '0; cfg_rows[f] = 8; cfg_cols[f] = 6;
      for (int i = 0; i < MAXR*MAXC; i++) seen[f][i] = 0;
    end
    for (int k = 0; k < NF; k++) begin
      int  xi[], yi[];
      real xr[], yr[], yq[], xq[];
      xi = new[fr_n[k] * fr_m[k]];
      xr = new[fr_n[k] * fr_m[k]];
      yq = new[fr_n[k] * fr_m[k]];
      for (int i = 0; i < xi.size(); i++) begin
        xi[i] = $urandom_range(255);
        xr[i] = $itor($urandom_range(255));
      end
      dwt53_2d(xi, fr_n[k], fr_m[k], yi);
      dwt97_2d(xr, fr_n[k], fr_m[k], yr);
      for (int i = 0; i < xi.size(); i++) begin
        y53[k][i] = yi[i];
        y97[k][i] = yr[i];
        yq[i] = $floor(yr[i] * 32.0) / 32.0;
        expv[0][k][i] = $itor(xi[i]);
      end
      idwt97_2d(yq, fr_n[k], fr_m[k], xq);
      for (int i = 0; i < xi.size(); i++) expv[1][k][i] = xq[i];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    fork
      drive(0, y53, y97);
      drive(1, y53, y97);
    join
    wait (ofr[0] == NF && ofr[1] == NF);
    repeat (5) @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      checks++;
      if (busy[f]) begin
        failures++;
        $display("FAIL filter %0d still busy after the last frame", f);
      end
    end
    $display("9/7 largest error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    $display("FAIL watchdog: frames output 5/3 %0d 9/7 %0d of %0d", ofr[0], ofr[1], NF);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
