// tb_idwt_column_processor: self-checking test of the 1-D inverse processor.
//
// A 5/3 and a 9/7 inverse processor receive columns of forward-transformed
// data (interleaved s_0, d_0, s_1, d_1, ...) computed by the reference
// models from random 8-bit samples. The 5/3 output must give the original
// samples back exactly. The 9/7 input is the reference forward result
// rounded down to the 5-fraction-bit sample format; the output must be
// within 1.0 of the double-precision inverse of that input (the products
// are floored to 5 fraction bits at each step, which costs up to about 0.6). Columns of 8 samples go alone (the last output must
// leave N+5 cycles (5/3) and N+11 cycles (9/7) after the first input), back
// to back, and after a pause; then columns of 2 and of 6 samples check the
// boundary handling of short columns. Each output must carry the right
// even/odd flag.
module tb_idwt_column_processor;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int MAXN = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [3:0] cfg_n;
  logic in_valid;
  sample_t in53, in97;
  logic r53, v53, o53, b53, r97, v97, o97, b97;
  sample_t d53, d97;

  idwt_column_processor #(.FILTER(F53), .MAX_N(MAXN)) u_i53 (
    .clk, .rst_n, .cfg_n, .in_valid, .in_data(in53), .in_ready(r53),
    .out_valid(v53), .out_data(d53), .out_odd(o53), .busy(b53));
  idwt_column_processor #(.FILTER(F97), .MAX_N(MAXN)) u_i97 (
    .clk, .rst_n, .cfg_n, .in_valid, .in_data(in97), .in_ready(r97),
    .out_valid(v97), .out_data(d97), .out_odd(o97), .busy(b97));

  int  q53[$];
  real q97[$], qorig[$];
  real maxerr = 0.0, maxrt = 0.0;
  int unsigned first_in, last53, last97;

  task automatic send_cols(input int n, input int ncols);
    for (int c = 0; c < ncols; c++) begin
      int xi[]; int y53[]; real xr[]; real y97[]; real yq[]; real x97[];
      sample_t s97[];
      xi = new[n]; xr = new[n]; yq = new[n]; s97 = new[n];
      for (int i = 0; i < n; i++) begin
        xi[i] = $urandom_range(0, 255);
        xr[i] = real'(xi[i]);
      end
      lift53_1d(xi, y53);
      lift97_1d(xr, y97);
      for (int i = 0; i < n; i++) begin
        s97[i] = sample_t'($floor(y97[i] * 32.0));
        yq[i]  = real'(s97[i]) / 32.0;
      end
      ilift97_1d(yq, x97);
      foreach (xi[i]) q53.push_back(xi[i]);
      foreach (x97[i]) begin q97.push_back(x97[i]); qorig.push_back(xr[i]); end
      for (int i = 0; i < n; i++) begin
        in_valid = 1; in53 = sample_t'(y53[i] * 32); in97 = s97[i];
        @(negedge clk);
      end
    end
    in_valid = 0;
  endtask

  int  e_i;
  real e_r, e_o, diff;
  int  idx53 = 0, idx97 = 0;
  always @(posedge clk) if (rst_n) begin
    if (v53) begin
      last53 = cyc;
      checks++;
      if (q53.size() == 0) begin failures++; $display("FAIL 5/3 unexpected output"); end
      else begin
        e_i = q53.pop_front();
        if (d53 != sample_t'(e_i * 32) || o53 != idx53[0]) begin
          failures++; $display("FAIL 5/3 got %f expected %0d", real'(d53) / 32.0, e_i);
        end
      end
      idx53++;
    end
    if (v97) begin
      last97 = cyc;
      checks++;
      if (q97.size() == 0) begin failures++; $display("FAIL 9/7 unexpected output"); end
      else begin
        e_r = q97.pop_front();
        e_o = qorig.pop_front();
        diff = real'(d97) / 32.0 - e_r;
        if (diff < 0) diff = -diff;
        if (diff > maxerr) maxerr = diff;
        if (diff > 1.0 || o97 != idx97[0]) begin
          failures++; $display("FAIL 9/7 got %f expected %f", real'(d97) / 32.0, e_r);
        end
        diff = real'(d97) / 32.0 - e_o;
        if (diff < 0) diff = -diff;
        if (diff > maxrt) maxrt = diff;
      end
      idx97++;
    end
  end

  task automatic drain();
    repeat (40) @(negedge clk);
    checks++;
    if (q53.size() != 0 || q97.size() != 0 || b53 || b97) begin
      failures++; $display("FAIL outputs missing (%0d, %0d) or still busy", q53.size(), q97.size());
      q53.delete(); q97.delete(); qorig.delete();
    end
  endtask

  initial begin
    in_valid = 0; in53 = '0; in97 = '0; cfg_n = 4'(MAXN);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    first_in = cyc;
    send_cols(MAXN, 1);
    repeat (30) @(negedge clk);
    checks++;
    if (last53 - first_in != MAXN + 5 || last97 - first_in != MAXN + 11) begin
      failures++;
      $display("FAIL latency 5/3 %0d (want %0d), 9/7 %0d (want %0d)",
               last53 - first_in, MAXN + 5, last97 - first_in, MAXN + 11);
    end
    send_cols(MAXN, 6);
    repeat (3) @(negedge clk);
    send_cols(MAXN, 2);
    drain();
    cfg_n = 4'd2;
    send_cols(2, 5);
    drain();
    cfg_n = 4'd6;
    send_cols(6, 4);
    drain();
    $display("9/7 largest error %f against the reference inverse, %f against the original",
             maxerr, maxrt);
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
