// tb_column_processor: self-checking test of the 1-D column processor.
//
// A 5/3 and a 9/7 column processor (column length 8) each receive one lone
// column, then six columns back to back, then two more after a pause. Their
// outputs, s_0, d_0, s_1, ... per column, are compared with the reference
// lifting models: exact for 5/3, within 2.0 for 9/7 (fixed-point 12-bit
// coefficients and 5 fraction bits against double precision). The last
// output of the lone column must leave N+5 (5/3) and N+11 (9/7) cycles after
// its first sample.
module tb_column_processor;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid;
  sample_t in_data;
  logic r53, v53, h53, b53, r97, v97, h97, b97;
  sample_t d53, d97;

  column_processor #(.FILTER(F53), .MAX_N(N)) u_c53 (
    .clk, .rst_n, .cfg_n(4'(N)), .in_valid, .in_data, .in_ready(r53),
    .out_valid(v53), .out_data(d53), .out_hi(h53), .busy(b53));
  column_processor #(.FILTER(F97), .MAX_N(N)) u_c97 (
    .clk, .rst_n, .cfg_n(4'(N)), .in_valid, .in_data, .in_ready(r97),
    .out_valid(v97), .out_data(d97), .out_hi(h97), .busy(b97));

  int  q53[$];
  real q97[$];
  real maxerr = 0.0;
  int unsigned first_in, last53, last97;

  task automatic send_cols(input int ncols);
    for (int c = 0; c < ncols; c++) begin
      int xi[]; int y53[]; real xr[]; real y97[];
      xi = new[N]; xr = new[N];
      for (int i = 0; i < N; i++) begin
        xi[i] = $urandom_range(0, 255);
        xr[i] = real'(xi[i]);
      end
      lift53_1d(xi, y53);
      lift97_1d(xr, y97);
      foreach (y53[i]) q53.push_back(y53[i]);
      foreach (y97[i]) q97.push_back(y97[i]);
      for (int i = 0; i < N; i++) begin
        in_valid = 1; in_data = sample_t'(xi[i] * 32);
        @(negedge clk);
      end
    end
    in_valid = 0;
  endtask

  int  e_i;
  real e_r, diff;
  int  idx53 = 0, idx97 = 0;
  always @(posedge clk) if (rst_n) begin
    if (v53) begin
      last53 = cyc;
      checks++;
      if (q53.size() == 0) begin failures++; $display("FAIL 5/3 unexpected output"); end
      else begin
        e_i = q53.pop_front();
        if (d53 != sample_t'(e_i * 32) || h53 != idx53[0]) begin
          failures++; $display("FAIL 5/3 got %0d expected %0d", d53 / 32, e_i);
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
        diff = real'(d97) / 32.0 - e_r;
        if (diff < 0) diff = -diff;
        if (diff > maxerr) maxerr = diff;
        if (diff > 2.0 || h97 != idx97[0]) begin
          failures++; $display("FAIL 9/7 got %f expected %f", real'(d97) / 32.0, e_r);
        end
      end
      idx97++;
    end
  end

  initial begin
    in_valid = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    first_in = cyc;
    send_cols(1);
    repeat (30) @(negedge clk);
    checks++;
    if (last53 - first_in != N + 5 || last97 - first_in != N + 11) begin
      failures++;
      $display("FAIL latency 5/3 %0d (want %0d), 9/7 %0d (want %0d)",
               last53 - first_in, N + 5, last97 - first_in, N + 11);
    end
    send_cols(6);
    repeat (3) @(negedge clk);
    send_cols(2);
    repeat (40) @(negedge clk);
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
