// tb_transpose_buffer: self-checking test of the transposing buffer.
//
// Part 1 reproduces the 4 x 4 data-flow example: samples x(i,j) = 16*i + j
// enter column by column from clock 0; output must start at clock 4 and
// follow the order x(0,0), x(0,1), x(1,0), x(1,1), ..., one sample per clock,
// ending at clock 19. Part 2 streams two 6 x 8 frames (rows x columns) back
// to back with random data and checks the row-pair order, continuity of the
// output, and that the last output leaves N cycles after the last input.
module tb_transpose_buffer;
  import dwt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [3:0] cfg_rows;
  logic in_valid, out_valid, busy;
  sample_t in_data, out_data;

  transpose_buffer #(.MAX_ROWS(8)) u_dut (.clk, .rst_n, .cfg_rows, .in_valid, .in_data,
                                          .out_valid, .out_data, .busy);

  sample_t exp_q[$];
  int unsigned t0, first_out, last_out, last_in, n_out;
  bit seen;

  // x[r][c] of a frame, output order: pairs of columns, rows, even then odd.
  task automatic run_frame(input int n, input int m, input bit example);
    sample_t x[8][8];
    for (int c = 0; c < m; c++)
      for (int r = 0; r < n; r++)
        x[r][c] = example ? sample_t'(16*r + c) : sample_t'($urandom);
    for (int c = 0; c < m; c += 2)
      for (int r = 0; r < n; r++) begin
        exp_q.push_back(x[r][c]);
        exp_q.push_back(x[r][c+1]);
      end
    for (int c = 0; c < m; c++)
      for (int r = 0; r < n; r++) begin
        in_valid = 1; in_data = x[r][c];
        @(negedge clk);
      end
    in_valid = 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (in_valid) last_in = cyc;
    if (out_valid) begin
      if (!seen) begin first_out = cyc; seen = 1; end
      last_out = cyc;
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output %0d", out_data);
      end else begin
        sample_t e;
        e = exp_q.pop_front();
        if (out_data != e) begin
          failures++; $display("FAIL out %0d expected %0d at cycle %0d", out_data, e, cyc);
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_data = '0; cfg_rows = 4; seen = 0; n_out = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    t0 = cyc;
    run_frame(4, 4, 1'b1);
    repeat (10) @(negedge clk);
    checks++;
    if (first_out - t0 != 4 || last_out - t0 != 19 || n_out != 16) begin
      failures++;
      $display("FAIL example timing: first %0d last %0d count %0d", first_out - t0, last_out - t0, n_out);
    end
    cfg_rows = 6; seen = 0; n_out = 0;
    t0 = cyc;
    run_frame(6, 8, 1'b0);
    run_frame(6, 8, 1'b0);
    repeat (20) @(negedge clk);
    checks++;
    if (n_out != 96 || last_out - first_out != 95 || last_out - last_in != 6 || first_out - t0 != 6) begin
      failures++;
      $display("FAIL stream timing: count %0d span %0d tail %0d start %0d", n_out,
               last_out - first_out, last_out - last_in, first_out - t0);
    end
    checks++;
    if (busy || exp_q.size() != 0) begin failures++; $display("FAIL not drained"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
