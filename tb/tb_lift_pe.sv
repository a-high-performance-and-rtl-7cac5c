// tb_lift_pe: self-checking test of the merged lifting PE.
//
// Three PEs are driven side by side:
//   u_col97 - column PE (state in registers), first 9/7 lifting step;
//             four 8-sample lines back to back, a pause (self-flush), then
//             two more lines.
//   u_row53 - row PE (state in 3-word memories), reversible 5/3; three rows
//             of 6 samples interleaved pair by pair, two frames back to back.
//   u_col97b- column PE with the second 9/7 step's settings (halved even
//             path), one 2-sample line (single-pair boundary case).
// Expected values come from a direct model of the lifting equations with
// symmetric extension: integer 5/3 lifting (exact match required) and real
// arithmetic for 9/7 with the same 12-bit coefficients (|error| <= 0.2).
// The cycle distance from the first input of a lone line to its last output
// must be N + 5.
module tb_lift_pe;
  import dwt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- reference models -------------------------------------
  function automatic int floordiv(int a, int b);
    int q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  // Real-valued lifting of one line x[0..n-1] into out[] = L0,H0,L1,H1,...
  function automatic void ref_lift_real(input real x[], input real co, input real ce,
                                        input bit shr, output real out[]);
    int k = x.size() / 2;
    real h[];
    h = new[k];
    out = new[2*k];
    for (int j = 0; j < k; j++) begin
      real en = (j + 1 < k) ? x[2*j+2] : x[2*j];       // e_K = e_{K-1}
      h[j] = co * x[2*j+1] + ce * (x[2*j] + en);
    end
    for (int j = 0; j < k; j++) begin
      real hp = (j > 0) ? h[j-1] : h[0];                // H_{-1} = H_0
      out[2*j]   = (shr ? x[2*j] / 2.0 : x[2*j]) + hp + h[j];
      out[2*j+1] = h[j];
    end
  endfunction

  // Integer 5/3 lifting: d1 = d - floor((s+s')/2), s1 = s + floor((d1'+d1+2)/4).
  function automatic void ref_lift_53(input int x[], output int out[]);
    int k = x.size() / 2;
    int d[];
    d = new[k];
    out = new[2*k];
    for (int j = 0; j < k; j++) begin
      int sn = (j + 1 < k) ? x[2*j+2] : x[2*j];
      d[j] = x[2*j+1] - floordiv(x[2*j] + sn, 2);
    end
    for (int j = 0; j < k; j++) begin
      int dp = (j > 0) ? d[j-1] : d[0];
      out[2*j]   = x[2*j] + floordiv(dp + d[j] + 2, 4);
      out[2*j+1] = d[j];
    end
  endfunction

  function automatic real to_r(sample_t s);
    return real'(s) / 32.0;
  endfunction

  // ---------------- DUT A: column PE, 9/7 first step ----------------------
  logic a_v, a_rdy, a_ov, a_oh, a_busy;
  sample_t a_d, a_od;
  lift_pe #(.MAX_ROWS(1), .MAX_PAIRS(8)) u_col97 (
    .clk, .rst_n, .cfg_rows(1'b1), .cfg_pairs(4'd4),
    .in_valid(a_v), .in_data(a_d), .in_ready(a_rdy),
    .out_valid(a_ov), .out_data(a_od), .out_hi(a_oh), .busy(a_busy));

  // ---------------- DUT B: row PE, 5/3 ------------------------------------
  logic b_v, b_rdy, b_ov, b_oh, b_busy;
  sample_t b_d, b_od;
  lift_pe #(.MAX_ROWS(4), .MAX_PAIRS(4), .LOSSLESS(1'b1),
            .C_EVEN(C53_BETA_ALPHA), .C_ODD(C53_BETA)) u_row53 (
    .clk, .rst_n, .cfg_rows(3'd3), .cfg_pairs(3'd3),
    .in_valid(b_v), .in_data(b_d), .in_ready(b_rdy),
    .out_valid(b_ov), .out_data(b_od), .out_hi(b_oh), .busy(b_busy));

  // ---------------- DUT C: column PE, 9/7 second step, one pair ----------
  logic c_v, c_rdy, c_ov, c_oh, c_busy;
  sample_t c_d, c_od;
  lift_pe #(.MAX_ROWS(1), .MAX_PAIRS(4), .SHR_EVEN(1'b1),
            .C_EVEN(C97_DELTA_GAMMA), .C_ODD(C97_DELTA_BETA)) u_col97b (
    .clk, .rst_n, .cfg_rows(1'b1), .cfg_pairs(3'd1),
    .in_valid(c_v), .in_data(c_d), .in_ready(c_rdy),
    .out_valid(c_ov), .out_data(c_od), .out_hi(c_oh), .busy(c_busy));

  // Expected output queues
  real    exp_a[$];  bit exph_a[$];
  int     exp_b[$];  bit exph_b[$];
  real    exp_c[$];  bit exph_c[$];
  int unsigned a_first_in, a_last_out;

  task automatic send_lines_a(input int nlines);
    for (int l = 0; l < nlines; l++) begin
      real xr[]; real o[];
      sample_t xs[8];
      xr = new[8];
      for (int i = 0; i < 8; i++) begin
        xs[i] = sample_t'($urandom_range(0, 255*32)) - sample_t'(128*32);
        xr[i] = to_r(xs[i]);
      end
      ref_lift_real(xr, real'(C97_BETA)/4096.0, real'(C97_BETA_ALPHA)/4096.0, 1'b0, o);
      foreach (o[i]) begin exp_a.push_back(o[i]); exph_a.push_back(i[0]); end
      for (int i = 0; i < 8; i++) begin
        a_v <= 1; a_d <= xs[i];
        @(posedge clk);
      end
    end
    a_v <= 0;
  endtask

  initial begin
    a_v = 0; b_v = 0; c_v = 0; a_d = '0; b_d = '0; c_d = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      begin  // A
        // Lone line first: check the N+5 latency.
        a_seen = 0;
        send_lines_a(1);
        repeat (20) @(posedge clk);
        checks++;
        if (a_last_out - a_first_in != 8 + 5) begin
          failures++;
          $display("FAIL latency: %0d cycles, expected %0d", a_last_out - a_first_in, 13);
        end
        send_lines_a(4);
        repeat (5) @(posedge clk);
        send_lines_a(2);
      end
      begin  // B: two frames of 3 rows x 6 samples, interleaved by pairs
        for (int f = 0; f < 2; f++) begin
          int x[3][6];
          for (int r = 0; r < 3; r++)
            for (int i = 0; i < 6; i++) x[r][i] = $urandom_range(0, 511) - 256;
          // Build the expected order: for pair p, rows 0..2, L then H.
          begin
            int o0[], o1[], o2[]; int xl[];
            xl = new[6];
            for (int i = 0; i < 6; i++) xl[i] = x[0][i]; ref_lift_53(xl, o0);
            for (int i = 0; i < 6; i++) xl[i] = x[1][i]; ref_lift_53(xl, o1);
            for (int i = 0; i < 6; i++) xl[i] = x[2][i]; ref_lift_53(xl, o2);
            for (int p = 0; p < 3; p++) begin
              exp_b.push_back(o0[2*p]); exph_b.push_back(0);
              exp_b.push_back(o0[2*p+1]); exph_b.push_back(1);
              exp_b.push_back(o1[2*p]); exph_b.push_back(0);
              exp_b.push_back(o1[2*p+1]); exph_b.push_back(1);
              exp_b.push_back(o2[2*p]); exph_b.push_back(0);
              exp_b.push_back(o2[2*p+1]); exph_b.push_back(1);
            end
          end
          for (int p = 0; p < 3; p++)
            for (int r = 0; r < 3; r++)
              for (int k = 0; k < 2; k++) begin
                b_v <= 1; b_d <= sample_t'(x[r][2*p+k] * 32);
                @(posedge clk);
              end
        end
        b_v <= 0;
      end
      begin  // C: single pair
        for (int t = 0; t < 3; t++) begin
          real xr[]; real o[];
          sample_t xs[2];
          xr = new[2];
          for (int i = 0; i < 2; i++) begin
            xs[i] = sample_t'($urandom_range(0, 200*32)) - sample_t'(100*32);
            xr[i] = to_r(xs[i]);
          end
          ref_lift_real(xr, real'(C97_DELTA_BETA)/4096.0, real'(C97_DELTA_GAMMA)/4096.0, 1'b1, o);
          foreach (o[i]) begin exp_c.push_back(o[i]); exph_c.push_back(i[0]); end
          for (int i = 0; i < 2; i++) begin
            c_v <= 1; c_d <= xs[i];
            @(posedge clk);
          end
        end
        c_v <= 0;
      end
    join
    repeat (40) @(posedge clk);
    checks++;
    if (exp_a.size() != 0 || exp_b.size() != 0 || exp_c.size() != 0) begin
      failures++;
      $display("FAIL missing outputs: A %0d B %0d C %0d", exp_a.size(), exp_b.size(), exp_c.size());
    end
    checks++;
    if (a_busy || b_busy || c_busy) begin
      failures++;
      $display("FAIL PE still busy after drain");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- output checkers --------------------------------------
  real e_r, diff;
  int  e_i;
  bit  eh;
  bit a_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (a_v && !a_seen) begin a_first_in = cyc; a_seen = 1; end
    if (a_ov) begin
      a_last_out = cyc;
      checks++;
      if (exp_a.size() == 0) begin
        failures++; $display("FAIL A: unexpected output");
      end else begin
        e_r = exp_a.pop_front();
        eh = exph_a.pop_front();
        diff = to_r(a_od) - e_r;
        if (diff < 0) diff = -diff;
        if (diff > 0.2 || eh != a_oh) begin
          failures++;
          $display("FAIL A: got %f (hi %0d) expected %f (hi %0d)", to_r(a_od), a_oh, e_r, eh);
        end
      end
    end
    if (b_ov) begin
      checks++;
      if (exp_b.size() == 0) begin
        failures++; $display("FAIL B: unexpected output");
      end else begin
        e_i = exp_b.pop_front();
        eh = exph_b.pop_front();
        if (b_od != sample_t'(e_i * 32) || eh != b_oh) begin
          failures++;
          $display("FAIL B: got %f (hi %0d) expected %0d (hi %0d)", to_r(b_od), b_oh, e_i, eh);
        end
      end
    end
    if (c_ov) begin
      checks++;
      if (exp_c.size() == 0) begin
        failures++; $display("FAIL C: unexpected output");
      end else begin
        e_r = exp_c.pop_front();
        eh = exph_c.pop_front();
        diff = to_r(c_od) - e_r;
        if (diff < 0) diff = -diff;
        if (diff > 0.2 || eh != c_oh) begin
          failures++;
          $display("FAIL C: got %f (hi %0d) expected %f (hi %0d)", to_r(c_od), c_oh, e_r, eh);
        end
      end
    end
  end

  // Watchdog
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
