// lift_pe: one merged lifting step (predictor and updater in one pass) with a
// single multiplier and two adders.
//
// The input is a stream of sample pairs (e_j, o_j) = (x(2j), x(2j+1)) of one
// or more interleaved lines, one sample per clock. For each pair the PE forms
//     H_j = c_o * o_j + c_e * (e_j + e_{j+1})       (the scaled high-pass)
//     L_j = e_j + H_{j-1} + H_j                     (the low-pass)
// which is the merged form of one predictor/updater pair: with c_o = beta and
// c_e = beta*alpha it yields L = s^1 and H = beta*d^1. Every sample is
// multiplied once, in the cycle after it enters; after that only additions
// remain. The upper adder alternates between H_{j-1} = Sum + c_e*e_j and
// Sum = c_e*e_j + c_o*o_j; the lower adder alternates between
// L_{j-1} = T + H_{j-1} and T = e_j + H_{j-1}. Sum and T are the state that a
// line carries from one pair to the next.
//
// State storage: with MAX_ROWS = 1 the state is a pair of registers (the
// column PE, one line at a time). With MAX_ROWS = N it is two N-word memories
// Sum_MEM and T_MEM indexed by the line number (the row PE), so that N rows
// whose pairs arrive interleaved (row 0 pair j, row 1 pair j, ...) are all
// transformed at once with only two words of state per row. Each memory is
// read once and written once per pair, at the same address.
//
// Boundary: whole-sample symmetric extension. The first pair of a line
// doubles H_0 where L_0 is formed (H_{-1} = H_0); the last pair doubles its
// own c_e*e_{K-1} term (e_K = e_{K-1}). The last pair of a line is finished in
// the slot of the line's next pair index, i.e. by the first pair of the next
// line (or frame) of the same row. When input stops at a frame boundary the PE
// runs cfg_rows flush slots by itself (in_ready low) to emit these last pairs.
//
// Reversible mode (LOSSLESS = 1, 5/3 filter): odd samples get +0.5 before the
// multiplier and even samples +0.5 on the adder path, H is truncated to two
// fraction bits and L to an integer, and the high output is shifted left by 2
// so it is d^1 itself. This reproduces the integer 5/3 lifting exactly.
// SHR_EVEN = 1 halves the even samples on the adder path; the second 9/7 step
// uses it together with halved coefficients so that its outputs are s^2/2 and
// delta*d^2/2.
//
// Interface: in_valid/in_data, in_ready. Within a frame (cfg_rows lines of
// 2*cfg_pairs samples, lines interleaved pair by pair) samples must come on
// consecutive cycles; a new frame may follow at once. Output out_valid,
// out_data, out_hi: L then H of each pair on consecutive cycles. Latency: the
// L of pair j leaves 6 cycles after e_j entered, so the last output of an
// N-sample line leaves N+5 cycles after its first sample (one cycle less with
// IN_REG = 0).
//
// The pipeline (one multiplier, two adders, registers x_q, prod_q, e_q, Hi,
// Hi_delay, Low, two even delays, Sum, T) follows the column and row PE
// diagrams; the control flags, the handshake, the flush and the exact cycle
// at which each register is loaded are this design's own.
module lift_pe
  import dwt_pkg::*;
#(
  parameter int unsigned MAX_ROWS = 1,    // lines interleaved (1 = column PE)
  parameter int unsigned MAX_PAIRS = 256, // longest line, in pairs
  parameter bit          LOSSLESS = 1'b0, // reversible 5/3 rounding
  parameter bit          SHR_EVEN = 1'b0, // halve even samples on adder path
  parameter bit          IN_REG   = 1'b1, // 0: input already registered upstream
  parameter coef_t       C_EVEN = C97_BETA_ALPHA, // multiplies e
  parameter coef_t       C_ODD  = C97_BETA        // multiplies o
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic [$clog2(MAX_ROWS+1)-1:0]  cfg_rows,  // lines per frame, >= 1
  input  logic [$clog2(MAX_PAIRS+1)-1:0] cfg_pairs, // pairs per line, >= 1
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    in_ready,
  output logic    out_valid,
  output sample_t out_data,
  output logic    out_hi,
  output logic    busy     // pipeline holds work not yet emitted
);
  localparam int unsigned RW = (MAX_ROWS > 1) ? $clog2(MAX_ROWS) : 1;
  localparam int unsigned PW = $clog2(MAX_PAIRS+1);

  typedef struct packed {
    logic          v;      // a pair slot starts here (its even sample)
    logic          first;  // pair index 0: finish the previous line instead
    logic          last;   // last pair of the line
    logic          emit;   // this slot produces an output pair
    logic          dbl;    // the finished pair is pair 0 of its line
    logic [RW-1:0] row;
  } slot_t;

  // ---------------- input control ----------------------------------------
  logic          phase;    // 0: next sample is even, 1: odd
  logic [RW-1:0] row;
  logic [PW-1:0] pair;
  logic          pending;  // last pairs of the previous frame not yet emitted
  logic          flushing;
  logic          flush_now; // this cycle carries a flush sample
  logic          at_start;
  logic          take;     // a sample (real or flush) enters this cycle
  slot_t         slot_in;

  assign at_start = (row == '0) && (pair == '0) && !phase;
  assign in_ready = !flushing;
  assign flush_now = flushing || (at_start && pending && !in_valid);
  assign take      = flush_now || in_valid;

  always_comb begin
    slot_in       = '0;
    slot_in.v     = take && !phase;
    slot_in.first = flush_now || (pair == '0);
    slot_in.last  = !flush_now && (pair == PW'(cfg_pairs - 1'b1));
    slot_in.emit  = flush_now || (pair != '0) || pending;
    slot_in.dbl   = (flush_now || pair == '0) ? (cfg_pairs == PW'(1))
                                             : (pair == PW'(1));
    slot_in.row   = row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= 1'b0;
      row      <= '0;
      pair     <= '0;
      pending  <= 1'b0;
      flushing <= 1'b0;
    end else if (flush_now) begin
      phase    <= !phase;
      flushing <= 1'b1;
      if (phase) begin
        if (row == RW'(cfg_rows - 1'b1)) begin
          row      <= '0;
          flushing <= 1'b0;
          pending  <= 1'b0;
        end else begin
          row <= row + 1'b1;
        end
      end
    end else if (in_valid) begin
      phase <= !phase;
      if (phase) begin
        if (row == RW'(cfg_rows - 1'b1)) begin
          row <= '0;
          if (pair == PW'(cfg_pairs - 1'b1)) begin
            pair    <= '0;
            pending <= 1'b1;
          end else begin
            pair <= pair + 1'b1;
          end
        end else begin
          row <= row + 1'b1;
        end
      end
    end
  end

  // ---------------- datapath ---------------------------------------------
  slot_t   sl1, sl2, sl3, sl4, sl5;   // slot flags, 1..5 cycles after e_j
  sample_t x_q;                       // input register
  sample_t prod_q;                    // multiplier output register
  sample_t e_q;                       // c_e * e_j, kept for the Sum update
  sample_t hi_q, hi_dly_q, low_q;
  sample_t ez1_q, ez2_q;              // even samples on the adder path
  sample_t sum_mem [MAX_ROWS];
  sample_t t_mem   [MAX_ROWS];

  sample_t x_in, mul_in, mul_out, ez_in;
  sample_t sum_rd, t_rd;
  sample_t up_a, up_b, up_s;          // upper adder
  sample_t lo_a, lo_b, lo_s;          // lower adder

  // Odd samples get +0.5 ahead of the multiplier in reversible mode.
  always_comb begin
    x_in = flush_now ? '0 : in_data;
    if (LOSSLESS && phase) x_in = x_in + HALF;
  end

  // Input register. A PE that follows another PE leaves it out (IN_REG = 0):
  // the previous PE's output register then plays its part, as in the
  // cascaded 9/7 processors.
  if (IN_REG) begin : g_in_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sl1 <= '0;
      else        sl1 <= slot_in;
    end
    always_ff @(posedge clk) x_q <= x_in;
  end else begin : g_no_in_reg
    assign sl1 = slot_in;
    assign x_q = x_in;
  end

  assign mul_in  = x_q;
  assign mul_out = mul_coef(mul_in, sl1.v ? C_EVEN : C_ODD);

  always_comb begin
    ez_in = x_q;
    if (SHR_EVEN) ez_in = x_q >>> 1;
    if (LOSSLESS) ez_in = ez_in + HALF;
  end

  assign sum_rd = sum_mem[sl2.row];
  assign t_rd   = t_mem[sl3.row];

  // Upper adder: H_{j-1} = Sum + c_e*e_j (slot in stage 2), or
  //              Sum     = c_o*o_j + c_e*e_j, doubled e-term on the last pair.
  always_comb begin
    if (sl2.v) begin
      up_a = sum_rd;
      up_b = sl2.first ? '0 : prod_q;
    end else begin
      up_a = prod_q;
      up_b = sl3.last ? sample_t'(e_q <<< 1) : e_q;
    end
    up_s = up_a + up_b;
    // Reversible mode keeps two fraction bits of H.
    if (LOSSLESS && sl2.v) up_s[FRAC_W-3:0] = '0;
  end

  // Lower adder: L_{j-1} = T + H_{j-1} (stage 3; H doubled after pair 0), or
  //              T       = e_j + H_{j-1} (stage 4; H_{-1} = 0 on pair 0).
  always_comb begin
    if (sl3.v) begin
      lo_a = t_rd;
      lo_b = sl3.dbl ? sample_t'(hi_q <<< 1) : hi_q;
    end else begin
      lo_a = ez2_q;
      lo_b = sl4.first ? '0 : hi_q;
    end
    lo_s = lo_a + lo_b;
    // Reversible mode rounds L down to an integer.
    if (LOSSLESS && sl3.v) lo_s[FRAC_W-1:0] = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {sl2, sl3, sl4, sl5} <= '0;
    end else begin
      sl2 <= sl1;
      sl3 <= sl2;
      sl4 <= sl3;
      sl5 <= sl4;
    end
  end

  always_ff @(posedge clk) begin
    prod_q <= mul_out;
    if (sl1.v) ez1_q <= ez_in;
    if (sl3.v) ez2_q <= ez1_q;
    if (sl2.v) begin
      hi_q <= up_s;
      e_q  <= prod_q;
    end
    if (sl3.v) sum_mem[sl3.row] <= up_s;
    if (sl3.v) low_q <= lo_s;
    if (sl4.v) begin
      t_mem[sl4.row] <= lo_s;
      hi_dly_q       <= hi_q;
    end
  end

  // Output: L in the cycle after it is formed, H one cycle later.
  always_comb begin
    out_valid = 1'b0;
    out_hi    = 1'b0;
    out_data  = low_q;
    if (sl4.v && sl4.emit) begin
      out_valid = 1'b1;
    end else if (sl5.v && sl5.emit) begin
      out_valid = 1'b1;
      out_hi    = 1'b1;
      out_data  = LOSSLESS ? sample_t'(hi_dly_q <<< 2) : hi_dly_q;
    end
  end

  assign busy = pending || flushing || phase || (row != '0) || (pair != '0) ||
                sl1.v || sl2.v || sl3.v || sl4.v || sl5.v;

  // A frame, once started, must arrive on consecutive cycles.
  always_ff @(posedge clk) begin
    if (rst_n && !flush_now && !at_start) begin
      assert (in_valid)
        else $error("lift_pe: input gap inside a frame");
    end
  end

endmodule
