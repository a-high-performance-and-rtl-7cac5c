// ilift_pe: one merged inverse lifting step with a single multiplier and two
// adders, the inverse counterpart of lift_pe.
//
// The input is a stream of coefficient pairs (s_j, d_j) = (x(2j), x(2j+1)) of
// one or more interleaved lines, one sample per clock: s is the low-pass
// (even) sample, d the high-pass (odd) one. For each pair the PE forms
//     G_j = c_s * s_j + c_d * (d_{j-1} + d_j)      (the new even sample)
//     D_j = d_j +/- k * (G_j + G_{j+1})            (the new odd sample)
// which is an "undo update" step merged with the following "undo predict"
// step. With c_s = gamma*K1^-1, c_d = -gamma*delta it gives G = gamma*s^1,
// D = d^1 of the 9/7 inverse; with c_s = alpha/gamma, c_d = -alpha*beta the
// second step gives G = alpha*s^0, D = d^0. Every sample is multiplied once,
// in the cycle after it enters. The upper adder forms Sum = c_s*s_j + E
// (E = c_d*d_{j-1}, kept from the previous pair) and then G_j = Sum + c_d*d_j;
// the lower adder forms D_{j-1} = T +/- k*G_j and then T = d_j +/- k*G_j. E and
// T are the state a line carries from one pair to the next: two registers
// for one line (MAX_ROWS = 1), or two N-word memories E_MEM and T_MEM for N
// interleaved lines, each read and written once per pair at the same address.
//
// Boundary: whole-sample symmetric extension. The first pair of a line uses
// 2*c_d*d_0 (d_{-1} = d_0); the last pair stores T = d_{K-1} +/- 2k*G_{K-1}
// (G_K = G_{K-1}), and the last D of the line is T itself, produced in the
// slot of the line's next pair index: the first pair of the next line (or
// frame) of the same row, or a flush slot that the PE inserts by itself
// (in_ready low) when input stops at a frame boundary.
//
// Options:
//   SHR_EVEN = 1  halves d on the adder path (D = d/2 +/- ...); with the
//                 printed halved coefficients this makes the first 9/7
//                 inverse step output gamma*s^1/2 and d^1/2.
//   H_SUB    = 1  the lower adder subtracts k*G (9/7); 0 adds it (5/3).
//   H_SHL    = 1  k = 2 (second 9/7 inverse step), else k = 1.
//   LOSSLESS = 1  reversible 5/3 (c_s = 1/2, c_d = -1/8): s gets +0.25 before
//                 the multiplier, G keeps one fraction bit, D is rounded down
//                 to an integer and the G output is doubled, which gives
//                 s^0 = floor(s^1 + 0.25 - (d_{j-1} + d_j)/4) and
//                 d^0 = floor(d^1 + (s^0_j + s^0_{j+1})/2) exactly.
//
//   REALIGN  = 1  with interleaved lines, output each line's pairs in natural
//                 order (G_{j-1}, D_{j-1}) by keeping G_j of every line in an
//                 N-word memory G_MEM until D_j is known; a second inverse PE
//                 can then take the stream directly.
//
// Interface and timing are those of lift_pe: within a frame (cfg_rows lines
// of 2*cfg_pairs samples, lines interleaved pair by pair) samples come on
// consecutive cycles. The output of a pair slot is the previous pair's D
// (5 cycles after s_j entered) and then G_j (6 cycles after); out_odd marks
// D. For one line at a time this is the natural order G_0, D_0, G_1, D_1, ...
// and the last output of an N-sample line leaves N+5 cycles after its first
// sample (one cycle less with IN_REG = 0). With interleaved lines each slot
// gives (D_{j-1}, G_j) of its own line.
//
// The merged inverse equations, the inverse coefficients and the use of the
// same one-multiplier two-adder structure with two state words per line
// follow the published inverse data path; the schedule, the flags, the
// rounding of the reversible mode and the handshake are this design's own.
// The published data path pairs d_{j-1} with s_j in each slot (with empty
// slots at the ends of a line); this PE pairs s_j with d_j like the forward
// PE, which is why interleaved lines need REALIGN between two steps.
module ilift_pe
  import dwt_pkg::*;
#(
  parameter int unsigned MAX_ROWS  = 1,
  parameter int unsigned MAX_PAIRS = 256,
  parameter bit          LOSSLESS  = 1'b0,
  parameter bit          SHR_EVEN  = 1'b1,
  parameter bit          H_SUB     = 1'b1,
  parameter bit          H_SHL     = 1'b0,
  parameter bit          IN_REG    = 1'b1,
  parameter bit          REALIGN   = 1'b0,
  parameter coef_t       C_S = C97I_GAMMA_K1,    // multiplies s
  parameter coef_t       C_D = C97I_DELTA_GAMMA  // multiplies d
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic [$clog2(MAX_ROWS+1)-1:0]  cfg_rows,
  input  logic [$clog2(MAX_PAIRS+1)-1:0] cfg_pairs,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    in_ready,
  output logic    out_valid,
  output sample_t out_data,
  output logic    out_odd,
  output logic    busy
);
  localparam int unsigned RW = (MAX_ROWS > 1) ? $clog2(MAX_ROWS) : 1;
  localparam int unsigned PW = $clog2(MAX_PAIRS+1);

  typedef struct packed {
    logic          v;      // a pair slot starts here (its s sample)
    logic          first;  // pair index 0 (or a flush slot)
    logic          last;   // last pair of the line
    logic          emit_d; // this slot outputs a D
    logic          emit_g; // this slot outputs a G (not a flush slot)
    logic [RW-1:0] row;
  } slot_t;

  // ---------------- input control (same as lift_pe) ----------------------
  logic          phase;
  logic [RW-1:0] row;
  logic [PW-1:0] pair;
  logic          pending;
  logic          flushing;
  logic          flush_now;
  logic          at_start;
  logic          take;
  slot_t         slot_in;

  assign at_start  = (row == '0) && (pair == '0) && !phase;
  assign in_ready  = !flushing;
  assign flush_now = flushing || (at_start && pending && !in_valid);
  assign take      = flush_now || in_valid;

  always_comb begin
    slot_in        = '0;
    slot_in.v      = take && !phase;
    slot_in.first  = flush_now || (pair == '0);
    slot_in.last   = !flush_now && (pair == PW'(cfg_pairs - 1'b1));
    slot_in.emit_d = flush_now || (pair != '0) || pending;
    slot_in.emit_g = !flush_now;
    slot_in.row    = row;
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
  slot_t   sl1, sl2, sl3, sl4, sl5, sl6;  // slot flags, 1..6 cycles after s_j
  sample_t x_q, prod_q, sum_q, g_q, g_dly_q, d_q;
  sample_t ez1_q, ez2_q;                  // d on the adder path
  sample_t e_mem [MAX_ROWS];              // c_d * d_{j-1} of each line
  sample_t t_mem [MAX_ROWS];              // d_{j-1} +/- k*G_{j-1} of each line

  sample_t x_in, mul_out, ez_in, e_rd, t_rd;
  sample_t up_s, lo_s, kg, kg2;

  // s samples get +0.25 ahead of the multiplier in reversible mode.
  always_comb begin
    x_in = flush_now ? '0 : in_data;
    if (LOSSLESS && !phase) x_in = x_in + QUARTER;
  end

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

  // s is in x_q in a slot's first cycle, d in its second.
  assign mul_out = mul_coef(x_q, sl1.v ? C_S : C_D);
  assign ez_in   = SHR_EVEN ? (x_q >>> 1) : x_q;

  assign e_rd = e_mem[sl2.row];
  assign t_rd = t_mem[sl4.row];

  // Upper adder: Sum = c_s*s_j + c_d*d_{j-1} (slot in stage 2; no d_{-1}
  // term on a first pair), or G_j = Sum + c_d*d_j (doubled on a first pair).
  always_comb begin
    if (sl2.v) up_s = prod_q + (sl2.first ? '0 : e_rd);
    else       up_s = sum_q + (sl3.first ? sample_t'(prod_q <<< 1) : prod_q);
    // Reversible mode keeps one fraction bit of G.
    if (LOSSLESS && !sl2.v) up_s[FRAC_W-2:0] = '0;
  end

  // Lower adder: D_{j-1} = T +/- k*G_j (stage 4; on a first pair the line's
  // last D, which is T itself), or T = d_j +/- k*G_j (stage 5; 2k*G_j on
  // the last pair).
  assign kg  = H_SHL ? sample_t'(g_q <<< 1) : g_q;
  assign kg2 = sample_t'(kg <<< 1);
  always_comb begin
    if (sl4.v) begin
      if (sl4.first)  lo_s = t_rd;
      else if (H_SUB) lo_s = t_rd - kg;
      else            lo_s = t_rd + kg;
      // Reversible mode rounds D down to an integer.
      if (LOSSLESS) lo_s[FRAC_W-1:0] = '0;
    end else begin
      if (H_SUB) lo_s = ez2_q - (sl5.last ? kg2 : kg);
      else       lo_s = ez2_q + (sl5.last ? kg2 : kg);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {sl2, sl3, sl4, sl5, sl6} <= '0;
    else begin
      sl2 <= sl1;
      sl3 <= sl2;
      sl4 <= sl3;
      sl5 <= sl4;
      sl6 <= sl5;
    end
  end

  always_ff @(posedge clk) begin
    prod_q <= mul_out;
    if (sl2.v) begin
      sum_q <= up_s;
      ez1_q <= ez_in;          // x_q holds d_j in this cycle
    end
    if (sl3.v) begin
      g_q <= up_s;
      e_mem[sl3.row] <= prod_q;
    end
    if (sl4.v) begin
      d_q   <= lo_s;
      ez2_q <= ez1_q;
    end
    if (sl5.v) begin
      t_mem[sl5.row] <= lo_s;
      g_dly_q        <= g_q;
    end
  end

  // Output: D of the previous pair, then G of this pair; or, realigned,
  // G and D of the previous pair.
  if (REALIGN) begin : g_realign
    sample_t g_mem [MAX_ROWS];
    sample_t d_dly_q;
    always_ff @(posedge clk) begin
      if (sl5.v) begin
        g_mem[sl5.row] <= g_q;
        d_dly_q        <= d_q;
      end
    end
    always_comb begin
      out_valid = 1'b0;
      out_odd   = 1'b0;
      out_data  = LOSSLESS ? sample_t'(g_mem[sl5.row] <<< 1) : g_mem[sl5.row];
      if (sl5.v && sl5.emit_d) begin
        out_valid = 1'b1;
      end else if (sl6.v && sl6.emit_d) begin
        out_valid = 1'b1;
        out_odd   = 1'b1;
        out_data  = d_dly_q;
      end
    end
  end else begin : g_direct
    always_comb begin
      out_valid = 1'b0;
      out_odd   = 1'b0;
      out_data  = d_q;
      if (sl5.v && sl5.emit_d) begin
        out_valid = 1'b1;
        out_odd   = 1'b1;
      end else if (sl6.v && sl6.emit_g) begin
        out_valid = 1'b1;
        out_data  = LOSSLESS ? sample_t'(g_dly_q <<< 1) : g_dly_q;
      end
    end
  end

  assign busy = pending || flushing || phase || (row != '0) || (pair != '0) ||
                sl1.v || sl2.v || sl3.v || sl4.v || sl5.v || sl6.v;

  always_ff @(posedge clk) begin
    if (rst_n && !flush_now && !at_start) begin
      assert (in_valid)
        else $error("ilift_pe: input gap inside a frame");
    end
  end

endmodule
