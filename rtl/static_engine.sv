// static_engine: static ADC test from a sine-wave code-density histogram.
//
// Works in units of one LSB, measured from the bottom of the input range
// (Vmin = 0, ideal first transition T1 = 1 LSB, M = 2^N_BITS - 1
// transitions).  It runs three sequential passes:
//
//  1. Transition levels.  For k = 1..M the cumulative count
//     CH = H[0] + ... + H[k-1] is divided by the number of samples S and
//     T[k] = C - A * cos(pi * CH / S) is formed with a CORDIC, where C and
//     A are the offset and amplitude of the sine-wave stimulus (inputs, in
//     LSB).  T[k] goes to an internal memory while the sums of T, k*T and
//     T^2 accumulate.
//  2. Best fit (least squares over all k):
//       G   = M * (sum kT - 2^(N-1) sum T) / (M * sum T^2 - (sum T)^2)
//       Vos = 2^(N-1) + Vmin - G * sum T / M
//     with two passes of one wide sequential divider.
//  3. Linearity.  For every k, INL[k] = G*T[k] + Vos - (k-1) - T1 and, for
//     k < M, DNL[k] = G*(T[k+1] - T[k]) - 1; minimum and maximum of each are
//     kept, and both curves are stored per code for read-out.
//
// Gain error is reported as (G - 1) * 100 percent and the offset as Vos in
// LSB.  All results are fixed point (see bist_pkg); the arithmetic is exact
// integer arithmetic apart from the rounding of T[k] to 16 fractional bits,
// of the cosine to 24 bits and of G to 30 bits.
//
// Interface: start (one-clock pulse) launches a run; the engine reads the
// histogram through hist_addr / hist_data (data one clock after the
// address) during pass 1 only; done pulses once when result is valid.
// Timing: about 75 clocks per transition level in pass 1, about 260 clocks
// for the fit and 2 clocks per level in pass 3 (about 320,000 clocks at
// N_BITS = 12).
//
// The equations of the fit, DNL and INL follow the design.  The
// transition-level formula is the standard sine-wave histogram relation
// (the design names the method but does not print it); fixed point instead
// of floating point, the bit widths and the sequential schedule are this
// design's own.
module static_engine
  import bist_pkg::*;
#(
  parameter int N_BITS = 12,   // ADC resolution
  parameter int CW     = 18    // histogram counter / sample count width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CW-1:0]     num_samples,   // S, total histogram count
  input  logic [31:0]       sine_offset,   // C in LSB, Q16.16
  input  logic [31:0]       sine_ampl,     // A in LSB, Q16.16
  output logic [N_BITS-1:0] hist_addr,
  input  logic [CW-1:0]     hist_data,
  output logic              busy,
  output logic              done,
  output static_result_t    result,
  input  logic [N_BITS-1:0] curve_addr,    // code k of the DNL / INL curves
  output q16_t              curve_dnl,     // DNL[k], one clock after curve_addr
  output q16_t              curve_inl      // INL[k]
);

  localparam int M   = (1 << N_BITS) - 1;
  localparam int PF  = 24;              // fractional bits of CH / S
  localparam int KW  = N_BITS + 1;      // width of the level index
  localparam int BW  = 128;             // wide-divider width

  typedef enum logic [3:0] {
    S_IDLE, S_RD, S_ACC, S_DIV, S_COS, S_STORE,
    S_FIT, S_GDIV, S_VOS, S_VDIV, S_P3_RD, S_P3, S_DONE
  } state_t;

  state_t state;

  logic [KW-1:0]           k_q;
  logic [CW-1:0]           ch_q;
  logic signed [31:0]      t_mem [1 << N_BITS];
  logic signed [31:0]      t_rd;
  logic signed [31:0]      t_new, t_prev;
  logic signed [47:0]      s_t;
  logic signed [63:0]      s_kt;
  logic signed [79:0]      s_t2;
  logic signed [39:0]      gain_q;            // Q.30
  logic signed [31:0]      vos_q;             // Q.16
  logic                    neg_q;
  q16_t                    dnl_min, dnl_max, inl_min, inl_max;

  // level divider: p = CH / S in Q0.24
  logic              pdiv_start, pdiv_done, pdiv_busy;
  logic [CW+PF-1:0]  pdiv_q;
  logic [CW-1:0]     ch_next;           // CH including the bin just read
  assign ch_next = ch_q + hist_data;

  seq_divider #(.DW(CW + PF), .VW(CW)) u_pdiv (
    .clk, .rst_n,
    .start    (pdiv_start),
    .dividend ({ch_next, PF'(0)}),
    .divisor  (num_samples),
    .quotient (pdiv_q),
    .busy     (pdiv_busy),
    .done     (pdiv_done)
  );

  // cosine of pi * p: turn fraction p / 2 with PF + 1 fractional bits
  logic               cos_start, cos_done, cos_busy;
  logic signed [25:0] cos_v, sin_v;

  cordic #(.AW(PF + 1), .OF(24), .ITER(26)) u_cordic (
    .clk, .rst_n,
    .start (cos_start),
    .turns (pdiv_q[PF:0]),
    .cos_o (cos_v),
    .sin_o (sin_v),
    .busy  (cos_busy),
    .done  (cos_done)
  );

  // wide divider for G and Vos
  logic           bdiv_start, bdiv_done, bdiv_busy;
  logic [BW-1:0]  bdiv_num, bdiv_den, bdiv_q;

  seq_divider #(.DW(BW), .VW(BW)) u_bdiv (
    .clk, .rst_n,
    .start    (bdiv_start),
    .dividend (bdiv_num),
    .divisor  (bdiv_den),
    .quotient (bdiv_q),
    .busy     (bdiv_busy),
    .done     (bdiv_done)
  );

  // T[k] = C - A * cos, rounded to Q.16
  logic signed [59:0] a_cos;
  always_comb begin
    a_cos = $signed({1'b0, sine_ampl}) * cos_v;
    t_new = 32'($signed({1'b0, sine_offset}) - ((a_cos + 60'sd8388608) >>> 24));
  end

  // fit numerator and denominator
  logic signed [BW-1:0] fit_num, fit_den, vos_prod;
  always_comb begin
    fit_num  = BW'(M) * (BW'(s_kt) - (BW'(s_t) <<< (N_BITS - 1)));
    fit_den  = BW'(M) * BW'(s_t2) - BW'(s_t) * BW'(s_t);
    vos_prod = BW'(gain_q) * BW'(s_t);           // Q.46
  end

  // pass-3 terms
  logic signed [71:0] g_t, g_dt;
  q16_t               inl_k, dnl_k;
  always_comb begin
    g_t   = gain_q * t_rd;
    g_dt  = gain_q * 72'(t_rd - t_prev);
    inl_k = 32'(((g_t + 72'sd536870912) >>> 30) + 72'(vos_q)
                - (72'(k_q) <<< 16));
    dnl_k = 32'(((g_dt + 72'sd536870912) >>> 30) - 72'sd65536);
  end

  // rounded G * 100 - 100 in Q.16
  logic signed [47:0] gerr;
  assign gerr = ((48'(gain_q) - 48'sd1073741824) * 48'sd100 + 48'sd8192) >>> 14;

  // per-code curves, written during pass 3
  q16_t dnl_mem [1 << N_BITS];
  q16_t inl_mem [1 << N_BITS];
  always_ff @(posedge clk) begin
    if (state == S_P3) begin
      inl_mem[k_q[N_BITS-1:0]] <= inl_k;
      if (k_q != KW'(1))
        dnl_mem[N_BITS'(k_q - 1'b1)] <= dnl_k;
    end
    curve_dnl <= dnl_mem[curve_addr];
    curve_inl <= inl_mem[curve_addr];
  end

  // T memory port
  always_ff @(posedge clk) begin
    if (state == S_STORE)
      t_mem[k_q[N_BITS-1:0]] <= t_new;
    t_rd <= t_mem[k_q[N_BITS-1:0]];
  end

  assign pdiv_start = (state == S_ACC);
  assign cos_start  = (state == S_DIV) && pdiv_done;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      k_q        <= '0;
      ch_q       <= '0;
      hist_addr  <= '0;
      s_t        <= '0;
      s_kt       <= '0;
      s_t2       <= '0;
      gain_q     <= '0;
      vos_q      <= '0;
      neg_q      <= 1'b0;
      t_prev     <= '0;
      dnl_min    <= '0;
      dnl_max    <= '0;
      inl_min    <= '0;
      inl_max    <= '0;
      bdiv_start <= 1'b0;
      bdiv_num   <= '0;
      bdiv_den   <= '0;
      done       <= 1'b0;
      result     <= '0;
    end else begin
      done       <= 1'b0;
      bdiv_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          k_q       <= KW'(1);
          ch_q      <= '0;
          hist_addr <= '0;
          s_t       <= '0;
          s_kt      <= '0;
          s_t2      <= '0;
          state     <= S_RD;
        end
        S_RD:  state <= S_ACC;                 // hist_data valid next clock
        S_ACC: begin
          ch_q  <= ch_next;
          state <= S_DIV;
        end
        S_DIV: if (pdiv_done) state <= S_COS;
        S_COS: if (cos_done)  state <= S_STORE;
        S_STORE: begin
          s_t  <= s_t + 48'(t_new);
          s_kt <= s_kt + 64'(t_new) * $signed({51'd0, k_q});
          s_t2 <= s_t2 + 80'(t_new) * 80'(t_new);
          if (k_q == KW'(M)) begin
            state <= S_FIT;
          end else begin
            k_q       <= k_q + 1'b1;
            hist_addr <= k_q[N_BITS-1:0];
            state     <= S_RD;
          end
        end
        S_FIT: begin
          neg_q      <= fit_num[BW-1];
          bdiv_num   <= (fit_num[BW-1] ? -fit_num : fit_num) << (16 + GAIN_FRAC);
          bdiv_den   <= fit_den;
          bdiv_start <= 1'b1;
          state      <= S_GDIV;
        end
        S_GDIV: if (bdiv_done) begin
          gain_q <= neg_q ? -40'(bdiv_q) : 40'(bdiv_q);
          state  <= S_VOS;
        end
        S_VOS: begin
          neg_q      <= vos_prod[BW-1];
          bdiv_num   <= vos_prod[BW-1] ? -vos_prod : vos_prod;
          bdiv_den   <= BW'(M);
          bdiv_start <= 1'b1;
          state      <= S_VDIV;
        end
        S_VDIV: if (bdiv_done) begin
          // Vos = 2^(N-1) - G*sumT/M, Q.46 -> Q.16 with rounding
          vos_q <= 32'((1 <<< (N_BITS - 1 + 16)))
                   - (neg_q ? -32'((bdiv_q + BW'(1 << 29)) >> 30)
                            :  32'((bdiv_q + BW'(1 << 29)) >> 30));
          k_q   <= KW'(1);
          state <= S_P3_RD;
        end
        S_P3_RD: state <= S_P3;                // t_rd valid next clock
        S_P3: begin
          if (k_q == KW'(1)) begin
            inl_min <= inl_k;
            inl_max <= inl_k;
            dnl_min <= 32'h7fff_ffff;
            dnl_max <= 32'h8000_0000;
          end else begin
            if (inl_k < inl_min) inl_min <= inl_k;
            if (inl_k > inl_max) inl_max <= inl_k;
            if (dnl_k < dnl_min) dnl_min <= dnl_k;
            if (dnl_k > dnl_max) dnl_max <= dnl_k;
          end
          t_prev <= t_rd;
          if (k_q == KW'(M)) begin
            state <= S_DONE;
          end else begin
            k_q   <= k_q + 1'b1;
            state <= S_P3_RD;
          end
        end
        S_DONE: begin
          result.gain         <= 32'(gain_q);
          result.gain_err_pct <= 32'(gerr);
          result.offset_lsb   <= vos_q;
          result.dnl_min      <= dnl_min;
          result.dnl_max      <= dnl_max;
          result.inl_min      <= inl_min;
          result.inl_max      <= inl_max;
          done                <= 1'b1;
          state               <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // each arithmetic unit is started only when it is idle
  assert property (@(posedge clk) disable iff (!rst_n) pdiv_start |-> !pdiv_busy);
  assert property (@(posedge clk) disable iff (!rst_n) cos_start  |-> !cos_busy);
  assert property (@(posedge clk) disable iff (!rst_n) bdiv_start |-> !bdiv_busy);

endmodule
