// spectrum_metrics: dynamic ADC performance from the FFT of a sine record.
//
// Reads bins 1 .. N/2 of the spectrum twice through rd_addr / rd_re /
// rd_im (data one clock after the address) and works on the bin power
// P[k] = re^2 + im^2:
//   pass 1: the fundamental is the bin kf with the largest power (DC, bin
//           0, is left out);
//   pass 2: with the harmonic bins h*kf (h = 2 .. NH+1), folded about
//           Nyquist to account for aliasing, it sums
//             Ps = P[kf], Ph = power of the harmonic bins,
//             Pn = power of all other bins (noise),
//           and finds the largest bin other than kf (largest spur).
// Five serial base-2 logarithms then give, in dB (10*log10(2) = 3.0103
// times a difference of log2):
//   THD   = 10 log10(Ps / Ph)      SNR   = 10 log10(Ps / Pn)
//   SINAD = 10 log10(Ps / (Pn+Ph)) SFDR  = 10 log10(Ps / Pspur)
//   ENOB  = (SINAD - 1.76) / 6.02
// All results are Q.16.  A zero power is treated as 1 (its log is 0).
//
// Timing: 2 clocks per bin and pass (2*N clocks) plus 5 * 18 clocks for
// the logarithms.
//
// The choice of bins, the ten harmonics, the ratios and the ENOB formula
// follow the design; it does not say how the fundamental is located or
// whether "the ten first harmonics" counts the fundamental: here it is the
// largest bin and ten harmonics beyond it.  Fixed point instead of
// floating point is this design's own.
module spectrum_metrics
  import bist_pkg::*;
#(
  parameter int LOG2N = 12,    // FFT length N = 2^LOG2N
  parameter int DW    = 40,    // width of the spectrum words
  parameter int NH    = 10     // harmonics counted (2nd .. NH+1-th)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic [LOG2N-1:0]     rd_addr,
  input  logic signed [DW-1:0] rd_re,
  input  logic signed [DW-1:0] rd_im,
  output logic                 busy,
  output logic                 done,
  output dynamic_result_t      result
);

  localparam int N   = 1 << LOG2N;
  localparam int PW  = 2 * DW + LOG2N + 2;   // power and sum width
  localparam int LW  = $clog2(PW) + 16;      // log2 result width

  // 10*log10(2) and 1/6.02 in Q.16, 1.76 dB in Q.16
  localparam logic signed [31:0] DB_PER_OCT = 32'sd197283;
  localparam logic signed [31:0] INV_602    = 32'sd10886;
  localparam logic signed [31:0] DB_176     = 32'sd115343;

  typedef enum logic [3:0] {
    M_IDLE, M_A_RD, M_A_EV, M_B_RD, M_B_EV, M_LOG, M_LOG_WAIT, M_RES, M_DONE
  } state_t;

  state_t state;

  logic [LOG2N:0]   k_q;
  logic [LOG2N:0]   kf_q;
  logic [PW-1:0]    p, pmax_q, ps_q, ph_q, pn_q, pspur_q;
  logic [LOG2N:0]   hb [NH];
  logic             is_h;
  logic [2:0]       li_q;                 // which logarithm
  logic [LW-1:0]    lg [5];
  logic             lg_start, lg_done;
  logic [PW-1:0]    lg_x;
  logic [LW-1:0]    lg_y;

  assign rd_addr = k_q[LOG2N-1:0];
  assign busy    = (state != M_IDLE);

  always_comb begin
    p = PW'(rd_re * rd_re) + PW'(rd_im * rd_im);
  end

  // harmonic bins h*kf mod N folded into 0 .. N/2
  always_comb begin
    logic [LOG2N-1:0] hk;
    is_h = 1'b0;
    for (int i = 0; i < NH; i++) begin
      hk    = LOG2N'((i + 2) * int'(kf_q));
      hb[i] = (int'(hk) > N / 2) ? (LOG2N+1)'(N - int'(hk)) : (LOG2N+1)'(hk);
      if (hb[i] == k_q) is_h = 1'b1;
    end
  end

  always_comb begin
    unique case (li_q)
      3'd0:    lg_x = ps_q;
      3'd1:    lg_x = ph_q;
      3'd2:    lg_x = pn_q;
      3'd3:    lg_x = pn_q + ph_q;
      default: lg_x = pspur_q;
    endcase
  end

  log2_fx #(.XW(PW), .LF(16)) u_log (
    .clk, .rst_n,
    .start  (lg_start),
    .x      (lg_x),
    .log2_o (lg_y),
    .done   (lg_done)
  );
  assign lg_start = (state == M_LOG);

  // dB from two logarithms: 3.0103 * (log2 a - log2 b)
  function automatic q16_t db(input logic [LW-1:0] la, input logic [LW-1:0] lb);
    logic signed [63:0] d;
    d = (64'(la) - 64'(lb)) * 64'(DB_PER_OCT);
    return 32'((d + 64'sd32768) >>> 16);
  endfunction

  q16_t sinad;
  logic signed [63:0] enob_w;
  always_comb begin
    sinad  = db(lg[0], lg[3]);
    enob_w = (64'(sinad) - 64'(DB_176)) * 64'(INV_602);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= M_IDLE;
      k_q     <= '0;
      kf_q    <= '0;
      pmax_q  <= '0;
      ps_q    <= '0;
      ph_q    <= '0;
      pn_q    <= '0;
      pspur_q <= '0;
      li_q    <= '0;
      for (int i = 0; i < 5; i++) lg[i] <= '0;
      done    <= 1'b0;
      result  <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        M_IDLE: if (start) begin
          k_q    <= (LOG2N+1)'(1);
          kf_q   <= (LOG2N+1)'(1);
          pmax_q <= '0;
          state  <= M_A_RD;
        end
        M_A_RD: state <= M_A_EV;
        M_A_EV: begin
          if (p > pmax_q) begin
            pmax_q <= p;
            kf_q   <= k_q;
          end
          if (k_q == (LOG2N+1)'(N / 2)) begin
            k_q     <= (LOG2N+1)'(1);
            ps_q    <= '0;
            ph_q    <= '0;
            pn_q    <= '0;
            pspur_q <= '0;
            state   <= M_B_RD;
          end else begin
            k_q   <= k_q + 1'b1;
            state <= M_A_RD;
          end
        end
        M_B_RD: state <= M_B_EV;
        M_B_EV: begin
          if (k_q == kf_q) begin
            ps_q <= p;
          end else begin
            if (is_h) ph_q <= ph_q + p;
            else      pn_q <= pn_q + p;
            if (p > pspur_q) pspur_q <= p;
          end
          if (k_q == (LOG2N+1)'(N / 2)) begin
            li_q  <= '0;
            state <= M_LOG;
          end else begin
            k_q   <= k_q + 1'b1;
            state <= M_B_RD;
          end
        end
        M_LOG: state <= M_LOG_WAIT;
        M_LOG_WAIT: if (lg_done) begin
          lg[li_q] <= lg_y;
          if (li_q == 3'd4) state <= M_RES;
          else begin
            li_q  <= li_q + 1'b1;
            state <= M_LOG;
          end
        end
        M_RES: begin
          result.fund_bin <= 16'(kf_q);
          result.thd_db   <= db(lg[0], lg[1]);
          result.snr_db   <= db(lg[0], lg[2]);
          result.sinad_db <= sinad;
          result.sfdr_db  <= db(lg[0], lg[4]);
          result.enob     <= 32'((enob_w + 64'sd32768) >>> 16);
          state           <= M_DONE;
        end
        M_DONE: begin
          done  <= 1'b1;
          state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

endmodule
