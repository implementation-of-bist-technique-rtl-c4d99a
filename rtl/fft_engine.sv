// fft_engine: in-place radix-2 decimation-in-time FFT of a real ADC record.
//
// The record of N = 2^LOG2N samples is written through the load port (one
// sample per clock, natural order); each sample is stored at its
// bit-reversed address, scaled by 2^FIN so that the butterflies keep FIN
// fractional bits, with a zero imaginary part.  A start pulse then runs
// LOG2N stages of N/2 butterflies each,
//   X[a] <- X[a] + W * X[c],   X[c] <- X[a] - W * X[c],
//   W = exp(-j*2*pi*j_idx/(2*half)),
// over separate real and imaginary memories of DW-bit words.  Each twiddle
// factor is produced once per (stage, index) pair by a CORDIC and reused
// for every block of that stage.  Nothing is scaled between stages: DW
// leaves room for the LOG2N bits of growth.  When done pulses, bin k of
// the spectrum (natural order) is read through rd_addr / rd_re / rd_im
// with one clock of latency.
//
// Timing: 4 clocks per butterfly plus about 28 clocks per twiddle factor:
// 2*N*LOG2N + 28*N clocks in all (about 213,000 at N = 4096).
//
// The use of an FFT for the DFT of the record follows the design; the
// radix-2 in-place organisation, fixed point (the design computed in
// floating point), the record length and the word widths are this
// design's own.
module fft_engine #(
  parameter int LOG2N = 12,   // record length N = 2^LOG2N
  parameter int IW    = 12,   // input sample width (signed)
  parameter int FIN   = 12,   // fractional bits added to the input
  parameter int DW    = 40    // data word width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load_en,
  input  logic [LOG2N-1:0]     load_addr,
  input  logic signed [IW-1:0] load_data,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  input  logic [LOG2N-1:0]     rd_addr,
  output logic signed [DW-1:0] rd_re,
  output logic signed [DW-1:0] rd_im
);

  localparam int N  = 1 << LOG2N;
  localparam int TF = 24;            // twiddle fractional bits

  typedef enum logic [2:0] {
    F_IDLE, F_TW, F_TW_WAIT, F_RD_A, F_RD_C, F_CALC, F_WR_C
  } state_t;

  state_t state;

  logic signed [DW-1:0] mem_re [N];
  logic signed [DW-1:0] mem_im [N];

  logic [$clog2(LOG2N+1)-1:0] s_q;     // stage, half = 2^s
  logic [LOG2N-1:0]           j_q;     // twiddle index within the half
  logic [LOG2N:0]             b_q;     // block base
  logic [LOG2N-1:0]           half;
  logic [LOG2N-1:0]           a_addr, c_addr;

  logic signed [DW-1:0] xa_re, xa_im, xc_re_new, xc_im_new;
  logic signed [TF+1:0] w_cos, w_sin;
  logic signed [TF+1:0] cos_v, sin_v;
  logic                 tw_start, tw_done, tw_busy;

  logic                 we;
  logic [LOG2N-1:0]     waddr, raddr;
  logic signed [DW-1:0] wdata_re, wdata_im;

  function automatic logic [LOG2N-1:0] bitrev(input logic [LOG2N-1:0] x);
    for (int i = 0; i < LOG2N; i++) bitrev[i] = x[LOG2N-1-i];
  endfunction

  assign half   = LOG2N'(1) << s_q;
  assign a_addr = b_q[LOG2N-1:0] + j_q;
  assign c_addr = a_addr + half;

  // twiddle angle j / (2*half) of a turn, expressed in units of 1/N turn
  cordic #(.AW(LOG2N), .OF(TF), .ITER(26)) u_tw (
    .clk, .rst_n,
    .start (tw_start),
    .turns (j_q << (LOG2N - 1 - int'(s_q))),
    .cos_o (cos_v),
    .sin_o (sin_v),
    .busy  (tw_busy),
    .done  (tw_done)
  );
  assign tw_start = (state == F_TW);

  // butterfly: t = W * X[c] with W = cos - j sin
  logic signed [DW+TF+1:0] p_re, p_im;
  logic signed [DW-1:0]    t_re, t_im;
  always_comb begin
    p_re = w_cos * rd_re + w_sin * rd_im;
    p_im = w_cos * rd_im - w_sin * rd_re;
    t_re = DW'((p_re + (DW+TF+2)'(1 <<< (TF - 1))) >>> TF);
    t_im = DW'((p_im + (DW+TF+2)'(1 <<< (TF - 1))) >>> TF);
  end

  // memory ports: one write, one registered read
  always_comb begin
    we       = 1'b0;
    waddr    = bitrev(load_addr);
    wdata_re = DW'(load_data) <<< FIN;
    wdata_im = '0;
    raddr    = rd_addr;
    unique case (state)
      F_IDLE: we = load_en;
      F_RD_A: raddr = a_addr;
      F_RD_C: raddr = c_addr;
      F_CALC: begin
        we       = 1'b1;
        waddr    = a_addr;
        wdata_re = xa_re + t_re;
        wdata_im = xa_im + t_im;
      end
      F_WR_C: begin
        we       = 1'b1;
        waddr    = c_addr;
        wdata_re = xc_re_new;
        wdata_im = xc_im_new;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (we) begin
      mem_re[waddr] <= wdata_re;
      mem_im[waddr] <= wdata_im;
    end
    rd_re <= mem_re[raddr];
    rd_im <= mem_im[raddr];
  end

  assign busy = (state != F_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= F_IDLE;
      s_q       <= '0;
      j_q       <= '0;
      b_q       <= '0;
      w_cos     <= '0;
      w_sin     <= '0;
      xa_re     <= '0;
      xa_im     <= '0;
      xc_re_new <= '0;
      xc_im_new <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        F_IDLE: if (start) begin
          s_q   <= '0;
          j_q   <= '0;
          state <= F_TW;
        end
        F_TW: state <= F_TW_WAIT;
        F_TW_WAIT: if (tw_done) begin
          w_cos <= cos_v;
          w_sin <= sin_v;
          b_q   <= '0;
          state <= F_RD_A;
        end
        F_RD_A: state <= F_RD_C;
        F_RD_C: begin
          xa_re <= rd_re;
          xa_im <= rd_im;
          state <= F_CALC;
        end
        F_CALC: begin
          xc_re_new <= xa_re - t_re;
          xc_im_new <= xa_im - t_im;
          state     <= F_WR_C;
        end
        F_WR_C: begin
          if (b_q + (LOG2N+1)'({half, 1'b0}) < (LOG2N+1)'(N)) begin
            b_q   <= b_q + (LOG2N+1)'({half, 1'b0});
            state <= F_RD_A;
          end else if (j_q + 1'b1 < half) begin
            j_q   <= j_q + 1'b1;
            state <= F_TW;
          end else if (int'(s_q) + 1 < LOG2N) begin
            s_q   <= s_q + 1'b1;
            j_q   <= '0;
            state <= F_TW;
          end else begin
            done  <= 1'b1;
            state <= F_IDLE;
          end
        end
        default: state <= F_IDLE;
      endcase
    end
  end

  // a twiddle factor is requested only when the CORDIC is idle
  assert property (@(posedge clk) disable iff (!rst_n) tw_start |-> !tw_busy);

endmodule
