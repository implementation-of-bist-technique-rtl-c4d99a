// dynamic_bist: top-level controller of the dynamic (spectral) ADC
// self-test.
//
// A press of the start button makes the controller store the next
// 2^LOG2N conversions of the free-running ADC (one per adc_drdy pulse,
// offset-binary code turned into a signed sample by subtracting mid-scale)
// into the FFT memory, run the FFT, run the spectral metrics, and go back
// to idle with done raised and the results held.  While idle, spectrum bin
// probe_addr can be read (real and imaginary part, one clock latency).
//
// States: IDLE -> COLLECT (2^LOG2N conversions) -> FFT (about
// 2*N*LOG2N + 28*N clocks) -> METRICS (about 2*N clocks) -> IDLE.
//
// The sequence (collect on a button press, compute, done, idle) follows
// the design; the record length (the design does not state it), the
// mid-scale subtraction and the probe port are this design's own.
module dynamic_bist
  import bist_pkg::*;
#(
  parameter int N_BITS = 12,   // ADC resolution
  parameter int LOG2N  = 12,   // record length 2^LOG2N
  parameter int DW     = 40,   // FFT word width
  parameter int NH     = 10    // harmonics counted in THD
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start_btn,
  input  logic [N_BITS-1:0]    adc_code,
  input  logic                 adc_drdy,     // one clock per conversion
  input  logic [LOG2N-1:0]     probe_addr,   // spectrum read-out while idle
  output logic signed [DW-1:0] probe_re,
  output logic signed [DW-1:0] probe_im,
  output logic                 busy,
  output logic                 done,         // high from the end of a run to the next start
  output dynamic_result_t      result
);

  typedef enum logic [2:0] { D_IDLE, D_COLLECT, D_FFT, D_METRICS } state_t;

  state_t state;

  logic                     go;
  logic [LOG2N-1:0]         count_q;
  logic                     fft_load, fft_start, fft_busy, fft_done;
  logic [LOG2N-1:0]         fft_rd_addr, met_addr;
  logic signed [N_BITS-1:0] sample;
  logic                     met_start, met_busy, met_done;
  dynamic_result_t          met_result;

  start_sync u_start (.clk, .rst_n, .btn(start_btn), .pulse(go));

  // offset binary to two's complement: invert the MSB
  assign sample      = $signed({~adc_code[N_BITS-1], adc_code[N_BITS-2:0]});
  assign fft_load    = (state == D_COLLECT) && adc_drdy;
  assign fft_rd_addr = (state == D_METRICS) ? met_addr : probe_addr;

  fft_engine #(.LOG2N(LOG2N), .IW(N_BITS), .FIN(12), .DW(DW)) u_fft (
    .clk, .rst_n,
    .load_en   (fft_load),
    .load_addr (count_q),
    .load_data (sample),
    .start     (fft_start),
    .busy      (fft_busy),
    .done      (fft_done),
    .rd_addr   (fft_rd_addr),
    .rd_re     (probe_re),
    .rd_im     (probe_im)
  );

  spectrum_metrics #(.LOG2N(LOG2N), .DW(DW), .NH(NH)) u_metrics (
    .clk, .rst_n,
    .start   (met_start),
    .rd_addr (met_addr),
    .rd_re   (probe_re),
    .rd_im   (probe_im),
    .busy    (met_busy),
    .done    (met_done),
    .result  (met_result)
  );

  assign busy = (state != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= D_IDLE;
      count_q   <= '0;
      fft_start <= 1'b0;
      met_start <= 1'b0;
      done      <= 1'b0;
      result    <= '0;
    end else begin
      fft_start <= 1'b0;
      met_start <= 1'b0;
      unique case (state)
        D_IDLE: if (go) begin
          done    <= 1'b0;
          count_q <= '0;
          state   <= D_COLLECT;
        end
        D_COLLECT: if (adc_drdy) begin
          count_q <= count_q + 1'b1;
          if (count_q == '1) begin
            fft_start <= 1'b1;
            state     <= D_FFT;
          end
        end
        D_FFT: if (fft_done) begin
          met_start <= 1'b1;
          state     <= D_METRICS;
        end
        D_METRICS: if (met_done) begin
          result <= met_result;
          done   <= 1'b1;
          state  <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  // the engines are started only when idle
  assert property (@(posedge clk) disable iff (!rst_n) fft_start |-> !fft_busy);
  assert property (@(posedge clk) disable iff (!rst_n) met_start |-> !met_busy);

endmodule
