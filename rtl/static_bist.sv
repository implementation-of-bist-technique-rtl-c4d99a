// static_bist: top-level controller of the static (linearity) ADC self-test.
//
// A press of the start button makes the controller clear the code-density
// histogram, count NUM_SAMPLES conversions of the free-running ADC into it
// (one per adc_drdy pulse), run the static test engine on the histogram,
// and go back to idle with done raised and the results held.  The next
// press starts a new run.  While idle, the histogram can be read through
// the probe port, and the DNL and INL of every code through the curve
// port (valid after the first run), for inspection outside the chip.
//
// States: IDLE -> CLEAR (2^N_BITS clocks) -> COLLECT (NUM_SAMPLES
// conversions) -> DRAIN (2 clocks for the last increment) -> RUN (about
// 75 clocks per transition level) -> IDLE.
//
// The sequence (collect on a button press, then compute, then a done
// signal and idle) and the 200,000-sample default follow the design; the
// clear sweep, the probe port and the sine stimulus parameters being
// inputs are this design's own.
module static_bist
  import bist_pkg::*;
#(
  parameter int N_BITS      = 12,
  parameter int CW          = 18,
  parameter int NUM_SAMPLES = 200000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_btn,
  input  logic [N_BITS-1:0] adc_code,
  input  logic              adc_drdy,      // one clock per conversion
  input  logic [31:0]       sine_offset,   // stimulus offset C in LSB, Q16.16
  input  logic [31:0]       sine_ampl,     // stimulus amplitude A in LSB, Q16.16
  input  logic [N_BITS-1:0] probe_addr,    // histogram read-out while idle
  output logic [CW-1:0]     probe_data,
  input  logic [N_BITS-1:0] curve_addr,    // DNL / INL curve read-out
  output q16_t              curve_dnl,
  output q16_t              curve_inl,
  output logic              busy,
  output logic              done,          // high from the end of a run to the next start
  output static_result_t    result
);

  typedef enum logic [2:0] {
    ST_IDLE, ST_CLEAR, ST_COLLECT, ST_DRAIN, ST_RUN
  } state_t;

  state_t state;

  logic              go;
  logic              h_clear, h_clearing, h_valid;
  logic [N_BITS-1:0] h_rd_addr, eng_addr;
  logic [CW-1:0]     h_rd_data;
  logic [CW-1:0]     count_q;
  logic [1:0]        drain_q;
  logic              eng_start, eng_busy, eng_done;
  static_result_t    eng_result;

  start_sync u_start (.clk, .rst_n, .btn(start_btn), .pulse(go));

  assign h_clear   = (state == ST_IDLE) && go;
  assign h_valid   = (state == ST_COLLECT) && adc_drdy;
  assign h_rd_addr = (state == ST_RUN) ? eng_addr : probe_addr;
  assign probe_data = h_rd_data;

  histogram #(.N_BITS(N_BITS), .CW(CW)) u_hist (
    .clk, .rst_n,
    .clear        (h_clear),
    .clearing     (h_clearing),
    .sample_valid (h_valid),
    .sample_code  (adc_code),
    .rd_addr      (h_rd_addr),
    .rd_data      (h_rd_data)
  );

  static_engine #(.N_BITS(N_BITS), .CW(CW)) u_engine (
    .clk, .rst_n,
    .start       (eng_start),
    .num_samples (CW'(NUM_SAMPLES)),
    .sine_offset,
    .sine_ampl,
    .hist_addr   (eng_addr),
    .hist_data   (h_rd_data),
    .busy        (eng_busy),
    .done        (eng_done),
    .result      (eng_result),
    .curve_addr,
    .curve_dnl,
    .curve_inl
  );

  assign eng_start = (state == ST_DRAIN) && (drain_q == 2'd2);
  assign busy      = (state != ST_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      count_q <= '0;
      drain_q <= '0;
      done    <= 1'b0;
      result  <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (go) begin
          done  <= 1'b0;
          state <= ST_CLEAR;
        end
        ST_CLEAR: if (!h_clearing && !h_clear) begin
          count_q <= '0;
          state   <= ST_COLLECT;
        end
        ST_COLLECT: if (adc_drdy) begin
          count_q <= count_q + 1'b1;
          if (count_q == CW'(NUM_SAMPLES - 1)) begin
            drain_q <= '0;
            state   <= ST_DRAIN;
          end
        end
        ST_DRAIN: begin
          drain_q <= drain_q + 1'b1;
          if (drain_q == 2'd2) state <= ST_RUN;
        end
        ST_RUN: if (eng_done) begin
          result <= eng_result;
          done   <= 1'b1;
          state  <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // a run must not be started while the engine is still busy
  assert property (@(posedge clk) disable iff (!rst_n) eng_start |-> !eng_busy);

endmodule
