// histogram: code-density histogram of the ADC output.
//
// One CW-bit counter per ADC code, kept in a 2^N_BITS-word memory with one
// read and one write port.  Each sample_valid pulse adds one to the
// counter of sample_code by a two-stage read-modify-write; a write that is
// still in flight for the same code is forwarded, so samples may arrive on
// consecutive clocks.  Counters saturate at all ones.
//
// clear starts a sweep that writes zero to every counter, one per clock
// (2^N_BITS clocks, clearing stays high meanwhile).  Samples arriving
// while clearing are ignored.
//
// Read port: rd_addr is sampled on a clock edge and rd_data holds that
// counter one clock later.  The read port is shared with the counting
// path, so it returns valid data only while no sample is being counted.
//
// The histogram of the ADC codes is the design's; the memory organisation,
// forwarding, saturation and clear sweep are this design's own choices.
module histogram #(
  parameter int N_BITS = 12,   // ADC resolution: 2^N_BITS bins
  parameter int CW     = 18    // counter width (200,000 samples fit)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  output logic              clearing,
  input  logic              sample_valid,
  input  logic [N_BITS-1:0] sample_code,
  input  logic [N_BITS-1:0] rd_addr,
  output logic [CW-1:0]     rd_data
);

  localparam int BINS = 1 << N_BITS;

  logic [CW-1:0]     mem [BINS];
  logic [N_BITS-1:0] clr_addr_q;

  // read-modify-write pipeline
  logic              v1_q, v2_q;
  logic [N_BITS-1:0] a1_q, a2_q;
  logic [CW-1:0]     w2_q;
  logic [CW-1:0]     base, incr;

  logic              take;
  assign take = sample_valid && !clearing;

  always_comb begin
    base = (v2_q && a2_q == a1_q) ? w2_q : rd_data;
    incr = (base == '1) ? base : base + 1'b1;
  end

  // memory: synchronous read, one write per clock
  always_ff @(posedge clk) begin
    rd_data <= mem[take ? sample_code : rd_addr];
    if (clearing)
      mem[clr_addr_q] <= '0;
    else if (v1_q)
      mem[a1_q] <= incr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing   <= 1'b0;
      clr_addr_q <= '0;
      v1_q       <= 1'b0;
      v2_q       <= 1'b0;
      a1_q       <= '0;
      a2_q       <= '0;
      w2_q       <= '0;
    end else begin
      if (clear && !clearing) begin
        clearing   <= 1'b1;
        clr_addr_q <= '0;
      end else if (clearing) begin
        clr_addr_q <= clr_addr_q + 1'b1;
        if (clr_addr_q == N_BITS'(BINS - 1))
          clearing <= 1'b0;
      end
      v1_q <= take;
      a1_q <= sample_code;
      v2_q <= v1_q && !clearing;
      a2_q <= a1_q;
      w2_q <= incr;
    end
  end

endmodule
