// start_sync: turns an asynchronous push-button level into a one-clock
// start pulse.
//
// Two flip-flops synchronise the button to clk; a third remembers the
// previous level, and the pulse marks the rising edge (press).  Latency:
// the pulse comes 2 to 3 clocks after the press.  Debouncing is not
// included: a bouncing press re-arms the pulse only while the BIST that
// uses it is idle, so extra pulses during a run are ignored there.
module start_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic btn,      // raw button level, active high
  output logic pulse     // one clock per press
);

  logic [2:0] sync_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[1:0], btn};
  end

  assign pulse = sync_q[1] && !sync_q[2];

endmodule
