// key_edge: brings an active-low push-button into the clock domain and turns
// each press into a one-cycle pulse.
//
// Two flip-flops synchronise the asynchronous button; a third remembers the
// previous level, and press pulses on the cycle after a high-to-low change.
// The DE2 push-buttons are debounced on the board, so no debouncer is added.
// Latency: press follows the falling edge by three clock edges at most.
module key_edge (
  input  logic clk,
  input  logic rst_n,
  input  logic key_n,
  output logic press
);

  logic [2:0] sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 3'b111;
    else        sync <= {sync[1:0], key_n};
  end

  assign press = sync[2] && !sync[1];

endmodule
