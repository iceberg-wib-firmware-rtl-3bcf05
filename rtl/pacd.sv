// pacd: pulse across clock domains.
//
// A one-cycle pulse in the source domain flips a toggle flip-flop; the toggle
// passes a two-flop synchroniser in the destination domain and an edge
// detector there turns each change back into a one-cycle pulse. Latency is two
// to three destination cycles. Source pulses must be at least three
// destination cycles apart, or they merge. The firmware names this block; its
// toggle-synchroniser construction is this design's choice.
module pacd (
  input  logic clk_in,
  input  logic reset_in,
  input  logic pulse_in,
  input  logic clk_out,
  input  logic reset_out,
  output logic pulse_out
);
  logic toggle_in;
  logic [2:0] sync_out;

  always_ff @(posedge clk_in) begin
    if (reset_in)      toggle_in <= 1'b0;
    else if (pulse_in) toggle_in <= ~toggle_in;
  end

  always_ff @(posedge clk_out) begin
    if (reset_out) sync_out <= '0;
    else           sync_out <= {sync_out[1:0], toggle_in};
  end

  assign pulse_out = sync_out[2] ^ sync_out[1];
endmodule
