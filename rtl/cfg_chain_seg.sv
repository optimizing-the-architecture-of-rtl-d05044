// One segment of the bit-serial configuration chain.
//
// The whole datapath is configured through a single serial chain: every
// tile (ORN selects, PE structure and immediate register) and the output
// crossbar owns one segment, and the segments are connected serial-out to
// serial-in. While cfg_en is high the segment shifts one bit per clock
// towards bit 0: q <= {sin, q[W-1:1]}; sout is q[0]. The parallel contents q
// drive the configured logic directly. That configuration is bit serial
// through a chain comes from the architecture; the shift direction, the
// enable and the reset-to-zero are this design's choices.
module cfg_chain_seg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         sin,
  output logic         sout,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= (W > 1) ? {sin, q[W-1:1]} : W'(sin);
  end

  assign sout = q[0];

endmodule
