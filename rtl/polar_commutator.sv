// polar_commutator: the delay-switch-delay network in front of one folded
// kernel unit.
//
// Two lanes carry a stream of bits; the kernel needs bit pairs whose indices
// are D words apart. The second lane is delayed by D cycles, the two lanes
// are exchanged whenever swap is high, and the first lane is then delayed by
// D cycles. With swap high during the second half of every 2D-cycle block of
// the incoming data, out_top and out_bot carry the two members of a pair in
// the same cycle: first the pairs of the first lane (D cycles after the later
// member arrives), then those of the second lane (D cycles after that). The
// unit therefore works every cycle, which is the cyclic shift of the folding
// sets from stage to stage. 2*D delay elements, two 2:1 multiplexers.
// swap is the multiplexer select line; it is generated by polar_enc_ctrl.
// The schedule it produces and its delay count follow the proposed
// architecture; the delay-switch-delay arrangement that achieves them is this
// design's own.
module polar_commutator #(
  parameter int unsigned D = 1  // word distance between the members of a pair
) (
  input  logic clk,
  input  logic swap,     // exchange the lanes this cycle
  input  logic in_top,
  input  logic in_bot,
  output logic out_top,  // earlier member of the pair
  output logic out_bot   // later member of the pair
);

  logic bot_dly;   // second lane after the first delay chain
  logic sw_top;    // switch outputs
  logic sw_bot;

  polar_delay #(.W(1), .D(D)) u_pre (.clk, .d(in_bot), .q(bot_dly));

  always_comb begin
    if (swap) begin
      sw_top = bot_dly;
      sw_bot = in_top;
    end else begin
      sw_top = in_top;
      sw_bot = bot_dly;
    end
  end

  polar_delay #(.W(1), .D(D)) u_post (.clk, .d(sw_top), .q(out_top));

  assign out_bot = sw_bot;

endmodule
