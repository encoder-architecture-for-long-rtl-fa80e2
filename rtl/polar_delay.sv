// polar_delay: a chain of D delay elements of W bits each.
//
// q is d as it was D clock cycles earlier. These are the registers that hold
// intermediate bits between the kernel units of the folded stages; the
// encoder as a whole holds N-P of them. The contents are not reset: the
// encoder's control marks which outputs are valid, so a stale bit is never
// used, and leaving out the reset lets a tool map long chains to shift-register
// or memory primitives. D must be at least 1. The delay elements and their
// number come from the proposed architecture; leaving them without reset is
// this design's choice.
module polar_delay #(
  parameter int unsigned W = 1,  // bits per delay element
  parameter int unsigned D = 1   // number of delay elements in the chain
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] chain [D];

  always_ff @(posedge clk) begin
    chain[0] <= d;
    for (int unsigned i = 1; i < D; i++) chain[i] <= chain[i-1];
  end

  assign q = chain[D-1];

endmodule
