// polar_kernel_fu: one functional unit of the encoder, the 2x2 polar kernel
// F = [[1,0],[1,1]] applied to a pair of bits.
//
// For the pair (a, b), where a has the lower index, the kernel gives
// (a xor b, b): one XOR gate and one wire. Every node of the encoder's data
// flow graph is this operation; the folded encoder reuses each unit for N/P
// pairs per frame. Purely combinational, no timing of its own. The kernel
// and its use as the single functional unit follow the architecture as
// proposed.
module polar_kernel_fu (
  input  logic a,      // lower-index bit of the pair
  input  logic b,      // higher-index bit of the pair
  output logic y_top,  // a xor b
  output logic y_bot   // b
);

  assign y_top = a ^ b;
  assign y_bot = b;

endmodule
