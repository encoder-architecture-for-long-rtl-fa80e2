// polar_intra_stage: butterfly stage S of the encoder for S <= log2(P).
//
// Stage S combines the bits whose indices differ by 2^(S-1). While that
// distance is smaller than the word width P, both members of every pair lie
// in the same word, at lanes l and l+2^(S-1) (bit S-1 of l clear), so the
// stage is P/2 kernel units and nothing else: no delay element and no
// multiplexer. Lane l of a word holds the bit whose index is l modulo P.
// Purely combinational. That these stages need no storage and no
// multiplexer follows the proposed architecture.
module polar_intra_stage #(
  parameter int unsigned P = 4,  // bits per word (level of parallelism)
  parameter int unsigned S = 1   // stage number, 1 .. log2(P)
) (
  input  logic [P-1:0] in_data,
  output logic [P-1:0] out_data
);

  localparam int unsigned DIST = 1 << (S - 1);

  for (genvar k = 0; k < P / 2; k++) begin : g_fu
    // k-th pair: the lower lane is k with a zero inserted at bit S-1.
    localparam int unsigned LO = ((k / DIST) * 2 * DIST) + (k % DIST);
    localparam int unsigned HI = LO + DIST;

    polar_kernel_fu u_fu (
      .a    (in_data[LO]),
      .b    (in_data[HI]),
      .y_top(out_data[LO]),
      .y_bot(out_data[HI])
    );
  end

endmodule
