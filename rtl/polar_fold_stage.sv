// polar_fold_stage: a folded butterfly stage whose pairs lie D words apart.
//
// Once the index distance 2^(s-1) of a stage reaches the word width P, the
// members of a pair arrive D = 2^(s-1)/P cycles apart on the same lane. The
// stage pairs lane k with lane k+P/2 (k < P/2), puts each lane pair through a
// polar_commutator with distance D and a polar_kernel_fu, and writes the
// kernel's two outputs back to lanes k and k+P/2. Each kernel unit thus
// serves N/P pairs per frame, one per cycle, and the stage holds P*D delay
// elements. The commutator exchanges one word-index bit with the top
// lane bit, so the bit order of the words changes from stage to stage; the
// encoder output order that results is given in polar_enc_top.
// Latency D cycles: the data of a word leaves the stage D cycles after it
// entered. All commutators share the stage's select line swap. The unit
// schedule follows the proposed folding; the pairing of lane k with lane
// k+P/2 is this design's choice (for P = 4 it gives the published order).
module polar_fold_stage #(
  parameter int unsigned P = 4,  // bits per word
  parameter int unsigned D = 1   // word distance of the pairs, a power of two
) (
  input  logic         clk,
  input  logic         swap,
  input  logic [P-1:0] in_data,
  output logic [P-1:0] out_data
);

  localparam int unsigned H = P / 2;

  for (genvar k = 0; k < H; k++) begin : g_lane_pair
    logic pair_a;
    logic pair_b;

    polar_commutator #(.D(D)) u_comm (
      .clk,
      .swap,
      .in_top (in_data[k]),
      .in_bot (in_data[k+H]),
      .out_top(pair_a),
      .out_bot(pair_b)
    );

    polar_kernel_fu u_fu (
      .a    (pair_a),
      .b    (pair_b),
      .y_top(out_data[k]),
      .y_bot(out_data[k+H])
    );
  end

endmodule
