// polar_enc_top: partially parallel (folded) encoder for polar codes of
// length N, taking P message bits per clock cycle.
//
// The encoder computes y = u * F^(x)n with the kernel F = [[1,0],[1,1]] and
// n = log2(N). y is the polar codeword x = u * G_N in bit-reversed order, so
// no bit-reversal permutation is needed. The computation is the usual n-stage
// butterfly network; stage s combines bits whose indices differ by 2^(s-1).
// Instead of N/2 kernel units per stage, the network is folded so that each
// stage has P/2 units that work every cycle:
//   * stages 1 .. log2(P): both members of each pair lie in one word, so the
//     stage is P/2 kernel units on fixed lanes (polar_intra_stage);
//   * stages log2(P)+1 .. n: the members are D = 2^(s-1)/P words apart, and
//     a delay-switch-delay network with 2D delay elements per lane pair
//     brings them together (polar_fold_stage).
// In total the encoder has n*P/2 kernel units (XOR gates) and N-P delay
// elements; for N = 16 and P = 4 that is 8 units and 12 delay elements.
//
// Interface and timing: a frame is N/P consecutive words on in_data with
// in_valid high; word t carries u[P*t + l] on lane l (natural order). Frames
// may follow back to back or with gaps, but may not pause inside. The frame's
// codeword appears on out_data, marked by out_valid, as N/P consecutive words
// starting N/P - 1 cycles after the first input word (3 cycles for N=16,
// P=4); out_last marks the last word. Throughput is P bits per cycle. Output
// word t, lane l holds y[j] with
//   j = (l mod P/2) + t * P/2 + (l div (P/2)) * N/2,
// e.g. for N = 16, P = 4 the words hold y[0,1,8,9], y[2,3,10,11],
// y[4,5,12,13], y[6,7,14,15] on lanes 0..3.
// The path from in_data to out_data is combinational through the XOR gates and
// multiplexers of all stages; no pipeline registers beyond the delay elements
// are added. Requires N and P powers of two with 2 <= P < N.
// The stage structure, unit count, schedule and delay count follow the
// proposed architecture; the interface (in_valid framing, out_valid,
// out_last), the output word order that results from the chosen lane pairing
// and the control are this design's own.
module polar_enc_top
  import polar_enc_pkg::*;
#(
  parameter int unsigned N = 16,  // code length
  parameter int unsigned P = 4    // level of parallelism (bits per cycle)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [P-1:0] in_data,
  output logic         out_valid,
  output logic         out_last,
  output logic [P-1:0] out_data
);

  localparam int unsigned NI = intra_stages(P);
  localparam int unsigned NF = fold_stages(N, P);

  if (P < 2 || P >= N || (1 << NI) != P || (1 << (NI + NF)) != N) begin : g_bad_params
    $error("polar_enc_top: N and P must be powers of two with 2 <= P < N");
  end

  logic [NF-1:0] swap;

  polar_enc_ctrl #(.N(N), .P(P)) u_ctrl (
    .clk,
    .rst,
    .in_valid,
    .swap,
    .out_valid,
    .out_last
  );

  // word[i] enters stage i+1; word[NI+NF] is the codeword.
  logic [P-1:0] word [NI+NF+1];

  assign word[0] = in_data;

  for (genvar s = 0; s < NI; s++) begin : g_intra
    polar_intra_stage #(.P(P), .S(s + 1)) u_stage (
      .in_data (word[s]),
      .out_data(word[s+1])
    );
  end

  for (genvar m = 0; m < NF; m++) begin : g_fold
    polar_fold_stage #(.P(P), .D(fold_distance(m))) u_stage (
      .clk,
      .swap    (swap[m]),
      .in_data (word[NI+m]),
      .out_data(word[NI+m+1])
    );
  end

  assign out_data = word[NI+NF];

endmodule
