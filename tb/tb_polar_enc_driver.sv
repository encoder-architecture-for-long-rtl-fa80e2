// tb_polar_enc_driver: stimulus and reference checker for one polar encoder.
//
// Sends NFRAMES random message frames of N bits, as N/P words of P bits in
// natural order, with a random gap (often none) before each frame, and once
// resets the encoder in the middle of a frame. For every frame it computes the
// expected codeword independently of the hardware,
//   y[j] = XOR of u[i] over all i whose binary digits include those of j,
// which is y = u * F^(x)n for F = [[1,0],[1,1]] (for N > 256 a software
// butterfly gives the same y, cross-checked against the formula on the first
// frames of small codes). It then checks, every cycle, out_valid, out_last and
// out_data against the expected output schedule: the frame's first word
// N/P - 1 cycles after its first input word, N/P consecutive words, word t
// lane l holding y[(l mod P/2) + t*P/2 + (l div (P/2))*N/2].
// It also counts how often each mechanism of the encoder was exercised:
// back-to-back frames, frames after a gap, the mid-frame reset, and cycles
// with the select line of each folded stage high. A mechanism that never
// occurred counts as a failure. done goes high when all frames are out.
module tb_polar_enc_driver #(
  parameter int unsigned N       = 16,
  parameter int unsigned P       = 4,
  parameter int unsigned NFRAMES = 40,
  parameter int unsigned GAP_MAX = 5
) (
  input  logic                      clk,
  output logic                      rst,
  output logic                      in_valid,
  output logic [P-1:0]              in_data,
  input  logic                      out_valid,
  input  logic                      out_last,
  input  logic [P-1:0]              out_data,
  input  logic [$clog2(N/P)-1:0]    swap,
  output logic                      done,
  output int                        checks,
  output int                        failures
);

  localparam int unsigned FL = N / P;
  localparam int unsigned NF = $clog2(N / P);
  localparam int unsigned LAT = FL - 1;
  localparam int unsigned HP = P / 2;

  typedef struct {
    longint     t0;   // cycle of the frame's first output word
    logic [N-1:0] y;
  } exp_t;

  exp_t   expq[$];
  longint cyc = 0;
  int     n_b2b = 0, n_gap = 0, n_reset = 0, n_out_frames = 0;
  int     n_swap [NF];

  // y = u * F^(x)n from the matrix definition, G[i][j] = 1 iff j is a subset of i.
  function automatic logic [N-1:0] ref_matrix(logic [N-1:0] u);
    logic [N-1:0] y;
    y = '0;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        if ((j & ~i) == 0) y[j] ^= u[i];
    return y;
  endfunction

  // Same product by an in-place software butterfly, for long codes.
  function automatic logic [N-1:0] ref_butterfly(logic [N-1:0] u);
    logic [N-1:0] v = u;
    for (int d = 1; d < N; d *= 2)
      for (int i = 0; i < N; i++)
        if ((i & d) == 0) v[i] ^= v[i+d];
    return v;
  endfunction

  function automatic int out_index(int t, int l);
    return (l % HP) + t * HP + (l / HP) * (N / 2);
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int m = 0; m < NF; m++) n_swap[m] = 0;
  end

  always @(posedge clk) begin
    if (!rst) for (int m = 0; m < NF; m++) if (swap[m]) n_swap[m]++;
  end

  // Output checker: compares against the front of the schedule.
  always @(posedge clk) begin
    if (!rst) begin
      logic exp_v;
      int   w;
      while (expq.size() > 0 && cyc >= expq[0].t0 + longint'(FL)) void'(expq.pop_front());
      exp_v = (expq.size() > 0) && (cyc >= expq[0].t0);
      checks++;
      if (out_valid !== exp_v) begin
        failures++;
        if (failures < 10) $display("cycle %0d: out_valid=%0b expected %0b", cyc, out_valid, exp_v);
      end
      if (exp_v) begin
        logic [P-1:0] e;
        w = int'(cyc - expq[0].t0);
        for (int l = 0; l < P; l++) e[l] = expq[0].y[out_index(w, l)];
        checks += 2;
        if (out_data !== e) begin
          failures++;
          if (failures < 10) $display("cycle %0d word %0d: out_data=%b expected %b", cyc, w, out_data, e);
        end
        if (out_last !== (w == FL - 1)) begin
          failures++;
          if (failures < 10) $display("cycle %0d word %0d: out_last=%0b", cyc, w, out_last);
        end
        if (w == FL - 1) n_out_frames++;
      end
    end
  end

  // Stimulus.
  initial begin
    logic [N-1:0] u;
    logic [N-1:0] y;
    int gap;
    int reset_frame;
    reset_frame = NFRAMES / 2;
    done = 0; checks = 0; failures = 0;
    rst = 1; in_valid = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < NFRAMES; f++) begin
      gap = ($urandom_range(0, 1) == 0 || f == 0) ? 0 : $urandom_range(1, GAP_MAX);
      if (f == 1) gap = 0;
      if (f == 2) gap = 1;
      repeat (gap) begin
        @(negedge clk);
        in_valid = 0; in_data = P'($urandom);
      end
      if (f > 0 && f != reset_frame + 1) begin
        if (gap == 0) n_b2b++; else n_gap++;
      end
      for (int k = 0; k < N; k++) u[k] = 1'($urandom);
      y = ref_butterfly(u);
      if (N <= 256) begin
        checks++;
        if (y !== ref_matrix(u)) begin
          failures++;
          $display("reference models disagree");
        end
      end
      for (int t = 0; t < FL; t++) begin
        @(negedge clk);
        if (t == 0) expq.push_back('{t0: cyc + longint'(LAT), y: y});
        in_valid = 1;
        in_data  = u[P*t +: P];
        if (f == reset_frame && t == FL / 2) begin
          // Abort this frame: reset for two cycles, drop everything in flight.
          in_valid = 0;
          rst = 1;
          expq.delete();
          repeat (2) @(negedge clk);
          rst = 0;
          n_reset++;
          break;
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (FL + 2) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d frames never came out", expq.size());
    end
    checks += 4 + NF;
    if (n_b2b == 0)   begin failures++; $display("no back-to-back frames"); end
    if (n_gap == 0)   begin failures++; $display("no frames after a gap"); end
    if (n_reset == 0) begin failures++; $display("no mid-frame reset"); end
    if (n_out_frames == 0) begin failures++; $display("no output frames"); end
    for (int m = 0; m < NF; m++)
      if (n_swap[m] == 0) begin failures++; $display("stage %0d select never high", m); end
    $display("N=%0d P=%0d: %0d frames out, %0d back-to-back, %0d after a gap, %0d reset",
             N, P, n_out_frames, n_b2b, n_gap, n_reset);
    done = 1;
  end

endmodule
