// polar_enc_ctrl: control of the folded polar encoder.
//
// A frame is N/P consecutive valid words. The control counts the words of
// each frame and, for every folded stage m (m = 0 .. log2(N/P)-1), produces
// the multiplexer select line swap[m]: high while the data entering stage m
// belongs to the second half of a 2^(m+1)-word block of its frame. The data of
// a frame enters folded stage m exactly 2^m - 1 cycles after the frame's first
// word entered the encoder, and reaches the output after N/P - 1 cycles.
//
// How it works: age counts the cycles since the latest frame start and
// saturates at N/P. For each tap m (stages 0 .. log2(N/P)-1 and, as the last
// tap, the output) a small run counter starts when age equals the tap's entry
// delay and counts the N/P words of the frame as they pass that tap. Frames are
// at least N/P cycles apart, so a tap's run has always ended before the next
// frame reaches it. This costs O(log^2(N/P)) flip-flops instead of a delay line
// of valid bits as long as the encoder latency.
//
// Frames may follow each other back to back or with any gap. A frame must not
// pause: once its first word has entered, in_valid must stay high for N/P
// cycles (checked by an assertion). Reset is synchronous and active high; it
// drops any frame in flight. The control is entirely this design's own: the
// architecture fixes only the order in which the units work, which the
// select lines produce.
module polar_enc_ctrl
  import polar_enc_pkg::*;
#(
  parameter int unsigned N = 16,  // code length
  parameter int unsigned P = 4    // bits per word
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           in_valid,
  output logic [fold_stages(N, P)-1:0]   swap,
  output logic                           out_valid,
  output logic                           out_last
);

  localparam int unsigned NF = fold_stages(N, P);  // folded stages
  localparam int unsigned FL = N / P;              // words per frame
  localparam int unsigned AW = $clog2(FL + 1);     // width of age

  typedef logic [NF-1:0] slot_t;  // word index within a frame
  typedef logic [AW-1:0] age_t;

  slot_t in_slot_q;
  logic  start;
  age_t  age_q;
  age_t  age_now;

  assign start   = in_valid && (in_slot_q == '0);
  assign age_now = start ? '0 : age_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_slot_q <= '0;
      age_q     <= age_t'(FL);
    end else begin
      if (in_valid) in_slot_q <= in_slot_q + 1'b1;
      age_q <= (age_now == age_t'(FL)) ? age_now : age_now + 1'b1;
    end
  end

  // Taps 0 .. NF-1 are the folded stages, tap NF is the output.
  logic  run_q   [NF+1];
  slot_t pos_q   [NF+1];
  logic  run_now [NF+1];
  slot_t pos_now [NF+1];

  for (genvar m = 0; m <= NF; m++) begin : g_tap
    localparam int unsigned ENTRY = fold_entry_delay(m);
    logic hit;

    assign hit        = (age_now == age_t'(ENTRY));
    assign run_now[m] = hit || run_q[m];
    assign pos_now[m] = hit ? '0 : pos_q[m];

    always_ff @(posedge clk) begin
      if (rst) begin
        run_q[m] <= 1'b0;
        pos_q[m] <= '0;
      end else begin
        run_q[m] <= run_now[m] && (pos_now[m] != slot_t'(FL - 1));
        pos_q[m] <= run_now[m] ? pos_now[m] + 1'b1 : '0;
      end
    end

    if (m < NF) begin : g_sel
      assign swap[m] = run_now[m] && pos_now[m][m];
    end
  end

  assign out_valid = run_now[NF];
  assign out_last  = run_now[NF] && (pos_now[NF] == slot_t'(FL - 1));

  // A frame's words are consecutive.
  always_ff @(posedge clk) begin
    if (!rst && in_slot_q != '0) begin
      assert (in_valid)
        else $error("polar_enc_ctrl: in_valid dropped inside a frame");
    end
  end

endmodule
