// j_input_proc: input processor of the 1-D J processor.
//
// Samples x(0..7) of a row enter one per enabled clock into an 11-stage
// shift register (sr[0] is the newest sample). Every second clock two tap
// multiplexers pick a pair x(n), x(7-n) and a parallel adder/subtractor forms
//   s(n) = x(n) + x(7-n),   d(n) = x(n) - x(7-n)
// which is the butterfly [I4 I4; I4 -I4] applied to the reordered row. The
// pairs leave in the order n = 0,1,2,3, so the J4e/J4o processors behind it
// run at half the sample rate. The shift-register length, the two
// multiplexers and the adder/subtractor pair follow the document; the tap
// schedule below is this design's choice, and it is the one that makes 11
// stages exactly enough.
//
// Timing (cnt = position in the 8-clock row period, cnt=0 is the clock after
// x(7) of the previous row was taken):
//   cnt before edge | taps (x(n), x(7-n)) | registered pair
//         7         |   sr[7],  sr[0]     |  n=0 (held while cnt=0,1)
//         1         |   sr[8],  sr[3]     |  n=1 (held while cnt=2,3)
//         3         |   sr[9],  sr[6]     |  n=2 (held while cnt=4,5)
//         5         |   sr[10], sr[9]     |  n=3 (held while cnt=6,7)
// s_out/d_out are registers; everything advances only when en is high.
module j_input_proc #(
  parameter int W_IN  = 9,
  parameter int DEPTH = 11
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [2:0]             cnt,
  input  logic signed [W_IN-1:0] x_in,
  output logic signed [W_IN:0]   s_out,
  output logic signed [W_IN:0]   d_out
);

  logic signed [W_IN-1:0] sr [DEPTH];
  logic signed [W_IN-1:0] tap_a, tap_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
    end else if (en) begin
      sr[0] <= x_in;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  // Tap multiplexers: A picks x(n), B picks x(7-n).
  always_comb begin
    unique case (cnt[2:1])
      2'd3:    begin tap_a = sr[7];  tap_b = sr[0]; end   // cnt = 7
      2'd0:    begin tap_a = sr[8];  tap_b = sr[3]; end   // cnt = 1
      2'd1:    begin tap_a = sr[9];  tap_b = sr[6]; end   // cnt = 3
      default: begin tap_a = sr[10]; tap_b = sr[9]; end   // cnt = 5
    endcase
  end

  // Adder and subtractor in parallel, used on odd cnt only (half rate).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_out <= '0;
      d_out <= '0;
    end else if (en && cnt[0]) begin
      s_out <= (W_IN+1)'(tap_a) + (W_IN+1)'(tap_b);
      d_out <= (W_IN+1)'(tap_a) - (W_IN+1)'(tap_b);
    end
  end

endmodule
