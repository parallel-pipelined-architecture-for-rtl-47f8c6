// norm_mult: pipelined output multiplier performing the ICT normalization.
//
// The two 1-D J passes give Y = J x J^t; the ICT coefficient is
// X(l,k) = K(l) K(k) Y(l,k). This unit picks the constant K(l)K(k) from the
// coefficient's indices (six distinct values, see ict_pkg), multiplies,
// rounds to nearest with ties away from zero and keeps W_OUT bits. As in the document it is a
// fine-grain pipeline so that it keeps up with one coefficient per clock at
// the full sample rate. The split of the multiplication below is this
// design's choice:
//   stage 1  register Y, its indices and the selected 23-bit constant
//   stage 2  two partial products, Y * c[11:0] and Y * c[22:12]
//   stage 3  add the shifted partial products and the rounding constant
//            (2^(FRAC-1) for positive products, 2^(FRAC-1)-1 for negative
//            ones, so ties round away from zero and the rounding error has
//            no bias for sign-symmetric data)
//   stage 4  drop the FRAC fraction bits
// Latency: a coefficient on in_* in an enabled clock appears on out_*
// LATENCY = 4 enabled clocks later; the indices and valid flag travel
// alongside. en low freezes the pipeline. For W_IN=9-bit pixels the
// normalized coefficients lie within +/-2048, so W_OUT=12 needs no
// saturation; an assertion flags any valid result that would not fit.
module norm_mult #(
  parameter int W_IN  = 21,
  parameter int W_OUT = 12,
  parameter int FRAC  = ict_pkg::NORM_FRAC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     in_valid,
  input  logic signed [W_IN-1:0]   in_data,
  input  logic [2:0]               in_row,
  input  logic [2:0]               in_col,
  output logic                     out_valid,
  output logic signed [W_OUT-1:0]  out_data,
  output logic [2:0]               out_row,
  output logic [2:0]               out_col
);
  import ict_pkg::*;

  localparam int LATENCY = 4;
  localparam int HALF    = 12;
  localparam int PW      = W_IN + NORM_W + 1;

  typedef struct packed {
    logic       valid;
    logic [2:0] row;
    logic [2:0] col;
  } tag_t;

  tag_t                       tag [LATENCY];
  logic signed [W_IN-1:0]     y1;
  logic [NORM_W-1:0]          c1;
  logic signed [W_IN+HALF:0]  pp_lo, pp_hi;
  logic signed [PW-1:0]       acc3;
  logic                       neg2;
  logic signed [PW-1:0]       q4;

  assign q4 = acc3 >>> FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) tag[i] <= '0;
      y1 <= '0; c1 <= '0; neg2 <= 1'b0; pp_lo <= '0; pp_hi <= '0; acc3 <= '0; out_data <= '0;
    end else if (en) begin
      tag[0] <= '{in_valid, in_row, in_col};
      for (int i = 1; i < LATENCY; i++) tag[i] <= tag[i-1];
      // stage 1
      y1 <= in_data;
      c1 <= norm_coef(in_row, in_col);
      // stage 2
      neg2  <= y1[W_IN-1];
      pp_lo <= y1 * $signed({1'b0, c1[HALF-1:0]});
      pp_hi <= (W_IN+HALF+1)'(y1 * $signed({1'b0, c1[NORM_W-1:HALF]}));
      // stage 3
      acc3 <= (PW'(pp_hi) <<< HALF) + PW'(pp_lo) + (PW'(1) <<< (FRAC - 1))
              - PW'(neg2);
      // stage 4
      out_data <= W_OUT'(q4);
    end
  end

  // A valid result must fit in W_OUT bits; with the defaults it always does
  // (|X| <= 2048 for 9-bit pixels), a narrower W_OUT would wrap.
  always_ff @(posedge clk) begin
    if (en && tag[2].valid)
      assert (q4 == PW'(W_OUT'(q4)))
        else $error("norm_mult: coefficient %0d does not fit in %0d bits", q4, W_OUT);
  end

  assign out_valid = tag[LATENCY-1].valid;
  assign out_row   = tag[LATENCY-1].row;
  assign out_col   = tag[LATENCY-1].col;

endmodule
