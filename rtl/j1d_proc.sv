// j1d_proc: 1-D J(10,9,6,2,3,1) processor, the integer part of the 8-point ICT.
//
// Each 8-sample row x(0..7), one sample per enabled clock, is transformed
// into the un-normalized coefficients Y(k) = sum_n J(k,n) x(n), which leave
// one per clock in natural order k = 0..7. Inside, following the document's
// decomposition:
//   j_input_proc  butterfly s(n)=x(n)+x(7-n), d(n)=x(n)-x(7-n) (half rate)
//   j4e_proc      Y0,Y4,Y2,Y6 from s(0..3)                      (half rate)
//   j4o_proc      Y1,Y3,Y5,Y7 from d(0..3)                      (half rate)
//   out_mixer     parallel-to-serial reordering to Y0..Y7       (full rate)
// so all arithmetic runs once every two clocks, i.e. at fs/2. The units
// are clocked by clk and fire on alternate clocks (a clock enable) instead of
// using a second, divided clock; that is this design's choice.
//
// Rows follow one another without gaps. A 3-bit counter cnt tracks the
// position within the 8-clock row period; PHASE is the clock (mod 8) after
// reset, counting only enabled clocks, at which sample x(0) of a row is on
// x_in. Latency: Y(0) of a row is on y_out exactly 22 enabled
// clocks after its x(0) was on x_in, and Y(k) follows k clocks later.
// en low freezes every register (stall). Output width is W_IN+6 bits: the
// largest row gain of J is 54.
module j1d_proc #(
  parameter int W_IN  = 9,
  parameter int PHASE = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [W_IN-1:0]   x_in,
  output logic signed [W_IN+5:0]   y_out
);
  import ict_pkg::*;

  localparam int W = W_IN + J_GROWTH;
  localparam logic [2:0] CNT_RST = 3'((7 - PHASE) & 7);

  logic [2:0]            cnt;
  logic signed [W_IN:0]  s_pair, d_pair;
  logic signed [W-1:0]   y_par [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  cnt <= CNT_RST;
    else if (en) cnt <= cnt + 3'd1;
  end

  j_input_proc #(.W_IN(W_IN)) u_in (
    .clk, .rst_n, .en, .cnt, .x_in, .s_out(s_pair), .d_out(d_pair)
  );

  j4e_proc #(.W(W)) u_even (
    .clk, .rst_n, .en, .cnt, .s_in(W'(s_pair)),
    .y0(y_par[0]), .y4(y_par[4]), .y2(y_par[2]), .y6(y_par[6])
  );

  j4o_proc #(.W(W)) u_odd (
    .clk, .rst_n, .en, .cnt, .d_in(W'(d_pair)),
    .y1(y_par[1]), .y3(y_par[3]), .y5(y_par[5]), .y7(y_par[7])
  );

  out_mixer #(.W(W)) u_mix (
    .clk, .rst_n, .en, .cnt, .y_par, .y_out
  );

endmodule
