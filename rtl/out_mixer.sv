// out_mixer: output mixer of the 1-D J processor.
//
// The J4e and J4o processors deliver the eight coefficients of a row in
// parallel, at different times and in the reordered sequence
// (Y0,Y4,Y2,Y6 | Y1,Y3,Y5,Y7). The mixer captures all eight in one clock, on
// the edge that ends cnt=4 (the first clock at which all of them are valid
// together), and shifts them out in natural order Y0..Y7, one per clock, so
// the un-normalized coefficients leave at the sample rate. The document
// names the mixer and its rate; the parallel-load shift register and the
// natural output order are this design's choice.
//
// Timing: y_out shows Y0 while cnt=5, Y1 while cnt=6, ..., Y7 while cnt=4 of
// the following period.
module out_mixer #(
  parameter int W = 15
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [2:0]          cnt,
  input  logic signed [W-1:0] y_par [8],   // indexed by frequency 0..7
  output logic signed [W-1:0] y_out
);

  logic signed [W-1:0] sh [8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) sh[i] <= '0;
    end else if (en) begin
      if (cnt == 3'd4) begin
        for (int i = 0; i < 8; i++) sh[i] <= y_par[i];
      end else begin
        for (int i = 0; i < 7; i++) sh[i] <= sh[i+1];
        sh[7] <= '0;
      end
    end
  end

  assign y_out = sh[0];

endmodule
