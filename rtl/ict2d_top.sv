// ict2d_top: 8x8 2-D integer cosine transform ICT(10,9,6,2,3,1) processor.
//
// X = K J x J^t K is computed as the document proposes: first the 2-D
// integer J transform, then the normalization.
//   u_row   1-D J processor on the rows of the input block
//   u_rf    64-word register file that turns the row results into columns
//   u_col   1-D J processor on the columns (same design as u_row)
//   u_norm  pipelined multiplier by K(l)K(k)
// Every stage accepts and delivers one word per clock, so the processor
// takes one pixel and returns one coefficient per clock with no gaps
// between blocks (throughput 1).
//
// Interface: pixels are signed W_IN-bit values, blocks follow one another in
// row-major order x(i,j), j fastest, the first pixel after reset being
// x(0,0) of block 0. in_valid high means in_data carries the next pixel and
// advances the whole pipeline by one step; in_valid low stalls every stage,
// so in_valid doubles as the pipeline clock enable. Coefficients come out in
// column-major order (out_col = k outer, out_row = l inner), each flagged by
// out_valid and tagged with its indices. Because the pipeline only moves
// with input, the last block is pushed out by feeding 112 further pixels
// (those of the next block, or any filler).
//
// Latency: X(0,0) of a block leaves 112 accepted pixels after
// x(0,0) of that block entered: 22 in the row processor, 64 in the register
// file, 22 in the column processor and 4 in the multiplier. The word widths
// (9-bit pixels, 12-bit coefficients) and the stall-by-enable handshake are
// this design's choices; the document fixes the structure and the rates.
module ict2d_top #(
  parameter int W_IN  = 9,
  parameter int W_OUT = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [W_IN-1:0]   in_data,
  output logic                     out_valid,
  output logic signed [W_OUT-1:0]  out_data,
  output logic [2:0]               out_row,
  output logic [2:0]               out_col
);
  import ict_pkg::*;

  localparam int W1       = W_IN + J_GROWTH;   // after the row pass
  localparam int W2       = W1 + J_GROWTH;     // after the column pass
  localparam int LAT_1D   = 22;
  localparam int LAT_RF   = 64;
  localparam int COL_IN   = LAT_1D + LAT_RF;            // 86
  localparam int MUL_IN   = COL_IN + LAT_1D;            // 108
  localparam logic [5:0] IDX_RST = 6'((64 - (MUL_IN % 64)) % 64);

  logic                 en;
  logic signed [W1-1:0] row_y, col_x;
  logic signed [W2-1:0] col_y;
  logic [6:0]           fill;       // enabled clocks since reset, saturating
  logic [5:0]           idx;        // position of col_y within its block
  logic                 mul_valid;
  logic                 norm_valid;

  assign en = in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill <= '0;
      idx  <= IDX_RST;
    end else if (en) begin
      if (fill != 7'(MUL_IN)) fill <= fill + 7'd1;
      idx <= idx + 6'd1;
    end
  end
  assign mul_valid = (fill == 7'(MUL_IN));

  j1d_proc #(.W_IN(W_IN), .PHASE(0)) u_row (
    .clk, .rst_n, .en, .x_in(in_data), .y_out(row_y)
  );

  transpose_rf #(.W(W1), .PHASE(LAT_1D)) u_rf (
    .clk, .rst_n, .en, .wr_data(row_y), .rd_data(col_x), .mode()
  );

  j1d_proc #(.W_IN(W1), .PHASE(COL_IN % 8)) u_col (
    .clk, .rst_n, .en, .x_in(col_x), .y_out(col_y)
  );

  norm_mult #(.W_IN(W2), .W_OUT(W_OUT)) u_norm (
    .clk, .rst_n, .en,
    .in_valid(mul_valid), .in_data(col_y), .in_row(idx[2:0]), .in_col(idx[5:3]),
    .out_valid(norm_valid), .out_data, .out_row, .out_col
  );

  assign out_valid = norm_valid & en;

endmodule
