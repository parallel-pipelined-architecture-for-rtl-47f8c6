// j4o_proc: odd-half processor of the 1-D J transform (J4o).
//
// Computes, for the differences d(n) = x(n)-x(7-n) of one row,
//   [Y1 Y3 Y5 Y7]^T = J4o [d0 d1 d2 d3]^T,
//   J4o = [ a  b  c  d ;  b -d -a -c ;  c -a  d  b ;  d -c  b -a ]
// with a=10, b=9, c=6, d=2, using no multiplier. Each d(n) is held for two
// clocks; while it is held three shared adders form its multiples
//   2d = d<<1, 6d = (d<<2)+(d<<1), 9d = (d<<3)+d, 10d = (d<<3)+(d<<1)
// and four accumulators (the intermediate registers) each add or subtract
// the multiple that their row of J4o needs for that column. After d3 the
// four results are copied to the output registers, which hold them for a
// full 8-clock row period while the next row accumulates.
//
// The document builds this unit from four adders, one subtractor, eight
// multiplexers and four intermediate registers, following a factorization
// of J4o into shift/add steps; that factorization is not reproduced here,
// so this is the plain column-by-column accumulation of the same product.
//
// Timing: d0 on d_in while cnt=0,1, d1 while cnt=2,3, d2 while cnt=4,5,
// d3 while cnt=6,7; accumulation on the edges ending odd cnt. y1..y7 are
// valid from cnt=0 of the next period for 8 clocks.
module j4o_proc #(
  parameter int W = 15
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [2:0]          cnt,
  input  logic signed [W-1:0] d_in,
  output logic signed [W-1:0] y1,
  output logic signed [W-1:0] y3,
  output logic signed [W-1:0] y5,
  output logic signed [W-1:0] y7
);

  typedef enum logic [1:0] {M2 = 2'd0, M6 = 2'd1, M9 = 2'd2, M10 = 2'd3} mult_e;
  typedef struct packed {
    logic  neg;
    mult_e m;
  } term_t;

  logic signed [W-1:0] m2, m6, m9, m10;
  logic signed [W-1:0] acc  [4];
  logic signed [W-1:0] nxt  [4];
  term_t               term [4];

  // Shared shift-and-add multiples of the current d(n).
  always_comb begin
    m2  = d_in <<< 1;
    m6  = (d_in <<< 2) + m2;
    m9  = (d_in <<< 3) + d_in;
    m10 = (d_in <<< 3) + m2;
  end

  // Entry of J4o for (output row r, column n = cnt[2:1]).
  always_comb begin
    unique case (cnt[2:1])
      2'd0: begin term[0] = '{1'b0, M10}; term[1] = '{1'b0, M9};  term[2] = '{1'b0, M6};  term[3] = '{1'b0, M2};  end
      2'd1: begin term[0] = '{1'b0, M9};  term[1] = '{1'b1, M2};  term[2] = '{1'b1, M10}; term[3] = '{1'b1, M6};  end
      2'd2: begin term[0] = '{1'b0, M6};  term[1] = '{1'b1, M10}; term[2] = '{1'b0, M2};  term[3] = '{1'b0, M9};  end
      default: begin term[0] = '{1'b0, M2}; term[1] = '{1'b1, M6}; term[2] = '{1'b0, M9}; term[3] = '{1'b1, M10}; end
    endcase
  end

  // Accumulator inputs: the first column starts a new sum.
  always_comb begin
    for (int r = 0; r < 4; r++) begin
      logic signed [W-1:0] mv, base;
      unique case (term[r].m)
        M2:      mv = m2;
        M6:      mv = m6;
        M9:      mv = m9;
        default: mv = m10;
      endcase
      base   = (cnt[2:1] == 2'd0) ? '0 : acc[r];
      nxt[r] = term[r].neg ? base - mv : base + mv;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 4; r++) acc[r] <= '0;
      y1 <= '0; y3 <= '0; y5 <= '0; y7 <= '0;
    end else if (en && cnt[0]) begin
      for (int r = 0; r < 4; r++) acc[r] <= nxt[r];
      if (cnt[2:1] == 2'd3) begin
        y1 <= nxt[0]; y3 <= nxt[1]; y5 <= nxt[2]; y7 <= nxt[3];
      end
    end
  end

endmodule
