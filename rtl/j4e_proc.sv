// j4e_proc: even-half processor of the 1-D J transform (J4e).
//
// Computes, for the sums s(n) = x(n)+x(7-n) of one row,
//   Y0 = g(u0+u1)            u0 = s0+s3,  u1 = s1+s2
//   Y4 = g(u0-u1)            v0 = s0-s3,  v1 = s1-s2
//   Y2 = e*v0 + f*v1 = 3v0 + v1
//   Y6 = f*v0 - e*v1 = v0 - 3v1
// which is the factorization J4e = diag(J2e, J2o) [I2 I2; I2 -I2] R4 with
// g=1, e=3, f=1. As in the document, there is a single adder and a single
// subtractor working in parallel, used once every two clocks (four
// operations per row, so they are busy 100% of the time), and the
// multiplications by 3 are shift-and-add steps pipelined one slot ahead of
// the subtraction that needs them. The exact register count and slot order
// are this design's choice.
//
// s(n) is held on s_in for two clocks: s0 while cnt=0,1, s1 while cnt=2,3,
// s2 while cnt=4,5, s3 while cnt=6,7. The adder/subtractor fire on the edge
// that ends an odd cnt:
//   cnt=5: u1,v1 <= r_s1 +/- s2          cnt=7: u0,v0 <= r_s0 +/- s3, t3v1 <= 3v1
//   cnt=1: y0,y4 <= u0 +/- u1, t3v0<=3v0  cnt=3: y2 <= t3v0+v1, y6 <= v0-t3v1
// For a row whose s0 is presented at cnt=0 of period P, y0/y4 are valid from
// cnt=2 and y2/y6 from cnt=4 of period P+1, each for 8 clocks.
module j4e_proc #(
  parameter int W = 15
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [2:0]          cnt,
  input  logic signed [W-1:0] s_in,
  output logic signed [W-1:0] y0,
  output logic signed [W-1:0] y4,
  output logic signed [W-1:0] y2,
  output logic signed [W-1:0] y6
);

  logic signed [W-1:0] r_s0, r_s1, u0, u1, v0, v1, t3v0, t3v1;
  logic signed [W-1:0] op_a, op_b, op_c, op_d, sum, dif;

  // Operand multiplexers feeding the adder (a+b) and the subtractor (c-d).
  always_comb begin
    unique case (cnt[2:1])
      2'd2:    begin op_a = r_s1; op_b = s_in; op_c = r_s1; op_d = s_in; end  // cnt=5
      2'd3:    begin op_a = r_s0; op_b = s_in; op_c = r_s0; op_d = s_in; end  // cnt=7
      2'd0:    begin op_a = u0;   op_b = u1;   op_c = u0;   op_d = u1;   end  // cnt=1
      default: begin op_a = t3v0; op_b = v1;   op_c = v0;   op_d = t3v1; end  // cnt=3
    endcase
    sum = op_a + op_b;
    dif = op_c - op_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_s0 <= '0; r_s1 <= '0; u0 <= '0; u1 <= '0; v0 <= '0; v1 <= '0;
      t3v0 <= '0; t3v1 <= '0; y0 <= '0; y4 <= '0; y2 <= '0; y6 <= '0;
    end else if (en && cnt[0]) begin
      unique case (cnt[2:1])
        2'd2: begin u1 <= sum; v1 <= dif; end
        2'd3: begin u0 <= sum; v0 <= dif; t3v1 <= (v1 <<< 1) + v1; end
        2'd0: begin y0 <= sum; y4 <= dif; t3v0 <= (v0 <<< 1) + v0; r_s0 <= s_in; end
        default: begin y2 <= sum; y6 <= dif; r_s1 <= s_in; end
      endcase
    end
  end

endmodule
