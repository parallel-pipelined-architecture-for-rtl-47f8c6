// tb_ict2d_accuracy: IEEE 1180-1990 style accuracy run of the 2-D ICT
// processor.
//
// IEEE 1180 draws random 8x8 blocks with pixels in [-L,H] for
// (L,H) = (256,255), (5,5) and (300,300), 10000 blocks each, and repeats
// each set with the signs reversed. Here every block goes through the
// processor and each coefficient is compared with the exact floating-point
// ICT X(l,k) = K(l)K(k) sum J(l,i) x(i,j) J(k,j). Reported and checked, per
// set:
//   peak error      must stay within 0.5 LSB + |Y|/2^24 (correct rounding;
//                   IEEE 1180 asks only for at most 1)
//   mean error      per coefficient <= 0.015, overall <= 0.0015
//   mean sq. error  per coefficient <= 0.09, overall <= 0.085 (the error of
//                   exact rounding alone has a mean square of 1/12)
// The 9-bit default input width covers (256,255), (5,5) and -(5,5); the
// sign-reversed (256,255) set (pixels up to +256) and both (300,300) sets
// need 10-bit pixels and run on a second instance with W_IN=10, W_OUT=13. Random numbers come from $urandom, not the standard's generator.
module tb_ict2d_accuracy;
  import tb_ict_ref_pkg::*;

  localparam int NB      = 10000;   // blocks per set
  localparam int LATENCY = 112;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // Instance A: default parameters, sets (256,255), (5,5), -(5,5).
  // Instance B: 10-bit pixels, sets -(256,255), (300,300), -(300,300).
  logic               va = 0, vb = 0;
  logic signed [8:0]  da = '0;
  logic signed [9:0]  db = '0;
  logic               ova, ovb;
  logic signed [11:0] oda;
  logic signed [12:0] odb;
  logic [2:0]         ora, oca, orb, ocb;

  ict2d_top dut_a (.clk, .rst_n, .in_valid(va), .in_data(da),
                   .out_valid(ova), .out_data(oda), .out_row(ora), .out_col(oca));
  ict2d_top #(.W_IN(10), .W_OUT(13)) dut_b (.clk, .rst_n, .in_valid(vb), .in_data(db),
                   .out_valid(ovb), .out_data(odb), .out_row(orb), .out_col(ocb));

  int checks = 0, failures = 0;
  int done_a = 0, done_b = 0;

  // Per-set statistics, sets 0..2 on A and 3..5 on B.
  real sum_e  [6][64];
  real sum_e2 [6][64];
  real peak   [6];
  int  viol   [6];

  initial begin
    repeat (NB * 64 * 4 + 4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Set s: 0 (256,255), 1 (5,5), 2 -(5,5), 3 -(256,255), 4 (300,300), 5 -(300,300).
  function automatic int gen(input int s);
    int lo, hi, v;
    bit neg;
    neg = (s == 2 || s == 3 || s == 5);
    case (s)
      0, 3:    begin lo = 256; hi = 255; end
      1, 2:    begin lo = 5;   hi = 5;   end
      default: begin lo = 300; hi = 300; end
    endcase
    v = int'($urandom_range(lo + hi)) - lo;
    return neg ? -v : v;
  endfunction

  // Blocks are generated on the fly and kept in a ring of 4 blocks per
  // instance, enough to cover the 112-clock latency.
  int ring_a [4][8][8];
  int ring_b [4][8][8];

  task automatic stats(input int set, input int l, input int k, input longint y, input real got);
    real r, e;
    r = real'(y) * kn(l) * kn(k);
    e = got - r;
    sum_e[set][8*l+k]  += e;
    sum_e2[set][8*l+k] += e * e;
    if (absr(e) > peak[set]) peak[set] = absr(e);
    if (absr(e) > 0.5 + real'(y < 0 ? -y : y) / 16777216.0 + 1e-9) viol[set]++;
  endtask

  // Stimulus A: sets 0..2 back to back, then flush.
  initial begin
    int n = 0, total;
    total = 3 * NB * 64 + LATENCY;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (n < total) begin
      int b, i, j;
      @(posedge clk);
      b = n / 64; i = (n / 8) % 8; j = n % 8;
      if (b < 3 * NB) begin
        if (i == 0 && j == 0)
          for (int p = 0; p < 8; p++)
            for (int q = 0; q < 8; q++)
              ring_a[b % 4][p][q] = gen(b / NB);
        da <= 9'(ring_a[b % 4][i][j]);
      end else da <= '0;
      va <= 1;
      n++;
    end
    @(posedge clk);
    va <= 0;
  end

  // Stimulus B: sets 3..5 back to back, then flush.
  initial begin
    int n = 0, total;
    total = 3 * NB * 64 + LATENCY;
    repeat (3) @(posedge clk);
    while (n < total) begin
      int b, i, j;
      @(posedge clk);
      b = n / 64; i = (n / 8) % 8; j = n % 8;
      if (b < 3 * NB) begin
        if (i == 0 && j == 0)
          for (int p = 0; p < 8; p++)
            for (int q = 0; q < 8; q++)
              ring_b[b % 4][p][q] = gen(3 + b / NB);
        db <= 10'(ring_b[b % 4][i][j]);
      end else db <= '0;
      vb <= 1;
      n++;
    end
    @(posedge clk);
    vb <= 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (ova && done_a < 3 * NB * 64) begin
      int b, k, l;
      b = done_a / 64; k = (done_a / 8) % 8; l = done_a % 8;
      stats(b / NB, l, k, j2d(ring_a[b % 4], l, k), real'(oda));
      done_a++;
    end
    if (ovb && done_b < 3 * NB * 64) begin
      int b, k, l;
      b = done_b / 64; k = (done_b / 8) % 8; l = done_b % 8;
      stats(3 + b / NB, l, k, j2d(ring_b[b % 4], l, k), real'(odb));
      done_b++;
    end
  end

  initial begin
    string names [6];
    names = '{"(256,255)", "(5,5)", "-(5,5)", "-(256,255)", "(300,300)", "-(300,300)"};
    wait (done_a >= 3 * NB * 64 && done_b >= 3 * NB * 64);
    for (int s = 0; s < 6; s++) begin
      real om, omse, pm, pmse;
      om = 0.0; omse = 0.0; pm = 0.0; pmse = 0.0;
      for (int c = 0; c < 64; c++) begin
        real me, mse;
        me  = sum_e[s][c] / real'(NB);
        mse = sum_e2[s][c] / real'(NB);
        om += sum_e[s][c]; omse += sum_e2[s][c];
        if (absr(me) > pm) pm = absr(me);
        if (mse > pmse) pmse = mse;
      end
      om = om / real'(NB * 64); omse = omse / real'(NB * 64);
      $display("set %-11s blocks=%0d peak=%f worst_coef_mean=%f overall_mean=%f worst_coef_mse=%f overall_mse=%f",
               names[s], NB, peak[s], pm, om, pmse, omse);
      checks++; if (viol[s] != 0) failures++;
      checks++; if (pm > 0.015) failures++;
      checks++; if (absr(om) > 0.0015) failures++;
      checks++; if (pmse > 0.09) failures++;
      checks++; if (omse > 0.085) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
