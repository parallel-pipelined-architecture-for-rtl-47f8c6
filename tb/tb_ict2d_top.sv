// tb_ict2d_top: end-to-end test of the 8x8 2-D ICT processor at its default
// parameters.
//
// Streams NBLK blocks of pixels through the processor, then filler, and
// compares every coefficient with the floating-point ICT X(l,k) =
// K(l)K(k) sum J(l,i) x(i,j) J(k,j) of the reference model (error must stay
// below 0.5 LSB plus |Y|/2^24 for the 24-bit fraction constants). It also
// checks the output order (column-major), the latency of 112 accepted pixels
// and the throughput of one coefficient per accepted pixel.
// Block contents follow the IEEE 1180 style of test: random pixels in
// [-256,255], in [-5,5], and the extremes (all -256, all 255, checkerboard).
// Mechanisms that must each occur: input stalls (in_valid low), register
// file blocks written in both directions, each of the six normalization
// constant classes, and back-to-back blocks with no gap.
module tb_ict2d_top;
  import tb_ict_ref_pkg::*;

  localparam int NBLK    = 40;
  localparam int LATENCY = 112;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic signed [8:0]  in_data = '0;
  logic               out_valid;
  logic signed [11:0] out_data;
  logic [2:0]         out_row, out_col;

  ict2d_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int pix [NBLK][8][8];
  int n_in = 0;          // pixels accepted
  int n_out = 0;         // coefficients received
  int n_stall = 0, n_mode0 = 0, n_mode1 = 0;
  int n_b2b = 0, cyc = 0, last_out_cyc = -10;   // gap-free block-to-block outputs
  int n_cls [6];
  real max_err = 0.0;

  function automatic int cls_idx(input int l, input int k);
    int a = (l % 2) ? 1 : ((l % 4) == 2 ? 2 : 0);
    int b = (k % 2) ? 1 : ((k % 4) == 2 ? 2 : 0);
    int lo = (a < b) ? a : b, hi = (a < b) ? b : a;
    if (lo == 0) return hi;            // 0:(g,g) 1:(g,odd) 2:(g,ef)
    if (lo == 1) return (hi == 1) ? 3 : 4;
    return 5;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  // Watchdog.
  initial begin
    repeat (NBLK * 64 * 3 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Block contents.
  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          case (b % 8)
            0:       pix[b][i][j] = -256;
            1:       pix[b][i][j] = 255;
            2:       pix[b][i][j] = ((i + j) % 2) ? 255 : -256;
            3, 4:    pix[b][i][j] = int'($urandom_range(10)) - 5;
            default: pix[b][i][j] = int'($urandom_range(511)) - 256;
          endcase
        end
  end

  // Stimulus: random stalls, but blocks 0..9 run without any gap.
  initial begin
    int total = NBLK * 64 + LATENCY;
    int sent = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (sent < total) begin
      @(posedge clk);
      if (sent >= 640 && $urandom_range(7) == 0) begin
        in_valid <= 0;
      end else begin
        int b, r, c;
        b = sent / 64; r = (sent / 8) % 8; c = sent % 8;
        sent++;
        in_valid <= 1;
        in_data  <= (b < NBLK) ? 9'(pix[b][r][c]) : 9'(0);
      end
    end
    @(posedge clk);
    in_valid <= 0;
  end

  // Output checking (n_in still holds the pixels accepted before this
  // clock), then counting of accepted pixels, stalls and the register-file
  // direction at each block start.
  always @(posedge clk) if (rst_n) begin
    int b, k, l;
    real ref_v, err;
    longint yref;
    b = n_out / 64; k = (n_out / 8) % 8; l = n_out % 8;
    cyc++;
    if (out_valid) begin
      if (n_out > 0 && n_out % 64 == 0 && cyc == last_out_cyc + 1) n_b2b++;
      last_out_cyc = cyc;
    checks++;
    if (n_in != n_out + LATENCY)
      fail($sformatf("coef %0d left after %0d pixels, expected %0d", n_out, n_in, n_out + LATENCY));
    checks++;
    if (out_row != 3'(l) || out_col != 3'(k))
      fail($sformatf("coef %0d tagged (%0d,%0d), expected (%0d,%0d)", n_out, out_row, out_col, l, k));
    if (b < NBLK) begin
      yref  = j2d(pix[b], l, k);
      ref_v = real'(yref) * kn(l) * kn(k);
      err   = absr(real'(out_data) - ref_v);
      if (err > max_err) max_err = err;
      checks++;
      if (err > 0.5 + real'(yref < 0 ? -yref : yref) / 16777216.0 + 1e-9)
        fail($sformatf("block %0d X(%0d,%0d)=%0d, reference %f", b, l, k, out_data, ref_v));
      n_cls[cls_idx(l, k)]++;
    end
    n_out++;
    end
    if (in_valid) begin
      n_in++;
      if (dut.u_rf.t == 6'd0) begin
        if (dut.u_rf.mode) n_mode1++; else n_mode0++;
      end
    end else if (n_in > 0 && n_in < NBLK * 64) n_stall++;
  end

  initial begin
    wait (n_out >= NBLK * 64);
    repeat (5) @(posedge clk);
    $display("coefficients=%0d stalls=%0d back_to_back_blocks=%0d rf_row_blocks=%0d rf_col_blocks=%0d max_err=%f",
             n_out, n_stall, n_b2b, n_mode0, n_mode1, max_err);
    checks++; if (n_stall == 0) fail("no stall happened");
    checks++; if (n_b2b == 0) fail("no two blocks left back to back");
    checks++; if (n_mode0 == 0) fail("register file never wrote a block in row order");
    checks++; if (n_mode1 == 0) fail("register file never wrote a block in column order");
    for (int c = 0; c < 6; c++) begin
      checks++;
      if (n_cls[c] == 0) fail($sformatf("normalization class %0d never used", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
