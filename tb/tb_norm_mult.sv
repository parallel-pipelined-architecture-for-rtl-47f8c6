// tb_norm_mult: checks the normalization multiplier against floating point.
//
// Random un-normalized coefficients with random indices (l,k) are fed with
// random valid gaps and stalls. Each result must equal Y*K(l)*K(k) to within
// half an LSB plus the error of the 24-bit fraction constants (|Y|/2^24), carry
// the same indices, and appear exactly 4 enabled clocks after its input.
// Exact ties (Y/8 with Y = 4 mod 8, for l,k in {0,4}) must round away from
// zero, and at least one must occur.
module tb_norm_mult;
  import tb_ict_ref_pkg::*;
  localparam int N   = 4000;
  localparam int LAT = 4;

  logic clk = 0, rst_n = 0, en = 0;
  logic in_valid = 0;
  logic signed [20:0] in_data = '0;
  logic [2:0] in_row = '0, in_col = '0;
  logic out_valid;
  logic signed [11:0] out_data;
  logic [2:0] out_row, out_col;

  norm_mult #(.W_IN(21), .W_OUT(12)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_stall = 0, n_tie = 0;
  // Inputs by enabled-clock number; -1 in qv marks an idle slot.
  int qy [N * 2 + 16];
  int ql [N * 2 + 16];
  int qk [N * 2 + 16];
  bit qv [N * 2 + 16];
  int n = 0, n_out = 0;
  real max_err = 0.0;

  initial begin
    repeat (N * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (n_out < N) begin
      @(posedge clk);
      if ($urandom_range(5) == 0) en <= 0;
      else begin
        int l, k;
        real lim;
        l = int'($urandom_range(7)); k = int'($urandom_range(7));
        lim = 2000.0 / (kn(l) * kn(k));
        if (lim > 1000000.0) lim = 1000000.0;
        en <= 1;
        qv[sent] = ($urandom_range(4) != 0);
        ql[sent] = l; qk[sent] = k;
        qy[sent] = int'($urandom_range(2 * int'(lim))) - int'(lim);
        in_valid <= qv[sent]; in_row <= 3'(l); in_col <= 3'(k); in_data <= 21'(qy[sent]);
        sent++;
      end
    end
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_tie == 0) failures++;
    $display("max_err=%f ties=%0d", max_err, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (en) begin
      if (n >= LAT) begin
        int j;
        j = n - LAT;
        checks++;
        if (out_valid != qv[j]) begin
          failures++;
          if (failures < 10) $display("FAIL slot %0d: valid %0d expected %0d", j, out_valid, qv[j]);
        end
        if (qv[j]) begin
          real r, e;
          r = real'(qy[j]) * kn(ql[j]) * kn(qk[j]);
          e = absr(real'(out_data) - r);
          if (e > max_err) max_err = e;
          checks++;
          if (e > 0.5 + absr(real'(qy[j])) / 16777216.0 + 1e-9 || out_row != 3'(ql[j]) || out_col != 3'(qk[j])) begin
            failures++;
            if (failures < 10) $display("FAIL slot %0d: %0d*K(%0d)K(%0d) gave %0d (%0d,%0d), expected %f",
                                        j, qy[j], ql[j], qk[j], out_data, out_row, out_col, r);
          end
          if (ql[j] % 4 == 0 && qk[j] % 4 == 0 && (qy[j] % 8 == 4 || qy[j] % 8 == -4)) begin
            int expv;
            expv = (qy[j] > 0) ? (qy[j] + 4) / 8 : -((4 - qy[j]) / 8);
            n_tie++;
            checks++;
            if (int'(out_data) != expv) begin
              failures++;
              if (failures < 10) $display("FAIL tie %0d/8 gave %0d, expected %0d", qy[j], out_data, expv);
            end
          end
          n_out++;
        end
      end
      n++;
    end else n_stall++;
  end

endmodule
