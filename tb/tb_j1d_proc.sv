// tb_j1d_proc: checks the 1-D J processor against a direct 8x8 integer
// matrix product.
//
// NROW random rows (plus two extreme rows) are streamed without gaps, then
// with random stall clocks (en low). Every output word is compared with
// Y(k) = sum_n J(k,n) x(n) and must appear exactly 22 accepted samples after
// x(0) of its row, plus k; so both the values and the latency are checked.
module tb_j1d_proc;
  import tb_ict_ref_pkg::*;

  localparam int NROW = 200;
  localparam int LAT  = 22;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [8:0]  x_in = '0;
  logic signed [14:0] y_out;

  j1d_proc #(.W_IN(9), .PHASE(0)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int rows [NROW][8];
  int n_in = 0, n_stall = 0;

  initial begin
    repeat (NROW * 8 * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NROW; r++)
      for (int n = 0; n < 8; n++)
        rows[r][n] = (r == 0) ? 255 : (r == 1) ? ((n % 2) ? -256 : 255)
                   : int'($urandom_range(511)) - 256;
  end

  initial begin
    int sent = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (sent < NROW * 8 + LAT + 8) begin
      @(posedge clk);
      if (sent > NROW * 4 && $urandom_range(3) == 0) en <= 0;
      else begin
        int r, n;
        r = sent / 8; n = sent % 8;
        sent++;
        en   <= 1;
        x_in <= (r < NROW) ? 9'(rows[r][n]) : 9'(0);
      end
    end
    @(posedge clk);
    en <= 0;
    repeat (3) @(posedge clk);
    $display("stalls=%0d", n_stall);
    checks++; if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (en) begin
      int m, r, k, expv;
      m = n_in - LAT;
      if (m >= 0 && m / 8 < NROW) begin
        r = m / 8; k = m % 8;
        expv = j1d(rows[r], k);
        checks++;
        if (int'(y_out) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d Y(%0d)=%0d expected %0d", r, k, y_out, expv);
        end
      end
      n_in++;
    end else if (n_in > 0) n_stall++;
  end

endmodule
