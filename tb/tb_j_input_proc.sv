// tb_j_input_proc: checks the butterfly of the input processor.
//
// Random samples enter one per enabled clock (with random stalls in the
// second half). Whenever cnt is even the registered pair must be
// s(n) = x(n)+x(7-n), d(n) = x(n)-x(7-n) of the previous row, n = cnt/2,
// which checks both the tap schedule and the timing.
module tb_j_input_proc;
  localparam int NROW = 300;

  logic clk = 0, rst_n = 0, en = 0;
  logic [2:0] cnt;
  logic signed [8:0] x_in = '0;
  logic signed [9:0] s_out, d_out;

  j_input_proc #(.W_IN(9)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_stall = 0;
  int xs [NROW * 8 + 16];
  int samp = 0;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= 3'd7; else if (en) cnt <= cnt + 3'd1;

  initial begin
    repeat (NROW * 8 * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0;
    foreach (xs[i]) xs[i] = int'($urandom_range(511)) - 256;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (sent < NROW * 8 + 16) begin
      @(posedge clk);
      if (sent > NROW * 4 && $urandom_range(3) == 0) en <= 0;
      else begin
        en <= 1; x_in <= 9'(xs[sent]); sent++;
      end
    end
    @(posedge clk);
    en <= 0;
    repeat (2) @(posedge clk);
    checks++; if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (samp >= 9 && cnt[0] == 1'b0) begin
      int row, n;
      row = (samp - 1) / 8 - 1; n = int'(cnt) / 2;
      checks++;
      if (int'(s_out) != xs[8*row+n] + xs[8*row+7-n] ||
          int'(d_out) != xs[8*row+n] - xs[8*row+7-n]) begin
        failures++;
        if (failures < 10) $display("FAIL row %0d n %0d: s=%0d d=%0d", row, n, s_out, d_out);
      end
    end
    if (en) samp++; else n_stall++;
  end

endmodule
