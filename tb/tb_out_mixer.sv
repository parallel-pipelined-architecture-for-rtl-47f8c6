// tb_out_mixer: checks the output mixer's parallel load and serial order.
//
// A new random set of eight coefficients is presented every row period. The
// set present at cnt=4 must come out as Y0..Y7 while cnt = 5,6,7,0,...,4,
// one word per enabled clock; stall clocks must hold the output.
module tb_out_mixer;
  localparam int NROW = 300;

  logic clk = 0, rst_n = 0, en = 0;
  logic [2:0] cnt;
  int per = 0;
  logic signed [14:0] y_par [8];
  logic signed [14:0] y_out;

  out_mixer #(.W(15)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_stall = 0;
  int yv [NROW + 4][8];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= 3'd0;
    else if (en) begin
      cnt <= cnt + 3'd1;
      if (cnt == 3'd7) per <= per + 1;
    end

  always_comb for (int i = 0; i < 8; i++) y_par[i] = 15'(yv[per][i]);

  initial begin
    repeat ((NROW + 4) * 8 * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (yv[r, n]) yv[r][n] = int'($urandom_range(32767)) - 16384;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (per < NROW + 2) begin
      @(posedge clk);
      en <= !(per > NROW / 2 && $urandom_range(3) == 0);
    end
    checks++; if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (per >= 1 && per <= NROW) begin
      int r, k;
      k = (int'(cnt) + 3) % 8;          // cnt=5 -> 0
      r = (cnt >= 3'd5) ? per : per - 1;
      checks++;
      if (int'(y_out) != yv[r][k]) begin
        failures++;
        if (failures < 10) $display("FAIL period %0d cnt %0d: got %0d expected Y%0d=%0d", per, cnt, y_out, k, yv[r][k]);
      end
    end
    if (!en) n_stall++;
  end

endmodule
