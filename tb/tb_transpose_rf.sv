// tb_transpose_rf: checks that the register file returns every block
// transposed, exactly one block (64 enabled clocks) later.
//
// Random words are written one per enabled clock from reset on; the block
// grid starts at clock PHASE=22. In every later clock the read word must be
// element (i = t mod 8, k = t div 8) of the previous block, i.e. the word
// written 64 - t + 8i + k clocks earlier. Both addressing directions must
// be used, and random stalls are inserted.
module tb_transpose_rf;
  localparam int NBLK  = 30;
  localparam int PH    = 22;
  localparam int NCYC  = PH + 64 * NBLK;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [14:0] wr_data = '0, rd_data;
  logic mode;

  transpose_rf #(.W(15), .PHASE(PH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_stall = 0, n_m0 = 0, n_m1 = 0;
  int wv [NCYC + 8];
  int n = 0;

  initial begin
    repeat (NCYC * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0;
    foreach (wv[i]) wv[i] = int'($urandom_range(32767)) - 16384;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (sent < NCYC) begin
      @(posedge clk);
      if (sent > NCYC / 2 && $urandom_range(3) == 0) en <= 0;
      else begin en <= 1; wr_data <= 15'(wv[sent]); sent++; end
    end
    @(posedge clk);
    en <= 0;
    repeat (2) @(posedge clk);
    checks++; if (n_stall == 0) failures++;
    checks++; if (n_m0 == 0 || n_m1 == 0) failures++;
    $display("stalls=%0d row_blocks=%0d col_blocks=%0d", n_stall, n_m0, n_m1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && en) begin
    if (n >= PH + 64) begin
      int m, b, t, i, k;
      m = n - PH; b = m / 64; t = m % 64; i = t % 8; k = t / 8;
      checks++;
      if (int'(rd_data) != wv[PH + 64 * (b - 1) + 8 * i + k]) begin
        failures++;
        if (failures < 10) $display("FAIL block %0d t %0d: got %0d", b, t, rd_data);
      end
    end
    if (n >= PH && (n - PH) % 64 == 0) begin
      if (mode) n_m1++; else n_m0++;
    end
    n++;
  end
  always @(posedge clk) if (rst_n && !en && n > 0) n_stall++;

endmodule
