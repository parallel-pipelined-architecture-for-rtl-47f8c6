// tb_j4o_proc: checks the odd-half processor against the odd rows of the
// full kernel J, Y(k) = sum_{n<4} J(k,n) d(n) for k = 1,3,5,7.
//
// Each row supplies four random differences, each held for two clocks as the input
// processor does. All four results must be valid at cnt=0 and still at
// cnt=7 of the following period, which pins the accumulation
// schedule. Random stall clocks are inserted.
module tb_j4o_proc;
  import tb_ict_ref_pkg::*;
  localparam int NROW = 300;

  logic clk = 0, rst_n = 0, en = 0;
  logic [2:0] cnt;
  int per = 0;   // row period index
  logic signed [14:0] d_in, y1, y3, y5, y7;

  j4o_proc #(.W(15)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_stall = 0;
  int sv [NROW + 4][4];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= 3'd0;
    else if (en) begin
      cnt <= cnt + 3'd1;
      if (cnt == 3'd7) per <= per + 1;
    end

  assign d_in = 15'(sv[per][cnt[2:1]]);

  function automatic int ref_y(input int r, input int k);
    int acc = 0;
    for (int n = 0; n < 4; n++) acc += jm(k, n) * sv[r][n];
    return acc;
  endfunction

  task automatic chk(input int got, input int expv, input string what);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, expv);
    end
  endtask

  initial begin
    repeat ((NROW + 4) * 8 * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (sv[r, n]) sv[r][n] = int'($urandom_range(1022)) - 511;
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
      if (cnt == 3'd0 || cnt == 3'd7) begin
        int r;
        r = per - 1;
        chk(int'(y1), ref_y(r, 1), "Y1");
        chk(int'(y3), ref_y(r, 3), "Y3");
        chk(int'(y5), ref_y(r, 5), "Y5");
        chk(int'(y7), ref_y(r, 7), "Y7");
      end
    end
    if (!en) n_stall++;
  end

endmodule
