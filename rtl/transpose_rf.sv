// transpose_rf: transposition register file between the two 1-D processors.
//
// 64 words hold one 8x8 block of row-transform results. The row processor
// writes one word per enabled clock while the column processor reads one
// word per clock, at the same address in the same clock: the old word is
// read and the new one written in its place. Blocks alternate between two
// addressing directions (mode): in mode 0 the t-th word of a block goes to
// address t, in mode 1 to address transpose(t) = {t[2:0], t[5:3]}. A block
// written in one direction is therefore read back, during the following
// block, in the other: columns where it was written in rows. This is the
// document's "read in column (row) if they were written in row (column)",
// which needs only one block of storage instead of two.
//
// Timing: the t = 0 word of a block is on wr_data in the clock numbered
// PHASE (mod 64, counting enabled clocks after reset). rd_data is
// combinational from the array and carries, in the same clock, word t of the
// previous block in transposed order, i.e. the whole transpose comes out
// exactly 64 clocks after it went in. en low freezes the file.
module transpose_rf #(
  parameter int W     = 15,
  parameter int PHASE = 22
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] wr_data,
  output logic signed [W-1:0] rd_data,
  output logic                mode
);

  localparam logic [5:0] T_RST = 6'((64 - (PHASE % 64)) % 64);

  logic [5:0]          t;
  logic [5:0]          addr;
  logic signed [W-1:0] mem [64];

  // Reset so that the wrap at the first block start sets mode to 0.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t    <= T_RST;
      mode <= (T_RST == 6'd0) ? 1'b0 : 1'b1;
    end else if (en) begin
      t <= t + 6'd1;
      if (t == 6'd63) mode <= ~mode;
    end
  end

  assign addr    = mode ? {t[2:0], t[5:3]} : t;
  assign rd_data = mem[addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 64; i++) mem[i] <= '0;
    end else if (en) begin
      mem[addr] <= wr_data;
    end
  end

endmodule
