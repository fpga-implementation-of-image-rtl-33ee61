// pingpong_transpose: ping-pong transpose memory between two 1-D transforms.
//
// Two banks of 8x8 words, 128 words in all: bank 0 holds addresses 0..63 and
// bank 1 addresses 64..127, word (row r, column c) of bank k at k*64 + r*8 + c.
// A vector written is stored as the next row of the bank being filled; when
// eight rows are in, that bank is full and writing continues in the other
// bank. A full bank is read column by column: each read returns word c of all
// eight rows, i.e. one column, and after eight reads the bank is free again.
// Writing one bank while reading the other lets the two transform stages run
// concurrently. This follows the paper's ping-pong memory (write
// row-wise, read column-wise, 0..127); the handshake is this design's.
//
// Ports: wr_valid/wr_vec write a row. rd_ready requests a column; rd_valid/
// rd_vec return it one clock later (registered). full[1:0] shows which banks
// hold a complete block. Writing into a full bank is an overflow, checked by
// an assertion; the users of this module keep their rates below that.
module pingpong_transpose #(
  parameter int unsigned W = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                wr_valid,
  input  logic signed [W-1:0] wr_vec [8],
  input  logic                rd_ready,
  output logic                rd_valid,
  output logic signed [W-1:0] rd_vec [8],
  output logic [1:0]          full
);
  // mem[{bank, row, column}]
  logic signed [W-1:0] mem [128];

  logic       wr_bank, rd_bank;
  logic [2:0] wr_row, rd_col;
  logic       rd_fire;

  assign rd_fire = rd_ready && full[rd_bank];

  always_ff @(posedge clk) begin
    if (wr_valid) begin
      for (int c = 0; c < 8; c++) mem[{wr_bank, wr_row, 3'(c)}] <= wr_vec[c];
    end
    if (rd_fire) begin
      for (int r = 0; r < 8; r++) rd_vec[r] <= mem[{rd_bank, 3'(r), rd_col}];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank  <= 1'b0;
      rd_bank  <= 1'b0;
      wr_row   <= '0;
      rd_col   <= '0;
      full     <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= rd_fire;
      if (wr_valid) begin
        wr_row <= wr_row + 3'd1;
        if (wr_row == 3'd7) begin
          full[wr_bank] <= 1'b1;
          wr_bank       <= ~wr_bank;
        end
      end
      if (rd_fire) begin
        rd_col <= rd_col + 3'd1;
        if (rd_col == 3'd7) begin
          full[rd_bank] <= 1'b0;
          rd_bank       <= ~rd_bank;
        end
      end
    end
  end

  // A row may only be written into a bank that is not waiting to be read.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    wr_valid |-> !full[wr_bank])
    else $error("pingpong_transpose: write into a full bank");
endmodule
