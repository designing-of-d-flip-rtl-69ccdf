// ram_transposer: turns 8x8 blocks from row order into column order.
//
// The horizontal filters of the de-blocking filter produce a block row by
// row; the vertical filters need it column by column. The transposer takes
// one row per accepted input beat and, once a whole block is in, hands out
// one column per output beat, so the vertical filters can reuse the
// horizontally filtered data without a trip back through external memory.
//
// Two banks of N x N samples work as a ping-pong pair: while one bank is
// read out by columns, the next block is written into the other by rows,
// so a steady stream moves one row in and one column out per clock.
// A bank is marked full when its last row is written and free again when
// its last column is read.
// The 8x8 block and the row-to-column job follow the document; the 8-bit
// sample, the valid/ready handshakes and the two banks are this design's
// own choices.
//
// Interface: clk, rst (asynchronous, active high).
//   Input : in_valid, in_row (sample c of the row at bits [c*SW +: SW]),
//           in_ready (a free bank is being filled).
//   Output: out_valid, out_col (sample r of the column, taken from row r, at
//           bits [r*SW +: SW]), out_ready.
//   A beat moves on a rising edge where valid and ready are both high.
// Timing: the first column of a block is offered on the edge after its
// last row is accepted; a block takes N beats in and N beats out.
module ram_transposer #(
  parameter int unsigned N  = 8,
  parameter int unsigned SW = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [N*SW-1:0] in_row,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [N*SW-1:0] out_col
);

  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  logic [SW-1:0] mem [2][N][N];   // [bank][row][column]
  logic          wbank, rbank;
  logic [CW-1:0] wrow, rcol;
  logic [1:0]    bank_full;
  logic          wr_fire, rd_fire, wr_last, rd_last;

  assign in_ready  = !bank_full[wbank];
  assign out_valid = bank_full[rbank];
  assign wr_fire   = in_valid && in_ready;
  assign rd_fire   = out_valid && out_ready;
  assign wr_last   = (wrow == CW'(N - 1));
  assign rd_last   = (rcol == CW'(N - 1));

  always_comb begin
    for (int r = 0; r < N; r++) out_col[r*SW +: SW] = mem[rbank][r][rcol];
  end

  always_ff @(posedge clk) begin
    if (wr_fire) begin
      for (int c = 0; c < N; c++) mem[wbank][wrow][c] <= in_row[c*SW +: SW];
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      wrow      <= '0;
      rcol      <= '0;
      bank_full <= '0;
    end else begin
      if (wr_fire) begin
        wrow <= wr_last ? '0 : wrow + 1'b1;
        if (wr_last) wbank <= ~wbank;
      end
      if (rd_fire) begin
        rcol <= rd_last ? '0 : rcol + 1'b1;
        if (rd_last) rbank <= ~rbank;
      end
      for (int b = 0; b < 2; b++) begin
        if (wr_fire && wr_last && wbank == 1'(b)) bank_full[b] <= 1'b1;
        else if (rd_fire && rd_last && rbank == 1'(b)) bank_full[b] <= 1'b0;
      end
    end
  end

endmodule
