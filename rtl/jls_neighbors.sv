// jls_neighbors: data acquisition window of the JPEG-LS codec.
//
// Holds the previous and the current row of a BLK x BLK plane and presents
// the causal context of the sample at the current position: a (left),
// b (above), c (above-left) and d (above-right), as in the codec's sliding
// window. Edge rules are those of JPEG-LS: the row above the first row is
// zero; at the first column a = b and c is the value a had at the start of the
// previous row; at the last column d = b.
//
// Interface: `push` accepts sample `x` at the current position (row, col) and
// advances the position in raster order. After BLK*BLK pushes the window
// returns to row 0 with a zero row above, ready for the next plane. `clear`
// (synchronous) restarts at row 0, col 0. The outputs are combinational from
// the stored rows, so a, b, c, d for a position are valid in the same cycle
// the position is current and x can be pushed in that same cycle.
//
// The a, b, c, d window is the original design's first pipeline level; the
// two-row buffer is this design's own.
module jls_neighbors #(
  parameter int unsigned BLK = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    push,
  input  jls_pkg::sample_t        x,
  output jls_pkg::sample_t        a,
  output jls_pkg::sample_t        b,
  output jls_pkg::sample_t        c,
  output jls_pkg::sample_t        d,
  output logic [$clog2(BLK)-1:0]  col,
  output logic [$clog2(BLK)-1:0]  row,
  output logic                    last_col,
  output logic                    last_row
);
  import jls_pkg::*;

  sample_t prev_row [BLK];
  sample_t cur_row  [BLK];
  sample_t c0;            // value a had at the first column of the previous row
  logic    first_row;

  assign last_col = (col == ($clog2(BLK))'(BLK-1));
  assign last_row = (row == ($clog2(BLK))'(BLK-1));

  always_comb begin
    if (first_row) begin
      b = '0;
      c = '0;
      d = '0;
    end else begin
      b = prev_row[col];
      c = (col == 0) ? c0 : prev_row[col-1];
      d = last_col ? prev_row[col] : prev_row[col+1];
    end
    a = (col == 0) ? b : cur_row[col-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      first_row <= 1'b1;
      c0        <= '0;
      for (int i = 0; i < BLK; i++) begin
        prev_row[i] <= '0;
        cur_row[i]  <= '0;
      end
    end else if (clear) begin
      col       <= '0;
      row       <= '0;
      first_row <= 1'b1;
      c0        <= '0;
    end else if (push) begin
      cur_row[col] <= x;
      if (last_col) begin
        col <= '0;
        if (last_row) begin
          row       <= '0;
          first_row <= 1'b1;
          c0        <= '0;
        end else begin
          row       <= row + 1'b1;
          first_row <= 1'b0;
          // a at the first column of the row just finished is its b
          c0        <= first_row ? '0 : prev_row[0];
          for (int i = 0; i < BLK - 1; i++) prev_row[i] <= cur_row[i];
          prev_row[BLK-1] <= x;
        end
      end else begin
        col <= col + 1'b1;
      end
    end
  end

endmodule
