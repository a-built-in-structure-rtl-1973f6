// Address Generation Logic (AGL): a pair of counters, one over the cells of
// a row (column counter) and one over the rows, that visits the RAM in
// sequential order, row after row.
//
// The column counter advances on every enabled clock and wraps at NC; the
// row counter advances when the column counter wraps and wraps at NR.
// col_last/row_last flag the last column and last row of the current
// address, so the controller can insert the lag pulses after a row and the
// realignment pulses after the array. clear returns both counters to zero.
// The counters stand still while the blocking pulses are active (en low).
//
// The counter sizes are the RAM geometry; the defaults (1024 x 1024, a
// 1-Mbit bit-oriented RAM) are this implementation's choice.
module prt_agl #(
  parameter int unsigned NC = 1024,  // cells per row (columns)
  parameter int unsigned NR = 1024,  // rows
  localparam int unsigned CW = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned RW = (NR > 1) ? $clog2(NR) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,     // restart at row 0, column 0
  input  logic          en,        // advance to the next cell
  output logic [CW-1:0] col,
  output logic [RW-1:0] row,
  output logic          col_last,  // current column is NC-1
  output logic          row_last   // current row is NR-1
);

  always_comb begin
    col_last = (col == CW'(NC - 1));
    row_last = (row == RW'(NR - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0;
      row <= '0;
    end else if (clear) begin
      col <= '0;
      row <= '0;
    end else if (en) begin
      if (col_last) begin
        col <= '0;
        row <= row_last ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

endmodule
