// Behavioural model of a bit-oriented RAM under test, with fault injection.
// Not synthesizable logic of the test structure: it stands in for the memory
// that the built-in test checks.
//
// NR x NC one-bit cells, one access per clock: a write (en & we) stores wdata
// at the clock edge, a read returns the addressed cell combinationally.
// One fault can be injected at a time, at cell (f_row, f_col):
//   F_NONE    fault-free
//   F_STUCK   the cell ignores writes and always reads f_val
//   F_PSF     static pattern-sensitive fault: when the cell holds f_val and
//             its north, west, east, south neighbours hold f_nwes, a read of
//             the cell returns the inverted value
// pat is the true neighbourhood of the addressed cell, {N, W, B, E, S}
// (missing neighbours at the array edge read 0), and interior says the cell
// has all four neighbours; testbenches use them to check pattern coverage.
module prt_ram_model #(
  parameter int unsigned NC = 32,
  parameter int unsigned NR = 32,
  localparam int unsigned CW = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned RW = (NR > 1) ? $clog2(NR) : 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [RW-1:0] row,
  input  logic [CW-1:0] col,
  input  logic          wdata,
  output logic          rdata,
  output logic [4:0]    pat,
  output logic          interior,
  // fault injection
  input  logic [1:0]    f_kind,
  input  logic [RW-1:0] f_row,
  input  logic [CW-1:0] f_col,
  input  logic          f_val,
  input  logic [3:0]    f_nwes
);

  localparam logic [1:0] F_NONE = 2'd0, F_STUCK = 2'd1, F_PSF = 2'd2;

  logic mem [NR*NC];

  function automatic logic cell_at(input int r, input int c);
    if (r < 0 || r >= int'(NR) || c < 0 || c >= int'(NC)) return 1'b0;
    return mem[r*int'(NC) + c];
  endfunction

  // Power-up contents are whatever the simulator starts with. A stuck cell
  // keeps its value: it is modelled by overwriting the stored bit.
  always_ff @(posedge clk) begin
    if (en && we) mem[int'(row)*int'(NC) + int'(col)] <= wdata;
    if (f_kind == F_STUCK) mem[int'(f_row)*int'(NC) + int'(f_col)] <= f_val;
  end

  always_comb begin
    int r, c;
    logic b;
    r = int'(row);
    c = int'(col);
    b = cell_at(r, c);
    pat = {cell_at(r-1, c), cell_at(r, c-1), b, cell_at(r, c+1), cell_at(r+1, c)};
    interior = (r > 0) && (r < int'(NR) - 1) && (c > 0) && (c < int'(NC) - 1);
    rdata = b;
    if (row == f_row && col == f_col) begin
      if (f_kind == F_STUCK) rdata = f_val;
      else if (f_kind == F_PSF && b == f_val &&
               {pat[4], pat[3], pat[1], pat[0]} == f_nwes) rdata = ~b;
    end
  end

endmodule
