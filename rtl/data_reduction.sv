// data_reduction: one bit per 16x16 grid cell from the OPTIC recognitions.
//
// A grid cell is CELL x CELL pixels. Every pixel of a cell uses the same
// address of a one-bit memory (the cell column), so a recognition anywhere in
// the cell sets that bit. The write rules are those of the specification:
//   IO = REC, and the memory is written when GRID or REC is high,
// where GRID marks the first pixel of the cell (its first line, first
// column): there the bit is overwritten with the present recognition, which
// starts the cell afresh; elsewhere only a recognition (REC = 1) is written,
// so the bit becomes the OR of all recognitions in the cell.
// At the last pixel of the cell (bottom right, CGRID) the accumulated bit,
// including the recognition of that pixel, is presented as the cell result.
// Counting pixels and lines inside the grid is this design's way of finding
// GRID and CGRID; the board takes them from its address logic.
//
// Interface: lie_g/pie_g of the grid (the grid is only clocked while both are
// high), rec. Outputs cell_valid (one clock), cell_bit, cell_col (cell
// column index), cell_row (cell row index, low bits).
// Timing: outputs registered, one clock after the last pixel of the cell.
module data_reduction #(
  parameter int unsigned LINE_LEN = 32768,
  parameter int unsigned CELL     = 16,
  localparam int unsigned COLS = LINE_LEN / CELL,
  localparam int unsigned XW   = $clog2(LINE_LEN),
  localparam int unsigned CW   = $clog2(COLS),
  localparam int unsigned PW   = $clog2(CELL)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          lie_g,
  input  logic          pie_g,
  input  logic          rec,
  output logic          cell_valid,
  output logic          cell_bit,
  output logic [CW-1:0] cell_col,
  output logic [7:0]    cell_row
);

  logic           mem [COLS];
  logic [XW-1:0]  x;
  logic [15:0]    y;
  logic           en, en_q;
  logic [CW-1:0]  cx;
  logic [PW-1:0]  px, py;
  logic           grid, cgrid, old, we;

  assign en = lie_g && pie_g;
  assign cx = CW'(x / CELL);
  assign px = PW'(x % CELL);
  assign py = PW'(y % CELL);

  // pixel and line counters of this grid
  always_ff @(posedge clk) begin
    if (rst) begin
      x    <= '0;
      y    <= '0;
      en_q <= 1'b0;
    end else begin
      en_q <= en;
      if (en) x <= (x == XW'(LINE_LEN - 1)) ? x : x + 1'b1;
      else    x <= '0;
      if (!pie_g)           y <= '0;
      else if (en_q && !en) y <= y + 1'b1;   // end of a grid line
    end
  end

  assign grid  = en && (px == '0) && (py == '0);
  assign cgrid = en && (px == PW'(CELL - 1)) && (py == PW'(CELL - 1));
  assign old   = mem[cx];
  assign we    = en && (grid || rec);

  always_ff @(posedge clk)
    if (we) mem[cx] <= rec;

  always_ff @(posedge clk) begin
    if (rst) begin
      cell_valid <= 1'b0;
      cell_bit   <= 1'b0;
      cell_col   <= '0;
      cell_row   <= '0;
    end else begin
      cell_valid <= cgrid;
      if (cgrid) begin
        cell_bit <= old || rec;
        cell_col <= cx;
        cell_row <= 8'(y / CELL);
      end
    end
  end

endmodule
