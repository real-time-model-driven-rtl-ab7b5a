// bin_line_buffer: 16-line binary line buffer of the reduced image.
//
// After data reduction every grid produces one bit per 16x16 cell, i.e. a
// binary image with 1/16 of the line length and 1/16 of the lines. The IRIS
// correlates 16x16 windows of this image, so it needs, for each cell column,
// the bits of the current cell row and the LINES-1 rows above it. This buffer
// stores LINES-1 previous reduced lines of COLS bits. When a new cell bit
// arrives at column `col` it reads the stored column, presents it together
// with the new bit, and writes it back moved down by one line (read-modify-
// write at one address, as the board's memory/register pair does with its
// WEM/OEM/RCLK/OER strobes).
// Line length (2k cells) and line count (16) follow the specification.
//
// Interface: in_valid/in_bit/in_col from the data reduction.
// out_bits[0] is the oldest line (LINES-1 cell rows up, top of the IRIS
// window), out_bits[LINES-1] the current cell row. out_valid pulses once per
// column; outputs are registered, one clock after in_valid.
module bin_line_buffer #(
  parameter int unsigned COLS  = 2048,
  parameter int unsigned LINES = 16,
  localparam int unsigned CW = $clog2(COLS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic             in_bit,
  input  logic [CW-1:0]    in_col,
  output logic             out_valid,
  output logic [LINES-1:0] out_bits
);

  logic [LINES-2:0] mem [COLS];
  logic [LINES-2:0] rd;

  assign rd = mem[in_col];

  always_ff @(posedge clk)
    if (in_valid) mem[in_col] <= {in_bit, rd[LINES-2:1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_bits  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_bits <= {in_bit, rd};
    end
  end

endmodule
