// iris_model: behavioural model of the IRIS binary template matcher chip as
// the board uses it (mode with two systems of two 16x16 templates, inputs
// from outside the chip). Not synthesizable design; a bought-in part.
//
// Memory writes (we): address 0..127 reference bits, 128..255 don't-care
// bits, byte j of template t at 32*t + j; bit b of byte j is window cell
// 8*j + b, cell n at row n/16, column n%16. Address 256 + 2t is the low and
// 257 + 2t the high threshold of template t.
// System s (templates 2s and 2s+1) shifts its 16x16 window one column when
// shift[s] is high: column 15 takes din[16s +: 16] (bit k -> row k).
// A cell matches when it is not don't-care and equals its reference bit;
// OCL = (matches > low threshold), OCH = (matches > high threshold), both from
// the window as it stands (one clock after the shift).
// The two-system mode, the template-to-system assignment, the +128 offset of
// the don't-care bits and the clipping rule follow the specification; the
// threshold addresses and the one-clock latency are this design's choice
// (the chip's own memory map is given only in its data sheet).
module iris_model (
  input  logic        clk,
  input  logic [31:0] din,
  input  logic [1:0]  shift,
  input  logic        we,
  input  logic [8:0]  addr,
  input  logic [7:0]  wdata,
  output logic [3:0]  ocl,
  output logic [3:0]  och
);
  logic [255:0] ref_bits [4], dc_bits [4];
  logic [7:0]   lo [4], hi [4];
  logic         win [2][16][16];

  initial begin
    for (int t = 0; t < 4; t++) begin
      ref_bits[t] = '0; dc_bits[t] = '1; lo[t] = 8'hFF; hi[t] = 8'hFF;
    end
    for (int s = 0; s < 2; s++)
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) win[s][r][c] = 1'b0;
  end

  always @(posedge clk) begin
    if (we) begin
      if (addr[8]) begin
        if (addr[0]) hi[addr[2:1]] <= wdata;
        else         lo[addr[2:1]] <= wdata;
      end else if (addr[7]) dc_bits[addr[6:5]][8*addr[4:0] +: 8] <= wdata;
      else                  ref_bits[addr[6:5]][8*addr[4:0] +: 8] <= wdata;
    end
    for (int s = 0; s < 2; s++)
      if (shift[s])
        for (int r = 0; r < 16; r++) begin
          for (int c = 0; c < 15; c++) win[s][r][c] <= win[s][r][c+1];
          win[s][r][15] <= din[16*s + r];
        end
  end

  always_comb begin
    for (int t = 0; t < 4; t++) begin
      int m;
      m = 0;
      for (int n = 0; n < 256; n++)
        if (!dc_bits[t][n] && (win[t/2][n/16][n%16] == ref_bits[t][n])) m++;
      ocl[t] = (m > int'(lo[t]));
      och[t] = (m > int'(hi[t]));
    end
  end
endmodule
