// optic_model: behavioural model of the OPTIC max/min filter chip, enough of
// it for board-level simulation. Not synthesizable design; a bought-in part.
//
// Load mode (load = 1): while wen_n is low, the chain chosen by cadr shifts
// one bit in from cin per clock (chains 0..3: 128-bit templates, chain 4:
// 22-bit configuration word). The first bit shifted in ends in the top
// position (bit 127 / bit 21). Output is 0 in load mode.
// Work mode: an 8x8 window of pixels; each clock every row shifts one place
// left and takes the new pixel of its input (di[r]) at column 7. Pixel
// i = 8*row + col has the 2-bit attribute template[2i+1:2i]: 00 MAX set,
// 01 MIN set, 10 don't care, 11 filter. The template is chosen by cadr[1:0].
// Only the DIFF / dynamic-threshold mode is modelled: DIFF = MIN(min set) -
// MAX(max set) (configuration bit 4 = 0) or MAX - MIN (bit 4 = 1), and
// TH0 = DIFF >= threshold (configuration bits 12..5). Empty sets give MIN =
// 255, MAX = 0. TH0 appears LATENCY clocks after the window input, and is
// driven only while cs_n and oe_n are low (the board wires the outputs of two
// OPTICs together).
// The modes, the attribute codes, the DIFF formula and the 6-deep pipeline
// follow the chip description in the specification; the load chain bit
// order and the window orientation are this design's choice.
module optic_model #(
  parameter int LATENCY = 6
) (
  input  logic       clk,
  input  logic [7:0] di [8],
  input  logic       cin,
  input  logic [2:0] cadr,
  input  logic       wen_n,
  input  logic       load,
  input  logic       cs_n,
  input  logic       oe_n,
  output logic       th0
);
  logic [127:0] tmpl [4];
  logic [21:0]  cfg;
  logic [7:0]   win [8][8];
  logic         pipe [LATENCY-1];   // the window register is the first stage
  logic         res;

  initial begin
    for (int t = 0; t < 4; t++) tmpl[t] = {64{2'b10}};
    cfg = '0;
  end

  always @(posedge clk) begin
    if (load && !wen_n) begin
      if (cadr[2]) cfg <= {cfg[20:0], cin};
      else         tmpl[cadr[1:0]] <= {tmpl[cadr[1:0]][126:0], cin};
    end
  end

  always_comb begin
    int mn, mx, diff;
    logic [1:0] a;
    mn = 255; mx = 0;
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        a = tmpl[cadr[1:0]][2*(8*r+c) +: 2];
        if (a == 2'b01 && int'(win[r][c]) < mn) mn = int'(win[r][c]);
        if (a == 2'b00 && int'(win[r][c]) > mx) mx = int'(win[r][c]);
      end
    diff = cfg[4] ? (mx - mn) : (mn - mx);
    res = (cfg[15:13] == 3'b011) && (diff >= int'(cfg[12:5]));
  end

  always @(posedge clk) begin
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 7; c++) win[r][c] <= win[r][c+1];
      win[r][7] <= di[r];
    end
    pipe[0] <= res;
    for (int k = 1; k < LATENCY - 1; k++) pipe[k] <= pipe[k-1];
  end

  assign th0 = !load && !cs_n && !oe_n && pipe[LATENCY-2];
endmodule
