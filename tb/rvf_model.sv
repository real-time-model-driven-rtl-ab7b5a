// rvf_model: behavioural model of a 64-tap rank value filter chip (L64220
// type) as the DRC module uses it. Not synthesizable design; a bought-in
// part.
//
// An 8x8 window of pixels: each clock every row shifts one place left and
// takes its new pixel (di[r]) at column 7. Window cell i = 8*row + col
// takes part when mask[i] is 1. The output is the element of rank `rank` of
// the taking-part pixels ordered from lowest to highest (rank 0 = minimum);
// an empty set or a rank beyond the set gives 0. The output appears LATENCY
// clocks after the window input; the window register is the first stage.
// Programming through the chip's register port is replaced by the mask and
// rank inputs, this design's choice for simulation; the rank definition
// follows the specification.
module rvf_model #(
  parameter int LATENCY = 3
) (
  input  logic        clk,
  input  logic [7:0]  di [8],
  input  logic [63:0] mask,
  input  logic [5:0]  rank,
  output logic [7:0]  dout
);
  logic [7:0] win  [8][8];
  logic [7:0] pipe [LATENCY-1];
  logic [7:0] res;

  initial
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) win[r][c] = 8'd0;

  // rank value: the set member with at most `rank` members below it and
  // more than `rank` members at or below it
  always_comb begin
    int n, lt, le;
    logic [7:0] vals [64];
    n = 0;
    res = 8'd0;
    for (int i = 0; i < 64; i++) begin
      vals[i] = 8'd0;
      if (mask[i]) begin
        vals[n] = win[i/8][i%8];
        n++;
      end
    end
    for (int j = 0; j < 64; j++)
      if (j < n) begin
        lt = 0; le = 0;
        for (int k = 0; k < 64; k++)
          if (k < n) begin
            if (vals[k] <  vals[j]) lt++;
            if (vals[k] <= vals[j]) le++;
          end
        if (lt <= int'(rank) && int'(rank) < le) res = vals[j];
      end
  end

  always @(posedge clk) begin
    for (int r = 0; r < 8; r++) begin
      for (int c = 0; c < 7; c++) win[r][c] <= win[r][c+1];
      win[r][7] <= di[r];
    end
    pipe[0] <= res;
    for (int k = 1; k < LATENCY - 1; k++) pipe[k] <= pipe[k-1];
  end

  assign dout = pipe[LATENCY-2];
endmodule
