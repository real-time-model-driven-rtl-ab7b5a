// line_buffer: eight-line video line buffer in front of the OPTIC filters.
//
// The OPTICs need a column of eight vertically adjacent 8-bit pixels on every
// clock. The buffer keeps the last TAPS-1 lines in memory. For each incoming
// pixel it reads, at the pixel's column address, the bytes of the previous
// lines, and writes back in the same clock the same bytes moved down by one
// line with the new pixel on top (a read-modify-write cycle at one address, as
// the board does with its three phase-shifted clocks). The board uses one
// byte-wide memory per delayed line; here they are one memory whose word holds
// all TAPS-1 delayed bytes, which behaves the same.
//
// Interface: din/din_valid is the picture bus (valid while the line enable is
// high); lie low clears the address generator, so address 0 is the first
// pixel of every line. dout[0] is the line delayed TAPS-1 lines (top of the
// window, OPTIC input DI0) and dout[TAPS-1] the present line (DI7).
// Timing: one input register stage plus one output register stage: a pixel
// sampled from din at one clock edge is on dout[TAPS-1] after the next edge;
// dout_valid marks it.
// Line length and tap count follow the specification (32k pixels, 8 lines).
module line_buffer
  import sfmu_pkg::*;
#(
  parameter int unsigned LINE_LEN = 32768,
  parameter int unsigned TAPS     = 8
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   lie,          // line enable: low between lines
  input  pixel_t din,
  input  logic   din_valid,
  output pixel_t dout [TAPS],
  output logic   dout_valid
);

  localparam int unsigned AW = $clog2(LINE_LEN);
  localparam int unsigned MW = 8 * (TAPS - 1);

  logic [MW-1:0] mem [LINE_LEN];
  logic [AW-1:0] addr;
  pixel_t        in_q;          // input latch
  logic          in_valid_q;
  logic          lie_q;
  logic [MW-1:0] rd;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_valid_q <= 1'b0;
      lie_q      <= 1'b0;
    end else begin
      in_valid_q <= din_valid;
      lie_q      <= lie;
    end
    in_q <= din;
  end

  addr_gen #(.DEPTH(LINE_LEN)) u_addr (
    .clk  (clk),
    .rst  (rst),
    .clear(!lie_q),
    .en   (in_valid_q),
    .addr (addr)
  );

  assign rd = mem[addr];

  // read-modify-write: every delayed line moves down one slot
  always_ff @(posedge clk) begin
    if (in_valid_q)
      mem[addr] <= {rd[MW-9:0], in_q};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout_valid <= 1'b0;
      for (int k = 0; k < TAPS; k++) dout[k] <= '0;
    end else begin
      dout_valid <= in_valid_q;
      if (in_valid_q) begin
        dout[TAPS-1] <= in_q;
        for (int k = 1; k < TAPS; k++)
          dout[TAPS-1-k] <= rd[8*k-1 -: 8];   // k lines delayed
      end
    end
  end

endmodule
