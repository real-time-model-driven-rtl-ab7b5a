// addr_gen: line address generator of the video line buffers.
//
// A counter that walks the line memory address one step per pixel and is
// cleared at the start of every video line, so that the same address is used
// for the same pixel column on every line. The board clears it with a CLEAR
// pulse at the start of each line; here `clear` is a synchronous clear and
// `en` advances the address. The counter wraps after DEPTH-1.
//
// Interface: clk, rst (synchronous, active high), clear, en -> addr.
// Timing: addr changes on the clock edge after clear/en; clear wins over en.
// The clear at each line start follows the specification; the synchronous
// clear and the wrap at DEPTH-1 are this design's choice.
module addr_gen #(
  parameter int unsigned DEPTH = 32768,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic          en,
  output logic [AW-1:0] addr
);

  always_ff @(posedge clk) begin
    if (rst || clear)
      addr <= '0;
    else if (en)
      addr <= (addr == AW'(DEPTH - 1)) ? '0 : addr + 1'b1;
  end

endmodule
