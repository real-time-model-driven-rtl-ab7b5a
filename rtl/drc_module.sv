// drc_module: Dynamic Range Correlator board built from two rank value filters.
//
// This is the first-layer prototype: it does what one OPTIC does, with
// bought-in L64220 rank value filter chips. The video input passes an
// eight-line line buffer (the same read-modify-write buffer as the main
// unit, 32k pixels per line). All eight taps go to both rank value filters.
// One filter is programmed with the white do-care template and the
// correlation rank, and returns T_vw. The other is programmed with the black
// do-care template and rank, and returns T_vb - 1. The subtraction-and-compare
// logic turns the two into a recognition bit (see drc_sub_compare).
//
// The filter chips are outside this module: `rvf_di` goes to both, and
// `rvf_white` / `rvf_black` come back from them. The line buffer, the two
// filters and the subtract/compare stage follow the specification. This
// design's choice: the filters' latency is taken as the parameter
// RVF_LATENCY (the chip's own figure is in its data sheet) and is used only to
// line the valid flag up with the filter outputs; the range threshold is a
// plain input (on the board it is a register set by the host).
//
// Timing: a pixel sampled at edge E reaches rvf_di after E+1, the filter
// results are expected RVF_LATENCY clocks later, and rec follows one clock
// after that.
module drc_module
  import sfmu_pkg::*;
#(
  parameter int unsigned LINE_LEN    = 32768,
  parameter int unsigned RVF_LATENCY = 3
) (
  input  logic   clk,
  input  logic   rst,
  input  pixel_t pix,
  input  logic   lie,
  // rank value filters
  output pixel_t rvf_di [8],
  input  pixel_t rvf_white,
  input  pixel_t rvf_black,
  // result
  input  logic [7:0] range_thr,
  output logic   rec_valid,
  output logic   rec,
  output logic [7:0] range_val
);

  logic                 taps_valid;
  logic [RVF_LATENCY-1:0] v_d;

  line_buffer #(.LINE_LEN(LINE_LEN), .TAPS(8)) u_lb (
    .clk(clk), .rst(rst), .lie(lie), .din(pix), .din_valid(lie),
    .dout(rvf_di), .dout_valid(taps_valid)
  );

  // valid flag follows the data through the external filters
  always_ff @(posedge clk) begin
    if (rst) v_d <= '0;
    else     v_d <= RVF_LATENCY'({v_d, taps_valid});
  end

  drc_sub_compare u_sc (
    .clk(clk), .rst(rst), .in_valid(v_d[RVF_LATENCY-1]),
    .t_white(rvf_white), .t_black_m1(rvf_black), .range_thr(range_thr),
    .rec_valid(rec_valid), .rec(rec), .range_val(range_val)
  );

endmodule
