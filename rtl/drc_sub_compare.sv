// drc_sub_compare: range subtraction and threshold compare of the Dynamic
// Range Correlator (DRC) module.
//
// Two rank value filters look at the same 8x8 window. The first returns the
// rank value over the white do-care pixels, the threshold T_vw up to which
// the white sub-template still matches. The second returns the rank value
// over the black do-care pixels, which is T_vb - 1, one below the lowest
// threshold at which the black sub-template matches. Their difference
// A = T_vw - (T_vb - 1) is the number of video thresholds at which both
// sub-templates match: the dynamic range. A recognition is
// A >= B, where B is the programmed range threshold.
//
// The structure (subtractor, then comparator with the range threshold as B)
// follows the specification. A negative difference (white rank below the
// black rank) counts as no recognition; the 9-bit signed difference and the
// single output register are this design's choice.
//
// Interface: in_valid with t_white / t_black_m1 (8-bit unsigned rank
// values), range_thr (8-bit B input) -> rec_valid, rec, range_val (A
// clipped at 0).
// Timing: one clock from input to output.
module drc_sub_compare (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [7:0] t_white,      // rank value of the white do-care set (T_vw)
  input  logic [7:0] t_black_m1,   // rank value of the black do-care set (T_vb - 1)
  input  logic [7:0] range_thr,    // B
  output logic       rec_valid,
  output logic       rec,
  output logic [7:0] range_val
);

  logic signed [8:0] diff;
  logic              ge;

  assign diff = $signed({1'b0, t_white}) - $signed({1'b0, t_black_m1});
  assign ge   = !diff[8] && (diff[7:0] >= range_thr);

  always_ff @(posedge clk) begin
    if (rst) begin
      rec_valid <= 1'b0;
      rec       <= 1'b0;
      range_val <= '0;
    end else begin
      rec_valid <= in_valid;
      rec       <= in_valid && ge;
      range_val <= diff[8] ? 8'd0 : diff[7:0];
    end
  end

endmodule
