// output_logic: error code generation from missing recognitions.
//
// Twelve filter outputs can report a result: per grid g the first-layer cell
// result (used when the grid works on single shapes, second layer bypassed)
// and the two second-layer (IRIS, low clip output OCL) results of the grid's
// two shape templates. A result that is expected (template active) but
// missing (0) is an error. The source of the error is coded in 4 bits,
// {g, k} with k = 0 for the feature result and k = 1, 2 for shape template
// 0, 1 (12 of the 16 codes used), and the template code of the missing
// template is read from the stored template RAM of its layer. Source and
// code form the 13-bit address of the host-filled output look-up table
// (bits 12..9 source, bit 8 unused and 0, bits 7..0 template code), whose
// byte is the error output code.
// The address format and the use of only OCL follow the specification; the
// source numbering, and taking the lowest-numbered source when several
// errors arrive in the same clock (`err_lost` then pulses), are this
// design's choices.
//
// Interface: per-grid result strobes and bits, stored template RAM read
// ports (asynchronous), host port to the LUT (asynchronous read), error
// output err_valid/err_code/err_src.
// Timing: two clocks from a result strobe to err_valid (select, then LUT).
module output_logic
  import sfmu_pkg::*;
#(
  parameter int unsigned AW = 13
) (
  input  logic                 clk,
  input  logic                 rst,
  // first layer results
  input  logic [NUM_GRIDS-1:0] feat_valid,
  input  logic [NUM_GRIDS-1:0] feat_bit,
  input  logic [NUM_GRIDS-1:0] feat_check,        // grid on and single-shape mode
  input  logic [4:0]           feat_idx [NUM_GRIDS],  // stored OPTIC template index
  // second layer results
  input  logic [NUM_GRIDS-1:0] shape_valid,
  input  logic [1:0]           shape_ocl [NUM_GRIDS],
  input  logic [1:0]           shape_act [NUM_GRIDS],
  // stored template RAMs
  output logic [4:0]           sto_raddr,
  input  tcode_t               sto_rdata,
  output logic [2:0]           sti_raddr,
  input  tcode_t               sti_rdata,
  // host port to the look-up table
  input  logic [AW-1:0]        host_addr,
  input  logic [7:0]           host_wdata,
  input  logic                 host_we,
  output logic [7:0]           host_rdata,
  // error output
  output logic                 err_valid,
  output logic [7:0]           err_code,
  output logic [3:0]           err_src,
  output logic                 err_lost
);

  logic [7:0] lut [2**AW];

  always_ff @(posedge clk)
    if (host_we) lut[host_addr] <= host_wdata;
  assign host_rdata = lut[host_addr];

  // ---------------------------------------------- stage 1: pick a source
  logic [15:0] miss;
  logic [4:0]  idx_of [16];
  logic        any;
  logic [3:0]  pick;
  logic [4:0]  cnt;

  always_comb begin
    miss = '0;
    for (int i = 0; i < 16; i++) idx_of[i] = '0;
    for (int g = 0; g < NUM_GRIDS; g++) begin
      miss[4*g]     = feat_valid[g] && feat_check[g] && !feat_bit[g];
      idx_of[4*g]   = feat_idx[g];
      for (int s = 0; s < 2; s++) begin
        miss[4*g+1+s]   = shape_valid[g] && shape_act[g][s] && !shape_ocl[g][s];
        // IRIS (g/2), section 2*(g%2)+s
        idx_of[4*g+1+s] = 5'({1'(g / 2), 1'(g % 2), 1'(s)});
      end
    end
    any  = |miss;
    pick = '0;
    cnt  = '0;
    for (int i = 15; i >= 0; i--)
      if (miss[i]) pick = 4'(i);
    for (int i = 0; i < 16; i++) cnt = cnt + 5'(miss[i]);
  end

  logic       s1_valid;
  logic [3:0] s1_src;
  logic [4:0] s1_idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s1_src   <= '0;
      s1_idx   <= '0;
      err_lost <= 1'b0;
    end else begin
      s1_valid <= any;
      err_lost <= (cnt > 5'd1);
      if (any) begin
        s1_src <= pick;
        s1_idx <= idx_of[pick];
      end
    end
  end

  // ---------------------------------------- stage 2: template code + LUT
  tcode_t        code;
  logic [AW-1:0] laddr;

  assign sto_raddr = s1_idx;
  assign sti_raddr = s1_idx[2:0];
  assign code      = (s1_src[1:0] == 2'd0) ? sto_rdata : sti_rdata;
  assign laddr     = AW'({s1_src, 1'b0, code});

  always_ff @(posedge clk) begin
    if (rst) begin
      err_valid <= 1'b0;
      err_code  <= '0;
      err_src   <= '0;
    end else begin
      err_valid <= s1_valid;
      if (s1_valid) begin
        err_code <= lut[laddr];
        err_src  <= s1_src;
      end
    end
  end

endmodule
