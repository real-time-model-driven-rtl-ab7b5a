// stored_template_ram: record of which template code sits in which filter section.
//
// Each time a template is loaded into a filter, the CAD control logic writes
// its code at the index of the destination section. The output logic reads it
// back to know which template a missing recognition belongs to, and the host
// can read it for checking. The first layer uses 32 entries (8 OPTICs x 4
// sections), the second layer 8 entries (2 IRIS x 4 sections).
//
// Interface: one synchronous write port, two asynchronous read ports (output
// logic and host). Contents are cleared by reset so that an unloaded section
// reads as code 0.
// The sizes (32 and 8 bytes) and the host mapping follow the specification;
// the reset clear and the second read port are this design's choice.
module stored_template_ram
  import sfmu_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  tcode_t        wdata,
  input  logic [AW-1:0] raddr_a,
  output tcode_t        rdata_a,
  input  logic [AW-1:0] raddr_b,
  output tcode_t        rdata_b
);

  tcode_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata_a = mem[raddr_a];
  assign rdata_b = mem[raddr_b];

endmodule
