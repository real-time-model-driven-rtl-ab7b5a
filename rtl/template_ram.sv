// template_ram: 8k x 8 store for OPTIC feature templates and IRIS shape templates.
//
// The host writes templates into it; the load controller reads them out to
// program a filter. Templates start on 16-byte boundaries. An OPTIC template
// takes 16 bytes (offset 0 holds chain bits 127..120, offset 15 bits 7..0);
// an IRIS template takes 80 bytes: 32 bytes reference ("do care" / white-black)
// bits, 32 bytes don't-care bits, a low and a high threshold byte and 14
// unused bytes. The memory itself does not interpret the contents.
//
// Interface: a host port (write on host_we, asynchronous read) and a read
// port for the load controller (asynchronous read, like the static RAM of the
// board). Both ports see the same array; the host is expected not to write a
// template that is being loaded.
// The 8k size, the 16-byte alignment and the 16-byte OPTIC template follow
// the specification; the IRIS template layout and the byte order inside a
// template are this design's choice.
module template_ram
  import sfmu_pkg::*;
#(
  parameter int unsigned AW = TRAM_AW
) (
  input  logic          clk,
  input  logic [AW-1:0] host_addr,
  input  logic [7:0]    host_wdata,
  input  logic          host_we,
  output logic [7:0]    host_rdata,
  input  logic [AW-1:0] ld_addr,
  output logic [7:0]    ld_rdata
);

  logic [7:0] mem [2**AW];

  always_ff @(posedge clk)
    if (host_we) mem[host_addr] <= host_wdata;

  assign host_rdata = mem[host_addr];
  assign ld_rdata   = mem[ld_addr];

endmodule
