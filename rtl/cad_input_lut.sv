// cad_input_lut: template code to template RAM base address translation.
//
// The CAD control bus names a template by an 8-bit user-defined code. This
// 256-entry table, filled by the host, gives for each code the 13-bit start
// address of that template in the template RAM. The host sees each entry as
// two bytes: byte 0 holds address bits 7..0, byte 1 bits 12..8 (this byte
// split is this design's choice; the board maps the table into host memory
// in a way the specification does not detail).
//
// Interface: host byte port (host_addr = 2*code + byte, write on host_we,
// asynchronous read) and an asynchronous lookup port code -> base.
module cad_input_lut
  import sfmu_pkg::*;
(
  input  logic               clk,
  input  logic [8:0]         host_addr,
  input  logic [7:0]         host_wdata,
  input  logic               host_we,
  output logic [7:0]         host_rdata,
  input  tcode_t             code,
  output logic [TRAM_AW-1:0] base
);

  logic [TRAM_AW-1:0] lut [256];
  logic [TRAM_AW-1:0] hword;

  assign hword = lut[host_addr[8:1]];

  always_ff @(posedge clk) begin
    if (host_we) begin
      if (host_addr[0]) lut[host_addr[8:1]] <= {host_wdata[TRAM_AW-9:0], hword[7:0]};
      else              lut[host_addr[8:1]] <= {hword[TRAM_AW-1:8], host_wdata};
    end
  end

  assign host_rdata = host_addr[0] ? 8'(hword[TRAM_AW-1:8]) : hword[7:0];
  assign base       = lut[code];

endmodule
