// override_unit: host override of the CAD control bus.
//
// Normally the CAD control bus comes from the CAD data unit (CDCX2) that
// expands the CAD reference image. For testing, the host can take control:
// it stores a 43-bit control word in the override register, either as three
// 16-bit words over the BIO bus or as six bytes over an 8-bit picture bus,
// and sets the single-bit OVERRIDE register to 1. A multiplexer then feeds the
// stored word instead of the CDCX2 bus to the CAD control logic.
// The specification gives the two store paths, the 43-bit register and the
// multiplexer; the word and byte order (word/byte 0 = bits 15..0 / 7..0) is
// this design's choice. So is one rule: a load request in the override
// register is cleared when the CAD control logic accepts it (`ld_accept`),
// so that one stored command loads one template and not one per clock.
//
// Interface: bio_store/bio_sel/bio_data, pic_store/pic_sel/pic_data,
// host_ctrl (the OVERRIDE bit: 1 = override register drives the bus), the
// CDCX2 bus in, the CAD bus out (combinational multiplexer) and the stored
// word for host read-back.
module override_unit
  import sfmu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       bio_store,
  input  logic [1:0] bio_sel,
  input  logic [15:0] bio_data,
  input  logic       pic_store,
  input  logic [2:0] pic_sel,
  input  logic [7:0] pic_data,
  input  logic       host_ctrl,
  input  logic       ld_accept,
  input  cad_bus_t   cdcx2_bus,
  output cad_bus_t   ovr_word,
  output cad_bus_t   cad_bus
);

  logic [CAD_BUS_W-1:0] store;

  always_ff @(posedge clk) begin
    if (rst) begin
      store <= '0;
    end else begin
      if (bio_store) begin
        unique case (bio_sel)
          2'd0:    store[15:0]  <= bio_data;
          2'd1:    store[31:16] <= bio_data;
          default: store[42:32] <= bio_data[10:0];
        endcase
      end else if (pic_store) begin
        unique case (pic_sel)
          3'd0:    store[7:0]   <= pic_data;
          3'd1:    store[15:8]  <= pic_data;
          3'd2:    store[23:16] <= pic_data;
          3'd3:    store[31:24] <= pic_data;
          3'd4:    store[39:32] <= pic_data;
          default: store[42:40] <= pic_data[2:0];
        endcase
      end else if (host_ctrl && ld_accept) begin
        store[CAD_BUS_W-1] <= 1'b0;   // load bit is the MSB
      end
    end
  end

  assign ovr_word = cad_bus_t'(store);
  assign cad_bus  = host_ctrl ? cad_bus_t'(store) : cdcx2_bus;

endmodule
