// sfmu_pkg: types and constants shared by the Shape Feature Measurement Unit.
//
// The unit is controlled by a 43-bit CAD control bus made of three fields
// (most significant first): a 15-bit template load command, 20 bits that
// activate OPTIC templates (5 bits per grid, grid 0 in the most significant
// slot) and 8 bits that activate IRIS templates (IRIS 1 in the upper nibble).
// The field layout and the destination codes are those of the board's
// specification; the host address map further down is this design's choice.
package sfmu_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NUM_GRIDS      = 4;   // Grid0(0,0) Grid1(8,0) Grid2(0,8) Grid3(8,8)
  localparam int unsigned NUM_OPTICS     = 8;   // two OPTICs per grid
  localparam int unsigned NUM_IRIS       = 2;   // one IRIS serves two grids
  localparam int unsigned OPTIC_SECTIONS = 4;   // templates held by one OPTIC
  localparam int unsigned IRIS_SECTIONS  = 4;   // 16x16 templates held by one IRIS
  localparam int unsigned TRAM_AW        = 13;  // 8k byte template RAM
  localparam int unsigned CFG_BITS       = 22;  // OPTIC configuration chain
  localparam int unsigned CAD_BUS_W      = 43;

  typedef logic [7:0] pixel_t;
  typedef logic [7:0] tcode_t;                 // user-defined template code

  // ------------------------------------------------- CAD control bus fields
  // Destination code (Table of destination codes):
  //   0 g g o s s : OPTIC o of grid g, template section s
  //   1 0 0 i s s : IRIS i, template section s
  //   1 1 0 0 0 0 : configuration word to all OPTICs
  typedef logic [5:0] dest_t;
  localparam dest_t DEST_CFG_ALL = 6'b110000;

  typedef struct packed {
    logic   load;     // 1 = load request
    dest_t  dest;
    tcode_t code;
  } load_cmd_t;       // 15 bits

  typedef struct packed {
    logic       composed;  // 0: single shape (second layer bypassed), 1: part of composed shape
    logic       on;        // both OPTICs of the grid on (chip select)
    logic       sel;       // which of the two OPTICs drives its output (output enable)
    logic [1:0] addr;      // template section inside the selected OPTIC
  } optic_act_t;           // 5 bits

  typedef struct packed {
    load_cmd_t             ld;
    optic_act_t [0:NUM_GRIDS-1] optic;  // element 0 (grid 0) in the upper bits
    logic [7:0]            iris;       // bit 4*i+s: IRIS i, section s active
  } cad_bus_t;                          // 43 bits

  // Kinds of load the load controller performs.
  typedef enum logic [1:0] {
    LD_NONE  = 2'd0,
    LD_OPTIC = 2'd1,
    LD_IRIS  = 2'd2,
    LD_CFG   = 2'd3
  } ld_kind_t;

  function automatic ld_kind_t dest_kind(dest_t d);
    if (!d[5])                   return LD_OPTIC;
    else if (d[4:3] == 2'b00)    return LD_IRIS;
    else if (d == DEST_CFG_ALL)  return LD_CFG;
    else                         return LD_NONE;
  endfunction

  // OPTIC load-chain addresses (CADR)
  localparam logic [2:0] CADR_CFG = 3'b100;

  // Number of clocks of each load kind
  localparam int unsigned OPTIC_TMPL_BYTES = 16;                       // 128 chain bits
  localparam int unsigned OPTIC_LOAD_CLKS  = OPTIC_TMPL_BYTES * 9;     // 144
  localparam int unsigned IRIS_TMPL_BYTES  = 66;                       // 32 ref + 32 dc + 2 thresholds
  localparam int unsigned CFG_LOAD_CLKS    = CFG_BITS;                 // 22

  // ------------------------------------------------------ host address map
  // 16-bit byte address, 8-bit data.
  localparam logic [15:0] HA_TRAM     = 16'h0000;  // 0000-1FFF template RAM
  localparam logic [15:0] HA_OLUT     = 16'h2000;  // 2000-3FFF output look-up table
  localparam logic [15:0] HA_ILUT     = 16'h4000;  // 4000-41FF input LUT, 2 bytes per code
  localparam logic [15:0] HA_STO      = 16'h4200;  // 4200-421F stored OPTIC template codes
  localparam logic [15:0] HA_STI      = 16'h4220;  // 4220-4227 stored IRIS template codes
  localparam logic [15:0] HA_CFG      = 16'h4230;  // 4230-4232 22-bit configuration register
  localparam logic [15:0] HA_OVR      = 16'h4240;  // 4240-4245 override register bytes
  localparam logic [15:0] HA_OVR_SEL  = 16'h4246;  // bit 0: 1 = host (override) control

endpackage
