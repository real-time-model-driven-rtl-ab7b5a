// load_control: copies templates and configuration data into the filter chips.
//
// Three kinds of load, chosen by the destination code given with `start`:
//  * OPTIC template: the 16 template bytes at base..base+15 are read from the
//    template RAM one by one, each is put into an 8-bit parallel-to-serial
//    register (one clock) and shifted out most significant bit first on
//    optic_cin (eight clocks, write enable of the target OPTIC active). This
//    takes 16 * 9 = 144 clocks. Chain bit 127 is sent first. The target OPTIC
//    (destination bits 4..2) is held in load mode and its chain address CADR
//    is the template section (destination bits 1..0).
//  * configuration word to all OPTICs: the 22-bit configuration register,
//    written beforehand by the host, is shifted out bit 21 first in 22 clocks
//    with CADR = 100 and all OPTICs in load mode. The register rotates, so it
//    still holds the word afterwards.
//  * IRIS template: the IRIS is loaded in parallel, so the controller only
//    walks the addresses: 66 clocks, one byte each, template RAM byte base+k
//    is written to IRIS address A(k): reference bits k -> 32*s + k, don't-care
//    bits 32+j -> 128 + 32*s + j, low and high threshold -> 256 + 2*s (+1),
//    where s is the IRIS section.
// The clock counts of the OPTIC loads (144 and 22) are those of the
// specification; the IRIS addresses beyond "don't care = reference + 128"
// are this design's choice, since the IRIS memory map is the chip's own.
//
// iris_wdata is the template RAM data itself: the IRIS is loaded in parallel,
// so only addresses and strobes are generated here.
//
// Interface: start/dest/base (accepted when !busy), template RAM read port
// (asynchronous), 22-bit configuration register host port (3 bytes, byte 0 =
// bits 7..0), OPTIC load signals (shared serial data and CADR, per-chip
// active-low write enable and load-mode flags), IRIS write port. `done`
// pulses for one clock when a load finishes.
module load_control
  import sfmu_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  // command
  input  logic                  start,
  input  dest_t                 dest,
  input  logic [TRAM_AW-1:0]    base,
  output logic                  busy,
  output logic                  done,
  // template RAM
  output logic [TRAM_AW-1:0]    tram_addr,
  input  logic [7:0]            tram_rdata,
  // configuration register host port
  input  logic                  cfg_we,
  input  logic [1:0]            cfg_sel,
  input  logic [7:0]            cfg_wdata,
  output logic [CFG_BITS-1:0]   cfg_word,
  // OPTIC load interface
  output logic                  optic_cin,
  output logic [2:0]            optic_cadr,
  output logic [NUM_OPTICS-1:0] optic_wen_n,
  output logic [NUM_OPTICS-1:0] optic_load,
  // IRIS load interface
  output logic [NUM_IRIS-1:0]   iris_we,
  output logic [8:0]            iris_addr,
  output logic [7:0]            iris_wdata
);

  typedef enum logic [2:0] {S_IDLE, S_OBYTE, S_OSHIFT, S_CFG, S_IRIS} state_t;

  state_t             state;
  dest_t              dest_q;
  logic [TRAM_AW-1:0] base_q;
  logic [6:0]         idx;      // byte index (OPTIC, IRIS) or bit index (config)
  logic [2:0]         bitc;     // bit within byte
  logic [7:0]         p2s;      // parallel-to-serial register
  logic [CFG_BITS-1:0] cfg;

  assign cfg_word = cfg;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      dest_q <= '0;
      base_q <= '0;
      idx    <= '0;
      bitc   <= '0;
      p2s    <= '0;
      done   <= 1'b0;
      cfg    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cfg_we) begin
            unique case (cfg_sel)
              2'd0:    cfg[7:0]   <= cfg_wdata;
              2'd1:    cfg[15:8]  <= cfg_wdata;
              default: cfg[21:16] <= cfg_wdata[5:0];
            endcase
          end
          if (start) begin
            dest_q <= dest;
            base_q <= base;
            idx    <= '0;
            bitc   <= '0;
            unique case (dest_kind(dest))
              LD_OPTIC: state <= S_OBYTE;
              LD_IRIS:  state <= S_IRIS;
              LD_CFG:   state <= S_CFG;
              default:  state <= S_IDLE;
            endcase
          end
        end
        S_OBYTE: begin
          p2s   <= tram_rdata;
          bitc  <= '0;
          state <= S_OSHIFT;
        end
        S_OSHIFT: begin
          p2s  <= {p2s[6:0], 1'b0};
          bitc <= bitc + 1'b1;
          if (bitc == 3'd7) begin
            if (idx == 7'(OPTIC_TMPL_BYTES - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              idx   <= idx + 1'b1;
              state <= S_OBYTE;
            end
          end
        end
        S_CFG: begin
          cfg <= {cfg[CFG_BITS-2:0], cfg[CFG_BITS-1]};
          idx <= idx + 1'b1;
          if (idx == 7'(CFG_LOAD_CLKS - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        S_IRIS: begin
          idx <= idx + 1'b1;
          if (idx == 7'(IRIS_TMPL_BYTES - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- outputs
  assign tram_addr = base_q + TRAM_AW'(idx);

  always_comb begin
    optic_cin   = 1'b0;
    optic_cadr  = 3'b000;
    optic_wen_n = '1;
    optic_load  = '0;
    iris_we     = '0;
    iris_addr   = '0;
    iris_wdata  = tram_rdata;
    unique case (state)
      S_OBYTE, S_OSHIFT: begin
        optic_cadr             = {1'b0, dest_q[1:0]};
        optic_load[dest_q[4:2]] = 1'b1;
        if (state == S_OSHIFT) begin
          optic_cin               = p2s[7];
          optic_wen_n[dest_q[4:2]] = 1'b0;
        end
      end
      S_CFG: begin
        optic_cadr  = CADR_CFG;
        optic_load  = '1;
        optic_wen_n = '0;
        optic_cin   = cfg[CFG_BITS-1];
      end
      S_IRIS: begin
        iris_we[dest_q[2]] = 1'b1;
        if (idx < 7'd32)
          iris_addr = {2'b00, dest_q[1:0], idx[4:0]};
        else if (idx < 7'd64)
          iris_addr = {2'b01, dest_q[1:0], idx[4:0]};
        else
          iris_addr = {6'b100000, dest_q[1:0], idx[0]};
      end
      default: ;
    endcase
  end

endmodule
