// tb_cad_control: drives random CAD control words and checks the decoding
// against an independent reading of the bus layout: per grid chip select and
// output enable of its two OPTICs, template address, single/composed flag,
// IRIS section flags. It then issues load requests of each destination class
// and checks the start pulse, the base address from the (modelled) input LUT,
// the stored-template writes, that requests wait while the load controller
// is busy, and that undefined destinations are ignored.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_cad_control;
  import sfmu_pkg::*;
  logic clk = 0, rst = 1;
  cad_bus_t cad_bus = '0;
  tcode_t lut_code;
  logic [12:0] lut_base;
  logic ld_busy = 0, ld_start, ld_accept;
  dest_t ld_dest;
  logic [12:0] ld_base;
  logic [2:0] ld_cadr = 3'b100;
  logic [7:0] ld_optic_load = '0;
  logic sto_we, sti_we; logic [4:0] sto_waddr; logic [2:0] sti_waddr; tcode_t st_wdata;
  logic [7:0] optic_cs_n, optic_oe_n;
  logic [2:0] optic_cadr [8];
  logic [3:0] grid_on, grid_composed;
  logic [4:0] grid_optic_idx [4];
  logic [1:0] grid_iris_act [4];
  int checks = 0, failures = 0;

  assign lut_base = {lut_code, 5'b10101} ^ 13'h0F0F;   // table model

  cad_control dut (.clk, .rst, .cad_bus, .lut_code, .lut_base, .ld_busy, .ld_start, .ld_dest,
                   .ld_base, .ld_accept, .ld_cadr, .ld_optic_load, .sto_we, .sto_waddr,
                   .sti_we, .sti_waddr, .st_wdata, .optic_cs_n, .optic_oe_n, .optic_cadr,
                   .grid_on, .grid_composed, .grid_optic_idx, .grid_iris_act);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // one load request: returns number of start pulses seen
  task automatic load(input logic [5:0] d, input logic [7:0] c, input int busy_cycles,
                      output int starts, output int sto, output int sti);
    logic [42:0] w;
    w = {1'b1, d, c, 20'h0, 8'h0};
    starts = 0; sto = 0; sti = 0;
    ld_busy = (busy_cycles > 0);
    @(negedge clk); cad_bus = cad_bus_t'(w);
    @(negedge clk); cad_bus = '0;                       // request held one clock
    for (int i = 0; i < 6 + busy_cycles; i++) begin
      if (i == busy_cycles) ld_busy = 0;
      if (ld_start) begin
        starts++;
        check(ld_dest == d, "ld_dest");
        check(ld_base == (({c, 5'b10101}) ^ 13'h0F0F), "ld_base from LUT");
      end
      if (sto_we) begin sto++; check(sto_waddr == d[4:0] && st_wdata == c, "stored OPTIC write"); end
      if (sti_we) begin sti++; check(sti_waddr == d[2:0] && st_wdata == c, "stored IRIS write"); end
      @(negedge clk);
      if (i == 0 && busy_cycles > 0) cad_bus = cad_bus_t'(w);  // source holds while busy
      if (i == busy_cycles) cad_bus = '0;
    end
  endtask

  initial begin
    int s, o, r;
    repeat (2) @(negedge clk); rst = 0;
    // ---- activation decode
    for (int it = 0; it < 300; it++) begin
      logic [42:0] w;
      w = {11'($urandom), 32'($urandom)};
      w[42] = 1'b0;
      @(negedge clk); cad_bus = cad_bus_t'(w);
      @(negedge clk);
      for (int g = 0; g < 4; g++) begin
        logic [4:0] f;
        f = w[27 - 5*g -: 5];           // grid 0 in the upper bits of the 20-bit field
        check(grid_composed[g] == f[4] && grid_on[g] == f[3], "grid flags");
        check(grid_optic_idx[g] == {2'(g), f[2:0]}, "optic index");
        check(grid_iris_act[g] == w[2*g +: 2], "iris section flags");
        for (int o2 = 0; o2 < 2; o2++) begin
          check(optic_cs_n[2*g+o2] == !f[3], "chip select");
          check(optic_oe_n[2*g+o2] == !(f[3] && f[2] == 1'(o2)), "output enable");
          check(optic_cadr[2*g+o2] == {1'b0, f[1:0]}, "work CADR");
        end
      end
    end
    // CADR follows the load controller for an OPTIC being loaded
    ld_optic_load = 8'b0010_0000; #1;
    check(optic_cadr[5] == 3'b100, "load CADR");
    ld_optic_load = '0;
    // ---- loads
    load(6'b010110, 8'h3C, 0, s, o, r);
    check(s == 1 && o == 1 && r == 0, $sformatf("OPTIC load: starts %0d sto %0d sti %0d", s, o, r));
    load(6'b100110, 8'h77, 0, s, o, r);
    check(s == 1 && o == 0 && r == 1, "IRIS load");
    load(6'b110000, 8'h00, 0, s, o, r);
    check(s == 1 && o == 0 && r == 0, "config load");
    load(6'b101000, 8'h12, 0, s, o, r);
    check(s == 0 && o == 0 && r == 0, "undefined destination ignored");
    load(6'b000011, 8'h99, 4, s, o, r);
    check(s == 1 && o == 1, "request waits while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
