// tb_load_control: runs the three kinds of load against a template RAM model.
//  * OPTIC template into OPTIC 3, section 2 (destination 0 01 1 10): the bits
//    clocked in while that OPTIC's write enable is low must be the 16 template
//    bytes, byte 0 first, each MSB first; only OPTIC 3 is written, it is in
//    load mode with CADR 010, and the load takes 144 clocks.
//  * configuration word (destination 110000): 22 bits, bit 21 first, into all
//    OPTICs with CADR 100 in 22 clocks; the register keeps its value.
//  * IRIS template into IRIS 1, section 1 (destination 1 00 1 01): 66 writes,
//    byte k of the template to the IRIS address the address rule gives.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_load_control;
  import sfmu_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy, done;
  dest_t dest = '0;
  logic [12:0] base = '0, tram_addr;
  logic [7:0]  tram_rdata;
  logic cfg_we = 0; logic [1:0] cfg_sel = '0; logic [7:0] cfg_wdata = '0;
  logic [21:0] cfg_word;
  logic optic_cin; logic [2:0] optic_cadr; logic [7:0] optic_wen_n, optic_load;
  logic [1:0] iris_we; logic [8:0] iris_addr; logic [7:0] iris_wdata;
  logic [7:0] ram [8192];
  int checks = 0, failures = 0;

  assign tram_rdata = ram[tram_addr];

  load_control dut (.clk, .rst, .start, .dest, .base, .busy, .done, .tram_addr, .tram_rdata,
                    .cfg_we, .cfg_sel, .cfg_wdata, .cfg_word, .optic_cin, .optic_cadr,
                    .optic_wen_n, .optic_load, .iris_we, .iris_addr, .iris_wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic go(input dest_t d, input logic [12:0] b);
    @(negedge clk); start = 1; dest = d; base = b;
    @(negedge clk); start = 0;
  endtask

  initial begin
    logic [127:0] got, exp;
    logic [21:0]  cfg_got, cfg_exp;
    int n, cyc, wrong;
    for (int i = 0; i < 8192; i++) ram[i] = 8'($urandom);
    repeat (2) @(negedge clk); rst = 0;

    // ---------------- OPTIC template
    for (int k = 0; k < 16; k++) exp[127 - 8*k -: 8] = ram[13'h0130 + k];
    go(6'b001110, 13'h0130);
    n = 0; cyc = 0; wrong = 0;
    while (busy) begin
      cyc++;
      if (optic_load != 8'b0000_1000) begin wrong++; $display("load %b cadr %b", optic_load, optic_cadr); end
      if (optic_cadr != 3'b010) begin wrong++; $display("cadr %b", optic_cadr); end
      if ((optic_wen_n | 8'b0000_1000) != 8'hFF) begin wrong++; $display("wen %b", optic_wen_n); end
      if (!optic_wen_n[3]) begin got = {got[126:0], optic_cin}; n++; end
      @(negedge clk);
    end
    check(n == 128, $sformatf("OPTIC bits %0d", n));
    check(got == exp, $sformatf("OPTIC chain %h expected %h", got, exp));
    check(wrong == 0, "OPTIC select/CADR");
    check(cyc == OPTIC_LOAD_CLKS, $sformatf("OPTIC load took %0d clocks", cyc));

    // ---------------- configuration word
    cfg_exp = 22'h2A_5C3D ^ 22'($urandom);
    for (int b = 0; b < 3; b++) begin
      @(negedge clk); cfg_we = 1; cfg_sel = 2'(b); cfg_wdata = 8'(cfg_exp >> (8*b));
    end
    @(negedge clk); cfg_we = 0;
    check(cfg_word == cfg_exp, "config register write");
    go(DEST_CFG_ALL, 13'h0);
    n = 0; cyc = 0; wrong = 0;
    while (busy) begin
      cyc++;
      if (!optic_wen_n[0]) begin
        cfg_got = {cfg_got[20:0], optic_cin}; n++;
        if (optic_wen_n != 8'h00 || optic_load != 8'hFF || optic_cadr != 3'b100) wrong++;
      end
      @(negedge clk);
    end
    check(n == 22 && cfg_got == cfg_exp, $sformatf("config shifted %h (%0d bits)", cfg_got, n));
    check(wrong == 0, "config: all OPTICs, CADR 100");
    check(cyc == CFG_LOAD_CLKS, $sformatf("config load took %0d clocks", cyc));
    check(cfg_word == cfg_exp, "config register kept");

    // ---------------- IRIS template
    go(6'b100101, 13'h0400);
    n = 0; cyc = 0; wrong = 0;
    while (busy) begin
      cyc++;
      if (iris_we != 0) begin
        int ea;
        ea = (n < 32) ? 32 + n : (n < 64) ? 128 + 32 + (n - 32) : 256 + 2 + (n - 64);
        if (iris_we != 2'b10 || iris_addr != 9'(ea) || iris_wdata != ram[13'h0400 + n]) begin
          wrong++;
          if (wrong < 4) $display("IRIS write %0d: addr %0d exp %0d data %h", n, iris_addr, ea, iris_wdata);
        end
        n++;
      end
      @(negedge clk);
    end
    check(n == 66, $sformatf("IRIS writes %0d", n));
    check(wrong == 0, "IRIS addresses and data");
    check(cyc == IRIS_TMPL_BYTES, $sformatf("IRIS load took %0d clocks", cyc));
    check(!busy, "idle after loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
