// tb_cad_input_lut: fills the 256-entry code-to-address table through its
// two-byte host view, then checks every lookup and the host read-back.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_cad_input_lut;
  logic clk = 0;
  logic [8:0]  host_addr = '0;
  logic [7:0]  host_wdata = '0, host_rdata, code = '0;
  logic        host_we = 0;
  logic [12:0] base;
  logic [12:0] ref_lut [256];
  int checks = 0, failures = 0;

  cad_input_lut dut (.clk, .host_addr, .host_wdata, .host_we, .host_rdata, .code, .base);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      ref_lut[c] = 13'($urandom);
      // high byte first, then low byte: each write must keep the other half
      @(negedge clk); host_addr = {8'(c), 1'b1}; host_wdata = 8'(ref_lut[c][12:8]); host_we = 1;
      @(negedge clk); host_addr = {8'(c), 1'b0}; host_wdata = ref_lut[c][7:0];
    end
    @(negedge clk); host_we = 0;
    for (int c = 0; c < 256; c++) begin
      @(negedge clk);
      code = 8'(c);
      host_addr = {8'(255 - c), 1'(c % 2)};
      #1;
      checks += 2;
      if (base != ref_lut[c]) begin
        failures++;
        if (failures < 5) $display("code %0d: base %h expected %h", c, base, ref_lut[c]);
      end
      if (host_rdata != ((c % 2) ? 8'(ref_lut[255-c][12:8]) : ref_lut[255-c][7:0])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
