// tb_template_ram: writes random bytes through the host port and reads them
// back through both the host and the load port, comparing with a copy kept
// in the testbench.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_template_ram;
  logic clk = 0;
  logic [12:0] host_addr = '0, ld_addr = '0;
  logic [7:0]  host_wdata = '0, host_rdata, ld_rdata;
  logic        host_we = 0;
  logic [7:0]  ref_mem [8192];
  int checks = 0, failures = 0;

  template_ram dut (.clk, .host_addr, .host_wdata, .host_we, .host_rdata, .ld_addr, .ld_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8192; i++) begin
      @(negedge clk);
      host_addr = 13'(i); host_wdata = 8'($urandom); host_we = 1;
      ref_mem[i] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      host_addr = 13'($urandom); ld_addr = 13'($urandom);
      #1;
      checks += 2;
      if (host_rdata != ref_mem[host_addr]) failures++;
      if (ld_rdata != ref_mem[ld_addr]) begin
        failures++;
        if (failures < 5) $display("ld_addr %h: %h expected %h", ld_addr, ld_rdata, ref_mem[ld_addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
