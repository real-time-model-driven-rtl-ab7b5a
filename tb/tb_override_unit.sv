// tb_override_unit: stores random 43-bit words through the BIO path (three
// 16-bit words) and through the picture-bus path (six bytes), checks the
// stored word, that the multiplexer passes the CDCX2 bus with OVERRIDE = 0
// and the stored word with OVERRIDE = 1, and that an accepted load request
// clears only the load bit of the stored word.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_override_unit;
  import sfmu_pkg::*;
  logic clk = 0, rst = 1;
  logic bio_store = 0, pic_store = 0, host_ctrl = 0, ld_accept = 0;
  logic [1:0] bio_sel = '0; logic [15:0] bio_data = '0;
  logic [2:0] pic_sel = '0; logic [7:0] pic_data = '0;
  cad_bus_t cdcx2_bus = '0, ovr_word, cad_bus;
  int checks = 0, failures = 0;

  override_unit dut (.clk, .rst, .bio_store, .bio_sel, .bio_data, .pic_store, .pic_sel,
                     .pic_data, .host_ctrl, .ld_accept, .cdcx2_bus, .ovr_word, .cad_bus);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [42:0] w;
    repeat (2) @(negedge clk); rst = 0;
    for (int it = 0; it < 50; it++) begin
      w = {11'($urandom), 32'($urandom)};
      w[42] = 1'b1;
      if (it % 2 == 0) begin
        for (int k = 0; k < 3; k++) begin
          @(negedge clk); bio_store = 1; bio_sel = 2'(k); bio_data = 16'(w >> (16*k));
        end
        @(negedge clk); bio_store = 0;
      end else begin
        for (int k = 5; k >= 0; k--) begin
          @(negedge clk); pic_store = 1; pic_sel = 3'(k); pic_data = 8'(w >> (8*k));
        end
        @(negedge clk); pic_store = 0;
      end
      cdcx2_bus = cad_bus_t'({11'($urandom), 32'($urandom)});
      host_ctrl = 0; #1;
      check(ovr_word == w, $sformatf("stored %h expected %h", ovr_word, w));
      check(cad_bus == cdcx2_bus, "CDCX2 passed when OVERRIDE = 0");
      host_ctrl = 1; #1;
      check(cad_bus == w, "override word passed when OVERRIDE = 1");
      @(negedge clk); ld_accept = 1;
      @(negedge clk); ld_accept = 0;
      check(cad_bus == {1'b0, w[41:0]}, "load bit cleared after accept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
