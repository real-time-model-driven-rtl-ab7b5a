// tb_stored_template_ram: after reset every entry reads 0; random writes are
// then mirrored in a model and both read ports are compared with it.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_stored_template_ram;
  logic clk = 0, rst = 1, we = 0;
  logic [4:0] waddr = '0, raddr_a = '0, raddr_b = '0;
  logic [7:0] wdata = '0, rdata_a, rdata_b;
  logic [7:0] model [32];
  int checks = 0, failures = 0;

  stored_template_ram #(.DEPTH(32)) dut (.clk, .rst, .we, .waddr, .wdata,
                                          .raddr_a, .rdata_a, .raddr_b, .rdata_b);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 32; i++) begin
      model[i] = '0;
      raddr_a = 5'(i); #1;
      checks++;
      if (rdata_a != 0) failures++;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      waddr = 5'($urandom); wdata = 8'($urandom);
      raddr_a = 5'($urandom); raddr_b = 5'($urandom);
      #1;
      checks += 2;
      if (rdata_a != model[raddr_a]) failures++;
      if (rdata_b != model[raddr_b]) failures++;
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
