// tb_addr_gen: checks the line address generator against a counter model.
// A 5-deep generator is enabled with random gaps and cleared at random
// moments; after every clock the address must equal the model's count,
// which wraps from 4 to 0 and restarts at 0 after a clear.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_addr_gen;
  localparam int unsigned DEPTH = 5;
  logic clk = 0, rst = 1, clear = 0, en = 0;
  logic [2:0] addr;
  int checks = 0, failures = 0, model = 0, wraps = 0;

  addr_gen #(.DEPTH(DEPTH)) dut (.clk, .rst, .clear, .en, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 29) == 0);
      en    = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (clear) model = 0;
      else if (en) begin
        if (model == DEPTH - 1) begin model = 0; wraps++; end
        else model++;
      end
      #1;
      checks++;
      if (addr != 3'(model)) begin
        failures++;
        $display("cycle %0d: addr %0d expected %0d", i, addr, model);
      end
    end
    checks++;
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
