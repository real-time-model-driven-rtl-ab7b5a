// tb_drc_sub_compare: drives random rank values and range thresholds, with
// corner values mixed in, and checks the registered result one clock later:
// rec = (T_vw - (T_vb - 1) >= B) with a negative difference never a
// recognition, range_val = the difference clipped at 0, rec low when the
// input is not valid.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_drc_sub_compare;
  logic clk = 1'b0, rst = 1'b1;
  logic in_valid;
  logic [7:0] t_white, t_black_m1, range_thr;
  logic rec_valid, rec;
  logic [7:0] range_val;
  int checks = 0, failures = 0, n_rec = 0, n_norec = 0, n_neg = 0;

  drc_sub_compare dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pick();
    case ($urandom_range(5))
      0: return 8'd0;
      1: return 8'd255;
      default: return 8'($urandom);
    endcase
  endfunction

  initial begin
    int a;
    bit ev, er;
    logic [7:0] er_range;
    in_valid = 1'b0; t_white = '0; t_black_m1 = '0; range_thr = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid   = ($urandom_range(7) != 0);
      t_white    = pick();
      t_black_m1 = ($urandom_range(3) == 0) ? t_white - 8'($urandom_range(3)) : pick();
      range_thr  = ($urandom_range(3) == 0) ? 8'(int'(t_white) - int'(t_black_m1)) : pick();
      a  = int'(t_white) - int'(t_black_m1);
      ev = in_valid;
      er = in_valid && (a >= 0) && (a >= int'(range_thr));
      er_range = (a < 0) ? 8'd0 : 8'(a);
      if (a < 0) n_neg++;
      @(negedge clk);
      checks++;
      if (rec_valid !== ev || rec !== er || (ev && range_val !== er_range)) begin
        failures++;
        $display("FAIL w=%0d b=%0d thr=%0d v=%0d: got %0d/%0d/%0d expected %0d/%0d/%0d",
                 t_white, t_black_m1, range_thr, ev, rec_valid, rec, range_val, ev, er, er_range);
      end
      if (er) n_rec++; else if (ev) n_norec++;
      in_valid = 1'b0;
    end
    checks++;
    if (n_rec == 0 || n_norec == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL coverage rec=%0d norec=%0d neg=%0d", n_rec, n_norec, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
