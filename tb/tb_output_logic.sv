// tb_output_logic: fills the output look-up table with a known function of
// the address, keeps stored template RAM models, and drives random result
// strobes of the twelve sources. For each clock the testbench works out which
// expected results are missing, takes the lowest-numbered source, builds the
// LUT address {source, 0, template code} itself and expects that error code
// and source two clocks later; err_lost must mark clocks with more than one
// missing result, and no error may appear when nothing is missing.
// Expected values are computed in the testbench from the block's behaviour
// as the specification describes it, plus this design's own choices of
// encoding and timing documented in the block's header.
module tb_output_logic;
  import sfmu_pkg::*;
  logic clk = 0, rst = 1;
  logic [3:0] feat_valid = '0, feat_bit = '0, feat_check = '0, shape_valid = '0;
  logic [4:0] feat_idx [4];
  logic [1:0] shape_ocl [4], shape_act [4];
  logic [4:0] sto_raddr; tcode_t sto_rdata;
  logic [2:0] sti_raddr; tcode_t sti_rdata;
  logic [12:0] host_addr = '0; logic [7:0] host_wdata = '0, host_rdata; logic host_we = 0;
  logic err_valid, err_lost; logic [7:0] err_code; logic [3:0] err_src;
  tcode_t sto [32], sti [8];
  int checks = 0, failures = 0, errors_seen = 0, lost_seen = 0, feat_err = 0, shape_err = 0;
  logic       exp_v [$];
  logic [7:0] exp_c [$];
  logic [3:0] exp_s [$];
  logic       exp_l [$];

  assign sto_rdata = sto[sto_raddr];
  assign sti_rdata = sti[sti_raddr];

  function automatic logic [7:0] lutf(logic [12:0] a);
    return a[7:0] ^ {a[12:9], a[12:9]} ^ 8'h5A;
  endfunction

  output_logic #(.AW(13)) dut (.clk, .rst, .feat_valid, .feat_bit, .feat_check, .feat_idx,
                               .shape_valid, .shape_ocl, .shape_act, .sto_raddr, .sto_rdata,
                               .sti_raddr, .sti_rdata, .host_addr, .host_wdata, .host_we,
                               .host_rdata, .err_valid, .err_code, .err_src, .err_lost);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) sto[i] = 8'($urandom);
    for (int i = 0; i < 8; i++)  sti[i] = 8'($urandom);
    for (int g = 0; g < 4; g++) begin feat_idx[g] = '0; shape_ocl[g] = '0; shape_act[g] = '0; end
    repeat (2) @(negedge clk); rst = 0;
    for (int a = 0; a < 8192; a++) begin
      @(negedge clk); host_we = 1; host_addr = 13'(a); host_wdata = lutf(13'(a));
    end
    @(negedge clk); host_we = 0;
    host_addr = 13'h1234; #1;
    checks++; if (host_rdata != lutf(13'h1234)) failures++;
    for (int it = 0; it < 3000; it++) begin
      logic [15:0] miss; int n, pick; logic [4:0] idx; tcode_t code;
      @(negedge clk);
      miss = '0;
      for (int g = 0; g < 4; g++) begin
        feat_valid[g] = ($urandom_range(0, 9) == 0);
        feat_bit[g]   = 1'($urandom);
        feat_check[g] = 1'($urandom);
        feat_idx[g]   = 5'($urandom);
        shape_valid[g] = ($urandom_range(0, 9) == 0);
        shape_ocl[g]  = 2'($urandom);
        shape_act[g]  = 2'($urandom);
        miss[4*g] = feat_valid[g] && feat_check[g] && !feat_bit[g];
        for (int s = 0; s < 2; s++) miss[4*g+1+s] = shape_valid[g] && shape_act[g][s] && !shape_ocl[g][s];
      end
      n = $countones(miss);
      pick = -1;
      for (int i = 0; i < 16; i++) if (miss[i] && pick < 0) pick = i;
      if (pick >= 0) begin
        if (pick % 4 == 0) code = sto[feat_idx[pick / 4]];
        else code = sti[{1'((pick / 4) / 2), 1'((pick / 4) % 2), 1'((pick % 4) - 1)}];
      end
      exp_v.push_back(pick >= 0);
      exp_s.push_back(4'(pick));
      exp_c.push_back(pick >= 0 ? lutf({4'(pick), 1'b0, code}) : 8'h00);
      exp_l.push_back(n > 1);
      @(posedge clk); #1;
      feat_valid = '0; shape_valid = '0;    // each case is seen alone
      begin
        // err_lost is one clock after the strobe
        checks++;
        if (err_lost != exp_l[exp_l.size() - 1]) failures++;
        if (err_lost) lost_seen++;
      end
      @(posedge clk); #1;
      begin
        logic v; logic [7:0] c; logic [3:0] s; logic l;
        v = exp_v.pop_front(); c = exp_c.pop_front(); s = exp_s.pop_front(); l = exp_l.pop_front();
        checks++;
        if (err_valid != v || (v && (err_code != c || err_src != s))) begin
          failures++;
          if (failures < 10) $display("it %0d: valid %0d code %h src %0d, expected %0d %h %0d", it, err_valid, err_code, err_src, v, c, s);
        end
        if (v) begin
          errors_seen++;
          if (s % 4 == 0) feat_err++; else shape_err++;
        end
      end
    end
    checks += 3;
    if (errors_seen == 0) failures++;
    if (lost_seen == 0) failures++;
    if (feat_err == 0 || shape_err == 0) failures++;
    $display("errors %0d (feature %0d shape %0d) collisions %0d", errors_seen, feat_err, shape_err, lost_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
