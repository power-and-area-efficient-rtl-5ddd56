// tb_neuron: self-checking test of one four-input neuron.
//
// Drives random inputs in [-1, 1] and weights in [-1.5, 1.5] (so that every
// activation interval, including saturation, is reached), computes the
// weighted sum with the reference Q4.12 arithmetic and the activation in
// floating point, and checks y (within 6 LSB), the interval select, the
// one-clock latency of out_valid and that y holds while in_valid is low.
module tb_neuron;
  import ann_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            in_valid, out_valid;
  fix_t [N_IN-1:0] x, w;
  fix_t            y;
  logic [1:0]      act_sel;
  int checks = 0, failures = 0;
  int region_seen [4];

  neuron dut (.clk, .rst_n, .in_valid, .x, .w, .out_valid, .y, .act_sel);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    int xs[4], ws[4], s, region;
    real yr, yv;
    in_valid = 0; x = '0; w = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(out_valid == 0 && y == 0, "reset state");
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 4; i++) begin
        xs[i] = rand_fix(-4096, 4096);
        ws[i] = rand_fix(-6144, 6144);
        x[i] = fix_t'(xs[i]);
        w[i] = fix_t'(ws[i]);
      end
      in_valid = 1;
      @(negedge clk);
      check(out_valid == 1, "out_valid one clock after in_valid");
      s  = ref_dot4(xs[0], xs[1], xs[2], xs[3], ws[0], ws[1], ws[2], ws[3]);
      yr = ref_sigmoid(real'(s) / 4096.0, region);
      yv = real'(y) / 4096.0;
      check((yv - yr) <= 6.0/4096.0 && (yr - yv) <= 6.0/4096.0,
            $sformatf("y=%f ref=%f sum=%0d", yv, yr, s));
      check(int'(act_sel) == region, "activation interval");
      region_seen[region]++;
      // hold check: inputs change without in_valid
      in_valid = 0;
      x = ~x;
      @(negedge clk);
      check(out_valid == 0, "out_valid drops");
      check(real'(y) / 4096.0 == yv, "y holds");
    end
    for (int r = 0; r < 4; r++) check(region_seen[r] > 0, $sformatf("interval %0d reached", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
