// tb_neuron_layer: self-checking test of a layer of neurons.
//
// Runs the default four-neuron layer with random inputs and a different
// random weight row per neuron, and checks every neuron's output against the
// reference Q4.12 weighted sum and floating-point activation (within 6 LSB),
// the shared one-clock out_valid, and that each neuron uses its own row.
module tb_neuron_layer;
  import ann_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned NN = N_HID;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                      in_valid, out_valid;
  fix_t [N_IN-1:0]           x;
  fix_t [NN-1:0][N_IN-1:0]   w;
  fix_t [NN-1:0]             y;
  logic [NN-1:0][1:0]        act_sel;
  int checks = 0, failures = 0;

  neuron_layer dut (.clk, .rst_n, .in_valid, .x, .w, .out_valid, .y, .act_sel);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    int xs[4], ws[NN][4], s, region;
    real yr, yv;
    in_valid = 0; x = '0; w = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < 4; i++) begin
        xs[i] = rand_fix(-4096, 4096); x[i] = fix_t'(xs[i]);
      end
      for (int n = 0; n < NN; n++)
        for (int i = 0; i < 4; i++) begin
          ws[n][i] = rand_fix(-6144, 6144); w[n][i] = fix_t'(ws[n][i]);
        end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      check(out_valid, "out_valid after one clock");
      for (int n = 0; n < NN; n++) begin
        s  = ref_dot4(xs[0], xs[1], xs[2], xs[3], ws[n][0], ws[n][1], ws[n][2], ws[n][3]);
        yr = ref_sigmoid(real'(s) / 4096.0, region);
        yv = real'(y[n]) / 4096.0;
        check((yv - yr) <= 6.0/4096.0 && (yr - yv) <= 6.0/4096.0,
              $sformatf("neuron %0d y=%f ref=%f", n, yv, yr));
        check(int'(act_sel[n]) == region, "activation interval");
      end
      @(negedge clk);
      check(!out_valid, "out_valid is a single pulse");
    end
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
