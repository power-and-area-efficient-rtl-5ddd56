// tb_water_quality_ann: end-to-end test of the water-quality classifier.
//
// Builds a small labelled set of normalised water samples around three
// prototypes (clean water, water fit for irrigation, polluted water) and
// trains the network on it for several epochs with learning rate 0.5 and
// momentum 0.5, then classifies it. Along the way it checks:
//   - the 3-clock result latency and the length of the learning phases;
//   - every inference result against a reference forward pass computed here
//     from weights read back through the host port (within 16 LSB);
//   - that inference never changes a weight, and an epoch update does;
//   - that the reported epoch error equals 1/2 sum (y - target)^2 summed here
//     from the outputs seen during the epoch;
//   - that the error of the last epoch is below that of the first;
//   - host weight writes and read-back.
// It counts how often each mechanism happened (inference, back-propagation,
// epoch update, momentum, each activation interval, each class decision,
// host weight write) and fails on any that never did.
module tb_water_quality_ann;
  import ann_pkg::*;
  import tb_ref_pkg::*;

  localparam int NS     = 12;   // samples per epoch
  localparam int EPOCHS = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, train, epoch_last, out_valid, learning, epoch_done, momentum_used;
  fix_t [N_IN-1:0]  x_in;
  fix_t [N_OUT-1:0] target, y_out;
  fix_t eps, alpha, wt_wdata, wt_rdata;
  water_class_e cls;
  logic [N_OUT-1:0] cls_onehot;
  logic [15:0] epoch_count;
  acc_t epoch_error;
  logic [N_HID-1:0][1:0] hid_act_sel;
  logic [N_OUT-1:0][1:0] out_act_sel;
  logic wt_we;
  logic [WADDR_W-1:0] wt_addr, wt_raddr;

  water_quality_ann dut (.*);

  int checks = 0, failures = 0;
  int n_infer = 0, n_bp = 0, n_upd = 0, n_mom = 0, n_hostwr = 0;
  int sel_seen [4];
  int cls_seen [3];
  int xs [NS][4];
  int lbl [NS];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s", msg);
    end
  endtask

  // mechanism counters watched on every clock
  always @(posedge clk) if (rst_n) begin
    if (epoch_done) n_upd++;
    if (momentum_used) n_mom++;
  end

  task automatic read_weights(output int w[28]);
    for (int a = 0; a < 28; a++) begin
      wt_raddr = 5'(a);
      #1 w[a] = int'(wt_rdata);
    end
  endtask

  // Reference forward pass; the hidden activations are rounded to the Q4.12
  // grid before the output layer, as in hardware.
  task automatic ref_forward(input int x[4], input int w[28], output real y[3]);
    int h[4], s, r;
    for (int j = 0; j < 4; j++) begin
      s = ref_dot4(x[0], x[1], x[2], x[3], w[j*4], w[j*4+1], w[j*4+2], w[j*4+3]);
      h[j] = int'($floor(ref_sigmoid(real'(s) / 4096.0, r) * 4096.0 + 0.5));
    end
    for (int k = 0; k < 3; k++) begin
      s = ref_dot4(h[0], h[1], h[2], h[3], w[16+k*4], w[16+k*4+1], w[16+k*4+2], w[16+k*4+3]);
      y[k] = ref_sigmoid(real'(s) / 4096.0, r);
    end
  endtask

  // Offers one sample; returns the outputs and the clocks to the result.
  task automatic run_sample(input int idx, input bit tr, input bit last,
                            output int yv[3], output int lat);
    int cyc;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    for (int i = 0; i < 4; i++) x_in[i] = fix_t'(xs[idx][i]);
    for (int k = 0; k < 3; k++) target[k] = fix_t'(k == lbl[idx] ? 4096 : 0);
    train = tr; epoch_last = last; in_valid = 1;
    @(posedge clk);
    #1 in_valid = 0;
    cyc = 0;
    do begin
      @(negedge clk);
      cyc++;
    end while (!out_valid && cyc < 50);
    lat = cyc;
    for (int k = 0; k < 3; k++) yv[k] = int'(y_out[k]);
    for (int j = 0; j < 4; j++) sel_seen[hid_act_sel[j]]++;
    for (int k = 0; k < 3; k++) sel_seen[out_act_sel[k]]++;
    cls_seen[int'(cls)]++;
    if (tr) n_bp++; else n_infer++;
  endtask

  initial begin
    int yv[3], lat, w0[28], w1r[28], correct, e_first, e_last;
    longint e_tb;
    real yr[3];
    in_valid = 0; train = 0; epoch_last = 0; x_in = '0; target = '0;
    wt_we = 0; wt_addr = 0; wt_wdata = 0; wt_raddr = 0;
    eps = fix_t'(2048); alpha = fix_t'(2048);
    // data set: three prototypes with +-0.1 jitter
    for (int s = 0; s < NS; s++) begin
      int proto[4];
      lbl[s] = s % 3;
      case (lbl[s])
        0: proto = '{0,     2048,  3277, -3277};   // neutral pH, high ORP, high DO, low TDS
        1: proto = '{1638, -819,   819,   1229};   // mild pH, medium DO and TDS
        default: proto = '{-3277, -2458, -3277, 3277}; // acidic, low ORP, low DO, high TDS
      endcase
      for (int i = 0; i < 4; i++) xs[s][i] = proto[i] + rand_fix(-410, 410);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // host port: write a weight, read it back, restore it
    read_weights(w0);
    wt_we = 1; wt_addr = 5'd20; wt_wdata = fix_t'(1234);
    @(posedge clk); #1 wt_we = 0;
    wt_raddr = 5'd20; #1 check(int'(wt_rdata) == 1234, "host weight write");
    n_hostwr++;
    @(negedge clk);
    wt_we = 1; wt_addr = 5'd20; wt_wdata = fix_t'(w0[20]);
    @(posedge clk); #1 wt_we = 0;
    @(negedge clk);

    e_first = -1;
    for (int ep = 0; ep < EPOCHS; ep++) begin
      // inference pass over the set, checked against the reference
      read_weights(w0);
      correct = 0;
      for (int s = 0; s < NS; s++) begin
        run_sample(s, 0, 0, yv, lat);
        check(lat == 3, $sformatf("result latency %0d", lat));
        ref_forward(xs[s], w0, yr);
        for (int k = 0; k < 3; k++)
          check(real'(yv[k]) / 4096.0 - yr[k] <= 16.0/4096.0 &&
                yr[k] - real'(yv[k]) / 4096.0 <= 16.0/4096.0,
                $sformatf("sample %0d output %0d: %f vs %f", s, k, real'(yv[k]) / 4096.0, yr[k]));
        if (int'(cls) == lbl[s]) correct++;
      end
      read_weights(w1r);
      check(w1r == w0, "inference leaves weights alone");
      if (ep == 0 || ep == EPOCHS - 1)
        $display("epoch %0d: %0d of %0d samples classified correctly", ep, correct, NS);
      // training pass
      e_tb = 0;
      for (int s = 0; s < NS; s++) begin
        int t0;
        run_sample(s, 1, s == NS - 1, yv, lat);
        check(lat == 3, "training result latency");
        for (int k = 0; k < 3; k++)
          e_tb += ref_mul(ref_sat(longint'(yv[k]) - (k == lbl[s] ? 4096 : 0)),
                          ref_sat(longint'(yv[k]) - (k == lbl[s] ? 4096 : 0))) >>> 1;
        t0 = 0;
        while (!in_ready && t0 < 200) begin @(negedge clk); t0++; end
        check(t0 == (s == NS - 1 ? 68 : 38), $sformatf("learning phase of %0d clocks", t0));
      end
      check(int'(epoch_count) == ep + 1, "epoch counter");
      check(longint'(epoch_error) == e_tb, $sformatf("epoch error %0d expected %0d", epoch_error, e_tb));
      read_weights(w1r);
      check(w1r != w0, "epoch update changes the weights");
      if (ep == 0) e_first = int'(epoch_error);
      e_last = int'(epoch_error);
    end
    $display("epoch error: first %0d, last %0d (Q4.12)", e_first, e_last);
    check(e_last < e_first, "training lowers the error");

    // mechanism coverage
    check(n_infer > 0, "inference happened");
    check(n_bp > 0, "back-propagation happened");
    check(n_upd == EPOCHS, "an update per epoch");
    check(n_mom > 0, "momentum term used");
    check(n_hostwr > 0, "host weight write");
    for (int r = 0; r < 4; r++) begin
      $display("activation interval %0d used %0d times", r, sel_seen[r]);
      check(sel_seen[r] > 0, $sformatf("activation interval %0d reached", r));
    end
    for (int c = 0; c < 3; c++) begin
      $display("class %0d decided %0d times", c, cls_seen[c]);
      check(cls_seen[c] > 0, $sformatf("class %0d decided", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
