// tb_backprop_unit: self-checking test of the back-propagation unit.
//
// Plays several epochs of random samples (inputs in [-1, 1], hidden and
// output activations in [0, 1], one-hot targets). The testbench keeps the
// weights itself, as the weight store would, writes every update it sees, and
// compares each written weight with a reference model of the learning rule
// (output and hidden deltas, gradients summed over the epoch, update with
// learning rate and momentum), bit for bit. It also checks the order of the
// written addresses, the epoch error, the busy flag and the run lengths:
// 35 clocks for a sample and 28 for an update.
module tb_backprop_unit;
  import ann_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start_bp, start_upd, busy, done, upd_we, momentum_used;
  logic [WADDR_W-1:0] upd_addr;
  fix_t upd_data, eps, alpha;
  acc_t epoch_error;
  fix_t [N_IN-1:0]             x;
  fix_t [N_HID-1:0]            h;
  fix_t [N_OUT-1:0]            y, d;
  fix_t [N_HID-1:0][N_IN-1:0]  w1;
  fix_t [N_OUT-1:0][N_HID-1:0] w2;

  backprop_unit dut (.*);

  int checks = 0, failures = 0;
  int wref [28];
  longint gref [28];
  int dwp [28];
  longint eref;
  int mom_seen = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s", msg);
    end
  endtask

  task automatic drive_weights();
    for (int j = 0; j < 4; j++) for (int i = 0; i < 4; i++) w1[j][i] = fix_t'(wref[j*4+i]);
    for (int k = 0; k < 3; k++) for (int j = 0; j < 4; j++) w2[k][j] = fix_t'(wref[16+k*4+j]);
  endtask

  task automatic run_sample();
    int xs[4], hs[4], ys[3], ds[3], dout[3], dhid[4], err, e, n, cls;
    cls = int'($urandom % 3);
    for (int i = 0; i < 4; i++) begin xs[i] = rand_fix(-4096, 4096); x[i] = fix_t'(xs[i]); end
    for (int j = 0; j < 4; j++) begin hs[j] = rand_fix(0, 4096);     h[j] = fix_t'(hs[j]);  end
    for (int k = 0; k < 3; k++) begin
      ys[k] = rand_fix(0, 4096); y[k] = fix_t'(ys[k]);
      ds[k] = (k == cls) ? 4096 : 0; d[k] = fix_t'(ds[k]);
    end
    // reference
    for (int k = 0; k < 3; k++) begin
      err = ref_sat(longint'(ys[k]) - ds[k]);
      dout[k] = ref_mul(err, ref_mul(ys[k], ref_sat(4096 - ys[k])));
      eref += ref_mul(err, err) >>> 1;
    end
    for (int j = 0; j < 4; j++) begin
      e = 0;
      for (int k = 0; k < 3; k++) e = ref_add(e, ref_mul(dout[k], wref[16+k*4+j]));
      dhid[j] = ref_mul(e, ref_mul(hs[j], ref_sat(4096 - hs[j])));
    end
    for (int j = 0; j < 4; j++) for (int i = 0; i < 4; i++) gref[j*4+i] += ref_mul(dhid[j], xs[i]);
    for (int k = 0; k < 3; k++) for (int j = 0; j < 4; j++) gref[16+k*4+j] += ref_mul(dout[k], hs[j]);
    // run
    start_bp = 1;
    @(posedge clk);
    #1 start_bp = 0;
    n = 0;
    forever begin
      @(negedge clk);
      if (done) break;
      check(busy, "busy during back-propagation");
      check(!upd_we, "no weight write during back-propagation");
      n++;
      if (n > 100) break;
    end
    check(n == 35, $sformatf("back-propagation took %0d clocks, expected 35", n));
  endtask

  task automatic run_update();
    int n, a, mom, step, wn;
    start_upd = 1;
    @(posedge clk);
    #1 start_upd = 0;
    n = 0; a = 0;
    forever begin
      @(negedge clk);
      if (done) break;
      if (upd_we) begin
        mom  = ref_sat((longint'(alpha) * dwp[a]) >>> 12);
        step = ref_sat(longint'(mom) - ((longint'(eps) * gref[a]) >>> 12));
        wn   = ref_add(wref[a], step);
        if (mom != 0) mom_seen++;
        check(int'(upd_addr) == a, $sformatf("update address %0d expected %0d", upd_addr, a));
        check(int'(upd_data) == wn, $sformatf("w[%0d]=%0d expected %0d", a, upd_data, wn));
        dwp[a] = step; gref[a] = 0;
        a++;
      end
      n++;
      if (n > 100) break;
    end
    check(n == 28 && a == 28, $sformatf("update took %0d clocks with %0d writes", n, a));
    check(longint'(epoch_error) == eref, $sformatf("epoch error %0d expected %0d", epoch_error, eref));
    eref = 0;
  endtask

  // weight store model: writes land on the clock edge
  always @(posedge clk) if (upd_we) begin
    wref[upd_addr] <= int'(upd_data);
  end
  always @(negedge clk) drive_weights();

  initial begin
    start_bp = 0; start_upd = 0;
    eps   = fix_t'(2048);   // 0.5
    alpha = fix_t'(2458);   // 0.6
    eref = 0;
    for (int a = 0; a < 28; a++) begin
      wref[a] = rand_fix(-4096, 4096); gref[a] = 0; dwp[a] = 0;
    end
    drive_weights();
    x = '0; h = '0; y = '0; d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    for (int ep = 0; ep < 6; ep++) begin
      for (int s = 0; s < 5; s++) run_sample();
      run_update();
    end
    check(mom_seen > 0, "momentum term used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
