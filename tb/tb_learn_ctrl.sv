// tb_learn_ctrl: self-checking test of the sequencing state machine.
//
// The layers and the learning unit are replaced by small models: each layer
// answers one clock after it is started, the learning unit stays busy for a
// random number of clocks and then pulses done. Random streams of inference
// samples, training samples and epoch-ending training samples are offered
// with random gaps. The test checks, per sample: acceptance only when ready,
// result_valid 3 clocks after acceptance, that back-propagation starts exactly
// for training samples and the update exactly for epoch-ending ones, that
// in_ready stays low until all of it is done, and the epoch counter.
module tb_learn_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, train, epoch_last, load, hid_start, hid_done;
  logic out_start, out_done, result_valid, bp_start, upd_start, bp_busy, bp_done;
  logic epoch_done, learning;
  logic [15:0] epoch_count;

  learn_ctrl dut (.*);

  int checks = 0, failures = 0;
  int n_bp = 0, n_upd = 0, n_res = 0;

  // environment models
  int bp_left;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hid_done <= 0; out_done <= 0; bp_busy <= 0; bp_done <= 0; bp_left <= 0;
    end else begin
      hid_done <= hid_start;
      out_done <= out_start;
      bp_done  <= 0;
      if (bp_start || upd_start) begin
        if (bp_start)  n_bp++;
        if (upd_start) n_upd++;
        bp_busy <= 1; bp_left <= 2 + int'($urandom % 30);
      end else if (bp_busy) begin
        if (bp_left == 0) begin bp_busy <= 0; bp_done <= 1; end
        else bp_left <= bp_left - 1;
      end
      if (result_valid) n_res++;
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    int kind, t_res, bp0, upd0, ep0, res0, cyc;
    in_valid = 0; train = 0; epoch_last = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 300; s++) begin
      kind = int'($urandom % 3);            // 0 inference, 1 train, 2 train + end of epoch
      repeat (int'($urandom % 3)) @(negedge clk);
      @(negedge clk);
      check(in_ready && !learning, "ready when idle");
      bp0 = n_bp; upd0 = n_upd; ep0 = int'(epoch_count); res0 = n_res;
      in_valid = 1; train = (kind != 0); epoch_last = (kind == 2);
      #1 check(load, "load on accept");
      @(posedge clk);
      #1 in_valid = 0; train = $urandom; epoch_last = $urandom;   // must be ignored now
      t_res = 0; cyc = 0;
      while (!in_ready && cyc < 200) begin
        @(negedge clk);
        cyc++;
        if (result_valid) t_res = cyc;
        if (!in_ready) check(!load, "no load while busy");
      end
      check(t_res == 3 || (kind == 0 && cyc == 3), $sformatf("result after %0d clocks", t_res));
      @(negedge clk);
      check(n_res == res0 + 1, "one result per sample");
      check(n_bp  == bp0  + (kind != 0 ? 1 : 0), "back-propagation only for training samples");
      check(n_upd == upd0 + (kind == 2 ? 1 : 0), "update only at the end of an epoch");
      check(int'(epoch_count) == ep0 + (kind == 2 ? 1 : 0), "epoch counter");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
