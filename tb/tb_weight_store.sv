// tb_weight_store: self-checking test of the weight registers.
//
// Checks the reset pattern ((37a + 11) mod 64 - 32) / 128 on every address,
// host writes and reads, learning-port writes, the priority of the host port
// when both write the same address, that out-of-range addresses change
// nothing, and that w1/w2 present each weight at its place in the layout.
module tb_weight_store;
  import ann_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic ld_we, upd_we;
  logic [WADDR_W-1:0] ld_addr, upd_addr, rd_addr;
  fix_t ld_data, upd_data, rd_data;
  fix_t [N_HID-1:0][N_IN-1:0]  w1;
  fix_t [N_OUT-1:0][N_HID-1:0] w2;

  weight_store dut (.*);

  int checks = 0, failures = 0;
  int model [28];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  task automatic check_all();
    for (int a = 0; a < 28; a++) begin
      rd_addr = 5'(a);
      #1;
      check(int'(rd_data) == model[a], $sformatf("read w[%0d]=%0d expected %0d", a, rd_data, model[a]));
      if (a < 16) check(int'(w1[a/4][a%4]) == model[a], $sformatf("w1 layout at %0d", a));
      else        check(int'(w2[(a-16)/4][(a-16)%4]) == model[a], $sformatf("w2 layout at %0d", a));
    end
  endtask

  initial begin
    ld_we = 0; upd_we = 0; ld_addr = 0; upd_addr = 0; rd_addr = 0; ld_data = 0; upd_data = 0;
    for (int a = 0; a < 28; a++) model[a] = (((37*a + 11) % 64) - 32) * 32;

    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int t = 0; t < 400; t++) begin
      int la, ua, lv, uv;
      la = int'($urandom % 32); ua = int'($urandom % 32);
      if (t % 5 == 0) ua = la;
      lv = int'($urandom % 65536) - 32768; uv = int'($urandom % 65536) - 32768;
      ld_we = ($urandom % 2) == 1; upd_we = ($urandom % 2) == 1;
      ld_addr = 5'(la); upd_addr = 5'(ua); ld_data = fix_t'(lv); upd_data = fix_t'(uv);
      @(posedge clk);
      if (upd_we && ua < 28) model[ua] = uv;
      if (ld_we && la < 28)  model[la] = lv;
      #1 ld_we = 0; upd_we = 0;
      @(negedge clk);
      check_all();
    end
    rd_addr = 5'd30;
    #1 check(rd_data == 0, "out-of-range read returns zero");
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
