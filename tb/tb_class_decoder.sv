// tb_class_decoder: self-checking test of the class decision.
//
// Random and hand-picked output vectors, including ties, are checked against
// an arg-max written in the testbench (lower index wins a tie), for both the
// class code and the one-hot output.
module tb_class_decoder;
  import ann_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  fix_t [N_OUT-1:0] y;
  water_class_e     cls;
  logic [N_OUT-1:0] cls_onehot;
  int checks = 0, failures = 0;
  int seen [3];

  class_decoder dut (.y, .cls, .cls_onehot);

  task automatic try_vec(input int a, input int b, input int c);
    int best;
    y[0] = fix_t'(a); y[1] = fix_t'(b); y[2] = fix_t'(c);
    best = 0;
    if (b > a) best = 1;
    if (c > a && c > b) best = 2;
    @(negedge clk);
    checks++;
    if (int'(cls) != best || cls_onehot != 3'(1 << best)) begin
      failures++;
      if (failures < 10) $display("FAIL y=%0d,%0d,%0d cls=%0d onehot=%b expected %0d", a, b, c, cls, cls_onehot, best);
    end
    seen[best]++;
  endtask

  initial begin
    try_vec(100, 100, 100);
    try_vec(5, 9, 9);
    try_vec(-3, -3, -4);
    try_vec(4096, 0, 0);
    try_vec(0, 4096, 0);
    try_vec(0, 0, 4096);
    try_vec(-32768, 32767, -1);
    for (int t = 0; t < 2000; t++)
      try_vec(int'($urandom % 65536) - 32768, int'($urandom % 65536) - 32768,
              int'($urandom % 65536) - 32768);
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
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
