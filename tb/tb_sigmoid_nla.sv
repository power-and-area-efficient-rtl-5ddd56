// tb_sigmoid_nla: self-checking test of the piecewise-polynomial sigmoid.
//
// Sweeps the input over [-3, 3) and compares the output with the three
// polynomials evaluated in floating point (coefficients written out here
// independently of the design), allowing 6 LSB for coefficient rounding and
// truncation. Checks the interval select at and around every interval edge,
// the held values outside [-2, 2), and that the approximation stays within
// 0.06 of the true logistic function on (-1, 2).
module tb_sigmoid_nla;
  import ann_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  fix_t       x, y;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  sigmoid_nla dut (.x(x), .y(y), .sel(sel));

  function automatic real ref_poly(input real v, output int region);
    if (v < -2.0)      begin region = 3; return 0.0467*4.0 + 0.1239*(-2.0) + 0.2969; end
    else if (v >= 2.0) begin region = 3; return -0.0467*4.0 + 0.2896*2.0 + 0.4882; end
    else if (v <= -1.0) begin region = 0; return 0.0467*v*v + 0.1239*v + 0.2969; end
    else if (v < 1.0)   begin region = 1; return 0.2383*v + 0.5; end
    else                begin region = 2; return -0.0467*v*v + 0.2896*v + 0.4882; end
  endfunction

  task automatic check_point(input int raw);
    real xv, yr, yv, diff;
    int  region;
    x = fix_t'(raw);
    @(negedge clk);
    xv = real'(raw) / 4096.0;
    yr = ref_poly(xv, region);
    yv = real'(y) / 4096.0;
    diff = yv - yr;
    if (diff < 0) diff = -diff;
    checks++;
    if (diff > 6.0/4096.0 || int'(sel) != region) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=%f y=%f ref=%f sel=%0d ref_sel=%0d", xv, yv, yr, sel, region);
    end
    if (xv > -1.0 && xv < 2.0) begin
      real s;
      s = 1.0 / (1.0 + $exp(-xv));
      checks++;
      if ((yv - s) > 0.06 || (s - yv) > 0.06) begin
        failures++;
        if (failures < 10) $display("FAIL x=%f y=%f logistic=%f", xv, yv, s);
      end
    end
  endtask

  initial begin
    // sweep
    for (int r = -3*4096; r < 3*4096; r += 7) check_point(r);
    // interval edges
    check_point(-2*4096 - 1); check_point(-2*4096); check_point(-2*4096 + 1);
    check_point(-4096 - 1);   check_point(-4096);   check_point(-4096 + 1);
    check_point(4096 - 1);    check_point(4096);    check_point(4096 + 1);
    check_point(2*4096 - 1);  check_point(2*4096);
    check_point(-32768);      check_point(32767);   check_point(0);
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
