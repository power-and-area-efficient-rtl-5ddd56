// neuron: one artificial neuron with four inputs.
//
// Each input x[i] is multiplied by its synaptic weight w[i] in its own
// multiplier; the four products are summed by a two-level adder tree (two
// adders on the first level, one on the second) and the sum goes through the
// piecewise-polynomial sigmoid. This parallel multiplier/adder structure, with
// no MAC unit and no counter, follows the source design. The neuron has no
// bias input, as in the source's neuron diagram.
//
// Timing (this design's choice): the datapath is combinational and the result
// is registered once, so y and out_valid appear one clock after in_valid.
// y holds its value until the next in_valid. Reset is asynchronous, active low.
// Arithmetic is Q4.12 with saturation (see ann_pkg).
module neuron
  import ann_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  fix_t [N_IN-1:0]   x,
  input  fix_t [N_IN-1:0]   w,
  output logic              out_valid,
  output fix_t              y,
  output logic [1:0]        act_sel   // activation interval used (see sigmoid_nla)
);

  fix_t prod [N_IN];
  fix_t sum01, sum23, sum;
  fix_t act;
  logic [1:0] sel;

  always_comb begin
    for (int i = 0; i < N_IN; i++) prod[i] = fix_mul(x[i], w[i]);
    sum01 = fix_add(prod[0], prod[1]);   // Adder1
    sum23 = fix_add(prod[2], prod[3]);   // Adder2
    sum   = fix_add(sum01, sum23);       // Adder3
  end

  sigmoid_nla u_act (
    .x   (sum),
    .y   (act),
    .sel (sel)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
      act_sel   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y       <= act;
        act_sel <= sel;
      end
    end
  end

endmodule
