// neuron_layer: a layer of N_NEURON neurons working in parallel on the same
// four-element input vector.
//
// Every neuron of a layer is connected to every unit of the previous layer,
// as in a fully connected multilayer perceptron; neuron n uses weight row
// w[n]. All neurons start together on in_valid and finish together one clock
// later (out_valid). The network instantiates this block twice: the hidden
// layer (four neurons, fed by the sensor inputs) and the output layer (three
// neurons, one per water class, fed by the hidden layer). Because the hidden
// layer has four neurons, the output neurons have four inputs as well.
module neuron_layer
  import ann_pkg::*;
#(
  parameter int unsigned N_NEURON = N_HID
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  fix_t [N_IN-1:0]                   x,
  input  fix_t [N_NEURON-1:0][N_IN-1:0]     w,
  output logic                              out_valid,
  output fix_t [N_NEURON-1:0]               y,
  output logic [N_NEURON-1:0][1:0]          act_sel
);

  logic [N_NEURON-1:0] valid_n;

  for (genvar n = 0; n < N_NEURON; n++) begin : g_neuron
    neuron u_neuron (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .x         (x),
      .w         (w[n]),
      .out_valid (valid_n[n]),
      .y         (y[n]),
      .act_sel   (act_sel[n])
    );
  end

  // All neurons share in_valid, so their valid flags rise together.
  assign out_valid = &valid_n;

endmodule
