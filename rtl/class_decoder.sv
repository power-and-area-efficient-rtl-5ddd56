// class_decoder: turns the three output-neuron activations into the water
// class shown to the user: potable, agricultural or non-usable.
//
// The network has one output neuron per class and is trained with one-hot
// targets, so the class is the neuron with the largest activation. That
// arg-max rule, the order of the neurons (0 potable, 1 agricultural,
// 2 non-usable) and the tie rule (the lower index wins) are this design's
// choices; the source only says that the sample is put into one of the three
// classes. Combinational: cls and cls_onehot follow y in the same cycle.
module class_decoder
  import ann_pkg::*;
(
  input  fix_t [N_OUT-1:0] y,
  output water_class_e     cls,
  output logic [N_OUT-1:0] cls_onehot
);

  always_comb begin
    int unsigned best;
    best = 0;
    for (int unsigned k = 1; k < N_OUT; k++)
      if (y[k] > y[best]) best = k;
    cls        = water_class_e'(best[1:0]);
    cls_onehot = '0;
    cls_onehot[best] = 1'b1;
  end

endmodule
