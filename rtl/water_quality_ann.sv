// water_quality_ann: a small neural-network classifier for water samples with
// on-chip learning.
//
// Four normalised measurements of a water sample (pH, oxidation-reduction
// potential, dissolved oxygen, total dissolved solids, each scaled to [-1, 1]
// before they reach this block) go through a 4-4-3 multilayer perceptron:
// a hidden layer of four neurons and an output layer of three, one per class.
// Every neuron multiplies its four inputs by their weights in parallel, adds
// them in a two-level adder tree and applies a piecewise-polynomial sigmoid.
// The class decoder picks potable, agricultural or non-usable from the largest
// output. Training samples additionally run back-propagation: the gradients
// of every sample are accumulated, and on the last sample of an epoch the
// weights are updated with a learning rate eps and a momentum factor alpha.
// The four inputs, three classes, neuron structure, activation polynomials,
// learning equations and FSM-sequenced learning follow the source design;
// the layer size, number format, handshakes and host weight port are this
// design's choices.
//
// Interface:
//   x_in/target/train/epoch_last are taken when in_valid && in_ready.
//   out_valid pulses 3 clocks after acceptance with y_out, cls, cls_onehot
//   (held until the next result). After out_valid, in_ready returns in the
//   next clock for an inference sample, 38 clocks later for a training sample
//   (back-propagation) and 68 clocks later for the last training sample of an
//   epoch (back-propagation and weight update, ending with an epoch_done
//   pulse, after which epoch_error holds 1/2 * sum (y - target)^2 over the
//   epoch).
//   wt_we/wt_addr/wt_wdata write a weight, wt_raddr/wt_rdata read one
//   (flat numbering in ann_pkg). All values are Q4.12 (ann_pkg).
module water_quality_ann
  import ann_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  // sample input
  input  logic                        in_valid,
  output logic                        in_ready,
  input  fix_t [N_IN-1:0]             x_in,
  input  fix_t [N_OUT-1:0]            target,
  input  logic                        train,
  input  logic                        epoch_last,
  // learning constants
  input  fix_t                        eps,
  input  fix_t                        alpha,
  // result
  output logic                        out_valid,
  output fix_t [N_OUT-1:0]            y_out,
  output water_class_e                cls,
  output logic [N_OUT-1:0]            cls_onehot,
  // learning status
  output logic                        learning,
  output logic                        epoch_done,
  output logic [15:0]                 epoch_count,
  output acc_t                        epoch_error,
  output logic                        momentum_used,
  // activation intervals used by the last forward pass (see sigmoid_nla)
  output logic [N_HID-1:0][1:0]       hid_act_sel,
  output logic [N_OUT-1:0][1:0]       out_act_sel,
  // host weight access
  input  logic                        wt_we,
  input  logic [WADDR_W-1:0]          wt_addr,
  input  fix_t                        wt_wdata,
  input  logic [WADDR_W-1:0]          wt_raddr,
  output fix_t                        wt_rdata
);

  logic load, hid_start, hid_done, out_start, out_done;
  logic bp_start, upd_start, bp_busy, bp_done;
  logic upd_we;
  logic [WADDR_W-1:0] upd_addr;
  fix_t upd_data;

  fix_t [N_IN-1:0]             x_q;
  fix_t [N_OUT-1:0]            d_q;
  fix_t [N_HID-1:0]            h;
  fix_t [N_HID-1:0][N_IN-1:0]  w1;
  fix_t [N_OUT-1:0][N_HID-1:0] w2;

  // Sample registers: hold the inputs and targets for the forward pass and
  // for back-propagation.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      d_q <= '0;
    end else if (load) begin
      x_q <= x_in;
      d_q <= target;
    end
  end

  learn_ctrl u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (in_valid),
    .in_ready     (in_ready),
    .train        (train),
    .epoch_last   (epoch_last),
    .load         (load),
    .hid_start    (hid_start),
    .hid_done     (hid_done),
    .out_start    (out_start),
    .out_done     (out_done),
    .result_valid (out_valid),
    .bp_start     (bp_start),
    .upd_start    (upd_start),
    .bp_busy      (bp_busy),
    .bp_done      (bp_done),
    .epoch_done   (epoch_done),
    .epoch_count  (epoch_count),
    .learning     (learning)
  );

  weight_store u_weights (
    .clk      (clk),
    .rst_n    (rst_n),
    .ld_we    (wt_we),
    .ld_addr  (wt_addr),
    .ld_data  (wt_wdata),
    .upd_we   (upd_we),
    .upd_addr (upd_addr),
    .upd_data (upd_data),
    .rd_addr  (wt_raddr),
    .rd_data  (wt_rdata),
    .w1       (w1),
    .w2       (w2)
  );

  neuron_layer #(.N_NEURON(N_HID)) u_hidden (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (hid_start),
    .x         (x_q),
    .w         (w1),
    .out_valid (hid_done),
    .y         (h),
    .act_sel   (hid_act_sel)
  );

  neuron_layer #(.N_NEURON(N_OUT)) u_output (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (out_start),
    .x         (h),
    .w         (w2),
    .out_valid (out_done),
    .y         (y_out),
    .act_sel   (out_act_sel)
  );

  class_decoder u_class (
    .y          (y_out),
    .cls        (cls),
    .cls_onehot (cls_onehot)
  );

  backprop_unit u_bp (
    .clk           (clk),
    .rst_n         (rst_n),
    .start_bp      (bp_start),
    .start_upd     (upd_start),
    .x             (x_q),
    .h             (h),
    .y             (y_out),
    .d             (d_q),
    .w1            (w1),
    .w2            (w2),
    .eps           (eps),
    .alpha         (alpha),
    .busy          (bp_busy),
    .done          (bp_done),
    .upd_we        (upd_we),
    .upd_addr      (upd_addr),
    .upd_data      (upd_data),
    .epoch_error   (epoch_error),
    .momentum_used (momentum_used)
  );

endmodule
