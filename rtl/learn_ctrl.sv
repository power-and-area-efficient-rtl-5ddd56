// learn_ctrl: the finite state machine that sequences the network.
//
// For every accepted sample it runs the forward pass (hidden layer, then
// output layer) and reports the result. If the sample is a training sample it
// then starts the back-propagation unit, which accumulates that sample's
// gradients; if the sample is also marked as the last of its epoch, the FSM
// then starts the weight update. So the network is either computing forward,
// or learning, never both, and the learning steps are issued one after the
// other: that is the time multiplexing of the learning mechanism that the
// source design uses to lower switching power. Starting back-propagation from
// an FSM once an output is available follows the source; the exact states and
// handshakes are this design's own.
//
// Handshake: a sample is accepted on in_valid && in_ready (in_ready is high
// only in IDLE); load is high in that cycle so the caller can register the
// sample. Timing from the accepting clock edge: hid_start one clock later,
// out_start when the hidden layer reports hid_done, result_valid when the
// output layer reports out_done (3 clocks in all); then bp_start, upd_start
// and epoch_done as the learning unit finishes each job. epoch_count counts
// completed weight updates and wraps.
module learn_ctrl
  import ann_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic        train,
  input  logic        epoch_last,
  output logic        load,
  output logic        hid_start,
  input  logic        hid_done,
  output logic        out_start,
  input  logic        out_done,
  output logic        result_valid,
  output logic        bp_start,
  output logic        upd_start,
  input  logic        bp_busy,
  input  logic        bp_done,
  output logic        epoch_done,
  output logic [15:0] epoch_count,
  output logic        learning      // high while back-propagation or update runs
);

  typedef enum logic [2:0] {
    S_IDLE, S_FWD_H, S_WAIT_H, S_WAIT_O, S_BP, S_BP_WAIT, S_UPD, S_UPD_WAIT
  } state_e;

  state_e state, state_nx;
  logic   train_q, last_q;

  always_comb begin
    state_nx     = state;
    in_ready     = 1'b0;
    hid_start    = 1'b0;
    out_start    = 1'b0;
    result_valid = 1'b0;
    bp_start     = 1'b0;
    upd_start    = 1'b0;
    epoch_done   = 1'b0;
    unique case (state)
      S_IDLE: begin
        in_ready = 1'b1;
        if (in_valid) state_nx = S_FWD_H;
      end
      S_FWD_H: begin
        hid_start = 1'b1;
        state_nx  = S_WAIT_H;
      end
      S_WAIT_H: begin
        out_start = hid_done;
        if (hid_done) state_nx = S_WAIT_O;
      end
      S_WAIT_O: begin
        if (out_done) begin
          result_valid = 1'b1;
          state_nx     = train_q ? S_BP : S_IDLE;
        end
      end
      S_BP: begin
        bp_start = 1'b1;
        state_nx = S_BP_WAIT;
      end
      S_BP_WAIT: begin
        if (bp_done) state_nx = last_q ? S_UPD : S_IDLE;
      end
      S_UPD: begin
        upd_start = 1'b1;
        state_nx  = S_UPD_WAIT;
      end
      S_UPD_WAIT: begin
        if (bp_done) begin
          epoch_done = 1'b1;
          state_nx   = S_IDLE;
        end
      end
      default: state_nx = S_IDLE;
    endcase
  end

  assign load     = in_valid && in_ready;
  assign learning = (state == S_BP) || (state == S_BP_WAIT) ||
                    (state == S_UPD) || (state == S_UPD_WAIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      train_q     <= 1'b0;
      last_q      <= 1'b0;
      epoch_count <= '0;
    end else begin
      state <= state_nx;
      if (load) begin
        train_q <= train;
        last_q  <= epoch_last;
      end
      if (epoch_done) epoch_count <= epoch_count + 1'b1;
    end
  end

  // The learning unit must be idle whenever it is started.
  a_bp_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n)
    (bp_start || upd_start) |-> !bp_busy);
  // A new sample is only accepted while nothing else runs.
  a_accept_idle: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> !bp_busy);

endmodule
