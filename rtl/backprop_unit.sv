// backprop_unit: on-chip learning by back-propagation of the error, with
// gradients accumulated over an epoch and a momentum term in the update.
//
// The mathematics follows the source design:
//   output unit k : dE/dy_k = y_k - d_k
//                   delta_k = dE/dx_k = (y_k - d_k) * y_k * (1 - y_k)
//   hidden unit j : dE/dy_j = sum_k delta_k * w2[k][j]
//                   delta_j = dE/dy_j * h_j * (1 - h_j)
//   weight i->j   : dE/dw_ji = delta_j * y_i      (summed over the epoch)
//   end of epoch  : dw(t) = -eps * dE/dw + alpha * dw(t-1);  w += dw(t)
// It also sums the squared error E = 1/2 sum_c sum_k (y_k - d_k)^2 over the
// epoch and reports it when the epoch's update is applied.
//
// The unit is time-multiplexed (as the source's learning FSM intends, to keep
// switching low): after start_bp it steps through
//   N_OUT clocks   one output delta per clock,
//   N_HID clocks   one hidden delta per clock (N_OUT products summed),
//   N_W   clocks   one gradient product accumulated per clock,
// i.e. 3 + 4 + 28 = 35 clocks, then pulses done. After start_upd it walks the
// N_W = 28 weights, one per clock, writes each new weight through
// upd_we/upd_addr/upd_data, remembers dw for the momentum term, clears the
// gradient, and pulses done (28 clocks). busy is high while it works; starts
// are ignored while busy. The inputs x, h, y, d and the weights must stay
// stable during a run.
//
// This design's choices: eps and alpha are run-time Q4.12 inputs (the source
// gives no values); gradients are kept in 32-bit accumulators with 12 fraction
// bits; every product truncates and saturates as described in ann_pkg; the
// done pulse comes one clock after the last step. The gradient accumulators
// and the stored dw(t-1) are registers cleared by reset.
module backprop_unit
  import ann_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start_bp,
  input  logic                          start_upd,
  input  fix_t [N_IN-1:0]               x,
  input  fix_t [N_HID-1:0]              h,
  input  fix_t [N_OUT-1:0]              y,
  input  fix_t [N_OUT-1:0]              d,
  input  fix_t [N_HID-1:0][N_IN-1:0]    w1,
  input  fix_t [N_OUT-1:0][N_HID-1:0]   w2,
  input  fix_t                          eps,
  input  fix_t                          alpha,
  output logic                          busy,
  output logic                          done,
  output logic                          upd_we,
  output logic [WADDR_W-1:0]            upd_addr,
  output fix_t                          upd_data,
  output acc_t                          epoch_error,
  output logic                          momentum_used  // an update applied a non-zero alpha*dw(t-1)
);

  typedef enum logic [2:0] {S_IDLE, S_DO, S_DH, S_ACC, S_UPD} state_e;

  state_e               state;
  logic [WADDR_W-1:0]   idx;
  fix_t                 delta_o [N_OUT];
  fix_t                 delta_h [N_HID];
  acc_t                 grad    [N_W];
  fix_t                 dw_prev [N_W];
  acc_t                 err_acc;

  function automatic acc_t acc_sat(input logic signed [63:0] v);
    localparam logic signed [63:0] AMAX = 64'(acc_t'({1'b0, {(ACC_W-1){1'b1}}}));
    localparam logic signed [63:0] AMIN = 64'(acc_t'({1'b1, {(ACC_W-1){1'b0}}}));
    if (v > AMAX)      return acc_t'(AMAX);
    else if (v < AMIN) return acc_t'(AMIN);
    else               return acc_t'(v);
  endfunction

  // ---- one step of each phase, selected by idx -------------------------
  fix_t err_k, delta_k, e_j, delta_j, g_a, w_a, step_a, w_new;
  fix_t sq_half;
  logic signed [ACC_W+DATA_W-1:0] eps_g;
  logic signed [2*DATA_W-1:0]     alpha_dw;
  fix_t mom_term;

  always_comb begin
    int unsigned k, j, i, b;
    i = 0;
    b = 0;
    // output delta for k = idx
    k       = (int'(idx) < N_OUT) ? int'(idx) : 0;
    err_k   = fix_sub(y[k], d[k]);
    delta_k = fix_mul(err_k, fix_mul(y[k], fix_sub(FIX_ONE, y[k])));
    sq_half = fix_mul(err_k, err_k) >>> 1;

    // hidden delta for j = idx
    j   = (int'(idx) < N_HID) ? int'(idx) : 0;
    e_j = '0;
    for (int kk = 0; kk < N_OUT; kk++) e_j = fix_add(e_j, fix_mul(delta_o[kk], w2[kk][j]));
    delta_j = fix_mul(e_j, fix_mul(h[j], fix_sub(FIX_ONE, h[j])));

    // gradient product and current weight for flat address a = idx
    if (int'(idx) < N_W1) begin
      j   = int'(idx) / N_IN;
      i   = int'(idx) % N_IN;
      g_a = fix_mul(delta_h[j], x[i]);
      w_a = w1[j][i];
    end else begin
      b   = (int'(idx) < N_W) ? int'(idx) - N_W1 : 0;
      k   = b / N_HID;
      j   = b % N_HID;
      g_a = fix_mul(delta_o[k], h[j]);
      w_a = w2[k][j];
    end

    // weight change with momentum
    eps_g    = (ACC_W+DATA_W)'(eps) * (ACC_W+DATA_W)'(grad[(int'(idx) < N_W) ? int'(idx) : 0]);
    alpha_dw = (2*DATA_W)'(alpha) * (2*DATA_W)'(dw_prev[(int'(idx) < N_W) ? int'(idx) : 0]);
    mom_term = fix_sat(64'(alpha_dw >>> FRAC_W));
    step_a   = fix_sat(64'(mom_term) - 64'(eps_g >>> FRAC_W));
    w_new    = fix_add(w_a, step_a);
  end

  // ---- sequencer --------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      idx           <= '0;
      done          <= 1'b0;
      err_acc       <= '0;
      epoch_error   <= '0;
      momentum_used <= 1'b0;
      for (int n = 0; n < N_OUT; n++) delta_o[n] <= '0;
      for (int n = 0; n < N_HID; n++) delta_h[n] <= '0;
      for (int n = 0; n < N_W; n++) begin
        grad[n]    <= '0;
        dw_prev[n] <= '0;
      end
    end else begin
      done          <= 1'b0;
      momentum_used <= 1'b0;
      unique case (state)
        S_IDLE: begin
          idx <= '0;
          if (start_bp)       state <= S_DO;
          else if (start_upd) state <= S_UPD;
        end
        S_DO: begin
          delta_o[idx[$clog2(N_OUT)-1:0]] <= delta_k;
          err_acc      <= acc_sat(64'(err_acc) + 64'(sq_half));
          if (int'(idx) == N_OUT - 1) begin
            idx   <= '0;
            state <= S_DH;
          end else idx <= idx + 1'b1;
        end
        S_DH: begin
          delta_h[idx[$clog2(N_HID)-1:0]] <= delta_j;
          if (int'(idx) == N_HID - 1) begin
            idx   <= '0;
            state <= S_ACC;
          end else idx <= idx + 1'b1;
        end
        S_ACC: begin
          grad[idx] <= acc_sat(64'(grad[idx]) + 64'(g_a));
          if (int'(idx) == N_W - 1) begin
            idx   <= '0;
            state <= S_IDLE;
            done  <= 1'b1;
          end else idx <= idx + 1'b1;
        end
        S_UPD: begin
          dw_prev[idx] <= step_a;
          grad[idx]    <= '0;
          if (mom_term != 0) momentum_used <= 1'b1;
          if (int'(idx) == N_W - 1) begin
            idx         <= '0;
            state       <= S_IDLE;
            done        <= 1'b1;
            epoch_error <= err_acc;
            err_acc     <= '0;
          end else idx <= idx + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign upd_we   = (state == S_UPD);
  assign upd_addr = idx;
  assign upd_data = w_new;

endmodule
