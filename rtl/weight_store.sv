// weight_store: the synaptic weights of the whole network, held in registers.
//
// All N_W = 28 weights (16 input->hidden, 12 hidden->output) are presented in
// parallel to the two neuron layers on w1 and w2, so a forward pass never
// waits for a memory read. Two write ports change them: the load port, which
// lets a host set initial or previously trained weights, and the update port,
// through which the back-propagation unit writes one new weight per clock at
// the end of an epoch. A write on the load port wins over an update to the
// same address. The read port (rd_addr -> rd_data, combinational) lets a host
// read trained weights back. Flat address numbering is given in ann_pkg.
//
// Reset (this design's choice): weights start at small, distinct values
//   w[a] = ((37*a + 11) mod 64 - 32) / 128,   a = 0 .. 27,
// i.e. in [-0.25, +0.25). Distinct starting values keep the hidden neurons
// from learning identical features. Reset is asynchronous, active low.
module weight_store
  import ann_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // host load port
  input  logic                          ld_we,
  input  logic [WADDR_W-1:0]            ld_addr,
  input  fix_t                          ld_data,
  // learning update port
  input  logic                          upd_we,
  input  logic [WADDR_W-1:0]            upd_addr,
  input  fix_t                          upd_data,
  // host read port
  input  logic [WADDR_W-1:0]            rd_addr,
  output fix_t                          rd_data,
  // parallel weight outputs
  output fix_t [N_HID-1:0][N_IN-1:0]    w1,
  output fix_t [N_OUT-1:0][N_HID-1:0]   w2
);

  fix_t w [N_W];

  function automatic fix_t reset_value(input int unsigned a);
    return fix_t'((int'((37 * a + 11) % 64) - 32) * (1 << (FRAC_W - 7)));
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned a = 0; a < N_W; a++) w[a] <= reset_value(a);
    end else begin
      if (upd_we && int'(upd_addr) < N_W) w[upd_addr] <= upd_data;
      if (ld_we  && int'(ld_addr)  < N_W) w[ld_addr]  <= ld_data;
    end
  end

  assign rd_data = (int'(rd_addr) < N_W) ? w[rd_addr] : '0;

  always_comb begin
    for (int j = 0; j < N_HID; j++)
      for (int i = 0; i < N_IN; i++)
        w1[j][i] = w[j*N_IN + i];
    for (int k = 0; k < N_OUT; k++)
      for (int j = 0; j < N_HID; j++)
        w2[k][j] = w[N_W1 + k*N_HID + j];
  end

endmodule
