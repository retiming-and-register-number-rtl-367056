// folded_fir_top: folded and retimed semi-systolic FIR filter with a
// minimum-register input reordering module.
//
// The filter computes y = sum_j c_j * x(n - j) with kc unsigned coefficients
// of mc bits and unsigned W-bit data. Written bit by bit, the products form a
// chain of L = kc*mc = K*N shift-and-add operations. Folding maps this chain
// onto K rows (fold_pe), each doing N operations per folding period of N
// cycles, so the filter takes one input word and gives one output every N
// cycles with K rows of adders instead of L. Retiming makes every folded edge
// delay-free, at the price that the K rows work on up to K - kc + 1 different
// input words at once; input_reorder keeps exactly the K words this can need
// and hands each row its own. fold_ctrl runs the schedule and coef_store
// holds the coefficient bits. kc and mc can be changed at run time as long as
// kc*mc = K*N and mc >= N.
//
// Ports:
//   x_in / x_take   x_in is sampled in the cycle x_take is high (slot N-1,
//                   once every N cycles); the source must hold it there.
//   cfg_we, cfg_mc  request coefficient length mc (applied at the next period
//                   boundary); cfg_err pulses for an illegal length; mc is the
//                   length in force.
//   coef_we, coef_wdata  new coefficient vector, bit j*mc + i = bit i of
//                   coefficient j; applied at the next period boundary.
//                   coef_pending is high while one waits.
//   y, y_strobe, y_valid  y is updated once per period; y_strobe pulses with
//                   each update. y_valid is high on updates whose whole sum
//                   was formed with one coefficient vector and one mc, which
//                   takes K periods after reset or a change.
// Timing: if x_take samples are numbered s[0], s[1], ... and an update of y
// follows q samples, then (with s[t] = 0 for t < 0)
//   y = sum_{j=0}^{kc-1} c_j * s[q - 1 - K + j],
// i.e. coefficient kc-1 meets the newest sample, K - kc + 1 samples back.
//
// From the design description: folding sets, retiming, the register bound
// K, one input every N cycles. Own choices: sizes, port protocol, output
// register and the y_valid rule.
module folded_fir_top
  import fir_fold_pkg::*;
#(
  parameter int unsigned K        = K_DEF,
  parameter int unsigned N        = N_DEF,
  parameter int unsigned W        = W_DEF,
  parameter int unsigned MC_RESET = MC_DEF,
  localparam int unsigned L     = K * N,
  localparam int unsigned ACC_W = W + L,
  localparam int unsigned SW    = clog2_min1(N),
  localparam int unsigned IW    = clog2_min1(L),
  localparam int unsigned MW    = $clog2(L + 1),
  localparam int unsigned DW    = clog2_min1(K),
  localparam int unsigned CW    = $clog2(K + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     x_in,
  output logic             x_take,
  input  logic             cfg_we,
  input  logic [MW-1:0]    cfg_mc,
  output logic             cfg_err,
  output logic [MW-1:0]    mc,
  input  logic             coef_we,
  input  logic [L-1:0]     coef_wdata,
  output logic             coef_pending,
  output logic [ACC_W-1:0] y,
  output logic             y_strobe,
  output logic             y_valid
);

  logic [SW-1:0]    slot;
  logic             last_slot;
  logic             cfg_apply;
  logic             coef_apply;
  logic [IW-1:0]    bit_idx [K];
  logic [DW-1:0]    dsel    [K];
  logic [W-1:0]     x_row   [K];
  logic             cbit    [K];
  logic [ACC_W-1:0] acc     [K];
  logic [CW-1:0]    settle_q;   // periods since the last change, saturating at K

  assign x_take = last_slot;

  fold_ctrl #(.K(K), .N(N), .MC_RESET(MC_RESET)) u_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_mc, .cfg_err, .cfg_apply, .mc,
    .slot, .last_slot, .bit_idx, .dsel
  );

  input_reorder #(.K(K), .W(W)) u_reorder (
    .clk, .rst_n, .shift(last_slot), .x_in, .dsel, .x_row
  );

  coef_store #(.K(K), .N(N)) u_coef (
    .clk, .rst_n, .wr(coef_we), .wdata(coef_wdata), .commit(last_slot),
    .slot, .pending(coef_pending), .applied(coef_apply), .cbit
  );

  for (genvar s = 0; s < K; s++) begin : g_row
    fold_pe #(.W(W), .ACC_W(ACC_W), .IW(IW)) u_pe (
      .clk, .rst_n,
      .first   (slot == '0),
      .sum_in  ((s == 0) ? '0 : acc[(s == 0) ? 0 : s-1]),
      .x       (x_row[s]),
      .cbit    (cbit[s]),
      .bit_idx (bit_idx[s]),
      .acc     (acc[s])
    );
  end

  // In slot 0 the last row holds the sum finished in the previous period.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      settle_q <= '0;
      y        <= '0;
      y_strobe <= 1'b0;
      y_valid  <= 1'b0;
    end else begin
      y_strobe <= (slot == '0);
      if (slot == '0) begin
        y       <= acc[K-1];
        y_valid <= (settle_q == CW'(K));
      end else begin
        y_valid <= 1'b0;
      end
      if (last_slot) begin
        if (cfg_apply || coef_apply) settle_q <= '0;
        else if (settle_q != CW'(K)) settle_q <= settle_q + 1'b1;
      end
    end
  end

endmodule
