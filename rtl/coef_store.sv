// coef_store: coefficient bit store of the folded FIR filter.
//
// The kc coefficients of mc bits each are kept as one vector of L = K*N =
// kc*mc bits, bit p = j*mc + i being bit i (weight 2^i) of coefficient j.
// Operation p of the filter chain needs exactly bit p, and it runs on row
// s = p / N in slot r = p % N, so row s reads bit s*N + slot. Stored this way
// the layout does not depend on mc, and each row only ever addresses its own
// N bits.
//
// To let the filter adapt while it runs, a new coefficient vector is written
// into a shadow register (wr/wdata) and copied into the working register at
// the next folding-period boundary (commit high, in the last slot), so the
// rows never see a vector changing within a period. pending is high while a
// written vector waits; applied pulses in the cycle the copy happens. cbit is
// combinational from the working register and slot. Reset clears both
// registers.
//
// From the design description: one coefficient bit per operation, kc*mc = L
// and changeable coefficients. Own choices: the packed bit layout, the shadow
// register and the write port shape.
module coef_store
  import fir_fold_pkg::*;
#(
  parameter int unsigned K = K_DEF,
  parameter int unsigned N = N_DEF,
  localparam int unsigned L  = K * N,
  localparam int unsigned SW = clog2_min1(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr,
  input  logic [L-1:0]  wdata,
  input  logic          commit,
  input  logic [SW-1:0] slot,
  output logic          pending,
  output logic          applied,
  output logic          cbit [K]
);

  logic [L-1:0] shadow_q;
  logic [L-1:0] coef_q;

  // A write in the commit cycle goes straight through.
  assign applied = commit && (pending || wr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shadow_q <= '0;
      coef_q   <= '0;
      pending  <= 1'b0;
    end else begin
      if (wr) shadow_q <= wdata;
      if (commit) begin
        if (wr)           coef_q <= wdata;
        else if (pending) coef_q <= shadow_q;
        pending <= 1'b0;
      end else if (wr) begin
        pending <= 1'b1;
      end
    end
  end

  always_comb begin
    for (int unsigned s = 0; s < K; s++) cbit[s] = coef_q[s*N + int'(slot)];
  end

endmodule
