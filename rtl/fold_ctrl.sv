// fold_ctrl: schedule of the folded, retimed FIR array.
//
// The unfolded filter is a chain of L = K*N operations; operation p forms
// the partial product of bit i = p % mc of coefficient j = p / mc with one
// input word and adds it to the running sum. Folding puts operation p on row
// s = p / N in time slot r = p % N. Retiming the chain so that every folded
// edge has a non-negative delay gives r(p) = floor((L-1-p)/mc) -
// floor((L-1-p)/N), which lies between kc-K and 0 when mc >= N. Relative to
// the newest input word, operation p then uses the word received
// d(p) = s - j folding periods earlier, with 0 <= d <= K-kc.
//
// This block counts the slot r (0..N-1) and, for every row, works out the bit
// weight i and the word delay d of the operation it runs in the current slot.
// The start of row s is that of row s-1 moved on by N positions, so no
// divider is needed: because mc >= N, a move of at most N positions crosses
// at most one coefficient boundary.
//
// Interface: cfg_we/cfg_mc request a new coefficient length. A legal request
// is held and takes effect at the next folding-period boundary (cfg_apply
// pulses in that last slot); an illegal one (mc not dividing K*N, or mc < N)
// is dropped and raises cfg_err for one cycle. last_slot is high in slot N-1.
// All outputs follow registers only (slot, mc); bit_idx and dsel are
// combinational from them and valid in the same cycle as slot.
//
// From the design description: folding sets and orders, the retiming, the
// constraint mc >= N and runtime-changeable coefficient length. Own choices:
// the incremental position arithmetic, applying a new length only at a
// period boundary, and the reset length MC_RESET.
module fold_ctrl
  import fir_fold_pkg::*;
#(
  parameter int unsigned K        = K_DEF,
  parameter int unsigned N        = N_DEF,
  parameter int unsigned MC_RESET = MC_DEF,
  localparam int unsigned L  = K * N,
  localparam int unsigned SW = clog2_min1(N),       // slot width
  localparam int unsigned IW = clog2_min1(L),       // bit-index width
  localparam int unsigned MW = $clog2(L + 1),       // mc width
  localparam int unsigned DW = clog2_min1(K)        // delay / row index width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [MW-1:0]        cfg_mc,
  output logic                 cfg_err,
  output logic                 cfg_apply,
  output logic [MW-1:0]        mc,
  output logic [SW-1:0]        slot,
  output logic                 last_slot,
  output logic [IW-1:0]        bit_idx [K],
  output logic [DW-1:0]        dsel    [K]
);

  logic          pend_q;
  logic [MW-1:0] pend_mc_q;
  logic          req_ok;

  assign last_slot = (slot == SW'(N - 1));
  assign req_ok    = mc_legal(int'(cfg_mc), K, N);
  assign cfg_apply = last_slot && (pend_q || (cfg_we && req_ok));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot      <= '0;
      mc        <= MW'(MC_RESET);
      pend_q    <= 1'b0;
      pend_mc_q <= '0;
      cfg_err   <= 1'b0;
    end else begin
      slot    <= last_slot ? '0 : slot + 1'b1;
      cfg_err <= cfg_we && !req_ok;
      if (cfg_we && req_ok) begin
        // A request in the last slot is applied at once.
        if (last_slot) begin
          mc     <= cfg_mc;
          pend_q <= 1'b0;
        end else begin
          pend_q    <= 1'b1;
          pend_mc_q <= cfg_mc;
        end
      end else if (last_slot && pend_q) begin
        mc     <= pend_mc_q;
        pend_q <= 1'b0;
      end
    end
  end

  // Start position of each row as (bit index, coefficient index), then the
  // position reached in the current slot.
  logic [IW-1:0] start_i [K];
  logic [DW-1:0] start_j [K];

  always_comb begin
    logic [IW:0] t;
    start_i[0] = '0;
    start_j[0] = '0;
    for (int unsigned s = 1; s < K; s++) begin
      t = {1'b0, start_i[s-1]} + (IW+1)'(N);
      if (t >= (IW+1)'(mc)) begin
        start_i[s] = IW'(t - (IW+1)'(mc));
        start_j[s] = start_j[s-1] + 1'b1;
      end else begin
        start_i[s] = IW'(t);
        start_j[s] = start_j[s-1];
      end
    end
  end

  always_comb begin
    logic [IW:0]   t;
    logic [DW-1:0] j;
    for (int unsigned s = 0; s < K; s++) begin
      t = {1'b0, start_i[s]} + (IW+1)'(slot);
      if (t >= (IW+1)'(mc)) begin
        bit_idx[s] = IW'(t - (IW+1)'(mc));
        j          = start_j[s] + 1'b1;
      end else begin
        bit_idx[s] = IW'(t);
        j          = start_j[s];
      end
      dsel[s] = DW'(s) - j;
    end
  end

  // The coefficient length in force is always a legal one.
  assert property (@(posedge clk) disable iff (!rst_n) mc_legal(int'(mc), K, N))
    else $error("fold_ctrl: illegal coefficient length %0d", mc);

endmodule
