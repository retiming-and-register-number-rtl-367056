// input_reorder: input data reordering module of the folded FIR filter.
//
// After retiming, the K rows of the folded array work in the same folding
// period on different input words: row s in slot r needs the word received
// d = s - j periods ago (j is the coefficient its operation belongs to), with
// 0 <= d <= K - kc. A word therefore stays live for K - kc + 1 periods, and a
// new one arrives every N cycles, so K - kc + 1 registers are the minimum; the
// worst case kc = 1 sets the size to K words, which is what is built here,
// so that the coefficient count can change at run time.
//
// Allocation: every word enters register 0 and moves forward one register per
// folding period (register d holds the word received d periods ago). Because
// every word has the same lifetime, forward allocation alone fills the
// registers exactly and no backward move is ever needed. Each row reads its
// word through a K-to-1 multiplexer addressed by dsel.
//
// Interface and timing: when shift is high (the last slot of a period) x_in is
// written to register 0 and the others move on; the words seen by the rows
// change at the following clock edge. x_row is combinational from the
// registers and dsel. Reset clears all registers to zero.
//
// From the design description: the register count K (the bound for kc = 1),
// one new word every N cycles. Own choice: the shift-register form of the
// allocation and the read multiplexers.
module input_reorder
  import fir_fold_pkg::*;
#(
  parameter int unsigned K = K_DEF,
  parameter int unsigned W = W_DEF,
  localparam int unsigned DW = clog2_min1(K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift,
  input  logic [W-1:0]  x_in,
  input  logic [DW-1:0] dsel  [K],
  output logic [W-1:0]  x_row [K]
);

  logic [W-1:0] regs [K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned d = 0; d < K; d++) regs[d] <= '0;
    end else if (shift) begin
      regs[0] <= x_in;
      for (int unsigned d = 1; d < K; d++) regs[d] <= regs[d-1];
    end
  end

  always_comb begin
    for (int unsigned s = 0; s < K; s++) x_row[s] = regs[dsel[s]];
  end

  // A row never asks for a word older than the register file holds.
  for (genvar s = 0; s < K; s++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) int'(dsel[s]) < int'(K))
      else $error("input_reorder: row %0d selects delay %0d", s, dsel[s]);
  end

endmodule
