// fold_pe: one processing row of the folded semi-systolic FIR array.
//
// In the unfolded filter each operation is one row of basic cells, an AND
// gate and a full adder per bit: the input word is ANDed with one coefficient
// bit and the result, weighted by that bit's 2^i, is added to the running
// sum. After folding, one such row executes N operations in turn. Its output
// register is the single pipeline stage of an operation.
//
// In slot 0 (first high) the row starts from the sum handed on by the row
// before it (sum_in; zero for the first row); in the other slots it continues
// from its own register. Each cycle
//   acc <= base + (cbit ? x << bit_idx : 0).
// Because the retimed, folded chain has no delay between operations other
// than this register, the last operation of row s-1 (slot N-1) feeds the
// first operation of row s (slot 0) in the very next cycle.
//
// Data and coefficients are unsigned, as the AND-gate partial products imply.
// ACC_W must hold W + mc bits plus log2(kc) carries; W + K*N always does. The
// variable shift stands for the fixed bit offset of each row of cells in the
// unfolded array, which the folded row needs because its bit weight changes
// from slot to slot (own choice of implementation).
module fold_pe
  import fir_fold_pkg::*;
#(
  parameter int unsigned W     = W_DEF,
  parameter int unsigned ACC_W = W_DEF + K_DEF * N_DEF,
  parameter int unsigned IW    = clog2_min1(K_DEF * N_DEF)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             first,
  input  logic [ACC_W-1:0] sum_in,
  input  logic [W-1:0]     x,
  input  logic             cbit,
  input  logic [IW-1:0]    bit_idx,
  output logic [ACC_W-1:0] acc
);

  logic [ACC_W-1:0] pp;     // weighted partial product
  logic [ACC_W-1:0] base;

  always_comb begin
    pp   = cbit ? (ACC_W'(x) << bit_idx) : '0;
    base = first ? sum_in : acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= base + pp;
  end

endmodule
