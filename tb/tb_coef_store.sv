// tb_coef_store: self-checking test of the coefficient bit store.
// Writes random coefficient vectors at random slots; checks that each row
// reads bit s*N + slot of the vector in force, that a written vector takes
// effect only at the next period boundary, and the pending/applied flags.
module tb_coef_store;
  localparam int unsigned K = 3, N = 4, L = K * N, SW = 2;
  logic clk = 0, rst_n = 0;
  logic wr, commit, pending, applied;
  logic [L-1:0] wdata;
  logic [SW-1:0] slot;
  logic cbit [K];
  logic [L-1:0] cur, nxt;
  logic nxt_v;
  int checks = 0, failures = 0, n_applied = 0;

  coef_store #(.K(K), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr = 0; wdata = 0; slot = 0; commit = 0; cur = 0; nxt = 0; nxt_v = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // state after the last edge
      checks++;
      if (pending !== nxt_v) begin
        failures++; $display("t=%0d pending=%0b want %0b", t, pending, nxt_v);
      end
      slot   = SW'(t % N);
      commit = (slot == SW'(N - 1));
      wr     = ($urandom_range(0, 9) == 0);
      wdata  = L'($urandom);
      #1;
      for (int s = 0; s < K; s++) begin
        checks++;
        if (cbit[s] !== cur[s*N + int'(slot)]) begin
          failures++;
          if (failures < 10) $display("t=%0d row %0d slot %0d bit %0b want %0b", t, s, slot, cbit[s], cur[s*N + int'(slot)]);
        end
      end
      checks++;
      if (applied !== (commit && (wr || nxt_v))) begin
        failures++; $display("t=%0d applied=%0b", t, applied);
      end
      // model of the next edge
      if (wr) begin nxt = wdata; nxt_v = 1; end
      if (commit && nxt_v) begin cur = nxt; nxt_v = 0; n_applied++; end
    end
    checks++;
    if (n_applied == 0) begin failures++; $display("no vector was applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
