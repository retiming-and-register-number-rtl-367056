// tb_input_reorder: self-checking test of the input reordering registers.
// Shifts in a random word every N cycles, as the filter does, and on every
// cycle gives each row a random delay select; each row's word must equal the
// word received that many shifts ago (zero before any was received).
module tb_input_reorder;
  localparam int unsigned K = 5, W = 8, N = 3, DW = 3;
  logic clk = 0, rst_n = 0;
  logic shift;
  logic [W-1:0] x_in;
  logic [DW-1:0] dsel [K];
  logic [W-1:0] x_row [K];
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  input_reorder #(.K(K), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 0; x_in = 0;
    for (int s = 0; s < K; s++) dsel[s] = '0;
    for (int d = 0; d < K; d++) hist.push_front('0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      if (shift) begin
        hist.push_front(x_in);
        void'(hist.pop_back());
      end
      for (int s = 0; s < K; s++) dsel[s] = DW'($urandom_range(0, K - 1));
      #1;
      for (int s = 0; s < K; s++) begin
        checks++;
        if (x_row[s] !== hist[dsel[s]]) begin
          failures++;
          if (failures < 10)
            $display("t=%0d row %0d d=%0d got %0h want %0h", t, s, dsel[s], x_row[s], hist[dsel[s]]);
        end
      end
      shift = (t % N) == N - 1;
      x_in  = W'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
