// tb_fold_pe: self-checking test of one folded processing row.
// Drives random slot-0 flags, incoming sums, words, coefficient bits and bit
// weights on falling edges, and after every rising edge compares the row
// register with an arithmetic model acc = base + cbit * x * 2^i, base being
// sum_in in slot 0 and the previous acc otherwise.
module tb_fold_pe;
  localparam int unsigned W = 8, ACC_W = 24, IW = 4;
  localparam longint unsigned MASK = (64'd1 << ACC_W) - 1;
  logic clk = 0, rst_n = 0;
  logic first, cbit;
  logic [ACC_W-1:0] sum_in, acc;
  logic [W-1:0] x;
  logic [IW-1:0] bit_idx;
  longint unsigned model;
  int checks = 0, failures = 0;

  fold_pe #(.W(W), .ACC_W(ACC_W), .IW(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    first = 1; cbit = 0; sum_in = 0; x = 0; bit_idx = 0; model = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if (acc !== ACC_W'(model)) begin
        failures++;
        if (failures < 10) $display("t=%0d acc=%0h model=%0h", t, acc, model);
      end
      first   = ($urandom_range(0, 3) == 0);
      cbit    = $urandom_range(0, 1) != 0;
      sum_in  = ACC_W'($urandom_range(0, 1 << 20));
      x       = W'($urandom);
      bit_idx = IW'($urandom_range(0, 15));
      model   = ((first ? longint'(sum_in) : model)
                + (cbit ? (longint'(x) << bit_idx) : 0)) & MASK;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
