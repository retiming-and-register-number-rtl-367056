// tb_folded_fir_top_k6n2: end-to-end test of the folded FIR filter with 6
// rows folded by 2 (L = 12 coefficient bits, 8-bit data).
//
// Same method as the default-size test: random input words, every output
// update compared with sum_j c_j * s[q-1-K+j] computed from the recorded
// samples, output and input periods of N cycles, and y_valid exactly K
// periods after each change. This geometry allows coefficient lengths 2, 3,
// 4, 6 and 12; with length 3 the coefficient boundaries fall inside rows, so
// a row switches to a newer input word within a folding period. Every legal
// length must produce checked outputs; coefficient updates and illegal
// length requests must occur.
module tb_folded_fir_top_k6n2;
  import fir_fold_pkg::*;
  localparam int unsigned K = 6, N = 2, W = 8, MC0 = 6;
  localparam int unsigned L = K * N, ACC_W = W + L, MW = $clog2(L + 1);

  logic clk = 0, rst_n = 0;
  logic [W-1:0] x_in;
  logic x_take;
  logic cfg_we, cfg_err, coef_we, coef_pending;
  logic [MW-1:0] cfg_mc, mc;
  logic [L-1:0] coef_wdata;
  logic [ACC_W-1:0] y;
  logic y_strobe, y_valid;

  folded_fir_top #(.K(K), .N(N), .W(W), .MC_RESET(MC0)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int samples [$];
  longint cycle = 0, last_strobe = -1, last_take = -1;
  // model state
  int m_mc = MC0, p_mc = -1;
  logic [L-1:0] m_coef = '0, p_coef;
  bit p_coef_v = 0;
  int settle = 0;
  // mechanism counters
  int n_valid_mc [int];
  int n_coef_upd = 0, n_cfg = 0, n_illegal = 0, n_invalid_after_change = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("cycle %0d: %s", cycle, what);
    end
  endtask

  function automatic longint expected_y(int q);
    longint acc = 0;
    int kc = L / m_mc;
    for (int j = 0; j < kc; j++) begin
      longint c = longint'(64'(m_coef) >> (j * m_mc)) & ((64'd1 << m_mc) - 1);
      int idx = q - 1 - int'(K) + j;
      longint xs = (idx >= 0) ? longint'(samples[idx]) : 0;
      acc += c * xs;
    end
    return acc;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One falling edge: check outputs of the last rising edge, then drive the
  // inputs for the next one and update the model of that edge.
  task automatic step(bit do_cfg, int new_mc, bit do_coef, logic [L-1:0] new_coef);
    @(negedge clk);
    cycle++;
    if (y_strobe) begin
      if (last_strobe >= 0) chk(cycle - last_strobe == longint'(N), "output period is not N");
      last_strobe = cycle;
      chk(y_valid == (settle >= int'(K)), $sformatf("y_valid=%0b settle=%0d", y_valid, settle));
      if (y_valid) begin
        longint e = expected_y(samples.size());
        chk(longint'(y) == e, $sformatf("mc=%0d y=%0d want %0d", m_mc, y, e));
        n_valid_mc[m_mc]++;
      end else if (settle < int'(K) && samples.size() > int'(K)) begin
        n_invalid_after_change++;
      end
    end
    chk(int'(mc) == m_mc, $sformatf("mc=%0d want %0d", mc, m_mc));
    chk(coef_pending == p_coef_v, "coef_pending");
    cfg_we     = do_cfg;
    cfg_mc     = MW'(new_mc);
    coef_we    = do_coef;
    coef_wdata = new_coef;
    x_in       = W'($urandom);
    if (do_cfg && !((new_mc >= int'(N)) && new_mc <= int'(L) && (L % new_mc) == 0)) n_illegal++;
    else if (do_cfg) p_mc = new_mc;
    if (do_coef) begin p_coef = new_coef; p_coef_v = 1; end
    if (x_take) begin
      if (last_take >= 0) chk(cycle - last_take == longint'(N), "input period is not N");
      last_take = cycle;
      samples.push_back(int'(x_in));
      // period boundary: pending changes take effect
      if (p_mc >= 0 || p_coef_v) begin
        if (p_mc >= 0) begin m_mc = p_mc; n_cfg++; end
        if (p_coef_v) begin m_coef = p_coef; n_coef_upd++; end
        p_mc = -1; p_coef_v = 0;
        settle = 0;
      end else if (settle < int'(K)) settle++;
    end
    @(posedge clk);
    #1;
    chk(cfg_err == (do_cfg && !((new_mc >= int'(N)) && new_mc <= int'(L) && (L % new_mc) == 0)),
        "cfg_err");
  endtask

  task automatic run(int cycles);
    for (int i = 0; i < cycles; i++) step(0, 0, 0, '0);
  endtask

  // Run, then issue a change at a random cycle of the period.
  task automatic change(bit do_cfg, int new_mc, bit do_coef, int periods);
    run($urandom_range(0, N - 1));
    step(do_cfg, new_mc, do_coef, L'($urandom));
    run(periods * N);
  endtask

  initial begin
    x_in = 0; cfg_we = 0; cfg_mc = 0; coef_we = 0; coef_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    // settle counts from reset like from a change
    run(10 * N);
    change(0, 0, 1, 25);            // first coefficients, mc = 6 (2 coefficients)
    change(1, 3, 0, 25);            // 4 coefficients of 3 bits: boundaries inside rows
    change(0, 0, 1, 20);            // adaptive update while running
    change(1, 2, 0, 25);            // 6 coefficients of 2 bits (mc = N)
    change(1, 5, 0, 3);             // illegal: does not divide 12
    change(1, 1, 0, 3);             // illegal: shorter than N
    change(1, 4, 1, 25);            // 3 coefficients of 4 bits, new coefficients
    change(1, 12, 0, 25);           // 1 coefficient of 12 bits
    change(0, 0, 1, 20);
    // mechanisms
    chk(n_valid_mc.exists(2) && n_valid_mc.exists(3) && n_valid_mc.exists(4) &&
        n_valid_mc.exists(6) && n_valid_mc.exists(12),
        "not every coefficient length produced checked outputs");
    chk(n_coef_upd >= 4, "too few coefficient updates");
    chk(n_cfg >= 4, "too few length changes");
    chk(n_illegal >= 2, "no illegal length request");
    chk(n_invalid_after_change > 0, "output never held invalid after a change");
    foreach (n_valid_mc[v]) $display("checked outputs with mc=%0d: %0d", v, n_valid_mc[v]);
    $display("coefficient updates %0d, length changes %0d, illegal requests %0d, outputs held invalid %0d",
             n_coef_upd, n_cfg, n_illegal, n_invalid_after_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
