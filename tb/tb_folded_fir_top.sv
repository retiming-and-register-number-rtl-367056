// tb_folded_fir_top: end-to-end test of the folded FIR filter at its default
// sizes (K = 4 rows, folding factor N = 4, 8-bit data, so L = 16 coefficient
// bits).
//
// A random input word is offered every cycle and recorded when x_take is
// high. The filter is run with coefficient lengths 8 (2 coefficients), 4 (4
// coefficients) and 16 (1 coefficient), with new coefficient vectors written
// while it runs and with illegal length requests. Every output update is
// checked:
//   - updates come exactly every N cycles, inputs are taken every N cycles;
//   - y_valid is high exactly when K full periods have passed since the last
//     length or coefficient change;
//   - a valid y equals sum_j c_j * s[q-1-K+j], computed here from the
//     recorded samples s and the coefficient vector split into mc-bit fields.
// Each mechanism (each length, coefficient update, illegal request, output
// held invalid after a change) is counted and must occur at least once. With
// mc = 16 (one coefficient) the rows read all K reorder registers, so the
// checked mc = 16 outputs cover the deepest reordering.
module tb_folded_fir_top;
  import fir_fold_pkg::*;
  localparam int unsigned K = K_DEF, N = N_DEF, W = W_DEF;
  localparam int unsigned L = K * N, ACC_W = W + L, MW = $clog2(L + 1);

  logic clk = 0, rst_n = 0;
  logic [W-1:0] x_in;
  logic x_take;
  logic cfg_we, cfg_err, coef_we, coef_pending;
  logic [MW-1:0] cfg_mc, mc;
  logic [L-1:0] coef_wdata;
  logic [ACC_W-1:0] y;
  logic y_strobe, y_valid;

  folded_fir_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int samples [$];
  longint cycle = 0, last_strobe = -1, last_take = -1;
  // model state
  int m_mc = MC_DEF, p_mc = -1;
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
    change(0, 0, 1, 25);            // first coefficients, mc = 8 (2 coefficients)
    change(0, 0, 1, 20);            // adaptive update while running
    change(1, 4, 0, 25);            // 4 coefficients of 4 bits
    change(1, 12, 0, 3);            // illegal: does not divide 16
    change(1, 2, 0, 3);             // illegal: shorter than N
    change(0, 0, 1, 20);
    change(1, 16, 0, 25);           // 1 coefficient of 16 bits
    change(1, 8, 1, 25);            // length and coefficients together
    change(0, 0, 1, 1);             // two updates closer than K periods
    change(0, 0, 1, 20);
    // mechanisms
    chk(n_valid_mc.exists(4) && n_valid_mc.exists(8) && n_valid_mc.exists(16),
        "not every coefficient length produced checked outputs");
    chk(n_coef_upd >= 5, "too few coefficient updates");
    chk(n_cfg >= 3, "too few length changes");
    chk(n_illegal >= 2, "no illegal length request");
    chk(n_invalid_after_change > 0, "output never held invalid after a change");
    $display("checked outputs: mc=4 %0d, mc=8 %0d, mc=16 %0d", n_valid_mc[4], n_valid_mc[8], n_valid_mc[16]);
    $display("coefficient updates %0d, length changes %0d, illegal requests %0d, outputs held invalid %0d",
             n_coef_upd, n_cfg, n_illegal, n_invalid_after_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
