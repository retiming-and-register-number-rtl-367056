// tb_fold_ctrl: self-checking test of the folding schedule.
// Uses a 6-row array folded by 2 (L = 12), so that coefficient lengths 2, 3,
// 4, 6 and 12 are legal and length 3 puts coefficient boundaries in the
// middle of rows. Random length requests, legal and not, arrive at random
// times. Every cycle the slot, the length in force and, for every row, the
// bit index p % mc and the word delay s - p / mc (p = s*N + slot) are
// compared with values computed here by division; the delay must also stay
// within K - kc and, for every length, reach K - kc: exactly K - kc + 1
// input words are live at a time. The slot must repeat every N cycles.
module tb_fold_ctrl;
  localparam int unsigned K = 6, N = 2, L = K * N;
  localparam int unsigned SW = 1, IW = 4, MW = 4, DW = 3;
  logic clk = 0, rst_n = 0;
  logic cfg_we, cfg_err, cfg_apply, last_slot;
  logic [MW-1:0] cfg_mc, mc;
  logic [SW-1:0] slot;
  logic [IW-1:0] bit_idx [K];
  logic [DW-1:0] dsel [K];
  int checks = 0, failures = 0;
  int m_mc, m_slot, m_pend, m_pmc, m_err, n_apply, n_err;
  int seen [int];
  int maxd [int];   // deepest word delay seen per coefficient length

  fold_ctrl #(.K(K), .N(N), .MC_RESET(6)) dut (.*);

  always #5 clk = ~clk;

  function automatic bit legal(int v);
    return v >= int'(N) && v <= int'(L) && (L % v) == 0;
  endfunction

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("%t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; cfg_mc = 0;
    m_mc = 6; m_slot = 1 % N;  // one edge passes before the first check
    m_pend = 0; m_pmc = 0; m_err = 0; n_apply = 0; n_err = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      chk(int'(slot) == m_slot, $sformatf("slot %0d want %0d", slot, m_slot));
      chk(int'(mc) == m_mc, $sformatf("mc %0d want %0d", mc, m_mc));
      chk(cfg_err == m_err[0], "cfg_err");
      chk(last_slot == (m_slot == N - 1), "last_slot");
      for (int s = 0; s < K; s++) begin
        int p, kc;
        p  = s * N + m_slot;
        kc = L / m_mc;
        chk(int'(bit_idx[s]) == p % m_mc,
            $sformatf("row %0d slot %0d mc %0d: bit %0d want %0d", s, m_slot, m_mc, bit_idx[s], p % m_mc));
        chk(int'(dsel[s]) == s - p / m_mc,
            $sformatf("row %0d slot %0d mc %0d: delay %0d want %0d", s, m_slot, m_mc, dsel[s], s - p / m_mc));
        chk(int'(dsel[s]) <= K - kc, "delay beyond K - kc");
        if (!maxd.exists(m_mc) || maxd[m_mc] < int'(dsel[s])) maxd[m_mc] = int'(dsel[s]);
      end
      // next request
      cfg_we = ($urandom_range(0, 15) == 0);
      cfg_mc = MW'($urandom_range(0, 13));
      #1;
      chk(cfg_apply == ((m_slot == N - 1) && (m_pend != 0 || (cfg_we && legal(int'(cfg_mc))))), "cfg_apply");
      // model of the coming edge
      m_err = (cfg_we && !legal(int'(cfg_mc))) ? 1 : 0;
      if (m_err != 0) n_err++;
      if (cfg_we && legal(int'(cfg_mc))) begin
        if (m_slot == N - 1) begin m_mc = int'(cfg_mc); m_pend = 0; n_apply++; seen[m_mc] = 1; end
        else begin m_pend = 1; m_pmc = int'(cfg_mc); end
      end else if (m_slot == N - 1 && m_pend != 0) begin
        m_mc = m_pmc; m_pend = 0; n_apply++; seen[m_mc] = 1;
      end
      m_slot = (m_slot == N - 1) ? 0 : m_slot + 1;
    end
    chk(n_apply > 0 && n_err > 0, "no length change or no illegal request seen");
    chk(seen.num() == 5, $sformatf("only %0d of 5 legal lengths exercised", seen.num()));
    // K - kc + 1 words are live at once: exactly that many registers are read.
    foreach (maxd[v]) chk(maxd[v] == K - L / v, $sformatf("mc %0d: deepest delay %0d want %0d", v, maxd[v], K - L / v));
    $display("length changes %0d, illegal requests %0d", n_apply, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
