// tb_vu_lock_server: self-checking test of the register lock server.
//
// Four requesters ask for random read/write register sets while three holders release
// the sets they were granted. A model of write bits and reader counts predicts every
// grant (all or nothing, in requester order, later requesters see earlier grants of
// the same cycle) and the lock state; the test also checks that a write lock and a
// read lock never coexist and that a flush drops everything. Default parameters.
module tb_vu_lock_server;
  import vu_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;

  localparam int NREQ = 4, NREL = 3;
  logic     acq_valid [NREQ];
  regmask_t acq_rd [NREQ], acq_wr [NREQ];
  logic     acq_gnt [NREQ];
  regmask_t rel_rd [NREL], rel_wr [NREL];
  regmask_t wr_locked, rd_locked;

  vu_lock_server dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(flush),
    .acq_valid_i(acq_valid), .acq_rd_i(acq_rd), .acq_wr_i(acq_wr), .acq_gnt_o(acq_gnt),
    .rel_rd_i(rel_rd), .rel_wr_i(rel_wr),
    .wr_locked_o(wr_locked), .rd_locked_o(rd_locked)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // model
  regmask_t m_wr;
  int       m_cnt [32];
  // what each holder owns (to release later)
  regmask_t own_rd [NREL][$], own_wr [NREL][$];
  int n_gnt = 0, n_deny = 0, n_same_cycle = 0;

  function automatic regmask_t rmask(int n);
    regmask_t m;
    m = '0;
    for (int i = 0; i < n; i++) m[$urandom_range(0, 31)] = 1'b1;
    return m;
  endfunction

  initial begin
    m_wr = '0;
    foreach (m_cnt[i]) m_cnt[i] = 0;
    for (int q = 0; q < NREQ; q++) begin acq_valid[q] = 0; acq_rd[q] = '0; acq_wr[q] = '0; end
    for (int h = 0; h < NREL; h++) begin rel_rd[h] = '0; rel_wr[h] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      regmask_t t_wr, t_rd, exp_wr;
      bit exp_g [NREQ];
      int ng;
      @(negedge clk);
      flush = (cyc % 1499 == 1000);
      for (int q = 0; q < NREQ; q++) begin
        acq_valid[q] = ($urandom_range(0, 1) == 1);
        acq_rd[q] = rmask($urandom_range(0, 3));
        // stay inside the 3-bit reader counters (at most 4 new readers per cycle)
        for (int r = 0; r < 32; r++) if (m_cnt[r] >= 3) acq_rd[q][r] = 1'b0;
        acq_wr[q] = rmask($urandom_range(0, 2)) & ~acq_rd[q];
      end
      for (int h = 0; h < NREL; h++) begin
        rel_rd[h] = '0; rel_wr[h] = '0;
        if (own_rd[h].size() > 0 && $urandom_range(0, 3) != 0) begin
          rel_rd[h] = own_rd[h].pop_front();
          rel_wr[h] = own_wr[h].pop_front();
        end
      end
      #1;
      // expected grants
      t_wr = m_wr;
      for (int r = 0; r < 32; r++) t_rd[r] = (m_cnt[r] != 0);
      ng = 0;
      for (int q = 0; q < NREQ; q++) begin
        exp_g[q] = acq_valid[q] && ((acq_rd[q] & t_wr) == '0) && ((acq_wr[q] & (t_wr | t_rd)) == '0);
        if (exp_g[q]) begin t_wr |= acq_wr[q]; t_rd |= acq_rd[q]; ng++; end
        check(acq_gnt[q] == exp_g[q], $sformatf("grant %0d cycle %0d", q, cyc));
        if (acq_valid[q] && !exp_g[q]) n_deny++;
      end
      if (ng > 1) n_same_cycle++;
      check(wr_locked == m_wr, "write locks");
      check((wr_locked & rd_locked) == '0, "write and read lock on one register");
      @(posedge clk);
      if (flush) begin
        m_wr = '0;
        foreach (m_cnt[i]) m_cnt[i] = 0;
        for (int h = 0; h < NREL; h++) begin own_rd[h].delete(); own_wr[h].delete(); end
      end else begin
        for (int q = 0; q < NREQ; q++) if (exp_g[q]) begin
          int h;
          n_gnt++;
          m_wr |= acq_wr[q];
          for (int r = 0; r < 32; r++) if (acq_rd[q][r]) m_cnt[r]++;
          h = q % NREL;
          own_rd[h].push_back(acq_rd[q]);
          own_wr[h].push_back(acq_wr[q]);
        end
        for (int h = 0; h < NREL; h++) begin
          m_wr &= ~rel_wr[h];
          for (int r = 0; r < 32; r++) if (rel_rd[h][r] && m_cnt[r] > 0) m_cnt[r]--;
        end
      end
    end
    check(n_gnt > 500 && n_deny > 500, "grants and denials");
    check(n_same_cycle > 50, "several grants in one cycle");
    $display("grants=%0d denials=%0d multi=%0d", n_gnt, n_deny, n_same_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
