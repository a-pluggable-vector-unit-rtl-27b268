// tb_vu_vrf: self-checking test of the banked, two-copy vector register file.
//
// Three ports issue random reads and writes to random registers and copies. The model
// applies the bank rule (registers r with equal r mod 4 share a bank; the lowest port
// wins its read and its write slot) and checks every grant and, one cycle after a
// granted read, the returned data. The copy table is driven with random allocations,
// commits of speculative registers and flushes and compared with a model of the
// architectural and speculative bits (rd_sel = arch ^ spec, wr_sel = ~arch).
module tb_vu_vrf;
  import vu_pkg::*;
  localparam int NPORT = 3;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;

  logic       rreq [NPORT], rcopy [NPORT], rgnt [NPORT], rvalid [NPORT];
  logic [4:0] rreg [NPORT];
  vreg_t      rdata [NPORT];
  logic       wreq [NPORT], wcopy [NPORT], wgnt [NPORT];
  logic [4:0] wreg [NPORT];
  vreg_t      wdata [NPORT];
  regmask_t   rd_sel, wr_sel, spec, alloc_mask, commit_mask;
  logic       alloc, commit;

  vu_vrf dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(flush),
    .rreq_i(rreq), .rreg_i(rreg), .rcopy_i(rcopy), .rgnt_o(rgnt),
    .rvalid_o(rvalid), .rdata_o(rdata),
    .wreq_i(wreq), .wreg_i(wreg), .wcopy_i(wcopy), .wdata_i(wdata), .wgnt_o(wgnt),
    .rd_sel_o(rd_sel), .wr_sel_o(wr_sel), .spec_o(spec),
    .alloc_i(alloc), .alloc_mask_i(alloc_mask),
    .commit_i(commit), .commit_mask_i(commit_mask)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  vreg_t    m_mem [2][32];
  bit       m_known [2][32];
  regmask_t m_arch, m_spec;
  bit       exp_valid [NPORT];
  vreg_t    exp_data [NPORT];
  bit       exp_known [NPORT];

  initial begin
    int n_conf = 0, n_rd = 0;
    m_arch = '0; m_spec = '0;
    foreach (m_known[c, r]) m_known[c][r] = 0;
    for (int p = 0; p < NPORT; p++) begin
      rreq[p] = 0; wreq[p] = 0; rreg[p] = 0; wreg[p] = 0; rcopy[p] = 0; wcopy[p] = 0;
      wdata[p] = '0; exp_valid[p] = 0;
    end
    alloc = 0; commit = 0; alloc_mask = '0; commit_mask = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      bit rt [4], wt [4];
      bit eg_r [NPORT], eg_w [NPORT];
      @(negedge clk);
      // read data of last cycle's grants
      for (int p = 0; p < NPORT; p++) begin
        check(rvalid[p] == exp_valid[p], "read valid");
        if (exp_valid[p] && exp_known[p]) begin
          check(rdata[p] == exp_data[p], $sformatf("read data port %0d cycle %0d", p, cyc));
          n_rd++;
        end
      end
      flush = (cyc % 1000 == 999);
      for (int p = 0; p < NPORT; p++) begin
        rreq[p]  = $urandom_range(0, 1);
        rreg[p]  = 5'($urandom_range(0, 31));
        rcopy[p] = $urandom_range(0, 1);
        wreq[p]  = $urandom_range(0, 1);
        wreg[p]  = 5'($urandom_range(0, 31));
        wcopy[p] = $urandom_range(0, 1);
        wdata[p] = {8{$urandom}};
      end
      commit = $urandom_range(0, 1);
      commit_mask = m_spec & {$urandom};
      alloc = $urandom_range(0, 1);
      alloc_mask = {$urandom} & ~(m_spec & ~(commit ? commit_mask : 32'd0));
      #1;
      check(rd_sel == (m_arch ^ m_spec) && wr_sel == ~m_arch && spec == m_spec, "copy table");
      foreach (rt[b]) begin rt[b] = 0; wt[b] = 0; end
      for (int p = 0; p < NPORT; p++) begin
        eg_r[p] = rreq[p] && !rt[rreg[p] % 4];
        if (eg_r[p]) rt[rreg[p] % 4] = 1; else if (rreq[p]) n_conf++;
        eg_w[p] = wreq[p] && !wt[wreg[p] % 4];
        if (eg_w[p]) wt[wreg[p] % 4] = 1;
        check(rgnt[p] == eg_r[p] && wgnt[p] == eg_w[p], $sformatf("grants port %0d", p));
      end
      @(posedge clk);
      // reads see the value before this cycle's writes
      for (int p = 0; p < NPORT; p++) begin
        exp_valid[p] = eg_r[p];
        exp_data[p]  = m_mem[rcopy[p]][rreg[p]];
        exp_known[p] = m_known[rcopy[p]][rreg[p]];
      end
      for (int p = 0; p < NPORT; p++) if (eg_w[p]) begin
        m_mem[wcopy[p]][wreg[p]] = wdata[p];
        m_known[wcopy[p]][wreg[p]] = 1;
      end
      if (flush) m_spec = '0;
      else begin
        if (commit) m_arch ^= commit_mask;
        m_spec = (m_spec & ~(commit ? commit_mask : '0)) | (alloc ? alloc_mask : '0);
      end
    end
    check(n_conf > 500 && n_rd > 1000, "bank conflicts and checked reads");
    $display("conflicts=%0d reads=%0d", n_conf, n_rd);
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
