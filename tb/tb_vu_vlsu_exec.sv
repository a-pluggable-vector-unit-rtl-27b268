// tb_vu_vlsu_exec: self-checking test of the load/store SIMD Execute module.
//
// Random unit-stride loads and stores (EEW 8..64, 1..8 registers, random vl, vstart and
// element-aligned bases, often crossing 4 KiB pages) against a memory model with a
// random-latency MMU (virtual page + 16 = physical page) and a memory that accepts
// requests with random back-pressure and returns read data one to three cycles later,
// in order. One virtual page faults. The test checks every loaded register (merged
// with the old value outside [vstart, vl)), the memory after every store, that no
// element at or after a fault is touched, the reported vstart and tval, one
// translation per page, the misaligned-base exception, and the byte enables.
module tb_vu_vlsu_exec;
  import vu_pkg::*;
  localparam int PAW = 40;
  localparam int VB = VLEN / 8;
  localparam logic [63:0] FAULT_PAGE = 64'd9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            req_valid, req_ready, resp_valid, resp_ready;
  ex_req_t         req;
  ex_resp_t        resp;
  logic            mmu_req, mmu_store, mmu_resp, mmu_fault;
  logic [63:0]     mmu_va;
  logic [PAW-1:0]  mmu_pa;
  logic            mem_req, mem_ready, mem_we, mem_rvalid;
  logic [PAW-1:0]  mem_addr;
  logic [MEMW-1:0] mem_wdata, mem_rdata;
  logic [MEMB-1:0] mem_be;
  logic            ev_xlat;

  vu_vlsu_exec dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(1'b0),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_i(req),
    .resp_valid_o(resp_valid), .resp_ready_i(resp_ready), .resp_o(resp),
    .mmu_req_valid_o(mmu_req), .mmu_vaddr_o(mmu_va), .mmu_store_o(mmu_store),
    .mmu_resp_valid_i(mmu_resp), .mmu_paddr_i(mmu_pa), .mmu_fault_i(mmu_fault),
    .mem_req_valid_o(mem_req), .mem_req_ready_i(mem_ready), .mem_addr_o(mem_addr),
    .mem_we_o(mem_we), .mem_wdata_o(mem_wdata), .mem_be_o(mem_be),
    .mem_rvalid_i(mem_rvalid), .mem_rdata_i(mem_rdata), .ev_xlat_o(ev_xlat)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- MMU and memory
  logic [7:0] pmem [logic [PAW-1:0]];   // physical memory, bytes
  function automatic logic [7:0] rdb(logic [PAW-1:0] a);
    return pmem.exists(a) ? pmem[a] : 8'(a * 7 + 3);
  endfunction
  int mmu_delay = 0, n_xlat = 0, n_touch_bad = 0;
  always @(posedge clk) begin
    if (mmu_req && !mmu_resp) mmu_delay <= mmu_delay + 1; else mmu_delay <= 0;
    if (mmu_req && mmu_resp) n_xlat++;
  end
  always_comb begin
    mmu_resp  = mmu_req && (mmu_delay >= 1);
    mmu_fault = (mmu_va[63:12] == FAULT_PAGE);
    mmu_pa    = PAW'({mmu_va[63:12] + 64'd16, mmu_va[11:0]});
  end
  logic [PAW-1:0] rq [$];
  int             rlat [$];
  always @(posedge clk) begin
    mem_ready <= ($urandom_range(0, 3) != 0);
    mem_rvalid <= 1'b0;
    if (rq.size() > 0) begin
      if (rlat[0] == 0) begin
        logic [PAW-1:0] a;
        a = rq.pop_front(); void'(rlat.pop_front());
        mem_rvalid <= 1'b1;
        for (int b = 0; b < MEMB; b++) mem_rdata[b*8 +: 8] <= rdb(a + PAW'(b));
      end else rlat[0] = rlat[0] - 1;
    end
    if (mem_req && mem_ready) begin
      if (mem_addr[PAW-1:12] == (PAW-12)'(FAULT_PAGE + 16)) n_touch_bad++;
      if (mem_addr % MEMB != 0) check(0, "beat address aligned");
      if (mem_we) begin
        for (int b = 0; b < MEMB; b++) if (mem_be[b]) pmem[mem_addr + PAW'(b)] = mem_wdata[b*8 +: 8];
      end else begin
        rq.push_back(mem_addr);
        rlat.push_back($urandom_range(0, 2));
      end
    end
  end

  // ---------------------------------------------------------------- instructions
  int n_ld = 0, n_st = 0, n_fault = 0, n_misal = 0, n_cross = 0;

  function automatic logic [PAW-1:0] pa(logic [63:0] va);
    return PAW'({va[63:12] + 64'd16, va[11:0]});
  endfunction

  task automatic run_one();
    vinstr_t d;
    int sb, nu, epr, vlmax, vl, vst, lim, pages, xl0;
    bit st, misal;
    logic [7:0] gd [8*VB];
    logic [7:0] ex [8*VB];
    logic [63:0] tval;
    d = '0;
    st = $urandom_range(0, 1);
    d.op = st ? OP_STORE : OP_LOAD;
    d.eew = 2'($urandom_range(0, 3));
    d.sew = d.eew;
    sb = 1 << d.eew;
    nu = 1 << $urandom_range(0, 3);
    d.nuops = 4'(nu);
    epr = VB / sb; vlmax = epr * nu;
    vl  = ($urandom_range(0, 2) == 0) ? vlmax : $urandom_range(1, vlmax);
    vst = ($urandom_range(0, 3) != 0) ? 0 : $urandom_range(0, vl - 1);
    d.vl = vl_t'(vl); d.vstart = vl_t'(vst); d.vlmax = vl_t'(vlmax);
    // base: around page boundaries, sometimes on the faulting page
    d.scalar = 64'($urandom_range(1, 14)) * 4096 + 64'($urandom_range(0, 4095));
    if ($urandom_range(0, 1) == 0) d.scalar = 64'($urandom_range(1, 14)) * 4096 - 64'($urandom_range(0, 400));
    if ($urandom_range(0, 5) == 0) d.scalar = FAULT_PAGE * 4096 - 64'($urandom_range(1, 1024));
    misal = ($urandom_range(0, 15) == 0) && sb > 1;
    d.scalar = d.scalar & ~64'(sb - 1);
    if (misal) d.scalar = d.scalar | 64'd1;
    foreach (gd[i]) gd[i] = 8'($urandom);
    // expected: first element not done
    lim = vl;
    tval = 0;
    if (misal) begin lim = vst; n_misal++; end
    else for (int e = vst; e < vl; e++)
      if ((d.scalar + 64'(e * sb)) >> 12 == FAULT_PAGE) begin lim = e; tval = d.scalar + 64'(e * sb); break; end
    // translations: distinct pages of the done elements, plus the faulting one
    pages = 0;
    begin
      logic [63:0] lastp;
      lastp = '1;
      for (int e = vst; e < vl && !misal; e++) begin
        logic [63:0] p;
        p = (d.scalar + 64'(e * sb)) >> 12;
        if (e >= lim && p != FAULT_PAGE) break;
        if (p != lastp) begin pages++; lastp = p; end
        if (p == FAULT_PAGE) break;
      end
      if (pages > 1) n_cross++;
    end
    ex = gd;
    if (!st) for (int e = vst; e < lim; e++)
      for (int k = 0; k < sb; k++) ex[e*sb + k] = rdb(pa(d.scalar + 64'(e*sb + k)));
    // expected memory after a store
    if (st) for (int e = vst; e < lim; e++)
      for (int k = 0; k < sb; k++) ex[e*sb + k] = gd[e*sb + k];
    xl0 = n_xlat;
    n_touch_bad = 0;
    for (int u = 0; u < nu; u++) begin
      @(negedge clk);
      req = '0;
      req.instr = d;
      req.uop = 4'(u); req.first = (u == 0); req.last = (u == nu - 1);
      for (int b = 0; b < VB; b++) req.vd[b*8 +: 8] = gd[u*VB + b];
      req_valid = 1;
      while (!req_ready) @(negedge clk);
      @(negedge clk);
      req_valid = 0;
      while (!resp_valid) @(negedge clk);
      if (!st) begin
        logic [VLEN-1:0] e;
        for (int b = 0; b < VB; b++) e[b*8 +: 8] = ex[u*VB + b];
        check(resp.we && resp.res == e, $sformatf("load eew=%0d nu=%0d vl=%0d vstart=%0d base=%h uop %0d",
                                                  8*sb, nu, vl, vst, d.scalar, u));
      end else check(!resp.we, "store does not write the register file");
      if (resp.ex_valid) begin
        check(lim < vl, "exception only when expected");
        check(int'(resp.ex_vstart) == lim, $sformatf("reported vstart %0d, expected %0d", resp.ex_vstart, lim));
        if (misal) check(resp.ex_cause == (st ? CAUSE_ST_MISAL : CAUSE_LD_MISAL), "misaligned cause");
        else begin
          check(resp.ex_cause == (st ? CAUSE_ST_PF : CAUSE_LD_PF) && resp.ex_tval == tval, "page fault cause/tval");
          n_fault++;
        end
      end
      @(posedge clk);
    end
    check(n_touch_bad == 0, "faulting page never accessed");
    check(n_xlat - xl0 == pages, $sformatf("translations %0d, expected %0d", n_xlat - xl0, pages));
    if (st) begin
      for (int e = 0; e < vlmax; e++)
        for (int k = 0; k < sb; k++) begin
          logic [PAW-1:0] a;
          a = pa(d.scalar + 64'(e*sb + k));
          if (e >= vst && e < lim) check(rdb(a) == gd[e*sb + k], $sformatf("stored byte %h", a));
        end
      n_st++;
    end else n_ld++;
  endtask

  initial begin
    req_valid = 0; resp_ready = 1; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) run_one();
    check(n_fault > 10 && n_misal > 5 && n_cross > 20 && n_ld > 100 && n_st > 100, "coverage");
    $display("loads=%0d stores=%0d faults=%0d misaligned=%0d multi-page=%0d", n_ld, n_st, n_fault, n_misal, n_cross);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
