// tb_vu_fu_wrapper: self-checking test of the functional-unit wrapper.
//
// The wrapper is surrounded by models: a register file with two copies per register
// and random read/write grants (read data one cycle after the grant), a lock
// arbiter with random grant delay, an execute module with random latency whose result
// is a known function of its operands, and a write back with random back-pressure.
// Random descriptors (1..8 micro-operations, with and without vs1/vs2, whole-group,
// reductions, stores, random read/write copies) are dispatched. Checks:
//  * every operand handed to the execute module is the right register from the copy
//    selected at dispatch (vs1, vs2, old vd / store data, the whole vs2 group);
//  * each result is written to the right register and copy (a reduction once, to vd);
//  * locking: a micro-operation runs only while all its locks are held, the locks of
//    uop u+1 are taken before those of uop u are released, nothing is released that
//    is not held, and an instruction ends holding nothing;
//  * the write back carries the id, the first exception with its vstart, and the
//    scalar result; instructions complete in dispatch order.
module tb_vu_fu_wrapper;
  import vu_pkg::*;
  localparam int QD = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       disp_valid, disp_ready;
  vinstr_t    disp;
  logic       run_valid [QD];
  vinstr_t    run [QD];
  logic       acq_valid, acq_gnt;
  regmask_t   acq_rd, acq_wr, rel_rd, rel_wr;
  logic       rreq, rcopy, rgnt, rvalid;
  logic [4:0] rreg;
  vreg_t      rdata;
  logic       wreq, wcopy, wgnt;
  logic [4:0] wreg;
  vreg_t      wdata;
  logic       exq_valid, exq_ready, exs_valid, exs_ready;
  ex_req_t    exq;
  ex_resp_t   exs;
  logic       wb_valid, wb_ready, ev_wait;
  wb_t        wb;

  vu_fu_wrapper dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(1'b0),
    .disp_valid_i(disp_valid), .disp_ready_o(disp_ready), .disp_i(disp),
    .run_valid_o(run_valid), .run_o(run),
    .acq_valid_o(acq_valid), .acq_rd_o(acq_rd), .acq_wr_o(acq_wr), .acq_gnt_i(acq_gnt),
    .rel_rd_o(rel_rd), .rel_wr_o(rel_wr),
    .rreq_o(rreq), .rreg_o(rreg), .rcopy_o(rcopy), .rgnt_i(rgnt),
    .rvalid_i(rvalid), .rdata_i(rdata),
    .wreq_o(wreq), .wreg_o(wreg), .wcopy_o(wcopy), .wdata_o(wdata), .wgnt_i(wgnt),
    .ex_req_valid_o(exq_valid), .ex_req_ready_i(exq_ready), .ex_req_o(exq),
    .ex_resp_valid_i(exs_valid), .ex_resp_ready_o(exs_ready), .ex_resp_i(exs),
    .wb_valid_o(wb_valid), .wb_ready_i(wb_ready), .wb_o(wb),
    .ev_lock_wait_o(ev_wait)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- register file model
  vreg_t mem [2][32];
  always @(posedge clk) begin
    rvalid <= rreq && rgnt;
    if (rreq && rgnt) rdata <= mem[rcopy][rreg];
    if (wreq && wgnt) mem[wcopy][wreg] <= wdata;
  end
  int deny = 0;
  always @(negedge clk) begin
    rgnt = ($urandom_range(0, 3) != 0);
    wgnt = ($urandom_range(0, 3) != 0);
    if (deny > 0) deny--;
    else if ($urandom_range(0, 15) == 0) deny = $urandom_range(5, 20);
    acq_gnt = (deny == 0) && ($urandom_range(0, 2) != 0);
    wb_ready = ($urandom_range(0, 2) != 0);
    exq_ready = ($urandom_range(0, 2) != 0);
  end

  // ---------------------------------------------------------------- execute model
  function automatic ex_resp_t ex_fn(ex_req_t q);
    ex_resp_t r;
    r = '0;
    if (q.instr.whole) r.res = q.group[int'(q.uop)*VLEN +: VLEN] ^ q.vd;
    else r.res = (q.instr.use_vs1 ? q.vs1 : '0) ^ (q.instr.use_vs2 ? {q.vs2[VLEN-2:0], 1'b1} : '0) ^ ~q.vd;
    r.we = q.instr.red ? q.last : q.instr.wr_vd;
    if (q.instr.op == OP_MVXS) begin r.data_valid = 1; r.data = q.vs2[63:0]; end
    // exceptions: micro-operation 1 of instructions with odd ids
    if (q.instr.id[0] && q.uop == 1) begin
      r.ex_valid = 1; r.ex_cause = CAUSE_LD_PF; r.ex_vstart = vl_t'(17);
    end
    return r;
  endfunction

  int lat = 0;
  bit busy = 0;
  always @(posedge clk) begin
    if (!busy && exq_valid && exq_ready) begin
      busy <= 1; lat <= $urandom_range(0, 3);
      exs <= ex_fn(exq);
    end else if (busy && lat > 0) lat <= lat - 1;
    else if (busy && exs_ready) busy <= 0;
  end
  assign exs_valid = busy && lat == 0;

  // ---------------------------------------------------------------- expected operands / checks
  vinstr_t  cur_q [$];      // dispatched, not yet written back
  regmask_t held_rd, held_wr;
  vreg_t    exp_w;
  logic [4:0] exp_wreg;
  bit       exp_wpend = 0;
  int cur_u = 0;
  int n_inst = 0, n_wait = 0, n_whole = 0, n_red = 0, n_exc = 0, n_held_over = 0;

  function automatic vreg_t rd_reg(vinstr_t d, logic [4:0] r);
    return mem[d.rd_sel[r]][r];
  endfunction

  always @(posedge clk) if (rst_n) begin
    // execute requests: operands and locks
    if (exq_valid && exq_ready && !busy) begin
      vinstr_t d;
      regmask_t ur, uw;
      int u;
      d = exq.instr; u = int'(exq.uop);
      cur_u = u;
      uop_locks(d, exq.uop, ur, uw);
      check((ur & ~held_rd) == '0 && (uw & ~held_wr) == '0,
            $sformatf("id %0d uop %0d runs without its locks", d.id, u));
      if (d.use_vs1 && (!d.red || u == 0))
        check(exq.vs1 == rd_reg(d, d.red ? d.vs1 : d.vs1 + 5'(u)), "vs1 operand");
      if (d.use_vs2 && !d.whole) check(exq.vs2 == rd_reg(d, d.vs2 + 5'(u)), "vs2 operand");
      if (d.whole)
        for (int g = 0; g < int'(d.nuops); g++)
          check(exq.group[g*VLEN +: VLEN] == rd_reg(d, d.vs2 + 5'(g)), "whole-group operand");
      if (d.wr_vd || d.op == OP_STORE)
        check(exq.vd == rd_reg(d, d.red ? d.vd : d.vd + 5'(u)), "old destination operand");
      check(exq.first == (u == 0) && exq.last == (u == int'(d.nuops) - 1), "first/last flags");
      begin
        ex_resp_t r;
        r = ex_fn(exq);
        exp_wpend = r.we;
        exp_w = r.res;
        exp_wreg = d.red ? d.vd : d.vd + 5'(u);
      end
    end
    if (wreq && wgnt) begin
      vinstr_t d;
      d = cur_q[0];
      check(exp_wpend && wreg == exp_wreg && wdata == exp_w && wcopy == d.wr_sel[wreg],
            $sformatf("write of v%0d copy %0d", wreg, wcopy));
      check(held_wr[wreg], "write under a write lock");
      exp_wpend = 0;
    end
    // locks
    if (acq_valid && acq_gnt) begin
      held_rd |= acq_rd; held_wr |= acq_wr;
    end
    if (rel_rd != '0 || rel_wr != '0) begin
      check((rel_rd & ~held_rd) == '0 && (rel_wr & ~held_wr) == '0, "release of a lock not held");
      if (cur_u < int'(cur_q[0].nuops) - 1) begin
        regmask_t nr, nw;
        uop_locks(cur_q[0], 4'(cur_u + 1), nr, nw);
        check((nr & ~held_rd) == '0 && (nw & ~held_wr) == '0,
              "next micro-operation's locks held before release");
        n_held_over++;
      end
      held_rd &= ~rel_rd; held_wr &= ~rel_wr;
    end
    if (ev_wait) n_wait++;
    // write back
    if (wb_valid && wb_ready) begin
      vinstr_t d;
      d = cur_q.pop_front();
      n_inst++;
      check(wb.id == d.id, $sformatf("write back id %0d, expected %0d", wb.id, d.id));
      check(wb.ex_valid == (d.id[0] && d.nuops > 1), "exception reported");
      if (wb.ex_valid) begin n_exc++; check(wb.vstart == 17 && wb.set_vstart, "exception vstart"); end
      check(wb.data_valid == (d.op == OP_MVXS), "scalar result");
      if (d.op == OP_MVXS) check(wb.data == rd_reg(d, d.vs2)[63:0], "vmv.x.s value");
      check((held_rd | held_wr) == '0 || (rel_rd | rel_wr) != '0, "locks left at the end");
    end
  end

  // a random descriptor whose first locks the "sequencer" takes at dispatch
  function automatic vinstr_t rand_desc(id_t id);
    vinstr_t d;
    int k;
    d = '0;
    d.id = id;
    d.fu = FU_VINT;
    d.nuops = 4'(1 << $urandom_range(0, 3));
    d.sew = 2'($urandom_range(0, 3)); d.eew = d.sew;
    d.vl = vl_t'($urandom_range(1, 32)); d.vlmax = vl_t'(64);
    d.rd_sel = {$urandom}; d.wr_sel = {$urandom};
    k = $urandom_range(0, 5);
    d.vd  = 5'($urandom_range(0, 3) * 8);
    d.vs2 = 5'(((int'(d.vd) / 8 + 1) % 4) * 8);
    d.vs1 = 5'(((int'(d.vd) / 8 + 2) % 4) * 8);
    case (k)
      0, 1: begin d.op = OP_ADD; d.use_vs1 = 1; d.use_vs2 = 1; d.wr_vd = 1; end
      2: begin d.op = OP_GATHERX; d.fu = FU_VMOV; d.use_vs2 = 1; d.wr_vd = 1; d.whole = 1; end
      3: begin d.op = OP_REDSUM; d.use_vs1 = 1; d.use_vs2 = 1; d.wr_vd = 1; d.red = 1; end
      4: begin d.op = OP_STORE; d.fu = FU_VLSU; end
      default: begin d.op = OP_MVXS; d.fu = FU_VMOV; d.use_vs2 = 1; d.nuops = 1; end
    endcase
    return d;
  endfunction

  initial begin
    id_t id;
    id = 0;
    disp_valid = 0; disp = '0;
    held_rd = '0; held_wr = '0;
    foreach (mem[c, r]) mem[c][r] = {8{$urandom}};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      vinstr_t d;
      regmask_t r0, w0, hr, hw;
      d = rand_desc(id);
      if (d.whole) n_whole++;
      if (d.red) n_red++;
      // one instruction at a time keeps the lock bookkeeping exact
      while (cur_q.size() > 0) @(negedge clk);
      @(negedge clk);
      while (!disp_ready) @(negedge clk);
      uop_locks(d, 4'd0, r0, w0);
      held_locks(d, hr, hw);
      held_rd |= r0 | hr; held_wr |= w0 | hw;
      disp_valid = 1; disp = d;
      cur_q.push_back(d);
      @(negedge clk);
      disp_valid = 0;
      check(run_valid[0] || run_valid[1], "dispatched instruction visible to the hazard check");
      id++;
    end
    while (cur_q.size() > 0) @(negedge clk);
    repeat (5) @(negedge clk);
    check((held_rd | held_wr) == '0, "all locks released");
    check(n_inst == 300 && n_whole > 20 && n_red > 20 && n_exc > 20 && n_wait > 20 && n_held_over > 100,
          $sformatf("coverage inst=%0d whole=%0d red=%0d exc=%0d wait=%0d overlap=%0d",
                    n_inst, n_whole, n_red, n_exc, n_wait, n_held_over));
    $display("instructions=%0d whole=%0d reductions=%0d exceptions=%0d lock-waits=%0d", n_inst, n_whole, n_red, n_exc, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
