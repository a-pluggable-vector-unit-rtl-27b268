// tb_vu_sequencer: self-checking test of the decode / configuration / dispatch stage.
//
// Drives the queue side with encoded instructions and plays the functional units, the
// lock server, the register copy table and the scalar core. Checks:
//  * vsetvli/vsetivli/vsetvl: vl = min(AVL, VLMAX) for random legal vtypes, vill for
//    reserved or unsupported ones, the write back and the cfg_retired pulse at commit;
//  * decode of a set of arithmetic, permutation and memory instructions into the
//    descriptor (unit, operation, EMUL micro-operations, registers, vl/vstart);
//  * the first micro-operation's locks are requested and dispatch waits for the grant;
//  * stalls: unit back-pressure, configuration hazard (smaller EMUL overlapping a
//    running group elsewhere than its base), whole-group hazard, speculative
//    destination;
//  * illegal encodings, misaligned groups and vill produce an illegal-instruction
//    exception;
//  * retirement pops the in-order list and promotes exactly the destination registers.
module tb_vu_sequencer;
  import vu_pkg::*;
  localparam int QD = 2;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;

  logic      iq_valid, iq_ready, cfg_retired, commit;
  iq_entry_t iq;
  id_t       commit_id;
  logic      disp_valid [NFU], disp_ready [NFU];
  vinstr_t   disp;
  logic      run_valid [NFU][QD];
  vinstr_t   run [NFU][QD];
  logic      acq_valid, acq_gnt;
  regmask_t  acq_rd, acq_wr, rd_sel, wr_sel, spec, alloc_mask, commit_mask;
  logic      alloc, vrf_commit, wb_valid, wb_ready, ev_cfg, ev_spec, ev_lock;
  wb_t       wb;

  vu_sequencer dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(flush),
    .iq_valid_i(iq_valid), .iq_ready_o(iq_ready), .iq_i(iq), .cfg_retired_o(cfg_retired),
    .commit_i(commit), .commit_id_i(commit_id),
    .disp_valid_o(disp_valid), .disp_ready_i(disp_ready), .disp_o(disp),
    .run_valid_i(run_valid), .run_i(run),
    .acq_valid_o(acq_valid), .acq_rd_o(acq_rd), .acq_wr_o(acq_wr), .acq_gnt_i(acq_gnt),
    .rd_sel_i(rd_sel), .wr_sel_i(wr_sel), .spec_i(spec),
    .alloc_o(alloc), .alloc_mask_o(alloc_mask),
    .vrf_commit_o(vrf_commit), .vrf_commit_mask_o(commit_mask),
    .wb_valid_o(wb_valid), .wb_ready_i(wb_ready), .wb_o(wb),
    .ev_cfg_hazard_o(ev_cfg), .ev_spec_stall_o(ev_spec), .ev_lock_stall_o(ev_lock)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- encodings
  function automatic logic [31:0] opv(logic [5:0] f6, logic [4:0] vs2, logic [4:0] vs1,
                                      logic [2:0] f3, logic [4:0] vd, bit vm = 1);
    return {f6, vm, vs2, vs1, f3, vd, 7'b1010111};
  endfunction
  function automatic logic [31:0] vsetvli(logic [4:0] rd, logic [4:0] rs1, logic [10:0] vt);
    return {1'b0, vt, rs1, 3'b111, rd, 7'b1010111};
  endfunction
  function automatic logic [31:0] vsetivli(logic [4:0] rd, logic [4:0] uimm, logic [9:0] vt);
    return {2'b11, vt, uimm, 3'b111, rd, 7'b1010111};
  endfunction
  function automatic logic [31:0] vsetvl(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return {7'b1000000, rs2, rs1, 3'b111, rd, 7'b1010111};
  endfunction
  function automatic logic [31:0] vmem(bit st, logic [2:0] w, logic [4:0] vd, logic [4:0] rs1);
    return {12'b000000100000, rs1, w, vd, st ? 7'b0100111 : 7'b0000111};
  endfunction

  id_t nid = 0;
  id_t pend_id [$];
  regmask_t pend_mask [$];
  bit pend_cfg [$];

  vtype_t cur_vt;
  vl_t    cur_vl;

  // present one instruction; wait until accepted (or max cycles); returns accepted
  task automatic issue(logic [31:0] instr, logic [63:0] rs1, logic [63:0] rs2, output bit acc,
                       input int maxc = 20, input bit vill = 0);
    acc = 0;
    @(negedge clk);
    iq_valid = 1;
    iq = '0;
    iq.instr = instr; iq.id = nid; iq.rs1 = rs1; iq.rs2 = rs2;
    iq.vl = cur_vl; iq.vtype = cur_vt; iq.vill = vill;
    for (int c = 0; c < maxc; c++) begin
      #1;
      if (iq_ready) begin
        acc = 1;
        capture();
        pend_id.push_back(nid);
        pend_mask.push_back(alloc ? alloc_mask : '0);
        pend_cfg.push_back(instr[6:0] == 7'b1010111 && instr[14:12] == 3'b111);
        nid++;
        @(negedge clk);
        break;
      end
      @(negedge clk);
    end
    iq_valid = 0;
  endtask

  // retire the oldest pending instruction
  task automatic retire_one();
    @(negedge clk);
    commit = 1; commit_id = pend_id[0];
    #1;
    check(vrf_commit && commit_mask == pend_mask[0], "promotion mask of the retired instruction");
    check(cfg_retired == pend_cfg[0], "cfg_retired only for configuration instructions");
    @(posedge clk);
    void'(pend_id.pop_front()); void'(pend_mask.pop_front()); void'(pend_cfg.pop_front());
    @(negedge clk);
    commit = 0;
  endtask
  task automatic retire_all();
    while (pend_id.size() > 0) retire_one();
  endtask

  // outputs of the cycle in which the last instruction was accepted
  vinstr_t  last_disp;
  wb_t      last_wb;
  bit       last_disp_v, last_wb_v;
  regmask_t last_rd, last_wr;
  task automatic capture();
    last_disp_v = 0;
    for (int f = 0; f < NFU; f++) if (disp_valid[f]) begin
      last_disp_v = 1; last_disp = disp;
      check(disp.fu == fu_e'(f), "dispatched to the unit of the descriptor");
    end
    last_wb_v = wb_valid; last_wb = wb;
    last_rd = acq_rd; last_wr = acq_wr;
  endtask

  function automatic int vlmax_of(int sew, int lmul);
    return (VLEN / (8 << sew)) << lmul;
  endfunction

  initial begin
    bit acc;
    iq_valid = 0; iq = '0; commit = 0; commit_id = '0; acq_gnt = 1; wb_ready = 1;
    rd_sel = '0; wr_sel = '1; spec = '0;
    for (int f = 0; f < NFU; f++) begin
      disp_ready[f] = 1;
      for (int q = 0; q < QD; q++) begin run_valid[f][q] = 0; run[f][q] = '0; end
    end
    cur_vt = '0; cur_vl = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ------------------------------------------------ configuration instructions
    for (int i = 0; i < 200; i++) begin
      int sew, lmul, kind;
      logic [63:0] avl;
      vtype_t vt;
      bit bad;
      sew = $urandom_range(0, 3); lmul = $urandom_range(0, 3);
      bad = ($urandom_range(0, 7) == 0);
      vt = '0; vt.vsew = 3'(sew); vt.vlmul = 3'(lmul); vt.vta = $urandom; vt.vma = $urandom;
      if (bad) vt.vlmul = 3'b100;
      avl = ($urandom_range(0, 1) == 1) ? 64'($urandom_range(0, 300)) : {$urandom, $urandom};
      kind = $urandom_range(0, 2);
      if (kind == 1) avl = 64'($urandom_range(0, 31));
      case (kind)
        0: issue(vsetvli(5'd1, 5'd2, {3'b000, 8'(vt)}), avl, 0, acc);
        1: issue(vsetivli(5'd1, 5'(avl), {2'b00, 8'(vt)}), 0, 0, acc);
        default: issue(vsetvl(5'd1, 5'd2, 5'd3), avl, 64'(8'(vt)), acc);
      endcase
      check(acc && last_wb_v && !last_disp_v, "configuration instruction written back");
      if (bad) check(last_wb.vill && last_wb.vl == 0, "reserved LMUL sets vill");
      else begin
        logic [63:0] exp;
        exp = (avl < 64'(vlmax_of(sew, lmul))) ? avl : 64'(vlmax_of(sew, lmul));
        check(!last_wb.vill && last_wb.set_vlvtype && 64'(last_wb.vl) == exp && last_wb.data == exp
              && last_wb.vtype == vt, $sformatf("vl=%0d expected %0d", last_wb.vl, exp));
      end
      retire_one();
    end

    // ------------------------------------------------ decode and dispatch
    cur_vt = '0; cur_vt.vsew = 3'd2; cur_vt.vlmul = 3'd1;   // e32, m2
    cur_vl = vl_t'(13);
    issue(opv(6'b000000, 5'd4, 5'd6, 3'b000, 5'd2), 0, 0, acc);        // vadd.vv v2, v4, v6
    check(acc && last_disp_v && last_disp.fu == FU_VINT && last_disp.op == OP_ADD
          && last_disp.nuops == 2 && last_disp.vd == 2 && last_disp.vs1 == 6 && last_disp.vs2 == 4
          && last_disp.vl == 13 && last_disp.sew == 2, "vadd.vv descriptor");
    check(last_rd == (reg_bit(4) | reg_bit(6)) && last_wr == reg_bit(2), "first micro-op locks");
    issue(opv(6'b001100, 5'd8, 5'd10, 3'b000, 5'd12), 0, 0, acc);      // vrgather.vv v12, v8, v10
    check(acc && last_disp_v && last_disp.fu == FU_VMOV && last_disp.op == OP_GATHER
          && last_disp.whole, "vrgather descriptor");
    check(last_rd == (group_mask(8, 2) | reg_bit(10)), "whole-group read locks");
    issue(opv(6'b000000, 5'd8, 5'd9, 3'b010, 5'd14), 0, 0, acc);       // vredsum.vs v14, v8, v9
    check(acc && last_disp_v && last_disp.red && last_disp.op == OP_REDSUM, "vredsum descriptor");
    issue(vmem(0, 3'b111, 5'd16, 5'd1), 64'h1000, 0, acc);             // vle64 v16 (EMUL 4)
    check(acc && last_disp_v && last_disp.fu == FU_VLSU && last_disp.op == OP_LOAD
          && last_disp.nuops == 4 && last_disp.eew == 3 && last_disp.scalar == 64'h1000, "vle64 descriptor");
    issue(vmem(1, 3'b000, 5'd20, 5'd1), 64'h2000, 0, acc);             // vse8 v20 (EMUL 1)
    check(acc && last_disp_v && last_disp.op == OP_STORE && last_disp.nuops == 1, "vse8 descriptor");
    issue(opv(6'b010000, 5'd8, 5'd0, 3'b010, 5'd5), 0, 0, acc);        // vmv.x.s x5, v8
    check(acc && last_disp_v && last_disp.op == OP_MVXS && !last_disp.wr_vd, "vmv.x.s descriptor");
    issue(opv(6'b001001, 5'd4, 5'b11111, 3'b011, 5'd24), 0, 0, acc);   // vand.vi v24, v4, -1
    check(acc && last_disp_v && last_disp.op == OP_AND && last_disp.scalar == '1, "vand.vi immediate");
    retire_all();

    // ------------------------------------------------ illegal instructions
    issue(opv(6'b000000, 5'd4, 5'd6, 3'b001, 5'd2), 0, 0, acc);        // OPFVV
    check(acc && last_wb_v && last_wb.ex_valid && last_wb.ex_cause == CAUSE_ILLEGAL, "OPFVV illegal");
    issue(opv(6'b000000, 5'd4, 5'd6, 3'b000, 5'd3), 0, 0, acc);        // vd = v3 with m2
    check(acc && last_wb_v && last_wb.ex_valid, "misaligned group illegal");
    issue(opv(6'b000000, 5'd4, 5'd6, 3'b000, 5'd2, 0), 0, 0, acc);     // masked
    check(acc && last_wb_v && last_wb.ex_valid, "masked form illegal");
    issue(opv(6'b000000, 5'd4, 5'd6, 3'b000, 5'd2), 0, 0, acc, 20, 1); // vill set
    check(acc && last_wb_v && last_wb.ex_valid, "vill makes vector instructions illegal");
    retire_all();

    // ------------------------------------------------ stalls
    // lock not granted
    acq_gnt = 0;
    issue(opv(6'b000000, 5'd4, 5'd6, 3'b000, 5'd2), 0, 0, acc, 5);
    check(!acc, "no dispatch without the lock grant");
    acq_gnt = 1;
    // unit back-pressure
    disp_ready[FU_VINT] = 0;
    issue(opv(6'b000000, 5'd4, 5'd6, 3'b000, 5'd2), 0, 0, acc, 5);
    check(!acc, "no dispatch to a busy unit");
    disp_ready[FU_VINT] = 1;
    // speculative destination
    spec = reg_bit(3);
    issue(opv(6'b000000, 5'd4, 5'd6, 3'b000, 5'd2), 0, 0, acc, 5);
    check(!acc, "speculative destination stalls");
    spec = '0;
    // configuration hazard: running e32 m4 writes v8..v11, new m1 writes v9
    run_valid[FU_VLSU][0] = 1;
    run[FU_VLSU][0] = '0;
    run[FU_VLSU][0].op = OP_LOAD; run[FU_VLSU][0].wr_vd = 1; run[FU_VLSU][0].vd = 8;
    run[FU_VLSU][0].nuops = 4;
    cur_vt.vlmul = 3'd0;
    fork
      begin
        bit seen;
        seen = 0;
        repeat (4) begin @(negedge clk); #2; if (ev_cfg) seen = 1; end
        check(seen, "configuration hazard reported");
      end
      issue(opv(6'b000000, 5'd4, 5'd6, 3'b000, 5'd9), 0, 0, acc, 5);
    join
    check(!acc, "configuration hazard stalls");
    issue(opv(6'b000000, 5'd4, 5'd6, 3'b000, 5'd8), 0, 0, acc, 5);     // same base: allowed
    check(acc, "overlap on the group base is not a hazard");
    // whole-group hazard: vslidedown reading v8 while the load writes it
    issue(opv(6'b001111, 5'd8, 5'd1, 3'b100, 5'd12), 3, 0, acc, 5);
    check(!acc, "whole-group hazard stalls");
    run_valid[FU_VLSU][0] = 0;
    issue(opv(6'b001111, 5'd8, 5'd1, 3'b100, 5'd12), 3, 0, acc, 5);
    check(acc && last_disp.op == OP_SLIDEDN, "slide dispatched once the writer is done");
    retire_all();

    // ------------------------------------------------ flush empties the retirement list
    issue(opv(6'b000000, 5'd4, 5'd6, 3'b000, 5'd2), 0, 0, acc);
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    pend_id.delete(); pend_mask.delete(); pend_cfg.delete();
    issue(opv(6'b000000, 5'd4, 5'd6, 3'b000, 5'd10), 0, 0, acc);
    retire_all();                     // the list restarts with the new instruction

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
