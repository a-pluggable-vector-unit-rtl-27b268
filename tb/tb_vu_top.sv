// tb_vu_top: end-to-end test of the vector unit at its default size.
//
// The testbench plays the scalar core, the MMU and the memory. It issues a vector
// program through the instruction queue with the CSRs sampled at issue, keeps an
// in-order reorder buffer that retires an instruction once its write back arrived,
// updates vl/vtype/vstart at retirement, and takes traps: a trapping instruction is
// retired (keeping its finished elements) and everything younger is flushed. The
// handler of the page fault maps the page and re-issues the load with the reported
// vstart, so the program resumes where it stopped.
//
// An instruction-level reference model executes each retired instruction on its own
// copy of the registers and memory. At the end all 32 registers are stored to memory
// by the unit itself and memory is compared byte by byte with the model; scalar
// results (vl of vsetvli, vmv.x.s) are compared at retirement.
//
// The program makes every mechanism happen and the testbench counts each one:
// configuration block of the queue, chaining across units (lock waits), a
// configuration hazard, the whole-group lock hazard, a stall on a still-speculative
// destination, out-of-order completion, two write-back ports used in one cycle, a
// precise page fault with resume, a flush of speculative results, an illegal
// instruction, translation reuse within a page.
module tb_vu_top;
  import vu_pkg::*;

  localparam int unsigned PAW   = 40;
  localparam int unsigned MSIZE = 32768;
  localparam int unsigned FAULT_PAGE = 4;     // virtual page 0x4000 faults until mapped

  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;

  logic            iq_valid, iq_ready;
  iq_entry_t       iq;
  logic            commit;
  id_t             commit_id;
  logic            wb_valid [2];
  wb_t             wb       [2];
  logic            mmu_req, mmu_store, mmu_resp, mmu_fault;
  logic [63:0]     mmu_va;
  logic [PAW-1:0]  mmu_pa;
  logic            mem_req, mem_we, mem_rvalid;
  logic [PAW-1:0]  mem_addr;
  logic [MEMW-1:0] mem_wdata, mem_rdata;
  logic [MEMB-1:0] mem_be;
  logic            ev_cfg, ev_spec, ev_lstall, ev_xlat;
  logic [NFU-1:0]  ev_lwait;

  vu_top dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(flush),
    .iq_valid_i(iq_valid), .iq_ready_o(iq_ready), .iq_i(iq),
    .commit_i(commit), .commit_id_i(commit_id),
    .wb_valid_o(wb_valid), .wb_o(wb),
    .mmu_req_valid_o(mmu_req), .mmu_vaddr_o(mmu_va), .mmu_store_o(mmu_store),
    .mmu_resp_valid_i(mmu_resp), .mmu_paddr_i(mmu_pa), .mmu_fault_i(mmu_fault),
    .mem_req_valid_o(mem_req), .mem_req_ready_i(1'b1), .mem_addr_o(mem_addr),
    .mem_we_o(mem_we), .mem_wdata_o(mem_wdata), .mem_be_o(mem_be),
    .mem_rvalid_i(mem_rvalid), .mem_rdata_i(mem_rdata),
    .ev_cfg_hazard_o(ev_cfg), .ev_spec_stall_o(ev_spec), .ev_lock_stall_o(ev_lstall),
    .ev_lock_wait_o(ev_lwait), .ev_xlat_o(ev_xlat)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------------ memory + MMU
  logic [7:0] mem [MSIZE];
  logic [7:0] rmem [MSIZE];          // reference model's memory
  bit         page_mapped = 0;

  always_ff @(posedge clk) begin
    mmu_resp  <= mmu_req && !mmu_resp;
    mmu_pa    <= PAW'(mmu_va);
    mmu_fault <= (mmu_va[63:12] == 52'(FAULT_PAGE)) && !page_mapped;
    mem_rvalid <= 1'b0;
    if (mem_req) begin
      if (mem_we) begin
        for (int k = 0; k < MEMB; k++)
          if (mem_be[k]) mem[(int'(mem_addr) + k) % MSIZE] <= mem_wdata[k*8 +: 8];
      end else begin
        mem_rvalid <= 1'b1;
        for (int k = 0; k < MEMB; k++) mem_rdata[k*8 +: 8] <= mem[(int'(mem_addr) + k) % MSIZE];
      end
    end
  end

  // ------------------------------------------------------------------ encodings
  typedef enum int { K_CFG, K_LD, K_ST, K_VV, K_VX, K_VI, K_RED, K_MVXS, K_MASK,
                     K_GATHER, K_SLDN, K_SLUP, K_ILL } kind_e;
  typedef struct {
    logic [31:0] instr;
    logic [63:0] rs1;
    int          kind;
    int          f6;
    int          vd, vs1, vs2;
    int          eewb;         // bytes, memory ops
    bit          wrong_path;   // issued after a trap, never retires
  } prog_t;

  prog_t prog [$];

  function automatic logic [31:0] enc_op(int f6, int vs2, int vs1, int f3, int vd);
    return {6'(f6), 1'b1, 5'(vs2), 5'(vs1), 3'(f3), 5'(vd), 7'b1010111};
  endfunction

  task automatic p_vsetvli(int rd, int rs1f, logic [63:0] avl, int sew_l, int lmul);
    prog_t p;
    p = '{default: 0};
    p.kind = K_CFG;
    p.rs1 = avl;
    p.vd = rd;
    p.instr = {1'b0, 11'({3'b0, 1'b0, 1'b0, 3'(sew_l), 3'(lmul)}), 5'(rs1f), 3'b111, 5'(rd), 7'b1010111};
    prog.push_back(p);
  endtask
  task automatic p_mem(bit st, int eewl, int vd, logic [63:0] base, bit wrong = 0);
    prog_t p;
    logic [2:0] w;
    p = '{default: 0};
    w = (eewl == 0) ? 3'b000 : (eewl == 1) ? 3'b101 : (eewl == 2) ? 3'b110 : 3'b111;
    p.kind = st ? K_ST : K_LD;
    p.rs1 = base; p.vd = vd; p.eewb = 1 << eewl; p.wrong_path = wrong;
    p.instr = {3'b000, 1'b0, 2'b00, 1'b1, 5'd0, 5'd1, w, 5'(vd), st ? 7'b0100111 : 7'b0000111};
    prog.push_back(p);
  endtask
  task automatic p_op(kind_e k, int f6, int vd, int vs2, int vs1, logic [63:0] x = 0, bit wrong = 0);
    prog_t p;
    int f3;
    p = '{default: 0};
    p.kind = k; p.f6 = f6; p.vd = vd; p.vs2 = vs2; p.vs1 = vs1; p.rs1 = x; p.wrong_path = wrong;
    case (k)
      K_VV, K_GATHER: f3 = 0;
      K_VI:           f3 = 3;
      K_RED, K_MASK, K_MVXS: f3 = 2;
      default:        f3 = 4;
    endcase
    p.instr = enc_op(f6, vs2, vs1, f3, vd);
    prog.push_back(p);
  endtask

  // ------------------------------------------------------------------ reference model
  logic [VLEN-1:0] rv [32];
  bit              written [32];
  logic [63:0]     csr_vl;
  vtype_t          csr_vtype;
  logic [63:0]     csr_vstart;

  function automatic logic [63:0] rget(int base, int idx, int sb);
    logic [63:0] v = 0;
    for (int k = 0; k < sb; k++) begin
      int byt = idx * sb + k;
      v[k*8 +: 8] = rv[(base + byt / VLENB) % 32][(byt % VLENB)*8 +: 8];
    end
    return v;
  endfunction
  task automatic rset(int base, int idx, int sb, logic [63:0] v);
    for (int k = 0; k < sb; k++) begin
      int byt = idx * sb + k;
      rv[(base + byt / VLENB) % 32][(byt % VLENB)*8 +: 8] = v[k*8 +: 8];
      written[(base + byt / VLENB) % 32] = 1;
    end
  endtask
  function automatic logic signed [63:0] sx(logic [63:0] v, int sb);
    return (sb == 8) ? $signed(v) : $signed(v << (64 - 8*sb)) >>> (64 - 8*sb);
  endfunction
  function automatic logic [63:0] msk(int sb);
    return (sb == 8) ? '1 : (64'd1 << (8*sb)) - 1;
  endfunction

  function automatic logic [63:0] ref_alu(int f6, logic [63:0] a, logic [63:0] b, int sb);
    logic [63:0] r;
    logic signed [127:0] s;
    a &= msk(sb); b &= msk(sb);
    case (f6)
      'b000000: r = a + b;
      'b000010: r = a - b;
      'b000011: r = b - a;
      'b000110: r = (a > b) ? a : b;
      'b000101: r = (sx(a, sb) < sx(b, sb)) ? a : b;
      'b001001: r = a & b;
      'b001010: r = a | b;
      'b001011: r = a ^ b;
      'b100101: r = a << (b % (8*sb));
      'b101001: r = sx(a, sb) >>> (b % (8*sb));
      'b100001: begin
        s = 128'(sx(a, sb)) + 128'(sx(b, sb));
        if (s > 128'((64'sd1 <<< (8*sb-1)) - 1)) s = 128'((64'sd1 <<< (8*sb-1)) - 1);
        if (s < -128'(64'sd1 <<< (8*sb-1)))      s = -128'(64'sd1 <<< (8*sb-1));
        r = s[63:0];
      end
      'b010111: r = b;
      default: r = 'x;
    endcase
    return r & msk(sb);
  endfunction

  int fault_vstart_seen = -1;

  // Execute one retired instruction. lim: elements at or after it are not done (trap).
  task automatic ref_exec(prog_t p, logic [63:0] vl, vtype_t vt, logic [63:0] vstart, longint lim,
                          output logic [63:0] sres);
    int sb, nreg;
    logic [VLEN-1:0] src [32];
    sb = 1 << vt.vsew;
    sres = 0;
    src = rv;
    case (p.kind)
      K_LD: for (longint e = vstart; e < vl && e < lim; e++)
              for (int k = 0; k < p.eewb; k++) begin
                int byt = int'(e) * p.eewb + k;
                rv[(p.vd + byt / VLENB) % 32][(byt % VLENB)*8 +: 8] = rmem[int'(p.rs1) + byt];
                written[(p.vd + byt / VLENB) % 32] = 1;
              end
      K_ST: for (longint e = vstart; e < vl; e++)
              for (int k = 0; k < p.eewb; k++) begin
                int byt = int'(e) * p.eewb + k;
                rmem[int'(p.rs1) + byt] = rv[(p.vd + byt / VLENB) % 32][(byt % VLENB)*8 +: 8];
              end
      K_VV, K_VX, K_VI: for (longint e = vstart; e < vl; e++) begin
          logic [63:0] b;
          if (p.kind == K_VV)      b = rget(p.vs1, int'(e), sb);
          else if (p.kind == K_VX) b = p.rs1;
          else if (p.f6 == 'b100101 || p.f6 == 'b101001) b = 64'(p.vs1);
          else begin
            logic [4:0] imm;
            imm = 5'(p.vs1);
            b = {{59{imm[4]}}, imm};
          end
          rset(p.vd, int'(e), sb, ref_alu(p.f6, rget(p.vs2, int'(e), sb), b, sb));
        end
      K_RED: if (vl > 0) begin
          logic [63:0] acc;
          acc = rget(p.vs1, 0, sb);
          for (longint e = 0; e < vl; e++) acc = (acc + rget(p.vs2, int'(e), sb)) & msk(sb);
          rset(p.vd, 0, sb, acc);
        end
      K_MVXS: sres = sx(rget(p.vs2, 0, sb), sb);
      K_MASK: for (longint i = vstart; i < vl; i++)     // vmand.mm
          rv[p.vd][i] = src[p.vs2][i] & src[p.vs1][i];
      K_GATHER: begin
          logic [63:0] vlmax;
          vlmax = (VLEN / (8*sb)) * ((vt.vlmul[2]) ? 1 : (1 << vt.vlmul));
          for (longint e = vstart; e < vl; e++) begin
            logic [63:0] ix;
            ix = rget(p.vs1, int'(e), sb);
            rset(p.vd, int'(e), sb, (ix < vlmax) ? rget(p.vs2, int'(ix), sb) : 0);
          end
        end
      K_SLDN: begin
          logic [63:0] vlmax;
          vlmax = (VLEN / (8*sb)) * ((vt.vlmul[2]) ? 1 : (1 << vt.vlmul));
          for (longint e = vstart; e < vl; e++)
            rset(p.vd, int'(e), sb, (e + p.rs1 < vlmax) ? rget(p.vs2, int'(e + p.rs1), sb) : 0);
        end
      K_SLUP: for (longint e = (vstart > p.rs1 ? vstart : p.rs1); e < vl; e++)
            rset(p.vd, int'(e), sb, rget(p.vs2, int'(e - p.rs1), sb));
      default: ;
    endcase
    nreg = 0;
  endtask

  // ------------------------------------------------------------------ core model
  typedef struct {
    int          pc;
    id_t         id;
    logic [63:0] vl, vstart;
    vtype_t      vt;
    bit          done, ex;
    wb_t         w;
  } rob_t;
  rob_t rob [$];
  bit   wdone [16];
  wb_t  wrec  [16];
  int   pc = 0;
  id_t  next_id = 0;
  int   cyc = 0;
  bit   trap_pending = 0;

  // mechanism counters
  int n_cfg_block = 0, n_lock_wait = 0, n_cfg_hazard = 0, n_whole = 0, n_spec = 0;
  int n_ooo = 0, n_two_wb = 0, n_fault = 0, n_flush = 0, n_illegal = 0, n_xlat = 0;
  int n_iq_full = 0, n_commit = 0;
  id_t last_wb_id;
  bit  have_last = 0;

  always_comb begin
    iq_valid = !trap_pending && !flush && rst_n && (pc < prog.size());
    iq = '0;
    if (pc < prog.size()) begin
      iq.instr  = prog[pc].instr;
      iq.id     = next_id;
      iq.rs1    = prog[pc].rs1;
      iq.vl     = vl_t'(csr_vl);
      iq.vtype  = csr_vtype;
      iq.vstart = vl_t'(csr_vstart);
    end
  end

  always_comb begin
    commit = 1'b0;
    commit_id = '0;
    if (rob.size() > 0 && wdone[rob[0].id] && !flush) begin
      commit = 1'b1;
      commit_id = rob[0].id;
    end
  end

  always @(posedge clk) if (rst_n) begin
    logic [63:0] sres;
    int nwb;
    bit trapped;
    trapped = 0;
    cyc++;
    // events
    if (dut.cfg_block && iq_valid) n_cfg_block++;
    if (!dut.cfg_block && iq_valid && !iq_ready) n_iq_full++;
    if (ev_lwait != 0) n_lock_wait++;
    if (ev_cfg) n_cfg_hazard++;
    if (ev_spec) n_spec++;
    if (ev_xlat) n_xlat++;
    if (dut.u_seq.whole_hazard && dut.u_seq.kind == 2 && dut.sq_valid) n_whole++;
    flush <= 1'b0;
    if (flush) n_flush++;

    // write back
    nwb = 0;
    for (int k = 0; k < 2; k++) if (wb_valid[k] && !flush) begin
      bit found;
      found = 0;
      nwb++;
      foreach (rob[i]) if (rob[i].id == wb[k].id && !wdone[rob[i].id] && !found) begin
        found = 1;
        if (i != 0) n_ooo++;
      end
      wdone[wb[k].id] = 1;
      wrec[wb[k].id]  = wb[k];
      check(found, $sformatf("write back of unknown id %0d", wb[k].id));
    end
    if (nwb == 2) n_two_wb++;

    // retirement
    if (commit) begin
      rob_t r;
      prog_t p;
      longint lim;
      r = rob.pop_front();
      last_pc = r.pc;
      r.w = wrec[r.id];
      wdone[r.id] = 0;
      p = prog[r.pc];
      n_commit++;
      check(!p.wrong_path, "wrong-path instruction retired");
      lim = 64'h7fffffffffffffff;
      if (r.w.ex_valid) begin
        if (r.w.ex_cause == CAUSE_ILLEGAL) begin
          n_illegal++;
          check(p.kind == K_ILL, "unexpected illegal instruction");
        end else begin
          n_fault++;
          check(r.w.ex_cause == CAUSE_LD_PF, "load page fault cause");
          lim = longint'(r.w.vstart);
          fault_vstart_seen = int'(r.w.vstart);
        end
      end else check(p.kind != K_ILL, "illegal instruction accepted");
      if (p.kind == K_CFG) begin
        check(r.w.set_vlvtype, "vsetvli updates vl/vtype");
        csr_vl = 64'(r.w.vl);
        csr_vtype = r.w.vtype;
        // expected vl: min(AVL, VLMAX)
        begin
          logic [63:0] vlmax, avl;
          vlmax = (VLEN / (8 << r.w.vtype.vsew)) * (1 << r.w.vtype.vlmul);
          avl = (p.instr[19:15] != 0) ? p.rs1 : '1;
          check(r.w.data == ((avl < vlmax) ? avl : vlmax),
                $sformatf("vsetvli vl=%0d", r.w.data));
        end
      end else if (p.kind != K_ILL) begin
        ref_exec(p, r.vl, r.vt, r.vstart, lim, sres);
        if (p.kind == K_MVXS)
          check(r.w.data_valid && r.w.data == sres,
                $sformatf("vmv.x.s %h vs %h", r.w.data, sres));
      end
      if (r.w.set_vstart) csr_vstart = 64'(r.w.vstart);
      if (r.w.ex_valid) begin
        // trap: flush the younger instructions, handle, resume
        flush <= 1'b1;
        trapped = 1;
        rob.delete();
        foreach (wdone[i]) wdone[i] = 0;
        trap_pending = 0;
        if (r.w.ex_cause != CAUSE_ILLEGAL) begin
          page_mapped = 1;
          pc = r.pc;                      // re-execute the load from vstart
        end else pc = r.pc + 1;
        // skip the wrong-path instructions after a fault
        while (pc < prog.size() && prog[pc].wrong_path) pc++;
      end
    end

    // issue
    if (iq_valid && iq_ready && !trapped) begin
      rob_t r;
      r.pc = pc; r.id = next_id; r.vl = csr_vl; r.vt = csr_vtype; r.vstart = csr_vstart;
      r.done = 0; r.ex = 0; r.w = '0;
      rob.push_back(r);
      next_id = next_id + 1'b1;
      pc++;
      while (page_mapped && pc < prog.size() && prog[pc].wrong_path) pc++;
    end
  end

  // Architectural register r of the unit (the committed copy)
  function automatic logic [VLEN-1:0] dut_reg(int r);
    logic [3:0] w;
    w = {dut.u_vrf.arch_q[r], 3'(r / 4)};
    case (r % 4)
      0: return dut.u_vrf.g_bank[0].mem_q[w];
      1: return dut.u_vrf.g_bank[1].mem_q[w];
      2: return dut.u_vrf.g_bank[2].mem_q[w];
      default: return dut.u_vrf.g_bank[3].mem_q[w];
    endcase
  endfunction

  // After every retirement the committed registers equal the model's.
  bit commit_d = 0;
  bit reg_err_shown = 0;
  int last_pc = 0;
  always @(negedge clk) begin
    commit_d <= commit;
    if (commit_d && rst_n) begin
      int bad;
      bad = -1;
      for (int r = 0; r < 32; r++) if (written[r] && dut_reg(r) !== rv[r]) bad = r;
      if (bad >= 0 && !reg_err_shown) begin
        reg_err_shown = 1;
        check(0, $sformatf("register v%0d differs after retiring instruction %0d:\n  %h\n  %h",
                           bad, last_pc, dut_reg(bad), rv[bad]));
      end
    end
  end

  // ------------------------------------------------------------------ program
  localparam logic [63:0] A = 64'h1000, B = 64'h2000, C = 64'h3FC0, D = 64'h5000;

  initial begin
    csr_vl = 0; csr_vtype = '0; csr_vstart = 0;
    for (int i = 0; i < MSIZE; i++) begin
      mem[i] = 8'($urandom);
      rmem[i] = mem[i];
    end
    for (int i = 0; i < 32; i++) begin rv[i] = '0; written[i] = 0; end

    // fill all registers from memory
    p_vsetvli(1, 0, 0, 0, 3);                   // e8, m8, vl = VLMAX
    for (int g = 0; g < 4; g++) p_mem(0, 0, 8*g, A + 64'(g * 8 * VLENB));
    // chaining VLSU -> VINT -> VMOV on an e32, m2 group
    p_vsetvli(1, 2, 13, 2, 1);                  // e32, m2, vl = 13
    p_op(K_VV, 'b000000, 2, 4, 6);              // vadd.vv v2, v4, v6
    p_op(K_VX, 'b000010, 8, 2, 0, 64'd5);       // vsub.vx v8, v2, x
    p_mem(0, 2, 10, B);                         // vle32 v10
    p_op(K_VV, 'b000000, 12, 10, 2);            // vadd.vv v12, v10, v2
    p_op(K_SLDN, 'b001111, 14, 12, 0, 64'd3);     // vslidedown.vx v14, v12, 3
    p_op(K_VI, 'b001001, 20, 4, 15);            // vand.vi v20, v4, 15
    p_op(K_GATHER, 'b001100, 16, 14, 20);       // vrgather.vv v16, v14, v20
    p_op(K_RED, 'b000000, 18, 16, 0);           // vredsum.vs v18, v16, v0
    p_op(K_MVXS, 'b010000, 3, 18, 0);           // vmv.x.s x3, v18
    p_op(K_SLUP, 'b001110, 22, 8, 0, 64'd2);      // vslideup.vx v22, v8, 2
    p_op(K_VV, 'b000000, 2, 2, 2);              // vadd.vv v2, v2, v2 (speculative dest)
    p_op(K_VV, 'b000000, 2, 2, 4);              // vadd.vv v2, v2, v4 (waits for retirement)
    // e16, m1: more integer ops and a mask op
    p_vsetvli(1, 2, 100, 1, 0);                 // e16, m1, vl = 16
    p_op(K_VI, 'b100101, 5, 6, 3);              // vsll.vi v5, v6, 3
    p_op(K_VV, 'b100001, 7, 6, 5);              // vsadd.vv v7, v6, v5
    p_op(K_VV, 'b000110, 9, 7, 6);              // vmaxu.vv v9, v7, v6
    p_op(K_VV, 'b000101, 11, 7, 6);             // vmin.vv v11, v7, v6
    p_op(K_VI, 'b101001, 13, 7, 2);             // vsra.vi v13, v7, 2
    p_op(K_VX, 'b001011, 15, 13, 0, 64'h1234);  // vxor.vx v15, v13, x
    p_op(K_MASK, 'b011001, 1, 3, 5);            // vmand.mm v1, v3, v5
    p_op(K_MVXS, 'b010000, 4, 15, 0);           // vmv.x.s x4, v15
    // configuration hazard: an EEW=32 load (EMUL 4) then an e8,m1 op inside its group
    p_vsetvli(1, 2, 32, 0, 0);                  // e8, m1, vl = 32
    p_mem(0, 2, 24, D);                         // vle32 v24..v27 (EMUL = 4)
    p_op(K_MASK, 'b011001, 30, 2, 4);           // vmand.mm v30, v2, v4 (VMOV) and
    p_op(K_VX, 'b001011, 31, 3, 0, 64'h5a);     // vxor.vx v31, v3, x (VINT) finish together,
    p_op(K_VV, 'b000000, 29, 2, 3);             // vadd.vv v29, v2, v3: all overtake the load
    p_op(K_VV, 'b000000, 28, 25, 26);           // vadd.vv v28, v25, v26 (needs the load)
    // illegal encoding (OPFVV is not supported)
    begin
      prog_t p;
      p = '{default: 0};
      p.kind = K_ILL;
      p.instr = enc_op('b000000, 1, 2, 1, 3);
      prog.push_back(p);
    end
    // precise page fault: e64, m4, 16 elements, page 0x4000 faults from element 8
    p_vsetvli(1, 2, 16, 3, 2);
    p_mem(0, 3, 20, C);                         // vle64 v20..v23
    p_op(K_VV, 'b000000, 0, 8, 8, 0, 1);        // wrong path: vadd.vv v0, v8, v8
    p_op(K_VV, 'b000000, 4, 20, 20);            // vadd.vv v4, v20, v20 after resume
    // dump every register through the unit's own stores
    p_vsetvli(1, 0, 0, 0, 3);                   // e8, m8
    for (int g = 0; g < 4; g++) p_mem(1, 0, 8*g, 64'h6000 + 64'(g * 8 * VLENB));

    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // ------------------------------------------------------------------ end and checks
  initial begin
    wait (rst_n);
    wait (pc >= prog.size() && rob.size() == 0);
    repeat (20) @(posedge clk);
    for (int i = 0; i < MSIZE; i++)
      if (mem[i] !== rmem[i]) begin
        check(0, $sformatf("memory byte %h: %h, expected %h", i, mem[i], rmem[i]));
        break;
      end
    check(1, "memory compared");
    check(fault_vstart_seen == 8, $sformatf("fault vstart %0d", fault_vstart_seen));
    check(n_commit > 0, "instructions retired");
    check(n_cfg_block > 0, "queue closed behind a configuration instruction");
    check(n_lock_wait > 0, "micro-operation waited for locks (chaining)");
    check(n_cfg_hazard > 0, "configuration hazard stall");
    check(n_whole > 0, "whole-group lock stall");
    check(n_spec > 0, "stall on a speculative destination");
    check(n_ooo > 0, "out-of-order completion");
    check(n_two_wb > 0, "both write-back ports in one cycle");
    check(n_fault == 1, "one page fault");
    check(n_flush == 2, "two flushes (illegal, fault)");
    check(n_illegal == 1, "one illegal instruction");
    check(n_xlat > 0 && n_xlat < 40, $sformatf("translations %0d", n_xlat));
    $display("events: cfg_block=%0d lock_wait=%0d cfg_hazard=%0d whole=%0d spec=%0d ooo=%0d two_wb=%0d fault=%0d flush=%0d illegal=%0d xlat=%0d iq_full=%0d cycles=%0d",
             n_cfg_block, n_lock_wait, n_cfg_hazard, n_whole, n_spec, n_ooo, n_two_wb,
             n_fault, n_flush, n_illegal, n_xlat, n_iq_full, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, pc=%0d rob=%0d", pc, rob.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
