// vu_sequencer: decode, configuration, hazard checks and dispatch.
//
// The sequencer takes one instruction per cycle from the instruction queue and
// decodes it completely.
//  * An encoding the unit does not support, or any vector instruction issued while
//    vtype.vill is set, is sent to the vector write back as an illegal-instruction
//    exception.
//  * vsetvli / vsetivli / vsetvl execute here: the new vl and vtype are computed and
//    sent to the write back at once, with vl as the scalar result. The instruction
//    queue stays closed until the scalar core retires the instruction.
//  * Every other instruction becomes a descriptor with EMUL = nuops micro-operations
//    and is dispatched to its functional unit (VINT, VMOV or VLSU) when
//      - the unit can accept it (back-pressure),
//      - it causes no configuration hazard with an instruction still running: the new
//        instruction has a smaller EMUL, overlaps a running register group, and the
//        overlap is not on the first register of that group (the document's rule),
//      - for an instruction that locks a whole source group at once, no running
//        instruction still writes into that group (this design's addition),
//      - none of its destination registers still holds a speculative value of an
//        unretired instruction (each register has only two copies), and
//      - the lock server grants the locks of its first micro-operation.
//    At dispatch the sequencer records, per register, which copy to read and which to
//    write, and marks the destination registers as speculative.
//
// Retirement: every accepted instruction is appended to an in-order list. A commit
// pulse from the scalar core pops its head; the head's destination registers are
// promoted to architectural state and, for a configuration instruction, the queue is
// reopened. flush_i (exception in the scalar core) empties the list.
//
// The decoded subset, the field encodings of the descriptor, and all the stall
// conditions except the configuration hazard rule are this design's choices.
module vu_sequencer
  import vu_pkg::*;
#(
  parameter int unsigned QD     = 2,   // descriptors held per functional unit
  parameter int unsigned CDEPTH = 8    // instructions awaiting retirement
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  logic      flush_i,
  // instruction queue
  input  logic      iq_valid_i,
  output logic      iq_ready_o,
  input  iq_entry_t iq_i,
  output logic      cfg_retired_o,
  // retirement from the scalar core
  input  logic      commit_i,
  input  id_t       commit_id_i,
  // dispatch
  output logic      disp_valid_o [NFU],
  input  logic      disp_ready_i [NFU],
  output vinstr_t   disp_o,
  // instructions running in the functional units
  input  logic      run_valid_i  [NFU][QD],
  input  vinstr_t   run_i        [NFU][QD],
  // lock server
  output logic      acq_valid_o,
  output regmask_t  acq_rd_o,
  output regmask_t  acq_wr_o,
  input  logic      acq_gnt_i,
  // register copy table
  input  regmask_t  rd_sel_i,
  input  regmask_t  wr_sel_i,
  input  regmask_t  spec_i,
  output logic      alloc_o,
  output regmask_t  alloc_mask_o,
  output logic      vrf_commit_o,
  output regmask_t  vrf_commit_mask_o,
  // vector write back
  output logic      wb_valid_o,
  input  logic      wb_ready_i,
  output wb_t       wb_o,
  // event counters for observation
  output logic      ev_cfg_hazard_o,
  output logic      ev_spec_stall_o,
  output logic      ev_lock_stall_o
);
  typedef enum logic [1:0] { K_ILL, K_CFG, K_VEC } kind_e;

  // ---------------------------------------------------------------- decode
  kind_e       kind;
  vinstr_t     d;
  vl_t         cfg_vl;
  vtype_t      cfg_vtype;
  logic        cfg_vill;

  function automatic int lmul_log(logic [2:0] vlmul);
    case (vlmul)
      3'b000: return 0;
      3'b001: return 1;
      3'b010: return 2;
      3'b011: return 3;
      3'b101: return -3;
      3'b110: return -2;
      3'b111: return -1;
      default: return 99;   // reserved
    endcase
  endfunction

  // VLMAX = VLEN / SEW * LMUL
  function automatic vl_t vlmax_of(logic [1:0] sew, int ll);
    int v;
    v = (VLEN / 8) >> sew;
    if (ll >= 0) v = v << ll; else v = v >> (-ll);
    return vl_t'(v);
  endfunction

  always_comb begin
    logic [31:0] in;
    logic [5:0]  f6;
    logic        vm;
    logic [4:0]  rs1f, rd;
    logic [2:0]  f3;
    logic [63:0] simm, uimm;
    int          ll, el;
    logic        ok, align_ok;
    vtype_t      nvt;
    logic [63:0] avl, vtype_raw;

    in   = iq_i.instr;
    f6   = in[31:26];
    vm   = in[25];
    rs1f = in[19:15];
    rd   = in[11:7];
    f3   = in[14:12];
    simm = {{59{in[19]}}, in[19:15]};
    uimm = {59'd0, in[19:15]};

    kind      = K_ILL;
    cfg_vl    = '0;
    cfg_vtype = '0;
    cfg_vill  = 1'b0;
    nvt       = '0;
    avl       = '0;
    vtype_raw = '0;
    ok        = 1'b0;
    ll        = lmul_log(iq_i.vtype.vlmul);
    el        = 0;

    d         = '0;
    d.id      = iq_i.id;
    d.sew     = iq_i.vtype.vsew[1:0];
    d.eew     = iq_i.vtype.vsew[1:0];
    d.nuops   = (ll > 0) ? 4'(1 << ll) : 4'd1;
    d.vd      = rd;
    d.vs1     = rs1f;
    d.vs2     = in[24:20];
    d.vl      = iq_i.vl;
    d.vstart  = iq_i.vstart;
    d.vlmax   = vlmax_of(iq_i.vtype.vsew[1:0], ll);
    d.scalar  = iq_i.rs1;
    d.rd_sel  = rd_sel_i;
    d.wr_sel  = wr_sel_i;

    if (in[6:0] == 7'b1010111 && f3 == 3'b111) begin
      // ------------------------------------------------ configuration
      kind = K_CFG;
      if (in[31] == 1'b0) begin                 // vsetvli
        vtype_raw = {53'd0, in[30:20]};
        avl = (rs1f != 0) ? iq_i.rs1 : (rd != 0) ? '1 : 64'(iq_i.vl);
      end else if (in[30] == 1'b1) begin        // vsetivli
        vtype_raw = {54'd0, in[29:20]};
        avl = uimm;
      end else begin                            // vsetvl
        vtype_raw = iq_i.rs2;
        avl = (rs1f != 0) ? iq_i.rs1 : (rd != 0) ? '1 : 64'(iq_i.vl);
      end
      nvt = vtype_t'(vtype_raw[7:0]);
      cfg_vill = (vtype_raw[63:8] != 0) || nvt.vsew[2] || (lmul_log(nvt.vlmul) == 99)
                 || (lmul_log(nvt.vlmul) < 0 && (int'(nvt.vsew) > 3 + lmul_log(nvt.vlmul)));
      if (cfg_vill) begin
        cfg_vtype = '0;
        cfg_vl    = '0;
      end else begin
        cfg_vtype = nvt;
        cfg_vl    = (avl < 64'(vlmax_of(nvt.vsew[1:0], lmul_log(nvt.vlmul))))
                    ? vl_t'(avl) : vlmax_of(nvt.vsew[1:0], lmul_log(nvt.vlmul));
      end
    end else if (!iq_i.vill && (in[6:0] == 7'b0000111 || in[6:0] == 7'b0100111)) begin
      // ------------------------------------------------ unit-stride load / store
      d.fu = FU_VLSU;
      d.op = (in[6:0] == 7'b0000111) ? OP_LOAD : OP_STORE;
      d.wr_vd = (d.op == OP_LOAD);
      case (f3)
        3'b000: begin d.eew = 2'd0; ok = 1'b1; end
        3'b101: begin d.eew = 2'd1; ok = 1'b1; end
        3'b110: begin d.eew = 2'd2; ok = 1'b1; end
        3'b111: begin d.eew = 2'd3; ok = 1'b1; end
        default: ok = 1'b0;
      endcase
      el = ll + int'(d.eew) - int'(d.sew);     // log2 EMUL = log2(EEW/SEW * LMUL)
      if (el > 3 || el < -3) ok = 1'b0;
      d.nuops = (el > 0) ? 4'(1 << el) : 4'd1;
      if (in[31:26] != 6'b000000 || vs2_nonzero(in) || !vm) ok = 1'b0;
      if (ok) kind = K_VEC;
    end else if (!iq_i.vill && in[6:0] == 7'b1010111) begin
      // ------------------------------------------------ arithmetic (OP-V)
      ok = vm;                                  // masked forms are not supported
      d.fu = FU_VINT;
      d.wr_vd = 1'b1;
      d.use_vs2 = 1'b1;
      d.use_vs1 = (f3 == 3'b000) || (f3 == 3'b010);
      if (f3 == 3'b011) d.scalar = simm;
      case (f3)
        3'b000, 3'b011, 3'b100: begin          // OPIVV, OPIVI, OPIVX
          case (f6)
            6'b000000: d.op = OP_ADD;
            6'b000010: begin d.op = OP_SUB;  if (f3 == 3'b011) ok = 1'b0; end
            6'b000011: begin d.op = OP_RSUB; if (f3 == 3'b000) ok = 1'b0; end
            6'b000100: begin d.op = OP_MINU; if (f3 == 3'b011) ok = 1'b0; end
            6'b000101: begin d.op = OP_MIN;  if (f3 == 3'b011) ok = 1'b0; end
            6'b000110: begin d.op = OP_MAXU; if (f3 == 3'b011) ok = 1'b0; end
            6'b000111: begin d.op = OP_MAX;  if (f3 == 3'b011) ok = 1'b0; end
            6'b001001: d.op = OP_AND;
            6'b001010: d.op = OP_OR;
            6'b001011: d.op = OP_XOR;
            6'b100000: d.op = OP_SADDU;
            6'b100001: d.op = OP_SADD;
            6'b100010: begin d.op = OP_SSUBU; if (f3 == 3'b011) ok = 1'b0; end
            6'b100011: begin d.op = OP_SSUB;  if (f3 == 3'b011) ok = 1'b0; end
            6'b100101: begin d.op = OP_SLL; if (f3 == 3'b011) d.scalar = uimm; end
            6'b101000: begin d.op = OP_SRL; if (f3 == 3'b011) d.scalar = uimm; end
            6'b101001: begin d.op = OP_SRA; if (f3 == 3'b011) d.scalar = uimm; end
            6'b010111: begin                    // vmv.v.v / vmv.v.x / vmv.v.i
              d.op = OP_MV;
              d.use_vs2 = 1'b0;
              if (in[24:20] != 0) ok = 1'b0;
            end
            6'b001100: begin                    // vrgather.vv / .vx / .vi
              d.fu = FU_VMOV; d.whole = 1'b1;
              d.op = (f3 == 3'b000) ? OP_GATHER : OP_GATHERX;
              if (f3 == 3'b011) d.scalar = uimm;
            end
            6'b001110: begin                    // vslideup.vx / .vi
              d.fu = FU_VMOV; d.whole = 1'b1; d.op = OP_SLIDEUP;
              if (f3 == 3'b000) ok = 1'b0;
              if (f3 == 3'b011) d.scalar = uimm;
            end
            6'b001111: begin                    // vslidedown.vx / .vi
              d.fu = FU_VMOV; d.whole = 1'b1; d.op = OP_SLIDEDN;
              if (f3 == 3'b000) ok = 1'b0;
              if (f3 == 3'b011) d.scalar = uimm;
            end
            default: ok = 1'b0;
          endcase
        end
        3'b010: begin                            // OPMVV
          case (f6)
            6'b000000: d.op = OP_REDSUM;
            6'b000001: d.op = OP_REDAND;
            6'b000010: d.op = OP_REDOR;
            6'b000011: d.op = OP_REDXOR;
            6'b000100: d.op = OP_REDMINU;
            6'b000101: d.op = OP_REDMIN;
            6'b000110: d.op = OP_REDMAXU;
            6'b000111: d.op = OP_REDMAX;
            6'b010000: begin                    // vmv.x.s
              d.fu = FU_VMOV; d.op = OP_MVXS; d.use_vs1 = 1'b0; d.wr_vd = 1'b0;
              d.nuops = 4'd1;
              if (rs1f != 0) ok = 1'b0;
            end
            6'b011000: d.op = OP_MANDN;
            6'b011001: d.op = OP_MAND;
            6'b011010: d.op = OP_MOR;
            6'b011011: d.op = OP_MXOR;
            6'b011100: d.op = OP_MORN;
            6'b011101: d.op = OP_MNAND;
            6'b011110: d.op = OP_MNOR;
            6'b011111: d.op = OP_MXNOR;
            default: ok = 1'b0;
          endcase
          if (f6[5:3] == 3'b000) begin
            d.red = 1'b1;
            if (iq_i.vstart != 0) ok = 1'b0;    // reductions require vstart = 0
          end
          if (f6[5:3] == 3'b011) begin d.fu = FU_VMOV; d.nuops = 4'd1; end
        end
        3'b110: begin                            // OPMVX
          case (f6)
            6'b001110: begin d.fu = FU_VMOV; d.whole = 1'b1; d.op = OP_SLIDE1UP; d.use_vs1 = 1'b0; end
            6'b001111: begin d.fu = FU_VMOV; d.whole = 1'b1; d.op = OP_SLIDE1DN; d.use_vs1 = 1'b0; end
            default: ok = 1'b0;
          endcase
        end
        default: ok = 1'b0;
      endcase
      if (ok) kind = K_VEC;
    end

    // register groups must be aligned to EMUL; whole-group instructions may not
    // write into their sources
    align_ok = 1'b1;
    if (!d.red && (d.wr_vd || d.op == OP_STORE) && (int'(d.vd) % int'(d.nuops) != 0)) align_ok = 1'b0;
    if (!d.red && d.op != OP_MVXS && d.use_vs1 && (int'(d.vs1) % int'(d.nuops) != 0)) align_ok = 1'b0;
    if (d.use_vs2 && d.op != OP_MVXS && (int'(d.vs2) % int'(d.nuops) != 0)) align_ok = 1'b0;
    if (d.whole && ((group_mask(d.vd, d.nuops) &
                     (group_mask(d.vs2, d.nuops) |
                      (d.use_vs1 ? group_mask(d.vs1, d.nuops) : '0))) != '0)) align_ok = 1'b0;
    if (kind == K_VEC && !align_ok) kind = K_ILL;
  end

  function automatic logic vs2_nonzero(logic [31:0] in);
    return in[24:20] != 5'd0;
  endfunction

  // ---------------------------------------------------------------- hazards
  // operand groups of a descriptor: base, length
  function automatic void groups(input vinstr_t x, output logic [4:0] b [3],
                                 output logic [3:0] n [3], output logic [2:0] v);
    b[0] = x.vd;  n[0] = x.red ? 4'd1 : x.nuops; v[0] = x.wr_vd || x.op == OP_STORE;
    b[1] = x.vs1; n[1] = x.red ? 4'd1 : x.nuops; v[1] = x.use_vs1;
    b[2] = x.vs2; n[2] = (x.op == OP_MVXS) ? 4'd1 : x.nuops; v[2] = x.use_vs2;
  endfunction

  logic cfg_hazard, whole_hazard, spec_hazard;
  regmask_t dest_mask;

  always_comb begin
    logic [4:0] nb [3];
    logic [3:0] nn [3];
    logic [2:0] nv;
    logic [4:0] ob [3];
    logic [3:0] on [3];
    logic [2:0] ov;
    regmask_t   src;
    cfg_hazard   = 1'b0;
    whole_hazard = 1'b0;
    ob = '{default: '0};
    on = '{default: '0};
    ov = '0;
    groups(d, nb, nn, nv);
    src = (d.use_vs2 ? group_mask(d.vs2, nn[2]) : '0) | (d.use_vs1 ? group_mask(d.vs1, nn[1]) : '0);
    for (int f = 0; f < NFU; f++) begin
      for (int q = 0; q < QD; q++) begin
        if (run_valid_i[f][q]) begin
          groups(run_i[f][q], ob, on, ov);
          for (int i = 0; i < 3; i++)
            for (int j = 0; j < 3; j++)
              if (nv[i] && ov[j] && nn[i] < on[j]
                  && ((group_mask(nb[i], nn[i]) & group_mask(ob[j], on[j])) != '0)
                  && nb[i] != ob[j])
                cfg_hazard = 1'b1;
          if (d.whole && ov[0] && run_i[f][q].op != OP_STORE
              && ((group_mask(ob[0], on[0]) & src) != '0))
            whole_hazard = 1'b1;
        end
      end
    end
    dest_mask   = d.wr_vd ? (d.red ? reg_bit(d.vd) : group_mask(d.vd, d.nuops)) : '0;
    spec_hazard = (dest_mask & spec_i) != '0;
  end

  // ---------------------------------------------------------------- retirement list
  typedef struct packed {
    id_t      id;
    logic     cfg;
    regmask_t mask;
  } cl_t;

  localparam int unsigned CW = $clog2(CDEPTH);
  cl_t            cl_q [CDEPTH];
  logic [CW-1:0]  cl_rd_q, cl_wr_q;
  logic [CW:0]    cl_cnt_q;
  logic           cl_push, cl_full;
  cl_t            cl_new;

  assign cl_full = (cl_cnt_q == (CW+1)'(CDEPTH));

  // ---------------------------------------------------------------- actions
  logic vec_go, fu_rdy;
  always_comb begin
    regmask_t r, w;
    regmask_t hr, hw;
    fu_rdy = disp_ready_i[d.fu];
    vec_go = (kind == K_VEC) && iq_valid_i && !cl_full && !flush_i && fu_rdy
             && !cfg_hazard && !whole_hazard && !spec_hazard;
    uop_locks(d, 4'd0, r, w);
    held_locks(d, hr, hw);
    acq_valid_o = vec_go;
    acq_rd_o    = r | hr;
    acq_wr_o    = w | hw;

    disp_o = d;
    for (int f = 0; f < NFU; f++) disp_valid_o[f] = vec_go && acq_gnt_i && (d.fu == fu_e'(f));

    wb_valid_o = iq_valid_i && !cl_full && !flush_i && (kind != K_VEC);
    wb_o = '0;
    wb_o.id = iq_i.id;
    if (kind == K_ILL) begin
      wb_o.ex_valid = 1'b1;
      wb_o.ex_cause = CAUSE_ILLEGAL;
      wb_o.ex_tval  = {32'd0, iq_i.instr};
    end else begin
      wb_o.data_valid  = 1'b1;
      wb_o.data        = 64'(cfg_vl);
      wb_o.set_vlvtype = 1'b1;
      wb_o.vl          = cfg_vl;
      wb_o.vtype       = cfg_vtype;
      wb_o.vill        = cfg_vill;
      wb_o.set_vstart  = 1'b1;
      wb_o.vstart      = '0;
    end

    cl_push = (vec_go && acq_gnt_i) || (wb_valid_o && wb_ready_i);
    iq_ready_o = cl_push;
    cl_new.id   = iq_i.id;
    cl_new.cfg  = (kind == K_CFG);
    cl_new.mask = (kind == K_VEC) ? dest_mask : '0;

    alloc_o      = vec_go && acq_gnt_i;
    alloc_mask_o = dest_mask;

    vrf_commit_o      = commit_i && (cl_cnt_q != '0) && !flush_i;
    vrf_commit_mask_o = cl_q[cl_rd_q].mask;
    cfg_retired_o     = vrf_commit_o && cl_q[cl_rd_q].cfg;

    ev_cfg_hazard_o = (kind == K_VEC) && iq_valid_i && cfg_hazard;
    ev_spec_stall_o = (kind == K_VEC) && iq_valid_i && spec_hazard;
    ev_lock_stall_o = acq_valid_o && !acq_gnt_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cl_rd_q  <= '0;
      cl_wr_q  <= '0;
      cl_cnt_q <= '0;
    end else if (flush_i) begin
      cl_rd_q  <= '0;
      cl_wr_q  <= '0;
      cl_cnt_q <= '0;
    end else begin
      if (cl_push) begin
        cl_q[cl_wr_q] <= cl_new;
        cl_wr_q <= cl_wr_q + 1'b1;
      end
      if (vrf_commit_o) cl_rd_q <= cl_rd_q + 1'b1;
      cl_cnt_q <= cl_cnt_q + (CW+1)'(cl_push) - (CW+1)'(vrf_commit_o);
    end
  end

  // The scalar core retires vector instructions in the order they were issued.
  assert property (@(posedge clk_i) disable iff (!rst_ni || flush_i)
                   commit_i |-> (cl_cnt_q != '0) && (commit_id_i == cl_q[cl_rd_q].id));
endmodule
