// vu_pkg: types, constants and helper functions shared by the vector unit.
//
// The vector unit implements a subset of the RISC-V vector extension v1.0 for the
// Zve64x profile (ELEN = 64, integer only). VLEN is the width of one vector register
// and of the SIMD datapath; 256 is the default here, the document evaluates 128, 256
// and 512. Everything else in this package (field widths, the tag width, the
// write-back record, the micro-operation lock masks) is this design's own choice.
package vu_pkg;

  parameter int unsigned VLEN   = 256;          // bits per vector register
  parameter int unsigned VLENB  = VLEN / 8;     // bytes per vector register
  parameter int unsigned ELEN   = 64;           // Zve64x
  parameter int unsigned NVREG  = 32;           // architectural vector registers
  parameter int unsigned XLEN   = 64;           // scalar core is RV64
  parameter int unsigned IDW    = 4;            // instruction tag (ROB index) width
  parameter int unsigned VLW    = $clog2(VLEN) + 1;  // holds 0..VLMAX(max)=VLEN
  parameter int unsigned MEMW   = VLEN / 2;     // memory beat: VLEN/2 bits per cycle
  parameter int unsigned MEMB   = MEMW / 8;     // bytes per memory beat

  typedef logic [IDW-1:0]   id_t;
  typedef logic [VLW-1:0]   vl_t;
  typedef logic [VLEN-1:0]  vreg_t;
  typedef logic [NVREG-1:0] regmask_t;

  // vtype CSR without vill (vill is carried separately)
  typedef struct packed {
    logic       vma;
    logic       vta;
    logic [2:0] vsew;
    logic [2:0] vlmul;
  } vtype_t;

  // One entry of the instruction queue: the instruction, its scalar operands after the
  // core's forwarding, and the vector CSRs sampled when the core issued it.
  typedef struct packed {
    logic [31:0]     instr;
    id_t             id;
    logic [XLEN-1:0] rs1;
    logic [XLEN-1:0] rs2;
    vl_t             vl;
    vtype_t          vtype;
    logic            vill;
    vl_t             vstart;
  } iq_entry_t;

  typedef enum logic [1:0] { FU_VINT = 2'd0, FU_VMOV = 2'd1, FU_VLSU = 2'd2 } fu_e;
  parameter int unsigned NFU = 3;

  typedef enum logic [5:0] {
    // VINT element-wise
    OP_ADD, OP_SUB, OP_RSUB, OP_MINU, OP_MIN, OP_MAXU, OP_MAX,
    OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA, OP_MV,
    OP_SADDU, OP_SADD, OP_SSUBU, OP_SSUB,
    // VINT reductions
    OP_REDSUM, OP_REDAND, OP_REDOR, OP_REDXOR,
    OP_REDMINU, OP_REDMIN, OP_REDMAXU, OP_REDMAX,
    // VMOV
    OP_GATHER, OP_GATHERX, OP_SLIDEUP, OP_SLIDEDN, OP_SLIDE1UP, OP_SLIDE1DN,
    OP_MVXS, OP_MAND, OP_MNAND, OP_MANDN, OP_MXOR, OP_MOR, OP_MNOR, OP_MORN, OP_MXNOR,
    // VLSU
    OP_LOAD, OP_STORE
  } op_e;

  // Instruction descriptor handed by the sequencer to a functional unit.
  typedef struct packed {
    id_t             id;
    fu_e             fu;
    op_e             op;
    logic [1:0]      sew;      // log2(SEW/8)
    logic [1:0]      eew;      // log2(EEW/8) of memory accesses, = sew otherwise
    logic [3:0]      nuops;    // EMUL: number of micro-operations (1..8)
    logic [4:0]      vd;       // also vs3 of stores
    logic [4:0]      vs1;
    logic [4:0]      vs2;
    logic            use_vs1;
    logic            use_vs2;
    logic            wr_vd;    // writes the vd group
    logic            whole;    // locks the whole vs2 group at once (no chaining)
    logic            red;      // reduction: vd locked once, written by the last uop
    logic [XLEN-1:0] scalar;   // rs1 value, or the sign/zero-extended immediate
    vl_t             vl;
    vl_t             vstart;
    vl_t             vlmax;
    regmask_t        rd_sel;   // copy to read, per architectural register
    regmask_t        wr_sel;   // copy to write, per architectural register
  } vinstr_t;

  // Request of the vector write back: completion, exception, scalar result and
  // vector CSR update commands for the scalar core.
  typedef struct packed {
    id_t             id;
    logic            ex_valid;
    logic [5:0]      ex_cause;
    logic [XLEN-1:0] ex_tval;
    logic            data_valid;
    logic [XLEN-1:0] data;
    logic            set_vlvtype;
    vl_t             vl;
    vtype_t          vtype;
    logic            vill;
    logic            set_vstart;
    vl_t             vstart;
  } wb_t;

  // Operands of one micro-operation, from the FU wrapper to a SIMD Execute module.
  typedef struct packed {
    vinstr_t                 instr;
    logic [3:0]              uop;      // register index within the group
    logic                    first;
    logic                    last;
    vreg_t                   vs1;
    vreg_t                   vs2;
    vreg_t                   vd;       // old destination value (store data for stores)
    logic [8*VLEN-1:0]       group;    // whole vs2 group (whole-group instructions)
  } ex_req_t;

  // Result of one micro-operation from a SIMD Execute module.
  typedef struct packed {
    logic            we;               // write res to the destination register
    vreg_t           res;
    logic            data_valid;       // scalar result for the write back
    logic [XLEN-1:0] data;
    logic            ex_valid;         // exception, reported once per instruction
    logic [5:0]      ex_cause;
    logic [XLEN-1:0] ex_tval;
    vl_t             ex_vstart;
  } ex_resp_t;

  // Exception causes (privileged spec)
  parameter logic [5:0] CAUSE_ILLEGAL   = 6'd2;
  parameter logic [5:0] CAUSE_LD_MISAL  = 6'd4;
  parameter logic [5:0] CAUSE_ST_MISAL  = 6'd6;
  parameter logic [5:0] CAUSE_LD_PF     = 6'd13;
  parameter logic [5:0] CAUSE_ST_PF     = 6'd15;

  // Mask of the group base..base+n-1 (n = 1..8)
  function automatic regmask_t group_mask(logic [4:0] base, logic [3:0] n);
    regmask_t m = '0;
    for (int i = 0; i < 8; i++)
      if (i < int'(n)) m[(int'(base) + i) % NVREG] = 1'b1;
    return m;
  endfunction

  function automatic regmask_t reg_bit(logic [4:0] r);
    regmask_t m = '0;
    m[r] = 1'b1;
    return m;
  endfunction

  // Locks of micro-operation u of instruction d (read and write masks).
  // Normal instructions lock register u of each operand group. A whole-group
  // instruction takes the full vs2 group with uop 0 and keeps it. A reduction
  // takes vd and vs1 with uop 0 and keeps vd; it reads vs2 register by register.
  function automatic void uop_locks(input vinstr_t d, input logic [3:0] u,
                                    output regmask_t rd, output regmask_t wr);
    rd = '0; wr = '0;
    if (d.red) begin
      if (u == 0) begin
        wr = reg_bit(d.vd);
        if (d.use_vs1) rd |= reg_bit(d.vs1);
      end
      if (d.use_vs2) rd |= reg_bit(d.vs2 + 5'(u));
    end else begin
      if (d.wr_vd) wr = reg_bit(d.vd + 5'(u));
      else if (d.op == OP_STORE) rd |= reg_bit(d.vd + 5'(u));
      if (d.use_vs1) rd |= reg_bit(d.vs1 + 5'(u));
      if (d.use_vs2) begin
        if (d.whole) begin
          if (u == 0) rd |= group_mask(d.vs2, d.nuops);
        end else rd |= reg_bit(d.vs2 + 5'(u));
      end
    end
    rd &= ~wr;
  endfunction

  // Locks kept past micro-operation u (released only when the instruction ends).
  function automatic void held_locks(input vinstr_t d, output regmask_t rd, output regmask_t wr);
    rd = '0; wr = '0;
    if (d.red) wr = reg_bit(d.vd);
    if (d.whole && d.use_vs2) rd = group_mask(d.vs2, d.nuops) & ~group_mask(d.vd, d.nuops);
  endfunction

  // Element access on a register, SEW given as log2(bytes)
  function automatic logic [63:0] elem_get(vreg_t r, int idx, logic [1:0] sew);
    logic [63:0] v;
    case (sew)
      2'd0: v = 64'(r[(idx % VLENB) * 8 +: 8]);
      2'd1: v = 64'(r[(idx % (VLENB/2)) * 16 +: 16]);
      2'd2: v = 64'(r[(idx % (VLENB/4)) * 32 +: 32]);
      default: v = r[(idx % (VLENB/8)) * 64 +: 64];
    endcase
    return v;
  endfunction

  function automatic logic [63:0] sext(logic [63:0] v, logic [1:0] sew);
    case (sew)
      2'd0: return {{56{v[7]}}, v[7:0]};
      2'd1: return {{48{v[15]}}, v[15:0]};
      2'd2: return {{32{v[31]}}, v[31:0]};
      default: return v;
    endcase
  endfunction

  function automatic logic [63:0] trunc(logic [63:0] v, logic [1:0] sew);
    case (sew)
      2'd0: return {56'd0, v[7:0]};
      2'd1: return {48'd0, v[15:0]};
      2'd2: return {32'd0, v[31:0]};
      default: return v;
    endcase
  endfunction

  // Byte enables of the active elements [vstart, vl) that fall in register u of a group.
  function automatic logic [VLENB-1:0] active_bytes(logic [3:0] u, logic [1:0] sew,
                                                    vl_t vstart, vl_t vl);
    logic [VLENB-1:0] be;
    for (int b = 0; b < VLENB; b++) begin
      int e;
      e = (int'(u) * VLENB + b) >> sew;
      be[b] = (e >= int'(vstart)) && (e < int'(vl));
    end
    return be;
  endfunction

  function automatic vreg_t merge_bytes(vreg_t old_v, vreg_t new_v, logic [VLENB-1:0] be);
    vreg_t r;
    for (int b = 0; b < VLENB; b++) r[b*8 +: 8] = be[b] ? new_v[b*8 +: 8] : old_v[b*8 +: 8];
    return r;
  endfunction

endpackage
