// vu_vmov_exec: SIMD Execute of the vector permutation unit (VMOV).
//
// Handles the instructions whose result elements come from other element positions
// (vrgather.vv/.vx/.vi, vslideup/vslidedown .vx/.vi, vslide1up/vslide1down.vx), the
// move of element 0 to a scalar register (vmv.x.s), and the mask-register logical
// instructions (vmand.mm ... vmxnor.mm).
//
// Permutations read across a whole register group, so the wrapper delivers the full
// vs2 group (up to 8 registers) with micro-operation 0; every micro-operation then
// computes all elements of one destination register in parallel over the full SIMD
// width, whatever the element width. Elements outside [vstart, vl) are left
// undisturbed, and so are those below the offset of vslideup. Source indices at or
// beyond VLMAX read as zero. The mask instructions work bit by bit on [vstart, vl).
//
// Interface: req_valid/req_ready, then resp_valid/resp_ready one cycle later. The
// document gives the unit's role and that whole groups are locked for gathers and
// slides; the instruction subset and the undisturbed policy are this design's own.
module vu_vmov_exec
  import vu_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  logic     flush_i,
  input  logic     req_valid_i,
  output logic     req_ready_o,
  input  ex_req_t  req_i,
  output logic     resp_valid_o,
  input  logic     resp_ready_i,
  output ex_resp_t resp_o
);
  localparam int unsigned GE = 8 * VLENB;   // bytes in a group

  logic busy_q;
  assign req_ready_o  = !busy_q;
  assign resp_valid_o = busy_q;

  function automatic logic [63:0] group_get(logic [8*VLEN-1:0] g, logic [63:0] idx, logic [1:0] sew);
    logic [63:0] v;
    int          i;
    i = int'(idx[15:0]);
    case (sew)
      2'd0: v = 64'(g[(i % GE) * 8 +: 8]);
      2'd1: v = 64'(g[(i % (GE/2)) * 16 +: 16]);
      2'd2: v = 64'(g[(i % (GE/4)) * 32 +: 32]);
      default: v = g[(i % (GE/8)) * 64 +: 64];
    endcase
    return v;
  endfunction

  ex_resp_t resp_n;

  always_comb begin
    vinstr_t          d;
    int               epr;
    logic [63:0]      eg, src, off, v;
    logic             inrange;
    vreg_t            res, m, nb;
    logic [VLENB-1:0] be;
    d   = req_i.instr;
    epr = VLENB >> d.sew;
    eg  = '0; src = '0; inrange = 1'b0; v = '0; m = '0; nb = '0;
    off = d.scalar;
    res = '0;
    be  = active_bytes(req_i.uop, d.sew, d.vstart, d.vl);
    resp_n = '0;
    for (int e = 0; e < VLENB; e++) begin
      if (e < epr) begin
        eg = 64'(int'(req_i.uop) * epr + e);
        src = '0; inrange = 1'b0; v = '0;
        case (d.op)
          OP_GATHER:   begin src = elem_get(req_i.vs1, e, d.sew); inrange = src < 64'(d.vlmax); end
          OP_GATHERX:  begin src = off;                           inrange = src < 64'(d.vlmax); end
          OP_SLIDEUP:  begin src = eg - off;                      inrange = eg >= off;          end
          OP_SLIDEDN:  begin src = eg + off;   inrange = (off < 64'(d.vlmax)) && (src < 64'(d.vlmax)); end
          OP_SLIDE1UP: begin src = eg - 64'd1;                    inrange = eg != '0;           end
          OP_SLIDE1DN: begin src = eg + 64'd1;                    inrange = src < 64'(d.vlmax); end
          default: ;
        endcase
        if (inrange) v = group_get(req_i.group, src, d.sew);
        if (d.op == OP_SLIDE1UP && eg == '0) v = d.scalar;
        if (d.op == OP_SLIDE1DN && eg == 64'(d.vl) - 64'd1) v = d.scalar;
        case (d.sew)
          2'd0: res[e*8  +: 8]  = v[7:0];
          2'd1: res[e*16 +: 16] = v[15:0];
          2'd2: res[e*32 +: 32] = v[31:0];
          default: res[e*64 +: 64] = v;
        endcase
        // vslideup leaves the elements below the offset untouched
        if (d.op == OP_SLIDEUP && eg < off)
          for (int b = 0; b < 8; b++) if (b < (1 << d.sew)) be[e * (1 << d.sew) + b] = 1'b0;
      end
    end

    case (d.op)
      OP_MVXS: begin
        resp_n.data_valid = 1'b1;
        resp_n.data       = sext(elem_get(req_i.vs2, 0, d.sew), d.sew);
      end
      OP_MAND, OP_MNAND, OP_MANDN, OP_MXOR, OP_MOR, OP_MNOR, OP_MORN, OP_MXNOR: begin
        case (d.op)
          OP_MAND:  nb =   req_i.vs2 &  req_i.vs1;
          OP_MNAND: nb = ~(req_i.vs2 &  req_i.vs1);
          OP_MANDN: nb =   req_i.vs2 & ~req_i.vs1;
          OP_MXOR:  nb =   req_i.vs2 ^  req_i.vs1;
          OP_MOR:   nb =   req_i.vs2 |  req_i.vs1;
          OP_MNOR:  nb = ~(req_i.vs2 |  req_i.vs1);
          OP_MORN:  nb =   req_i.vs2 | ~req_i.vs1;
          default:  nb = ~(req_i.vs2 ^  req_i.vs1);
        endcase
        for (int i = 0; i < VLEN; i++) m[i] = (i >= int'(d.vstart)) && (i < int'(d.vl));
        resp_n.we  = 1'b1;
        resp_n.res = (req_i.vd & ~m) | (nb & m);
      end
      default: begin
        resp_n.we  = 1'b1;
        resp_n.res = merge_bytes(req_i.vd, res, be);
      end
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q <= 1'b0;
      resp_o <= '0;
    end else if (flush_i) begin
      busy_q <= 1'b0;
    end else begin
      if (req_valid_i && req_ready_o) begin
        busy_q <= 1'b1;
        resp_o <= resp_n;
      end else if (resp_ready_i) begin
        busy_q <= 1'b0;
      end
    end
  end
endmodule
