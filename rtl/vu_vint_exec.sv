// vu_vint_exec: SIMD Execute of the vector integer unit (VINT).
//
// Processes one micro-operation (one vector register of VLEN bits) per request:
// element-wise integer operations (add, subtract, reverse subtract, signed and
// unsigned min/max, and/or/xor, shifts, vmv.v.*), the saturating fixed-point adds and
// subtracts, and the integer reductions. Element width is SEW = 8, 16, 32 or 64 bits;
// the second operand is vs1, the scalar register or the immediate.
//
// Element-wise operations use four banks of lanes, one per SEW (VLEN/8 lanes of 8
// bits, VLEN/16 of 16, ...; vu_vint_lane), and the bank of the current SEW is
// selected. Elements outside [vstart, vl) keep the old destination value (tail and
// prestart undisturbed), so every micro-operation writes its whole destination
// register. The result is ready one cycle after the request.
//
// Reductions run through one 64-bit reduction ALU, one element per cycle: the vs2
// register is shifted down by one element each cycle and the active elements are
// folded into an accumulator that starts from element 0 of vs1 at the first
// micro-operation and survives across micro-operations. The last micro-operation
// writes the result into element 0 of vd; the others write nothing. A reduction
// micro-operation therefore takes VLEN/SEW + 1 cycles.
//
// Interface: req_valid/req_ready, resp_valid/resp_ready; one micro-operation in flight.
// The document gives only the unit's function (integer, fixed point, reductions); the
// instruction subset, the undisturbed policy, the lane organisation and the latencies
// are this design's choices. Fixed-point rounding modes and vxsat are not implemented.
module vu_vint_exec
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
  // ---------------------------------------------------------------- element-wise lanes
  vinstr_t d;
  assign d = req_i.instr;

  vreg_t res_w [4];
  for (genvar s = 0; s < 4; s++) begin : g_sew
    localparam int unsigned W = 8 << s;
    for (genvar e = 0; e < VLEN / W; e++) begin : g_lane
      logic [W-1:0] b;
      assign b = d.use_vs1 ? req_i.vs1[e*W +: W] : d.scalar[W-1:0];
      vu_vint_lane #(.W(W)) u_lane (
        .op_i(d.op), .a_i(req_i.vs2[e*W +: W]), .b_i(b), .r_o(res_w[s][e*W +: W])
      );
    end
  end

  vreg_t res_ew;
  assign res_ew = merge_bytes(req_i.vd, res_w[d.sew], active_bytes(req_i.uop, d.sew, d.vstart, d.vl));

  // ---------------------------------------------------------------- reduction
  function automatic logic [63:0] red_alu(op_e op, logic [63:0] a, logic [63:0] b, logic [1:0] sew);
    logic [63:0] sa, sb, r;
    sa = sext(a, sew);
    sb = sext(b, sew);
    case (op)
      OP_REDSUM:  r = a + b;
      OP_REDAND:  r = a & b;
      OP_REDOR:   r = a | b;
      OP_REDXOR:  r = a ^ b;
      OP_REDMINU: r = (a < b) ? a : b;
      OP_REDMAXU: r = (a > b) ? a : b;
      OP_REDMIN:  r = ($signed(sa) < $signed(sb)) ? a : b;
      default:    r = ($signed(sa) > $signed(sb)) ? a : b;   // OP_REDMAX
    endcase
    return trunc(r, sew);
  endfunction

  logic        busy_q, red_q;
  ex_req_t     r_q;          // the reduction micro-operation being folded
  vreg_t       sh_q;         // its vs2, shifted down one element per cycle
  logic [5:0]  idx_q;        // element index within the register
  logic [63:0] acc_q;

  logic [5:0]  epr_m1;       // elements per register - 1
  logic [63:0] elem, acc_nx;
  logic        act;
  vl_t         eg;
  always_comb begin
    epr_m1 = 6'((VLENB >> r_q.instr.sew) - 1);
    elem   = trunc(sh_q[63:0], r_q.instr.sew);
    eg     = vl_t'(int'(r_q.uop) * (VLENB >> r_q.instr.sew) + int'(idx_q));
    act    = (eg < r_q.instr.vl);
    acc_nx = act ? red_alu(r_q.instr.op, acc_q, elem, r_q.instr.sew) : acc_q;
  end

  logic [VLENB-1:0] be0;
  always_comb
    for (int b = 0; b < VLENB; b++) be0[b] = (b < (1 << r_q.instr.sew)) && (r_q.instr.vl != '0);

  assign req_ready_o  = !busy_q;
  assign resp_valid_o = busy_q && !red_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q <= 1'b0;
      red_q  <= 1'b0;
      r_q    <= '0;
      sh_q   <= '0;
      idx_q  <= '0;
      acc_q  <= '0;
      resp_o <= '0;
    end else if (flush_i) begin
      busy_q <= 1'b0;
      red_q  <= 1'b0;
    end else if (!busy_q) begin
      if (req_valid_i) begin
        busy_q <= 1'b1;
        if (d.red) begin
          red_q <= 1'b1;
          r_q   <= req_i;
          sh_q  <= req_i.vs2;
          idx_q <= '0;
          if (req_i.first) acc_q <= trunc(req_i.vs1[63:0], d.sew);
        end else begin
          resp_o     <= '0;
          resp_o.we  <= 1'b1;
          resp_o.res <= res_ew;
        end
      end
    end else if (red_q) begin
      acc_q <= acc_nx;
      sh_q  <= sh_q >> (8 << r_q.instr.sew);
      idx_q <= idx_q + 1'b1;
      if (idx_q == epr_m1) begin
        red_q      <= 1'b0;
        resp_o     <= '0;
        resp_o.we  <= r_q.last;
        resp_o.res <= merge_bytes(r_q.vd, {{(VLEN-64){1'b0}}, acc_nx}, be0);
      end
    end else if (resp_ready_i) begin
      busy_q <= 1'b0;
    end
  end
endmodule
