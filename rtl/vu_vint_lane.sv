// vu_vint_lane: one W-bit element lane of the integer SIMD Execute module.
//
// Computes one element-wise integer result of width W (8, 16, 32 or 64): add,
// subtract, reverse subtract, signed/unsigned min and max, logic operations, shifts
// (shift amount taken modulo W), move, and the saturating adds/subtracts of the
// fixed-point subset (signed and unsigned, without the vxsat flag). Purely
// combinational. a is the vs2 element, b the vs1 element or the scalar operand.
// The lane split by element width is this design's choice. The shifts are built as
// one logarithmic right shifter (a left shift is a right shift of the bit-reversed
// operand), so a lane holds no shift operators that synthesis would try to share.
module vu_vint_lane
  import vu_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  op_e          op_i,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] r_o
);
  localparam int unsigned SW = $clog2(W);

  logic [W:0]    sum, dif;
  logic          lt_u, lt_s, ovf_add, ovf_sub;
  logic [W-1:0]  smax, smin;
  logic [W-1:0]  shin, shout, shres;
  logic          fill;

  // logarithmic right shifter shared by SLL, SRL and SRA
  always_comb begin
    for (int i = 0; i < W; i++) shin[i] = (op_i == OP_SLL) ? a_i[W-1-i] : a_i[i];
    fill  = (op_i == OP_SRA) && a_i[W-1];
    shout = shin;
    for (int k = 0; k < SW; k++)
      if (b_i[k])
        for (int i = 0; i < W; i++)
          shout[i] = (i + (1 << k) < W) ? shout[i + (1 << k)] : fill;
    for (int i = 0; i < W; i++) shres[i] = (op_i == OP_SLL) ? shout[W-1-i] : shout[i];
  end

  always_comb begin
    sum     = {1'b0, a_i} + {1'b0, b_i};
    dif     = {1'b0, a_i} - {1'b0, b_i};
    lt_u    = dif[W];
    lt_s    = $signed(a_i) < $signed(b_i);
    ovf_add = (a_i[W-1] == b_i[W-1]) && (sum[W-1] != a_i[W-1]);
    ovf_sub = (a_i[W-1] != b_i[W-1]) && (dif[W-1] != a_i[W-1]);
    smax    = {1'b0, {(W-1){1'b1}}};
    smin    = {1'b1, {(W-1){1'b0}}};
    case (op_i)
      OP_ADD:   r_o = sum[W-1:0];
      OP_SUB:   r_o = dif[W-1:0];
      OP_RSUB:  r_o = b_i - a_i;
      OP_MINU:  r_o = lt_u ? a_i : b_i;
      OP_MAXU:  r_o = lt_u ? b_i : a_i;
      OP_MIN:   r_o = lt_s ? a_i : b_i;
      OP_MAX:   r_o = lt_s ? b_i : a_i;
      OP_AND:   r_o = a_i & b_i;
      OP_OR:    r_o = a_i | b_i;
      OP_XOR:   r_o = a_i ^ b_i;
      OP_SLL, OP_SRL, OP_SRA: r_o = shres;
      OP_MV:    r_o = b_i;
      OP_SADDU: r_o = sum[W] ? '1 : sum[W-1:0];
      OP_SSUBU: r_o = lt_u ? '0 : dif[W-1:0];
      OP_SADD:  r_o = ovf_add ? (a_i[W-1] ? smin : smax) : sum[W-1:0];
      OP_SSUB:  r_o = ovf_sub ? (a_i[W-1] ? smin : smax) : dif[W-1:0];
      default:  r_o = '0;
    endcase
  end
endmodule
