// tb_vu_vmov_exec: self-checking test of the permutation/mask SIMD Execute module.
//
// Random vrgather.vv/.vx, vslideup/down (.vx), vslide1up/down, vmv.x.s and the eight
// mask-register logical instructions over random SEW, group sizes, vl, vstart and
// offsets (including offsets and indices beyond VLMAX). The whole source group is
// passed with every micro-operation, as the FU wrapper does; each written register is
// compared with an element model that keeps prestart and tail elements and, for
// vslideup, the elements below the offset. Default VLEN.
module tb_vu_vmov_exec;
  import vu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     req_valid, req_ready, resp_valid, resp_ready;
  ex_req_t  req;
  ex_resp_t resp;

  vu_vmov_exec dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(1'b0),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_i(req),
    .resp_valid_o(resp_valid), .resp_ready_i(resp_ready), .resp_o(resp)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam int VB = VLEN / 8;
  logic [7:0] g1 [8*VB], g2 [8*VB], gd [8*VB], ex [8*VB];

  function automatic logic [63:0] eget(ref logic [7:0] g [8*VB], input int i, input int sb);
    logic [63:0] v = 0;
    for (int k = 0; k < sb; k++) v[k*8 +: 8] = g[i*sb + k];
    return v;
  endfunction
  task automatic eset(ref logic [7:0] g [8*VB], input int i, input int sb, input logic [63:0] v);
    for (int k = 0; k < sb; k++) g[i*sb + k] = v[k*8 +: 8];
  endtask

  op_e ops [] = '{OP_GATHER, OP_GATHERX, OP_SLIDEUP, OP_SLIDEDN, OP_SLIDE1UP, OP_SLIDE1DN,
                  OP_MVXS, OP_MAND, OP_MNAND, OP_MANDN, OP_MXOR, OP_MOR, OP_MNOR, OP_MORN,
                  OP_MXNOR};
  int n_op [op_e];

  task automatic run_one();
    vinstr_t d;
    int sb, nu, epr, vlmax, vl, vst;
    bit mask, mv;
    logic [63:0] m;
    d = '0;
    d.op  = ops[$urandom_range(0, ops.size() - 1)];
    mask  = d.op inside {OP_MAND, OP_MNAND, OP_MANDN, OP_MXOR, OP_MOR, OP_MNOR, OP_MORN, OP_MXNOR};
    mv    = (d.op == OP_MVXS);
    d.sew = 2'($urandom_range(0, 3));
    d.eew = d.sew;
    nu    = (mask || mv) ? 1 : 1 << $urandom_range(0, 3);
    d.nuops = 4'(nu);
    sb    = 1 << d.sew;
    epr   = VB / sb;
    vlmax = mask ? VLEN : epr * nu;
    vl    = ($urandom_range(0, 3) == 0) ? vlmax : $urandom_range(1, vlmax);
    vst   = ($urandom_range(0, 2) != 0) ? 0 : $urandom_range(0, vl - 1);
    if (mask) begin d.sew = 0; sb = 1; end
    d.vl = vl_t'(vl); d.vstart = vl_t'(vst); d.vlmax = vl_t'(mask ? VB * nu : vlmax);
    if (mask) d.vlmax = vl_t'(VB);
    case ($urandom_range(0, 3))
      0: d.scalar = 64'($urandom_range(0, 3));
      1: d.scalar = 64'($urandom_range(0, vlmax + 4));
      2: d.scalar = {$urandom, $urandom};
      default: d.scalar = 64'($urandom_range(0, 2 * vlmax));
    endcase
    n_op[d.op]++;
    m = (sb == 8) ? '1 : (64'd1 << (8*sb)) - 1;
    foreach (g1[i]) begin g1[i] = 8'($urandom); g2[i] = 8'($urandom); gd[i] = 8'($urandom); end
    // gather indices: mostly in range
    if (d.op == OP_GATHER)
      for (int e = 0; e < vlmax; e++)
        if ($urandom_range(0, 4) != 0) eset(g1, e, sb, 64'($urandom_range(0, vlmax - 1)));
    ex = gd;
    if (mask) begin
      for (int i = vst; i < vl; i++) begin
        logic a, b, r;
        a = g2[i / 8][i % 8]; b = g1[i / 8][i % 8];
        case (d.op)
          OP_MAND:  r = a & b;    OP_MNAND: r = !(a & b);
          OP_MANDN: r = a & !b;   OP_MXOR:  r = a ^ b;
          OP_MOR:   r = a | b;    OP_MNOR:  r = !(a | b);
          OP_MORN:  r = a | !b;   default:  r = !(a ^ b);
        endcase
        ex[i / 8][i % 8] = r;
      end
    end else if (!mv) begin
      for (int e = vst; e < vl; e++) begin
        logic [63:0] ix, v;
        bit wr;
        wr = 1; v = 0;
        case (d.op)
          OP_GATHER:  begin ix = eget(g1, e, sb); v = (ix < 64'(vlmax)) ? eget(g2, int'(ix), sb) : 0; end
          OP_GATHERX: begin ix = d.scalar; v = (ix < 64'(vlmax)) ? eget(g2, int'(ix), sb) : 0; end
          OP_SLIDEUP: begin
            if (64'(e) >= d.scalar) v = eget(g2, int'(64'(e) - d.scalar), sb); else wr = 0;
          end
          OP_SLIDEDN: v = (d.scalar < 64'(vlmax) && 64'(e) + d.scalar < 64'(vlmax))
                          ? eget(g2, int'(64'(e) + d.scalar), sb) : 0;
          OP_SLIDE1UP: v = (e == 0) ? d.scalar : eget(g2, e - 1, sb);
          default:     v = (e == vl - 1) ? d.scalar : eget(g2, e + 1, sb);
        endcase
        if (wr) eset(ex, e, sb, v & m);
      end
    end
    for (int u = 0; u < nu; u++) begin
      @(negedge clk);
      req = '0;
      req.instr = d;
      req.uop = 4'(u); req.first = (u == 0); req.last = (u == nu - 1);
      for (int b = 0; b < VB; b++) begin
        req.vs1[b*8 +: 8] = g1[u*VB + b];
        req.vs2[b*8 +: 8] = g2[u*VB + b];
        req.vd[b*8 +: 8]  = gd[u*VB + b];
      end
      for (int b = 0; b < nu * VB; b++) req.group[b*8 +: 8] = g2[b];
      req_valid = 1;
      while (!req_ready) @(negedge clk);
      @(negedge clk);
      req_valid = 0;
      check(resp_valid, "response one cycle after the request");
      if (mv) begin
        logic [63:0] e0;
        e0 = eget(g2, 0, sb);
        if (sb < 8 && e0[8*sb-1]) e0 |= ~m;
        check(resp.data_valid && resp.data == e0 && !resp.we, "vmv.x.s");
      end else begin
        logic [VLEN-1:0] e;
        for (int b = 0; b < VB; b++) e[b*8 +: 8] = ex[u*VB + b];
        check(resp.we && resp.res == e, $sformatf("%s sew=%0d nu=%0d vl=%0d vstart=%0d x=%0d uop %0d:\n %h\n %h",
                                       d.op.name(), 8*sb, nu, vl, vst, d.scalar, u, resp.res, e));
      end
      @(posedge clk);
    end
  endtask

  initial begin
    req_valid = 0; resp_ready = 1; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 800; i++) run_one();
    foreach (ops[i]) check(n_op[ops[i]] > 10, $sformatf("%s exercised", ops[i].name()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
