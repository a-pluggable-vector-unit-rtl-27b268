// tb_vu_vint_exec: self-checking test of the integer SIMD Execute module.
//
// Random instructions (element-wise integer and saturating operations with a vector,
// scalar or immediate second operand, and the integer reductions) over random SEW,
// register groups of 1, 2, 4 or 8 micro-operations, vl and vstart. The test sends the
// micro-operations one by one through req/resp with random response back-pressure and
// compares each written register with an element-by-element model of the instruction,
// including the undisturbed prestart and tail elements. Default VLEN.
module tb_vu_vint_exec;
  import vu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     req_valid, req_ready, resp_valid, resp_ready;
  ex_req_t  req;
  ex_resp_t resp;

  vu_vint_exec dut (
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
  function automatic longint sgn(logic [63:0] v, int sb);
    return (sb == 8) ? longint'(v) : longint'($signed(v << (64 - 8*sb)) >>> (64 - 8*sb));
  endfunction

  function automatic logic [63:0] model(op_e op, logic [63:0] a, logic [63:0] b, int sb);
    logic [63:0] m, r;
    longint sa, sbv, smax, smin;
    logic [64:0] us;
    int sh;
    m = (sb == 8) ? '1 : (64'd1 << (8*sb)) - 1;
    a &= m; b &= m;
    sa = sgn(a, sb); sbv = sgn(b, sb);
    smax = longint'(m >> 1); smin = -smax - 1;
    sh = int'(b % (8*sb));
    case (op)
      OP_ADD, OP_REDSUM: r = a + b;
      OP_SUB:  r = a - b;
      OP_RSUB: r = b - a;
      OP_MINU, OP_REDMINU: r = (a < b) ? a : b;
      OP_MAXU, OP_REDMAXU: r = (a > b) ? a : b;
      OP_MIN, OP_REDMIN: r = (sa < sbv) ? a : b;
      OP_MAX, OP_REDMAX: r = (sa > sbv) ? a : b;
      OP_AND, OP_REDAND: r = a & b;
      OP_OR, OP_REDOR:   r = a | b;
      OP_XOR, OP_REDXOR: r = a ^ b;
      OP_SLL: r = a << sh;
      OP_SRL: r = a >> sh;
      OP_SRA: r = 64'(sa >>> sh);
      OP_MV:  r = b;
      OP_SADDU: begin us = 65'(a) + 65'(b); r = (us > 65'(m)) ? m : us[63:0]; end
      OP_SSUBU: r = (a < b) ? 0 : a - b;
      OP_SADD, OP_SSUB: begin
        // 65-bit signed arithmetic: only SEW = 64 can leave the longint range
        logic signed [64:0] s;
        s = (op == OP_SADD) ? 65'(sa) + 65'(sbv) : 65'(sa) - 65'(sbv);
        if (s > 65'(smax)) r = 64'(smax);
        else if (s < 65'(smin)) r = 64'(smin);
        else r = s[63:0];
      end
      default: r = 'x;
    endcase
    return r & m;
  endfunction

  op_e ops [] = '{OP_ADD, OP_SUB, OP_RSUB, OP_MINU, OP_MIN, OP_MAXU, OP_MAX, OP_AND, OP_OR,
                  OP_XOR, OP_SLL, OP_SRL, OP_SRA, OP_MV, OP_SADDU, OP_SADD, OP_SSUBU, OP_SSUB,
                  OP_REDSUM, OP_REDAND, OP_REDOR, OP_REDXOR, OP_REDMINU, OP_REDMIN,
                  OP_REDMAXU, OP_REDMAX};

  int n_red = 0, n_sat = 0, n_tail = 0, n_bp = 0;

  task automatic run_one();
    vinstr_t d;
    int sb, nu, epr, vlmax, vl, vst;
    bit red;
    d = '0;
    d.op    = ops[$urandom_range(0, ops.size() - 1)];
    d.sew   = 2'($urandom_range(0, 3));
    d.eew   = d.sew;
    red     = (d.op inside {OP_REDSUM, OP_REDAND, OP_REDOR, OP_REDXOR, OP_REDMINU, OP_REDMIN,
                            OP_REDMAXU, OP_REDMAX});
    d.red   = red;
    nu      = 1 << $urandom_range(0, 3);
    d.nuops = 4'(nu);
    sb      = 1 << d.sew;
    epr     = VB / sb;
    vlmax   = epr * nu;
    vl      = ($urandom_range(0, 3) == 0) ? vlmax : $urandom_range(0, vlmax);
    vst     = (red || $urandom_range(0, 2) != 0 || vl == 0) ? 0 : $urandom_range(0, vl - 1);
    d.vl = vl_t'(vl); d.vstart = vl_t'(vst); d.vlmax = vl_t'(vlmax);
    d.use_vs1 = red || ($urandom_range(0, 1) == 1);
    d.scalar  = {$urandom, $urandom};
    if (d.op inside {OP_SADD, OP_SADDU, OP_SSUB, OP_SSUBU}) n_sat++;
    if (red) n_red++;
    if (vl < vlmax) n_tail++;
    foreach (g1[i]) begin g1[i] = 8'($urandom); g2[i] = 8'($urandom); gd[i] = 8'($urandom); end
    ex = gd;
    if (red) begin
      logic [63:0] acc;
      acc = eget(g1, 0, sb);
      for (int e = 0; e < vl; e++) acc = model(d.op, eget(g2, e, sb), acc, sb);
      if (vl > 0) eset(ex, 0, sb, acc);
    end else
      for (int e = vst; e < vl; e++)
        eset(ex, e, sb, model(d.op, eget(g2, e, sb), d.use_vs1 ? eget(g1, e, sb) : d.scalar, sb));
    for (int u = 0; u < nu; u++) begin
      @(negedge clk);
      req = '0;
      req.instr = d;
      req.uop = 4'(u); req.first = (u == 0); req.last = (u == nu - 1);
      for (int b = 0; b < VB; b++) begin
        req.vs1[b*8 +: 8] = red ? g1[b] : g1[u*VB + b];
        req.vs2[b*8 +: 8] = g2[u*VB + b];
        req.vd[b*8 +: 8]  = red ? gd[b] : gd[u*VB + b];
      end
      req_valid = 1;
      while (!req_ready) @(negedge clk);
      @(negedge clk);
      req_valid = 0;
      resp_ready = 0;
      while (!resp_valid) @(negedge clk);
      resp_ready = ($urandom_range(0, 2) != 0);
      while (!resp_ready) begin
        n_bp++;
        check(resp_valid, "response held");
        @(negedge clk);
        resp_ready = ($urandom_range(0, 2) != 0);
      end
      if (red) begin
        check(resp.we == (u == nu - 1), "reduction writes on the last micro-operation only");
        if (u == nu - 1) begin
          logic [VLEN-1:0] e;
          for (int b = 0; b < VB; b++) e[b*8 +: 8] = ex[b];
          check(resp.res == e, $sformatf("%s sew=%0d vl=%0d result", d.op.name(), 8*sb, vl));
        end
      end else begin
        logic [VLEN-1:0] e;
        for (int b = 0; b < VB; b++) e[b*8 +: 8] = ex[u*VB + b];
        check(resp.we, "element-wise op writes");
        check(resp.res == e, $sformatf("%s sew=%0d vl=%0d vstart=%0d uop %0d: %h vs %h",
                                       d.op.name(), 8*sb, vl, vst, u, resp.res, e));
      end
      @(posedge clk);
      resp_ready = 1;
    end
  endtask

  initial begin
    req_valid = 0; resp_ready = 1; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) run_one();
    check(n_red > 20 && n_sat > 20 && n_tail > 100 && n_bp > 50, "coverage");
    $display("reductions=%0d saturating=%0d tail=%0d backpressure=%0d", n_red, n_sat, n_tail, n_bp);
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
