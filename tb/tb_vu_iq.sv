// tb_vu_iq: self-checking test of the vector instruction queue.
//
// Random pushes and pops against a queue model check order and contents, the full
// and empty conditions, and the configuration rule: after a vset{i}vl{i} is accepted
// the input stays closed until cfg_retired_i, while older entries still drain. A flush
// empties the queue and reopens it. Default depth (4).
module tb_vu_iq;
  import vu_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0;
  always #5 clk = ~clk;

  logic      in_valid, in_ready, out_valid, out_ready, cfg_ret, cfg_block;
  iq_entry_t in_e, out_e;

  vu_iq dut (
    .clk_i(clk), .rst_ni(rst_n), .flush_i(flush),
    .in_valid_i(in_valid), .in_ready_o(in_ready), .in_i(in_e),
    .out_valid_o(out_valid), .out_ready_i(out_ready), .out_o(out_e),
    .cfg_retired_i(cfg_ret), .cfg_block_o(cfg_block)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  iq_entry_t model [$];
  bit        blocked = 0;
  int        n_full = 0, n_block = 0, n_cfg = 0, n_pop = 0;

  function automatic iq_entry_t rand_entry(bit cfg);
    iq_entry_t e;
    e = '0;
    e.instr  = {$urandom};
    e.instr[6:0] = 7'b1010111;
    e.instr[14:12] = cfg ? 3'b111 : 3'($urandom_range(0, 6));
    e.id     = id_t'($urandom);
    e.rs1    = {$urandom, $urandom};
    e.rs2    = {$urandom, $urandom};
    e.vl     = vl_t'($urandom);
    return e;
  endfunction

  initial begin
    in_valid = 0; out_ready = 0; cfg_ret = 0; in_e = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 3) != 0);
      in_e      = rand_entry($urandom_range(0, 7) == 0);
      out_ready = ($urandom_range(0, 2) == 0);
      cfg_ret   = blocked && ($urandom_range(0, 9) == 0);
      flush     = (cyc % 997 == 500);
      // combinational outputs
      #1;
      check(in_ready == (!flush && !blocked && model.size() < 4),
            $sformatf("in_ready=%0d size=%0d blocked=%0d", in_ready, model.size(), blocked));
      check(out_valid == (model.size() > 0), "out_valid");
      check(cfg_block == blocked, "cfg_block");
      if (out_valid && model.size() > 0) check(out_e == model[0], "queue head contents");
      if (model.size() == 4) n_full++;
      if (blocked && in_valid) n_block++;
      @(posedge clk);
      if (flush) begin
        model.delete();
        blocked = 0;
      end else begin
        if (out_valid && out_ready) begin void'(model.pop_front()); n_pop++; end
        if (in_valid && in_ready) begin
          model.push_back(in_e);
          if (in_e.instr[14:12] == 3'b111) begin blocked = 1; n_cfg++; end
        end else if (cfg_ret) blocked = 0;
      end
    end
    check(n_full > 0, "queue reached full");
    check(n_block > 0, "input blocked after a configuration instruction");
    check(n_cfg > 10 && n_pop > 100, "traffic");
    $display("full=%0d block=%0d cfg=%0d pops=%0d", n_full, n_block, n_cfg, n_pop);
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
