// tb_vu_vwb: self-checking test of the vector write-back allocator.
//
// Random request patterns from the four requesters (sequencer, VINT, VMOV, VLSU):
// the first NPORT valid requesters in priority order must get a port, in order,
// with their payload unchanged; the others must see ready low. The allocator is
// combinational, so each pattern is checked after it settles. Default parameters.
module tb_vu_vwb;
  import vu_pkg::*;
  localparam int NREQ = 4, NPORT = 2;
  logic req_valid [NREQ], req_ready [NREQ], port_valid [NPORT];
  wb_t  req [NREQ], port [NPORT];

  vu_vwb dut (
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_i(req),
    .port_valid_o(port_valid), .port_o(port)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int n_two = 0, n_stall = 0;
    for (int it = 0; it < 2000; it++) begin
      int p;
      for (int r = 0; r < NREQ; r++) begin
        req_valid[r] = ($urandom_range(0, 1) == 1);
        req[r] = '0;
        req[r].id = id_t'($urandom);
        req[r].data_valid = 1'b1;
        req[r].data = {$urandom, $urandom};
        req[r].ex_valid = $urandom_range(0, 1);
      end
      #1;
      p = 0;
      for (int r = 0; r < NREQ; r++) begin
        if (req_valid[r] && p < NPORT) begin
          check(req_ready[r], $sformatf("requester %0d should be accepted", r));
          check(port_valid[p] && port[p] == req[r], $sformatf("port %0d payload", p));
          p++;
        end else begin
          check(!req_ready[r], $sformatf("requester %0d should wait", r));
          if (req_valid[r]) n_stall++;
        end
      end
      for (int k = p; k < NPORT; k++) check(!port_valid[k], "idle port");
      if (p == 2) n_two++;
      #9;
    end
    check(n_two > 100 && n_stall > 100, "both ports used and requesters stalled");
    $display("two=%0d stall=%0d", n_two, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
