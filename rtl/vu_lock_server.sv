// vu_lock_server: shared/exclusive locks on the vector registers.
//
// The VRF allocator acts as a lock server for the locking protocol that orders the
// micro-operations of different functional units. Every architectural register has an
// exclusive (write) lock bit and a count of shared (read) holders. A requester asks
// for a set of read locks and a set of write locks at once; the request is granted in
// the same cycle, all or nothing, when no requested register is write-locked and no
// register requested for writing is read-locked. Releases take effect at the next
// clock edge.
//
// Requesters are served in index order within a cycle and see the locks granted to
// lower indices in that cycle. The top connects the functional units to the low
// indices and the sequencer (youngest instruction) to the highest one. The two-phase
// shared lock idea is the document's; the encoding (bit plus counter), the all-or-
// nothing grant and the fixed service order are this design's choices.
module vu_lock_server
  import vu_pkg::*;
#(
  parameter int unsigned NREQ = 4,   // acquiring requesters
  parameter int unsigned NREL = 3,   // releasing holders
  parameter int unsigned CNTW = 3    // width of the shared-lock counters
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  logic     flush_i,                 // drops every lock
  input  logic     acq_valid_i [NREQ],
  input  regmask_t acq_rd_i    [NREQ],
  input  regmask_t acq_wr_i    [NREQ],
  output logic     acq_gnt_o   [NREQ],
  input  regmask_t rel_rd_i    [NREL],
  input  regmask_t rel_wr_i    [NREL],
  output regmask_t wr_locked_o,
  output regmask_t rd_locked_o
);
  logic [CNTW-1:0] rd_cnt_q [NVREG];
  logic [CNTW-1:0] rd_cnt_d [NVREG];
  regmask_t        wr_q, wr_d;

  always_comb begin
    regmask_t any_rd;
    regmask_t tmp_wr;
    regmask_t tmp_rd;
    tmp_wr = wr_q;
    for (int r = 0; r < NVREG; r++) any_rd[r] = (rd_cnt_q[r] != '0);
    tmp_rd = any_rd;
    for (int q = 0; q < NREQ; q++) begin
      acq_gnt_o[q] = acq_valid_i[q]
                     && ((acq_rd_i[q] & tmp_wr) == '0)
                     && ((acq_wr_i[q] & (tmp_wr | tmp_rd)) == '0);
      if (acq_gnt_o[q]) begin
        tmp_wr |= acq_wr_i[q];
        tmp_rd |= acq_rd_i[q];
      end
    end
    // next state: grants and releases
    wr_d = wr_q;
    for (int r = 0; r < NVREG; r++) begin
      logic [CNTW-1:0] c;
      c = rd_cnt_q[r];
      for (int q = 0; q < NREQ; q++) begin
        if (acq_gnt_o[q] && acq_wr_i[q][r]) wr_d[r] = 1'b1;
        if (acq_gnt_o[q] && acq_rd_i[q][r]) c = c + 1'b1;
      end
      for (int h = 0; h < NREL; h++) begin
        if (rel_wr_i[h][r]) wr_d[r] = 1'b0;
        if (rel_rd_i[h][r] && c != '0) c = c - 1'b1;
      end
      rd_cnt_d[r] = c;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wr_q <= '0;
      for (int r = 0; r < NVREG; r++) rd_cnt_q[r] <= '0;
    end else if (flush_i) begin
      wr_q <= '0;
      for (int r = 0; r < NVREG; r++) rd_cnt_q[r] <= '0;
    end else begin
      wr_q <= wr_d;
      for (int r = 0; r < NVREG; r++) rd_cnt_q[r] <= rd_cnt_d[r];
    end
  end

  always_comb begin
    wr_locked_o = wr_q;
    for (int r = 0; r < NVREG; r++) rd_locked_o[r] = (rd_cnt_q[r] != '0);
  end

  // A register is never held for writing and for reading at the same time.
  assert property (@(posedge clk_i) disable iff (!rst_ni) (wr_locked_o & rd_locked_o) == '0);
endmodule
