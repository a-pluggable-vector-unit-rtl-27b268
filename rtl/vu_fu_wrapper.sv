// vu_fu_wrapper: the part common to every vector functional unit.
//
// A functional unit is this wrapper plus one function-specific SIMD Execute module.
// The wrapper hides the rest of the vector unit behind a simple request/response
// interface (ex_req / ex_resp) so that a new execute module needs to know nothing
// about the register file, the locks or the write back. It contains the three parts
// the document names, as consecutive phases of one controller:
//
//  * micro-operation queue: QD instruction descriptors from the sequencer. The head
//    instruction is expanded into its nuops micro-operations, one vector register each.
//  * SIMD Read Operands: reads the registers micro-operation u needs (vs1, vs2, the
//    old destination / store data, and for whole-group instructions the complete vs2
//    group once, with uop 0) through the unit's VRF read port, from the copies chosen
//    at dispatch, and hands them to the execute module.
//  * SIMD Write-Back: writes the result into the speculative copy of the destination
//    register and, after the last micro-operation, sends completion, exception and
//    scalar result to the vector write back.
//
// Locking protocol (hand over hand): the sequencer acquires the locks of uop 0 at
// dispatch. While uop u is read, executed and written, the wrapper acquires the locks
// of uop u+1; the locks of uop u are released only when uop u has been written (or
// needs no write) and those of uop u+1 are held. Locks of whole-group sources and of
// reduction destinations are held until the instruction ends. This ordering is what
// lets a faster unit chain behind a slower one register by register without passing
// it. That the locks of uop u+1 are taken before those of u are released is the
// document's rule; holding the write lock too until then is this design's reading.
//
// Timing: one micro-operation at a time; reads are issued one per cycle and return a
// cycle after their grant; the execute module may take any number of cycles.
module vu_fu_wrapper
  import vu_pkg::*;
#(
  parameter int unsigned QD = 2
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       flush_i,
  // from the sequencer
  input  logic       disp_valid_i,
  output logic       disp_ready_o,
  input  vinstr_t    disp_i,
  output logic       run_valid_o [QD],
  output vinstr_t    run_o       [QD],
  // lock server
  output logic       acq_valid_o,
  output regmask_t   acq_rd_o,
  output regmask_t   acq_wr_o,
  input  logic       acq_gnt_i,
  output regmask_t   rel_rd_o,
  output regmask_t   rel_wr_o,
  // VRF read port
  output logic       rreq_o,
  output logic [4:0] rreg_o,
  output logic       rcopy_o,
  input  logic       rgnt_i,
  input  logic       rvalid_i,
  input  vreg_t      rdata_i,
  // VRF write port
  output logic       wreq_o,
  output logic [4:0] wreg_o,
  output logic       wcopy_o,
  output vreg_t      wdata_o,
  input  logic       wgnt_i,
  // SIMD Execute
  output logic       ex_req_valid_o,
  input  logic       ex_req_ready_i,
  output ex_req_t    ex_req_o,
  input  logic       ex_resp_valid_i,
  output logic       ex_resp_ready_o,
  input  ex_resp_t   ex_resp_i,
  // vector write back
  output logic       wb_valid_o,
  input  logic       wb_ready_i,
  output wb_t        wb_o,
  // observation: a micro-operation waits for the locks of the next one
  output logic       ev_lock_wait_o
);
  localparam int unsigned QW = (QD > 1) ? $clog2(QD) : 1;

  typedef enum logic [2:0] { S_IDLE, S_READ, S_EXEC, S_RESP, S_WRITE, S_WB } state_e;

  // ---------------------------------------------------------------- uop queue
  vinstr_t        q_q [QD];
  logic [QD-1:0]  qv_q;
  logic [QW-1:0]  head_q;
  logic           pop;
  vinstr_t        cur;
  logic [QW-1:0]  tail;
  logic           has_free;

  assign cur          = q_q[head_q];
  assign disp_ready_o = has_free;

  always_comb
    for (int i = 0; i < QD; i++) begin
      run_valid_o[i] = qv_q[i];
      run_o[i]       = q_q[i];
    end

  // free slot: the one after the youngest, i.e. the first invalid slot from head
  always_comb begin
    tail = head_q;
    has_free = 1'b0;
    for (int i = QD - 1; i >= 0; i--)
      if (!qv_q[(int'(head_q) + i) % QD]) begin
        tail = QW'((int'(head_q) + i) % QD);
        has_free = 1'b1;
      end
  end

  // ---------------------------------------------------------------- controller
  state_e          state_q;
  logic [3:0]      uop_q;
  logic [3:0]      slot_q;        // read slot: 0..7 group, 8 vs1, 9 vs2, 10 vd
  logic            pend_q;        // a granted read waits for its data
  logic [3:0]      pend_slot_q;
  logic            next_q;        // locks of uop+1 held
  logic            written_q;
  ex_req_t         req_q;
  ex_resp_t        resp_q;
  logic            exc_q;
  ex_resp_t        excinfo_q;
  logic            data_v_q;
  logic [XLEN-1:0] data_q;

  logic            last;
  assign last = (uop_q == cur.nuops - 1'b1);

  // registers of each read slot
  function automatic logic slot_en(vinstr_t x, logic [3:0] u, logic [3:0] s);
    if (s < 8)  return x.whole && x.use_vs2 && (u == 0) && (s < x.nuops);
    if (s == 8) return x.use_vs1 && (!x.red || u == 0);
    if (s == 9) return x.use_vs2 && !x.whole;
    if (s == 10) return x.wr_vd || (x.op == OP_STORE);
    return 1'b0;
  endfunction

  function automatic logic [4:0] slot_reg(vinstr_t x, logic [3:0] u, logic [3:0] s);
    if (s < 8)  return x.vs2 + 5'(s);
    if (s == 8) return x.red ? x.vs1 : x.vs1 + 5'(u);
    if (s == 9) return x.vs2 + 5'(u);
    return x.red ? x.vd : x.vd + 5'(u);
  endfunction

  logic [3:0] slot_nxt;   // first enabled slot at or after slot_q
  always_comb begin
    slot_nxt = 4'd11;
    for (int s = 10; s >= 0; s--)
      if (s >= int'(slot_q) && slot_en(cur, uop_q, 4'(s))) slot_nxt = 4'(s);
  end

  logic [4:0] wreg;
  assign wreg = cur.red ? cur.vd : cur.vd + 5'(uop_q);

  regmask_t step_rd, step_wr, nxt_rd, nxt_wr, held_rd, held_wr;
  always_comb begin
    uop_locks(cur, uop_q, step_rd, step_wr);
    uop_locks(cur, uop_q + 1'b1, nxt_rd, nxt_wr);
    held_locks(cur, held_rd, held_wr);
  end

  logic step_done;
  assign step_done = (state_q == S_WRITE) && (!resp_q.we || written_q || (wreq_o && wgnt_i)) && (last || next_q);

  always_comb begin
    // lock acquisition for the next micro-operation
    acq_valid_o = (state_q inside {S_READ, S_EXEC, S_RESP, S_WRITE}) && !last && !next_q;
    acq_rd_o    = nxt_rd;
    acq_wr_o    = nxt_wr;
    ev_lock_wait_o = acq_valid_o && !acq_gnt_i && (state_q == S_WRITE);

    rel_rd_o = '0;
    rel_wr_o = '0;
    if (step_done) begin
      rel_rd_o = step_rd & ~held_rd;
      rel_wr_o = step_wr & ~held_wr;
      if (last) begin
        rel_rd_o |= held_rd;
        rel_wr_o |= held_wr;
      end
    end

    rreq_o  = (state_q == S_READ) && (slot_nxt != 4'd11);
    rreg_o  = slot_reg(cur, uop_q, slot_nxt);
    rcopy_o = cur.rd_sel[rreg_o];

    wreq_o  = (state_q == S_WRITE) && resp_q.we && !written_q;
    wreg_o  = wreg;
    wcopy_o = cur.wr_sel[wreg];
    wdata_o = resp_q.res;

    ex_req_valid_o  = (state_q == S_EXEC);
    ex_req_o        = req_q;
    ex_req_o.instr  = cur;
    ex_req_o.uop    = uop_q;
    ex_req_o.first  = (uop_q == 0);
    ex_req_o.last   = last;
    ex_resp_ready_o = (state_q == S_RESP);

    wb_valid_o = (state_q == S_WB);
    wb_o = '0;
    wb_o.id         = cur.id;
    wb_o.ex_valid   = exc_q;
    wb_o.ex_cause   = excinfo_q.ex_cause;
    wb_o.ex_tval    = excinfo_q.ex_tval;
    wb_o.data_valid = data_v_q;
    wb_o.data       = data_q;
    wb_o.set_vstart = exc_q || (cur.vstart != '0);
    wb_o.vstart     = exc_q ? excinfo_q.ex_vstart : '0;
  end

  assign pop = (state_q == S_WB) && wb_ready_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      qv_q      <= '0;
      head_q    <= '0;
      state_q   <= S_IDLE;
      uop_q     <= '0;
      slot_q    <= '0;
      pend_q    <= 1'b0;
      pend_slot_q <= '0;
      next_q    <= 1'b0;
      written_q <= 1'b0;
      exc_q     <= 1'b0;
      data_v_q  <= 1'b0;
      data_q    <= '0;
      req_q     <= '0;
      resp_q    <= '0;
      excinfo_q <= '0;
      for (int i = 0; i < QD; i++) q_q[i] <= '0;
    end else if (flush_i) begin
      qv_q    <= '0;
      head_q  <= '0;
      state_q <= S_IDLE;
      pend_q  <= 1'b0;
    end else begin
      if (disp_valid_i && disp_ready_o) begin
        q_q[tail]  <= disp_i;
        qv_q[tail] <= 1'b1;
      end
      if (pop) begin
        qv_q[head_q] <= 1'b0;
        head_q <= (head_q == QW'(QD - 1)) ? '0 : head_q + 1'b1;
      end
      if (acq_valid_o && acq_gnt_i) next_q <= 1'b1;

      // read data capture
      if (pend_q && rvalid_i) begin
        pend_q <= 1'b0;
        if (pend_slot_q < 8)       req_q.group[int'(pend_slot_q)*VLEN +: VLEN] <= rdata_i;
        else if (pend_slot_q == 8) req_q.vs1 <= rdata_i;
        else if (pend_slot_q == 9) req_q.vs2 <= rdata_i;
        else                       req_q.vd  <= rdata_i;
      end

      case (state_q)
        S_IDLE: if (qv_q[head_q]) begin
          state_q  <= S_READ;
          uop_q    <= '0;
          slot_q   <= '0;
          next_q   <= 1'b0;
          exc_q    <= 1'b0;
          data_v_q <= 1'b0;
        end
        S_READ: begin
          if (rreq_o && rgnt_i) begin
            pend_q      <= 1'b1;
            pend_slot_q <= slot_nxt;
            slot_q      <= slot_nxt + 1'b1;
          end else if (!rreq_o && !pend_q) begin
            state_q <= S_EXEC;
          end
        end
        S_EXEC: if (ex_req_ready_i) state_q <= S_RESP;
        S_RESP: if (ex_resp_valid_i) begin
          resp_q    <= ex_resp_i;
          written_q <= 1'b0;
          state_q   <= S_WRITE;
          if (ex_resp_i.ex_valid && !exc_q) begin
            exc_q     <= 1'b1;
            excinfo_q <= ex_resp_i;
          end
          if (ex_resp_i.data_valid) begin
            data_v_q <= 1'b1;
            data_q   <= ex_resp_i.data;
          end
        end
        S_WRITE: begin
          if (wreq_o && wgnt_i) written_q <= 1'b1;
          if (step_done) begin
            if (last) state_q <= S_WB;
            else begin
              uop_q   <= uop_q + 1'b1;
              slot_q  <= '0;
              next_q  <= 1'b0;
              state_q <= S_READ;
            end
          end
        end
        S_WB: if (wb_ready_i) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A read is only issued while no other read of this unit is outstanding.
  assert property (@(posedge clk_i) disable iff (!rst_ni) rreq_o |-> !pend_q || rvalid_i);
endmodule
