// vu_top: pluggable vector unit for the RISC-V vector extension (Zve64x subset).
//
// The unit sits in the execute stage of a scalar core as one more functional unit.
// The core decodes just enough of a vector instruction to handle its scalar operands,
// then issues it, with its scalar operands and the vector CSRs sampled at issue, into
// the instruction queue. Inside:
//
//   instruction queue -> sequencer -> { VINT, VMOV, VLSU } <-> VRF -> vector write back
//
//  * vu_iq          decouples the core; closes after a vset{i}vl{i} until it retires.
//  * vu_sequencer   decodes, executes configuration instructions, checks
//                   configuration hazards, dispatches EMUL micro-operations.
//  * vu_vrf         banked register file, two copies per register for speculation.
//  * vu_lock_server shared/exclusive register locks, the protocol that orders
//                   micro-operations of different units and allows chaining.
//  * three functional units, each a vu_fu_wrapper (micro-operation queue, read
//    operands, write back) around a SIMD Execute module: vu_vint_exec (integer,
//    fixed point, reductions), vu_vmov_exec (permutations, masks), vu_vlsu_exec
//    (unit-stride memory access through an external MMU). They run and finish out of
//    order with respect to each other.
//  * vu_vwb         static-priority allocator onto NWB write-back ports of the core.
//
// Speculation: results go to the speculative copy of their registers and become
// architectural when the core retires the instruction (commit_i, in issue order).
// flush_i, raised by the core when it takes a trap, drops every speculative copy,
// every lock and every instruction in flight. A vector instruction that traps part way
// (a page fault in the VLSU) reports the vstart of the first element not done; the
// core retires it (commit_i, promoting the elements already done) and then flushes.
//
// Ports: iq_* is a valid/ready issue port; commit_i/commit_id_i a retirement pulse;
// wb_valid_o/wb_o the write-back ports (always accepted by the core); mmu_* a single
// translation port; mem_* a memory port of VLEN/2 bits per beat.
//
// Timing: an issued instruction reaches the sequencer one cycle after it enters the
// queue; dispatch and the lock grant of its first micro-operation happen in the same
// cycle; write-back requests are allocated to ports combinationally.
//
// Lint notes. The lock server's wr_locked_o/rd_locked_o observation outputs and the
// queue's cfg_block_o are left unused here; they serve testbenches and debugging.
// The simulator reports circular logic (UNOPTFLAT) through acq_gnt and wbr_ready.
// Each is one unpacked array written by one instance and read by several, and the
// sequencer computes its lock request and its write-back request in one always_comb
// block; the simulator treats each array and that block as single nodes. Bit by bit
// there is no loop: a requester's grant depends on its own request and on those of
// the requesters before it, never on its own grant.
module vu_top
  import vu_pkg::*;
#(
  parameter int unsigned IQ_DEPTH = 4,
  parameter int unsigned NWB      = 2,
  parameter int unsigned QD       = 2,
  parameter int unsigned NBANKS   = 4,
  parameter int unsigned PAW      = 40
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            flush_i,
  // issue
  input  logic            iq_valid_i,
  output logic            iq_ready_o,
  input  iq_entry_t       iq_i,
  // retirement
  input  logic            commit_i,
  input  id_t             commit_id_i,
  // write back to the scalar core
  output logic            wb_valid_o [NWB],
  output wb_t             wb_o       [NWB],
  // MMU
  output logic            mmu_req_valid_o,
  output logic [63:0]     mmu_vaddr_o,
  output logic            mmu_store_o,
  input  logic            mmu_resp_valid_i,
  input  logic [PAW-1:0]  mmu_paddr_i,
  input  logic            mmu_fault_i,
  // memory
  output logic            mem_req_valid_o,
  input  logic            mem_req_ready_i,
  output logic [PAW-1:0]  mem_addr_o,
  output logic            mem_we_o,
  output logic [MEMW-1:0] mem_wdata_o,
  output logic [MEMB-1:0] mem_be_o,
  input  logic            mem_rvalid_i,
  input  logic [MEMW-1:0] mem_rdata_i,
  // events, for performance observation
  output logic            ev_cfg_hazard_o,   // sequencer stalled by a configuration hazard
  output logic            ev_spec_stall_o,   // destination still speculative
  output logic            ev_lock_stall_o,   // first locks not granted at dispatch
  output logic [NFU-1:0]  ev_lock_wait_o,    // unit waits for the next micro-op's locks
  output logic            ev_xlat_o          // MMU translation performed
);
  // ---------------------------------------------------------------- queue
  logic      sq_valid, sq_ready, cfg_retired, cfg_block;
  iq_entry_t sq;

  vu_iq #(.DEPTH(IQ_DEPTH)) u_iq (
    .clk_i, .rst_ni, .flush_i,
    .in_valid_i(iq_valid_i), .in_ready_o(iq_ready_o), .in_i(iq_i),
    .out_valid_o(sq_valid), .out_ready_i(sq_ready), .out_o(sq),
    .cfg_retired_i(cfg_retired), .cfg_block_o(cfg_block)
  );

  // ---------------------------------------------------------------- sequencer
  logic     disp_valid [NFU];
  logic     disp_ready [NFU];
  vinstr_t  disp;
  logic     run_valid  [NFU][QD];
  vinstr_t  run        [NFU][QD];
  logic     acq_valid  [NFU+1];
  regmask_t acq_rd     [NFU+1];
  regmask_t acq_wr     [NFU+1];
  logic     acq_gnt    [NFU+1];
  regmask_t rel_rd     [NFU];
  regmask_t rel_wr     [NFU];
  regmask_t rd_sel, wr_sel, spec, alloc_mask, commit_mask;
  logic     alloc, vrf_commit;
  logic     wbr_valid  [NFU+1];
  logic     wbr_ready  [NFU+1];
  wb_t      wbr        [NFU+1];

  vu_sequencer #(.QD(QD)) u_seq (
    .clk_i, .rst_ni, .flush_i,
    .iq_valid_i(sq_valid), .iq_ready_o(sq_ready), .iq_i(sq),
    .cfg_retired_o(cfg_retired),
    .commit_i, .commit_id_i,
    .disp_valid_o(disp_valid), .disp_ready_i(disp_ready), .disp_o(disp),
    .run_valid_i(run_valid), .run_i(run),
    .acq_valid_o(acq_valid[NFU]), .acq_rd_o(acq_rd[NFU]), .acq_wr_o(acq_wr[NFU]),
    .acq_gnt_i(acq_gnt[NFU]),
    .rd_sel_i(rd_sel), .wr_sel_i(wr_sel), .spec_i(spec),
    .alloc_o(alloc), .alloc_mask_o(alloc_mask),
    .vrf_commit_o(vrf_commit), .vrf_commit_mask_o(commit_mask),
    .wb_valid_o(wbr_valid[0]), .wb_ready_i(wbr_ready[0]), .wb_o(wbr[0]),
    .ev_cfg_hazard_o, .ev_spec_stall_o, .ev_lock_stall_o
  );

  // ---------------------------------------------------------------- locks and VRF
  vu_lock_server #(.NREQ(NFU + 1), .NREL(NFU)) u_locks (
    .clk_i, .rst_ni, .flush_i,
    .acq_valid_i(acq_valid), .acq_rd_i(acq_rd), .acq_wr_i(acq_wr), .acq_gnt_o(acq_gnt),
    .rel_rd_i(rel_rd), .rel_wr_i(rel_wr),
    .wr_locked_o(), .rd_locked_o()
  );

  logic       rreq [NFU], rcopy [NFU], rgnt [NFU], rvalid [NFU];
  logic [4:0] rreg [NFU];
  vreg_t      rdata [NFU];
  logic       wreq [NFU], wcopy [NFU], wgnt [NFU];
  logic [4:0] wreg [NFU];
  vreg_t      wdata [NFU];

  vu_vrf #(.NPORT(NFU), .NBANKS(NBANKS)) u_vrf (
    .clk_i, .rst_ni, .flush_i,
    .rreq_i(rreq), .rreg_i(rreg), .rcopy_i(rcopy), .rgnt_o(rgnt),
    .rvalid_o(rvalid), .rdata_o(rdata),
    .wreq_i(wreq), .wreg_i(wreg), .wcopy_i(wcopy), .wdata_i(wdata), .wgnt_o(wgnt),
    .rd_sel_o(rd_sel), .wr_sel_o(wr_sel), .spec_o(spec),
    .alloc_i(alloc), .alloc_mask_i(alloc_mask),
    .commit_i(vrf_commit), .commit_mask_i(commit_mask)
  );

  // ---------------------------------------------------------------- functional units
  logic     exq_valid [NFU], exq_ready [NFU], exs_valid [NFU], exs_ready [NFU];
  ex_req_t  exq [NFU];
  ex_resp_t exs [NFU];

  for (genvar f = 0; f < NFU; f++) begin : g_fu
    vu_fu_wrapper #(.QD(QD)) u_wrap (
      .clk_i, .rst_ni, .flush_i,
      .disp_valid_i(disp_valid[f]), .disp_ready_o(disp_ready[f]), .disp_i(disp),
      .run_valid_o(run_valid[f]), .run_o(run[f]),
      .acq_valid_o(acq_valid[f]), .acq_rd_o(acq_rd[f]), .acq_wr_o(acq_wr[f]),
      .acq_gnt_i(acq_gnt[f]), .rel_rd_o(rel_rd[f]), .rel_wr_o(rel_wr[f]),
      .rreq_o(rreq[f]), .rreg_o(rreg[f]), .rcopy_o(rcopy[f]), .rgnt_i(rgnt[f]),
      .rvalid_i(rvalid[f]), .rdata_i(rdata[f]),
      .wreq_o(wreq[f]), .wreg_o(wreg[f]), .wcopy_o(wcopy[f]), .wdata_o(wdata[f]),
      .wgnt_i(wgnt[f]),
      .ex_req_valid_o(exq_valid[f]), .ex_req_ready_i(exq_ready[f]), .ex_req_o(exq[f]),
      .ex_resp_valid_i(exs_valid[f]), .ex_resp_ready_o(exs_ready[f]), .ex_resp_i(exs[f]),
      .wb_valid_o(wbr_valid[f+1]), .wb_ready_i(wbr_ready[f+1]), .wb_o(wbr[f+1]),
      .ev_lock_wait_o(ev_lock_wait_o[f])
    );
  end

  vu_vint_exec u_vint (
    .clk_i, .rst_ni, .flush_i,
    .req_valid_i(exq_valid[FU_VINT]), .req_ready_o(exq_ready[FU_VINT]), .req_i(exq[FU_VINT]),
    .resp_valid_o(exs_valid[FU_VINT]), .resp_ready_i(exs_ready[FU_VINT]), .resp_o(exs[FU_VINT])
  );

  vu_vmov_exec u_vmov (
    .clk_i, .rst_ni, .flush_i,
    .req_valid_i(exq_valid[FU_VMOV]), .req_ready_o(exq_ready[FU_VMOV]), .req_i(exq[FU_VMOV]),
    .resp_valid_o(exs_valid[FU_VMOV]), .resp_ready_i(exs_ready[FU_VMOV]), .resp_o(exs[FU_VMOV])
  );

  vu_vlsu_exec #(.PAW(PAW)) u_vlsu (
    .clk_i, .rst_ni, .flush_i,
    .req_valid_i(exq_valid[FU_VLSU]), .req_ready_o(exq_ready[FU_VLSU]), .req_i(exq[FU_VLSU]),
    .resp_valid_o(exs_valid[FU_VLSU]), .resp_ready_i(exs_ready[FU_VLSU]), .resp_o(exs[FU_VLSU]),
    .mmu_req_valid_o, .mmu_vaddr_o, .mmu_store_o, .mmu_resp_valid_i, .mmu_paddr_i, .mmu_fault_i,
    .mem_req_valid_o, .mem_req_ready_i, .mem_addr_o, .mem_we_o, .mem_wdata_o, .mem_be_o,
    .mem_rvalid_i, .mem_rdata_i,
    .ev_xlat_o
  );

  // ---------------------------------------------------------------- write back
  vu_vwb #(.NREQ(NFU + 1), .NPORT(NWB)) u_vwb (
    .req_valid_i(wbr_valid), .req_ready_o(wbr_ready), .req_i(wbr),
    .port_valid_o(wb_valid_o), .port_o(wb_o)
  );
endmodule
