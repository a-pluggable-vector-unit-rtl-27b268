// vu_vrf: multi-banked vector register file with speculative register copies.
//
// Storage: every architectural register v0..v31 has NCOPY = 2 physical copies. One
// holds the committed (architectural) value, the other is invalid or holds a
// speculative value. Registers are interleaved over NBANKS banks (bank = reg mod
// NBANKS); each bank has one read and one write port per cycle, and the allocator
// grants them to the functional units by static priority (port 0 first). A granted
// read returns its data one cycle later (rvalid), as a synchronous SRAM would.
//
// Copy table: arch_q[r] names the architectural copy and spec_q[r] says that the other
// copy holds the value of an issued but not yet retired instruction. The sequencer
// reads the table at dispatch (rd_sel: the newest copy of every register; wr_sel: the
// copy a writer must use), marks the destination registers of each dispatched
// instruction (alloc), and at retirement promotes them (commit: the speculative copy
// becomes architectural). flush_i discards every speculative copy in one cycle.
//
// Banking, the arbitration of the allocator and the use of register copies for
// speculation follow the document; the number of banks and copies, the static port
// priority and the one-cycle read latency are this design's choices.
module vu_vrf
  import vu_pkg::*;
#(
  parameter int unsigned NPORT  = 3,   // one read and one write port per functional unit
  parameter int unsigned NBANKS = 4
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       flush_i,
  // read ports
  input  logic       rreq_i   [NPORT],
  input  logic [4:0] rreg_i   [NPORT],
  input  logic       rcopy_i  [NPORT],
  output logic       rgnt_o   [NPORT],
  output logic       rvalid_o [NPORT],
  output vreg_t      rdata_o  [NPORT],
  // write ports
  input  logic       wreq_i   [NPORT],
  input  logic [4:0] wreg_i   [NPORT],
  input  logic       wcopy_i  [NPORT],
  input  vreg_t      wdata_i  [NPORT],
  output logic       wgnt_o   [NPORT],
  // copy table
  output regmask_t   rd_sel_o,
  output regmask_t   wr_sel_o,
  output regmask_t   spec_o,
  input  logic       alloc_i,
  input  regmask_t   alloc_mask_i,
  input  logic       commit_i,
  input  regmask_t   commit_mask_i
);
  localparam int unsigned BW    = $clog2(NBANKS);
  localparam int unsigned RPB   = NVREG / NBANKS;     // registers per bank
  localparam int unsigned WORDS = 2 * RPB;            // two copies each
  localparam int unsigned WAW   = $clog2(WORDS);

  regmask_t arch_q, spec_q;

  // ---------------------------------------------------------------- allocator
  logic [NPORT-1:0] rsel [NBANKS];   // one-hot grant per bank
  logic [NPORT-1:0] wsel [NBANKS];

  always_comb begin
    for (int b = 0; b < NBANKS; b++) begin
      logic rtaken, wtaken;
      rtaken = 1'b0; wtaken = 1'b0;
      rsel[b] = '0; wsel[b] = '0;
      for (int p = 0; p < NPORT; p++) begin
        if (rreq_i[p] && (int'(rreg_i[p]) % NBANKS == b) && !rtaken) begin
          rsel[b][p] = 1'b1; rtaken = 1'b1;
        end
        if (wreq_i[p] && (int'(wreg_i[p]) % NBANKS == b) && !wtaken) begin
          wsel[b][p] = 1'b1; wtaken = 1'b1;
        end
      end
    end
    for (int p = 0; p < NPORT; p++) begin
      rgnt_o[p] = 1'b0; wgnt_o[p] = 1'b0;
      for (int b = 0; b < NBANKS; b++) begin
        rgnt_o[p] |= rsel[b][p];
        wgnt_o[p] |= wsel[b][p];
      end
    end
  end

  // ---------------------------------------------------------------- banks
  vreg_t bank_rdata [NBANKS];

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    vreg_t          mem_q [WORDS];
    logic           we, re;
    logic [WAW-1:0] waddr, raddr;
    vreg_t          wdata;

    always_comb begin
      we = 1'b0; re = 1'b0; waddr = '0; raddr = '0; wdata = '0;
      for (int p = 0; p < NPORT; p++) begin
        if (wsel[b][p]) begin
          we = 1'b1;
          waddr = {wcopy_i[p], wreg_i[p][4:BW]};
          wdata = wdata_i[p];
        end
        if (rsel[b][p]) begin
          re = 1'b1;
          raddr = {rcopy_i[p], rreg_i[p][4:BW]};
        end
      end
    end

    always_ff @(posedge clk_i) begin
      if (we) mem_q[waddr] <= wdata;
      if (re) bank_rdata[b] <= mem_q[raddr];
    end
  end

  // read data routing: remember which bank each port read from
  logic [BW-1:0] rbank_q [NPORT];
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int p = 0; p < NPORT; p++) begin
        rvalid_o[p] <= 1'b0;
        rbank_q[p]  <= '0;
      end
    end else begin
      for (int p = 0; p < NPORT; p++) begin
        rvalid_o[p] <= rgnt_o[p];
        rbank_q[p]  <= rreg_i[p][BW-1:0];
      end
    end
  end
  always_comb for (int p = 0; p < NPORT; p++) rdata_o[p] = bank_rdata[rbank_q[p]];

  // ---------------------------------------------------------------- copy table
  assign rd_sel_o = arch_q ^ spec_q;
  assign wr_sel_o = ~arch_q;
  assign spec_o   = spec_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      arch_q <= '0;
      spec_q <= '0;
    end else if (flush_i) begin
      spec_q <= '0;
    end else begin
      if (commit_i) begin
        arch_q <= arch_q ^ commit_mask_i;
      end
      spec_q <= (spec_q & ~(commit_i ? commit_mask_i : '0)) | (alloc_i ? alloc_mask_i : '0);
    end
  end

  // Only registers holding a speculative value can be promoted, and a register is
  // never given a second speculative value before the first retires.
  assert property (@(posedge clk_i) disable iff (!rst_ni || flush_i)
                   commit_i |-> ((commit_mask_i & ~spec_q) == '0));
  assert property (@(posedge clk_i) disable iff (!rst_ni || flush_i)
                   alloc_i |-> ((alloc_mask_i & spec_q & ~(commit_i ? commit_mask_i : '0)) == '0));
endmodule
