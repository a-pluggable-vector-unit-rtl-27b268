// vu_iq: instruction queue between the scalar core and the vector unit.
//
// A FIFO of DEPTH entries. Each entry carries the vector instruction, its scalar
// operands and the vector CSRs (vl, vtype, vstart) the core sampled at issue, so the
// vector unit executes it in the context it was issued in. The queue gives the core
// back-pressure (in_ready) and decouples it from the sequencer.
//
// Configuration instructions (vsetvli, vsetivli, vsetvl) change the CSRs that later
// instructions sample. Once one is accepted, the queue refuses further instructions
// until cfg_retired_i reports that it retired and the CSRs were updated; that rule is
// the document's. The depth (4) and the place where the rule is enforced (at the
// queue input, by recognising the configuration encoding) are this design's choice.
//
// Timing: in_valid/in_ready and out_valid/out_ready are valid/ready handshakes;
// an entry can be written and read in the same cycle. flush_i empties the queue and
// drops a pending configuration block.
module vu_iq
  import vu_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  logic      flush_i,
  input  logic      in_valid_i,
  output logic      in_ready_o,
  input  iq_entry_t in_i,
  output logic      out_valid_o,
  input  logic      out_ready_i,
  output iq_entry_t out_o,
  input  logic      cfg_retired_i,   // the pending configuration instruction retired
  output logic      cfg_block_o      // input closed until the configuration retires
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  iq_entry_t        mem_q [DEPTH];
  logic [AW-1:0]    rd_ptr_q, wr_ptr_q;
  logic [AW:0]      cnt_q;
  logic             block_q;
  logic             push, pop, in_cfg;

  assign in_cfg      = (in_i.instr[6:0] == 7'b1010111) && (in_i.instr[14:12] == 3'b111);
  assign in_ready_o  = (cnt_q < (AW+1)'(DEPTH)) && !block_q && !flush_i;
  assign out_valid_o = (cnt_q != '0);
  assign out_o       = mem_q[rd_ptr_q];
  assign push        = in_valid_i && in_ready_o;
  assign pop         = out_valid_o && out_ready_i;
  assign cfg_block_o = block_q;

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_ptr_q <= '0;
      wr_ptr_q <= '0;
      cnt_q    <= '0;
      block_q  <= 1'b0;
    end else if (flush_i) begin
      rd_ptr_q <= '0;
      wr_ptr_q <= '0;
      cnt_q    <= '0;
      block_q  <= 1'b0;
    end else begin
      if (push) begin
        mem_q[wr_ptr_q] <= in_i;
        wr_ptr_q        <= nxt(wr_ptr_q);
      end
      if (pop) rd_ptr_q <= nxt(rd_ptr_q);
      cnt_q <= cnt_q + (AW+1)'(push) - (AW+1)'(pop);
      if (push && in_cfg)      block_q <= 1'b1;
      else if (cfg_retired_i)  block_q <= 1'b0;
    end
  end

  // A full queue never accepts, an empty one never delivers.
  assert property (@(posedge clk_i) disable iff (!rst_ni) cnt_q <= (AW+1)'(DEPTH));
  assert property (@(posedge clk_i) disable iff (!rst_ni) block_q |-> !in_ready_o);
endmodule
