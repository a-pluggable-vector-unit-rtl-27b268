// vu_vwb: vector write back, the last stage of the vector unit.
//
// A combinational, static-priority allocator between the units that finish vector
// instructions (requesters: the sequencer for configuration instructions and encoding
// exceptions, and the functional units) and the NPORT write-back ports that the scalar
// core gives the vector unit. In every cycle the highest-priority requester (lowest
// index) gets port 0, the next one port 1, and so on; a requester that gets no port
// keeps its request (valid/ready, ready = granted). Each port carries the instruction
// tag, an exception with its cause and value, the scalar result, and commands to
// update the vector CSRs (set vl and vtype, set vstart).
//
// Combinational allocation with static priority and a configurable number of ports
// are the document's; the default of two ports and the priority order used by the top
// (sequencer, VINT, VMOV, VLSU) are this design's choices.
module vu_vwb
  import vu_pkg::*;
#(
  parameter int unsigned NREQ  = 4,
  parameter int unsigned NPORT = 2
) (
  input  logic req_valid_i [NREQ],
  output logic req_ready_o [NREQ],
  input  wb_t  req_i       [NREQ],
  output logic port_valid_o [NPORT],
  output wb_t  port_o       [NPORT]
);
  always_comb begin
    int p;
    p = 0;
    for (int k = 0; k < NPORT; k++) begin
      port_valid_o[k] = 1'b0;
      port_o[k]       = '0;
    end
    for (int r = 0; r < NREQ; r++) begin
      req_ready_o[r] = 1'b0;
      if (req_valid_i[r] && p < NPORT) begin
        req_ready_o[r]  = 1'b1;
        port_valid_o[p] = 1'b1;
        port_o[p]       = req_i[r];
        p++;
      end
    end
  end
endmodule
