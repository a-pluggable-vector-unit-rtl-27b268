// vu_vlsu_exec: SIMD Execute of the vector load/store unit (VLSU).
//
// Executes unit-stride loads and stores (vle8/16/32/64.v, vse8/16/32/64.v), one
// destination (or source) register per micro-operation. Register u of the group holds
// the bytes [base + u*VLENB, base + (u+1)*VLENB) of memory. They are moved in beats of
// MEMB = VLENB/2 bytes, the width of the memory port (VLEN/2 bits per cycle), aligned
// to MEMB; an unaligned register takes three beats instead of two. Beats that hold no
// active element ([vstart, vl)) are skipped.
//
// Virtual memory: addresses go through a single external MMU. The unit remembers the
// last translated page of the instruction and asks the MMU again only when a beat
// enters another 4 KiB page, which keeps the translations to one per page touched.
// A translation fault makes the access precise: the first active element of the
// faulting page becomes the reported vstart, every element before it has been loaded
// or stored, none at or after it is touched, and the remaining micro-operations only
// keep the old register values. A base address not aligned to the element size raises
// an address-misaligned exception before any element is accessed.
//
// Interfaces: req/resp to the FU wrapper; MMU: mmu_req_valid_o held until
// mmu_resp_valid_i (one outstanding); memory: mem_req_valid_o/mem_req_ready_i, read
// data returns in order with mem_rvalid_i. There is no store-to-load forwarding.
// The beat width, the single MMU and the precise traps follow the document; the beat
// sequencing, the page-granular translation reuse and the alignment rule are this
// design's choices.
module vu_vlsu_exec
  import vu_pkg::*;
#(
  parameter int unsigned PAW = 40    // physical address width (Sv39 systems)
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            flush_i,
  input  logic            req_valid_i,
  output logic            req_ready_o,
  input  ex_req_t         req_i,
  output logic            resp_valid_o,
  input  logic            resp_ready_i,
  output ex_resp_t        resp_o,
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
  // observation
  output logic            ev_xlat_o
);
  localparam int unsigned NBMAX = VLENB / MEMB + 1;   // beats per register, unaligned
  localparam int unsigned OFFW  = $clog2(MEMB);

  typedef enum logic [2:0] { L_IDLE, L_BEAT, L_XLAT, L_MEM, L_RDATA, L_RESP } lstate_e;

  lstate_e            st_q;
  ex_req_t            r_q;
  logic [1:0]         beat_q;
  logic [NBMAX*MEMW-1:0] buf_q;
  logic               pg_valid_q;
  logic [51:0]        vpage_q;
  logic [PAW-13:0]    ppage_q;
  vl_t                limit_q;      // elements at or beyond limit are not accessed
  logic               exc_q;        // exception raised in this micro-operation
  logic [5:0]         cause_q;
  logic [63:0]        tval_q;

  vinstr_t            d;
  logic [63:0]        start, a0, bva;
  logic [OFFW-1:0]    off;
  logic [1:0]         nbeats;
  logic [VLENB-1:0]   act;          // active register bytes
  logic [MEMB-1:0]    bbe;          // active bytes of the current beat
  logic [MEMW-1:0]    bdata;        // store data of the current beat
  logic [63:0]        first_act_va;

  vl_t                eff_vl;

  always_comb begin
    d      = r_q.instr;
    start  = d.scalar + 64'(int'(r_q.uop) * VLENB);
    off    = start[OFFW-1:0];
    a0     = {start[63:OFFW], {OFFW{1'b0}}};
    nbeats = (off == '0) ? 2'(VLENB / MEMB) : 2'(VLENB / MEMB + 1);
    bva    = a0 + 64'(int'(beat_q) * MEMB);
    eff_vl = (limit_q < d.vl) ? limit_q : d.vl;
    act    = active_bytes(r_q.uop, d.eew, d.vstart, eff_vl);
    bbe    = '0;
    bdata  = '0;
    first_act_va = bva;
    for (int k = MEMB - 1; k >= 0; k--) begin
      int rb;
      rb = int'(beat_q) * MEMB + k - int'(off);
      if (rb >= 0 && rb < VLENB) begin
        bbe[k] = act[rb];
        bdata[k*8 +: 8] = r_q.vd[rb*8 +: 8];
        if (act[rb]) first_act_va = bva + 64'(k);
      end
    end
  end

  assign req_ready_o     = (st_q == L_IDLE);
  assign resp_valid_o    = (st_q == L_RESP);
  assign mmu_req_valid_o = (st_q == L_XLAT);
  assign mmu_vaddr_o     = bva;
  assign mmu_store_o     = (d.op == OP_STORE);
  assign mem_req_valid_o = (st_q == L_MEM);
  assign mem_addr_o      = {ppage_q, bva[11:0]};
  assign mem_we_o        = (d.op == OP_STORE);
  assign mem_wdata_o     = bdata;
  assign mem_be_o        = bbe;
  assign ev_xlat_o       = mmu_req_valid_o && mmu_resp_valid_i;

  // load result: the register's bytes out of the beat buffer
  vreg_t loaded;
  always_comb
    for (int b = 0; b < VLENB; b++) loaded[b*8 +: 8] = buf_q[(b + int'(off))*8 +: 8];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st_q       <= L_IDLE;
      r_q        <= '0;
      beat_q     <= '0;
      buf_q      <= '0;
      pg_valid_q <= 1'b0;
      vpage_q    <= '0;
      ppage_q    <= '0;
      limit_q    <= '0;
      exc_q      <= 1'b0;
      cause_q    <= '0;
      tval_q     <= '0;
      resp_o     <= '0;
    end else if (flush_i) begin
      st_q <= L_IDLE;
    end else begin
      case (st_q)
        L_IDLE: if (req_valid_i) begin
          r_q    <= req_i;
          beat_q <= '0;
          exc_q  <= 1'b0;
          st_q   <= L_BEAT;
          if (req_i.first) begin
            pg_valid_q <= 1'b0;
            limit_q    <= '1;
            if ((req_i.instr.scalar & ((64'd1 << req_i.instr.eew) - 64'd1)) != '0) begin
              limit_q <= req_i.instr.vstart;
              exc_q   <= 1'b1;
              cause_q <= (req_i.instr.op == OP_STORE) ? CAUSE_ST_MISAL : CAUSE_LD_MISAL;
              tval_q  <= req_i.instr.scalar;
            end
          end
        end
        L_BEAT: begin
          if (beat_q == nbeats) begin
            st_q <= L_RESP;
            resp_o <= '0;
            resp_o.we  <= (d.op == OP_LOAD);
            resp_o.res <= merge_bytes(r_q.vd, loaded, act);
            resp_o.ex_valid  <= exc_q;
            resp_o.ex_cause  <= cause_q;
            resp_o.ex_tval   <= tval_q;
            resp_o.ex_vstart <= limit_q;
          end else if (bbe == '0) begin
            beat_q <= beat_q + 1'b1;
          end else if (!pg_valid_q || vpage_q != bva[63:12]) begin
            st_q <= L_XLAT;
          end else begin
            st_q <= L_MEM;
          end
        end
        L_XLAT: if (mmu_resp_valid_i) begin
          if (mmu_fault_i) begin
            limit_q <= vl_t'((first_act_va - d.scalar) >> d.eew);
            exc_q   <= 1'b1;
            cause_q <= (d.op == OP_STORE) ? CAUSE_ST_PF : CAUSE_LD_PF;
            tval_q  <= first_act_va;
            beat_q  <= beat_q + 1'b1;
            st_q    <= L_BEAT;
          end else begin
            pg_valid_q <= 1'b1;
            vpage_q    <= bva[63:12];
            ppage_q    <= mmu_paddr_i[PAW-1:12];
            st_q       <= L_MEM;
          end
        end
        L_MEM: if (mem_req_ready_i) begin
          if (d.op == OP_STORE) begin
            beat_q <= beat_q + 1'b1;
            st_q   <= L_BEAT;
          end else begin
            st_q <= L_RDATA;
          end
        end
        L_RDATA: if (mem_rvalid_i) begin
          buf_q[int'(beat_q)*MEMW +: MEMW] <= mem_rdata_i;
          beat_q <= beat_q + 1'b1;
          st_q   <= L_BEAT;
        end
        L_RESP: if (resp_ready_i) st_q <= L_IDLE;
        default: st_q <= L_IDLE;
      endcase
    end
  end

  // The memory port only sees bytes of active elements.
  assert property (@(posedge clk_i) disable iff (!rst_ni) mem_req_valid_o |-> mem_be_o != '0);
endmodule
