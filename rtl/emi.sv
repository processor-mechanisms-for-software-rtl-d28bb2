// emi: external memory interface of a MAP node, with the LTLB inside it.
//
// It serves, one at a time, the operations the cache banks pass on: load
// misses and write-through stores. Each operation is translated by the LTLB,
// whose block status check runs in parallel with the LTLB hit test:
//   LTLB miss        -> ltlb_miss is raised with the address for the LTLB
//                       miss handler thread; the operation waits (stalls)
//                       until the handler writes the entry, then retries;
//   refused          -> a fault goes to the event system, the operation is
//                       discarded (e.g. a reference to a remote block);
//   allowed store    -> the LTLB status becomes dirty, the word is written to
//                       external memory;
//   allowed load     -> the block is read from external memory and returned
//                       to the requesting bank with its status bits.
// Handler writes of block status arrive on cfg_bs_* and update the LTLB.
// The bank requests are arbitrated round-robin. States: IDLE, LOOKUP,
// MISS_WAIT, FAULT, EXT_REQ, EXT_WAIT, FILL; a remote reference takes two
// cycles from acceptance to the fault offered (IDLE, LOOKUP). The external
// memory port is a simple request/response: a read returns a whole block.
// The serialisation, the stall on an LTLB miss and the memory port are this
// design's choices; the LTLB in the EMI follows the chip's block diagram.
module emi
  import mm_pkg::*;
#(
  parameter int NBANK        = 2,
  parameter int LTLB_ENTRIES = 64,
  parameter int LTLB_WAYS    = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  // from the cache banks
  input  logic         miss_valid [NBANK],
  input  mem_req_t     miss_req   [NBANK],
  output logic         miss_ready [NBANK],
  // block fill to the cache banks
  output logic         fill_valid [NBANK],
  output mem_req_t     fill_req,
  output blk_status_e  fill_status,
  output line_t        fill_line,
  // refused operation to the event system
  output logic         flt_valid,
  output fault_t       flt,
  input  logic         flt_ready,
  // LTLB miss handler
  output logic         ltlb_miss,
  output vaddr_t       ltlb_miss_vaddr,
  input  logic         ltlb_fill_valid,
  input  vpn_t         ltlb_fill_vpn,
  input  ppn_t         ltlb_fill_ppn,
  input  page_status_t ltlb_fill_status,
  // handler write of one block's status
  input  logic         cfg_bs_wr,
  input  vaddr_t       cfg_bs_vaddr,
  input  blk_status_e  cfg_bs_status,
  // external memory
  output logic         ext_req_valid,
  output logic         ext_req_write,
  output paddr_t       ext_req_paddr,
  output word_t        ext_req_wdata,
  input  logic         ext_req_ready,
  input  logic         ext_resp_valid,
  input  line_t        ext_resp_line
);

  localparam int BW = (NBANK > 1) ? $clog2(NBANK) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_LOOKUP, S_MISS_WAIT, S_FAULT, S_EXT_REQ, S_EXT_WAIT, S_FILL
  } state_e;

  state_e      state;
  mem_req_t    cur;
  logic [BW-1:0] src, rr;
  paddr_t      paddr_q;
  blk_status_e status_q;
  line_t       line_q;

  // ------------------------------------------------------------ LTLB
  logic        lk_hit, lk_allowed;
  paddr_t      lk_paddr;
  blk_status_e lk_status, lk_next;
  ev_type_e    lk_ev;
  logic [1:0]  upd_valid;
  vaddr_t      upd_vaddr  [2];
  blk_status_e upd_status [2];

  assign upd_valid[0]  = (state == S_LOOKUP) && lk_hit && lk_allowed && (cur.op == OP_STORE);
  assign upd_vaddr[0]  = cur.vaddr;
  assign upd_status[0] = lk_next;
  assign upd_valid[1]  = cfg_bs_wr;
  assign upd_vaddr[1]  = cfg_bs_vaddr;
  assign upd_status[1] = cfg_bs_status;

  ltlb #(.ENTRIES(LTLB_ENTRIES), .WAYS(LTLB_WAYS)) u_ltlb (
    .clk, .rst_n,
    .lk_vaddr       (cur.vaddr),
    .lk_op          (cur.op),
    .lk_hit, .lk_paddr, .lk_status, .lk_allowed,
    .lk_next_status (lk_next),
    .lk_ev,
    .upd_valid, .upd_vaddr, .upd_status,
    .fill_valid     (ltlb_fill_valid),
    .fill_vpn       (ltlb_fill_vpn),
    .fill_ppn       (ltlb_fill_ppn),
    .fill_status    (ltlb_fill_status)
  );

  // ------------------------------------------------------------ arbitration
  logic          pick_v;
  logic [BW-1:0] pick;
  always_comb begin
    pick_v = 1'b0;
    pick   = '0;
    for (int k = NBANK - 1; k >= 0; k--) begin
      if (miss_valid[(int'(rr) + k) % NBANK]) begin
        pick_v = 1'b1;
        pick   = BW'((int'(rr) + k) % NBANK);
      end
    end
    for (int b = 0; b < NBANK; b++)
      miss_ready[b] = (state == S_IDLE) && pick_v && (pick == BW'(b));
  end

  // ------------------------------------------------------------ outputs
  assign ltlb_miss       = (state == S_MISS_WAIT);
  assign ltlb_miss_vaddr = cur.vaddr;
  assign flt_valid       = (state == S_FAULT);
  assign ext_req_valid   = (state == S_EXT_REQ);
  assign ext_req_write   = (cur.op == OP_STORE);
  assign ext_req_paddr   = (cur.op == OP_STORE) ? paddr_q
                         : {paddr_q[PA_W-1:BLOCK_OFF_W], BLOCK_OFF_W'(0)};
  assign ext_req_wdata   = cur.wdata;
  assign fill_req        = cur;
  assign fill_status     = status_q;
  assign fill_line       = line_q;
  always_comb
    for (int b = 0; b < NBANK; b++)
      fill_valid[b] = (state == S_FILL) && (src == BW'(b));

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cur      <= '0;
      src      <= '0;
      rr       <= '0;
      paddr_q  <= '0;
      status_q <= BS_INVALID;
      line_q   <= '0;
      flt      <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (pick_v) begin
          cur   <= miss_req[pick];
          src   <= pick;
          rr    <= BW'((int'(pick) + 1) % NBANK);
          state <= S_LOOKUP;
        end
        S_LOOKUP: begin
          paddr_q  <= lk_paddr;
          status_q <= lk_next;
          flt      <= '{ev: lk_ev, op: cur.op, vaddr: cur.vaddr, data: cur.wdata, dst: cur.dst};
          if (!lk_hit)          state <= S_MISS_WAIT;
          else if (!lk_allowed) state <= S_FAULT;
          else                  state <= S_EXT_REQ;
        end
        S_MISS_WAIT: if (ltlb_fill_valid) state <= S_LOOKUP;
        S_FAULT:     if (flt_ready) state <= S_IDLE;
        S_EXT_REQ:   if (ext_req_ready) state <= (cur.op == OP_STORE) ? S_IDLE : S_EXT_WAIT;
        S_EXT_WAIT:  if (ext_resp_valid) begin
          line_q <= ext_resp_line;
          state  <= S_FILL;
        end
        S_FILL:      state <= S_IDLE;
        default:     state <= S_IDLE;
      endcase
    end
  end

endmodule
