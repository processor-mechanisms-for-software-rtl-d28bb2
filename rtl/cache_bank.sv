// cache_bank: one of the two cache banks of a MAP node, holding with every
// line a copy of the block status bits of the 8-word block it caches.
//
// Addresses are interleaved between the banks by block; the bank sees only
// its own blocks. A request is looked up one cycle after it is accepted (stage
// s1): the tag compare and the block status check (bsb_check) run side by
// side. Outcomes:
//   hit, allowed load   -> the word is returned on resp_*;
//   hit, allowed store  -> the word is written, the line's status becomes
//                          dirty, and the store is passed to the EMI (write-
//                          through) so the LTLB status and memory follow;
//   hit, refused        -> a fault is offered to the event system and the
//                          operation is discarded;
//   miss                -> the operation is passed to the EMI, which checks
//                          the LTLB status bits and, for an allowed load,
//                          returns the block with its status on fill_*.
// A fill writes the line and returns the requested word on resp_* in the same
// cycle; s1 waits during a fill cycle. inv_* drops the line of a block whose
// status a handler changed. s1 also waits while the EMI or event path is not
// ready (req_ready low). Direct-mapped organisation, write-through with no
// write-allocate, and the handshakes are this design's choices; the status
// copy per line and the parallel check follow the block status mechanism.
// LINES = 512 per bank x 2 bits x 2 banks gives the 0.25 KB of status storage.
module cache_bank
  import mm_pkg::*;
#(
  parameter int LINES     = 512,
  parameter int BANK_BITS = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // request from the memory switch
  input  logic        req_valid,
  input  mem_req_t    req,
  output logic        req_ready,
  // load response
  output logic        resp_valid,
  output dst_t        resp_dst,
  output word_t       resp_data,
  // to the EMI: misses and write-through stores
  output logic        emi_valid,
  output mem_req_t    emi_req,
  input  logic        emi_ready,
  // refused operation to the event system
  output logic        flt_valid,
  output fault_t      flt,
  input  logic        flt_ready,
  // line fill from the EMI
  input  logic        fill_valid,
  input  mem_req_t    fill_req,
  input  blk_status_e fill_status,
  input  line_t       fill_line,
  // invalidate one block
  input  logic        inv_valid,
  input  vaddr_t      inv_vaddr,
  // activity
  output logic        hit_pulse,
  output logic        miss_pulse
);

  localparam int IDX_W = $clog2(LINES);
  localparam int IDX_LO = BLOCK_OFF_W + BANK_BITS;
  localparam int TAG_W = VA_W - IDX_LO - IDX_W;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  logic        valid  [LINES];
  tag_t        tag    [LINES];
  blk_status_e status [LINES];
  line_t       data   [LINES];

  function automatic idx_t idx_of(vaddr_t a);
    return a[IDX_LO +: IDX_W];
  endfunction
  function automatic tag_t tag_of(vaddr_t a);
    return a[VA_W-1 -: TAG_W];
  endfunction
  function automatic logic [2:0] wsel(vaddr_t a);
    return a[BLOCK_OFF_W-1:WORD_OFF_W];
  endfunction

  // ------------------------------------------------------------ stage s1
  logic     s1_valid;
  mem_req_t s1;
  idx_t     s1_idx;
  logic     s1_hit, s1_allowed, s1_done;
  blk_status_e s1_next;
  ev_type_e s1_ev;

  assign s1_idx = idx_of(s1.vaddr);
  assign s1_hit = valid[s1_idx] && (tag[s1_idx] == tag_of(s1.vaddr));

  bsb_check u_check (
    .status      (status[s1_idx]),
    .op          (s1.op),
    .allowed     (s1_allowed),
    .next_status (s1_next),
    .ev          (s1_ev)
  );

  always_comb begin
    resp_valid = 1'b0;
    resp_dst   = s1.dst;
    resp_data  = data[s1_idx][wsel(s1.vaddr)];
    emi_valid  = 1'b0;
    emi_req    = s1;
    flt_valid  = 1'b0;
    flt        = '{ev: s1_ev, op: s1.op, vaddr: s1.vaddr, data: s1.wdata, dst: s1.dst};
    s1_done    = 1'b0;
    if (fill_valid) begin
      // the fill owns the line arrays and the response port this cycle
      resp_valid = (fill_req.op == OP_LOAD);
      resp_dst   = fill_req.dst;
      resp_data  = fill_line[wsel(fill_req.vaddr)];
    end else if (s1_valid) begin
      if (s1_hit && !s1_allowed) begin
        flt_valid = 1'b1;
        s1_done   = flt_ready;
      end else if (s1_hit && s1.op == OP_LOAD) begin
        resp_valid = 1'b1;
        s1_done    = 1'b1;
      end else begin
        // allowed store hit (write-through) or any miss
        emi_valid = 1'b1;
        s1_done   = emi_ready;
      end
    end
  end

  assign req_ready  = !s1_valid || s1_done;
  assign hit_pulse  = s1_valid && s1_done && s1_hit;
  assign miss_pulse = s1_valid && s1_done && !s1_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1       <= '0;
      for (int i = 0; i < LINES; i++) valid[i] <= 1'b0;
    end else begin
      if (req_ready) begin
        s1_valid <= req_valid;
        if (req_valid) s1 <= req;
      end
      if (fill_valid)
        valid[idx_of(fill_req.vaddr)] <= (fill_status != BS_INVALID);
      if (inv_valid && valid[idx_of(inv_vaddr)] && tag[idx_of(inv_vaddr)] == tag_of(inv_vaddr))
        valid[idx_of(inv_vaddr)] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (fill_valid) begin
      tag[idx_of(fill_req.vaddr)]    <= tag_of(fill_req.vaddr);
      status[idx_of(fill_req.vaddr)] <= fill_status;
      data[idx_of(fill_req.vaddr)]   <= fill_line;
    end else if (s1_valid && s1_done && s1_hit && s1_allowed && s1.op == OP_STORE) begin
      data[s1_idx][wsel(s1.vaddr)] <= s1.wdata;
      status[s1_idx]               <= s1_next;
    end
  end

endmodule
