// map_shm_node: the shared-memory hardware of one MAP node.
//
// Software shared memory on this machine rests on four mechanisms, all built
// here around the node's memory system:
//   * block status bits: every 8-word block has a 2-bit state (invalid,
//     read-only, read-write, dirty) kept in the LTLB and copied into the cache
//     lines; every load and store is checked against it in parallel with the
//     hit test (cache_bank, ltlb, bsb_check);
//   * the event system: a refused operation (typically a reference to a block
//     held by another node) is turned into an event record in the 128-word
//     event queue and discarded; the queue head is a register of the event
//     handler thread (event_gen, reg_head_queue);
//   * the GTLB: maps a virtual address to its home node, used by the event
//     handler's GPRB probe and by the network output when a message is sent
//     to a virtual address (gtlb, netout);
//   * dedicated thread slots: handler threads stay resident in their own
//     slots, so starting a handler costs no context switch; their issue blocks
//     on an empty queue-head register (cluster_issue). Slot 3 of cluster 0 is
//     the event handler (event queue), slot 4 of cluster 1 the priority-0
//     (request) message handler, slot 4 of cluster 2 the priority-1 (reply)
//     message handler.
// Data path: three cluster memory ports -> memory_switch (block interleave)
// -> two cache_banks -> emi (with the LTLB) -> external memory ports. Faults
// from the banks, the EMI and netout feed event_gen. Arriving flits go to
// netin's two queues. The clusters themselves, the cluster switch, the router
// and the SDRAM are outside this module; their connections are ports. An
// instruction of a thread slot is abstracted as three readiness bits.
// Timing: a load to a remote block offered on a cluster port in cycle 1 is
// accepted by its bank, misses in cycle 2, is refused by the LTLB in cycle 3,
// handed to event_gen in cycle 4 and written into the event queue in cycle 5;
// the head register is full in cycle 6, and the event handler's read of it
// can issue in that cycle.
module map_shm_node
  import mm_pkg::*;
#(
  parameter int LTLB_ENTRIES  = 64,
  parameter int LTLB_WAYS     = 2,
  parameter int CACHE_LINES   = 512,
  parameter int GTLB_ENTRIES  = 4,
  parameter int EVQ_DEPTH     = 128,
  parameter int NETQ_DEPTH    = 64,
  parameter int MAX_MSG_WORDS = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  // cluster memory ports
  input  logic         mreq_valid [NCLUST],
  input  mem_req_t     mreq       [NCLUST],
  output logic         mreq_ready [NCLUST],
  // load responses of the banks (to the cluster switch)
  output logic         resp_valid [NBANKS],
  output dst_t         resp_dst   [NBANKS],
  output word_t        resp_data  [NBANKS],
  // external memory
  output logic         ext_req_valid,
  output logic         ext_req_write,
  output paddr_t       ext_req_paddr,
  output word_t        ext_req_wdata,
  input  logic         ext_req_ready,
  input  logic         ext_resp_valid,
  input  line_t        ext_resp_line,
  // LTLB miss handler
  output logic         ltlb_miss,
  output vaddr_t       ltlb_miss_vaddr,
  input  logic         ltlb_fill_valid,
  input  vpn_t         ltlb_fill_vpn,
  input  ppn_t         ltlb_fill_ppn,
  input  page_status_t ltlb_fill_status,
  // handler write of a block's status (configuration space)
  input  logic         cfg_bs_wr,
  input  vaddr_t       cfg_bs_vaddr,
  input  blk_status_e  cfg_bs_status,
  // GTLB entry write and GPRB probe (result one cycle later)
  input  logic         gtlb_wr_valid,
  input  logic [$clog2(GTLB_ENTRIES)-1:0] gtlb_wr_idx,
  input  gtlb_entry_t  gtlb_wr_entry,
  input  logic         gprb_valid,
  input  vaddr_t       gprb_vaddr,
  output logic         gprb_done,
  output logic         gprb_hit,
  output node_t        gprb_node,
  // message send
  input  logic         send_valid,
  output logic         send_ready,
  input  logic         send_prio,
  input  vaddr_t       send_vaddr,
  input  logic [3:0]   send_len,
  input  word_t        send_words [MAX_MSG_WORDS],
  // router
  output logic         out_flit_valid,
  output flit_t        out_flit,
  input  logic         out_flit_ready,
  input  logic         in_flit_valid,
  input  flit_t        in_flit,
  output logic         in_flit_ready,
  // thread slots of the three clusters
  input  logic [NSLOTS-1:0] inst_valid  [NCLUST],
  input  logic [NSLOTS-1:0] opnd_ready  [NCLUST],
  input  logic [NSLOTS-1:0] reads_qhead [NCLUST],
  output logic         issue_valid [NCLUST],
  output logic [2:0]   issue_slot  [NCLUST],
  // queue-head registers of the handler threads
  output word_t        evq_head,       // event handler, cluster 0 slot 3
  output word_t        p0_head,        // request handler, cluster 1 slot 4
  output word_t        p1_head,        // reply handler, cluster 2 slot 4
  // activity
  output logic         ev_pulse,         // an event record was queued
  output logic         evq_full_stall,   // event queue had no room
  output logic         bank_hit  [NBANKS],
  output logic         bank_miss [NBANKS],
  output logic         switch_conflict,
  output logic         handler_wait [NCLUST],  // handler blocked on empty queue
  output logic         msg_arrival [2]
);

  // ------------------------------------------------------------ memory switch
  logic     bk_valid [NBANKS];
  mem_req_t bk_req   [NBANKS];
  logic     bk_ready [NBANKS];

  memory_switch #(.NIN(NCLUST), .NBANK(NBANKS)) u_switch (
    .clk, .rst_n,
    .in_valid  (mreq_valid),
    .in_req    (mreq),
    .in_ready  (mreq_ready),
    .out_valid (bk_valid),
    .out_req   (bk_req),
    .out_ready (bk_ready),
    .conflict_pulse (switch_conflict)
  );

  // ------------------------------------------------------------ cache banks
  logic        emi_valid [NBANKS];
  mem_req_t    emi_req   [NBANKS];
  logic        emi_ready [NBANKS];
  logic        fill_valid [NBANKS];
  mem_req_t    fill_req;
  blk_status_e fill_status;
  line_t       fill_line;

  localparam int NSRC = NBANKS + 2;
  logic   fv [NSRC];
  fault_t fd [NSRC];
  logic   fr [NSRC];

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    cache_bank #(.LINES(CACHE_LINES), .BANK_BITS($clog2(NBANKS))) u_bank (
      .clk, .rst_n,
      .req_valid  (bk_valid[b]),
      .req        (bk_req[b]),
      .req_ready  (bk_ready[b]),
      .resp_valid (resp_valid[b]),
      .resp_dst   (resp_dst[b]),
      .resp_data  (resp_data[b]),
      .emi_valid  (emi_valid[b]),
      .emi_req    (emi_req[b]),
      .emi_ready  (emi_ready[b]),
      .flt_valid  (fv[b]),
      .flt        (fd[b]),
      .flt_ready  (fr[b]),
      .fill_valid (fill_valid[b]),
      .fill_req, .fill_status, .fill_line,
      .inv_valid  (cfg_bs_wr),
      .inv_vaddr  (cfg_bs_vaddr),
      .hit_pulse  (bank_hit[b]),
      .miss_pulse (bank_miss[b])
    );
  end

  // ------------------------------------------------------------ EMI + LTLB
  emi #(.NBANK(NBANKS), .LTLB_ENTRIES(LTLB_ENTRIES), .LTLB_WAYS(LTLB_WAYS)) u_emi (
    .clk, .rst_n,
    .miss_valid (emi_valid),
    .miss_req   (emi_req),
    .miss_ready (emi_ready),
    .fill_valid, .fill_req, .fill_status, .fill_line,
    .flt_valid  (fv[NBANKS]),
    .flt        (fd[NBANKS]),
    .flt_ready  (fr[NBANKS]),
    .ltlb_miss, .ltlb_miss_vaddr,
    .ltlb_fill_valid, .ltlb_fill_vpn, .ltlb_fill_ppn, .ltlb_fill_status,
    .cfg_bs_wr, .cfg_bs_vaddr, .cfg_bs_status,
    .ext_req_valid, .ext_req_write, .ext_req_paddr, .ext_req_wdata, .ext_req_ready,
    .ext_resp_valid, .ext_resp_line
  );

  // ------------------------------------------------------------ GTLB
  vaddr_t gt_vaddr [2];
  logic   gt_hit   [2];
  node_t  gt_node  [2];

  assign gt_vaddr[0] = gprb_vaddr;

  gtlb #(.ENTRIES(GTLB_ENTRIES), .NPORTS(2)) u_gtlb (
    .clk, .rst_n,
    .lk_vaddr (gt_vaddr),
    .lk_hit   (gt_hit),
    .lk_node  (gt_node),
    .wr_valid (gtlb_wr_valid),
    .wr_idx   (gtlb_wr_idx),
    .wr_entry (gtlb_wr_entry)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gprb_done <= 1'b0;
      gprb_hit  <= 1'b0;
      gprb_node <= '0;
    end else begin
      gprb_done <= gprb_valid;
      if (gprb_valid) begin
        gprb_hit  <= gt_hit[0];
        gprb_node <= gt_node[0];
      end
    end
  end

  // ------------------------------------------------------------ network
  netout #(.MAX_WORDS(MAX_MSG_WORDS)) u_netout (
    .clk, .rst_n,
    .send_valid, .send_ready, .send_prio, .send_vaddr, .send_len, .send_words,
    .gt_vaddr   (gt_vaddr[1]),
    .gt_hit     (gt_hit[1]),
    .gt_node    (gt_node[1]),
    .flt_valid  (fv[NBANKS+1]),
    .flt        (fd[NBANKS+1]),
    .flt_ready  (fr[NBANKS+1]),
    .flit_valid (out_flit_valid),
    .flit       (out_flit),
    .flit_ready (out_flit_ready)
  );

  logic  mq_valid [2];
  word_t mq_data  [2];
  logic  mq_pop   [2];

  netin #(.QDEPTH(NETQ_DEPTH)) u_netin (
    .clk, .rst_n,
    .flit_valid (in_flit_valid),
    .flit       (in_flit),
    .flit_ready (in_flit_ready),
    .head_valid (mq_valid),
    .head_data  (mq_data),
    .head_pop   (mq_pop),
    .msg_pulse  (msg_arrival)
  );

  // ------------------------------------------------------------ event system
  logic  q_push_valid, q_push_ready;
  word_t [REC_WORDS-1:0] q_push_words;
  logic  evq_valid, evq_pop;
  logic [$clog2(EVQ_DEPTH+1)-1:0] evq_count;

  event_gen #(.NSRC(NSRC)) u_evgen (
    .clk, .rst_n,
    .src_valid (fv),
    .src_flt   (fd),
    .src_ready (fr),
    .q_push_valid, .q_push_words, .q_push_ready,
    .event_pulse (ev_pulse)
  );

  reg_head_queue #(.DEPTH(EVQ_DEPTH), .W(WORD_W), .REC_WORDS(REC_WORDS)) u_evq (
    .clk, .rst_n,
    .push_valid (q_push_valid),
    .push_words (q_push_words),
    .push_ready (q_push_ready),
    .head_valid (evq_valid),
    .head_data  (evq_head),
    .pop        (evq_pop),
    .count      (evq_count),
    .full_stall (evq_full_stall)
  );

  assign p0_head = mq_data[0];
  assign p1_head = mq_data[1];

  // ------------------------------------------------------------ thread slots
  logic qv [NCLUST];
  logic qp [NCLUST];
  assign qv[0] = evq_valid;
  assign qv[1] = mq_valid[0];
  assign qv[2] = mq_valid[1];
  assign evq_pop   = qp[0];
  assign mq_pop[0] = qp[1];
  assign mq_pop[1] = qp[2];

  for (genvar c = 0; c < NCLUST; c++) begin : g_cluster
    cluster_issue #(.NS(NSLOTS), .QHEAD_SLOT((c == 0) ? 3 : 4)) u_issue (
      .clk, .rst_n,
      .inst_valid  (inst_valid[c]),
      .opnd_ready  (opnd_ready[c]),
      .reads_qhead (reads_qhead[c]),
      .qhead_valid (qv[c]),
      .issue_valid (issue_valid[c]),
      .issue_slot  (issue_slot[c]),
      .qhead_pop   (qp[c]),
      .qhead_stall (handler_wait[c])
    );
  end

endmodule
