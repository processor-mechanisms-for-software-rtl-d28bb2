// tb_map_shm_node: end-to-end test of the shared-memory hardware of one node
// at its default sizes. The testbench plays the parts outside the node: the
// SDRAM, the LTLB miss handler (answering from a page table), the router
// (every flit is looped back to the node's own input, standing for the home
// node and the reply), and the handler threads: the event handler in slot 3
// of cluster 0, the request handler in slot 4 of cluster 1 and the reply
// handler in slot 4 of cluster 2, each reading its queue-head register.
//
// It runs one remote reference from start to end: a load to a block held
// elsewhere is refused and turned into an event record; the event handler
// reads the record, probes the GTLB for the home node (GPRB) and sends a
// request message; the request handler reads it and sends the 8-word block
// back as a reply; the reply handler installs the block (writes the data,
// sets the status to read-write) and the load is completed. Around it the
// test makes each mechanism happen and counts it: cache hits and misses, LTLB
// miss stalls, a store refused on a read-only block, a store turning a block
// dirty, bank conflicts in the memory switch, two banks working in the same
// cycle, handler threads blocked on empty queues while user threads issue, a
// full event queue stalling the memory system, and a message refused for lack
// of a GTLB mapping. The event must reach the handler within 10 cycles of the
// load being issued.
module tb_map_shm_node;
  import mm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // ------------------------------------------------------------ DUT signals
  logic         mreq_valid [NCLUST];
  mem_req_t     mreq       [NCLUST];
  logic         mreq_ready [NCLUST];
  logic         resp_valid [NBANKS];
  dst_t         resp_dst   [NBANKS];
  word_t        resp_data  [NBANKS];
  logic         ext_req_valid, ext_req_write, ext_req_ready, ext_resp_valid;
  paddr_t       ext_req_paddr;
  word_t        ext_req_wdata;
  line_t        ext_resp_line;
  logic         ltlb_miss, ltlb_fill_valid;
  vaddr_t       ltlb_miss_vaddr;
  vpn_t         ltlb_fill_vpn;
  ppn_t         ltlb_fill_ppn;
  page_status_t ltlb_fill_status;
  logic         cfg_bs_wr;
  vaddr_t       cfg_bs_vaddr;
  blk_status_e  cfg_bs_status;
  logic         gtlb_wr_valid;
  logic [1:0]   gtlb_wr_idx;
  gtlb_entry_t  gtlb_wr_entry;
  logic         gprb_valid, gprb_done, gprb_hit;
  vaddr_t       gprb_vaddr;
  node_t        gprb_node;
  logic         send_valid, send_ready, send_prio;
  vaddr_t       send_vaddr;
  logic [3:0]   send_len;
  word_t        send_words [9];
  logic         out_flit_valid, out_flit_ready, in_flit_valid, in_flit_ready;
  flit_t        out_flit, in_flit;
  logic [NSLOTS-1:0] inst_valid  [NCLUST];
  logic [NSLOTS-1:0] opnd_ready  [NCLUST];
  logic [NSLOTS-1:0] reads_qhead [NCLUST];
  logic         issue_valid [NCLUST];
  logic [2:0]   issue_slot  [NCLUST];
  word_t        evq_head, p0_head, p1_head;
  logic         ev_pulse, evq_full_stall, switch_conflict;
  logic         bank_hit [NBANKS], bank_miss [NBANKS];
  logic         handler_wait [NCLUST];
  logic         msg_arrival [2];

  map_shm_node dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @cycle %0d", what, cycle); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ SDRAM model
  word_t sdram [paddr_t];
  function automatic word_t sd_rd(paddr_t a);
    return sdram.exists(a) ? sdram[a] : word_t'({24'hD0D0D0, a});
  endfunction
  initial begin
    ext_req_ready = 1; ext_resp_valid = 0; ext_resp_line = '0;
    forever begin
      @(posedge clk);
      if (ext_req_valid && ext_req_ready) begin
        if (ext_req_write) sdram[ext_req_paddr] = ext_req_wdata;
        else begin
          paddr_t a;
          a = ext_req_paddr;
          repeat (4) @(posedge clk);
          #1;
          ext_resp_valid = 1;
          for (int w = 0; w < 8; w++) ext_resp_line[w] = sd_rd(a + paddr_t'(8 * w));
          @(posedge clk);
          #1;
          ext_resp_valid = 0;
        end
      end
    end
  end

  // ------------------------------------------------------------ page table + LTLB miss handler
  page_status_t pt [vpn_t];
  function automatic ppn_t ppn_of(vpn_t v);
    return ppn_t'(v) + ppn_t'(28'h100);
  endfunction
  function automatic paddr_t pa_of(vaddr_t a);
    return {ppn_of(a[VA_W-1:PAGE_OFF_W]), a[PAGE_OFF_W-1:0]};
  endfunction
  int ltlb_stall_cycles = 0, ltlb_fills = 0;
  initial begin
    ltlb_fill_valid = 0; ltlb_fill_vpn = '0; ltlb_fill_ppn = '0; ltlb_fill_status = '0;
    forever begin
      @(posedge clk);
      if (ltlb_miss) begin
        vpn_t v;
        v = ltlb_miss_vaddr[VA_W-1:PAGE_OFF_W];
        repeat (6) @(posedge clk);
        @(negedge clk);
        ltlb_fill_valid = 1; ltlb_fill_vpn = v; ltlb_fill_ppn = ppn_of(v);
        ltlb_fill_status = pt.exists(v) ? pt[v] : '0;
        @(negedge clk);
        ltlb_fill_valid = 0;
        ltlb_fills++;
      end
    end
  end
  always @(posedge clk) if (ltlb_miss) ltlb_stall_cycles++;

  // ------------------------------------------------------------ router: loop back
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_flit_valid <= 0;
      in_flit       <= '0;
    end else if (!in_flit_valid || in_flit_ready) begin
      in_flit_valid <= out_flit_valid;
      in_flit       <= out_flit;
    end
  end
  assign out_flit_ready = !in_flit_valid || in_flit_ready;
  node_t last_dest;
  always @(posedge clk) if (out_flit_valid && out_flit_ready && out_flit.head) last_dest = out_flit.dest;

  // ------------------------------------------------------------ load responses
  word_t resp_by_dst [dst_t];
  int    n_resp = 0;
  always @(posedge clk) for (int b = 0; b < NBANKS; b++) if (resp_valid[b]) begin
    resp_by_dst[resp_dst[b]] = resp_data[b];
    n_resp++;
  end

  // ------------------------------------------------------------ handler threads
  // queue words read by each handler, in order
  word_t evq_words [$], p0_words [$], p1_words [$];
  bit    ev_handler_on = 1;
  always @(posedge clk) if (rst_n) begin
    if (issue_valid[0] && issue_slot[0] == 3) begin
      evq_words.push_back(evq_head);
    end
    if (issue_valid[1] && issue_slot[1] == 4) p0_words.push_back(p0_head);
    if (issue_valid[2] && issue_slot[2] == 4) p1_words.push_back(p1_head);
  end
  // event latency: cycles from the cluster port accepting the timed load to
  // the event handler's first issue
  int ev_lat = -1;
  bit ev_lat_arm = 0, ev_lat_run = 0;
  always @(posedge clk) begin
    if (ev_lat_run) begin
      ev_lat++;
      if (issue_valid[0] && issue_slot[0] == 3) ev_lat_run = 0;
    end else if (ev_lat_arm && mreq_valid[0] && mreq_ready[0]) begin
      ev_lat_arm = 0; ev_lat_run = 1; ev_lat = 0;
    end
  end
  // user threads in slots 0-1 issue at random; handlers always want their queue
  always @(negedge clk) begin
    for (int c = 0; c < NCLUST; c++) begin
      inst_valid[c]  = {1'b0, 1'b0, 1'b0, 2'($urandom)};
      opnd_ready[c]  = '1;
      reads_qhead[c] = '0;
    end
    inst_valid[0][3] = ev_handler_on; reads_qhead[0][3] = 1;
    inst_valid[1][4] = 1;             reads_qhead[1][4] = 1;
    inst_valid[2][4] = 1;             reads_qhead[2][4] = 1;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_events = 0, n_full = 0, n_conflict = 0, n_dual = 0, n_hits = 0, n_misses = 0;
  int n_wait_users = 0, n_msgs = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_pulse) n_events++;
    if (evq_full_stall) n_full++;
    if (switch_conflict) n_conflict++;
    if (bank_hit[0] || bank_miss[0]) if (bank_hit[1] || bank_miss[1]) n_dual++;
    for (int b = 0; b < NBANKS; b++) begin
      if (bank_hit[b]) n_hits++;
      if (bank_miss[b]) n_misses++;
    end
    for (int c = 0; c < NCLUST; c++) if (handler_wait[c] && issue_valid[c]) n_wait_users++;
    for (int p = 0; p < 2; p++) if (msg_arrival[p]) n_msgs++;
  end

  // ------------------------------------------------------------ stimulus helpers
  task automatic mem_op(input int c, input mem_op_e op, input vaddr_t a, input word_t d, input dst_t dst);
    @(negedge clk);
    mreq_valid[c] = 1; mreq[c] = '{op: op, vaddr: a, wdata: d, dst: dst};
    #1;
    while (!mreq_ready[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    mreq_valid[c] = 0;
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
  endtask

  // read one event record (3 words) from what the event handler has read
  task automatic take_record(output word_t w0, output word_t w1, output word_t w2);
    int n;
    n = 0;
    while (evq_words.size() < 3 && n < 2000) begin @(posedge clk); n++; end
    check(evq_words.size() >= 3, "event record read");
    w0 = evq_words.pop_front(); w1 = evq_words.pop_front(); w2 = evq_words.pop_front();
  endtask

  task automatic set_status(input vaddr_t a, input blk_status_e s);
    vpn_t v;
    v = a[VA_W-1:PAGE_OFF_W];
    @(negedge clk);
    cfg_bs_wr = 1; cfg_bs_vaddr = a; cfg_bs_status = s;
    @(negedge clk);
    cfg_bs_wr = 0;
    pt[v][a[PAGE_OFF_W-1:BLOCK_OFF_W]] = s;
  endtask

  task automatic send_msg(input bit prio, input vaddr_t a, input int len, input word_t w [9]);
    @(negedge clk);
    send_valid = 1; send_prio = prio; send_vaddr = a; send_len = 4'(len); send_words = w;
    #1;
    while (!send_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    send_valid = 0;
  endtask

  // ------------------------------------------------------------ the test
  localparam vpn_t DATA_BASE = vpn_t'(32'h0000_4000);   // 16-page shared data segment
  localparam vpn_t LOCAL_PG  = vpn_t'(32'h0000_8000);   // a local page
  dst_t   D0 = '{cluster: 2'd0, slot: 3'd0, regnum: 5'd3};
  dst_t   D1 = '{cluster: 2'd1, slot: 3'd1, regnum: 5'd9};
  word_t  w0, w1, w2, wv [9];
  vaddr_t remote_a;
  int     t_issue, t_done;

  initial begin
    for (int c = 0; c < NCLUST; c++) begin mreq_valid[c] = 0; mreq[c] = '0; end
    cfg_bs_wr = 0; cfg_bs_vaddr = '0; cfg_bs_status = BS_INVALID;
    gtlb_wr_valid = 0; gtlb_wr_idx = '0; gtlb_wr_entry = '0;
    gprb_valid = 0; gprb_vaddr = '0;
    send_valid = 0; send_prio = 0; send_vaddr = '0; send_len = '0;
    for (int i = 0; i < 9; i++) send_words[i] = '0;
    // page table: local page all read-write; shared pages: even blocks
    // read-only, odd blocks invalid (held by other nodes)
    for (int b = 0; b < BLOCKS_PER_PAGE; b++) pt[LOCAL_PG][b] = BS_READ_WRITE;
    for (int p = 0; p < 16; p++)
      for (int b = 0; b < BLOCKS_PER_PAGE; b++)
        pt[DATA_BASE + vpn_t'(p)][b] = (b % 2 == 0) ? BS_READ_ONLY : BS_INVALID;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // GTLB: code locally on this node, data over a 2x2 block, 2 pages per node
    @(negedge clk);
    gtlb_wr_valid = 1; gtlb_wr_idx = 0;
    gtlb_wr_entry = '{valid: 1, base_vpn: LOCAL_PG, log_pages: 6'd4, start: '0,
                      log_xext: 3'd0, log_yext: 3'd0, log_ppn: 6'd4};
    @(negedge clk);
    gtlb_wr_idx = 1;
    gtlb_wr_entry = '{valid: 1, base_vpn: DATA_BASE, log_pages: 6'd4, start: '0,
                      log_xext: 3'd1, log_yext: 3'd1, log_ppn: 6'd1};
    @(negedge clk);
    gtlb_wr_valid = 0;
    wait_cycles(5);
    check(n_wait_users > 0, "handlers blocked on empty queues while users issue");

    // ---- local traffic: LTLB miss, cache miss, fill, hit, store -> dirty
    mem_op(1, OP_STORE, {LOCAL_PG, 6'd0, 6'd8}, 64'h1111, D1);
    wait_cycles(30);
    check(ltlb_fills == 1 && ltlb_stall_cycles >= 6, "LTLB miss stalled the store");
    check(sdram[pa_of({LOCAL_PG, 6'd0, 6'd8})] == 64'h1111, "store reached memory");
    mem_op(1, OP_LOAD, {LOCAL_PG, 6'd0, 6'd8}, '0, D1);
    wait_cycles(20);
    check(resp_by_dst.exists(D1) && resp_by_dst[D1] == 64'h1111, "load after store");
    resp_by_dst.delete();
    mem_op(1, OP_LOAD, {LOCAL_PG, 6'd0, 6'd16}, '0, D1);
    wait_cycles(3);
    check(resp_by_dst.exists(D1) && resp_by_dst[D1] == sd_rd(pa_of({LOCAL_PG, 6'd0, 6'd16})), "cache hit");
    // two clusters on two banks in one cycle, then on one bank (conflict)
    fork
      mem_op(0, OP_LOAD, {LOCAL_PG, 6'd0, 6'd0}, '0, D0);
      mem_op(1, OP_LOAD, {LOCAL_PG, 6'd1, 6'd0}, '0, D1);
    join
    wait_cycles(30);
    fork
      mem_op(0, OP_LOAD, {LOCAL_PG, 6'd0, 6'd24}, '0, D0);
      mem_op(1, OP_LOAD, {LOCAL_PG, 6'd0, 6'd32}, '0, D1);
    join
    wait_cycles(5);
    check(n_dual > 0, "two banks busy in one cycle");
    check(n_conflict > 0, "bank conflict in the memory switch");

    // ---- store to a read-only shared block: refused, event record
    mem_op(2, OP_STORE, {DATA_BASE + vpn_t'(3), 6'd2, 6'd0}, 64'hBAD, '0);
    take_record(w0, w1, w2);
    check(w0[2:0] == EV_STORE_READ_ONLY && w1 == word_t'({DATA_BASE + vpn_t'(3), 6'd2, 6'd0}) && w2 == 64'hBAD,
          "store to read-only block refused");
    check(!sdram.exists(pa_of({DATA_BASE + vpn_t'(3), 6'd2, 6'd0})), "refused store not performed");

    // ---- one complete remote reference: load of an invalid block
    remote_a = {DATA_BASE + vpn_t'(5), 6'd3, 6'd40};   // page 5 -> node 2 with 2 pages/node
    // warm the LTLB for the page so the event path is timed on its own
    mem_op(0, OP_LOAD, {DATA_BASE + vpn_t'(5), 6'd0, 6'd0}, '0, D0);
    wait_cycles(30);
    evq_words.delete();
    @(negedge clk);
    t_issue = cycle;
    ev_lat_arm = 1;
    mem_op(0, OP_LOAD, remote_a, '0, D0);
    take_record(w0, w1, w2);
    // cycles numbered from 1 for the one in which the load is offered
    check(ev_lat >= 0 && ev_lat + 1 <= 10,
          $sformatf("event handler started on cycle %0d", ev_lat + 1));
    $display("event handler read the record head on cycle %0d (load offered on cycle 1)", ev_lat + 1);
    check(w0[2:0] == EV_LOAD_INVALID && w0[13:4] == D0 && w1 == word_t'(remote_a), "remote load event record");
    // event handler: GPRB for the home node
    @(negedge clk);
    gprb_valid = 1; gprb_vaddr = vaddr_t'(w1);
    @(negedge clk);
    gprb_valid = 0;
    check(gprb_done && gprb_hit && gprb_node.x == 0 && gprb_node.y == 1, "GPRB finds home node 2");
    // request message (priority 0): {address, destination}
    wv[0] = w0; for (int i = 1; i < 9; i++) wv[i] = '0;
    send_msg(0, remote_a, 1, wv);
    wait_cycles(4);
    check(last_dest.x == 0 && last_dest.y == 1, $sformatf("request sent to the home node (%0d,%0d)", last_dest.x, last_dest.y));
    // request handler reads the message: head word, then the event header
    begin
      int n; n = 0;
      while (p0_words.size() < 2 && n < 200) begin @(posedge clk); n++; end
    end
    check(p0_words.size() == 2 && p0_words[0][VA_W-1:0] == remote_a && p0_words[0][63:60] == 1 && p0_words[1] == w0,
          "request handler got the request");
    // reply (priority 1): the 8-word block, address in the head word
    for (int i = 0; i < 8; i++) wv[i] = 64'hB10C_0000 + 64'(i);
    wv[8] = p0_words[1];
    send_msg(1, remote_a, 9, wv);
    begin
      int n; n = 0;
      while (p1_words.size() < 10 && n < 200) begin @(posedge clk); n++; end
    end
    check(p1_words.size() == 10 && p1_words[1] == 64'hB10C_0000 && p1_words[8] == 64'hB10C_0007, "reply arrived");
    // reply handler installs the block, then completes the load
    for (int i = 0; i < 8; i++) sdram[pa_of({remote_a[VA_W-1:BLOCK_OFF_W], 6'(8 * i)})] = p1_words[1 + i];
    set_status(remote_a, BS_READ_WRITE);
    resp_by_dst.delete();
    mem_op(0, OP_LOAD, remote_a, '0, dst_t'(p1_words[9][13:4]));
    wait_cycles(20);
    t_done = cycle;
    check(resp_by_dst.exists(D0) && resp_by_dst[D0] == 64'hB10C_0005, "remote load completed with the block");
    $display("remote reference: %0d cycles of hardware and testbench handler time", t_done - t_issue);
    // the installed block is now writable; the store makes it dirty
    mem_op(0, OP_STORE, remote_a, 64'h5555, D0);
    wait_cycles(20);
    check(dut.u_emi.u_ltlb.status[0][(DATA_BASE + vpn_t'(5)) % 32][3] == BS_DIRTY ||
          dut.u_emi.u_ltlb.status[1][(DATA_BASE + vpn_t'(5)) % 32][3] == BS_DIRTY, "block dirty after store");

    // ---- message to an address the GTLB does not map
    evq_words.delete();
    send_msg(0, vaddr_t'(64'h3_0000_0000), 0, wv);
    take_record(w0, w1, w2);
    check(w0[2:0] == EV_GTLB_MISS && w1 == 64'h3_0000_0000, "GTLB miss on send");

    // ---- event queue overflow: handler stops reading, 50 remote loads
    ev_handler_on = 0;
    wait_cycles(2);
    evq_words.delete();
    begin
      int ev_before;
      ev_before = n_events;
      fork
        for (int k = 0; k < 50; k++)
          mem_op(k % 3, OP_LOAD, {DATA_BASE + vpn_t'(6), 6'(2 * (k % 32) + 1), 6'd0}, '0, D0);
        begin
          int n; n = 0;
          while (n_full == 0 && n < 5000) begin @(posedge clk); n++; end
          wait_cycles(50);
          check(n_full > 0, "event queue full stalls the memory system");
          check(n_events - ev_before == 42, $sformatf("queue holds 42 records (%0d)", n_events - ev_before));
          ev_handler_on = 1;
        end
      join
      wait_cycles(400);
      check(n_events - ev_before == 50, $sformatf("every refused load queued (%0d)", n_events - ev_before));
      check(evq_words.size() == 150, $sformatf("handler read all records (%0d words)", evq_words.size()));
    end

    // ---- mechanism summary
    $display("events=%0d queue-full=%0d conflicts=%0d dual-bank=%0d hits=%0d misses=%0d ltlb-stall=%0d handler-wait=%0d messages=%0d",
             n_events, n_full, n_conflict, n_dual, n_hits, n_misses, ltlb_stall_cycles, n_wait_users, n_msgs);
    check(n_events > 0, "events");
    check(n_hits > 0 && n_misses > 0, "hits and misses");
    check(ltlb_stall_cycles > 0, "LTLB stalls");
    check(n_msgs >= 2, "messages on both priorities");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
