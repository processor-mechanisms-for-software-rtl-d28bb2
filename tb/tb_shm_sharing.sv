// tb_shm_sharing: a store to a block shared by 2, 4 and 8 nodes, run across
// nine nodes of the machine (a 4x4 region of the mesh, nodes 0-8 present).
// Node n sits at (x, y) = (n mod 4, n div 4); one GTLB entry spreads a
// 16-page data segment over the region one page per node, so page n of the
// segment is homed on node n, and a message to node n is sent to an address
// in page n.
//
// The testbench plays, on every node, the SDRAM, the LTLB miss handler and
// the three handler threads, and routes whole messages between nodes. The
// handlers follow a three-hop invalidation protocol:
//   1. node 0 stores to a block of page 1 that it does not hold; the store is
//      refused and becomes an event record on node 0;
//   2. node 0's event handler probes the GTLB (home = node 1) and sends a
//      priority-0 request to the block's address;
//   3. node 1's request handler invalidates its own copy, sends a priority-0
//      invalidation to each other sharer and a priority-1 reply with the
//      block and the number of acknowledgements to expect to node 0;
//   4. each sharer's request handler sets the block invalid on its node
//      (which also drops the cached line) and acknowledges to node 0 on
//      priority 1;
//   5. node 0's reply handler collects the reply and every acknowledgement,
//      installs the block read-write and completes the store, which makes
//      the block dirty.
// Afterwards a load of the block on each former sharer must raise an event,
// and the load on node 0 must return the stored value. With 1, 3 and 7
// invalidations the messages reaching node 0's reply queue must number 2, 4
// and 8. The cycle count of each case is printed.
module tb_shm_sharing;
  import mm_pkg::*;

  localparam int NN = 9;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // ------------------------------------------------------------ node signals
  logic         mreq_valid [NN][NCLUST];
  mem_req_t     mreq       [NN][NCLUST];
  logic         mreq_ready [NN][NCLUST];
  logic         resp_valid [NN][NBANKS];
  dst_t         resp_dst   [NN][NBANKS];
  word_t        resp_data  [NN][NBANKS];
  logic         ext_req_valid [NN], ext_req_write [NN], ext_req_ready [NN], ext_resp_valid [NN];
  paddr_t       ext_req_paddr [NN];
  word_t        ext_req_wdata [NN];
  line_t        ext_resp_line [NN];
  logic         ltlb_miss [NN], ltlb_fill_valid [NN];
  vaddr_t       ltlb_miss_vaddr [NN];
  vpn_t         ltlb_fill_vpn [NN];
  ppn_t         ltlb_fill_ppn [NN];
  page_status_t ltlb_fill_status [NN];
  logic         cfg_bs_wr [NN];
  vaddr_t       cfg_bs_vaddr [NN];
  blk_status_e  cfg_bs_status [NN];
  logic         gtlb_wr_valid [NN];
  logic [1:0]   gtlb_wr_idx [NN];
  gtlb_entry_t  gtlb_wr_entry [NN];
  logic         gprb_valid [NN], gprb_done [NN], gprb_hit [NN];
  vaddr_t       gprb_vaddr [NN];
  node_t        gprb_node [NN];
  logic         send_valid [NN], send_ready [NN], send_prio [NN];
  vaddr_t       send_vaddr [NN];
  logic [3:0]   send_len [NN];
  word_t        send_words [NN][9];
  logic         out_flit_valid [NN], out_flit_ready [NN], in_flit_valid [NN], in_flit_ready [NN];
  flit_t        out_flit [NN], in_flit [NN];
  logic [NSLOTS-1:0] inst_valid  [NN][NCLUST];
  logic [NSLOTS-1:0] opnd_ready  [NN][NCLUST];
  logic [NSLOTS-1:0] reads_qhead [NN][NCLUST];
  logic         issue_valid [NN][NCLUST];
  logic [2:0]   issue_slot  [NN][NCLUST];
  word_t        evq_head [NN], p0_head [NN], p1_head [NN];
  logic         ev_pulse [NN], evq_full_stall [NN], switch_conflict [NN];
  logic         bank_hit [NN][NBANKS], bank_miss [NN][NBANKS];
  logic         handler_wait [NN][NCLUST];
  logic         msg_arrival [NN][2];

  for (genvar n = 0; n < NN; n++) begin : g_node
    map_shm_node u_node (
      .clk, .rst_n,
      .mreq_valid (mreq_valid[n]), .mreq (mreq[n]), .mreq_ready (mreq_ready[n]),
      .resp_valid (resp_valid[n]), .resp_dst (resp_dst[n]), .resp_data (resp_data[n]),
      .ext_req_valid (ext_req_valid[n]), .ext_req_write (ext_req_write[n]),
      .ext_req_paddr (ext_req_paddr[n]), .ext_req_wdata (ext_req_wdata[n]),
      .ext_req_ready (ext_req_ready[n]), .ext_resp_valid (ext_resp_valid[n]),
      .ext_resp_line (ext_resp_line[n]),
      .ltlb_miss (ltlb_miss[n]), .ltlb_miss_vaddr (ltlb_miss_vaddr[n]),
      .ltlb_fill_valid (ltlb_fill_valid[n]), .ltlb_fill_vpn (ltlb_fill_vpn[n]),
      .ltlb_fill_ppn (ltlb_fill_ppn[n]), .ltlb_fill_status (ltlb_fill_status[n]),
      .cfg_bs_wr (cfg_bs_wr[n]), .cfg_bs_vaddr (cfg_bs_vaddr[n]), .cfg_bs_status (cfg_bs_status[n]),
      .gtlb_wr_valid (gtlb_wr_valid[n]), .gtlb_wr_idx (gtlb_wr_idx[n]), .gtlb_wr_entry (gtlb_wr_entry[n]),
      .gprb_valid (gprb_valid[n]), .gprb_vaddr (gprb_vaddr[n]), .gprb_done (gprb_done[n]),
      .gprb_hit (gprb_hit[n]), .gprb_node (gprb_node[n]),
      .send_valid (send_valid[n]), .send_ready (send_ready[n]), .send_prio (send_prio[n]),
      .send_vaddr (send_vaddr[n]), .send_len (send_len[n]), .send_words (send_words[n]),
      .out_flit_valid (out_flit_valid[n]), .out_flit (out_flit[n]), .out_flit_ready (out_flit_ready[n]),
      .in_flit_valid (in_flit_valid[n]), .in_flit (in_flit[n]), .in_flit_ready (in_flit_ready[n]),
      .inst_valid (inst_valid[n]), .opnd_ready (opnd_ready[n]), .reads_qhead (reads_qhead[n]),
      .issue_valid (issue_valid[n]), .issue_slot (issue_slot[n]),
      .evq_head (evq_head[n]), .p0_head (p0_head[n]), .p1_head (p1_head[n]),
      .ev_pulse (ev_pulse[n]), .evq_full_stall (evq_full_stall[n]),
      .bank_hit (bank_hit[n]), .bank_miss (bank_miss[n]), .switch_conflict (switch_conflict[n]),
      .handler_wait (handler_wait[n]), .msg_arrival (msg_arrival[n])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @cycle %0d", what, cycle); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ address map
  localparam vpn_t DATA_BASE = vpn_t'(32'h0000_4000);   // 16 pages, page n on node n
  function automatic vaddr_t page_addr(int n);
    return {DATA_BASE + vpn_t'(n), 12'h000};
  endfunction
  function automatic int node_index(node_t d);
    return int'(d.y) * 4 + int'(d.x);
  endfunction
  function automatic ppn_t ppn_of(vpn_t v);
    return ppn_t'(v) + ppn_t'(28'h100);
  endfunction
  function automatic paddr_t pa_of(vaddr_t a);
    return {ppn_of(a[VA_W-1:PAGE_OFF_W]), a[PAGE_OFF_W-1:0]};
  endfunction

  // ------------------------------------------------------------ SDRAM and page table of every node
  // keys are {node, address}
  word_t        sdram [bit [63:0]];
  page_status_t pt    [bit [63:0]];
  function automatic word_t sd_rd(int n, paddr_t a);
    bit [63:0] k;
    k = {8'(n), 16'h0, a};
    return sdram.exists(k) ? sdram[k] : {8'hD0, 8'(n), 8'h00, a};
  endfunction
  function automatic page_status_t pt_rd(int n, vpn_t v);
    bit [63:0] k;
    k = {8'(n), 14'h0, v};
    return pt.exists(k) ? pt[k] : '0;
  endfunction

  for (genvar n = 0; n < NN; n++) begin : g_env
    initial begin
      ext_req_ready[n] = 1; ext_resp_valid[n] = 0; ext_resp_line[n] = '0;
      forever begin
        @(posedge clk);
        if (ext_req_valid[n] && ext_req_ready[n]) begin
          if (ext_req_write[n]) sdram[{8'(n), 16'h0, ext_req_paddr[n]}] = ext_req_wdata[n];
          else begin
            paddr_t a;
            a = ext_req_paddr[n];
            repeat (4) @(posedge clk);
            #1;
            ext_resp_valid[n] = 1;
            for (int w = 0; w < 8; w++) ext_resp_line[n][w] = sd_rd(n, a + paddr_t'(8 * w));
            @(posedge clk);
            #1;
            ext_resp_valid[n] = 0;
          end
        end
      end
    end
    initial begin
      ltlb_fill_valid[n] = 0; ltlb_fill_vpn[n] = '0; ltlb_fill_ppn[n] = '0; ltlb_fill_status[n] = '0;
      forever begin
        @(posedge clk);
        if (ltlb_miss[n]) begin
          vpn_t v;
          v = ltlb_miss_vaddr[n][VA_W-1:PAGE_OFF_W];
          repeat (6) @(posedge clk);
          @(negedge clk);
          ltlb_fill_valid[n] = 1; ltlb_fill_vpn[n] = v; ltlb_fill_ppn[n] = ppn_of(v);
          ltlb_fill_status[n] = pt_rd(n, v);
          @(negedge clk);
          ltlb_fill_valid[n] = 0;
        end
      end
    end
  end

  // ------------------------------------------------------------ router
  // Store and forward: a message is collected whole at its source, then
  // queued for the destination's input, so messages never interleave.
  flit_t cur [NN][$];
  flit_t inq [NN][$];
  int    n_delivered [NN][2];
  always @(negedge clk)
    for (int d = 0; d < NN; d++) begin
      out_flit_ready[d] = 1;
      in_flit_valid[d]  = inq[d].size() > 0;
      in_flit[d]        = (inq[d].size() > 0) ? inq[d][0] : '0;
    end
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < NN; d++)
      if (in_flit_valid[d] && in_flit_ready[d]) void'(inq[d].pop_front());
    for (int s = 0; s < NN; s++)
      if (out_flit_valid[s] && out_flit_ready[s]) begin
        cur[s].push_back(out_flit[s]);
        if (out_flit[s].tail) begin
          int d;
          d = node_index(cur[s][0].dest);
          if (d >= NN) begin
            failures++;
            $display("FAIL message from node %0d to absent node %0d", s, d);
          end else begin
            foreach (cur[s][i]) inq[d].push_back(cur[s][i]);
            n_delivered[d][cur[s][0].prio]++;
          end
          cur[s].delete();
        end
      end
  end

  // ------------------------------------------------------------ handler threads
  word_t evw [NN][$], p0w [NN][$], p1w [NN][$];
  always @(posedge clk) if (rst_n)
    for (int n = 0; n < NN; n++) begin
      if (issue_valid[n][0] && issue_slot[n][0] == 3) evw[n].push_back(evq_head[n]);
      if (issue_valid[n][1] && issue_slot[n][1] == 4) p0w[n].push_back(p0_head[n]);
      if (issue_valid[n][2] && issue_slot[n][2] == 4) p1w[n].push_back(p1_head[n]);
    end
  always @(negedge clk)
    for (int n = 0; n < NN; n++)
      for (int c = 0; c < NCLUST; c++) begin
        inst_valid[n][c]  = (c == 0) ? 5'b01000 : 5'b10000;
        opnd_ready[n][c]  = '1;
        reads_qhead[n][c] = inst_valid[n][c];
      end

  word_t resp_of [int];
  always @(posedge clk)
    for (int n = 0; n < NN; n++)
      for (int b = 0; b < NBANKS; b++)
        if (resp_valid[n][b]) resp_of[n * 1024 + int'(resp_dst[n][b])] = resp_data[n][b];

  // ------------------------------------------------------------ handler actions
  task automatic mem_op(input int n, input mem_op_e op, input vaddr_t a, input word_t d, input dst_t dst);
    @(negedge clk);
    mreq_valid[n][0] = 1; mreq[n][0] = '{op: op, vaddr: a, wdata: d, dst: dst};
    #1;
    while (!mreq_ready[n][0]) begin @(negedge clk); #1; end
    @(negedge clk);
    mreq_valid[n][0] = 0;
  endtask

  task automatic set_status(input int n, input vaddr_t a, input blk_status_e s);
    bit [63:0] k;
    k = {8'(n), 14'h0, a[VA_W-1:PAGE_OFF_W]};
    @(negedge clk);
    cfg_bs_wr[n] = 1; cfg_bs_vaddr[n] = a; cfg_bs_status[n] = s;
    @(negedge clk);
    cfg_bs_wr[n] = 0;
    if (!pt.exists(k)) pt[k] = '0;
    pt[k][a[PAGE_OFF_W-1:BLOCK_OFF_W]] = s;
  endtask

  task automatic send_msg(input int n, input bit prio, input vaddr_t a, input int len, input word_t w [9]);
    @(negedge clk);
    send_valid[n] = 1; send_prio[n] = prio; send_vaddr[n] = a; send_len[n] = 4'(len);
    send_words[n] = w;
    #1;
    while (!send_ready[n]) begin @(negedge clk); #1; end
    @(negedge clk);
    send_valid[n] = 0;
  endtask

  // next whole message from a queue of read words: head word, then payload
  task automatic take_msg(input int n, input bit prio, output vaddr_t a, output word_t pl [9], output int len);
    int t;
    t = 0;
    while ((prio ? p1w[n].size() : p0w[n].size()) == 0 && t < 5000) begin @(posedge clk); t++; end
    len = int'((prio ? p1w[n][0] : p0w[n][0]) >> 60);
    while ((prio ? p1w[n].size() : p0w[n].size()) < len + 1 && t < 5000) begin @(posedge clk); t++; end
    check(t < 5000, $sformatf("message on node %0d priority %0d", n, prio));
    if (t >= 5000) begin a = '0; len = 0; return; end
    a = vaddr_t'(prio ? p1w[n].pop_front() : p0w[n].pop_front());
    for (int i = 0; i < 9; i++) pl[i] = '0;
    for (int i = 0; i < len; i++) pl[i] = prio ? p1w[n].pop_front() : p0w[n].pop_front();
  endtask

  task automatic take_record(input int n, output word_t w0, output word_t w1, output word_t w2);
    int t;
    t = 0;
    while (evw[n].size() < 3 && t < 5000) begin @(posedge clk); t++; end
    check(evw[n].size() >= 3, $sformatf("event record on node %0d", n));
    if (evw[n].size() < 3) begin w0 = '0; w1 = '0; w2 = '0; return; end
    w0 = evw[n].pop_front(); w1 = evw[n].pop_front(); w2 = evw[n].pop_front();
  endtask

  // message kinds, in the first payload word
  localparam word_t REQ = 64'h5245_0000, INV = 64'h494E_0000, ACK = 64'h4143_0000, RPY = 64'h5250_0000;
  localparam int REQUESTER = 0, HOME = 1;
  dst_t DST = '{cluster: 2'd0, slot: 3'd0, regnum: 5'd7};

  int sharers_done;

  // a sharer's request handler: invalidate, acknowledge to the requester
  task automatic sharer_handler(input int s);
    vaddr_t a; word_t pl [9]; word_t w [9]; int len;
    take_msg(s, 0, a, pl, len);
    check(len == 2 && pl[0] == INV && a == page_addr(s), $sformatf("invalidation reached node %0d", s));
    set_status(s, vaddr_t'(pl[1]), BS_INVALID);
    for (int i = 0; i < 9; i++) w[i] = '0;
    w[0] = ACK; w[1] = word_t'(s);
    send_msg(s, 1, page_addr(REQUESTER), 2, w);
    sharers_done++;
  endtask

  // one store to a block shared by the home and nsh other nodes
  task automatic shared_store(input int nsh, input int blk);
    vaddr_t a, ma;
    word_t  w0, w1, w2, pl [9], w [9];
    word_t  value;
    int     len, acks_expected, acks, t0, rpy_seen;
    int     p1_before;
    a = {DATA_BASE + vpn_t'(HOME), 6'(blk), 6'd16};
    value = 64'h5707_0000 + word_t'(nsh);

    // sharing: home and nodes 2 .. nsh+1 hold the block read-only and cached
    for (int s = 1; s <= nsh + 1; s++) begin
      set_status(s, a, BS_READ_ONLY);
      mem_op(s, OP_LOAD, a, '0, DST);
    end
    repeat (40) @(posedge clk);
    for (int s = 1; s <= nsh + 1; s++)
      check(resp_of.exists(s * 1024 + int'(DST)), $sformatf("node %0d holds a read-only copy", s));
    p1_before = n_delivered[REQUESTER][1];

    // 1. the store on node 0 is refused
    t0 = cycle;
    mem_op(REQUESTER, OP_STORE, a, value, DST);
    take_record(REQUESTER, w0, w1, w2);
    check(w0[2:0] == EV_STORE_INVALID && w1 == word_t'(a) && w2 == value, "store event record");
    // 2. GPRB and request
    @(negedge clk);
    gprb_valid[REQUESTER] = 1; gprb_vaddr[REQUESTER] = vaddr_t'(w1);
    @(negedge clk);
    gprb_valid[REQUESTER] = 0;
    check(gprb_hit[REQUESTER] && node_index(gprb_node[REQUESTER]) == HOME, "GPRB names the home node");
    for (int i = 0; i < 9; i++) w[i] = '0;
    w[0] = REQ; w[1] = word_t'(REQUESTER);
    send_msg(REQUESTER, 0, a, 2, w);

    // 3. home: request, own copy dropped, invalidations out, reply
    take_msg(HOME, 0, ma, pl, len);
    check(len == 2 && pl[0] == REQ && ma == a, "request reached the home node");
    set_status(HOME, a, BS_INVALID);
    sharers_done = 0;
    fork
      begin
        for (int s = 2; s <= nsh + 1; s++) begin
          word_t wi [9];
          for (int i = 0; i < 9; i++) wi[i] = '0;
          wi[0] = INV; wi[1] = word_t'(a);
          send_msg(HOME, 0, page_addr(s), 2, wi);
        end
        for (int i = 0; i < 8; i++) w[i] = sd_rd(HOME, pa_of({a[VA_W-1:BLOCK_OFF_W], 6'(8 * i)}));
        w[8] = word_t'(nsh);
        send_msg(HOME, 1, page_addr(REQUESTER), 9, w);
      end
      // 4. sharers
      for (int s = 2; s <= nsh + 1; s++) begin
        automatic int ss = s;
        fork sharer_handler(ss); join_none
      end
    join
    // 5. requester: reply and acknowledgements in any order
    acks = 0; rpy_seen = 0; acks_expected = -1;
    while (rpy_seen == 0 || acks < acks_expected) begin
      take_msg(REQUESTER, 1, ma, pl, len);
      if (len == 0) break;
      if (len == 9) begin
        rpy_seen = 1; acks_expected = int'(pl[8]);
        for (int i = 0; i < 8; i++)
          sdram[{8'(REQUESTER), 16'h0, pa_of({a[VA_W-1:BLOCK_OFF_W], 6'(8 * i)})}] = pl[i];
      end else if (len == 2 && pl[0] == ACK) acks++;
    end
    while (sharers_done < nsh) @(posedge clk);
    check(rpy_seen == 1 && acks_expected == nsh && acks == nsh,
          $sformatf("reply and %0d acknowledgements (got %0d)", nsh, acks));
    set_status(REQUESTER, a, BS_READ_WRITE);
    mem_op(REQUESTER, OP_STORE, a, value, dst_t'(w0[13:4]));
    repeat (20) @(posedge clk);
    $display("%0d invalidation(s): store completed %0d cycles after it was issued (testbench handlers take no time)",
             nsh, cycle - t0);
    check(n_delivered[REQUESTER][1] - p1_before == nsh + 1,
          $sformatf("%0d messages reached the requester's reply queue", nsh + 1));

    // the requester now holds the block dirty, with the stored value
    check(g_node[0].u_node.u_emi.u_ltlb.status[0][(DATA_BASE + vpn_t'(HOME)) % 32][blk] == BS_DIRTY ||
          g_node[0].u_node.u_emi.u_ltlb.status[1][(DATA_BASE + vpn_t'(HOME)) % 32][blk] == BS_DIRTY,
          "requester's block dirty");
    resp_of.delete();
    mem_op(REQUESTER, OP_LOAD, a, '0, DST);
    repeat (30) @(posedge clk);
    check(resp_of.exists(REQUESTER * 1024 + int'(DST)) && resp_of[REQUESTER * 1024 + int'(DST)] == value,
          "requester reads the stored value");
    // every former sharer, the home included, is refused on a load
    for (int s = 1; s <= nsh + 1; s++) begin
      mem_op(s, OP_LOAD, a, '0, DST);
      take_record(s, w0, w1, w2);
      check(w0[2:0] == EV_LOAD_INVALID && w1 == word_t'(a), $sformatf("node %0d's copy invalidated", s));
    end
    check(!resp_of.exists(1 * 1024 + int'(DST)), "no former sharer answered from its cache");
  endtask

  initial begin
    for (int n = 0; n < NN; n++) begin
      for (int c = 0; c < NCLUST; c++) begin mreq_valid[n][c] = 0; mreq[n][c] = '0; end
      cfg_bs_wr[n] = 0; cfg_bs_vaddr[n] = '0; cfg_bs_status[n] = BS_INVALID;
      gtlb_wr_valid[n] = 0; gtlb_wr_idx[n] = '0; gtlb_wr_entry[n] = '0;
      gprb_valid[n] = 0; gprb_vaddr[n] = '0;
      send_valid[n] = 0; send_prio[n] = 0; send_vaddr[n] = '0; send_len[n] = '0;
      for (int i = 0; i < 9; i++) send_words[n][i] = '0;
      n_delivered[n][0] = 0; n_delivered[n][1] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // every node: the data segment over the 4x4 region, one page per node
    @(negedge clk);
    for (int n = 0; n < NN; n++) begin
      gtlb_wr_valid[n] = 1; gtlb_wr_idx[n] = 0;
      gtlb_wr_entry[n] = '{valid: 1, base_vpn: DATA_BASE, log_pages: 6'd4, start: '0,
                           log_xext: 3'd2, log_yext: 3'd2, log_ppn: 6'd0};
    end
    @(negedge clk);
    for (int n = 0; n < NN; n++) gtlb_wr_valid[n] = 0;
    repeat (5) @(posedge clk);

    shared_store(1, 8);    // 2-way sharing
    shared_store(3, 9);    // 4-way sharing
    shared_store(7, 10);   // 8-way sharing

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
