// tb_emi: checks the external memory interface with its LTLB (default size)
// against a small external memory model in the testbench. Covers: an LTLB
// miss stalling a load until the miss handler writes the entry, an allowed
// load read from memory and filled into the requesting bank with its status,
// a reference to an invalid (remote) block refused two cycles after
// acceptance, a store written to memory and its block turned dirty, a store
// to a read-only block refused, a handler status write enabling a store, and
// round-robin service of both banks.
module tb_emi;
  import mm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         miss_valid [2];
  mem_req_t     miss_req   [2];
  logic         miss_ready [2];
  logic         fill_valid [2];
  mem_req_t     fill_req;
  blk_status_e  fill_status;
  line_t        fill_line;
  logic         flt_valid, flt_ready;
  fault_t       flt;
  logic         ltlb_miss;
  vaddr_t       ltlb_miss_vaddr;
  logic         ltlb_fill_valid;
  vpn_t         ltlb_fill_vpn;
  ppn_t         ltlb_fill_ppn;
  page_status_t ltlb_fill_status;
  logic         cfg_bs_wr;
  vaddr_t       cfg_bs_vaddr;
  blk_status_e  cfg_bs_status;
  logic         ext_req_valid, ext_req_write, ext_req_ready, ext_resp_valid;
  paddr_t       ext_req_paddr;
  word_t        ext_req_wdata;
  line_t        ext_resp_line;

  emi dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- memory model
  word_t mem [paddr_t];
  int    writes;
  function automatic word_t rd(paddr_t a);
    return mem.exists(a) ? mem[a] : word_t'({a, 8'h77});
  endfunction
  initial begin
    ext_req_ready = 1; ext_resp_valid = 0; ext_resp_line = '0; writes = 0;
    forever begin
      @(posedge clk);
      if (ext_req_valid && ext_req_ready) begin
        if (ext_req_write) begin
          mem[ext_req_paddr] = ext_req_wdata;
          writes++;
        end else begin
          paddr_t a;
          a = ext_req_paddr;
          repeat (3) @(posedge clk);
          #1;
          ext_resp_valid = 1;
          for (int w = 0; w < 8; w++) ext_resp_line[w] = rd(a + paddr_t'(8 * w));
          @(posedge clk);
          #1;
          ext_resp_valid = 0;
        end
      end
    end
  end

  // ---------------------------------------------------------------- helpers
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic offer(input int b, input mem_op_e op, input vaddr_t a, input word_t d);
    @(negedge clk);
    miss_valid[b] = 1; miss_req[b] = '{op: op, vaddr: a, wdata: d, dst: dst_t'(10'(b + 5))};
    #1;
    while (!miss_ready[b]) begin @(negedge clk); #1; end
    @(negedge clk);
    miss_valid[b] = 0;
  endtask

  // wait for a fill to bank b or a fault; returns cycles waited
  task automatic outcome(input int b, output bit got_fill, output int cyc);
    cyc = 0;
    got_fill = 0;
    forever begin
      #1;
      if (fill_valid[b]) begin got_fill = 1; break; end
      if (flt_valid) break;
      @(posedge clk);
      cyc++;
      if (cyc > 100) break;
    end
  endtask

  vpn_t  V;
  ppn_t  P;
  page_status_t st;
  bit    gf;
  int    cyc, stall;
  always @(posedge clk) if (ltlb_miss) stall++;

  initial begin
    for (int b = 0; b < 2; b++) begin miss_valid[b] = 0; miss_req[b] = '0; end
    flt_ready = 1; ltlb_fill_valid = 0; ltlb_fill_vpn = '0; ltlb_fill_ppn = '0; ltlb_fill_status = '0;
    cfg_bs_wr = 0; cfg_bs_vaddr = '0; cfg_bs_status = BS_INVALID; stall = 0;
    V = vpn_t'(12'h123); P = ppn_t'(12'h456);
    for (int k = 0; k < BLOCKS_PER_PAGE; k++) st[k] = blk_status_e'(k % 4);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. load to an unmapped page: LTLB miss stall, then served
    offer(0, OP_LOAD, {V, 6'd1, 6'd16}, '0);
    repeat (5) @(posedge clk);
    #1;
    check(ltlb_miss && ltlb_miss_vaddr == {V, 6'd1, 6'd16}, "LTLB miss raised");
    @(negedge clk);
    ltlb_fill_valid = 1; ltlb_fill_vpn = V; ltlb_fill_ppn = P; ltlb_fill_status = st;
    @(negedge clk);
    ltlb_fill_valid = 0;
    outcome(0, gf, cyc);
    check(gf && fill_status == BS_READ_ONLY && fill_req.vaddr == {V, 6'd1, 6'd16}, "load filled after miss");
    check(fill_line[3] == rd({P, 6'd1, 6'd24}) && fill_line[0] == rd({P, 6'd1, 6'd0}), "fill data");
    check(!fill_valid[1], "fill goes to the requesting bank only");
    check(stall >= 5, "stalled while LTLB missed");
    // 2. load to an invalid block: fault two cycles after acceptance
    @(posedge clk);
    @(negedge clk);
    miss_valid[1] = 1; miss_req[1] = '{op: OP_LOAD, vaddr: {V, 6'd4, 6'd8}, wdata: '0, dst: dst_t'(10'h2A)};
    #1;
    check(miss_ready[1], "accepted at once when idle");
    @(negedge clk);
    miss_valid[1] = 0;
    cyc = 1;
    while (!flt_valid && cyc < 20) begin @(negedge clk); cyc++; end
    check(flt_valid && flt.ev == EV_LOAD_INVALID && flt.dst == dst_t'(10'h2A) && cyc == 2,
          $sformatf("remote load refused after %0d cycles", cyc));
    // 3. store to a read-write block: memory written, block turns dirty
    offer(1, OP_STORE, {V, 6'd2, 6'd40}, 64'hC0FFEE);
    repeat (4) @(posedge clk);
    check(mem.exists({P, 6'd2, 6'd40}) && mem[{P, 6'd2, 6'd40}] == 64'hC0FFEE, "store reached memory");
    offer(1, OP_LOAD, {V, 6'd2, 6'd0}, '0);
    outcome(1, gf, cyc);
    check(gf && fill_status == BS_DIRTY && fill_line[5] == 64'hC0FFEE, "block dirty after store");
    // 4. store to a read-only block: refused, memory untouched
    writes = 0;
    offer(0, OP_STORE, {V, 6'd5, 6'd0}, 64'h1);
    outcome(0, gf, cyc);
    check(!gf && flt.ev == EV_STORE_READ_ONLY && flt.data == 64'h1, "store RO refused");
    repeat (3) @(posedge clk);
    check(writes == 0, "refused store not written");
    // 5. handler grants read-write: store now allowed
    @(negedge clk);
    cfg_bs_wr = 1; cfg_bs_vaddr = {V, 6'd5, 6'd0}; cfg_bs_status = BS_READ_WRITE;
    @(negedge clk);
    cfg_bs_wr = 0;
    offer(0, OP_STORE, {V, 6'd5, 6'd0}, 64'h2);
    repeat (4) @(posedge clk);
    check(writes == 1 && mem[{P, 6'd5, 6'd0}] == 64'h2, "store after status write");
    // 6. both banks at once: both served
    @(negedge clk);
    miss_valid[0] = 1; miss_req[0] = '{op: OP_LOAD, vaddr: {V, 6'd3, 6'd0}, wdata: '0, dst: '0};
    miss_valid[1] = 1; miss_req[1] = '{op: OP_LOAD, vaddr: {V, 6'd7, 6'd0}, wdata: '0, dst: '0};
    begin
      int served0, served1, n;
      served0 = 0; served1 = 0; n = 0;
      while ((served0 == 0 || served1 == 0) && n < 100) begin
        @(posedge clk);
        if (miss_valid[0] && miss_ready[0]) begin served0++; miss_valid[0] = 0; end
        if (miss_valid[1] && miss_ready[1]) begin served1++; miss_valid[1] = 0; end
        n++;
      end
      check(served0 == 1 && served1 == 1, "both banks served");
    end
    repeat (20) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
