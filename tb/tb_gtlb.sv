// tb_gtlb: checks the home-node translation against the three ways of mapping
// 16 pages over a 2x2 block of nodes (4, 2 and 1 pages per node), written out
// below as tables of node numbers (node n is at x = n mod 2, y = n div 2 of
// the region). Also checks a start-node offset, both lookup ports at once,
// a second entry, misses outside every page group and an invalid entry.
module tb_gtlb;
  import mm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  vaddr_t      lk_vaddr [2];
  logic        lk_hit   [2];
  node_t       lk_node  [2];
  logic        wr_valid;
  logic [1:0]  wr_idx;
  gtlb_entry_t wr_entry;

  gtlb #(.ENTRIES(4), .NPORTS(2)) dut (.*);

  // home node number of page p for 4, 2 and 1 pages per node
  int map4 [16] = '{0,0,0,0, 1,1,1,1, 2,2,2,2, 3,3,3,3};
  int map2 [16] = '{0,0,1,1, 2,2,3,3, 0,0,1,1, 2,2,3,3};
  int map1 [16] = '{0,1,2,3, 0,1,2,3, 0,1,2,3, 0,1,2,3};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write(input int idx, input vpn_t base, input int lp, input int sx, input int sy,
                       input int lx, input int ly, input int lppn, input bit v = 1);
    @(negedge clk);
    wr_valid = 1; wr_idx = 2'(idx);
    wr_entry = '{valid: v, base_vpn: base, log_pages: 6'(lp),
                 start: '{y: COORD_W'(sy), x: COORD_W'(sx)},
                 log_xext: 3'(lx), log_yext: 3'(ly), log_ppn: 6'(lppn)};
    @(negedge clk);
    wr_valid = 0;
  endtask

  function automatic vaddr_t va(input vpn_t pg, input int off);
    return {pg, PAGE_OFF_W'(off)};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vpn_t base;
    int   n;
    wr_valid = 0; wr_idx = 0; wr_entry = '0;
    lk_vaddr[0] = '0; lk_vaddr[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    base = vpn_t'(32'h0000_0400);
    for (int m = 0; m < 3; m++) begin
      // log pages per node: 2 (4 pages), 1 (2 pages), 0 (1 page)
      write(0, base, 4, 0, 0, 1, 1, 2 - m);
      for (int p = 0; p < 16; p++) begin
        lk_vaddr[0] = va(base + vpn_t'(p), p * 8);
        lk_vaddr[1] = va(base + vpn_t'(15 - p), 0);
        #1;
        n = (m == 0) ? map4[p] : (m == 1) ? map2[p] : map1[p];
        check(lk_hit[0] && lk_node[0].x == COORD_W'(n % 2) && lk_node[0].y == COORD_W'(n / 2),
              $sformatf("map %0d page %0d -> (%0d,%0d)", m, p, lk_node[0].x, lk_node[0].y));
        n = (m == 0) ? map4[15-p] : (m == 1) ? map2[15-p] : map1[15-p];
        check(lk_hit[1] && lk_node[1].x == COORD_W'(n % 2) && lk_node[1].y == COORD_W'(n / 2),
              $sformatf("port 1 map %0d page %0d", m, 15 - p));
      end
    end
    // same group moved to start node (3,5): translated, not reshaped
    write(0, base, 4, 3, 5, 1, 1, 0);
    for (int p = 0; p < 16; p++) begin
      lk_vaddr[0] = va(base + vpn_t'(p), 0);
      #1;
      check(lk_hit[0] && lk_node[0].x == COORD_W'(3 + map1[p] % 2) && lk_node[0].y == COORD_W'(5 + map1[p] / 2),
            $sformatf("start offset page %0d", p));
    end
    // outside the group: miss
    lk_vaddr[0] = va(base + vpn_t'(16), 0);
    lk_vaddr[1] = va(base - vpn_t'(1), 0);
    #1;
    check(!lk_hit[0] && !lk_hit[1], "miss outside group");
    // a code segment mapped locally: 1 node region, 256 pages on node (7,2)
    write(2, vpn_t'(32'h0001_0000), 8, 7, 2, 0, 0, 8);
    for (int p = 0; p < 256; p += 37) begin
      lk_vaddr[1] = va(vpn_t'(32'h0001_0000) + vpn_t'(p), 0);
      #1;
      check(lk_hit[1] && lk_node[1].x == 7 && lk_node[1].y == 2, $sformatf("local segment page %0d", p));
    end
    // a 4x2 region with 2 pages per node, 64 pages: page p on chunk p/2
    write(1, vpn_t'(32'h0002_0000), 6, 0, 0, 2, 1, 1);
    for (int p = 0; p < 64; p++) begin
      lk_vaddr[0] = va(vpn_t'(32'h0002_0000) + vpn_t'(p), 0);
      #1;
      check(lk_hit[0] && lk_node[0].x == COORD_W'((p / 2) % 4) && lk_node[0].y == COORD_W'(((p / 2) / 4) % 2),
            $sformatf("4x2 page %0d", p));
    end
    // an invalid entry does not match
    write(2, vpn_t'(32'h0001_0000), 8, 7, 2, 0, 0, 8, 0);
    lk_vaddr[1] = va(vpn_t'(32'h0001_0000), 0);
    #1;
    check(!lk_hit[1], "invalid entry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
