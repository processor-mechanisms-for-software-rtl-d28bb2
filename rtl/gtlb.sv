// gtlb: global TLB, translating a virtual address to the mesh node that is
// its home.
//
// An entry maps a page group (a base page and a size of 2**log_pages pages)
// across a rectangular region of the machine: a start node, an X extent of
// 2**log_xext nodes, a Y extent of 2**log_yext nodes, and 2**log_ppn
// contiguous pages on each node before moving on to the next node. For page
// p of the group (counted from the group's base), the chunk c = p >> log_ppn
// lands on node x = c mod 2**log_xext, y = (c >> log_xext) mod 2**log_yext,
// offset from the start node; chunks wrap around the region. With 16 pages
// over a 2x2 region this gives the three mappings of 4, 2 and 1 pages per node
// (nodes numbered x first). The entry fields and their log encoding follow the
// GTLB format; the field widths, the x-before-y order and the alignment of a
// group to its own size are this design's choices.
// The entries are searched associatively and combinationally on NPORTS
// independent lookup ports (GPRB probes from the event handler, message sends
// from the network output). A miss reports lk_hit = 0. Entries are written one
// per cycle through the write port.
module gtlb
  import mm_pkg::*;
#(
  parameter int ENTRIES = 4,
  parameter int NPORTS  = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // lookups
  input  vaddr_t      lk_vaddr [NPORTS],
  output logic        lk_hit   [NPORTS],
  output node_t       lk_node  [NPORTS],
  // entry write
  input  logic        wr_valid,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  gtlb_entry_t wr_entry
);

  gtlb_entry_t ent [ENTRIES];

  function automatic vpn_t lowmask(logic [5:0] lg);
    return (lg >= 6'(VPN_W)) ? '1 : ((vpn_t'(1) << lg) - vpn_t'(1));
  endfunction

  function automatic logic entry_hit(gtlb_entry_t e, vpn_t v);
    return e.valid && ((v & ~lowmask(e.log_pages)) == (e.base_vpn & ~lowmask(e.log_pages)));
  endfunction

  function automatic node_t home_of(gtlb_entry_t e, vpn_t v);
    vpn_t  pg, chunk;
    node_t n;
    pg    = v & lowmask(e.log_pages);
    chunk = pg >> e.log_ppn;
    n.x   = e.start.x + COORD_W'(chunk & lowmask(6'(e.log_xext)));
    n.y   = e.start.y + COORD_W'((chunk >> e.log_xext) & lowmask(6'(e.log_yext)));
    return n;
  endfunction

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      lk_hit[p]  = 1'b0;
      lk_node[p] = '0;
      for (int i = ENTRIES - 1; i >= 0; i--) begin
        if (entry_hit(ent[i], lk_vaddr[p][VA_W-1:PAGE_OFF_W])) begin
          lk_hit[p]  = 1'b1;
          lk_node[p] = home_of(ent[i], lk_vaddr[p][VA_W-1:PAGE_OFF_W]);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
    end else if (wr_valid) begin
      ent[wr_idx] <= wr_entry;
    end
  end

endmodule
