// ltlb: local TLB of a MAP node, translating virtual pages to physical pages
// and holding the block status bits of every 8-word block of each page.
//
// Each entry holds a virtual page number, a physical page number and the
// status bits of the page's 64 blocks (2 bits each, 128 bits per entry; 64
// entries give the 1 KB of status storage of the mechanism). Lookup is
// combinational: the hit test and the block status check (bsb_check) are done
// in parallel, so the check adds no latency. Entries are written by the LTLB
// miss handler (fill port) with the page's status bits copied from the page
// table. Two status update ports change the status of one block of a mapped
// page: port 0 commits a store (read-write -> dirty), port 1 is a handler
// write through the configuration space; port 1 wins on a collision.
// Organisation: WAYS-way set associative, set index = low bits of the virtual
// page number; a fill goes to the way already holding the page, else to an
// invalid way, else to the way named by a per-set round-robin bit.
// The 64-entry default follows from the published 1 KB of LTLB status
// storage at 128 status bits per page; two ways follow the published
// simulation model; the replacement rule is this design's own.
module ltlb
  import mm_pkg::*;
#(
  parameter int ENTRIES = 64,
  parameter int WAYS    = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  // lookup
  input  vaddr_t       lk_vaddr,
  input  mem_op_e      lk_op,
  output logic         lk_hit,
  output paddr_t       lk_paddr,
  output blk_status_e  lk_status,
  output logic         lk_allowed,
  output blk_status_e  lk_next_status,
  output ev_type_e     lk_ev,
  // block status updates
  input  logic [1:0]   upd_valid,
  input  vaddr_t       upd_vaddr  [2],
  input  blk_status_e  upd_status [2],
  // fill (LTLB miss handler)
  input  logic         fill_valid,
  input  vpn_t         fill_vpn,
  input  ppn_t         fill_ppn,
  input  page_status_t fill_status
);

  localparam int SETS  = ENTRIES / WAYS;
  localparam int SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int BLK_W = PAGE_OFF_W - BLOCK_OFF_W;

  logic         valid  [WAYS][SETS];
  vpn_t         tag    [WAYS][SETS];
  ppn_t         ppn    [WAYS][SETS];
  page_status_t status [WAYS][SETS];
  logic [WAY_W-1:0] rr [SETS];

  function automatic logic [SET_W-1:0] set_of(vpn_t v);
    return (SETS > 1) ? SET_W'(v % SETS) : '0;
  endfunction

  // ------------------------------------------------------------ lookup
  vpn_t             lk_vpn;
  logic [SET_W-1:0] lk_set;
  logic [BLK_W-1:0] lk_blk;
  logic [WAY_W-1:0] lk_way;

  assign lk_vpn = lk_vaddr[VA_W-1:PAGE_OFF_W];
  assign lk_set = set_of(lk_vpn);
  assign lk_blk = lk_vaddr[PAGE_OFF_W-1:BLOCK_OFF_W];

  always_comb begin
    lk_hit = 1'b0;
    lk_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[w][lk_set] && tag[w][lk_set] == lk_vpn) begin
        lk_hit = 1'b1;
        lk_way = WAY_W'(w);
      end
    end
  end

  assign lk_paddr  = {ppn[lk_way][lk_set], lk_vaddr[PAGE_OFF_W-1:0]};
  assign lk_status = lk_hit ? status[lk_way][lk_set][lk_blk] : BS_INVALID;

  bsb_check u_check (
    .status      (lk_status),
    .op          (lk_op),
    .allowed     (lk_allowed),
    .next_status (lk_next_status),
    .ev          (lk_ev)
  );

  // ------------------------------------------------------------ fill way
  logic [SET_W-1:0] f_set;
  logic [WAY_W-1:0] f_way;
  assign f_set = set_of(fill_vpn);

  always_comb begin
    f_way = rr[f_set];
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid[w][f_set]) f_way = WAY_W'(w);
    for (int w = 0; w < WAYS; w++)
      if (valid[w][f_set] && tag[w][f_set] == fill_vpn) f_way = WAY_W'(w);
  end

  // ------------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < WAYS; w++)
        for (int s = 0; s < SETS; s++)
          valid[w][s] <= 1'b0;
      for (int s = 0; s < SETS; s++)
        rr[s] <= '0;
    end else if (fill_valid) begin
      valid[f_way][f_set] <= 1'b1;
      if (WAYS > 1) rr[f_set] <= WAY_W'((int'(f_way) + 1) % WAYS);
    end
  end

  always_ff @(posedge clk) begin
    if (fill_valid) begin
      tag[f_way][f_set]    <= fill_vpn;
      ppn[f_way][f_set]    <= fill_ppn;
      status[f_way][f_set] <= fill_status;
    end
    for (int p = 0; p < 2; p++) begin
      if (upd_valid[p]) begin
        for (int w = 0; w < WAYS; w++) begin
          if (valid[w][set_of(upd_vaddr[p][VA_W-1:PAGE_OFF_W])] &&
              tag[w][set_of(upd_vaddr[p][VA_W-1:PAGE_OFF_W])] == upd_vaddr[p][VA_W-1:PAGE_OFF_W])
            status[w][set_of(upd_vaddr[p][VA_W-1:PAGE_OFF_W])]
                  [upd_vaddr[p][PAGE_OFF_W-1:BLOCK_OFF_W]] <= upd_status[p];
        end
      end
    end
  end

endmodule
