// tb_ltlb: checks the LTLB at its default size (64 entries, 2 ways):
// translation, per-block status and the permission outcome of loads and
// stores on every block of a page, status updates on both ports (port 1
// winning a collision), refill of a mapped page, and replacement of the
// older way when a third page maps to a full set.
module tb_ltlb;
  import mm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  vaddr_t       lk_vaddr;
  mem_op_e      lk_op;
  logic         lk_hit, lk_allowed;
  paddr_t       lk_paddr;
  blk_status_e  lk_status, lk_next_status;
  ev_type_e     lk_ev;
  logic [1:0]   upd_valid;
  vaddr_t       upd_vaddr  [2];
  blk_status_e  upd_status [2];
  logic         fill_valid;
  vpn_t         fill_vpn;
  ppn_t         fill_ppn;
  page_status_t fill_status;

  ltlb dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic fill(input vpn_t v, input ppn_t p, input page_status_t st);
    @(negedge clk);
    fill_valid = 1; fill_vpn = v; fill_ppn = p; fill_status = st;
    @(negedge clk);
    fill_valid = 0;
  endtask

  // independent permission rule
  function automatic bit ok_for(blk_status_e s, mem_op_e o);
    if (o == OP_LOAD) return s != BS_INVALID;
    return s == BS_READ_WRITE || s == BS_DIRTY;
  endfunction

  task automatic probe(input vpn_t v, input int blk, input mem_op_e o, input bit exp_hit,
                       input ppn_t exp_ppn, input blk_status_e exp_st);
    lk_vaddr = {v, 6'(blk), 6'(8 * (blk % 8))};
    lk_op    = o;
    #1;
    check(lk_hit == exp_hit, $sformatf("hit vpn %0h", v));
    if (exp_hit) begin
      check(lk_paddr == {exp_ppn, 6'(blk), 6'(8 * (blk % 8))}, "paddr");
      check(lk_status == exp_st, $sformatf("status vpn %0h blk %0d: %0d vs %0d", v, blk, lk_status, exp_st));
      check(lk_allowed == ok_for(exp_st, o), "allowed");
      check((lk_ev == EV_NONE) == ok_for(exp_st, o), "event type");
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  page_status_t stA, stB, stC;
  vpn_t vA, vB, vC;
  initial begin
    lk_vaddr = '0; lk_op = OP_LOAD; upd_valid = '0;
    upd_vaddr[0] = '0; upd_vaddr[1] = '0; upd_status[0] = BS_INVALID; upd_status[1] = BS_INVALID;
    fill_valid = 0; fill_vpn = '0; fill_ppn = '0; fill_status = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    vA = vpn_t'(5); vB = vpn_t'(5 + 32); vC = vpn_t'(5 + 64);
    for (int b = 0; b < BLOCKS_PER_PAGE; b++) begin
      stA[b] = blk_status_e'(b % 4);
      stB[b] = blk_status_e'((b / 4) % 4);
      stC[b] = BS_READ_ONLY;
    end
    probe(vA, 0, OP_LOAD, 0, '0, BS_INVALID);
    fill(vA, ppn_t'(100), stA);
    fill(vB, ppn_t'(200), stB);
    for (int b = 0; b < BLOCKS_PER_PAGE; b++)
      for (int o = 0; o < 2; o++) begin
        probe(vA, b, mem_op_e'(o), 1, ppn_t'(100), stA[b]);
        probe(vB, b, mem_op_e'(o), 1, ppn_t'(200), stB[b]);
      end
    // status updates: a store commit marks block 2 of A dirty
    @(negedge clk);
    upd_valid = 2'b01; upd_vaddr[0] = {vA, 6'd2, 6'd0}; upd_status[0] = BS_DIRTY;
    @(negedge clk);
    upd_valid = 2'b00;
    stA[2] = BS_DIRTY;
    probe(vA, 2, OP_STORE, 1, ppn_t'(100), BS_DIRTY);
    // collision on block 7 of B: port 1 (handler) wins
    upd_valid = 2'b11; upd_vaddr[0] = {vB, 6'd7, 6'd0}; upd_status[0] = BS_DIRTY;
    upd_vaddr[1] = {vB, 6'd7, 6'd0}; upd_status[1] = BS_INVALID;
    @(negedge clk);
    upd_valid = 2'b00;
    probe(vB, 7, OP_LOAD, 1, ppn_t'(200), BS_INVALID);
    // update of an unmapped page changes nothing
    upd_valid = 2'b10; upd_vaddr[1] = {vC, 6'd0, 6'd0}; upd_status[1] = BS_DIRTY;
    @(negedge clk);
    upd_valid = 2'b00;
    probe(vC, 0, OP_LOAD, 0, '0, BS_INVALID);
    // a third page in the same set replaces the oldest (A)
    fill(vC, ppn_t'(300), stC);
    probe(vA, 0, OP_LOAD, 0, '0, BS_INVALID);
    probe(vB, 1, OP_LOAD, 1, ppn_t'(200), stB[1]);
    probe(vC, 9, OP_STORE, 1, ppn_t'(300), BS_READ_ONLY);
    // refill of a mapped page reuses its way (B stays, C replaced next by A)
    stB[3] = BS_READ_WRITE;
    fill(vB, ppn_t'(201), stB);
    probe(vB, 3, OP_STORE, 1, ppn_t'(201), BS_READ_WRITE);
    probe(vC, 9, OP_LOAD, 1, ppn_t'(300), BS_READ_ONLY);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
