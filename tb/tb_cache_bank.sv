// tb_cache_bank: checks one cache bank (16 lines) with the testbench acting
// as the EMI. Covers: load miss passed on and answered by a fill, load hit
// answered one cycle after acceptance, store to a read-only line refused with
// a fault, allowed store hit written and passed through with the line turned
// dirty, invalidation, a fill with invalid status not installed, a
// conflicting tag evicting a line, and back-pressure from the EMI.
module tb_cache_bank;
  import mm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req_valid, req_ready, resp_valid, emi_valid, emi_ready, flt_valid, flt_ready;
  mem_req_t    req, emi_req, fill_req;
  dst_t        resp_dst;
  word_t       resp_data;
  fault_t      flt;
  logic        fill_valid, inv_valid, hit_pulse, miss_pulse;
  blk_status_e fill_status;
  line_t       fill_line;
  vaddr_t      inv_vaddr;

  cache_bank #(.LINES(16), .BANK_BITS(1)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic word_t pat(vaddr_t a, int w);
    return {a[31:0], 32'(w)} ^ 64'h5A5A_0000_0000_0000;
  endfunction

  // offer one request; returns the cycle count from acceptance to outcome
  typedef enum {O_RESP, O_EMI, O_FLT} outcome_e;
  task automatic send(input mem_op_e op, input vaddr_t a, input word_t d, input dst_t dst,
                      output outcome_e oc, output int lat);
    @(negedge clk);
    req_valid = 1; req = '{op: op, vaddr: a, wdata: d, dst: dst};
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    req_valid = 0;
    lat = 1;
    forever begin
      if (resp_valid) begin oc = O_RESP; break; end
      if (emi_valid && emi_ready) begin oc = O_EMI; break; end
      if (flt_valid && flt_ready) begin oc = O_FLT; break; end
      @(posedge clk); #1; lat++;
    end
  endtask

  task automatic do_fill(input mem_req_t r, input blk_status_e st);
    @(negedge clk);
    fill_valid = 1; fill_req = r; fill_status = st;
    for (int w = 0; w < 8; w++) fill_line[w] = pat({r.vaddr[VA_W-1:6], 6'b0}, w);
    #1;
    if (r.op == OP_LOAD)
      check(resp_valid && resp_data == pat({r.vaddr[VA_W-1:6], 6'b0}, int'(r.vaddr[5:3])) && resp_dst == r.dst,
            "fill returns the word");
    @(negedge clk);
    fill_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  outcome_e oc;
  int lat;
  vaddr_t A, B, C;
  dst_t d1;
  int hits, misses;
  always @(posedge clk) begin
    if (hit_pulse) hits++;
    if (miss_pulse) misses++;
  end

  initial begin
    hits = 0; misses = 0;
    req_valid = 0; req = '0; emi_ready = 1; flt_ready = 1;
    fill_valid = 0; fill_req = '0; fill_status = BS_INVALID; fill_line = '0;
    inv_valid = 0; inv_vaddr = '0;
    d1 = '{cluster: 2'd1, slot: 3'd0, regnum: 5'd7};
    A = vaddr_t'(64'h0004_0040 + 3 * 8);   // bank bit (6) = 1, index from bit 7
    B = vaddr_t'(64'h0004_00C0);
    C = A + vaddr_t'(16 * 128);            // same index as A, other tag
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 1. load miss -> EMI, then fill read-only
    send(OP_LOAD, A, '0, d1, oc, lat);
    check(oc == O_EMI && emi_req.vaddr == A && emi_req.op == OP_LOAD && lat == 1, "load miss to EMI");
    do_fill('{op: OP_LOAD, vaddr: A, wdata: '0, dst: d1}, BS_READ_ONLY);
    // 2. load hit, one cycle
    send(OP_LOAD, A + 8, '0, d1, oc, lat);
    check(oc == O_RESP && lat == 1 && resp_data == pat(A - 3 * 8, 4), "load hit");
    // 3. store to read-only: fault, no write
    send(OP_STORE, A, 64'hDEAD, d1, oc, lat);
    check(oc == O_FLT && flt.ev == EV_STORE_READ_ONLY && flt.vaddr == A && flt.data == 64'hDEAD, "store RO fault");
    send(OP_LOAD, A, '0, d1, oc, lat);
    check(oc == O_RESP && resp_data == pat(A - 3 * 8, 3), "data unchanged after refused store");
    // 4. read-write line: store hit written through and dirty
    send(OP_LOAD, B, '0, d1, oc, lat);
    check(oc == O_EMI, "load B miss");
    do_fill('{op: OP_LOAD, vaddr: B, wdata: '0, dst: d1}, BS_READ_WRITE);
    send(OP_STORE, B + 16, 64'hBEEF, d1, oc, lat);
    check(oc == O_EMI && emi_req.op == OP_STORE && emi_req.wdata == 64'hBEEF, "store hit write-through");
    @(posedge clk); #1;
    check(dut.status[dut.idx_of(B)] == BS_DIRTY, "line dirty after store");
    send(OP_LOAD, B + 16, '0, d1, oc, lat);
    check(oc == O_RESP && resp_data == 64'hBEEF, "load sees stored word");
    // 5. invalidate B: next load misses
    @(negedge clk); inv_valid = 1; inv_vaddr = B + 8; @(negedge clk); inv_valid = 0;
    send(OP_LOAD, B, '0, d1, oc, lat);
    check(oc == O_EMI, "miss after invalidate");
    // 6. fill with invalid status is not installed
    do_fill('{op: OP_STORE, vaddr: B, wdata: '0, dst: d1}, BS_INVALID);
    send(OP_LOAD, B, '0, d1, oc, lat);
    check(oc == O_EMI, "invalid fill not installed");
    // 7. conflicting tag evicts A
    send(OP_LOAD, C, '0, d1, oc, lat);
    check(oc == O_EMI && emi_req.vaddr == C, "conflict miss");
    do_fill('{op: OP_LOAD, vaddr: C, wdata: '0, dst: d1}, BS_DIRTY);
    send(OP_LOAD, A, '0, d1, oc, lat);
    check(oc == O_EMI, "A evicted");
    // 8. back-pressure: EMI not ready holds the bank
    emi_ready = 0;
    @(negedge clk);
    req_valid = 1; req = '{op: OP_LOAD, vaddr: A + 1024, wdata: '0, dst: d1};
    @(negedge clk);     // accepted into s1 (was free)
    req = '{op: OP_LOAD, vaddr: C, wdata: '0, dst: d1};
    repeat (3) begin
      @(negedge clk);
      check(!req_ready && emi_valid, "held while EMI busy");
    end
    emi_ready = 1;
    #1;
    check(req_ready, "released");
    @(negedge clk);
    req_valid = 0;
    #1;
    check(resp_valid && resp_data == pat(C - 24, 3), "queued hit after release");
    @(negedge clk);
    check(hits > 0 && misses > 0, "activity pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
