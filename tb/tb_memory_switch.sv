// tb_memory_switch: random traffic from three clusters into two banks with
// random bank back-pressure. Checks that every request reaches the bank its
// address selects (block interleave), in order and exactly once per cluster,
// that two requests complete in one cycle when they target different banks,
// and that three clusters hammering one bank get equal shares.
module tb_memory_switch;
  import mm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     in_valid [3];
  mem_req_t in_req   [3];
  logic     in_ready [3];
  logic     out_valid [2];
  mem_req_t out_req   [2];
  logic     out_ready [2];
  logic     conflict_pulse;

  memory_switch #(.NIN(3), .NBANK(2)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seq [3];          // next sequence number offered per cluster
  int exp_seq [3];      // next sequence number expected per cluster
  int grants [3];
  int dual, conflicts;
  bit hammer;

  function automatic mem_req_t mk(int c, int n, bit fixed_bank);
    mem_req_t r;
    r = '0;
    r.vaddr = fixed_bank ? vaddr_t'({n, 8'h00}) : vaddr_t'($urandom);
    r.wdata = word_t'({c, n});
    r.dst.cluster = 2'(c);
    return r;
  endfunction

  // monitor: what leaves on a bank output
  always @(posedge clk) if (rst_n) begin
    int n_acc;
    n_acc = 0;
    for (int b = 0; b < 2; b++) begin
      if (out_valid[b] && out_ready[b]) begin
        int c;
        c = int'(out_req[b].dst.cluster);
        n_acc++;
        check(int'(out_req[b].vaddr[BLOCK_OFF_W]) == b, "interleave");
        check(int'(out_req[b].wdata[31:0]) == exp_seq[c], $sformatf("order cluster %0d", c));
        exp_seq[c]++;
        grants[c]++;
      end
    end
    if (n_acc == 2) dual++;
    if (conflict_pulse) conflicts++;
  end

  // drivers
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < 3; c++) begin
      if (in_valid[c] && in_ready_q[c]) begin
        seq[c]++;
        in_valid[c] = 0;
      end
      if (!in_valid[c] && (hammer || $urandom_range(0, 3) != 0)) begin
        in_valid[c] = 1;
        in_req[c] = mk(c, seq[c], hammer);
      end
    end
    for (int b = 0; b < 2; b++) out_ready[b] = hammer ? 1'b1 : ($urandom_range(0, 4) != 0);
  end
  logic in_ready_q [3];
  always @(posedge clk) for (int c = 0; c < 3; c++) in_ready_q[c] <= in_valid[c] && in_ready[c];

  initial begin
    for (int c = 0; c < 3; c++) begin
      in_valid[c] = 0; in_req[c] = '0; seq[c] = 0; exp_seq[c] = 0; grants[c] = 0; in_ready_q[c] = 0;
    end
    out_ready[0] = 0; out_ready[1] = 0; dual = 0; conflicts = 0; hammer = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    check(dual > 0, "two operations in one cycle");
    check(conflicts > 0, "bank conflicts seen");
    // every cluster hammers bank 0
    @(negedge clk);
    hammer = 1;
    repeat (10) @(posedge clk);
    for (int c = 0; c < 3; c++) grants[c] = 0;
    repeat (300) @(posedge clk);
    for (int c = 0; c < 3; c++)
      check(grants[c] >= 95 && grants[c] <= 105, $sformatf("fair share %0d: %0d", c, grants[c]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
