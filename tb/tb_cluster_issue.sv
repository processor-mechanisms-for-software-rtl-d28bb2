// tb_cluster_issue: checks thread selection of one cluster with the event
// handler in slot 3. A reference model picks, each cycle, the first eligible
// slot after the last one issued; the DUT must agree on random readiness.
// Directed parts: with the queue empty the handler's read waits while user
// slots keep issuing, and it issues (popping the queue) in the very cycle the
// queue head becomes valid; a lone ready slot issues every cycle.
module tb_cluster_issue;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0] inst_valid, opnd_ready, reads_qhead;
  logic       qhead_valid, issue_valid, qhead_pop, qhead_stall;
  logic [2:0] issue_slot;

  cluster_issue #(.NS(5), .QHEAD_SLOT(3)) dut (.*);

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

  int last;   // model: slot issued last
  int stalls, user_during_stall;
  always @(posedge clk) if (rst_n) begin
    int exp;
    exp = -1;
    for (int k = 1; k <= 5; k++) begin
      int s;
      s = (last + k) % 5;
      if (exp < 0 && inst_valid[s] && opnd_ready[s] && !(s == 3 && reads_qhead[3] && !qhead_valid)) exp = s;
    end
    check(issue_valid == (exp >= 0), "issue valid");
    if (exp >= 0) begin
      check(int'(issue_slot) == exp, $sformatf("slot %0d vs %0d", issue_slot, exp));
      check(qhead_pop == (exp == 3 && reads_qhead[3]), "pop");
      last = exp;
    end
    if (qhead_stall) begin
      stalls++;
      if (issue_valid) user_during_stall++;
    end
  end

  initial begin
    inst_valid = 0; opnd_ready = 0; reads_qhead = 0; qhead_valid = 0; last = 4;
    stalls = 0; user_during_stall = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      inst_valid  = 5'($urandom);
      opnd_ready  = 5'($urandom) | 5'($urandom);
      reads_qhead = 5'($urandom);
      qhead_valid = 1'($urandom);
    end
    // handler waits on an empty queue while users issue
    @(negedge clk);
    inst_valid = 5'b01011; opnd_ready = 5'b11111; reads_qhead = 5'b01000; qhead_valid = 0;
    repeat (6) begin
      @(negedge clk);
      check(qhead_stall && issue_valid && issue_slot != 3, "users run while handler waits");
    end
    inst_valid = 5'b01000;
    @(negedge clk);
    check(!issue_valid && qhead_stall, "nothing to issue");
    qhead_valid = 1;
    #1;
    check(issue_valid && issue_slot == 3 && qhead_pop, "handler issues when the event arrives");
    // lone slot issues every cycle
    @(negedge clk);
    inst_valid = 5'b00100; qhead_valid = 0;
    repeat (5) begin
      @(negedge clk);
      check(issue_valid && issue_slot == 2, "back-to-back issue");
    end
    check(stalls > 0 && user_during_stall > 0, "stalls seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
