// tb_event_gen: four sources offer random faults while the queue side is
// randomly not ready. Checks that every fault becomes exactly one record with
// the right three words, that a source stalls while the queue is full, that
// simultaneous faults are taken lowest index first, and that a record is
// offered to the queue the cycle after its fault is taken.
module tb_event_gen;
  import mm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   src_valid [4];
  fault_t src_flt   [4];
  logic   src_ready [4];
  logic   q_push_valid, q_push_ready, event_pulse;
  word_t [REC_WORDS-1:0] q_push_words;

  event_gen #(.NSRC(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fault_t expq [$];
  int n_taken, n_recs, stalled, prio_ok;
  bit random_ready;
  bit quiet = 0;

  function automatic fault_t rnd_fault(int s);
    fault_t f;
    f.ev    = ev_type_e'($urandom_range(1, 4));
    f.op    = mem_op_e'($urandom_range(0, 1));
    f.vaddr = vaddr_t'({$urandom, $urandom});
    f.data  = word_t'({$urandom, $urandom});
    f.dst   = dst_t'(10'(s * 100 + $urandom_range(0, 99)));
    return f;
  endfunction

  // record checker and take monitor
  always @(posedge clk) if (rst_n) begin
    if (q_push_valid && q_push_ready) begin
      fault_t e;
      n_recs++;
      check(expq.size() > 0, "record without fault");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        check(q_push_words[0][2:0] == e.ev && q_push_words[0][3] == e.op && q_push_words[0][13:4] == e.dst
              && q_push_words[0][63:14] == '0, "header word");
        check(q_push_words[1] == word_t'(e.vaddr), "address word");
        check(q_push_words[2] == ((e.op == OP_STORE) ? e.data : '0), "data word");
      end
    end
    begin
      int first;
      first = -1;
      for (int s = 3; s >= 0; s--) if (src_valid[s]) first = s;
      for (int s = 0; s < 4; s++) if (src_valid[s] && src_ready[s]) begin
        expq.push_back(src_flt[s]);
        n_taken++;
        if (s == first) prio_ok++;
        else check(0, "priority");
      end
      if (first >= 0 && !src_ready[first]) stalled++;
    end
  end

  // sources
  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < 4; s++) begin
      if (src_valid[s] && took[s]) src_valid[s] = 0;
      if (!quiet && !src_valid[s] && $urandom_range(0, 3) == 0) begin
        src_valid[s] = 1;
        src_flt[s]   = rnd_fault(s);
      end
    end
    q_push_ready = random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
  end
  logic took [4];
  always @(posedge clk) for (int s = 0; s < 4; s++) took[s] <= src_valid[s] && src_ready[s];

  initial begin
    for (int s = 0; s < 4; s++) begin src_valid[s] = 0; src_flt[s] = '0; took[s] = 0; end
    q_push_ready = 1; n_taken = 0; n_recs = 0; stalled = 0; prio_ok = 0; random_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    // latency: quiet the sources, then one fault
    random_ready = 0;
    quiet = 1;
    repeat (10) @(posedge clk);
    check(!q_push_valid, "idle when no faults");
    @(negedge clk);
    src_valid[2] = 1; src_flt[2] = rnd_fault(2);
    @(negedge clk);
    src_valid[2] = 0;
    check(q_push_valid, "record the cycle after the fault");
    @(negedge clk);
    check(!q_push_valid, "one record per fault");
    check(n_recs == n_taken, $sformatf("records %0d faults %0d", n_recs, n_taken));
    check(stalled > 0 && n_recs > 100, "stalls and traffic seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
