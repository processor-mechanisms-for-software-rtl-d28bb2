// tb_netin: random flits of both priorities arrive while the two handlers pop
// their queue heads at random. Checks per-priority order of the words, that
// a head register is empty exactly when its queue is, that flits are refused
// while their queue is full (QDEPTH = 8 here), and the message-arrival count.
module tb_netin;
  import mm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  flit_valid, flit_ready;
  flit_t flit;
  logic  head_valid [2];
  word_t head_data  [2];
  logic  head_pop   [2];
  logic  msg_pulse  [2];

  netin #(.QDEPTH(8)) dut (.*);

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

  word_t model [2][$];
  int heads_sent [2], heads_seen [2], refused;
  bit slow_pop = 0;

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 2; p++)
      check(head_valid[p] == (model[p].size() > 0), "head valid tracks queue");
    if (flit_valid) begin
      if (flit_ready) begin
        model[flit.prio].push_back(flit.data);
        if (flit.head) heads_sent[flit.prio]++;
      end else begin
        refused++;
        check(model[flit.prio].size() == 8, "refused only when full");
      end
    end
    for (int p = 0; p < 2; p++) begin
      if (head_pop[p]) begin
        check(head_data[p] == model[p][0], $sformatf("order prio %0d", p));
        void'(model[p].pop_front());
      end
      if (msg_pulse[p]) heads_seen[p]++;
    end
  end

  logic accepted_q;
  always @(posedge clk) accepted_q <= flit_valid && flit_ready;
  always @(negedge clk) if (rst_n) begin
    if (!flit_valid || accepted_q) begin
      flit_valid = ($urandom_range(0, 1) == 1);
      flit.head  = ($urandom_range(0, 3) == 0);
      flit.tail  = 0;
      flit.prio  = 1'($urandom_range(0, 1));
      flit.dest  = '0;
      flit.data  = word_t'({$urandom, $urandom});
    end
    for (int p = 0; p < 2; p++)
      head_pop[p] = head_valid[p] && ($urandom_range(0, slow_pop ? 7 : 1) == 0);
  end

  initial begin
    flit_valid = 0; flit = '0; head_pop[0] = 0; head_pop[1] = 0; accepted_q = 0; refused = 0;
    for (int p = 0; p < 2; p++) begin heads_sent[p] = 0; heads_seen[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    slow_pop = 1;
    repeat (2000) @(posedge clk);
    check(refused > 0, "back-pressure seen");
    check(heads_seen[0] == heads_sent[0] && heads_seen[1] == heads_sent[1], "message arrivals");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
