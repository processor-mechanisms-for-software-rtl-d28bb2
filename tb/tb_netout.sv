// tb_netout: sends messages of 0 to 9 payload words with random router
// back-pressure, the testbench answering the GTLB lookups from a simple rule
// (addresses with bit 40 set miss; otherwise the node is taken from address
// bits). Checks the head flit (length and address), the payload order, the
// tail mark, the destination and priority of every flit, the drop and fault
// on a GTLB miss, and one flit per cycle when the router is always ready.
module tb_netout;
  import mm_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   send_valid, send_ready, send_prio;
  vaddr_t send_vaddr;
  logic [3:0] send_len;
  word_t  send_words [9];
  vaddr_t gt_vaddr;
  logic   gt_hit;
  node_t  gt_node;
  logic   flt_valid, flt_ready;
  fault_t flt;
  logic   flit_valid, flit_ready;
  flit_t  flit;

  netout #(.MAX_WORDS(9)) dut (.*);

  assign gt_hit  = !gt_vaddr[40];
  assign gt_node = '{y: gt_vaddr[20:16], x: gt_vaddr[25:21]};

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

  bit always_ready = 0;
  always @(negedge clk) flit_ready = always_ready ? 1'b1 : ($urandom_range(0, 2) != 0);

  task automatic send_and_check(input vaddr_t a, input int len, input bit prio, output int cycles);
    word_t w [9];
    int got, t0;
    for (int i = 0; i < 9; i++) w[i] = word_t'({$urandom, $urandom});
    @(negedge clk);
    send_valid = 1; send_prio = prio; send_vaddr = a; send_len = 4'(len);
    for (int i = 0; i < 9; i++) send_words[i] = w[i];
    #1;
    while (!send_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    send_valid = 0;
    t0 = 0;
    got = 0;
    cycles = 0;
    while (got <= len && cycles < 200) begin
      @(posedge clk);
      cycles++;
      if (flt_valid) break;
      if (flit_valid && flit_ready) begin
        check(flit.dest.y == a[20:16] && flit.dest.x == a[25:21] && flit.prio == prio, "dest and priority");
        check(flit.head == (got == 0) && flit.tail == (got == len), "head/tail marks");
        if (got == 0) check(flit.data == {4'(len), 6'b0, a}, "head word");
        else          check(flit.data == w[got - 1], $sformatf("payload %0d", got));
        got++;
      end
    end
    if (a[40]) check(got == 0 && flt_valid && flt.ev == EV_GTLB_MISS && flt.vaddr == a, "GTLB miss fault");
    else       check(got == len + 1, $sformatf("flit count %0d of %0d", got, len + 1));
    @(posedge clk);
  endtask

  int cyc;
  initial begin
    send_valid = 0; send_prio = 0; send_vaddr = '0; send_len = '0; flt_ready = 1;
    for (int i = 0; i < 9; i++) send_words[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      vaddr_t a;
      a = vaddr_t'({$urandom, $urandom});
      a[40] = ($urandom_range(0, 9) == 0);
      send_and_check(a, $urandom_range(0, 9), 1'($urandom_range(0, 1)), cyc);
    end
    always_ready = 1;
    send_and_check(vaddr_t'(64'h12_3456_7890), 9, 1, cyc);
    check(cyc == 10 + 1, $sformatf("one flit per cycle (%0d)", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
