// tb_reg_head_queue: checks the event queue at its full size of 128 words with
// three-word records: the head register is empty until a record arrives and
// full one cycle after the push, words leave in order, a record is refused
// when fewer than three words are free (42 records fit), and simultaneous push
// and pop keep the count right. A software queue gives the expected words.
module tb_reg_head_queue;
  localparam int DEPTH = 128, W = 64, R = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push_valid, push_ready, head_valid, pop, full_stall;
  logic [R-1:0][W-1:0] push_words;
  logic [W-1:0] head_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [W-1:0] model [$];

  reg_head_queue #(.DEPTH(DEPTH), .W(W), .REC_WORDS(R)) dut (.*);

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

  int accepted;
  bit pushed_mid = 0;
  initial begin
    push_valid = 0; pop = 0; push_words = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!head_valid && count == 0, "empty after reset");
    // one record in, visible the next cycle
    push_valid = 1;
    for (int i = 0; i < R; i++) push_words[i] = 64'h1000 + i;
    @(negedge clk);
    for (int i = 0; i < R; i++) model.push_back(64'h1000 + i);
    push_valid = 0;
    check(head_valid && head_data == 64'h1000, "head after first push");
    // fill until refused
    accepted = 1;
    for (int k = 1; k < 60; k++) begin
      push_valid = 1;
      for (int i = 0; i < R; i++) push_words[i] = 64'(k * 16 + i);
      #1;
      if (push_ready) begin
        @(negedge clk);
        for (int i = 0; i < R; i++) model.push_back(64'(k * 16 + i));
        accepted++;
      end else begin
        check(full_stall, "full stall flagged");
        @(negedge clk);
        break;
      end
    end
    push_valid = 0;
    check(accepted == DEPTH / R, $sformatf("records held %0d", accepted));
    check(int'(count) == accepted * R, "count at full");
    // drain with a simultaneous push now and then
    while (model.size() > 0) begin
      check(head_valid && head_data == model[0], $sformatf("head order %h vs %h", head_data, model[0]));
      pop = 1;
      push_valid = (model.size() == 60) && !pushed_mid;
      if (push_valid) pushed_mid = 1;
      for (int i = 0; i < R; i++) push_words[i] = 64'hAAA0 + i;
      @(negedge clk);
      void'(model.pop_front());
      if (push_valid) for (int i = 0; i < R; i++) model.push_back(64'hAAA0 + i);
      pop = 0; push_valid = 0;
    end
    check(!head_valid && count == 0, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
