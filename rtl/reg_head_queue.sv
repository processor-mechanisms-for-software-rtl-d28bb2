// reg_head_queue: hardware queue whose head word is presented as a register of
// a handler thread.
//
// Used as the 128-word event queue (records of REC_WORDS words pushed in one
// cycle) and as the message queues of the network input (one word per push).
// The producer pushes a whole record only when the queue has room for all of
// it (push_ready); a record is never split. The consumer sees the head word in
// head_data; head_valid is the scoreboard "full" bit of the mapped register:
// while the queue is empty the register reads as empty and an instruction
// that reads it cannot issue. Reading the register (pop) removes the head word.
// Storage is a circular buffer of DEPTH words with read and write pointers and
// an occupancy count. A push and a pop may happen in the same cycle; a word
// pushed into an empty queue is visible at the head on the next cycle.
// The queue depth of 128 words follows the event system; the atomic record
// push and the record length are this design's choices.
module reg_head_queue #(
  parameter int DEPTH     = 128,
  parameter int W         = 64,
  parameter int REC_WORDS = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // producer
  input  logic                       push_valid,
  input  logic [REC_WORDS-1:0][W-1:0] push_words,  // [0] enters first
  output logic                       push_ready,
  // consumer: the mapped head register
  output logic                       head_valid,
  output logic [W-1:0]               head_data,
  input  logic                       pop,
  // status
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       full_stall   // a push was refused
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  logic do_push, do_pop;
  assign push_ready = (int'(count) + REC_WORDS) <= DEPTH;
  assign do_push    = push_valid && push_ready;
  assign head_valid = (count != '0);
  assign do_pop     = pop && head_valid;
  assign head_data  = mem[rd_ptr];
  assign full_stall = push_valid && !push_ready;

  always_ff @(posedge clk) begin
    if (do_push) begin
      for (int i = 0; i < REC_WORDS; i++)
        mem[AW'((int'(wr_ptr) + i) % DEPTH)] <= push_words[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= AW'((int'(wr_ptr) + REC_WORDS) % DEPTH);
      if (do_pop)  rd_ptr <= AW'((int'(rd_ptr) + 1) % DEPTH);
      count <= count + (do_push ? ($bits(count))'(REC_WORDS) : '0)
                     - (do_pop  ? ($bits(count))'(1)         : '0);
    end
  end

  // The consumer only reads the register when the scoreboard marks it full.
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid)
    else $error("reg_head_queue: pop of an empty head register");

endmodule
