// netin: network input of a MAP node. Delivers arriving messages to the two
// message queues, one per network priority, whose heads are registers of the
// dedicated message handler threads (priority 0: request handler, priority 1:
// reply handler).
//
// Every flit's data word (the head word first, then the payload) is pushed
// into the queue of the flit's priority, one word per cycle. A flit is refused
// (flit_ready low) while its queue is full, which backs the network up. The
// handler reads the head register of its queue; the register is marked empty
// while the queue is empty, so the handler's read waits for a message without
// polling. Queue depth is this design's choice (QDEPTH words per priority).
module netin
  import mm_pkg::*;
#(
  parameter int QDEPTH = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  // flits from the router
  input  logic  flit_valid,
  input  flit_t flit,
  output logic  flit_ready,
  // head registers of the two message queues
  output logic  head_valid [2],
  output word_t head_data  [2],
  input  logic  head_pop   [2],
  output logic  msg_pulse  [2]     // a head flit entered queue p
);

  logic push_ready [2];

  for (genvar p = 0; p < 2; p++) begin : g_q
    logic [$clog2(QDEPTH+1)-1:0] cnt;
    logic                        unused_stall;
    reg_head_queue #(.DEPTH(QDEPTH), .W(WORD_W), .REC_WORDS(1)) u_q (
      .clk, .rst_n,
      .push_valid (flit_valid && (flit.prio == 1'(p))),
      .push_words (flit.data),
      .push_ready (push_ready[p]),
      .head_valid (head_valid[p]),
      .head_data  (head_data[p]),
      .pop        (head_pop[p]),
      .count      (cnt),
      .full_stall (unused_stall)
    );
    assign msg_pulse[p] = flit_valid && flit.head && (flit.prio == 1'(p)) && push_ready[p];
  end

  assign flit_ready = push_ready[flit.prio];

endmodule
