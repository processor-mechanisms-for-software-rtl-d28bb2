// netout: network output of a MAP node. Sends a message addressed by a
// virtual address, finding the destination node through the GTLB.
//
// A thread offers a message (send_*): a priority (0 for requests, 1 for
// replies), the destination virtual address and up to MAX_WORDS payload
// words. The unit takes it (IDLE), translates the address on its GTLB lookup
// port (XLATE, one cycle), and then sends it as flits, one per accepted cycle
// (SEND): the head flit carries {length[3:0] at bits 63:60, virtual address}
// and is followed by the payload words; the last flit is marked tail. If the
// GTLB holds no mapping for the address, the message is dropped and a fault
// of type EV_GTLB_MISS is offered to the event system (FAULT). Translation of
// the destination through the GTLB on sending follows the mechanism; the flit
// format, the head word layout and the drop-on-miss rule are this design's
// choices.
module netout
  import mm_pkg::*;
#(
  parameter int MAX_WORDS = 9
) (
  input  logic   clk,
  input  logic   rst_n,
  // message from a thread
  input  logic   send_valid,
  output logic   send_ready,
  input  logic   send_prio,
  input  vaddr_t send_vaddr,
  input  logic [3:0] send_len,
  input  word_t  send_words [MAX_WORDS],
  // GTLB lookup port
  output vaddr_t gt_vaddr,
  input  logic   gt_hit,
  input  node_t  gt_node,
  // refused message to the event system
  output logic   flt_valid,
  output fault_t flt,
  input  logic   flt_ready,
  // flits to the router
  output logic   flit_valid,
  output flit_t  flit,
  input  logic   flit_ready
);

  typedef enum logic [1:0] {S_IDLE, S_XLATE, S_SEND, S_FAULT} state_e;

  state_e     state;
  logic       prio_q;
  vaddr_t     vaddr_q;
  logic [3:0] len_q;
  word_t      words_q [MAX_WORDS];
  node_t      dest_q;
  logic [3:0] pos;        // 0 = head flit, k = payload word k-1

  assign send_ready = (state == S_IDLE);
  assign gt_vaddr   = vaddr_q;
  assign flt_valid  = (state == S_FAULT);
  assign flt        = '{ev: EV_GTLB_MISS, op: OP_STORE, vaddr: vaddr_q,
                        data: (len_q != 0) ? words_q[0] : '0, dst: '0};
  assign flit_valid = (state == S_SEND);

  always_comb begin
    flit.head = (pos == 0);
    flit.tail = (pos == len_q);
    flit.prio = prio_q;
    flit.dest = dest_q;
    if (pos == 0) flit.data = {len_q, 6'b0, vaddr_q};
    else          flit.data = words_q[int'(pos) - 1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      prio_q  <= 1'b0;
      vaddr_q <= '0;
      len_q   <= '0;
      dest_q  <= '0;
      pos     <= '0;
      for (int i = 0; i < MAX_WORDS; i++) words_q[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (send_valid) begin
          prio_q  <= send_prio;
          vaddr_q <= send_vaddr;
          len_q   <= (int'(send_len) > MAX_WORDS) ? 4'(MAX_WORDS) : send_len;
          for (int i = 0; i < MAX_WORDS; i++) words_q[i] <= send_words[i];
          state   <= S_XLATE;
        end
        S_XLATE: begin
          dest_q <= gt_node;
          pos    <= '0;
          state  <= gt_hit ? S_SEND : S_FAULT;
        end
        S_SEND: if (flit_ready) begin
          if (pos == len_q) state <= S_IDLE;
          else              pos   <= pos + 4'd1;
        end
        S_FAULT: if (flt_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
