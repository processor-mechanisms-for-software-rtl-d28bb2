// event_gen: front end of the event system. Collects operations that the
// memory system or the network output refused and writes an event record for
// each into the event queue.
//
// Sources offer a fault (valid/ready). One is taken per cycle, lowest index
// first, into a one-record buffer; the buffer is written into the queue as a
// three-word record when the queue has room for all of it:
//   word 0: header  {dst[9:0] at bits 13:4, op at bit 3, event type at 2:0}
//   word 1: virtual address of the operation
//   word 2: store data (zero for a load)
// Once a fault is accepted the original operation is gone: the user thread is
// not held, and the handler completes it later through the configuration
// space using the destination in the header. If the queue is full the buffer
// holds and the sources are stalled. Latency from a fault offered to the
// record at the queue head is two cycles. The record layout, the fixed
// priority and the one-record buffer are this design's choices.
module event_gen
  import mm_pkg::*;
#(
  parameter int NSRC = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   src_valid [NSRC],
  input  fault_t src_flt   [NSRC],
  output logic   src_ready [NSRC],
  output logic   q_push_valid,
  output word_t [REC_WORDS-1:0] q_push_words,
  input  logic   q_push_ready,
  output logic   event_pulse    // a record entered the queue
);

  logic   rec_valid;
  fault_t rec;
  logic   take;
  int     sel;

  always_comb begin
    sel = -1;
    for (int i = NSRC - 1; i >= 0; i--)
      if (src_valid[i]) sel = i;
  end

  assign take = (sel >= 0) && (!rec_valid || q_push_ready);

  always_comb begin
    for (int i = 0; i < NSRC; i++)
      src_ready[i] = take && (sel == i);
  end

  assign q_push_valid    = rec_valid;
  assign q_push_words[0] = ev_header(rec);
  assign q_push_words[1] = word_t'(rec.vaddr);
  assign q_push_words[2] = (rec.op == OP_STORE) ? rec.data : '0;
  assign event_pulse     = rec_valid && q_push_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_valid <= 1'b0;
      rec       <= '0;
    end else begin
      if (take) begin
        rec_valid <= 1'b1;
        rec       <= src_flt[sel];
      end else if (q_push_ready) begin
        rec_valid <= 1'b0;
      end
    end
  end

endmodule
