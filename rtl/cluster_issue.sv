// cluster_issue: thread selection of one MAP cluster, with a dedicated handler
// thread slot whose queue-head register blocks issue while its queue is empty.
//
// Each of the NS thread slots keeps its own register state, so switching
// between threads costs nothing: every cycle one slot whose next instruction
// is ready (inst_valid) and whose operands are available (opnd_ready) is
// chosen. The slot QHEAD_SLOT holds a handler thread (event handler or a
// message handler) whose queue head is mapped onto one of its registers; an
// instruction of that slot that reads the register (reads_qhead) is also
// held back while the scoreboard marks the register empty (qhead_valid low),
// and issuing it pops the queue. The other slots keep issuing meanwhile, so
// user threads run in parallel with the handler. Selection is round-robin
// starting after the slot that issued last; the choice and the abstraction of
// an instruction as three readiness bits are this design's. Set QHEAD_SLOT to
// NS or more for a cluster with no mapped queue. Issue decisions are
// combinational; only the round-robin pointer is a register.
module cluster_issue #(
  parameter int NS         = 5,
  parameter int QHEAD_SLOT = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NS-1:0]         inst_valid,
  input  logic [NS-1:0]         opnd_ready,
  input  logic [NS-1:0]         reads_qhead,
  input  logic                  qhead_valid,
  output logic                  issue_valid,
  output logic [$clog2(NS)-1:0] issue_slot,
  output logic                  qhead_pop,
  output logic                  qhead_stall   // handler waiting on its queue
);

  localparam int SW = $clog2(NS);

  logic [SW-1:0] rr;
  logic [NS-1:0] eligible;

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      eligible[s] = inst_valid[s] && opnd_ready[s];
      if (s == QHEAD_SLOT && reads_qhead[s] && !qhead_valid) eligible[s] = 1'b0;
    end
    issue_valid = 1'b0;
    issue_slot  = '0;
    for (int k = NS - 1; k >= 0; k--) begin
      if (eligible[(int'(rr) + k) % NS]) begin
        issue_valid = 1'b1;
        issue_slot  = SW'((int'(rr) + k) % NS);
      end
    end
    qhead_pop   = 1'b0;
    qhead_stall = 1'b0;
    if (QHEAD_SLOT < NS) begin
      qhead_pop   = issue_valid && (int'(issue_slot) == QHEAD_SLOT) && reads_qhead[QHEAD_SLOT];
      qhead_stall = inst_valid[QHEAD_SLOT] && opnd_ready[QHEAD_SLOT]
                    && reads_qhead[QHEAD_SLOT] && !qhead_valid;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           rr <= '0;
    else if (issue_valid) rr <= SW'((int'(issue_slot) + 1) % NS);
  end

endmodule
