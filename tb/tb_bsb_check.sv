// tb_bsb_check: exhaustive check of the block status permission rules.
// Every (state, operation) pair is applied and the allowed flag, the next
// state and the event type are compared with a table written out below.
module tb_bsb_check;
  import mm_pkg::*;

  int checks = 0, failures = 0;
  blk_status_e status, next_status;
  mem_op_e     op;
  logic        allowed;
  ev_type_e    ev;

  bsb_check dut (.status, .op, .allowed, .next_status, .ev);

  // expected[op][state] = {allowed, next state, event}
  typedef struct packed { logic a; blk_status_e n; ev_type_e e; } exp_t;
  exp_t expected [2][4];

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expected[0][0] = '{1'b0, BS_INVALID,    EV_LOAD_INVALID};
    expected[0][1] = '{1'b1, BS_READ_ONLY,  EV_NONE};
    expected[0][2] = '{1'b1, BS_READ_WRITE, EV_NONE};
    expected[0][3] = '{1'b1, BS_DIRTY,      EV_NONE};
    expected[1][0] = '{1'b0, BS_INVALID,    EV_STORE_INVALID};
    expected[1][1] = '{1'b0, BS_READ_ONLY,  EV_STORE_READ_ONLY};
    expected[1][2] = '{1'b1, BS_DIRTY,      EV_NONE};
    expected[1][3] = '{1'b1, BS_DIRTY,      EV_NONE};
    for (int o = 0; o < 2; o++) begin
      for (int s = 0; s < 4; s++) begin
        op     = mem_op_e'(o);
        status = blk_status_e'(s);
        #1;
        checks++;
        if (allowed !== expected[o][s].a || next_status !== expected[o][s].n || ev !== expected[o][s].e) begin
          failures++;
          $display("FAIL op=%0d state=%0d: allowed=%0d next=%0d ev=%0d", o, s, allowed, next_status, ev);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
