// bsb_check: permission check of one memory operation against the two block
// status bits of the 8-word block it touches.
//
// A load is allowed on a read-only, read-write or dirty block; a store only on
// a read-write or dirty block, and a store leaves the block dirty. A refused
// operation is classified for the event system (load of an invalid block,
// store to an invalid block, store to a read-only block). The four states and
// the rule that hardware enforces them follow the shared-memory mechanism;
// the state encoding and the read-write -> dirty transition on a store are
// this design's choices. Purely combinational; used in parallel with the hit
// test of the cache banks and of the LTLB.
module bsb_check
  import mm_pkg::*;
(
  input  blk_status_e status,       // status bits of the referenced block
  input  mem_op_e     op,           // load or store
  output logic        allowed,      // operation may complete in hardware
  output blk_status_e next_status,  // status after the operation completes
  output ev_type_e    ev            // event type when not allowed
);

  always_comb begin
    allowed     = 1'b0;
    next_status = status;
    ev          = EV_NONE;
    unique case (op)
      OP_LOAD: begin
        allowed = (status != BS_INVALID);
        if (!allowed) ev = EV_LOAD_INVALID;
      end
      OP_STORE: begin
        allowed = (status == BS_READ_WRITE) || (status == BS_DIRTY);
        if (allowed)                      next_status = BS_DIRTY;
        else if (status == BS_INVALID)    ev = EV_STORE_INVALID;
        else                              ev = EV_STORE_READ_ONLY;
      end
      default: ;
    endcase
  end

endmodule
