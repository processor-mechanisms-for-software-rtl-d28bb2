// memory_switch: connects the memory ports of the clusters to the cache banks.
//
// Memory addresses are interleaved between the banks so that two memory
// operations can complete per cycle. Each request goes to bank
// vaddr[BLOCK_OFF_W +: log2(NBANK)], i.e. consecutive 8-word blocks alternate
// between banks. Where several clusters want the same bank in one cycle a
// per-bank round-robin arbiter grants one; the others see in_ready low and
// hold their request (conflict_pulse counts such lost cycles). The path is
// combinational: a granted request reaches the bank in the cycle it is
// offered. Interleaving follows the MAP organisation; the block-granular
// interleave bit and round-robin arbitration are this design's choices.
module memory_switch
  import mm_pkg::*;
#(
  parameter int NIN  = 3,
  parameter int NBANK = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid [NIN],
  input  mem_req_t in_req   [NIN],
  output logic     in_ready [NIN],
  output logic     out_valid [NBANK],
  output mem_req_t out_req   [NBANK],
  input  logic     out_ready [NBANK],
  output logic     conflict_pulse
);

  localparam int BW = (NBANK > 1) ? $clog2(NBANK) : 1;
  localparam int IW = (NIN > 1) ? $clog2(NIN) : 1;

  logic [IW-1:0] rr    [NBANK];
  logic [IW-1:0] grant [NBANK];
  logic          gv    [NBANK];

  function automatic int bank_of(vaddr_t a);
    return (NBANK > 1) ? int'(a[BLOCK_OFF_W +: BW]) % NBANK : 0;
  endfunction

  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      gv[b]    = 1'b0;
      grant[b] = '0;
      // search starting at the round-robin pointer
      for (int k = NIN - 1; k >= 0; k--) begin
        if (in_valid[(int'(rr[b]) + k) % NIN] &&
            bank_of(in_req[(int'(rr[b]) + k) % NIN].vaddr) == b) begin
          gv[b]    = 1'b1;
          grant[b] = IW'((int'(rr[b]) + k) % NIN);
        end
      end
      out_valid[b] = gv[b];
      out_req[b]   = in_req[grant[b]];
    end
    conflict_pulse = 1'b0;
    for (int i = 0; i < NIN; i++) begin
      in_ready[i] = 1'b0;
      for (int b = 0; b < NBANK; b++)
        if (gv[b] && grant[b] == IW'(i)) in_ready[i] = out_ready[b];
      if (in_valid[i] && !in_ready[i]) conflict_pulse = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBANK; b++) rr[b] <= '0;
    end else begin
      for (int b = 0; b < NBANK; b++)
        if (gv[b] && out_ready[b]) rr[b] <= IW'((int'(grant[b]) + 1) % NIN);
    end
  end

endmodule
