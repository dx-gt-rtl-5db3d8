// rr_arbiter -- round-robin bus arbiter of an Mx1 crossbar switch.
//
// Grants the single memory-side bus of the switch to one of the M requesting PEs
// by asserting exactly one mem_on bit.  The search for a winner starts at the PE
// after the one that last completed a transfer, so every requester is served within
// M transfers (round-robin order, as described for the switch).  After reset the
// search starts at PE 0.
//
// Timing (this design's choice; the bus handshake is not specified): the grant is
// combinational from mem_req, so a request can reach the memory in the cycle it is
// raised.  Once a grant has been given it is held (locked) until the memory answers
// with mem_ta, the end of the transfer; the grant pointer then moves past the
// served PE.  A requester must hold its request until it sees its transfer
// acknowledge.
module rr_arbiter #(
  parameter int unsigned M = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] mem_req,
  input  logic         mem_ta,
  output logic [M-1:0] mem_on
);

  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1;

  logic [IW-1:0] ptr;       // first PE to look at in the next arbitration
  logic          locked;
  logic [M-1:0]  owner;     // grant held while a transfer is in progress
  logic [M-1:0]  pick;
  logic [IW-1:0] on_idx;

  // Round-robin search starting at ptr.
  always_comb begin
    pick     = '0;
    for (int unsigned k = 0; k < M; k++) begin
      int unsigned i;
      i = (int'(ptr) + k) % M;
      if (pick == '0 && mem_req[i]) begin
        pick[i]  = 1'b1;
      end
    end
  end

  always_comb begin
    mem_on = locked ? (owner & mem_req) : pick;
    on_idx = '0;
    for (int unsigned i = 0; i < M; i++)
      if (mem_on[i]) on_idx = IW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      locked <= 1'b0;
      owner  <= '0;
    end else if (mem_on != '0) begin
      if (mem_ta) begin
        locked <= 1'b0;
        owner  <= '0;
        ptr    <= (on_idx == IW'(M - 1)) ? '0 : on_idx + 1'b1;
      end else begin
        locked <= 1'b1;
        owner  <= mem_on;
      end
    end else begin
      locked <= 1'b0;
      owner  <= '0;
    end
  end

  // At most one PE owns the memory bus.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(mem_on));

endmodule
