// addr_comp -- the comparator ("comp") of an Mx1 crossbar switch.
//
// For each of the M PEs it checks whether the physical address coming from the
// SoCDMMU (prev_addr[i]) falls into the address space of the memory block that is
// attached to this switch, and asserts mem_req[i] when it does.  An address is only
// looked at while the matching prev_req[i] is asserted, as described for the switch.
// The memory block occupies [BASE, BASE + 2**MEM_AW); the block is assumed to be
// naturally aligned (BASE a multiple of its size), so the check is a compare of the
// upper ADDR_W-MEM_AW address bits.  Purely combinational.
module addr_comp #(
  parameter int unsigned M       = 4,
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned MEM_AW  = 21,
  parameter logic [ADDR_W-1:0] BASE = '0
) (
  input  logic [M-1:0]             prev_req,
  input  logic [M-1:0][ADDR_W-1:0] prev_addr,
  output logic [M-1:0]             mem_req
);

  localparam logic [ADDR_W-1:0] HI_MASK = ~((ADDR_W'(1) << MEM_AW) - ADDR_W'(1));

  always_comb begin
    for (int unsigned i = 0; i < M; i++)
      mem_req[i] = prev_req[i] && ((prev_addr[i] & HI_MASK) == (BASE & HI_MASK));
  end

endmodule
