// addr_bus_switch -- address bus switch of an Mx1 crossbar switch.
//
// Puts the address of the PE whose mem_on bit is set onto mem_addr, the address bus
// of the attached memory block.  Only the low MEM_AW bits (the offset inside the
// naturally aligned memory block) are passed on, which is how the memory address bus
// gets the width that follows from the block size.  With no mem_on bit set the bus
// is driven to zero.  mem_on is one-hot (from the arbiter).  Combinational.
module addr_bus_switch #(
  parameter int unsigned M      = 4,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned MEM_AW = 21
) (
  input  logic [M-1:0]             mem_on,
  input  logic [M-1:0][ADDR_W-1:0] prev_addr,
  output logic [MEM_AW-1:0]        mem_addr
);

  always_comb begin
    mem_addr = '0;
    for (int unsigned i = 0; i < M; i++)
      if (mem_on[i]) mem_addr |= prev_addr[i][MEM_AW-1:0];
  end

endmodule
