// wire_switch -- control wire switch of an Mx1 crossbar switch.
//
// Passes the control wire(s) of the PE whose mem_on bit is set to the memory side;
// the Mx1 switch uses one for the read strobe (prev_re -> mem_re), one for the write
// strobe (prev_we -> mem_we) and one, W bits wide, for the byte selects.  With no
// mem_on bit set the output is zero.  mem_on is one-hot.  Combinational.
module wire_switch #(
  parameter int unsigned M = 4,
  parameter int unsigned W = 1
) (
  input  logic [M-1:0]        mem_on,
  input  logic [M-1:0][W-1:0] prev_wire,
  output logic [W-1:0]        mem_wire
);

  always_comb begin
    mem_wire = '0;
    for (int unsigned i = 0; i < M; i++)
      if (mem_on[i]) mem_wire |= prev_wire[i];
  end

endmodule
