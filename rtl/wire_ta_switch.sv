// wire_ta_switch -- transfer-acknowledge switch of an Mx1 crossbar switch.
//
// Returns the memory's transfer acknowledge mem_ta to the PE whose mem_on bit is
// set (prev_ta[i] = mem_ta while mem_on[i]); all other PEs see it low.
// Combinational.
module wire_ta_switch #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0] mem_on,
  input  logic         mem_ta,
  output logic [M-1:0] prev_ta
);

  always_comb prev_ta = mem_on & {M{mem_ta}};

endmodule
