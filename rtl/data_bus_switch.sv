// data_bus_switch -- data bus switch of an Mx1 crossbar switch.
//
// The PE-to-memory data bus is bidirectional in the switch drawing; here it is split
// into two one-way buses, as is usual inside a chip: write data of the PE whose
// mem_on bit is set goes to mem_wdata, and the memory's read data mem_rdata goes back
// to that PE only (the other PEs see zero).  mem_on is one-hot.  Combinational.
module data_bus_switch #(
  parameter int unsigned M      = 4,
  parameter int unsigned DATA_W = 64
) (
  input  logic [M-1:0]             mem_on,
  input  logic [M-1:0][DATA_W-1:0] prev_wdata,
  output logic [M-1:0][DATA_W-1:0] prev_rdata,
  output logic [DATA_W-1:0]        mem_wdata,
  input  logic [DATA_W-1:0]        mem_rdata
);

  always_comb begin
    mem_wdata = '0;
    for (int unsigned i = 0; i < M; i++) begin
      if (mem_on[i]) mem_wdata |= prev_wdata[i];
      prev_rdata[i] = mem_on[i] ? mem_rdata : '0;
    end
  end

endmodule
