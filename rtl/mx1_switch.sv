// mx1_switch -- one Mx1 switch of the crossbar: M PEs to one memory block.
//
// Structure as in the switch block diagram: the comparator (addr_comp) turns each
// prev_req[i] whose physical address lies in this memory block into mem_req[i]; the
// round-robin arbiter (rr_arbiter) grants one of them by raising mem_on[i]; mem_on
// steers the address bus switch, the data bus switch, the wire switches for the read
// and write strobes (and the byte selects) and the wire_ta switch that returns the
// memory's transfer acknowledge to the granted PE.
//
// Handshake (this design's choice): a PE holds prev_req, its address, strobes and
// write data until it sees prev_ta; a transfer ends in the cycle in which mem_ta is
// high.  The memory sees mem_re/mem_we in the same cycle the request wins, and its
// read data is returned on prev_rdata in the mem_ta cycle.
//
// The memory block spans [BASE, BASE + 2**MEM_AW) and must be aligned to its size.
module mx1_switch #(
  parameter int unsigned M      = 4,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 64,
  parameter int unsigned MEM_AW = 21,
  parameter logic [ADDR_W-1:0] BASE = '0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // from the SoCDMMU, one entry per PE
  input  logic [M-1:0]               prev_req,
  input  logic [M-1:0][ADDR_W-1:0]   prev_addr,
  input  logic [M-1:0][DATA_W-1:0]   prev_wdata,
  output logic [M-1:0][DATA_W-1:0]   prev_rdata,
  input  logic [M-1:0]               prev_re,
  input  logic [M-1:0]               prev_we,
  input  logic [M-1:0][DATA_W/8-1:0] prev_be,
  output logic [M-1:0]               prev_ta,
  // to the attached memory block
  output logic [MEM_AW-1:0]          mem_addr,
  output logic [DATA_W-1:0]          mem_wdata,
  input  logic [DATA_W-1:0]          mem_rdata,
  output logic                       mem_re,
  output logic                       mem_we,
  output logic [DATA_W/8-1:0]        mem_be,
  input  logic                       mem_ta,
  // grant state, for observation
  output logic [M-1:0]               mem_on
);

  logic [M-1:0] mem_req;

  addr_comp #(.M(M), .ADDR_W(ADDR_W), .MEM_AW(MEM_AW), .BASE(BASE)) u_comp (
    .prev_req, .prev_addr, .mem_req
  );

  rr_arbiter #(.M(M)) u_arbiter (
    .clk, .rst_n, .mem_req, .mem_ta, .mem_on
  );

  addr_bus_switch #(.M(M), .ADDR_W(ADDR_W), .MEM_AW(MEM_AW)) u_addr_sw (
    .mem_on, .prev_addr, .mem_addr
  );

  data_bus_switch #(.M(M), .DATA_W(DATA_W)) u_data_sw (
    .mem_on, .prev_wdata, .prev_rdata, .mem_wdata, .mem_rdata
  );

  wire_switch #(.M(M), .W(1)) u_re_sw (
    .mem_on, .prev_wire(prev_re), .mem_wire(mem_re)
  );

  wire_switch #(.M(M), .W(1)) u_we_sw (
    .mem_on, .prev_wire(prev_we), .mem_wire(mem_we)
  );

  wire_switch #(.M(M), .W(DATA_W/8)) u_be_sw (
    .mem_on, .prev_wire(prev_be), .mem_wire(mem_be)
  );

  wire_ta_switch #(.M(M)) u_ta_sw (
    .mem_on, .mem_ta, .prev_ta
  );

endmodule
