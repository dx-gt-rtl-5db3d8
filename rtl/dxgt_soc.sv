// dxgt_soc -- memory and bus subsystem of a multiprocessor SoC: SoCDMMU plus MxN crossbar.
//
// M processing elements reach N global on-chip memory blocks.  Every PE bus enters
// the SoCDMMU, which serves its command register (page allocation and release) and
// converts the PE's virtual global-memory addresses into physical ones.  The
// physical requests of all PEs go to the crossbar, whose N Mx1 switches each serve
// one memory block and arbitrate round-robin between the PEs that address it, so up
// to min(M, N) transfers run at the same time.  The memory blocks themselves (and
// their controllers, and the PE bus wrappers) are outside this module: their buses
// are the mem_* ports.
//
// USE_SOCDMMU selects whether the SoCDMMU is built (the default).  Without it the PE
// addresses are physical and go straight to the crossbar; an access that falls in no
// memory block is answered at once with pe_ta and pe_err, and the SoCDMMU's
// observation outputs read zero.  That answer to a stray address is this design's
// choice.
//
// Default configuration: 4 PEs, 4 memory blocks of 2, 2, 4 and 8 MB (16 MB in all)
// in that physical order, 256 G_blocks of 64 KB, FCFS command scheduling, 32-bit
// addresses, 64-bit data buses of which PE 2 and PE 3 (32-bit processors) use the
// low half.  Timing and the bus handshake: see socdmmu and
// mx1_switch.
module dxgt_soc
  import dxgt_pkg::*;
#(
  parameter int unsigned M      = 4,
  parameter int unsigned N      = 4,
  parameter int unsigned G      = 256,
  parameter int unsigned BLK_AW = 16,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 64,
  parameter sched_e      SCH    = SCH_FCFS,
  parameter logic [ADDR_W-1:0] CMD_ADDR = 32'hF000_0000,
  parameter logic [N-1:0][7:0]        MEM_AW   = {8'd23, 8'd22, 8'd21, 8'd21},
  parameter logic [N-1:0][ADDR_W-1:0] MEM_BASE = {32'h0080_0000, 32'h0040_0000,
                                                  32'h0020_0000, 32'h0000_0000},
  parameter int unsigned MAX_AW = 23,
  parameter logic [M-1:0][7:0]  PE_DW       = {8'd32, 8'd32, 8'd64, 8'd64}, // data width per PE
  parameter bit                 USE_SOCDMMU = 1'b1, // 0: PEs address the memory directly
  parameter logic [M-1:0][11:0] INIT_BLOCKS = '0,   // G_blocks owned by each PE at reset
  localparam int unsigned GW = $clog2(G),
  localparam int unsigned PW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // PE buses (from the PE wrappers)
  input  logic [M-1:0]               pe_req,
  input  logic [M-1:0][ADDR_W-1:0]   pe_addr,
  input  logic [M-1:0][DATA_W-1:0]   pe_wdata,
  output logic [M-1:0][DATA_W-1:0]   pe_rdata,
  input  logic [M-1:0]               pe_re,
  input  logic [M-1:0]               pe_we,
  input  logic [M-1:0][DATA_W/8-1:0] pe_be,
  output logic [M-1:0]               pe_ta,
  output logic [M-1:0]               pe_err,
  // memory block buses
  output logic [N-1:0][MAX_AW-1:0]   mem_addr,
  output logic [N-1:0][DATA_W-1:0]   mem_wdata,
  input  logic [N-1:0][DATA_W-1:0]   mem_rdata,
  output logic [N-1:0]               mem_re,
  output logic [N-1:0]               mem_we,
  output logic [N-1:0][DATA_W/8-1:0] mem_be,
  input  logic [N-1:0]               mem_ta,
  // observation
  output logic [N-1:0][M-1:0]        mem_on,
  output logic [GW:0]                free_count,
  output logic [M-1:0]               sched_pending,
  output logic                       cmd_done,
  output logic [PW-1:0]              cmd_done_pe,
  output logic                       cmd_done_err
);

  logic [M-1:0]               prev_req, prev_re, prev_we, prev_ta;
  logic [M-1:0][ADDR_W-1:0]   prev_addr;
  logic [M-1:0][DATA_W-1:0]   prev_wdata, prev_rdata;
  logic [M-1:0][DATA_W/8-1:0] prev_be;

  if (USE_SOCDMMU) begin : g_dmmu
    socdmmu #(
      .P(M), .G(G), .BLK_AW(BLK_AW), .ADDR_W(ADDR_W), .DATA_W(DATA_W),
      .SCH(SCH), .CMD_ADDR(CMD_ADDR), .INIT_BLOCKS(INIT_BLOCKS)
    ) u_socdmmu (
      .clk, .rst_n,
      .pe_req, .pe_addr, .pe_wdata, .pe_rdata, .pe_re, .pe_we, .pe_be, .pe_ta, .pe_err,
      .prev_req, .prev_addr, .prev_wdata, .prev_rdata, .prev_re, .prev_we, .prev_be,
      .prev_ta,
      .free_count, .sched_pending, .cmd_done, .cmd_done_pe, .cmd_done_err
    );
  end else begin : g_direct
    // no SoCDMMU: physical PE addresses; a stray address gets an immediate error
    logic [M-1:0] in_mem;

    always_comb begin
      in_mem = '0;
      for (int unsigned i = 0; i < M; i++)
        for (int unsigned n = 0; n < N; n++)
          if ((pe_addr[i] >> MEM_AW[n]) == (MEM_BASE[n] >> MEM_AW[n])) in_mem[i] = 1'b1;
    end

    assign prev_req      = pe_req & in_mem;
    assign prev_addr     = pe_addr;
    assign prev_wdata    = pe_wdata;
    assign prev_re       = pe_re;
    assign prev_we       = pe_we;
    assign prev_be       = pe_be;
    assign pe_rdata      = prev_rdata;
    assign pe_ta         = prev_ta | (pe_req & ~in_mem);
    assign pe_err        = pe_req & ~in_mem;
    assign free_count    = '0;
    assign sched_pending = '0;
    assign cmd_done      = 1'b0;
    assign cmd_done_pe   = '0;
    assign cmd_done_err  = 1'b0;
  end

  xbar #(
    .M(M), .N(N), .ADDR_W(ADDR_W), .DATA_W(DATA_W),
    .MEM_AW(MEM_AW), .MEM_BASE(MEM_BASE), .MAX_AW(MAX_AW), .PE_DW(PE_DW)
  ) u_xbar (
    .clk, .rst_n,
    .prev_req, .prev_addr, .prev_wdata, .prev_rdata, .prev_re, .prev_we, .prev_be,
    .prev_ta,
    .mem_addr, .mem_wdata, .mem_rdata, .mem_re, .mem_we, .mem_be, .mem_ta, .mem_on
  );

endmodule
