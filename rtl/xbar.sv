// xbar -- MxN crossbar switch: M PEs (through the SoCDMMU) to N memory blocks.
//
// Built from N Mx1 switches, one per memory block, exactly as the generator builds
// it: every switch sees all M request buses from the SoCDMMU and picks, with its own
// comparator and round-robin arbiter, the PE that may use its memory block.  Up to
// min(M, N) transfers run at the same time, one per memory block.
//
// The default configuration is the four-processor, four-memory system: memory blocks
// of 2, 2, 4 and 8 MB with 21, 21, 22 and 23 address bits, attached in order (block 0
// at physical address 0, then 2 MB, 4 MB and 8 MB), so each block is aligned to its
// size.  MEM_AW and MEM_BASE list one entry per memory block, entry n for block n.
// mem_addr[n] is MAX_AW bits wide; bits at and above MEM_AW[n] are zero.
//
// Each PE has its own data width, PE_DW[i] (a multiple of 8, at most DATA_W): the
// default is the mixed system of two 64-bit processors (PE 0 and PE 1) and two 32-bit
// processors (PE 2 and PE 3).  The buses stay DATA_W wide; a narrower PE occupies
// their low PE_DW[i] bits (byte lanes 0 to PE_DW[i]/8-1).  The crossbar drops its
// write data and byte selects above that width and returns read data with the bits
// above it cleared, so a 32-bit PE never disturbs the upper half of a 64-bit word.
// Which PE is which width, and the low-lane placement, are this design's choices.
// For the handshake see mx1_switch.
module xbar #(
  parameter int unsigned M      = 4,
  parameter int unsigned N      = 4,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned DATA_W = 64,
  parameter logic [N-1:0][7:0]        MEM_AW   = {8'd23, 8'd22, 8'd21, 8'd21},
  parameter logic [N-1:0][ADDR_W-1:0] MEM_BASE = {32'h0080_0000, 32'h0040_0000,
                                                  32'h0020_0000, 32'h0000_0000},
  parameter int unsigned MAX_AW = 23,
  parameter logic [M-1:0][7:0]        PE_DW    = {8'd32, 8'd32, 8'd64, 8'd64}
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // PE side (from the SoCDMMU)
  input  logic [M-1:0]                 prev_req,
  input  logic [M-1:0][ADDR_W-1:0]     prev_addr,
  input  logic [M-1:0][DATA_W-1:0]     prev_wdata,
  output logic [M-1:0][DATA_W-1:0]     prev_rdata,
  input  logic [M-1:0]                 prev_re,
  input  logic [M-1:0]                 prev_we,
  input  logic [M-1:0][DATA_W/8-1:0]   prev_be,
  output logic [M-1:0]                 prev_ta,
  // memory side, one bus per memory block
  output logic [N-1:0][MAX_AW-1:0]     mem_addr,
  output logic [N-1:0][DATA_W-1:0]     mem_wdata,
  input  logic [N-1:0][DATA_W-1:0]     mem_rdata,
  output logic [N-1:0]                 mem_re,
  output logic [N-1:0]                 mem_we,
  output logic [N-1:0][DATA_W/8-1:0]   mem_be,
  input  logic [N-1:0]                 mem_ta,
  output logic [N-1:0][M-1:0]          mem_on
);

  logic [N-1:0][M-1:0]             sw_ta;
  logic [N-1:0][M-1:0][DATA_W-1:0] sw_rdata;
  logic [M-1:0][DATA_W-1:0]        wdata_pe, rdata_pe;
  logic [M-1:0][DATA_W/8-1:0]      be_pe;

  // per-PE data width: keep the low PE_DW[i] bits of each PE's data bus
  for (genvar i = 0; i < M; i++) begin : g_pe
    localparam int unsigned DW_I = 32'(PE_DW[i]);
    localparam logic [DATA_W-1:0]   DMASK = {DATA_W{1'b1}} >> (DATA_W - DW_I);
    localparam logic [DATA_W/8-1:0] BMASK = {(DATA_W/8){1'b1}} >> ((DATA_W - DW_I) / 8);
    if (DW_I == 0 || DW_I > DATA_W || DW_I % 8 != 0) begin : g_bad_width
      $error("xbar: PE_DW[%0d] = %0d must be a multiple of 8 in 8..DATA_W", i, DW_I);
    end
    assign wdata_pe[i]   = prev_wdata[i] & DMASK;
    assign be_pe[i]      = prev_be[i] & BMASK;
    assign prev_rdata[i] = rdata_pe[i] & DMASK;
  end

  for (genvar n = 0; n < N; n++) begin : g_sw
    localparam int unsigned AW = 32'(MEM_AW[n]);
    logic [AW-1:0] addr_n;

    mx1_switch #(
      .M(M), .ADDR_W(ADDR_W), .DATA_W(DATA_W), .MEM_AW(AW), .BASE(MEM_BASE[n])
    ) u_sw (
      .clk, .rst_n,
      .prev_req, .prev_addr,
      .prev_wdata (wdata_pe),
      .prev_rdata (sw_rdata[n]),
      .prev_re, .prev_we,
      .prev_be    (be_pe),
      .prev_ta    (sw_ta[n]),
      .mem_addr   (addr_n),
      .mem_wdata  (mem_wdata[n]),
      .mem_rdata  (mem_rdata[n]),
      .mem_re     (mem_re[n]),
      .mem_we     (mem_we[n]),
      .mem_be     (mem_be[n]),
      .mem_ta     (mem_ta[n]),
      .mem_on     (mem_on[n])
    );

    assign mem_addr[n] = MAX_AW'(addr_n);
  end

  // A PE is granted by at most one switch (its address selects one block), so the
  // per-switch answers can be ORed together.
  always_comb begin
    prev_ta  = '0;
    rdata_pe = '0;
    for (int unsigned n = 0; n < N; n++) begin
      prev_ta |= sw_ta[n];
      for (int unsigned i = 0; i < M; i++)
        rdata_pe[i] |= sw_rdata[n][i];
    end
  end

endmodule
