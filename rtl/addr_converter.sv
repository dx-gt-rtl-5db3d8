// addr_converter -- SoCDMMU address converter of one PE.
//
// Maps the PE's virtual (processor) addresses of the global memory to physical
// addresses.  The global memory is cut into G G_blocks of 2**BLK_AW bytes.  The PE
// sees a virtual window of the same size at address 0: virtual address bits
// [BLK_AW +: GW] select a virtual G_block, and a table of G entries gives, for each
// virtual G_block, a valid bit and the physical G_block it is mapped to.  The offset
// inside the G_block passes unchanged.  An address outside the window, or in a
// virtual G_block that is not mapped, gives hit = 0.
//
// The allocation unit fills and clears entries through the management port.
// Timing: translation and management reads are combinational; a management write
// takes effect at the next clock edge.  Reset maps virtual G_blocks 0 .. INIT_COUNT-1
// to physical G_blocks INIT_PBASE .. INIT_PBASE+INIT_COUNT-1 (the initial memory
// assignment of this PE) and clears every other valid bit; by default nothing is
// mapped.
module addr_converter #(
  parameter int unsigned G      = 256,
  parameter int unsigned BLK_AW = 16,    // log2 of the G_block size in bytes
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned INIT_COUNT = 0,   // G_blocks mapped at reset
  parameter int unsigned INIT_PBASE = 0,   // first physical G_block of that page
  localparam int unsigned GW    = $clog2(G)
) (
  input  logic              clk,
  input  logic              rst_n,
  // translation port
  input  logic [ADDR_W-1:0] vaddr,
  output logic              hit,
  output logic [ADDR_W-1:0] paddr,
  // management port
  input  logic [GW-1:0]     m_vblk,
  output logic              m_valid,
  output logic [GW-1:0]     m_pblk,
  input  logic              m_we,
  input  logic              m_wvalid,
  input  logic [GW-1:0]     m_wpblk
);

  localparam int unsigned PA_W = GW + BLK_AW;

  logic [G-1:0]         valid;
  logic [G-1:0][GW-1:0] pblk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned v = 0; v < G; v++) begin
        valid[v] <= (v < INIT_COUNT);
        pblk[v]  <= GW'(INIT_PBASE + v);
      end
    end else if (m_we) begin
      valid[m_vblk] <= m_wvalid;
      pblk[m_vblk]  <= m_wpblk;
    end
  end

  logic [GW-1:0] vblk;
  logic          in_window;

  always_comb begin
    vblk      = vaddr[BLK_AW +: GW];
    in_window = (vaddr >> PA_W) == '0;
    hit       = in_window && valid[vblk];
    paddr     = ADDR_W'({pblk[vblk], vaddr[BLK_AW-1:0]});
  end

  assign m_valid = valid[m_vblk];
  assign m_pblk  = pblk[m_vblk];

endmodule
