// socdmmu -- SoC Dynamic Memory Management Unit.
//
// Sits between the P processing elements (PEs) and the crossbar and manages the
// global on-chip memory, which is cut into G G_blocks of 2**BLK_AW bytes.  It does two
// jobs:
//
//  * Command port.  Each PE sees the unit as one register at CMD_ADDR in its address
//    space.  Writing a command word (see dxgt_pkg) asks for a page of G_blocks or
//    gives one back; reading returns that PE's status word (busy, done, error, number
//    of free G_blocks).  Commands of different PEs are ordered by the scheduler (FCFS
//    by default, fixed priority with SCH = SCH_PRIORITY) and executed one at a time
//    by the allocation unit, which updates the allocation table and the PE's address
//    converter.  A PE polls the status word until busy drops.
//  * Address conversion.  Every other access of PE i is a global-memory access at a
//    virtual address; PE i's address converter turns it into a physical address,
//    which goes to the crossbar on prev_addr[i] together with the request, strobes,
//    byte selects and write data.  The crossbar's transfer acknowledge and read data
//    come straight back to the PE.
//  * Initial assignment.  INIT_BLOCKS gives each PE a page that exists from reset on
//    (virtual G_blocks 0 ..), so software can run before its first command.
//
// PE bus (per PE, this design's choice): the PE raises pe_req with address, re or we,
// byte selects and write data and holds them until pe_ta.  Command-port accesses and
// accesses to unmapped virtual addresses are answered by the unit itself one cycle
// later; the latter with pe_err set and no memory access.  A command write made while
// the PE's previous command is still busy waits (no pe_ta) until it has finished.
module socdmmu
  import dxgt_pkg::*;
#(
  parameter int unsigned P        = 4,
  parameter int unsigned G        = 256,
  parameter int unsigned BLK_AW   = 16,          // 64 KB G_blocks: 256 x 64 KB = 16 MB
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned DATA_W   = 64,
  parameter sched_e      SCH      = SCH_FCFS,
  parameter logic [ADDR_W-1:0] CMD_ADDR = 32'hF000_0000,
  // initial memory assignment: PE i owns INIT_BLOCKS[i] G_blocks after reset, seen
  // at its virtual G_blocks 0 .., taken consecutively from physical G_block 0 in PE
  // order.  Default: none, every G_block starts free.
  parameter logic [P-1:0][11:0] INIT_BLOCKS = '0,
  localparam int unsigned GW = $clog2(G),
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // PE side
  input  logic [P-1:0]               pe_req,
  input  logic [P-1:0][ADDR_W-1:0]   pe_addr,
  input  logic [P-1:0][DATA_W-1:0]   pe_wdata,
  output logic [P-1:0][DATA_W-1:0]   pe_rdata,
  input  logic [P-1:0]               pe_re,
  input  logic [P-1:0]               pe_we,
  input  logic [P-1:0][DATA_W/8-1:0] pe_be,
  output logic [P-1:0]               pe_ta,
  output logic [P-1:0]               pe_err,
  // crossbar side
  output logic [P-1:0]               prev_req,
  output logic [P-1:0][ADDR_W-1:0]   prev_addr,
  output logic [P-1:0][DATA_W-1:0]   prev_wdata,
  input  logic [P-1:0][DATA_W-1:0]   prev_rdata,
  output logic [P-1:0]               prev_re,
  output logic [P-1:0]               prev_we,
  output logic [P-1:0][DATA_W/8-1:0] prev_be,
  input  logic [P-1:0]               prev_ta,
  // observation
  output logic [GW:0]                free_count,
  output logic [P-1:0]               sched_pending,
  output logic                       cmd_done,
  output logic [PW-1:0]              cmd_done_pe,
  output logic                       cmd_done_err
);

  // ---------------------------------------------------------------- command port
  logic [P-1:0][31:0] cmd;        // latched command word per PE
  logic [P-1:0]       busy, done_f, err_f;
  logic [P-1:0]       arrive;
  logic [P-1:0]       own_ta;     // answer generated by the unit itself
  logic [P-1:0]       own_err;
  logic [P-1:0][31:0] own_rdata;
  logic [P-1:0]       is_cmd, hit;
  logic [P-1:0][ADDR_W-1:0] paddr;

  logic          sel_valid, take;
  logic [PW-1:0] sel_pe;

  always_comb begin
    for (int unsigned i = 0; i < P; i++) begin
      is_cmd[i] = pe_req[i] && (pe_addr[i] == CMD_ADDR);
      arrive[i] = is_cmd[i] && pe_we[i] && !busy[i] && !own_ta[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd       <= '0;
      busy      <= '0;
      done_f    <= '0;
      err_f     <= '0;
      own_ta    <= '0;
      own_err   <= '0;
      own_rdata <= '0;
    end else begin
      for (int unsigned i = 0; i < P; i++) begin
        own_ta[i]  <= 1'b0;
        own_err[i] <= 1'b0;
        if (pe_req[i] && !own_ta[i]) begin
          if (is_cmd[i]) begin
            if (pe_re[i]) begin
              own_ta[i]    <= 1'b1;
              own_rdata[i]            <= 32'(12'(free_count));
              own_rdata[i][STAT_BUSY] <= busy[i];
              own_rdata[i][STAT_DONE] <= done_f[i];
              own_rdata[i][STAT_ERR]  <= err_f[i];
            end else if (arrive[i]) begin
              own_ta[i] <= 1'b1;
              cmd[i]    <= pe_wdata[i][31:0];
              busy[i]   <= 1'b1;
              done_f[i] <= 1'b0;
              err_f[i]  <= 1'b0;
            end
          end else if (!hit[i]) begin
            own_ta[i]    <= 1'b1;
            own_err[i]   <= 1'b1;
            own_rdata[i] <= '0;
          end
        end
        if (cmd_done && cmd_done_pe == PW'(i)) begin
          busy[i]   <= 1'b0;
          done_f[i] <= 1'b1;
          err_f[i]  <= cmd_done_err;
        end
      end
    end
  end

  // ---------------------------------------------------------------- scheduler
  dmmu_scheduler #(.P(P), .SCH(SCH)) u_sched (
    .clk, .rst_n, .arrive, .take, .sel_valid, .sel_pe, .pending(sched_pending)
  );

  // ---------------------------------------------------------------- allocation table
  logic          t_set, t_clr, t_ff_valid, t_rd_used;
  logic [GW-1:0] t_blk, t_ff_blk;
  logic [PW-1:0] t_owner, t_rd_owner;

  alloc_table #(.G(G), .P(P), .INIT_BLOCKS(INIT_BLOCKS)) u_table (
    .clk, .rst_n,
    .set_en(t_set), .clr_en(t_clr), .blk(t_blk), .set_owner(t_owner),
    .rd_blk(t_blk), .rd_used(t_rd_used), .rd_owner(t_rd_owner),
    .ff_valid(t_ff_valid), .ff_blk(t_ff_blk), .free_count
  );

  // A G_block is only given back by the PE that owns it.
  a_owner: assert property (@(posedge clk) disable iff (!rst_n)
                            t_clr |-> (t_rd_used && t_rd_owner == t_owner));

  // ---------------------------------------------------------------- allocation unit
  logic [PW-1:0] m_pe;
  logic [GW-1:0] m_vblk, m_wpblk;
  logic          m_we, m_wvalid;
  logic [P-1:0]          c_valid;
  logic [P-1:0][GW-1:0]  c_pblk;

  alloc_unit #(.P(P), .G(G)) u_alloc (
    .clk, .rst_n,
    .sel_valid, .sel_pe, .take, .cmd,
    .t_set, .t_clr, .t_blk, .t_owner,
    .t_ff_valid, .t_ff_blk, .t_free_count(free_count),
    .m_pe, .m_vblk,
    .m_valid(c_valid[m_pe]), .m_pblk(c_pblk[m_pe]),
    .m_we, .m_wvalid, .m_wpblk,
    .done(cmd_done), .done_pe(cmd_done_pe), .done_err(cmd_done_err)
  );

  // ---------------------------------------------------------------- address converters
  function automatic int unsigned init_base(int unsigned pe);
    int unsigned b = 0;
    for (int unsigned j = 0; j < pe; j++) b += 32'(INIT_BLOCKS[j]);
    return b;
  endfunction

  for (genvar i = 0; i < P; i++) begin : g_conv
    addr_converter #(
      .G(G), .BLK_AW(BLK_AW), .ADDR_W(ADDR_W),
      .INIT_COUNT(32'(INIT_BLOCKS[i])), .INIT_PBASE(init_base(i))
    ) u_conv (
      .clk, .rst_n,
      .vaddr    (pe_addr[i]),
      .hit      (hit[i]),
      .paddr    (paddr[i]),
      .m_vblk,
      .m_valid  (c_valid[i]),
      .m_pblk   (c_pblk[i]),
      .m_we     (m_we && m_pe == PW'(i)),
      .m_wvalid,
      .m_wpblk
    );
  end

  // ---------------------------------------------------------------- towards the crossbar
  always_comb begin
    for (int unsigned i = 0; i < P; i++) begin
      prev_req[i]   = pe_req[i] && !is_cmd[i] && hit[i];
      prev_addr[i]  = paddr[i];
      prev_wdata[i] = pe_wdata[i];
      prev_re[i]    = pe_re[i] && prev_req[i];
      prev_we[i]    = pe_we[i] && prev_req[i];
      prev_be[i]    = pe_be[i];
      pe_ta[i]      = prev_ta[i] || own_ta[i];
      pe_err[i]     = own_err[i];
      pe_rdata[i]   = own_ta[i] ? DATA_W'(own_rdata[i]) : prev_rdata[i];
    end
  end

endmodule
