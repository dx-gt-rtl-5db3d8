// alloc_table -- SoCDMMU allocation table: which G_blocks are in use, and by whom.
//
// One entry per G_block of the global on-chip memory: a used bit and the number of
// the PE that owns the block.  Besides single-entry set/clear and a read port, the
// table keeps a count of free G_blocks and finds the lowest-numbered free G_block
// every cycle (a priority encoder over the free bits), so the allocation unit can
// take one G_block per clock.
//
// Reset state: PE i owns INIT_BLOCKS[i] G_blocks, handed out consecutively in PE
// order from G_block 0 (PE 0 first); every other G_block is free.  With the default
// (all zero) every G_block is free after reset.
//
// Timing: reads and the free-block search are combinational; a set or clear takes
// effect at the next clock edge.  Setting a used entry or clearing a free one is a
// caller error and is flagged by an assertion.
module alloc_table #(
  parameter int unsigned G  = 256,   // number of G_blocks
  parameter int unsigned P  = 4,     // number of PEs
  parameter logic [P-1:0][11:0] INIT_BLOCKS = '0,   // G_blocks owned by each PE at reset
  localparam int unsigned GW = $clog2(G),
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // update port
  input  logic          set_en,     // mark blk used by set_owner
  input  logic          clr_en,     // mark blk free
  input  logic [GW-1:0] blk,
  input  logic [PW-1:0] set_owner,
  // read port
  input  logic [GW-1:0] rd_blk,
  output logic          rd_used,
  output logic [PW-1:0] rd_owner,
  // free-block search
  output logic          ff_valid,   // at least one G_block is free
  output logic [GW-1:0] ff_blk,     // lowest free G_block
  output logic [GW:0]   free_count
);

  logic [G-1:0]           used;
  logic [G-1:0][PW-1:0]   owner;

  function automatic int unsigned init_total();
    int unsigned t = 0;
    for (int unsigned i = 0; i < P; i++) t += 32'(INIT_BLOCKS[i]);
    return t;
  endfunction

  // PE that owns G_block b after reset (valid when b < init_total())
  function automatic logic [PW-1:0] init_owner(int unsigned b);
    int unsigned lo = 0;
    for (int unsigned i = 0; i < P; i++) begin
      if (b >= lo && b < lo + 32'(INIT_BLOCKS[i])) return PW'(i);
      lo += 32'(INIT_BLOCKS[i]);
    end
    return '0;
  endfunction

  localparam int unsigned INIT_TOTAL = init_total();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned b = 0; b < G; b++) begin
        used[b]  <= (b < INIT_TOTAL);
        owner[b] <= init_owner(b);
      end
      free_count <= (GW+1)'(G - INIT_TOTAL);
    end else begin
      if (set_en && !used[blk]) begin
        used[blk]  <= 1'b1;
        owner[blk] <= set_owner;
        free_count <= free_count - 1'b1;
      end else if (clr_en && used[blk]) begin
        used[blk]  <= 1'b0;
        free_count <= free_count + 1'b1;
      end
    end
  end

  assign rd_used  = used[rd_blk];
  assign rd_owner = owner[rd_blk];

  always_comb begin
    ff_valid = 1'b0;
    ff_blk   = '0;
    for (int i = int'(G) - 1; i >= 0; i--)
      if (!used[i]) begin
        ff_valid = 1'b1;
        ff_blk   = GW'(i);
      end
  end

  a_set_free:  assert property (@(posedge clk) disable iff (!rst_n) set_en |-> !used[blk]);
  a_clr_used:  assert property (@(posedge clk) disable iff (!rst_n) clr_en |-> used[blk]);
  initial assert (INIT_TOTAL <= G) else $error("INIT_BLOCKS exceed the G_blocks");

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(set_en && clr_en));

endmodule
