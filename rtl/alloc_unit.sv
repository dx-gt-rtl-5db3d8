// alloc_unit -- SoCDMMU allocation unit: executes allocate and free commands.
//
// Takes the next command chosen by the scheduler and works on the allocation table
// and on the requesting PE's address converter, one G_block per clock, so that every
// command has a fixed, data-independent worst-case time:
//
//   CMD_ALLOC count, vblock  Give the PE a page of `count` G_blocks, seen by the PE at
//                            virtual G_blocks vblock .. vblock+count-1.  The physical
//                            G_blocks need not be contiguous: each virtual G_block is
//                            mapped to the lowest free physical G_block at that
//                            moment.  Refused (error) if count is 0, if the page runs
//                            past the virtual window, if fewer than count G_blocks are
//                            free, or if any of the virtual G_blocks is already mapped.
//                            Time: 1 + count (check) + count (map) + 1 cycles.
//   CMD_FREE  count, vblock  Return the G_blocks behind the PE's virtual G_blocks
//                            vblock .. vblock+count-1; unmapped ones are skipped.
//                            Time: 1 + count + 1 cycles.
//
// Any other opcode is refused.  The command set and its timing are this design's
// own; only the service (allocate / deallocate pages of G_blocks) is given.
// Completion is reported by a one-cycle done pulse with the PE number and an error
// flag.
module alloc_unit
  import dxgt_pkg::*;
#(
  parameter int unsigned P = 4,
  parameter int unsigned G = 256,
  localparam int unsigned GW = $clog2(G),
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // scheduler
  input  logic                 sel_valid,
  input  logic [PW-1:0]        sel_pe,
  output logic                 take,
  input  logic [P-1:0][31:0]   cmd,         // latched command word of each PE
  // allocation table
  output logic                 t_set,
  output logic                 t_clr,
  output logic [GW-1:0]        t_blk,
  output logic [PW-1:0]        t_owner,
  input  logic                 t_ff_valid,
  input  logic [GW-1:0]        t_ff_blk,
  input  logic [GW:0]          t_free_count,
  // address converter management port (of PE m_pe)
  output logic [PW-1:0]        m_pe,
  output logic [GW-1:0]        m_vblk,
  input  logic                 m_valid,
  input  logic [GW-1:0]        m_pblk,
  output logic                 m_we,
  output logic                 m_wvalid,
  output logic [GW-1:0]        m_wpblk,
  // completion
  output logic                 done,
  output logic [PW-1:0]        done_pe,
  output logic                 done_err
);

  typedef enum logic [2:0] {S_IDLE, S_CHECK, S_ALLOC, S_FREE, S_DONE} state_e;

  localparam int unsigned CW = CMD_FIELD_W;

  state_e        state;
  logic [PW-1:0] pe;
  logic [GW-1:0] vbase;
  logic [CW-1:0] count;
  logic [CW-1:0] k;
  logic          err;

  cmd_word_t     c;
  logic          last;

  always_comb begin
    c    = cmd_word_t'(cmd[sel_pe]);
    last = (k == count - 1'b1);
  end

  assign take     = (state == S_IDLE) && sel_valid;
  assign m_pe     = pe;
  assign m_vblk   = vbase + GW'(k);
  assign t_owner  = pe;
  assign done     = (state == S_DONE);
  assign done_pe  = pe;
  assign done_err = err;

  always_comb begin
    t_set    = 1'b0;
    t_clr    = 1'b0;
    t_blk    = t_ff_blk;
    m_we     = 1'b0;
    m_wvalid = 1'b0;
    m_wpblk  = t_ff_blk;
    unique case (state)
      S_ALLOC: begin
        t_set    = 1'b1;
        m_we     = 1'b1;
        m_wvalid = 1'b1;
      end
      S_FREE: if (m_valid) begin
        t_clr = 1'b1;
        t_blk = m_pblk;
        m_we  = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      pe    <= '0;
      vbase <= '0;
      count <= '0;
      k     <= '0;
      err   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (sel_valid) begin
          pe    <= sel_pe;
          vbase <= GW'(c.vblock);
          count <= c.count;
          k     <= '0;
          err   <= 1'b0;
          if (c.count == '0 || (32'(c.vblock) + 32'(c.count)) > G) begin
            err   <= 1'b1;
            state <= S_DONE;
          end else if (c.op == CMD_ALLOC) begin
            if (32'(c.count) > 32'(t_free_count)) begin
              err   <= 1'b1;
              state <= S_DONE;
            end else begin
              state <= S_CHECK;
            end
          end else if (c.op == CMD_FREE) begin
            state <= S_FREE;
          end else begin
            err   <= 1'b1;
            state <= S_DONE;
          end
        end
        S_CHECK: begin
          if (m_valid) begin
            err   <= 1'b1;
            state <= S_DONE;
          end else if (last) begin
            k     <= '0;
            state <= S_ALLOC;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_ALLOC, S_FREE: begin
          k <= k + 1'b1;
          if (last) state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The free count was checked, so a free G_block must be there to map.
  a_block_avail: assert property (@(posedge clk) disable iff (!rst_n)
                                  (state == S_ALLOC) |-> t_ff_valid);

endmodule
