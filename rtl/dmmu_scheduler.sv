// dmmu_scheduler -- orders the SoCDMMU commands of concurrent PEs.
//
// Each PE can have one command waiting.  arrive[i] (one cycle) marks PE i's command
// as pending; when the allocation unit is ready it takes the selected PE (take, with
// sel_pe) and that PE's pending bit is cleared.  Two schemes, chosen by SCH as the
// generator's `sch` option chooses between two scheduler modules:
//
//   SCH_FCFS      first come first served.  An age matrix remembers, for every pair of
//                 pending PEs, which one arrived first (older[j][i]: j is older than
//                 i).  The selected PE is the pending one that no other pending PE is
//                 older than.  Commands that arrive in the same cycle are ordered by
//                 PE number, lowest first (this design's tie rule).
//   SCH_PRIORITY  fixed priority: the pending PE with the lowest number wins.
//
// Timing: sel_valid/sel_pe are combinational from the pending state; a command that
// arrives in cycle t can be taken from cycle t+1.
module dmmu_scheduler
  import dxgt_pkg::*;
#(
  parameter int unsigned P   = 4,
  parameter sched_e      SCH = SCH_FCFS,
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [P-1:0]  arrive,
  input  logic          take,
  output logic          sel_valid,
  output logic [PW-1:0] sel_pe,
  output logic [P-1:0]  pending
);

  logic [P-1:0][P-1:0] older;   // older[j][i]: PE j's command arrived before PE i's
  logic [P-1:0]        eligible;
  logic [P-1:0]        taken;

  always_comb begin
    for (int unsigned i = 0; i < P; i++) begin
      eligible[i] = pending[i];
      for (int unsigned j = 0; j < P; j++) begin
        if (j == i) continue;
        if (SCH == SCH_FCFS) begin
          // j beats i if it is older, or of the same age and a lower number
          if (pending[j] && (older[j][i] || (j < i && !older[i][j])))
            eligible[i] = 1'b0;
        end else begin
          if (pending[j] && j < i) eligible[i] = 1'b0;
        end
      end
    end
    sel_valid = 1'b0;
    sel_pe    = '0;
    for (int i = int'(P) - 1; i >= 0; i--)
      if (eligible[i]) begin
        sel_valid = 1'b1;
        sel_pe    = PW'(i);
      end
    taken = (take && sel_valid) ? (P'(1) << sel_pe) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0;
      older   <= '0;
    end else begin
      for (int unsigned i = 0; i < P; i++) begin
        if (arrive[i] && !pending[i]) begin
          pending[i] <= 1'b1;
          for (int unsigned j = 0; j < P; j++) begin
            // every command already waiting is older than the new one
            older[j][i] <= pending[j] && !taken[j];
            older[i][j] <= 1'b0;
          end
        end else if (taken[i]) begin
          pending[i] <= 1'b0;
        end
      end
    end
  end

  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n) take |-> sel_valid);

endmodule
