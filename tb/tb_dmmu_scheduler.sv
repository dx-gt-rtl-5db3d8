// tb_dmmu_scheduler -- self-checking test of the SoCDMMU command scheduler.
//
// Two instances see the same random arrivals and takes: one FCFS (the default), one
// fixed priority.  The FCFS selection is compared with a queue kept in arrival order
// (same-cycle arrivals by PE number); the priority selection with the lowest pending
// PE number.  A directed start checks the case that tells the two apart: PE 3
// arrives before PE 0.
module tb_dmmu_scheduler;
  import dxgt_pkg::*;
  localparam int unsigned P = 4;
  logic clk = 0, rst_n = 0;
  logic [P-1:0] arrive = '0, pending, pending_p;
  logic         take = 0, take_p = 0;
  logic         sel_valid, sel_valid_p;
  logic [1:0]   sel_pe, sel_pe_p;
  int checks = 0, failures = 0;

  dmmu_scheduler dut (.clk, .rst_n, .arrive, .take, .sel_valid, .sel_pe, .pending);
  dmmu_scheduler #(.P(P), .SCH(SCH_PRIORITY)) dut_p (
    .clk, .rst_n, .arrive, .take(take_p), .sel_valid(sel_valid_p), .sel_pe(sel_pe_p),
    .pending(pending_p)
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int q [$];          // FCFS reference
  bit pend_p [P];     // priority reference

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // directed: PE3 first, then PE0
    @(negedge clk); arrive = 4'b1000;
    @(negedge clk); arrive = 4'b0001;
    @(negedge clk); arrive = 4'b0000;
    chk("FCFS picks the earlier PE3", sel_valid && sel_pe == 3);
    chk("priority picks PE0", sel_valid_p && sel_pe_p == 0);
    take = 1; take_p = 1;
    @(negedge clk);
    chk("FCFS then PE0", sel_valid && sel_pe == 0);
    chk("priority then PE3", sel_valid_p && sel_pe_p == 3);
    @(negedge clk);
    take = 0; take_p = 0;
    chk("both empty", !sel_valid && !sel_valid_p);

    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic [P-1:0] arr;
      int exp_p;
      // expected selections for this cycle
      exp_p = -1;
      for (int i = P - 1; i >= 0; i--) if (pend_p[i]) exp_p = i;
      chk("FCFS valid", sel_valid == (q.size() != 0));
      if (q.size() != 0) chk($sformatf("FCFS sel %0d vs %0d", sel_pe, q[0]), sel_pe == q[0]);
      chk("prio valid", sel_valid_p == (exp_p >= 0));
      if (exp_p >= 0) chk("prio sel", sel_pe_p == exp_p);
      // stimulus
      arr = '0;
      for (int i = 0; i < P; i++)
        if (!pending[i] && ($urandom % 4 == 0)) arr[i] = 1;
      for (int i = 0; i < P; i++)          // priority instance: keep its own arrivals legal
        if (pend_p[i]) arr[i] = arr[i] & 0;
      arrive = arr;
      take   = sel_valid && ($urandom % 2 == 0);
      take_p = sel_valid_p && ($urandom % 2 == 0);
      @(posedge clk);
      if (take) void'(q.pop_front());
      if (take_p) pend_p[sel_pe_p] = 0;
      for (int i = 0; i < P; i++) if (arr[i]) begin
        q.push_back(i);
        pend_p[i] = 1;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
