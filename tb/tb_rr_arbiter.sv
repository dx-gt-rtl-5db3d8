// tb_rr_arbiter -- self-checking test of the round-robin crossbar arbiter.
//
// First the arbitration case of the worked example (PE 0 and PE 3 request the same
// memory at once: PE 0 wins, PE 3 is next).  Then random traffic: each PE raises a
// request at random and holds it until its transfer is acknowledged; a memory model
// answers after 1 to 3 cycles.  Every cycle mem_on is compared with a reference
// round-robin model, and every request must be served before M other transfers
// have ended (fairness bound of round robin).
module tb_rr_arbiter;
  localparam int unsigned M = 4;
  logic clk = 0, rst_n = 0;
  logic [M-1:0] mem_req, mem_on;
  logic         mem_ta;
  int checks = 0, failures = 0;

  rr_arbiter #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int ref_ptr = 0;
  bit ref_locked = 0;
  int ref_owner = 0;
  int waited [M];
  int busy_cycles = 0, lat = 1;

  function automatic logic [M-1:0] ref_grant();
    if (ref_locked) return mem_req[ref_owner] ? M'(1) << ref_owner : '0;
    for (int k = 0; k < M; k++) begin
      int i;
      i = (ref_ptr + k) % M;
      if (mem_req[i]) return M'(1) << i;
    end
    return '0;
  endfunction

  task automatic check(string what, logic [M-1:0] exp);
    checks++;
    if (mem_on !== exp) begin
      failures++;
      $display("%s: mem_on=%b expected %b (req=%b)", what, mem_on, exp, mem_req);
    end
  endtask

  initial begin
    mem_req = '0;
    mem_ta  = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // worked example: PE0 and PE3 both request
    @(negedge clk);
    mem_req = 4'b1001;
    #1 check("example first grant", 4'b0001);
    @(negedge clk);  // transfer of PE0 still in progress, PE1 joins
    mem_req = 4'b1011;
    #1 check("grant held while transfer runs", 4'b0001);
    mem_ta = 1;
    @(negedge clk);
    mem_ta = 0;
    mem_req = 4'b1010;
    #1 check("PE1 next after PE0 (round robin)", 4'b0010);
    mem_ta = 1;
    @(negedge clk);
    mem_ta = 0;
    mem_req = 4'b1001;
    #1 check("PE3 after PE1, before PE0", 4'b1000);
    mem_ta = 1;
    @(negedge clk);
    mem_ta = 0;
    mem_req = 4'b0011;
    #1 check("wrap around to PE0", 4'b0001);
    mem_ta = 1;
    @(negedge clk);
    mem_ta = 0;
    mem_req = 4'b0010;
    #1 check("then PE1", 4'b0010);
    mem_ta = 1;
    @(negedge clk);
    mem_ta = 0;
    mem_req = '0;
    #1 check("idle", 4'b0000);

    // random traffic; the reference starts after PE1 was served
    ref_ptr = 2;
    for (int i = 0; i < M; i++) waited[i] = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic [M-1:0] exp;
      @(negedge clk);
      // new requests
      for (int i = 0; i < M; i++)
        if (!mem_req[i] && ($urandom % 3 == 0)) begin
          mem_req[i] = 1'b1;
          waited[i] = 0;
        end
      // memory model: acknowledge after lat cycles of a granted transfer
      #1;
      exp = ref_grant();
      check("random", exp);
      mem_ta = (exp != 0) && (busy_cycles + 1 >= lat);
      @(posedge clk);
      if (exp != 0) begin
        int g;
        g = $clog2(exp);
        if (mem_ta) begin
          ref_locked = 0;
          ref_ptr = (g + 1) % M;
          busy_cycles = 0;
          lat = 1 + $urandom % 3;
          for (int i = 0; i < M; i++)
            if (mem_req[i] && i != g) begin
              waited[i]++;
              checks++;
              if (waited[i] >= M) begin
                failures++;
                $display("PE%0d starved", i);
              end
            end
          #1 mem_req[g] = 1'b0;   // transfer done
        end else begin
          ref_locked = 1;
          ref_owner = g;
          busy_cycles++;
        end
      end else begin
        ref_locked = 0;
      end
      #1 mem_ta = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
