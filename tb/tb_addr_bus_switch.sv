// tb_addr_bus_switch -- self-checking test of the crossbar address bus switch.
// For every one-hot and empty mem_on value and random addresses, checks that
// mem_addr is the granted PE's address cut to the memory's 21 address bits.
module tb_addr_bus_switch;
  localparam int unsigned M = 4;
  logic [M-1:0]       mem_on;
  logic [M-1:0][31:0] prev_addr;
  logic [20:0]        mem_addr;
  int checks = 0, failures = 0;

  addr_bus_switch #(.M(M), .ADDR_W(32), .MEM_AW(21)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      int g;
      g = $urandom % (M + 1);          // M means "nobody granted"
      mem_on = (g == M) ? '0 : M'(1) << g;
      for (int i = 0; i < M; i++) prev_addr[i] = $urandom;
      #1;
      checks++;
      if (mem_addr !== ((g == M) ? 21'd0 : prev_addr[g] % (1 << 21))) begin
        failures++;
        $display("mismatch g=%0d got=%h", g, mem_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
