// tb_data_bus_switch -- self-checking test of the crossbar data bus switch.
// Checks both directions: the granted PE's write data reaches the memory, and the
// memory's read data reaches the granted PE only.
module tb_data_bus_switch;
  localparam int unsigned M = 4, DW = 64;
  logic [M-1:0]         mem_on;
  logic [M-1:0][DW-1:0] prev_wdata, prev_rdata;
  logic [DW-1:0]        mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  data_bus_switch #(.M(M), .DATA_W(DW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      int g;
      g = $urandom % (M + 1);
      mem_on = (g == M) ? '0 : M'(1) << g;
      for (int i = 0; i < M; i++) prev_wdata[i] = {$urandom, $urandom};
      mem_rdata = {$urandom, $urandom};
      #1;
      checks++;
      if (mem_wdata !== ((g == M) ? 64'd0 : prev_wdata[g])) begin
        failures++;
        $display("write mismatch g=%0d", g);
      end
      for (int i = 0; i < M; i++) begin
        checks++;
        if (prev_rdata[i] !== ((i == g) ? mem_rdata : 64'd0)) begin
          failures++;
          $display("read mismatch g=%0d i=%0d", g, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
