// tb_wire_ta_switch -- self-checking test of the crossbar transfer-acknowledge switch.
// mem_ta must reach the granted PE and no other.
module tb_wire_ta_switch;
  localparam int unsigned M = 4;
  logic [M-1:0] mem_on, prev_ta;
  logic         mem_ta;
  int checks = 0, failures = 0;

  wire_ta_switch #(.M(M)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g <= M; g++)
      for (int ta = 0; ta < 2; ta++) begin
        mem_on = (g == M) ? '0 : M'(1) << g;
        mem_ta = 1'(ta);
        #1;
        for (int i = 0; i < M; i++) begin
          checks++;
          if (prev_ta[i] !== (ta == 1 && i == g)) begin
            failures++;
            $display("mismatch g=%0d ta=%0d i=%0d", g, ta, i);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
