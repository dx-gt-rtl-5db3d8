// tb_wire_switch -- self-checking test of the crossbar wire switch.
// Checks a 1-bit instance (read / write strobe) and an 8-bit instance (byte
// selects): the output follows the granted PE's wire, and is zero with no grant.
module tb_wire_switch;
  localparam int unsigned M = 4;
  logic [M-1:0]       mem_on;
  logic [M-1:0]       w1;
  logic               o1;
  logic [M-1:0][7:0]  w8;
  logic [7:0]         o8;
  int checks = 0, failures = 0;

  wire_switch #(.M(M))          dut   (.mem_on, .prev_wire(w1), .mem_wire(o1));
  wire_switch #(.M(M), .W(8))   dut_b (.mem_on, .prev_wire(w8), .mem_wire(o8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int g;
      g = $urandom % (M + 1);
      mem_on = (g == M) ? '0 : M'(1) << g;
      w1 = M'($urandom);
      for (int i = 0; i < M; i++) w8[i] = 8'($urandom);
      #1;
      checks += 2;
      if (o1 !== ((g == M) ? 1'b0 : w1[g])) begin
        failures++;
        $display("1-bit mismatch g=%0d w=%b o=%b", g, w1, o1);
      end
      if (o8 !== ((g == M) ? 8'd0 : w8[g])) begin
        failures++;
        $display("8-bit mismatch g=%0d", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
