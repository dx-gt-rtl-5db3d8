// tb_addr_comp -- self-checking test of the crossbar address comparator.
// Drives random requests and addresses (half of them inside the attached 2 MB block
// at 0x0020_0000) and checks mem_req against an independent range check.
module tb_addr_comp;
  localparam int unsigned M = 4;
  localparam logic [31:0] BASE = 32'h0020_0000;
  logic [M-1:0]        prev_req, mem_req;
  logic [M-1:0][31:0]  prev_addr;
  int checks = 0, failures = 0;

  addr_comp #(.M(M), .ADDR_W(32), .MEM_AW(21), .BASE(BASE)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < M; i++) begin : drive
        int sel;
        prev_req[i] = 1'($urandom);
        sel = $urandom % 4;
        unique case (sel)
          0: prev_addr[i] = BASE + ($urandom % 32'h0020_0000);         // inside
          1: prev_addr[i] = BASE - 1 - ($urandom % 32'h0010_0000);     // just below
          2: prev_addr[i] = BASE + 32'h0020_0000 + ($urandom % 256);   // just above
          default: prev_addr[i] = $urandom;
        endcase
      end
      #1;
      for (int i = 0; i < M; i++) begin
        logic exp;
        exp = prev_req[i] && prev_addr[i] >= BASE && prev_addr[i] < BASE + 32'h0020_0000;
        checks++;
        if (mem_req[i] !== exp) begin
          failures++;
          $display("mismatch t=%0d i=%0d addr=%h req=%b got=%b", t, i, prev_addr[i], prev_req[i], mem_req[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
