// tb_mx1_switch -- self-checking test of one Mx1 crossbar switch (4 PEs, one 2 MB
// memory block at 0x0020_0000, memory model with no wait state).
//
// Directed part: the worked arbitration example (PE 0 and PE 3 address the block at
// once: PE 0 is served first, PE 3 right after), a lone access that must take
// exactly 2 cycles (request, acknowledge), and an access outside the block that must
// never be granted.  Random part: the four PEs issue reads and writes with random
// byte selects to a small set of words; a shadow memory updated at each write
// acknowledge gives the expected read data.
module tb_mx1_switch;
  localparam int unsigned M = 4, DW = 64, AW = 21;
  localparam logic [31:0] BASE = 32'h0020_0000;

  logic clk = 0, rst_n = 0;
  logic [M-1:0]          prev_req = '0, prev_re = '0, prev_we = '0, prev_ta, mem_on;
  logic [M-1:0][31:0]    prev_addr = '0;
  logic [M-1:0][DW-1:0]  prev_wdata = '0, prev_rdata;
  logic [M-1:0][DW/8-1:0] prev_be = '0;
  logic [AW-1:0]         mem_addr;
  logic [DW-1:0]         mem_wdata, mem_rdata;
  logic                  mem_re, mem_we, mem_ta;
  logic [DW/8-1:0]       mem_be;
  int checks = 0, failures = 0;

  mx1_switch #(.M(M), .ADDR_W(32), .DATA_W(DW), .MEM_AW(AW), .BASE(BASE)) dut (.*);
  sram_model #(.AW(AW), .DATA_W(DW)) u_mem (
    .clk, .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata), .re(mem_re),
    .we(mem_we), .be(mem_be), .ta(mem_ta)
  );

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] shadow [longint];

  function automatic logic [DW-1:0] merge(logic [DW-1:0] old, logic [DW-1:0] d, logic [DW/8-1:0] be);
    for (int b = 0; b < DW / 8; b++) if (be[b]) old[8*b +: 8] = d[8*b +: 8];
    return old;
  endfunction

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One access by PE i; returns the read data and the number of cycles to ta.
  task automatic access(int i, bit wr, logic [31:0] addr, logic [DW-1:0] d,
                        logic [DW/8-1:0] be, output logic [DW-1:0] rd, output int cyc);
    prev_req[i] = 1; prev_addr[i] = addr; prev_re[i] = !wr; prev_we[i] = wr;
    prev_wdata[i] = d; prev_be[i] = be;
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
    end while (!prev_ta[i]);
    rd = prev_rdata[i];
    if (wr) begin
      longint a;
      a = longint'(addr[AW-1:3]);
      shadow[a] = merge(shadow.exists(a) ? shadow[a] : '0, d, be);
    end
    #1;
    prev_req[i] = 0; prev_re[i] = 0; prev_we[i] = 0;
  endtask

  int order [$];

  initial begin
    logic [DW-1:0] rd;
    int cyc;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // worked example: PE0 and PE3 at the same time
    fork
      begin access(0, 0, BASE + 32'h8, '0, 8'hFF, rd, cyc); order.push_back(0); end
      begin access(3, 0, BASE + 32'h10, '0, 8'hFF, rd, cyc); order.push_back(3); end
      begin
        #1;
        chk("PE0 granted first", mem_on == 4'b0001);
      end
    join
    chk("PE3 served after PE0", order.size() == 2 && order[0] == 0 && order[1] == 3);

    // lone access: request cycle + acknowledge cycle
    access(1, 1, BASE + 32'h100, 64'h1122_3344_5566_7788, 8'hFF, rd, cyc);
    chk("lone write takes 2 cycles", cyc == 2);
    access(1, 0, BASE + 32'h100, '0, 8'hFF, rd, cyc);
    chk("lone read takes 2 cycles", cyc == 2);
    chk("read back", rd == 64'h1122_3344_5566_7788);

    // outside the block: never granted
    prev_req[2] = 1; prev_addr[2] = BASE + 32'h0020_0000; prev_re[2] = 1;
    repeat (5) begin
      @(posedge clk);
      chk("out-of-range not granted", !mem_on[2] && !prev_ta[2]);
    end
    #1 prev_req[2] = 0; prev_re[2] = 0;

    // random traffic from all four PEs
    begin
      for (int p = 0; p < M; p++) begin
        automatic int pp = p;
        fork
          for (int n = 0; n < 150; n++) begin
            automatic logic [31:0] a;
            automatic logic [DW-1:0] d, r;
            automatic logic [DW/8-1:0] be;
            automatic bit wr;
            automatic int c;
            a  = BASE + 8 * ($urandom % 8);
            wr = 1'($urandom);
            d  = {$urandom, $urandom};
            be = 8'($urandom) | 8'h01;
            access(pp, wr, a, d, be, r, c);
            if (!wr) begin
              automatic longint k;
              k = longint'(a[AW-1:3]);
              chk($sformatf("PE%0d read data @%h", pp, a), r == (shadow.exists(k) ? shadow[k] : '0));
            end
            repeat ($urandom % 3) @(posedge clk);
            #1;
          end
        join_none
      end
      wait fork;
    end
    chk("memory saw every transfer", u_mem.n_xfer == 4 + 4 * 150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
