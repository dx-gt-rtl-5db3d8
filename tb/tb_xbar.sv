// tb_xbar -- self-checking test of the 4x4 crossbar at its default configuration
// (memory blocks of 2, 2, 4 and 8 MB at 0, 2 MB, 4 MB and 8 MB).
//
// Directed part: the worked example -- PE 0 and PE 3 address SRAM 0, PE 1 addresses
// SRAM 2, PE 2 addresses SRAM 1.  In the first cycle the three switches must grant
// PE 0, PE 2 and PE 1 at once (three concurrent transfers), all three finish in 2
// cycles, and PE 3 follows on SRAM 0.  Random part: all PEs read and write random
// words spread over the four blocks (including the first and last word of each);
// read data is checked against a shadow memory, and each memory model must have
// seen exactly the transfers addressed to it.  PE 2 and PE 3 are 32-bit PEs (the
// default widths): the shadow drops their byte selects above lane 3, and their read
// data must come back with the upper half cleared, while the 64-bit PEs see the
// whole word -- including upper halves the narrow PEs must not have touched.
module tb_xbar;
  localparam int unsigned M = 4, N = 4, DW = 64, MAW = 23;
  localparam int unsigned AWS [N] = '{21, 21, 22, 23};
  localparam int unsigned PDW [M] = '{64, 64, 32, 32};
  localparam logic [31:0] BASES [N] = '{32'h0, 32'h0020_0000, 32'h0040_0000, 32'h0080_0000};

  logic clk = 0, rst_n = 0;
  logic [M-1:0]           prev_req = '0, prev_re = '0, prev_we = '0, prev_ta;
  logic [M-1:0][31:0]     prev_addr = '0;
  logic [M-1:0][DW-1:0]   prev_wdata = '0, prev_rdata;
  logic [M-1:0][DW/8-1:0] prev_be = '0;
  logic [N-1:0][MAW-1:0]  mem_addr;
  logic [N-1:0][DW-1:0]   mem_wdata, mem_rdata;
  logic [N-1:0]           mem_re, mem_we, mem_ta;
  logic [N-1:0][DW/8-1:0] mem_be;
  logic [N-1:0][M-1:0]    mem_on;
  int checks = 0, failures = 0;
  int expected_xfers [N];

  xbar dut (.*);

  for (genvar n = 0; n < N; n++) begin : g_mem
    sram_model #(.AW(AWS[n]), .DATA_W(DW)) u_mem (
      .clk, .addr(mem_addr[n][AWS[n]-1:0]), .wdata(mem_wdata[n]), .rdata(mem_rdata[n]),
      .re(mem_re[n]), .we(mem_we[n]), .be(mem_be[n]), .ta(mem_ta[n])
    );
  end

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] shadow [longint];

  function automatic int block_of(logic [31:0] a);
    for (int n = N - 1; n >= 0; n--) if (a >= BASES[n]) return n;
    return 0;
  endfunction

  function automatic logic [DW-1:0] dmask(int i);
    return {DW{1'b1}} >> (DW - PDW[i]);
  endfunction

  function automatic logic [DW/8-1:0] bmask(int i);
    return {(DW/8){1'b1}} >> ((DW - PDW[i]) / 8);
  endfunction

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic access(int i, bit wr, logic [31:0] addr, logic [DW-1:0] d,
                        logic [DW/8-1:0] be, output logic [DW-1:0] rd, output int cyc);
    prev_req[i] = 1; prev_addr[i] = addr; prev_re[i] = !wr; prev_we[i] = wr;
    prev_wdata[i] = d; prev_be[i] = be;
    be &= bmask(i);
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
    end while (!prev_ta[i]);
    rd = prev_rdata[i];
    expected_xfers[block_of(addr)]++;
    if (wr) begin
      longint a;
      logic [DW-1:0] w;
      a = longint'(addr >> 3);
      w = shadow.exists(a) ? shadow[a] : '0;
      for (int b = 0; b < DW / 8; b++) if (be[b]) w[8*b +: 8] = d[8*b +: 8];
      shadow[a] = w;
    end
    #1;
    prev_req[i] = 0; prev_re[i] = 0; prev_we[i] = 0;
  endtask

  int order [$];
  int cycles [M];

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // worked example
    fork
      begin automatic logic [DW-1:0] r; access(0, 0, 32'h0000_0100, '0, '1, r, cycles[0]); order.push_back(0); end
      begin automatic logic [DW-1:0] r; access(3, 0, 32'h0000_0200, '0, '1, r, cycles[3]); order.push_back(3); end
      begin automatic logic [DW-1:0] r; access(1, 0, 32'h0040_0000, '0, '1, r, cycles[1]); order.push_back(1); end
      begin automatic logic [DW-1:0] r; access(2, 0, 32'h0020_0000, '0, '1, r, cycles[2]); order.push_back(2); end
      begin
        #1;
        chk("switch 0 grants PE0", mem_on[0] == 4'b0001);
        chk("switch 1 grants PE2", mem_on[1] == 4'b0100);
        chk("switch 2 grants PE1", mem_on[2] == 4'b0010);
        chk("switch 3 idle",       mem_on[3] == 4'b0000);
        chk("three concurrent transfers", $countones(mem_re) == 3);
      end
    join
    chk("PE0, PE1, PE2 done in 2 cycles", cycles[0] == 2 && cycles[1] == 2 && cycles[2] == 2);
    chk("PE3 waits for PE0", cycles[3] == 4 && order[3] == 3);

    // per-PE data width: a 32-bit PE writes only the low half, reads the low half
    begin
      logic [DW-1:0] r;
      int c;
      access(0, 1, 32'h0040_0008, 64'hFFFF_FFFF_FFFF_FFFF, '1, r, c);
      access(2, 1, 32'h0040_0008, 64'h1234_5678_9ABC_DEF0, '1, r, c);
      access(0, 0, 32'h0040_0008, '0, '1, r, c);
      chk("32-bit PE leaves the upper half", r == 64'hFFFF_FFFF_9ABC_DEF0);
      access(3, 0, 32'h0040_0008, '0, '1, r, c);
      chk("32-bit PE reads the low half", r == 64'h0000_0000_9ABC_DEF0);
    end

    // random traffic
    for (int p = 0; p < M; p++) begin
      automatic int pp = p;
      fork
        for (int k = 0; k < 200; k++) begin
          automatic int n = $urandom % N;
          automatic int sel = $urandom % 4;
          automatic logic [31:0] off = (sel == 0) ? 0 :
                                       (sel == 1) ? (1 << AWS[n]) - 8 : 8 * ($urandom % 6);
          automatic logic [31:0] a = BASES[n] + off;
          automatic bit wr = 1'($urandom);
          automatic logic [DW-1:0] d = {$urandom, $urandom};
          automatic logic [DW/8-1:0] be = 8'($urandom) | 8'h80;
          automatic logic [DW-1:0] r;
          automatic int c;
          access(pp, wr, a, d, be, r, c);
          if (!wr) begin
            automatic longint key = longint'(a >> 3);
            chk($sformatf("PE%0d read @%h", pp, a), r == ((shadow.exists(key) ? shadow[key] : '0) & dmask(pp)));
          end
          repeat ($urandom % 2) @(posedge clk);
          #1;
        end
      join_none
    end
    wait fork;
    chk("SRAM0 transfer count", g_mem[0].u_mem.n_xfer == expected_xfers[0]);
    chk("SRAM1 transfer count", g_mem[1].u_mem.n_xfer == expected_xfers[1]);
    chk("SRAM2 transfer count", g_mem[2].u_mem.n_xfer == expected_xfers[2]);
    chk("SRAM3 transfer count", g_mem[3].u_mem.n_xfer == expected_xfers[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
