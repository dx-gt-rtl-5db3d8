// tb_dxgt_soc_g128 -- end-to-end test of the subsystem in the second configuration the
// generator is shown producing: four 32-bit processors, 16 MB of global memory divided
// into 128 G_blocks (so 128 KB each), FCFS scheduling.  The memory blocks stay the
// default 2, 2, 4 and 8 MB.
//
//  1. PE 3 asks for 32 G_blocks; one cycle later PE 0, PE 1 and PE 2 ask for 32 each in
//     the same cycle.  FCFS serves PE 3 first, then the same-cycle commands in PE order;
//     together the pages take all 128 G_blocks, and one more request is refused.
//  2. All PEs read and write random words of their own pages at once (first and last
//     words of 128 KB G_blocks included).  Reads are checked against a shadow of
//     physical memory built from the reference allocation (lowest free first), and a
//     write per PE is found in the memory model at physical G_block x 128 KB, with the
//     upper half of the word untouched by the 32-bit PE.
//  3. PE 2 frees its page; its addresses then fault.
// Each mechanism is counted and must have happened at least once.
module tb_dxgt_soc_g128;
  import dxgt_pkg::*;
  localparam int unsigned M = 4, N = 4, DW = 64, MAW = 23, G = 128, BLK = 131072;
  localparam int unsigned AWS [N] = '{21, 21, 22, 23};
  localparam logic [31:0] CMDA = 32'hF000_0000;

  logic clk = 0, rst_n = 0;
  logic [M-1:0]           pe_req = '0, pe_re = '0, pe_we = '0, pe_ta, pe_err;
  logic [M-1:0][31:0]     pe_addr = '0;
  logic [M-1:0][DW-1:0]   pe_wdata = '0, pe_rdata;
  logic [M-1:0][DW/8-1:0] pe_be = '0;
  logic [N-1:0][MAW-1:0]  mem_addr;
  logic [N-1:0][DW-1:0]   mem_wdata, mem_rdata;
  logic [N-1:0]           mem_re, mem_we, mem_ta;
  logic [N-1:0][DW/8-1:0] mem_be;
  logic [N-1:0][M-1:0]    mem_on;
  logic [7:0]             free_count;
  logic [M-1:0]           sched_pending;
  logic                   cmd_done, cmd_done_err;
  logic [1:0]             cmd_done_pe;
  int checks = 0, failures = 0;

  dxgt_soc #(
    .G(G), .BLK_AW(17), .PE_DW({8'd32, 8'd32, 8'd32, 8'd32})
  ) dut (.*);

  for (genvar n = 0; n < N; n++) begin : g_mem
    sram_model #(.AW(AWS[n]), .DATA_W(DW)) u_mem (
      .clk, .addr(mem_addr[n][AWS[n]-1:0]), .wdata(mem_wdata[n]), .rdata(mem_rdata[n]),
      .re(mem_re[n]), .we(mem_we[n]), .be(mem_be[n]), .ta(mem_ta[n])
    );
  end

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_conflict = 0, n_concurrent = 0, n_fault = 0, n_refused = 0;
  int n_free = 0, n_alloc = 0, n_placed = 0;
  int done_order [$];
  always @(posedge clk) if (rst_n) begin
    if ($countones(mem_re | mem_we) >= 2) n_concurrent++;
    if ($countones(dut.u_xbar.g_sw[0].u_sw.mem_req) > 1 ||
        $countones(dut.u_xbar.g_sw[1].u_sw.mem_req) > 1 ||
        $countones(dut.u_xbar.g_sw[2].u_sw.mem_req) > 1 ||
        $countones(dut.u_xbar.g_sw[3].u_sw.mem_req) > 1) n_conflict++;
    if (cmd_done) done_order.push_back(cmd_done_pe);
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic access(int i, bit wr, logic [31:0] addr, logic [DW-1:0] d, logic [DW/8-1:0] be,
                        output logic [DW-1:0] rd, output bit err, output int cyc);
    pe_req[i] = 1; pe_addr[i] = addr; pe_re[i] = !wr; pe_we[i] = wr;
    pe_wdata[i] = d; pe_be[i] = be;
    cyc = 0;
    do begin
      @(posedge clk);
      cyc++;
    end while (!pe_ta[i]);
    rd = pe_rdata[i];
    err = pe_err[i];
    #1;
    pe_req[i] = 0; pe_re[i] = 0; pe_we[i] = 0;
  endtask

  task automatic send(int i, cmd_op_e op, int cnt, int vb);
    logic [DW-1:0] rd;
    bit err;
    int c;
    access(i, 1, CMDA, DW'(make_cmd(op, cnt, vb)), '1, rd, err, c);
  endtask

  task automatic wait_done(int i, output bit err);
    logic [DW-1:0] rd;
    bit e;
    int c;
    do access(i, 0, CMDA, '0, '1, rd, e, c); while (rd[STAT_BUSY]);
    err = rd[STAT_ERR];
  endtask

  // ------------------------------------------------------------ reference allocation
  bit used [G];
  int map [M][G];        // virtual G_block -> physical G_block, -1 when unmapped
  logic [DW-1:0] shadow [longint];

  function automatic void ref_alloc(int pe, int cnt, int vb);
    for (int k = 0; k < cnt; k++) begin
      int b;
      b = 0;
      while (used[b]) b++;
      used[b] = 1;
      map[pe][vb + k] = b;
    end
  endfunction

  // word at a physical byte address, read straight from the memory models
  function automatic logic [DW-1:0] peek(longint pa);
    longint a;
    if (pa < 64'h20_0000) begin
      a = pa / 8;
      return g_mem[0].u_mem.mem.exists(a) ? g_mem[0].u_mem.mem[a] : '0;
    end else if (pa < 64'h40_0000) begin
      a = (pa - 64'h20_0000) / 8;
      return g_mem[1].u_mem.mem.exists(a) ? g_mem[1].u_mem.mem[a] : '0;
    end else if (pa < 64'h80_0000) begin
      a = (pa - 64'h40_0000) / 8;
      return g_mem[2].u_mem.mem.exists(a) ? g_mem[2].u_mem.mem[a] : '0;
    end
    a = (pa - 64'h80_0000) / 8;
    return g_mem[3].u_mem.mem.exists(a) ? g_mem[3].u_mem.mem[a] : '0;
  endfunction

  initial begin
    bit err;
    logic [DW-1:0] rd;
    int c;
    for (int i = 0; i < M; i++) for (int v = 0; v < G; v++) map[i][v] = -1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    chk("all G_blocks free after reset", free_count == 8'(G));

    // ---- step 1: allocation, FCFS with a same-cycle tie
    fork
      send(3, CMD_ALLOC, 32, 0);
      begin
        @(posedge clk); #1;
        fork
          send(0, CMD_ALLOC, 32, 0);
          send(1, CMD_ALLOC, 32, 0);
          send(2, CMD_ALLOC, 32, 0);
        join
      end
    join
    for (int i = 0; i < M; i++) begin
      wait_done(i, err);
      chk($sformatf("PE%0d allocation accepted", i), !err);
      if (!err) n_alloc++;
    end
    chk("FCFS order 3, 0, 1, 2", done_order.size() == 4 && done_order[0] == 3 &&
        done_order[1] == 0 && done_order[2] == 1 && done_order[3] == 2);
    ref_alloc(3, 32, 0);
    ref_alloc(0, 32, 0);
    ref_alloc(1, 32, 0);
    ref_alloc(2, 32, 0);
    chk("all 128 G_blocks in use", free_count == 0);
    send(1, CMD_ALLOC, 1, 40);
    wait_done(1, err);
    chk("allocation beyond memory refused", err);
    if (err) n_refused++;

    // ---- step 2: concurrent traffic on the pages
    for (int p = 0; p < M; p++) begin
      automatic int pp = p;
      fork
        for (int k = 0; k < 200; k++) begin
          automatic int vbk = $urandom % 32;
          automatic int off = 8 * ($urandom % 4) + ((($urandom % 2) == 0) ? 0 : BLK - 32);
          automatic logic [31:0] va = 32'(vbk * BLK + off);
          automatic longint pa = longint'(map[pp][vbk]) * BLK + off;
          automatic bit wr = 1'($urandom);
          automatic logic [DW-1:0] d = {$urandom, $urandom};
          automatic logic [DW/8-1:0] be = 8'($urandom) | 8'h01;
          automatic logic [DW-1:0] r;
          automatic bit e;
          automatic int cy;
          access(pp, wr, va, d, be, r, e, cy);
          chk("no fault on own page", !e);
          if (wr) begin
            automatic logic [DW-1:0] w = shadow.exists(pa / 8) ? shadow[pa / 8] : '0;
            for (int b = 0; b < 4; b++) if (be[b]) w[8*b +: 8] = d[8*b +: 8];
            shadow[pa / 8] = w;
            chk($sformatf("PE%0d write found at physical %h", pp, pa), peek(pa) == w);
            if (peek(pa) == w) n_placed++;
          end else begin
            chk($sformatf("PE%0d read @%h", pp, va),
                r == (shadow.exists(pa / 8) ? shadow[pa / 8] : '0));
          end
        end
      join_none
    end
    wait fork;

    // ---- step 3: release, then faults
    send(2, CMD_FREE, 32, 0);
    wait_done(2, err);
    chk("free accepted", !err && free_count == 32);
    if (!err) n_free++;
    access(2, 0, 32'(5 * BLK), '0, '1, rd, err, c);
    chk("freed page faults", err);
    if (err) n_fault++;
    access(0, 0, 32'(40 * BLK), '0, '1, rd, err, c);
    chk("unmapped virtual G_block faults", err);
    if (err) n_fault++;

    $display("mechanisms: alloc=%0d refused=%0d conflicts=%0d concurrent_cycles=%0d placed=%0d free=%0d fault=%0d",
             n_alloc, n_refused, n_conflict, n_concurrent, n_placed, n_free, n_fault);
    chk("allocation happened", n_alloc > 0);
    chk("refusal happened", n_refused > 0);
    chk("arbitration conflict happened", n_conflict > 0);
    chk("concurrent transfers happened", n_concurrent > 0);
    chk("placed writes happened", n_placed > 0);
    chk("free happened", n_free > 0);
    chk("fault happened", n_fault > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
