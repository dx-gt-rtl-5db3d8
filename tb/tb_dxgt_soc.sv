// tb_dxgt_soc -- end-to-end test of the SoCDMMU + 4x4 crossbar subsystem at its
// default configuration (4 PEs, 256 G_blocks of 64 KB, memory blocks of 2, 2, 4 and
// 8 MB, FCFS scheduling), with a behavioural model on each memory bus.
//
//  1. The PEs ask for pages at staggered times (PE 2 first, then PE 3, then PE 0 and
//     PE 1 together); the FCFS order 2, 3, 0, 1 is checked, and together the pages
//     take all 256 G_blocks.  A further request is refused (out of memory).
//  2. Each PE reads and writes random words of its own pages at once.  Read data is
//     checked against a shadow of physical memory built from a reference of the
//     allocation (lowest free G_blocks first), so address conversion, switch
//     selection and data paths are all checked.  PE 3, PE 0 and PE 1 share the 8 MB
//     block, which makes its arbiter resolve conflicts; PE 2 runs in parallel.
//  3. PE 1 frees its page; its addresses then fault; PE 0 gets the freed G_blocks.
//     A command written while the PE's previous one is busy is seen to wait.
// PE 2 and PE 3 are 32-bit PEs (the default widths): their byte selects above lane 3
// are dropped from the shadow and their reads are compared on the low half only; one
// 64-bit write by PE 3 is checked in the memory model to have left the upper half.
// Each mechanism is counted and must have happened at least once.
module tb_dxgt_soc;
  import dxgt_pkg::*;
  localparam int unsigned M = 4, N = 4, DW = 64, MAW = 23;
  localparam int unsigned AWS [N] = '{21, 21, 22, 23};
  localparam int unsigned PDW [M] = '{64, 64, 32, 32};
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
  logic [8:0]             free_count;
  logic [M-1:0]           sched_pending;
  logic                   cmd_done, cmd_done_err;
  logic [1:0]             cmd_done_pe;
  int checks = 0, failures = 0;

  dxgt_soc dut (.*);

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
  int n_conflict = 0, n_concurrent = 0, max_concurrent = 0, n_fault = 0, n_refused = 0;
  int n_free = 0, n_stall = 0, n_fcfs_reorder = 0, n_alloc = 0, n_narrow = 0;
  int done_order [$];
  always @(posedge clk) if (rst_n) begin
    int act;
    act = $countones(mem_re | mem_we);
    if (act >= 2) n_concurrent++;
    if (act > max_concurrent) max_concurrent = act;
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

  task automatic send(int i, cmd_op_e op, int cnt, int vb, output int cyc);
    logic [DW-1:0] rd;
    bit err;
    access(i, 1, CMDA, DW'(make_cmd(op, cnt, vb)), '1, rd, err, cyc);
  endtask

  task automatic wait_done(int i, output bit err);
    logic [DW-1:0] rd;
    bit e;
    int c;
    do access(i, 0, CMDA, '0, '1, rd, e, c); while (rd[STAT_BUSY]);
    err = rd[STAT_ERR];
  endtask

  // ------------------------------------------------------------ reference allocation
  bit used [256];
  int map [M][256];      // virtual G_block -> physical G_block, -1 when unmapped
  logic [DW-1:0] shadow [longint];

  function automatic logic [DW-1:0] dmask(int i);
    return {DW{1'b1}} >> (DW - PDW[i]);
  endfunction

  function automatic logic [DW/8-1:0] bmask(int i);
    return {(DW/8){1'b1}} >> ((DW - PDW[i]) / 8);
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

  function automatic void ref_alloc(int pe, int cnt, int vb);
    for (int k = 0; k < cnt; k++) begin
      int b;
      b = 0;
      while (used[b]) b++;
      used[b] = 1;
      map[pe][vb + k] = b;
    end
  endfunction

  function automatic void ref_free(int pe, int cnt, int vb);
    for (int k = 0; k < cnt; k++)
      if (map[pe][vb + k] >= 0) begin
        used[map[pe][vb + k]] = 0;
        map[pe][vb + k] = -1;
      end
  endfunction

  // page of each PE after step 1: {count, first virtual G_block}
  int pg_cnt [M] = '{16, 48, 64, 128};
  int pg_vb  [M] = '{0, 4, 10, 0};
  int ops = 300;

  initial begin
    bit err;
    int c0, c1, c2, c3;
    logic [DW-1:0] rd;
    for (int i = 0; i < M; i++) for (int v = 0; v < 256; v++) map[i][v] = -1;
    if ($value$plusargs("OPS=%d", ops)) ;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    // ---- step 1: allocation, FCFS order
    fork
      send(2, CMD_ALLOC, pg_cnt[2], pg_vb[2], c2);
      begin repeat (1) @(posedge clk); #1; send(3, CMD_ALLOC, pg_cnt[3], pg_vb[3], c3); end
      begin repeat (2) @(posedge clk); #1;
        fork
          send(0, CMD_ALLOC, pg_cnt[0], pg_vb[0], c0);
          send(1, CMD_ALLOC, pg_cnt[1], pg_vb[1], c1);
        join
      end
    join
    for (int i = 0; i < M; i++) begin
      wait_done(i, err);
      chk($sformatf("PE%0d allocation accepted", i), !err);
      n_alloc++;
    end
    // PE3 asked before PE0 and PE1, so FCFS serves it first; a fixed-priority
    // scheduler would not
    chk("FCFS order 2, 3, 0, 1", done_order.size() == 4 && done_order[0] == 2 &&
        done_order[1] == 3 && done_order[2] == 0 && done_order[3] == 1);
    if (done_order.size() == 4 && done_order[1] == 3) n_fcfs_reorder++;
    ref_alloc(2, pg_cnt[2], pg_vb[2]);
    ref_alloc(3, pg_cnt[3], pg_vb[3]);
    ref_alloc(0, pg_cnt[0], pg_vb[0]);
    ref_alloc(1, pg_cnt[1], pg_vb[1]);
    chk("all G_blocks in use", free_count == 0);
    send(0, CMD_ALLOC, 1, 200, c0);
    wait_done(0, err);
    chk("allocation beyond memory refused", err);
    if (err) n_refused++;

    // lone access through the whole path: request and acknowledge cycle
    access(3, 1, 32'h0000_0000, 64'h0123_4567_89AB_CDEF, '1, rd, err, c3);
    chk("lone access takes 2 cycles", c3 == 2 && !err);
    shadow[longint'((map[3][0] * 65536) / 8)] = 64'h0123_4567_89AB_CDEF & dmask(3);
    chk("32-bit PE wrote only the low half",
        peek(longint'(map[3][0]) * 65536) == 64'h0000_0000_89AB_CDEF);
    if (peek(longint'(map[3][0]) * 65536) == 64'h0000_0000_89AB_CDEF) n_narrow++;

    // ---- step 2: concurrent traffic on the pages
    for (int p = 0; p < M; p++) begin
      automatic int pp = p;
      fork
        for (int k = 0; k < ops; k++) begin
          automatic int vbk = pg_vb[pp] + ($urandom % pg_cnt[pp]);
          automatic int off = 8 * ($urandom % 4) + ((($urandom % 2) == 0) ? 0 : 65536 - 32);
          automatic logic [31:0] va = 32'(vbk * 65536 + off);
          automatic longint key = longint'((map[pp][vbk] * 65536 + off) / 8);
          automatic bit wr = 1'($urandom);
          automatic logic [DW-1:0] d = {$urandom, $urandom};
          automatic logic [DW/8-1:0] be = (8'($urandom) | 8'h01) & bmask(pp);
          automatic logic [DW-1:0] r;
          automatic bit e;
          automatic int c;
          access(pp, wr, va, d, be, r, e, c);
          chk("no fault on own page", !e);
          if (wr) begin
            automatic logic [DW-1:0] w = shadow.exists(key) ? shadow[key] : '0;
            for (int b = 0; b < 8; b++) if (be[b]) w[8*b +: 8] = d[8*b +: 8];
            shadow[key] = w;
          end else begin
            chk($sformatf("PE%0d read @%h", pp, va), r == ((shadow.exists(key) ? shadow[key] : '0) & dmask(pp)));
          end
        end
      join_none
    end
    wait fork;

    // ---- step 3: release, faults, reuse, stalled command
    send(1, CMD_FREE, pg_cnt[1], pg_vb[1], c1);
    wait_done(1, err);
    chk("free accepted", !err && free_count == 48);
    if (!err) n_free++;
    ref_free(1, pg_cnt[1], pg_vb[1]);
    access(1, 0, 32'(pg_vb[1] * 65536), '0, '1, rd, err, c1);
    chk("freed page faults", err);
    if (err) n_fault++;
    send(0, CMD_ALLOC, 8, 100, c0);
    send(0, CMD_ALLOC, 8, 108, c1);
    chk("second command waits for the first", c1 > 2);
    if (c1 > 2) n_stall++;
    wait_done(0, err);
    ref_alloc(0, 8, 100);
    ref_alloc(0, 8, 108);
    // the freed G_blocks are reused: write through PE0, read the memory model
    for (int v = 100; v < 116; v += 5) begin
      longint key;
      int pb;
      pb = map[0][v];
      access(0, 1, 32'(v * 65536 + 8), 64'(v), '1, rd, err, c0);
      key = longint'(pb * 65536 + 8);
      // physical G_block pb lies in bank 3 (8 MB at 8 MB): check the bank's contents
      begin
        longint a;
        a = (key - 64'h80_0000) / 8;
        chk($sformatf("reused G_block %0d holds the data", pb),
            pb >= 128 && g_mem[3].u_mem.mem.exists(a) && g_mem[3].u_mem.mem[a] == 64'(v));
      end
    end

    $display("mechanisms: alloc=%0d fcfs_reorder=%0d refused=%0d conflicts=%0d concurrent_cycles=%0d max_concurrent=%0d free=%0d fault=%0d stall=%0d",
             n_alloc, n_fcfs_reorder, n_refused, n_conflict, n_concurrent, max_concurrent, n_free, n_fault, n_stall);
    $display("narrow_write=%0d", n_narrow);
    chk("allocation happened", n_alloc > 0);
    chk("FCFS reorder happened", n_fcfs_reorder > 0);
    chk("refusal happened", n_refused > 0);
    chk("arbitration conflict happened", n_conflict > 0);
    chk("concurrent transfers happened", n_concurrent > 0 && max_concurrent >= 3);
    chk("free happened", n_free > 0);
    chk("fault happened", n_fault > 0);
    chk("command stall happened", n_stall > 0);
    chk("narrow PE write happened", n_narrow > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
