// tb_dxgt_soc_direct -- test of the subsystem built without the SoCDMMU
// (USE_SOCDMMU = 0), every other parameter at its default: 4 PEs, 4x4 crossbar,
// memory blocks of 2, 2, 4 and 8 MB, PE 2 and PE 3 32-bit.
//
// The PEs now address the memory blocks physically.  All four PEs read and write
// random words across the four blocks at once (first, last and low words of each);
// reads are checked against a shadow of physical memory, narrowed to the PE's data
// width.  Addresses outside the 16 MB -- including the command register address,
// which has no SoCDMMU behind it -- must be answered in one cycle with an error and
// must reach no memory block.  Counted: concurrent transfers, arbitration conflicts
// and stray-address errors; each must happen.
module tb_dxgt_soc_direct;
  localparam int unsigned M = 4, N = 4, DW = 64, MAW = 23;
  localparam int unsigned AWS [N] = '{21, 21, 22, 23};
  localparam int unsigned PDW [M] = '{64, 64, 32, 32};
  localparam logic [31:0] BASES [N] = '{32'h0, 32'h0020_0000, 32'h0040_0000, 32'h0080_0000};

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
  int expected_xfers [N];

  dxgt_soc #(.USE_SOCDMMU(1'b0)) dut (.*);

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

  int n_concurrent = 0, n_conflict = 0, n_stray = 0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(mem_re | mem_we) >= 2) n_concurrent++;
    if ($countones(dut.u_xbar.g_sw[0].u_sw.mem_req) > 1 ||
        $countones(dut.u_xbar.g_sw[1].u_sw.mem_req) > 1 ||
        $countones(dut.u_xbar.g_sw[2].u_sw.mem_req) > 1 ||
        $countones(dut.u_xbar.g_sw[3].u_sw.mem_req) > 1) n_conflict++;
  end

  logic [DW-1:0] shadow [longint];

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
                        logic [DW/8-1:0] be, output logic [DW-1:0] rd, output bit err,
                        output int cyc);
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

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;

    for (int p = 0; p < M; p++) begin
      automatic int pp = p;
      fork
        for (int k = 0; k < 300; k++) begin
          automatic int n = $urandom % N;
          automatic int sel = $urandom % 4;
          automatic logic [31:0] off = (sel == 0) ? 0 :
                                       (sel == 1) ? (1 << AWS[n]) - 8 : 8 * ($urandom % 6);
          automatic logic [31:0] a = BASES[n] + off;
          automatic bit wr = 1'($urandom);
          automatic logic [DW-1:0] d = {$urandom, $urandom};
          automatic logic [DW/8-1:0] be = 8'($urandom) | 8'h01;
          automatic logic [DW/8-1:0] bm = bmask(pp);
          automatic logic [DW-1:0] r;
          automatic bit e;
          automatic int c;
          automatic longint key = longint'(a >> 3);
          if ($urandom % 16 == 0) begin
            // stray address: beyond the memory, or the (absent) command register
            a = (($urandom % 2) == 0) ? 32'h0100_0000 + 8 * ($urandom % 64) : 32'hF000_0000;
            access(pp, wr, a, d, be, r, e, c);
            chk($sformatf("PE%0d stray @%h: error in 1 cycle", pp, a), e && c == 1);
            if (e) n_stray++;
          end else begin
            access(pp, wr, a, d, be, r, e, c);
            expected_xfers[n]++;
            chk($sformatf("PE%0d @%h: no error", pp, a), !e);
            if (wr) begin
              automatic logic [DW-1:0] w = shadow.exists(key) ? shadow[key] : '0;
              for (int b = 0; b < DW / 8; b++)
                if (be[b] && bm[b]) w[8*b +: 8] = d[8*b +: 8];
              shadow[key] = w;
            end else begin
              chk($sformatf("PE%0d read @%h", pp, a),
                  r == ((shadow.exists(key) ? shadow[key] : '0) & dmask(pp)));
            end
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
    chk("no SoCDMMU state", free_count == 0 && sched_pending == 0);
    $display("mechanisms: concurrent_cycles=%0d conflicts=%0d stray=%0d",
             n_concurrent, n_conflict, n_stray);
    chk("concurrent transfers happened", n_concurrent > 0);
    chk("arbitration conflict happened", n_conflict > 0);
    chk("stray-address error happened", n_stray > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
