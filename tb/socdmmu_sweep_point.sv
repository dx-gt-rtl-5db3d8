// socdmmu_sweep_point -- self-checking harness for one SoCDMMU of P PEs and G
// G_blocks (16 MB in all, so G_blocks of 2**BLK_AW bytes), used by tb_size_sweep to
// run the unit at several sizes.
//
// All P PEs write an ALLOC of C = G / P G_blocks (at virtual G_block 0) in the same
// cycle.  Checked: the commands finish in PE order (same-cycle FCFS tie), none is
// refused, each ends 2*C+2 cycles after the previous one (one cycle to take the
// next command, then 2*C+1 to run it), and G - P*C G_blocks stay free.  Lowest-free-first allocation then puts PE i's virtual G_block k at physical
// G_block i*C + k: the first, last and a random G_block of every page are read and the
// converted address on the crossbar side is compared.  A request for one G_block more
// than is free is refused.  All PEs then FREE their pages in the same cycle, every
// G_block is free again, and the old addresses fault.
// A stand-in crossbar acknowledges each physical request one cycle later.
// Interface: clk in; done rises when the sequence is over, with the check and failure
// counts on checks/failures.
module socdmmu_sweep_point
  import dxgt_pkg::*;
#(
  parameter int unsigned P      = 4,
  parameter int unsigned G      = 256,
  parameter int unsigned BLK_AW = 16
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned DW = 64, GW = $clog2(G), PW = (P > 1) ? $clog2(P) : 1;
  localparam int unsigned C = G / P;
  localparam logic [31:0] CMDA = 32'hF000_0000;

  logic                   rst_n = 0;
  logic [P-1:0]           pe_req = '0, pe_re = '0, pe_we = '0, pe_ta, pe_err;
  logic [P-1:0][31:0]     pe_addr = '0;
  logic [P-1:0][DW-1:0]   pe_wdata = '0, pe_rdata;
  logic [P-1:0][DW/8-1:0] pe_be = '1;
  logic [P-1:0]           prev_req, prev_re, prev_we;
  logic [P-1:0]           prev_ta = '0;
  logic [P-1:0][31:0]     prev_addr;
  logic [P-1:0][DW-1:0]   prev_wdata, prev_rdata = '0;
  logic [P-1:0][DW/8-1:0] prev_be;
  logic [GW:0]            free_count;
  logic [P-1:0]           sched_pending;
  logic                   cmd_done, cmd_done_err;
  logic [PW-1:0]          cmd_done_pe;

  socdmmu #(.P(P), .G(G), .BLK_AW(BLK_AW), .INIT_BLOCKS('0)) dut (.*);

  // crossbar stand-in
  logic [P-1:0][31:0] seen_addr;
  always @(posedge clk)
    for (int i = 0; i < P; i++) begin
      prev_ta[i] <= prev_req[i] && !prev_ta[i];
      if (prev_req[i] && !prev_ta[i]) seen_addr[i] <= prev_addr[i];
    end

  int n_done = 0, n_err = 0;
  int done_pe [$];
  longint done_cyc [$];
  longint cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && cmd_done) begin
      n_done++;
      if (cmd_done_err) n_err++;
      done_pe.push_back(int'(cmd_done_pe));
      done_cyc.push_back(cyc);
    end
  end

  initial begin
    checks = 0;
    failures = 0;
    done = 0;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (P=%0d G=%0d): %s", P, G, what);
    end
  endtask

  // every PE writes its command word in the same cycle; each drops it on its ta
  task automatic send_all(cmd_op_e op);
    for (int i = 0; i < P; i++) begin
      pe_req[i] = 1; pe_we[i] = 1; pe_re[i] = 0; pe_addr[i] = CMDA;
      pe_wdata[i] = DW'(make_cmd(op, C, 0));
    end
    while (pe_req != '0) begin
      @(posedge clk);
      #1;
      for (int i = 0; i < P; i++) if (pe_ta[i]) begin
        pe_req[i] = 0; pe_we[i] = 0;
      end
    end
  endtask

  task automatic read(int i, logic [31:0] addr, output bit err);
    pe_req[i] = 1; pe_re[i] = 1; pe_we[i] = 0; pe_addr[i] = addr;
    do @(posedge clk); while (!pe_ta[i]);
    err = pe_err[i];
    #1;
    pe_req[i] = 0; pe_re[i] = 0;
  endtask

  initial begin
    bit err;
    int base;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    chk("all G_blocks free after reset", free_count == (GW+1)'(G));

    // allocation by every PE at once
    send_all(CMD_ALLOC);
    wait (n_done == int'(P));
    @(posedge clk); #1;
    chk("no allocation refused", n_err == 0);
    for (int i = 0; i < int'(P); i++)
      chk($sformatf("command %0d from PE %0d", i, done_pe[i]), done_pe[i] == i);
    for (int i = 1; i < int'(P); i++)
      chk("one ALLOC after the other, 2*C+2 cycles apart",
          done_cyc[i] - done_cyc[i-1] == longint'(2 * C + 2));
    chk("free count after allocation", free_count == (GW+1)'(G - P * C));

    // address conversion
    for (int i = 0; i < int'(P); i++) begin
      int ks [3];
      ks[0] = 0;
      ks[1] = int'(C) - 1;
      ks[2] = int'($urandom % C);
      for (int j = 0; j < 3; j++) begin
        logic [31:0] off;
        off = 8 * ($urandom % (2 ** (BLK_AW - 3)));
        read(i, 32'(ks[j]) * (32'd1 << BLK_AW) + off, err);
        chk("mapped access accepted", !err);
        chk($sformatf("PE %0d virtual G_block %0d -> physical %0d", i, ks[j], i * C + ks[j]),
            seen_addr[i] == 32'(i * C + ks[j]) * (32'd1 << BLK_AW) + off);
      end
    end

    // one G_block more than is free: refused
    base = n_done;
    pe_req[0] = 1; pe_we[0] = 1; pe_addr[0] = CMDA;
    pe_wdata[0] = DW'(make_cmd(CMD_ALLOC, G - P * C + 1, C));
    do @(posedge clk); while (!pe_ta[0]);
    #1;
    pe_req[0] = 0; pe_we[0] = 0;
    wait (n_done == base + 1);
    @(posedge clk); #1;
    chk("allocation beyond the free G_blocks refused", n_err == 1);

    // release by every PE at once
    base = n_done;
    send_all(CMD_FREE);
    wait (n_done == base + int'(P));
    @(posedge clk); #1;
    chk("no release refused", n_err == 1);
    chk("every G_block free again", free_count == (GW+1)'(G));
    for (int i = 0; i < int'(P); i++) begin
      read(i, 32'(C - 1) * (32'd1 << BLK_AW), err);
      chk("released page faults", err);
    end
    done = 1;
  end
endmodule
