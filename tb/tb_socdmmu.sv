// tb_socdmmu -- self-checking test of the SoCDMMU at its default size (4 PEs, 256
// G_blocks of 64 KB, FCFS scheduling).
//
// The crossbar side is replaced by a responder that acknowledges every physical
// request one cycle later and logs its address.  Checked: a PE's allocation and the
// physical address its accesses are converted to; the error answer (and no
// crossbar request) for unmapped addresses; first-come-first-served order of
// commands from different PEs; refusal when memory runs out; release of a page; a
// command written while the previous one is busy waits; the status word.
module tb_socdmmu;
  import dxgt_pkg::*;
  localparam int unsigned P = 4, DW = 64;
  localparam logic [31:0] CMDA = 32'hF000_0000;
  logic clk = 0, rst_n = 0;
  logic [P-1:0]           pe_req = '0, pe_re = '0, pe_we = '0, pe_ta, pe_err;
  logic [P-1:0][31:0]     pe_addr = '0;
  logic [P-1:0][DW-1:0]   pe_wdata = '0, pe_rdata;
  logic [P-1:0][DW/8-1:0] pe_be = '0;
  logic [P-1:0]           prev_req, prev_re, prev_we;
  logic [P-1:0]           prev_ta = '0;
  logic [P-1:0][31:0]     prev_addr;
  logic [P-1:0][DW-1:0]   prev_wdata, prev_rdata = '0;
  logic [P-1:0][DW/8-1:0] prev_be;
  logic [8:0]             free_count;
  logic [P-1:0]           sched_pending;
  logic                   cmd_done, cmd_done_err;
  logic [1:0]             cmd_done_pe;
  int checks = 0, failures = 0;

  socdmmu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // crossbar stand-in: acknowledge one cycle after a request, return the address
  logic [P-1:0][31:0] seen_addr;
  int n_prev [P];
  always @(posedge clk) begin
    for (int i = 0; i < P; i++) begin
      prev_ta[i] <= prev_req[i] && !prev_ta[i];
      if (prev_req[i] && !prev_ta[i]) begin
        seen_addr[i] <= prev_addr[i];
        prev_rdata[i] <= {32'hCAFE_0000, prev_addr[i]};
        n_prev[i]++;
      end
    end
  end

  int done_order [$];
  always @(posedge clk) if (rst_n && cmd_done) done_order.push_back(cmd_done_pe);

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic access(int i, bit wr, logic [31:0] addr, logic [DW-1:0] d,
                        output logic [DW-1:0] rd, output bit err, output int cyc);
    pe_req[i] = 1; pe_addr[i] = addr; pe_re[i] = !wr; pe_we[i] = wr;
    pe_wdata[i] = d; pe_be[i] = '1;
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
    access(i, 1, CMDA, DW'(make_cmd(op, cnt, vb)), rd, err, cyc);
  endtask

  task automatic wait_done(int i, output bit err);
    logic [DW-1:0] rd;
    bit e;
    int c;
    do access(i, 0, CMDA, '0, rd, e, c); while (rd[STAT_BUSY]);
    chk("status done", rd[STAT_DONE]);
    err = rd[STAT_ERR];
  endtask

  initial begin
    logic [DW-1:0] rd;
    bit err;
    int cyc, c1, c2;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    chk("all free after reset", free_count == 256);

    // unmapped access: error, nothing sent to the crossbar
    access(0, 0, 32'h0000_1000, '0, rd, err, cyc);
    chk("unmapped access faults", err && n_prev[0] == 0 && cyc == 2);

    // PE1 allocates 4 G_blocks at virtual G_block 2
    send(1, CMD_ALLOC, 4, 2, cyc);
    chk("command write answered in 2 cycles", cyc == 2);
    wait_done(1, err);
    chk("allocation accepted", !err && free_count == 252);
    access(1, 0, 32'h0003_0040, '0, rd, err, cyc);   // virtual G_block 3 -> physical 1
    chk("converted address", !err && seen_addr[1] == 32'h0001_0040);
    chk("read data passed back", rd == {32'hCAFE_0000, 32'h0001_0040});
    access(1, 1, 32'h0005_FFF8, 64'h55, rd, err, cyc); // virtual 5 -> physical 3
    chk("converted write address", !err && seen_addr[1] == 32'h0003_FFF8 && prev_wdata[1] == 64'h55);
    access(1, 0, 32'h0006_0000, '0, rd, err, cyc);   // just past the page
    chk("past the page faults", err);
    access(1, 0, 32'h0100_0000, '0, rd, err, cyc);   // outside the 16 MB window
    chk("outside the window faults", err);
    access(2, 0, 32'h0003_0040, '0, rd, err, cyc);   // PE2 has no mapping there
    chk("other PE not mapped", err);

    // FCFS: PE3 writes first, PE0 and PE2 one cycle later in the same cycle
    done_order.delete();
    fork
      send(3, CMD_ALLOC, 2, 0, c1);
      begin @(posedge clk); #1; fork send(0, CMD_ALLOC, 2, 0, c2); send(2, CMD_ALLOC, 2, 0, c2); join end
    join
    wait_done(3, err); wait_done(0, err); wait_done(2, err);
    chk("FCFS order 3, 0, 2", done_order.size() == 3 && done_order[0] == 3 && done_order[1] == 0 && done_order[2] == 2);
    access(3, 0, 32'h0001_0000, '0, rd, err, cyc);
    chk("PE3 got the next free G_blocks (4, 5)", seen_addr[3] == 32'h0005_0000);
    access(2, 0, 32'h0000_0000, '0, rd, err, cyc);
    chk("PE2 got G_block 8", seen_addr[2] == 32'h0008_0000);

    // a second command while busy waits until the first has finished
    send(0, CMD_ALLOC, 100, 10, c1);
    send(0, CMD_FREE, 100, 10, c2);
    chk($sformatf("second command stalled (%0d cycles)", c2), c2 > 150);
    wait_done(0, err);
    chk("alloc+free leave the count", !err && free_count == 246);

    // not enough memory
    send(2, CMD_ALLOC, 247, 2, cyc);
    wait_done(2, err);
    chk("too large allocation refused", err && free_count == 246);
    // overlapping an existing mapping
    send(1, CMD_ALLOC, 2, 5, cyc);
    wait_done(1, err);
    chk("remapping a mapped G_block refused", err && free_count == 246);
    // zero count and bad opcode
    send(1, CMD_ALLOC, 0, 5, cyc);
    wait_done(1, err);
    chk("zero count refused", err);
    send(1, cmd_op_e'(4'hA), 1, 20, cyc);
    wait_done(1, err);
    chk("unknown opcode refused", err);

    // release PE1's page
    send(1, CMD_FREE, 4, 2, cyc);
    wait_done(1, err);
    chk("free accepted", !err && free_count == 250);
    access(1, 0, 32'h0003_0040, '0, rd, err, cyc);
    chk("freed page faults", err);
    chk("status shows free count", rd[11:0] == 0);   // data of a faulting access is 0
    access(1, 0, CMDA, '0, rd, err, cyc);
    chk("status word free count", rd[11:0] == 250 && !rd[STAT_BUSY] && rd[STAT_DONE] && !rd[STAT_ERR]);
    // freed G_blocks are reused lowest first
    send(0, CMD_ALLOC, 1, 40, cyc);
    wait_done(0, err);
    access(0, 0, 32'h0028_0008, '0, rd, err, cyc);
    chk("freed G_block 0 reused", !err && seen_addr[0] == 32'h0000_0008);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
