// tb_socdmmu_init -- self-checking test of the SoCDMMU's initial memory assignment.
//
// The unit is built with INIT_BLOCKS = {PE3: 5, PE2: 0, PE1: 3, PE0: 2}.  Right after
// reset, without any command: PE 0's virtual G_blocks 0-1 map to physical 0-1, PE 1's
// 0-2 to physical 2-4, PE 3's 0-4 to physical 5-9, PE 2 has nothing, and 246
// G_blocks are free.  Then a new allocation must take physical G_block 10 onwards,
// and freeing PE 1's initial page must return its G_blocks (the next allocation
// reuses physical 2).
module tb_socdmmu_init;
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

  socdmmu #(.INIT_BLOCKS({12'd5, 12'd0, 12'd3, 12'd2})) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [P-1:0][31:0] seen_addr;
  always @(posedge clk)
    for (int i = 0; i < P; i++) begin
      prev_ta[i] <= prev_req[i] && !prev_ta[i];
      if (prev_req[i] && !prev_ta[i]) seen_addr[i] <= prev_addr[i];
    end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic access(int i, bit wr, logic [31:0] addr, logic [DW-1:0] d,
                        output logic [DW-1:0] rd, output bit err);
    pe_req[i] = 1; pe_addr[i] = addr; pe_re[i] = !wr; pe_we[i] = wr;
    pe_wdata[i] = d; pe_be[i] = '1;
    do @(posedge clk); while (!pe_ta[i]);
    rd = pe_rdata[i];
    err = pe_err[i];
    #1;
    pe_req[i] = 0; pe_re[i] = 0; pe_we[i] = 0;
  endtask

  task automatic command(int i, cmd_op_e op, int cnt, int vb, output bit err);
    logic [DW-1:0] rd;
    bit e;
    access(i, 1, CMDA, DW'(make_cmd(op, cnt, vb)), rd, e);
    do access(i, 0, CMDA, '0, rd, e); while (rd[STAT_BUSY]);
    err = rd[STAT_ERR];
  endtask

  // expected physical G_block of virtual G_block v of each PE after reset
  function automatic int exp_pblk(int pe, int v);
    case (pe)
      0: return (v < 2) ? v : -1;
      1: return (v < 3) ? 2 + v : -1;
      3: return (v < 5) ? 5 + v : -1;
      default: return -1;
    endcase
  endfunction

  initial begin
    logic [DW-1:0] rd;
    bit err;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    chk("free count after reset", free_count == 246);
    for (int pe = 0; pe < P; pe++)
      for (int v = 0; v < 7; v++) begin
        int e;
        e = exp_pblk(pe, v);
        access(pe, 0, 32'(v * 65536 + 24), '0, rd, err);
        chk($sformatf("PE%0d vblock %0d mapped=%0b", pe, v, !err), err == (e < 0));
        if (e >= 0) chk($sformatf("PE%0d vblock %0d -> %0d", pe, v, e), seen_addr[pe] == 32'(e * 65536 + 24));
      end
    command(2, CMD_ALLOC, 2, 0, err);
    chk("allocation after the initial pages", !err);
    access(2, 0, 32'h0001_0000, '0, rd, err);
    chk("new page starts after the initial ones", !err && seen_addr[2] == 32'h000B_0000);
    command(1, CMD_FREE, 3, 0, err);
    chk("initial page can be freed", !err && free_count == 247);
    command(0, CMD_ALLOC, 1, 9, err);
    access(0, 0, 32'h0009_0000, '0, rd, err);
    chk("freed initial G_block reused", !err && seen_addr[0] == 32'h0002_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
