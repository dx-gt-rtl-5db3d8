// tb_alloc_unit -- self-checking test of the SoCDMMU allocation unit.
//
// The unit is wired to an allocation table and four address converters (small
// configuration: 32 G_blocks) as inside the SoCDMMU; the testbench plays the
// scheduler and issues random allocate and free commands (legal and illegal) from
// random PEs.  A reference model of the free G_blocks and of every PE's mapping
// predicts the error flag, which physical G_blocks are taken (always the lowest
// free ones), and the command time: 2*count+1 cycles from take to done for an
// allocation, count+1 for a free, 1 for a refused command (an allocation refused
// on an already-mapped virtual G_block stops at that G_block).
module tb_alloc_unit;
  import dxgt_pkg::*;
  localparam int unsigned P = 4, G = 32, GW = 5, PW = 2;
  logic clk = 0, rst_n = 0;
  logic          sel_valid = 0, take;
  logic [PW-1:0] sel_pe = '0;
  logic [P-1:0][31:0] cmd = '0;
  logic          t_set, t_clr, t_ff_valid, t_rd_used;
  logic [GW-1:0] t_blk, t_ff_blk;
  logic [PW-1:0] t_owner, t_rd_owner;
  logic [GW:0]   t_free_count;
  logic [PW-1:0] m_pe;
  logic [GW-1:0] m_vblk, m_wpblk;
  logic          m_we, m_wvalid;
  logic [P-1:0]          c_valid;
  logic [P-1:0][GW-1:0]  c_pblk;
  logic          done, done_err;
  logic [PW-1:0] done_pe;
  int checks = 0, failures = 0;

  alloc_unit #(.P(P), .G(G)) dut (
    .clk, .rst_n, .sel_valid, .sel_pe, .take, .cmd,
    .t_set, .t_clr, .t_blk, .t_owner, .t_ff_valid, .t_ff_blk, .t_free_count,
    .m_pe, .m_vblk, .m_valid(c_valid[m_pe]), .m_pblk(c_pblk[m_pe]),
    .m_we, .m_wvalid, .m_wpblk, .done, .done_pe, .done_err
  );
  alloc_table #(.G(G), .P(P)) u_table (
    .clk, .rst_n, .set_en(t_set), .clr_en(t_clr), .blk(t_blk), .set_owner(t_owner),
    .rd_blk(t_blk), .rd_used(t_rd_used), .rd_owner(t_rd_owner),
    .ff_valid(t_ff_valid), .ff_blk(t_ff_blk), .free_count(t_free_count)
  );
  logic [P-1:0][31:0] vaddr = '0, paddr;
  logic [P-1:0]       hit;
  for (genvar i = 0; i < P; i++) begin : g_conv
    addr_converter #(.G(G), .BLK_AW(16), .ADDR_W(32)) u_conv (
      .clk, .rst_n, .vaddr(vaddr[i]), .hit(hit[i]), .paddr(paddr[i]),
      .m_vblk, .m_valid(c_valid[i]), .m_pblk(c_pblk[i]),
      .m_we(m_we && m_pe == PW'(i)), .m_wvalid, .m_wpblk
    );
  end

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit used [G];
  bit mv [P][G];
  int mp [P][G];
  int n_alloc_ok = 0, n_free_ok = 0, n_err = 0;

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      int pe, cnt, vb, nfree, exp_cycles, cyc;
      bit is_alloc, exp_err;
      cmd_op_e op;
      pe = $urandom % P;
      is_alloc = ($urandom % 2) == 0;
      cnt = $urandom % 9;                 // 0 is illegal
      vb  = $urandom % (G + 2);           // may run past the window
      op  = ($urandom % 20 == 0) ? cmd_op_e'(4'd7) : (is_alloc ? CMD_ALLOC : CMD_FREE);
      // reference prediction
      nfree = 0;
      for (int b = 0; b < G; b++) nfree += !used[b];
      exp_err = 0;
      exp_cycles = 1;
      if (op != CMD_ALLOC && op != CMD_FREE) exp_err = 1;
      else if (cnt == 0 || vb + cnt > G) exp_err = 1;
      else if (op == CMD_ALLOC) begin
        if (cnt > nfree) exp_err = 1;
        else begin
          exp_cycles = 2 * cnt + 1;
          for (int k = 0; k < cnt; k++)
            if (mv[pe][vb + k]) begin
              exp_err = 1;
              exp_cycles = k + 2;
              break;
            end
        end
      end else exp_cycles = cnt + 1;
      // issue
      cmd[pe] = make_cmd(op, cnt, vb);
      sel_pe = PW'(pe);
      sel_valid = 1;
      #1;
      chk("take when idle", take);
      @(negedge clk);
      sel_valid = 0;
      cyc = 1;
      while (!done && cyc < 100) begin
        @(negedge clk);
        cyc++;
      end
      chk($sformatf("done pe/err (op %0d cnt %0d vb %0d): err=%0b exp %0b", op, cnt, vb, done_err, exp_err),
          done_pe == pe && done_err == exp_err);
      chk($sformatf("command time %0d vs %0d", cyc, exp_cycles), cyc == exp_cycles);
      // update the reference
      if (!exp_err && op == CMD_ALLOC) begin
        n_alloc_ok++;
        for (int k = 0; k < cnt; k++) begin
          int b;
          b = 0;
          while (used[b]) b++;
          used[b] = 1;
          mv[pe][vb + k] = 1;
          mp[pe][vb + k] = b;
        end
      end else if (!exp_err && op == CMD_FREE) begin
        n_free_ok++;
        for (int k = 0; k < cnt; k++)
          if (mv[pe][vb + k]) begin
            used[mp[pe][vb + k]] = 0;
            mv[pe][vb + k] = 0;
          end
      end else n_err++;
      @(negedge clk);
      // compare the whole state through the converters' translation ports
      nfree = 0;
      for (int b = 0; b < G; b++) nfree += !used[b];
      chk("free count", t_free_count == nfree);
      for (int i = 0; i < P; i++)
        for (int v = 0; v < G; v++) begin
          vaddr[i] = {11'd0, 5'(v), 16'h1234};
          #1;
          chk("mapping valid", hit[i] == mv[i][v]);
          if (mv[i][v]) chk("mapping target", paddr[i] == {11'd0, 5'(mp[i][v]), 16'h1234});
        end
      @(negedge clk);
    end
    chk("all command kinds seen", n_alloc_ok > 10 && n_free_ok > 10 && n_err > 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
