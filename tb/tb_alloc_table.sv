// tb_alloc_table -- self-checking test of the SoCDMMU allocation table (256 G_blocks,
// 4 PEs).  Random sequences of set (with owner) and clear operations; after each
// clock the free count, the lowest free G_block and random read-port lookups are
// compared with a bit-vector model kept in the testbench.  Ends by filling the whole
// table, which must then report no free G_block.
module tb_alloc_table;
  localparam int unsigned G = 256, P = 4, GW = 8, PW = 2;
  logic clk = 0, rst_n = 0;
  logic          set_en = 0, clr_en = 0;
  logic [GW-1:0] blk = '0, rd_blk = '0, ff_blk;
  logic [PW-1:0] set_owner = '0, rd_owner;
  logic          rd_used, ff_valid;
  logic [GW:0]   free_count;
  int checks = 0, failures = 0;

  alloc_table #(.G(G), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit model_used [G];
  int model_owner [G];

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic compare();
    int nfree, first;
    nfree = 0;
    first = -1;
    for (int i = 0; i < G; i++)
      if (!model_used[i]) begin
        nfree++;
        if (first < 0) first = i;
      end
    chk("free count", free_count == nfree);
    chk("ff_valid", ff_valid == (first >= 0));
    if (first >= 0) chk($sformatf("ff_blk %0d vs %0d", ff_blk, first), ff_blk == first);
    for (int t = 0; t < 4; t++) begin
      rd_blk = GW'($urandom);
      #1;
      chk("rd_used", rd_used == model_used[rd_blk]);
      if (model_used[rd_blk]) chk("rd_owner", rd_owner == model_owner[rd_blk]);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int step = 0; step < 2000; step++) begin
      int b;
      bit do_set;
      @(negedge clk);
      do_set = ($urandom % 3) != 0;
      // pick a block in the right state so the operation is legal
      b = $urandom % G;
      for (int k = 0; k < G; k++) begin
        if (model_used[(b + k) % G] != do_set) begin
          b = (b + k) % G;
          break;
        end
      end
      if (model_used[b] == do_set) continue;
      blk = GW'(b);
      set_owner = PW'($urandom);
      set_en = do_set;
      clr_en = !do_set;
      @(negedge clk);
      set_en = 0;
      clr_en = 0;
      model_used[b] = do_set;
      if (do_set) model_owner[b] = set_owner;
      compare();
    end
    // fill completely, always taking the reported lowest free G_block
    while (ff_valid) begin
      @(negedge clk);
      model_used[ff_blk] = 1;
      model_owner[ff_blk] = 3;
      blk = ff_blk; set_owner = 3; set_en = 1;
      @(negedge clk);
      set_en = 0;
    end
    compare();
    chk("full table", free_count == 0 && !ff_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
