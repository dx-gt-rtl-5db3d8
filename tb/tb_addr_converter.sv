// tb_addr_converter -- self-checking test of one SoCDMMU address converter (256
// G_blocks of 64 KB, 32-bit addresses).  Maps and unmaps random virtual G_blocks
// through the management port, then translates random virtual addresses (inside
// and outside the 16 MB window) and compares hit and physical address with a table
// kept in the testbench.
module tb_addr_converter;
  localparam int unsigned G = 256, GW = 8, BLK_AW = 16;
  logic clk = 0, rst_n = 0;
  logic [31:0]   vaddr = '0, paddr;
  logic          hit;
  logic [GW-1:0] m_vblk = '0, m_pblk, m_wpblk = '0;
  logic          m_valid, m_we = 0, m_wvalid = 0;
  int checks = 0, failures = 0;

  addr_converter #(.G(G), .BLK_AW(BLK_AW), .ADDR_W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ref_v [G];
  int ref_p [G];

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
    for (int round = 0; round < 20; round++) begin
      // management writes
      repeat (40) begin
        m_vblk = GW'($urandom); m_wpblk = GW'($urandom); m_wvalid = ($urandom % 4) != 0;
        m_we = 1;
        @(negedge clk);
        ref_v[m_vblk] = m_wvalid;
        ref_p[m_vblk] = m_wpblk;
      end
      m_we = 0;
      // management reads
      repeat (20) begin
        m_vblk = GW'($urandom);
        #1;
        chk("m_valid", m_valid == ref_v[m_vblk]);
        if (ref_v[m_vblk]) chk("m_pblk", m_pblk == ref_p[m_vblk]);
      end
      // translations
      repeat (100) begin
        int vb;
        logic [15:0] off;
        bit outside;
        vb = $urandom % G;
        off = 16'($urandom);
        outside = ($urandom % 8) == 0;
        vaddr = {outside ? 8'(1 + $urandom % 255) : 8'h00, 8'(vb), off};
        #1;
        chk("hit", hit == (!outside && ref_v[vb]));
        if (hit) chk($sformatf("paddr %h", paddr), paddr == {8'h00, 8'(ref_p[vb]), off});
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
