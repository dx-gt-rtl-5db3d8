// mx1_sweep_point -- self-checking harness for one Mx1 switch of size M, used by
// tb_size_sweep to run the switch at several sizes.
//
// M requesters raise random read and write requests at random times and hold each
// until their transfer acknowledge; about one request in eight addresses another
// memory block and must never be granted.  A responder acknowledges every memory
// access one cycle after it starts.  Checked every cycle: at most one grant, only to
// a PE that addresses this block; the granted PE's address offset, write data, byte
// selects and strobes on the memory bus; the acknowledge (and read data) going to
// the granted PE only; and round-robin fairness -- once a PE requests, at most M-1
// other transfers end on the block before its own is granted.
// Interface: clk in; done rises after CYCLES cycles, with the check and failure
// counts on checks/failures.
module mx1_sweep_point #(
  parameter int unsigned M      = 4,
  parameter int unsigned CYCLES = 3000
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned DW = 64, AW = 21;
  localparam logic [31:0] BASE = 32'h0020_0000;

  logic                  rst_n = 0;
  logic [M-1:0]          prev_req = '0, prev_re = '0, prev_we = '0, prev_ta;
  logic [M-1:0][31:0]    prev_addr = '0;
  logic [M-1:0][DW-1:0]  prev_wdata = '0, prev_rdata;
  logic [M-1:0][7:0]     prev_be = '0;
  logic [AW-1:0]         mem_addr;
  logic [DW-1:0]         mem_wdata, mem_rdata;
  logic                  mem_re, mem_we, mem_ta = 0;
  logic [7:0]            mem_be;
  logic [M-1:0]          mem_on;

  mx1_switch #(.M(M), .MEM_AW(AW), .BASE(BASE)) dut (.*);

  // memory stand-in: acknowledge one cycle after an access starts
  assign mem_rdata = {32'h5A5A_0000, 11'd0, mem_addr};
  always_ff @(posedge clk) mem_ta <= (mem_re || mem_we) && !mem_ta;

  initial begin
    checks = 0;
    failures = 0;
    done = 0;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (M=%0d): %s", M, what);
    end
  endtask

  // per PE: transfers ended by others since this PE's request rose
  int others [M];
  int n_xfer = 0;

  always @(negedge clk) if (rst_n) begin
    automatic int g = -1;
    for (int i = 0; i < M; i++) if (mem_on[i]) g = i;
    chk("at most one grant", $countones(mem_on) <= 1);
    if (g >= 0) begin
      chk("grant only to a PE addressing this block",
          prev_req[g] && (prev_addr[g] >> AW) == (BASE >> AW));
      chk("offset routed", mem_addr == prev_addr[g][AW-1:0]);
      chk("strobes routed", mem_re == prev_re[g] && mem_we == prev_we[g]);
      chk("write data and byte selects routed",
          mem_wdata == prev_wdata[g] && mem_be == prev_be[g]);
      chk("fair grant", others[g] <= int'(M) - 1);
    end else begin
      chk("idle memory bus", !mem_re && !mem_we);
    end
    for (int i = 0; i < M; i++) begin
      chk("acknowledge to the granted PE only", prev_ta[i] == (i == g && mem_ta));
      if (i == g && mem_ta) chk("read data to the granted PE", prev_rdata[i] == mem_rdata);
    end
  end

  always @(posedge clk) if (rst_n && mem_ta) begin
    n_xfer++;
    for (int i = 0; i < M; i++)
      if (!mem_on[i] && prev_req[i]) others[i]++;
  end

  for (genvar i = 0; i < M; i++) begin : g_req
    initial begin
      @(posedge rst_n);
      forever begin
        repeat ($urandom % 3) @(posedge clk);
        #1;
        prev_addr[i]  = (($urandom % 8) == 0) ? 32'h0100_0000 + 8 * ($urandom % 4)
                                              : BASE + 8 * ($urandom % 262144);
        prev_we[i]    = 1'($urandom);
        prev_re[i]    = !prev_we[i];
        prev_wdata[i] = {$urandom, $urandom};
        prev_be[i]    = 8'($urandom);
        others[i]     = 0;
        prev_req[i]   = 1;
        if ((prev_addr[i] >> AW) != (BASE >> AW)) begin
          // not this block: withdrawn after a few cycles, never acknowledged
          repeat (3) @(posedge clk);
        end else begin
          do @(posedge clk); while (!prev_ta[i]);
        end
        #1;
        prev_req[i] = 0; prev_re[i] = 0; prev_we[i] = 0;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (CYCLES) @(posedge clk);
    chk("transfers happened", n_xfer > int'(CYCLES) / 4);
    done = 1;
  end
endmodule
