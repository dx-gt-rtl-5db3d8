// sram_model -- behavioural model of one global on-chip memory block for testbenches.
//
// A single-port memory of 2**AW bytes on a DATA_W-bit bus, with byte selects.  It
// takes a request (re or we held high) and answers with a one-cycle ta after
// WAIT+1 clock cycles; read data is valid with ta.  Storage is sparse (an
// associative array of words), so multi-megabyte blocks cost only what is touched.
// Unwritten words read as zero.  Counts finished transfers in n_xfer.
module sram_model #(
  parameter int unsigned AW     = 21,
  parameter int unsigned DATA_W = 64,
  parameter int unsigned WAIT   = 0
) (
  input  logic                clk,
  input  logic [AW-1:0]       addr,
  input  logic [DATA_W-1:0]   wdata,
  output logic [DATA_W-1:0]   rdata,
  input  logic                re,
  input  logic                we,
  input  logic [DATA_W/8-1:0] be,
  output logic                ta
);
  localparam int unsigned BW = $clog2(DATA_W / 8);

  logic [DATA_W-1:0] mem [longint];
  int unsigned cnt = 0;
  int unsigned n_xfer = 0;

  initial begin
    ta    = 1'b0;
    rdata = '0;
  end

  always @(posedge clk) begin
    ta <= 1'b0;
    if ((re || we) && !ta) begin
      if (cnt == WAIT) begin
        longint a;
        a = longint'(addr >> BW);
        cnt <= 0;
        ta  <= 1'b1;
        n_xfer <= n_xfer + 1;
        if (we) begin
          logic [DATA_W-1:0] w;
          w = mem.exists(a) ? mem[a] : '0;
          for (int b = 0; b < DATA_W / 8; b++)
            if (be[b]) w[8*b +: 8] = wdata[8*b +: 8];
          mem[a] = w;
        end else begin
          rdata <= mem.exists(a) ? mem[a] : '0;
        end
      end else begin
        cnt <= cnt + 1;
      end
    end
  end
endmodule
