// dxgt_pkg -- constants and types shared by the SoCDMMU and the crossbar.
//
// Holds the encoding of the SoCDMMU command word and status word, the scheduler
// selection and a few helpers.  The two commands (allocate a page of G_blocks, free
// it) follow the described service of the unit; the bit layout of the command and
// status words is this design's own choice:
//
//   command word (written to the SoCDMMU port):
//     [31:28] opcode    (CMD_ALLOC = 1, CMD_FREE = 2)
//     [27:16] count     number of G_blocks in the page
//     [11:0]  vblock    first virtual G_block number of the page
//   status word (read from the SoCDMMU port):
//     [31]    busy      a command of this PE is queued or executing
//     [30]    done      the last command has finished
//     [29]    error     the last command was refused
//     [11:0]  free      number of free G_blocks (low 12 bits)
package dxgt_pkg;

  typedef enum logic [3:0] {
    CMD_NOP   = 4'd0,
    CMD_ALLOC = 4'd1,
    CMD_FREE  = 4'd2
  } cmd_op_e;

  // SoCDMMU command scheduling scheme (the `sch` option of the generator).
  typedef enum logic {
    SCH_PRIORITY = 1'b0,
    SCH_FCFS     = 1'b1
  } sched_e;

  localparam int unsigned CMD_FIELD_W  = 12;
  localparam int unsigned STAT_BUSY    = 31;
  localparam int unsigned STAT_DONE    = 30;
  localparam int unsigned STAT_ERR     = 29;

  typedef struct packed {
    cmd_op_e                 op;
    logic [CMD_FIELD_W-1:0]  count;
    logic [3:0]              rsvd;
    logic [CMD_FIELD_W-1:0]  vblock;
  } cmd_word_t;

  function automatic logic [31:0] make_cmd(cmd_op_e op, int unsigned count, int unsigned vblock);
    cmd_word_t c;
    c.op     = op;
    c.count  = CMD_FIELD_W'(count);
    c.rsvd   = '0;
    c.vblock = CMD_FIELD_W'(vblock);
    return c;
  endfunction

endpackage
