// b1553_pkg - types and constants shared by the SPI-attached 1553B module controller.
//
// The controller talks to a packaged MIL-STD-1553B remote-terminal module over SPI
// in 16-bit words. Everything here that describes the module's side of the link
// (the command-word layout, the register map, the status word) is this design's own
// choice: the module's SPI protocol is not public, so a consistent, simple protocol
// is defined below and used by the RTL and by the testbench model of the module.
//
// SPI frame (one chip-select assertion): a command word {op[3:0], addr[11:0]}
// followed by data words. op = SPI_OP_WRITE: the data words are written to
// consecutive module addresses. op = SPI_OP_READ: the master sends SPI_DUMMY words
// and the module returns consecutive module addresses. The module answers the
// command word itself with its status word.
//
// Upper-computer instructions (codes 0,1,2,3,F) follow the system flow chart:
// 0 read message-buffer head status, 1 write it, 2 start a communication,
// 3 re-initialise, F switch the channel off. Anything else is ignored.
package b1553_pkg;

  localparam int unsigned W = 16;            // SPI word width
  localparam int unsigned RAM_DW = 32;       // send/receive RAM and init ROM word width
  localparam int unsigned RAM_AW = 5;        // 32 entries

  // ---------------- SPI command word -------------------------------------------------
  localparam logic [3:0]  SPI_OP_READ  = 4'h0;
  localparam logic [3:0]  SPI_OP_WRITE = 4'h1;
  localparam logic [15:0] SPI_DUMMY    = 16'hFFFF;

  function automatic logic [15:0] spi_cmd(input logic [3:0] op, input logic [11:0] addr);
    return {op, addr};
  endfunction

  // ---------------- module register map (assumed) ------------------------------------
  localparam logic [11:0] ADDR_MODE      = 12'h001; // operating mode register
  localparam logic [11:0] ADDR_RT_CTRL   = 12'h002; // {rt_addr[15:11], ..., enable[0]}
  localparam logic [11:0] ADDR_SA_CTRL   = 12'h003; // {.., sa[9:5], .., enable[0]}
  localparam logic [11:0] ADDR_INSTR     = 12'h010; // last instruction from the upper computer
  localparam logic [11:0] ADDR_MBUFF_HEAD= 12'h020; // message buffer head status
  localparam logic [11:0] ADDR_SA_TX     = 12'h400; // transmit buffers, 32 words per subaddress
  localparam logic [11:0] ADDR_SA_RX     = 12'h800; // receive buffers, 32 words per subaddress

  localparam logic [15:0] MODE_BC = 16'h0001;
  localparam logic [15:0] MODE_RT = 16'h0002;
  localparam logic [15:0] MODE_BM = 16'h0003;

  // ---------------- upper-computer instructions ----------------------------------------
  typedef enum logic [3:0] {
    INSTR_READ_HEAD  = 4'h0,
    INSTR_WRITE_HEAD = 4'h1,
    INSTR_START_COMM = 4'h2,
    INSTR_REINIT     = 4'h3,
    INSTR_OFF        = 4'hF
  } instr_e;

  // ---------------- operations of the init/control block -----------------------------
  typedef enum logic [1:0] {
    RT_OP_READ  = 2'd0,   // read data_length words from start_addr
    RT_OP_WRITE = 2'd1,   // write data_length words from the send RAM to start_addr
    RT_OP_CLOSE = 2'd2    // close the channel (disable the RT)
  } rt_op_e;

  // ---------------- task states of the channel state machine --------------------------
  typedef enum logic [3:0] {
    ST_RESET_WAIT = 4'd0,
    ST_INIT       = 4'd1,
    ST_INIT_WAIT  = 4'd2,
    ST_IDLE       = 4'd3,
    ST_POLL_WAIT  = 4'd4,
    ST_OP         = 4'd5,
    ST_OP_WAIT    = 4'd6,
    ST_OFF        = 4'd7
  } state_e;

  // ---------------- initialisation ROM entry -----------------------------------------
  // [31:30] kind, [29] OR rt_num into bits 15:11, [28] OR sa_idx into bits 9:5,
  // [15:0] word (SEND kinds) or expected read-back value (EXPECT).
  typedef enum logic [1:0] {
    ROM_SEND      = 2'b00,  // send word, keep chip select
    ROM_SEND_LAST = 2'b01,  // send word, then close the frame
    ROM_EXPECT    = 2'b10,  // last word received must equal the value
    ROM_END       = 2'b11   // end of script: success
  } rom_kind_e;

  typedef struct packed {
    rom_kind_e   kind;
    logic        ins_rt;
    logic        ins_sa;
    logic [11:0] rsvd;
    logic [15:0] word;
  } rom_entry_t;

  function automatic logic [31:0] rom_e(input rom_kind_e k, input logic ins_rt,
                                        input logic ins_sa, input logic [15:0] w);
    rom_entry_t e;
    e.kind = k; e.ins_rt = ins_rt; e.ins_sa = ins_sa; e.rsvd = '0; e.word = w;
    return e;
  endfunction

  // Insert the RT address / subaddress into a script word (1553B command-word field
  // positions: RT address in bits 15:11, subaddress in bits 9:5).
  function automatic logic [15:0] rom_fill(input logic [15:0] word, input logic ins_rt,
                                           input logic ins_sa, input logic [4:0] rt_num,
                                           input logic [4:0] sa_idx);
    logic [15:0] w;
    w = word;
    if (ins_rt) w[15:11] = w[15:11] | rt_num;
    if (ins_sa) w[9:5]   = w[9:5]   | sa_idx;
    return w;
  endfunction

endpackage
