// b1553_spi - one channel: the FPGA side of one SPI-attached 1553B module.
//
// Wires together, per channel: the send RAM and receive RAM (32 x 32-bit, dual
// clock), the initialisation table, the initialisation/control block, the task
// state machine, the data exchange and the SPI master. The host side writes the
// data to send into the send RAM and reads received data from the receive RAM on
// its own clock clk_10m; everything else runs on mclk, which also clocks both sides
// of the SPI master.
//
// After reset the channel waits RST_WAIT mclk cycles, initialises the module as an
// RT at address rt_num with subaddress sa_idx enabled (retrying until it succeeds),
// then serves instructions the module announces with int_n (see b1553_fsm).
// busy is high while the initialisation/control block works; xfer_done pulses
// (mclk) at the end of every read, write or close operation, e.g. when the receive
// RAM holds the data of a communication. Send-RAM entry k (low 16 bits) is data word k of a write; receive-RAM entry k
// holds {4'h0, module address, data word} of word k of the last read.
//
// The block structure is the original design's; the SPI clock is mclk / (2*SCK_DIV).
module b1553_spi
  import b1553_pkg::*;
#(
  parameter int unsigned RST_WAIT = 50_000,
  parameter int unsigned SCK_DIV  = 2,
  parameter int unsigned SSEL_GAP = 2
) (
  input  logic              mclk,
  input  logic              clk_10m,
  input  logic              reset,
  input  logic [4:0]        rt_num,
  input  logic [4:0]        sa_idx,
  // SPI to the 1553B module
  output logic              spi_cs,
  output logic              spi_sclk,
  output logic              spi_mosi,
  input  logic              spi_miso,
  input  logic              int_n,
  // host side (clk_10m)
  input  logic              tx_wren,
  input  logic [RAM_AW-1:0] tx_waddr,
  input  logic [RAM_DW-1:0] tx_wdata,
  input  logic [RAM_AW-1:0] rx_rd_addr,
  output logic [RAM_DW-1:0] rx_rd_data,
  // status
  output state_e            state_o,
  output logic              chan_on,
  output logic              busy,
  output logic              xfer_done,
  output logic              rt_succ,
  output logic [7:0]        init_fails,
  output logic [3:0]        last_instr
);

  // init/control <-> state machine
  logic        rt_init, rt_req, rt_over;
  rt_op_e      rt_opcode;
  logic [11:0] start_addr;
  logic [5:0]  data_length;
  logic        rd_valid, rd_over, wr_over;
  logic [W-1:0] rd_word;
  // init/control <-> table
  logic        rom_rden;
  logic [RAM_AW-1:0] rom_addr;
  logic [RAM_DW-1:0] rom_data;
  // init/control <-> data exchange
  logic        wr_reqi, wr_last, wr_src_ram, wr_ack, rx_valid;
  logic [W-1:0] wr_word, rx_word;
  logic [RAM_AW-1:0] wr_ram_addr;
  // data exchange <-> state machine, send RAM, SPI master
  logic        instr_valid;
  logic [W-1:0] instr_word;
  logic [RAM_AW-1:0] tx_ram_addr;
  logic [RAM_DW-1:0] tx_ram_q;
  logic        di_req, wren, do_valid;
  logic [W-1:0] di, dout;
  // state machine -> receive RAM
  logic        rx_wren;
  logic [RAM_AW-1:0] rx_waddr;
  logic [RAM_DW-1:0] rx_wdata;

  ram_u #(.DATA_W(RAM_DW), .ADDR_W(RAM_AW)) ram_stx (
    .reset, .wrclock(clk_10m), .wren(tx_wren), .wraddress(tx_waddr), .data(tx_wdata),
    .rdclock(mclk), .rdaddress(tx_ram_addr), .q(tx_ram_q));

  ram_u #(.DATA_W(RAM_DW), .ADDR_W(RAM_AW)) ram_srx (
    .reset, .wrclock(mclk), .wren(rx_wren), .wraddress(rx_waddr), .data(rx_wdata),
    .rdclock(clk_10m), .rdaddress(rx_rd_addr), .q(rx_rd_data));

  init_rom #(.MODE(MODE_RT)) rt_prom (
    .rdclock(mclk), .rden(rom_rden), .rdaddress(rom_addr), .q(rom_data));

  b1553_fsm #(.RST_WAIT(RST_WAIT)) u_fsm (
    .mclk, .reset, .int_n, .sa_idx, .instr_valid, .instr_word,
    .rt_init, .rt_req, .rt_opcode, .start_addr, .data_length,
    .rt_over, .rt_succ, .rd_valid, .rd_word,
    .rx_wren, .rx_waddr, .rx_wdata,
    .state_o, .chan_on, .init_fails, .last_instr);

  b1553_init u_init (
    .mclk, .reset, .rt_num, .sa_idx,
    .rt_init, .rt_req, .rt_opcode, .start_addr, .data_length,
    .busy, .rt_over, .rt_succ, .rd_valid, .rd_word, .rd_over, .wr_over,
    .rt_prom_rden(rom_rden), .rt_prom_addr(rom_addr), .rt_prom_data(rom_data),
    .wr_reqi, .wr_word, .wr_last, .wr_src_ram, .wr_ram_addr, .wr_ack, .rx_valid, .rx_word);

  data_exchange u_dx (
    .clk(mclk), .rst(reset),
    .wr_reqi, .wr_word, .wr_last, .wr_src_ram, .wr_ram_addr, .wr_ack,
    .rx_valid, .rx_word, .instr_valid, .instr_word,
    .tx_ram_addr, .tx_ram_q,
    .spi_di_req(di_req), .spi_di(di), .spi_wren(wren), .spi_do_valid(do_valid), .spi_do(dout));

  // pulses once per finished read, write or close operation
  assign xfer_done = rd_over | wr_over;

  // wr_ack_o is not needed: the data exchange watches di_req_o instead.
  spi_master #(.N(W), .SCK_DIV(SCK_DIV), .SSEL_GAP(SSEL_GAP)) u1 (
    .pclk_i(mclk), .sclk_i(mclk), .rst_i(reset),
    .spi_ssel_o(spi_cs), .spi_sck_o(spi_sclk), .spi_mosi_o(spi_mosi), .spi_miso_i(spi_miso),
    .di_req_o(di_req), .di_i(di), .wren_i(wren), .wr_ack_o(), .do_valid_o(do_valid), .do_o(dout));

endmodule
