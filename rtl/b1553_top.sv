// b1553_top - multi-channel SPI controller for packaged MIL-STD-1553B modules.
//
// NUM_CH independent channels (generate array u2), each driving one 1553B module
// over its own SPI port and int_n line, work in parallel. Every channel brings the
// module up as a remote terminal from its initialisation table, then carries out
// the instructions the upper computer sends over the 1553B bus and the module
// relays, moving data between the module and that channel's send and receive RAMs.
// All channels share mclk (control and SPI) and clk_10m (host side of the RAMs).
//
// Ports are arrays indexed by channel. The number of channels is this design's
// choice (two); timing per channel is as described in b1553_spi.
module b1553_top
  import b1553_pkg::*;
#(
  parameter int unsigned NUM_CH   = 2,
  parameter int unsigned RST_WAIT = 50_000,
  parameter int unsigned SCK_DIV  = 2,
  parameter int unsigned SSEL_GAP = 2
) (
  input  logic                           mclk,
  input  logic                           clk_10m,
  input  logic                           reset,
  input  logic [NUM_CH-1:0][4:0]         rt_num,
  input  logic [NUM_CH-1:0][4:0]         sa_idx,
  output logic [NUM_CH-1:0]              spi_cs,
  output logic [NUM_CH-1:0]              spi_sclk,
  output logic [NUM_CH-1:0]              spi_mosi,
  input  logic [NUM_CH-1:0]              spi_miso,
  input  logic [NUM_CH-1:0]              int_n,
  input  logic [NUM_CH-1:0]              tx_wren,
  input  logic [NUM_CH-1:0][RAM_AW-1:0]  tx_waddr,
  input  logic [NUM_CH-1:0][RAM_DW-1:0]  tx_wdata,
  input  logic [NUM_CH-1:0][RAM_AW-1:0]  rx_rd_addr,
  output logic [NUM_CH-1:0][RAM_DW-1:0]  rx_rd_data,
  output state_e [NUM_CH-1:0]            state_o,
  output logic [NUM_CH-1:0]              chan_on,
  output logic [NUM_CH-1:0]              busy,
  output logic [NUM_CH-1:0]              xfer_done,
  output logic [NUM_CH-1:0]              rt_succ,
  output logic [NUM_CH-1:0][7:0]         init_fails,
  output logic [NUM_CH-1:0][3:0]         last_instr
);

  for (genvar i = 0; i < NUM_CH; i++) begin : u2
    b1553_spi #(.RST_WAIT(RST_WAIT), .SCK_DIV(SCK_DIV), .SSEL_GAP(SSEL_GAP)) clust (
      .mclk, .clk_10m, .reset,
      .rt_num(rt_num[i]), .sa_idx(sa_idx[i]),
      .spi_cs(spi_cs[i]), .spi_sclk(spi_sclk[i]), .spi_mosi(spi_mosi[i]),
      .spi_miso(spi_miso[i]), .int_n(int_n[i]),
      .tx_wren(tx_wren[i]), .tx_waddr(tx_waddr[i]), .tx_wdata(tx_wdata[i]),
      .rx_rd_addr(rx_rd_addr[i]), .rx_rd_data(rx_rd_data[i]),
      .state_o(state_o[i]), .chan_on(chan_on[i]), .busy(busy[i]), .xfer_done(xfer_done[i]), .rt_succ(rt_succ[i]),
      .init_fails(init_fails[i]), .last_instr(last_instr[i]));
  end

endmodule
