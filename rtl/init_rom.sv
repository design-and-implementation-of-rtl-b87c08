// init_rom - initialisation table of a 1553B module channel ("table lookup").
//
// Holds the script that the initialisation block replays over SPI to bring the
// module up as a remote terminal (RT): set RT mode, read the mode back and check
// it, enable the RT at its address, then configure and enable the subaddress used
// for communication. Each 32-bit entry is a b1553_pkg::rom_entry_t: SEND / SEND_LAST
// put one word on the SPI link (SEND_LAST closes the chip-select frame), EXPECT
// compares the word last read back with the given value, END finishes the script.
// Flags in an entry ask the reader to insert the RT address (bits 15:11) or the
// subaddress (bits 9:5) into the word, so one table serves any RT/subaddress.
//
// The table has the same read interface and size as the send and receive RAMs
// (32 x 32 bits, registered read, one rdclock of latency when rden is high).
// MODE selects the operating mode word written to the module; the design's main
// configuration is RT mode. The order of steps follows the initialisation flow
// chart; the register addresses and values are this design's own module protocol.
module init_rom
  import b1553_pkg::*;
#(
  parameter logic [15:0] MODE = MODE_RT
) (
  input  logic              rdclock,
  input  logic              rden,
  input  logic [RAM_AW-1:0] rdaddress,
  output logic [RAM_DW-1:0] q
);

  function automatic logic [RAM_DW-1:0] entry(input logic [RAM_AW-1:0] a);
    case (a)
      // step 1: put the module into the selected mode
      5'd0:  return rom_e(ROM_SEND,      1'b0, 1'b0, spi_cmd(SPI_OP_WRITE, ADDR_MODE));
      5'd1:  return rom_e(ROM_SEND_LAST, 1'b0, 1'b0, MODE);
      // step 2: read the mode back and check it
      5'd2:  return rom_e(ROM_SEND,      1'b0, 1'b0, spi_cmd(SPI_OP_READ, ADDR_MODE));
      5'd3:  return rom_e(ROM_SEND_LAST, 1'b0, 1'b0, SPI_DUMMY);
      5'd4:  return rom_e(ROM_EXPECT,    1'b0, 1'b0, MODE);
      // step 3: enable the RT at address rt_num
      5'd5:  return rom_e(ROM_SEND,      1'b0, 1'b0, spi_cmd(SPI_OP_WRITE, ADDR_RT_CTRL));
      5'd6:  return rom_e(ROM_SEND_LAST, 1'b1, 1'b0, 16'h0001);
      // step 4: configure and enable subaddress sa_idx
      5'd7:  return rom_e(ROM_SEND,      1'b0, 1'b0, spi_cmd(SPI_OP_WRITE, ADDR_SA_CTRL));
      5'd8:  return rom_e(ROM_SEND_LAST, 1'b0, 1'b1, 16'h0001);
      default: return rom_e(ROM_END,     1'b0, 1'b0, 16'h0000);
    endcase
  endfunction

  always_ff @(posedge rdclock) begin
    if (rden) q <= entry(rdaddress);
  end

endmodule
