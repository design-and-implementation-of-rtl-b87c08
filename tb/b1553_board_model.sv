// b1553_board_model - behavioural model of an SPI-attached 1553B module (testbench only).
//
// Stands in for the packaged 1553B module on the SPI side. It implements the word
// protocol of b1553_pkg: per chip-select frame a command word {op, addr} and then
// data words; writes store into a 4096 x 16 register/buffer space, reads return
// consecutive locations, the command word is answered with STATUS. SPI mode 0,
// MSB first, 16-bit words. The 1553B bus side is not modelled: the testbench plays
// the upper computer by calling post_instr(), which stores an instruction word and
// pulls int_n low; reading the instruction register releases int_n.
// fail_mode_writes > 0 makes that many writes of the mode register be lost, to
// provoke failed initialisations; mode_writes counts all of them. frames counts chip-select frames, max_words the
// longest frame seen.
module b1553_board_model
  import b1553_pkg::*;
#(
  parameter logic [15:0] STATUS = 16'h8C00
) (
  input  logic spi_cs,
  input  logic spi_sclk,
  input  logic spi_mosi,
  output logic spi_miso,
  output logic int_n
);

  logic [15:0] mem [4096];
  int          fail_mode_writes = 0;
  int          frames = 0;
  int          max_words = 0;
  int          instr_reads = 0;
  int          mode_writes = 0;

  logic [15:0] in_sh, out_sh, next_out;
  int          bitn, widx;
  logic [3:0]  op;
  logic [11:0] addr;
  logic        fresh;

  initial begin
    foreach (mem[i]) mem[i] = 16'h0000;
    int_n = 1'b1;
    spi_miso = 1'b0;
    in_sh = '0; out_sh = '0; next_out = '0;
    bitn = 0; widx = 0; op = '0; addr = '0; fresh = 1'b0;
  end

  task automatic post_instr(input logic [15:0] w);
    mem[ADDR_INSTR] = w;
    int_n = 1'b0;
  endtask

  always @(negedge spi_cs) begin
    bitn = 0; widx = 0; fresh = 1'b0;
    out_sh = STATUS;
    spi_miso = out_sh[15];
  end

  always @(posedge spi_cs) begin
    frames++;
    if (widx > max_words) max_words = widx;
  end

  always @(posedge spi_sclk) if (!spi_cs) begin
    in_sh = {in_sh[14:0], spi_mosi};
    bitn++;
    if (bitn == 16) begin
      bitn = 0;
      if (widx == 0) begin
        op = in_sh[15:12];
        addr = in_sh[11:0];
        next_out = (op == SPI_OP_READ) ? mem[addr] : 16'h0000;
        if (op == SPI_OP_READ && addr == ADDR_INSTR) begin
          int_n = 1'b1;
          instr_reads++;
        end
      end else if (op == SPI_OP_WRITE) begin
        if (addr == ADDR_MODE) mode_writes++;
        if (addr == ADDR_MODE && fail_mode_writes > 0) fail_mode_writes--;
        else mem[addr] = in_sh;
        addr = addr + 1;
        next_out = 16'h0000;
      end else begin
        addr = addr + 1;
        next_out = mem[addr];
      end
      widx++;
      fresh = 1'b1;
    end
  end

  always @(negedge spi_sclk) if (!spi_cs) begin
    if (fresh) begin
      out_sh = next_out;
      fresh = 1'b0;
    end else begin
      out_sh = {out_sh[14:0], 1'b0};
    end
    spi_miso = out_sh[15];
  end

endmodule
