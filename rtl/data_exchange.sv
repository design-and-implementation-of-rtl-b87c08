// data_exchange - word stream between the channel control and the SPI master.
//
// The initialisation/control block hands over one 16-bit word at a time with a
// valid/ready handshake (wr_reqi / wr_ack, accepted in the cycle both are high).
// A word is either given directly (wr_word) or, with wr_src_ram set, taken from
// the low half of send-RAM entry wr_ram_addr, so write payloads flow from the send
// RAM to the SPI link without passing through the control block. wr_last marks the
// last word of a chip-select frame: after pushing it, this block accepts nothing
// until the reply to every word pushed has come back, so the SPI master sees no
// next word in time and closes the frame.
//
// Words are pushed into the SPI master while it is still shifting the previous one
// (its one-word holding register), so consecutive words of a frame follow each
// other with no gap: fetching the next word is pipelined with shifting the current.
// Every word the SPI master shifts in is passed on unchanged (rx_valid / rx_word).
//
// Upper-computer instructions: when a frame starts with the command word that reads
// the module's instruction register, the reply to the frame's second word is the
// instruction; it is also presented on instr_word with a one-cycle instr_valid.
//
// Timing: a direct word reaches the SPI master's write port one cycle after it is
// accepted, a send-RAM word two cycles after (registered RAM read).
module data_exchange
  import b1553_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // from the control block
  input  logic              wr_reqi,
  input  logic [W-1:0]      wr_word,
  input  logic              wr_last,
  input  logic              wr_src_ram,
  input  logic [RAM_AW-1:0] wr_ram_addr,
  output logic              wr_ack,
  // replies, in order
  output logic              rx_valid,
  output logic [W-1:0]      rx_word,
  // instruction from the upper computer
  output logic              instr_valid,
  output logic [W-1:0]      instr_word,
  // send RAM read port
  output logic [RAM_AW-1:0] tx_ram_addr,
  input  logic [RAM_DW-1:0] tx_ram_q,
  // SPI master parallel interface
  input  logic              spi_di_req,
  output logic [W-1:0]      spi_di,
  output logic              spi_wren,
  input  logic              spi_do_valid,
  input  logic [W-1:0]      spi_do
);

  typedef enum logic [1:0] {D_IDLE, D_RAM, D_PUSH, D_DRAIN} dstate_e;
  dstate_e    st;
  logic [W-1:0] word_r;
  logic       last_r;
  logic [5:0] outstanding;      // words pushed whose reply has not come back
  logic [5:0] resp_idx;         // replies seen in the current frame
  logic       first_word;       // next word pushed opens a frame
  logic       instr_frame;
  logic       push;

  assign wr_ack      = (st == D_IDLE) && wr_reqi;
  assign tx_ram_addr = wr_ram_addr;
  assign spi_wren    = (st == D_PUSH);
  assign spi_di      = word_r;
  assign push        = spi_wren && spi_di_req;
  assign rx_valid    = spi_do_valid;
  assign rx_word     = spi_do;

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= D_IDLE;
      word_r      <= '0;
      last_r      <= 1'b0;
      outstanding <= '0;
      resp_idx    <= '0;
      first_word  <= 1'b1;
      instr_frame <= 1'b0;
      instr_valid <= 1'b0;
      instr_word  <= '0;
    end else begin
      instr_valid <= 1'b0;
      outstanding <= outstanding + 6'(push) - 6'(spi_do_valid);
      if (spi_do_valid) begin
        resp_idx <= resp_idx + 1'b1;
        if (instr_frame && resp_idx == 6'd1) begin
          instr_valid <= 1'b1;
          instr_word  <= spi_do;
        end
      end
      case (st)
        D_IDLE: if (wr_reqi) begin
          last_r <= wr_last;
          if (wr_src_ram) st <= D_RAM;
          else begin
            word_r <= wr_word;
            st     <= D_PUSH;
          end
        end
        D_RAM: begin
          word_r <= tx_ram_q[W-1:0];
          st     <= D_PUSH;
        end
        D_PUSH: if (spi_di_req) begin
          first_word <= last_r;
          if (first_word) begin
            instr_frame <= (word_r == spi_cmd(SPI_OP_READ, ADDR_INSTR));
            resp_idx    <= spi_do_valid ? 6'd1 : 6'd0;
          end
          st <= last_r ? D_DRAIN : D_IDLE;
        end
        default: // D_DRAIN
          if (outstanding == 6'd0 || (outstanding == 6'd1 && spi_do_valid)) st <= D_IDLE;
      endcase
    end
  end

  // Every reply answers a word pushed earlier.
  always_ff @(posedge clk) begin
    if (!rst) assert (!(spi_do_valid && outstanding == 6'd0)) else $error("reply without a pushed word");
  end

endmodule
