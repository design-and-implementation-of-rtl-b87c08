// b1553_init - initialisation and read/write control of one 1553B module.
//
// Initialisation (rt_init pulse): the block walks the initialisation table from
// entry 0 (rt_prom_rden / rt_prom_addr / rt_prom_data, one cycle read latency) and
// turns each entry into SPI words: SEND entries become words of the current
// chip-select frame, SEND_LAST ends the frame and waits until every reply is in,
// EXPECT compares the last word read back with the table value, END finishes. The
// RT address rt_num and subaddress sa_idx are inserted into words the table flags.
// A failed EXPECT stops the script at once (rt_succ low); reaching END sets
// rt_succ. Either way rt_over pulses for one cycle.
//
// Read and write operations (rt_req pulse, selected by rt_opcode):
//   RT_OP_READ  one frame: read command for start_addr, then data_length dummy words;
//               the replies to the dummy words come out on rd_word with rd_valid,
//               then rd_over and rt_over pulse.
//   RT_OP_WRITE one frame: write command for start_addr, then data_length words taken
//               from send-RAM entries 0..data_length-1; then wr_over and rt_over.
//   RT_OP_CLOSE one frame clearing the RT control register, which closes the channel
//               (disables the RT); then wr_over and rt_over.
// data_length counts words, 1..32. Requests are only taken while the block is idle
// (busy low); rt_init has priority over rt_req.
//
// Words go to the data exchange with a valid/ready handshake (wr_reqi / wr_ack);
// replies come back in order on rx_valid / rx_word.
//
// Signal names follow the original design's initialisation/control module. The
// script format, the frame layout and the handshakes are this design's own.
module b1553_init
  import b1553_pkg::*;
(
  input  logic              mclk,
  input  logic              reset,
  input  logic [4:0]        rt_num,
  input  logic [4:0]        sa_idx,
  // requests
  input  logic              rt_init,
  input  logic              rt_req,
  input  rt_op_e            rt_opcode,
  input  logic [11:0]       start_addr,
  input  logic [5:0]        data_length,
  output logic              busy,
  output logic              rt_over,
  output logic              rt_succ,
  output logic              rd_valid,
  output logic [W-1:0]      rd_word,
  output logic              rd_over,
  output logic              wr_over,
  // initialisation table
  output logic              rt_prom_rden,
  output logic [RAM_AW-1:0] rt_prom_addr,
  input  logic [RAM_DW-1:0] rt_prom_data,
  // data exchange
  output logic              wr_reqi,
  output logic [W-1:0]      wr_word,
  output logic              wr_last,
  output logic              wr_src_ram,
  output logic [RAM_AW-1:0] wr_ram_addr,
  input  logic              wr_ack,
  input  logic              rx_valid,
  input  logic [W-1:0]      rx_word
);

  typedef enum logic [2:0] {I_IDLE, I_ROM_RD, I_ROM_EXEC, I_ROM_DRAIN, I_OP, I_OP_DRAIN} istate_e;
  istate_e       st;
  logic [RAM_AW-1:0] rom_addr;
  rom_entry_t    ent;
  logic [5:0]    outstanding;
  logic [W-1:0]  last_rx;
  rt_op_e        op;
  logic [11:0]   op_addr;
  logic [5:0]    op_len;
  logic [5:0]    widx;          // word index within the operation frame
  logic [5:0]    ridx;          // reply index within the operation frame
  logic          drained;

  assign ent          = rom_entry_t'(rt_prom_data);
  assign rt_prom_rden = (st == I_ROM_RD);
  assign rt_prom_addr = rom_addr;
  assign busy         = (st != I_IDLE);
  assign drained      = (outstanding == 6'd0);

  // word offered to the data exchange
  always_comb begin
    wr_reqi     = 1'b0;
    wr_word     = '0;
    wr_last     = 1'b0;
    wr_src_ram  = 1'b0;
    wr_ram_addr = RAM_AW'(widx - 6'd1);
    if (st == I_ROM_EXEC && (ent.kind == ROM_SEND || ent.kind == ROM_SEND_LAST)) begin
      wr_reqi = 1'b1;
      wr_word = rom_fill(ent.word, ent.ins_rt, ent.ins_sa, rt_num, sa_idx);
      wr_last = (ent.kind == ROM_SEND_LAST);
    end else if (st == I_OP) begin
      wr_reqi = 1'b1;
      case (op)
        RT_OP_READ: begin
          wr_word = (widx == 6'd0) ? spi_cmd(SPI_OP_READ, op_addr) : SPI_DUMMY;
          wr_last = (widx == op_len);
        end
        RT_OP_WRITE: begin
          wr_word    = spi_cmd(SPI_OP_WRITE, op_addr);
          wr_src_ram = (widx != 6'd0);
          wr_last    = (widx == op_len);
        end
        default: begin // RT_OP_CLOSE
          wr_word = (widx == 6'd0) ? spi_cmd(SPI_OP_WRITE, ADDR_RT_CTRL) : 16'h0000;
          wr_last = (widx == 6'd1);
        end
      endcase
    end
  end

  assign rd_valid = (st == I_OP || st == I_OP_DRAIN) && op == RT_OP_READ && rx_valid && ridx != 6'd0;
  assign rd_word  = rx_word;

  always_ff @(posedge mclk) begin
    if (reset) begin
      st          <= I_IDLE;
      rom_addr    <= '0;
      outstanding <= '0;
      last_rx     <= '0;
      op          <= RT_OP_READ;
      op_addr     <= '0;
      op_len      <= '0;
      widx        <= '0;
      ridx        <= '0;
      rt_over     <= 1'b0;
      rt_succ     <= 1'b0;
      rd_over     <= 1'b0;
      wr_over     <= 1'b0;
    end else begin
      rt_over <= 1'b0;
      rd_over <= 1'b0;
      wr_over <= 1'b0;
      outstanding <= outstanding + 6'(wr_reqi && wr_ack) - 6'(rx_valid);
      if (rx_valid) begin
        last_rx <= rx_word;
        ridx    <= ridx + 1'b1;
      end
      case (st)
        I_IDLE: begin
          if (rt_init) begin
            rom_addr <= '0;
            rt_succ  <= 1'b0;
            st       <= I_ROM_RD;
          end else if (rt_req) begin
            op      <= rt_opcode;
            op_addr <= start_addr;
            op_len  <= (data_length == 6'd0) ? 6'd1 : data_length;
            widx    <= '0;
            ridx    <= '0;
            st      <= I_OP;
          end
        end
        I_ROM_RD: st <= I_ROM_EXEC;
        I_ROM_EXEC: begin
          case (ent.kind)
            ROM_SEND: if (wr_ack) begin
              rom_addr <= rom_addr + 1'b1;
              st       <= I_ROM_RD;
            end
            ROM_SEND_LAST: if (wr_ack) st <= I_ROM_DRAIN;
            ROM_EXPECT: begin
              if (last_rx == ent.word) begin
                rom_addr <= rom_addr + 1'b1;
                st       <= I_ROM_RD;
              end else begin
                rt_over <= 1'b1;
                st      <= I_IDLE;
              end
            end
            default: begin // ROM_END
              rt_succ <= 1'b1;
              rt_over <= 1'b1;
              st      <= I_IDLE;
            end
          endcase
        end
        I_ROM_DRAIN: if (drained) begin
          rom_addr <= rom_addr + 1'b1;
          st       <= I_ROM_RD;
        end
        I_OP: if (wr_ack) begin
          widx <= widx + 1'b1;
          if (wr_last) st <= I_OP_DRAIN;
        end
        default: if (drained) begin // I_OP_DRAIN
          rt_over <= 1'b1;
          rd_over <= (op == RT_OP_READ);
          wr_over <= (op != RT_OP_READ);
          st      <= I_IDLE;
        end
      endcase
    end
  end

  // Replies only come for words handed over; requests only arrive while idle.
  always_ff @(posedge mclk) begin
    if (!reset) begin
      assert (!(rx_valid && outstanding == 6'd0)) else $error("reply without an outstanding word");
      assert (!((rt_init || rt_req) && st != I_IDLE)) else $error("request while busy");
    end
  end

endmodule
