// b1553_fsm - task state machine of one 1553B module channel.
//
// Schedules the three task states of a channel: initialisation, idle and shutdown.
//   ST_RESET_WAIT  after reset the module is given RST_WAIT mclk cycles to come out
//                  of its own reset before it is touched ("reset time sufficient").
//   ST_INIT/_WAIT  runs the initialisation script; on failure it is run again, and
//                  init_fails counts the failed attempts.
//   ST_IDLE        waits for the module's interrupt (int_n low, synchronised here),
//                  which announces an instruction from the upper computer.
//   ST_POLL_WAIT   reads the instruction register; the data exchange decodes the reply.
//   ST_OP/_WAIT    carries out the instruction as one or two read/write operations:
//                  0  read the message-buffer head status into receive-RAM entry 0
//                  1  write the head status from send-RAM entry 0
//                  2  start a communication: write n words from the send RAM into the
//                     transmit buffer of subaddress sa_idx, then read n words of its
//                     receive buffer into receive RAM entries 0..n-1; n is taken from
//                     instruction bits 9:4, 0 meaning 32 (the 1553B word-count rule)
//                  3  re-initialise;  F  close the channel and stop (ST_OFF, left only
//                     by reset);  any other code is ignored.
// Instruction word bits 15:10 are not used. Words read are stored in the receive RAM as {4'h0, module address, data word}.
// chan_on is high while the channel is initialised and not shut down.
//
// The states and instruction codes follow the design's flow charts; the polling
// by interrupt, the instruction word layout and the RAM entry layout are this
// design's own.
module b1553_fsm
  import b1553_pkg::*;
#(
  parameter int unsigned RST_WAIT = 50_000   // 1 ms at 50 MHz
) (
  input  logic              mclk,
  input  logic              reset,
  input  logic              int_n,
  input  logic [4:0]        sa_idx,
  // upper-computer instruction from the data exchange
  input  logic              instr_valid,
  input  logic [W-1:0]      instr_word,
  // initialisation / control block
  output logic              rt_init,
  output logic              rt_req,
  output rt_op_e            rt_opcode,
  output logic [11:0]       start_addr,
  output logic [5:0]        data_length,
  input  logic              rt_over,
  input  logic              rt_succ,
  input  logic              rd_valid,
  input  logic [W-1:0]      rd_word,
  // receive RAM write port
  output logic              rx_wren,
  output logic [RAM_AW-1:0] rx_waddr,
  output logic [RAM_DW-1:0] rx_wdata,
  // status
  output state_e            state_o,
  output logic              chan_on,
  output logic [7:0]        init_fails,
  output logic [3:0]        last_instr
);

  localparam int unsigned RW = $clog2(RST_WAIT + 1) + 1;

  state_e      st;
  logic [RW-1:0] rst_cnt;
  logic [1:0]  int_sync;
  logic [3:0]  instr;
  logic [5:0]  n_words;
  logic        op_idx;        // which operation of the instruction is running
  logic [5:0]  rx_cnt;

  assign state_o = st;

  // operation parameters for the current instruction and op_idx
  always_comb begin
    rt_opcode   = RT_OP_READ;
    start_addr  = ADDR_INSTR;
    data_length = 6'd1;
    if (st == ST_OP || st == ST_OP_WAIT) begin
      case (instr)
        INSTR_READ_HEAD:  start_addr = ADDR_MBUFF_HEAD;
        INSTR_WRITE_HEAD: begin
          rt_opcode  = RT_OP_WRITE;
          start_addr = ADDR_MBUFF_HEAD;
        end
        INSTR_START_COMM: begin
          rt_opcode   = op_idx ? RT_OP_READ : RT_OP_WRITE;
          start_addr  = (op_idx ? ADDR_SA_RX : ADDR_SA_TX) | {2'b00, sa_idx, 5'b00000};
          data_length = n_words;
        end
        default: rt_opcode = RT_OP_CLOSE; // INSTR_OFF
      endcase
    end
  end

  assign rx_wren  = rd_valid && st == ST_OP_WAIT;
  assign rx_waddr = RAM_AW'(rx_cnt);
  assign rx_wdata = {4'h0, start_addr + 12'(rx_cnt), rd_word};

  always_ff @(posedge mclk) begin
    if (reset) begin
      st         <= ST_RESET_WAIT;
      rst_cnt    <= '0;
      int_sync   <= 2'b11;
      instr      <= 4'hE;
      n_words    <= 6'd1;
      op_idx     <= 1'b0;
      rx_cnt     <= '0;
      rt_init    <= 1'b0;
      rt_req     <= 1'b0;
      chan_on    <= 1'b0;
      init_fails <= '0;
      last_instr <= 4'hE;
    end else begin
      int_sync <= {int_sync[0], int_n};
      rt_init  <= 1'b0;
      rt_req   <= 1'b0;
      if (rx_wren) rx_cnt <= rx_cnt + 1'b1;
      case (st)
        ST_RESET_WAIT: begin
          rst_cnt <= rst_cnt + 1'b1;
          if (rst_cnt == RW'(RST_WAIT - 1)) st <= ST_INIT;
        end
        ST_INIT: begin
          chan_on <= 1'b0;
          rt_init <= 1'b1;
          st      <= ST_INIT_WAIT;
        end
        ST_INIT_WAIT: if (rt_over) begin
          if (rt_succ) begin
            chan_on <= 1'b1;
            st      <= ST_IDLE;
          end else begin
            init_fails <= init_fails + 1'b1;
            st         <= ST_INIT;
          end
        end
        ST_IDLE: if (!int_sync[1]) begin
          instr  <= 4'hE;
          rt_req <= 1'b1;      // read ADDR_INSTR, one word
          st     <= ST_POLL_WAIT;
        end
        ST_POLL_WAIT: begin
          if (instr_valid) begin
            instr   <= instr_word[3:0];
            n_words <= (instr_word[9:4] == 6'd0) ? 6'd32 : instr_word[9:4];
          end
          if (rt_over) begin
            last_instr <= instr;
            op_idx     <= 1'b0;
            case (instr)
              INSTR_READ_HEAD, INSTR_WRITE_HEAD, INSTR_START_COMM, INSTR_OFF: st <= ST_OP;
              INSTR_REINIT: st <= ST_INIT;
              default:      st <= ST_IDLE;
            endcase
          end
        end
        ST_OP: begin
          rt_req <= 1'b1;
          rx_cnt <= '0;
          st     <= ST_OP_WAIT;
        end
        ST_OP_WAIT: if (rt_over) begin
          if (instr == INSTR_START_COMM && !op_idx) begin
            op_idx <= 1'b1;
            st     <= ST_OP;
          end else if (instr == INSTR_OFF) begin
            chan_on <= 1'b0;
            st      <= ST_OFF;
          end else begin
            st <= ST_IDLE;
          end
        end
        default: ; // ST_OFF
      endcase
    end
  end

endmodule
