// spi_master - word-oriented SPI master with a parallel interface on its own clock.
//
// The serial engine runs on sclk_i, the parallel interface on pclk_i; in the
// channel both are tied to the same master clock, but the two sides only exchange
// information through toggle handshakes with two-flop synchronisers, so they may
// also be unrelated clocks. Mode 0 (SCK idles low, MOSI changes on the falling
// edge, MISO is sampled on the rising edge), MSB first, N-bit words.
//
// Parallel side (pclk_i): di_req_o is high while the one-word holding register is
// empty. Writing with wren_i while di_req_o is high loads di_i into it and gives a
// one-cycle wr_ack_o pulse on the next cycle; a write while di_req_o is low is
// ignored. Every word shifted in is presented on
// do_o together with a one-cycle do_valid_o pulse.
//
// Serial side (sclk_i): the engine takes the held word as soon as it sees it, which
// empties the holding register again, so the next word can be written while the
// current one is shifting. If a word is waiting when the current one ends, it
// follows without releasing spi_ssel_o; otherwise the frame ends: SSEL rises half an
// SCK period after the last falling SCK edge and stays high for at least SSEL_GAP
// half periods. SCK half period = SCK_DIV sclk_i cycles, so one word takes
// 2*N*SCK_DIV sclk_i cycles on the wire.
//
// Clock ratio: a received word stays in rx_word for 2*N*SCK_DIV sclk_i cycles, which
// must cover about four pclk_i cycles for the synchroniser; with both clocks tied
// together this holds for any SCK_DIV >= 1.
//
// Port names are those of the original design's SPI master; its debug-only outputs
// are left out. The word width 16, the SPI mode and the clock divider are this
// design's choices.
module spi_master #(
  parameter int unsigned N        = 16,
  parameter int unsigned SCK_DIV  = 2,
  parameter int unsigned SSEL_GAP = 2
) (
  input  logic         pclk_i,
  input  logic         sclk_i,
  input  logic         rst_i,
  // SPI pins
  output logic         spi_ssel_o,
  output logic         spi_sck_o,
  output logic         spi_mosi_o,
  input  logic         spi_miso_i,
  // parallel interface
  output logic         di_req_o,
  input  logic [N-1:0] di_i,
  input  logic         wren_i,
  output logic         wr_ack_o,
  output logic         do_valid_o,
  output logic [N-1:0] do_o
);

  localparam int unsigned CW = $clog2(SCK_DIV * SSEL_GAP + SCK_DIV + 1) + 1;
  localparam int unsigned BW = $clog2(N) + 1;

  // ---------------------------------------------------------------- pclk side
  logic         hold_full;
  logic [N-1:0] hold_data;
  logic         req_tgl;                  // flips when a word is held
  logic [1:0]   ack_sync;                 // engine's take toggle, synchronised
  logic         ack_seen;
  logic [2:0]   rxt_sync;                 // engine's rx toggle, synchronised + previous
  logic         take_tgl;                 // sclk side
  logic         rx_tgl;                   // sclk side
  logic [N-1:0] rx_word;                  // sclk side, stable between rx toggles

  assign di_req_o = !hold_full;

  always_ff @(posedge pclk_i) begin
    if (rst_i) begin
      hold_full  <= 1'b0;
      hold_data  <= '0;
      req_tgl    <= 1'b0;
      ack_sync   <= '0;
      ack_seen   <= 1'b0;
      rxt_sync   <= '0;
      wr_ack_o   <= 1'b0;
      do_valid_o <= 1'b0;
      do_o       <= '0;
    end else begin
      ack_sync <= {ack_sync[0], take_tgl};
      rxt_sync <= {rxt_sync[1:0], rx_tgl};
      wr_ack_o <= 1'b0;
      do_valid_o <= 1'b0;
      if (ack_sync[1] != ack_seen) begin
        ack_seen  <= ack_sync[1];
        hold_full <= 1'b0;
      end
      if (wren_i && !hold_full) begin
        hold_data <= di_i;
        hold_full <= 1'b1;
        req_tgl   <= ~req_tgl;
        wr_ack_o  <= 1'b1;
      end
      if (rxt_sync[2] != rxt_sync[1]) begin
        do_o       <= rx_word;
        do_valid_o <= 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- sclk side
  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_TAIL, S_GAP} sstate_e;
  sstate_e      st;
  logic [1:0]   req_sync;
  logic         pend;
  logic [CW-1:0] cnt;
  logic [BW-1:0] bitn;
  logic [N-1:0] tx_sh, rx_sh;
  logic         tick;

  assign pend = (req_sync[1] != take_tgl);
  assign tick = (cnt == CW'(SCK_DIV - 1));

  always_ff @(posedge sclk_i) begin
    if (rst_i) begin
      st         <= S_IDLE;
      req_sync   <= '0;
      take_tgl   <= 1'b0;
      rx_tgl     <= 1'b0;
      rx_word    <= '0;
      cnt        <= '0;
      bitn       <= '0;
      tx_sh      <= '0;
      rx_sh      <= '0;
      spi_ssel_o <= 1'b1;
      spi_sck_o  <= 1'b0;
    end else begin
      req_sync <= {req_sync[0], req_tgl};
      case (st)
        S_IDLE: begin
          cnt <= '0;
          if (pend) begin
            tx_sh      <= hold_data;
            take_tgl   <= ~take_tgl;
            bitn       <= '0;
            spi_ssel_o <= 1'b0;
            st         <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          cnt <= tick ? '0 : cnt + 1'b1;
          if (tick) begin
            if (!spi_sck_o) begin
              spi_sck_o <= 1'b1;
              rx_sh     <= {rx_sh[N-2:0], spi_miso_i};
            end else begin
              spi_sck_o <= 1'b0;
              if (bitn == BW'(N - 1)) begin
                rx_word <= rx_sh;
                rx_tgl  <= ~rx_tgl;
                bitn    <= '0;
                if (pend) begin
                  tx_sh    <= hold_data;
                  take_tgl <= ~take_tgl;
                end else begin
                  st <= S_TAIL;
                end
              end else begin
                bitn  <= bitn + 1'b1;
                tx_sh <= {tx_sh[N-2:0], 1'b0};
              end
            end
          end
        end
        S_TAIL: begin
          cnt <= tick ? '0 : cnt + 1'b1;
          if (tick) begin
            spi_ssel_o <= 1'b1;
            st         <= S_GAP;
          end
        end
        default: begin // S_GAP
          cnt <= cnt + 1'b1;
          if (cnt == CW'(SCK_DIV * SSEL_GAP - 1)) st <= S_IDLE;
        end
      endcase
    end
  end

  assign spi_mosi_o = tx_sh[N-1];

  // SCK only toggles inside a frame.
  always_ff @(posedge sclk_i) begin
    if (!rst_i) assert (!(spi_ssel_o && spi_sck_o)) else $error("SCK high while SSEL is inactive");
  end

endmodule
