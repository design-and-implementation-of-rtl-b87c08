// tb_data_exchange - self-checking test of the data exchange.
// The SPI master is replaced by a model with the same parallel interface: a
// one-word holding register (di_req while empty) feeding a shifter that needs
// SHIFT cycles per word and then returns the word XOR 16'hA5A5 on do_o. A send RAM
// model answers tx_ram_addr one cycle later. The test sends frames mixing direct
// and send-RAM words and checks: the words reach the SPI side in order with the
// right contents; every reply is passed through; after a frame's last word no word
// is accepted until all its replies are back; the instruction frame (read command
// for the instruction register) yields instr_valid with the second reply, and a
// read frame for another register does not.
module tb_data_exchange;
  import b1553_pkg::*;
  localparam int SHIFT = 12;
  logic clk = 1'b0, rst = 1'b1;
  logic wr_reqi = 1'b0, wr_last = 1'b0, wr_src_ram = 1'b0, wr_ack;
  logic [15:0] wr_word = '0;
  logic [4:0] wr_ram_addr = '0, tx_ram_addr;
  logic [31:0] tx_ram_q;
  logic rx_valid, instr_valid;
  logic [15:0] rx_word, instr_word;
  logic spi_di_req, spi_wren, spi_do_valid;
  logic [15:0] spi_di, spi_do;
  int checks = 0, failures = 0;

  data_exchange dut (.*);

  always #5 clk = ~clk;

  // send RAM model
  logic [31:0] ram [32];
  always_ff @(posedge clk) tx_ram_q <= ram[tx_ram_addr];

  // SPI master model
  logic hold_full = 1'b0, shifting = 1'b0;
  logic [15:0] hold, sh;
  int cnt = 0;
  logic [15:0] pushed [$];
  int outstanding = 0;
  assign spi_di_req = !hold_full;
  always @(posedge clk) if (rst) spi_do_valid <= 1'b0; else begin
    spi_do_valid <= 1'b0;
    if (spi_wren && !hold_full) begin
      hold <= spi_di; hold_full <= 1'b1; pushed.push_back(spi_di); outstanding++;
    end
    if (shifting) begin
      if (++cnt == SHIFT) begin
        spi_do <= sh ^ 16'hA5A5; spi_do_valid <= 1'b1; outstanding--;
        shifting <= 1'b0;
      end
    end else if (hold_full) begin
      sh <= hold; hold_full <= 1'b0; shifting <= 1'b1; cnt = 0;
    end
  end

  logic [15:0] replies [$];
  always @(posedge clk) if (rx_valid && !rst) replies.push_back(rx_word);
  int instr_seen = 0;
  logic [15:0] instr_got;
  always @(posedge clk) if (instr_valid && !rst) begin instr_seen++; instr_got = instr_word; end

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  int drain_violations = 0;
  logic prev_last = 1'b0;
  // offer one word; wait until it is accepted
  task automatic offer(input logic [15:0] w, input logic last, input logic src_ram,
                       input logic [4:0] a);
    #1 wr_reqi = 1'b1; wr_word = w; wr_last = last; wr_src_ram = src_ram; wr_ram_addr = a;
    @(negedge clk);
    while (!wr_ack) @(negedge clk);
    if (prev_last && outstanding != 0) drain_violations++;
    prev_last = last;
    @(posedge clk);
    #1 wr_reqi = 1'b0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] exp_words [$];
  initial begin
    foreach (ram[i]) ram[i] = {16'hDEAD, 16'(i * 16'h0123 + 7)};
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // frame 1: write command + 3 send-RAM words
    offer(spi_cmd(SPI_OP_WRITE, 12'h400), 1'b0, 1'b0, '0); exp_words.push_back(spi_cmd(SPI_OP_WRITE, 12'h400));
    for (int k = 0; k < 3; k++) begin
      offer(16'h0000, k == 2, 1'b1, 5'(k + 4)); exp_words.push_back(ram[k + 4][15:0]);
    end
    // frame 2: instruction read
    offer(spi_cmd(SPI_OP_READ, ADDR_INSTR), 1'b0, 1'b0, '0); exp_words.push_back(spi_cmd(SPI_OP_READ, ADDR_INSTR));
    offer(SPI_DUMMY, 1'b1, 1'b0, '0); exp_words.push_back(SPI_DUMMY);
    // frame 3: read of another register (no instruction)
    offer(spi_cmd(SPI_OP_READ, ADDR_MBUFF_HEAD), 1'b0, 1'b0, '0); exp_words.push_back(spi_cmd(SPI_OP_READ, ADDR_MBUFF_HEAD));
    offer(SPI_DUMMY, 1'b1, 1'b0, '0); exp_words.push_back(SPI_DUMMY);
    // single-word frame
    offer(16'h1234, 1'b1, 1'b0, '0); exp_words.push_back(16'h1234);
    repeat (SHIFT * 4) @(posedge clk);
    check(16'(pushed.size()), 16'(exp_words.size()), "words pushed");
    foreach (exp_words[i]) begin
      check(pushed[i], exp_words[i], $sformatf("pushed word %0d", i));
      check(replies[i], exp_words[i] ^ 16'hA5A5, $sformatf("reply %0d", i));
    end
    check(16'(drain_violations), '0, "no word accepted before the frame drained");
    check(16'(instr_seen), 16'd1, "one instruction decoded");
    check(instr_got, SPI_DUMMY ^ 16'hA5A5, "instruction word is the second reply of the frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
