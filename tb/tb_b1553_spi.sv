// tb_b1553_spi - self-checking test of one channel against the module model.
// A channel (RST_WAIT shortened to 200 cycles) talks over SPI to the behavioural
// 1553B module model. The testbench plays the host (send/receive RAM ports on a
// 10 MHz clock) and the upper computer (instructions through the model).
// Checks: one lost mode write gives one failed initialisation and a retry; the
// module ends up in RT mode with the right RT address and subaddress; instruction
// 2 copies the send RAM into the subaddress transmit buffer and the receive buffer
// into the receive RAM; 0 and 1 read and write the head status; F closes the RT.
module tb_b1553_spi;
  import b1553_pkg::*;
  logic mclk = 1'b0, clk_10m = 1'b0, reset = 1'b1;
  logic [4:0] rt_num = 5'd9, sa_idx = 5'd3;
  logic spi_cs, spi_sclk, spi_mosi, spi_miso, int_n;
  logic tx_wren = 1'b0;
  logic [4:0] tx_waddr = '0, rx_rd_addr = '0;
  logic [31:0] tx_wdata = '0, rx_rd_data;
  state_e state_o;
  logic chan_on, rt_succ, busy, xfer_done;
  int xfers = 0;
  always @(posedge mclk) if (!reset && xfer_done) xfers++;
  logic [7:0] init_fails;
  logic [3:0] last_instr;
  int checks = 0, failures = 0;

  b1553_spi #(.RST_WAIT(200)) dut (.*);
  b1553_board_model board (.spi_cs, .spi_sclk, .spi_mosi, .spi_miso, .int_n);

  always #10 mclk = ~mclk;        // 50 MHz
  always #50 clk_10m = ~clk_10m;  // 10 MHz

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic host_write(input int a, input logic [31:0] d);
    @(posedge clk_10m) #1 tx_wren = 1'b1; tx_waddr = 5'(a); tx_wdata = d;
    @(posedge clk_10m) #1 tx_wren = 1'b0;
  endtask

  task automatic host_read(input int a, output logic [31:0] d);
    @(posedge clk_10m) #1 rx_rd_addr = 5'(a);
    @(posedge clk_10m) #1 d = rx_rd_data;
  endtask

  task automatic wait_idle(input string what);
    int n = 0;
    repeat (10) @(posedge mclk);
    while (!(state_o == ST_IDLE || state_o == ST_OFF) && n < 200000) begin @(posedge mclk); n++; end
    checks++;
    if (n >= 200000) begin failures++; $display("FAIL %s: channel did not return to idle", what); end
  endtask

  task automatic instruction(input logic [15:0] w);
    board.post_instr(w);
    wait (!int_n);
    wait (int_n);
    wait_idle($sformatf("instruction %h", w));
  endtask

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] tx [32];
  logic [31:0] d;
  logic [11:0] txa, rxa;
  initial begin
    board.fail_mode_writes = 1;
    txa = ADDR_SA_TX | {2'b0, sa_idx, 5'b0};
    rxa = ADDR_SA_RX | {2'b0, sa_idx, 5'b0};
    repeat (4) @(posedge clk_10m);
    #1 reset = 1'b0;
    foreach (tx[i]) begin tx[i] = $urandom; host_write(i, tx[i]); end
    wait_idle("initialisation");
    check(32'(init_fails), 1, "one failed initialisation");
    check(32'(rt_succ), 1, "rt_succ");
    check(32'(chan_on), 1, "channel on");
    check(32'(board.mem[ADDR_MODE]), 32'(MODE_RT), "module in RT mode");
    check(32'(board.mem[ADDR_RT_CTRL]), 32'({rt_num, 11'h001}), "RT address and enable");
    check(32'(board.mem[ADDR_SA_CTRL]), 32'({6'h0, sa_idx, 5'h01}), "subaddress enable");

    // communication of 6 words
    for (int i = 0; i < 6; i++) board.mem[rxa + 12'(i)] = 16'(16'h5A00 + i);
    instruction(16'h0062);
    for (int i = 0; i < 6; i++) check(32'(board.mem[txa + 12'(i)]), 32'(tx[i][15:0]), $sformatf("transmit buffer word %0d", i));
    check(32'(board.mem[txa + 12'd6]), 0, "transmit buffer word 6 untouched");
    for (int i = 0; i < 6; i++) begin
      host_read(i, d);
      check(d, {4'h0, rxa + 12'(i), 16'(16'h5A00 + i)}, $sformatf("receive RAM entry %0d", i));
    end
    check(32'(board.max_words), 7, "longest frame: command + 6 words");

    // head status read and write
    board.mem[ADDR_MBUFF_HEAD] = 16'hBEEF;
    instruction(16'h0000);
    host_read(0, d);
    check(d, {4'h0, ADDR_MBUFF_HEAD, 16'hBEEF}, "head status read");
    instruction(16'h0001);
    check(32'(board.mem[ADDR_MBUFF_HEAD]), 32'(tx[0][15:0]), "head status written");
    check(32'(last_instr), 1, "last instruction");

    // shut down
    instruction(16'h000F);
    check(32'(state_o), 32'(ST_OFF), "off");
    check(32'(board.mem[ADDR_RT_CTRL]), 0, "RT disabled");
    check(32'(board.instr_reads), 4, "four instructions read");
    // operations: 4 polls, 2 for the communication, 1 each for head read/write and close
    check(32'(xfers), 9, "operations finished");
    check(32'(busy), 0, "not busy at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
