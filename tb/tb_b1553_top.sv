// tb_b1553_top - end-to-end test of the two-channel controller at default parameters.
// Each channel talks to its own behavioural 1553B module model; the testbench is
// the host (send/receive RAMs on clk_10m) and the upper computer (instructions
// through the models). Both channels start together, so their initialisations and
// first communications run in parallel.
// Channel 0 loses its first two mode writes (two failed initialisations, then
// success); channel 1 succeeds at once. Then: a full 32-word communication on both
// channels at the same time, head status read and write, an undefined instruction,
// a re-initialisation, and a shutdown. The test counts how often each mechanism
// happened (failed initialisation and retry, multi-word frames, both channels'
// frames overlapping, every instruction code, 32-word transfer, shutdown) and
// counts a failure for any that never did; data are checked in the module models
// and through the receive RAM ports.
module tb_b1553_top;
  import b1553_pkg::*;
  localparam int NCH = 2;
  logic mclk = 1'b0, clk_10m = 1'b0, reset = 1'b1;
  logic [NCH-1:0][4:0] rt_num = {5'd17, 5'd5};
  logic [NCH-1:0][4:0] sa_idx = {5'd30, 5'd1};
  logic [NCH-1:0] spi_cs, spi_sclk, spi_mosi, spi_miso, int_n;
  logic [NCH-1:0] tx_wren = '0;
  logic [NCH-1:0][4:0] tx_waddr = '0, rx_rd_addr = '0;
  logic [NCH-1:0][31:0] tx_wdata = '0, rx_rd_data;
  state_e [NCH-1:0] state_o;
  logic [NCH-1:0] chan_on, rt_succ, busy, xfer_done;
  int xfers [NCH] = '{0, 0};
  logic [NCH-1:0][7:0] init_fails;
  logic [NCH-1:0][3:0] last_instr;
  int checks = 0, failures = 0;

  b1553_top dut (.*);
  b1553_board_model board0 (.spi_cs(spi_cs[0]), .spi_sclk(spi_sclk[0]), .spi_mosi(spi_mosi[0]),
                            .spi_miso(spi_miso[0]), .int_n(int_n[0]));
  b1553_board_model board1 (.spi_cs(spi_cs[1]), .spi_sclk(spi_sclk[1]), .spi_mosi(spi_mosi[1]),
                            .spi_miso(spi_miso[1]), .int_n(int_n[1]));

  always #10 mclk = ~mclk;
  always #50 clk_10m = ~clk_10m;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- mechanism counters ---------------------------------------------
  int overlap_cycles = 0, instr_seen [16];
  always @(posedge mclk) if (!reset) begin
    if (!spi_cs[0] && !spi_cs[1]) overlap_cycles++;
    for (int c = 0; c < NCH; c++) if (xfer_done[c]) xfers[c]++;
  end

  task automatic wait_idle(input int c, input string what);
    int n = 0;
    repeat (10) @(posedge mclk);
    while (!(state_o[c] == ST_IDLE || state_o[c] == ST_OFF) && n < 500000) begin @(posedge mclk); n++; end
    checks++;
    if (n >= 500000) begin failures++; $display("FAIL %s: channel %0d stuck", what, c); end
  endtask

  task automatic post(input int c, input logic [15:0] w);
    instr_seen[w[3:0]]++;
    if (c == 0) board0.post_instr(w); else board1.post_instr(w);
  endtask

  task automatic instruction(input int c, input logic [15:0] w);
    post(c, w);
    wait (!int_n[c]);
    wait (int_n[c]);
    wait_idle(c, $sformatf("instruction %h", w));
  endtask

  task automatic host_write(input int c, input int a, input logic [31:0] d);
    @(posedge clk_10m) #1 tx_wren[c] = 1'b1; tx_waddr[c] = 5'(a); tx_wdata[c] = d;
    @(posedge clk_10m) #1 tx_wren[c] = 1'b0;
  endtask

  task automatic host_read(input int c, input int a, output logic [31:0] d);
    @(posedge clk_10m) #1 rx_rd_addr[c] = 5'(a);
    @(posedge clk_10m) #1 d = rx_rd_data[c];
  endtask

  function automatic logic [15:0] bmem(input int c, input logic [11:0] a);
    return (c == 0) ? board0.mem[a] : board1.mem[a];
  endfunction

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] tx [NCH][32];
  logic [31:0] d;
  logic [11:0] txa, rxa;
  initial begin
    foreach (instr_seen[i]) instr_seen[i] = 0;
    board0.fail_mode_writes = 2;
    repeat (4) @(posedge clk_10m);
    #1 reset = 1'b0;
    for (int c = 0; c < NCH; c++)
      for (int i = 0; i < 32; i++) begin tx[c][i] = $urandom; host_write(c, i, tx[c][i]); end
    for (int c = 0; c < NCH; c++) wait_idle(c, "initialisation");
    check(32'(init_fails[0]), 2, "channel 0: two failed initialisations");
    check(32'(init_fails[1]), 0, "channel 1: no failed initialisation");
    for (int c = 0; c < NCH; c++) begin
      check(32'(chan_on[c]), 1, $sformatf("channel %0d on", c));
      check(32'(bmem(c, ADDR_MODE)), 32'(MODE_RT), $sformatf("channel %0d RT mode", c));
      check(32'(bmem(c, ADDR_RT_CTRL)), 32'({rt_num[c], 11'h001}), $sformatf("channel %0d RT address", c));
      check(32'(bmem(c, ADDR_SA_CTRL)), 32'({6'h0, sa_idx[c], 5'h01}), $sformatf("channel %0d subaddress", c));
    end

    // 32-word communication on both channels at once
    for (int c = 0; c < NCH; c++) begin
      rxa = ADDR_SA_RX | {2'b0, sa_idx[c], 5'b0};
      for (int i = 0; i < 32; i++)
        if (c == 0) board0.mem[rxa + 12'(i)] = 16'(i * 16'h0301 + 1);
        else        board1.mem[rxa + 12'(i)] = 16'(i * 16'h0507 + 2);
    end
    post(0, 16'h0002); post(1, 16'h0002);
    wait (int_n == 2'b11);
    for (int c = 0; c < NCH; c++) wait_idle(c, "communication");
    for (int c = 0; c < NCH; c++) begin
      txa = ADDR_SA_TX | {2'b0, sa_idx[c], 5'b0};
      rxa = ADDR_SA_RX | {2'b0, sa_idx[c], 5'b0};
      for (int i = 0; i < 32; i++)
        check(32'(bmem(c, txa + 12'(i))), 32'(tx[c][i][15:0]), $sformatf("ch %0d transmit word %0d", c, i));
      for (int i = 0; i < 32; i++) begin
        host_read(c, i, d);
        check(d, {4'h0, rxa + 12'(i), (c == 0) ? 16'(i * 16'h0301 + 1) : 16'(i * 16'h0507 + 2)},
              $sformatf("ch %0d receive RAM %0d", c, i));
      end
    end
    check(32'(board0.max_words >= 33), 1, "33-word frames (command + 32 words)");

    // head status on channel 1, undefined and re-init on channel 0
    board1.mem[ADDR_MBUFF_HEAD] = 16'h1553;
    instruction(1, 16'h0000);
    host_read(1, 0, d);
    check(d, {4'h0, ADDR_MBUFF_HEAD, 16'h1553}, "ch 1 head status read");
    instruction(1, 16'h0001);
    check(32'(bmem(1, ADDR_MBUFF_HEAD)), 32'(tx[1][0][15:0]), "ch 1 head status written");
    instruction(0, 16'h0007);
    check(32'(last_instr[0]), 7, "ch 0 undefined instruction seen");
    check(32'(state_o[0]), 32'(ST_IDLE), "ch 0 idle after undefined instruction");
    instruction(0, 16'h0003);
    check(32'(board0.mode_writes), 4, "ch 0 re-initialised (4 attempts in all)");
    check(32'(chan_on[0]), 1, "ch 0 on after re-initialisation");
    // shutdown of both
    instruction(0, 16'h000F);
    instruction(1, 16'h000F);
    for (int c = 0; c < NCH; c++) begin
      check(32'(state_o[c]), 32'(ST_OFF), $sformatf("ch %0d off", c));
      check(32'(bmem(c, ADDR_RT_CTRL)), 0, $sformatf("ch %0d RT disabled", c));
    end

    // ch 0: polls for 2, 7, 3, F (4) + communication (2) + close (1)
    // ch 1: polls for 2, 0, 1, F (4) + communication (2) + head read, head write, close (3)
    check(32'(xfers[0]), 7, "ch 0 operations finished");
    check(32'(xfers[1]), 9, "ch 1 operations finished");
    // every mechanism must have happened
    $display("mechanisms: init_fail=%0d overlap_cycles=%0d max_frame=%0d instr0=%0d instr1=%0d instr2=%0d instr3=%0d instrF=%0d undefined=%0d",
             init_fails[0], overlap_cycles, board0.max_words, instr_seen[0], instr_seen[1],
             instr_seen[2], instr_seen[3], instr_seen[15], instr_seen[7]);
    check(32'(init_fails[0] > 0), 1, "mechanism: failed initialisation and retry");
    check(32'(overlap_cycles > 0), 1, "mechanism: channels working in parallel");
    check(32'(board0.max_words > 1), 1, "mechanism: multi-word frames");
    foreach (instr_seen[i])
      if (i inside {0, 1, 2, 3, 7, 15}) check(32'(instr_seen[i] > 0), 1, $sformatf("mechanism: instruction %0h", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
