// tb_b1553_init - self-checking test of the initialisation/control block.
// Uses the real initialisation table. The data exchange and the module are
// replaced by a word-level model: it accepts words (with random stalls), treats
// the first word after a frame end as a command, stores written words in a
// register space, returns read words from it, answers commands with STATUS, and
// returns each reply DELAY cycles after the word (in order). Send-RAM words are
// taken from a testbench array.
// Checks: a successful initialisation writes RT mode, the RT control word with
// rt_num in bits 15:11 and the subaddress word with sa_idx in bits 9:5, in four
// frames, and sets rt_succ; a lost mode write makes the check fail, stops the
// script before the RT is enabled and leaves rt_succ low; READ returns the stored
// words on rd_word with rd_over; WRITE stores the send-RAM words with wr_over;
// CLOSE clears the RT control register.
module tb_b1553_init;
  import b1553_pkg::*;
  localparam int DELAY = 9;
  localparam logic [15:0] STATUS = 16'h8C00;
  logic mclk = 1'b0, reset = 1'b1;
  logic [4:0] rt_num = 5'd21, sa_idx = 5'd13;
  logic rt_init = 1'b0, rt_req = 1'b0;
  rt_op_e rt_opcode = RT_OP_READ;
  logic [11:0] start_addr = '0;
  logic [5:0] data_length = '0;
  logic busy, rt_over, rt_succ, rd_valid, rd_over, wr_over;
  logic [15:0] rd_word;
  logic rt_prom_rden;
  logic [4:0] rt_prom_addr;
  logic [31:0] rt_prom_data;
  logic wr_reqi, wr_last, wr_src_ram, wr_ack, rx_valid;
  logic [15:0] wr_word, rx_word;
  logic [4:0] wr_ram_addr;
  int checks = 0, failures = 0;

  b1553_init dut (.*);
  init_rom rom (.rdclock(mclk), .rden(rt_prom_rden), .rdaddress(rt_prom_addr), .q(rt_prom_data));

  always #5 mclk = ~mclk;

  // ---------------- word-level module model -------------------------------------
  logic [15:0] regs [4096];
  logic [15:0] txram [32];
  logic stall;
  int lose_mode_writes = 0, frames = 0;
  logic first = 1'b1;
  logic [3:0] op;
  logic [11:0] addr;
  logic [15:0] rq_word [$];
  int rq_time [$];
  int cyc = 0;

  assign wr_ack = wr_reqi && !stall;
  always @(posedge mclk) begin
    cyc++;
    stall <= ($urandom % 4) == 0;
    rx_valid <= 1'b0;
    if (!reset && wr_reqi && wr_ack) begin
      logic [15:0] w, r;
      w = wr_src_ram ? txram[wr_ram_addr] : wr_word;
      if (first) begin
        op = w[15:12]; addr = w[11:0]; r = STATUS;
      end else if (op == SPI_OP_WRITE) begin
        if (addr == ADDR_MODE && lose_mode_writes > 0) lose_mode_writes--;
        else regs[addr] = w;
        addr++; r = 16'h0000;
      end else begin
        r = regs[addr]; addr++;
      end
      first = wr_last;
      if (wr_last) frames++;
      rq_word.push_back(r); rq_time.push_back(cyc + DELAY);
    end
    if (rq_time.size() && rq_time[0] <= cyc) begin
      void'(rq_time.pop_front());
      rx_word <= rq_word.pop_front();
      rx_valid <= 1'b1;
    end
  end

  logic [15:0] rd_got [$];
  int rd_overs = 0, wr_overs = 0;
  always @(posedge mclk) if (!reset) begin
    if (rd_valid) rd_got.push_back(rd_word);
    if (rd_over) rd_overs++;
    if (wr_over) wr_overs++;
  end

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic wait_over();
    int n = 0;
    while (!rt_over && n < 5000) begin @(posedge mclk); n++; end
    checks++;
    if (!rt_over) begin failures++; $display("FAIL rt_over never came"); end
    @(posedge mclk);
  endtask

  task automatic do_init();
    @(posedge mclk) #1 rt_init = 1'b1;
    @(posedge mclk) #1 rt_init = 1'b0;
    wait_over();
  endtask

  task automatic do_op(input rt_op_e o, input logic [11:0] a, input logic [5:0] n);
    @(posedge mclk) #1 rt_req = 1'b1; rt_opcode = o; start_addr = a; data_length = n;
    @(posedge mclk) #1 rt_req = 1'b0;
    wait_over();
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (regs[i]) regs[i] = 16'h0000;
    foreach (txram[i]) txram[i] = 16'($urandom);
    rx_valid = 1'b0; rx_word = '0; stall = 1'b0;
    repeat (3) @(posedge mclk);
    #1 reset = 1'b0;
    // ---- failed initialisation: the mode write is lost
    lose_mode_writes = 1;
    do_init();
    check(rt_succ, 1'b0, "failed init: rt_succ low");
    check(regs[ADDR_RT_CTRL], 16'h0000, "failed init: RT not enabled");
    check(16'(frames), 16'd2, "failed init: stopped after the read-back frame");
    // ---- successful initialisation
    frames = 0;
    do_init();
    check(rt_succ, 1'b1, "init: rt_succ");
    check(regs[ADDR_MODE], MODE_RT, "init: RT mode written");
    check(regs[ADDR_RT_CTRL], {rt_num, 11'h001}, "init: RT control word");
    check(regs[ADDR_SA_CTRL], {6'h00, sa_idx, 5'h01}, "init: subaddress word");
    check(16'(frames), 16'd4, "init: four frames");
    // ---- read 5 words
    for (int i = 0; i < 5; i++) regs[12'h830 + i] = 16'(16'hC000 + i * 3);
    do_op(RT_OP_READ, 12'h830, 6'd5);
    check(16'(rd_got.size()), 16'd5, "read: word count");
    for (int i = 0; i < 5; i++) check(rd_got[i], 16'(16'hC000 + i * 3), $sformatf("read word %0d", i));
    check(16'(rd_overs), 16'd1, "read: rd_over");
    // ---- write 32 words from the send RAM
    do_op(RT_OP_WRITE, 12'h440, 6'd32);
    for (int i = 0; i < 32; i++) check(regs[12'h440 + i], txram[i], $sformatf("write word %0d", i));
    check(16'(wr_overs), 16'd1, "write: wr_over");
    check(16'(rd_got.size()), 16'd5, "write: no read data");
    // ---- close the channel
    do_op(RT_OP_CLOSE, 12'h000, 6'd1);
    check(regs[ADDR_RT_CTRL], 16'h0000, "close: RT disabled");
    check(16'(wr_overs), 16'd2, "close: wr_over");
    check(busy, 1'b0, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
