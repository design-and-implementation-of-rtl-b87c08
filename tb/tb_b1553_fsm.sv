// tb_b1553_fsm - self-checking test of the channel task state machine.
// The initialisation/control block and the data exchange are replaced by a model
// that records every request, answers rt_init with rt_over after a delay (failing
// the first FAILS attempts), answers an instruction-register read with instr_valid
// and releases int_n, and answers other reads with a word pattern on rd_word.
// Checks: the reset wait is exactly RST_WAIT cycles; failed initialisations are
// retried and counted; every instruction (0, 1, 2 with a word count, 2 with count 0
// meaning 32, an undefined code, 3, F) produces exactly the expected operations;
// read data lands in the receive RAM port with the right addresses and contents;
// after F the channel is off and ignores further interrupts.
module tb_b1553_fsm;
  import b1553_pkg::*;
  localparam int RST_WAIT = 40, FAILS = 2;
  logic mclk = 1'b0, reset = 1'b1, int_n = 1'b1;
  logic [4:0] sa_idx = 5'd6;
  logic instr_valid = 1'b0;
  logic [15:0] instr_word = '0;
  logic rt_init, rt_req, rt_over = 1'b0, rt_succ = 1'b0, rd_valid = 1'b0;
  rt_op_e rt_opcode;
  logic [11:0] start_addr;
  logic [5:0] data_length;
  logic [15:0] rd_word = '0;
  logic rx_wren;
  logic [4:0] rx_waddr;
  logic [31:0] rx_wdata;
  state_e state_o;
  logic chan_on;
  logic [7:0] init_fails;
  logic [3:0] last_instr;
  int checks = 0, failures = 0;

  b1553_fsm #(.RST_WAIT(RST_WAIT)) dut (.*);

  always #5 mclk = ~mclk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- model of the blocks around the state machine --------------------
  typedef struct { rt_op_e op; logic [11:0] addr; logic [5:0] len; } req_t;
  req_t reqs [$];
  int inits = 0, fails_left = FAILS, cyc = 0, first_init_cyc = -1;
  logic [15:0] pending_instr = '0;
  logic [31:0] rxmem [32];
  int rx_writes = 0;

  always @(posedge mclk) if (!reset) begin
    cyc++;
    if (rx_wren) begin rxmem[rx_waddr] = rx_wdata; rx_writes++; end
  end

  initial begin
    forever begin
      @(posedge mclk);
      if (!reset && rt_init) begin
        inits++;
        if (first_init_cyc < 0) first_init_cyc = cyc;
        repeat (20) @(posedge mclk);
        #1 rt_over = 1'b1; rt_succ = (fails_left == 0);
        if (fails_left > 0) fails_left--;
        @(posedge mclk) #1 rt_over = 1'b0;
      end else if (!reset && rt_req) begin
        req_t r;
        r.op = rt_opcode; r.addr = start_addr; r.len = data_length;
        reqs.push_back(r);
        if (r.op == RT_OP_READ && r.addr == ADDR_INSTR) begin
          repeat (5) @(posedge mclk);
          #1 int_n = 1'b1; instr_valid = 1'b1; instr_word = pending_instr;
          @(posedge mclk) #1 instr_valid = 1'b0;
        end else if (r.op == RT_OP_READ) begin
          for (int i = 0; i < r.len; i++) begin
            repeat (3) @(posedge mclk);
            #1 rd_valid = 1'b1; rd_word = r.addr[15:0] ^ 16'(i * 16'h0101);
            @(posedge mclk) #1 rd_valid = 1'b0;
          end
        end else repeat (5) @(posedge mclk);
        repeat (2) @(posedge mclk);
        #1 rt_over = 1'b1;
        @(posedge mclk) #1 rt_over = 1'b0;
      end
    end
  end

  task automatic instruction(input logic [15:0] w);
    pending_instr = w;
    reqs.delete();
    rx_writes = 0;
    #1 int_n = 1'b0;
    // let it finish
    repeat (400) @(posedge mclk);
  endtask

  task automatic check_req(input int i, input rt_op_e op, input logic [11:0] a,
                           input logic [5:0] n, input string what);
    if (i >= reqs.size()) begin checks++; failures++; $display("FAIL %s: missing", what); return; end
    check(32'(reqs[i].op), 32'(op), {what, " opcode"});
    check(32'(reqs[i].addr), 32'(a), {what, " address"});
    check(32'(reqs[i].len), 32'(n), {what, " length"});
  endtask

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge mclk);
    #1 reset = 1'b0;
    repeat (RST_WAIT + 200) @(posedge mclk);
    // RST_WAIT cycles of waiting, one cycle in ST_INIT: rt_init is high in cycle RST_WAIT+1
    check(32'(first_init_cyc), 32'(RST_WAIT + 1), "reset wait length");
    check(32'(inits), 32'(FAILS + 1), "init attempts");
    check(32'(init_fails), 32'(FAILS), "init failures counted");
    check(32'(chan_on), 1, "channel on");
    check(32'(state_o), 32'(ST_IDLE), "idle");

    instruction(16'h0000);                                      // read head status
    check(32'(reqs.size()), 2, "instr 0: two operations");
    check_req(0, RT_OP_READ, ADDR_INSTR, 6'd1, "instr 0 poll");
    check_req(1, RT_OP_READ, ADDR_MBUFF_HEAD, 6'd1, "instr 0 read");
    check(32'(rx_writes), 1, "instr 0: one RAM write");
    check(rxmem[0], {4'h0, ADDR_MBUFF_HEAD, 16'(ADDR_MBUFF_HEAD)}, "instr 0: RAM entry 0");
    check(32'(last_instr), 0, "instr 0: last_instr");

    instruction(16'h0001);                                      // write head status
    check(32'(reqs.size()), 2, "instr 1: two operations");
    check_req(1, RT_OP_WRITE, ADDR_MBUFF_HEAD, 6'd1, "instr 1 write");

    instruction(16'h0072);                                      // 7-word communication
    check(32'(reqs.size()), 3, "instr 2: three operations");
    check_req(1, RT_OP_WRITE, 12'h400 | {2'b0, sa_idx, 5'b0}, 6'd7, "instr 2 write");
    check_req(2, RT_OP_READ, 12'h800 | {2'b0, sa_idx, 5'b0}, 6'd7, "instr 2 read");
    check(32'(rx_writes), 7, "instr 2: seven RAM writes");
    for (int i = 0; i < 7; i++) begin
      logic [11:0] a;
      a = (12'h800 | {2'b0, sa_idx, 5'b0});
      check(rxmem[i], {4'h0, a + 12'(i), 16'(a) ^ 16'(i * 16'h0101)}, $sformatf("instr 2: RAM entry %0d", i));
    end

    instruction(16'h0002);                                      // count 0 = 32 words
    check_req(1, RT_OP_WRITE, 12'h400 | {2'b0, sa_idx, 5'b0}, 6'd32, "instr 2/32 write");
    repeat (400) @(posedge mclk);
    check(32'(rx_writes), 32, "instr 2/32: 32 RAM writes");

    instruction(16'h0005);                                      // undefined
    check(32'(reqs.size()), 1, "undefined: only the poll");
    check(32'(state_o), 32'(ST_IDLE), "undefined: idle");

    instruction(16'h0003);                                      // re-initialise
    check(32'(inits), 32'(FAILS + 2), "instr 3: initialised again");
    check(32'(chan_on), 1, "instr 3: channel on");

    instruction(16'h000F);                                      // off
    check(32'(reqs.size()), 2, "instr F: two operations");
    check_req(1, RT_OP_CLOSE, ADDR_INSTR, 6'd1, "instr F close");
    check(32'(state_o), 32'(ST_OFF), "instr F: off");
    check(32'(chan_on), 0, "instr F: channel off");
    instruction(16'h0000);
    check(32'(reqs.size()), 0, "off: interrupts ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
