// tb_ram_u - self-checking test of the dual-clock RAM.
// Writes every entry from a 10 ns write clock, reads them back on an unrelated
// 14 ns read clock and compares with a shadow copy; checks the one-cycle read
// latency (q follows the address of the previous rdclock edge) and that reset
// clears q.
module tb_ram_u;
  localparam int DW = 32, AW = 5;
  logic reset = 1'b1, wrclock = 1'b0, rdclock = 1'b0, wren = 1'b0;
  logic [AW-1:0] wraddress = '0, rdaddress = '0;
  logic [DW-1:0] data = '0, q;
  logic [DW-1:0] shadow [2**AW];
  int checks = 0, failures = 0;

  ram_u #(.DATA_W(DW), .ADDR_W(AW)) dut (.*);

  always #5 wrclock = ~wrclock;
  always #7 rdclock = ~rdclock;

  task automatic check(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge rdclock);
    #1 check(q, '0, "q after reset");
    reset = 1'b0;
    // write all entries
    for (int i = 0; i < 2**AW; i++) begin
      @(posedge wrclock) #1;
      wren = 1'b1; wraddress = AW'(i); data = $urandom; shadow[i] = data;
    end
    @(posedge wrclock) #1 wren = 1'b0;
    // a write with wren low must not change anything
    wraddress = 5'd3; data = ~shadow[3];
    repeat (2) @(posedge wrclock);
    // read back in a scrambled order, one address per rdclock
    for (int i = 0; i < 2**AW; i++) begin
      @(posedge rdclock) #1 rdaddress = AW'((i * 7 + 3) % (2**AW));
      @(posedge rdclock) #1 check(q, shadow[(i * 7 + 3) % (2**AW)], $sformatf("entry %0d", (i*7+3)%(2**AW)));
    end
    // latency: change the address, q must keep the old value until the next edge
    @(posedge rdclock) #1 rdaddress = 5'd10;
    @(posedge rdclock) #1 rdaddress = 5'd11;
    check(q, shadow[10], "latency: entry 10 after one edge");
    @(posedge rdclock) #1 check(q, shadow[11], "latency: entry 11 after next edge");
    // reset clears q
    reset = 1'b1;
    @(posedge rdclock) #1 check(q, '0, "reset clears q");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
