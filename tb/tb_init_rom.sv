// tb_init_rom - self-checking test of the initialisation table.
// Reads every entry and compares with the script written out by hand as 32-bit
// numbers: {kind[1:0], ins_rt, ins_sa, 12'b0, word}. Also checks the one-cycle read
// latency and that q holds while rden is low.
module tb_init_rom;
  logic rdclock = 1'b0, rden = 1'b0;
  logic [4:0] rdaddress = '0;
  logic [31:0] q;
  int checks = 0, failures = 0;

  init_rom dut (.*);

  always #5 rdclock = ~rdclock;

  function automatic logic [31:0] expected(input int a);
    case (a)
      0: return 32'h0000_1001;   // SEND      write cmd, mode register
      1: return 32'h4000_0002;   // SEND_LAST RT mode
      2: return 32'h0000_0001;   // SEND      read cmd, mode register
      3: return 32'h4000_FFFF;   // SEND_LAST dummy
      4: return 32'h8000_0002;   // EXPECT    RT mode
      5: return 32'h0000_1002;   // SEND      write cmd, RT control
      6: return 32'h6000_0001;   // SEND_LAST enable, RT address inserted
      7: return 32'h0000_1003;   // SEND      write cmd, subaddress control
      8: return 32'h5000_0001;   // SEND_LAST enable, subaddress inserted
      default: return 32'hC000_0000; // END
    endcase
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      @(posedge rdclock) #1 rden = 1'b1; rdaddress = 5'(a);
      @(posedge rdclock) #1 rden = 1'b0;
      check(q, expected(a), $sformatf("entry %0d", a));
    end
    // q holds while rden is low
    rdaddress = 5'd0;
    repeat (3) @(posedge rdclock);
    #1 check(q, expected(31), "hold with rden low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
