// tb_spi_master - self-checking test of the SPI master.
// The parallel side runs on a 10 ns clock, the serial engine on an unrelated 6 ns
// clock. A small mode-0 slave in the testbench records every MOSI word and answers
// with words from a reply list. Frames of 1, 3 and 5 words are sent, writing each
// next word as soon as di_req_o asks for it; the test checks the words on both
// wires, the do_o words, that a frame keeps SSEL low across its words and releases
// it after, the SCK edge count, the SCK half period (SCK_DIV serial clocks) and
// the SSEL high time between frames.
module tb_spi_master;
  localparam int N = 16, SCK_DIV = 3, SSEL_GAP = 2;
  localparam realtime TS = 6.0;
  logic pclk = 1'b0, sclk = 1'b0, rst = 1'b1;
  logic ssel, sck, mosi, miso;
  logic di_req, wren = 1'b0, wr_ack, do_valid;
  logic [N-1:0] di = '0, dout;
  int checks = 0, failures = 0;

  spi_master #(.N(N), .SCK_DIV(SCK_DIV), .SSEL_GAP(SSEL_GAP)) dut (
    .pclk_i(pclk), .sclk_i(sclk), .rst_i(rst),
    .spi_ssel_o(ssel), .spi_sck_o(sck), .spi_mosi_o(mosi), .spi_miso_i(miso),
    .di_req_o(di_req), .di_i(di), .wren_i(wren), .wr_ack_o(wr_ack),
    .do_valid_o(do_valid), .do_o(dout));

  always #5 pclk = ~pclk;
  always #3 sclk = ~sclk;

  task automatic check(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- slave model -----------------------------------------------
  logic [N-1:0] replies [$];
  logic [N-1:0] mosi_words [$];
  logic [N-1:0] in_sh, out_sh;
  int bitc = 0, frames = 0, sck_rises = 0, words_in_frame = 0;
  int frame_words [$];
  realtime last_edge = 0, ssel_rise = 0;
  int bad_half = 0, bad_gap = 0;

  int gidx = 0;   // index of the word being shifted, over all frames
  always @(negedge ssel) if (!rst) begin
    bitc = 0; words_in_frame = 0; last_edge = 0;
    out_sh = replies[gidx];
    miso = out_sh[N-1];
    if (frames > 0 && ($realtime - ssel_rise) < SSEL_GAP * SCK_DIV * TS - 0.1) bad_gap++;
  end
  always @(posedge ssel) if (!rst) begin
    frames++;
    frame_words.push_back(words_in_frame);
    ssel_rise = $realtime;
  end
  always @(posedge sck) begin
    if (!ssel) begin
      sck_rises++;
      in_sh = {in_sh[N-2:0], mosi};
      if (++bitc == N) begin
        bitc = 0;
        mosi_words.push_back(in_sh);
        words_in_frame++;
        gidx++;
      end
    end
  end
  always @(sck) begin
    if (!ssel && last_edge != 0 && ($realtime - last_edge) != SCK_DIV * TS) bad_half++;
    last_edge = $realtime;
  end
  always @(negedge sck) if (!ssel) begin
    if (bitc == 0) out_sh = replies[gidx];
    else out_sh = {out_sh[N-2:0], 1'b0};
    miso = out_sh[N-1];
  end
  initial miso = 1'b0;

  // ---------------- collect do_o --------------------------------------------------
  logic [N-1:0] got_words [$];
  always @(posedge pclk) if (do_valid) got_words.push_back(dout);

  task automatic send_frame(input int n, input int base);
    for (int k = 0; k < n; k++) begin
      while (!di_req) @(posedge pclk);
      #1 wren = 1'b1; di = N'(base + k * 16'h1111);
      @(posedge pclk); #1 wren = 1'b0;
      checks++;
      if (!wr_ack) begin failures++; $display("FAIL no wr_ack"); end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sizes [3] = '{1, 3, 5};
  int total;
  initial begin
    total = 0;
    for (int i = 0; i < 10; i++) replies.push_back(N'($urandom));
    begin
      logic [N-1:0] exp_rx [$];
      exp_rx = replies;
      repeat (4) @(posedge pclk);
      #1 rst = 1'b0;
      check(ssel, 1'b1, "ssel idle high");
      foreach (sizes[f]) begin
        send_frame(sizes[f], 16'h0101 * (f + 1));
        total += sizes[f];
        // wait for the whole frame to come back
        while (got_words.size() < total) @(posedge pclk);
        repeat (SCK_DIV * 4 * 2) @(posedge pclk);
      end
      repeat (20) @(posedge pclk);
      // checks
      check(N'(frames), N'(3), "frame count");
      foreach (sizes[f]) check(N'(frame_words[f]), N'(sizes[f]), $sformatf("words in frame %0d", f));
      check(N'(sck_rises), N'(N * total), "SCK rising edges");
      check(N'(bad_half), '0, "SCK half periods of SCK_DIV serial clocks");
      check(N'(bad_gap), '0, "SSEL high time between frames");
      begin
        int idx = 0;
        foreach (sizes[f])
          for (int k = 0; k < sizes[f]; k++) begin
            check(mosi_words[idx], N'(16'h0101 * (f + 1) + k * 16'h1111), $sformatf("MOSI word %0d", idx));
            check(got_words[idx], exp_rx[idx], $sformatf("MISO word %0d", idx));
            idx++;
          end
      end
      check(ssel, 1'b1, "ssel high at end");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
