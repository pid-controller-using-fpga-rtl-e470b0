// tb_daia: self-checking testbench for the AD7303 interface adapter.
//
// Loads random codes into the adapter and decodes the serial frames with a
// behavioural AD7303. Checks that each frame is the 16-bit word
// {control byte, data}, that SYNC is low for exactly 32 clocks, that
// back-to-back loads give one frame every 34 clocks (680 ns, 1.47 MHz),
// and that a load arriving during a frame is sent right after it.
`timescale 1ns / 1ps
module tb_daia;
  import pid_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic [7:0]  data;
  logic        load;
  logic        dac_sync, dac_sclk, dac_din, busy;
  logic [15:0] word;
  int          frames, dac_errors;
  logic [7:0]  code_a;
  real         vout_a;

  int checks = 0, failures = 0;

  daia dut (.*);

  ad7303_model dac (
    .sync_n(dac_sync), .sclk(dac_sclk), .din(dac_din),
    .word(word), .frames(frames), .errors(dac_errors), .code_a(code_a), .vout_a(vout_a)
  );

  always #10 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  longint cyc = 0, sync_fall = -1, last_fall = -1;
  logic   sync_q = 1'b1;
  int     starts = 0, low_len = 0, gaps = 0, pend_used = 0;
  logic   streaming = 1'b0;
  logic [7:0] exp_q [$];

  // In the streaming phase every frame must carry the next queued code.
  always @(frames) begin
    #1;
    if (streaming) begin
      if (exp_q.size() == 0) check(1'b0, "unexpected frame");
      else check(word[7:0] == exp_q.pop_front(), "streamed word in order");
    end
  end

  always @(posedge clk) begin
    cyc++;
    sync_q <= dac_sync;
    if (!rst) begin
      if (!dac_sync && sync_q) begin
        if (last_fall >= 0 && cyc - last_fall == 34) gaps++;
        last_fall = cyc;
        starts++;
        low_len = 0;
      end
      if (!dac_sync) low_len++;
      if (dac_sync && !sync_q)
        check(low_len == 32, $sformatf("SYNC low %0d clocks", low_len));
    end
  end

  task automatic send_and_check(input logic [7:0] d);
    int f0;
    f0 = frames;
    @(negedge clk);
    data = d; load = 1'b1;
    @(negedge clk);
    load = 1'b0; data = 8'($urandom);
    wait (frames == f0 + 1);
    #1;
    check(word == {DAC_CTRL_A, d}, $sformatf("word %04h expected %02h%02h", word, DAC_CTRL_A, d));
    check(code_a == d, "DAC A code");
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // Single loads with idle time between them.
    for (int i = 0; i < 30; i++) begin
      send_and_check(8'($urandom));
      repeat ($urandom_range(0, 20)) @(posedge clk);
    end
    // Back-to-back stream: a new load as soon as the previous frame starts.
    begin
      int f0, s0;
      f0 = frames;
      gaps = 0;
      repeat (2) @(negedge clk);
      streaming = 1'b1;
      for (int i = 0; i < 40; i++) begin
        logic [7:0] d;
        d = 8'($urandom);
        @(negedge clk);
        if (busy) pend_used++;
        s0 = starts;
        data = d; load = 1'b1; exp_q.push_back(d);
        @(negedge clk);
        load = 1'b0;
        wait (starts > s0);   // this code's frame has begun
      end
      wait (frames == f0 + 40);
      #2;
      streaming = 1'b0;
      check(exp_q.size() == 0, "all streamed words received");
      check(gaps >= 38, $sformatf("%0d frames 34 clocks apart", gaps));
      check(pend_used > 0, "load during a frame was queued");
    end
    // Two loads during one frame: only the last is sent.
    begin
      int f0;
      @(negedge clk); data = 8'h11; load = 1'b1;
      @(negedge clk); load = 1'b0;
      f0 = frames;
      repeat (5) @(negedge clk);
      data = 8'h22; load = 1'b1; @(negedge clk); load = 1'b0;
      repeat (5) @(negedge clk);
      data = 8'h33; load = 1'b1; @(negedge clk); load = 1'b0;
      wait (frames == f0 + 1);
      #1;
      check(word[7:0] == 8'h11, "first frame");
      wait (frames == f0 + 2);
      #1;
      check(word[7:0] == 8'h33, "latest pending value wins");
      repeat (40) @(posedge clk);
      check(frames == f0 + 2, "no extra frame");
    end
    check(dac_errors == 0, $sformatf("%0d converter protocol errors", dac_errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
