// Self-checking testbench for silizium_renderer_rect: feeds fill-rectangle parameter sets (X, Y, width, height, color), some partly off-screen or empty, through a modelled command FIFO with gaps, holds fbIsReady low at random and checks every pixel write against the row-by-row address sequence (X+cx + W*(Y+cy))*4, that busy rises the cycle after start, five FIFO reads per command, and one pixel per cycle while fbIsReady is 1.
module tb_silizium_renderer_rect;
  localparam int FBW = 20, BPP = 4;

  logic clock = 0, reset = 1, start = 0, dataInReady = 0, fbIsReady = 1;
  logic [31:0] dataIn = '0;
  logic readAck, busy, fbiBusWrite, fbiCmdWrite;
  logic [31:0] fbiBusAddr, fbiBusData;
  logic [63:0] fbiCmdData;

  silizium_renderer_rect #(.FB_WIDTH(FBW), .FB_BYTES_PER_PIXEL(BPP)) dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // command FIFO model: parameters become visible with random gaps
  logic [31:0] fifo[$];
  logic [31:0] pending[$];
  int acks = 0;
  bit ready_random = 0;

  // expected framebuffer-interface traffic
  typedef struct { bit is_cmd; logic [63:0] word; } fbi_t;
  fbi_t expq[$];
  int writes = 0, stall_cycles = 0, busy_cycles = 0;

  always @(posedge clock) if (!reset) begin
    if (readAck) begin
      check(dataInReady, "readAck only with dataInReady");
      void'(fifo.pop_front());
      acks++;
    end
    if (fbiBusWrite || fbiCmdWrite) begin
      fbi_t e;
      check(fbIsReady, "write only while fbIsReady");
      check(!(fbiBusWrite && fbiCmdWrite), "not both strobes");
      writes++;
      if (expq.size() == 0) check(0, "unexpected FBI write");
      else begin
        e = expq.pop_front();
        if (e.is_cmd) check(fbiCmdWrite && fbiCmdData == e.word,
                            $sformatf("cmd %h expected %h", fbiCmdData, e.word));
        else check(fbiBusWrite && {fbiBusData, fbiBusAddr} == e.word,
                   $sformatf("pixel %h/%h expected %h", fbiBusData, fbiBusAddr, e.word));
      end
    end
    if (busy && !fbIsReady) stall_cycles++;
    if (busy) busy_cycles++;
    if (pending.size() > 0 && $urandom_range(0, 3) != 0) fifo.push_back(pending.pop_front());
    if (ready_random) fbIsReady <= ($urandom_range(0, 3) != 0);
    else fbIsReady <= 1'b1;
  end

  always @(negedge clock) begin
    dataInReady = (fifo.size() > 0);
    dataIn      = (fifo.size() > 0) ? fifo[0] : 32'hDEAD_BEEF;
  end

  task automatic exp_pixel(input int x, input int y, input logic [31:0] c);
    fbi_t e;
    e.is_cmd = 0;
    e.word = {c, 32'((x + FBW * y) * BPP)};
    expq.push_back(e);
  endtask
  task automatic exp_cmd(input logic [63:0] w);
    fbi_t e;
    e.is_cmd = 1;
    e.word = w;
    expq.push_back(e);
  endtask

  // Issue one command: start pulse, then wait for busy to drop.
  task automatic run(input int nparams);
    int acks0 = acks, t = 0;
    @(negedge clock);
    start = 1;
    @(negedge clock);
    start = 0;
    check(busy, "busy the cycle after start");
    while (busy && t < 10000) begin @(negedge clock); t++; end
    check(t < 10000, "renderer finished");
    check(acks - acks0 == nparams, $sformatf("%0d FIFO reads, expected %0d", acks - acks0, nparams));
    check(expq.size() == 0, "all expected FBI writes seen");
  endtask

  initial begin
    repeat (300000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clock);
    reset = 0;
    check(!busy, "idle after reset");
    run_tests();
    $display("writes=%0d stall_cycles=%0d", writes, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int run_writes, max_run = 0;
  logic prev_write = 0;
  always @(posedge clock) if (!reset) begin
    if (fbiBusWrite) begin
      run_writes = prev_write ? run_writes + 1 : 1;
      if (run_writes > max_run) max_run = run_writes;
    end
    prev_write <= fbiBusWrite;
  end

  task automatic run_tests();
    int x, y, w, h;
    logic [31:0] c;
    // FBI always ready: one pixel per cycle
    pending.push_back(2); pending.push_back(1); pending.push_back(6);
    pending.push_back(3); pending.push_back(32'h0000_FF00);
    for (int r = 0; r < 3; r++) for (int q = 0; q < 6; q++) exp_pixel(2 + q, 1 + r, 32'h0000_FF00);
    run(5);
    check(max_run == 18, $sformatf("longest run of back-to-back pixels %0d, expected 18", max_run));
    ready_random = 1;
    for (int i = 0; i < 60; i++) begin
      x = $urandom_range(0, 25) - 5;
      y = $urandom_range(0, 12) - 2;
      w = (i % 10 == 3) ? 0 : $urandom_range(1, 9);
      h = (i % 10 == 7) ? 0 : $urandom_range(1, 6);
      c = $urandom;
      pending.push_back(32'(x)); pending.push_back(32'(y));
      pending.push_back(32'(w)); pending.push_back(32'(h)); pending.push_back(c);
      for (int r = 0; r < h; r++) for (int q = 0; q < w; q++) exp_pixel(x + q, y + r, c);
      run(5);
    end
    check(stall_cycles > 0, "fbIsReady stalls exercised");
  endtask
endmodule
