// Self-checking testbench for silizium_dispatcher with its three renderers.
//
// A queue models the command FIFO (show-ahead, popped by fifoRdAck). The
// testbench queues mixed command streams (pixel, rectangle, clipping and an
// unknown code) and checks that the framebuffer-interface traffic leaving the
// access mux is exactly what the commands describe, in order; that nothing is
// taken while enable is 0; that busy covers every command; that the FIFO is
// fully consumed; and that fbiIsReady stalls are honoured.
module tb_silizium_dispatcher;
  localparam int FBW = 12, BPP = 4;

  logic clock = 0, reset = 1, enable = 0, fifoEmpty = 1, fifoRdAck, busy, fbiIsReady = 1;
  logic [31:0] fifoData = '0;
  logic [31:0] fbiBusAddr, fbiBusData;
  logic fbiBusWrite, fbiCmdWrite;
  logic [63:0] fbiCmdData;

  silizium_dispatcher #(.FB_WIDTH(FBW), .FB_BYTES_PER_PIXEL(BPP)) dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [31:0] fifo[$];
  typedef struct { bit is_cmd; logic [63:0] word; } fbi_t;
  fbi_t expq[$];
  bit ready_random = 0;
  int stalls = 0, n_pixel = 0, n_rect = 0, n_clip = 0, n_unknown = 0;

  // the FIFO outputs are refreshed between clock edges
  always @(negedge clock) begin
    fifoEmpty = (fifo.size() == 0);
    fifoData  = (fifo.size() > 0) ? fifo[0] : 32'h0;
  end

  always @(posedge clock) if (!reset) begin
    if (fifoRdAck) begin
      check(fifo.size() > 0, "no read from an empty FIFO");
      void'(fifo.pop_front());
    end
    if (fbiBusWrite || fbiCmdWrite) begin
      fbi_t e;
      check(fbiIsReady, "write only while ready");
      if (expq.size() == 0) check(0, "unexpected FBI write");
      else begin
        e = expq.pop_front();
        if (e.is_cmd) check(fbiCmdWrite && fbiCmdData == e.word, "command word");
        else check(fbiBusWrite && {fbiBusData, fbiBusAddr} == e.word,
                   $sformatf("pixel %h/%h expected %h", fbiBusData, fbiBusAddr, e.word));
      end
    end
    if (busy && !fbiIsReady) stalls++;
    fbiIsReady <= ready_random ? ($urandom_range(0, 2) != 0) : 1'b1;
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

  task automatic add_random_command();
    int kind = $urandom_range(0, 9);
    int x = $urandom_range(0, 15) - 2, y = $urandom_range(0, 9) - 1;
    int w = $urandom_range(0, 5), h = $urandom_range(0, 4);
    logic [31:0] c = $urandom;
    if (kind < 3) begin
      fifo.push_back(1); fifo.push_back(32'(x)); fifo.push_back(32'(y)); fifo.push_back(c);
      exp_pixel(x, y, c); n_pixel++;
    end else if (kind < 7) begin
      fifo.push_back(2); fifo.push_back(32'(x)); fifo.push_back(32'(y));
      fifo.push_back(32'(w)); fifo.push_back(32'(h)); fifo.push_back(c);
      for (int r = 0; r < h; r++) for (int q = 0; q < w; q++) exp_pixel(x + q, y + r, c);
      n_rect++;
    end else if (kind < 9) begin
      fifo.push_back(3); fifo.push_back(32'(x)); fifo.push_back(32'(y));
      fifo.push_back(32'(w)); fifo.push_back(32'(h));
      exp_cmd(64'h1); exp_cmd(64'(x)); exp_cmd(64'(y)); exp_cmd(64'(w)); exp_cmd(64'(h));
      n_clip++;
    end else begin
      fifo.push_back(32'h77);      // unknown code: dropped, nothing drawn
      n_unknown++;
    end
  endtask

  task automatic drain();
    int t = 0;
    while ((fifo.size() > 0 || busy) && t < 50000) begin @(posedge clock); t++; end
    check(t < 50000, "dispatcher drained");
    repeat (2) @(posedge clock);
    check(expq.size() == 0, "all expected FBI traffic seen");
  endtask

  initial begin
    repeat (400000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int busy_seen = 0;
    repeat (3) @(posedge clock);
    reset = 0;
    // disabled: nothing is taken
    fifo.push_back(1); fifo.push_back(4); fifo.push_back(2); fifo.push_back(32'hABCD);
    exp_pixel(4, 2, 32'hABCD);
    repeat (20) @(posedge clock);
    check(fifo.size() == 4 && !busy, "nothing taken while disabled");
    @(negedge clock);
    enable = 1;
    @(posedge clock); #1;
    check(fifo.size() == 3, "command word taken once enabled");
    while (!busy) @(posedge clock);
    drain();
    // long mixed stream, FBI ready throughout, then with stalls
    for (int i = 0; i < 100; i++) add_random_command();
    drain();
    ready_random = 1;
    for (int i = 0; i < 200; i++) add_random_command();
    drain();
    check(stalls > 0, "stalls exercised");
    check(n_pixel > 0 && n_rect > 0 && n_clip > 0 && n_unknown > 0, "all command kinds used");
    $display("pixel=%0d rect=%0d clip=%0d unknown=%0d stalls=%0d", n_pixel, n_rect, n_clip, n_unknown, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
