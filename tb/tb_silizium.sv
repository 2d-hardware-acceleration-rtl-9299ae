// End-to-end testbench for the Silizium core at a reduced size.
//
// A CPU model drives the Avalon-MM slave the way the driver software does
// (configure base/span/control, append command words, poll STATUS.BUSY); a
// memory model behind the Avalon-MM master holds the framebuffer and inserts
// random wait states. A reference model draws every command into its own copy
// of the framebuffer, applying the same rules the core documents: relative
// byte address (x + W*y) * 4, boundary check against the span, clipping mask
// on the position recovered from the address, base-address offset. At the end
// the two framebuffers must match and no write may fall outside the span.
//
// Every mechanism of the core is made to happen and counted: pixel, rectangle
// and clipping commands, write-FIFO full (renderer stalled), Avalon wait
// states, boundary-check drops, clipping drops, command FIFO full, CLR1 and
// CLR2 clears, dispatcher and FBI disabled. A mechanism that never happened
// counts as a failure. The framebuffer is 24 x 12 pixels; the command FIFO
// and the write-FIFO hold 16 words so that both fill up.
//
// With both buses free of wait states it also measures the latencies of each
// renderer: initial latency (last command word written to the first
// write-FIFO entry: 3 cycles for pixel and rectangle, 2 for the clipping
// mask) and recovery latency (last write-FIFO entry of one operation to the
// start pulse of the next queued one: 3 cycles). These are this design's own
// numbers, fixed by its pipeline: one cycle in the slave register, one in the
// command FIFO, one in the renderer.
module tb_silizium;
  import silizium_pkg::*;

  localparam int W = 24, H = 12, BPP = 4;
  localparam int CEXP = 4, WEXP = 4;
  localparam logic [31:0] BASE = 32'h0000_4000;
  localparam logic [31:0] SPAN = W * H * BPP;

  logic clock = 0, reset = 1;
  logic [7:0]  s_addr = '0;
  logic        s_read = 0, s_write = 0, s_wait;
  logic [31:0] s_rdata, s_wdata = '0;
  logic [31:0] m_addr, m_wdata, m_rdata;
  logic        m_write, m_read, m_wait, m_rvalid;
  logic [1:0]  m_burst;

  silizium #(
    .CMD_FIFO_EXP(CEXP), .FB_WIDTH(W), .FB_HEIGHT(H),
    .FB_WRITE_FIFO_EXP(WEXP), .FB_READ_FIFO_EXP(2)
  ) dut (
    .clock, .reset,
    .avalon_slave_address(s_addr), .avalon_slave_read(s_read),
    .avalon_slave_readdata(s_rdata), .avalon_slave_write(s_write),
    .avalon_slave_writedata(s_wdata), .avalon_slave_waitrequest(s_wait),
    .avalon_master_address(m_addr), .avalon_master_write(m_write),
    .avalon_master_writedata(m_wdata), .avalon_master_waitrequest(m_wait),
    .avalon_master_read(m_read), .avalon_master_readdata(m_rdata),
    .avalon_master_readdatavalid(m_rvalid), .avalon_master_burstcount(m_burst)
  );

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------- memory model
  logic [31:0] mem [logic [31:0]];
  bit wait_random = 0;
  logic wait_r = 0;
  int n_writes = 0, n_outside = 0, n_waits = 0, n_stall = 0;

  assign m_wait   = wait_random && wait_r;
  assign m_rvalid = 1'b0;   // no renderer of this version reads back
  assign m_rdata  = '0;

  always @(posedge clock) if (!reset) begin
    wait_r <= ($urandom_range(0, 2) == 0);
    if (m_write && !m_wait) begin
      n_writes++;
      if (m_addr < BASE || m_addr >= BASE + SPAN) n_outside++;
      mem[m_addr] = m_wdata;
    end
    if ((m_write || m_read) && m_wait) n_waits++;
    // a renderer waiting on a full write-FIFO
    if (dut.u_dispatcher.busy && !dut.fbi_ready) n_stall++;
  end

  // ---------------------------------------------------------- reference
  logic [31:0] ref_fb [W*H];
  bit bcen = 1, cmen = 0;
  int clip_x = 0, clip_y = 0, clip_w = 32'h1111_1111, clip_h = 32'h1111_1111;
  int n_bound_drop = 0, n_clip_drop = 0;
  int n_pixel = 0, n_rect = 0, n_clip = 0;

  function automatic void ref_put(input int x, input int y, input logic [31:0] c);
    logic [31:0] rel;
    longint idx, px, py;
    rel = 32'((x + W * y) * BPP);
    if (bcen && rel >= SPAN) begin n_bound_drop++; return; end
    idx = longint'(rel) / longint'(BPP); px = idx % longint'(W); py = idx / longint'(W);
    if (cmen && !(px >= longint'(clip_x) && px < longint'(clip_x) + longint'(clip_w) &&
                  py >= longint'(clip_y) && py < longint'(clip_y) + longint'(clip_h))) begin
      n_clip_drop++; return;
    end
    ref_fb[int'(idx)] = c;
  endfunction

  // ---------------------------------------------------------- latency monitor
  // Initial latency: completed slave write of the last command word to the
  // first write-FIFO entry after it. Recovery latency: last write-FIFO entry
  // of one operation to the start pulse of the next queued one.
  longint cyc = 0, last_sw = 0, push_after_sw = -1, last_push = 0;
  longint start_gaps[$];
  always @(posedge clock) if (!reset) begin
    cyc <= cyc + 1;
    if (s_write && !s_wait) begin last_sw = cyc; push_after_sw = -1; end
    if (|dut.u_dispatcher.r_start) start_gaps.push_back(cyc - last_push);
    if (dut.fbi_bus_write || dut.fbi_cmd_write) begin
      if (push_after_sw < 0 && cyc > last_sw) push_after_sw = cyc;
      last_push = cyc;
    end
  end

  // ---------------------------------------------------------- CPU model
  task automatic bus_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clock);
    s_addr = a; s_wdata = d; s_write = 1;
    @(posedge clock);
    while (s_wait) @(posedge clock);
    @(negedge clock);
    s_write = 0;
  endtask

  task automatic bus_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clock);
    s_addr = a; s_read = 1;
    #1;
    while (s_wait) begin @(posedge clock); #1; end
    d = s_rdata;
    @(posedge clock);
    @(negedge clock);
    s_read = 0;
  endtask

  logic [31:0] control = 32'h0001_0000;
  task automatic set_control(input logic [31:0] v);
    control = v;
    bus_write(REG_CONTROL, v);
  endtask

  // blocking append: waits for room like the driver's render functions
  task automatic append(input logic [31:0] v);
    logic [31:0] st;
    forever begin
      bus_read(REG_STATUS, st);
      if (!st[STATUS_FULL]) break;
    end
    bus_write(REG_CMD_FIFO, v);
  endtask

  task automatic draw_pixel(input int x, input int y, input logic [31:0] c);
    append(1); append(32'(x)); append(32'(y)); append(c);
    ref_put(x, y, c);
    n_pixel++;
  endtask

  task automatic fill_rect(input int x, input int y, input int w, input int h,
                           input logic [31:0] c);
    append(2); append(32'(x)); append(32'(y)); append(32'(w)); append(32'(h)); append(c);
    for (int r = 0; r < h; r++) for (int q = 0; q < w; q++) ref_put(x + q, y + r, c);
    n_rect++;
  endtask

  task automatic set_clip(input int x, input int y, input int w, input int h);
    append(3); append(32'(x)); append(32'(y)); append(32'(w)); append(32'(h));
    clip_x = x; clip_y = y; clip_w = w; clip_h = h;
    n_clip++;
  endtask

  task automatic wait_idle();
    logic [31:0] st;
    int n = 0;
    do begin
      bus_read(REG_STATUS, st);
      n++;
    end while (st[STATUS_BUSY] && n < 100000);
    check(n < 100000, "core went idle");
  endtask

  task automatic measure_initial(input logic [31:0] words[], input int expected, input string name);
    longint lat;
    foreach (words[i]) bus_write(REG_CMD_FIFO, words[i]);
    repeat (40) @(posedge clock);
    lat = push_after_sw - last_sw;
    $display("initial latency %s: %0d cycles", name, lat);
    check(push_after_sw >= 0 && lat == longint'(expected),
          $sformatf("initial latency %s %0d cycles, expected %0d", name, lat, expected));
    wait_idle();
  endtask

  // commands queued with the dispatcher off, then run back to back; each
  // operation after the first must start `expected` cycles after the last
  // write-FIFO entry of the one before
  task automatic measure_recovery(input logic [31:0] words[], input int n_ops,
                                  input int expected, input string name);
    set_control(32'h0001_0002);
    foreach (words[i]) bus_write(REG_CMD_FIFO, words[i]);
    start_gaps.delete();
    set_control(32'h0001_0003);
    wait_idle();
    check(start_gaps.size() == n_ops, $sformatf("%0d operations started, expected %0d", start_gaps.size(), n_ops));
    for (int i = 1; i < start_gaps.size(); i++) begin
      $display("recovery latency %s, operation %0d: %0d cycles", name, i, start_gaps[i]);
      check(start_gaps[i] == longint'(expected),
            $sformatf("recovery latency %s %0d cycles, expected %0d", name, start_gaps[i], expected));
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    static int n_cmd_full = 0, n_clr1 = 0, n_clr2 = 0, n_disp_off = 0, n_fbi_off = 0;
    for (int i = 0; i < W * H; i++) ref_fb[i] = 32'hFFFF_FFFF;
    repeat (3) @(posedge clock);
    reset = 0;

    // slave interface sanity and initialisation as in the driver
    bus_read(REG_DUMMY_1, d); check(d == 32'hD0D0_0D0D, "DUMMY_1");
    bus_read(REG_DUMMY_2, d); check(d == 32'hE0E0_0E0E, "DUMMY_2");
    bus_read(REG_CONTROL, d); check(d == 32'h0001_0000, "CONTROL reset value");
    bus_write(REG_FB_BASE, BASE);
    bus_write(REG_FB_SPAN, SPAN);
    set_control(32'h0001_0003);                      // EN1, EN2, BCEN

    // background, then random shapes, some partly off-screen
    fill_rect(0, 0, W, H, 32'hFFFF_FFFF);
    wait_random = 1;
    for (int i = 0; i < 25; i++)
      fill_rect($urandom_range(0, W + 4) - 4, $urandom_range(0, H + 2) - 2,
                $urandom_range(1, 10), $urandom_range(1, 6), $urandom);
    for (int i = 0; i < 30; i++)
      draw_pixel($urandom_range(0, W + 3) - 2, $urandom_range(0, H + 3) - 2, $urandom);
    wait_idle();

    // clipping mask, then clipped drawing
    set_clip(5, 3, 10, 5);
    wait_idle();
    bus_read(REG_CLIP_X, d); check(d == 5, "CLIP_X read back");
    bus_read(REG_CLIP_W, d); check(d == 10, "CLIP_W read back");
    set_control(32'h0003_0003);                      // + CMEN
    cmen = 1;
    fill_rect(0, 0, W, H, 32'h00C0_FFEE);
    draw_pixel(1, 1, 32'h1234_5678);                 // outside the mask
    draw_pixel(6, 4, 32'h8765_4321);                 // inside
    wait_idle();
    set_control(32'h0001_0003);
    cmen = 0;

    // command FIFO full with the dispatcher disabled, then CLR1
    set_control(32'h0001_0002);
    n_disp_off++;
    for (int i = 0; i < 2**CEXP + 2; i++) bus_write(REG_CMD_FIFO, 32'h2);
    bus_read(REG_STATUS, d);
    if (d[STATUS_FULL]) n_cmd_full++;
    check(d[STATUS_FULL] && d[31:16] == 2**CEXP, "command FIFO full, extra words dropped");
    set_control(32'h0001_0102);                      // CLR1
    n_clr1++;
    bus_read(REG_STATUS, d);
    check(d[STATUS_MPTY] && d[31:16] == 0, "command FIFO cleared");
    set_control(32'h0001_0003);

    // FBI disabled: a rectangle waits in the write-FIFO and is discarded by CLR2
    set_control(32'h0001_0001);
    n_fbi_off++;
    append(2); append(2); append(2); append(3); append(3); append(32'hDEAD_DEAD);
    repeat (60) @(posedge clock);
    check(n_writes > 0 && dut.u_fbi.writeFifoUsedWords == 9, "nine pixels held in the write-FIFO");
    set_control(32'h0001_0201);                      // CLR2
    n_clr2++;
    set_control(32'h0001_0003);
    wait_idle();

    // a last burst of rectangles under wait states
    for (int i = 0; i < 10; i++)
      fill_rect($urandom_range(0, W - 1), $urandom_range(0, H - 1),
                $urandom_range(1, 12), $urandom_range(1, 5), $urandom);
    wait_idle();

    // latencies, with no wait states on either bus and empty FIFOs
    wait_random = 0;
    measure_initial('{32'h1, 32'd3, 32'd2, 32'h0000_00AA}, 3, "pixel");
    ref_put(3, 2, 32'h0000_00AA);
    measure_initial('{32'h2, 32'd4, 32'd4, 32'd2, 32'd1, 32'h0000_00BB}, 3, "rectangle");
    ref_put(4, 4, 32'h0000_00BB); ref_put(5, 4, 32'h0000_00BB);
    measure_initial('{32'h3, 32'd0, 32'd0, 32'h1111_1111, 32'h1111_1111}, 2, "clipping");
    // pixel (7,1), 1x1 rectangle at (8,2), pixel (9,3)
    measure_recovery('{32'h1, 32'd7, 32'd1, 32'h0000_00CC,
                       32'h2, 32'd8, 32'd2, 32'd1, 32'd1, 32'h0000_00DD,
                       32'h1, 32'd9, 32'd3, 32'h0000_00EE}, 3, 3, "after pixel and rectangle");
    ref_put(7, 1, 32'h0000_00CC); ref_put(8, 2, 32'h0000_00DD); ref_put(9, 3, 32'h0000_00EE);
    // clipping mask covering everything, then pixel (10,3)
    measure_recovery('{32'h3, 32'd0, 32'd0, 32'h1111_1111, 32'h1111_1111,
                       32'h1, 32'd10, 32'd3, 32'h0000_00FF}, 2, 3, "after clipping");
    ref_put(10, 3, 32'h0000_00FF);

    // compare framebuffers
    for (int i = 0; i < W * H; i++) begin
      logic [31:0] a, got;
      a   = BASE + 32'(i * BPP);
      got = mem.exists(a) ? mem[a] : 32'h0BAD_0000;
      check(got == ref_fb[i], $sformatf("pixel %0d,%0d = %h, expected %h", i % W, i / W, got, ref_fb[i]));
    end
    check(n_outside == 0, "no write outside the framebuffer");

    // every mechanism happened
    check(n_pixel > 0, "pixel commands");
    check(n_rect > 0, "rectangle commands");
    check(n_clip > 0, "clipping command");
    check(n_stall > 0, "write-FIFO full stalled a renderer");
    check(n_waits > 0, "Avalon wait states");
    check(n_bound_drop > 0, "boundary-check drops");
    check(n_clip_drop > 0, "clipping drops");
    check(n_cmd_full > 0, "command FIFO full");
    check(n_clr1 > 0 && n_clr2 > 0, "FIFO clears");
    check(n_disp_off > 0 && n_fbi_off > 0, "dispatcher and FBI disabled");
    $display("pixel=%0d rect=%0d clip=%0d writes=%0d stall=%0d waits=%0d bound_drop=%0d clip_drop=%0d",
             n_pixel, n_rect, n_clip, n_writes, n_stall, n_waits, n_bound_drop, n_clip_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
