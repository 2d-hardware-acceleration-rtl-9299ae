// Full-size testbench for the Silizium core: every parameter at its default
// (800 x 480 pixels, 4 bytes per pixel, 64-word command FIFO, 256-word
// write-FIFO).
//
// The same CPU model, memory model and reference model as the reduced
// end-to-end testbench run one complete screen's worth of work: a full-screen
// clear (384,000 pixels), the draw-pixel and fill-rectangle examples of the
// programming guide (X = 165, Y = 504, which lies below the 480-line screen,
// so most of it is dropped by the boundary check), a clipping mask of
// X = 150, Y = 170, 300 x 150 with a clipped full-screen fill, and a few
// random rectangles under Avalon wait states. The whole framebuffer is then
// compared with the reference, and each mechanism must have happened.
module tb_silizium_full;
  import silizium_pkg::*;

  localparam int W = 800, H = 480, BPP = 4;
  localparam int CEXP = 6, WEXP = 8;
  localparam logic [31:0] BASE = 32'h0000_4000;
  localparam logic [31:0] SPAN = W * H * BPP;

  logic clock = 0, reset = 1;
  logic [7:0]  s_addr = '0;
  logic        s_read = 0, s_write = 0, s_wait;
  logic [31:0] s_rdata, s_wdata = '0;
  logic [31:0] m_addr, m_wdata, m_rdata;
  logic        m_write, m_read, m_wait, m_rvalid;
  logic [1:0]  m_burst;

  silizium dut (
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
    end while (st[STATUS_BUSY] && n < 4000000);
    check(n < 4000000, "core went idle");
  endtask

  initial begin
    repeat (20000000) @(posedge clock);
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

    // full-screen clear
    fill_rect(0, 0, W, H, 32'h0000_0000);
    // documented examples: both lie partly or wholly below the screen
    draw_pixel(165, 504, 32'h00FF_0000);
    fill_rect(165, 504, 65, 204, 32'h0000_FF00);
    fill_rect(165, 404, 65, 204, 32'h0000_FF00);
    wait_idle();

    // clipping mask example, then a clipped full-screen fill
    set_clip(150, 170, 300, 150);
    wait_idle();
    bus_read(REG_CLIP_X, d); check(d == 150, "CLIP_X read back");
    bus_read(REG_CLIP_H, d); check(d == 150, "CLIP_H read back");
    set_control(32'h0003_0003);
    cmen = 1;
    fill_rect(0, 0, W, H, 32'h00C0_FFEE);
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
    set_control(32'h0001_0102);
    n_clr1++;
    bus_read(REG_STATUS, d);
    check(d[STATUS_MPTY] && d[31:16] == 0, "command FIFO cleared");

    // FBI disabled: a rectangle waits in the write-FIFO and is discarded by CLR2
    set_control(32'h0001_0001);
    n_fbi_off++;
    append(2); append(2); append(2); append(3); append(3); append(32'hDEAD_DEAD);
    repeat (60) @(posedge clock);
    check(dut.u_fbi.writeFifoUsedWords == 9, "nine pixels held in the write-FIFO");
    set_control(32'h0001_0201);
    n_clr2++;
    set_control(32'h0001_0003);
    wait_idle();

    // random rectangles under wait states
    wait_random = 1;
    for (int i = 0; i < 20; i++)
      fill_rect($urandom_range(0, W + 20) - 20, $urandom_range(0, H + 20) - 20,
                $urandom_range(1, 60), $urandom_range(1, 40), $urandom);
    wait_idle();

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
