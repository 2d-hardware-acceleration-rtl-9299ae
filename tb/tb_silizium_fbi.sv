// Self-checking testbench for silizium_fbi, the framebuffer interface.
//
// A small framebuffer (16 x 8 pixels, 4 bytes each, at byte 0x1000) sits
// behind an Avalon-MM memory model that inserts random wait states and
// returns read data 1 to 3 cycles after a read is accepted. A reference model
// works out, when each word is pushed, which pixel writes must reach the bus
// (boundary check against the span, clipping mask, base offset) and which
// words a read command must return. The testbench checks:
//   - every bus write against the expected address/data sequence;
//   - pixel writes leave the master every 4 cycles without wait states;
//   - ready drops when the write-FIFO is full and the FBI is disabled;
//   - the clipping command updates clipX/Y/Width/Height and masks pixels;
//   - boundary checks on and off;
//   - linear and window reads, including words outside the span (valid = 0);
//   - writeFifoClear empties the write-FIFO.
module tb_silizium_fbi;
  localparam int AW = 32, DW = 32, CW = 32, BPP = 4, FBW = 16, FBH = 8;
  localparam int WEXP = 3, REXP = 2;
  localparam logic [AW-1:0] BASE = 32'h1000;
  localparam logic [AW-1:0] SPAN = FBW * FBH * BPP;

  logic clock = 0, reset = 1;
  logic enable = 0, bc_en = 1, cm_en = 0;
  logic [AW-1:0] m_addr;
  logic m_write, m_read, m_wait, m_rvalid;
  logic [DW-1:0] m_wdata, m_rdata;
  logic [1:0] m_burst;
  logic [AW-1:0] busAddr = '0;
  logic [DW-1:0] busData = '0;
  logic busWrite = 0, cmdWrite = 0, ready;
  logic [AW+DW-1:0] cmdData = '0;
  logic rf_avail, rf_valid, rf_ack = 0;
  logic [DW-1:0] rf_data;
  logic [WEXP:0] wf_used;
  logic [REXP:0] rf_used;
  logic wf_clear = 0, rf_clear = 0;
  logic signed [CW-1:0] clipX, clipY, clipW, clipH;
  logic busy;

  silizium_fbi #(
    .COORD_BITS(CW), .ADDR_BITS(AW), .DATA_BITS(DW), .BURSTCOUNT_BITS(2),
    .BYTES_PER_PIXEL(BPP), .FB_WIDTH(FBW), .WRITE_FIFO_EXP(WEXP), .READ_FIFO_EXP(REXP)
  ) dut (
    .clock, .reset, .enable, .boundaryChecksEnable(bc_en), .clippingEnable(cm_en),
    .avalon_master_address(m_addr), .avalon_master_write(m_write),
    .avalon_master_writedata(m_wdata), .avalon_master_waitrequest(m_wait),
    .avalon_master_read(m_read), .avalon_master_readdata(m_rdata),
    .avalon_master_readdatavalid(m_rvalid), .avalon_master_burstcount(m_burst),
    .fbAddrBase(BASE), .fbAddrSpan(SPAN),
    .busAddr, .busData, .busWrite, .cmdData, .cmdWrite, .ready,
    .readFifoDataAvailable(rf_avail), .readFifoData(rf_data),
    .readFifoDataValid(rf_valid), .readFifoReadAck(rf_ack),
    .writeFifoUsedWords(wf_used), .writeFifoClear(wf_clear),
    .readFifoUsedWords(rf_used), .readFifoClear(rf_clear),
    .clipX, .clipY, .clipWidth(clipW), .clipHeight(clipH), .busy
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

  // ------------------------------------------------------ memory model
  logic [DW-1:0] mem [logic [AW-1:0]];
  bit wait_random = 0;
  int rd_delay = 0;
  logic [AW-1:0] rd_pending_addr;
  bit rd_pending = 0;
  longint cycle = 0, last_write_cycle = -1;
  int min_write_gap = 1000, writes_seen = 0, waits_seen = 0;

  typedef struct { logic [AW-1:0] addr; logic [DW-1:0] data; } wr_t;
  wr_t exp_wr[$];
  typedef struct { bit valid; logic [DW-1:0] data; } rd_t;
  rd_t exp_rd[$];

  function automatic logic [DW-1:0] mem_val(input logic [AW-1:0] a);
    return mem.exists(a) ? mem[a] : (a ^ 32'h5A5A_0000);
  endfunction

  always_comb m_wait = wait_random ? waitreq_r : 1'b0;
  logic waitreq_r = 0;

  always @(posedge clock) if (!reset) begin
    cycle <= cycle + 1;
    waitreq_r <= ($urandom_range(0, 2) == 0);
    m_rvalid <= 1'b0;
    if (m_write && !m_wait) begin
      writes_seen++;
      if (!wait_random && last_write_cycle >= 0 && cycle - last_write_cycle < longint'(min_write_gap))
        min_write_gap = int'(cycle - last_write_cycle);
      last_write_cycle = cycle;
      check(m_burst == 2'd1, "burstcount 1");
      if (exp_wr.size() == 0) check(0, $sformatf("unexpected write %h", m_addr));
      else begin
        wr_t e;
        e = exp_wr.pop_front();
        check(m_addr == e.addr && m_wdata == e.data,
              $sformatf("write %h/%h expected %h/%h", m_addr, m_wdata, e.addr, e.data));
      end
      mem[m_addr] = m_wdata;
    end
    if ((m_write || m_read) && m_wait) waits_seen++;
    if (m_read && !m_wait) begin
      check(!rd_pending, "one read outstanding");
      rd_pending = 1;
      rd_pending_addr = m_addr;
      rd_delay = $urandom_range(1, 3);
    end else if (rd_pending) begin
      rd_delay--;
      if (rd_delay == 0) begin
        m_rvalid <= 1'b1;
        m_rdata  <= mem_val(rd_pending_addr);
        rd_pending = 0;
      end
    end
  end

  // read-FIFO consumer: compares every word with the expected one
  bit rf_consume = 1;
  int reads_got = 0, invalid_got = 0;
  always @(negedge clock) begin
    rf_ack <= 1'b0;
    if (rf_consume && rf_avail) begin
      rf_ack <= 1'b1;
      reads_got++;
      if (!rf_valid) invalid_got++;
      if (exp_rd.size() == 0) check(0, "unexpected read word");
      else begin
        rd_t e;
        e = exp_rd.pop_front();
        check(rf_valid == e.valid && (!e.valid || rf_data == e.data),
              $sformatf("read word %0d/%h expected %0d/%h", rf_valid, rf_data, e.valid, e.data));
      end
    end
  end

  // ------------------------------------------------------ reference model
  int mclip_x = 0, mclip_y = 0, mclip_w = 32'h1111_1111, mclip_h = 32'h1111_1111;

  function automatic bit model_pass(input logic [AW-1:0] rel);
    longint idx, px, py;
    if (bc_en && rel >= SPAN) return 0;
    idx = longint'(rel) / longint'(BPP); px = idx % longint'(FBW); py = idx / longint'(FBW);
    if (cm_en && !(px >= longint'(mclip_x) && px < longint'(mclip_x) + longint'(mclip_w) &&
                   py >= longint'(mclip_y) && py < longint'(mclip_y) + longint'(mclip_h))) return 0;
    return 1;
  endfunction

  task automatic push_pixel(input logic [AW-1:0] rel, input logic [DW-1:0] data);
    while (!ready) @(posedge clock);
    @(negedge clock);
    busAddr = rel; busData = data; busWrite = 1;
    if (model_pass(rel)) begin
      wr_t e;
      e.addr = BASE + rel;
      e.data = data;
      exp_wr.push_back(e);
    end
    @(negedge clock);
    busWrite = 0;
  endtask

  task automatic push_cmd(input logic [AW+DW-1:0] word);
    while (!ready) @(posedge clock);
    @(negedge clock);
    cmdData = word; cmdWrite = 1;
    @(negedge clock);
    cmdWrite = 0;
  endtask

  task automatic drain();
    int n = 0;
    while ((busy || exp_wr.size() != 0 || exp_rd.size() != 0) && n < 20000) begin
      @(posedge clock); n++;
    end
    check(n < 20000, "drained");
    repeat (3) @(posedge clock);
  endtask

  task automatic expect_read(input logic [AW-1:0] rel);
    rd_t e;
    e.valid = !(bc_en && rel >= SPAN);
    e.data  = e.valid ? mem_val(BASE + rel) : '0;
    exp_rd.push_back(e);
  endtask

  initial begin
    repeat (400000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int ready_low = 0;
    repeat (3) @(posedge clock);
    reset = 0;
    check(clipW == 32'h1111_1111 && clipH == 32'h1111_1111 && clipX == 0, "clip reset values");

    // 1. FBI disabled: the write-FIFO fills and ready drops.
    for (int i = 0; i < 2**WEXP; i++) push_pixel(AW'(i * BPP), DW'(32'hC0DE_0000 + i));
    @(negedge clock);
    check(!ready && wf_used == 2**WEXP, "ready low when write-FIFO full");
    check(exp_wr.size() == 2**WEXP && writes_seen == 0, "nothing written while disabled");
    // 2. enable: 8 pixels, 4 cycles apart
    enable = 1;
    drain();
    check(writes_seen == 2**WEXP, "all queued pixels written");
    check(min_write_gap == 4, $sformatf("write gap %0d cycles, expected 4", min_write_gap));

    // 3. random pixels, some outside the span, with random wait states
    wait_random = 1;
    for (int i = 0; i < 300; i++)
      push_pixel(AW'($urandom_range(0, SPAN + 64) & ~(BPP - 1)), DW'($urandom));
    drain();

    // 4. boundary checks off: out-of-span write reaches the bus
    bc_en = 0;
    push_pixel(SPAN + 8, 32'hBEEF_0001);
    drain();
    bc_en = 1;

    // 5. clipping mask: X=3, Y=2, W=5, H=4
    push_cmd({{(AW+DW-8){1'b0}}, 8'h01});
    push_cmd(3); push_cmd(2); push_cmd(5); push_cmd(4);
    drain();
    check(clipX == 3 && clipY == 2 && clipW == 5 && clipH == 4, "clip registers updated");
    mclip_x = 3; mclip_y = 2; mclip_w = 5; mclip_h = 4;
    cm_en = 1;
    for (int i = 0; i < FBW * FBH; i++) push_pixel(AW'(i * BPP), DW'(32'hAB00_0000 + i));
    drain();
    cm_en = 0;

    // 6. linear read of 13 pixels from pixel 120 (the last 5 are outside)
    for (int i = 0; i < 13; i++) expect_read(AW'((120 + i) * BPP));
    push_cmd((AW+DW)'(8'h02)); push_cmd(120 * BPP); push_cmd(13);
    drain();

    // 7. window read 3 x 4 at pixel (5,1)
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 3; c++) expect_read(AW'(((1 + r) * FBW + 5 + c) * BPP));
    push_cmd((AW+DW)'(8'h03)); push_cmd((1 * FBW + 5) * BPP); push_cmd(3); push_cmd(4);
    drain();

    // 8. read with a slow consumer: read-FIFO fills, FBI must wait
    rf_consume = 0;
    for (int i = 0; i < 10; i++) expect_read(AW'(i * BPP));
    push_cmd((AW+DW)'(8'h02)); push_cmd(0); push_cmd(10);
    repeat (200) @(posedge clock);
    check(rf_used == 2**REXP, "read-FIFO full, FBI waiting");
    rf_consume = 1;
    drain();

    // 9. write-FIFO clear
    enable = 0;
    for (int i = 0; i < 5; i++) push_pixel(AW'(i * BPP), 32'h1);
    check(wf_used == 5, "five words queued");
    @(negedge clock); wf_clear = 1; @(negedge clock); wf_clear = 0;
    check(wf_used == 0 && ready, "write-FIFO cleared");
    exp_wr.delete();
    enable = 1;
    repeat (20) @(posedge clock);

    check(waits_seen > 0, "wait states were exercised");
    check(invalid_got == 5, $sformatf("out-of-span read words %0d, expected 5", invalid_got));
    check(exp_wr.size() == 0 && exp_rd.size() == 0, "all expectations met");
    $display("writes=%0d reads=%0d waits=%0d", writes_seen, reads_got, waits_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
