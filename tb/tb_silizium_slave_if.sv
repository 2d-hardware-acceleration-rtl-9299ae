// Self-checking testbench for silizium_slave_if, the Avalon-MM slave with the
// register map.
//
// An Avalon-MM master task set reads and writes registers and counts wait
// states. Checks: reset values (VERSION, STATUS, CONTROL = 0x00010000,
// CLIP_W/H = 0x11111111 passed in, DUMMY_1/2 constants), read/write of
// CONTROL (reserved bits dropped), FB_BASE, FB_SPAN and DUMMY_3, read-only
// registers ignoring writes, unmapped offsets reading 0, one wait state per
// read and none per write, CMD_FIFO writes reaching the command FIFO one cycle
// later, STATUS bit packing, and the CLR bits pulsing for one cycle and
// clearing themselves.
module tb_silizium_slave_if;
  import silizium_pkg::*;

  logic clock = 0, reset = 1;
  logic [7:0]  avalon_slave_address = '0;
  logic        avalon_slave_read = 0, avalon_slave_write = 0;
  logic [31:0] avalon_slave_readdata, avalon_slave_writedata = '0;
  logic        avalon_slave_waitrequest;
  logic        cmdFifoWrite;
  logic [31:0] cmdFifoData;
  logic        cmdFifoFull = 0, cmdFifoEmpty = 1, coreBusy = 0;
  logic [6:0]  cmdFifoUsedWords = '0;
  logic signed [31:0] clipX = 7, clipY = -3, clipWidth = 32'h1111_1111, clipHeight = 32'h1111_1111;
  logic dispatcherEnable, fbiEnable, cmdFifoClear, writeFifoClear, readFifoClear;
  logic boundaryChecksEnable, clippingEnable;
  logic [31:0] fbAddrBase, fbAddrSpan;

  silizium_slave_if #(.VERSION(32'h0000_0001), .CMD_FIFO_EXP(6), .COORD_BITS(32)) dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int clr_pulses[3] = '{0, 0, 0};
  logic [31:0] pushed[$];
  always @(posedge clock) if (!reset) begin
    if (cmdFifoClear)   clr_pulses[0]++;
    if (writeFifoClear) clr_pulses[1]++;
    if (readFifoClear)  clr_pulses[2]++;
    if (cmdFifoWrite)   pushed.push_back(cmdFifoData);
  end

  task automatic bus_write(input logic [7:0] a, input logic [31:0] d);
    int waits = 0;
    @(negedge clock);
    avalon_slave_address = a; avalon_slave_writedata = d; avalon_slave_write = 1;
    @(posedge clock);
    while (avalon_slave_waitrequest) begin waits++; @(posedge clock); end
    @(negedge clock);
    avalon_slave_write = 0;
    check(waits == 0, "writes have no wait state");
  endtask

  task automatic bus_read(input logic [7:0] a, output logic [31:0] d);
    int waits = 0;
    @(negedge clock);
    avalon_slave_address = a; avalon_slave_read = 1;
    #1;
    while (avalon_slave_waitrequest) begin waits++; @(posedge clock); #1; end
    d = avalon_slave_readdata;
    @(posedge clock);
    @(negedge clock);
    avalon_slave_read = 0;
    check(waits == 1, $sformatf("read took %0d wait states, expected 1", waits));
  endtask

  task automatic expect_reg(input logic [7:0] a, input logic [31:0] v, input string name);
    logic [31:0] d;
    bus_read(a, d);
    check(d == v, $sformatf("%s = %h, expected %h", name, d, v));
  endtask

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clock);
    reset = 0;
    expect_reg(REG_VERSION, 32'h0000_0001, "VERSION");
    expect_reg(REG_CONTROL, 32'h0001_0000, "CONTROL reset");
    check(boundaryChecksEnable && !clippingEnable && !dispatcherEnable && !fbiEnable,
          "control outputs after reset");
    expect_reg(REG_STATUS, 32'h0000_0004, "STATUS reset (empty)");
    expect_reg(REG_FB_BASE, 0, "FB_BASE reset");
    expect_reg(REG_FB_SPAN, 0, "FB_SPAN reset");
    expect_reg(REG_CLIP_X, 7, "CLIP_X");
    expect_reg(REG_CLIP_Y, 32'hFFFF_FFFD, "CLIP_Y");
    expect_reg(REG_CLIP_W, 32'h1111_1111, "CLIP_W");
    expect_reg(REG_CLIP_H, 32'h1111_1111, "CLIP_H");
    expect_reg(REG_DUMMY_1, 32'hD0D0_0D0D, "DUMMY_1");
    expect_reg(REG_DUMMY_2, 32'hE0E0_0E0E, "DUMMY_2");
    expect_reg(REG_DUMMY_3, 32'h0, "DUMMY_3 reset");
    expect_reg(8'h0B, 32'h0, "unmapped offset");

    bus_write(REG_FB_BASE, 32'h0800_0000);
    bus_write(REG_FB_SPAN, 32'd1536000);
    bus_write(REG_DUMMY_3, 32'hCAFE_F00D);
    bus_write(REG_DUMMY_1, 32'h0);           // read-only: ignored
    bus_write(REG_CLIP_X, 32'h55);           // read-only: ignored
    expect_reg(REG_FB_BASE, 32'h0800_0000, "FB_BASE");
    expect_reg(REG_FB_SPAN, 32'd1536000, "FB_SPAN");
    expect_reg(REG_DUMMY_3, 32'hCAFE_F00D, "DUMMY_3");
    expect_reg(REG_DUMMY_1, 32'hD0D0_0D0D, "DUMMY_1 after write");
    check(fbAddrBase == 32'h0800_0000 && fbAddrSpan == 32'd1536000, "base/span outputs");

    bus_write(REG_CONTROL, 32'hFFFF_F8FF);   // every bit except the CLR bits
    expect_reg(REG_CONTROL, 32'h0003_0003, "CONTROL reserved bits dropped");
    check(dispatcherEnable && fbiEnable && boundaryChecksEnable && clippingEnable, "enables set");

    // CLR bits: one-cycle pulses, then back to 0
    bus_write(REG_CONTROL, 32'h0003_0703);
    repeat (3) @(posedge clock);
    check(clr_pulses[0] == 1 && clr_pulses[1] == 1 && clr_pulses[2] == 1,
          $sformatf("clear pulses %0d %0d %0d", clr_pulses[0], clr_pulses[1], clr_pulses[2]));
    expect_reg(REG_CONTROL, 32'h0003_0003, "CLR bits cleared themselves");

    // command FIFO writes
    for (int i = 0; i < 6; i++) bus_write(REG_CMD_FIFO, 32'h100 + i);
    repeat (2) @(posedge clock);
    check(pushed.size() == 6, "six words pushed");
    for (int i = 0; i < 6 && i < pushed.size(); i++) check(pushed[i] == 32'h100 + i, "pushed word");

    // status packing
    @(negedge clock);
    coreBusy = 1; cmdFifoFull = 1; cmdFifoEmpty = 0; cmdFifoUsedWords = 7'd64;
    expect_reg(REG_STATUS, 32'h0040_0003, "STATUS busy/full/used");
    coreBusy = 0; cmdFifoFull = 0; cmdFifoUsedWords = 7'd5;
    expect_reg(REG_STATUS, 32'h0005_0000, "STATUS used words");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
