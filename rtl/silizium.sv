// Silizium: a 2D rendering accelerator for small SoCs.
//
// A CPU offloads simple drawing jobs (single pixels, solid rectangles, a
// rectangular clipping mask) to this core through an Avalon-MM slave and goes
// on with other work while the core writes the pixels into an existing
// framebuffer through an Avalon-MM master. The core keeps no framebuffer of
// its own and does not care where the framebuffer lives or how it is shown.
//
// Data path: slave interface and registers -> command FIFO (2**CMD_FIFO_EXP
// 32-bit words) -> dispatcher, which starts one renderer per command ->
// framebuffer access mux -> framebuffer interface (write-FIFO, boundary and
// clipping checks, base-address offset, Avalon-MM master, read-FIFO).
// Commands are executed strictly in order; the clipping mask travels through
// the same FIFOs as the pixels, so a mask change affects exactly the commands
// queued after it.
//
// Ports: clock, reset (active high, asynchronous), the Avalon-MM slave
// (8-bit word address, 32-bit data, waitrequest) and the Avalon-MM master
// (byte address FB_ADDR_BITS, data FB_DATA_BITS, waitrequest, readdatavalid,
// burstcount, always 1). No renderer of this version reads the framebuffer,
// so the read-FIFO of the framebuffer interface has no consumer here; it is
// still built, cleared by CLR3 and fed by read commands in the write-FIFO.
//
// Timing: a queued rectangle produces one pixel per clock into the write-FIFO;
// the framebuffer interface writes one pixel every four clocks when the
// memory does not stall, so long jobs are paced by the write-FIFO filling up.
// Parameter defaults are the documented ones. The 32-bit slave registers
// limit FB_ADDR_BITS to at most 32.
module silizium
  import silizium_pkg::*;
#(
  parameter int DATA_BITS          = 32,
  parameter int COORD_BITS         = 32,
  parameter int COLOR_BITS         = 32,
  parameter int CMD_FIFO_EXP       = 6,
  parameter int FB_ADDR_BITS       = 32,
  parameter int FB_DATA_BITS       = 32,
  parameter int FB_BURSTCOUNT_BITS = 2,
  parameter int FB_BYTES_PER_PIXEL = 4,
  parameter int FB_WIDTH           = 800,
  parameter int FB_HEIGHT          = 480,
  parameter int FB_WRITE_FIFO_EXP  = 8,
  parameter int FB_READ_FIFO_EXP   = 4
) (
  input  logic                          clock,
  input  logic                          reset,
  // Avalon-MM slave: command and control
  input  logic [7:0]                    avalon_slave_address,
  input  logic                          avalon_slave_read,
  output logic [31:0]                   avalon_slave_readdata,
  input  logic                          avalon_slave_write,
  input  logic [31:0]                   avalon_slave_writedata,
  output logic                          avalon_slave_waitrequest,
  // Avalon-MM master: framebuffer memory
  output logic [FB_ADDR_BITS-1:0]       avalon_master_address,
  output logic                          avalon_master_write,
  output logic [FB_DATA_BITS-1:0]       avalon_master_writedata,
  input  logic                          avalon_master_waitrequest,
  output logic                          avalon_master_read,
  input  logic [FB_DATA_BITS-1:0]       avalon_master_readdata,
  input  logic                          avalon_master_readdatavalid,
  output logic [FB_BURSTCOUNT_BITS-1:0] avalon_master_burstcount
);

  // command FIFO
  logic                   cf_wr, cf_empty, cf_full, cf_ack, cf_clear;
  logic [31:0]            cf_wdata;
  logic [DATA_BITS-1:0]   cf_rdata;
  logic [CMD_FIFO_EXP:0]  cf_used;

  // control
  logic        disp_en, fbi_en, wf_clear, rf_clear, bc_en, cm_en;
  logic [31:0] fb_base, fb_span;
  logic        disp_busy, fbi_busy;

  // renderers -> framebuffer interface
  logic [FB_ADDR_BITS-1:0]              fbi_bus_addr;
  logic [FB_DATA_BITS-1:0]              fbi_bus_data;
  logic                                 fbi_bus_write, fbi_cmd_write, fbi_ready;
  logic [FB_ADDR_BITS+FB_DATA_BITS-1:0] fbi_cmd_data;

  logic signed [COORD_BITS-1:0] clip_x, clip_y, clip_w, clip_h;

  // read-FIFO side of the framebuffer interface (no reader in this version)
  logic                      rf_avail, rf_valid;
  logic [FB_DATA_BITS-1:0]   rf_data;
  logic [FB_WRITE_FIFO_EXP:0] wf_used;
  logic [FB_READ_FIFO_EXP:0]  rf_used;

  silizium_slave_if #(
    .CMD_FIFO_EXP(CMD_FIFO_EXP), .COORD_BITS(COORD_BITS)
  ) u_slave (
    .clock, .reset,
    .avalon_slave_address, .avalon_slave_read, .avalon_slave_readdata,
    .avalon_slave_write, .avalon_slave_writedata, .avalon_slave_waitrequest,
    .cmdFifoWrite(cf_wr), .cmdFifoData(cf_wdata), .cmdFifoFull(cf_full),
    .cmdFifoEmpty(cf_empty), .cmdFifoUsedWords(cf_used),
    .coreBusy(disp_busy || fbi_busy || (disp_en && !cf_empty)),
    .clipX(clip_x), .clipY(clip_y), .clipWidth(clip_w), .clipHeight(clip_h),
    .dispatcherEnable(disp_en), .fbiEnable(fbi_en), .cmdFifoClear(cf_clear),
    .writeFifoClear(wf_clear), .readFifoClear(rf_clear),
    .boundaryChecksEnable(bc_en), .clippingEnable(cm_en),
    .fbAddrBase(fb_base), .fbAddrSpan(fb_span)
  );

  silizium_fifo #(.WIDTH(DATA_BITS), .NUM_WORDS_EXP(CMD_FIFO_EXP)) u_cmd_fifo (
    .clock, .reset, .clear(cf_clear),
    .wr_en(cf_wr), .wr_data(DATA_BITS'(cf_wdata)), .rd_ack(cf_ack), .rd_data(cf_rdata),
    .empty(cf_empty), .full(cf_full), .used_words(cf_used)
  );

  silizium_dispatcher #(
    .DATA_BITS(DATA_BITS), .COORD_BITS(COORD_BITS), .COLOR_BITS(COLOR_BITS),
    .FB_ADDR_BITS(FB_ADDR_BITS), .FB_DATA_BITS(FB_DATA_BITS),
    .FB_BYTES_PER_PIXEL(FB_BYTES_PER_PIXEL), .FB_WIDTH(FB_WIDTH), .FB_HEIGHT(FB_HEIGHT)
  ) u_dispatcher (
    .clock, .reset,
    .fifoEmpty(cf_empty), .fifoRdAck(cf_ack), .fifoData(cf_rdata),
    .enable(disp_en), .busy(disp_busy),
    .fbiBusAddr(fbi_bus_addr), .fbiBusData(fbi_bus_data), .fbiBusWrite(fbi_bus_write),
    .fbiCmdData(fbi_cmd_data), .fbiCmdWrite(fbi_cmd_write), .fbiIsReady(fbi_ready)
  );

  silizium_fbi #(
    .COORD_BITS(COORD_BITS), .ADDR_BITS(FB_ADDR_BITS), .DATA_BITS(FB_DATA_BITS),
    .BURSTCOUNT_BITS(FB_BURSTCOUNT_BITS), .BYTES_PER_PIXEL(FB_BYTES_PER_PIXEL),
    .FB_WIDTH(FB_WIDTH), .WRITE_FIFO_EXP(FB_WRITE_FIFO_EXP), .READ_FIFO_EXP(FB_READ_FIFO_EXP)
  ) u_fbi (
    .clock, .reset, .enable(fbi_en),
    .boundaryChecksEnable(bc_en), .clippingEnable(cm_en),
    .avalon_master_address, .avalon_master_write, .avalon_master_writedata,
    .avalon_master_waitrequest, .avalon_master_read, .avalon_master_readdata,
    .avalon_master_readdatavalid, .avalon_master_burstcount,
    .fbAddrBase(FB_ADDR_BITS'(fb_base)), .fbAddrSpan(FB_ADDR_BITS'(fb_span)),
    .busAddr(fbi_bus_addr), .busData(fbi_bus_data), .busWrite(fbi_bus_write),
    .cmdData(fbi_cmd_data), .cmdWrite(fbi_cmd_write), .ready(fbi_ready),
    .readFifoDataAvailable(rf_avail), .readFifoData(rf_data),
    .readFifoDataValid(rf_valid), .readFifoReadAck(1'b0),
    .writeFifoUsedWords(wf_used), .writeFifoClear(wf_clear),
    .readFifoUsedWords(rf_used), .readFifoClear(rf_clear),
    .clipX(clip_x), .clipY(clip_y), .clipWidth(clip_w), .clipHeight(clip_h),
    .busy(fbi_busy)
  );

endmodule
