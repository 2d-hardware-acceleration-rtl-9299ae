// Command & control slave interface of the Silizium core, with its registers.
//
// An Avalon-MM slave (8-bit word address, 32-bit data) through which the CPU
// configures the core, queues commands and reads status. Register map (word
// offsets): 0x00 VERSION (r), 0x01 CMD_FIFO (w), 0x02 STATUS (r),
// 0x03 CONTROL (rw), 0x04 FB_BASE (rw), 0x05 FB_SPAN (rw), 0x06..0x09
// CLIP_X/Y/W/H (r, the mask currently used by the framebuffer interface),
// 0x0D DUMMY_1 = 0xD0D00D0D (r), 0x0E DUMMY_2 = 0xE0E00E0E (r), 0x0F DUMMY_3
// (rw, unused scratch). Other offsets read as 0 and ignore writes.
//
// STATUS: bit 0 BUSY, bit 1 command FIFO full, bit 2 command FIFO empty,
// bits 31:16 command FIFO used words (right-aligned, upper bits 0).
// CONTROL (reset 0x00010000): bit 0 EN1 dispatcher enable, bit 1 EN2
// framebuffer interface enable, bits 8/9/10 CLR1/CLR2/CLR3 clear the command
// FIFO / FBI write-FIFO / FBI read-FIFO, bit 16 BCEN boundary checks, bit 17
// CMEN clipping mask. A CLR bit written as 1 drives its clear output for one
// cycle and then returns to 0 by itself.
//
// Timing: writes complete in the cycle they are presented (waitrequest stays
// 0). A word written to CMD_FIFO is registered and pushed into the command
// FIFO in the following cycle; it is lost if the FIFO is full. Reads take one
// wait state: waitrequest is 1 in the first cycle of a read, and readdata is
// valid in the cycle waitrequest is 0.
// The register map, bit positions and reset values follow the documented core;
// the VERSION value, the zero-wait write and the one-wait read are this
// design's choices.
module silizium_slave_if
  import silizium_pkg::*;
#(
  parameter logic [31:0] VERSION      = 32'h0000_0001,
  parameter int          CMD_FIFO_EXP = 6,
  parameter int          COORD_BITS   = 32
) (
  input  logic                        clock,
  input  logic                        reset,
  // Avalon-MM slave
  input  logic [7:0]                  avalon_slave_address,
  input  logic                        avalon_slave_read,
  output logic [31:0]                 avalon_slave_readdata,
  input  logic                        avalon_slave_write,
  input  logic [31:0]                 avalon_slave_writedata,
  output logic                        avalon_slave_waitrequest,
  // command FIFO
  output logic                        cmdFifoWrite,
  output logic [31:0]                 cmdFifoData,
  input  logic                        cmdFifoFull,
  input  logic                        cmdFifoEmpty,
  input  logic [CMD_FIFO_EXP:0]       cmdFifoUsedWords,
  // status from the rest of the core
  input  logic                        coreBusy,
  input  logic signed [COORD_BITS-1:0] clipX,
  input  logic signed [COORD_BITS-1:0] clipY,
  input  logic signed [COORD_BITS-1:0] clipWidth,
  input  logic signed [COORD_BITS-1:0] clipHeight,
  // configuration and control
  output logic                        dispatcherEnable,
  output logic                        fbiEnable,
  output logic                        cmdFifoClear,
  output logic                        writeFifoClear,
  output logic                        readFifoClear,
  output logic                        boundaryChecksEnable,
  output logic                        clippingEnable,
  output logic [31:0]                 fbAddrBase,
  output logic [31:0]                 fbAddrSpan
);

  logic [31:0] control, dummy3;
  logic        rd_done;
  logic [31:0] status, read_mux;

  always_comb begin
    status = '0;
    status[STATUS_BUSY] = coreBusy;
    status[STATUS_FULL] = cmdFifoFull;
    status[STATUS_MPTY] = cmdFifoEmpty;
    status[31:STATUS_CMDFUW_LSB] = 16'(cmdFifoUsedWords);
  end

  always_comb begin
    unique case (avalon_slave_address)
      REG_VERSION: read_mux = VERSION;
      REG_STATUS:  read_mux = status;
      REG_CONTROL: read_mux = control;
      REG_FB_BASE: read_mux = fbAddrBase;
      REG_FB_SPAN: read_mux = fbAddrSpan;
      REG_CLIP_X:  read_mux = 32'(clipX);
      REG_CLIP_Y:  read_mux = 32'(clipY);
      REG_CLIP_W:  read_mux = 32'(clipWidth);
      REG_CLIP_H:  read_mux = 32'(clipHeight);
      REG_DUMMY_1: read_mux = DUMMY_1_VALUE;
      REG_DUMMY_2: read_mux = DUMMY_2_VALUE;
      REG_DUMMY_3: read_mux = dummy3;
      default:     read_mux = '0;
    endcase
  end

  assign avalon_slave_waitrequest = avalon_slave_read && !rd_done;

  assign dispatcherEnable     = control[CTRL_EN1];
  assign fbiEnable            = control[CTRL_EN2];
  assign cmdFifoClear         = control[CTRL_CLR1];
  assign writeFifoClear       = control[CTRL_CLR2];
  assign readFifoClear        = control[CTRL_CLR3];
  assign boundaryChecksEnable = control[CTRL_BCEN];
  assign clippingEnable       = control[CTRL_CMEN];

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      control               <= CONTROL_RESET;
      fbAddrBase            <= '0;
      fbAddrSpan            <= '0;
      dummy3                <= '0;
      rd_done               <= 1'b0;
      avalon_slave_readdata <= '0;
      cmdFifoWrite          <= 1'b0;
      cmdFifoData           <= '0;
    end else begin
      // one wait state per read; data is sampled in the waiting cycle
      rd_done <= avalon_slave_read && !rd_done;
      if (avalon_slave_read && !rd_done) avalon_slave_readdata <= read_mux;

      // clear bits return to 0 after one cycle
      control[CTRL_CLR1] <= 1'b0;
      control[CTRL_CLR2] <= 1'b0;
      control[CTRL_CLR3] <= 1'b0;

      cmdFifoWrite <= avalon_slave_write && (avalon_slave_address == REG_CMD_FIFO);
      if (avalon_slave_write && avalon_slave_address == REG_CMD_FIFO)
        cmdFifoData <= avalon_slave_writedata;

      if (avalon_slave_write) begin
        unique case (avalon_slave_address)
          REG_CONTROL: control    <= avalon_slave_writedata & CONTROL_MASK;
          REG_FB_BASE: fbAddrBase <= avalon_slave_writedata;
          REG_FB_SPAN: fbAddrSpan <= avalon_slave_writedata;
          REG_DUMMY_3: dummy3     <= avalon_slave_writedata;
          default: ;
        endcase
      end
    end
  end

  assert property (@(posedge clock) disable iff (reset)
                   !(avalon_slave_read && avalon_slave_write))
    else $error("slave read and write asserted together");

endmodule
