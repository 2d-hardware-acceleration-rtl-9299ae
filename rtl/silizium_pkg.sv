// Shared constants and types of the Silizium 2D rendering core.
//
// Silizium takes rendering commands from a CPU through an Avalon-MM slave,
// queues them in a command FIFO and lets a dispatcher hand each command to a
// dedicated hardware renderer. Renderers write pixels (or commands) into the
// write-FIFO of the framebuffer interface (FBI), which turns them into
// Avalon-MM master transactions towards the framebuffer memory.
//
// This package holds what several modules agree on: the command codes written
// to the command FIFO, the command codes a renderer writes into the FBI
// write-FIFO, the register map of the slave interface and the bit positions in
// the STATUS and CONTROL registers. All codes and offsets are the documented
// ones; the enum encodings of the state machines are this design's own.
package silizium_pkg;

  // Command codes written by the CPU as the first word of a rendering command.
  typedef enum logic [31:0] {
    CMD_PIXEL = 32'h0000_0001,   // X, Y, color
    CMD_RECT  = 32'h0000_0002,   // X, Y, width, height, color
    CMD_CLIP  = 32'h0000_0003    // X, Y, width, height
  } render_cmd_e;

  // Command constants carried in an FBI write-FIFO word whose D/C bit is 1.
  localparam logic [7:0] FBI_CMD_CLIP     = 8'h01;  // X, Y, width, height follow
  localparam logic [7:0] FBI_CMD_LIN_READ = 8'h02;  // start address, count follow
  localparam logic [7:0] FBI_CMD_RECT_READ = 8'h03; // start address, width, height follow

  // Register word offsets of the Avalon-MM slave (8-bit word address).
  localparam logic [7:0] REG_VERSION  = 8'h00;
  localparam logic [7:0] REG_CMD_FIFO = 8'h01;
  localparam logic [7:0] REG_STATUS   = 8'h02;
  localparam logic [7:0] REG_CONTROL  = 8'h03;
  localparam logic [7:0] REG_FB_BASE  = 8'h04;
  localparam logic [7:0] REG_FB_SPAN  = 8'h05;
  localparam logic [7:0] REG_CLIP_X   = 8'h06;
  localparam logic [7:0] REG_CLIP_Y   = 8'h07;
  localparam logic [7:0] REG_CLIP_W   = 8'h08;
  localparam logic [7:0] REG_CLIP_H   = 8'h09;
  localparam logic [7:0] REG_DUMMY_1  = 8'h0D;
  localparam logic [7:0] REG_DUMMY_2  = 8'h0E;
  localparam logic [7:0] REG_DUMMY_3  = 8'h0F;

  // Fixed register contents.
  localparam logic [31:0] DUMMY_1_VALUE = 32'hD0D0_0D0D;
  localparam logic [31:0] DUMMY_2_VALUE = 32'hE0E0_0E0E;
  localparam logic [31:0] CONTROL_RESET = 32'h0001_0000;  // BCEN set
  localparam logic [31:0] CLIP_WH_RESET = 32'h1111_1111;

  // STATUS bit positions.
  localparam int STATUS_BUSY = 0;
  localparam int STATUS_FULL = 1;
  localparam int STATUS_MPTY = 2;
  localparam int STATUS_CMDFUW_LSB = 16;

  // CONTROL bit positions.
  localparam int CTRL_EN1  = 0;   // dispatcher enable
  localparam int CTRL_EN2  = 1;   // framebuffer interface enable
  localparam int CTRL_CLR1 = 8;   // clear command FIFO
  localparam int CTRL_CLR2 = 9;   // clear FBI write-FIFO
  localparam int CTRL_CLR3 = 10;  // clear FBI read-FIFO
  localparam int CTRL_BCEN = 16;  // boundary check enable
  localparam int CTRL_CMEN = 17;  // clipping mask enable

  // Mask of the writable CONTROL bits (reserved bits read back as 0).
  localparam logic [31:0] CONTROL_MASK = (32'h1 << CTRL_EN1) | (32'h1 << CTRL_EN2) |
                                         (32'h1 << CTRL_CLR1) | (32'h1 << CTRL_CLR2) |
                                         (32'h1 << CTRL_CLR3) | (32'h1 << CTRL_BCEN) |
                                         (32'h1 << CTRL_CMEN);

  // Renderer selected by the dispatcher.
  typedef enum logic [1:0] {
    SEL_NONE  = 2'd0,
    SEL_PIXEL = 2'd1,
    SEL_RECT  = 2'd2,
    SEL_CLIP  = 2'd3
  } renderer_sel_e;

endpackage
