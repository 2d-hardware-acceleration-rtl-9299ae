// Pixel renderer: draws a single pixel.
//
// The dispatcher pulses start when it has taken the command word 0x1 from the
// command FIFO; the FIFO then shows the first parameter. The renderer moves
// Idle -> Fetch -> Execute -> Idle. In Fetch a counter takes the three
// parameters X, Y and color, one per cycle in which dataInReady is 1, and
// acknowledges each with readAck. In Execute it waits for fbIsReady and
// writes one pixel into the framebuffer interface at the relative byte address
//   (X + FB_WIDTH * Y) * FB_BYTES_PER_PIXEL
// computed in two's complement, so negative or too large coordinates give an
// address that the framebuffer interface rejects.
//
// Interface: the renderer port set shared by all renderers (start,
// dataInReady/dataIn/readAck towards the command FIFO, busy towards the
// dispatcher, fbiBus*/fbiCmd*/fbIsReady towards the framebuffer interface).
// busy is 1 from the cycle after start until the pixel has been handed over.
// Timing: with parameters waiting, start to pixel write is 4 cycles.
// The state machine, parameter order and address formula are the documented
// ones; the color is truncated or zero-extended to FB_DATA_BITS.
module silizium_renderer_pixel #(
  parameter int DATA_BITS          = 32,
  parameter int COORD_BITS         = 32,
  parameter int COLOR_BITS         = 32,
  parameter int FB_ADDR_BITS       = 32,
  parameter int FB_DATA_BITS       = 32,
  parameter int FB_BYTES_PER_PIXEL = 4,
  parameter int FB_WIDTH           = 800,
  parameter int FB_HEIGHT          = 480
) (
  input  logic                               clock,
  input  logic                               reset,
  input  logic                               start,
  input  logic                               dataInReady,
  input  logic [DATA_BITS-1:0]               dataIn,
  output logic                               readAck,
  output logic                               busy,
  output logic [FB_ADDR_BITS-1:0]            fbiBusAddr,
  output logic [FB_DATA_BITS-1:0]            fbiBusData,
  output logic                               fbiBusWrite,
  output logic [FB_ADDR_BITS+FB_DATA_BITS-1:0] fbiCmdData,
  output logic                               fbiCmdWrite,
  input  logic                               fbIsReady
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_EXECUTE} state_e;

  state_e                       state;
  logic [1:0]                   fetch_cnt;
  logic signed [COORD_BITS-1:0] x, y;
  logic [COLOR_BITS-1:0]        color;

  assign busy        = (state != S_IDLE);
  assign readAck     = (state == S_FETCH) && dataInReady;
  assign fbiBusWrite = (state == S_EXECUTE) && fbIsReady;
  assign fbiBusData  = FB_DATA_BITS'(color);
  assign fbiCmdData  = '0;
  assign fbiCmdWrite = 1'b0;

  logic signed [COORD_BITS-1:0] pixel_index;
  assign pixel_index = x + COORD_BITS'(FB_WIDTH) * y;
  assign fbiBusAddr  = FB_ADDR_BITS'(pixel_index * COORD_BITS'(FB_BYTES_PER_PIXEL));

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      state     <= S_IDLE;
      fetch_cnt <= '0;
      x         <= '0;
      y         <= '0;
      color     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          fetch_cnt <= '0;
          state     <= S_FETCH;
        end
        S_FETCH: if (dataInReady) begin
          unique case (fetch_cnt)
            2'd0:    x     <= COORD_BITS'(dataIn);
            2'd1:    y     <= COORD_BITS'(dataIn);
            default: color <= COLOR_BITS'(dataIn);
          endcase
          fetch_cnt <= fetch_cnt + 1'b1;
          if (fetch_cnt == 2'd2) state <= S_EXECUTE;   // fetchDone
        end
        S_EXECUTE: if (fbIsReady) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The dispatcher only pulses start while the renderer is idle.
  assert property (@(posedge clock) disable iff (reset) start |-> (state == S_IDLE))
    else $error("pixel renderer started while busy");

endmodule
