// Filled-rectangle renderer: fills a rectangle with one solid color.
//
// Started by the dispatcher after the command word 0x2 has been taken from
// the command FIFO. It moves Idle -> Fetch -> Execute -> Idle like the pixel
// renderer. Fetch takes five parameters: X, Y, width, height, color. Execute
// runs two counters, countX over the width and countY over the height, and
// writes one pixel per cycle in which fbIsReady is 1, at
//   (X + countX + FB_WIDTH * (countY + Y)) * FB_BYTES_PER_PIXEL
// row by row, left to right. A width or height of zero (or below) draws
// nothing. No clipping is done here: pixels outside the screen or the clipping
// mask are discarded by the framebuffer interface.
//
// Interface: the shared renderer port set (see the pixel renderer).
// Timing: one pixel per clock while the framebuffer interface is ready; start
// to first pixel write is 7 cycles when all parameters are waiting.
// Parameter order, counters and address formula follow the documented core;
// treating non-positive sizes as empty is this design's choice.
module silizium_renderer_rect #(
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
  logic [2:0]                   fetch_cnt;
  logic signed [COORD_BITS-1:0] x, y, width, height;
  logic signed [COORD_BITS-1:0] count_x, count_y;
  logic [COLOR_BITS-1:0]        color;

  assign busy        = (state != S_IDLE);
  assign readAck     = (state == S_FETCH) && dataInReady;
  assign fbiBusWrite = (state == S_EXECUTE) && fbIsReady;
  assign fbiBusData  = FB_DATA_BITS'(color);
  assign fbiCmdData  = '0;
  assign fbiCmdWrite = 1'b0;

  logic signed [COORD_BITS-1:0] pixel_index;
  assign pixel_index = x + count_x + COORD_BITS'(FB_WIDTH) * (count_y + y);
  assign fbiBusAddr  = FB_ADDR_BITS'(pixel_index * COORD_BITS'(FB_BYTES_PER_PIXEL));

  logic last_x, last_y;
  assign last_x = (count_x + 1 >= width);
  assign last_y = (count_y + 1 >= height);

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      state     <= S_IDLE;
      fetch_cnt <= '0;
      x         <= '0;
      y         <= '0;
      width     <= '0;
      height    <= '0;
      count_x   <= '0;
      count_y   <= '0;
      color     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          fetch_cnt <= '0;
          state     <= S_FETCH;
        end
        S_FETCH: if (dataInReady) begin
          unique case (fetch_cnt)
            3'd0:    x      <= COORD_BITS'(dataIn);
            3'd1:    y      <= COORD_BITS'(dataIn);
            3'd2:    width  <= COORD_BITS'(dataIn);
            3'd3:    height <= COORD_BITS'(dataIn);
            default: color  <= COLOR_BITS'(dataIn);
          endcase
          fetch_cnt <= fetch_cnt + 1'b1;
          if (fetch_cnt == 3'd4) begin                  // fetchDone
            count_x <= '0;
            count_y <= '0;
            state   <= (width > 0 && height > 0) ? S_EXECUTE : S_IDLE;
          end
        end
        S_EXECUTE: if (fbIsReady) begin
          if (last_x) begin
            count_x <= '0;
            count_y <= count_y + 1;
            if (last_y) state <= S_IDLE;
          end else begin
            count_x <= count_x + 1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clock) disable iff (reset) start |-> (state == S_IDLE))
    else $error("rectangle renderer started while busy");

endmodule
