// Dispatcher of the Silizium core, with the renderers it owns.
//
// The dispatcher takes the first word of a command (the command code) from
// the command FIFO and starts the renderer that handles it: 0x1 pixel,
// 0x2 filled rectangle, 0x3 clipping mask. It does not know how many
// parameters a command has; the started renderer takes its own parameters
// from the command FIFO. Only one renderer works at a time, so the next
// command word is taken only after the running renderer has dropped busy.
// Unknown command codes are taken from the FIFO and dropped.
//
// Inside are the three renderers, a selector that routes start and the
// command-FIFO read acknowledge, and the framebuffer access mux that connects
// the selected renderer's fbiBus*/fbiCmd* outputs to the framebuffer
// interface. New renderers are added by instantiating them here, giving them
// a command code and a selector value.
//
// States: Idle (pop command word when enabled and the FIFO is not empty) ->
// Start (one-cycle start pulse; the FIFO now shows the first parameter) ->
// Wait (the renderer raises busy in this cycle) -> Run (until busy drops) ->
// Idle. busy is 1 outside Idle. A command word thus costs one cycle in Idle,
// and a command following a finished one starts three cycles later.
// The split into dispatcher, selector and mux and the start/busy protocol
// follow the documented core; the state encoding and the handling of unknown
// codes are this design's choices.
module silizium_dispatcher
  import silizium_pkg::*;
#(
  parameter int DATA_BITS          = 32,
  parameter int COORD_BITS         = 32,
  parameter int COLOR_BITS         = 32,
  parameter int FB_ADDR_BITS       = 32,
  parameter int FB_DATA_BITS       = 32,
  parameter int FB_BYTES_PER_PIXEL = 4,
  parameter int FB_WIDTH           = 800,
  parameter int FB_HEIGHT          = 480
) (
  input  logic                                 clock,
  input  logic                                 reset,
  // command FIFO
  input  logic                                 fifoEmpty,
  output logic                                 fifoRdAck,
  input  logic [DATA_BITS-1:0]                 fifoData,
  // control
  input  logic                                 enable,
  output logic                                 busy,
  // framebuffer interface write side
  output logic [FB_ADDR_BITS-1:0]              fbiBusAddr,
  output logic [FB_DATA_BITS-1:0]              fbiBusData,
  output logic                                 fbiBusWrite,
  output logic [FB_ADDR_BITS+FB_DATA_BITS-1:0] fbiCmdData,
  output logic                                 fbiCmdWrite,
  input  logic                                 fbiIsReady
);

  localparam int NR = 3;   // renderers: 0 pixel, 1 rectangle, 2 clipping

  typedef enum logic [1:0] {S_IDLE, S_START, S_WAIT, S_RUN} state_e;

  state_e        state;
  renderer_sel_e sel;

  logic [NR-1:0]                              r_start, r_ack, r_busy, r_bus_write, r_cmd_write;
  logic [NR-1:0][FB_ADDR_BITS-1:0]            r_bus_addr;
  logic [NR-1:0][FB_DATA_BITS-1:0]            r_bus_data;
  logic [NR-1:0][FB_ADDR_BITS+FB_DATA_BITS-1:0] r_cmd_data;

  logic          take_cmd;
  renderer_sel_e decoded;

  always_comb begin
    unique case (fifoData)
      DATA_BITS'(CMD_PIXEL): decoded = SEL_PIXEL;
      DATA_BITS'(CMD_RECT):  decoded = SEL_RECT;
      DATA_BITS'(CMD_CLIP):  decoded = SEL_CLIP;
      default:               decoded = SEL_NONE;
    endcase
  end

  assign take_cmd = (state == S_IDLE) && enable && !fifoEmpty;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      state <= S_IDLE;
      sel   <= SEL_NONE;
    end else begin
      unique case (state)
        S_IDLE:  if (take_cmd) begin
          sel <= decoded;
          if (decoded != SEL_NONE) state <= S_START;
        end
        S_START: state <= S_WAIT;
        S_WAIT:  state <= S_RUN;
        S_RUN:   if (!r_busy[sel-1]) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Selector: start demux and acknowledge mux.
  always_comb begin
    r_start = '0;
    if (state == S_START && sel != SEL_NONE) r_start[sel-1] = 1'b1;
  end

  always_comb begin
    fifoRdAck = take_cmd;
    if (state != S_IDLE && sel != SEL_NONE) fifoRdAck = r_ack[sel-1];
  end

  // Framebuffer access mux.
  always_comb begin
    fbiBusAddr  = '0;
    fbiBusData  = '0;
    fbiBusWrite = 1'b0;
    fbiCmdData  = '0;
    fbiCmdWrite = 1'b0;
    if (sel != SEL_NONE) begin
      fbiBusAddr  = r_bus_addr[sel-1];
      fbiBusData  = r_bus_data[sel-1];
      fbiBusWrite = r_bus_write[sel-1];
      fbiCmdData  = r_cmd_data[sel-1];
      fbiCmdWrite = r_cmd_write[sel-1];
    end
  end

  silizium_renderer_pixel #(
    .DATA_BITS(DATA_BITS), .COORD_BITS(COORD_BITS), .COLOR_BITS(COLOR_BITS),
    .FB_ADDR_BITS(FB_ADDR_BITS), .FB_DATA_BITS(FB_DATA_BITS),
    .FB_BYTES_PER_PIXEL(FB_BYTES_PER_PIXEL), .FB_WIDTH(FB_WIDTH), .FB_HEIGHT(FB_HEIGHT)
  ) u_pixel (
    .clock, .reset, .start(r_start[0]), .dataInReady(!fifoEmpty), .dataIn(fifoData),
    .readAck(r_ack[0]), .busy(r_busy[0]),
    .fbiBusAddr(r_bus_addr[0]), .fbiBusData(r_bus_data[0]), .fbiBusWrite(r_bus_write[0]),
    .fbiCmdData(r_cmd_data[0]), .fbiCmdWrite(r_cmd_write[0]), .fbIsReady(fbiIsReady)
  );

  silizium_renderer_rect #(
    .DATA_BITS(DATA_BITS), .COORD_BITS(COORD_BITS), .COLOR_BITS(COLOR_BITS),
    .FB_ADDR_BITS(FB_ADDR_BITS), .FB_DATA_BITS(FB_DATA_BITS),
    .FB_BYTES_PER_PIXEL(FB_BYTES_PER_PIXEL), .FB_WIDTH(FB_WIDTH), .FB_HEIGHT(FB_HEIGHT)
  ) u_rect (
    .clock, .reset, .start(r_start[1]), .dataInReady(!fifoEmpty), .dataIn(fifoData),
    .readAck(r_ack[1]), .busy(r_busy[1]),
    .fbiBusAddr(r_bus_addr[1]), .fbiBusData(r_bus_data[1]), .fbiBusWrite(r_bus_write[1]),
    .fbiCmdData(r_cmd_data[1]), .fbiCmdWrite(r_cmd_write[1]), .fbIsReady(fbiIsReady)
  );

  silizium_renderer_clip #(
    .DATA_BITS(DATA_BITS), .COORD_BITS(COORD_BITS), .COLOR_BITS(COLOR_BITS),
    .FB_ADDR_BITS(FB_ADDR_BITS), .FB_DATA_BITS(FB_DATA_BITS),
    .FB_BYTES_PER_PIXEL(FB_BYTES_PER_PIXEL), .FB_WIDTH(FB_WIDTH), .FB_HEIGHT(FB_HEIGHT)
  ) u_clip (
    .clock, .reset, .start(r_start[2]), .dataInReady(!fifoEmpty), .dataIn(fifoData),
    .readAck(r_ack[2]), .busy(r_busy[2]),
    .fbiBusAddr(r_bus_addr[2]), .fbiBusData(r_bus_data[2]), .fbiBusWrite(r_bus_write[2]),
    .fbiCmdData(r_cmd_data[2]), .fbiCmdWrite(r_cmd_write[2]), .fbIsReady(fbiIsReady)
  );

  // A renderer must raise busy the cycle after its start pulse.
  assert property (@(posedge clock) disable iff (reset)
                   (state == S_WAIT) |-> r_busy[sel-1])
    else $error("renderer did not raise busy after start");

endmodule
