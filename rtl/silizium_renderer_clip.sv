// Clipping renderer: changes the clipping mask of the framebuffer interface.
//
// It draws nothing. Started by the dispatcher after the command word 0x3 has
// been taken from the command FIFO, it sends the framebuffer-interface command
// 0x01 through fbiCmdData/fbiCmdWrite and then forwards the four parameters X,
// Y, width and height from the command FIFO, each in the same cycle in which
// it is acknowledged on the command FIFO. Fetching and executing are thus one
// state (Idle -> Fetch -> Idle). Going through the write-FIFO keeps the new
// mask in order with the pixels already queued before it.
//
// Interface: the shared renderer port set (see the pixel renderer).
// Timing: five write-FIFO words in five cycles when the FIFO has room and the
// parameters are waiting; busy is 1 from the cycle after start until the last
// parameter is forwarded.
// The command code and parameter order are the documented ones; sending the
// command word in the first Fetch cycle is this design's choice.
module silizium_renderer_clip #(
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
  import silizium_pkg::*;

  localparam int CMD_BITS = FB_ADDR_BITS + FB_DATA_BITS;

  typedef enum logic {S_IDLE, S_FETCH} state_e;

  state_e     state;
  logic       cmd_sent;
  logic [1:0] param_cnt;
  logic       forward;

  assign busy        = (state != S_IDLE);
  assign forward     = (state == S_FETCH) && cmd_sent && dataInReady && fbIsReady;
  assign readAck     = forward;
  assign fbiCmdWrite = (state == S_FETCH) && fbIsReady && (!cmd_sent || dataInReady);
  // Parameters are resized to COORD_BITS; the FBI keeps that many bits.
  assign fbiCmdData  = !cmd_sent ? CMD_BITS'(FBI_CMD_CLIP)
                                 : CMD_BITS'(signed'(COORD_BITS'(dataIn)));
  assign fbiBusAddr  = '0;
  assign fbiBusData  = '0;
  assign fbiBusWrite = 1'b0;

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      state     <= S_IDLE;
      cmd_sent  <= 1'b0;
      param_cnt <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          cmd_sent  <= 1'b0;
          param_cnt <= '0;
          state     <= S_FETCH;
        end
        S_FETCH: begin
          if (!cmd_sent && fbIsReady) cmd_sent <= 1'b1;
          if (forward) begin
            param_cnt <= param_cnt + 1'b1;
            if (param_cnt == 2'd3) state <= S_IDLE;     // fetchDone
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clock) disable iff (reset) start |-> (state == S_IDLE))
    else $error("clipping renderer started while busy");

endmodule
