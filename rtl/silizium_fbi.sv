// Framebuffer interface (FBI) of the Silizium 2D rendering core.
//
// The FBI is the only part of the core that talks to the framebuffer memory.
// Renderers hand it pixel writes and commands through a write-FIFO; data read
// back from the framebuffer is handed to them through a read-FIFO.
//
// Write-FIFO words are 1 + ADDR_BITS + DATA_BITS wide. The MSB is the D/C
// bit. With D/C = 0 the rest is {pixel data, relative byte address}: a pixel
// write. With D/C = 1 the low byte of the rest is a command code and the next
// words taken from the FIFO are its parameters, whatever their D/C bit:
//   0x01 clipping mask: X, Y, width, height (resized to COORD_BITS)
//   0x02 linear read:   start address, pixel count
//   0x03 window read:   start address, width, height (wraps every row)
// Unknown command codes are dropped.
//
// A pixel write is checked before it reaches the bus. With boundary checks
// enabled, a relative address at or above fb_addr_span is dropped. With the
// clipping mask enabled, the pixel's X/Y position, recovered from the address
// as addr / BYTES_PER_PIXEL split by FB_WIDTH, must lie inside the mask.
// Surviving writes go out at fb_addr_base + relative address. Reads are
// checked against the span the same way; a read that fails the check pushes a
// dummy word with readFifoDataValid = 0 so the requester still gets one word
// per requested pixel. A read is issued only when the read-FIFO has room for
// its result, so the FBI never has to stall the memory.
//
// Glue logic: busWrite packs {0, busData, busAddr}, cmdWrite packs
// {1, cmdData}; ready = not write-FIFO full. readFifoDataAvailable = read-FIFO
// not empty; readFifoData/readFifoDataValid show its oldest word, popped by
// readFifoReadAck.
//
// Timing, with no wait states: a pixel write takes four clock cycles (fetch,
// decode, check, bus write), so writes leave the master every fourth cycle.
// Single transfers only: burstcount is always 1 and one read is outstanding
// at a time. An access holds its signals until waitrequest is low.
//
// The FIFO formats, the command codes, the base/span/clip checks and the
// four-cycle write follow the documented core. FB_WIDTH (needed to turn an
// address into X/Y for clipping and to wrap window reads), the busy output,
// the dummy read word value (0) and the asynchronous active-high reset are
// this design's choices.
module silizium_fbi
  import silizium_pkg::*;
#(
  parameter int COORD_BITS      = 32,
  parameter int ADDR_BITS       = 32,
  parameter int DATA_BITS       = 32,
  parameter int BURSTCOUNT_BITS = 2,
  parameter int BYTES_PER_PIXEL = 4,
  parameter int FB_WIDTH        = 800,
  parameter int WRITE_FIFO_EXP  = 8,
  parameter int READ_FIFO_EXP   = 4
) (
  input  logic                          clock,
  input  logic                          reset,
  input  logic                          enable,
  input  logic                          boundaryChecksEnable,
  input  logic                          clippingEnable,
  // Avalon-MM master towards the framebuffer memory
  output logic [ADDR_BITS-1:0]          avalon_master_address,
  output logic                          avalon_master_write,
  output logic [DATA_BITS-1:0]          avalon_master_writedata,
  input  logic                          avalon_master_waitrequest,
  output logic                          avalon_master_read,
  input  logic [DATA_BITS-1:0]          avalon_master_readdata,
  input  logic                          avalon_master_readdatavalid,
  output logic [BURSTCOUNT_BITS-1:0]    avalon_master_burstcount,
  // configuration
  input  logic [ADDR_BITS-1:0]          fbAddrBase,
  input  logic [ADDR_BITS-1:0]          fbAddrSpan,
  // write-FIFO glue
  input  logic [ADDR_BITS-1:0]          busAddr,
  input  logic [DATA_BITS-1:0]          busData,
  input  logic                          busWrite,
  input  logic [ADDR_BITS+DATA_BITS-1:0] cmdData,
  input  logic                          cmdWrite,
  output logic                          ready,
  // read-FIFO glue
  output logic                          readFifoDataAvailable,
  output logic [DATA_BITS-1:0]          readFifoData,
  output logic                          readFifoDataValid,
  input  logic                          readFifoReadAck,
  // FIFO status and control
  output logic [WRITE_FIFO_EXP:0]       writeFifoUsedWords,
  input  logic                          writeFifoClear,
  output logic [READ_FIFO_EXP:0]        readFifoUsedWords,
  input  logic                          readFifoClear,
  // current clipping mask
  output logic signed [COORD_BITS-1:0]  clipX,
  output logic signed [COORD_BITS-1:0]  clipY,
  output logic signed [COORD_BITS-1:0]  clipWidth,
  output logic signed [COORD_BITS-1:0]  clipHeight,
  output logic                          busy
);

  localparam int PAYLOAD_BITS = ADDR_BITS + DATA_BITS;
  localparam int WF_BITS      = PAYLOAD_BITS + 1;
  localparam int RF_BITS      = DATA_BITS + 1;
  localparam int CB           = COORD_BITS + 1;   // width for signed compares

  typedef enum logic [3:0] {
    S_IDLE,      // wait for a write-FIFO word
    S_DECODE,    // split the word, recover X/Y, boundary check
    S_CHECK,     // clipping check, decide
    S_WRITE,     // Avalon write until accepted
    S_PARAM,     // collect command parameters
    S_EXEC,      // apply a command
    S_RD_CHECK,  // room in read-FIFO? boundary check
    S_RD_ISSUE,  // Avalon read until accepted
    S_RD_WAIT,   // wait for readdatavalid
    S_RD_NEXT    // advance the read address
  } state_e;

  state_e state;

  // ---------------------------------------------------------------- FIFOs
  logic                 wf_wr, wf_empty, wf_full, wf_ack;
  logic [WF_BITS-1:0]   wf_din, wf_dout;
  logic                 rf_wr, rf_empty, rf_full;
  logic [RF_BITS-1:0]   rf_din, rf_dout;

  always_comb begin
    wf_wr  = busWrite || cmdWrite;
    wf_din = busWrite ? {1'b0, busData, busAddr} : {1'b1, cmdData};
  end

  assign ready = !wf_full;

  silizium_fifo #(.WIDTH(WF_BITS), .NUM_WORDS_EXP(WRITE_FIFO_EXP)) u_write_fifo (
    .clock, .reset, .clear(writeFifoClear),
    .wr_en(wf_wr), .wr_data(wf_din), .rd_ack(wf_ack), .rd_data(wf_dout),
    .empty(wf_empty), .full(wf_full), .used_words(writeFifoUsedWords)
  );

  silizium_fifo #(.WIDTH(RF_BITS), .NUM_WORDS_EXP(READ_FIFO_EXP)) u_read_fifo (
    .clock, .reset, .clear(readFifoClear),
    .wr_en(rf_wr), .wr_data(rf_din), .rd_ack(readFifoReadAck), .rd_data(rf_dout),
    .empty(rf_empty), .full(rf_full), .used_words(readFifoUsedWords)
  );

  assign readFifoDataAvailable = !rf_empty;
  assign readFifoData          = rf_dout[DATA_BITS-1:0];
  assign readFifoDataValid     = rf_dout[DATA_BITS];

  // ------------------------------------------------------------ registers
  logic [ADDR_BITS-1:0]       cur_addr;     // relative byte address
  logic [DATA_BITS-1:0]       cur_data;
  logic [7:0]                 cur_cmd;
  logic [1:0]                 param_idx, param_last;
  logic [PAYLOAD_BITS-1:0]    param [4];
  logic                       in_bounds;
  logic [ADDR_BITS-1:0]       px_x, px_y;
  logic [ADDR_BITS-1:0]       rd_start, rd_width, rd_height, rd_col, rd_row;

  // Pixel position of the current address (constant divisors).
  logic [ADDR_BITS-1:0] pix_index;
  assign pix_index = cur_addr / ADDR_BITS'(BYTES_PER_PIXEL);

  // Clipping test on the registered position.
  logic signed [CB-1:0] x_s, y_s, cx_s, cy_s, cx_end, cy_end;
  logic                 in_clip;
  always_comb begin
    // px_x < FB_WIDTH; px_y is clamped so that it stays positive in CB bits
    x_s    = CB'(signed'({1'b0, px_x[COORD_BITS-2:0]}));
    y_s    = (px_y >> (COORD_BITS-1)) != '0 ? {2'b01, {(CB-2){1'b1}}}
                                            : CB'(signed'({1'b0, px_y[COORD_BITS-2:0]}));
    cx_s   = CB'(clipX);
    cy_s   = CB'(clipY);
    cx_end = cx_s + CB'(clipWidth);
    cy_end = cy_s + CB'(clipHeight);
    in_clip = (x_s >= cx_s) && (x_s < cx_end) && (y_s >= cy_s) && (y_s < cy_end);
  end

  // Relative address of the next pixel of a read request.
  logic [ADDR_BITS-1:0] rd_addr;
  assign rd_addr = rd_start +
                   (rd_row * ADDR_BITS'(FB_WIDTH) + rd_col) * ADDR_BITS'(BYTES_PER_PIXEL);

  always_comb begin
    wf_ack = 1'b0;
    if (((state == S_IDLE) && enable) || (state == S_PARAM))
      wf_ack = !wf_empty;
  end

  always_comb begin
    rf_wr  = 1'b0;
    rf_din = '0;
    if (state == S_RD_CHECK && !rf_full && boundaryChecksEnable && rd_addr >= fbAddrSpan) begin
      rf_wr  = 1'b1;                       // dummy word, marked invalid
      rf_din = {1'b0, {DATA_BITS{1'b0}}};
    end else if (state == S_RD_WAIT && avalon_master_readdatavalid) begin
      rf_wr  = 1'b1;
      rf_din = {1'b1, avalon_master_readdata};
    end
  end

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      state      <= S_IDLE;
      cur_addr   <= '0;
      cur_data   <= '0;
      cur_cmd    <= '0;
      param_idx  <= '0;
      param_last <= '0;
      for (int i = 0; i < 4; i++) param[i] <= '0;
      in_bounds  <= 1'b0;
      px_x       <= '0;
      px_y       <= '0;
      rd_start   <= '0;
      rd_width   <= '0;
      rd_height  <= '0;
      rd_col     <= '0;
      rd_row     <= '0;
      clipX      <= '0;
      clipY      <= '0;
      clipWidth  <= COORD_BITS'(CLIP_WH_RESET);
      clipHeight <= COORD_BITS'(CLIP_WH_RESET);
    end else begin
      unique case (state)
        S_IDLE: begin
          if (enable && !wf_empty) begin
            cur_cmd  <= wf_dout[7:0];
            cur_addr <= wf_dout[ADDR_BITS-1:0];
            cur_data <= wf_dout[PAYLOAD_BITS-1:ADDR_BITS];
            state    <= wf_dout[WF_BITS-1] ? S_EXEC : S_DECODE;
          end
        end
        S_DECODE: begin
          in_bounds <= !boundaryChecksEnable || (cur_addr < fbAddrSpan);
          px_x      <= pix_index % ADDR_BITS'(FB_WIDTH);
          px_y      <= pix_index / ADDR_BITS'(FB_WIDTH);
          state     <= S_CHECK;
        end
        S_CHECK: begin
          if (in_bounds && (!clippingEnable || in_clip)) state <= S_WRITE;
          else                                           state <= S_IDLE;
        end
        S_WRITE: begin
          if (!avalon_master_waitrequest) state <= S_IDLE;
        end
        S_EXEC: begin
          // first visit: a command word was just fetched; choose its length
          param_idx <= '0;
          unique case (cur_cmd)
            FBI_CMD_CLIP:      begin param_last <= 2'd3; state <= S_PARAM; end
            FBI_CMD_LIN_READ:  begin param_last <= 2'd1; state <= S_PARAM; end
            FBI_CMD_RECT_READ: begin param_last <= 2'd2; state <= S_PARAM; end
            default:           state <= S_IDLE;
          endcase
        end
        S_PARAM: begin
          if (!wf_empty) begin
            param[param_idx] <= wf_dout[PAYLOAD_BITS-1:0];
            param_idx        <= param_idx + 1'b1;
            if (param_idx == param_last) begin
              if (cur_cmd == FBI_CMD_CLIP) begin
                clipX      <= param[0][COORD_BITS-1:0];
                clipY      <= param[1][COORD_BITS-1:0];
                clipWidth  <= param[2][COORD_BITS-1:0];
                clipHeight <= wf_dout[COORD_BITS-1:0];
                state      <= S_IDLE;
              end else begin
                rd_start <= param[0][ADDR_BITS-1:0];
                rd_col   <= '0;
                rd_row   <= '0;
                if (cur_cmd == FBI_CMD_LIN_READ) begin
                  rd_width  <= wf_dout[ADDR_BITS-1:0];
                  rd_height <= ADDR_BITS'(1);
                  state     <= (wf_dout[ADDR_BITS-1:0] == '0) ? S_IDLE : S_RD_CHECK;
                end else begin
                  rd_width  <= param[1][ADDR_BITS-1:0];
                  rd_height <= wf_dout[ADDR_BITS-1:0];
                  state     <= (wf_dout[ADDR_BITS-1:0] == '0 || param[1][ADDR_BITS-1:0] == '0)
                               ? S_IDLE : S_RD_CHECK;
                end
              end
            end
          end
        end
        S_RD_CHECK: begin
          if (!rf_full) begin
            if (boundaryChecksEnable && rd_addr >= fbAddrSpan) state <= S_RD_NEXT;
            else                                                state <= S_RD_ISSUE;
          end
        end
        S_RD_ISSUE: begin
          if (!avalon_master_waitrequest) state <= S_RD_WAIT;
        end
        S_RD_WAIT: begin
          if (avalon_master_readdatavalid) state <= S_RD_NEXT;
        end
        S_RD_NEXT: begin
          if (rd_col + 1'b1 == rd_width) begin
            rd_col <= '0;
            rd_row <= rd_row + 1'b1;
            state  <= (rd_row + 1'b1 == rd_height) ? S_IDLE : S_RD_CHECK;
          end else begin
            rd_col <= rd_col + 1'b1;
            state  <= S_RD_CHECK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------- Avalon
  always_comb begin
    avalon_master_write     = (state == S_WRITE);
    avalon_master_read      = (state == S_RD_ISSUE);
    avalon_master_writedata = cur_data;
    avalon_master_address   = fbAddrBase + ((state == S_RD_ISSUE) ? rd_addr : cur_addr);
    avalon_master_burstcount = BURSTCOUNT_BITS'(1);
  end

  assign busy = (state != S_IDLE) || !wf_empty;

  // Renderers must respect ready and never push data and a command at once.
  assert property (@(posedge clock) disable iff (reset) !(busWrite && cmdWrite))
    else $error("busWrite and cmdWrite asserted together");
  assert property (@(posedge clock) disable iff (reset) (busWrite || cmdWrite) |-> ready)
    else $error("write-FIFO written while not ready");
  // Avalon-MM: a request is held stable while waitrequest is high.
  assert property (@(posedge clock) disable iff (reset)
                   (avalon_master_write && avalon_master_waitrequest) |=>
                   (avalon_master_write && $stable(avalon_master_address) &&
                    $stable(avalon_master_writedata)))
    else $error("write request changed under waitrequest");
  assert property (@(posedge clock) disable iff (reset)
                   (avalon_master_read && avalon_master_waitrequest) |=>
                   (avalon_master_read && $stable(avalon_master_address)))
    else $error("read request changed under waitrequest");

endmodule
