// Single-clock show-ahead FIFO.
//
// Used three times in Silizium: as the command FIFO behind the slave
// interface, and as the write-FIFO and the read-FIFO of the framebuffer
// interface. It holds 2**NUM_WORDS_EXP words of WIDTH bits in a memory array
// addressed by a write and a read pointer.
//
// Interface and timing:
//   wr_en   pushes wr_data at the rising edge; ignored while full.
//   rd_ack  pops the word shown on rd_data (show-ahead: the oldest word is on
//           rd_data whenever empty is 0); ignored while empty.
//   clear   empties the FIFO in one clock cycle; a push in that cycle is lost.
//   used_words counts the stored words (0 .. 2**NUM_WORDS_EXP).
// The documented core uses a vendor FIFO with a depth of 2**n words and a
// one-cycle clear; the show-ahead read and the ignore-when-full/empty
// behaviour are this design's choices.
module silizium_fifo #(
  parameter int WIDTH         = 32,
  parameter int NUM_WORDS_EXP = 6
) (
  input  logic                     clock,
  input  logic                     reset,
  input  logic                     clear,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_ack,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [NUM_WORDS_EXP:0]   used_words
);

  localparam int DEPTH = 2 ** NUM_WORDS_EXP;

  logic [WIDTH-1:0]         mem [DEPTH];
  logic [NUM_WORDS_EXP-1:0] wr_ptr, rd_ptr;
  logic [NUM_WORDS_EXP:0]   count;
  logic                     do_wr, do_rd;

  assign empty      = (count == '0);
  assign full       = (count == (NUM_WORDS_EXP+1)'(DEPTH));
  assign used_words = count;
  assign rd_data    = mem[rd_ptr];
  assign do_wr      = wr_en && !full && !clear;
  assign do_rd      = rd_ack && !empty && !clear;

  always_ff @(posedge clock) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
