// Self-checking testbench for silizium_fifo.
//
// Drives random pushes and pops (with pushes into a full FIFO and pops from an
// empty one) against a queue model, checks the show-ahead output, empty, full
// and used_words every cycle, and checks that clear empties the FIFO in one
// cycle. Depth 2**3 keeps the full condition frequent.
module tb_silizium_fifo;
  localparam int W = 16, E = 3, DEPTH = 2**E;

  logic clock = 0, reset = 1, clear = 0, wr_en = 0, rd_ack = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [E:0] used_words;
  int checks = 0, failures = 0, cycles = 0;
  logic [W-1:0] model[$];

  silizium_fifo #(.WIDTH(W), .NUM_WORDS_EXP(E)) dut (.*);

  always #5 clock = ~clock;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int fulls = 0, empties = 0;
    repeat (3) @(posedge clock);
    reset <= 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clock);
      cycles++;
      // compare state with the model
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(int'(used_words) == model.size(), "used_words");
      if (model.size() > 0) check(rd_data == model[0], "rd_data");
      if (full) fulls++;
      if (empty) empties++;
      // next stimulus
      clear   = ($urandom_range(0, 199) == 0);
      wr_en   = ($urandom_range(0, 99) < ((i / 500) % 2 == 1 ? 70 : 35));
      rd_ack  = ($urandom_range(0, 99) < ((i / 500) % 2 == 1 ? 35 : 70));
      wr_data = W'($urandom);
      @(posedge clock);
      #1;
      if (clear) model.delete();
      else begin
        bit do_rd, do_wr;
        do_rd = rd_ack && model.size() > 0;
        do_wr = wr_en && model.size() < DEPTH;
        if (do_rd) void'(model.pop_front());
        if (do_wr) model.push_back(wr_data);
      end
    end
    check(fulls > 0 && empties > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
