// tb_bin_fifo: the dual-clock bin FIFO with unrelated clocks (write 10 ns,
// read 17 ns, then read 6 ns). Bursts of random words are written whenever
// wr_space allows a whole burst, the way the FFT writes a frame of bins; every
// word read must be the next one written, none may be lost or repeated, and
// wr_space must never promise more room than the FIFO really has.
// Mechanisms counted: bursts that had to wait for room.
module tb_bin_fifo;
  localparam int DW = 20, DEPTH = 32, BURST = 17, NBURST = 40;

  logic clk_wr = 1'b0, clk_rd = 1'b0, rst = 1'b1;
  logic wr_en = 1'b0;
  logic [DW-1:0] wr_data = '0;
  logic [$clog2(DEPTH):0] wr_space;
  logic rd_valid;
  logic [DW-1:0] rd_data;
  int checks = 0, failures = 0, waits = 0, written = 0, read = 0, popped = 0;
  int rd_half = 8;
  logic [DW-1:0] expect_q [$];

  bin_fifo #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk_wr = ~clk_wr;
  always begin #(rd_half); clk_rd = ~clk_rd; end

  always @(posedge clk_rd) begin
    if (!rst && dut.nonempty) popped++;                // entries freed at this edge
    if (!rst && rd_valid) begin
      checks++;
      if (expect_q.size() == 0) begin
        failures++; $display("FAIL: word %h read but none written", rd_data);
      end else begin
        logic [DW-1:0] e;
        e = expect_q.pop_front();
        if (rd_data != e) begin failures++; $display("FAIL: read %h expected %h", rd_data, e); end
      end
      read++;
    end
  end

  // wr_space may be pessimistic but never optimistic
  always @(posedge clk_wr) begin
    if (!rst) begin
      checks++;
      // words committed before this edge: the one on wr_en now is not yet in
      if (int'(wr_space) > DEPTH - (written - int'(wr_en) - popped)) begin
        failures++; $display("FAIL: wr_space %0d with %0d words held", wr_space, written - int'(wr_en) - popped);
      end
    end
  end

  initial begin
    repeat (6) @(posedge clk_rd);
    @(negedge clk_wr) rst = 1'b0;
    for (int b = 0; b < NBURST; b++) begin
      if (b == NBURST / 2) rd_half = 3;
      if (int'(wr_space) < BURST) waits++;
      while (int'(wr_space) < BURST) @(negedge clk_wr);
      for (int i = 0; i < BURST; i++) begin
        wr_en = 1'b1;
        wr_data = DW'($urandom);
        expect_q.push_back(wr_data);
        written++;
        @(negedge clk_wr);
      end
      wr_en = 1'b0;
    end
    repeat (200) @(negedge clk_wr);
    checks++;
    if (read != NBURST * BURST) begin failures++; $display("FAIL: %0d words read", read); end
    $display("mechanisms: bursts=%0d waited_for_room=%0d", NBURST, waits);
    checks++;
    if (waits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk_wr);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
