// tb_frame_overlap: checks the two-clock overlapping frame memory with a
// 16-sample frame. Numbered samples are written on the slow clock; every
// frame read on the fast clock must hold samples f*8 .. f*8+15 in order, as
// one unbroken burst with correct positions and last flag. Also covered:
// both read orders (lower half first, upper half first), a frame held back
// by rd_ready, input at the full clk2 rate, and the overrun flag when frames are not collected.
module tb_frame_overlap;
  localparam int N = 16;
  localparam int H = N / 2;

  logic clk1 = 1'b0, clk2 = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  logic signed [15:0] in_sample = '0;
  logic rd_ready = 1'b1;
  logic out_valid, out_last, overrun;
  logic signed [15:0] out_sample;
  logic [3:0] out_idx;
  int checks = 0, failures = 0;
  int n_sent = 0;
  int frames = 0, pos = 0, overruns = 0, held = 0;
  bit content_ok = 1'b1;

  frame_overlap #(.N(N)) dut (
    .clk_wr(clk2), .rst, .in_valid, .in_sample,
    .clk_rd(clk1), .rd_ready,
    .out_valid, .out_sample, .out_idx, .out_last, .overrun
  );

  // clk1 period 10, clk2 period 20, rising edges aligned
  always #5 clk1 = ~clk1;
  initial begin
    #5;
    forever begin clk2 = 1'b1; #10; clk2 = 1'b0; #10; end
  end

  always @(posedge clk1) begin
    if (!rst) begin
      if (overrun) overruns++;
      if (out_valid) begin
        if (content_ok) begin
          checks++;
          if (int'(out_sample) != 1000 + frames * H + pos || int'(out_idx) != pos ||
              out_last != (pos == N - 1)) begin
            failures++;
            $display("FAIL frame %0d pos %0d: sample %0d idx %0d last %0b", frames, pos,
                     out_sample, out_idx, out_last);
          end
        end
        pos++;
        if (pos == N) begin pos = 0; frames++; end
      end else if (pos != 0) begin
        checks++; failures++;
        $display("FAIL: gap inside frame %0d", frames);
      end
    end
  end

  // count samples; back_to_back = one on every clk2 cycle (the full rate)
  task automatic feed(int count, bit back_to_back = 1'b0);
    repeat (count) begin
      @(negedge clk2);
      in_valid  = 1'b1;
      in_sample = 16'(1000 + n_sent);
      n_sent++;
      if (!back_to_back) begin
        @(negedge clk2);
        in_valid = 1'b0;
      end
    end
    @(negedge clk2);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (4) @(negedge clk2);
    rst = 1'b0;
    // first frame after a full memory, then one per half
    feed(N + 3 * H);
    feed(4, 1'b1);   // a burst at the full clk2 rate inside a half
    feed(4);
    repeat (10) @(negedge clk2);
    checks++;
    if (frames != 5) begin failures++; $display("FAIL: %0d frames after phase 1", frames); end
    // a frame waits while rd_ready is low
    rd_ready = 1'b0;
    feed(H);
    repeat (20) @(negedge clk2);
    checks++;
    if (frames != 5 || pos != 0) begin failures++; $display("FAIL: frame read while not ready"); end
    else held++;
    rd_ready = 1'b1;
    repeat (20) @(negedge clk2);
    checks++;
    if (frames != 6) begin failures++; $display("FAIL: held frame not read"); end
    // two halves complete without reading: overrun
    rd_ready = 1'b0;
    feed(2 * H);
    repeat (6) @(negedge clk2);
    content_ok = 1'b0;
    rd_ready = 1'b1;
    repeat (40) @(negedge clk2);
    checks++;
    if (overruns != 1) begin failures++; $display("FAIL: %0d overruns", overruns); end
    checks++;
    if (held != 1) failures++;
    $display("frames=%0d overruns=%0d", frames, overruns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk1);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
