// tb_hamming_window: checks windowing and bit-reversed addressing. A 256-point
// instance windows random frames (one unbroken, one with gaps); every write
// must carry round(1024*hamming(n)) * s >> 10 at address bitrev(n), two
// cycles after its input, with frame_done on the last write. An 8-point
// instance is checked against the bit-reversal table 0,4,2,6,1,5,3,7.
module tb_hamming_window;
  import mfcc_ref_pkg::*;
  localparam int N = 256;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, in_last = 1'b0;
  logic signed [15:0] in_sample = '0;
  logic [7:0] in_idx = '0;
  logic wr_en, frame_done;
  logic [7:0] wr_addr;
  logic signed [15:0] wr_data;
  // 8-point instance
  logic v8 = 1'b0, l8 = 1'b0;
  logic [2:0] i8 = '0;
  logic wr8, done8;
  logic [2:0] a8;
  logic signed [15:0] d8;

  int checks = 0, failures = 0, cycle = 0;
  int exp_addr[$], exp_data[$], exp_due[$], exp_last[$];
  int a8_q[$];
  int table1[8] = '{0, 4, 2, 6, 1, 5, 3, 7};

  hamming_window #(.N(N)) dut (.clk, .rst, .in_valid, .in_sample, .in_idx, .in_last,
                               .wr_en, .wr_addr, .wr_data, .frame_done);
  hamming_window #(.N(8)) dut8 (.clk, .rst, .in_valid(v8), .in_sample(16'sd1000), .in_idx(i8),
                                .in_last(l8), .wr_en(wr8), .wr_addr(a8), .wr_data(d8),
                                .frame_done(done8));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst && wr_en) begin
      int ea, ed, du, el;
      checks++;
      ea = exp_addr.pop_front(); ed = exp_data.pop_front();
      du = exp_due.pop_front();  el = exp_last.pop_front();
      if (int'(wr_addr) != ea || int'(wr_data) != ed || cycle != du || frame_done != el[0]) begin
        failures++;
        $display("FAIL: addr %0d/%0d data %0d/%0d cycle %0d/%0d done %0b", wr_addr, ea,
                 wr_data, ed, cycle, du, frame_done);
      end
    end
    if (!rst && wr8) begin
      checks++;
      if (int'(a8) != a8_q.pop_front()) begin failures++; $display("FAIL: 8-point address %0d", a8); end
    end
  end

  task automatic frame(bit gaps);
    for (int n = 0; n < N; n++) begin
      int s;
      @(negedge clk);
      if (gaps) while ($urandom_range(0, 2) == 0) begin in_valid = 1'b0; @(negedge clk); end
      s = int'($urandom_range(0, 65535)) - 32768;
      in_valid = 1'b1; in_sample = 16'(s); in_idx = 8'(n); in_last = (n == N - 1);
      exp_addr.push_back(rev_bits(n, 8));
      exp_data.push_back(window_ref(s, n, N));
      exp_due.push_back(cycle + 2);
      exp_last.push_back(n == N - 1);
    end
    @(negedge clk) in_valid = 1'b0; in_last = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // coefficient end points and centre: 0.08, 1.0
    checks++;
    if (ham_ref(0, N) != 82 || ham_ref(127, N) < 1023) failures++;
    for (int n = 0; n < 8; n++) begin
      @(negedge clk);
      v8 = 1'b1; i8 = 3'(n); l8 = (n == 7);
      a8_q.push_back(table1[n]);
    end
    @(negedge clk) v8 = 1'b0;
    frame(1'b0);
    frame(1'b1);
    repeat (5) @(negedge clk);
    checks++;
    if (exp_addr.size() != 0 || a8_q.size() != 0) begin failures++; $display("FAIL: writes missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
