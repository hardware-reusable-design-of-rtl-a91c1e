// tb_natural_log: checks the natural-log unit, ln = (log2 * 11357) >> 14 +
// 8617 with Mitchell's log2 in 10 fraction bits, against a reference that
// multiplies by 11357 directly. Inputs are streamed with random gaps; every
// result must arrive with its tag three cycles after its input. Doubling the
// input must raise the result by ln(2) * 1024 (709 or 710).
module tb_natural_log;
  import mfcc_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0;
  logic [31:0] in_x = '0;
  logic [4:0] in_tag = '0, out_tag;
  logic out_valid;
  logic signed [15:0] out_ln;
  int checks = 0, failures = 0, cycle = 0;
  int exp_v[$], exp_t[$], exp_d[$];
  int res[$];

  natural_log dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      int v, t, d;
      v = exp_v.pop_front(); t = exp_t.pop_front(); d = exp_d.pop_front();
      checks++;
      res.push_back(int'(out_ln));
      if (int'(out_ln) != v || int'(out_tag) != t || cycle != d) begin
        failures++;
        $display("FAIL: ln %0d/%0d tag %0d/%0d cycle %0d/%0d", out_ln, v, out_tag, t, cycle, d);
      end
    end
  end

  task automatic send(longint x);
    @(negedge clk);
    in_valid = 1'b1; in_x = 32'(x); in_tag = 5'($urandom_range(0, 31));
    exp_v.push_back(ln_ref(x)); exp_t.push_back(int'(in_tag)); exp_d.push_back(cycle + 3);
    if ($urandom_range(0, 1) == 0) begin @(negedge clk); in_valid = 1'b0; end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    send(0); send(1); send(21); send(64'hFFFF_FFFF);
    for (int c = 0; c < 32; c++) send(longint'(1) << c);
    repeat (2000) send(longint'($urandom()));
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_v.size() != 0) begin failures++; $display("FAIL: results missing"); end
    // powers of two: results 4 .. 35, equally spaced by ln(2)
    for (int c = 1; c < 32; c++) begin
      int step;
      step = res[4 + c] - res[3 + c];
      checks++;
      if (step < 709 || step > 710) begin failures++; $display("FAIL: step %0d at 2^%0d", step, c); end
    end
    checks++;
    if (res[1] != 8617) failures++;                  // ln unit at x = 1: offset only
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
