// tb_log2_mitchell: checks Mitchell's log2 on a 32-bit input: the worked
// example 21 -> 100.0101b = 4.3125, zero, powers of two (exact), all values
// up to 4096 and random values, against a reference that finds the leading
// one by repeated shifting. Also checks that the approximation never exceeds
// the true log2 and stays within 0.09 of it.
module tb_log2_mitchell;
  import mfcc_ref_pkg::*;

  logic [31:0] z;
  logic [14:0] y;
  int checks = 0, failures = 0;

  log2_mitchell dut (.z, .y);

  task automatic check(longint v);
    real err;
    z = 32'(v);
    #1;
    checks++;
    if (int'(y) != log2m_ref(v)) begin
      failures++; $display("FAIL: log2(%0d) = %0d expected %0d", v, y, log2m_ref(v));
    end
    if (v > 0) begin
      err = $ln(real'(v)) / $ln(2.0) - real'(y) / 1024.0;
      checks++;
      if (err < -1e-9 || err > 0.09) begin failures++; $display("FAIL: error %f at %0d", err, v); end
    end
  endtask

  initial begin
    check(21);
    checks++;
    if (y != 15'((4 << 10) + 320)) failures++;       // 4.3125
    check(0);
    checks++;
    if (y != 0) failures++;
    for (int c = 0; c < 32; c++) begin
      check(longint'(1) << c);
      checks++;
      if (y != 15'(c << 10)) failures++;
    end
    for (int v = 1; v <= 4096; v++) check(v);
    repeat (5000) check(longint'($urandom()));
    check(64'hFFFF_FFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
