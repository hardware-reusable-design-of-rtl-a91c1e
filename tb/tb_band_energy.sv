// tb_band_energy: checks frame and band energies for 256-point FFT frames at
// 8 kHz with 23 mel bands. Random bins (with gaps between them) are summed by
// a reference that computes the band limits from the mel scale on its own;
// each band energy must come with the right index, 3 cycles after the bin
// that closes the band, band_last on band 22, and the frame energy after the
// last bin. A frame of full-scale bins exercises shifter and accumulator
// saturation. A second instance with triangular filters (TRIANG = 1) gets the
// same bins; its bands are checked against a separate triangular-filter
// reference, each 3 cycles after the last bin before the band's upper edge.
module tb_band_energy;
  import mfcc_ref_pkg::*;
  localparam int N = 256, NB = 23, FW = 25, SHIFT = 8, NBIN = N / 2 + 1;

  logic clk = 1'b0, rst = 1'b1;
  logic in_valid = 1'b0, in_last = 1'b0;
  logic signed [FW-1:0] in_re = '0, in_im = '0;
  logic band_valid, band_last, frame_valid;
  logic [4:0] band_idx;
  logic [31:0] band_e, frame_e;
  int checks = 0, failures = 0, cycle = 0, sat_frames = 0;
  int edges[NB + 1];
  longint exp_b[$], exp_f[$];
  int due_b[$], due_f[$], idx_b[$];

  band_energy dut (.*);

  logic t_band_valid, t_band_last, t_frame_valid;
  logic [4:0] t_band_idx;
  logic [31:0] t_band_e, t_frame_e;
  longint exp_t[$];
  int due_t[$], idx_t[$], tedges[NB + 2];

  band_energy #(.TRIANG(1'b1)) dut_tri (
    .clk, .rst, .in_valid, .in_re, .in_im, .in_last,
    .band_valid(t_band_valid), .band_idx(t_band_idx), .band_e(t_band_e), .band_last(t_band_last),
    .frame_valid(t_frame_valid), .frame_e(t_frame_e));

  always @(posedge clk) begin
    if (!rst && t_band_valid) begin
      longint e; int d, i;
      checks++;
      e = exp_t.pop_front(); d = due_t.pop_front(); i = idx_t.pop_front();
      if (longint'(t_band_e) != e || cycle != d || int'(t_band_idx) != i || t_band_last != (i == NB - 1)) begin
        failures++;
        $display("FAIL triangular band %0d/%0d: %0d expected %0d, cycle %0d/%0d", t_band_idx, i, t_band_e, e, cycle, d);
      end
    end
    if (!rst && t_frame_valid) begin
      checks++;
      if (t_frame_e != frame_e || !frame_valid) begin failures++; $display("FAIL: triangular frame energy"); end
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst && band_valid) begin
      longint e; int d, i;
      checks++;
      e = exp_b.pop_front(); d = due_b.pop_front(); i = idx_b.pop_front();
      if (longint'(band_e) != e || cycle != d || int'(band_idx) != i || band_last != (i == NB - 1)) begin
        failures++;
        $display("FAIL band %0d/%0d: %0d expected %0d, cycle %0d/%0d", band_idx, i, band_e, e, cycle, d);
      end
    end
    if (!rst && frame_valid) begin
      longint e; int d;
      checks++;
      e = exp_f.pop_front(); d = due_f.pop_front();
      if (longint'(frame_e) != e || cycle != d) begin
        failures++;
        $display("FAIL frame energy %0d expected %0d, cycle %0d/%0d", frame_e, e, cycle, d);
      end
      if (frame_e == 32'hFFFF_FFFF) sat_frames++;
    end
  end

  task automatic frame(int amp);
    longint facc = 0, bacc = 0;
    int band = 0, tband = 0;
    longint rk [], ik [], pk [], tb [];
    rk = new[NBIN]; ik = new[NBIN]; pk = new[NBIN];
    // draw the bins first so that the triangular bands are known in advance
    for (int k = 0; k < NBIN; k++) begin
      rk[k] = longint'($urandom_range(0, 2 * amp)) - amp;
      ik[k] = longint'($urandom_range(0, 2 * amp)) - amp;
      pk[k] = power_ref(rk[k], ik[k], SHIFT);
    end
    tri_bands_ref(N, NB, 8000.0, pk, tb);
    for (int b = 0; b < NB; b++) begin exp_t.push_back(tb[b]); idx_t.push_back(b); end
    for (int k = 0; k < NBIN; k++) begin
      longint p;
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin in_valid = 1'b0; @(negedge clk); end
      in_valid = 1'b1; in_re = FW'(rk[k]); in_im = FW'(ik[k]); in_last = (k == NBIN - 1);
      p = pk[k];
      facc = sat_u32(facc + p);
      if (band < NB && k >= edges[0]) begin
        bacc = sat_u32(bacc + p);
        if (k == edges[band + 1]) begin
          exp_b.push_back(bacc); due_b.push_back(cycle + 3); idx_b.push_back(band);
          bacc = 0; band++;
        end
      end
      if (tband < NB && k == tedges[tband + 2] - 1) begin due_t.push_back(cycle + 3); tband++; end
      if (k == NBIN - 1) begin exp_f.push_back(facc); due_f.push_back(cycle + 3); end
    end
    @(negedge clk) in_valid = 1'b0; in_last = 1'b0;
  endtask

  initial begin
    for (int e = 0; e <= NB; e++) edges[e] = edge_ref(e, NB, N, 8000.0, 64.0);
    for (int e = 0; e <= NB + 1; e++) tedges[e] = edge_ref(e, NB + 1, N, 8000.0, 64.0);
    for (int e = 0; e < NB; e++) begin
      checks++;
      if (edges[e + 1] <= edges[e]) begin failures++; $display("FAIL: empty band %0d", e); end
    end
    checks++;
    if (edges[0] != 2 || edges[NB] != N / 2) begin failures++; $display("FAIL: band range"); end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    frame(1 << 19);
    frame(1 << 12);
    frame(1 << 24);     // saturates shifter and accumulators
    frame(1 << 18);
    repeat (6) @(negedge clk);
    checks += 2;
    if (exp_b.size() != 0 || exp_f.size() != 0 || exp_t.size() != 0) begin failures++; $display("FAIL: outputs missing"); end
    if (sat_frames != 1) begin failures++; $display("FAIL: saturation not seen"); end
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
