// bin_fifo: dual-clock FIFO that carries the FFT output bins from the FFT
// clock (clk1) to the clock of the feature-extraction block (clk).
//
// The two clocks may be unrelated. The write and read pointers are kept in
// binary and in Gray code; each side sees the other's Gray pointer through a
// two-flop synchronizer, so at most one bit of it changes between samples.
// The write side reports how many entries are certainly free (wr_space,
// pessimistic by the synchronizer delay), which lets the producer hold back a
// whole frame of bins until it fits; there is no per-word back-pressure, and
// a write into a full FIFO is dropped (an assertion flags it). The
// read side has no ready input: it pops one word per clk cycle whenever the
// FIFO holds one, and shows it on rd_data with rd_valid for that cycle.
//
// Interface: wr_en/wr_data on clk_wr; rd_valid/rd_data on clk_rd; rst is a
// synchronous reset that must be held for a few cycles of both clocks.
// Timing: a word written on clk_wr reaches rd_data three to four clk_rd edges
// later (two synchronizer flops and the registered read).
//
// The document gives the feature-extraction block a clock of its own but does
// not say how data cross to it; this FIFO is this design's choice.
module bin_fifo #(
  parameter int DW    = 51,                 // word width
  parameter int DEPTH = 256                 // entries, a power of two
) (
  input  logic                       clk_wr,
  input  logic                       rst,
  input  logic                       wr_en,
  input  logic [DW-1:0]              wr_data,
  output logic [$clog2(DEPTH):0]     wr_space,

  input  logic                       clk_rd,
  output logic                       rd_valid,
  output logic [DW-1:0]              rd_data
);

  localparam int A = $clog2(DEPTH);
  typedef logic [A:0] ptr_t;

  function automatic ptr_t bin2gray(input ptr_t b);
    return b ^ (b >> 1);
  endfunction

  function automatic ptr_t gray2bin(input ptr_t g);
    ptr_t b;
    b[A] = g[A];
    for (int i = A - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [DW-1:0] mem [DEPTH];

  // ---------------- write side (clk_wr) ----------------
  ptr_t wbin, wgray, rgray_s1, rgray_s2, rbin_w;
  ptr_t rbin, rgray, wgray_s1, wgray_s2;
  logic nonempty;

  always_ff @(posedge clk_wr) begin
    if (wr_en && wr_space != '0) mem[wbin[A-1:0]] <= wr_data;
  end

  always_ff @(posedge clk_wr) begin
    if (rst) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      if (wr_en && wr_space != '0) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  assign rbin_w   = gray2bin(rgray_s2);
  assign wr_space = (A+1)'(DEPTH) - (wbin - rbin_w);

  a_no_overflow: assert property (@(posedge clk_wr) disable iff (rst) wr_en |-> wr_space != '0)
    else $error("bin FIFO written while full; a bin is lost");

  // ---------------- read side (clk_rd) ----------------

  assign nonempty = (rgray != wgray_s2);

  always_ff @(posedge clk_rd) begin
    if (rst) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
      rd_valid <= 1'b0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      rd_valid <= nonempty;
      if (nonempty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  always_ff @(posedge clk_rd) begin
    if (nonempty) rd_data <= mem[rbin[A-1:0]];
  end

endmodule
