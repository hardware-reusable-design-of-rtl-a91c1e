// frame_overlap: auxiliary frame memory that produces 50 %-overlapping frames.
//
// The memory holds one frame of N samples and is treated as two halves. New
// (pre-emphasised) samples are written circularly on the write clock, one
// half at a time. Each time a half has been filled, the whole memory forms the
// next frame: its oldest half (kept from the previous frame, the overlap) is
// read first and the half just written second. Frames therefore alternate
// between the read orders 0..N-1 and N/2..N-1,0..N/2-1, and a new frame starts
// every N/2 input samples. The first frame is produced once the memory has
// been filled completely.
//
// Two clocks: the write port runs on clk_wr (clk2 of the front end), the read
// port on clk_rd (clk1), which is meant to be twice as fast, so a whole frame
// (N reads) is read out in the time N/2 new samples could be written and the
// reader always stays ahead of the writer that refills the oldest half. The
// write side signals "half full" by toggling a flag; clk2 is taken to be
// derived from clk1 (half its frequency, rising edges aligned), so the read
// side samples that flag directly and starts reading the cycle after a half
// completes. Memory split into halves, read order and the two-clock scheme
// follow the document; the toggle handshake, the rd_ready back-pressure, the
// overrun flag and the output numbering are this design's choices.
//
// Read interface: when a frame is pending and rd_ready is high, N samples are
// output on N consecutive clk_rd cycles (out_valid), with out_idx = position
// in the frame (0 = oldest) and out_last on the final one. Read data appear one
// cycle after the read address (synchronous read). A frame that cannot start
// at once (rd_ready low) waits; it stays intact as long as no new sample is
// written meanwhile. overrun pulses (clk_rd) once for a waiting frame when
// the first new sample overwrites its oldest half.
// Timing requirement: reading a frame takes N + 2 clk_rd cycles, slightly
// longer than N/2 clk_wr cycles, so the input may not run at the full clk_wr
// rate for a whole half-frame: when a half completes, the reader must have
// finished the previous frame and the next input sample must come at least
// one idle clk_wr cycle later. Real speech rates are far below this limit.
// Reset: rst must be held for a few cycles of both clocks.
module frame_overlap
  import mfcc_pkg::*;
#(
  parameter int N = 256,          // frame length (power of two)
  parameter int W = DATA_W
) (
  // write side (clk2)
  input  logic                  clk_wr,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   in_sample,
  // read side (clk1)
  input  logic                  clk_rd,
  input  logic                  rd_ready,
  output logic                  out_valid,
  output logic signed [W-1:0]   out_sample,
  output logic [$clog2(N)-1:0]  out_idx,
  output logic                  out_last,
  output logic                  overrun
);

  localparam int L = $clog2(N);

  logic signed [W-1:0] mem [N];

  // ---------------- write side ----------------
  logic [L-1:0] wr_ptr;
  logic         half_tgl;

  always_ff @(posedge clk_wr) begin
    if (in_valid) mem[wr_ptr] <= in_sample;
  end

  always_ff @(posedge clk_wr) begin
    if (rst) begin
      wr_ptr   <= '0;
      half_tgl <= 1'b0;
    end else if (in_valid) begin
      wr_ptr <= wr_ptr + 1'b1;
      if (&wr_ptr[L-2:0]) half_tgl <= ~half_tgl;   // last position of a half
    end
  end

  // ---------------- read side -----------------
  logic         tgl_q;
  logic         half_done, frame_req, start_now;
  logic         primed, pending, busy;
  logic [L-1:0] rd_addr, rd_cnt, start_addr;
  logic         rd_en_q, rd_last_q;
  logic [L-1:0] rd_cnt_q;
  logic [L-1:0] wr_ptr_q;
  logic         wrote, corrupt;

  // clk2 is derived from clk1, so the write-side flag is sampled directly
  assign half_done = tgl_q ^ half_tgl;
  assign frame_req = half_done && primed;
  assign start_now = !busy && rd_ready && (pending || frame_req);
  assign wrote     = (wr_ptr != wr_ptr_q);    // a sample was written on clk2

  always_ff @(posedge clk_rd) begin
    if (rst) begin
      tgl_q      <= 1'b0;
      primed     <= 1'b0;
      pending    <= 1'b0;
      busy       <= 1'b0;
      rd_addr    <= '0;
      rd_cnt     <= '0;
      start_addr <= '0;
      overrun    <= 1'b0;
      rd_en_q    <= 1'b0;
      rd_last_q  <= 1'b0;
      rd_cnt_q   <= '0;
      wr_ptr_q   <= '0;
      corrupt    <= 1'b0;
    end else begin
      tgl_q     <= half_tgl;
      wr_ptr_q  <= wr_ptr;
      overrun   <= 1'b0;
      rd_en_q   <= busy;
      rd_last_q <= busy && (&rd_cnt);
      rd_cnt_q  <= rd_cnt;
      if (half_done) primed <= 1'b1;         // first half of the very first frame

      if (busy) begin
        rd_addr <= rd_addr + 1'b1;
        rd_cnt  <= rd_cnt + 1'b1;
        if (&rd_cnt) busy <= 1'b0;
      end

      if (start_now) begin
        busy       <= 1'b1;
        rd_addr    <= start_addr;
        rd_cnt     <= '0;
        start_addr <= start_addr ^ L'(N / 2);   // next frame starts at the other half
        pending    <= pending && frame_req;
        corrupt    <= 1'b0;
      end else begin
        if (frame_req) pending <= 1'b1;
        // a write into the oldest half of a frame that has not started yet
        if (pending && wrote && !corrupt) begin
          overrun <= 1'b1;
          corrupt <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk_rd) begin
    if (busy) out_sample <= mem[rd_addr];
  end

  assign out_valid = rd_en_q;
  assign out_idx   = rd_cnt_q;
  assign out_last  = rd_last_q;

endmodule
