// mel_cepstrum: cosine transform of the log band energies into the mel
// cepstral coefficients C0 .. C(NC-1).
//
//   C_i = sum_{j=0}^{NB-1} ln(E_j) * cos(pi * i * (j + 0.5) / NB)
//
// The log band energies arrive one at a time, in band order. A counter
// numbers them and addresses a cosine ROM whose row j holds the NC factors
// cos(pi * i * (j + 0.5) / NB), scaled by 2^10. The incoming value and the ROM
// row are registered together (synchronisation registers); the next cycle
// every coefficient's multiply-accumulate unit adds its product. One MAC unit
// per coefficient is replicated NC times, so all coefficients are computed in
// parallel while the band values stream in and no band values are stored.
// After band NB-1 the accumulators, shifted right by 10 to undo the cosine
// scale, are output as 32-bit values with 10 fraction bits (the log scale)
// and cleared for the next frame.
//
// Timing: out_valid rises two cycles after the last band value (in_valid with
// the counter at NB-1). Input values may arrive on any cycles.
//
// Counter, cosine ROM, registers and replicated MAC follow the document; the
// number of coefficients (13, C0 .. C12) is the document's and the 23 bands
// are those of the Aurora front end. Running all NC MACs in parallel is the
// configuration chosen here; the ROM is generated at elaboration, the word
// widths and the 32-bit output are this design's choices.
module mel_cepstrum
  import mfcc_pkg::*;
#(
  parameter int NB = 23,    // number of bands (inputs per frame)
  parameter int NC = 13     // number of cepstral coefficients
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_ln,
  output logic                     out_valid,
  output logic signed [31:0]       cep [NC]
);

  localparam int BI = $clog2(NB);
  localparam int CW = Q_SHIFT + 2;   // cosine word: -1024 .. 1024
  localparam int AW = DATA_W + CW + BI + 1;

  logic signed [CW-1:0] cos_rom [NB][NC];
  initial begin
    for (int j = 0; j < NB; j++)
      for (int i = 0; i < NC; i++)
        cos_rom[j][i] = CW'(dct_coef(i, j, NB));
  end

  logic [BI-1:0]            cnt;      // band counter addressing the ROM
  logic signed [DATA_W-1:0] ln_q;     // synchronisation registers
  logic signed [CW-1:0]     cos_q [NC];
  logic                     v_q, last_q;
  logic                     fin;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      ln_q   <= '0;
      v_q    <= 1'b0;
      last_q <= 1'b0;
      fin    <= 1'b0;
      for (int i = 0; i < NC; i++) cos_q[i] <= '0;
    end else begin
      v_q    <= in_valid;
      last_q <= in_valid && (int'(cnt) == NB - 1);
      fin    <= v_q && last_q;
      if (in_valid) begin
        ln_q <= in_ln;
        for (int i = 0; i < NC; i++) cos_q[i] <= cos_rom[cnt][i];
        cnt  <= (int'(cnt) == NB - 1) ? '0 : cnt + 1'b1;
      end
    end
  end

  // replicated multiply-accumulate units, one per coefficient
  for (genvar i = 0; i < NC; i++) begin : g_mac
    logic signed [AW-1:0] acc, prod;
    assign prod = AW'(ln_q) * AW'(cos_q[i]);
    always_ff @(posedge clk) begin
      if (rst) begin
        acc    <= '0;
        cep[i] <= '0;
      end else if (v_q) begin
        if (last_q) begin
          cep[i] <= 32'((acc + prod) >>> Q_SHIFT);
          acc    <= '0;
        end else begin
          acc <= acc + prod;
        end
      end
    end
  end

  assign out_valid = fin;

endmodule
