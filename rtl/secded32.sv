// secded32: single-error-correcting, double-error-detecting code for a
// 32-bit word (extended Hamming (39,32) code), encoder and decoder.
//
// Codeword positions 1..38 hold a Hamming code: check bit i sits at
// position 2**i (i = 0..5) and is the XOR of all positions whose index has
// bit i set; the 32 data bits fill the other positions in ascending order.
// Check bit 6 is the parity of the whole codeword (overall parity).
// Decoding recomputes the six Hamming bits: the syndrome (their XOR with
// the stored ones) names the failing position. With the overall parity
// wrong the error is single: a data bit is flipped back (a check-bit error
// needs no data correction) and ce is raised. A non-zero syndrome with
// correct overall parity is a double error: ue is raised and the data are
// passed on unchanged. Purely combinational.
//
// The original design provides SECDED for internal registers, external
// memory banks and internal RAM, each enabled by a bit of the processor
// configuration register; the code itself is this design's choice.
module secded32 (
  // encoder
  input  logic [31:0] enc_data,
  output logic [6:0]  enc_check,
  // decoder
  input  logic [31:0] dec_data,
  input  logic [6:0]  dec_check,
  output logic [31:0] dec_corrected,
  output logic        ce,          // single error, corrected
  output logic        ue           // double error, not correctable
);

  // codeword position (1..38) of each data bit, worked out once
  function automatic logic [31:0][5:0] pos_table();
    logic [31:0][5:0] t;
    int unsigned n;
    t = '0;
    n = 0;
    for (int unsigned p = 1; p < 39; p++)
      if ((p & (p - 1)) != 0) begin
        t[n] = 6'(p);
        n++;
      end
    return t;
  endfunction

  localparam logic [31:0][5:0] POS = pos_table();

  function automatic logic [5:0] hamming(input logic [31:0] d);
    logic [5:0] c;
    c = '0;
    for (int unsigned k = 0; k < 32; k++)
      for (int i = 0; i < 6; i++)
        if (POS[k][i]) c[i] ^= d[k];
    return c;
  endfunction

  always_comb begin
    logic [5:0] h;
    h = hamming(enc_data);
    enc_check = {^{enc_data, h}, h};
  end

  always_comb begin
    logic [5:0] syn;
    logic       par_err;
    syn     = hamming(dec_data) ^ dec_check[5:0];
    par_err = ^{dec_data, dec_check};
    dec_corrected = dec_data;
    ce = 1'b0;
    ue = 1'b0;
    if (par_err) begin
      ce = 1'b1;
      for (int unsigned k = 0; k < 32; k++)
        if (syn == POS[k]) dec_corrected[k] = ~dec_data[k];
    end else if (syn != 6'd0) begin
      ue = 1'b1;
    end
  end

endmodule
