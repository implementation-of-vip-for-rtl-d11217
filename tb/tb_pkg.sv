// tb_pkg: helpers shared by the testbenches.
// mem_init gives the contents of a never-written external memory word, so a
// testbench can predict read data without a copy of the memory.
package tb_pkg;
  function automatic logic [31:0] mem_init(input logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'h5A5A_0000 ^ {a[9:2], 24'h0};
  endfunction

  // Reference SECDED encoder: builds the 38-position Hamming codeword
  // (check bits at positions 1,2,4,8,16,32, data bits elsewhere in order),
  // then appends the overall parity as check bit 6.
  function automatic logic [6:0] secded_check(input logic [31:0] d);
    logic cw [39];
    int   k;
    logic [6:0] c;
    k = 0;
    for (int p = 0; p < 39; p++) cw[p] = 1'b0;
    for (int p = 1; p <= 38; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16 && p != 32) begin
        cw[p] = d[k]; k++;
      end
    for (int i = 0; i < 6; i++) begin
      c[i] = 1'b0;
      for (int p = 1; p <= 38; p++) if ((p >> i) & 1) c[i] ^= cw[p];
    end
    c[6] = ^{d, c[5:0]};
    return c;
  endfunction
endpackage
