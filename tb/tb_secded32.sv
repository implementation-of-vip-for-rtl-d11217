// tb_secded32: self-checking test of the SECDED encoder/decoder.
// The check bits are compared with an independently written reference
// encoder; then every single-bit error of the 39-bit codeword must be
// corrected (ce, data restored), random double-bit errors must be flagged
// (ue) and clean words must pass untouched.
module tb_secded32;
  logic [31:0] enc_data, dec_data, dec_corrected;
  logic [6:0]  enc_check, dec_check;
  logic        ce, ue;

  secded32 dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [31:0] d; logic [6:0] c; logic [38:0] cw;
      d = (n == 0) ? 32'h0 : (n == 1 ? 32'hFFFF_FFFF : $urandom);
      enc_data = d; #1;
      c = tb_pkg::secded_check(d);
      check(enc_check == c, $sformatf("check bits of %h: %h vs %h", d, enc_check, c));
      cw = {c, d};
      dec_data = d; dec_check = c; #1;
      check(!ce && !ue && dec_corrected == d, "clean word");
      for (int b = 0; b < 39; b++) begin
        logic [38:0] e;
        e = cw ^ (39'd1 << b);
        {dec_check, dec_data} = e; #1;
        check(ce && !ue && dec_corrected == d, $sformatf("single error bit %0d", b));
      end
      for (int k = 0; k < 10; k++) begin
        int b1, b2; logic [38:0] e;
        b1 = $urandom_range(0, 38);
        do b2 = $urandom_range(0, 38); while (b2 == b1);
        e = cw ^ (39'd1 << b1) ^ (39'd1 << b2);
        {dec_check, dec_data} = e; #1;
        check(ue && !ce, $sformatf("double error bits %0d %0d", b1, b2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
