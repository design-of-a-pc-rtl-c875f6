// Decoder logic: all sixteen section codes. d must be one-hot at the code,
// D0_D11 high for sections 0..11 and D11_D15 high for sections 11..15.
module tb_decoder_logic;
  logic [3:0]  msb;
  logic [15:0] d;
  logic        d0_d11, d11_d15;
  int checks = 0, failures = 0;

  decoder_logic dut (.msb(msb), .d(d), .d0_d11(d0_d11), .d11_d15(d11_d15));

  initial begin
    for (int s = 0; s < 16; s++) begin
      msb = 4'(s);
      #1;
      checks += 3;
      if (d !== 16'(1 << s))        begin failures++; $display("FAIL d s=%0d d=%h", s, d); end
      if (d0_d11 !== (s <= 11))     begin failures++; $display("FAIL d0_d11 s=%0d", s); end
      if (d11_d15 !== (s >= 11))    begin failures++; $display("FAIL d11_d15 s=%0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
