// Fine-control step logic: all 128 level codes. The expected step lines are
// the three low bits shifted to the section's base line: base = section for
// sections 0..10 and 12 for sections 11..15 (the step-group table).
module tb_fine_step_logic;
  logic [2:0]  lsb;
  logic [10:0] dsel;
  logic        d11_d15;
  logic [14:0] r;
  int checks = 0, failures = 0;

  fine_step_logic dut (.lsb(lsb), .dsel(dsel), .d11_d15(d11_d15), .r(r));

  initial begin
    for (int code = 0; code < 128; code++) begin
      int sec, base;
      logic [14:0] exp_r;
      sec     = code / 8;
      base    = (sec <= 10) ? sec : 12;
      exp_r   = 15'((code % 8) << base);
      lsb     = 3'(code);
      dsel    = (sec <= 10) ? 11'(1 << sec) : 11'd0;
      d11_d15 = (sec >= 11);
      #1;
      checks++;
      if (r !== exp_r) begin
        failures++;
        if (failures < 10) $display("FAIL code=%0d r=%b exp=%b", code, r, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
