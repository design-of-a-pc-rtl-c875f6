// Gate selection cell: all four input combinations against the truth table
// (enabled: both gates follow IN; disabled: PMOS gate high, NMOS gate low).
module tb_gate_select;
  logic in, en, pms, nms;
  int checks = 0, failures = 0;

  gate_select dut (.in(in), .en(en), .pms(pms), .nms(nms));

  initial begin
    for (int k = 0; k < 4; k++) begin
      {en, in} = 2'(k);
      #1;
      checks += 2;
      if (pms !== (en ? in : 1'b1)) begin failures++; $display("FAIL pms en=%b in=%b", en, in); end
      if (nms !== (en ? in : 1'b0)) begin failures++; $display("FAIL nms en=%b in=%b", en, in); end
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
