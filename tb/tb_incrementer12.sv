// Exhaustive check of the 12-bit incrementer: every input value, compared
// with integer addition modulo 4096.
module tb_incrementer12;
  logic [11:0] a, out;
  int checks = 0, failures = 0;

  incrementer12 dut (.a(a), .out(out));

  initial begin
    for (int v = 0; v < 4096; v++) begin
      a = 12'(v);
      #1;
      checks++;
      if (int'(out) != ((v + 1) % 4096)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d out=%0d", v, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
