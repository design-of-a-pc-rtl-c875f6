// Comparator check: equal pairs, pairs differing in exactly one bit (every
// bit position) and random pairs; eq_n must be low exactly when a == b.
module tb_comparator12;
  logic [11:0] a, b;
  logic        eq_n;
  int checks = 0, failures = 0;

  comparator12 dut (.a(a), .b(b), .eq_n(eq_n));

  task automatic check_pair(input logic [11:0] x, input logic [11:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (eq_n !== (x != y)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h eq_n=%b", x, y, eq_n);
    end
  endtask

  initial begin
    for (int i = 0; i < 300; i++) begin
      logic [11:0] x;
      x = 12'($urandom);
      check_pair(x, x);
      check_pair(x, x ^ (12'd1 << (i % 12)));
      check_pair(x, 12'($urandom));
    end
    check_pair(12'h000, 12'h000);
    check_pair(12'hfff, 12'hfff);
    check_pair(12'hfff, 12'h000);
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
