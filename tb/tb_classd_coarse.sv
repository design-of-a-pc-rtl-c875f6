// Class-D output stage gate drives: every one-hot branch select with both PWM
// levels, plus no select. Checks the gate levels of all ten branches, that
// the two bridge halves are in antiphase, and the 'driven' flag.
module tb_classd_coarse;
  import hearing_pkg::*;
  logic        pwm;
  coarse_sel_t sel;
  logic [4:0]  pms_p, nms_p, pms_n, nms_n;
  logic        node_p, node_n, driven;
  int checks = 0, failures = 0;

  classd_coarse dut (.pwm(pwm), .sel(sel), .pms_p(pms_p), .nms_p(nms_p),
                     .pms_n(pms_n), .nms_n(nms_n), .node_p(node_p),
                     .node_n(node_n), .driven(driven));

  task automatic check(input logic [4:0] s, input logic p);
    logic [4:0] e_pms_p, e_nms_p, e_pms_n, e_nms_n;
    sel = s; pwm = p;
    #1;
    for (int i = 0; i < 5; i++) begin
      e_pms_p[i] = s[i] ? p  : 1'b1;
      e_nms_p[i] = s[i] ? p  : 1'b0;
      e_pms_n[i] = s[i] ? ~p : 1'b1;
      e_nms_n[i] = s[i] ? ~p : 1'b0;
    end
    checks += 5;
    if ({pms_p, nms_p} !== {e_pms_p, e_nms_p}) begin failures++; $display("FAIL p-half s=%b pwm=%b", s, p); end
    if ({pms_n, nms_n} !== {e_pms_n, e_nms_n}) begin failures++; $display("FAIL n-half s=%b pwm=%b", s, p); end
    if (driven !== (s != 0))                   begin failures++; $display("FAIL driven s=%b", s); end
    if (s != 0 && node_p !== ~p)               begin failures++; $display("FAIL node_p s=%b pwm=%b", s, p); end
    if (s != 0 && node_n !== p)                begin failures++; $display("FAIL node_n s=%b pwm=%b", s, p); end
  endtask

  initial begin
    for (int i = 0; i < 5; i++) begin
      check(5'(1 << i), 1'b0);
      check(5'(1 << i), 1'b1);
    end
    check(5'b0, 1'b0);
    check(5'b0, 1'b1);
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
