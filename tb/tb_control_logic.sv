// Control logic: all 128 level codes against an independent model of the
// level plan: coarse branch by code range (0..95, 96..103, 104..111,
// 112..119, 120..127), step lines = low bits at the section's base line,
// offset line = D(section) for sections 1..10, the top offset line for
// sections 11..15, none for section 0. Also checks that the step lines of
// every code stay inside the section's group of three.
module tb_control_logic;
  import hearing_pkg::*;
  level_t      level;
  level_ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_logic dut (.level(level), .ctrl(ctrl));

  initial begin
    for (int code = 0; code < 128; code++) begin
      int sec, base;
      logic [4:0]  exp_coarse;
      logic [14:0] exp_step, group;
      logic [10:0] exp_off;
      sec  = code / 8;
      base = (sec <= 10) ? sec : 12;
      if      (code < 96)  exp_coarse = 5'b00001;
      else if (code < 104) exp_coarse = 5'b00010;
      else if (code < 112) exp_coarse = 5'b00100;
      else if (code < 120) exp_coarse = 5'b01000;
      else                 exp_coarse = 5'b10000;
      exp_step = 15'((code % 8) << base);
      group    = 15'(7 << base);
      if (sec == 0)       exp_off = '0;
      else if (sec <= 10) exp_off = 11'(1 << (sec - 1));
      else                exp_off = 11'b100_0000_0000;
      level = 7'(code);
      #1;
      checks += 4;
      if (ctrl.coarse !== exp_coarse) begin failures++; $display("FAIL coarse code=%0d %b", code, ctrl.coarse); end
      if (ctrl.step !== exp_step)     begin failures++; $display("FAIL step code=%0d %b", code, ctrl.step); end
      if (ctrl.offset !== exp_off)    begin failures++; $display("FAIL offset code=%0d %b", code, ctrl.offset); end
      if ((ctrl.step & ~group) != 0)  begin failures++; $display("FAIL group code=%0d", code); end
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
