// tb_lbus_ctrl_decode: checks the device select and sub-address of every
// register address against the register map.
module tb_lbus_ctrl_decode;
  import lbus_pkg::*;
  logic [5:0] adr;
  dev_sel_t sel, exp;
  logic [3:0] sub;
  int checks = 0, failures = 0;

  lbus_ctrl_decode dut (.*);

  initial begin
    for (int a = 0; a < 64; a++) begin
      adr = 6'(a);
      exp = '0;
      if (a <= 1) exp.baddr = 1;
      else if (a <= 3) exp.bdata = 1;
      else if (a == 4) exp.bcmd = 1;
      else if (a == 5) exp.ctrl = 1;
      else if (a <= 8) exp.adc = 1;
      else if (a == 9) exp.aacnt = 1;
      else if (a >= 16 && a < 32) exp.dac = 1;
      #1;
      checks++;
      if (sel !== exp || sub !== 4'(a)) begin
        failures++; $display("FAIL adr=%h sel=%b exp=%b", a, sel, exp);
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
