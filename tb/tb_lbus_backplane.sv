// tb_lbus_backplane: random single drivers on AD (controller or one of the
// 20 boards), idle bus, and random ACK/ERR pull-downs, compared with the
// expected wired result.
module tb_lbus_backplane;
  localparam int NB = 20;
  logic [15:0] ctrl_ad, brd_ad [NB], ad;
  logic ctrl_oe;
  logic [NB-1:0] brd_oe, brd_ack, brd_err;
  logic ack_n, err_n;
  int checks = 0, failures = 0;

  lbus_backplane dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      automatic int who = $urandom_range(0, NB + 1);   // NB: controller, NB+1: nobody
      automatic logic [15:0] exp;
      ctrl_ad = 16'($urandom);
      foreach (brd_ad[i]) brd_ad[i] = 16'($urandom);
      ctrl_oe = (who == NB);
      brd_oe  = (who < NB) ? NB'(1) << who : '0;
      brd_ack = ($urandom_range(0, 1) == 0) ? '0 : NB'(1) << $urandom_range(0, NB - 1);
      brd_err = ($urandom_range(0, 3) != 0) ? '0 : NB'($urandom);
      #1;
      exp = (who == NB) ? ctrl_ad : (who < NB) ? brd_ad[who] : 16'hFFFF;
      checks++;
      if (ad !== exp || ack_n !== (brd_ack == 0) || err_n !== (brd_err == 0)) begin
        failures++; $display("FAIL t=%0d who=%0d ad=%h exp=%h", t, who, ad, exp);
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
