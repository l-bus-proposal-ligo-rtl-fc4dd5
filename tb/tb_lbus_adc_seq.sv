// tb_lbus_adc_seq: a behavioural ADC answers each convert pulse after a few
// cycles with a code made from the MUX line and AA it was converting. The
// testbench checks the MUX stepping, the sample tag, the data and the
// valid/ack flag.
module tb_lbus_adc_seq;
  logic clk = 0, rst_n = 0, sync = 0, sample_tick = 0;
  logic [3:0] aa = 0;
  logic [3:0] mux_sel;
  logic adc_convert, adc_drdy = 0;
  logic [15:0] adc_data = 0;
  logic [15:0] sample;
  logic [7:0] sample_tag;
  logic valid, ack = 0;
  int checks = 0, failures = 0;
  logic [3:0] exp_line;

  lbus_adc_seq dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Behavioural ADC: converts the analog value seen at the convert pulse.
  always @(posedge clk) if (adc_convert) begin
    automatic logic [15:0] v = {4'hA, aa, 4'h5, mux_sel};
    // mux_sel has already stepped: the converted line is the previous one
    v[3:0] = mux_sel - 4'd1;
    repeat (3) @(posedge clk);
    adc_data <= v;
    adc_drdy <= 1;
    @(posedge clk);
    adc_drdy <= 0;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    exp_line = 0;
    for (int s = 0; s < 40; s++) begin
      repeat (10) @(posedge clk);
      if (s % 16 == 0 && s > 0) aa <= aa + 1;
      @(posedge clk);
      #1 check(mux_sel == exp_line, "mux_sel before tick");
      sample_tick <= 1; @(posedge clk); sample_tick <= 0;
      #1 check(adc_convert == 1, "convert pulse");
      check(mux_sel == exp_line + 4'd1, "mux stepped");
      repeat (6) @(posedge clk);
      #1 check(valid == 1, "valid set");
      check(sample_tag == {aa, exp_line}, "tag");
      check(sample == {4'hA, aa, 4'h5, exp_line}, "data");
      ack <= 1; @(posedge clk); ack <= 0;
      #1 check(valid == 0, "valid cleared");
      exp_line = exp_line + 1;
    end
    sync <= 1; @(posedge clk); sync <= 0;
    #1 check(mux_sel == 0, "sync restarts line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
