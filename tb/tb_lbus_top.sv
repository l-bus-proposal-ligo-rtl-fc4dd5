// tb_lbus_top: end-to-end test of a full crate at the default parameters:
// controller, backplane, 19 example user boards (switch addresses
// 0x40..0x52) and a migration adapter in the last slot (0x53), the
// controller clock at 2^24 Hz and the readback scan at
// 4096 samples/s.
//
// The processor model (tasks on the up_* register bus) does what the host
// software would do: it sees the boards' power-up ERR, loads every board
// (binary outputs, 16-bit DAC, quad DAC), loads the adapter (32 binary
// outputs, 8 DACs), reads everything back, reads the binary inputs, clears ERR, loads the 8 control DACs, follows one complete
// 16 Hz readback frame (256 channels) and checks every sample against the
// analog model: readback line L is board L's line and carries channel AA of
// that board. It then restarts the scan with a 1 pps pulse, powers one board
// up again (ERR, reload), lets +15 V sag (ERR from the supply monitor),
// tries an empty slot (no ACK), stand-by and the reset button. Every mechanism is counted and must occur.
module tb_lbus_top;
  import lbus_pkg::*;
  localparam int NB = 20;
  localparam int NU = NB - 1;   // example user boards; slot NB-1 is the adapter
  localparam int SAMPLE_CYC = 4096;
  logic clk = 0, rst_n = 0, pps = 0, reset_btn = 0;
  logic [5:0] up_adr = 0;
  logic [7:0] up_wdata = 0, up_rdata;
  logic up_wr = 0, up_rd = 0, irq;
  logic [3:0] mux_sel, aa;
  logic adc_convert, adc_drdy = 0;
  logic [15:0] adc_data = 0;
  logic [15:0] dac_code [8];
  logic [7:0] dac_load;
  logic [15:0] bus_ad;
  logic bus_addr_n, bus_wr_n, bus_clk_n, bus_ack_n, bus_err_n, bus_reset_n;
  logic [7:0] board_sw [NB];
  logic [NB-1:0] board_pwr_up = '0;
  logic [15:0] bin_in [NB], bin_out [NB], hires_code [NB];
  logic [11:0] lores_code [NB][4];
  logic [31:0] mig_bo [1];
  logic [15:0] mig_dac [1][8];
  int n_mig = 0;
  real v_dig5 = 5.0, v_p5 = 5.0, v_n5 = -5.0, v_p15 = 15.0, v_n15 = -15.0;
  real v_p10 = 10.0, v_n10 = -10.0, v_p24 = 24.0, v_n24 = -24.0;
  logic [8:0] pwr_fail_mask;
  int n_pwr = 0;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_noack = 0, n_stby = 0, n_err = 0, n_reinit = 0;
  int n_reset = 0, n_dacload = 0, n_frame = 0, n_pps = 0, n_irq = 0, n_samp = 0;

  lbus_top dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- processor ----------------
  task automatic up_write(input logic [5:0] a, input logic [7:0] d);
    @(posedge clk); up_adr <= a; up_wdata <= d; up_wr <= 1;
    @(posedge clk); up_wr <= 0;
  endtask
  task automatic up_read(input logic [5:0] a, output logic [7:0] d);
    @(posedge clk); up_adr <= a; up_rd <= 1;
    #1 d = up_rdata;
    @(posedge clk); up_rd <= 0;
  endtask
  task automatic bus_op(input logic w, input logic [15:0] a, input logic [15:0] d,
                        output logic ok, output logic [15:0] q);
    logic [7:0] st, lo, hi;
    up_write(REG_BADDR_LO, a[7:0]);
    up_write(REG_BADDR_HI, a[15:8]);
    if (w) begin
      up_write(REG_BDATA_LO, d[7:0]);
      up_write(REG_BDATA_HI, d[15:8]);
    end
    up_write(REG_BCMD, {6'd0, w, 1'b1});
    do up_read(REG_BCMD, st); while (st[0]);
    ok = st[1];
    up_read(REG_BDATA_LO, lo);
    up_read(REG_BDATA_HI, hi);
    q = {hi, lo};
    if (ok && w) n_wr++;
    if (ok && !w) n_rd++;
  endtask

  function automatic logic [15:0] bo_val(input int b);  return 16'(16'h1357 * (b + 1)); endfunction
  function automatic logic [15:0] hr_val(input int b);  return 16'(16'hF00D ^ (b << 4)); endfunction
  function automatic logic [11:0] lr_val(input int b, input int c); return 12'(b * 64 + c * 7 + 1); endfunction

  task automatic load_board(input int b);
    logic ok; logic [15:0] q, base;
    base = {8'(8'h40 + b), 8'h00};
    bus_op(1, base + 16'h00, bo_val(b), ok, q); check(ok, "ACK binary outputs");
    bus_op(1, base + 16'h10, hr_val(b), ok, q); check(ok, "ACK 16-bit DAC");
    for (int c = 0; c < 4; c++) begin
      bus_op(1, base + 16'h18 + 16'(2 * c), {4'h0, lr_val(b, c)}, ok, q);
      check(ok, "ACK quad DAC");
    end
  endtask

  task automatic verify_board(input int b);
    logic ok; logic [15:0] q, base;
    base = {8'(8'h40 + b), 8'h00};
    check(bin_out[b] == bo_val(b) && hires_code[b] == hr_val(b), "board outputs");
    for (int c = 0; c < 4; c++) check(lores_code[b][c] == lr_val(b, c), "quad DAC outputs");
    bus_op(0, base + 16'h00, 0, ok, q); check(ok && q == bo_val(b), "read back binary outputs");
    bus_op(0, base + 16'h08, 0, ok, q); check(ok && q == bin_in[b], "read binary inputs");
    bus_op(0, base + 16'h10, 0, ok, q); check(ok && q == hr_val(b), "read back 16-bit DAC");
    for (int c = 0; c < 4; c++) begin
      bus_op(0, base + 16'h18 + 16'(2 * c), 0, ok, q);
      check(ok && q == {4'h0, lr_val(b, c)}, "read back quad DAC");
    end
  endtask

  // migration adapter in slot NB-1
  function automatic logic [15:0] md_val(input int n); return 16'(16'h0F1E * (n + 3)); endfunction
  task automatic load_adapter();
    logic ok; logic [15:0] q;
    bus_op(1, 16'h5300, 16'hA5C3, ok, q); check(ok, "ACK adapter BO15..0");
    bus_op(1, 16'h5302, 16'h3C5A, ok, q); check(ok, "ACK adapter BO31..16");
    for (int n = 0; n < 8; n++) begin
      bus_op(1, 16'h5310 + 16'(2 * n), md_val(n), ok, q); check(ok, "ACK adapter DAC");
    end
  endtask
  task automatic verify_adapter();
    logic ok; logic [15:0] q;
    check(mig_bo[0] == 32'h3C5A_A5C3, "adapter binary outputs");
    bus_op(0, 16'h5302, 0, ok, q); check(ok && q == 16'h3C5A, "read back adapter BO31..16");
    bus_op(0, 16'h5308, 0, ok, q); check(ok && q == bin_in[NB-1], "read adapter binary inputs");
    for (int n = 0; n < 8; n++) begin
      check(mig_dac[0][n] == md_val(n), "adapter DAC code");
      bus_op(0, 16'h5310 + 16'(2 * n), 0, ok, q);
      check(ok && q == md_val(n), "read back adapter DAC"); n_mig += ok;
    end
    check(bin_out[NB-1] == 0 && hires_code[NB-1] == 0, "adapter slot has no board outputs");
  endtask

  // ---------------- analog model: boards' readback lines and the ADC ----------------
  function automatic logic [15:0] vin(input logic [3:0] line, input logic [3:0] a);
    return {line, a, 8'(8'hC3 ^ {line, a})};
  endfunction
  logic [3:0] prev_mux = 0, prev_aa = 0;
  always @(posedge clk) begin
    if (adc_convert) begin
      automatic logic [15:0] v = vin(prev_mux, prev_aa);
      fork begin
        repeat (40) @(posedge clk);   // conversion time
        adc_data <= v; adc_drdy <= 1;
        @(posedge clk) adc_drdy <= 0;
      end join_none
    end
    prev_mux <= mux_sel; prev_aa <= aa;
  end

  // event counters
  always @(posedge clk) begin
    if (rst_n) n_irq += irq;
    if (rst_n) n_dacload += $countones(dac_load);
  end
  always @(negedge bus_reset_n) n_reset++;

  initial begin
    logic ok; logic [15:0] q; logic [7:0] b, lo, hi, tag, exp_tag;
    int seen [256];
    int t_first;
    for (int i = 0; i < NB; i++) begin
      board_sw[i] = 8'(8'h40 + i);
      bin_in[i]   = 16'(16'hB000 + i * 3);
    end
    foreach (seen[i]) seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // crate power-up: every board pulls ERR until its RC charges
    board_pwr_up <= '1; repeat (20) @(posedge clk); board_pwr_up <= '0;
    repeat (4) @(posedge clk);
    up_read(REG_BCMD, b);
    check(b[2], "ERR latched after power-up"); n_err += b[2];

    // initialise every board, then clear ERR
    for (int i = 0; i < NU; i++) load_board(i);
    load_adapter();
    up_write(REG_CTRL, 8'h04);
    up_read(REG_BCMD, b); check(!b[2], "ERR cleared after initialisation");
    for (int i = 0; i < NU; i++) verify_board(i);
    verify_adapter();

    // control DACs
    for (int c = 0; c < 8; c++) begin
      up_write(6'(REG_DAC_BASE + 2 * c), 8'(c + 1));
      up_write(6'(REG_DAC_BASE + 2 * c + 1), 8'(8'h80 + c));
    end
    repeat (2) @(posedge clk);
    for (int c = 0; c < 8; c++) check(dac_code[c] == {8'(8'h80 + c), 8'(c + 1)}, "control DAC code");

    // one complete 16 Hz readback frame, aligned with 1 pps
    pps <= 1; @(posedge clk); pps <= 0; n_pps++;
    repeat (10) @(posedge clk);
    up_read(REG_ADC_HI, hi);            // drop a sample from before the restart
    exp_tag = 8'h00;
    t_first = 0;
    for (int s = 0; s < 257; s++) begin
      do up_read(REG_BCMD, b); while (!b[5]);
      up_read(REG_ADC_LO, lo);
      up_read(REG_ADC_TAG, tag);
      up_read(REG_ADC_HI, hi);
      check(tag == exp_tag, "scan order");
      check({hi, lo} == vin(tag[3:0], tag[7:4]), "sample of the right channel");
      seen[tag]++;
      n_samp++;
      if (s == 0) t_first = int'($time / 10);
      if (s == 256) begin
        // channel (0,0) again after exactly 256 sample periods: 16 Hz
        check(int'($time / 10) - t_first >= 256 * SAMPLE_CYC - 8 &&
              int'($time / 10) - t_first <= 256 * SAMPLE_CYC + 8, "16 Hz frame period");
        n_frame++;
      end
      exp_tag = exp_tag + 8'd1;
      // some bus traffic between samples
      if (s % 32 == 5) begin
        bus_op(0, {8'(8'h40 + s / 32), 8'h08}, 0, ok, q);
        check(ok && q == bin_in[s / 32], "bus read during the scan");
      end
    end
    begin
      int all = 1;
      foreach (seen[i]) if (seen[i] == 0) all = 0;
      check(all == 1, "all 256 channels in one frame");
    end

    // board 7 is power cycled: ERR, lost settings, reload
    board_pwr_up[7] <= 1; repeat (10) @(posedge clk); board_pwr_up[7] <= 0;
    check(bin_out[7] == 0, "board 7 lost its settings");
    up_read(REG_BCMD, b); check(b[2], "ERR latched after board power-up");
    if (b[2]) begin
      n_err++;
      load_board(7); n_reinit++;
      up_write(REG_CTRL, 8'h04);
      up_read(REG_BCMD, b); check(!b[2], "ERR cleared");
    end
    verify_board(7);

    // +15 V sags below 14.25 V: ERR from the supply monitor
    v_p15 = 14.1; repeat (4) @(posedge clk);
    check(pwr_fail_mask == 9'b000001000, "supply monitor flags +15 V");
    v_p15 = 15.0;
    up_read(REG_BCMD, b); check(b[2], "ERR latched on supply failure"); n_pwr += b[2];
    up_write(REG_CTRL, 8'h04);
    up_read(REG_BCMD, b); check(!b[2], "ERR cleared after supply recovered");

    // empty slot: no ACK
    bus_op(0, 16'h9000, 0, ok, q); check(!ok, "no ACK from empty slot"); n_noack += !ok;
    // stand-by: the bus stays quiet
    up_write(REG_CTRL, 8'h01);
    bus_op(1, 16'h4000, 16'h0000, ok, q);
    check(!ok && bin_out[0] == bo_val(0), "stand-by: no bus cycle"); n_stby += !ok;
    up_write(REG_CTRL, 8'h00);
    // reset button
    reset_btn <= 1; repeat (4) @(posedge clk); reset_btn <= 0; repeat (4) @(posedge clk);

    check(n_wr > 0,      "mechanism: bus write");
    check(n_rd > 0,      "mechanism: bus read");
    check(n_noack > 0,   "mechanism: missing ACK");
    check(n_stby > 0,    "mechanism: stand-by");
    check(n_err >= 2,    "mechanism: ERR latch");
    check(n_reinit > 0,  "mechanism: board re-initialisation");
    check(n_reset > 0,   "mechanism: master reset");
    check(n_dacload == 8, "mechanism: control DAC load");
    check(n_frame > 0,   "mechanism: full readback frame");
    check(n_pps > 0,     "mechanism: 1 pps restart");
    check(n_irq > 256,   "mechanism: heartbeat IRQ");
    check(n_pwr > 0,     "mechanism: supply failure on ERR");
    check(n_mig == 8,    "mechanism: migration adapter access");
    $display("events: wr=%0d rd=%0d noack=%0d stby=%0d err=%0d reinit=%0d reset=%0d dac=%0d frame=%0d pps=%0d irq=%0d samples=%0d mig=%0d",
             n_wr, n_rd, n_noack, n_stby, n_err, n_reinit, n_reset, n_dacload, n_frame, n_pps, n_irq, n_samp, n_mig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
