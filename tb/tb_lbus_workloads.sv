// tb_lbus_workloads: the auxiliary crates of the board survey, loaded onto
// one crate whose 20 slots all hold migration adapters (the surveyed boards
// are existing eurocards, which reach the L-bus through an adapter).
//
// For each crate the table below lists its eurocard boards (stand-alone
// units are left out: they do not occupy a slot) with their binary inputs,
// binary outputs, analog readbacks and analog outputs. The test powers the
// crate up, then for every board drives exactly its binary outputs, loads
// its analog outputs into the adapter's DACs and reads its binary inputs,
// all through the controller's register interface, and checks the adapter
// outputs against the values written. A board with more analog outputs than
// an adapter has DACs finds the extra DAC addresses unanswered (they read
// as ones), and its crate is reported as not fitting. Readbacks are analog;
// the test checks that each crate needs at most 16 readback lines and at
// most 16 channels per line. The expected verdicts: PSL, IOO and LSC fit,
// ASC does not (its WFS demodulators have 13 analog outputs each).
module tb_lbus_workloads;
  import lbus_pkg::*;
  localparam int NB = 20;
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
  logic [31:0] mig_bo [NB];
  logic [15:0] mig_dac [NB][8];
  real v_dig5 = 5.0, v_p5 = 5.0, v_n5 = -5.0, v_p15 = 15.0, v_n15 = -15.0;
  real v_p10 = 10.0, v_n10 = -10.0, v_p24 = 24.0, v_n24 = -24.0;
  logic [8:0] pwr_fail_mask;
  int checks = 0, failures = 0;

  lbus_top #(.NUM_BOARDS(NB), .NUM_ADAPTERS(NB)) dut (.*);
  always #5 clk = ~clk;

  // survey: {count, binary in, binary out, analog in, analog out}
  typedef struct { string name; int n, bi, bo, ai, ao; } board_t;
  board_t crates [4][8];
  string  crate_name [4] = '{"PSL", "IOO", "LSC", "ASC"};
  int     n_types [4] = '{4, 1, 6, 4};
  logic   expect_fit [4] = '{1, 1, 1, 0};
  int     n_loaded [4];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

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
  endtask

  function automatic logic [31:0] mask(input int n);
    return (n >= 32) ? '1 : ((32'd1 << n) - 1);
  endfunction

  // Load and check one crate; returns whether every channel found a home.
  task automatic run_crate(input int c, output logic fits);
    int slot, lines, missing;
    logic ok; logic [15:0] q; logic [7:0] st;
    slot = 0; lines = 0; missing = 0;
    board_pwr_up <= '1; repeat (4) @(posedge clk); board_pwr_up <= '0;
    repeat (4) @(posedge clk);
    for (int s = 0; s < NB; s++) bin_in[s] = 16'($urandom);
    for (int t = 0; t < n_types[c]; t++) begin
      automatic board_t bd = crates[c][t];
      for (int k = 0; k < bd.n; k++) begin
        automatic logic [31:0] bov = 32'($urandom) & mask(bd.bo);
        automatic logic [15:0] base = {8'(8'h40 + slot), 8'h00};
        automatic logic [15:0] dv [13];
        if (slot >= NB) begin missing++; continue; end
        if (bd.ai > 0) lines++;
        check(bd.ai <= 16, "readback channels fit one line");
        if (bd.bo > 0) begin
          bus_op(1, base + 16'h00, bov[15:0], ok, q); check(ok, "ACK binary outputs");
          if (bd.bo > 16) begin
            bus_op(1, base + 16'h02, bov[31:16], ok, q); check(ok, "ACK binary outputs high");
          end
          check(mig_bo[slot] == bov, "adapter binary outputs");
        end
        if (bd.bi > 0) begin
          bus_op(0, base + 16'h08, 0, ok, q);
          check(ok && ((q ^ bin_in[slot]) & 16'(mask(bd.bi))) == 0, "board binary inputs");
        end
        for (int n = 0; n < bd.ao; n++) begin
          dv[n] = 16'($urandom);
          bus_op(1, base + 16'h10 + 16'(2 * n), dv[n], ok, q);
        end
        for (int n = 0; n < bd.ao; n++) begin
          bus_op(0, base + 16'h10 + 16'(2 * n), 0, ok, q);
          if (n < 8) check(ok && q == dv[n] && mig_dac[slot][n] == dv[n], "adapter DAC");
          else if (q == 16'hFFFF) missing++;
        end
        n_loaded[c]++;
        slot++;
      end
    end
    check(lines <= NUM_AN_LINES, "readback lines");
    up_write(REG_CTRL, 8'h04);
    up_read(REG_BCMD, st); check(!st[2], "ERR cleared after loading the crate");
    fits = (missing == 0) && (lines <= NUM_AN_LINES);
    $display("%s crate: %0d boards, %0d readback lines, %0d channels without a home",
             crate_name[c], slot, lines, missing);
  endtask

  initial begin
    logic fits;
    crates[0][0] = '{"PMC", 1, 3, 0, 3, 3};
    crates[0][1] = '{"FSS", 1, 5, 0, 4, 6};
    crates[0][2] = '{"ISS", 1, 2, 0, 2, 2};
    crates[0][3] = '{"Freq. Ref.", 1, 1, 0, 2, 1};
    crates[1][0] = '{"MC Servo", 1, 5, 13, 4, 3};
    crates[2][0] = '{"Demod", 7, 0, 0, 0, 3};
    crates[2][1] = '{"PD Interface", 2, 1, 1, 1, 2};
    crates[2][2] = '{"Whitening", 3, 11, 4, 8, 0};
    crates[2][3] = '{"AA", 3, 8, 0, 0, 0};
    crates[2][4] = '{"CM", 1, 4, 12, 3, 6};
    crates[2][5] = '{"Eurocard driver", 3, 0, 0, 0, 0};
    crates[3][0] = '{"WFS demod", 7, 8, 0, 1, 13};
    crates[3][1] = '{"WFS whitening", 7, 16, 0, 8, 0};
    crates[3][2] = '{"WFS DC whitening", 2, 0, 0, 0, 0};
    crates[3][3] = '{"PZT driver", 1, 4, 0, 4, 6};
    foreach (n_loaded[i]) n_loaded[i] = 0;
    for (int i = 0; i < NB; i++) begin
      board_sw[i] = 8'(8'h40 + i);
      bin_in[i]   = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < 4; c++) begin
      run_crate(c, fits);
      check(fits == expect_fit[c], "crate verdict");
    end
    check(n_loaded[0] == 4 && n_loaded[1] == 1 && n_loaded[2] == 19 && n_loaded[3] == 17,
          "every eurocard of every crate was loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
