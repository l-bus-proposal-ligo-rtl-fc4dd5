// lbus_bus_logic: L-bus master sequencer of the bus controller.
//
// One 'start' runs one complete bus cycle on the P2 digital backplane with
// the timing of the L-bus specification. All strobes are low-active and idle
// high; the controller drives AD0-AD15 only while ad_oe is high.
//
//   write: ADDR low with the address on AD (t_ADDR), ADDR high with the
//          address held (t_AH), data on AD and WR low (t_DS), CLK low
//          (t_WR), CLK high with data and WR held (t_DH), then AD released
//          and WR high for t_CA before the next cycle may begin.
//   read:  ADDR low with the address (t_ADDR), address held (t_AH), AD
//          released (turn-around, at least one cycle and at least t_CD
//          after ADDR rose), CLK low (t_RD) while the board drives its datum,
//          then CLK high and t_CA of idle bus.
//
// ACK cannot stretch a cycle: it only reports that a board decoded the
// address. It is sampled, together with the read datum, in the last cycle
// of CLK low; ack_ok tells whether it was seen. done pulses for one cycle
// when the datum is captured (rd_cap) or the write has finished its data
// phase.
//
// The minimum times are parameters in ns and are rounded up to whole cycles
// of CLK_HZ. At the default 2^24 Hz clock a write takes 12 cycles and a read
// 11 cycles after start (about 0.7 us), far above the required 10 kB/s.
//
// Also here: the ERR line is synchronised and latched (err_latched, cleared
// by err_clr while ERR is released), the RESET line is driven low while
// reset_req is high, and stand-by mode refuses new cycles (they finish at
// once with ack_ok low) so that the bus stays quiet.
//
// The timing values, ACK rule, ERR latching, RESET and stand-by follow the
// document. Cycle-based sequencing, the ack sample point, the turn-around
// cycle and the stand-by refusal are this design's choices.
module lbus_bus_logic
  import lbus_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 16_777_216,
  parameter int unsigned T_ADDR_NS = 200,
  parameter int unsigned T_AH_NS   = 50,
  parameter int unsigned T_DS_NS   = 50,
  parameter int unsigned T_WR_NS   = 200,  // also t_RD
  parameter int unsigned T_DH_NS   = 50,
  parameter int unsigned T_CD_NS   = 50,
  parameter int unsigned T_CA_NS   = 50
) (
  input  logic        clk,
  input  logic        rst_n,
  // command side
  input  logic        start,
  input  logic        write,      // 1 = write, 0 = read
  input  logic [15:0] addr,
  input  logic [15:0] wdata,
  input  logic        standby,
  input  logic        reset_req,
  input  logic        err_clr,
  output logic        busy,
  output logic        done,
  output logic        ack_ok,
  output logic        rd_cap,     // capture rdata into the data latch
  output logic [15:0] rdata,
  output logic        err_latched,
  // backplane
  output logic [15:0] ad_out,
  output logic        ad_oe,
  output logic        addr_n,
  output logic        wr_n,
  output logic        bclk_n,
  output logic        reset_n,
  input  logic [15:0] ad_in,
  input  logic        ack_n,
  input  logic        err_n
);
  localparam int unsigned C_ADDR = ns_to_cycles(T_ADDR_NS, CLK_HZ);
  localparam int unsigned C_AH   = ns_to_cycles(T_AH_NS, CLK_HZ);
  localparam int unsigned C_DS   = ns_to_cycles(T_DS_NS, CLK_HZ);
  localparam int unsigned C_WR   = ns_to_cycles(T_WR_NS, CLK_HZ);
  localparam int unsigned C_DH   = ns_to_cycles(T_DH_NS, CLK_HZ);
  localparam int unsigned C_CD   = ns_to_cycles(T_CD_NS, CLK_HZ);
  localparam int unsigned C_CA   = ns_to_cycles(T_CA_NS, CLK_HZ);
  localparam int unsigned C_TURN = (C_CD > C_AH) ? (C_CD - C_AH) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_ADDR, S_AHOLD, S_TURN, S_SETUP, S_CLKLO, S_DHOLD, S_GAP
  } state_e;

  state_e      state;
  logic [7:0]  cnt;      // cycles left in the current state, minus one
  logic        is_wr;
  logic [15:0] a_q, d_q;
  logic [1:0]  err_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      is_wr  <= 1'b0;
      a_q    <= '0;
      d_q    <= '0;
      ack_ok <= 1'b0;
      done   <= 1'b0;
      rd_cap <= 1'b0;
      rdata  <= '0;
    end else begin
      done   <= 1'b0;
      rd_cap <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          if (standby) begin
            ack_ok <= 1'b0;
            done   <= 1'b1;
          end else begin
            state <= S_ADDR;
            cnt   <= 8'(C_ADDR - 1);
            is_wr <= write;
            a_q   <= {addr[15:1], 1'b0};
            d_q   <= wdata;
          end
        end
        S_ADDR: if (cnt == 0) begin
          state <= S_AHOLD;
          cnt   <= 8'(C_AH - 1);
        end else cnt <= cnt - 1'b1;
        S_AHOLD: if (cnt == 0) begin
          state <= is_wr ? S_SETUP : S_TURN;
          cnt   <= is_wr ? 8'(C_DS - 1) : 8'(C_TURN - 1);
        end else cnt <= cnt - 1'b1;
        S_TURN, S_SETUP: if (cnt == 0) begin
          state <= S_CLKLO;
          cnt   <= 8'(C_WR - 1);
        end else cnt <= cnt - 1'b1;
        S_CLKLO: if (cnt == 0) begin
          ack_ok <= !ack_n;
          if (is_wr) begin
            state <= S_DHOLD;
            cnt   <= 8'(C_DH - 1);
          end else begin
            rdata  <= ad_in;
            rd_cap <= 1'b1;
            done   <= 1'b1;
            state  <= S_GAP;
            cnt    <= 8'(C_CA - 1);
          end
        end else cnt <= cnt - 1'b1;
        S_DHOLD: if (cnt == 0) begin
          done  <= 1'b1;
          state <= S_GAP;
          cnt   <= 8'(C_CA - 1);
        end else cnt <= cnt - 1'b1;
        S_GAP: if (cnt == 0) state <= S_IDLE;
               else cnt <= cnt - 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Backplane outputs, decoded from the state.
  always_comb begin
    addr_n = !(state == S_ADDR);
    bclk_n = !(state == S_CLKLO);
    wr_n   = !(is_wr && (state == S_SETUP || state == S_CLKLO || state == S_DHOLD));
    ad_oe  = (state == S_ADDR || state == S_AHOLD ||
              (is_wr && (state == S_SETUP || state == S_CLKLO || state == S_DHOLD)));
    ad_out = (state == S_ADDR || state == S_AHOLD) ? a_q : d_q;
  end

  assign busy = (state != S_IDLE);

  // ERR: open-collector, low-active, asynchronous; synchronise and latch.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_sync    <= 2'b11;
      err_latched <= 1'b0;
      reset_n     <= 1'b1;
    end else begin
      err_sync <= {err_sync[0], err_n};
      if (!err_sync[1])  err_latched <= 1'b1;
      else if (err_clr)  err_latched <= 1'b0;
      reset_n <= !reset_req;
    end
  end

  // Bus rules: the address and data phases never overlap, and WR only
  // changes while CLK is high.
  a_addr_clk: assert property (@(posedge clk) disable iff (!rst_n) !(!addr_n && !bclk_n));
  a_wr_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 (!bclk_n && $past(!bclk_n)) |-> (wr_n == $past(wr_n)));

endmodule
