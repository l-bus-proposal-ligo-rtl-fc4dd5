// lbus_backplane: the P2 digital bus shared by the controller and the boards.
//
// AD0-AD15 are driven by the controller (address, write data) or by one
// selected board (read data); when nobody drives them they read as all ones
// (pull-ups). ACK and ERR are open-collector, low-active lines: any board
// pulling them makes them low. ADDR, WR, CLK and RESET are driven only by the
// controller and reach every board unchanged, so they do not pass through
// here. An assertion flags two drivers on AD at the same time.
//
// Resolution is combinational. The slot count follows the full-width
// backplane (21 slots, one for the controller); the pull-up level of an idle
// AD bus is this design's choice.
module lbus_backplane
  import lbus_pkg::*;
#(
  parameter int unsigned NUM_BOARDS = 20
) (
  input  logic [AD_W-1:0]       ctrl_ad,
  input  logic                  ctrl_oe,
  input  logic [AD_W-1:0]       brd_ad  [NUM_BOARDS],
  input  logic [NUM_BOARDS-1:0] brd_oe,
  input  logic [NUM_BOARDS-1:0] brd_ack,
  input  logic [NUM_BOARDS-1:0] brd_err,
  output logic [AD_W-1:0]       ad,
  output logic                  ack_n,
  output logic                  err_n
);
  always_comb begin
    ad = ctrl_oe ? ctrl_ad : '1;
    for (int i = 0; i < NUM_BOARDS; i++)
      if (brd_oe[i]) ad = ad & brd_ad[i];
    ack_n = !(|brd_ack);
    err_n = !(|brd_err);
  end

  always_comb begin
    a_one_driver: assert ($countones({ctrl_oe, brd_oe}) <= 1)
      else $error("lbus_backplane: AD driven by more than one slot");
  end
endmodule
