// lbus_data_latch: the controller's bidirectional 2x8 bit backplane data latch.
//
// For a bus write the processor loads the 16-bit datum as two bytes; the
// bus logic drives it onto AD0-AD15 in the data phase. For a bus read the
// bus logic captures the datum from the backplane (cap) at the end of the
// data phase, and the processor reads it back as two bytes. A capture wins
// over a processor write in the same cycle. Updates take effect at the next
// clock edge.
module lbus_data_latch (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_lo,
  input  logic        wr_hi,
  input  logic [7:0]  wdata,
  input  logic        cap,      // capture from the backplane
  input  logic [15:0] cap_data,
  output logic [15:0] data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data <= '0;
    end else if (cap) begin
      data <= cap_data;
    end else begin
      if (wr_lo) data[7:0]  <= wdata;
      if (wr_hi) data[15:8] <= wdata;
    end
  end
endmodule
