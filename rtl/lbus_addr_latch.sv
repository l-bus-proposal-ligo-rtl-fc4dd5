// lbus_addr_latch: the controller's 2x8 bit backplane address latch.
//
// The processor loads the 16-bit L-bus address as two bytes (wr_lo, wr_hi).
// The latch drives the AD lines during the address phase of a bus cycle.
// Because the bus word is 16 bits, address bit 0 is always zero: it is
// forced to zero here whatever the processor writes. Both bytes can be read
// back. Loads take effect at the next clock edge.
module lbus_addr_latch (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_lo,
  input  logic        wr_hi,
  input  logic [7:0]  wdata,
  output logic [15:0] addr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
    end else begin
      if (wr_lo) addr[7:0]  <= {wdata[7:1], 1'b0};
      if (wr_hi) addr[15:8] <= wdata;
    end
  end
endmodule
