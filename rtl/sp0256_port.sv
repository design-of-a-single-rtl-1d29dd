// sp0256_port - output port registers for an SP0256 speech synthesizer.
//
// Two registers hold the levels of the synthesizer's input pins between
// CPU stores: a 6-bit register for the allophone address pins A6:1, loaded
// from WriteData[5:0] when a_we is high, and a 1-bit register for the
// address-load pin ALD#, loaded from WriteData[0] when ald_we is high. Both
// load on the rising clock edge that ends the sw instruction. The
// synthesizer reads A6:1 on the falling edge of ALD#, so the driver first
// stores the code and then stores 0 to ALD#.
//
// Which WriteData bits feed which pin follows the architecture. Holding the
// levels in registers, and the reset values (A6:1 = 0, ALD# = 1, i.e. no
// load pending), are this design's choices.
module sp0256_port (
  input  logic        clk,
  input  logic        rst,         // synchronous, active high
  input  logic [31:0] write_data,  // WriteData bus
  input  logic        a_we,        // store to the A6:1 location
  input  logic        ald_we,      // store to the ALD# location
  output logic [5:0]  a,           // pins A6:1 (a[0] drives A1)
  output logic        ald_n        // pin ALD#
);

  always_ff @(posedge clk) begin
    if (rst) begin
      a     <= '0;
      ald_n <= 1'b1;
    end else begin
      if (a_we)   a     <= write_data[5:0];
      if (ald_we) ald_n <= write_data[0];
    end
  end

endmodule
