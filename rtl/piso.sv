// piso: parallel-in, serial-out shift register for one serial frame.
//
// data_load copies data_in into the register and marks WIDTH bits as pending; the most
// significant pending bit is driven on serial_out. Each data_shift moves the next bit to
// the output. When every bit has been shifted out, piso_empty is high and serial_out rests
// at the line's idle level, high. data_load takes priority over data_shift. Both act on
// the rising clock edge; serial_out changes in the cycle after the edge that loads or
// shifts. The role of the block follows the source design; bit order, idle level and
// the pending-bit counter are this design's choices.
module piso #(
  parameter int unsigned WIDTH = 20
) (
  input  logic             clock,
  input  logic             areset,
  input  logic             data_load,
  input  logic             data_shift,
  input  logic [WIDTH-1:0] data_in,
  output logic             serial_out,
  output logic             piso_empty
);

  logic [WIDTH-1:0]         sr;
  logic [$clog2(WIDTH+1)-1:0] pending;

  always_ff @(posedge clock or posedge areset) begin
    if (areset) begin
      sr      <= '1;
      pending <= '0;
    end else if (data_load) begin
      sr      <= data_in;
      pending <= ($clog2(WIDTH+1))'(WIDTH);
    end else if (data_shift && pending != '0) begin
      sr      <= {sr[WIDTH-2:0], 1'b1};
      pending <= pending - 1'b1;
    end
  end

  assign piso_empty = (pending == '0);
  assign serial_out = piso_empty ? 1'b1 : sr[WIDTH-1];

endmodule
