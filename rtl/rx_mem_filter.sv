// rx_mem_filter: decides which D-RORC replies are written into the RX memory.
//
// Each reply carries the 8-bit number of the channel it came from. The write enable is
// passed on only if the channel number equals the pattern in every bit position whose
// match_mask bit is set; positions with a clear mask bit are ignored, so a mask of 0
// stores replies from all channels. This lets an operator watch a subset of channels
// without disabling the others.
//
// Interface: purely combinational, filtered_we = write_en when the masked bits match.
// The function follows the source design; the register holding pattern (bits 7:0) and
// mask (bits 15:8) lives in the control and status registers.
module rx_mem_filter (
  input  logic [7:0] pattern,
  input  logic [7:0] match_mask,
  input  logic [7:0] drorc_address,
  input  logic       write_en,
  output logic       filtered_we
);

  assign filtered_we = write_en && (((drorc_address ^ pattern) & match_mask) == 8'h00);

endmodule
