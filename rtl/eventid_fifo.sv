// eventid_fifo: first-in first-out queue of event IDs waiting to be verified (clock_b).
//
// The head entry is always visible on rd_data (first-word fall-through) so that the
// verification logic can compare against it for as long as the event is open; rd_en
// removes it. count gives the number of entries and most_recent the last ID written.
//
// Interface: wr_en writes wr_data when not full; rd_en pops when not empty; both may act
// in the same cycle. Timing: an entry written at one clock edge is at the head (if the
// queue was empty) right after that edge. The queue itself follows the source design; its
// depth (8, the largest number of front-end buffers) is this design's choice.
module eventid_fifo #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 8          // power of two
) (
  input  logic             clock_b,
  input  logic             areset,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [WIDTH-1:0] most_recent
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rptr];

  always_ff @(posedge clock_b) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clock_b or posedge areset) begin
    if (areset) begin
      wptr        <= '0;
      rptr        <= '0;
      count       <= '0;
      most_recent <= '0;
    end else begin
      if (do_wr) begin
        wptr        <= wptr + 1'b1;
        most_recent <= wr_data;
      end
      if (do_rd) rptr <= rptr + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(do_wr) - ($clog2(DEPTH+1))'(do_rd);
    end
  end

endmodule
