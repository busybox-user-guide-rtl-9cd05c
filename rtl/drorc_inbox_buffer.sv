// drorc_inbox_buffer: dual-clock FIFO carrying D-RORC replies from the receiver (clock_a,
// 200 MHz) to the event ID verification logic (clock_b, 40 MHz).
//
// Entries are 56 bits: channel number above the 48-bit reply. Write and read pointers
// carry one extra wrap bit, are kept in Gray code and cross the clock boundary through
// two-flop synchronisers; full and empty are computed conservatively on each side from
// the synchronised copy of the other side's pointer. The default depth of 128 holds one
// reply from every one of 120 channels.
//
// Interface: wr_en writes wr_data on clock_a when not full (a write into a full buffer is
// dropped). rd_en on clock_b pops the oldest entry when not empty; it appears on rd_data
// with rd_valid high in the next clock_b cycle. That the buffer exists and spans both
// clock domains follows the source design; its depth and construction are this design's
// choices.
module drorc_inbox_buffer #(
  parameter int unsigned WIDTH = 56,
  parameter int unsigned DEPTH = 128       // power of two
) (
  input  logic             clock_a,
  input  logic             clock_b,
  input  logic             areset,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             wr_en,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  output logic             empty
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_s1, rgray_s2, wgray_s1, wgray_s2;
  logic [AW:0] wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write side
  assign full   = (wgray == {~rgray_s2[AW:AW-1], rgray_s2[AW-2:0]});
  assign wbin_n = wbin + 1'b1;

  always_ff @(posedge clock_a or posedge areset) begin
    if (areset) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_s1 <= '0;
      rgray_s2 <= '0;
    end else begin
      rgray_s1 <= rgray;
      rgray_s2 <= rgray_s1;
      if (wr_en && !full) begin
        wbin  <= wbin_n;
        wgray <= bin2gray(wbin_n);
      end
    end
  end

  always_ff @(posedge clock_a) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // Read side
  assign empty  = (rgray == wgray_s2);
  assign rbin_n = rbin + 1'b1;

  always_ff @(posedge clock_b or posedge areset) begin
    if (areset) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_s1 <= '0;
      wgray_s2 <= '0;
      rd_valid <= 1'b0;
      rd_data  <= '0;
    end else begin
      wgray_s1 <= wgray;
      wgray_s2 <= wgray_s1;
      rd_valid <= rd_en && !empty;
      if (rd_en && !empty) begin
        rd_data <= mem[rbin[AW-1:0]];
        rbin    <= rbin_n;
        rgray   <= bin2gray(rbin_n);
      end
    end
  end

endmodule
