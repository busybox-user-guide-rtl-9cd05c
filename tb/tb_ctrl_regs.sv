// Testbench for ctrl_regs at full size: reset values, read-back of every read/write
// register, read-only status registers following their inputs, the one-cycle
// force_validate pulse, the 120 channel registers (CHEN write, EIDOK read) and 0 from
// unused addresses.
module tb_ctrl_regs;
  localparam int N = 120;
  logic clk = 0, rst = 0;
  logic        men = 0, mrnw = 1;
  logic [11:0] maddr = '0;
  logic [15:0] mdin = '0, mdout;
  logic [9:0]  mptr = 10'd517;
  logic [3:0]  ecount = 4'd3, reqid = 4'd9;
  logic [35:0] cur = 36'h9_1234_5678, recent = 36'hA_8765_4321;
  logic [15:0] retries = 16'd77;
  logic [N-1:0] eidok = '0;
  logic [31:0] btime = 32'hDEAD_BEEF;
  logic [7:0]  mask, pattern;
  logic [3:0]  avail;
  logic [15:0] tto, rto;
  logic        halt, force_v;
  logic [N-1:0] chen;
  int checks = 0, failures = 0, forces = 0;

  ctrl_regs #(.NUM_CHANNELS(N)) dut (
    .clock_b(clk), .areset(rst), .module_en(men), .module_rnw(mrnw),
    .module_address(maddr), .module_data_in(mdin), .mem_pointer(mptr), .event_count(ecount),
    .current_eventid(cur), .most_recent_eventid(recent), .requestID(reqid),
    .retry_count(retries), .EIDOK_vector(eidok), .busy_time(btime),
    .module_data_out(mdout), .rx_mem_matching_mask(mask), .rx_mem_pattern(pattern),
    .fee_buffers_available(avail), .trig_timeout(tto), .req_timeout(rto),
    .halt_validator(halt), .force_validate(force_v), .CHEN_vector_out(chen));

  always #5 clk = ~clk;
  initial #0.5 rst = 1;     // a real edge on the asynchronous reset
  always @(posedge clk) if (force_v) forces++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [11:0] a, input logic [15:0] d);
    @(negedge clk) begin men = 1; mrnw = 0; maddr = a; mdin = d; end
    @(negedge clk) begin men = 0; mrnw = 1; end
  endtask

  task automatic rd(input logic [11:0] a, output logic [15:0] d);
    @(negedge clk) begin men = 1; mrnw = 1; maddr = a; end
    @(negedge clk) begin men = 0; d = mdout; end
  endtask

  task automatic expect_rd(input logic [11:0] a, input logic [15:0] e, input string what);
    logic [15:0] d;
    rd(a, d);
    check(d == e, $sformatf("%s (0x%03h): %h expected %h", what, a, d, e));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // reset values
    check(avail == 4'd4 && tto == 16'd10 && rto == 16'd1000 && !halt && chen == '0,
          "reset values");
    // status registers
    expect_rd(12'h000, 16'd517, "RX memory pointer");
    expect_rd(12'h001, 16'd3, "event IDs waiting");
    expect_rd(12'h002, 16'h0009, "current ID 35:32");
    expect_rd(12'h003, 16'h1234, "current ID 31:16");
    expect_rd(12'h004, 16'h5678, "current ID 15:0");
    expect_rd(12'h005, 16'h000A, "newest ID 35:32");
    expect_rd(12'h006, 16'h8765, "newest ID 31:16");
    expect_rd(12'h007, 16'h4321, "newest ID 15:0");
    expect_rd(12'h00D, 16'd9, "request ID");
    expect_rd(12'h00E, 16'd77, "retry count");
    expect_rd(12'h010, 16'hDEAD, "busy time 31:16");
    expect_rd(12'h011, 16'hBEEF, "busy time 15:0");
    expect_rd(12'h015, 16'h0101, "firmware version");
    expect_rd(12'h01F, 16'h0000, "unused address");
    // read/write registers
    wr(12'h008, 16'd25);   check(tto == 16'd25, "dead-time output");
    expect_rd(12'h008, 16'd25, "dead-time");
    wr(12'h009, 16'd8);    check(avail == 4'd8, "buffers available output");
    expect_rd(12'h009, 16'd8, "buffers available");
    wr(12'h00C, 16'd321);  check(rto == 16'd321, "re-request timeout output");
    expect_rd(12'h00C, 16'd321, "re-request timeout");
    wr(12'h012, 16'hF0A5); check(mask == 8'hF0 && pattern == 8'hA5, "filter outputs");
    expect_rd(12'h012, 16'hF0A5, "filter");
    wr(12'h00A, 16'd1);    check(halt, "halt set");
    expect_rd(12'h00A, 16'd1, "halt");
    wr(12'h00A, 16'd0);    check(!halt, "halt cleared");
    check(forces == 0, "force pulse without write");
    wr(12'h00B, 16'd1);
    repeat (2) @(negedge clk);
    check(forces == 1, "one force pulse per write");
    // status registers follow their inputs
    mptr = 10'd3; reqid = 4'd2;
    expect_rd(12'h000, 16'd3, "RX memory pointer updated");
    expect_rd(12'h00D, 16'd2, "request ID updated");
    // channel registers
    for (int c = 0; c < N; c++) wr(12'h100 + 12'(c), 16'((c % 3) != 0));
    for (int c = 0; c < N; c++) check(chen[c] == ((c % 3) != 0), $sformatf("CHEN %0d", c));
    for (int c = 0; c < N; c++) eidok[c] = (c % 2);
    for (int c = 0; c < N; c++)
      expect_rd(12'h100 + 12'(c), {14'd0, 1'(c % 2), 1'((c % 3) != 0)}, $sformatf("channel %0d", c));
    expect_rd(12'h100 + 12'(N), 16'h0000, "channel beyond the last");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
