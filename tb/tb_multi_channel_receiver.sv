// Testbench for multi_channel_receiver at its full size (120 channels, 8 branches):
// a set of channels answer at the same moment, as the D-RORCs do after a broadcast
// request. Each reply is driven as oversampled serial frames by a model written here.
// Checks that every enabled channel's reply comes out once, tagged with its channel
// number, and that a channel with CHEN clear produces nothing.
module tb_multi_channel_receiver;
  localparam int N = 120;
  logic clk = 0, rst = 0;
  logic [N-1:0] line = '1, chen = '0;
  logic [47:0] dout;
  logic [7:0]  ch;
  logic        wreq;
  int checks = 0, failures = 0;
  logic [47:0] expected [N];
  bit          waiting  [N];
  int          got = 0;

  multi_channel_receiver #(.NUM_CHANNELS(N), .NUM_BRANCHES(8)) dut (
    .clock_a(clk), .areset(rst), .serial_channels_in(line), .CHEN_vector(chen),
    .data_out(dout), .channel_out(ch), .write_req(wreq));
  always #1 clk = ~clk;
  initial #0.5 rst = 1;   // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // frame model: all selected channels send their own words in lock step
  task automatic send_all(input logic [N-1:0] sel, input int word);
    logic [19:0] f [N];
    for (int c = 0; c < N; c++) begin
      logic [15:0] w;
      w = expected[c][47 - 16 * word -: 16];
      f[c] = {1'b0, 1'b1, w, ^w, 1'b0};
    end
    for (int b = 19; b >= 0; b--)
      repeat (5) begin
        @(negedge clk);
        for (int c = 0; c < N; c++) if (sel[c]) line[c] = f[c][b];
      end
    @(negedge clk) line = '1;
  endtask

  always @(posedge clk) if (!rst && wreq) begin
    got++;
    if (32'(ch) >= N || !waiting[ch]) check(0, $sformatf("unexpected reply on channel %0d", ch));
    else begin
      check(dout == expected[ch], $sformatf("channel %0d: %h expected %h", ch, dout, expected[ch]));
      waiting[ch] = 0;
    end
  end

  initial begin
    logic [N-1:0] sel;
    int n_exp;
    for (int c = 0; c < N; c++) begin
      expected[c] = {4'(c), 12'(c * 7), 24'($urandom), 8'(c)};
      waiting[c] = 0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    // round 1: every channel enabled and answering
    chen = '1; sel = '1;
    for (int c = 0; c < N; c++) waiting[c] = 1;
    for (int w = 0; w < 3; w++) send_all(sel, w);
    repeat (2000) @(negedge clk);
    n_exp = 0;
    for (int c = 0; c < N; c++) if (waiting[c]) n_exp++;
    check(n_exp == 0, $sformatf("%0d channels not delivered in round 1", n_exp));
    check(got == N, $sformatf("%0d replies in round 1", got));
    // round 2: random subset answers, one disabled channel also sends
    got = 0;
    sel = '0;
    for (int c = 0; c < N; c++) if ($urandom_range(0, 3) == 0) sel[c] = 1'b1;
    sel[7] = 1'b1; chen[7] = 1'b0;
    n_exp = 0;
    for (int c = 0; c < N; c++) begin
      expected[c] = {4'(c + 1), 12'($urandom), 24'($urandom), 8'(c)};
      waiting[c] = sel[c] && chen[c];
      if (waiting[c]) n_exp++;
    end
    for (int w = 0; w < 3; w++) send_all(sel, w);
    repeat (2000) @(negedge clk);
    check(got == n_exp, $sformatf("%0d replies in round 2, expected %0d", got, n_exp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
