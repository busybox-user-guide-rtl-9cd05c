// Testbench for single_channel_receiver: sends three-word replies as oversampled serial
// frames (model written here, independent of the RTL) and checks the 48-bit assembly,
// read_ack handshake, discard after an inter-word timeout, discard after a parity error,
// overwrite of an unread reply and the enable gate.
module tb_single_channel_receiver;
  localparam int TMO = 200;
  logic clk = 0, rst = 0, en = 0, line = 1, ack = 0;
  logic [47:0] dout;
  logic av;
  int checks = 0, failures = 0;

  single_channel_receiver #(.WORD_TIMEOUT(TMO)) dut (
    .clock_a(clk), .areset(rst), .enable(en), .serial_in(line), .read_ack(ack),
    .data_out(dout), .data_av(av));
  always #1 clk = ~clk;
  initial #0.5 rst = 1;   // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_word(input logic [15:0] w, input bit bad_parity = 0);
    logic [19:0] f;
    f = {1'b0, 1'b1, w, (^w) ^ bad_parity, 1'b0};
    for (int b = 19; b >= 0; b--)
      repeat (5) begin @(negedge clk); line = f[b]; end
    @(negedge clk) line = 1'b1;
  endtask

  task automatic send_msg(input logic [47:0] m);
    send_word(m[47:32]); send_word(m[31:16]); send_word(m[15:0]);
  endtask

  task automatic wait_av(input int limit, output bit got);
    got = 0;
    for (int i = 0; i < limit && !got; i++) begin @(negedge clk); got = av; end
  endtask

  task automatic take(input logic [47:0] exp, input string what);
    bit got;
    wait_av(20, got);
    check(got, {what, ": data_av"});
    check(dout == exp, $sformatf("%s: data %h expected %h", what, dout, exp));
    ack = 1; @(negedge clk) ack = 0;
    @(negedge clk);
    check(!av, {what, ": data_av cleared by read_ack"});
  endtask

  initial begin
    logic [47:0] m1, m2;
    bit got;
    repeat (3) @(negedge clk);
    rst = 0; en = 1;
    repeat (5) @(negedge clk);
    for (int t = 0; t < 4; t++) begin
      m1 = {$urandom, 16'($urandom)};
      send_msg(m1);
      take(m1, "plain reply");
    end
    // a lone word, then silence longer than the timeout: it must be dropped
    send_word(16'hDEAD);
    repeat (TMO + 20) @(negedge clk);
    m1 = 48'h4123_4567_89AB;
    send_msg(m1);
    take(m1, "reply after timeout");
    // a gap shorter than the timeout is accepted
    m1 = 48'h7000_1111_2222;
    send_word(m1[47:32]); repeat (TMO - 120) @(negedge clk);
    send_word(m1[31:16]); send_word(m1[15:0]);
    take(m1, "reply with short gap");
    // parity error in the second word: partial reply dropped, next reply accepted
    send_word(16'h1111); send_word(16'h2222, 1);
    m1 = 48'h5ABC_DEF0_1234;
    send_msg(m1);
    take(m1, "reply after parity error");
    // unread reply is overwritten by the next one
    m1 = 48'h1111_2222_3333; m2 = 48'h4444_5555_6666;
    send_msg(m1);
    send_msg(m2);
    repeat (10) @(negedge clk);
    take(m2, "overwrite");
    // disabled channel ignores traffic
    en = 0;
    send_msg(48'hAAAA_BBBB_CCCC);
    wait_av(30, got);
    check(!got, "disabled channel produced a reply");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
