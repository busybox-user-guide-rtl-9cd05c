// Testbench for backbone_controller: 8 modelled branch controllers post replies (each
// holds its reply and count until acknowledged). Checks that every reply comes out
// exactly once with write_req, that the channel number equals branch * 15 + count, and
// that no branch is acknowledged without data.
module tb_backbone_controller;
  localparam int NB = 8, CPB = 15;
  logic clk = 0, rst = 0;
  logic [47:0] br_data [NB];
  logic [3:0]  br_cnt  [NB];
  logic [NB-1:0] br_av = '0, br_ack;
  logic [47:0] dout;
  logic [7:0]  ch;
  logic        wreq;
  int checks = 0, failures = 0, sent = 0, got = 0;

  backbone_controller #(.BRANCHES(NB), .CH_PER_BRANCH(CPB)) dut (
    .clock_a(clk), .areset(rst), .data_in_array(br_data), .count_in_array(br_cnt),
    .data_av_vector(br_av), .read_ack_vector(br_ack), .data_out(dout), .count_out(ch),
    .write_req(wreq));
  always #1 clk = ~clk;
  initial #0.5 rst = 1;   // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (!rst) begin
    for (int b = 0; b < NB; b++) begin
      if (br_ack[b]) begin
        check(br_av[b], $sformatf("ack to branch %0d without data at %0t", b, $time));
        br_av[b] <= 1'b0;
      end else if (!br_av[b] && sent < 500 && $urandom_range(0, 10) == 0) begin
        logic [3:0] c;
        c = 4'($urandom_range(0, CPB - 1));
        br_av[b]   <= 1'b1;
        br_cnt[b]  <= c;
        br_data[b] <= {8'(b * CPB + c), 8'(sent), 32'($urandom)};
        sent++;
      end
    end
  end

  always @(posedge clk) if (!rst && wreq) begin
    got++;
    check(ch == dout[47:40], $sformatf("channel %0d expected %0d", ch, dout[47:40]));
  end

  initial begin
    for (int b = 0; b < NB; b++) begin br_data[b] = '0; br_cnt[b] = '0; end
    repeat (3) @(negedge clk);
    rst = 0;
    wait (sent >= 500);
    repeat (200) @(negedge clk);
    check(br_av == '0, "branches left unserved");
    check(got == sent, $sformatf("%0d replies out of %0d", got, sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
