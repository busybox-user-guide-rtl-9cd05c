// Testbench for branch_controller: 16 modelled receivers post replies at random times
// (each holds its reply until acknowledged); a modelled backbone acknowledges the branch
// after random delays. Checks that every reply comes out exactly once, with its receiver
// index on count_out, that data_av holds until read_ack, and that a pending receiver is
// served within one scan of 16 cycles once the branch is free.
module tb_branch_controller;
  localparam int N = 16;
  logic clk = 0, rst = 0, bb_ack = 0;
  logic [47:0] rx_data [N];
  logic [N-1:0] rx_av = '0, rx_ack;
  logic [47:0] dout;
  logic [3:0] cnt;
  logic av;
  int checks = 0, failures = 0;
  int sent = 0, got = 0;
  int pending_since [N];

  branch_controller #(.CHANNELS(N)) dut (
    .clock_a(clk), .areset(rst), .data_in_array(rx_data), .data_av_vector(rx_av),
    .read_ack(bb_ack), .read_ack_vector(rx_ack), .data_out(dout), .count_out(cnt), .data_av(av));
  always #1 clk = ~clk;
  initial #0.5 rst = 1;   // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // receivers: post a reply with random spacing; clear on ack
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < N; i++) begin
      if (rx_ack[i]) begin
        check(rx_av[i], "ack to a receiver without data");
        rx_av[i] <= 1'b0;
      end else if (!rx_av[i] && sent < 400 && $urandom_range(0, 40) == 0) begin
        rx_av[i]   <= 1'b1;
        rx_data[i] <= {8'(i), 8'(sent), 32'($urandom)};
        pending_since[i] = cyc;
        sent++;
      end
    end
  end

  // backbone model
  int hold = 0;
  logic [47:0] seen;
  always @(negedge clk) if (!rst) begin
    bb_ack = 0;
    if (av) begin
      if (hold == 0) begin
        check(dout[47:40] == 8'(cnt), $sformatf("reply of receiver %0d reported as %0d", dout[47:40], cnt));
        hold = $urandom_range(1, 6);
        seen = dout;
      end else begin
        check(dout == seen, "data changed while data_av held");
        hold--;
        if (hold == 0) begin bb_ack = 1; got++; end
      end
    end
  end

  // service latency: with the branch free, a waiting receiver is taken within 16 cycles
  // plus the time other waiting receivers take (bounded here by 16 * 8)
  initial begin
    for (int i = 0; i < N; i++) begin rx_data[i] = '0; pending_since[i] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    wait (sent >= 400);
    repeat (3000) @(negedge clk);
    check(rx_av == '0, "receivers left unserved");
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
