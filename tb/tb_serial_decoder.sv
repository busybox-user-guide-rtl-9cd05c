// Testbench for serial_decoder: drives oversampled serial frames built independently of
// the RTL (start 0, start 1, 16 data bits MSB first, even parity, stop 0, 5 samples per bit)
// and checks the recovered words, the parity flag, single-sample glitch tolerance, the
// enable gate and the one-word-per-100-cycle rate.
module tb_serial_decoder;
  logic clk = 0, rst = 0, en = 0, line = 1;
  logic perr, av;
  logic [15:0] dout;
  int checks = 0, failures = 0;
  int cyc = 0;

  serial_decoder dut (.clock_a(clk), .areset(rst), .enable(en), .serial_in(line),
                      .parity_error(perr), .data_av(av), .data_out(dout));

  always #1 clk = ~clk;
  initial #0.5 rst = 1;   // a real edge on the asynchronous reset
  always @(posedge clk) cyc <= cyc + 1;

  logic [15:0] exp_q[$];
  bit          exp_perr_q[$];
  int          last_av_cyc = -1, av_count = 0, min_gap = 1 << 30;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // glitch_bit < 0: no glitch; otherwise the middle sample of that frame bit is inverted
  task automatic send_word(input logic [15:0] w, input bit bad_parity, input int glitch_bit);
    logic [19:0] f;
    f = {1'b0, 1'b1, w, (^w) ^ bad_parity, 1'b0};
    for (int b = 19; b >= 0; b--)
      for (int s = 0; s < 5; s++) begin
        @(negedge clk);
        line = (glitch_bit == 19 - b && s == 2) ? ~f[b] : f[b];
      end
    @(negedge clk) line = 1'b1;
  endtask

  always @(posedge clk) if (av && !rst) begin
    av_count++;
    if (last_av_cyc >= 0 && cyc - last_av_cyc < min_gap) min_gap = cyc - last_av_cyc;
    last_av_cyc = cyc;
    if (exp_q.size() == 0) check(0, $sformatf("unexpected data_av %h at cycle %0d", dout, cyc));
    else begin
      logic [15:0] e; bit ep;
      e = exp_q.pop_front(); ep = exp_perr_q.pop_front();
      check(perr == ep, $sformatf("parity flag %0b expected %0b", perr, ep));
      if (!ep) check(dout == e, $sformatf("data %h expected %h", dout, e));
    end
  end

  initial begin
    repeat (5) @(negedge clk);
    rst = 0; en = 1;
    repeat (10) @(negedge clk);
    // back-to-back random words
    for (int i = 0; i < 20; i++) begin
      logic [15:0] w = 16'($urandom);
      exp_q.push_back(w); exp_perr_q.push_back(0);
      send_word(w, 0, -1);
    end
    // edge values
    exp_q.push_back(16'h0000); exp_perr_q.push_back(0); send_word(16'h0000, 0, -1);
    exp_q.push_back(16'hFFFF); exp_perr_q.push_back(0); send_word(16'hFFFF, 0, -1);
    // parity error
    exp_q.push_back(16'h1234); exp_perr_q.push_back(1); send_word(16'h1234, 1, -1);
    repeat (7) @(negedge clk);
    // single-sample glitches in data bits are voted out
    for (int g = 2; g < 18; g += 3) begin
      logic [15:0] w = 16'($urandom);
      exp_q.push_back(w); exp_perr_q.push_back(0);
      send_word(w, 0, g);
      repeat ($urandom_range(0, 12)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, $sformatf("%0d words not received", exp_q.size()));
    // rate: back-to-back words arrive 100 cycles (+1 idle sample) apart, never closer
    check(min_gap >= 100, $sformatf("min gap between words %0d < 100 cycles", min_gap));
    // disabled decoder ignores frames
    en = 0;
    av_count = 0;
    send_word(16'hBEEF, 0, -1);
    repeat (20) @(negedge clk);
    check(av_count == 0, "disabled decoder produced data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
