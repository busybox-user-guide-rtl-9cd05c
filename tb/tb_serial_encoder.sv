// Testbench for serial_encoder: sends random words and samples the line in the middle of
// every bit period, checking the 20-bit frame (start 0, start 1, data MSB first, even
// parity, stop 0) against an independent model, the 5-cycle bit period, the 100-cycle
// busy time and that requests made while busy are ignored.
module tb_serial_encoder;
  logic clk = 0, rst = 0, en = 0;
  logic [15:0] din = '0;
  logic busy, sout;
  int checks = 0, failures = 0;

  serial_encoder dut (.clock_in(clk), .areset(rst), .data_in(din), .data_enable_in(en),
                      .busy_out(busy), .serial_out(sout));
  always #1 clk = ~clk;
  initial #0.5 rst = 1;   // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    check(!busy && sout, "idle after reset");
    for (int t = 0; t < 20; t++) begin
      logic [15:0] w = 16'($urandom);
      logic [19:0] f;
      int start, busy_cycles;
      f = {1'b0, 1'b1, w, ^w, 1'b0};
      din = w; en = 1;
      @(negedge clk) en = 0;
      din = ~w;                               // data must have been captured
      // find the falling edge that starts the frame
      start = 0;
      while (sout && start < 10) begin @(negedge clk); start++; end
      check(start < 3, "frame starts within 3 cycles");
      busy_cycles = 0;
      for (int b = 19; b >= 0; b--) begin
        for (int s = 0; s < 5; s++) begin
          if (s == 2) check(sout == f[b], $sformatf("word %h bit %0d: %0b expected %0b", w, b, sout, f[b]));
          if (s == 1 && b == 10) begin en = 1; din = 16'hFFFF; end   // ignored while busy
          if (s == 2 && b == 10) en = 0;
          if (busy) busy_cycles++;
          @(negedge clk);
        end
      end
      check(sout == 1'b1, "line returns high after stop bit");
      check(busy_cycles == 100, $sformatf("busy for %0d of the 100 frame cycles", busy_cycles));
      repeat (2) @(negedge clk);
      check(!busy, "not busy after frame");
      check(sout == 1'b1, "no second frame from ignored request");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
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
