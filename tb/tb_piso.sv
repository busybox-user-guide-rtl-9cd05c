// Testbench for piso: loads random frames, shifts them out with random gaps and checks
// the bit order (MSB first), the idle level and the empty flag.
module tb_piso;
  localparam int W = 20;
  logic clk = 0, rst = 0, load = 0, shift = 0;
  logic [W-1:0] din = '0;
  logic sout, empty;
  int checks = 0, failures = 0;

  piso #(.WIDTH(W)) dut (.clock(clk), .areset(rst), .data_load(load), .data_shift(shift),
                         .data_in(din), .serial_out(sout), .piso_empty(empty));
  always #1 clk = ~clk;
  initial #0.5 rst = 1;   // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(empty && sout, "idle after reset");
    for (int t = 0; t < 30; t++) begin
      logic [W-1:0] v = W'($urandom);
      din = v; load = 1;
      @(negedge clk) load = 0;
      for (int b = W - 1; b >= 0; b--) begin
        check(!empty, "empty while bits pending");
        check(sout == v[b], $sformatf("bit %0d: %0b expected %0b", b, sout, v[b]));
        repeat ($urandom_range(0, 3)) @(negedge clk);
        shift = 1;
        @(negedge clk) shift = 0;
      end
      check(empty && sout, "empty and idle high after last bit");
      shift = 1;
      @(negedge clk) shift = 0;
      check(empty && sout, "extra shift keeps idle");
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
