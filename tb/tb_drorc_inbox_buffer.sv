// Testbench for drorc_inbox_buffer: bursts of D-RORC messages written on the 200 MHz side
// (up to one per cycle) are read on the 40 MHz side. Checks order and contents, rd_valid
// timing, the full flag (writes are held back while full), that reads while empty give
// no data, and that nothing is lost.
module tb_drorc_inbox_buffer;
  localparam int W = 56, D = 128;
  logic clka = 0, clkb = 0, rst = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic         wr = 0, full, rd = 0, rvalid, empty;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, sent = 0, got = 0, fulls = 0;

  drorc_inbox_buffer #(.WIDTH(W), .DEPTH(D)) dut (
    .clock_a(clka), .clock_b(clkb), .areset(rst), .wr_data(wdata), .wr_en(wr),
    .full(full), .rd_en(rd), .rd_data(rdata), .rd_valid(rvalid), .empty(empty));

  always #1 clka = ~clka;
  always #5 clkb = ~clkb;
  initial #0.5 rst = 1;     // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // writer: bursts of 200 messages, then pauses
  initial begin
    @(negedge rst);
    for (int burst = 0; burst < 4; burst++) begin
      int n;
      n = 0;
      while (n < 200) begin
        @(negedge clka);
        if (full) begin wr = 0; fulls++; end
        else begin
          wdata = {8'(sent), 16'($urandom), 32'($urandom)};
          wr = 1;
          model.push_back(wdata);
          sent++; n++;
        end
      end
      @(negedge clka) wr = 0;
      repeat (3000) @(negedge clka);
    end
  end

  // reader: one read per clock_b cycle when not empty, with random pauses; now and then
  // a read is also issued while empty, which the buffer must ignore
  always @(negedge clkb) if (!rst)
    rd <= empty ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 4) != 0);

  always @(posedge clkb) if (!rst && rvalid) begin
    got++;
    if (model.size() == 0) check(0, "data with nothing written");
    else begin
      logic [W-1:0] e;
      e = model.pop_front();
      check(rdata == e, $sformatf("read %h expected %h", rdata, e));
    end
  end

  initial begin
    repeat (3) @(negedge clkb);
    rst = 0;
    wait (sent == 800);
    repeat (2000) @(negedge clkb);
    check(got == 800, $sformatf("%0d messages read", got));
    check(empty, "buffer not empty at the end");
    check(fulls > 0, "buffer never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clkb);
    failures++;
    $display("timeout: %0d written, %0d read, full=%b empty=%b", sent, got, full, empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
