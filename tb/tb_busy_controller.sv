// Testbench for busy_controller with a short dead-time tick (TICK_CYCLES = 4) and both
// buffering modes selected by a parameter of this bench. A cycle model of the busy
// conditions and the buffer count is compared with the outputs on every clock for a
// random mix of triggers, ttcrx_rdy drops, trigger-module busy and event_valid pulses.
module tb_busy_controller #(parameter bit BUF_L1 = 1'b1);
  localparam int TICK = 4;
  logic clk = 0, rst = 0;
  logic rdy = 1, l0 = 0, l1 = 0, l2a = 0, l2r = 0, l2t = 0, tbusy = 0, evalid = 0;
  logic [15:0] tto = 16'd3;
  logic [3:0]  avail = 4'd4, used;
  logic        busy;
  logic [31:0] btime;
  int checks = 0, failures = 0;
  int m_dead = 0, m_used = 0, m_btime = 0;
  bit m_busy = 1;
  int n_full = 0, n_dead = 0, n_rdy = 0, n_tbusy = 0;

  busy_controller #(.BUFFER_ON_L1(BUF_L1), .TICK_CYCLES(TICK)) dut (
    .areset(rst), .clock_b(clk), .ttcrx_rdy(rdy), .L0_trigger(l0), .L1a_trigger(l1),
    .L2a_trigger(l2a), .L2r_trigger(l2r), .L2_timeout(l2t), .busy_triggermodule(tbusy),
    .event_valid(evalid), .trig_timeout(tto), .fee_buffers_available(avail),
    .busy_out(busy), .fee_buffers_used(used), .busy_time(btime));

  always #5 clk = ~clk;
  initial #0.5 rst = 1;     // a real edge on the asynchronous reset

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference model, evaluated on the same edge as the design
  always @(posedge clk) if (!rst) begin
    bit inc, dec, nb;
    inc = BUF_L1 ? l1 : l0;
    dec = l2r || l2t || evalid;
    nb  = !rdy || (m_dead != 0) || (m_used >= 32'(avail)) || tbusy;
    if (m_busy) m_btime++;
    m_busy = nb;
    if (l0) m_dead = 32'(tto) * TICK; else if (m_dead != 0) m_dead--;
    if (inc && !dec && m_used < 15) m_used++;
    else if (dec && !inc && m_used > 0) m_used--;
    if (m_used >= 32'(avail)) n_full++;
    if (m_dead != 0) n_dead++;
    if (!rdy) n_rdy++;
    if (tbusy) n_tbusy++;
  end

  always @(negedge clk) if (!rst) begin
    check(busy == m_busy, $sformatf("busy %b expected %b", busy, m_busy));
    check(32'(used) == m_used, $sformatf("buffers used %0d expected %0d", used, m_used));
    check(btime == 32'(m_btime), "busy time");
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      l0 = 0; l1 = 0; l2a = 0; l2r = 0; l2t = 0; evalid = 0;
      // triggers arrive only while not busy, as the trigger system would send them
      if (!busy && $urandom_range(0, 19) == 0) l0 = 1;
      if ($urandom_range(0, 24) == 0) l1 = 1;
      case ($urandom_range(0, 59))
        0: l2r = 1;
        1: l2t = 1;
        2, 3: evalid = 1;
        4: l2a = 1;
        default: ;
      endcase
      if ($urandom_range(0, 999) == 0) rdy = !rdy;
      if ($urandom_range(0, 499) == 0) tbusy = !tbusy;
      if ($urandom_range(0, 1999) == 0) avail = 4'($urandom_range(1, 8));
      if ($urandom_range(0, 2999) == 0) tto = 16'($urandom_range(0, 5));
    end
    check(n_full > 0 && n_dead > 0 && n_rdy > 0 && n_tbusy > 0, "a busy condition never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
