// Testbench for busy_controller in the L0-buffering mode used by detectors whose
// front-end electronics start buffering on L0 (BUFFER_ON_L1 = 0), such as the 20-, 24-
// and 3-channel configurations. It runs the same cycle-model comparison as
// tb_busy_controller, with that bench's BUF_L1 parameter set to 0: the buffer count
// rises on L0 instead of L1a, and falls on L2 reject, L2 timeout and event_valid.
// The result line and the watchdog come from the inner bench; a second watchdog here,
// later than the inner one, ends the run should the inner one never fire.
module tb_busy_controller_l0;
  tb_busy_controller #(.BUF_L1(1'b0)) u_bench ();

  initial begin
    #400us;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
