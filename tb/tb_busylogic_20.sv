// End-to-end testbench for busylogic_top sized for the 20-channel configuration (PHOS):
// runs the scenario of tb_busylogic_top (in tb_busylogic_sized) with NUM_CHANNELS = 20
// and 20 D-RORC models. Buffering is counted on L1a, as in that bench; the L0-buffering
// mode is covered by tb_busy_controller_l0. The result line and the watchdog come from
// the inner bench; a second watchdog here, later than the inner one, ends the run should
// the inner one never fire.
module tb_busylogic_20;
  tb_busylogic_sized #(.N(20)) u_bench ();

  initial begin
    #5ms;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
