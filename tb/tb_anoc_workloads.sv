// tb_anoc_workloads: the two evaluated SoC networks under bursty traffic.
//
// Runs the set-top-box network (8 cores, the default size) and the MPEG-4
// decoder network (12 cores) side by side, each through anoc_workload_harness,
// at the three burstiness values b = 0.5, 0.65 and 0.8 with 256-byte
// messages. Every flit is checked end to end; message latency and source
// queue delay are printed per run (in clock cycles, one cycle standing for
// 84 ps). The bench also checks that burstier traffic does not lower the
// number of messages generated (the b-model keeps the total volume).
module tb_anoc_workloads;
  logic clk = 0, rst = 1, start = 0;
  int b_milli = 500;
  logic done_a, done_m;
  int chk_a, fail_a, chk_m, fail_m;
  int checks = 0, failures = 0;

  anoc_workload_harness #(.NCORES(8),  .WL(0)) u_adstb (
    .clk(clk), .rst(rst), .start(start), .b_milli(b_milli),
    .done(done_a), .checks(chk_a), .failures(fail_a));
  anoc_workload_harness #(.NCORES(12), .WL(1)) u_mpeg4 (
    .clk(clk), .rst(rst), .start(start), .b_milli(b_milli),
    .done(done_m), .checks(chk_m), .failures(fail_m));

  always #5 clk = ~clk;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk_a + chk_m, failures + fail_a + fail_m);
    $finish;
  end

  initial begin
    int bs [3];
    bs = {500, 650, 800};
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (3) @(posedge clk);
    foreach (bs[i]) begin
      #1 b_milli = bs[i]; start = 1;
      wait (done_a && done_m);
      @(posedge clk); #1 start = 0;
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + chk_a + chk_m, failures + fail_a + fail_m);
    $finish;
  end
endmodule
