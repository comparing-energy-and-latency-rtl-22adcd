// tb_anoc_switch: self-checking test of the router input (switch) module.
//
// The bench plays the upstream router on the 2-phase input link and two merge
// modules on the 4-phase outputs, with random acknowledge delays. Every flit
// carries a random route; the bench checks that it leaves on output 1 when
// the route MSB is 0 and on output 2 when it is 1, with its data unchanged
// and its route rotated left by one, in order. It also checks the timing of
// the clocked implementation: the link acknowledge toggles on the first edge
// after the request (1 cycle), and the selected output request is high in
// the cycle that follows. It checks that an output request never rises while
// an acknowledge is still high and that the data stays stable while requested.
module tb_anoc_switch;
  localparam int DW = 32, RW = 8;
  logic clk = 0, rst = 1;
  logic lr = 0, la;
  logic [DW-1:0] din = '0;
  logic [RW-1:0] rin = '0;
  logic rr1, rr2, ra1 = 0, ra2 = 0;
  logic [DW-1:0] dout;
  logic [RW-1:0] rout;
  int checks = 0, failures = 0;

  anoc_switch #(.DATA_W(DW), .ROUTE_W(RW)) dut (
    .clk(clk), .rst(rst), .lr(lr), .la(la), .din(din), .rin(rin),
    .rr1(rr1), .ra1(ra1), .rr2(rr2), .ra2(ra2), .dout(dout), .rout(rout));

  always #5 clk = ~clk;

  task automatic fail(input string s); failures++; $display("FAIL %s", s); endtask

  // expected flits in order: {route, data}
  logic [RW+DW-1:0] exp_q[$];
  int n_out[2] = '{0, 0};
  localparam int NFLITS = 200;

  initial begin
    repeat (20000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sender
  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < NFLITS; n++) begin
      int gap;
      gap = $urandom_range(0, 3);
      repeat (gap) @(posedge clk);
      #1;
      din = $urandom; rin = $urandom;
      exp_q.push_back({rin, din});
      lr = ~lr;
      while (la != lr) begin @(posedge clk); #1; end
    end
  end

  // receivers (merge side)
  always @(posedge clk) begin
    if (!rst) begin
      // request must not rise while an ack is high
      if ((rr1 || rr2) && (ra1 || ra2) && !((rr1 && ra1) || (rr2 && ra2))) fail($sformatf("request while other ack high rr=%b%b ra=%b%b t=%0t", rr2, rr1, ra2, ra1, $time));
      if (rr1 && rr2) fail("both outputs requested");
    end
  end

  task automatic receive(input int o);
    logic [RW+DW-1:0] e;
    logic [DW-1:0] d0;
    int dly;
    dly = $urandom_range(0, 3);
    d0 = dout;
    repeat (dly) begin
      @(posedge clk); #1;
      checks++; if (dout !== d0) fail("data changed while requested");
    end
    e = exp_q.pop_front();
    checks += 3;
    if (o != int'(e[RW+DW-1])) fail($sformatf("flit left on output %0d, MSB %b", o + 1, e[RW+DW-1]));
    if (dout !== e[DW-1:0]) fail($sformatf("data %h expected %h", dout, e[DW-1:0]));
    if (rout !== {e[RW+DW-2:DW], e[RW+DW-1]}) fail($sformatf("route %b expected rotated %b", rout, e[RW+DW-1:DW]));
    n_out[o]++;
    if (o == 0) ra1 = 1; else ra2 = 1;
    // hold ack until the request falls
    do begin @(posedge clk); #1; end while (o == 0 ? rr1 : rr2);
    repeat ($urandom_range(0, 2)) @(posedge clk);
    #1;
    if (o == 0) ra1 = 0; else ra2 = 0;
  endtask

  initial begin
    @(negedge rst);
    while (n_out[0] + n_out[1] < NFLITS) begin
      @(posedge clk); #1;
      if (rr1) receive(0);
      else if (rr2) receive(1);
    end
    checks++;
    if (n_out[0] == 0 || n_out[1] == 0) fail("an output never used");
    // timing with idle outputs: ack after exactly one edge
    repeat (3) @(posedge clk);
    #1 din = 32'hCAFE_0001; rin = 8'h80; lr = ~lr;
    @(posedge clk); #1;
    checks++; if (la !== lr) fail("backward latency is not one cycle");
    checks++; if (!(rr2 && !rr1)) fail("request not raised in the cycle after the load");
    checks++; if (dout !== 32'hCAFE_0001 || rout !== 8'h01) fail($sformatf("timing flit contents %h %h", dout, rout));
    ra2 = 1; @(posedge clk); #1; ra2 = 0;
    $display("switch: %0d flits to output 1, %0d to output 2", n_out[0], n_out[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
