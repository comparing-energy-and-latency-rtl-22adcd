// tb_anoc_merge: self-checking test of the router output (merge) module.
//
// The bench plays two switch modules on the 4-phase inputs and a downstream
// router on the 2-phase output link, which acknowledges after a random delay.
// Each input sends tagged flits; the bench checks that every flit leaves
// exactly once, unchanged, in order per input; that the two input
// acknowledges are never high together; that the output data is stable while
// a transfer is pending; that with both inputs loaded and a fast receiver the
// output alternates between the inputs; and the uncontended timing of the
// clocked implementation: rr toggles on the second edge after the request
// rises, together with the acknowledge of that input.
module tb_anoc_merge;
  localparam int DW = 32, RW = 8;
  localparam int NPER = 150;
  logic clk = 0, rst = 1;
  logic lr1 = 0, lr2 = 0, la1, la2;
  logic [DW-1:0] din1 = '0, din2 = '0, dout;
  logic [RW-1:0] rin1 = '0, rin2 = '0, rout;
  logic rr, ra = 0;
  int checks = 0, failures = 0;
  int got [2] = '{0, 0};
  int contend_cycles = 0;
  bit fast_sink = 0;
  bit random_phase = 1;

  anoc_merge #(.DATA_W(DW), .ROUTE_W(RW)) dut (
    .clk(clk), .rst(rst),
    .lr1(lr1), .la1(la1), .din1(din1), .rin1(rin1),
    .lr2(lr2), .la2(la2), .din2(din2), .rin2(rin2),
    .rr(rr), .ra(ra), .dout(dout), .rout(rout));

  always #5 clk = ~clk;

  task automatic fail(input string s); failures++; $display("FAIL %s", s); endtask

  initial begin
    repeat (30000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flit i of input s: data = {s, i}, route = i
  task automatic send(input int s, input int i);
    if (s == 0) begin din1 = {8'hA0, 24'(i)}; rin1 = 8'(i); lr1 = 1; end
    else        begin din2 = {8'hB0, 24'(i)}; rin2 = 8'(i); lr2 = 1; end
    do begin @(posedge clk); #1; end while (!(s == 0 ? la1 : la2));
    if (s == 0) lr1 = 0; else lr2 = 0;
    do begin @(posedge clk); #1; end while (s == 0 ? la1 : la2);
  endtask

  task automatic sender(input int s);
    for (int i = 0; i < NPER; i++) begin
      if (random_phase) repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 send(s, i);
    end
  endtask

  // protocol monitors
  logic [DW-1:0] held;
  always @(posedge clk) if (!rst) begin
    if (la1 && la2) fail("both input acknowledges high");
    if (lr1 && lr2) contend_cycles++;
  end

  // output receiver: checks and acknowledges each flit
  int expect_i [2] = '{0, 0};
  int last_src = -1, alternations = 0, fast_flits = 0;
  initial begin
    @(negedge rst);
    forever begin
      @(posedge clk); #1;
      if (rr != ra) begin
        int s, i;
        held = dout;
        s = (dout[31:24] == 8'hB0) ? 1 : 0;
        i = int'(dout[23:0]);
        checks += 2;
        if (dout[31:24] != 8'hA0 && dout[31:24] != 8'hB0) fail($sformatf("bad tag %h", dout));
        else if (i != expect_i[s] || rout != 8'(i)) fail($sformatf("input %0d: flit %0d route %h, expected %0d", s, i, rout, expect_i[s]));
        expect_i[s]++;
        got[s]++;
        if (fast_sink) begin
          fast_flits++;
          if (last_src >= 0 && s != last_src) alternations++;
          last_src = s;
        end else begin
          repeat ($urandom_range(0, 3)) begin
            @(posedge clk); #1;
            checks++; if (dout !== held) fail("output data changed while pending");
          end
        end
        ra = rr;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    // uncontended timing
    @(posedge clk); #1;
    din1 = 32'hA000_0000; rin1 = 8'h00; lr1 = 1;
    @(posedge clk); #1;
    checks++; if (rr !== 1'b0 || la1) fail("output before second edge");
    @(posedge clk); #1;
    checks++; if (rr !== 1'b1 || !la1) fail("rr/la1 not on second edge");
    lr1 = 0;
    @(posedge clk); #1;
    checks++; if (la1) fail("la1 did not fall on the edge after lr1 fell");
    repeat (4) @(posedge clk);
    // random phase: indices 1..NPER-1 on input 0, 0..NPER-1 on input 1
    fork
      begin for (int i = 1; i < NPER; i++) begin repeat ($urandom_range(0, 3)) @(posedge clk); #1 send(0, i); end end
      sender(1);
    join
    repeat (20) @(posedge clk);
    checks += 2;
    if (got[0] != NPER || got[1] != NPER) fail($sformatf("received %0d/%0d flits", got[0], got[1]));
    if (contend_cycles == 0) fail("inputs never contended");
    // saturated phase with a fast receiver: expect alternation
    fast_sink = 1; random_phase = 0;
    expect_i = '{0, 0};
    fork
      sender(0);
      sender(1);
    join
    repeat (20) @(posedge clk);
    checks++;
    if (alternations < fast_flits - 4) fail($sformatf("only %0d alternations in %0d flits", alternations, fast_flits));
    $display("merge: %0d contention cycles, %0d alternations in %0d saturated flits", contend_cycles, alternations, fast_flits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
