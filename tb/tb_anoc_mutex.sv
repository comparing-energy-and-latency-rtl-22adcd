// tb_anoc_mutex: self-checking test of the two-way mutual-exclusion element.
//
// Directed cases: a lone request is granted one clock after it is sampled;
// the first of two staggered requests keeps its grant until it drops, then the
// waiting one is granted on that same edge; simultaneous arrivals alternate
// between the inputs; and a random phase checks that the grants are never
// both high and that a grant only goes to a requester.
module tb_anoc_mutex;
  logic       clk = 0;
  logic       rst = 1;
  logic [1:0] req = 2'b00;
  logic [1:0] gnt;
  int checks = 0, failures = 0;

  anoc_mutex dut (.clk(clk), .rst(rst), .req(req), .gnt(gnt));

  always #5 clk = ~clk;

  task automatic check(input logic [1:0] exp, input string what);
    checks++;
    if (gnt !== exp) begin
      failures++;
      $display("FAIL %s: gnt=%b expected %b", what, gnt, exp);
    end
  endtask

  task automatic step(); @(posedge clk); #1; endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step(); step(); rst = 0; step();
    check(2'b00, "idle");
    // lone request on input 0
    req = 2'b01; step(); check(2'b01, "lone req0 granted");
    step(); check(2'b01, "grant held");
    req = 2'b00; step(); check(2'b00, "released");
    // lone request on input 1
    req = 2'b10; step(); check(2'b10, "lone req1 granted");
    // staggered: input 0 arrives while 1 holds the grant
    req = 2'b11; step(); check(2'b10, "first arrival keeps grant");
    step(); check(2'b10, "still held");
    req = 2'b01; step(); check(2'b01, "handover to waiting req0");
    req = 2'b00; step(); check(2'b00, "released");
    // simultaneous arrivals alternate
    begin
      logic [1:0] first;
      req = 2'b11; step(); first = gnt;
      checks++; if (!(first == 2'b01 || first == 2'b10)) begin failures++; $display("FAIL tie grant %b", first); end
      req = ~first; step(); check(~first, "tie loser served next");
      req = 2'b00; step(); check(2'b00, "released");
      req = 2'b11; step(); check(~first, "next tie goes to the other input");
      req = 2'b00; step(); step();
      req = 2'b11; step(); check(first, "third tie back to first");
      req = 2'b00; step(); step();
    end
    // random phase: requesters obey the 4-phase rule (hold until granted,
    // then hold a few cycles, then drop)
    begin
      int hold [2];
      logic [1:0] prev;
      hold = '{0, 0};
      prev = gnt;
      for (int n = 0; n < 300; n++) begin
        for (int i = 0; i < 2; i++) begin
          if (!req[i]) begin
            if ($urandom_range(0, 2) == 0) req[i] = 1'b1;
          end else if (gnt[i]) begin
            if (hold[i] == 0) hold[i] = $urandom_range(1, 4);
            hold[i]--;
            if (hold[i] == 0) req[i] = 1'b0;
          end
        end
        prev = gnt;
        step();
        checks++;
        if (gnt == 2'b11) begin failures++; $display("FAIL both granted"); end
        checks++;
        if ((prev[0] && !gnt[0] && req[0]) || (prev[1] && !gnt[1] && req[1])) begin
          failures++; $display("FAIL grant removed while request still high");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
