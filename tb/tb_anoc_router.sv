// tb_anoc_router: self-checking test of the three-port router.
//
// The bench drives the three input links with 2-phase senders and drains the
// three output links with receivers that acknowledge after a random delay.
// Each flit carries {source port, sequence number} as data and a random route.
// A scoreboard holds, per source and destination port, the flits in flight:
// a flit must leave by port (p+1)%3 when its route MSB is 0 and (p+2)%3 when
// it is 1, with its data unchanged and its route rotated left by one, and in
// order with the other flits of the same source and destination.
// Directed checks measure the clocked timing: with no contention the output
// request toggles on the third edge after the input request, and one stream
// through the router with a fast receiver moves one flit every 5 cycles.
module tb_anoc_router;
  localparam int DW = 32, RW = 8;
  localparam int NPER = 300;
  logic clk = 0, rst = 1;
  logic [2:0] in_req = '0, in_ack, out_req, out_ack = '0;
  logic [2:0][DW-1:0] in_data = '0, out_data;
  logic [2:0][RW-1:0] in_route = '0, out_route;
  int checks = 0, failures = 0;
  logic [RW+DW-1:0] sb [3][3][$];   // scoreboard [src][dst]
  int received = 0;
  bit fast = 0;

  anoc_router #(.DATA_W(DW), .ROUTE_W(RW)) dut (
    .clk(clk), .rst(rst),
    .in_req(in_req), .in_ack(in_ack), .in_data(in_data), .in_route(in_route),
    .out_req(out_req), .out_ack(out_ack), .out_data(out_data), .out_route(out_route));

  always #5 clk = ~clk;

  task automatic fail(input string s); failures++; $display("FAIL %s", s); endtask

  initial begin
    repeat (40000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dest(input int p, input logic msb);
    return msb ? (p + 2) % 3 : (p + 1) % 3;
  endfunction

  task automatic send(input int p, input int seq, input logic [RW-1:0] rt, input bit rnd_gap);
    if (rnd_gap) repeat ($urandom_range(0, 4)) @(posedge clk);
    #1;
    in_data[p]  = {8'(p), 24'(seq)};
    in_route[p] = rt;
    sb[p][dest(p, rt[RW-1])].push_back({rt, in_data[p]});
    in_req[p]   = ~in_req[p];
    do begin @(posedge clk); #1; end while (in_ack[p] != in_req[p]);
  endtask

  // receivers
  for (genvar q = 0; q < 3; q++) begin : g_rx
    initial begin
      @(negedge rst);
      forever begin
        @(posedge clk); #1;
        if (out_req[q] != out_ack[q]) begin
          int s;
          logic [RW+DW-1:0] e;
          s = int'(out_data[q][DW-1:24]);
          checks++;
          if (s > 2 || sb[s][q].size() == 0) fail($sformatf("port %0d: unexpected flit %h", q, out_data[q]));
          else begin
            e = sb[s][q].pop_front();
            checks += 2;
            if (out_data[q] !== e[DW-1:0]) fail($sformatf("port %0d: data %h expected %h", q, out_data[q], e[DW-1:0]));
            if (out_route[q] !== {e[RW+DW-2:DW], e[RW+DW-1]}) fail($sformatf("port %0d: route %b", q, out_route[q]));
          end
          received++;
          if (!fast) repeat ($urandom_range(0, 3)) @(posedge clk);
          out_ack[q] = out_req[q];
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (2) @(posedge clk);
    // uncontended forward timing: A -> B (route MSB 0)
    fast = 1;
    #1 in_data[0] = {8'd0, 24'hFFFFFF}; in_route[0] = 8'h00;
    sb[0][1].push_back({8'h00, in_data[0]});
    in_req[0] = ~in_req[0];
    begin
      automatic int edges = 0;
      automatic logic prev = out_req[1];
      while (out_req[1] == prev && edges < 20) begin @(posedge clk); #1; edges++; end
      checks++; if (edges != 3) fail($sformatf("forward latency %0d edges, expected 3", edges));
    end
    repeat (5) @(posedge clk);
    // throughput of one stream C -> A (route MSB 0)
    begin
      automatic int last = -1;
      automatic int n = 0;
      fork
        for (int i = 0; i < 20; i++) send(2, 1000 + i, 8'h00, 0);
        begin
          automatic int cyc = 0;
          automatic logic prev = out_req[0];
          while (n < 20 && cyc < 400) begin
            @(posedge clk); #1; cyc++;
            if (out_req[0] != prev) begin
              prev = out_req[0];
              if (n >= 2) begin
                checks++; if (cyc - last != 5) fail($sformatf("flit interval %0d cycles, expected 5", cyc - last));
              end
              last = cyc; n++;
            end
          end
        end
      join
    end
    repeat (10) @(posedge clk);
    fast = 0;
    // random traffic from all three ports
    fork
      for (int i = 0; i < NPER; i++) send(0, i, 8'($urandom), 1);
      for (int i = 0; i < NPER; i++) send(1, i, 8'($urandom), 1);
      for (int i = 0; i < NPER; i++) send(2, i, 8'($urandom), 1);
    join
    repeat (50) @(posedge clk);
    checks++;
    if (received != 3 * NPER + 21) fail($sformatf("received %0d flits", received));
    for (int s = 0; s < 3; s++) for (int d = 0; d < 3; d++) begin
      checks++; if (sb[s][d].size() != 0) fail($sformatf("%0d flits lost %0d->%0d", sb[s][d].size(), s, d));
    end
    $display("router: %0d flits delivered", received);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
