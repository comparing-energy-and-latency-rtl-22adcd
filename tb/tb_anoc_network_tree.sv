// tb_anoc_network_tree: end-to-end test of the network built from a branching
// TOPOLOGY instead of the default chain.
//
// The tree has 8 cores and 6 routers, and its links join every kind of port
// pair (A-B, A-C, B-B, C-C), with cores on A, B and C ports:
//   R0: A core0, B core1, C R1.B      R3: A R1.C,  B R4.B,  C R5.C
//   R1: A R2.C,  B R0.C,  C R3.A      R4: A core4, B R3.B,  C core5
//   R2: A core2, B core3, C R1.A      R5: A core6, B core7, C R3.C
// Routes come from anoc_pkg::tree_route. The checks are those of the chain
// bench: zero-load latency of 3*h edges on every path (h routers crossed),
// then random all-to-all traffic with slow receivers and a scoreboard per
// (source, destination) that checks delivery to the right core, unchanged and
// in order, with the route field rotated once per router. The bench fails if
// a mechanism never occurs: steering by route bit 0 and by bit 1, merge
// contention, a switch stall, a busy-link wait, and a flit on a longest path.
module tb_anoc_network_tree;
  import anoc_pkg::*;
  localparam int N  = 8;        // the network's default core count
  localparam int DW = 32, RW = 8;
  localparam int NPER = 200;    // random flits per core
  localparam int NR = N - 2;

  function automatic topo_t test_topology();
    topo_t t;
    t = '0;
    t[(3*0+0)*8 +: 8] = core_port(0);    t[(3*0+1)*8 +: 8] = core_port(1);    t[(3*0+2)*8 +: 8] = link_port(1, 1);
    t[(3*1+0)*8 +: 8] = link_port(2, 2); t[(3*1+1)*8 +: 8] = link_port(0, 2); t[(3*1+2)*8 +: 8] = link_port(3, 0);
    t[(3*2+0)*8 +: 8] = core_port(2);    t[(3*2+1)*8 +: 8] = core_port(3);    t[(3*2+2)*8 +: 8] = link_port(1, 0);
    t[(3*3+0)*8 +: 8] = link_port(1, 2); t[(3*3+1)*8 +: 8] = link_port(4, 1); t[(3*3+2)*8 +: 8] = link_port(5, 2);
    t[(3*4+0)*8 +: 8] = core_port(4);    t[(3*4+1)*8 +: 8] = link_port(3, 1); t[(3*4+2)*8 +: 8] = core_port(5);
    t[(3*5+0)*8 +: 8] = core_port(6);    t[(3*5+1)*8 +: 8] = core_port(7);    t[(3*5+2)*8 +: 8] = link_port(3, 2);
    return t;
  endfunction
  localparam topo_t TOPO = test_topology();

  int MAXH = 0;                 // longest path in routers, found at start
  initial
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++)
      if (s != d && int'(tree_hops(TOPO, NR, s, d)) > MAXH) MAXH = int'(tree_hops(TOPO, NR, s, d));
  logic clk = 0, rst = 1;
  logic [N-1:0] inj_req = '0, inj_ack, ej_req, ej_ack = '0;
  logic [N-1:0][DW-1:0] inj_data = '0, ej_data;
  logic [N-1:0][RW-1:0] inj_route = '0, ej_route;
  int checks = 0, failures = 0;
  logic [DW-1:0] sb [N][N][$];
  int received = 0;
  int longest_path_flits = 0;
  bit slow_sink = 0;

  anoc_network #(.NCORES(N), .TOPOLOGY(TOPO)) dut (
    .clk(clk), .rst(rst),
    .inj_req(inj_req), .inj_ack(inj_ack), .inj_data(inj_data), .inj_route(inj_route),
    .ej_req(ej_req), .ej_ack(ej_ack), .ej_data(ej_data), .ej_route(ej_route));

  always #5 clk = ~clk;

  task automatic fail(input string s); failures++; $display("FAIL %s", s); endtask

  initial begin
    repeat (60000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, summed over all routers and ports
  int ev_bit0 = 0, ev_bit1 = 0, ev_contend = 0, ev_stall = 0, ev_blocked = 0;
  for (genvar r = 0; r < N - 2; r++) begin : g_mon_r
    for (genvar p = 0; p < 3; p++) begin : g_mon_p
      always @(posedge clk) if (!rst) begin
        if (dut.g_rtr[r].u_rtr.g_port[p].u_switch.load) begin
          if (dut.g_rtr[r].u_rtr.g_port[p].u_switch.rin[RW-1]) ev_bit1++; else ev_bit0++;
        end
        if (dut.g_rtr[r].u_rtr.g_port[p].u_merge.contend) ev_contend++;
        if (dut.g_rtr[r].u_rtr.g_port[p].u_switch.stall)  ev_stall++;
        if (dut.g_rtr[r].u_rtr.g_port[p].u_merge.blocked) ev_blocked++;
      end
    end
  end

  function automatic logic [DW-1:0] tag(input int s, input int d, input int seq);
    return {4'(s), 4'(d), 24'(seq)};
  endfunction

  task automatic send(input int s, input int d, input int seq, input int gap);
    repeat (gap) @(posedge clk);
    #1;
    inj_data[s]  = tag(s, d, seq);
    inj_route[s] = tree_route(TOPO, NR, s, d);
    sb[s][d].push_back(inj_data[s]);
    inj_req[s]   = ~inj_req[s];
    do begin @(posedge clk); #1; end while (inj_ack[s] != inj_req[s]);
  endtask

  for (genvar c = 0; c < N; c++) begin : g_rx
    initial begin
      @(negedge rst);
      forever begin
        @(posedge clk); #1;
        if (ej_req[c] != ej_ack[c]) begin
          int s, d;
          s = int'(ej_data[c][31:28]);
          d = int'(ej_data[c][27:24]);
          checks += 2;
          if (d != c) fail($sformatf("core %0d got flit for core %0d", c, d));
          if (s >= N || sb[s][c].size() == 0) fail($sformatf("core %0d: unexpected flit %h", c, ej_data[c]));
          else begin
            logic [DW-1:0] e;
            e = sb[s][c].pop_front();
            if (ej_data[c] !== e) fail($sformatf("core %0d: got %h expected %h", c, ej_data[c], e));
            // the route field arrives rotated once per router crossed
            begin
              logic [RW-1:0] rt;
              rt = tree_route(TOPO, NR, s, c);
              for (int h = 0; h < int'(tree_hops(TOPO, NR, s, c)); h++) rt = {rt[RW-2:0], rt[RW-1]};
              checks++;
              if (ej_route[c] !== rt) fail($sformatf("core %0d: route %b expected %b", c, ej_route[c], rt));
            end
            if (int'(tree_hops(TOPO, NR, s, c)) == MAXH) longest_path_flits++;
          end
          received++;
          if (slow_sink) repeat ($urandom_range(0, 6)) @(posedge clk);
          ej_ack[c] = ej_req[c];
        end
      end
    end
  end

  initial begin
    automatic int sent = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    repeat (2) @(posedge clk);
    // zero-load latency on every path, one flit at a time
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) if (s != d) begin
      int edges;
      logic prev;
      prev = ej_req[d];
      edges = 0;
      #1;
      inj_data[s]  = tag(s, d, 0);
      inj_route[s] = tree_route(TOPO, NR, s, d);
      sb[s][d].push_back(inj_data[s]);
      inj_req[s]   = ~inj_req[s];
      while (ej_req[d] == prev && edges < 100) begin @(posedge clk); #1; edges++; end
      checks++;
      if (edges != 3 * int'(tree_hops(TOPO, NR, s, d)))
        fail($sformatf("path %0d->%0d: %0d edges, expected %0d", s, d, edges, 3 * tree_hops(TOPO, NR, s, d)));
      sent++;
      repeat (4) @(posedge clk);
    end
    // random all-to-all traffic with slow receivers
    slow_sink = 1;
    for (int c = 0; c < N; c++) begin
      automatic int cc = c;
      fork
        for (int i = 1; i <= NPER; i++) begin
          int d;
          d = $urandom_range(0, N - 2);
          if (d >= cc) d++;
          send(cc, d, i, $urandom_range(0, 2));
        end
      join_none
    end
    wait fork;
    sent += N * NPER;
    repeat (200) @(posedge clk);
    checks++;
    if (received != sent) fail($sformatf("received %0d of %0d flits", received, sent));
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) begin
      checks++; if (sb[s][d].size() != 0) fail($sformatf("%0d flits lost %0d->%0d", sb[s][d].size(), s, d));
    end
    $display("tree network (longest path %0d routers): %0d flits; route bit 0: %0d, bit 1: %0d, contention: %0d, switch stalls: %0d, busy-link waits: %0d, longest-path flits: %0d",
             MAXH, received, ev_bit0, ev_bit1, ev_contend, ev_stall, ev_blocked, longest_path_flits);
    checks += 6;
    if (ev_bit0 == 0)    fail("route bit 0 never steered");
    if (ev_bit1 == 0)    fail("route bit 1 never steered");
    if (ev_contend == 0) fail("no merge contention");
    if (ev_stall == 0)   fail("no switch stall");
    if (ev_blocked == 0) fail("no busy-link wait");
    if (longest_path_flits == 0) fail("longest path never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
