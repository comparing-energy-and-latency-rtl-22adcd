// anoc_workload_harness: one application-specific network driven by bursty
// core-to-core traffic, for the workload testbench.
//
// WL selects the SoC: 0 = set-top box (8 cores, 13 directed flows with the
// average bandwidths of its communication table), 1 = MPEG-4 decoder
// (12 cores, 13 undirected edges of its communication graph; each edge
// carries half of its bandwidth in each direction, a choice of this bench).
// Each SoC gets its own router tree (described below and passed to the
// network as its TOPOLOGY), laid out by hand so that the heavy flows cross
// few routers.
//
// Traffic follows the b-model: the number of messages of a flow over the run
// is split recursively into two halves of the time span, a fraction b going
// to a randomly chosen half and 1-b to the other, down to windows of WIN
// cycles; inside a window each message starts at a random cycle. A message is
// 256 bytes, i.e. 64 flits of 32 bits. Messages wait in an unbounded source
// queue per core and are injected back to back. Bandwidths are converted with
// one clock cycle standing for 84 ps, which makes the 5-cycle path period of
// the clocked router equal to a 2.38 Gflit/s router.
//
// On start the harness generates the traffic of one run with burstiness
// b_milli/1000, runs it, checks every flit (right core, unchanged, in order
// per flow), and reports message latency (first flit accepted by the network
// to last flit delivered) and source queue delay (message creation to flit
// accepted), median and maximum, in cycles. It counts the flits the switch
// modules take in, checks that count against the hop counts of the flits
// sent, and turns it into a router power figure with the energy per flit of
// the original 65 nm router. done rises when all flits of the run have
// arrived.
module anoc_workload_harness #(
  parameter int NCORES = 8,
  parameter int WL     = 0,
  parameter int RUN_LOG2 = 18,    // run length 2^RUN_LOG2 cycles
  parameter int WIN_LOG2 = 10     // b-model window 2^WIN_LOG2 cycles
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  int   b_milli,
  output logic done,
  output int   checks,
  output int   failures
);
  import anoc_pkg::*;
  localparam int DW = 32, RW = 8;
  localparam int MSG_FLITS = 64;
  localparam real CYCLE_S = 84.0e-12;
  localparam int NFLOWS = WL == 0 ? 13 : 26;

  logic [NCORES-1:0] inj_req = '0, inj_ack, ej_req, ej_ack = '0;
  logic [NCORES-1:0][DW-1:0] inj_data = '0, ej_data;
  logic [NCORES-1:0][RW-1:0] inj_route = '0, ej_route;

  // Router trees, chosen so that the heavy flows cross few routers.
  // Set-top box (6 routers):
  //   R0: A DDR,  B MPEG2,   C R1     R3: A R2,  B CPU,   C AudioDec
  //   R1: A R0,   B HDTVEnc, C R2     R4: A R2,  B Demux, C R5
  //   R2: A R1,   B R3,      C R4     R5: A R4,  B Dem1,  C Dem2
  function automatic topo_t adstb_topology();
    topo_t t;
    t = '0;
    t[(3*0+0)*8 +: 8] = core_port(4);    t[(3*0+1)*8 +: 8] = core_port(3);    t[(3*0+2)*8 +: 8] = link_port(1, 0);
    t[(3*1+0)*8 +: 8] = link_port(0, 2); t[(3*1+1)*8 +: 8] = core_port(5);    t[(3*1+2)*8 +: 8] = link_port(2, 0);
    t[(3*2+0)*8 +: 8] = link_port(1, 2); t[(3*2+1)*8 +: 8] = link_port(3, 0); t[(3*2+2)*8 +: 8] = link_port(4, 0);
    t[(3*3+0)*8 +: 8] = link_port(2, 1); t[(3*3+1)*8 +: 8] = core_port(6);    t[(3*3+2)*8 +: 8] = core_port(7);
    t[(3*4+0)*8 +: 8] = link_port(2, 2); t[(3*4+1)*8 +: 8] = core_port(2);    t[(3*4+2)*8 +: 8] = link_port(5, 0);
    t[(3*5+0)*8 +: 8] = link_port(4, 2); t[(3*5+1)*8 +: 8] = core_port(0);    t[(3*5+2)*8 +: 8] = core_port(1);
    return t;
  endfunction

  // MPEG-4 decoder (10 routers):
  //   R0: A SDRAM, B R4,   C R1       R5: A R4, B SRAM1,  C R6
  //   R1: A R0,    B UPSAMP, C R2     R6: A R5, B VU,     C R7
  //   R2: A R1,    B SRAM2,  C R3     R7: A R6, B MED CPU, C R8
  //   R3: A R2,    B RISC,   C R9     R8: A R7, B DSP,    C AU
  //   R4: A R0,    B RAST,   C R5     R9: A R3, B IDCT,   C BAB
  function automatic topo_t mpeg4_topology();
    topo_t t;
    t = '0;
    t[(3*0+0)*8 +: 8] = core_port(5);    t[(3*0+1)*8 +: 8] = link_port(4, 0); t[(3*0+2)*8 +: 8] = link_port(1, 0);
    t[(3*1+0)*8 +: 8] = link_port(0, 2); t[(3*1+1)*8 +: 8] = core_port(6);    t[(3*1+2)*8 +: 8] = link_port(2, 0);
    t[(3*2+0)*8 +: 8] = link_port(1, 2); t[(3*2+1)*8 +: 8] = core_port(7);    t[(3*2+2)*8 +: 8] = link_port(3, 0);
    t[(3*3+0)*8 +: 8] = link_port(2, 2); t[(3*3+1)*8 +: 8] = core_port(9);    t[(3*3+2)*8 +: 8] = link_port(9, 0);
    t[(3*4+0)*8 +: 8] = link_port(0, 1); t[(3*4+1)*8 +: 8] = core_port(4);    t[(3*4+2)*8 +: 8] = link_port(5, 0);
    t[(3*5+0)*8 +: 8] = link_port(4, 2); t[(3*5+1)*8 +: 8] = core_port(3);    t[(3*5+2)*8 +: 8] = link_port(6, 0);
    t[(3*6+0)*8 +: 8] = link_port(5, 2); t[(3*6+1)*8 +: 8] = core_port(1);    t[(3*6+2)*8 +: 8] = link_port(7, 0);
    t[(3*7+0)*8 +: 8] = link_port(6, 2); t[(3*7+1)*8 +: 8] = core_port(2);    t[(3*7+2)*8 +: 8] = link_port(8, 0);
    t[(3*8+0)*8 +: 8] = link_port(7, 2); t[(3*8+1)*8 +: 8] = core_port(11);   t[(3*8+2)*8 +: 8] = core_port(0);
    t[(3*9+0)*8 +: 8] = link_port(3, 2); t[(3*9+1)*8 +: 8] = core_port(10);   t[(3*9+2)*8 +: 8] = core_port(8);
    return t;
  endfunction

  localparam topo_t TOPO = (WL == 0) ? adstb_topology() : mpeg4_topology();
  localparam int NR = NCORES - 2;

  anoc_network #(.NCORES(NCORES), .TOPOLOGY(TOPO)) u_net (
    .clk(clk), .rst(rst),
    .inj_req(inj_req), .inj_ack(inj_ack), .inj_data(inj_data), .inj_route(inj_route),
    .ej_req(ej_req), .ej_ack(ej_ack), .ej_data(ej_data), .ej_route(ej_route));

  // flow table: source core, destination core, MBytes/s
  // set-top box cores: 0 Dem1, 1 Dem2, 2 Demux, 3 MPEG2, 4 DDR, 5 HDTVEnc, 6 CPU, 7 AudioDec
  // MPEG-4 cores: 0 AU, 1 VU, 2 MED CPU, 3 SRAM1, 4 RAST, 5 SDRAM, 6 UPSAMP,
  //               7 SRAM2, 8 BAB, 9 RISC, 10 IDCT, 11 DSP
  function automatic void flow(input int f, output int s, output int d, output real bw);
    if (WL == 0) begin
      case (f)
        0:  begin s = 6; d = 7; bw = 1;   end  // CPU -> AudioDec
        1:  begin s = 6; d = 4; bw = 3;   end  // CPU -> DDR
        2:  begin s = 6; d = 2; bw = 1;   end  // CPU -> Demux
        3:  begin s = 6; d = 3; bw = 1;   end  // CPU -> MPEG2
        4:  begin s = 4; d = 6; bw = 3;   end  // DDR -> CPU
        5:  begin s = 4; d = 5; bw = 314; end  // DDR -> HDTVEnc
        6:  begin s = 4; d = 3; bw = 593; end  // DDR -> MPEG2
        7:  begin s = 0; d = 2; bw = 31;  end  // Dem1 -> Demux
        8:  begin s = 1; d = 2; bw = 31;  end  // Dem2 -> Demux
        9:  begin s = 2; d = 7; bw = 5;   end  // Demux -> AudioDec
        10: begin s = 2; d = 3; bw = 7;   end  // Demux -> MPEG2
        11: begin s = 5; d = 4; bw = 148; end  // HDTVEnc -> DDR
        default: begin s = 3; d = 4; bw = 424; end  // MPEG2 -> DDR
      endcase
    end else begin
      int a, b;
      real w;
      case (f / 2)
        0:  begin a = 1;  b = 5; w = 64;  end  // VU - SDRAM
        1:  begin a = 0;  b = 5; w = 1;   end  // AU - SDRAM
        2:  begin a = 2;  b = 5; w = 20;  end  // MED CPU - SDRAM
        3:  begin a = 2;  b = 3; w = 14;  end  // MED CPU - SRAM1
        4:  begin a = 4;  b = 5; w = 200; end  // RAST - SDRAM
        5:  begin a = 4;  b = 3; w = 40;  end  // RAST - SRAM1
        6:  begin a = 7;  b = 10; w = 84; end  // SRAM2 - IDCT
        7:  begin a = 11; b = 5; w = 3;   end  // DSP - SDRAM
        8:  begin a = 6;  b = 5; w = 304; end  // UPSAMP - SDRAM
        9:  begin a = 8;  b = 5; w = 11;  end  // BAB - SDRAM
        10: begin a = 6;  b = 7; w = 224; end  // UPSAMP - SRAM2
        11: begin a = 8;  b = 7; w = 58;  end  // BAB - SRAM2
        default: begin a = 9; b = 7; w = 167; end  // RISC - SRAM2
      endcase
      if (f % 2 == 0) begin s = a; d = b; end else begin s = b; d = a; end
      bw = w / 2.0;
    end
  endfunction

  // per-core source queue: creation cycle and destination of each message
  int   q_time [NCORES][$];
  int   q_dst  [NCORES][$];
  int   cycle = 0;
  int   pair_seq_tx [NCORES][NCORES];
  int   pair_seq_rx [NCORES][NCORES];
  int   first_inj [int];          // key: pair * 2^20 + message number
  int   lat_msg [$];
  int   lat_q   [$];
  int   flits_total = 0, flits_rx = 0, msgs_total = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // router traversals: every flit a switch module takes in is one traversal
  int trav = 0, trav_expected = 0;
  for (genvar r = 0; r < NCORES - 2; r++) begin : g_trav_r
    for (genvar p = 0; p < 3; p++) begin : g_trav_p
      always @(posedge clk) if (!rst && u_net.g_rtr[r].u_rtr.g_port[p].u_switch.load) trav++;
    end
  end

  // b-model volume of each window
  localparam int NWIN = 1 << (RUN_LOG2 - WIN_LOG2);
  real vol [NWIN];

  task automatic bmodel(input real total, input real b);
    int nwin;
    nwin = NWIN;
    vol[0] = total;
    for (int span = nwin; span > 1; span /= 2) begin
      for (int base = 0; base < nwin; base += span) begin
        real v;
        v = vol[base];
        if ($urandom_range(0, 1) == 1) begin
          vol[base] = v * b; vol[base + span / 2] = v * (1.0 - b);
        end else begin
          vol[base] = v * (1.0 - b); vol[base + span / 2] = v * b;
        end
      end
    end
  endtask

  task automatic generate_run(input real b);
    int t0;
    t0 = cycle + 10;
    for (int f = 0; f < NFLOWS; f++) begin
      int s, d;
      real bw, msgs, carry;
      flow(f, s, d, bw);
      msgs = bw * 1.0e6 * CYCLE_S * real'(1 << RUN_LOG2) / 256.0;
      bmodel(msgs, b);
      carry = 0.0;
      for (int w = 0; w < NWIN; w++) begin
        int n;
        carry += vol[w];
        n = int'($floor(carry));
        carry -= real'(n);
        for (int k = 0; k < n; k++) begin
          int tm, pos;
          tm = t0 + w * (1 << WIN_LOG2) + int'($urandom_range(0, (1 << WIN_LOG2) - 1));
          // insert in time order
          pos = q_time[s].size();
          while (pos > 0 && q_time[s][pos-1] > tm) pos--;
          q_time[s].insert(pos, tm);
          q_dst[s].insert(pos, d);
          msgs_total++;
          flits_total += MSG_FLITS;
        end
      end
    end
  endtask

  // senders
  for (genvar c = 0; c < NCORES; c++) begin : g_tx
    initial begin
      forever begin
        @(posedge clk); #1;
        while (q_time[c].size() > 0 && q_time[c][0] <= cycle) begin
          int d, tm;
          tm = q_time[c].pop_front();
          d  = q_dst[c].pop_front();
          for (int k = 0; k < MSG_FLITS; k++) begin
            int seq;
            seq = pair_seq_tx[c][d];
            pair_seq_tx[c][d] = seq + 1;
            inj_data[c]  = {4'(c), 4'(d), 24'(seq)};
            inj_route[c] = tree_route(TOPO, NR, c, d);
            inj_req[c]   = ~inj_req[c];
            trav_expected += int'(tree_hops(TOPO, NR, c, d));
            do begin @(posedge clk); #1; end while (inj_ack[c] != inj_req[c]);
            lat_q.push_back(cycle - tm);
            if (k == 0) first_inj[(c * 16 + d) * (1 << 20) + seq / MSG_FLITS] = cycle;
          end
        end
      end
    end
  end

  // receivers
  for (genvar c = 0; c < NCORES; c++) begin : g_rx
    initial begin
      forever begin
        @(posedge clk); #1;
        if (!rst && ej_req[c] != ej_ack[c]) begin
          int s, d, seq;
          s   = int'(ej_data[c][31:28]);
          d   = int'(ej_data[c][27:24]);
          seq = int'(ej_data[c][23:0]);
          checks += 2;
          if (d != c || s >= NCORES) begin failures++; $display("FAIL WL%0d: core %0d got %h", WL, c, ej_data[c]); end
          else if (seq != pair_seq_rx[s][c]) begin
            failures++; $display("FAIL WL%0d: flow %0d->%0d flit %0d, expected %0d", WL, s, c, seq, pair_seq_rx[s][c]);
          end else begin
            pair_seq_rx[s][c]++;
            if (seq % MSG_FLITS == MSG_FLITS - 1) begin
              int key;
              key = (s * 16 + c) * (1 << 20) + seq / MSG_FLITS;
              lat_msg.push_back(cycle - first_inj[key]);
              first_inj.delete(key);
            end
          end
          flits_rx++;
          ej_ack[c] = ej_req[c];
        end
      end
    end
  end

  function automatic string stats(input int q [$]);
    int n;
    if (q.size() == 0) return "none";
    q.sort();
    n = q.size();
    return $sformatf("median %0d max %0d (n=%0d)", q[n / 2], q[n - 1], n);
  endfunction

  initial begin
    done = 0; checks = 0; failures = 0;
    forever begin
      @(posedge clk);
      if (start && !done) begin
        real b;
        b = real'(b_milli) / 1000.0;
        flits_total = 0; flits_rx = 0; msgs_total = 0;
        trav = 0; trav_expected = 0;
        lat_msg.delete(); lat_q.delete();
        generate_run(b);
        wait (flits_rx == flits_total);
        repeat (10) @(posedge clk);
        checks++;
        if (lat_msg.size() != msgs_total) begin failures++; $display("FAIL WL%0d: %0d of %0d messages complete", WL, lat_msg.size(), msgs_total); end
        // a message can never beat its zero-load time: 64 flits at 5 cycles each
        checks++;
        begin
          int mn;
          mn = 1 << 30;
          foreach (lat_msg[i]) if (lat_msg[i] < mn) mn = lat_msg[i];
          if (msgs_total > 0 && mn < (MSG_FLITS - 1) * 5) begin failures++; $display("FAIL WL%0d: message latency %0d below bound", WL, mn); end
        end
        // every flit must have crossed exactly the routers of its path
        checks++;
        if (trav != trav_expected) begin failures++; $display("FAIL WL%0d: %0d router traversals, expected %0d", WL, trav, trav_expected); end
        $display("%s b=%0.2f: %0d messages, %0d flits; message latency %s cycles; source queue delay %s cycles",
                 WL == 0 ? "ADSTB" : "MPEG4", b, msgs_total, flits_total, stats(lat_msg), stats(lat_q));
        // energy scale of the original 65 nm router: 1.56 pJ per flit and
        // router, 0.009 mW leakage per router
        $display("%s b=%0.2f: %0d router traversals; at 1.56 pJ each over %0.1f us: router dynamic power %0.2f mW, leakage %0.3f mW (%0d routers)",
                 WL == 0 ? "ADSTB" : "MPEG4", b, trav, real'(1 << RUN_LOG2) * CYCLE_S * 1.0e6,
                 real'(trav) * 1.56e-12 / (real'(1 << RUN_LOG2) * CYCLE_S) * 1.0e3, 0.009 * real'(NCORES - 2), NCORES - 2);
        done = 1;
      end else if (!start) begin
        done = 0;
      end
    end
  end
endmodule
