// anoc_switch: input half of a router port (the "switch module").
//
// Function: receives one flit at a time from an inter-router link that uses a
// 2-phase bundled-data handshake (lr toggles to offer a flit, la toggles to
// accept it), holds it in a one-flit data latch, and steers it to one of two
// internal 4-phase output channels (rr1/ra1 or rr2/ra2) by the most
// significant route bit. The route field leaves rotated left by one bit, so
// the next router sees its own steering bit in the MSB.
//
// Structure, following the switch schematic: a 2-to-4 phase converter
// (the stored la phase compared with lr yields a level request), a linear
// controller that loads the data latch and the MSB latch, a demultiplexer
// that raises rr1 when the latched MSB is 0 and rr2 when it is 1, and an
// acknowledge taken from either output channel. Which MSB value selects
// which output is this design's choice.
//
// Implementation (this design's choice): the controllers are clocked state
// machines that sample the handshake wires on each rising clk edge; the data
// latch is a register with a load enable. The handshake order is kept: the
// link is acknowledged as soon as the flit is latched (backward path), and the
// latch is freed when the selected output acknowledges. After that, no output
// request is raised until an edge has seen both output acknowledges back at
// zero, which completes the 4-phase return-to-zero. There is no combinational
// path from ra1/ra2 to rr1/rr2.
//
// Timing: la toggles on the first clock edge that sees lr != la while the
// latch is free (1 cycle backward latency); rr1/rr2 rise combinationally from
// the latch state in that same cycle. A flit that is accepted downstream frees
// the latch on the edge that sees the acknowledge, and a waiting flit can be
// loaded on that same edge.
module anoc_switch #(
  parameter int unsigned DATA_W  = anoc_pkg::DATA_W_DEF,
  parameter int unsigned ROUTE_W = anoc_pkg::ROUTE_W_DEF
) (
  input  logic               clk,
  input  logic               rst,
  // 2-phase bundled-data input link
  input  logic               lr,
  output logic               la,
  input  logic [DATA_W-1:0]  din,
  input  logic [ROUTE_W-1:0] rin,
  // 4-phase outputs to the two merge modules
  output logic               rr1,
  input  logic               ra1,
  output logic               rr2,
  input  logic               ra2,
  output logic [DATA_W-1:0]  dout,
  output logic [ROUTE_W-1:0] rout
);

  logic               full;      // data latch holds a flit
  logic               msb;       // latched steering bit
  logic [DATA_W-1:0]  data_q;
  logic [ROUTE_W-1:0] route_q;
  logic               lreq;      // 4-phase request from the 2-to-4 converter
  logic               rtz_wait;  // last output acknowledge not yet back at zero
  logic               req_lvl;   // level of the selected output request
  logic               release_q; // the selected output acknowledged
  logic               load;
  logic               stall;     // flit waiting for a merge module

  assign lreq      = lr ^ la;
  assign req_lvl   = full && !rtz_wait;
  assign release_q = req_lvl && (msb ? ra2 : ra1);
  assign load      = lreq && (!full || release_q);
  assign stall     = full && !release_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      la     <= 1'b0;
      full   <= 1'b0;
      msb    <= 1'b0;
      rtz_wait <= 1'b0;
    end else begin
      if (release_q)         rtz_wait <= 1'b1;
      else if (!ra1 && !ra2) rtz_wait <= 1'b0;
      if (load) begin
        la   <= ~la;
        full <= 1'b1;
        msb  <= rin[ROUTE_W-1];
      end else if (release_q) begin
        full <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (load) begin
      data_q  <= din;
      route_q <= rin;
    end
  end

  // DEMUX: the request of the selected output is high while the latch holds
  // a flit and the previous acknowledge has returned to zero.
  always_comb begin
    rr1 = req_lvl && !msb;
    rr2 = req_lvl &&  msb;
  end

  assign dout = data_q;
  assign rout = {route_q[ROUTE_W-2:0], route_q[ROUTE_W-1]};

endmodule
