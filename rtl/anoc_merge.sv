// anoc_merge: output half of a router port (the "merge module").
//
// Function: two switch modules compete for one outgoing inter-router link.
// Each offers a flit on a 4-phase channel (lr1/la1, lr2/la2). An arbitration
// circuit built around a mutual-exclusion element (anoc_mutex) serialises the
// two requests, a multiplexer controlled by the grant selects that input's
// data and route bits, and a merge controller stores them in the one-flit
// output latch and signals them on the outgoing link with a 2-phase
// bundled-data handshake (rr toggles to offer, ra toggles to accept). The
// granted input is acknowledged when its flit has been stored, and the grant
// is held until that input's request returns to zero.
//
// Implementation (this design's choice): the merge controller is a clocked
// state machine; the output latch is a register with a load enable. The
// output latch counts as full from the toggle of rr until ra follows it, and
// a new flit is stored only when it is empty.
//
// Timing: a request sampled at an edge is granted at that edge (registered
// grant), its flit is stored and rr toggles at the next edge, and la rises
// with it. la falls on the edge that sees the request low.
module anoc_merge #(
  parameter int unsigned DATA_W  = anoc_pkg::DATA_W_DEF,
  parameter int unsigned ROUTE_W = anoc_pkg::ROUTE_W_DEF
) (
  input  logic               clk,
  input  logic               rst,
  // 4-phase inputs from two switch modules
  input  logic               lr1,
  output logic               la1,
  input  logic [DATA_W-1:0]  din1,
  input  logic [ROUTE_W-1:0] rin1,
  input  logic               lr2,
  output logic               la2,
  input  logic [DATA_W-1:0]  din2,
  input  logic [ROUTE_W-1:0] rin2,
  // 2-phase bundled-data output link
  output logic               rr,
  input  logic               ra,
  output logic [DATA_W-1:0]  dout,
  output logic [ROUTE_W-1:0] rout
);

  logic [1:0]         gnt;
  logic [1:0]         la_q;
  logic               out_free;   // output latch empty: last transfer acknowledged
  logic [1:0]         store;      // store the flit of input i this cycle
  logic [DATA_W-1:0]  mux_d;
  logic [ROUTE_W-1:0] mux_r;
  logic               contend;    // both inputs requesting at once
  logic               blocked;    // granted flit waiting for the output link

  anoc_mutex u_mutex (
    .clk (clk),
    .rst (rst),
    .req ({lr2, lr1}),
    .gnt (gnt)
  );

  assign out_free = (rr == ra);
  assign store[0] = gnt[0] && lr1 && !la_q[0] && out_free;
  assign store[1] = gnt[1] && lr2 && !la_q[1] && out_free;
  assign contend  = lr1 && lr2;
  assign blocked  = ((gnt[0] && lr1 && !la_q[0]) || (gnt[1] && lr2 && !la_q[1])) && !out_free;

  // data MUX steered by the arbiter
  assign mux_d = gnt[1] ? din2 : din1;
  assign mux_r = gnt[1] ? rin2 : rin1;

  always_ff @(posedge clk) begin
    if (rst) begin
      rr   <= 1'b0;
      la_q <= 2'b00;
    end else begin
      if (store != 2'b00) rr <= ~rr;
      for (int i = 0; i < 2; i++) begin
        if (store[i])                        la_q[i] <= 1'b1;
        else if (la_q[i] && !(i == 0 ? lr1 : lr2)) la_q[i] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (store != 2'b00) begin
      dout <= mux_d;
      rout <= mux_r;
    end
  end

  assign la1 = la_q[0];
  assign la2 = la_q[1];

  a_one_ack: assert property (@(posedge clk) disable iff (rst) !(la_q[0] && la_q[1]))
    else $error("merge: both inputs acknowledged");

endmodule
