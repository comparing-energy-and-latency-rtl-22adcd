// anoc_router: three-port "T" router of the asynchronous network.
//
// Function: every port (A=0, B=1, C=2) is bidirectional. Each input link
// feeds a switch module (anoc_switch) that steers the flit by its most
// significant route bit to one of the two other ports; each output link is
// driven by a merge module (anoc_merge) that arbitrates between the two
// switches that can reach it. Three switches and three merges make the
// router; a flit can never leave by the port it came in on.
//
// Wiring (this design's choice of numbering): the switch of port p sends
// route bit 0 to port (p+1)%3 and route bit 1 to port (p+2)%3. The merge of
// port q therefore takes input 1 from the switch of port (q+2)%3 and input 2
// from the switch of port (q+1)%3.
//
// Interface: per port, an incoming 2-phase bundled-data link (in_req toggles,
// in_ack toggles back, in_data/in_route valid while they differ) and an
// outgoing link of the same kind. Route bits leave rotated left by one.
// Timing (clocked implementation): with no contention a flit whose request
// toggles before edge k is acknowledged at edge k, and it is offered on the
// output link at edge k+2.
module anoc_router #(
  parameter int unsigned DATA_W  = anoc_pkg::DATA_W_DEF,
  parameter int unsigned ROUTE_W = anoc_pkg::ROUTE_W_DEF
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic [2:0]                     in_req,
  output logic [2:0]                     in_ack,
  input  logic [2:0][DATA_W-1:0]         in_data,
  input  logic [2:0][ROUTE_W-1:0]        in_route,
  output logic [2:0]                     out_req,
  input  logic [2:0]                     out_ack,
  output logic [2:0][DATA_W-1:0]         out_data,
  output logic [2:0][ROUTE_W-1:0]        out_route
);

  // internal 4-phase channels, indexed by source switch and its output (0: rr1, 1: rr2)
  logic [2:0][1:0]              sw_req;
  logic [2:0][1:0]              sw_ack;
  logic [2:0][DATA_W-1:0]       sw_data;
  logic [2:0][ROUTE_W-1:0]      sw_route;

  for (genvar p = 0; p < 3; p++) begin : g_port
    anoc_switch #(.DATA_W(DATA_W), .ROUTE_W(ROUTE_W)) u_switch (
      .clk  (clk),
      .rst  (rst),
      .lr   (in_req[p]),
      .la   (in_ack[p]),
      .din  (in_data[p]),
      .rin  (in_route[p]),
      .rr1  (sw_req[p][0]),
      .ra1  (sw_ack[p][0]),
      .rr2  (sw_req[p][1]),
      .ra2  (sw_ack[p][1]),
      .dout (sw_data[p]),
      .rout (sw_route[p])
    );

    // merge of port p: input 1 from switch (p+2)%3 (its rr1),
    //                  input 2 from switch (p+1)%3 (its rr2)
    anoc_merge #(.DATA_W(DATA_W), .ROUTE_W(ROUTE_W)) u_merge (
      .clk  (clk),
      .rst  (rst),
      .lr1  (sw_req[(p+2)%3][0]),
      .la1  (sw_ack[(p+2)%3][0]),
      .din1 (sw_data[(p+2)%3]),
      .rin1 (sw_route[(p+2)%3]),
      .lr2  (sw_req[(p+1)%3][1]),
      .la2  (sw_ack[(p+1)%3][1]),
      .din2 (sw_data[(p+1)%3]),
      .rin2 (sw_route[(p+1)%3]),
      .rr   (out_req[p]),
      .ra   (out_ack[p]),
      .dout (out_data[p]),
      .rout (out_route[p])
    );
  end

endmodule
