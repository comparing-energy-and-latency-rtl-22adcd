// anoc_network: application-specific asynchronous network of 3-port routers.
//
// Function: connects NCORES cores with a tree of NCORES-2 three-port routers
// (anoc_router), the smallest number of such routers that a tree joining
// NCORES end points can have. Packets are single flits with source-routing
// bits; a core supplies the route when it injects a flit, and every router
// uses and rotates one bit.
//
// Topology: the TOPOLOGY parameter says, for every router port, whether a
// core sits there (and which) or a link to which port of which other router
// (encoding in anoc_pkg). Any tree can be described, so the network can take
// the shape that a placement tool finds for a given SoC floorplan and traffic;
// anoc_pkg::tree_route gives the matching route fields. Elaboration stops with
// an error if a core index is out of range or a link is not described from
// both ends. The default, anoc_pkg::chain_topology(NCORES), is a chain (this
// design's choice): core 0 on port A of router 0, core k (1..NCORES-2) on
// port B of router k-1, core NCORES-1 on port C of router NCORES-3, and port C
// of router r linked to port A of router r+1. Every link is bidirectional: one
// 2-phase bundled-data channel each way. A path may cross at most ROUTE_W
// routers; on the default chain the longest crosses NCORES-2. The default of
// 8 cores is the set-top-box SoC (CPU, AudioDec, DDR, Demux, MPEG2, HDTVEnc,
// Dem1, Dem2) the network is evaluated with.
//
// Interface: per core, an injection link (inj_req toggles to offer a flit,
// inj_ack toggles back) and an ejection link (ej_req toggles when a flit is
// delivered, the core toggles ej_ack to accept it). Clocked implementation:
// a flit crossing h routers without contention is offered to its destination
// on the 3*h-th rising edge after its injection request toggles, and one
// path carries at most one flit every 5 cycles.
module anoc_network #(
  parameter int unsigned NCORES  = 8,
  parameter int unsigned DATA_W  = anoc_pkg::DATA_W_DEF,
  parameter int unsigned ROUTE_W = anoc_pkg::ROUTE_W_DEF,
  // who sits on each router port; see anoc_pkg for the encoding
  parameter anoc_pkg::topo_t TOPOLOGY = anoc_pkg::chain_topology(NCORES)
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic [NCORES-1:0]                inj_req,
  output logic [NCORES-1:0]                inj_ack,
  input  logic [NCORES-1:0][DATA_W-1:0]    inj_data,
  input  logic [NCORES-1:0][ROUTE_W-1:0]   inj_route,
  output logic [NCORES-1:0]                ej_req,
  input  logic [NCORES-1:0]                ej_ack,
  output logic [NCORES-1:0][DATA_W-1:0]    ej_data,
  output logic [NCORES-1:0][ROUTE_W-1:0]   ej_route
);

  localparam int unsigned NR = NCORES - 2;

  // router port signals
  logic [NR-1:0][2:0]               r_in_req, r_in_ack, r_out_req, r_out_ack;
  logic [NR-1:0][2:0][DATA_W-1:0]   r_in_data, r_out_data;
  logic [NR-1:0][2:0][ROUTE_W-1:0]  r_in_route, r_out_route;

  for (genvar r = 0; r < NR; r++) begin : g_rtr
    anoc_router #(.DATA_W(DATA_W), .ROUTE_W(ROUTE_W)) u_rtr (
      .clk       (clk),
      .rst       (rst),
      .in_req    (r_in_req[r]),
      .in_ack    (r_in_ack[r]),
      .in_data   (r_in_data[r]),
      .in_route  (r_in_route[r]),
      .out_req   (r_out_req[r]),
      .out_ack   (r_out_ack[r]),
      .out_data  (r_out_data[r]),
      .out_route (r_out_route[r])
    );

    for (genvar p = 0; p < 3; p++) begin : g_port
      localparam logic [7:0] DSC = TOPOLOGY[(3*r+p)*8 +: 8];
      if (DSC[7]) begin : g_core
        // a core: its injection link feeds this input, this output feeds
        // its ejection link
        localparam int unsigned C = int'(DSC[6:0]);
        if (C >= NCORES) begin : g_bad_core
          $error("anoc_network: router %0d port %0d names core %0d of %0d", r, p, C, NCORES);
        end
        assign r_in_req[r][p]   = inj_req[C];
        assign r_in_data[r][p]  = inj_data[C];
        assign r_in_route[r][p] = inj_route[C];
        assign inj_ack[C]       = r_in_ack[r][p];
        assign ej_req[C]        = r_out_req[r][p];
        assign ej_data[C]       = r_out_data[r][p];
        assign ej_route[C]      = r_out_route[r][p];
        assign r_out_ack[r][p]  = ej_ack[C];
      end else begin : g_link
        // a link: the output of router Q, port PQ feeds this input
        localparam int unsigned Q  = int'(DSC[6:2]);
        localparam int unsigned PQ = int'(DSC[1:0]);
        localparam logic [7:0] BACK = TOPOLOGY[(3*Q+PQ)*8 +: 8];
        if (Q >= NR || PQ > 2 || BACK != {1'b0, 5'(r), 2'(p)}) begin : g_bad_link
          $error("anoc_network: link at router %0d port %0d is not symmetric", r, p);
        end
        assign r_in_req[r][p]   = r_out_req[Q][PQ];
        assign r_in_data[r][p]  = r_out_data[Q][PQ];
        assign r_in_route[r][p] = r_out_route[Q][PQ];
        assign r_out_ack[Q][PQ] = r_in_ack[r][p];
      end
    end
  end

endmodule
