// anoc_pkg: shared constants and helpers of the bundled-data asynchronous NoC.
//
// A packet is one flit: DATA_W data bits plus ROUTE_W source-routing bits that
// travel on their own wires next to the data. The defaults (32 data bits,
// 8 route bits) are the router configuration the design is characterised in.
// Each router consumes the most significant route bit and rotates the field
// left by one, so bit ROUTE_W-1-h steers the flit at hop h.
//
// The network (anoc_network) is a tree of such routers whose shape is given
// by a topology vector (see below). tree_route() finds the path between two
// cores in any such tree and returns its route field; tree_hops() returns the
// number of routers on it. chain_topology() builds the default shape, a
// chain; the chain, the descriptor encoding and the search are this design's
// choices.
package anoc_pkg;

  localparam int unsigned DATA_W_DEF  = 32;
  localparam int unsigned ROUTE_W_DEF = 8;

  // Router port indices.
  localparam int unsigned PORT_A = 0;
  localparam int unsigned PORT_B = 1;
  localparam int unsigned PORT_C = 2;

  // A switch at input port p sends route bit 0 to port (p+1)%3 and route
  // bit 1 to port (p+2)%3.
  function automatic logic route_bit(input int unsigned in_port, input int unsigned out_port);
    return (out_port != (in_port + 1) % 3);
  endfunction

  // Topology description. Each router port has an 8-bit descriptor:
  //   bit 7 = 1: a core is attached, bits 6:0 = core index;
  //   bit 7 = 0: a link to another router, bits 6:2 = that router's index,
  //              bits 1:0 = that router's port.
  // Router r, port p uses bits [(3*r+p)*8 +: 8] of a topology vector.
  localparam int unsigned MAX_ROUTERS = 32;
  localparam int unsigned TOPO_W      = MAX_ROUTERS * 3 * 8;
  typedef logic [TOPO_W-1:0] topo_t;

  function automatic logic [7:0] core_port(input int unsigned core);
    return {1'b1, 7'(core)};
  endfunction

  function automatic logic [7:0] link_port(input int unsigned rtr, input int unsigned port);
    return {1'b0, 5'(rtr), 2'(port)};
  endfunction

  // The chain-shaped tree: core 0 on port A of router 0, core k (1..n-2) on
  // port B of router k-1, core n-1 on port C of router n-3, and port C of
  // router r linked to port A of router r+1.
  function automatic topo_t chain_topology(input int unsigned ncores);
    topo_t t;
    int unsigned nr;
    t  = '0;
    nr = ncores - 2;
    for (int unsigned r = 0; r < nr; r++) begin
      t[(3*r+PORT_A)*8 +: 8] = (r == 0)      ? core_port(0)          : link_port(r - 1, PORT_C);
      t[(3*r+PORT_B)*8 +: 8] = core_port(r + 1);
      t[(3*r+PORT_C)*8 +: 8] = (r == nr - 1) ? core_port(ncores - 1) : link_port(r + 1, PORT_A);
    end
    return t;
  endfunction

  // Route search in a tree: hop count and route field from core src to core
  // dst (src != dst). Breadth-first search from the router src is attached
  // to, then the path is traced back. Returns 0 hops if dst is not reachable.
  function automatic void tree_path(input topo_t topo, input int unsigned nrouters,
                                    input int unsigned src, input int unsigned dst,
                                    output int unsigned hops,
                                    output logic [ROUTE_W_DEF-1:0] route);
    int unsigned entry_port [MAX_ROUTERS];
    int unsigned parent     [MAX_ROUTERS];
    int unsigned parent_out [MAX_ROUTERS];
    bit          seen       [MAX_ROUTERS];
    int unsigned queue      [MAX_ROUTERS];
    int unsigned head, tail, rs, last_r, last_out, r;
    int unsigned path_r   [MAX_ROUTERS];
    int unsigned path_out [MAX_ROUTERS];
    bit found;
    logic [7:0] dsc;
    hops  = 0;
    route = '0;
    found = 0;
    rs = 0;
    last_r = 0;
    last_out = 0;
    for (int unsigned i = 0; i < MAX_ROUTERS; i++) begin
      seen[i] = 0; entry_port[i] = 0; parent[i] = 0; parent_out[i] = 0; queue[i] = 0;
      path_r[i] = 0; path_out[i] = 0;
    end
    // router and port the source core is attached to
    for (int unsigned i = 0; i < nrouters; i++)
      for (int unsigned p = 0; p < 3; p++) begin
        dsc = topo[(3*i+p)*8 +: 8];
        if (dsc[7] && int'(dsc[6:0]) == int'(src)) begin rs = i; entry_port[i] = p; end
      end
    seen[rs] = 1;
    queue[0] = rs;
    head = 0;
    tail = 1;
    while (head < tail && !found) begin
      r = queue[head];
      head++;
      for (int unsigned p = 0; p < 3; p++) begin
        if (p != entry_port[r] && !found) begin
          dsc = topo[(3*r+p)*8 +: 8];
          if (dsc[7]) begin
            if (int'(dsc[6:0]) == int'(dst)) begin found = 1; last_r = r; last_out = p; end
          end else if (!seen[dsc[6:2]]) begin
            seen[dsc[6:2]]       = 1;
            entry_port[dsc[6:2]] = int'(dsc[1:0]);
            parent[dsc[6:2]]     = r;
            parent_out[dsc[6:2]] = p;
            queue[tail]          = int'(dsc[6:2]);
            tail++;
          end
        end
      end
    end
    if (found) begin
      // trace back from the destination router
      r = last_r;
      path_r[0]   = r;
      path_out[0] = last_out;
      hops = 1;
      while (r != rs && hops < MAX_ROUTERS) begin
        path_out[hops] = parent_out[r];
        r              = parent[r];
        path_r[hops]   = r;
        hops++;
      end
      for (int unsigned h = 0; h < hops && h < ROUTE_W_DEF; h++)
        route[ROUTE_W_DEF-1-h] = route_bit(entry_port[path_r[hops-1-h]], path_out[hops-1-h]);
    end
  endfunction

  function automatic int unsigned tree_hops(input topo_t topo, input int unsigned nrouters,
                                            input int unsigned src, input int unsigned dst);
    int unsigned h;
    logic [ROUTE_W_DEF-1:0] rt;
    tree_path(topo, nrouters, src, dst, h, rt);
    return h;
  endfunction

  function automatic logic [ROUTE_W_DEF-1:0] tree_route(input topo_t topo, input int unsigned nrouters,
                                                         input int unsigned src, input int unsigned dst);
    int unsigned h;
    logic [ROUTE_W_DEF-1:0] rt;
    tree_path(topo, nrouters, src, dst, h, rt);
    return rt;
  endfunction

  // Shorthands for the chain-shaped tree.
  function automatic int unsigned chain_hops(input int unsigned ncores,
                                             input int unsigned src,
                                             input int unsigned dst);
    return tree_hops(chain_topology(ncores), ncores - 2, src, dst);
  endfunction

  function automatic logic [ROUTE_W_DEF-1:0] chain_route(input int unsigned ncores,
                                                          input int unsigned src,
                                                          input int unsigned dst);
    return tree_route(chain_topology(ncores), ncores - 2, src, dst);
  endfunction

endpackage
