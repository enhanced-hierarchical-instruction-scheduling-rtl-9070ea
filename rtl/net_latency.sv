// net_latency - operand network latency between two PE locations.
//
// Purely combinational. Given the locations of a sending and a receiving PE
// it returns the number of cycles an operand needs on the hierarchical
// operand network:
//   same PE            0  (bypass network inside the PE)
//   same pod           1
//   same half-domain   2  (two adjacent pods)
//   same domain        4
//   same cluster       7
//   other cluster      7 + hop count
// The pod, half-domain, domain, cluster and inter-cluster figures are the
// architecture's published latencies. Zero for the in-PE bypass and the hop
// count as the Manhattan distance between the two clusters' (x, y) grid
// positions are this design's choices; the result saturates at 2^LAT_W - 1.
//
// Ports: a, b - the two locations (order does not matter); lat - cycles.
module net_latency
  import ehis_pkg::*;
(
  input  pe_loc_t          a,
  input  pe_loc_t          b,
  output logic [LAT_W-1:0] lat
);

  logic [CL_COORD_W-1:0] dx, dy;
  logic [CL_COORD_W:0]   hops;
  logic [LAT_W:0]        far;

  always_comb begin
    dx   = (a.cx > b.cx) ? (a.cx - b.cx) : (b.cx - a.cx);
    dy   = (a.cy > b.cy) ? (a.cy - b.cy) : (b.cy - a.cy);
    hops = {1'b0, dx} + {1'b0, dy};
    far  = (LAT_W+1)'(LAT_CLUSTER) + (LAT_W+1)'(hops);

    if (a.cx != b.cx || a.cy != b.cy)
      lat = far[LAT_W] ? '1 : far[LAT_W-1:0];
    else if (a.domain != b.domain)
      lat = LAT_W'(LAT_CLUSTER);
    else if (a.pe[2] != b.pe[2])
      lat = LAT_W'(LAT_DOMAIN);
    else if (a.pe[1] != b.pe[1])
      lat = LAT_W'(LAT_HALF_DOMAIN);
    else if (a.pe[0] != b.pe[0])
      lat = LAT_W'(LAT_POD);
    else
      lat = LAT_W'(LAT_SAME_PE);
  end

endmodule
