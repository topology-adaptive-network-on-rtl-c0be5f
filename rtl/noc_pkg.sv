// noc_pkg: constants, types and topology helpers shared by the network-on-chip modules.
//
// A link between two network nodes carries a request line, an acknowledge line, a
// flit and a last-flit marker. The sender raises req with the header flit on data and
// holds req until the last flit has been transferred; a flit moves in every cycle in
// which req and ack are both high, and `last` marks the final one. The header flit holds
// the destination IP address in its low bits. The request/acknowledge handshake, one flit
// per cycle once acknowledged, and packet-level flow control follow the router
// description; the separate last-flit wire and the header layout are this design's own.
//
// A network topology is a two-dimensional table: entry [r][o] names what output o of
// router r drives (another router's input port, an IP, or nothing). Together with the
// per-router port counts and the table of where each IP enters the network it describes
// any regular or irregular network. The mesh_* functions build these tables for a W x H
// mesh with this port order at every router: 0 = local IP, then the north, east, south
// and west neighbours that exist (edge routers have fewer ports). The torus_*, cube_*,
// tree_* and xbar_* functions build the other topologies the networks are compared in
// (W x H torus, hypercube, balanced binary tree, one crossbar router), each with one IP
// per router at port 0, except the crossbar, where IP k uses port k.
package noc_pkg;

  // Default sizes. 16-bit links as in the bandwidth comparison, 1024-flit output queues
  // (one 2 kbyte block RAM at 16 bits), and a maximum packet of one header flit plus a
  // 544-byte payload (272 flits of 16 bits).
  localparam int unsigned DEF_DATA_W        = 16;
  localparam int unsigned DEF_QUEUE_DEPTH   = 1024;
  localparam int unsigned DEF_MAX_PKT_FLITS = 273;

  // Largest network the topology tables can describe.
  localparam int unsigned MAX_R     = 64;   // routers (and IPs)
  localparam int unsigned MAX_PORTS = 16;   // inputs or outputs per router

  // Kinds of destination of a router output in a topology table.
  typedef enum logic [1:0] {
    DST_NONE   = 2'd0,  // output left unconnected
    DST_ROUTER = 2'd1,  // feeds an input port of another router
    DST_IP     = 2'd2   // feeds an IP (its data NIC)
  } dst_kind_e;

  typedef struct packed {
    dst_kind_e  kind;
    logic [7:0] idx;    // router or IP number
    logic [3:0] port;   // input port of the router (DST_ROUTER only)
  } conn_t;

  typedef conn_t [MAX_R-1:0][MAX_PORTS-1:0] topo_t;   // [router][output]
  typedef logic  [MAX_R-1:0][7:0]           byte_arr_t;

  typedef enum int {DIR_N = 0, DIR_E = 1, DIR_S = 2, DIR_W = 3} dir_e;

  // Is there a neighbour in direction d of mesh router (x, y)?
  function automatic bit mesh_has(int w, int h, int x, int y, int d);
    case (d)
      DIR_N:   return y > 0;
      DIR_E:   return x < w - 1;
      DIR_S:   return y < h - 1;
      default: return x > 0;
    endcase
  endfunction

  // Port number of direction d at mesh router (x, y); -1 if that neighbour is missing.
  function automatic int mesh_dir_port(int w, int h, int x, int y, int d);
    int p;
    if (!mesh_has(w, h, x, y, d)) return -1;
    p = 1;
    for (int k = 0; k < d; k++) if (mesh_has(w, h, x, y, k)) p++;
    return p;
  endfunction

  // Number of ports (inputs = outputs) of every router of a W x H mesh.
  function automatic byte_arr_t mesh_nports(int w, int h);
    byte_arr_t n = '0;
    for (int r = 0; r < w * h; r++) begin
      int c = 1;
      for (int d = 0; d < 4; d++) if (mesh_has(w, h, r % w, r / w, d)) c++;
      n[r] = 8'(c);
    end
    return n;
  endfunction

  // A table with every output unconnected (cleared entry by entry).
  function automatic topo_t topo_empty();
    topo_t t;
    for (int r = 0; r < MAX_R; r++)
      for (int p = 0; p < MAX_PORTS; p++) t[r][p] = '0;
    return t;
  endfunction

  // Connection table of a W x H mesh, routers numbered row by row from the top left.
  function automatic topo_t mesh_topo(int w, int h);
    topo_t t = topo_empty();
    for (int r = 0; r < w * h; r++) begin
      int x = r % w, y = r / w;
      t[r][0].kind = DST_IP;
      t[r][0].idx  = 8'(r);
      for (int d = 0; d < 4; d++) begin
        if (mesh_has(w, h, x, y, d)) begin
          int nx = x + ((d == DIR_E) ? 1 : (d == DIR_W) ? -1 : 0);
          int ny = y + ((d == DIR_S) ? 1 : (d == DIR_N) ? -1 : 0);
          int p  = mesh_dir_port(w, h, x, y, d);
          t[r][p].kind = DST_ROUTER;
          t[r][p].idx  = 8'(ny * w + nx);
          t[r][p].port = 4'(mesh_dir_port(w, h, nx, ny, (d + 2) % 4));
        end
      end
    end
    return t;
  endfunction

  // Router of every IP in a mesh (IP k at router k) and its input port there (0).
  function automatic byte_arr_t mesh_ip_router(int w, int h);
    byte_arr_t a = '0;
    for (int k = 0; k < w * h; k++) a[k] = 8'(k);
    return a;
  endfunction

  // Connection table of a W x H torus: every router has IP, N, E, S, W at ports 0..4.
  function automatic topo_t torus_topo(int w, int h);
    topo_t t = topo_empty();
    for (int r = 0; r < w * h; r++) begin
      int x = r % w, y = r / w;
      t[r][0].kind = DST_IP;
      t[r][0].idx  = 8'(r);
      for (int d = 0; d < 4; d++) begin
        int nx = (x + ((d == DIR_E) ? 1 : (d == DIR_W) ? w - 1 : 0)) % w;
        int ny = (y + ((d == DIR_S) ? 1 : (d == DIR_N) ? h - 1 : 0)) % h;
        t[r][1 + d].kind = DST_ROUTER;
        t[r][1 + d].idx  = 8'(ny * w + nx);
        t[r][1 + d].port = 4'(1 + (d + 2) % 4);
      end
    end
    return t;
  endfunction

  // Connection table of a hypercube of 2**dim routers: port 1 + k leads across
  // dimension k, to the same port of the neighbour.
  function automatic topo_t cube_topo(int dim);
    topo_t t = topo_empty();
    for (int r = 0; r < (1 << dim); r++) begin
      t[r][0].kind = DST_IP;
      t[r][0].idx  = 8'(r);
      for (int k = 0; k < dim; k++) begin
        t[r][1 + k].kind = DST_ROUTER;
        t[r][1 + k].idx  = 8'(r ^ (1 << k));
        t[r][1 + k].port = 4'(1 + k);
      end
    end
    return t;
  endfunction

  // Balanced binary tree of n routers, router r the parent of 2r+1 and 2r+2.
  // Ports: 0 = IP, then the parent (not at the root), then the children that exist.
  function automatic int tree_port(int n, int r, int nb);
    int p = 1;
    if (r > 0) begin
      if (nb == (r - 1) / 2) return p;
      p++;
    end
    if (2 * r + 1 < n) begin
      if (nb == 2 * r + 1) return p;
      p++;
    end
    if (2 * r + 2 < n && nb == 2 * r + 2) return p;
    return -1;
  endfunction
  function automatic byte_arr_t tree_nports(int n);
    byte_arr_t a = '0;
    for (int r = 0; r < n; r++)
      a[r] = 8'(1 + (r > 0) + (2 * r + 1 < n) + (2 * r + 2 < n));
    return a;
  endfunction
  function automatic topo_t tree_topo(int n);
    topo_t t = topo_empty();
    for (int r = 0; r < n; r++) begin
      int nbs [3] = '{(r - 1) / 2, 2 * r + 1, 2 * r + 2};
      t[r][0].kind = DST_IP;
      t[r][0].idx  = 8'(r);
      for (int k = 0; k < 3; k++) begin
        int nb = nbs[k];
        if ((k == 0 && r > 0) || (k > 0 && nb < n)) begin
          t[r][tree_port(n, r, nb)].kind = DST_ROUTER;
          t[r][tree_port(n, r, nb)].idx  = 8'(nb);
          t[r][tree_port(n, r, nb)].port = 4'(tree_port(n, nb, r));
        end
      end
    end
    return t;
  endfunction

  // A single router with n inputs and n outputs; IP k uses input and output port k.
  function automatic topo_t xbar_topo(int n);
    topo_t t = topo_empty();
    for (int k = 0; k < n; k++) begin
      t[0][k].kind = DST_IP;
      t[0][k].idx  = 8'(k);
    end
    return t;
  endfunction

  // The same value in the first n entries of a per-router or per-IP array.
  function automatic byte_arr_t fill_arr(int n, int v);
    byte_arr_t a = '0;
    for (int k = 0; k < n; k++) a[k] = 8'(v);
    return a;
  endfunction

  // Identity map: entry k holds k (IP k at router k, or IP k at port k).
  function automatic byte_arr_t ident_arr(int n);
    byte_arr_t a = '0;
    for (int k = 0; k < n; k++) a[k] = 8'(k);
    return a;
  endfunction

endpackage
