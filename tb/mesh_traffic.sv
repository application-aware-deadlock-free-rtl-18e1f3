// mesh_traffic: traffic generator, route programmer and checker for the
// table-routed mesh, shared by the mesh testbenches.
//
// For each workload in turn it
//  1. builds the workload's flows (transpose, bit-complement, shuffle, or the
//     802.11a/g transmitter task graph with its per-flow data rates),
//  2. selects a route and a VC per hop for every flow offline, greedily
//     minimising the largest channel load among four deadlock-free route
//     classes: dimension-order XY on VC0; west-first minimal on VC1;
//     west-first non-minimal (a two-hop detour) on VC1; and a first XY hop on
//     VC0 followed by west-first on VC1. VC0 alone and VC1 alone each have an
//     acyclic channel dependence graph and dependences only go from VC0 to
//     VC1, so the routes cannot deadlock. Ties go to the shorter route,
//     then to the one whose VCs carry fewer flows already;
//  3. writes the node routing tables through the configuration port
//     (reprogramming them between workloads),
//  4. sends lone packets and checks the head flit takes exactly one cycle
//     per hop plus one,
//  5. injects packets from every source at random times (each flow on its
//     own local VC), respecting local credits, while the destinations consume at random
//     rates with a phase of no consumption, and checks that every packet
//     reaches its destination, in order per flow, on the flow's last VC,
//     with its flits contiguous on that VC.
// With SRC_MODE set it drives a mesh built for source routing instead: the
// routes go into the source nodes' source routing tables (classes without a
// VC change), each packet starts with a routing flit holding the route read
// from the table (its index field carries a flow tag for checking, which
// the routers ignore), and the checks use the data flits that follow.
// It counts how often each mechanism happened (non-minimal routes, VC
// changes along a route, injection stalls for lack of credit, full ejection
// buffers, packets delayed by contention, table reprogramming) and counts a
// failure for any that never happened. Raises `done` at the end; the
// testbench top reports the result.
module mesh_traffic
  import bsor_pkg::*;
#(
  parameter int MX        = 4,
  parameter int MY        = 4,
  parameter int NV        = 2,
  parameter int BD        = 16,
  parameter int PKTS      = 20,     // packets per flow in each workload
  parameter int NWL       = 3,      // workloads run: first NWL of the list below
  parameter bit SRC_MODE  = 1'b0,   // drive a mesh built for source routing
  parameter int N         = MX * MY,
  parameter int NODE_W    = (N > 1) ? $clog2(N) : 1
) (
  input  logic               clk,
  output logic               rst_n,
  output logic               cfg_we,
  output logic [NODE_W-1:0]  cfg_node,
  output logic [IDX_W-1:0]   cfg_addr,
  output route_entry_t       cfg_entry,
  output logic               src_cfg_we,
  output logic [NODE_W-1:0]  src_cfg_dst,
  output src_route_t         src_cfg_route,
  output logic [NODE_W-1:0]  pe_route_dst  [N],
  input  src_route_t         pe_route      [N],
  output flit_t              pe_in_flit    [N],
  output logic [N-1:0]       pe_in_valid,
  input  logic [NV-1:0]      pe_in_credit  [N],
  input  flit_t              pe_out_flit   [N],
  input  logic [N-1:0]       pe_out_valid,
  output logic [NV-1:0]      pe_out_credit [N],
  // result, read by the testbench top
  output logic               done,
  output int                 n_checks,
  output int                 n_failures,
  output int                 n_delivered
);
  localparam int MAXF = 512;
  localparam int NLINK = N * 4;
  localparam int MAXH = 2 * (MX + MY) + 4;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s @%0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------ flows
  int nflows;
  int f_src [MAXF], f_dst [MAXF], f_dem [MAXF], f_cls [MAXF], f_hops [MAXF];
  int f_idx0 [MAXF], f_lastvc [MAXF], f_minh [MAXF];
  int f_rate [MAXF];
  int link_load [NLINK];
  int vc_flows [NLINK][2];   // flows already assigned to each VC of a link
  int tbl_next [N];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int nx(int n); return n % MX; endfunction
  function automatic int ny(int n); return n / MX; endfunction
  function automatic int step(int n, int p);
    case (p)
      1: return n + MX;  // north
      2: return n + 1;   // east
      3: return n - MX;  // south
      4: return n - 1;   // west
      default: return n;
    endcase
  endfunction
  function automatic int iabs(int a); return (a < 0) ? -a : a; endfunction

  // route of class cls from s to d: ports and VC per router-to-router hop
  function automatic bit build_route(int s, int d, int cls, ref int ports[$], ref int vcs[$]);
    int dx, dy, xs, ys;
    ports.delete(); vcs.delete();
    xs = nx(s); ys = ny(s);
    dx = nx(d) - xs; dy = ny(d) - ys;
    case (cls)
      0: begin  // XY, VC0
        repeat (iabs(dx)) begin ports.push_back(dx > 0 ? 2 : 4); vcs.push_back(0); end
        repeat (iabs(dy)) begin ports.push_back(dy > 0 ? 1 : 3); vcs.push_back(0); end
      end
      1: begin  // west-first minimal, VC1
        if (NV < 2) return 0;
        if (dx < 0) begin
          repeat (-dx)      begin ports.push_back(4); vcs.push_back(1); end
          repeat (iabs(dy)) begin ports.push_back(dy > 0 ? 1 : 3); vcs.push_back(1); end
        end else begin
          repeat (iabs(dy)) begin ports.push_back(dy > 0 ? 1 : 3); vcs.push_back(1); end
          repeat (dx)       begin ports.push_back(2); vcs.push_back(1); end
        end
      end
      2: begin  // west-first non-minimal detour, VC1
        if (NV < 2 || dx <= 0) return 0;
        if (dy < 0 || (dy == 0 && ys + 1 < MY)) begin
          if (ys + 1 >= MY) return 0;
          ports.push_back(1); vcs.push_back(1);
          repeat (dx)         begin ports.push_back(2); vcs.push_back(1); end
          repeat (-dy + 1)    begin ports.push_back(3); vcs.push_back(1); end
        end else begin
          if (ys - 1 < 0) return 0;
          ports.push_back(3); vcs.push_back(1);
          repeat (dx)         begin ports.push_back(2); vcs.push_back(1); end
          repeat (dy + 1)     begin ports.push_back(1); vcs.push_back(1); end
        end
      end
      3: begin  // first XY hop on VC0, then west-first minimal on VC1
        int m, ddx, ddy;
        if (NV < 2 || dx == 0) return 0;
        ports.push_back(dx > 0 ? 2 : 4); vcs.push_back(0);
        m = step(s, dx > 0 ? 2 : 4);
        ddx = nx(d) - nx(m); ddy = ny(d) - ny(m);
        if (ddx < 0) begin
          repeat (-ddx)      begin ports.push_back(4); vcs.push_back(1); end
          repeat (iabs(ddy)) begin ports.push_back(ddy > 0 ? 1 : 3); vcs.push_back(1); end
        end else begin
          repeat (iabs(ddy)) begin ports.push_back(ddy > 0 ? 1 : 3); vcs.push_back(1); end
          repeat (ddx)       begin ports.push_back(2); vcs.push_back(1); end
        end
      end
      default: return 0;
    endcase
    return 1;
  endfunction

  // configuration writes queued by route selection
  int cw_node [$], cw_addr [$];
  route_entry_t cw_entry [$];
  src_route_t  cw_src [$];
  src_route_t  f_route [MAXF];

  // greedy minimum-maximum-channel-load selection and table allocation
  task automatic select_routes();
    for (int l = 0; l < NLINK; l++) begin link_load[l] = 0; vc_flows[l][0] = 0; vc_flows[l][1] = 0; end
    for (int n = 0; n < N; n++) tbl_next[n] = 0;
    for (int f = 0; f < nflows; f++) begin
      int best_cls, best_cost, best_len, best_share;
      int ports[$], vcs[$];
      int node, idx_here;
      best_cls = -1; best_cost = 0; best_len = 0; best_share = 0;
      for (int c = 0; c < (SRC_MODE ? 3 : 4); c++) begin
        if (build_route(f_src[f], f_dst[f], c, ports, vcs)) begin
          int cost, share, n2;
          cost = 0; share = 0; n2 = f_src[f];
          foreach (ports[h]) begin
            int l;
            l = n2 * 4 + ports[h] - 1;
            if (link_load[l] + f_dem[f] > cost) cost = link_load[l] + f_dem[f];
            share += vc_flows[l][vcs[h]];
            n2 = step(n2, ports[h]);
          end
          // lowest channel load, then shortest, then fewest flows sharing its VCs
          if (best_cls < 0 || cost < best_cost ||
              (cost == best_cost && ports.size() < best_len) ||
              (cost == best_cost && ports.size() == best_len && share < best_share)) begin
            best_cls = c; best_cost = cost; best_len = ports.size(); best_share = share;
          end
        end
      end
      void'(build_route(f_src[f], f_dst[f], best_cls, ports, vcs));
      f_cls[f]  = best_cls;
      f_hops[f] = ports.size();
      f_minh[f] = iabs(nx(f_dst[f]) - nx(f_src[f])) + iabs(ny(f_dst[f]) - ny(f_src[f]));
      if (SRC_MODE) begin
        // source table entry of the source node for this destination
        src_route_t sr;
        for (int g = 0; g < f; g++)
          check(!(f_src[g] == f_src[f] && f_dst[g] == f_dst[f]), "one flow per source-destination pair");
        check(ports.size() <= DATA_W / HOP_W, "route fits the routing flit");
        sr.route = '0;
        foreach (ports[h]) sr.route[h * HOP_W +: HOP_W] = HOP_W'(ports[h]);
        sr.vc = VC_W'(vcs.size() > 0 ? vcs[0] : 0);
        f_route[f]  = sr;
        f_lastvc[f] = int'(sr.vc);
        f_idx0[f]   = 0;
        node = f_src[f];
        foreach (ports[h]) begin
          link_load[node * 4 + ports[h] - 1] += f_dem[f];
          vc_flows[node * 4 + ports[h] - 1][vcs[h]]++;
          node = step(node, ports[h]);
        end
        cw_node.push_back(f_src[f]); cw_addr.push_back(f_dst[f]); cw_src.push_back(sr);
        cw_entry.push_back('0);
        continue;
      end
      // table entries: one per node on the path, the last one ejects
      node = f_src[f];
      idx_here = tbl_next[node]++;
      f_idx0[f] = idx_here;
      for (int h = 0; h <= ports.size(); h++) begin
        route_entry_t e;
        if (h < ports.size()) begin
          int nxt, nidx;
          link_load[node * 4 + ports[h] - 1] += f_dem[f];
          vc_flows[node * 4 + ports[h] - 1][vcs[h]]++;
          nxt  = step(node, ports[h]);
          nidx = tbl_next[nxt]++;
          e.out_port = port_e'(ports[h]);
          e.next_idx = IDX_W'(nidx);
          e.next_vc  = VC_W'(vcs[h]);
          cw_node.push_back(node); cw_addr.push_back(idx_here); cw_entry.push_back(e);
          node = nxt; idx_here = nidx;
        end else begin
          e.out_port = PORT_LOCAL;
          e.next_idx = '0;
          e.next_vc  = VC_W'(ports.size() > 0 ? vcs[ports.size() - 1] : 0);
          f_lastvc[f] = int'(e.next_vc);
          cw_node.push_back(node); cw_addr.push_back(idx_here); cw_entry.push_back(e);
        end
      end
    end
    for (int n = 0; n < N; n++) check(tbl_next[n] <= 256, "flows through a node fit the table");
  endtask

  // ------------------------------------------------------- workloads
  int BITS;
  initial begin
    BITS = 0;
    while ((1 << BITS) < N) BITS++;
  end

  function automatic int bit_of(int v, int i); return (v >> i) & 1; endfunction

  task automatic make_workload(int wl, output string name);
    nflows = 0;
    case (wl)
      0, 1, 2: begin
        name = (wl == 0) ? "transpose" : (wl == 1) ? "bit-complement" : "shuffle";
        for (int s = 0; s < N; s++) begin
          int d;
          d = 0;
          for (int i = 0; i < BITS; i++) begin
            int b;
            if (wl == 0)      b = bit_of(s, (i + BITS / 2) % BITS);
            else if (wl == 1) b = 1 - bit_of(s, i);
            else              b = bit_of(s, (i - 1 + BITS) % BITS);
            d |= b << i;
          end
          if (d != s && d < N) begin
            f_src[nflows] = s; f_dst[nflows] = d; f_dem[nflows] = 100; f_rate[nflows] = 100;
            nflows++;
          end
        end
      end
      default: begin
        // 802.11a/g transmitter: modules M1..M15 on nodes 0..14 (row-major),
        // rates in Mbit/s x 10 as estimated for the transmitter
        int src[17] = '{4, 1, 2, 3, 13, 5, 6, 12, 13, 14, 7, 7, 7, 7, 8, 9, 10};
        int dst[17] = '{1, 2, 5, 5, 6, 6, 7, 13, 14, 15, 11, 10, 9, 8, 12, 12, 12};
        int bw [17] = '{7, 362, 362, 480, 368, 389, 370, 367, 587, 368, 180, 180, 180, 180, 90, 90, 90};
        name = "802.11a/g transmitter";
        for (int k = 0; k < 17; k++) begin
          if (src[k] - 1 < N && dst[k] - 1 < N) begin
            f_src[nflows] = src[k] - 1; f_dst[nflows] = dst[k] - 1;
            f_dem[nflows] = bw[k]; f_rate[nflows] = bw[k];
            nflows++;
          end
        end
      end
    endcase
  endtask

  // ------------------------------------------------------ sender state
  int  tx_credit [N][NV];
  int  pend_flow [N][$];     // packets waiting to be injected, per source
  int  pend_seq  [N][$];
  int  cur_flow [N], cur_seq [N], cur_fn [N], cur_len [N], cur_vc [N];
  bit  sending [N];
  src_route_t cur_route [N];   // source mode: route read when the packet starts
  int  next_seq [MAXF];
  int  inj_time [int];       // key flow*65536+seq
  int  lone_mode = 0;

  // ------------------------------------------------------ sink state
  int  occ [N][NV];
  bit  owned [N][NV];
  int  own_flow [N][NV], own_seq [N][NV], own_fn [N][NV];
  int  exp_seq [MAXF];
  int  delivered = 0, expected_total = 0;
  bit  withhold = 0;
  int  last_latency = 0;
  localparam int PLEN_MAX = 4;

  // mechanism counters
  int n_nonminimal = 0, n_vcswitch = 0, n_inj_stall = 0, n_eject_full = 0;
  int n_contended = 0, n_reprogram = 0;

  task automatic sample_and_drive();
    // returned injection credits
    for (int n = 0; n < N; n++)
      for (int v = 0; v < NV; v++) if (pe_in_credit[n][v]) tx_credit[n][v]++;
    // ejected flits
    for (int n = 0; n < N; n++) begin
      if (pe_out_valid[n]) begin
        flit_t fl;
        int v, fid, sq, fn, ln;
        fl = pe_out_flit[n];
        v = int'(fl.vc);
        fid = int'(fl.data[63:48]); sq = int'(fl.data[47:32]);
        fn = int'(fl.data[31:24]);  ln = int'(fl.data[23:16]);
        if (SRC_MODE && is_head(fl.ftype)) begin
          // the head is the routing flit: its index field carries the flow tag
          fid = int'(fl.idx); sq = (fid < nflows) ? exp_seq[fid] : 0; fn = 0;
          check(fl.data == '0, "route fully consumed at the destination");
        end
        check(v < NV, "eject VC in range");
        if (v < NV) begin
          occ[n][v]++;
          check(occ[n][v] <= BD, "ejection buffer never overflows");
          if (occ[n][v] == BD) n_eject_full++;
          if (is_head(fl.ftype)) begin
            int lat;
            check(fid < nflows && f_dst[fid] == n, "packet reaches its destination");
            if (!(fid < nflows && f_dst[fid] == n)) $display("  node %0d vc %0d fid %0d ftype %0d data %h", n, v, fid, fl.ftype, fl.data);
            check(v == f_lastvc[fid], "arrives on the flow's VC");
            check(sq == exp_seq[fid], "packets of a flow arrive in order");
            exp_seq[fid] = sq + 1;
            check(!owned[n][v], "head only on a free VC");
            owned[n][v] = 1; own_flow[n][v] = fid; own_seq[n][v] = sq; own_fn[n][v] = 0;
            lat = inj_time.exists(fid * 65536 + sq) ? cyc - inj_time[fid * 65536 + sq] : 0;
            last_latency = lat;
            check(lat >= f_hops[fid] + 1, "no faster than one cycle per hop");
            if (lat > f_hops[fid] + 1) n_contended++;
            if (f_hops[fid] > f_minh[fid]) n_nonminimal++;
            if (f_cls[fid] == 3) n_vcswitch++;
          end else begin
            check(owned[n][v] && own_flow[n][v] == fid && own_seq[n][v] == sq,
                  "body flit follows its head on the VC");
            own_fn[n][v]++;
            check(fn == own_fn[n][v], "flit order");
          end
          if (is_tail(fl.ftype)) begin
            check(own_fn[n][v] == ln - 1, "packet length");
            owned[n][v] = 0;
            delivered++;
          end
        end
      end
    end
    // consumption
    for (int n = 0; n < N; n++)
      for (int v = 0; v < NV; v++) begin
        pe_out_credit[n][v] = 1'b0;
        if (!withhold && occ[n][v] > 0 && $urandom_range(0, 3) != 0) begin
          pe_out_credit[n][v] = 1'b1;
          occ[n][v]--;
        end
      end
    // injection
    for (int n = 0; n < N; n++) begin
      pe_in_valid[n] = 1'b0;
      pe_in_flit[n]  = '0;
      if (!sending[n] && pend_flow[n].size() > 0 &&
          (!SRC_MODE || int'(pe_route_dst[n]) == f_dst[pend_flow[n][0]]) &&
          (lone_mode != 0 || $urandom_range(0, 99) < f_rate[pend_flow[n][0]] / 4)) begin
        sending[n]  = 1;
        cur_flow[n] = pend_flow[n].pop_front();
        cur_seq[n]  = pend_seq[n].pop_front();
        cur_fn[n]   = 0;
        if (SRC_MODE) begin
          // routing flit + 1..PLEN_MAX-1 data flits, on the route's VC
          check(pe_route[n] == f_route[cur_flow[n]], "source table returns the programmed route");
          cur_len[n] = $urandom_range(2, PLEN_MAX);
          cur_vc[n]  = int'(pe_route[n].vc);
          cur_route[n] = pe_route[n];
        end else begin
          cur_len[n] = $urandom_range(1, PLEN_MAX);
          cur_vc[n]  = cur_flow[n] % NV;   // one local VC per flow keeps its packets in order
        end
      end
      if (sending[n]) begin
        if (tx_credit[n][cur_vc[n]] > 0) begin
          flit_t fl;
          fl.vc   = VC_W'(cur_vc[n]);
          fl.idx  = (cur_fn[n] == 0) ? IDX_W'(f_idx0[cur_flow[n]]) : '0;
          fl.data = {16'(cur_flow[n]), 16'(cur_seq[n]), 8'(cur_fn[n]), 8'(cur_len[n]), 16'h0};
          if (cur_len[n] == 1)                fl.ftype = FLIT_HEADTAIL;
          else if (cur_fn[n] == 0)            fl.ftype = FLIT_HEAD;
          else if (cur_fn[n] == cur_len[n]-1) fl.ftype = FLIT_TAIL;
          else                                fl.ftype = FLIT_BODY;
          if (SRC_MODE && cur_fn[n] == 0) begin
            fl.data = cur_route[n].route;
            fl.idx  = IDX_W'(cur_flow[n]);
          end
          if (cur_fn[n] == 0) inj_time[cur_flow[n] * 65536 + cur_seq[n]] = cyc;
          pe_in_flit[n]  = fl;
          pe_in_valid[n] = 1'b1;
          tx_credit[n][cur_vc[n]]--;
          cur_fn[n]++;
          if (cur_fn[n] == cur_len[n]) sending[n] = 0;
        end else begin
          n_inj_stall++;
        end
      end
    end
  endtask

  // source mode: look up the route of each node's next packet a cycle ahead
  task automatic set_lookups();
    for (int n = 0; n < N; n++)
      pe_route_dst[n] = (pend_flow[n].size() > 0) ? NODE_W'(f_dst[pend_flow[n][0]]) : '0;
  endtask

  task automatic idle_cycle();
    @(negedge clk);
    sample_and_drive();
    set_lookups();
  endtask

  task automatic run_until_delivered(int limit);
    for (int k = 0; k < limit && delivered < expected_total; k++) idle_cycle();
  endtask

  assign n_checks    = checks;
  assign n_failures  = failures;
  assign n_delivered = delivered;

  initial begin
    done = 0;
    rst_n = 0; cfg_we = 0; cfg_node = '0; cfg_addr = '0; cfg_entry = '0;
    src_cfg_we = 0; src_cfg_dst = '0; src_cfg_route = '0;
    for (int n = 0; n < N; n++) pe_route_dst[n] = '0;
    pe_in_valid = '0;
    for (int n = 0; n < N; n++) begin
      pe_in_flit[n] = '0; pe_out_credit[n] = '0; sending[n] = 0;
      for (int v = 0; v < NV; v++) begin tx_credit[n][v] = BD; occ[n][v] = 0; owned[n][v] = 0; end
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int wl = 0; wl < NWL; wl++) begin
      string name;
      int nmin, start;
      make_workload(wl, name);
      select_routes();
      begin
        int mcl, nm;
        mcl = 0; nm = 0;
        for (int l = 0; l < NLINK; l++) if (link_load[l] > mcl) mcl = link_load[l];
        for (int f = 0; f < nflows; f++) if (f_hops[f] > f_minh[f]) nm++;
        $display("workload %s: %0d flows, %0d table writes, max channel load %0d, %0d non-minimal routes",
                 name, nflows, cw_node.size(), mcl, nm);
      end
      // program the tables (only while the network is empty)
      if (wl > 0) n_reprogram++;
      pe_in_valid = '0;
      for (int n = 0; n < N; n++) pe_out_credit[n] = '0;
      while (cw_node.size() > 0) begin
        cfg_we    = !SRC_MODE;
        src_cfg_we = SRC_MODE;
        cfg_node  = NODE_W'(cw_node.pop_front());
        cfg_addr  = IDX_W'(cw_addr[0]);
        src_cfg_dst = NODE_W'(cw_addr.pop_front());
        cfg_entry = cw_entry.pop_front();
        if (SRC_MODE) src_cfg_route = cw_src.pop_front();
        @(negedge clk);
      end
      cfg_we = 1'b0;
      src_cfg_we = 1'b0;
      for (int f = 0; f < nflows; f++) begin next_seq[f] = 0; exp_seq[f] = 0; end
      // lone packets: exact one-cycle-per-hop latency
      lone_mode = 1;
      for (int f = 0; f < nflows && f < 6; f++) begin
        int n_before;
        n_before = delivered;
        pend_flow[f_src[f]].push_back(f); pend_seq[f_src[f]].push_back(next_seq[f]++);
        expected_total++;
        run_until_delivered(200);
        check(delivered == n_before + 1, "lone packet delivered");
        check(last_latency == f_hops[f] + 1, "lone head flit: one cycle per hop");
      end
      lone_mode = 0;
      // loaded run
      for (int k = 0; k < PKTS; k++)
        for (int f = 0; f < nflows; f++) begin
          pend_flow[f_src[f]].push_back(f); pend_seq[f_src[f]].push_back(next_seq[f]++);
          expected_total++;
        end
      start = cyc;
      nmin = 0;
      for (int k = 0; k < 200000 && delivered < expected_total; k++) begin
        withhold = (k >= 200 && k < 400);
        idle_cycle();
      end
      withhold = 0;
      check(delivered == expected_total, "all packets delivered");
      $display("  delivered %0d packets in %0d cycles", delivered, cyc - start);
    end
    // every mechanism must have happened
    check(n_nonminimal > 0 || NV < 2, "non-minimal route used");
    check(n_vcswitch > 0 || SRC_MODE || NV < 2, "VC change along a route");
    check(n_inj_stall > 0,  "injection stalled for lack of credit");
    check(n_eject_full > 0, "ejection buffer filled (back-pressure)");
    check(n_contended > 0,  "packets delayed by contention");
    check(n_reprogram > 0 || NWL < 2, "tables reprogrammed between workloads");
    $display("mechanisms: nonminimal=%0d vcswitch=%0d inj_stall=%0d eject_full=%0d contended=%0d reprogram=%0d",
             n_nonminimal, n_vcswitch, n_inj_stall, n_eject_full, n_contended, n_reprogram);
    // leave the ports idle
    pe_in_valid = '0;
    for (int n = 0; n < N; n++) pe_out_credit[n] = '0;
    done = 1;
  end
endmodule
