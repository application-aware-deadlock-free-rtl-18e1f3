// bsor_router: five-port virtual-channel wormhole router with table-based
// (programmable) routing and static virtual-channel allocation.
//
// Datapath: per input port, NUM_VCS flit buffers (flit_fifo); a crossbar to
// five output links. Control: routing, VC allocation, switch allocation and
// credit-based flow control. The datapath and allocators are those of a
// conventional VC router; only the routing step differs.
//
// Routing (RC) is done when a head flit arrives, before it is buffered:
//  * ROUTE_MODE = ROUTE_NODE_TABLE (main mode): the flit's index selects an
//    entry of the node routing table, giving the output port, the flow's
//    index at the next node (written into the flit) and the statically
//    allocated VC on the output link.
//  * ROUTE_MODE = ROUTE_SOURCE: the head flit's payload is the route, three
//    bits per hop; the router takes the low three bits as the output port
//    and shifts the route right. The packet keeps its VC.
// The routing result is stored beside the flit in its buffer.
//
// VC allocation (vc_allocator): a head flit at a buffer front claims its
// output VC if no other packet holds it (STATIC_VC = 1), or any free VC of
// its output port (STATIC_VC = 0). Switch allocation (switch_allocator)
// follows in the same cycle for flits that hold an output VC and a credit.
// A granted flit crosses the crossbar combinationally and is written into
// the downstream buffer at the next clock edge, so a flit advances one hop
// per cycle when uncontended (head and body alike). An output VC is released
// when the tail flit leaves.
//
// Flow control: one credit counter per output VC, initialised to BUF_DEPTH
// (the depth of every downstream buffer, including the resource's). The
// router returns a credit on in_credit[p][v] in the cycle it pops buffer
// (p, v); a credit received on out_credit increments the counter at the next
// edge.
//
// Configuration: cfg_we/cfg_addr/cfg_entry write one routing-table entry per
// cycle. The table is meant to be written while no packet is in flight.
//
// The allocation organisation, the credit protocol, the routing at arrival
// and the source-route encoding are this design's choices; the buffer depth,
// table size and single-cycle hop follow the design description.
module bsor_router
  import bsor_pkg::*;
#(
  parameter int          NUM_VCS     = 2,
  parameter int          BUF_DEPTH   = 16,
  parameter int          TABLE_DEPTH = 256,
  parameter bit          STATIC_VC   = 1'b1,
  parameter route_mode_e ROUTE_MODE  = ROUTE_NODE_TABLE
) (
  input  logic               clk,
  input  logic               rst_n,
  // routing table programming
  input  logic               cfg_we,
  input  logic [IDX_W-1:0]   cfg_addr,
  input  route_entry_t       cfg_entry,
  // input links
  input  flit_t              in_flit    [NUM_PORTS],
  input  logic [NUM_PORTS-1:0] in_valid,
  output logic [NUM_VCS-1:0] in_credit  [NUM_PORTS],
  // output links
  output flit_t              out_flit   [NUM_PORTS],
  output logic [NUM_PORTS-1:0] out_valid,
  input  logic [NUM_VCS-1:0] out_credit [NUM_PORTS]
);
  localparam int CNT_W = $clog2(BUF_DEPTH + 1);
  localparam int NIN   = NUM_PORTS * NUM_VCS;

  typedef struct packed {
    port_e            route_port;  // output port (meaningful for head flits)
    logic [VC_W-1:0]  route_vc;    // requested output VC (head flits)
    flit_t            flit;
  } buf_entry_t;

  // ------------------------------------------------------------------ RC
  route_entry_t tbl_entry [NUM_PORTS];
  logic [IDX_W-1:0] tbl_idx [NUM_PORTS];
  buf_entry_t   arr_entry [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_idx
    assign tbl_idx[p] = in_flit[p].idx;
  end

  if (ROUTE_MODE == ROUTE_NODE_TABLE) begin : g_table
    node_route_table #(.DEPTH(TABLE_DEPTH), .NUM_RD(NUM_PORTS)) u_table (
      .clk, .rst_n,
      .cfg_we, .cfg_addr, .cfg_entry,
      .rd_idx  (tbl_idx),
      .rd_entry(tbl_entry)
    );
  end else begin : g_no_table
    for (genvar p = 0; p < NUM_PORTS; p++) begin : g_p
      assign tbl_entry[p] = '{PORT_LOCAL, '0, '0};
    end
  end

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      arr_entry[p].flit       = in_flit[p];
      arr_entry[p].route_port = PORT_LOCAL;
      arr_entry[p].route_vc   = in_flit[p].vc;
      if (is_head(in_flit[p].ftype)) begin
        if (ROUTE_MODE == ROUTE_NODE_TABLE) begin
          arr_entry[p].route_port = tbl_entry[p].out_port;
          arr_entry[p].route_vc   = tbl_entry[p].next_vc;
          arr_entry[p].flit.idx   = tbl_entry[p].next_idx;
        end else begin
          arr_entry[p].route_port = port_e'(in_flit[p].data[HOP_W-1:0]);
          arr_entry[p].flit.data  = in_flit[p].data >> HOP_W;
        end
      end
    end
  end

  // ------------------------------------------------------------- buffers
  buf_entry_t         front     [NUM_PORTS][NUM_VCS];
  logic [NUM_VCS-1:0] buf_empty [NUM_PORTS];
  logic [NUM_VCS-1:0] pop       [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    for (genvar v = 0; v < NUM_VCS; v++) begin : g_vc
      logic full_unused;
      logic [$clog2(BUF_DEPTH+1)-1:0] count_unused;
      flit_fifo #(.WIDTH($bits(buf_entry_t)), .DEPTH(BUF_DEPTH)) u_buf (
        .clk, .rst_n,
        .wr_en  (in_valid[p] && (int'(in_flit[p].vc) == v)),
        .wr_data(arr_entry[p]),
        .rd_en  (pop[p][v]),
        .rd_data(front[p][v]),
        .empty  (buf_empty[p][v]),
        .full   (full_unused),
        .count  (count_unused)
      );
    end
  end

  // ----------------------------------------------------- per-input-VC state
  logic [NUM_VCS-1:0] active_q  [NUM_PORTS];   // packet holds an output VC
  port_e              oport_q   [NUM_PORTS][NUM_VCS];
  logic [VC_W-1:0]    ovc_q     [NUM_PORTS][NUM_VCS];

  // output VC state and credits
  logic [NUM_VCS-1:0] vc_busy_q [NUM_PORTS];
  logic [CNT_W-1:0]   credit_q  [NUM_PORTS][NUM_VCS];

  // ------------------------------------------------------------------ VA
  logic [NIN-1:0]  va_req, va_gnt;
  port_e           va_port [NIN];
  logic [VC_W-1:0] va_vc   [NIN];
  logic [VC_W-1:0] va_gvc  [NIN];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int v = 0; v < NUM_VCS; v++) begin
        va_req [p*NUM_VCS+v] = !buf_empty[p][v] && !active_q[p][v] &&
                               is_head(front[p][v].flit.ftype);
        va_port[p*NUM_VCS+v] = front[p][v].route_port;
        va_vc  [p*NUM_VCS+v] = front[p][v].route_vc;
      end
    end
  end

  vc_allocator #(.NUM_VCS(NUM_VCS), .STATIC_VC(STATIC_VC)) u_va (
    .clk, .rst_n,
    .req     (va_req),
    .req_port(va_port),
    .req_vc  (va_vc),
    .vc_busy (vc_busy_q),
    .gnt     (va_gnt),
    .gnt_vc  (va_gvc)
  );

  // ------------------------------------------------------------------ SA
  logic [NUM_VCS-1:0] sa_req  [NUM_PORTS];
  port_e              cur_port [NUM_PORTS][NUM_VCS];
  logic [VC_W-1:0]    cur_vc   [NUM_PORTS][NUM_VCS];
  logic [NUM_VCS-1:0] sa_gnt  [NUM_PORTS];
  logic [NUM_PORTS-1:0] xb_en;
  logic [PORT_W-1:0]  xb_sel  [NUM_PORTS];
  flit_t              xb_in   [NUM_PORTS];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int v = 0; v < NUM_VCS; v++) begin
        logic has_vc;
        has_vc         = active_q[p][v] || va_gnt[p*NUM_VCS+v];
        cur_port[p][v] = active_q[p][v] ? oport_q[p][v] : front[p][v].route_port;
        cur_vc[p][v]   = active_q[p][v] ? ovc_q[p][v]   : va_gvc[p*NUM_VCS+v];
        sa_req[p][v]   = !buf_empty[p][v] && has_vc &&
                         (int'(cur_vc[p][v]) < NUM_VCS) &&
                         (credit_q[cur_port[p][v]][cur_vc[p][v][$clog2(NUM_VCS > 1 ? NUM_VCS : 2)-1:0]] != '0);
      end
    end
  end

  switch_allocator #(.NUM_VCS(NUM_VCS)) u_sa (
    .clk, .rst_n,
    .req      (sa_req),
    .req_port (cur_port),
    .in_gnt   (sa_gnt),
    .out_valid(xb_en),
    .out_sel  (xb_sel)
  );

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      pop[p]       = sa_gnt[p];
      in_credit[p] = sa_gnt[p];
      xb_in[p]     = '0;
      for (int v = 0; v < NUM_VCS; v++) begin
        if (sa_gnt[p][v]) begin
          xb_in[p]    = front[p][v].flit;
          xb_in[p].vc = cur_vc[p][v];
        end
      end
    end
  end

  // ------------------------------------------------------------ crossbar
  crossbar #(.NUM_IN(NUM_PORTS), .NUM_OUT(NUM_PORTS)) u_xbar (
    .in_flit  (xb_in),
    .en       (xb_en),
    .sel      (xb_sel),
    .out_flit (out_flit),
    .out_valid(out_valid)
  );

  // ------------------------------------------------------- state updates
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        active_q[p]  <= '0;
        vc_busy_q[p] <= '0;
        for (int v = 0; v < NUM_VCS; v++) begin
          oport_q[p][v]  <= PORT_LOCAL;
          ovc_q[p][v]    <= '0;
          credit_q[p][v] <= CNT_W'(BUF_DEPTH);
        end
      end
    end else begin
      // input VC: hold the output VC from VA until the tail leaves
      for (int p = 0; p < NUM_PORTS; p++) begin
        for (int v = 0; v < NUM_VCS; v++) begin
          if (va_gnt[p*NUM_VCS+v]) begin
            oport_q[p][v] <= front[p][v].route_port;
            ovc_q[p][v]   <= va_gvc[p*NUM_VCS+v];
          end
          if (sa_gnt[p][v] && is_tail(front[p][v].flit.ftype))
            active_q[p][v] <= 1'b0;
          else if (va_gnt[p*NUM_VCS+v])
            active_q[p][v] <= 1'b1;
        end
      end
      // output VC: busy from VA grant to tail departure; credits
      for (int o = 0; o < NUM_PORTS; o++) begin
        for (int v = 0; v < NUM_VCS; v++) begin
          logic set_busy, clr_busy, sent;
          set_busy = 1'b0;
          for (int r = 0; r < NIN; r++)
            if (va_gnt[r] && (int'(va_port[r]) == o) && (int'(va_gvc[r]) == v))
              set_busy = 1'b1;
          sent     = out_valid[o] && (int'(out_flit[o].vc) == v);
          clr_busy = sent && is_tail(out_flit[o].ftype);
          vc_busy_q[o][v] <= (vc_busy_q[o][v] | set_busy) & ~clr_busy;
          credit_q[o][v]  <= credit_q[o][v] - CNT_W'(sent) + CNT_W'(out_credit[o][v]);
        end
      end
    end
  end

  // --------------------------------------------------------- assertions
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    for (genvar v = 0; v < NUM_VCS; v++) begin : g_vc
      a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
        int'(credit_q[o][v]) <= BUF_DEPTH)
        else $error("bsor_router: more credits than buffer slots on port %0d vc %0d", o, v);
    end
  end
  for (genvar r = 0; r < NIN; r++) begin : g_va_chk
    a_vc_in_range: assert property (@(posedge clk) disable iff (!rst_n)
      va_req[r] |-> (int'(va_vc[r]) < NUM_VCS) || !STATIC_VC)
      else $error("bsor_router: routing table names VC %0d, router has %0d", va_vc[r], NUM_VCS);
  end
endmodule
