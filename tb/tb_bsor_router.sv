// tb_bsor_router: self-checking test of one table-routed VC router.
//
// The routing table is programmed with 40 flows (entry i: output port i%5,
// next index (7i+3)%256, output VC (i/5)%2). Five credit-respecting senders
// inject packets of 1..5 flits with random flow indices on random VCs; five
// sinks consume flits at random rates and return credits, with a phase in
// which they return none. Checks:
//  * an isolated single-flit packet crosses the router in one cycle;
//  * every packet leaves through its table entry's port, on its table VC,
//    carrying the next index, with its flits contiguous on that VC (wormhole
//    VC ownership) and in order, and packets of one input VC in order;
//  * no output VC ever holds more flits than the downstream buffer has slots
//    (credit flow control), and the credit stall actually happened;
//  * every packet is delivered.
module tb_bsor_router;
  import bsor_pkg::*;
  localparam int NV = 2;
  localparam int BD = 16;
  localparam int NFLOWS = 40;
  localparam int PKTS_PER_PORT = 300;

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [IDX_W-1:0] cfg_addr = '0;
  route_entry_t cfg_entry = '0;
  flit_t in_flit [NUM_PORTS];
  logic [NUM_PORTS-1:0] in_valid;
  logic [NV-1:0] in_credit [NUM_PORTS];
  flit_t out_flit [NUM_PORTS];
  logic [NUM_PORTS-1:0] out_valid;
  logic [NV-1:0] out_credit [NUM_PORTS];

  bsor_router #(.NUM_VCS(NV), .BUF_DEPTH(BD), .TABLE_DEPTH(256), .STATIC_VC(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s @%0t", what, $time);
    end
  endtask

  function automatic route_entry_t entry_of(int i);
    route_entry_t e;
    e.out_port = port_e'(i % 5);
    e.next_idx = IDX_W'((7 * i + 3) % 256);
    e.next_vc  = VC_W'((i / 5) % 2);
    return e;
  endfunction

  // payload: {in_port, in_vc, seq, flit number, flow index}
  function automatic logic [DATA_W-1:0] mk_data(int p, int v, int seq, int fn, int idx);
    return DATA_W'({8'(p), 8'(v), 16'(seq), 8'(fn), 8'(idx)});
  endfunction

  // sender state
  flit_t   txq [NUM_PORTS][$];
  int      tx_credit [NUM_PORTS][NV];
  // expected packets per input VC: {seq, flow index, length}
  int      exp_seq [NUM_PORTS][NV][$];
  int      exp_idx [NUM_PORTS][NV][$];
  int      exp_len [NUM_PORTS][NV][$];
  // sink state
  int      occ [NUM_PORTS][NV];
  bit      owned [NUM_PORTS][NV];
  int      own_p [NUM_PORTS][NV], own_v [NUM_PORTS][NV], own_seq [NUM_PORTS][NV];
  int      own_fn [NUM_PORTS][NV], own_len [NUM_PORTS][NV];
  bit      withhold = 0;
  int      delivered = 0, total = 0, stall_cycles = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired, delivered %0d of %0d", delivered, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sample outputs and credits at the negative edge (all stable), then drive
  task automatic sample_and_drive();
    // credits returned by the router to the senders
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NV; v++) if (in_credit[p][v]) tx_credit[p][v]++;
    // flits leaving the router
    for (int o = 0; o < NUM_PORTS; o++) begin
      if (out_valid[o]) begin
        flit_t f;
        int v, ip, iv, sq, fn, ix;
        f = out_flit[o];
        v = int'(f.vc);
        ip = int'(f.data[47:40]); iv = int'(f.data[39:32]); sq = int'(f.data[31:16]);
        fn = int'(f.data[15:8]);  ix = int'(f.data[7:0]);
        check(v < NV, "output VC in range");
        if (v < NV) begin
          occ[o][v]++;
          check(occ[o][v] <= BD, "downstream buffer never overflows");
          if (is_head(f.ftype)) begin
            route_entry_t e;
            e = entry_of(ix);
            check(!owned[o][v], "head flit only on a free output VC");
            check(int'(e.out_port) == o, "routed to the table's port");
            check(e.next_vc == f.vc, "statically allocated VC");
            check(e.next_idx == f.idx, "next index written");
            check(fn == 0, "head is flit 0");
            check(exp_seq[ip][iv].size() > 0 && exp_seq[ip][iv][0] == sq, "packet order per input VC");
            owned[o][v] = 1; own_p[o][v] = ip; own_v[o][v] = iv; own_seq[o][v] = sq;
            own_fn[o][v] = 0;
            own_len[o][v] = (exp_len[ip][iv].size() > 0) ? exp_len[ip][iv][0] : 0;
            if (exp_seq[ip][iv].size() > 0) begin
              void'(exp_seq[ip][iv].pop_front());
              void'(exp_idx[ip][iv].pop_front());
              void'(exp_len[ip][iv].pop_front());
            end
          end else begin
            check(owned[o][v] && own_p[o][v] == ip && own_v[o][v] == iv && own_seq[o][v] == sq,
                  "body flit belongs to the packet owning the VC");
            own_fn[o][v]++;
            check(fn == own_fn[o][v], "flit order within packet");
          end
          if (is_tail(f.ftype)) begin
            check(own_fn[o][v] == own_len[o][v] - 1, "packet length");
            owned[o][v] = 0;
            delivered++;
          end
        end
      end
    end
    // sinks consume and return credits
    for (int o = 0; o < NUM_PORTS; o++)
      for (int v = 0; v < NV; v++) begin
        out_credit[o][v] = 1'b0;
        if (!withhold && occ[o][v] > 0 && $urandom_range(0, 2) != 0) begin
          out_credit[o][v] = 1'b1;
          occ[o][v]--;
        end
      end
    // senders
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_valid[p] = 1'b0;
      in_flit[p]  = '0;
      if (txq[p].size() > 0 && tx_credit[p][txq[p][0].vc] > 0 && $urandom_range(0, 3) != 0) begin
        in_flit[p]  = txq[p].pop_front();
        in_valid[p] = 1'b1;
        tx_credit[p][in_flit[p].vc]--;
      end
    end
  endtask

  task automatic queue_packet(int p, int v, int seq, int idx, int len);
    for (int fn = 0; fn < len; fn++) begin
      flit_t f;
      f.vc   = VC_W'(v);
      f.idx  = (fn == 0) ? IDX_W'(idx) : '0;
      f.data = mk_data(p, v, seq, fn, idx);
      if (len == 1)           f.ftype = FLIT_HEADTAIL;
      else if (fn == 0)       f.ftype = FLIT_HEAD;
      else if (fn == len - 1) f.ftype = FLIT_TAIL;
      else                    f.ftype = FLIT_BODY;
      txq[p].push_back(f);
    end
    exp_seq[p][v].push_back(seq);
    exp_idx[p][v].push_back(idx);
    exp_len[p][v].push_back(len);
    total++;
  endtask

  initial begin
    in_valid = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_flit[p] = '0; out_credit[p] = '0;
      for (int v = 0; v < NV; v++) begin
        tx_credit[p][v] = BD; occ[p][v] = 0; owned[p][v] = 0;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // program the table
    for (int i = 0; i < NFLOWS; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = IDX_W'(i); cfg_entry = entry_of(i);
    end
    @(negedge clk);
    cfg_we = 0;

    // one-cycle hop: a lone single-flit packet from WEST, flow 7 (to EAST)
    queue_packet(4, 1, 0, 7, 1);
    in_flit[4] = txq[4].pop_front(); in_valid[4] = 1; tx_credit[4][1]--;
    @(negedge clk);
    in_valid[4] = 0;
    check(out_valid == 5'b00100, "lone flit leaves one cycle after it arrives");
    sample_and_drive();

    // random traffic
    for (int p = 0; p < NUM_PORTS; p++)
      for (int s = 1; s <= PKTS_PER_PORT; s++)
        queue_packet(p, $urandom_range(0, NV - 1), s, $urandom_range(0, NFLOWS - 1), $urandom_range(1, 5));
    for (int cyc = 0; delivered < total && cyc < 100000; cyc++) begin
      withhold = (cyc >= 500 && cyc < 800);
      @(negedge clk);
      sample_and_drive();
      if (withhold && out_valid == '0) stall_cycles++;
    end
    check(delivered == total, "all packets delivered");
    check(stall_cycles > 100, "credit stall reached: outputs idle while downstream full");
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NV; v++) check(exp_seq[p][v].size() == 0, "no packet left behind");
    $display("delivered %0d packets, %0d fully stalled cycles", delivered, stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
