// noc_traffic: traffic generator and scoreboard for one network of VOQ
// routers (testbench helper, not synthesizable).
//
// It drives every resource port of a network and checks every flit that
// comes out, in three phases:
//   1. latency: NLAT single-flit packets, each alone in the network, between
//      random node pairs. Each must arrive after exactly 2*R + 2 clock edges,
//      R being the number of routers on its path (two cycles per router, one
//      in each network interface).
//   2. uniform: every node sends NPKT packets of 1..MAXLEN flits to random
//      destinations, injecting with probability RATE percent per cycle.
//   3. hotspot: every other node sends NHOT packets of MAXLEN flits to node
//      HOT as fast as it can, which fills queues and forces credit stalls.
// Checks: each flit leaves at the node it was sent to, in order per
// source/destination pair, with its data intact; a packet's flits arrive
// together (head first, tail last, nothing between); a head flit arrives with
// an all-zero relative address; every packet arrives.
//
// Addresses are worked out here from node coordinates, independently of the
// routing functions of the design: mesh (dx, dy), octagon (dest - src) mod 8,
// tree (climb count, list of child ports on the way down).
module noc_traffic
  import noc_pkg::*;
#(
  parameter int    N      = 9,
  parameter topo_e TOPO   = TOPO_MESH,
  parameter int    COLS   = 3,
  parameter int    NLAT   = 16,
  parameter int    NPKT   = 20,
  parameter int    NHOT   = 6,
  parameter int    HOT    = 0,
  parameter int    MAXLEN = 4,
  parameter int    RATE   = 30,
  parameter int    SEED   = 1
) (
  input  logic          clk,
  output logic          rst_n,
  output logic [N-1:0]  inj_valid,
  input  logic [N-1:0]  inj_ready,
  output flit_t         inj_flit [N],
  input  logic [N-1:0]  ej_valid,
  input  flit_t         ej_flit  [N],
  output logic          done,
  output int            checks,
  output int            failures,
  output int            src_stall_cycles
);
  // -------------------------------------------------------------- addressing
  function automatic int routers_on_path(int s, int d);
    int dx, dy, rdist;
    unique case (TOPO)
      TOPO_MESH: begin
        dx = (d % COLS) - (s % COLS);
        dy = (d / COLS) - (s / COLS);
        return (dx < 0 ? -dx : dx) + (dy < 0 ? -dy : dy) + 1;
      end
      TOPO_RING: begin
        rdist = (d - s + 8) % 8;
        return (rdist == 0) ? 1 : (rdist == 1 || rdist == 7 || rdist == 4) ? 2 : 3;
      end
      default:   return (s / 3 == d / 3) ? 1 : 3;
    endcase
  endfunction

  function automatic flit_t make_head(int s, int d, logic [7:0] data, logic single);
    flit_t f;
    f = '0;
    f.ftype = single ? FT_SINGLE : FT_HEAD;
    f.data  = data;
    unique case (TOPO)
      TOPO_MESH: begin
        f.a0 = ADDR_W'((d % COLS) - (s % COLS));
        f.a1 = ADDR_W'((d / COLS) - (s / COLS));
      end
      TOPO_RING: f.a0 = ADDR_W'((d - s + 8) % 8);
      default: begin
        if (s / 3 == d / 3) begin
          f.a0 = '0;
          f.a1 = ADDR_W'(d % 3 + 1);
        end else begin
          f.a0 = ADDR_W'(1);
          f.a1 = ADDR_W'(((d % 3 + 1) << 2) | (d / 3 + 1));
        end
      end
    endcase
    return f;
  endfunction

  // -------------------------------------------------------------- packet lists
  typedef struct {
    int dst;
    int len;
  } pkt_t;

  pkt_t      plan [N][$];          // packets still to send, per source
  logic [9:0] expq [N*N][$];       // expected {ftype, data} per (src, dst)
  int        sent_pkts, recv_pkts;
  int        cur_len [N];          // flits of the current packet already sent
  logic [3:0] pseq [N*N];          // packet sequence number per pair
  logic      rx_in_pkt [N];
  int        rx_src [N];
  int        cyc;
  int        phase;                // 1 latency, 2 uniform, 3 hotspot
  int        lat_src, lat_dst, lat_t0;
  logic      lat_wait;

  function automatic flit_t flit_for(int s, pkt_t p, int k);
    flit_t f;
    logic [7:0] data;
    if (k == 0) begin
      data = {4'(s), pseq[s*N + p.dst]};
      f = make_head(s, p.dst, data, p.len == 1);
    end else begin
      f = '0;
      f.ftype = (k == p.len - 1) ? FT_TAIL : FT_BODY;
      f.data  = 8'((s * 37 + p.dst * 11 + k * 5 + 32'(pseq[s*N + p.dst])) & 8'hff);
      // fields a router must ignore in body flits carry junk
      f.port  = 3'($urandom_range(0, 7));
      f.a0    = 4'($urandom_range(0, 15));
    end
    return f;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d %s", cyc, what);
    end
  endtask

  // -------------------------------------------------------------- driver
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int s = 0; s < N; s++) begin
        if (inj_valid[s] && !inj_ready[s]) src_stall_cycles++;
        if (inj_valid[s] && inj_ready[s]) begin
          pkt_t p;
          p = plan[s][0];
          expq[s*N + p.dst].push_back({inj_flit[s].ftype, inj_flit[s].data});
          if (phase == 1) lat_t0 = cyc;
          if (cur_len[s] == p.len - 1) begin
            void'(plan[s].pop_front());
            pseq[s*N + p.dst] = pseq[s*N + p.dst] + 1'b1;
            cur_len[s] = 0;
            sent_pkts++;
          end else begin
            cur_len[s]++;
          end
          inj_valid[s] <= 1'b0;
        end
      end
      // offer the next flit (valid held until taken, flit stable)
      for (int s = 0; s < N; s++) begin
        if (!(inj_valid[s] && !inj_ready[s]) && plan[s].size() > 0) begin
          if (cur_len[s] > 0 || phase != 2 || $urandom_range(0, 99) < RATE) begin
            inj_valid[s] <= 1'b1;
            inj_flit[s]  <= flit_for(s, plan[s][0], cur_len[s]);
          end else begin
            inj_valid[s] <= 1'b0;
          end
        end else if (!(inj_valid[s] && !inj_ready[s])) begin
          inj_valid[s] <= 1'b0;
        end
      end
    end
  end

  // -------------------------------------------------------------- monitor
  always @(posedge clk) begin
    if (rst_n) begin
      for (int d = 0; d < N; d++) begin
        if (ej_valid[d]) begin
          flit_t f;
          int    q;
          logic [9:0] e;
          f = ej_flit[d];
          if (is_head(f.ftype)) begin
            check(!rx_in_pkt[d], $sformatf("node %0d: head inside a packet", d));
            rx_src[d] = int'(f.data[7:4]);
            check(f.a0 == 0 && f.a1 == 0, $sformatf("node %0d: head address not zero", d));
            if (lat_wait && phase == 1) begin
              check(d == lat_dst, "latency packet at wrong node");
              check(cyc - lat_t0 == 2 * routers_on_path(lat_src, lat_dst) + 2,
                    $sformatf("latency %0d->%0d: %0d cycles, want %0d", lat_src, lat_dst,
                              cyc - lat_t0, 2 * routers_on_path(lat_src, lat_dst) + 2));
              lat_wait = 1'b0;
            end
          end else begin
            check(rx_in_pkt[d], $sformatf("node %0d: body flit outside a packet", d));
          end
          rx_in_pkt[d] = !is_tail(f.ftype);
          q = (rx_src[d] % N) * N + d;
          if (rx_src[d] >= N || expq[q].size() == 0) begin
            check(1'b0, $sformatf("node %0d: unexpected flit from %0d", d, rx_src[d]));
          end else begin
            e = expq[q].pop_front();
            check(e == {f.ftype, f.data},
                  $sformatf("node %0d from %0d: got %h want %h", d, rx_src[d], {f.ftype, f.data}, e));
          end
          if (is_tail(f.ftype)) recv_pkts++;
        end
      end
    end
  end

  // -------------------------------------------------------------- sequencer
  initial begin
    pkt_t p;
    void'($urandom(SEED));
    rst_n = 1'b0;
    done = 1'b0;
    checks = 0;
    failures = 0;
    src_stall_cycles = 0;
    sent_pkts = 0;
    recv_pkts = 0;
    cyc = 0;
    phase = 1;
    lat_wait = 1'b0;
    inj_valid = '0;
    for (int s = 0; s < N; s++) begin
      inj_flit[s] = '0;
      cur_len[s] = 0;
      rx_in_pkt[s] = 1'b0;
      rx_src[s] = 0;
    end
    for (int q = 0; q < N*N; q++) pseq[q] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // phase 1: lone single-flit packets, exact latency
    for (int t = 0; t < NLAT; t++) begin
      lat_src = $urandom_range(0, N - 1);
      do lat_dst = $urandom_range(0, N - 1); while (lat_dst == lat_src);
      p.dst = lat_dst;
      p.len = 1;
      lat_wait = 1'b1;
      plan[lat_src].push_back(p);
      while (lat_wait) @(posedge clk);
      repeat (2) @(posedge clk);
    end

    // phase 2: uniform random traffic
    phase = 2;
    for (int s = 0; s < N; s++)
      for (int k = 0; k < NPKT; k++) begin
        do p.dst = $urandom_range(0, N - 1); while (p.dst == s);
        p.len = $urandom_range(1, MAXLEN);
        plan[s].push_back(p);
      end
    wait_drained();

    // phase 3: hotspot
    phase = 3;
    for (int s = 0; s < N; s++)
      if (s != HOT)
        for (int k = 0; k < NHOT; k++) begin
          p.dst = HOT;
          p.len = MAXLEN;
          plan[s].push_back(p);
        end
    wait_drained();

    for (int q = 0; q < N*N; q++)
      check(expq[q].size() == 0, $sformatf("pair %0d: %0d flits never arrived", q, expq[q].size()));
    check(sent_pkts == recv_pkts, $sformatf("sent %0d packets, received %0d", sent_pkts, recv_pkts));
    done = 1'b1;
  end

  task automatic wait_drained();
    int busy;
    do begin
      @(posedge clk);
      busy = 0;
      for (int s = 0; s < N; s++) busy += plan[s].size();
    end while (busy != 0 || sent_pkts != recv_pkts);
    repeat (5) @(posedge clk);
  endtask
endmodule
