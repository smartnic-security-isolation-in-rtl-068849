// pkt_input: packet input module with one virtual packet pipeline per function.
//
// Each arriving packet is presented as a flow key (5-tuple plus VXLAN VNI)
// and a 64-bit descriptor. The key is matched against the switching rule of
// every enabled virtual packet pipeline (VPP); a rule is a key and a mask, and
// a packet matches when all unmasked bits agree. The lowest-numbered matching
// VPP takes the packet. Each VPP owns a reserved share of the RX buffer
// (quota, in packets, at most RX_DEPTH); a packet that finds its VPP's share
// full is dropped, without touching any other VPP's space, so one function's
// burst cannot delay or displace another's packets. A packet that matches no
// rule is dropped too.
//
// Timing: a packet with rx_valid is classified and queued on the same edge;
// drop_full / drop_nomatch / accepted pulse in that cycle. The head of each
// VPP queue is shown on q_valid/q_desc and popped with deq. cfg_we installs
// a rule and quota for cfg_vpp and enables it; cfg_clr disables a VPP and
// empties its queue. Per-VPP reserved buffer space and rule-based switching
// on 5-tuple and VNI follow the S-NIC description; the first-match priority,
// the descriptor-only datapath (payload copying is left to the consumer) and
// packet-count quotas are this design's choices.
module pkt_input
  import snic_pkg::*;
#(
  parameter int unsigned NUM_VPP  = 12,
  parameter int unsigned RX_DEPTH = 64,
  localparam int unsigned VPP_W = $clog2(NUM_VPP),
  localparam int unsigned PTR_W = $clog2(RX_DEPTH),
  localparam int unsigned CNT_W = $clog2(RX_DEPTH + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration (trusted controller)
  input  logic                    cfg_we,
  input  logic                    cfg_clr,
  input  logic [VPP_W-1:0]        cfg_vpp,
  input  flow_key_t               cfg_key,
  input  flow_key_t               cfg_mask,
  input  logic [CNT_W-1:0]        cfg_quota,
  // RX port
  input  logic                    rx_valid,
  input  flow_key_t               rx_key,
  input  logic [DESC_W-1:0]       rx_desc,
  output logic                    accepted,
  output logic                    drop_full,
  output logic                    drop_nomatch,
  output logic [VPP_W-1:0]        rx_vpp,
  // per-VPP queues
  input  logic [NUM_VPP-1:0]      deq,
  output logic [NUM_VPP-1:0]      q_valid,
  output logic [DESC_W-1:0]       q_desc [NUM_VPP]
);

  logic              en    [NUM_VPP];
  flow_key_t         key   [NUM_VPP];
  flow_key_t         mask  [NUM_VPP];
  logic [CNT_W-1:0]  quota [NUM_VPP];
  logic [CNT_W-1:0]  cnt   [NUM_VPP];
  logic [PTR_W-1:0]  wp    [NUM_VPP];
  logic [PTR_W-1:0]  rp    [NUM_VPP];
  logic [DESC_W-1:0] buffer [NUM_VPP][RX_DEPTH];

  logic hit;
  always_comb begin
    hit    = 1'b0;
    rx_vpp = '0;
    for (int v = 0; v < int'(NUM_VPP); v++) begin
      if (!hit && en[v] && (((rx_key ^ key[v]) & mask[v]) == '0)) begin
        hit    = 1'b1;
        rx_vpp = VPP_W'(v);
      end
    end
    accepted     = rx_valid && hit && (cnt[rx_vpp] < quota[rx_vpp]);
    drop_full    = rx_valid && hit && !(cnt[rx_vpp] < quota[rx_vpp]);
    drop_nomatch = rx_valid && !hit;
    for (int v = 0; v < int'(NUM_VPP); v++) begin
      q_valid[v] = cnt[v] != '0;
      q_desc[v]  = buffer[v][rp[v]];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int v = 0; v < int'(NUM_VPP); v++) begin
        en[v] <= 1'b0; key[v] <= '0; mask[v] <= '0; quota[v] <= '0;
        cnt[v] <= '0; wp[v] <= '0; rp[v] <= '0;
      end
    end else begin
      for (int v = 0; v < int'(NUM_VPP); v++) begin
        logic push, pop;
        push = accepted && rx_vpp == VPP_W'(v);
        pop  = deq[v] && q_valid[v];
        if (push) begin
          buffer[v][wp[v]] <= rx_desc;
          wp[v] <= (32'(wp[v]) == RX_DEPTH - 1) ? '0 : wp[v] + 1'b1;
        end
        if (pop) rp[v] <= (32'(rp[v]) == RX_DEPTH - 1) ? '0 : rp[v] + 1'b1;
        cnt[v] <= cnt[v] + CNT_W'(push) - CNT_W'(pop);
      end
      if (cfg_we) begin
        en[cfg_vpp]    <= 1'b1;
        key[cfg_vpp]   <= cfg_key;
        mask[cfg_vpp]  <= cfg_mask;
        quota[cfg_vpp] <= (32'(cfg_quota) > RX_DEPTH) ? CNT_W'(RX_DEPTH) : cfg_quota;
      end else if (cfg_clr) begin
        en[cfg_vpp]    <= 1'b0;
        quota[cfg_vpp] <= '0;
        cnt[cfg_vpp]   <= '0;
        wp[cfg_vpp]    <= '0;
        rp[cfg_vpp]    <= '0;
      end
    end
  end

  a_quota: assert property (@(posedge clk) disable iff (!rst_n)
                            accepted |-> cnt[rx_vpp] < quota[rx_vpp]);

endmodule
