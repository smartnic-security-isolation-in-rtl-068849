// pkt_output: packet output module with per-function TX buffer shares.
//
// Each virtual packet pipeline (VPP) hands finished packets, as 64-bit
// descriptors, to its own TX queue. A queue accepts a packet only while it
// holds fewer than the VPP's reserved quota (tx_ready), so a function that
// floods its queue back-pressures only itself. A round-robin scheduler
// places one packet per cycle on the wire when wire_ready is high, visiting
// the VPPs in turn so each non-empty queue is served at least once every
// NUM_VPP packets.
//
// Timing: tx_valid&tx_ready enqueues on the edge; wire_valid/wire_desc/
// wire_vpp show the packet chosen this cycle, consumed when wire_ready. cfg_we
// sets a quota (at most TX_DEPTH) and enables the VPP; cfg_clr disables and
// empties it. Per-VPP TX buffer reservation follows the S-NIC description;
// round-robin service (S-NIC lets each function choose its scheduling
// algorithm) and packet-count quotas are this design's choices.
module pkt_output
  import snic_pkg::*;
#(
  parameter int unsigned NUM_VPP  = 12,
  parameter int unsigned TX_DEPTH = 64,
  localparam int unsigned VPP_W = $clog2(NUM_VPP),
  localparam int unsigned PTR_W = $clog2(TX_DEPTH),
  localparam int unsigned CNT_W = $clog2(TX_DEPTH + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_we,
  input  logic                    cfg_clr,
  input  logic [VPP_W-1:0]        cfg_vpp,
  input  logic [CNT_W-1:0]        cfg_quota,
  input  logic [NUM_VPP-1:0]      tx_valid,
  input  logic [DESC_W-1:0]       tx_desc [NUM_VPP],
  output logic [NUM_VPP-1:0]      tx_ready,
  input  logic                    wire_ready,
  output logic                    wire_valid,
  output logic [DESC_W-1:0]       wire_desc,
  output logic [VPP_W-1:0]        wire_vpp
);

  logic [CNT_W-1:0]  quota [NUM_VPP];
  logic [CNT_W-1:0]  cnt   [NUM_VPP];
  logic [PTR_W-1:0]  wp    [NUM_VPP];
  logic [PTR_W-1:0]  rp    [NUM_VPP];
  logic [DESC_W-1:0] buffer [NUM_VPP][TX_DEPTH];
  logic [VPP_W-1:0]  rr;

  always_comb begin
    logic [VPP_W-1:0] c;
    c          = '0;
    wire_valid = 1'b0;
    wire_vpp   = '0;
    for (int k = 0; k < int'(NUM_VPP); k++) begin
      c = VPP_W'((32'(rr) + 32'(k)) % NUM_VPP);
      if (!wire_valid && cnt[c] != '0) begin
        wire_valid = 1'b1;
        wire_vpp   = c;
      end
    end
    wire_desc = buffer[wire_vpp][rp[wire_vpp]];
    for (int v = 0; v < int'(NUM_VPP); v++) tx_ready[v] = cnt[v] < quota[v];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr <= '0;
      for (int v = 0; v < int'(NUM_VPP); v++) begin
        quota[v] <= '0; cnt[v] <= '0; wp[v] <= '0; rp[v] <= '0;
      end
    end else begin
      if (wire_valid && wire_ready)
        rr <= (32'(wire_vpp) == NUM_VPP - 1) ? '0 : wire_vpp + 1'b1;
      for (int v = 0; v < int'(NUM_VPP); v++) begin
        logic push, pop;
        push = tx_valid[v] && tx_ready[v];
        pop  = wire_valid && wire_ready && wire_vpp == VPP_W'(v);
        if (push) begin
          buffer[v][wp[v]] <= tx_desc[v];
          wp[v] <= (32'(wp[v]) == TX_DEPTH - 1) ? '0 : wp[v] + 1'b1;
        end
        if (pop) rp[v] <= (32'(rp[v]) == TX_DEPTH - 1) ? '0 : rp[v] + 1'b1;
        cnt[v] <= cnt[v] + CNT_W'(push) - CNT_W'(pop);
      end
      if (cfg_we) begin
        quota[cfg_vpp] <= (32'(cfg_quota) > TX_DEPTH) ? CNT_W'(TX_DEPTH) : cfg_quota;
      end else if (cfg_clr) begin
        quota[cfg_vpp] <= '0;
        cnt[cfg_vpp]   <= '0;
        wp[cfg_vpp]    <= '0;
        rp[cfg_vpp]    <= '0;
      end
    end
  end

endmodule
