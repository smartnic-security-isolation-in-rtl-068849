// vaccel: virtualised hardware accelerator (vDPI, vZIP or vRAID).
//
// The accelerator's hardware threads are statically grouped into
// NUM_CLUSTERS clusters; a cluster is the unit that is handed to one
// function. Every memory access a cluster makes goes through the cluster's
// own lockable TLB bank, which the launch controller fills with the owning
// function's pages and then locks, so a cluster can only reach its owner's
// memory. A miss is fatal and shows on fault[c].
//
// The front-end scheduler gives each cluster a reserved DRAM issue slot:
// slots rotate over all clusters, one per cycle, whether or not the slot's
// cluster has a request, so one cluster's load never changes another's
// bandwidth or latency. In its slot a requesting cluster is translated; a hit
// is forwarded as mem_req with the physical address and acknowledged with
// th_ack once the bus grants it (mem_gnt, same cycle); an ungranted request
// waits for the cluster's next slot. A miss is acknowledged with th_err and raises the fault.
//
// The per-cluster TLB bank, static clustering and reserved bandwidth follow
// the S-NIC description; the fixed time-slot scheduler is this design's
// choice. The thread engines themselves (pattern matching, compression,
// RAID) are outside this module: th_* are their request ports. Default
// sizes are the DPI engine's: 64 threads in 16 clusters, 54 TLB entries.
module vaccel
  import snic_pkg::*;
#(
  parameter int unsigned NUM_CLUSTERS = 16,
  parameter int unsigned TLB_ENTRIES  = 54,
  localparam int unsigned CL_W  = (NUM_CLUSTERS > 1) ? $clog2(NUM_CLUSTERS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // TLB configuration (trusted controller), broadcast to selected clusters
  input  logic [NUM_CLUSTERS-1:0]    cfg_sel,
  input  logic                       cfg_we,
  input  tlb_idx_t                   cfg_idx,
  input  tlb_entry_t                 cfg_entry,
  input  logic                       cfg_lock,
  input  logic                       cfg_clear,
  // thread-cluster requests
  input  logic [NUM_CLUSTERS-1:0]    th_req,
  input  logic [VA_W-1:0]            th_va   [NUM_CLUSTERS],
  output logic [NUM_CLUSTERS-1:0]    th_ack,
  output logic [NUM_CLUSTERS-1:0]    th_err,
  // translated request towards the bus
  output logic                       mem_req,
  input  logic                       mem_gnt,
  output pa_t                        mem_pa,
  output logic [CL_W-1:0]            mem_cluster,
  output logic [NUM_CLUSTERS-1:0]    locked,
  output logic [NUM_CLUSTERS-1:0]    fault
);

  logic [CL_W-1:0] slot;
  logic [NUM_CLUSTERS-1:0] hit;
  ppn_t ppn [NUM_CLUSTERS];

  for (genvar c = 0; c < int'(NUM_CLUSTERS); c++) begin : g_cl
    lock_tlb #(.ENTRIES(TLB_ENTRIES)) u_tlb (
      .clk, .rst_n,
      .cfg_we    (cfg_we && cfg_sel[c]),
      .cfg_idx   (cfg_idx),
      .cfg_entry (cfg_entry),
      .cfg_lock  (cfg_lock && cfg_sel[c]),
      .cfg_clear (cfg_clear && cfg_sel[c]),
      .locked    (locked[c]),
      .lk_valid  (th_req[c] && slot == CL_W'(c)),
      .lk_vpn    (th_va[c][VA_W-1:PAGE_SHIFT]),
      .lk_hit    (hit[c]),
      .lk_ppn    (ppn[c]),
      .fault     (fault[c])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) slot <= '0;
    else        slot <= (32'(slot) == NUM_CLUSTERS - 1) ? '0 : slot + 1'b1;
  end

  always_comb begin
    th_ack      = '0;
    th_err      = '0;
    mem_req     = 1'b0;
    mem_cluster = slot;
    mem_pa      = {ppn[slot], th_va[slot][PAGE_SHIFT-1:0]};
    if (th_req[slot]) begin
      if (hit[slot]) begin
        mem_req      = 1'b1;
        th_ack[slot] = mem_gnt;
      end else begin
        th_err[slot] = 1'b1;
      end
    end
  end

endmodule
