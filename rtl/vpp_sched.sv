// vpp_sched: per-function packet schedulers of the virtual packet pipelines.
//
// Each virtual packet pipeline (VPP) has its own scheduler unit that moves
// received packets from its RX queue in the packet input module into the
// owning function's memory. The unit writes each 64-bit packet descriptor
// into a ring of RING_SLOTS words at a virtual address chosen by the function
// (ring_va, set at launch). Every address goes through the VPP's own
// lockable TLB (3 entries: packet buffer, descriptor buffer, output
// descriptor buffer), which the launch controller fills with the function's
// pages and locks, so a scheduler can only write its owner's memory. A
// translation miss drops the descriptor and raises the VPP's sticky fault.
//
// Each VPP is a separate client of the IO bus (req/gnt per VPP, one word
// write per grant; wdata is the head descriptor of the queue itself). A descriptor is popped from the RX queue (deq) in the
// cycle its write is granted or found untranslatable. cfg_we/idx/entry,
// cfg_lock and cfg_clear act on the VPPs in cfg_sel; cfg_ring sets ring_va
// for the VPPs in cfg_sel and resets their write index. Scheduler units and
// locked TLBs follow the S-NIC description; the ring format and the
// one-word-per-packet datapath are this design's choices. Reset is
// synchronous and active low.
module vpp_sched
  import snic_pkg::*;
#(
  parameter int unsigned NUM_VPP    = 12,
  parameter int unsigned TLB_ENTRIES = 3,
  parameter int unsigned RING_SLOTS = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NUM_VPP-1:0]      cfg_sel,
  input  logic                    cfg_we,
  input  tlb_idx_t                cfg_idx,
  input  tlb_entry_t              cfg_entry,
  input  logic                    cfg_lock,
  input  logic                    cfg_clear,
  input  logic                    cfg_ring,
  input  logic [VA_W-1:0]         cfg_ring_va,
  // RX queues of the packet input module
  input  logic [NUM_VPP-1:0]      q_valid,
  input  logic [DESC_W-1:0]       q_desc [NUM_VPP],
  output logic [NUM_VPP-1:0]      deq,
  // bus side, one client per VPP
  output logic [NUM_VPP-1:0]      req,
  output pa_t                     addr [NUM_VPP],
  output word_t                   wdata [NUM_VPP],
  input  logic [NUM_VPP-1:0]      gnt,
  output logic [NUM_VPP-1:0]      delivered,
  output logic [NUM_VPP-1:0]      fault
);

  localparam int unsigned SLOT_W = $clog2(RING_SLOTS);

  logic [VA_W-1:0]   ring_va [NUM_VPP];
  logic [SLOT_W-1:0] widx    [NUM_VPP];

  for (genvar v = 0; v < int'(NUM_VPP); v++) begin : g_vpp
    logic [VA_W-1:0] va;
    logic            hit;
    ppn_t            ppn;

    assign va = ring_va[v] + VA_W'({widx[v], 3'b000});

    lock_tlb #(.ENTRIES(TLB_ENTRIES)) u_tlb (
      .clk, .rst_n,
      .cfg_we(cfg_we && cfg_sel[v]), .cfg_idx, .cfg_entry,
      .cfg_lock(cfg_lock && cfg_sel[v]), .cfg_clear(cfg_clear && cfg_sel[v]),
      .locked(),
      .lk_valid(q_valid[v]), .lk_vpn(va[VA_W-1:PAGE_SHIFT]),
      .lk_hit(hit), .lk_ppn(ppn), .fault(fault[v]));

    assign req[v]       = q_valid[v] && hit;
    assign addr[v]      = {ppn, va[PAGE_SHIFT-1:0]};
    assign wdata[v]     = q_desc[v];
    assign delivered[v] = req[v] && gnt[v];
    assign deq[v]       = delivered[v] || (q_valid[v] && !hit);

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        ring_va[v] <= '0;
        widx[v]    <= '0;
      end else if (cfg_ring && cfg_sel[v]) begin
        ring_va[v] <= cfg_ring_va;
        widx[v]    <= '0;
      end else if (delivered[v]) begin
        widx[v] <= (32'(widx[v]) == RING_SLOTS - 1) ? '0 : widx[v] + 1'b1;
      end
    end
  end

endmodule
