// lock_tlb: a fully associative, lockable TLB bank.
//
// Every S-NIC component that touches function memory (a programmable core,
// an accelerator cluster, a virtual packet pipeline, a DMA bank) sits behind
// one of these. The trusted launch controller writes the entries through the
// cfg_* port and then locks the bank; from then on writes are ignored, so
// neither the function nor the NIC OS can change its mappings. There is no
// page-table walk: a lookup that misses sets a sticky fault, which marks the
// function as broken. cfg_clear invalidates every entry, clears the fault and
// unlocks the bank (teardown).
//
// Lookups are combinational: lk_hit/lk_ppn answer lk_vpn in the same cycle.
// fault rises on the clock edge after a missing lookup. The 2 MB page size
// and the lock-then-fault behaviour follow the S-NIC description; the
// one-cycle configuration port (an index at or above ENTRIES is ignored), the combinational lookup and the fault flag
// are this design's choices. ENTRIES defaults to 183, the size a core needs
// to map the largest measured function with 2 MB pages.
module lock_tlb
  import snic_pkg::*;
#(
  parameter int unsigned ENTRIES = 183
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // configuration (trusted controller only)
  input  logic                       cfg_we,
  input  tlb_idx_t                   cfg_idx,
  input  tlb_entry_t                 cfg_entry,
  input  logic                       cfg_lock,
  input  logic                       cfg_clear,
  output logic                       locked,
  // translation
  input  logic                       lk_valid,
  input  vpn_t                       lk_vpn,
  output logic                       lk_hit,
  output ppn_t                       lk_ppn,
  output logic                       fault
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  tlb_entry_t entries [ENTRIES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked <= 1'b0;
      fault  <= 1'b0;
      for (int i = 0; i < int'(ENTRIES); i++) entries[i] <= '0;
    end else if (cfg_clear) begin
      locked <= 1'b0;
      fault  <= 1'b0;
      for (int i = 0; i < int'(ENTRIES); i++) entries[i] <= '0;
    end else begin
      if (cfg_we && !locked && 32'(cfg_idx) < ENTRIES) entries[cfg_idx[IDX_W-1:0]] <= cfg_entry;
      if (cfg_lock) locked <= 1'b1;
      if (lk_valid && !lk_hit) fault <= 1'b1;
    end
  end

  always_comb begin
    lk_hit = 1'b0;
    lk_ppn = '0;
    for (int i = 0; i < int'(ENTRIES); i++) begin
      if (entries[i].valid && entries[i].vpn == lk_vpn) begin
        lk_hit = 1'b1;
        lk_ppn = entries[i].ppn;
      end
    end
  end

endmodule
