// dma_bank: one bank of the multi-bank NIC/host DMA controller.
//
// A function's DMA transfers between its on-NIC memory and host memory are
// checked by its own bank. The bank holds two lockable TLBs: one maps the
// function's virtual pages on the NIC side (its packet buffer and DMA
// instruction queue), the other maps the host pages the host has sanctioned
// for this function. A transfer request (x_valid) names one virtual address
// on each side; it is allowed (x_ok) only if both translate, and the
// translated physical addresses are returned (the 21-bit in-page offsets
// pass through unchanged). Otherwise x_err is raised and
// the failing TLB records a fault. Direction (x_to_host) is passed through.
//
// Combinational in the request cycle. The two-TLB bank follows the S-NIC
// description (TLB entries for the upstream and downstream directions, 2 per
// function); the host address width equal to the NIC's and the request
// format are this design's choices. The data mover is not part of the bank.
module dma_bank
  import snic_pkg::*;
#(
  parameter int unsigned NIC_ENTRIES  = 2,
  parameter int unsigned HOST_ENTRIES = 2
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            cfg_host,   // 0: NIC-side TLB, 1: host-side TLB
  input  logic                            cfg_we,
  input  tlb_idx_t                        cfg_idx,
  input  tlb_entry_t                      cfg_entry,
  input  logic                            cfg_lock,
  input  logic                            cfg_clear,
  input  logic                            x_valid,
  input  logic                            x_to_host,
  input  logic [VA_W-1:0]                 x_nic_va,
  input  logic [VA_W-1:0]                 x_host_va,
  output logic                            x_ok,
  output logic                            x_err,
  output logic                            x_dir,
  output pa_t                             x_nic_pa,
  output pa_t                             x_host_pa,
  output logic                            locked,
  output logic                            fault
);

  logic nic_hit, host_hit, nic_fault, host_fault, host_locked;
  ppn_t nic_ppn, host_ppn;

  lock_tlb #(.ENTRIES(NIC_ENTRIES)) u_nic (
    .clk, .rst_n,
    .cfg_we(cfg_we && !cfg_host), .cfg_idx(cfg_idx), .cfg_entry(cfg_entry),
    .cfg_lock(cfg_lock), .cfg_clear(cfg_clear), .locked(locked),
    .lk_valid(x_valid), .lk_vpn(x_nic_va[VA_W-1:PAGE_SHIFT]),
    .lk_hit(nic_hit), .lk_ppn(nic_ppn), .fault(nic_fault));

  lock_tlb #(.ENTRIES(HOST_ENTRIES)) u_host (
    .clk, .rst_n,
    .cfg_we(cfg_we && cfg_host), .cfg_idx(cfg_idx), .cfg_entry(cfg_entry),
    .cfg_lock(cfg_lock), .cfg_clear(cfg_clear), .locked(host_locked),
    .lk_valid(x_valid), .lk_vpn(x_host_va[VA_W-1:PAGE_SHIFT]),
    .lk_hit(host_hit), .lk_ppn(host_ppn), .fault(host_fault));

  assign x_ok      = x_valid && nic_hit && host_hit;
  assign x_err     = x_valid && !(nic_hit && host_hit);
  assign x_dir     = x_to_host;
  assign x_nic_pa  = {nic_ppn,  x_nic_va[PAGE_SHIFT-1:0]};
  assign x_host_pa = {host_ppn, x_host_va[PAGE_SHIFT-1:0]};
  assign fault     = nic_fault || host_fault;

  // Both TLBs are always locked and cleared together.
  a_lock_pair: assert property (@(posedge clk) disable iff (!rst_n) locked == host_locked);

endmodule
