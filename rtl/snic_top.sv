// snic_top: the S-NIC isolation hardware around the cores, DRAM and ports.
//
// S-NIC turns one smart NIC into several private virtual NICs, one per
// network function, that neither the other functions nor the NIC's own
// management OS can read, change or observe through shared hardware. This
// top wires together:
//   - nf_ctrl, the trusted launch controller, which alone allocates cores,
//     accelerator clusters, packet-buffer shares and pages to a function,
//     fills and locks every isolation TLB, keeps the NIC OS denylist and the
//     launch hash, and scrubs everything at teardown;
//   - one locked TLB (CORE_TLB entries) per programmable core;
//   - the NIC OS core's TLB, whose installs are filtered by the denylist;
//   - three virtualised accelerators (DPI, ZIP, RAID), each with 16 clusters
//     behind per-cluster TLB banks and a reserved-slot front-end scheduler;
//   - the packet input module (rule matching, per-function RX shares), the
//     per-function packet schedulers that write RX descriptors into the
//     function's ring through their own locked TLBs, and the packet output
//     module (per-function TX shares, round-robin to the wire);
//   - one two-TLB DMA bank per function for NIC/host transfers;
//   - the temporal-partitioning bus arbiter in front of DRAM, one epoch per
//     security domain (the NIC OS is domain 0, function n is domain n).
//
// Not inside: the cores themselves, the NIC OS core, DRAM, the Ethernet
// ports, the host bus, the accelerator engines and the attestation signer.
// Their connections are ports. Bus clients, in order: cores 0..NUM_CORES-1,
// the NIC OS core, the DPI, ZIP and RAID accelerators, then the NUM_VPP
// packet schedulers. A bus request is issued for one cycle on bus_* with the
// client index on bus_tag; DRAM answers reads with bus_rvalid/bus_rtag/
// bus_rdata and must answer within the arbiter's dead time. The launch
// controller has its own DRAM port (tmem_*). A core request (core_req) waits
// until core_gnt; one whose address does not translate is refused with
// core_err and sets the core's fault flag. Such a miss by a core, cluster or
// packet scheduler of a live function is fatal, as S-NIC prescribes: the
// top queues a teardown of that function ahead of any NIC OS command and
// reports its end on kill_valid/kill_nf. Reset is synchronous, active low.
module snic_top
  import snic_pkg::*;
#(
  parameter int unsigned NUM_CORES       = 48,
  parameter int unsigned CORE_TLB        = 183,
  parameter int unsigned OS_TLB          = 16,
  parameter int unsigned ACL_CLUSTERS    = 16,
  parameter int unsigned DPI_TLB         = 54,
  parameter int unsigned ZIP_TLB         = 70,
  parameter int unsigned RAID_TLB        = 5,
  parameter int unsigned VPP_TLB         = 3,
  parameter int unsigned DMA_TLB         = 2,
  parameter int unsigned RX_DEPTH        = 64,
  parameter int unsigned TX_DEPTH        = 64,
  parameter int unsigned RING_SLOTS      = 64,
  parameter int unsigned EPOCH           = 64,
  parameter int unsigned DEAD            = 16,
  parameter int unsigned HASH_WORDS_LOG2 = PAGE_SHIFT - 3,
  localparam int unsigned NUM_VPP     = MAX_NF,
  localparam int unsigned NUM_ACL     = 3 * ACL_CLUSTERS,
  localparam int unsigned NUM_CLIENTS = NUM_CORES + 1 + 3 + NUM_VPP,
  localparam int unsigned CL_W        = $clog2(NUM_CLIENTS),
  localparam int unsigned AC_W        = (ACL_CLUSTERS > 1) ? $clog2(ACL_CLUSTERS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // ---- trusted instructions from the NIC OS
  input  logic                     cmd_valid,
  input  nf_op_e                   cmd_op,
  input  logic [NUM_CORES-1:0]     cmd_core_mask,
  input  pa_t                      cmd_pt_ptr,
  input  tlb_idx_t                 cmd_pt_count,
  input  pa_t                      cmd_cfg_ptr,
  input  logic [NUM_ACL-1:0]       cmd_accel_mask,
  input  nf_id_t                   cmd_nf,
  output logic                     cmd_busy,
  output logic                     resp_valid,
  output logic                     resp_ok,
  output nf_id_t                   resp_nf,
  output logic [255:0]             resp_hash,
  output logic [NUM_CORES-1:0]     scrub_cores,
  output logic [NUM_CORES-1:0]     core_alloc,
  output logic [NUM_ACL-1:0]       acl_alloc,
  output logic                     kill_valid,
  output nf_id_t                   kill_nf,
  // ---- launch controller's DRAM port
  output logic                     tmem_req,
  output logic                     tmem_we,
  output pa_t                      tmem_addr,
  output word_t                    tmem_wdata,
  input  logic                     tmem_gnt,
  input  logic                     tmem_rvalid,
  input  word_t                    tmem_rdata,
  // ---- programmable cores (virtual addresses)
  input  logic [NUM_CORES-1:0]     core_req,
  input  logic [NUM_CORES-1:0]     core_we,
  input  logic [VA_W-1:0]          core_va    [NUM_CORES],
  input  word_t                    core_wdata [NUM_CORES],
  output logic [NUM_CORES-1:0]     core_gnt,
  output logic [NUM_CORES-1:0]     core_err,
  output logic [NUM_CORES-1:0]     core_fault,
  // ---- NIC OS core: TLB install and memory access
  input  logic                     os_inst_valid,
  input  tlb_idx_t                 os_inst_idx,
  input  vpn_t                     os_inst_vpn,
  input  ppn_t                     os_inst_ppn,
  output logic                     os_inst_ok,
  output logic                     os_inst_rej,
  input  logic                     os_req,
  input  logic                     os_we,
  input  logic [VA_W-1:0]          os_va,
  input  word_t                    os_wdata,
  output logic                     os_gnt,
  output logic                     os_err,
  // ---- accelerator thread clusters (DPI, ZIP, RAID)
  input  logic [ACL_CLUSTERS-1:0]  acc_req [3],
  input  logic [VA_W-1:0]          acc_va  [3][ACL_CLUSTERS],
  output logic [ACL_CLUSTERS-1:0]  acc_ack [3],
  output logic [ACL_CLUSTERS-1:0]  acc_err [3],
  output logic [ACL_CLUSTERS-1:0]  acc_fault [3],
  // ---- RX port
  input  logic                     rx_valid,
  input  flow_key_t                rx_key,
  input  logic [DESC_W-1:0]        rx_desc,
  output logic                     rx_accepted,
  output logic                     rx_drop_full,
  output logic                     rx_drop_nomatch,
  output logic [NUM_VPP-1:0]       rx_delivered,
  output logic [NUM_VPP-1:0]       vpp_fault,
  // ---- TX: functions hand descriptors to their pipeline, wire side
  input  logic [NUM_VPP-1:0]       tx_valid,
  input  logic [DESC_W-1:0]        tx_desc [NUM_VPP],
  output logic [NUM_VPP-1:0]       tx_ready,
  input  logic                     wire_ready,
  output logic                     wire_valid,
  output logic [DESC_W-1:0]        wire_desc,
  output logic [3:0]               wire_vpp,
  // ---- NIC/host DMA requests, one bank per function
  input  logic [NUM_VPP-1:0]       dma_valid,
  input  logic [NUM_VPP-1:0]       dma_to_host,
  input  logic [VA_W-1:0]          dma_nic_va  [NUM_VPP],
  input  logic [VA_W-1:0]          dma_host_va [NUM_VPP],
  output logic [NUM_VPP-1:0]       dma_ok,
  output logic [NUM_VPP-1:0]       dma_err,
  output pa_t                      dma_nic_pa  [NUM_VPP],
  output pa_t                      dma_host_pa [NUM_VPP],
  // ---- DRAM bus, after the arbiter
  output logic                     bus_req,
  output logic                     bus_we,
  output pa_t                      bus_addr,
  output word_t                    bus_wdata,
  output logic [CL_W-1:0]          bus_tag,
  output nf_id_t                   bus_dom,
  output logic                     bus_issue_window,
  input  logic                     bus_rvalid,
  input  logic [CL_W-1:0]          bus_rtag,
  input  word_t                    bus_rdata,
  output logic [NUM_CLIENTS-1:0]   rd_valid,
  output word_t                    rd_data
);

  localparam int unsigned C_OS   = NUM_CORES;
  localparam int unsigned C_ACC  = NUM_CORES + 1;
  localparam int unsigned C_VPP  = NUM_CORES + 4;

  // ================================================================ controller
  logic                 tlb_we, tlb_lock, tlb_clear, dma_host;
  tlb_idx_t             tlb_idx;
  tlb_entry_t           tlb_entry;
  logic [NUM_CORES-1:0] sel_core;
  logic [NUM_ACL-1:0]   sel_acl;
  logic [MAX_NF-1:0]    sel_vpp, sel_dma;
  logic                 pp_we, pp_clr;
  logic [3:0]           pp_vpp;
  flow_key_t            pp_key, pp_mask;
  logic [15:0]          pp_rx_quota, pp_tx_quota;
  logic [VA_W-1:0]      pp_ring_va;
  nf_id_t               cfg_nf;
  logic                 mi_ok;
  logic                 ctrl_valid, ctrl_busy, ctrl_resp_valid;
  nf_op_e               ctrl_op;
  nf_id_t               ctrl_nf;

  nf_ctrl #(
    .NUM_CORES(NUM_CORES), .NUM_ACL(NUM_ACL), .PT_MAX(CORE_TLB),
    .QUOTA_MAX((RX_DEPTH < TX_DEPTH) ? RX_DEPTH : TX_DEPTH),
    .HASH_WORDS_LOG2(HASH_WORDS_LOG2)
  ) u_ctrl (
    .clk, .rst_n,
    .cmd_valid(ctrl_valid), .cmd_op(ctrl_op), .cmd_core_mask, .cmd_pt_ptr, .cmd_pt_count,
    .cmd_cfg_ptr, .cmd_accel_mask, .cmd_nf(ctrl_nf),
    .busy(ctrl_busy), .resp_valid(ctrl_resp_valid), .resp_ok, .resp_nf, .resp_hash,
    .m_req(tmem_req), .m_we(tmem_we), .m_addr(tmem_addr), .m_wdata(tmem_wdata),
    .m_gnt(tmem_gnt), .m_rvalid(tmem_rvalid), .m_rdata(tmem_rdata),
    .tlb_we, .tlb_idx, .tlb_entry, .tlb_lock, .tlb_clear,
    .sel_core, .sel_acl, .sel_vpp, .sel_dma, .dma_host,
    .pp_we, .pp_clr, .pp_vpp, .pp_key, .pp_mask, .pp_rx_quota, .pp_tx_quota,
    .pp_ring_va, .cfg_nf,
    .scrub_cores,
    .mi_valid(os_inst_valid), .mi_ppn(os_inst_ppn), .mi_ok,
    .core_alloc, .acl_alloc);

  // Owner (security domain) of every core and cluster, recorded when the
  // controller locks its TLB and cleared when it clears it.
  nf_id_t core_dom [NUM_CORES];
  nf_id_t acl_dom  [NUM_ACL];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(NUM_CORES); c++) core_dom[c] <= '0;
      for (int a = 0; a < int'(NUM_ACL); a++)   acl_dom[a]  <= '0;
    end else begin
      for (int c = 0; c < int'(NUM_CORES); c++) begin
        if (tlb_lock && sel_core[c])  core_dom[c] <= cfg_nf;
        if (tlb_clear && sel_core[c]) core_dom[c] <= '0;
      end
      for (int a = 0; a < int'(NUM_ACL); a++) begin
        if (tlb_lock && sel_acl[a])  acl_dom[a] <= cfg_nf;
        if (tlb_clear && sel_acl[a]) acl_dom[a] <= '0;
      end
    end
  end

  // ================================================================ bus clients
  logic [NUM_CLIENTS-1:0] cl_req, cl_we, cl_gnt;
  pa_t                    cl_addr [NUM_CLIENTS];
  word_t                  cl_wdata [NUM_CLIENTS];
  logic [3:0]             cl_dom  [NUM_CLIENTS];

  // ---- programmable cores
  for (genvar c = 0; c < int'(NUM_CORES); c++) begin : g_core
    logic hit;
    ppn_t ppn;
    lock_tlb #(.ENTRIES(CORE_TLB)) u_tlb (
      .clk, .rst_n,
      .cfg_we(tlb_we && sel_core[c]), .cfg_idx(tlb_idx), .cfg_entry(tlb_entry),
      .cfg_lock(tlb_lock && sel_core[c]), .cfg_clear(tlb_clear && sel_core[c]),
      .locked(),
      .lk_valid(core_req[c]), .lk_vpn(core_va[c][VA_W-1:PAGE_SHIFT]),
      .lk_hit(hit), .lk_ppn(ppn), .fault(core_fault[c]));
    assign cl_req[c]   = core_req[c] && hit;
    assign cl_we[c]    = core_we[c];
    assign cl_addr[c]  = {ppn, core_va[c][PAGE_SHIFT-1:0]};
    assign cl_wdata[c] = core_wdata[c];
    assign cl_dom[c]   = core_dom[c];
    assign core_gnt[c] = cl_gnt[c];
    assign core_err[c] = core_req[c] && !hit;
  end

  // ---- NIC OS core: its TLB is never locked, but every install is checked
  // against the ownership table first.
  logic os_hit;
  ppn_t os_ppn;
  assign os_inst_ok  = os_inst_valid && mi_ok;
  assign os_inst_rej = os_inst_valid && !mi_ok;
  lock_tlb #(.ENTRIES(OS_TLB)) u_os_tlb (
    .clk, .rst_n,
    .cfg_we(os_inst_ok), .cfg_idx(os_inst_idx),
    .cfg_entry('{valid: 1'b1, vpn: os_inst_vpn, ppn: os_inst_ppn}),
    .cfg_lock(1'b0), .cfg_clear(1'b0), .locked(),
    .lk_valid(os_req), .lk_vpn(os_va[VA_W-1:PAGE_SHIFT]),
    .lk_hit(os_hit), .lk_ppn(os_ppn), .fault());
  assign cl_req[C_OS]   = os_req && os_hit;
  assign cl_we[C_OS]    = os_we;
  assign cl_addr[C_OS]  = {os_ppn, os_va[PAGE_SHIFT-1:0]};
  assign cl_wdata[C_OS] = os_wdata;
  assign cl_dom[C_OS]   = '0;
  assign os_gnt         = cl_gnt[C_OS];
  assign os_err         = os_req && !os_hit;

  // ---- virtualised accelerators: 0 DPI, 1 ZIP, 2 RAID
  for (genvar k = 0; k < 3; k++) begin : g_acc
    localparam int unsigned TLBN = (k == 0) ? DPI_TLB : (k == 1) ? ZIP_TLB : RAID_TLB;
    logic            mreq;
    pa_t             mpa;
    logic [AC_W-1:0] mcl;
    vaccel #(.NUM_CLUSTERS(ACL_CLUSTERS), .TLB_ENTRIES(TLBN)) u_acc (
      .clk, .rst_n,
      .cfg_sel(sel_acl[k*ACL_CLUSTERS +: ACL_CLUSTERS]),
      .cfg_we(tlb_we), .cfg_idx(tlb_idx), .cfg_entry(tlb_entry),
      .cfg_lock(tlb_lock), .cfg_clear(tlb_clear),
      .th_req(acc_req[k]), .th_va(acc_va[k]),
      .th_ack(acc_ack[k]), .th_err(acc_err[k]),
      .mem_req(mreq), .mem_gnt(cl_gnt[C_ACC + k]), .mem_pa(mpa), .mem_cluster(mcl),
      .locked(), .fault(acc_fault[k]));
    assign cl_req[C_ACC + k]   = mreq;
    assign cl_we[C_ACC + k]    = 1'b0;
    assign cl_addr[C_ACC + k]  = mpa;
    assign cl_wdata[C_ACC + k] = '0;
    assign cl_dom[C_ACC + k]   = acl_dom[k*ACL_CLUSTERS + int'(mcl)];
  end

  // ---- packet input and per-function schedulers
  logic [NUM_VPP-1:0]  q_valid, q_deq;
  logic [DESC_W-1:0]   q_desc [NUM_VPP];
  logic [NUM_VPP-1:0]  vs_req, vs_gnt, vpp_ring_sel;
  pa_t                 vs_addr [NUM_VPP];
  word_t               vs_wdata [NUM_VPP];
  logic [3:0]          rx_vpp_unused;

  pkt_input #(.NUM_VPP(NUM_VPP), .RX_DEPTH(RX_DEPTH)) u_pki (
    .clk, .rst_n,
    .cfg_we(pp_we), .cfg_clr(pp_clr), .cfg_vpp(pp_vpp),
    .cfg_key(pp_key), .cfg_mask(pp_mask), .cfg_quota($clog2(RX_DEPTH+1)'(pp_rx_quota)),
    .rx_valid, .rx_key, .rx_desc,
    .accepted(rx_accepted), .drop_full(rx_drop_full), .drop_nomatch(rx_drop_nomatch),
    .rx_vpp(rx_vpp_unused),
    .deq(q_deq), .q_valid, .q_desc);

  always_comb begin
    vpp_ring_sel = sel_vpp;
    if (pp_we) vpp_ring_sel[pp_vpp] = 1'b1;
  end

  vpp_sched #(.NUM_VPP(NUM_VPP), .TLB_ENTRIES(VPP_TLB), .RING_SLOTS(RING_SLOTS)) u_vpp (
    .clk, .rst_n,
    .cfg_sel(vpp_ring_sel), .cfg_we(tlb_we), .cfg_idx(tlb_idx), .cfg_entry(tlb_entry),
    .cfg_lock(tlb_lock), .cfg_clear(tlb_clear),
    .cfg_ring(pp_we), .cfg_ring_va(pp_ring_va),
    .q_valid, .q_desc, .deq(q_deq),
    .req(vs_req), .addr(vs_addr), .wdata(vs_wdata), .gnt(vs_gnt),
    .delivered(rx_delivered), .fault(vpp_fault));

  for (genvar v = 0; v < int'(NUM_VPP); v++) begin : g_vppbus
    assign cl_req[C_VPP + v]   = vs_req[v];
    assign cl_we[C_VPP + v]    = 1'b1;
    assign cl_addr[C_VPP + v]  = vs_addr[v];
    assign cl_wdata[C_VPP + v] = vs_wdata[v];
    assign cl_dom[C_VPP + v]   = 4'(v + 1);
    assign vs_gnt[v]           = cl_gnt[C_VPP + v];
  end

  // ---- packet output
  pkt_output #(.NUM_VPP(NUM_VPP), .TX_DEPTH(TX_DEPTH)) u_pke (
    .clk, .rst_n,
    .cfg_we(pp_we), .cfg_clr(pp_clr), .cfg_vpp(pp_vpp),
    .cfg_quota($clog2(TX_DEPTH+1)'(pp_tx_quota)),
    .tx_valid, .tx_desc, .tx_ready,
    .wire_ready, .wire_valid, .wire_desc, .wire_vpp);

  // ---- DMA banks
  for (genvar v = 0; v < int'(NUM_VPP); v++) begin : g_dma
    dma_bank #(.NIC_ENTRIES(DMA_TLB), .HOST_ENTRIES(DMA_TLB)) u_dma (
      .clk, .rst_n,
      .cfg_host(dma_host), .cfg_we(tlb_we && sel_dma[v]), .cfg_idx(tlb_idx),
      .cfg_entry(tlb_entry), .cfg_lock(tlb_lock && sel_dma[v]),
      .cfg_clear(tlb_clear && sel_dma[v]),
      .x_valid(dma_valid[v]), .x_to_host(dma_to_host[v]),
      .x_nic_va(dma_nic_va[v]), .x_host_va(dma_host_va[v]),
      .x_ok(dma_ok[v]), .x_err(dma_err[v]), .x_dir(),
      .x_nic_pa(dma_nic_pa[v]), .x_host_pa(dma_host_pa[v]),
      .locked(), .fault());
  end

  // ================================================================ fatal misses
  // A translation miss by a core, a cluster or a packet scheduler that
  // belongs to a function destroys that function: the function is queued
  // here and a teardown is issued to the controller as soon as it is idle,
  // ahead of any NIC OS command (cmd_busy stays high while one is queued).
  // Its completion is reported on kill_valid/kill_nf, not on resp_valid.
  logic [MAX_NF:0]    kill_pend, kill_new, kill_sel;
  logic [NUM_VPP-1:0] vpp_fault_q;
  logic               kill_go, kill_active;
  nf_id_t             kill_id;

  always_comb begin
    kill_new = '0;
    for (int c = 0; c < int'(NUM_CORES); c++)
      if (core_err[c] && core_dom[c] != '0) kill_new[core_dom[c]] = 1'b1;
    for (int k = 0; k < 3; k++)
      for (int a = 0; a < int'(ACL_CLUSTERS); a++)
        if (acc_err[k][a] && acl_dom[k*ACL_CLUSTERS + a] != '0)
          kill_new[acl_dom[k*ACL_CLUSTERS + a]] = 1'b1;
    for (int v = 0; v < int'(NUM_VPP); v++)
      if (vpp_fault[v] && !vpp_fault_q[v]) kill_new[v + 1] = 1'b1;
    kill_id  = '0;
    kill_sel = '0;
    for (int n = MAX_NF; n >= 1; n--)
      if (kill_pend[n]) kill_id = nf_id_t'(n);
    kill_sel[kill_id] = kill_id != '0;
  end

  assign kill_go    = kill_id != '0 && !ctrl_busy;
  assign ctrl_valid = kill_go || cmd_valid;
  assign ctrl_op    = kill_go ? OP_TEARDOWN : cmd_op;
  assign ctrl_nf    = kill_go ? kill_id : cmd_nf;
  assign cmd_busy   = ctrl_busy || kill_id != '0 || kill_active;
  assign resp_valid = ctrl_resp_valid && !kill_active;
  assign kill_valid = ctrl_resp_valid && kill_active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kill_pend   <= '0;
      kill_active <= 1'b0;
      kill_nf     <= '0;
      vpp_fault_q <= '0;
    end else begin
      vpp_fault_q <= vpp_fault;
      kill_pend   <= (kill_pend | kill_new) & ~(kill_go ? kill_sel : '0) & ~(MAX_NF+1)'(1);
      if (kill_go) begin
        kill_active <= 1'b1;
        kill_nf     <= kill_id;
      end else if (ctrl_resp_valid) kill_active <= 1'b0;
    end
  end

  // ================================================================ arbiter
  logic            gnt_valid;
  logic [CL_W-1:0] gnt_idx;
  logic [3:0]      cur_dom;
  logic            epoch_start;

  bus_arbiter #(
    .NUM_CLIENTS(NUM_CLIENTS), .NUM_DOMAINS(MAX_NF + 1), .EPOCH(EPOCH), .DEAD(DEAD)
  ) u_arb (
    .clk, .rst_n,
    .req(cl_req), .client_dom(cl_dom),
    .gnt(cl_gnt), .gnt_valid, .gnt_idx, .cur_dom,
    .issue_ok(bus_issue_window), .epoch_start);

  assign bus_req   = gnt_valid;
  assign bus_we    = cl_we[gnt_idx];
  assign bus_addr  = cl_addr[gnt_idx];
  assign bus_wdata = cl_wdata[gnt_idx];
  assign bus_tag   = gnt_idx;
  assign bus_dom   = cur_dom;

  always_comb begin
    rd_valid = '0;
    if (bus_rvalid) rd_valid[bus_rtag] = 1'b1;
    rd_data = bus_rdata;
  end

endmodule
