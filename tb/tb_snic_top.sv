// tb_snic_top: end-to-end run of the S-NIC isolation hardware.
//
// A scaled-down NIC (4 cores, 2 clusters per accelerator, 8-entry core
// TLBs, 16-cycle bus epochs with 4 cycles of dead time, 4 hashed words per
// page) with one DRAM model behind both the arbitrated bus and the launch
// controller's port. The NIC OS launches two functions, fails to launch a
// third on a taken core, attests, and tears one down; meanwhile cores,
// accelerator threads, packets and DMA requests exercise every isolation
// path. A bus monitor checks on every grant that a function-domain client
// only touches pages of the domain holding the bus, that the NIC OS only
// touches free pages, and that nothing issues in dead time. Each mechanism
// has a counter; one that never happens is reported as a failure.
module tb_snic_top;
  import snic_pkg::*;
  import tb_sha256_pkg::*;

  localparam int NC = 4, ACLC = 2, CT = 8, HW = 2;
  localparam int NV = MAX_NF, NACL = 3 * ACLC, NCL = NC + 4 + NV, CLW = $clog2(NCL);
  localparam int C_OS = NC, C_ACC = NC + 1, C_VPP = NC + 4;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  nf_op_e cmd_op = OP_LAUNCH;
  logic [NC-1:0] cmd_core_mask = '0;
  pa_t cmd_pt_ptr = '0, cmd_cfg_ptr = '0;
  tlb_idx_t cmd_pt_count = '0;
  logic [NACL-1:0] cmd_accel_mask = '0;
  nf_id_t cmd_nf = '0;
  logic cmd_busy, resp_valid, resp_ok;
  nf_id_t resp_nf;
  logic [255:0] resp_hash;
  logic [NC-1:0] scrub_cores, core_alloc;
  logic [NACL-1:0] acl_alloc;
  logic kill_valid;
  nf_id_t kill_nf;
  logic tmem_req, tmem_we, tmem_gnt = 1, tmem_rvalid;
  pa_t tmem_addr;
  word_t tmem_wdata, tmem_rdata;
  logic [NC-1:0] core_req = '0, core_we = '0, core_gnt, core_err, core_fault;
  logic [VA_W-1:0] core_va [NC];
  word_t core_wdata [NC];
  logic os_inst_valid = 0, os_inst_ok, os_inst_rej;
  tlb_idx_t os_inst_idx = '0;
  vpn_t os_inst_vpn = '0;
  ppn_t os_inst_ppn = '0;
  logic os_req = 0, os_we = 0, os_gnt, os_err;
  logic [VA_W-1:0] os_va = '0;
  word_t os_wdata = '0;
  logic [ACLC-1:0] acc_req [3], acc_ack [3], acc_err [3], acc_fault [3];
  logic [VA_W-1:0] acc_va [3][ACLC];
  logic rx_valid = 0, rx_accepted, rx_drop_full, rx_drop_nomatch;
  flow_key_t rx_key = '0;
  logic [DESC_W-1:0] rx_desc = '0;
  logic [NV-1:0] rx_delivered, vpp_fault;
  logic [NV-1:0] tx_valid = '0, tx_ready;
  logic [DESC_W-1:0] tx_desc [NV];
  logic wire_ready = 0, wire_valid;
  logic [DESC_W-1:0] wire_desc;
  logic [3:0] wire_vpp;
  logic [NV-1:0] dma_valid = '0, dma_to_host = '0, dma_ok, dma_err;
  logic [VA_W-1:0] dma_nic_va [NV], dma_host_va [NV];
  pa_t dma_nic_pa [NV], dma_host_pa [NV];
  logic bus_req, bus_we, bus_issue_window, bus_rvalid;
  pa_t bus_addr;
  word_t bus_wdata, bus_rdata, rd_data;
  logic [CLW-1:0] bus_tag, bus_rtag;
  nf_id_t bus_dom;
  logic [NCL-1:0] rd_valid;

  snic_top #(.NUM_CORES(NC), .CORE_TLB(CT), .OS_TLB(4), .ACL_CLUSTERS(ACLC),
             .DPI_TLB(4), .ZIP_TLB(4), .RAID_TLB(2), .RX_DEPTH(8), .TX_DEPTH(8),
             .RING_SLOTS(8), .EPOCH(16), .DEAD(4), .HASH_WORDS_LOG2(HW)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters
  typedef enum int {
    M_LAUNCH, M_REFUSE, M_ATTEST, M_TEARDOWN, M_SCRUB, M_OS_DENY, M_OS_ALLOW,
    M_CORE_ACCESS, M_CORE_FAULT, M_DEAD_HOLD, M_DOMAIN_HOLD, M_RX_ACCEPT,
    M_RX_FULL, M_RX_NOMATCH, M_VPP_DELIVER, M_TX_BACKPRESSURE, M_TX_WIRE,
    M_ACC_ACK, M_ACC_FAULT, M_DMA_OK, M_DMA_ERR, M_FAULT_KILL, M_N
  } mech_e;
  int cnt [M_N];
  initial foreach (cnt[i]) cnt[i] = 0;

  // ---------------- DRAM model: tmem and bus share one memory
  word_t mem [logic [PA_W-4:0]];
  function automatic word_t rd(pa_t a);
    return mem.exists(a[PA_W-1:3]) ? mem[a[PA_W-1:3]] : {32'hFACE_0000 | 32'(a[PA_W-1:3]), ~32'(a)};
  endfunction
  logic [1:0] tp, bp;
  word_t td [2], bd [2];
  logic [CLW-1:0] bt [2];
  always @(posedge clk) begin
    tp <= {tp[0], 1'b0}; td[1] <= td[0];
    bp <= {bp[0], 1'b0}; bd[1] <= bd[0]; bt[1] <= bt[0];
    if (tmem_req && tmem_gnt) begin
      if (tmem_we) mem[tmem_addr[PA_W-1:3]] = tmem_wdata;
      else begin tp[0] <= 1'b1; td[0] <= rd(tmem_addr); end
    end
    if (bus_req) begin
      if (bus_we) mem[bus_addr[PA_W-1:3]] = bus_wdata;
      else begin bp[0] <= 1'b1; bd[0] <= rd(bus_addr); bt[0] <= bus_tag; end
    end
  end
  assign tmem_rvalid = tp[1];
  assign tmem_rdata  = td[1];
  assign bus_rvalid  = bp[1];
  assign bus_rdata   = bd[1];
  assign bus_rtag    = bt[1];

  // ---------------- reference ownership, kept by the testbench
  int page_nf [4096];
  int core_nf [NC];
  initial begin
    foreach (page_nf[i]) page_nf[i] = 0;
    foreach (core_nf[i]) core_nf[i] = 0;
  end

  // ---------------- bus monitor
  always @(negedge clk) if (rst_n) begin
    if (bus_req) begin
      check(bus_issue_window, "bus issue inside dead time");
      if (int'(bus_tag) == C_OS)
        check(bus_dom == '0 && page_nf[bus_addr[PA_W-1:PAGE_SHIFT]] == 0, "NIC OS access to a free page in its epoch");
      else begin
        check(bus_dom != '0 && page_nf[bus_addr[PA_W-1:PAGE_SHIFT]] == int'(bus_dom),
              $sformatf("client %0d touches page %0d in domain %0d", bus_tag, bus_addr[PA_W-1:PAGE_SHIFT], bus_dom));
        if (int'(bus_tag) < NC) check(int'(bus_dom) == core_nf[bus_tag], "core granted in its function's epoch");
      end
    end
    for (int c = 0; c < NC; c++) if (core_req[c] && !core_err[c] && !core_gnt[c]) begin
      if (!bus_issue_window) cnt[M_DEAD_HOLD]++;
      else if (int'(bus_dom) != core_nf[c]) cnt[M_DOMAIN_HOLD]++;
    end
    if (rx_accepted) cnt[M_RX_ACCEPT]++;
    if (rx_drop_full) cnt[M_RX_FULL]++;
    if (rx_drop_nomatch) cnt[M_RX_NOMATCH]++;
    cnt[M_VPP_DELIVER] += $countones(rx_delivered);
    if (tx_valid != '0 && (tx_valid & ~tx_ready) != '0) cnt[M_TX_BACKPRESSURE]++;
    if (wire_valid && wire_ready) cnt[M_TX_WIRE]++;
    for (int k = 0; k < 3; k++) cnt[M_ACC_ACK] += $countones(acc_ack[k]);
    cnt[M_DMA_OK]  += $countones(dma_ok);
    cnt[M_DMA_ERR] += $countones(dma_err);
    if (os_inst_ok) cnt[M_OS_ALLOW]++;
    if (os_inst_rej) cnt[M_OS_DENY]++;
    if (scrub_cores != '0) cnt[M_SCRUB]++;
    if (kill_valid) cnt[M_FAULT_KILL]++;
  end

  // ---------------- helpers
  function automatic word_t pte(int v, int p);
    return {1'b1, 20'd0, 11'(v), 20'd0, 12'(p)};
  endfunction

  task automatic put_nf(pa_t ptp, int vpns[], int ppns[], pa_t cfp, int rxq, int txq,
                        int vni, int ring_vpn, int ring_off, output logic [63:0] msg[$]);
    msg.delete();
    foreach (ppns[i]) begin
      mem[(ptp >> 3) + i] = pte(vpns[i], ppns[i]);
      msg.push_back(mem[(ptp >> 3) + i]);
    end
    mem[(cfp >> 3) + 0] = {32'd0, 16'(txq), 16'(rxq)};
    mem[(cfp >> 3) + 1] = '0;
    mem[(cfp >> 3) + 2] = 64'(vni);
    mem[(cfp >> 3) + 3] = '0;
    mem[(cfp >> 3) + 4] = 64'h00FF_FFFF;
    mem[(cfp >> 3) + 5] = pte(40, 900);
    mem[(cfp >> 3) + 6] = pte(41, 901);
    mem[(cfp >> 3) + 7] = {32'd0, 11'(ring_vpn), 21'(ring_off)};
    for (int k = 0; k < 8; k++) msg.push_back(mem[(cfp >> 3) + k]);
    foreach (ppns[i]) for (int w = 0; w < (1 << HW); w++)
      msg.push_back(rd({12'(ppns[i]), 21'(w * 8)}));
  endtask

  task automatic issue(nf_op_e op, logic [NC-1:0] cores, pa_t ptp, int cnt_, pa_t cfp,
                       logic [NACL-1:0] acls, nf_id_t nf, output bit ok, output nf_id_t id,
                       output logic [255:0] h);
    while (cmd_busy) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_core_mask = cores; cmd_pt_ptr = ptp;
    cmd_pt_count = tlb_idx_t'(cnt_); cmd_cfg_ptr = cfp; cmd_accel_mask = acls; cmd_nf = nf;
    @(negedge clk);
    cmd_valid = 0;
    while (!resp_valid) @(negedge clk);
    ok = resp_ok; id = resp_nf; h = resp_hash;
  endtask

  task automatic os_install(int idx, int vpn, int ppn, bit exp);
    os_inst_valid = 1; os_inst_idx = tlb_idx_t'(idx); os_inst_vpn = vpn_t'(vpn); os_inst_ppn = ppn_t'(ppn);
    #1;
    check(os_inst_ok == exp && os_inst_rej == !exp, $sformatf("OS install of page %0d", ppn));
    @(negedge clk);
    os_inst_valid = 0;
  endtask

  // one core access; returns err if the address does not translate
  task automatic core_access(int c, bit we, logic [VA_W-1:0] va, word_t wd,
                             output bit err, output word_t data);
    core_req[c] = 1; core_we[c] = we; core_va[c] = va; core_wdata[c] = wd;
    #1;
    err = core_err[c];
    if (!err) begin
      while (!core_gnt[c]) begin @(negedge clk); #1; end
      cnt[M_CORE_ACCESS]++;
    end else cnt[M_CORE_FAULT]++;
    @(negedge clk);
    core_req[c] = 0;
    if (!err && !we) begin
      while (!rd_valid[c]) @(negedge clk);
      data = rd_data;
    end
  endtask

  task automatic acc_access(int k, int cl, logic [VA_W-1:0] va, output bit err);
    acc_req[k][cl] = 1; acc_va[k][cl] = va;
    #1;
    while (!acc_ack[k][cl] && !acc_err[k][cl]) begin @(negedge clk); #1; end
    err = acc_err[k][cl];
    @(negedge clk);
    acc_req[k][cl] = 0;
    if (err && acc_fault[k][cl]) cnt[M_ACC_FAULT]++;
  endtask

  task automatic send_pkt(int vni, logic [63:0] d);
    rx_valid = 1; rx_key = '0; rx_key.vni = 24'(vni); rx_desc = d;
    @(negedge clk);
    rx_valid = 0;
  endtask

  initial begin
    logic [63:0] m1[$], m2[$], mx[$];
    bit ok, err;
    nf_id_t id;
    logic [255:0] h, h1;
    word_t d;
    for (int k = 0; k < 3; k++) begin acc_req[k] = '0; foreach (acc_va[k][i]) acc_va[k][i] = '0; end
    foreach (core_va[i]) begin core_va[i] = '0; core_wdata[i] = '0; end
    foreach (tx_desc[i]) tx_desc[i] = '0;
    foreach (dma_nic_va[i]) begin dma_nic_va[i] = '0; dma_host_va[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cmd_busy, "busy while the ownership table clears");
    while (cmd_busy) @(negedge clk);

    os_install(0, 30, 30, 1);

    // ---- launch two functions
    put_nf(33'h1000, '{1, 2, 3}, '{10, 11, 12}, 33'h2000, 2, 2, 101, 1, 'h100, m1);
    issue(OP_LAUNCH, 4'b0011, 33'h1000, 3, 33'h2000, 6'b00_00_01, '0, ok, id, h1);
    check(ok && id == 4'd1 && h1 == sha256_words(m1), "launch 1 with correct hash");
    if (ok) begin cnt[M_LAUNCH]++; page_nf[10] = 1; page_nf[11] = 1; page_nf[12] = 1; core_nf[0] = 1; core_nf[1] = 1; end
    put_nf(33'h3000, '{5, 6}, '{20, 21}, 33'h4000, 4, 3, 202, 5, 'h200, m2);
    issue(OP_LAUNCH, 4'b0100, 33'h3000, 2, 33'h4000, 6'b00_01_00, '0, ok, id, h);
    check(ok && id == 4'd2 && h == sha256_words(m2), "launch 2 with correct hash");
    if (ok) begin cnt[M_LAUNCH]++; page_nf[20] = 2; page_nf[21] = 2; core_nf[2] = 2; end
    put_nf(33'h5000, '{1}, '{40}, 33'h6000, 1, 1, 303, 1, 0, mx);
    issue(OP_LAUNCH, 4'b1010, 33'h5000, 1, 33'h6000, '0, '0, ok, id, h);
    check(!ok, "launch on a taken core refused");
    if (!ok) cnt[M_REFUSE]++;
    issue(OP_ATTEST, '0, '0, 0, '0, '0, 4'd1, ok, id, h);
    check(ok && h == h1, "attest function 1");
    if (ok) cnt[M_ATTEST]++;

    // ---- NIC OS denylist
    os_install(1, 11, 11, 0);
    os_install(2, 20, 20, 0);
    os_install(1, 31, 31, 1);
    os_req = 1; os_we = 1; os_va = {11'd31, 21'h10}; os_wdata = 64'h05;
    while (!os_gnt) @(negedge clk);
    @(negedge clk); os_req = 0;
    check(rd({12'd31, 21'h10}) == 64'h05, "NIC OS write reached its own page");
    os_va = {11'd11, 21'h0}; os_req = 1; #1;
    check(os_err, "NIC OS cannot reach a function page");
    @(negedge clk); os_req = 0;

    // ---- cores, only through their locked TLBs and in their epoch
    core_access(0, 1, {11'd2, 21'h40}, 64'hAAAA_0001, err, d);
    check(!err && rd({12'd11, 21'h40}) == 64'hAAAA_0001, "core 0 write lands in page 11");
    core_access(1, 0, {11'd2, 21'h40}, '0, err, d);
    check(!err && d == 64'hAAAA_0001, "core 1 reads it back");
    core_access(2, 0, {11'd6, 21'h8}, '0, err, d);
    check(!err && d == rd({12'd21, 21'h8}), "core 2 reads its own page");
    core_access(3, 0, {11'd1, 21'h0}, '0, err, d);
    check(err && core_fault[3], "an unallocated core translates nothing");
    check(!core_fault[0], "fault flags are per core");

    // ---- accelerators
    acc_access(0, 0, {11'd3, 21'h80}, err);
    check(!err, "DPI cluster 0 serves function 1");
    acc_access(1, 0, {11'd5, 21'h0}, err);
    check(!err, "ZIP cluster 0 serves function 2");
    acc_access(0, 1, {11'd1, 21'h0}, err);
    check(err, "an unallocated DPI cluster faults");

    // ---- packets: function 1 has an RX share of 2, function 2 of 4
    for (int i = 0; i < 6; i++) send_pkt(101, 64'h1100 + i);
    for (int i = 0; i < 3; i++) send_pkt(202, 64'h2200 + i);
    send_pkt(999, 64'h9999);
    check(cnt[M_RX_FULL] > 0 && cnt[M_RX_NOMATCH] == 1, "share overflow and unmatched packet dropped");
    repeat (800) @(negedge clk);
    check(cnt[M_VPP_DELIVER] == cnt[M_RX_ACCEPT], "every accepted packet delivered");
    check(dut.u_vpp.widx[1] == 3 && rd({12'd20, 21'h210}) == 64'h2202, "function 2 ring holds its descriptors");
    check(rd({12'd10, 21'h100}) == 64'h1100, "function 1 ring holds its first descriptor");

    // ---- TX: share of 2 for function 1, wire held back first
    for (int i = 0; i < 4; i++) begin
      tx_valid[0] = 1; tx_desc[0] = 64'h7700 + i;
      @(negedge clk);
    end
    tx_valid[0] = 0;
    check(cnt[M_TX_BACKPRESSURE] > 0, "TX share exhausted");
    wire_ready = 1;
    repeat (10) begin
      @(negedge clk);
    end
    wire_ready = 0;
    check(cnt[M_TX_WIRE] == 2, "only the two accepted descriptors leave");

    // ---- DMA banks
    dma_valid[0] = 1; dma_to_host[0] = 1; dma_nic_va[0] = {11'd1, 21'h18}; dma_host_va[0] = {11'd41, 21'h20};
    #1;
    check(dma_ok[0] && dma_nic_pa[0] == {12'd10, 21'h18} && dma_host_pa[0] == {12'd901, 21'h20}, "DMA within function 1");
    @(negedge clk);
    dma_nic_va[0] = {11'd3, 21'h0};
    #1;
    check(dma_err[0], "DMA bank holds only the first two pages");
    @(negedge clk);
    dma_valid[0] = 0;
    dma_valid[5] = 1; dma_nic_va[5] = {11'd1, 21'h0}; dma_host_va[5] = {11'd40, 21'h0};
    #1;
    check(dma_err[5], "an unallocated DMA bank refuses");
    @(negedge clk);
    dma_valid[5] = 0;

    // ---- teardown of function 1
    issue(OP_TEARDOWN, '0, '0, 0, '0, '0, 4'd1, ok, id, h);
    check(ok, "teardown 1");
    if (ok) begin cnt[M_TEARDOWN]++; page_nf[10] = 0; page_nf[11] = 0; page_nf[12] = 0; core_nf[0] = 0; core_nf[1] = 0; end
    for (int p = 10; p <= 12; p++) for (int w = 0; w < (1 << HW); w++)
      check(rd({12'(p), 21'(w * 8)}) == '0, "function 1 page scrubbed");
    check(core_alloc == 4'b0100, "cores returned");
    os_install(3, 11, 11, 1);
    core_access(0, 0, {11'd2, 21'h40}, '0, err, d);
    check(err, "torn-down core translates nothing");
    send_pkt(101, 64'h1);
    check(cnt[M_RX_NOMATCH] == 2, "torn-down function's rule removed");
    issue(OP_ATTEST, '0, '0, 0, '0, '0, 4'd1, ok, id, h);
    check(!ok, "attest after teardown fails");
    core_access(2, 0, {11'd5, 21'h0}, '0, err, d);
    check(!err, "function 2 unaffected");

    // ---- a translation miss is fatal: function 2 names function 1's
    // address space and is destroyed without the NIC OS asking
    core_access(2, 0, {11'd2, 21'h40}, '0, err, d);
    check(err && core_fault[2], "core 2 cannot name function 1's address");
    check(cmd_busy, "controller reserved for the fatal teardown");
    while (!kill_valid) @(negedge clk);
    check(kill_nf == 4'd2, "function 2 destroyed");
    page_nf[20] = 0; page_nf[21] = 0; core_nf[2] = 0;
    check(core_alloc == '0 && acl_alloc == '0, "its core and cluster freed");
    check(rd({12'd20, 21'd0}) == '0 && rd({12'd21, 21'h18}) == '0, "its pages scrubbed");
    os_install(3, 20, 20, 1);
    acc_access(1, 0, {11'd5, 21'h0}, err);
    check(err, "its ZIP cluster translates nothing");
    issue(OP_ATTEST, '0, '0, 0, '0, '0, 4'd2, ok, id, h);
    check(!ok, "attest of a destroyed function fails");
    repeat (20) @(negedge clk);

    for (int i = 0; i < M_N; i++) begin
      mech_e m;
      m = mech_e'(i);
      $display("mechanism %-18s count %0d", m.name(), cnt[i]);
      check(cnt[i] > 0, $sformatf("mechanism %s never happened", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
