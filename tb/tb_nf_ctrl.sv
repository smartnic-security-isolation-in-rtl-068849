// tb_nf_ctrl: runs the trusted instructions against a DRAM model.
//
// Scaled down: 8 cores, 6 accelerator clusters, 8-entry core TLBs, 64
// physical pages, buffer pools of 10 packets, 4 hashed words per page. The
// DRAM model answers reads two cycles after a request and grants at random.
// Every TLB write, lock and clear the controller broadcasts is recorded per
// target and compared with what the launch arguments ask for; the launch
// hash is compared with a reference SHA-256 of page table, configuration
// and page contents. Covers: a good launch; refusals for a taken core, an
// owned page, an invalid entry and an exhausted buffer pool (each leaving
// all state unchanged); a second launch; attest; teardown with scrubbing;
// a repeated teardown; relaunch on scrubbed pages.
module tb_nf_ctrl;
  import snic_pkg::*;
  import tb_sha256_pkg::*;

  localparam int NCORE = 8, NACL = 6, PTM = 8, HW = 2, NPG = 64;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0;
  nf_op_e cmd_op = OP_LAUNCH;
  logic [NCORE-1:0] cmd_core_mask = '0;
  pa_t cmd_pt_ptr = '0, cmd_cfg_ptr = '0;
  tlb_idx_t cmd_pt_count = '0;
  logic [NACL-1:0] cmd_accel_mask = '0;
  nf_id_t cmd_nf = '0;
  logic busy, resp_valid, resp_ok;
  nf_id_t resp_nf, cfg_nf;
  logic [255:0] resp_hash;
  logic m_req, m_we, m_gnt = 0, m_rvalid;
  pa_t m_addr;
  word_t m_wdata, m_rdata;
  logic tlb_we, tlb_lock, tlb_clear, dma_host;
  tlb_idx_t tlb_idx;
  tlb_entry_t tlb_entry;
  logic [NCORE-1:0] sel_core, scrub_cores, core_alloc;
  logic [NACL-1:0] sel_acl, acl_alloc;
  logic [MAX_NF-1:0] sel_vpp, sel_dma;
  logic pp_we, pp_clr;
  logic [3:0] pp_vpp;
  flow_key_t pp_key, pp_mask;
  logic [15:0] pp_rx_quota, pp_tx_quota;
  logic [VA_W-1:0] pp_ring_va;
  logic mi_valid = 0, mi_ok;
  ppn_t mi_ppn = '0;
  int checks = 0, failures = 0, tlb_writes = 0;

  nf_ctrl #(.NUM_CORES(NCORE), .NUM_ACL(NACL), .PT_MAX(PTM), .RX_POOL(10), .TX_POOL(10),
            .QUOTA_MAX(8), .HASH_WORDS_LOG2(HW), .N_PAGES(NPG)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- DRAM model
  word_t mem [logic [PA_W-4:0]];
  function automatic word_t rd(pa_t a);
    return mem.exists(a[PA_W-1:3]) ? mem[a[PA_W-1:3]] : {32'hC0DE_0000 | 32'(a[PA_W-1:3]), ~32'(a)};
  endfunction
  logic [1:0] pend;
  word_t pend_data [2];
  always @(negedge clk) m_gnt = $urandom_range(3) != 0;
  always @(posedge clk) begin
    pend <= {pend[0], 1'b0};
    pend_data[1] <= pend_data[0];
    if (m_req && m_gnt) begin
      if (m_we) mem[m_addr[PA_W-1:3]] = m_wdata;
      else begin pend[0] <= 1'b1; pend_data[0] <= rd(m_addr); end
    end
  end
  assign m_rvalid = pend[1];
  assign m_rdata  = pend_data[1];

  // ---------------- record what the controller configures
  tlb_entry_t core_tlb [NCORE][PTM], acl_tlb [NACL][PTM], vpp_tlb [MAX_NF][PTM], dmah_tlb [MAX_NF][2];
  bit core_lk [NCORE], acl_lk [NACL];
  int pp_we_cnt = 0, pp_clr_cnt = 0;
  logic [3:0] last_vpp;
  logic [15:0] last_rx, last_tx;
  logic [NCORE-1:0] last_scrub = '0;
  always @(posedge clk) if (rst_n) begin
    if (tlb_we) begin
      tlb_writes++;
      for (int c = 0; c < NCORE; c++) if (sel_core[c]) core_tlb[c][tlb_idx] = tlb_entry;
      for (int a = 0; a < NACL; a++)  if (sel_acl[a])  acl_tlb[a][tlb_idx]  = tlb_entry;
      for (int v = 0; v < MAX_NF; v++) if (sel_vpp[v] && !dma_host) vpp_tlb[v][tlb_idx] = tlb_entry;
      for (int v = 0; v < MAX_NF; v++) if (sel_dma[v] && dma_host) dmah_tlb[v][tlb_idx] = tlb_entry;
    end
    if (tlb_lock) begin
      for (int c = 0; c < NCORE; c++) if (sel_core[c]) core_lk[c] = 1;
      for (int a = 0; a < NACL; a++)  if (sel_acl[a])  acl_lk[a]  = 1;
    end
    if (tlb_clear) begin
      for (int c = 0; c < NCORE; c++) if (sel_core[c]) begin core_lk[c] = 0; core_tlb[c][0] = '0; end
      for (int a = 0; a < NACL; a++)  if (sel_acl[a])  acl_lk[a] = 0;
    end
    if (pp_we) begin pp_we_cnt++; last_vpp = pp_vpp; last_rx = pp_rx_quota; last_tx = pp_tx_quota; end
    if (pp_clr) pp_clr_cnt++;
    if (scrub_cores != '0) last_scrub = scrub_cores;
  end

  // ---------------- helpers
  function automatic word_t pte(int v, int p, bit valid = 1);
    return {valid, 20'd0, 11'(v), 20'd0, 12'(p)};
  endfunction

  task automatic put_launch(pa_t ptp, int vpns[], int ppns[], pa_t cfp, int rxq, int txq,
                            output logic [63:0] msg[$]);
    msg.delete();
    foreach (ppns[i]) begin
      mem[(ptp >> 3) + i] = pte(vpns[i], ppns[i]);
      msg.push_back(mem[(ptp >> 3) + i]);
    end
    mem[(cfp >> 3) + 0] = {32'd0, 16'(txq), 16'(rxq)};
    mem[(cfp >> 3) + 1] = 64'h0A00_0001_0A00_0002;
    mem[(cfp >> 3) + 2] = 64'h0650_0000_0050_0000;
    mem[(cfp >> 3) + 3] = 64'hFFFF_FFFF_FFFF_FFFF;
    mem[(cfp >> 3) + 4] = 64'hFFFF_FFFF_FF00_0000;
    mem[(cfp >> 3) + 5] = pte(40, 900);
    mem[(cfp >> 3) + 6] = pte(41, 901);
    mem[(cfp >> 3) + 7] = {32'd0, 11'(vpns[0]), 21'h100};
    for (int k = 0; k < 8; k++) msg.push_back(mem[(cfp >> 3) + k]);
    foreach (ppns[i]) for (int w = 0; w < (1 << HW); w++)
      msg.push_back(rd({12'(ppns[i]), 21'(w * 8)}));
  endtask

  task automatic issue(nf_op_e op, logic [NCORE-1:0] cores, pa_t ptp, int cnt, pa_t cfp,
                       logic [NACL-1:0] acls, nf_id_t nf, output bit ok, output nf_id_t id,
                       output logic [255:0] h, output int cycles);
    while (busy) @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_core_mask = cores; cmd_pt_ptr = ptp;
    cmd_pt_count = tlb_idx_t'(cnt); cmd_cfg_ptr = cfp; cmd_accel_mask = acls; cmd_nf = nf;
    @(negedge clk);
    cmd_valid = 0;
    cycles = 1;
    while (!resp_valid) begin @(negedge clk); cycles++; end
    ok = resp_ok; id = resp_nf; h = resp_hash;
  endtask

  task automatic os_check(int p, bit exp, string what);
    mi_valid = 1; mi_ppn = ppn_t'(p);
    #1;
    check(mi_ok == exp, what);
    mi_valid = 0;
  endtask

  initial begin
    logic [63:0] msgA[$], msgB[$], msgX[$];
    bit ok;
    nf_id_t id, idA;
    logic [255:0] h, hA;
    int cyc, w0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(busy, "busy while the ownership table clears");

    // ---- launch A: cores 0-1, DPI cluster 0, pages 10-12
    put_launch(33'h1000, '{1, 2, 3}, '{10, 11, 12}, 33'h2000, 3, 4, msgA);
    issue(OP_LAUNCH, 8'b0000_0011, 33'h1000, 3, 33'h2000, 6'b000001, '0, ok, idA, hA, cyc);
    check(ok && idA == 4'd1, "launch A succeeds as function 1");
    check(hA == sha256_words(msgA), "launch A hash");
    check(core_alloc == 8'b11 && acl_alloc == 6'b1, "A's cores and cluster allocated");
    for (int c = 0; c < 2; c++) for (int i = 0; i < 3; i++)
      check(core_tlb[c][i] == '{valid: 1'b1, vpn: vpn_t'(i + 1), ppn: ppn_t'(10 + i)}, "core TLB entry");
    for (int i = 0; i < 3; i++) check(acl_tlb[0][i].ppn == ppn_t'(10 + i), "cluster TLB entry");
    check(vpp_tlb[0][2].ppn == ppn_t'(12), "pipeline TLB entry");
    check(dmah_tlb[0][0].ppn == ppn_t'(900) && dmah_tlb[0][1].ppn == ppn_t'(901), "host DMA entries");
    check(core_lk[0] && core_lk[1] && !core_lk[2] && acl_lk[0] && !acl_lk[1], "locked the right TLBs");
    check(pp_we_cnt == 1 && last_vpp == 4'd0 && last_rx == 16'd3 && last_tx == 16'd4, "pipeline configured");
    check(pp_ring_va == {11'd1, 21'h100}, "ring address");
    os_check(11, 0, "OS may not map A's page");
    os_check(13, 1, "OS may map a free page");

    // ---- refusals, none of which may change anything
    w0 = tlb_writes;
    put_launch(33'h3000, '{1}, '{20}, 33'h4000, 1, 1, msgX);
    issue(OP_LAUNCH, 8'b0000_0101, 33'h3000, 1, 33'h4000, '0, '0, ok, id, h, cyc);
    check(!ok, "core 0 already taken");
    put_launch(33'h3000, '{1, 2}, '{20, 12}, 33'h4000, 1, 1, msgX);
    issue(OP_LAUNCH, 8'b0000_1100, 33'h3000, 2, 33'h4000, '0, '0, ok, id, h, cyc);
    check(!ok, "page 12 already owned");
    mem[33'h3000 >> 3] = pte(1, 20, 0);
    issue(OP_LAUNCH, 8'b0000_1100, 33'h3000, 1, 33'h4000, '0, '0, ok, id, h, cyc);
    check(!ok, "invalid page-table entry");
    put_launch(33'h3000, '{1}, '{20}, 33'h4000, 8, 1, msgX);
    issue(OP_LAUNCH, 8'b0000_1100, 33'h3000, 1, 33'h4000, '0, '0, ok, id, h, cyc);
    check(!ok, "RX pool exhausted (3 + 8 > 10)");
    issue(OP_LAUNCH, 8'b0000_1100, 33'h3000, 9, 33'h4000, '0, '0, ok, id, h, cyc);
    check(!ok, "page table longer than the TLB");
    check(tlb_writes == w0 && core_alloc == 8'b11, "refusals leave no trace");
    os_check(20, 1, "refused launch did not take its page");

    // ---- launch B
    put_launch(33'h3000, '{5, 6}, '{20, 21}, 33'h4000, 2, 2, msgB);
    issue(OP_LAUNCH, 8'b0000_1100, 33'h3000, 2, 33'h4000, 6'b000110, '0, ok, id, h, cyc);
    check(ok && id == 4'd2, "launch B succeeds as function 2");
    check(h == sha256_words(msgB), "launch B hash");
    check(core_alloc == 8'b1111 && acl_alloc == 6'b111, "allocation after B");
    $display("launch of a 2-page function took %0d cycles", cyc);

    // ---- attest
    issue(OP_ATTEST, '0, '0, 0, '0, '0, 4'd1, ok, id, h, cyc);
    check(ok && h == hA, "attest returns A's launch hash");
    issue(OP_ATTEST, '0, '0, 0, '0, '0, 4'd5, ok, id, h, cyc);
    check(!ok, "attest of a dead function fails");

    // ---- teardown A
    mem[{12'd11, 18'd0}] = 64'h1234;                // A wrote into its page
    issue(OP_TEARDOWN, '0, '0, 0, '0, '0, 4'd1, ok, id, h, cyc);
    check(ok, "teardown A");
    for (int p = 10; p <= 12; p++) for (int w = 0; w < (1 << HW); w++)
      check(rd({12'(p), 21'(w * 8)}) == '0, $sformatf("page %0d word %0d scrubbed", p, w));
    check(rd({12'd20, 21'd0}) != '0, "B's page untouched");
    os_check(11, 1, "scrubbed page returned to the OS");
    os_check(20, 0, "B's page still denied");
    check(core_alloc == 8'b1100 && acl_alloc == 6'b110, "A's cores and cluster freed");
    check(!core_lk[0] && !core_lk[1] && core_lk[2] && !acl_lk[0], "A's TLBs cleared, B's kept");
    check(last_scrub == 8'b0011 && pp_clr_cnt == 1, "core scrub and pipeline removal");
    issue(OP_TEARDOWN, '0, '0, 0, '0, '0, 4'd1, ok, id, h, cyc);
    check(!ok, "second teardown of A fails");

    // ---- relaunch on the scrubbed pages takes the lowest free id
    put_launch(33'h1000, '{1, 2, 3}, '{10, 11, 12}, 33'h2000, 3, 4, msgA);
    issue(OP_LAUNCH, 8'b0000_0011, 33'h1000, 3, 33'h2000, 6'b000001, '0, ok, id, h, cyc);
    check(ok && id == 4'd1 && h == sha256_words(msgA) && h != hA, "relaunch hashes the zeroed pages");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
