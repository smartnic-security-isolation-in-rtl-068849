// tb_snic_full: one complete launch, use and teardown at full size.
//
// snic_top at its default sizes (48 cores with 183-entry TLBs, 16 clusters
// per accelerator, 12 virtual NICs, whole 2 MB pages hashed at launch). A
// one-page network function is launched on core 5 and DPI cluster 3: the
// controller reads its page table and configuration, hashes the whole page
// (262,144 words) and locks the TLBs. The launch hash is compared with a
// reference SHA-256 computed here from the same memory contents. The core
// then writes and reads its page through the arbitrated bus, an RX packet
// is delivered to its ring, the NIC OS is refused the page, and teardown
// zeroes all of it. The DRAM model returns a fixed function of the address
// for words never written, so nothing needs to be loaded.
module tb_snic_full;
  import snic_pkg::*;
  import tb_sha256_pkg::*;

  localparam int NC = 48, ACLC = 16, NV = MAX_NF, NACL = 3 * ACLC, NCL = NC + 4 + NV;
  localparam int CLW = $clog2(NCL), PW = 1 << (PAGE_SHIFT - 3);

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
  logic wire_ready = 1, wire_valid;
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

  snic_top dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // DRAM model: written words in an associative array, others computed
  word_t mem [logic [PA_W-4:0]];
  function automatic word_t rd(pa_t a);
    return mem.exists(a[PA_W-1:3]) ? mem[a[PA_W-1:3]] : {32'h5EED_0000 ^ 32'(a[PA_W-1:3]), 32'(a) * 32'd2654435761};
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

  always @(negedge clk) if (rst_n && bus_req)
    check(bus_issue_window && (int'(bus_tag) != 5 || bus_dom == 4'd1), "core 5 granted only in its epoch");

  initial begin
    logic [63:0] msg[$];
    logic [255:0] h;
    int t0;
    bit zero;
    for (int k = 0; k < 3; k++) begin acc_req[k] = '0; foreach (acc_va[k][i]) acc_va[k][i] = '0; end
    foreach (core_va[i]) begin core_va[i] = '0; core_wdata[i] = '0; end
    foreach (tx_desc[i]) tx_desc[i] = '0;
    foreach (dma_nic_va[i]) begin dma_nic_va[i] = '0; dma_host_va[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (cmd_busy) @(negedge clk);

    // page table: VA page 7 -> PA page 1000; configuration: shares 8/8,
    // VNI 77, ring at the start of the page
    mem[33'h1000 >> 3] = {1'b1, 20'd0, 11'd7, 20'd0, 12'd1000};
    mem[(33'h2000 >> 3) + 0] = {32'd0, 16'd8, 16'd8};
    mem[(33'h2000 >> 3) + 1] = '0;
    mem[(33'h2000 >> 3) + 2] = 64'd77;
    mem[(33'h2000 >> 3) + 3] = '0;
    mem[(33'h2000 >> 3) + 4] = 64'h00FF_FFFF;
    mem[(33'h2000 >> 3) + 5] = {1'b1, 20'd0, 11'd50, 20'd0, 12'd3000};
    mem[(33'h2000 >> 3) + 6] = {1'b1, 20'd0, 11'd51, 20'd0, 12'd3001};
    mem[(33'h2000 >> 3) + 7] = {32'd0, 11'd7, 21'd0};
    msg.push_back(mem[33'h1000 >> 3]);
    for (int k = 0; k < 8; k++) msg.push_back(mem[(33'h2000 >> 3) + k]);
    for (int w = 0; w < PW; w++) msg.push_back(rd({12'd1000, 21'(w * 8)}));

    cmd_valid = 1; cmd_op = OP_LAUNCH; cmd_core_mask = NC'(1) << 5;
    cmd_pt_ptr = 33'h1000; cmd_pt_count = 1; cmd_cfg_ptr = 33'h2000;
    cmd_accel_mask = NACL'(1) << 3;
    @(negedge clk);
    cmd_valid = 0;
    t0 = 0;
    while (!resp_valid) begin @(negedge clk); t0++; end
    $display("full-page launch took %0d cycles", t0);
    check(resp_ok && resp_nf == 4'd1, "launch accepted");
    check(resp_hash == sha256_words(msg), "launch hash over a whole 2 MB page");
    check(core_alloc == NC'(1) << 5 && acl_alloc == NACL'(1) << 3, "allocation");

    // core 5 writes then reads its page
    core_req[5] = 1; core_we[5] = 1; core_va[5] = {11'd7, 21'h1F8}; core_wdata[5] = 64'hC0FFEE;
    while (!core_gnt[5]) @(negedge clk);
    @(negedge clk);
    core_we[5] = 0;
    while (!core_gnt[5]) @(negedge clk);
    @(negedge clk);
    core_req[5] = 0;
    while (!rd_valid[5]) @(negedge clk);
    check(rd_data == 64'hC0FFEE, "core 5 reads back its write");
    core_req[0] = 1; core_va[0] = {11'd7, 21'h0};
    #1 check(core_err[0], "core 0 has no translation");
    @(negedge clk); core_req[0] = 0;

    // one RX packet delivered into the ring
    rx_valid = 1; rx_key.vni = 24'd77; rx_desc = 64'hD00D;
    @(negedge clk);
    rx_valid = 0;
    while (!rx_delivered[0]) @(negedge clk);
    repeat (2) @(negedge clk);
    check(rd({12'd1000, 21'd0}) == 64'hD00D, "RX descriptor in the function's ring");

    // the NIC OS may not map the page
    os_inst_valid = 1; os_inst_ppn = 12'd1000; os_inst_vpn = 11'd7;
    #1 check(os_inst_rej, "NIC OS refused the function's page");
    @(negedge clk); os_inst_valid = 0;

    // teardown zeroes the whole page
    cmd_valid = 1; cmd_op = OP_TEARDOWN; cmd_nf = 4'd1;
    @(negedge clk);
    cmd_valid = 0;
    while (!resp_valid) @(negedge clk);
    check(resp_ok, "teardown");
    zero = 1;
    for (int w = 0; w < PW; w++) if (rd({12'd1000, 21'(w * 8)}) != '0) zero = 0;
    check(zero, "whole page zeroed");
    check(core_alloc == '0 && acl_alloc == '0, "everything freed");
    os_inst_valid = 1;
    #1 check(os_inst_ok, "page returned to the NIC OS");
    @(negedge clk); os_inst_valid = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
