// tb_vaccel: a 4-cluster accelerator with 6-entry TLB banks. Clusters 0 and
// 2 are given different functions' pages and locked, cluster 1 is left
// empty. All clusters request continuously with random addresses; the test
// checks that a cluster is served only in its own time slot (one slot per
// cycle, rotating), that the physical address is its own function's
// translation, that a request outside its mapping is refused and faults,
// and that every requesting cluster gets exactly one issue per NUM_CLUSTERS
// cycles whatever the others do (reserved bandwidth).
module tb_vaccel;
  import snic_pkg::*;
  localparam int NC = 4, NT = 6;
  logic clk = 0, rst_n = 0;
  logic [NC-1:0] cfg_sel = '0;
  logic cfg_we = 0, cfg_lock = 0, cfg_clear = 0;
  tlb_idx_t cfg_idx = '0;
  tlb_entry_t cfg_entry = '0;
  logic [NC-1:0] th_req = '0, th_ack, th_err, fault, locked;
  logic [VA_W-1:0] th_va [NC];
  logic mem_req, mem_gnt = 1;
  pa_t mem_pa;
  logic [1:0] mem_cluster;
  int checks = 0, failures = 0;
  ppn_t map [NC][vpn_t];
  int served [NC];

  vaccel #(.NUM_CLUSTERS(NC), .TLB_ENTRIES(NT)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic give(int c, int base_ppn);
    for (int i = 0; i < NT; i++) begin
      @(negedge clk);
      cfg_sel = NC'(1) << c; cfg_we = 1; cfg_idx = tlb_idx_t'(i);
      cfg_entry = '{valid: 1'b1, vpn: vpn_t'(i + 1), ppn: ppn_t'(base_ppn + i)};
      map[c][vpn_t'(i + 1)] = ppn_t'(base_ppn + i);
    end
    @(negedge clk); cfg_we = 0; cfg_lock = 1;
    @(negedge clk); cfg_lock = 0; cfg_sel = '0;
  endtask

  initial begin
    int cyc0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    give(0, 100);
    give(2, 200);
    check(locked == 4'b0101, "clusters 0 and 2 locked");
    // cluster 2's TLB is locked: an attempt to remap it is ignored
    @(negedge clk); cfg_sel = 4'b0100; cfg_we = 1; cfg_idx = '0;
    cfg_entry = '{valid: 1'b1, vpn: vpn_t'(1), ppn: ppn_t'(100)};
    @(negedge clk); cfg_we = 0; cfg_sel = '0;
    // warm-up so that the slot counter is at a known phase
    @(negedge clk);
    cyc0 = -1;
    for (int i = 0; i < 400; i++) begin
      int s;
      bit bad;
      for (int c = 0; c < NC; c++) begin
        bad = (c == 0 && i > 300);                  // cluster 0 strays late on
        th_va[c] = {vpn_t'(bad ? 11'd9 : 11'($urandom_range(NT, 1))), 21'($urandom)};
      end
      th_req = 4'b0111;
      #1;
      // find the slot: exactly one cluster may be answered
      check($onehot0(th_ack | th_err), "at most one cluster per cycle");
      s = -1;
      for (int c = 0; c < NC; c++) if (th_ack[c] || th_err[c]) s = c;
      if (s >= 0) begin
        if (cyc0 < 0) cyc0 = (i - s) % NC;
        check((i - cyc0) % NC == s, $sformatf("cluster %0d served outside its slot", s));
        if (map[s].exists(th_va[s][31:21])) begin
          check(th_ack[s] && mem_req && int'(mem_cluster) == s &&
                mem_pa == {map[s][th_va[s][31:21]], th_va[s][20:0]},
                $sformatf("cluster %0d translation", s));
          served[s]++;
        end else begin
          check(th_err[s] && !mem_req, $sformatf("cluster %0d refused", s));
        end
      end else check(!mem_req, "no request without an answer");
      @(negedge clk);
    end
    th_req = '0;
    check(fault == 4'b0011, $sformatf("faults on clusters 0 (stray) and 1 (empty), got %b", fault));
    check(served[2] >= 99 && served[2] <= 100, $sformatf("cluster 2 issues once per round: %0d", served[2]));
    check(served[0] >= 74 && served[0] <= 76, $sformatf("cluster 0 served until it strays: %0d", served[0]));
    check(served[1] == 0, "empty cluster never reaches memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

