// tb_dma_bank: loads two NIC-side and two host-side pages into a DMA bank,
// locks it, and sends random transfers whose NIC and host addresses are
// inside or outside those pages. A transfer must be allowed exactly when
// both sides translate, with both physical addresses correct; a refused one
// must set the fault. Also checks that locking stops reconfiguration.
module tb_dma_bank;
  import snic_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_host = 0, cfg_we = 0, cfg_lock = 0, cfg_clear = 0;
  tlb_idx_t cfg_idx = '0;
  tlb_entry_t cfg_entry = '0;
  logic x_valid = 0, x_to_host = 0, x_ok, x_err, x_dir, locked, fault;
  logic [VA_W-1:0] x_nic_va = '0, x_host_va = '0;
  pa_t x_nic_pa, x_host_pa;
  int checks = 0, failures = 0, n_ok = 0, n_err = 0;
  ppn_t nic_map [vpn_t], host_map [vpn_t];

  dma_bank dut (.*);

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
  task automatic load(bit host, int idx, int v, int p);
    @(negedge clk);
    cfg_host = host; cfg_we = 1; cfg_idx = tlb_idx_t'(idx);
    cfg_entry = '{valid: 1'b1, vpn: vpn_t'(v), ppn: ppn_t'(p)};
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load(0, 0, 4, 300); nic_map[4] = 300;
    load(0, 1, 5, 301); nic_map[5] = 301;
    load(1, 0, 9, 1000); host_map[9] = 1000;
    load(1, 1, 10, 1200); host_map[10] = 1200;
    @(negedge clk); cfg_lock = 1; @(negedge clk); cfg_lock = 0;
    check(locked, "locked");
    load(1, 0, 4, 7);                                   // ignored after lock
    for (int i = 0; i < 300; i++) begin
      vpn_t nv, hv;
      bit exp;
      nv = vpn_t'($urandom_range(6, 3));
      hv = vpn_t'($urandom_range(11, 8));
      x_valid = 1; x_to_host = $urandom_range(1);
      x_nic_va = {nv, 21'($urandom)}; x_host_va = {hv, 21'($urandom)};
      #1;
      exp = nic_map.exists(nv) && host_map.exists(hv);
      check(x_ok == exp && x_err == !exp && x_dir == x_to_host, "allow decision");
      if (exp) begin
        check(x_nic_pa == {nic_map[nv], x_nic_va[20:0]} && x_host_pa == {host_map[hv], x_host_va[20:0]},
              "translated addresses");
        n_ok++;
      end else n_err++;
      @(negedge clk);
    end
    x_valid = 0;
    check(fault && n_ok > 0 && n_err > 0, "refusals fault, both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
