// tb_lock_tlb: fills a 183-entry TLB bank with random 2 MB mappings, checks
// every translation against a scoreboard, checks that unmapped pages miss and
// set the sticky fault, that writes after locking are ignored, and that
// clearing empties and unlocks the bank.
module tb_lock_tlb;
  import snic_pkg::*;

  localparam int N = 183;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_lock = 0, cfg_clear = 0;
  tlb_idx_t cfg_idx = '0;
  tlb_entry_t cfg_entry = '0;
  logic locked, lk_valid = 0, lk_hit, fault;
  vpn_t lk_vpn = '0;
  ppn_t lk_ppn;
  int checks = 0, failures = 0;
  ppn_t model [vpn_t];

  lock_tlb #(.ENTRIES(N)) dut (.*);

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

  task automatic write(int idx, vpn_t v, ppn_t p);
    @(negedge clk);
    cfg_we = 1; cfg_idx = tlb_idx_t'(idx); cfg_entry = '{valid: 1'b1, vpn: v, ppn: p};
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic lookup(vpn_t v, output logic hit, output ppn_t p);
    @(negedge clk);
    lk_valid = 1; lk_vpn = v;
    #1 hit = lk_hit; p = lk_ppn;
    @(negedge clk);
    lk_valid = 0;
  endtask

  initial begin
    logic h;
    ppn_t p;
    vpn_t vpns[$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // distinct virtual pages 0..N-1 shuffled onto random physical pages
    for (int i = 0; i < N; i++) vpns.push_back(vpn_t'(i * 7 % 2048));
    vpns.shuffle();
    for (int i = 0; i < N; i++) begin
      model[vpns[i]] = ppn_t'($urandom);
      write(i, vpns[i], model[vpns[i]]);
    end
    // index beyond the bank is ignored
    write(200, vpn_t'(2047), ppn_t'(5));
    check(!fault, "no fault before any miss");
    foreach (model[v]) begin
      lookup(v, h, p);
      check(h && p == model[v], $sformatf("translate vpn %0d", v));
    end
    lookup(vpn_t'(2047), h, p);
    check(!h, "entry written past the end must not exist");
    @(negedge clk);
    check(fault, "miss raises fault");
    // lock, then try to remap
    @(negedge clk); cfg_lock = 1; @(negedge clk); cfg_lock = 0;
    check(locked, "locked");
    write(0, vpns[0], ~model[vpns[0]]);
    lookup(vpns[0], h, p);
    check(h && p == model[vpns[0]], "write after lock ignored");
    check(fault, "fault is sticky");
    // clear
    @(negedge clk); cfg_clear = 1; @(negedge clk); cfg_clear = 0;
    check(!locked && !fault, "clear unlocks and clears fault");
    lookup(vpns[1], h, p);
    check(!h, "clear invalidates entries");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

