// tb_vpp_sched: two pipelines. Pipeline 0 gets a 3-entry TLB and a ring at
// a mapped virtual address, pipeline 1 a ring at an unmapped address.
// Descriptors are offered from both RX queues while the bus grants at
// random. Checks that pipeline 0 writes each descriptor, in order, to
// consecutive ring slots (wrapping after RING_SLOTS) at the translated
// physical address and pops only when granted, and that pipeline 1 never
// reaches the bus, drops its descriptors and raises its fault.
module tb_vpp_sched;
  import snic_pkg::*;
  localparam int NV = 2, RS = 8;
  logic clk = 0, rst_n = 0;
  logic [NV-1:0] cfg_sel = '0;
  logic cfg_we = 0, cfg_lock = 0, cfg_clear = 0, cfg_ring = 0;
  tlb_idx_t cfg_idx = '0;
  tlb_entry_t cfg_entry = '0;
  logic [VA_W-1:0] cfg_ring_va = '0;
  logic [NV-1:0] q_valid = '0, deq, req, gnt = '0, delivered, fault;
  logic [63:0] q_desc [NV];
  pa_t addr [NV];
  word_t wdata [NV];
  int checks = 0, failures = 0, n_del = 0;

  vpp_sched #(.NUM_VPP(NV), .TLB_ENTRIES(3), .RING_SLOTS(RS)) dut (.*);

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

  initial begin
    int slot;
    logic [VA_W-1:0] ring;
    slot = 0;
    ring = {11'd7, 21'h1_FFC0};               // ring near the end of page 7
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      cfg_sel = 2'b01; cfg_we = 1; cfg_idx = tlb_idx_t'(i);
      cfg_entry = '{valid: 1'b1, vpn: vpn_t'(6 + i), ppn: ppn_t'(500 + i)};
    end
    @(negedge clk); cfg_we = 0; cfg_sel = 2'b01; cfg_ring = 1; cfg_ring_va = ring; cfg_lock = 1;
    @(negedge clk); cfg_sel = 2'b10; cfg_lock = 1; cfg_ring_va = {11'd100, 21'd0};
    @(negedge clk); cfg_sel = '0; cfg_ring = 0; cfg_lock = 0;
    for (int i = 0; i < 200; i++) begin
      logic [VA_W-1:0] va;
      q_valid = 2'b11;
      q_desc[0] = {$urandom, $urandom};
      q_desc[1] = {$urandom, $urandom};
      gnt = {1'b0, 1'($urandom_range(1))} & req;
      #1;
      va = ring + VA_W'(slot * 8);
      check(req[0] && addr[0] == {ppn_t'(500 + int'(va[31:21]) - 6), va[20:0]} && wdata[0] == q_desc[0],
            $sformatf("pipeline 0 write %0d", i));
      check(deq[0] == gnt[0] && delivered[0] == gnt[0], "pop only when granted");
      check(!req[1] && deq[1], "unmapped ring: no bus request, descriptor dropped");
      if (gnt[0]) begin slot = (slot + 1) % RS; n_del++; end
      @(negedge clk);
    end
    q_valid = '0;
    check(fault == 2'b10, "fault only on pipeline 1");
    check(n_del > 20, "descriptors delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
