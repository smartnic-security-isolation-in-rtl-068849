// tb_pkt_output: four pipelines with different TX quotas submit packets at
// random while the wire accepts at random. A reference model keeps one
// queue per pipeline and a round-robin pointer; every tx_ready, every
// packet on the wire and its source pipeline are compared. Also checks that
// a pipeline's back-pressure starts exactly at its quota.
module tb_pkt_output;
  localparam int NV = 4, D = 8;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_clr = 0;
  logic [1:0] cfg_vpp = '0;
  logic [3:0] cfg_quota = '0;
  logic [NV-1:0] tx_valid = '0, tx_ready;
  logic [63:0] tx_desc [NV];
  logic wire_ready = 0, wire_valid;
  logic [63:0] wire_desc;
  logic [1:0] wire_vpp;
  int checks = 0, failures = 0, n_bp = 0, n_sent = 0;
  int mquota [NV] = '{2, 5, 8, 1};
  logic [63:0] mq [NV][$];

  pkt_output #(.NUM_VPP(NV), .TX_DEPTH(D)) dut (.*);

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
    int rr;
    rr = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      @(negedge clk); cfg_we = 1; cfg_vpp = 2'(v); cfg_quota = 4'(mquota[v]);
    end
    @(negedge clk); cfg_we = 0;
    for (int i = 0; i < 1500; i++) begin
      int exp;
      exp = -1;
      tx_valid = NV'($urandom);
      for (int v = 0; v < NV; v++) tx_desc[v] = {$urandom, $urandom};
      wire_ready = (i > 200) ? ($urandom_range(1) == 1) : ($urandom_range(5) == 0);
      #1;
      for (int k = 0; k < NV; k++) begin
        int v;
        v = (rr + k) % NV;
        if (exp < 0 && mq[v].size() > 0) exp = v;
      end
      for (int v = 0; v < NV; v++) begin
        check(tx_ready[v] == (mq[v].size() < mquota[v]), $sformatf("tx_ready of VPP %0d", v));
        if (tx_valid[v] && !tx_ready[v]) n_bp++;
      end
      if (exp < 0) check(!wire_valid, "wire idle");
      else begin
        check(wire_valid && int'(wire_vpp) == exp && wire_desc == mq[exp][0],
              $sformatf("wire: expected VPP %0d", exp));
        if (wire_ready) begin
          void'(mq[exp].pop_front());
          rr = (exp + 1) % NV;
          n_sent++;
        end
      end
      for (int v = 0; v < NV; v++)
        if (tx_valid[v] && tx_ready[v]) mq[v].push_back(tx_desc[v]);
      @(negedge clk);
    end
    check(n_bp > 0 && n_sent > 0, "back-pressure and sending both seen");
    $display("sent=%0d backpressured=%0d", n_sent, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

