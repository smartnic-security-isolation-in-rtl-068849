// tb_pkt_input: four virtual packet pipelines with different rules (exact
// 5-tuple, destination port only, VXLAN VNI only) and quotas. Random packets
// are classified by a reference model (first matching enabled rule, quota
// per pipeline) and the queues are drained at random; every accept/drop
// decision and every dequeued descriptor is compared. Also checks that a
// cleared pipeline no longer receives packets and that one pipeline filling
// up does not affect another.
module tb_pkt_input;
  import snic_pkg::*;
  localparam int NV = 4, D = 8;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_clr = 0;
  logic [1:0] cfg_vpp = '0;
  flow_key_t cfg_key = '0, cfg_mask = '0, rx_key = '0;
  logic [3:0] cfg_quota = '0;
  logic rx_valid = 0, accepted, drop_full, drop_nomatch;
  logic [63:0] rx_desc = '0;
  logic [1:0] rx_vpp;
  logic [NV-1:0] deq = '0, q_valid;
  logic [63:0] q_desc [NV];
  int checks = 0, failures = 0, n_acc = 0, n_full = 0, n_nomatch = 0;

  flow_key_t mkey [NV], mmask [NV];
  int mquota [NV];
  bit men [NV];
  logic [63:0] mq [NV][$];

  pkt_input #(.NUM_VPP(NV), .RX_DEPTH(D)) dut (.*);

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

  task automatic install(int v, flow_key_t k, flow_key_t m, int q);
    @(negedge clk);
    cfg_we = 1; cfg_vpp = 2'(v); cfg_key = k; cfg_mask = m; cfg_quota = 4'(q);
    @(negedge clk);
    cfg_we = 0;
    men[v] = 1; mkey[v] = k; mmask[v] = m; mquota[v] = q;
  endtask

  function automatic flow_key_t rand_key();
    flow_key_t k;
    k = {$urandom, $urandom, $urandom, $urandom};
    k.dst_port = ($urandom_range(1)) ? 16'd80 : 16'($urandom);
    k.vni      = ($urandom_range(1)) ? 24'd5  : 24'($urandom);
    k.proto    = 8'd6;
    return k;
  endfunction

  task automatic traffic(int n);
    for (int i = 0; i < n; i++) begin
      int exp;
      logic [NV-1:0] d;
      exp = -1;
      rx_valid = $urandom_range(3) != 0;
      rx_key = rand_key();
      if ($urandom_range(7) == 0) rx_key = mkey[0];
      rx_desc = {$urandom, $urandom};
      d = NV'($urandom) & q_valid;
      deq = d;
      #1;
      for (int v = 0; v < NV; v++)
        if (exp < 0 && men[v] && ((rx_key ^ mkey[v]) & mmask[v]) == '0) exp = v;
      // pops first: check heads
      for (int v = 0; v < NV; v++) if (d[v]) begin
        check(mq[v].size() > 0 && q_desc[v] == mq[v][0], $sformatf("head of VPP %0d", v));
        void'(mq[v].pop_front());
      end
      if (rx_valid) begin
        if (exp < 0) begin
          check(drop_nomatch && !accepted && !drop_full, "no rule: dropped");
          n_nomatch++;
        end else if (mq[exp].size() + (d[exp] ? 1 : 0) >= mquota[exp]) begin
          check(drop_full && !accepted && int'(rx_vpp) == exp, $sformatf("VPP %0d share full: dropped", exp));
          n_full++;
        end else begin
          check(accepted && int'(rx_vpp) == exp, $sformatf("accepted into VPP %0d", exp));
          mq[exp].push_back(rx_desc);
          n_acc++;
        end
      end else check(!accepted && !drop_full && !drop_nomatch, "idle");
      @(negedge clk);
    end
    rx_valid = 0; deq = '0;
  endtask

  initial begin
    flow_key_t k, m;
    repeat (3) @(negedge clk);
    rst_n = 1;
    k = rand_key(); m = '1;
    install(0, k, m, 3);                                   // exact 5-tuple + VNI
    k = '0; k.dst_port = 16'd80; m = '0; m.dst_port = '1;
    install(1, k, m, 2);                                   // web traffic
    k = '0; k.vni = 24'd5; m = '0; m.vni = '1;
    install(2, k, m, 8);                                   // VXLAN network 5
    traffic(600);
    // remove VPP 1: port-80 traffic now falls to the VNI rule or is dropped
    @(negedge clk); cfg_clr = 1; cfg_vpp = 2'd1; @(negedge clk); cfg_clr = 0;
    men[1] = 0; mq[1].delete();
    check(!q_valid[1], "cleared VPP is empty");
    traffic(400);
    check(n_acc > 0 && n_full > 0 && n_nomatch > 0, "accept, full and no-match all seen");
    $display("accepted=%0d dropped_full=%0d dropped_nomatch=%0d", n_acc, n_full, n_nomatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

