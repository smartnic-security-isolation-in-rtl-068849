// tb_bus_arbiter: drives random requests from 6 clients spread over 3
// security domains and compares every cycle's grant with a reference model
// that keeps its own epoch counter: the epoch owner rotates every EPOCH
// cycles, nothing is granted in the last DEAD cycles of an epoch or to a
// client of another domain, and eligible clients are served round robin.
// Counts how often dead time and cross-domain requests held a request back.
module tb_bus_arbiter;
  localparam int NC = 6, ND = 3, EP = 8, DD = 3;
  logic clk = 0, rst_n = 0;
  logic [NC-1:0] req = '0, gnt;
  logic [1:0] client_dom [NC];
  logic gnt_valid, issue_ok, epoch_start;
  logic [2:0] gnt_idx;
  logic [1:0] cur_dom;
  int checks = 0, failures = 0, dead_blocked = 0, dom_blocked = 0, grants = 0;

  bus_arbiter #(.NUM_CLIENTS(NC), .NUM_DOMAINS(ND), .EPOCH(EP), .DEAD(DD)) dut (.*);

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
    int cyc, rr;
    cyc = 0;
    rr = 0;
    for (int c = 0; c < NC; c++) client_dom[c] = 2'(c % ND);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 2000; cyc++) begin
      int dom, pos, exp;
      dom = (cyc / EP) % ND;
      pos = cyc % EP;
      exp = -1;
      req = NC'($urandom);
      #1;
      if (pos < EP - DD) begin
        for (int k = 0; k < NC; k++) begin
          int c;
          c = (rr + k) % NC;
          if (exp < 0 && req[c] && c % ND == dom) exp = c;
        end
      end else if (req != '0) dead_blocked++;
      for (int c = 0; c < NC; c++) if (req[c] && c % ND != dom) dom_blocked++;
      check(int'(cur_dom) == dom, "epoch owner");
      check(epoch_start == (pos == 0), "epoch start");
      if (exp < 0) check(!gnt_valid && gnt == '0, $sformatf("cycle %0d: no grant expected", cyc));
      else begin
        check(gnt_valid && int'(gnt_idx) == exp && gnt == NC'(1) << exp,
              $sformatf("cycle %0d: expected grant to %0d, got %b", cyc, exp, gnt));
        rr = (exp + 1) % NC;
        grants++;
      end
      @(negedge clk);
    end
    check(dead_blocked > 0 && dom_blocked > 0 && grants > 0, "all cases exercised");
    $display("grants=%0d dead_time_holds=%0d other_domain_holds=%0d", grants, dead_blocked, dom_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

