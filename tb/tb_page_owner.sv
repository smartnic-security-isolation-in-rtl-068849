// tb_page_owner: waits for the post-reset clear sweep (checking it takes
// N_PAGES cycles), assigns random pages to functions, and checks owner
// queries and the NIC OS install check against a scoreboard: installs of
// owned pages are refused, free pages accepted, and pages are free again
// after being released.
module tb_page_owner;
  import snic_pkg::*;

  localparam int N = 4096;
  logic clk = 0, rst_n = 0;
  ppn_t q_ppn = '0, set_ppn = '0, mi_ppn = '0;
  nf_id_t q_owner, set_owner = '0;
  logic set_we = 0, mi_valid = 0, mi_ok, ready;
  int checks = 0, failures = 0;
  nf_id_t model [N];

  page_owner #(.N_PAGES(N)) dut (.*);

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
    int cyc;
    cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!ready) begin @(negedge clk); cyc++; end
    check(cyc == N, $sformatf("clear sweep took %0d cycles", cyc));
    for (int i = 0; i < N; i++) model[i] = '0;
    for (int i = 0; i < 300; i++) begin
      int p;
      p = $urandom_range(N - 1);
      model[p] = nf_id_t'($urandom_range(12, 1));
      set_we = 1; set_ppn = ppn_t'(p); set_owner = model[p];
      @(negedge clk);
    end
    set_we = 0;
    for (int i = 0; i < 600; i++) begin
      int p;
      p = (i < 300) ? $urandom_range(N - 1) : i * 13 % N;
      q_ppn = ppn_t'(p); mi_ppn = ppn_t'(p); mi_valid = 1;
      #1;
      check(q_owner == model[p], $sformatf("owner of page %0d", p));
      check(mi_ok == (model[p] == '0), $sformatf("install check of page %0d", p));
      @(negedge clk);
    end
    // release every owned page
    for (int p = 0; p < N; p++) if (model[p] != '0) begin
      set_we = 1; set_ppn = ppn_t'(p); set_owner = '0; model[p] = '0;
      @(negedge clk);
    end
    set_we = 0;
    for (int i = 0; i < 100; i++) begin
      mi_ppn = ppn_t'($urandom_range(N - 1)); #1;
      check(mi_ok, "released page may be mapped by the OS");
      @(negedge clk);
    end
    mi_valid = 0; #1;
    check(!mi_ok, "no request, no ok");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

