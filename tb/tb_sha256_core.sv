// tb_sha256_core: checks the SHA-256 core against the FIPS 180-4 examples
// ("abc", the empty message, the 448-bit two-block message) and against the
// reference model on random multi-block messages, and checks that every
// compression takes exactly 64 cycles.
module tb_sha256_core;
  import tb_sha256_pkg::*;

  logic clk = 0, rst_n = 0;
  logic init = 0, start = 0;
  logic [511:0] block = '0;
  logic busy;
  logic [255:0] digest;
  int checks = 0, failures = 0;

  sha256_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic compress(logic [511:0] b);
    int cyc;
    cyc = 0;
    @(negedge clk); block = b; start = 1;
    @(negedge clk); start = 0;
    while (busy) begin @(negedge clk); cyc++; end
    check(cyc == 64, $sformatf("compression took %0d cycles, expected 64", cyc));
  endtask

  task automatic do_init();
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
  endtask

  initial begin
    logic [63:0] msg[$];
    logic [511:0] b;
    repeat (3) @(negedge clk);
    rst_n = 1;

    do_init();
    compress({32'h61626380, 416'd0, 64'd24});
    check(digest == 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad, "abc");

    do_init();
    compress({32'h80000000, 480'd0});
    check(digest == 256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855, "empty");

    do_init();
    compress({"abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq", 8'h80, 56'd0});
    compress({448'd0, 64'd448});
    check(digest == 256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1, "two-block");

    // random messages of 8*n words plus one padding block
    for (int t = 0; t < 4; t++) begin
      int n;
      n = 1 + t;
      msg.delete();
      for (int i = 0; i < 8 * n; i++) msg.push_back({$urandom, $urandom});
      do_init();
      for (int bl = 0; bl < n; bl++) begin
        for (int i = 0; i < 8; i++) b[511 - 64*i -: 64] = msg[8*bl + i];
        compress(b);
      end
      compress({64'h8000_0000_0000_0000, 384'd0, 64'(512 * n)});
      check(digest == sha256_words(msg), $sformatf("random message of %0d blocks", n));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

