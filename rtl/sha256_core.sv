// sha256_core: SHA-256 compression, one round per clock.
//
// The launch controller folds everything that defines a new function (its
// page table, its packet-pipeline configuration and the contents of its
// pages) into a cumulative SHA-256 hash, which nf_attest later reports.
// This core holds the running chaining value H. init loads the standard
// initial value; start compresses the 512-bit block on `block` (first
// message byte in bits 511:504) into H, which takes 64 cycles, busy being
// high meanwhile; digest is H, valid whenever busy is low. Padding is the
// caller's job. The algorithm is standard FIPS 180-4 SHA-256; the
// one-round-per-cycle datapath is this design's choice.
module sha256_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         start,
  input  logic [511:0] block,
  output logic         busy,
  output logic [255:0] digest
);

  localparam logic [31:0] K [64] = '{
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2};

  localparam logic [255:0] H0 = {32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
                                 32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};

  logic [31:0] h [8];      // chaining value
  logic [31:0] v [8];      // working variables a..h
  logic [31:0] w [16];     // message schedule window
  logic [5:0]  rnd;

  function automatic logic [31:0] rotr(logic [31:0] x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  logic [31:0] t1, t2, w_next;

  always_comb begin
    t1 = v[7] + (rotr(v[4], 6) ^ rotr(v[4], 11) ^ rotr(v[4], 25))
              + ((v[4] & v[5]) ^ (~v[4] & v[6])) + K[rnd] + w[0];
    t2 = (rotr(v[0], 2) ^ rotr(v[0], 13) ^ rotr(v[0], 22))
       + ((v[0] & v[1]) ^ (v[0] & v[2]) ^ (v[1] & v[2]));
    w_next = (rotr(w[14], 17) ^ rotr(w[14], 19) ^ (w[14] >> 10)) + w[9]
           + (rotr(w[1], 7) ^ rotr(w[1], 18) ^ (w[1] >> 3)) + w[0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      rnd  <= '0;
      for (int i = 0; i < 8; i++) begin
        h[i] <= H0[255 - 32*i -: 32];
        v[i] <= '0;
      end
      for (int i = 0; i < 16; i++) w[i] <= '0;
    end else if (!busy) begin
      if (init) begin
        for (int i = 0; i < 8; i++) h[i] <= H0[255 - 32*i -: 32];
      end else if (start) begin
        busy <= 1'b1;
        rnd  <= '0;
        for (int i = 0; i < 8; i++)  v[i] <= h[i];
        for (int i = 0; i < 16; i++) w[i] <= block[511 - 32*i -: 32];
      end
    end else begin
      v[0] <= t1 + t2;
      v[1] <= v[0];
      v[2] <= v[1];
      v[3] <= v[2];
      v[4] <= v[3] + t1;
      v[5] <= v[4];
      v[6] <= v[5];
      v[7] <= v[6];
      for (int i = 0; i < 15; i++) w[i] <= w[i+1];
      w[15] <= w_next;
      rnd <= rnd + 1'b1;
      if (rnd == 6'd63) begin
        busy <= 1'b0;
        h[0] <= h[0] + t1 + t2;
        h[1] <= h[1] + v[0];
        h[2] <= h[2] + v[1];
        h[3] <= h[3] + v[2];
        h[4] <= h[4] + v[3] + t1;
        h[5] <= h[5] + v[4];
        h[6] <= h[6] + v[5];
        h[7] <= h[7] + v[6];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 8; i++) digest[255 - 32*i -: 32] = h[i];
  end

endmodule
