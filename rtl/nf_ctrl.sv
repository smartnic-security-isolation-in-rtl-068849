// nf_ctrl: trusted launch controller (nf_launch, nf_teardown, nf_attest).
//
// The NIC OS issues the three trusted instructions on the cmd_* port; this
// block alone can change which function owns a core, an accelerator cluster,
// a share of the packet buffers or a physical page, and it alone writes the
// isolation TLBs. It holds the core and cluster allocation bitmaps, the page
// ownership table (which doubles as the NIC OS denylist, page_owner), the
// per-function record (core mask, cluster mask, buffer quotas, hash) and a
// SHA-256 engine.
//
// nf_launch(core_mask, pt_ptr, pt_count, cfg_ptr, accel_mask):
//   1. refuses at once if a requested core or cluster is taken, no function
//      id is free, or pt_count is 0 or above PT_MAX;
//   2. walks the page table (pt_count 64-bit entries at pt_ptr, format in
//      snic_pkg) and refuses if an entry is invalid or its physical page
//      already has an owner; the entries are copied into private storage so
//      the OS cannot change them afterwards;
//   3. reads the 8-word packet-pipeline configuration at cfg_ptr (word 0:
//      RX quota [15:0], TX quota [31:16]; words 1-2 / 3-4: switching-rule
//      key / mask; words 5-6: host pages for the DMA bank, PTE format; word 7: virtual
//      address of the RX descriptor ring) and
//      refuses if the RX or TX buffer pools cannot supply the quotas;
//   4. commits: marks every page as owned (which denylists it for the NIC
//      OS), writes entry i of the page table into entry i of the TLB of every
//      selected core and cluster, of the function's packet pipeline and
//      NIC-side DMA TLB (smaller TLBs take the leading entries), writes the
//      host DMA entries, installs rule and quotas, and locks all those TLBs;
//   5. hashes the page-table entries, the configuration words and the first
//      2^HASH_WORDS_LOG2 words of every page (the whole page by default)
//      with SHA-256, in that order, and returns the new function id.
// nf_teardown(nf): zeroes the same words of every page the function owns and
//   returns the pages to the free pool, clears and unlocks its TLBs, drops
//   its rule and quotas, frees its cores and clusters, and pulses
//   scrub_cores so the cores clear their registers and caches.
// nf_attest(nf): returns the function's launch hash for signing.
//
// After reset the controller is busy until the ownership table has cleared
// itself (N_PAGES cycles), and also while the SHA-256 engine finishes a
// block left by a refused launch; commands are taken only while busy is
// low. Each
// instruction answers with one resp_valid pulse. The memory port
// (m_*) is the controller's own path to DRAM: a request is taken when m_gnt
// is high and a read answers with m_rvalid some cycles later; one access is
// outstanding at a time. The only data the controller ever writes
// is zero (page scrubbing), so m_wdata is constant by design. Launch takes about 64 cycles per 8 hashed words;
// teardown one cycle per scrubbed word plus one per page of the table.
//
// The checks, the atomic commit, the TLB locking, the denylist, the
// cumulative hash and the scrubbing follow the S-NIC description; the
// argument encoding, the configuration layout, the packet-count buffer
// pools, the one-outstanding-access memory port and the order of the steps
// are this design's choices. Reset is synchronous and active low.
module nf_ctrl
  import snic_pkg::*;
#(
  parameter int unsigned NUM_CORES       = 48,
  parameter int unsigned NUM_ACL         = 48,   // accelerator clusters (3 x 16)
  parameter int unsigned PT_MAX          = 183,  // core TLB entries
  parameter int unsigned RX_POOL         = 256,  // RX buffer pool, packets
  parameter int unsigned TX_POOL         = 256,  // TX buffer pool, packets
  parameter int unsigned QUOTA_MAX       = 64,   // per-pipeline queue depth
  parameter int unsigned HASH_WORDS_LOG2 = PAGE_SHIFT - 3,
  parameter int unsigned N_PAGES         = NUM_PAGES
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // instruction port (NIC OS)
  input  logic                  cmd_valid,
  input  nf_op_e                cmd_op,
  input  logic [NUM_CORES-1:0]  cmd_core_mask,
  input  pa_t                   cmd_pt_ptr,
  input  tlb_idx_t              cmd_pt_count,
  input  pa_t                   cmd_cfg_ptr,
  input  logic [NUM_ACL-1:0]    cmd_accel_mask,
  input  nf_id_t                cmd_nf,
  output logic                  busy,
  output logic                  resp_valid,
  output logic                  resp_ok,
  output nf_id_t                resp_nf,
  output logic [255:0]          resp_hash,
  // memory port
  output logic                  m_req,
  output logic                  m_we,
  output pa_t                   m_addr,
  output word_t                 m_wdata,
  input  logic                  m_gnt,
  input  logic                  m_rvalid,
  input  word_t                 m_rdata,
  // TLB configuration, broadcast to the selected banks
  output logic                  tlb_we,
  output tlb_idx_t              tlb_idx,
  output tlb_entry_t            tlb_entry,
  output logic                  tlb_lock,
  output logic                  tlb_clear,
  output logic [NUM_CORES-1:0]  sel_core,
  output logic [NUM_ACL-1:0]    sel_acl,
  output logic [MAX_NF-1:0]     sel_vpp,
  output logic [MAX_NF-1:0]     sel_dma,
  output logic                  dma_host,
  // packet pipeline configuration
  output logic                  pp_we,
  output logic                  pp_clr,
  output logic [3:0]            pp_vpp,
  output flow_key_t             pp_key,
  output flow_key_t             pp_mask,
  output logic [15:0]           pp_rx_quota,
  output logic [15:0]           pp_tx_quota,
  output logic [VA_W-1:0]       pp_ring_va,
  output nf_id_t                cfg_nf,
  // teardown of core-private state
  output logic [NUM_CORES-1:0]  scrub_cores,
  // NIC OS TLB install check (denylist)
  input  logic                  mi_valid,
  input  ppn_t                  mi_ppn,
  output logic                  mi_ok,
  // allocation state, for observation
  output logic [NUM_CORES-1:0]  core_alloc,
  output logic [NUM_ACL-1:0]    acl_alloc
);

  localparam int unsigned PG_W = $clog2(N_PAGES);

  typedef enum logic [4:0] {
    S_IDLE, S_PT_REQ, S_PT_WAIT, S_PT_USE, S_CF_REQ, S_CF_WAIT, S_CF_USE,
    S_CF_CHECK, S_COMMIT, S_DMA_HOST, S_PP_CFG, S_LOCK, S_PG_REQ, S_PG_WAIT,
    S_PG_USE, S_PAD, S_FINISH, S_TD_SCAN, S_TD_WRITE, S_TD_FREE,
    S_RESP
  } state_e;

  state_e state;

  // per-function records (index 0 unused)
  logic                 nf_live   [MAX_NF+1];
  logic [NUM_CORES-1:0] nf_cores  [MAX_NF+1];
  logic [NUM_ACL-1:0]   nf_acls   [MAX_NF+1];
  logic [15:0]          nf_rxq    [MAX_NF+1];
  logic [15:0]          nf_txq    [MAX_NF+1];
  logic [255:0]         nf_hash   [MAX_NF+1];
  logic [15:0]          rx_used, tx_used;

  // arguments of the instruction in progress
  logic [NUM_CORES-1:0] a_cores;
  logic [NUM_ACL-1:0]   a_acls;
  pa_t                  a_pt_ptr, a_cfg_ptr;
  tlb_idx_t             a_count;
  nf_id_t               a_nf;
  tlb_entry_t           pt_buf [PT_MAX];
  word_t                cfgw   [8];

  // loop counters
  tlb_idx_t                   i_pt;
  logic [2:0]                 i_cf;
  logic [HASH_WORDS_LOG2-1:0] i_w;
  logic [PG_W-1:0]            i_pg;
  word_t                      rword;
  logic [63:0]                n_words;   // words fed to the hash
  logic                       pad_done;
  logic                       hash_idle, accept;

  // free function id: lowest id with no live function
  nf_id_t free_nf;
  logic   have_free;
  always_comb begin
    free_nf   = '0;
    have_free = 1'b0;
    for (int n = MAX_NF; n >= 1; n--) begin
      if (!nf_live[n]) begin
        free_nf   = nf_id_t'(n);
        have_free = 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- ownership
  ppn_t   q_ppn;
  nf_id_t q_owner;
  logic   own_we;
  ppn_t   own_ppn;
  nf_id_t own_val;
  logic   own_ready;

  page_owner #(.N_PAGES(N_PAGES)) u_owner (
    .clk, .rst_n,
    .q_ppn, .q_owner,
    .set_we(own_we), .set_ppn(own_ppn), .set_owner(own_val),
    .mi_valid, .mi_ppn, .mi_ok, .ready(own_ready));

  // ---------------------------------------------------------------- hashing
  // Words are gathered big-endian into an 8-word block; a full block is
  // handed to the SHA-256 core as soon as it is idle.
  word_t        hblk [8];
  logic [2:0]   hpos;
  logic         hfull;
  logic         sha_init, sha_start, sha_busy;
  logic [255:0] sha_digest;
  logic [511:0] hblock;
  logic         h_push;
  word_t        h_word;
  logic         push_ok;

  always_comb begin
    for (int k = 0; k < 8; k++) hblock[511 - 64*k -: 64] = hblk[k];
  end
  assign sha_start = hfull && !sha_busy;
  assign push_ok   = !hfull;

  sha256_core u_sha (
    .clk, .rst_n, .init(sha_init), .start(sha_start), .block(hblock),
    .busy(sha_busy), .digest(sha_digest));

  // ---------------------------------------------------------------- datapath
  tlb_entry_t cur_pte;
  assign cur_pte = pte_decode(rword);

  always_comb begin
    // defaults
    m_req     = 1'b0;
    m_we      = 1'b0;
    m_addr    = '0;
    m_wdata   = '0;
    q_ppn     = cur_pte.ppn;
    own_we    = 1'b0;
    own_ppn   = '0;
    own_val   = '0;
    h_push    = 1'b0;
    h_word    = rword;
    sha_init  = 1'b0;
    tlb_we    = 1'b0;
    tlb_idx   = i_pt;
    tlb_entry = pt_buf[(32'(i_pt) < PT_MAX) ? i_pt : '0];
    tlb_lock  = 1'b0;
    tlb_clear = 1'b0;
    sel_core  = '0;
    sel_acl   = '0;
    sel_vpp   = '0;
    sel_dma   = '0;
    dma_host  = 1'b0;
    pp_we     = 1'b0;
    pp_clr    = 1'b0;
    pp_vpp    = 4'(a_nf - 1'b1);
    pp_key    = {cfgw[1], cfgw[2]};
    pp_mask   = {cfgw[3], cfgw[4]};
    pp_rx_quota = cfgw[0][15:0];
    pp_tx_quota = cfgw[0][31:16];
    pp_ring_va  = cfgw[7][VA_W-1:0];
    cfg_nf      = a_nf;
    scrub_cores = '0;

    unique case (state)
      S_IDLE: sha_init = accept && cmd_op == OP_LAUNCH;
      S_PT_REQ: begin
        m_req  = 1'b1;
        m_addr = a_pt_ptr + PA_W'({i_pt, 3'b000});
      end
      S_PT_USE: h_push = push_ok && cur_pte.valid && q_owner == '0;
      S_CF_REQ: begin
        m_req  = 1'b1;
        m_addr = a_cfg_ptr + PA_W'({i_cf, 3'b000});
      end
      S_CF_USE: h_push = push_ok;
      S_COMMIT: begin
        q_ppn    = pt_buf[i_pt].ppn;
        own_we   = 1'b1;
        own_ppn  = pt_buf[i_pt].ppn;
        own_val  = a_nf;
        tlb_we   = 1'b1;
        sel_core = a_cores;
        sel_acl  = a_acls;
        sel_vpp[a_nf - 1'b1] = 1'b1;
        sel_dma[a_nf - 1'b1] = 1'b1;
      end
      S_DMA_HOST: begin
        tlb_we    = cfgw[5 + 32'(i_pt)][63];
        tlb_entry = pte_decode(cfgw[5 + 32'(i_pt)]);
        sel_dma[a_nf - 1'b1] = 1'b1;
        dma_host  = 1'b1;
      end
      S_PP_CFG: pp_we = 1'b1;
      S_LOCK: begin
        tlb_lock = 1'b1;
        sel_core = a_cores;
        sel_acl  = a_acls;
        sel_vpp[a_nf - 1'b1] = 1'b1;
        sel_dma[a_nf - 1'b1] = 1'b1;
      end
      S_PG_REQ: begin
        m_req  = 1'b1;
        m_addr = {pt_buf[i_pt].ppn, PAGE_SHIFT'({i_w, 3'b000})};
      end
      S_PG_USE: h_push = push_ok;
      S_PAD: begin
        h_push = push_ok;
        h_word = !pad_done ? 64'h8000_0000_0000_0000
               : (hpos == 3'd7) ? (n_words << 6) : 64'd0;
      end
      S_TD_SCAN: q_ppn = ppn_t'(i_pg);
      S_TD_WRITE: begin
        m_req  = 1'b1;
        m_we   = 1'b1;
        m_addr = {ppn_t'(i_pg), PAGE_SHIFT'({i_w, 3'b000})};
        m_wdata = '0;
        if (m_gnt && &i_w) begin
          own_we  = 1'b1;
          own_ppn = ppn_t'(i_pg);
          own_val = '0;
        end
      end
      S_TD_FREE: begin
        tlb_clear = 1'b1;
        sel_core  = nf_cores[a_nf];
        sel_acl   = nf_acls[a_nf];
        sel_vpp[a_nf - 1'b1] = 1'b1;
        sel_dma[a_nf - 1'b1] = 1'b1;
        pp_clr    = 1'b1;
        scrub_cores = nf_cores[a_nf];
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      resp_valid <= 1'b0;
      resp_ok    <= 1'b0;
      resp_nf    <= '0;
      resp_hash  <= '0;
      core_alloc <= '0;
      acl_alloc  <= '0;
      rx_used    <= '0;
      tx_used    <= '0;
      a_cores    <= '0;
      a_acls     <= '0;
      a_pt_ptr   <= '0;
      a_cfg_ptr  <= '0;
      a_count    <= '0;
      a_nf       <= '0;
      i_pt       <= '0;
      i_cf       <= '0;
      i_w        <= '0;
      i_pg       <= '0;
      rword      <= '0;
      n_words    <= '0;
      pad_done   <= 1'b0;
      hpos       <= '0;
      hfull      <= 1'b0;
      for (int k = 0; k < 8; k++) begin
        hblk[k] <= '0;
        cfgw[k] <= '0;
      end
      for (int n = 0; n <= MAX_NF; n++) begin
        nf_live[n]  <= 1'b0;
        nf_cores[n] <= '0;
        nf_acls[n]  <= '0;
        nf_rxq[n]   <= '0;
        nf_txq[n]   <= '0;
        nf_hash[n]  <= '0;
      end
      for (int k = 0; k < int'(PT_MAX); k++) pt_buf[k] <= '0;
    end else begin
      resp_valid <= 1'b0;

      // hash block gathering
      if (sha_start) hfull <= 1'b0;
      if (h_push) begin
        hblk[hpos] <= h_word;
        hpos       <= hpos + 1'b1;
        if (state != S_PAD) n_words <= n_words + 1'b1;
        if (hpos == 3'd7) hfull <= 1'b1;
      end

      unique case (state)
        S_IDLE: begin
          if (accept) begin
            a_cores   <= cmd_core_mask;
            a_acls    <= cmd_accel_mask;
            a_pt_ptr  <= cmd_pt_ptr;
            a_cfg_ptr <= cmd_cfg_ptr;
            a_count   <= cmd_pt_count;
            i_pt      <= '0;
            i_cf      <= '0;
            i_w       <= '0;
            i_pg      <= '0;
            hpos      <= '0;
            hfull     <= 1'b0;
            n_words   <= '0;
            pad_done  <= 1'b0;
            resp_ok   <= 1'b0;
            resp_nf   <= '0;
            resp_hash <= '0;
            unique case (cmd_op)
              OP_LAUNCH: begin
                a_nf <= free_nf;
                if (cmd_core_mask != '0 && (cmd_core_mask & core_alloc) == '0 &&
                    (cmd_accel_mask & acl_alloc) == '0 && have_free &&
                    cmd_pt_count != '0 && 32'(cmd_pt_count) <= PT_MAX)
                  state <= S_PT_REQ;
                else
                  state <= S_RESP;
              end
              OP_TEARDOWN: begin
                a_nf  <= cmd_nf;
                state <= (cmd_nf != '0 && 32'(cmd_nf) <= MAX_NF && nf_live[cmd_nf])
                         ? S_TD_SCAN : S_RESP;
              end
              OP_ATTEST: begin
                if (cmd_nf != '0 && 32'(cmd_nf) <= MAX_NF && nf_live[cmd_nf]) begin
                  resp_ok   <= 1'b1;
                  resp_nf   <= cmd_nf;
                  resp_hash <= nf_hash[cmd_nf];
                end
                state <= S_RESP;
              end
              default: state <= S_RESP;
            endcase
          end
        end

        // ---- walk and check the page table
        S_PT_REQ:  if (m_gnt) state <= S_PT_WAIT;
        S_PT_WAIT: if (m_rvalid) begin rword <= m_rdata; state <= S_PT_USE; end
        S_PT_USE: begin
          if (!cur_pte.valid || q_owner != '0) begin
            state <= S_RESP;                         // page taken: refuse
          end else if (push_ok) begin
            pt_buf[i_pt] <= cur_pte;
            if (i_pt == a_count - 1'b1) begin
              i_pt  <= '0;
              state <= S_CF_REQ;
            end else begin
              i_pt  <= i_pt + 1'b1;
              state <= S_PT_REQ;
            end
          end
        end

        // ---- read the packet-pipeline configuration
        S_CF_REQ:  if (m_gnt) state <= S_CF_WAIT;
        S_CF_WAIT: if (m_rvalid) begin rword <= m_rdata; state <= S_CF_USE; end
        S_CF_USE: if (push_ok) begin
          cfgw[i_cf] <= rword;
          i_cf       <= i_cf + 1'b1;
          state      <= (i_cf == 3'd7) ? S_CF_CHECK : S_CF_REQ;
        end
        S_CF_CHECK: begin
          if (cfgw[0][15:0] == '0 || cfgw[0][31:16] == '0 ||
              32'(cfgw[0][15:0]) > QUOTA_MAX || 32'(cfgw[0][31:16]) > QUOTA_MAX ||
              32'(rx_used) + 32'(cfgw[0][15:0]) > RX_POOL ||
              32'(tx_used) + 32'(cfgw[0][31:16]) > TX_POOL)
            state <= S_RESP;
          else begin
            i_pt  <= '0;
            state <= S_COMMIT;
          end
        end

        // ---- commit: ownership, TLBs, pipeline, locks
        S_COMMIT: begin
          if (i_pt == a_count - 1'b1) begin
            i_pt  <= '0;
            state <= S_DMA_HOST;
          end else begin
            i_pt <= i_pt + 1'b1;
          end
        end
        S_DMA_HOST: begin
          if (i_pt == 8'd1) begin
            i_pt  <= '0;
            state <= S_PP_CFG;
          end else begin
            i_pt <= i_pt + 1'b1;
          end
        end
        S_PP_CFG: state <= S_LOCK;
        S_LOCK: begin
          core_alloc     <= core_alloc | a_cores;
          acl_alloc      <= acl_alloc | a_acls;
          rx_used        <= rx_used + cfgw[0][15:0];
          tx_used        <= tx_used + cfgw[0][31:16];
          nf_live[a_nf]  <= 1'b1;
          nf_cores[a_nf] <= a_cores;
          nf_acls[a_nf]  <= a_acls;
          nf_rxq[a_nf]   <= cfgw[0][15:0];
          nf_txq[a_nf]   <= cfgw[0][31:16];
          i_pt           <= '0;
          i_w            <= '0;
          state          <= S_PG_REQ;
        end

        // ---- hash the contents of every page
        S_PG_REQ:  if (m_gnt) state <= S_PG_WAIT;
        S_PG_WAIT: if (m_rvalid) begin rword <= m_rdata; state <= S_PG_USE; end
        S_PG_USE: if (push_ok) begin
          i_w <= i_w + 1'b1;
          if (&i_w) begin
            if (i_pt == a_count - 1'b1) state <= S_PAD;
            else begin
              i_pt  <= i_pt + 1'b1;
              state <= S_PG_REQ;
            end
          end else begin
            state <= S_PG_REQ;
          end
        end

        // ---- SHA-256 padding: 0x80.., zeros, 64-bit length in bits
        S_PAD: if (push_ok) begin
          pad_done <= 1'b1;
          if (pad_done && hpos == 3'd7) state <= S_FINISH;
        end
        S_FINISH: if (!hfull && !sha_busy && !sha_start) begin
          nf_hash[a_nf] <= sha_digest;
          resp_ok       <= 1'b1;
          resp_nf       <= a_nf;
          resp_hash     <= sha_digest;
          state         <= S_RESP;
        end

        // ---- teardown: scrub and free every owned page
        S_TD_SCAN: begin
          if (q_owner == a_nf) begin
            i_w   <= '0;
            state <= S_TD_WRITE;
          end else if (32'(i_pg) == N_PAGES - 1) begin
            state <= S_TD_FREE;
          end else begin
            i_pg <= i_pg + 1'b1;
          end
        end
        S_TD_WRITE: if (m_gnt) begin
          i_w <= i_w + 1'b1;
          if (&i_w) begin
            if (32'(i_pg) == N_PAGES - 1) state <= S_TD_FREE;
            else begin
              i_pg  <= i_pg + 1'b1;
              state <= S_TD_SCAN;
            end
          end
        end
        S_TD_FREE: begin
          core_alloc     <= core_alloc & ~nf_cores[a_nf];
          acl_alloc      <= acl_alloc & ~nf_acls[a_nf];
          rx_used        <= rx_used - nf_rxq[a_nf];
          tx_used        <= tx_used - nf_txq[a_nf];
          nf_live[a_nf]  <= 1'b0;
          nf_cores[a_nf] <= '0;
          nf_acls[a_nf]  <= '0;
          nf_rxq[a_nf]   <= '0;
          nf_txq[a_nf]   <= '0;
          nf_hash[a_nf]  <= '0;
          resp_ok        <= 1'b1;
          resp_nf        <= a_nf;
          state          <= S_RESP;
        end

        S_RESP: begin
          resp_valid <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A refused launch may leave a block in the hash core; the next command
  // waits for it so that its own initialisation is not overwritten.
  assign hash_idle = !sha_busy && !hfull;
  assign accept    = cmd_valid && own_ready && hash_idle;
  assign busy      = state != S_IDLE || !own_ready || !hash_idle;

  // A committed page was free when checked; only a page listed twice by the
  // same function can already carry this function's id.
  a_commit_free: assert property (@(posedge clk) disable iff (!rst_n)
                                  state == S_COMMIT |-> (q_owner == '0 || q_owner == a_nf));

endmodule
