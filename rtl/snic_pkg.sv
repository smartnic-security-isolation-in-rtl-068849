// snic_pkg: types and constants shared by the S-NIC isolation hardware.
//
// Memory is managed in 2 MB pages, the page size assumed for every TLB in
// the design. Virtual addresses are 32 bits (the largest network function
// measured needs about 360 MB) and physical addresses 33 bits (8 GB of
// on-NIC DRAM); both widths are this design's choice. Function id 0 stands
// for the NIC OS (and for a free resource); ids 1..MAX_NF name functions.
package snic_pkg;

  localparam int unsigned PAGE_SHIFT = 21;              // 2 MB pages
  localparam int unsigned VA_W       = 32;
  localparam int unsigned PA_W       = 33;
  localparam int unsigned VPN_W      = VA_W - PAGE_SHIFT; // 11
  localparam int unsigned PPN_W      = PA_W - PAGE_SHIFT; // 12
  localparam int unsigned NUM_PAGES  = 1 << PPN_W;        // 4096
  localparam int unsigned NF_W       = 4;
  localparam int unsigned MAX_NF     = 12;                // 48 cores, 4 per function
  localparam int unsigned KEY_W      = 128;               // 5-tuple (104) + VNI (24)
  localparam int unsigned DESC_W     = 64;                // packet descriptor
  localparam int unsigned WORD_W     = 64;                // memory word

  typedef logic [VPN_W-1:0]  vpn_t;
  typedef logic [PPN_W-1:0]  ppn_t;
  typedef logic [NF_W-1:0]   nf_id_t;
  typedef logic [PA_W-1:0]   pa_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [7:0]        tlb_idx_t;   // entry index, up to 256 entries

  // One TLB entry: a 2 MB virtual page mapped to a 2 MB physical page.
  typedef struct packed {
    logic valid;
    vpn_t vpn;
    ppn_t ppn;
  } tlb_entry_t;

  // Switching rule of one virtual packet pipeline: a masked match on the
  // 5-tuple and the VXLAN network identifier.
  typedef struct packed {
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [7:0]  proto;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [23:0] vni;
  } flow_key_t;

  // Trusted instructions executed by the launch controller.
  typedef enum logic [1:0] {
    OP_LAUNCH   = 2'd0,
    OP_TEARDOWN = 2'd1,
    OP_ATTEST   = 2'd2
  } nf_op_e;

  // Page-table entry format read by nf_launch (one 64-bit word):
  // [63] valid, [32 +: VPN_W] virtual page, [0 +: PPN_W] physical page.
  function automatic tlb_entry_t pte_decode(word_t w);
    tlb_entry_t e;
    e.valid = w[63];
    e.vpn   = w[32 +: VPN_W];
    e.ppn   = w[0 +: PPN_W];
    return e;
  endfunction

endpackage
