// page_owner: physical-page ownership table and NIC OS denylist.
//
// One entry per 2 MB physical page records which function owns it (0 = the
// page is free or belongs to the NIC OS). The launch controller reads it to
// refuse pages that already belong to a live function, writes it when a
// launch commits and clears it after a teardown has scrubbed a page.
//
// The same table is the management core's denylist. When the NIC OS tries
// to install a virtual-to-physical mapping in its TLB, the physical page is
// looked up (mi_*) and the install is allowed only if the page has no owner.
// S-NIC describes the denylist as a hardware-private page table or a bitmap;
// this design uses the bitmap form, widened to an owner id per page so that
// teardown can find a function's pages without re-reading its page table.
//
// After reset the table clears itself, one page per cycle; ready rises when
// every page is free (N_PAGES cycles). Until then no install is allowed and
// the controller must wait. Both lookups are combinational; a write takes
// effect on the next edge. Reset is synchronous and active low.
module page_owner
  import snic_pkg::*;
#(
  parameter int unsigned N_PAGES = snic_pkg::NUM_PAGES
) (
  input  logic   clk,
  input  logic   rst_n,
  // controller query
  input  ppn_t   q_ppn,
  output nf_id_t q_owner,
  // controller update
  input  logic   set_we,
  input  ppn_t   set_ppn,
  input  nf_id_t set_owner,
  // management-core TLB install check
  input  logic   mi_valid,
  input  ppn_t   mi_ppn,
  output logic   mi_ok,
  output logic   ready
);

  localparam int unsigned PG_W = $clog2(N_PAGES);

  nf_id_t          owner [N_PAGES];
  logic [PG_W-1:0] clr_idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ready   <= 1'b0;
      clr_idx <= '0;
    end else if (!ready) begin
      owner[clr_idx] <= '0;
      clr_idx        <= clr_idx + 1'b1;
      if (32'(clr_idx) == N_PAGES - 1) ready <= 1'b1;
    end else if (set_we && 32'(set_ppn) < N_PAGES) begin
      owner[PG_W'(set_ppn)] <= set_owner;
    end
  end

  always_comb begin
    q_owner = (32'(q_ppn) < N_PAGES) ? owner[PG_W'(q_ppn)] : '0;
    mi_ok   = mi_valid && ready && (32'(mi_ppn) < N_PAGES) && (owner[PG_W'(mi_ppn)] == '0);
  end

endmodule
