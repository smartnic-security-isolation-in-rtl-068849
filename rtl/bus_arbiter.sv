// bus_arbiter: temporal-partitioning arbiter for the internal IO bus.
//
// Time is cut into epochs of EPOCH cycles. Each epoch belongs to one
// security domain, in fixed rotation over all NUM_DOMAINS domains whether
// or not the domain has anything to send, so one domain's traffic never
// changes the timing another domain sees. During an epoch only clients whose
// client_dom equals the epoch's domain may start a memory operation, and only
// in the first EPOCH-DEAD cycles; the last DEAD cycles are dead time that
// lets operations already in flight finish before the bus changes hands
// (DEAD must cover the memory latency). Among eligible clients one is
// granted per cycle, round robin.
//
// Temporal partitioning and the dead time follow the S-NIC description; the
// epoch length, dead time and round-robin order inside a domain are this
// design's choices. gnt is combinational from req in the same cycle.
module bus_arbiter #(
  parameter int unsigned NUM_CLIENTS = 8,
  parameter int unsigned NUM_DOMAINS = 4,
  parameter int unsigned EPOCH       = 64,
  parameter int unsigned DEAD        = 16,
  localparam int unsigned DOM_W = (NUM_DOMAINS > 1) ? $clog2(NUM_DOMAINS) : 1,
  localparam int unsigned CL_W  = (NUM_CLIENTS > 1) ? $clog2(NUM_CLIENTS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_CLIENTS-1:0] req,
  input  logic [DOM_W-1:0]       client_dom [NUM_CLIENTS],
  output logic [NUM_CLIENTS-1:0] gnt,
  output logic                   gnt_valid,
  output logic [CL_W-1:0]        gnt_idx,
  output logic [DOM_W-1:0]       cur_dom,
  output logic                   issue_ok,
  output logic                   epoch_start
);

  logic [$clog2(EPOCH)-1:0] ep_cnt;
  logic [CL_W-1:0]          rr_ptr;

  initial assert (DEAD < EPOCH) else $error("bus_arbiter: DEAD must be below EPOCH");

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ep_cnt  <= '0;
      cur_dom <= '0;
      rr_ptr  <= '0;
    end else begin
      if (32'(ep_cnt) == EPOCH - 1) begin
        ep_cnt  <= '0;
        cur_dom <= (32'(cur_dom) == NUM_DOMAINS - 1) ? '0 : cur_dom + 1'b1;
      end else begin
        ep_cnt <= ep_cnt + 1'b1;
      end
      if (gnt_valid)
        rr_ptr <= (32'(gnt_idx) == NUM_CLIENTS - 1) ? '0 : gnt_idx + 1'b1;
    end
  end

  assign issue_ok    = 32'(ep_cnt) < EPOCH - DEAD;
  assign epoch_start = ep_cnt == '0;

  always_comb begin
    logic [CL_W-1:0] c;
    c         = '0;
    gnt       = '0;
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    if (issue_ok) begin
      for (int k = 0; k < int'(NUM_CLIENTS); k++) begin
        c = CL_W'((32'(rr_ptr) + 32'(k)) % NUM_CLIENTS);
        if (!gnt_valid && req[c] && client_dom[c] == cur_dom) begin
          gnt_valid = 1'b1;
          gnt_idx   = c;
        end
      end
      if (gnt_valid) gnt[gnt_idx] = 1'b1;
    end
  end

  // At most one grant per cycle, and never to a client outside the epoch's
  // domain or during dead time.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_domain: assert property (@(posedge clk) disable iff (!rst_n)
                             gnt_valid |-> (issue_ok && client_dom[gnt_idx] == cur_dom));

endmodule
