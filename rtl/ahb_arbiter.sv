// ahb_arbiter: AHB bus arbiter and master-side multiplexer for up to 16
// masters.
//
// Each master raises HBUSREQx while it has transfers to issue (and HLOCKx for
// an indivisible sequence). The arbiter keeps the grant with the current
// owner as long as it requests or locks the bus; when the owner lets go, the
// lowest-numbered requesting master (highest priority) is granted. With no
// request the grant stays where it is (bus parking). The grant passes to the
// address bus on the next cycle with HREADY high: HMASTER and HMASTLOCK are
// registered then, so a master owns the address bus in the cycle after it
// saw HGRANTx and HREADY together. Address and control are multiplexed by
// HMASTER, write data by the HMASTER of the previous address phase (the
// data-phase owner).
//
// The signal set (HBUSREQx, HLOCKx, HGRANTx, HMASTER[3:0], HMASTLOCK) and the
// 16-master size follow the subsystem's bus description; the fixed
// lowest-index-first priority and the non-preemptive policy are this
// design's choices. SPLIT/RETRY handling is not included.
module ahb_arbiter
  import ahb_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 16
) (
  input  logic                    hclk,
  input  logic                    hresetn,
  input  ahb_m2s_t                m_i [NUM_MASTERS],
  input  logic [NUM_MASTERS-1:0]  hbusreq,
  input  logic [NUM_MASTERS-1:0]  hlock,
  input  logic                    hready,
  output logic [NUM_MASTERS-1:0]  hgrant,
  output logic [3:0]              hmaster,
  output logic                    hmastlock,
  output ahb_m2s_t                bus_o
);

  localparam int unsigned IW = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1;

  logic [IW-1:0] grant_idx, next_idx, hmaster_q, hmaster_d;
  logic          any_req;

  // Fixed priority: lowest index wins.
  always_comb begin
    next_idx = grant_idx;
    any_req  = 1'b0;
    for (int i = NUM_MASTERS - 1; i >= 0; i--) begin
      if (hbusreq[i]) begin
        next_idx = IW'(i);
        any_req  = 1'b1;
      end
    end
  end

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      grant_idx <= '0;
      hmaster_q <= '0;
      hmaster_d <= '0;
      hmastlock <= 1'b0;
    end else if (hready) begin
      if (!hbusreq[grant_idx] && !hlock[grant_idx] && any_req)
        grant_idx <= next_idx;
      hmaster_q <= grant_idx;
      hmastlock <= hlock[grant_idx];
      hmaster_d <= hmaster_q;
    end
  end

  always_comb begin
    hgrant = '0;
    hgrant[grant_idx] = 1'b1;
  end

  assign hmaster = 4'(hmaster_q);

  always_comb begin
    bus_o        = m_i[hmaster_q];
    bus_o.hwdata = m_i[hmaster_d].hwdata;
  end

  // Only one master may be granted at a time.
  a_onehot_grant: assert property (@(posedge hclk) disable iff (!hresetn) $onehot(hgrant));

endmodule
