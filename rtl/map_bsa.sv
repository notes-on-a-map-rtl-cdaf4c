// map_bsa: Bus Sector Allocator of the distribution switch.
//
// Each control unit (CU) that wants the switch raises req_i and presents its
// 16-bit sector mask (bit s set when the CU owns PEs in sector s).  The
// allocator decides, every cycle and combinationally, which requesting CUs
// may drive their sectors:
//   * Sector conflict test: sector_conflict_o is high when any two CUs'
//     masks overlap, whether or not they are requesting.
//   * Transmission conflict unit: two requesting CUs whose masks overlap
//     cannot transmit together.  CUs are considered in round-robin order
//     from a priority pointer; a CU is granted when its mask is disjoint from
//     every CU already granted this cycle.  When a CU is refused, the pointer
//     moves to the first refused CU, so it wins next cycle.
//   * Route unit: for every sector, route_cu_o names the granted CU whose
//     mask covers it and route_v_o says whether one does.
// gnt_o doubles as the ICTL/OCTL count-down enable of each CU's PEs: their
// counters advance only on cycles when their CU is not blocked.
// The three sub-units and their inputs (ID, bus requests, sector masks)
// follow the document; the round-robin policy and the per-CU count enable
// (rather than one global enable) are this design's choices.
module map_bsa #(
  parameter int unsigned N_CU     = 8,
  parameter int unsigned N_SECTOR = 16,
  localparam int unsigned CW      = $clog2(N_CU)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_CU-1:0]     req_i,
  input  logic [N_SECTOR-1:0] sector_i [N_CU],
  output logic [N_CU-1:0]     gnt_o,
  output logic [CW-1:0]       route_cu_o [N_SECTOR],
  output logic [N_SECTOR-1:0] route_v_o,
  output logic                sector_conflict_o,
  output logic                xmit_conflict_o
);
  logic [CW-1:0] ptr;
  logic [CW-1:0] first_refused;
  logic          refused;

  // sector conflict test
  always_comb begin
    sector_conflict_o = 1'b0;
    for (int a = 0; a < N_CU; a++)
      for (int b = a + 1; b < N_CU; b++)
        if ((sector_i[a] & sector_i[b]) != '0) sector_conflict_o = 1'b1;
  end

  // transmission conflict unit
  always_comb begin
    logic [N_SECTOR-1:0] used;
    used          = '0;
    gnt_o         = '0;
    refused       = 1'b0;
    first_refused = '0;
    for (int k = 0; k < N_CU; k++) begin
      logic [CW-1:0] c;
      c = CW'((int'(ptr) + k) % N_CU);
      if (req_i[c]) begin
        if ((sector_i[c] & used) == '0) begin
          gnt_o[c] = 1'b1;
          used     = used | sector_i[c];
        end else if (!refused) begin
          refused       = 1'b1;
          first_refused = c;
        end
      end
    end
    xmit_conflict_o = refused;
  end

  // route unit
  always_comb begin
    for (int s = 0; s < N_SECTOR; s++) begin
      route_v_o[s]  = 1'b0;
      route_cu_o[s] = '0;
      for (int c = 0; c < N_CU; c++)
        if (gnt_o[c] && sector_i[c][s]) begin
          route_v_o[s]  = 1'b1;
          route_cu_o[s] = CW'(c);
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       ptr <= '0;
    else if (refused) ptr <= first_refused;

  // no two granted CUs ever share a sector
  always_comb begin
    for (int a = 0; a < N_CU; a++)
      for (int b = a + 1; b < N_CU; b++)
        assert (!(rst_n && gnt_o[a] && gnt_o[b] && ((sector_i[a] & sector_i[b]) != '0)));
  end
endmodule
