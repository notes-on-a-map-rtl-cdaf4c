// map_switch: the distribution switch between the control units (CUs) and
// the processing elements (PEs).
//
// Organised as in the document: each CU has its own crossbar line, the PEs
// are grouped into sectors of SEC_PES (64) on a shared sector bus, and a CU
// line connects to every sector in which it owns PEs (its sector mask).  The
// Bus Sector Allocator (map_bsa) grants CUs that do not collide; a granted
// CU's ID, command and DBR word are copied onto each of its sectors in the
// same cycle.  PEs whose OWNER matches the ID on their sector answer: their
// driven words are ORed within the sector and over all sectors of the CU
// and returned as ret_data_o; the owned-and-active flags give ret_any_o (at
// least one active PE) and ret_many_o (more than one).
//
// Interface per CU c: req_i[c] with cmd_i[c]/data_i[c] held until gnt_o[c];
// the answer is valid in the grant cycle.  id_i/sector_i come from the
// CUPI, which keeps those registers.  Wired-OR return and the any/many
// count are this design's choices; the document only says data can be
// routed PE to CU.
module map_switch
  import map_pkg::*;
#(
  parameter int unsigned N_CU    = 8,
  parameter int unsigned N_PE    = 1024,
  parameter int unsigned SEC_PES = 64,
  localparam int unsigned N_SEC  = N_PE / SEC_PES,
  localparam int unsigned CW     = $clog2(N_CU)
) (
  input  logic             clk,
  input  logic             rst_n,
  // CU side
  input  logic [N_CU-1:0]  req_i,
  input  bcmd_e            cmd_i    [N_CU],
  input  word_t            data_i   [N_CU],
  input  id_t              id_i     [N_CU],
  input  logic [N_SEC-1:0] sector_i [N_CU],
  output logic [N_CU-1:0]  gnt_o,
  output word_t            ret_data_o [N_CU],
  output logic [N_CU-1:0]  ret_any_o,
  output logic [N_CU-1:0]  ret_many_o,
  // PE side
  output sbus_t            sbus_o     [N_SEC],
  input  word_t            pe_data_i  [N_PE],
  input  logic [N_PE-1:0]  pe_act_i,
  // status
  output logic             sector_conflict_o,
  output logic             xmit_conflict_o
);
  logic [CW-1:0]    route_cu [N_SEC];
  logic [N_SEC-1:0] route_v;

  map_bsa #(.N_CU(N_CU), .N_SECTOR(N_SEC)) u_bsa (
    .clk, .rst_n, .req_i, .sector_i, .gnt_o,
    .route_cu_o(route_cu), .route_v_o(route_v),
    .sector_conflict_o, .xmit_conflict_o);

  // CU -> sector buses
  always_comb
    for (int s = 0; s < N_SEC; s++) begin
      sbus_o[s].valid = route_v[s];
      sbus_o[s].cmd   = route_v[s] ? cmd_i[route_cu[s]]  : BC_NONE;
      sbus_o[s].id    = route_v[s] ? id_i[route_cu[s]]   : '0;
      sbus_o[s].data  = route_v[s] ? data_i[route_cu[s]] : '0;
    end

  // sector -> CU return
  word_t            sec_data [N_SEC];
  logic [N_SEC-1:0] sec_any, sec_many;
  always_comb
    for (int s = 0; s < N_SEC; s++) begin
      logic [SEC_PES-1:0] a;
      sec_data[s] = '0;
      for (int p = 0; p < SEC_PES; p++) begin
        sec_data[s] = sec_data[s] | pe_data_i[s*SEC_PES + p];
        a[p]        = pe_act_i[s*SEC_PES + p];
      end
      sec_any[s]  = |a;
      sec_many[s] = |(a & (a - 1'b1));
    end

  always_comb
    for (int c = 0; c < N_CU; c++) begin
      logic [N_SEC-1:0] mine;
      ret_data_o[c] = '0;
      for (int s = 0; s < N_SEC; s++) begin
        mine[s] = route_v[s] && (route_cu[s] == CW'(c));
        if (mine[s]) ret_data_o[c] = ret_data_o[c] | sec_data[s];
      end
      ret_any_o[c]  = |(sec_any & mine);
      ret_many_o[c] = (|(sec_many & mine)) ||
                      (((sec_any & mine) & ((sec_any & mine) - 1'b1)) != '0);
    end
endmodule
