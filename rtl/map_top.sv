// map_top: the MAP (Multi Associative Processor) array computer.
//
// Eight control units (map_cu) run independent instruction streams held in
// main memory (map_mm); each drives a subset of the N_PE processing elements
// (map_pe, each with its own PE memory) through the distribution switch
// (map_switch with its bus sector allocator map_bsa).  The CUPI (map_cupi)
// carries out the inter-process instructions and keeps each CU's ID and
// sector mask, which the switch uses for routing.  Main memory is shared by
// the 8 CUs (units 0..7), the CUPI (unit 8) and the I/O subsystem, whose
// port is brought out here because the subsystem itself is not part of this
// design.
//
// The CUPI call window: a CU store to 3FFFF8 + i is taken off the memory
// path and handed to the CUPI, which accepts it in the same cycle.
//
// Allocation, which the document leaves to the operating system, is done
// through ports: pe_alloc_* writes a PE's OWNER (and activates it),
// cupi_load_* loads the ID and sector mask of the process on a CU, and
// cu_start_* starts a CU at a program counter with a relocation base.
//
// PEs are numbered as in the document: sector s holds PEs s*N_PE/16 to
// (s+1)*N_PE/16-1.  All sizes default to the document's: 1024 PEs in 16
// sectors of 64, 4K-word PE memories, 16 MM modules of 256K words.
module map_top
  import map_pkg::*;
#(
  parameter int unsigned N_PE      = 1024,
  parameter int unsigned PEM_WORDS = 4096,
  parameter int unsigned N_MOD     = 16,
  parameter int unsigned MOD_WORDS = 262144,
  localparam int unsigned N_CU     = NUM_CU,
  localparam int unsigned N_SEC    = NUM_SECTOR,
  localparam int unsigned SEC_PES  = N_PE / N_SEC,
  localparam int unsigned PW       = $clog2(N_PE),
  localparam int unsigned CW       = $clog2(N_CU)
) (
  input  logic              clk,
  input  logic              rst_n,
  // process start on the CUs
  input  logic [N_CU-1:0]   cu_start_i,
  input  mmaddr_t           cu_start_pc_i [N_CU],
  input  mmaddr_t           cu_base_i     [N_CU],
  // PE allocation
  input  logic              pe_alloc_we_i,
  input  logic [PW-1:0]     pe_alloc_idx_i,
  input  id_t               pe_alloc_owner_i,
  // process load into the CUPI
  input  logic              cupi_load_i,
  input  logic [CW-1:0]     cupi_load_cu_i,
  input  id_t               cupi_load_id_i,
  input  logic [15:0]       cupi_load_sector_i,
  // I/O subsystem port to main memory
  input  logic              io_req_i,
  input  logic              io_we_i,
  input  mmaddr_t           io_addr_i,
  input  word_t             io_wdata_i,
  output logic              io_gnt_o,
  output word_t             io_rdata_o,
  // status
  output logic [N_CU-1:0]   cu_running_o,
  output logic [N_CU-1:0]   cu_busy_o,
  output logic [N_CU-1:0]   sw_gnt_o,
  output logic [N_CU-1:0]   sw_req_o,
  output logic              sector_conflict_o,
  output logic              xmit_conflict_o,
  output logic              mm_shared_busy_o,
  output logic [N_PE-1:0]   pe_active_o
);
  localparam int unsigned N_U = N_CU + 1;

  // ---------------- control units ----------------
  logic [N_CU-1:0] cu_mm_req, cu_mm_we, cu_mm_gnt;
  mmaddr_t         cu_mm_addr  [N_CU];
  word_t           cu_mm_wdata [N_CU];
  word_t           cu_mm_rdata [N_CU];
  logic [N_CU-1:0] sw_req, sw_gnt, sw_any, sw_many;
  bcmd_e           sw_cmd  [N_CU];
  word_t           sw_data [N_CU];
  word_t           sw_ret  [N_CU];
  logic [N_CU-1:0] cupi_done, cupi_branch, cu_halt, cu_irq, cu_irq_ack, cu_running, cu_busy;
  mmaddr_t         irq_pc  [N_CU];
  word_t           irq_cac0 [N_CU];
  mmaddr_t         cu_pc   [N_CU];
  word_t           cu_cac0 [N_CU];

  for (genvar c = 0; c < N_CU; c++) begin : g_cu
    map_cu #(.CU_INDEX(c)) u_cu (
      .clk, .rst_n,
      .start_i(cu_start_i[c]), .start_pc_i(cu_start_pc_i[c]), .base_i(cu_base_i[c]),
      .mm_req_o(cu_mm_req[c]), .mm_we_o(cu_mm_we[c]), .mm_addr_o(cu_mm_addr[c]),
      .mm_wdata_o(cu_mm_wdata[c]), .mm_gnt_i(cu_mm_gnt[c]), .mm_rdata_i(cu_mm_rdata[c]),
      .sw_req_o(sw_req[c]), .sw_cmd_o(sw_cmd[c]), .sw_data_o(sw_data[c]),
      .sw_gnt_i(sw_gnt[c]), .sw_ret_i(sw_ret[c]), .sw_any_i(sw_any[c]), .sw_many_i(sw_many[c]),
      .cupi_done_i(cupi_done[c]), .cupi_branch_i(cupi_branch[c]), .halt_i(cu_halt[c]),
      .irq_i(cu_irq[c]), .irq_pc_i(irq_pc[c]), .irq_cac0_i(irq_cac0[c]),
      .irq_ack_o(cu_irq_ack[c]), .pc_o(cu_pc[c]), .cac0_o(cu_cac0[c]),
      .running_o(cu_running[c]), .busy_o(cu_busy[c]));
  end

  // ---------------- CUPI call window ----------------
  logic [N_CU-1:0] call;
  logic [N_U-1:0]  mm_req, mm_we, mm_gnt;
  mmaddr_t         mm_addr  [N_U];
  word_t           mm_wdata [N_U];
  word_t           mm_rdata [N_U];
  always_comb
    for (int c = 0; c < N_CU; c++) begin
      call[c]        = cu_mm_req[c] && cu_mm_we[c] &&
                       cu_mm_addr[c][MMA_W-1:3] == CUPI_CALL[MMA_W-1:3];
      mm_req[c]      = cu_mm_req[c] && !call[c];
      mm_we[c]       = cu_mm_we[c];
      mm_addr[c]     = cu_mm_addr[c];
      mm_wdata[c]    = cu_mm_wdata[c];
      cu_mm_gnt[c]   = call[c] || mm_gnt[c];
      cu_mm_rdata[c] = mm_rdata[c];
    end

  // ---------------- CUPI ----------------
  id_t         cu_id  [N_CU];
  logic [15:0] cu_sec [N_CU];
  map_cupi #(.N_CU(N_CU)) u_cupi (
    .clk, .rst_n,
    .load_i(cupi_load_i), .load_cu_i(cupi_load_cu_i), .load_id_i(cupi_load_id_i),
    .load_sector_i(cupi_load_sector_i),
    .call_i(call), .call_word_i(cu_mm_wdata), .done_o(cupi_done), .branch_o(cupi_branch),
    .halt_o(cu_halt), .irq_o(cu_irq), .irq_pc_o(irq_pc), .irq_cac0_o(irq_cac0),
    .irq_ack_i(cu_irq_ack), .cu_pc_i(cu_pc), .cu_cac0_i(cu_cac0), .cu_running_i(cu_running),
    .id_o(cu_id), .sector_o(cu_sec), .arm_o(), .able_o(),
    .mm_req_o(mm_req[N_CU]), .mm_we_o(mm_we[N_CU]), .mm_addr_o(mm_addr[N_CU]),
    .mm_wdata_o(mm_wdata[N_CU]), .mm_gnt_i(mm_gnt[N_CU]), .mm_rdata_i(mm_rdata[N_CU]));

  // ---------------- main memory ----------------
  map_mm #(.N_U(N_U), .N_MOD(N_MOD), .MOD_WORDS(MOD_WORDS)) u_mm (
    .clk, .rst_n,
    .req_i(mm_req), .we_i(mm_we), .addr_i(mm_addr), .wdata_i(mm_wdata),
    .gnt_o(mm_gnt), .rdata_o(mm_rdata),
    .io_req_i, .io_we_i, .io_addr_i, .io_wdata_i, .io_gnt_o, .io_rdata_o,
    .shared_busy_o(mm_shared_busy_o));

  // ---------------- distribution switch and PEs ----------------
  sbus_t          sbus    [N_SEC];
  word_t          pe_data [N_PE];
  logic [N_PE-1:0] pe_act;

  map_switch #(.N_CU(N_CU), .N_PE(N_PE), .SEC_PES(SEC_PES)) u_sw (
    .clk, .rst_n,
    .req_i(sw_req), .cmd_i(sw_cmd), .data_i(sw_data), .id_i(cu_id), .sector_i(cu_sec),
    .gnt_o(sw_gnt), .ret_data_o(sw_ret), .ret_any_o(sw_any), .ret_many_o(sw_many),
    .sbus_o(sbus), .pe_data_i(pe_data), .pe_act_i(pe_act),
    .sector_conflict_o, .xmit_conflict_o);

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    map_pe #(.PEM_WORDS(PEM_WORDS)) u_pe (
      .clk, .rst_n,
      .alloc_we_i(pe_alloc_we_i && pe_alloc_idx_i == PW'(p)),
      .alloc_owner_i(pe_alloc_owner_i),
      .bus_i(sbus[p / SEC_PES]),
      .ret_data_o(pe_data[p]), .ret_act_o(pe_act[p]),
      .active_o(pe_active_o[p]), .owner_o());
  end

  assign cu_running_o = cu_running;
  assign cu_busy_o    = cu_busy;
  assign sw_gnt_o     = sw_gnt;
  assign sw_req_o     = sw_req;
endmodule
