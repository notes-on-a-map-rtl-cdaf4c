// tb_map_top: end-to-end test of map_top at reduced sizes: 32 PEs (16
// sectors of 2), 64-word PE memories, 16 MM modules of 1024 words.  The
// number of CUs, sectors and the word and address widths keep their
// defaults.  Stimulus and checks are in map_top_bench, which this file
// connects to the design; it also places each of CU2's eight PEs' rank in
// word 0 of its PE memory (standing in for PE memory loading by the I/O
// subsystem, which is not part of this design) and brings four internal
// signals out to the bench for counting.
module tb_map_top;
  import map_pkg::*;
  localparam int unsigned N_PE      = 32;
  localparam int unsigned MOD_WORDS = 1024;
  localparam int unsigned SP        = N_PE / NUM_SECTOR;
  localparam int unsigned PW        = $clog2(N_PE);

  logic            clk, rst_n;
  logic [7:0]      cu_start, cu_running, cu_busy, sw_gnt, sw_req;
  mmaddr_t         cu_start_pc [8], cu_base [8];
  logic            pe_alloc_we, cupi_load, io_req, io_we, io_gnt;
  logic [PW-1:0]   pe_alloc_idx;
  id_t             pe_alloc_owner, cupi_load_id;
  logic [2:0]      cupi_load_cu;
  logic [15:0]     cupi_load_sector;
  mmaddr_t         io_addr;
  word_t           io_wdata, io_rdata;
  logic            sector_conflict, xmit_conflict, mm_shared_busy;
  logic [N_PE-1:0] pe_active;

  map_top #(.N_PE(N_PE), .PEM_WORDS(64), .N_MOD(16), .MOD_WORDS(MOD_WORDS)) dut (
    .clk, .rst_n,
    .cu_start_i(cu_start), .cu_start_pc_i(cu_start_pc), .cu_base_i(cu_base),
    .pe_alloc_we_i(pe_alloc_we), .pe_alloc_idx_i(pe_alloc_idx), .pe_alloc_owner_i(pe_alloc_owner),
    .cupi_load_i(cupi_load), .cupi_load_cu_i(cupi_load_cu), .cupi_load_id_i(cupi_load_id),
    .cupi_load_sector_i(cupi_load_sector),
    .io_req_i(io_req), .io_we_i(io_we), .io_addr_i(io_addr), .io_wdata_i(io_wdata),
    .io_gnt_o(io_gnt), .io_rdata_o(io_rdata),
    .cu_running_o(cu_running), .cu_busy_o(cu_busy), .sw_gnt_o(sw_gnt), .sw_req_o(sw_req),
    .sector_conflict_o(sector_conflict), .xmit_conflict_o(xmit_conflict),
    .mm_shared_busy_o(mm_shared_busy), .pe_active_o(pe_active));

  map_top_bench #(.N_PE(N_PE), .MOD_WORDS(MOD_WORDS), .MAX_CYCLES(20000)) bench (
    .clk, .rst_n, .cu_start, .cu_start_pc, .cu_base,
    .pe_alloc_we, .pe_alloc_idx, .pe_alloc_owner,
    .cupi_load, .cupi_load_cu, .cupi_load_id, .cupi_load_sector,
    .io_req, .io_we, .io_addr, .io_wdata, .io_gnt, .io_rdata,
    .cu_running, .sw_gnt, .sw_req, .sector_conflict, .xmit_conflict, .mm_shared_busy,
    .pe_active,
    .cupi_call(dut.call), .irq_ack(dut.cu_irq_ack), .cu_halt(dut.cu_halt), .sbus(dut.sbus));

  for (genvar k = 0; k < 8; k++) begin : g_rank
    initial dut.g_pe[(4 + k / 2) * SP + k % 2].u_pe.u_pem.mem[0] = k;
  end
endmodule
