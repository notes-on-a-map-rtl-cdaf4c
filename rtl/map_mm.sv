// map_mm: MAP main memory, N_MOD (16) physically separate modules of
// MOD_WORDS (256K) 32-bit words, each with three ports.
//
// Requesters are the N_U units (control units 0..7 and the CUPI as unit 8)
// and the I/O subsystem.  Unit u has a private "preferred" path to one
// module (CU i to module i, the CUPI to module 15).  Any unit can reach any
// other module through one shared memory bus, which carries one transfer
// per cycle and is handed out round-robin.  The I/O subsystem has a bus of
// its own to every module.  A module serves one port per cycle, with the
// priority I/O, then preferred path, then shared bus.
//
// Handshake: a requester holds req/we/addr/wdata until gnt; a read returns
// its word on rdata in the grant cycle and a write is done at the end of it.
// The module split, the three ports and the priority order follow the
// document (which calls that order the most likely scheme); the one-cycle
// access and round-robin sharing are this design's choices.
module map_mm
  import map_pkg::*;
#(
  parameter int unsigned N_U       = 9,
  parameter int unsigned N_MOD     = 16,
  parameter int unsigned MOD_WORDS = 262144,
  localparam int unsigned MAW      = $clog2(MOD_WORDS),
  localparam int unsigned MW       = $clog2(N_MOD),
  localparam int unsigned UW       = $clog2(N_U)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N_U-1:0] req_i,
  input  logic [N_U-1:0] we_i,
  input  mmaddr_t        addr_i  [N_U],
  input  word_t          wdata_i [N_U],
  output logic [N_U-1:0] gnt_o,
  output word_t          rdata_o [N_U],
  // I/O subsystem bus
  input  logic           io_req_i,
  input  logic           io_we_i,
  input  mmaddr_t        io_addr_i,
  input  word_t          io_wdata_i,
  output logic           io_gnt_o,
  output word_t          io_rdata_o,
  // status: a unit used the shared bus this cycle
  output logic           shared_busy_o
);
  function automatic logic [MW-1:0] pref(int u);
    return (u == int'(N_U) - 1) ? MW'(N_MOD - 1) : MW'(u);
  endfunction
  function automatic logic [MW-1:0] modof(mmaddr_t a);
    return a[MAW +: MW];
  endfunction

  logic [UW-1:0] ptr;
  logic          sh_v;
  logic [UW-1:0] sh_u;

  // shared-bus candidate: round-robin among units aiming off their module
  always_comb begin
    sh_v = 1'b0;
    sh_u = '0;
    for (int k = 0; k < N_U; k++) begin
      int u;
      u = (int'(ptr) + k) % N_U;
      if (!sh_v && req_i[u] && modof(addr_i[u]) != pref(u)) begin
        sh_v = 1'b1;
        sh_u = UW'(u);
      end
    end
  end

  // per-module port selection
  logic [N_MOD-1:0] m_we;
  logic [MAW-1:0]   m_addr  [N_MOD];
  word_t            m_wdata [N_MOD];
  word_t            m_rdata [N_MOD];
  logic             sh_gnt;
  always_comb begin
    gnt_o    = '0;
    io_gnt_o = io_req_i;
    sh_gnt   = 1'b0;
    for (int m = 0; m < N_MOD; m++) begin
      logic busy;
      busy       = 1'b0;
      m_we[m]    = 1'b0;
      m_addr[m]  = '0;
      m_wdata[m] = '0;
      if (io_req_i && modof(io_addr_i) == MW'(m)) begin
        busy = 1'b1;
        m_we[m] = io_we_i; m_addr[m] = io_addr_i[MAW-1:0]; m_wdata[m] = io_wdata_i;
      end
      for (int u = 0; u < N_U; u++)
        if (!busy && req_i[u] && pref(u) == MW'(m) && modof(addr_i[u]) == MW'(m)) begin
          busy = 1'b1;
          gnt_o[u] = 1'b1;
          m_we[m] = we_i[u]; m_addr[m] = addr_i[u][MAW-1:0]; m_wdata[m] = wdata_i[u];
        end
      if (!busy && sh_v && modof(addr_i[sh_u]) == MW'(m)) begin
        sh_gnt = 1'b1;
        gnt_o[sh_u] = 1'b1;
        m_we[m] = we_i[sh_u]; m_addr[m] = addr_i[sh_u][MAW-1:0]; m_wdata[m] = wdata_i[sh_u];
      end
    end
  end
  assign shared_busy_o = sh_gnt;

  for (genvar m = 0; m < N_MOD; m++) begin : g_mod
    map_ram #(.DEPTH(MOD_WORDS), .WIDTH(32)) u_mod (
      .clk, .we_i(m_we[m]), .addr_i(m_addr[m]), .wdata_i(m_wdata[m]), .rdata_o(m_rdata[m]));
  end

  always_comb begin
    for (int u = 0; u < N_U; u++) rdata_o[u] = m_rdata[modof(addr_i[u])];
    io_rdata_o = m_rdata[modof(io_addr_i)];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      ptr <= '0;
    else if (sh_gnt) ptr <= UW'((int'(sh_u) + 1) % N_U);
endmodule
