// map_cupi: Control Unit Processor Interface (CUPI).
//
// The CUPI executes the type-0 (inter-process) instructions and keeps, for
// the process active on each of the 8 control units (CUs), the registers the
// distribution switch and the other CUs must see: ID (8 bit), SECTOR mask
// (16 bit), INT (22-bit message entry address), SIG (8-bit receiver ID) and
// the ARM / ABLE flags.  ID and SECTOR feed the bus sector allocator.
//
// A CU calls the CUPI by storing a call word {opcode, R[1:0], EA[21:0]} at
// MM address 3FFFF8 + i; that store arrives here as call_i[i] and is
// accepted at once.  Pending calls are served round-robin.  For each call
// the CUPI finds the receiver j, the CU whose ID equals SIG[i], and
// evaluates the two predicates of the document:
//   privileged  P : ID[j] == SIG[i] and ID[j] is contained in ID[i]
//   cooperative C : ID[j] == SIG[i] and ID[j] & ID[i] != 0
// then carries out the instruction, reading or writing MM through its own
// address/data registers where needed, and ends with a completion pulse
// done_o[i] (with branch_o[i] for the conditional branches).  PREEMPT,
// SIGNAL and CLEAR redirect CU j through irq_o[j] (held until irq_ack_i[j],
// which CU j gives between two instructions); the CUPI then saves the
// interrupted instruction counter at 3FFFB8 + j (PREEMPT) or 3FFFB0 + j
// (SIGNAL).  The caller is released before the receiver is redirected.
//
// Follows the document: the predicates, the ID-load restriction (a new ID
// may not have bits the caller's ID lacks), ARM/ABLE handling, the save
// addresses, round-robin service.  Own choices: one process per CU is held
// here (the document's 4 per CU live in MM under operating-system control),
// load_i sets a process up (ARM and ABLE true, SIG and INT zero), DISABLE
// clears ABLE.  Not built: the MM message queue (ENQUEUE/DEQUEUE, so an
// undeliverable PREEMPT or SIGNAL is dropped and BMQE always branches),
// LDST/STST and the monitoring instruction MTRCTL.
module map_cupi
  import map_pkg::*;
#(
  parameter int unsigned N_CU = 8,
  localparam int unsigned CW  = $clog2(N_CU)
) (
  input  logic              clk,
  input  logic              rst_n,
  // process load (operating-system allocation)
  input  logic              load_i,
  input  logic [CW-1:0]     load_cu_i,
  input  id_t               load_id_i,
  input  logic [15:0]       load_sector_i,
  // calls from the CUs
  input  logic [N_CU-1:0]   call_i,
  input  word_t             call_word_i [N_CU],
  output logic [N_CU-1:0]   done_o,
  output logic [N_CU-1:0]   branch_o,
  // redirection of CUs
  output logic [N_CU-1:0]   halt_o,
  output logic [N_CU-1:0]   irq_o,
  output mmaddr_t           irq_pc_o   [N_CU],
  output word_t             irq_cac0_o [N_CU],
  input  logic [N_CU-1:0]   irq_ack_i,
  input  mmaddr_t           cu_pc_i    [N_CU],
  input  word_t             cu_cac0_i  [N_CU],
  input  logic [N_CU-1:0]   cu_running_i,
  // registers seen by the distribution switch
  output id_t               id_o     [N_CU],
  output logic [15:0]       sector_o [N_CU],
  output logic [N_CU-1:0]   arm_o,
  output logic [N_CU-1:0]   able_o,
  // main memory (CUPI address and data registers)
  output logic              mm_req_o,
  output logic              mm_we_o,
  output mmaddr_t           mm_addr_o,
  output word_t             mm_wdata_o,
  input  logic              mm_gnt_i,
  input  word_t             mm_rdata_i
);
  typedef enum logic [2:0] {C_IDLE, C_EXEC, C_MEM, C_ACK, C_SAVE} st_e;

  id_t         id   [N_CU];
  logic [15:0] sec  [N_CU];
  mmaddr_t     intr [N_CU];
  id_t         sig  [N_CU];
  logic [N_CU-1:0] arm, able, pend, keep_cac0;
  word_t       pword [N_CU];
  mmaddr_t     ipc   [N_CU];
  word_t       icac  [N_CU];

  st_e         st;
  logic [CW-1:0] ptr, ci, tj;
  word_t       w;
  mmaddr_t     save_pc;
  logic        save_sig;

  // decoded call
  wire [7:0]   op = w[31:24];
  wire mmaddr_t ea = w[21:0];

  // receiver lookup and predicates
  logic          found;
  logic [CW-1:0] j;
  always_comb begin
    found = 1'b0;
    j     = '0;
    for (int c = 0; c < N_CU; c++)
      if (!found && id[c] == sig[ci]) begin
        found = 1'b1;
        j     = CW'(c);
      end
  end
  wire priv = found && ((id[j] & ~id[ci]) == '0);
  wire coop = found && ((id[j] & id[ci]) != '0);

  // round-robin choice of the next call
  logic          nv;
  logic [CW-1:0] nxt;
  always_comb begin
    nv  = 1'b0;
    nxt = '0;
    for (int k = 0; k < N_CU; k++) begin
      logic [CW-1:0] c;
      c = CW'((int'(ptr) + k) % N_CU);
      if (!nv && pend[c]) begin nv = 1'b1; nxt = c; end
    end
  end

  // memory step of the current instruction
  logic    m_we;
  mmaddr_t m_addr;
  word_t   m_wdata;
  always_comb begin
    m_we = 1'b0; m_addr = ea; m_wdata = '0;
    unique case (op)
      OP_STID:  begin m_we = 1'b1; m_wdata = word_t'(id[j]); end
      OP_STINT: begin m_we = 1'b1; m_wdata = word_t'(intr[j]); end
      OP_STSEC: begin m_we = 1'b1; m_wdata = word_t'(sec[j]); end
      OP_STSIG: begin m_we = 1'b1; m_wdata = word_t'(sig[ci]); end
      OP_CLEAR: m_addr = SAVE_PREEMPT + mmaddr_t'(j);
      default: ;
    endcase
    if (st == C_SAVE) begin
      m_we    = 1'b1;
      m_addr  = (save_sig ? SAVE_SIGNAL : SAVE_PREEMPT) + mmaddr_t'(tj);
      m_wdata = word_t'(save_pc);
    end
  end
  assign mm_req_o   = (st == C_MEM) || (st == C_SAVE);
  assign mm_we_o    = m_we;
  assign mm_addr_o  = m_addr;
  assign mm_wdata_o = m_wdata;

  always_comb
    for (int c = 0; c < N_CU; c++) begin
      id_o[c]       = id[c];
      sector_o[c]   = sec[c];
      irq_pc_o[c]   = ipc[c];
      irq_cac0_o[c] = keep_cac0[c] ? cu_cac0_i[c] : icac[c];
    end
  assign arm_o  = arm;
  assign able_o = able;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; ptr <= '0; ci <= '0; tj <= '0; w <= '0;
      save_pc <= '0; save_sig <= 1'b0;
      arm <= '0; able <= '0; pend <= '0; keep_cac0 <= '0;
      done_o <= '0; branch_o <= '0; halt_o <= '0; irq_o <= '0;
      for (int c = 0; c < N_CU; c++) begin
        id[c] <= '0; sec[c] <= '0; intr[c] <= '0; sig[c] <= '0;
        pword[c] <= '0; ipc[c] <= '0; icac[c] <= '0;
      end
    end else begin
      done_o   <= '0;
      branch_o <= '0;
      // accept stores to the call window
      for (int c = 0; c < N_CU; c++)
        if (call_i[c]) begin pend[c] <= 1'b1; pword[c] <= call_word_i[c]; end
      // a halt request stays until the CU has stopped
      for (int c = 0; c < N_CU; c++)
        if (halt_o[c] && !cu_running_i[c]) halt_o[c] <= 1'b0;
      if (load_i) begin
        id[load_cu_i]   <= load_id_i;
        sec[load_cu_i]  <= load_sector_i;
        sig[load_cu_i]  <= '0;
        intr[load_cu_i] <= '0;
        arm[load_cu_i]  <= 1'b1;
        able[load_cu_i] <= 1'b1;
      end

      unique case (st)
        C_IDLE: if (nv) begin
          ci  <= nxt;
          w   <= pword[nxt];
          pend[nxt] <= 1'b0;
          ptr <= CW'((int'(nxt) + 1) % N_CU);
          st  <= C_EXEC;
        end
        C_EXEC: begin
          st <= C_IDLE;
          done_o[ci] <= 1'b1;
          unique case (op)
            OP_HALT:    if (priv) halt_o[j] <= 1'b1;
            OP_PREEMPT: if (priv && arm[j] && !irq_o[j]) begin
                          arm[j] <= 1'b0;
                          irq_o[j] <= 1'b1; ipc[j] <= ea; icac[j] <= cu_cac0_i[ci];
                          keep_cac0[j] <= 1'b0;
                          tj <= j; save_sig <= 1'b0; st <= C_ACK;
                        end
            OP_ARM:     if (priv) arm[j] <= 1'b1;
            OP_DISARM:  if (priv) begin arm[j] <= 1'b0; able[j] <= 1'b0; end
            OP_CLEAR, OP_LDID, OP_STID, OP_LDINT, OP_STINT, OP_LDSEC, OP_STSEC:
                        if (priv) begin done_o[ci] <= 1'b0; st <= C_MEM; end
            OP_LDSIG, OP_STSIG: begin done_o[ci] <= 1'b0; st <= C_MEM; end
            OP_SIGNAL:  if (coop && arm[j] && able[j] && !irq_o[j]) begin
                          able[j] <= 1'b0; arm[j] <= 1'b0;
                          irq_o[j] <= 1'b1; ipc[j] <= intr[j]; icac[j] <= cu_cac0_i[ci];
                          keep_cac0[j] <= 1'b0;
                          tj <= j; save_sig <= 1'b1; st <= C_ACK;
                        end
            OP_ENABLE:  able[ci] <= 1'b1;
            OP_DISABLE: able[ci] <= 1'b0;
            OP_BMQE:    branch_o[ci] <= 1'b1;          // queue never holds messages
            OP_BINA:    branch_o[ci] <= !found;
            OP_BDARM:   branch_o[ci] <= !found || !arm[j];
            OP_BDABL:   branch_o[ci] <= !found || !able[j];
            default: ;
          endcase
        end
        C_MEM: if (mm_gnt_i) begin
          st <= C_IDLE;
          done_o[ci] <= 1'b1;
          unique case (op)
            OP_LDID:  if ((mm_rdata_i[ID_W-1:0] & ~id[ci]) == '0) id[j] <= mm_rdata_i[ID_W-1:0];
            OP_LDINT: intr[j] <= mm_rdata_i[MMA_W-1:0];
            OP_LDSEC: sec[j]  <= mm_rdata_i[15:0];
            OP_LDSIG: sig[ci] <= mm_rdata_i[ID_W-1:0];
            OP_CLEAR: if (!irq_o[j]) begin
                        irq_o[j] <= 1'b1; ipc[j] <= mm_rdata_i[MMA_W-1:0];
                        keep_cac0[j] <= 1'b1;
                        arm[j] <= 1'b1;
                      end
            default: ;
          endcase
        end
        C_ACK: if (irq_ack_i[tj]) begin
          irq_o[tj] <= 1'b0;
          save_pc   <= cu_pc_i[tj];
          st        <= C_SAVE;
        end
        C_SAVE: if (mm_gnt_i) begin
          if (save_sig) arm[tj] <= 1'b1;   // receiver re-armed after the switch
          st <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
      // CLEAR's redirection needs no save; drop its request once taken
      for (int c = 0; c < N_CU; c++)
        if (irq_o[c] && irq_ack_i[c] && !(st == C_ACK && tj == CW'(c))) irq_o[c] <= 1'b0;
    end
  end
endmodule
