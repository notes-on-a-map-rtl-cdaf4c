// map_cu: one MAP control unit (CU).
//
// The CU runs one instruction stream.  It fetches each word from main
// memory (MM) through CUMAR/CUMDR, looks at the 3 high opcode bits and
// routes it:
//   type 0    stored, as a call word, to MM address 3FFFF8 + CU_INDEX where
//             the CUPI picks it up; the CU then waits for the CUPI's
//             completion (cupi_done_i), which may also say "branch to EA";
//   type 1-3  executed here on CAC[0..3] and PC, with MM and, for the
//             global and stream instructions, the PE subset;
//   type 4-7  broadcast through the DBR to the PEs, after which the CU waits
//             the fixed PE execution time PE_LAT (PEs never report back).
// Effective address: 16-bit address + CAC[X] (X = 1..3, 0 = no index),
// then, if I is set, one level of indirection through MM.  Every address the
// program forms is relocated by the base register (loaded with start_i)
// before it reaches CUMAR; the CUPI call address is not relocated, and the
// EA handed to the CUPI is already relocated.
//
// Execution is sequenced by a step counter per opcode, the way the
// document's microprogrammed decode unit would: each step is one MM
// access (held until mm_gnt_i), one bus transfer (held until sw_gnt_i; the
// answer of the PEs arrives in the same cycle) or an internal operation.
// Stream instructions (LSTR/SSTR/XSTR) move CAC[0] words: LSTR copies MM
// words EA.. onto the bus, SSTR collects one word per output slot into MM,
// XSTR feeds each collected word back to the bus one slot later.
//
// Interrupts from the CUPI (PREEMPT, SIGNAL) and HALT are taken only
// between instructions: irq_ack_o is high for one cycle while pc_o still
// holds the interrupted instruction counter, and PC and CAC[0] are loaded
// from irq_pc_i / irq_cac0_i.  A halted CU restarts on start_i or on an
// interrupt.
//
// Own choices (the document is silent): the field layout (map_pkg), the
// stream length in CAC[0], BR jumping to EA, the GM direction bit, the
// branch registers of BXxx packed in R as {R1,R2}, and BXCHNG testing the
// word that arrived from MM.
module map_cu
  import map_pkg::*;
#(
  parameter int unsigned CU_INDEX = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  // process allocation
  input  logic    start_i,
  input  mmaddr_t start_pc_i,
  input  mmaddr_t base_i,
  // main memory (CUMAR / CUMDR)
  output logic    mm_req_o,
  output logic    mm_we_o,
  output mmaddr_t mm_addr_o,
  output word_t   mm_wdata_o,
  input  logic    mm_gnt_i,
  input  word_t   mm_rdata_i,
  // distribution switch (DBR)
  output logic    sw_req_o,
  output bcmd_e   sw_cmd_o,
  output word_t   sw_data_o,
  input  logic    sw_gnt_i,
  input  word_t   sw_ret_i,
  input  logic    sw_any_i,
  input  logic    sw_many_i,
  // CUPI
  input  logic    cupi_done_i,
  input  logic    cupi_branch_i,
  input  logic    halt_i,
  input  logic    irq_i,
  input  mmaddr_t irq_pc_i,
  input  word_t   irq_cac0_i,
  output logic    irq_ack_o,
  output mmaddr_t pc_o,
  output word_t   cac0_o,
  output logic    running_o,
  output logic    busy_o        // inside an instruction
);
  typedef enum logic [2:0] {S_HALT, S_FETCH, S_DEC, S_IND, S_EXE} st_e;
  typedef enum logic [1:0] {K_INT, K_MEM, K_BUS, K_WAIT} kind_e;

  st_e     st;
  word_t   ir, tmp, cnt;
  word_t   cac [4];
  mmaddr_t pc, ea, base;
  logic [2:0] ph;
  logic [3:0] wcnt;

  // fields
  logic [7:0] op;
  logic [1:0] r, r1, r2, r3;
  logic [2:0] x;
  logic       uses_ea, pe_op;
  mmaddr_t    ea_pre;
  always_comb begin
    op      = ir[31:24];
    r       = ir[21:20];
    r3      = ir[21:20];
    r1      = ir[17:16];   // register format R1 (low bits of [19:16])
    r2      = ir[13:12];   // register format R2
    x       = f_x(ir);
    pe_op   = ir[31:29] >= 3'd4;
    uses_ea = (ir[31:29] == 3'd0) || (ir[31:29] == 3'd3) || op == OP_GL || op == OP_GS;
    ea_pre  = mmaddr_t'(f_adr(ir)) +
              ((x != 3'd0 && x < 3'd4) ? cac[x[1:0]][MMA_W-1:0] : '0);
  end
  // branch-format register pair {R1,R2} in the R field
  wire [1:0] b1 = ir[23:22];
  wire [1:0] b2 = ir[21:20];
  wire       gm_out = ir[11];
  wire [1:0] gm_r1  = ir[17:16];
  wire [1:0] gm_r3  = ir[21:20];
  wire [MMA_W-1:0] slen = cac[0][MMA_W-1:0];

  // branch condition of BXEQ..BXNN
  logic bcond;
  always_comb begin
    logic signed [31:0] a, b;
    a = $signed(cac[b1]);
    b = $signed(cac[b2]);
    unique case (op[3:0])
      4'h0: bcond = a == b;
      4'h1: bcond = a != b;
      4'h2: bcond = a >  b;
      4'h3: bcond = a <= b;
      4'h4: bcond = a <  b;
      4'h5: bcond = a >= b;
      4'h6: bcond = b == 0;
      4'h7: bcond = b != 0;
      4'h8: bcond = b >  0;
      4'h9: bcond = b <= 0;
      4'hA: bcond = b <  0;
      4'hB: bcond = b >= 0;
      default: bcond = 1'b0;
    endcase
  end

  // current step of the execute sequence
  kind_e   k;
  logic    k_we;
  mmaddr_t k_addr;
  word_t   k_wdata;
  bcmd_e   k_cmd;
  word_t   k_data;
  always_comb begin
    k = K_INT; k_we = 1'b0; k_addr = base + ea; k_wdata = '0;
    k_cmd = BC_NONE; k_data = '0;
    if (ir[31:29] == 3'd0) begin
      if (ph == 0) begin
        k = K_MEM; k_we = 1'b1;
        k_addr  = CUPI_CALL + MMA_W'(CU_INDEX);
        k_wdata = {op, r, base + ea};
      end
    end else if (pe_op) begin
      if (ph == 0) begin k = K_BUS; k_cmd = BC_INSTR; k_data = ir; end
      else k = K_WAIT;
    end else unique case (op)
      OP_GM: begin
        k = K_BUS;
        if (ph == 0) begin k_cmd = BC_INSTR; k_data = ir; end
        else if (gm_out) k_cmd = BC_QUERY;
        else begin k_cmd = BC_DATA; k_data = cac[gm_r1]; end
      end
      OP_GL: unique case (ph)
        3'd0:    begin k = K_BUS; k_cmd = BC_INSTR; k_data = ir; end
        3'd1:    k = K_MEM;
        default: begin k = K_BUS; k_cmd = BC_DATA; k_data = tmp; end
      endcase
      OP_GS: unique case (ph)
        3'd0:    begin k = K_BUS; k_cmd = BC_INSTR; k_data = ir; end
        3'd1:    begin k = K_BUS; k_cmd = BC_QUERY; end
        default: begin k = K_MEM; k_we = 1'b1; k_wdata = tmp; end
      endcase
      OP_CL, OP_CAM, OP_CSM: k = K_MEM;
      OP_CS:   begin k = K_MEM; k_we = 1'b1; k_wdata = cac[r]; end
      OP_XCHNG: begin
        k = K_MEM;
        if (ph != 0) begin k_we = 1'b1; k_wdata = cac[r]; end
      end
      OP_BXCHNG: begin
        k = K_MEM;
        if (ph != 0) begin k_we = 1'b1; k_wdata = cac[b2]; end
      end
      OP_PUSH: begin
        k = K_MEM;
        if (ph == 1) begin k_we = 1'b1; k_addr = base + tmp[MMA_W-1:0]; k_wdata = cac[r]; end
        if (ph == 2) begin k_we = 1'b1; k_wdata = tmp + 1; end
      end
      OP_PULL: begin
        k = K_MEM;
        if (ph == 1) begin k_we = 1'b1; k_wdata = tmp - 1; end
        if (ph == 2) k_addr = base + tmp[MMA_W-1:0] - 1'b1;
      end
      OP_BCT0, OP_BCT1, OP_BCTG1: begin k = K_BUS; k_cmd = BC_QUERY; end
      OP_LSTR: begin
        k_addr = base + ea + cnt[MMA_W-1:0];
        if (ph == 0) begin k = K_BUS; k_cmd = BC_INSTR; k_data = ir; end
        else if (ph == 1 && cnt[MMA_W-1:0] != slen) k = K_MEM;
        else if (ph == 2) begin k = K_BUS; k_cmd = BC_SIN; k_data = tmp; end
      end
      OP_SSTR: begin
        k_addr = base + ea + cnt[MMA_W-1:0];
        if (ph == 0) begin k = K_BUS; k_cmd = BC_INSTR; k_data = ir; end
        else if (ph == 1 && cnt[MMA_W-1:0] != slen) begin k = K_BUS; k_cmd = BC_SOUT; end
        else if (ph == 2) begin k = K_MEM; k_we = 1'b1; k_wdata = tmp; end
      end
      OP_XSTR: begin
        if (ph == 0) begin k = K_BUS; k_cmd = BC_INSTR; k_data = ir; end
        else if (slen != '0) begin
          k = K_BUS; k_data = tmp;
          k_cmd = (cnt == '0) ? BC_SOUT :
                  (cnt[MMA_W-1:0] == slen) ? BC_SIN : BC_SXCH;
        end
      end
      default: ;
    endcase
  end

  wire step_done = (st == S_EXE) &&
                   ((k == K_INT) ||
                    (k == K_MEM  && mm_gnt_i) ||
                    (k == K_BUS  && sw_gnt_i) ||
                    (k == K_WAIT && wcnt == 4'(PE_LAT - 2)) ||
                    1'b0);
  wire take_irq  = (st == S_FETCH || st == S_HALT) && irq_i && !halt_i;

  // MM port
  always_comb begin
    mm_req_o = 1'b0; mm_we_o = 1'b0; mm_addr_o = '0; mm_wdata_o = '0;
    unique case (st)
      S_FETCH: if (!halt_i && !irq_i) begin mm_req_o = 1'b1; mm_addr_o = base + pc; end
      S_IND:   begin mm_req_o = 1'b1; mm_addr_o = base + ea_pre; end
      S_EXE:   if (k == K_MEM) begin
                 mm_req_o = 1'b1; mm_we_o = k_we; mm_addr_o = k_addr; mm_wdata_o = k_wdata;
               end
      default: ;
    endcase
  end
  assign sw_req_o  = (st == S_EXE) && (k == K_BUS);
  assign sw_cmd_o  = sw_req_o ? k_cmd : BC_NONE;
  assign sw_data_o = k_data;
  assign irq_ack_o = take_irq;
  assign pc_o      = pc;
  assign cac0_o    = cac[0];
  assign running_o = (st != S_HALT);
  assign busy_o    = (st == S_DEC) || (st == S_IND) || (st == S_EXE);

  // last step of each sequence
  logic last;
  always_comb begin
    if (ir[31:29] == 3'd0) last = (ph == 1);
    else if (pe_op) last = (ph == 1);
    else unique case (op)
      OP_GM:                 last = (ph == 1);
      OP_GL, OP_GS, OP_PUSH, OP_PULL: last = (ph == 2);
      OP_XCHNG, OP_BXCHNG:   last = (ph == 1);
      OP_LSTR, OP_SSTR:      last = (ph == 1) && (cnt[MMA_W-1:0] == slen);
      OP_XSTR:               last = (ph != 0) && ((slen == '0) || (cnt[MMA_W-1:0] == slen));
      default:               last = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_HALT; ir <= '0; tmp <= '0; cnt <= '0; pc <= '0; ea <= '0; base <= '0;
      ph <= '0; wcnt <= '0;
      for (int i = 0; i < 4; i++) cac[i] <= '0;
    end else begin
      unique case (st)
        S_HALT: begin
          if (start_i) begin
            pc <= start_pc_i; base <= base_i; st <= S_FETCH;
          end else if (take_irq) begin
            pc <= irq_pc_i; cac[0] <= irq_cac0_i; st <= S_FETCH;
          end
        end
        S_FETCH: begin
          if (halt_i) st <= S_HALT;
          else if (take_irq) begin
            pc <= irq_pc_i; cac[0] <= irq_cac0_i;
          end else if (mm_gnt_i) begin
            ir <= mm_rdata_i; pc <= pc + 1'b1; st <= S_DEC;
          end
        end
        S_DEC: begin
          ph <= '0; wcnt <= '0; cnt <= '0; tmp <= '0;
          ea <= ea_pre;
          st <= (uses_ea && f_i(ir)) ? S_IND : S_EXE;
        end
        S_IND: if (mm_gnt_i) begin
          ea <= mm_rdata_i[MMA_W-1:0];
          st <= S_EXE;
        end
        S_EXE: begin
          if (k == K_WAIT) wcnt <= wcnt + 1'b1;
          if (ir[31:29] == 3'd0 && ph == 1) begin
            // waiting for the CUPI's completion interrupt
            if (cupi_done_i) begin
              if (cupi_branch_i) pc <= ea;
              st <= S_FETCH;
            end
          end else if (step_done) begin
            ph <= ph + 1'b1;
            if (last) st <= S_FETCH;
            if (ir[31:29] != 3'd0 && !pe_op) unique case (op)
              OP_GM:  if (ph == 1 && gm_out) cac[gm_r3] <= sw_ret_i;
              OP_CM:  cac[r3] <= cac[r1];
              OP_CAR: cac[r3] <= cac[r1] + cac[r2];
              OP_CSR: cac[r3] <= cac[r1] - cac[r2];
              OP_CLI: cac[r] <= f_opd(ir);
              OP_CAI: cac[r] <= cac[r] + f_opd(ir);
              OP_CSI: cac[r] <= cac[r] - f_opd(ir);
              OP_GL:  if (ph == 1) tmp <= mm_rdata_i;
              OP_GS:  if (ph == 1) tmp <= sw_ret_i;
              OP_CL:  cac[r] <= mm_rdata_i;
              OP_CAM: cac[r] <= cac[r] + mm_rdata_i;
              OP_CSM: cac[r] <= cac[r] - mm_rdata_i;
              OP_XCHNG: if (ph == 0) tmp <= mm_rdata_i; else cac[r] <= tmp;
              OP_BR:   pc <= ea;
              OP_SUBR: begin cac[r] <= word_t'(pc); pc <= ea; end
              OP_BCT0:  if (!sw_any_i) pc <= ea;
              OP_BCT1:  if (sw_any_i && !sw_many_i) pc <= ea;
              OP_BCTG1: if (sw_many_i) pc <= ea;
              OP_BXCHNG: if (ph == 0) tmp <= mm_rdata_i;
                         else begin
                           cac[b2] <= tmp;
                           if (tmp == '0) pc <= cac[b1][MMA_W-1:0];
                         end
              OP_PUSH: if (ph == 0) tmp <= mm_rdata_i;
              OP_PULL: if (ph == 0) tmp <= mm_rdata_i;
                       else if (ph == 2) cac[r] <= mm_rdata_i;
              OP_LSTR: if (ph == 1) tmp <= mm_rdata_i;
                       else if (ph == 2) begin cnt <= cnt + 1; ph <= 3'd1; end
              OP_SSTR: if (ph == 1) tmp <= sw_ret_i;
                       else if (ph == 2) begin cnt <= cnt + 1; ph <= 3'd1; end
              OP_XSTR: if (ph != 0) begin tmp <= sw_ret_i; cnt <= cnt + 1; ph <= 3'd1; end
              default:
                if (op >= OP_BXEQ && op <= OP_BXNN && bcond) pc <= ea;
            endcase
          end
        end
        default: st <= S_HALT;
      endcase
    end
  end

  // a bus request and a memory request are never raised together
  always_comb assert (!(rst_n && sw_req_o && mm_req_o));
endmodule
