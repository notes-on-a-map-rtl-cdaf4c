// map_pkg: constants, instruction fields and bus types shared by the MAP
// (Multi Associative Processor) array processor.
//
// Machine shape: 8 control units (CUs), 1024 processing elements (PEs) in
// 16 bus sectors of 64, 32-bit words, 22-bit main-memory (MM) addresses,
// 4K-word PE memories (PEM), 16 MM modules of 256K words.  These numbers and
// the opcode values (type in the 3 high bits of the 8-bit opcode, operation
// in the low 5) follow the document's sample instruction set.
//
// The document gives no bit layout for an instruction word beyond the 8-bit
// opcode; the field layout below is this design's own:
//   [31:24] opcode  = {type[2:0], op[4:0]}
//   memory format   : [23:20] R  [19:17] X (index reg, 0 = none)  [16] I
//                     (single-level indirect)  [15:0] address
//   register format : [23:20] R3 [19:16] R1 [15:12] R2 [11] D (direction of
//                     a CU<->PE move, 1 = PE to CU)
//   immediate format: [23:20] R  [19:0] OPD (sign extended)
//   associative     : [23:16] KEY [15:8] MASK [7] N [6:4] R [3:1] R2
// PE register codes 0-7 name AC[0..7]; 8 = ICTL, 9 = OCTL, 10 = SELECT (as
// the document's assembler numbers them) and 11 = OWNER (own choice).
package map_pkg;

  localparam int unsigned WORD_W   = 32;
  localparam int unsigned MMA_W    = 22;   // CUMAR width
  localparam int unsigned ID_W     = 8;    // ID, SIG, OWNER width
  localparam int unsigned CTL_W    = 10;   // ICTL / OCTL width
  localparam int unsigned SEL_W    = 8;    // SELECT register width
  localparam int unsigned NUM_CU   = 8;
  localparam int unsigned NUM_SECTOR = 16;

  // Fixed PE execution time the CU allows after broadcasting a PE
  // instruction (synchronous completion, no interrupt from the PEs).
  localparam int unsigned PE_LAT   = 3;

  // CUPI call window: a CU stores a type-0 instruction at CUPI_CALL + i.
  localparam logic [MMA_W-1:0] CUPI_CALL     = 22'h3FFFF8;
  localparam logic [MMA_W-1:0] SAVE_SIGNAL   = 22'h3FFFB0;  // IC save, SIGNAL
  localparam logic [MMA_W-1:0] SAVE_PREEMPT  = 22'h3FFFB8;  // IC save, PREEMPT

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [MMA_W-1:0]  mmaddr_t;
  typedef logic [ID_W-1:0]   id_t;

  // Instruction types (3 MSBs of the opcode)
  localparam logic [2:0] T_CUPI = 3'd0;

  // ---- type 0: CUPI instructions ----
  localparam logic [7:0] OP_HALT    = 8'h00;
  localparam logic [7:0] OP_PREEMPT = 8'h01;
  localparam logic [7:0] OP_ARM     = 8'h02;
  localparam logic [7:0] OP_DISARM  = 8'h03;
  localparam logic [7:0] OP_CLEAR   = 8'h04;
  localparam logic [7:0] OP_LDID    = 8'h05;
  localparam logic [7:0] OP_STID    = 8'h06;
  localparam logic [7:0] OP_LDINT   = 8'h07;
  localparam logic [7:0] OP_STINT   = 8'h08;
  localparam logic [7:0] OP_LDSEC   = 8'h09;
  localparam logic [7:0] OP_STSEC   = 8'h0A;
  localparam logic [7:0] OP_LDSIG   = 8'h0E;
  localparam logic [7:0] OP_STSIG   = 8'h0F;
  localparam logic [7:0] OP_SIGNAL  = 8'h10;
  localparam logic [7:0] OP_ENABLE  = 8'h11;
  localparam logic [7:0] OP_DISABLE = 8'h12;
  localparam logic [7:0] OP_BMQE    = 8'h13;
  localparam logic [7:0] OP_BINA    = 8'h14;
  localparam logic [7:0] OP_BDARM   = 8'h15;
  localparam logic [7:0] OP_BDABL   = 8'h16;

  // ---- types 1-3: CU instructions ----
  localparam logic [7:0] OP_GM    = 8'h21;  // GMCP/GMPC/GMICR/GMRIC/GMOCR/GMROC
  localparam logic [7:0] OP_CM    = 8'h22;
  localparam logic [7:0] OP_CAR   = 8'h23;
  localparam logic [7:0] OP_CSR   = 8'h25;
  localparam logic [7:0] OP_CLI   = 8'h40;
  localparam logic [7:0] OP_CAI   = 8'h43;
  localparam logic [7:0] OP_CSI   = 8'h45;
  localparam logic [7:0] OP_GL    = 8'h48;
  localparam logic [7:0] OP_GS    = 8'h49;
  localparam logic [7:0] OP_CL    = 8'h60;
  localparam logic [7:0] OP_CS    = 8'h61;
  localparam logic [7:0] OP_XCHNG = 8'h62;
  localparam logic [7:0] OP_CAM   = 8'h63;
  localparam logic [7:0] OP_CSM   = 8'h65;
  localparam logic [7:0] OP_BR    = 8'h66;
  localparam logic [7:0] OP_SUBR  = 8'h67;
  localparam logic [7:0] OP_LSTR  = 8'h68;
  localparam logic [7:0] OP_SSTR  = 8'h69;
  localparam logic [7:0] OP_XSTR  = 8'h6A;
  localparam logic [7:0] OP_BCT0  = 8'h6D;
  localparam logic [7:0] OP_BCT1  = 8'h6E;
  localparam logic [7:0] OP_BCTG1 = 8'h6F;
  localparam logic [7:0] OP_BXEQ  = 8'h70;
  localparam logic [7:0] OP_BXNN  = 8'h7B;
  localparam logic [7:0] OP_BXCHNG= 8'h7C;
  localparam logic [7:0] OP_PUSH  = 8'h7D;
  localparam logic [7:0] OP_PULL  = 8'h7E;

  // ---- types 4-7: PE instructions (type 4 associative) ----
  localparam logic [7:0] OP_SELECT = 8'h80;
  localparam logic [7:0] OP_COMSEL = 8'h81;
  localparam logic [7:0] OP_SET    = 8'h82;
  localparam logic [7:0] OP_SETPL  = 8'h83;
  localparam logic [7:0] OP_SETNG  = 8'h84;
  localparam logic [7:0] OP_SETZR  = 8'h85;
  localparam logic [7:0] OP_SETEQ  = 8'h87;
  localparam logic [7:0] OP_SETNE  = 8'h88;
  localparam logic [7:0] OP_SETLT  = 8'h89;
  localparam logic [7:0] OP_SETGT  = 8'h8A;
  localparam logic [7:0] OP_SETLE  = 8'h8B;
  localparam logic [7:0] OP_SETGE  = 8'h8C;
  localparam logic [7:0] OP_SCI    = 8'h98;
  localparam logic [7:0] OP_SLI    = 8'h99;
  localparam logic [7:0] OP_SAI    = 8'h9A;
  // type 5: register-register
  localparam logic [7:0] OP_M      = 8'hA2;
  localparam logic [7:0] OP_AR     = 8'hA3;
  localparam logic [7:0] OP_SR     = 8'hA5;
  localparam logic [7:0] OP_MR     = 8'hA8;
  localparam logic [7:0] OP_DR     = 8'hAA;
  localparam logic [7:0] OP_ORR    = 8'hAC;
  localparam logic [7:0] OP_ANDR   = 8'hAD;
  localparam logic [7:0] OP_EORR   = 8'hAE;
  localparam logic [7:0] OP_NOT    = 8'hAF;
  localparam logic [7:0] OP_SC     = 8'hB8;
  localparam logic [7:0] OP_SL     = 8'hB9;
  localparam logic [7:0] OP_SA     = 8'hBA;
  // type 6: immediate
  localparam logic [7:0] OP_LI     = 8'hC0;
  localparam logic [7:0] OP_AI     = 8'hC3;
  localparam logic [7:0] OP_SI     = 8'hC5;
  // type 7: PE memory
  localparam logic [7:0] OP_L      = 8'hE0;
  localparam logic [7:0] OP_S      = 8'hE1;
  localparam logic [7:0] OP_AM     = 8'hE3;
  localparam logic [7:0] OP_SM     = 8'hE5;
  localparam logic [7:0] OP_MM     = 8'hE8;
  localparam logic [7:0] OP_DM     = 8'hEA;
  localparam logic [7:0] OP_ORM    = 8'hEC;
  localparam logic [7:0] OP_ANDM   = 8'hED;
  localparam logic [7:0] OP_EORM   = 8'hEE;

  // PE register codes beyond AC[0..7]
  localparam logic [3:0] RC_ICTL  = 4'd8;
  localparam logic [3:0] RC_OCTL  = 4'd9;
  localparam logic [3:0] RC_SEL   = 4'd10;
  localparam logic [3:0] RC_OWNER = 4'd11;

  // Command carried with a word on a distribution-switch bus
  typedef enum logic [2:0] {
    BC_NONE  = 3'd0,
    BC_INSTR = 3'd1,   // instruction word for the PEs
    BC_DATA  = 3'd2,   // operand for PEs waiting on a global operation
    BC_QUERY = 3'd3,   // PEs holding an output drive it (wired OR)
    BC_SIN   = 3'd4,   // stream word in   (ICTL counts)
    BC_SOUT  = 3'd5,   // stream slot out  (OCTL counts)
    BC_SXCH  = 3'd6    // both at once
  } bcmd_e;

  typedef struct packed {
    logic  valid;
    bcmd_e cmd;
    id_t   id;
    word_t data;
  } sbus_t;   // one sector bus, switch to PEs

  // Field helpers
  function automatic logic [3:0] f_r(word_t w);   return w[23:20]; endfunction
  function automatic logic [3:0] f_r1(word_t w);  return w[19:16]; endfunction
  function automatic logic [3:0] f_r2(word_t w);  return w[15:12]; endfunction
  function automatic logic [2:0] f_x(word_t w);   return w[19:17]; endfunction
  function automatic logic       f_i(word_t w);   return w[16];    endfunction
  function automatic logic [15:0] f_adr(word_t w); return w[15:0]; endfunction
  function automatic word_t f_opd(word_t w);
    return {{12{w[19]}}, w[19:0]};
  endfunction

  // Associative match: true when every bit satisfies (SELECT == KEY) | ~MASK
  function automatic logic sel_match(logic [7:0] sel, logic [7:0] key,
                                     logic [7:0] mask);
    return &((~(sel ^ key)) | ~mask);
  endfunction

  // Shift by a signed count: positive shifts left, negative right.
  function automatic word_t shift_op(word_t a, word_t cnt, logic [1:0] kind);
    // kind: 0 circular, 1 logical, 2 arithmetic right by |cnt|
    logic [4:0] n;
    logic       left;
    left = !cnt[31];
    n    = cnt[31] ? 5'(-cnt) : cnt[4:0];
    unique case (kind)
      2'd0:    return left ? ((a << n) | (a >> (6'd32 - {1'b0, n})))
                           : ((a >> n) | (a << (6'd32 - {1'b0, n})));
      2'd1:    return left ? (a << n) : (a >> n);
      default: return word_t'($signed(a) >>> n);
    endcase
  endfunction

endpackage
