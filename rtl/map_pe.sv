// map_pe: one MAP processing element (PE) with its private memory (PEM).
//
// A PE listens to the bus of its sector.  A word on that bus is meant for
// this PE when the ID that travels with it equals the PE's OWNER register,
// which is written when the PE is allocated to a control unit (alloc_we_i).
// An owned instruction word (BC_INSTR) is decoded by every owned PE, but
// only active PEs execute it; an inactive PE executes only SELECT and
// COMSEL, the instructions that can change its activity.
//
// Registers: AC[0..7] (32 bit; AC[1..7] can index PEM), SELECT (8 bit
// condition store), ICTL and OCTL (10-bit stream counters), OWNER (8 bit),
// and the activity flag.
//
// Timing.  A local instruction (types 4-7) takes PE_LAT = 3 cycles: the
// cycle it is on the bus, EX1 (effective address = address + AC[X],
// optionally replaced by PEM[that] for single-level indirection), and EX2
// (operand read, ALU, write back).  The control unit simply waits that long.
// Global instructions (GM, GL, GS) move the PE at once into a state that
// waits for an operand (BC_DATA) or holds a value to be read (BC_QUERY).
// Stream instructions (LSTR, SSTR, XSTR) move it into a stream state: on
// every bus cycle of its owner that carries stream input, ICTL is counted
// down and the word that arrives when it has reached zero is taken; OCTL
// does the same for output slots, and the PE drives its word in the slot
// where OCTL is zero.  Driven words of all PEs of a sector are ORed.
//
// From the document: the OWNER match, the activity rules of SELECT/COMSEL
// (with and without ,R), the SET rule SELECT <- (SELECT & ~MASK) | KEY, the
// ICTL/OCTL count-down, the register and instruction repertoire.  Own
// choices: the instruction field layout (see map_pkg), signed integer
// arithmetic, division by zero giving quotient -1 and remainder = dividend,
// shift counts positive = left.  Floating point, NORM, FIX, and the
// cross-PE SETMAX/SETMIN/SETFST/CLRST family are not built.
module map_pe
  import map_pkg::*;
#(
  parameter int unsigned PEM_WORDS = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  // allocation to a control unit
  input  logic        alloc_we_i,
  input  id_t         alloc_owner_i,
  // sector bus
  input  sbus_t       bus_i,
  output word_t       ret_data_o,   // driven word, 0 when not driving
  output logic        ret_act_o,    // owned and active (for BCT0/1/G1)
  // observation
  output logic        active_o,
  output id_t         owner_o
);
  localparam int unsigned PAW = $clog2(PEM_WORDS);

  typedef enum logic [2:0] {S_IDLE, S_EX1, S_EX2, S_WDATA, S_OUTP, S_STRM} st_e;
  st_e        st;
  word_t      ir, ea, outv;
  word_t      ac [8];
  logic [CTL_W-1:0] ictl, octl;
  logic [SEL_W-1:0] sel;
  id_t        owner;
  logic       active;
  logic [3:0] wreg;                 // destination of DATA / stream input
  logic       s_in, s_out, in_done, out_done;

  // PEM
  logic [PAW-1:0] pem_addr;
  word_t          pem_rdata;
  logic           pem_we;
  word_t          pem_wdata;
  map_ram #(.DEPTH(PEM_WORDS), .WIDTH(32)) u_pem (
    .clk, .we_i(pem_we), .addr_i(pem_addr), .wdata_i(pem_wdata), .rdata_o(pem_rdata));

  wire mine = bus_i.valid && (bus_i.id == owner);

  // register file read by code
  function automatic word_t rd(input logic [3:0] c);
    if (c < 4'd8) return ac[c[2:0]];
    unique case (c)
      RC_ICTL:  return word_t'(ictl);
      RC_OCTL:  return word_t'(octl);
      RC_SEL:   return word_t'(sel);
      RC_OWNER: return word_t'(owner);
      default:  return '0;
    endcase
  endfunction

  // decoded fields
  logic [7:0] op;
  logic [3:0] fr, fr1, fr2;
  logic [2:0] fx;
  word_t      ea_pre, a_r, a_r1, a_r2, opd;
  logic [7:0] key, mask;
  logic       nbit;
  always_comb begin
    op     = ir[31:24];
    fr     = f_r(ir);
    fr1    = f_r1(ir);
    fr2    = f_r2(ir);
    fx     = f_x(ir);
    opd    = f_opd(ir);
    key    = ir[23:16];
    mask   = ir[15:8];
    nbit   = ir[7];
    ea_pre = word_t'(f_adr(ir)) + ((fx != 3'd0) ? ac[fx] : '0);
    a_r    = rd(fr);
    a_r1   = rd(fr1);
    a_r2   = rd(fr2);
  end

  // PEM port
  always_comb begin
    pem_addr  = (st == S_EX1) ? ea_pre[PAW-1:0] : ea[PAW-1:0];
    pem_we    = (st == S_EX2) && (op == OP_S);
    pem_wdata = a_r;
  end

  // associative condition of the SETxx instructions
  word_t as_r, as_r2;
  logic  cond;
  always_comb begin
    as_r  = ac[ir[6:4]];
    as_r2 = ac[ir[3:1]];
    unique case (op)
      OP_SET:   cond = 1'b1;
      OP_SETPL: cond = !as_r[31];
      OP_SETNG: cond = as_r[31];
      OP_SETZR: cond = (as_r == '0);
      OP_SETEQ: cond = (as_r == as_r2);
      OP_SETNE: cond = (as_r != as_r2);
      OP_SETLT: cond = ($signed(as_r) <  $signed(as_r2));
      OP_SETGT: cond = ($signed(as_r) >  $signed(as_r2));
      OP_SETLE: cond = ($signed(as_r) <= $signed(as_r2));
      OP_SETGE: cond = ($signed(as_r) >= $signed(as_r2));
      default:  cond = 1'b0;
    endcase
  end

  // signed division with defined results for /0 and overflow
  function automatic word_t sdiv(word_t a, word_t b);
    if (b == '0) return '1;
    if (a == 32'h8000_0000 && b == '1) return a;
    return word_t'($signed(a) / $signed(b));
  endfunction
  function automatic word_t smod(word_t a, word_t b);
    if (b == '0) return a;
    if (a == 32'h8000_0000 && b == '1) return '0;
    return word_t'($signed(a) % $signed(b));
  endfunction

  // EX2 result for register-writing instructions
  logic       wr_en, wr2_en;
  logic [3:0] wr_c, wr2_c;
  word_t      wr_v, wr2_v;
  word_t      m;
  always_comb begin
    m      = pem_rdata;
    wr_en  = 1'b0;  wr_c  = fr;  wr_v  = '0;
    wr2_en = 1'b0;  wr2_c = '0;  wr2_v = '0;
    unique case (op)
      OP_SCI:  begin wr_en = 1; wr_v = shift_op(a_r, opd, 2'd0); end
      OP_SLI:  begin wr_en = 1; wr_v = shift_op(a_r, opd, 2'd1); end
      OP_SAI:  begin wr_en = 1; wr_v = shift_op(a_r, opd[31] ? -opd : opd, 2'd2); end
      OP_M:    begin wr_en = 1; wr_v = a_r1; end
      OP_AR:   begin wr_en = 1; wr_v = a_r1 + a_r2; end
      OP_SR:   begin wr_en = 1; wr_v = a_r1 - a_r2; end
      OP_MR:   begin wr_en = 1; wr_v = word_t'($signed(a_r1) * $signed(a_r2)); end
      OP_DR:   begin
                 wr_en  = 1; wr_c  = {fr[3:1], 1'b0};       wr_v  = sdiv(a_r1, a_r2);
                 wr2_en = 1; wr2_c = {fr[3:1], 1'b1};       wr2_v = smod(a_r1, a_r2);
               end
      OP_ORR:  begin wr_en = 1; wr_v = a_r1 | a_r2; end
      OP_ANDR: begin wr_en = 1; wr_v = a_r1 & a_r2; end
      OP_EORR: begin wr_en = 1; wr_v = a_r1 ^ a_r2; end
      OP_NOT:  begin wr_en = 1; wr_v = ~a_r1; end
      OP_SC:   begin wr_en = 1; wr_v = shift_op(a_r1, a_r2, 2'd0); end
      OP_SL:   begin wr_en = 1; wr_v = shift_op(a_r1, a_r2, 2'd1); end
      OP_SA:   begin wr_en = 1; wr_v = shift_op(a_r1, a_r2[31] ? -a_r2 : a_r2, 2'd2); end
      OP_LI:   begin wr_en = 1; wr_v = opd; end
      OP_AI:   begin wr_en = 1; wr_v = a_r + opd; end
      OP_SI:   begin wr_en = 1; wr_v = a_r - opd; end
      OP_L:    begin wr_en = 1; wr_v = m; end
      OP_AM:   begin wr_en = 1; wr_v = a_r + m; end
      OP_SM:   begin wr_en = 1; wr_v = a_r - m; end
      OP_MM:   begin wr_en = 1; wr_v = word_t'($signed(a_r) * $signed(m)); end
      OP_DM:   begin
                 wr_en  = 1; wr_c  = {fr[3:1], 1'b0};       wr_v  = sdiv(rd({fr[3:1], 1'b0}), m);
                 wr2_en = 1; wr2_c = {fr[3:1], 1'b1};       wr2_v = smod(rd({fr[3:1], 1'b0}), m);
               end
      OP_ORM:  begin wr_en = 1; wr_v = a_r | m; end
      OP_ANDM: begin wr_en = 1; wr_v = a_r & m; end
      OP_EORM: begin wr_en = 1; wr_v = a_r ^ m; end
      default: ;
    endcase
    // type 5 writes R3, held in the R field position
  end

  // register write helper (sequential)
  task automatic wreg_set(input logic [3:0] c, input word_t v);
    if (c < 4'd8) ac[c[2:0]] <= v;
    else unique case (c)
      RC_ICTL:  ictl  <= v[CTL_W-1:0];
      RC_OCTL:  octl  <= v[CTL_W-1:0];
      RC_SEL:   sel   <= v[SEL_W-1:0];
      RC_OWNER: owner <= v[ID_W-1:0];
      default:  ;
    endcase
  endtask

  wire is_local = (bus_i.data[31:29] >= 3'd4);
  wire [7:0] bop = bus_i.data[31:24];
  wire in_slot  = mine && (bus_i.cmd == BC_SIN  || bus_i.cmd == BC_SXCH);
  wire out_slot = mine && (bus_i.cmd == BC_SOUT || bus_i.cmd == BC_SXCH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ir <= '0; ea <= '0; outv <= '0;
      for (int k = 0; k < 8; k++) ac[k] <= '0;
      ictl <= '0; octl <= '0; sel <= '0; owner <= '0; active <= 1'b0;
      wreg <= '0; s_in <= 0; s_out <= 0; in_done <= 0; out_done <= 0;
    end else begin
      if (alloc_we_i) begin
        owner  <= alloc_owner_i;
        active <= 1'b1;
      end
      unique case (st)
        S_EX1: begin
          ea <= f_i(ir) ? pem_rdata : ea_pre;
          st <= S_EX2;
        end
        S_EX2: begin
          st <= S_IDLE;
          if (op == OP_SELECT || op == OP_COMSEL) begin
            logic mt;
            mt = sel_match(sel, key, mask);
            if (op == OP_SELECT) active <= nbit ? (active & mt) : mt;
            else                 active <= nbit ? (active & ~mt) : ~mt;
          end else if (op >= OP_SET && op <= OP_SETGE) begin
            if (cond) sel <= (sel & ~mask) | key;
          end else begin
            if (wr_en)  wreg_set(wr_c, wr_v);
            if (wr2_en) wreg_set(wr2_c, wr2_v);
          end
        end
        S_WDATA: if (mine && bus_i.cmd == BC_DATA) begin
          wreg_set(wreg, bus_i.data);
          st <= S_IDLE;
        end
        S_OUTP: if (mine && bus_i.cmd == BC_QUERY) st <= S_IDLE;
        S_STRM: begin
          if (in_slot && s_in && !in_done) begin
            if (ictl == '0) begin
              wreg_set(wreg, bus_i.data);
              in_done <= 1'b1;
            end else ictl <= ictl - 1'b1;
          end
          if (out_slot && s_out && !out_done) begin
            if (octl == '0) out_done <= 1'b1;
            else            octl <= octl - 1'b1;
          end
        end
        default: ;
      endcase
      // a new instruction word ends any wait and starts decoding
      if (mine && bus_i.cmd == BC_INSTR && !alloc_we_i) begin
        ir <= bus_i.data;
        st <= S_IDLE;
        if (is_local) begin
          if (active || bop == OP_SELECT || bop == OP_COMSEL) st <= S_EX1;
        end else if (active) begin
          unique case (bop)
            OP_GM: if (bus_i.data[11]) begin       // PE -> CU
                     outv <= rd(bus_i.data[19:16]); st <= S_OUTP;
                   end else begin                  // CU -> PE
                     wreg <= bus_i.data[23:20];   st <= S_WDATA;
                   end
            OP_GL: begin wreg <= bus_i.data[23:20]; st <= S_WDATA; end
            OP_GS: begin outv <= rd(bus_i.data[23:20]); st <= S_OUTP; end
            OP_LSTR, OP_SSTR, OP_XSTR: begin
              st       <= S_STRM;
              s_in     <= (bop != OP_SSTR);
              s_out    <= (bop != OP_LSTR);
              in_done  <= 1'b0;
              out_done <= 1'b0;
              wreg     <= (bop == OP_XSTR) ? {bus_i.data[23:21], 1'b1} : bus_i.data[23:20];
              outv     <= (bop == OP_XSTR) ? rd({bus_i.data[23:21], 1'b0}) : rd(bus_i.data[23:20]);
            end
            default: ;
          endcase
        end
      end
    end
  end

  // return path
  always_comb begin
    ret_data_o = '0;
    if (mine && active) begin
      if (st == S_OUTP && bus_i.cmd == BC_QUERY) ret_data_o = outv;
      if (st == S_STRM && out_slot && s_out && !out_done && octl == '0) ret_data_o = outv;
    end
  end
  assign ret_act_o = mine && active;
  assign active_o  = active;
  assign owner_o   = owner;

endmodule
