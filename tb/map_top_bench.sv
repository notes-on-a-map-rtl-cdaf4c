// map_top_bench: stimulus and checker for an end-to-end run of map_top.
// It is shared by tb_map_top (reduced sizes) and tb_map_top_full (all
// sizes at their defaults), which instantiate map_top themselves, connect
// it here and preload one word of PE memory in eight PEs.
//
// Setup, as an operating system would do it: four programs are written into
// main memory through the I/O port (CU c's program in MM module c, its
// relocation base c*MOD_WORDS), PEs are allocated by writing their OWNER,
// the CUPI gets each process's ID and sector mask, and the four CUs start.
//   CU0 (ID 01, PEs 0,1 of sector 0 and PE 0 of sector 1) and
//   CU1 (ID 02, PE 1 of sector 1 and PEs 0,1 of sector 2) share sector 1,
//       so their PE broadcasts collide; each runs a 12-pass PE loop, reads
//       the PE sum back with GM and stores it in a shared MM area (module
//       12, reached over the shared memory bus through an index register).
//       CU1 then raises a done flag and spins.
//   CU2 (ID 04, two PEs in each of sectors 4-7, PE memory word 0 = rank
//       0..7) loads ICTL/OCTL from that word, reads an 8-word vector with
//       LSTR, adds 1000 in the PEs, writes it back with SSTR, deactivates
//       ranks 4-7 with SETNG/SELECT, tests the count with BCTG1, does GS on
//       the active half, reactivates all, does GL and a GM read-back, then
//       raises its done flag and spins.
//   CU3 (ID 0F, no PEs) is the supervisor: it polls the flags, SIGNALs CU1
//       into its message routine, PREEMPTs CU2 into another, checks BINA
//       with an unused ID, and halts.  Every process halts itself through
//       LDSIG (own ID) + HALT.
// Afterwards MM is read back through the I/O port and compared with values
// worked out here.  Counted mechanisms, each of which must occur: switch
// transmission conflicts, refused switch requests (stalls), sector
// conflicts, shared MM bus transfers, CUPI calls, interrupts taken, halts,
// stream input and output cycles, and PE deactivations.
module map_top_bench
  import map_pkg::*;
  import map_asm_pkg::*;
#(
  parameter int unsigned N_PE       = 32,
  parameter int unsigned MOD_WORDS  = 1024,
  parameter int unsigned MAX_CYCLES = 20000,
  localparam int unsigned PW        = $clog2(N_PE),
  localparam int unsigned NC        = NUM_CU
) (
  output logic            clk,
  output logic            rst_n,
  output logic [NC-1:0]   cu_start,
  output mmaddr_t         cu_start_pc [NC],
  output mmaddr_t         cu_base     [NC],
  output logic            pe_alloc_we,
  output logic [PW-1:0]   pe_alloc_idx,
  output id_t             pe_alloc_owner,
  output logic            cupi_load,
  output logic [2:0]      cupi_load_cu,
  output id_t             cupi_load_id,
  output logic [15:0]     cupi_load_sector,
  output logic            io_req,
  output logic            io_we,
  output mmaddr_t         io_addr,
  output word_t           io_wdata,
  input  logic            io_gnt,
  input  word_t           io_rdata,
  input  logic [NC-1:0]   cu_running,
  input  logic [NC-1:0]   sw_gnt,
  input  logic [NC-1:0]   sw_req,
  input  logic            sector_conflict,
  input  logic            xmit_conflict,
  input  logic            mm_shared_busy,
  input  logic [N_PE-1:0] pe_active,
  // probes inside the design
  input  logic [NC-1:0]   cupi_call,
  input  logic [NC-1:0]   irq_ack,
  input  logic [NC-1:0]   cu_halt,
  input  sbus_t           sbus [NUM_SECTOR]
);
  localparam int unsigned SP = N_PE / NUM_SECTOR;     // PEs per sector
  localparam mmaddr_t     SH = mmaddr_t'(12 * MOD_WORDS);
  localparam logic [7:0]  OP_BXNE = OP_BXEQ + 8'd1;  // a != b
  localparam logic [7:0]  OP_BXZ  = OP_BXEQ + 8'd6;  // b == 0

  int checks = 0, failures = 0;
  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: stopped after %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_xmit = 0, n_stall = 0, n_sec = 0, n_shared = 0, n_call = 0, n_irq = 0;
  int n_halt = 0, n_sin = 0, n_sout = 0, n_deact = 0;
  logic [N_PE-1:0] act_q;
  always @(posedge clk) if (rst_n) begin
    if (xmit_conflict)          n_xmit++;
    if ((sw_req & ~sw_gnt) != 0) n_stall++;
    if (sector_conflict)        n_sec++;
    if (mm_shared_busy)         n_shared++;
    n_call += $countones(cupi_call);
    n_irq  += $countones(irq_ack);
    n_halt += $countones(cu_halt & cu_running);
    for (int s = 0; s < NUM_SECTOR; s++) begin
      if (sbus[s].valid && sbus[s].cmd == BC_SIN)  n_sin++;
      if (sbus[s].valid && sbus[s].cmd == BC_SOUT) n_sout++;
    end
    n_deact += $countones(act_q & ~pe_active);
    act_q <= pe_active;
  end

  // ---------------- memory image ----------------
  word_t img [mmaddr_t];
  function automatic mmaddr_t base(int c);
    return mmaddr_t'(c * MOD_WORDS);
  endfunction
  function automatic void put(int c, int a, word_t w);
    img[base(c) + mmaddr_t'(a)] = w;
  endfunction

  task automatic io_write(mmaddr_t a, word_t d);
    @(negedge clk);
    io_req = 1'b1; io_we = 1'b1; io_addr = a; io_wdata = d;
    @(posedge clk);
    while (!io_gnt) @(posedge clk);
    #1 io_req = 1'b0; io_we = 1'b0;
  endtask
  task automatic io_read(mmaddr_t a, output word_t d);
    @(negedge clk);
    io_req = 1'b1; io_we = 1'b0; io_addr = a;
    #1;
    while (!io_gnt) begin @(negedge clk); #1; end
    d = io_rdata;
    @(posedge clk);
    #1 io_req = 1'b0;
  endtask
  task automatic expect_mm(string what, mmaddr_t a, word_t exp);
    word_t v;
    io_read(a, v);
    checks++;
    if (v !== exp) begin
      failures++;
      $display("FAIL %s: MM[%h] = %h, expected %h", what, a, v, exp);
    end
  endtask

  task automatic build_programs();
    // CU0 and CU1: a PE loop on shared sector 1
    for (int c = 0; c < 2; c++) begin
      put(c, 0, i_mem(OP_CL, 4'd3, 3'd0, 1'b0, 16'd200));
      put(c, 1, i_imm(OP_CLI, 4'd1, 12));
      put(c, 2, i_imm(OP_CLI, 4'd2, 0));
      put(c, 3, i_imm(OP_LI, 4'd0, 0));
      put(c, 4, i_imm(OP_AI, 4'd0, c + 1));
      put(c, 5, i_imm(OP_CSI, 4'd1, 1));
      put(c, 6, i_br(OP_BXNE, 2'd1, 2'd2, 16'd4));
      put(c, 7, i_reg(OP_GM, 4'd0, 4'd0, 4'd0, 1'b1));
      put(c, 8, i_mem(OP_CS, 4'd0, 3'd3, 1'b0, 16'(c)));
      put(c, 200, word_t'(SH - base(c)));
      put(c, 201, word_t'(1 << c));
    end
    put(0, 9,  i_mem(OP_LDSIG, 4'd0, 3'd0, 1'b0, 16'd201));
    put(0, 10, i_mem(OP_HALT, 4'd0, 3'd0, 1'b0, 16'd0));
    put(1, 9,  i_imm(OP_CLI, 4'd0, 1));
    put(1, 10, i_mem(OP_CS, 4'd0, 3'd3, 1'b0, 16'd2));
    put(1, 11, i_mem(OP_BR, 4'd0, 3'd0, 1'b0, 16'd11));
    put(1, 30, i_mem(OP_CS, 4'd0, 3'd3, 1'b0, 16'd4));    // message routine
    put(1, 31, i_mem(OP_LDSIG, 4'd0, 3'd0, 1'b0, 16'd201));
    put(1, 32, i_mem(OP_HALT, 4'd0, 3'd0, 1'b0, 16'd0));

    // CU2: streams, associative selection, global load/store
    put(2, 0,  i_mem(OP_CL, 4'd3, 3'd0, 1'b0, 16'd200));
    put(2, 1,  i_mem(OP_L, RC_ICTL, 3'd0, 1'b0, 16'd0));
    put(2, 2,  i_mem(OP_L, RC_OCTL, 3'd0, 1'b0, 16'd0));
    put(2, 3,  i_imm(OP_CLI, 4'd0, 8));
    put(2, 4,  i_mem(OP_LSTR, 4'd1, 3'd0, 1'b0, 16'd100));
    put(2, 5,  i_imm(OP_AI, 4'd1, 1000));
    put(2, 6,  i_mem(OP_SSTR, 4'd1, 3'd0, 1'b0, 16'd120));
    put(2, 7,  i_mem(OP_L, 4'd2, 3'd0, 1'b0, 16'd0));
    put(2, 8,  i_imm(OP_SI, 4'd2, 4));
    put(2, 9,  i_asc(OP_SETNG, 8'h01, 8'h01, 1'b0, 3'd2));
    put(2, 10, i_asc(OP_SELECT, 8'h01, 8'h01, 1'b0, 3'd0));
    put(2, 11, i_imm(OP_CLI, 4'd1, 5));
    put(2, 12, i_mem(OP_BCTG1, 4'd0, 3'd0, 1'b0, 16'd14));
    put(2, 13, i_imm(OP_CLI, 4'd1, 999));
    put(2, 14, i_mem(OP_CS, 4'd1, 3'd0, 1'b0, 16'd140));
    put(2, 15, i_imm(OP_LI, 4'd3, 32'h30));
    put(2, 16, i_mem(OP_GS, 4'd3, 3'd0, 1'b0, 16'd142));
    put(2, 17, i_asc(OP_SELECT, 8'h00, 8'h00, 1'b0, 3'd0));
    put(2, 18, i_mem(OP_GL, 4'd4, 3'd0, 1'b0, 16'd141));
    put(2, 19, i_reg(OP_AR, 4'd4, 4'd4, 4'd3));
    put(2, 20, i_reg(OP_GM, 4'd1, 4'd4, 4'd0, 1'b1));
    put(2, 21, i_mem(OP_CS, 4'd1, 3'd0, 1'b0, 16'd143));
    put(2, 22, i_imm(OP_CLI, 4'd0, 1));
    put(2, 23, i_mem(OP_CS, 4'd0, 3'd3, 1'b0, 16'd3));
    put(2, 24, i_mem(OP_BR, 4'd0, 3'd0, 1'b0, 16'd24));
    put(2, 50, i_mem(OP_CS, 4'd0, 3'd3, 1'b0, 16'd5));    // preemption routine
    put(2, 51, i_mem(OP_LDSIG, 4'd0, 3'd0, 1'b0, 16'd201));
    put(2, 52, i_mem(OP_HALT, 4'd0, 3'd0, 1'b0, 16'd0));
    for (int k = 0; k < 8; k++) put(2, 100 + k, word_t'(10 * k + 1));
    put(2, 141, 32'h50);
    put(2, 200, word_t'(SH - base(2)));
    put(2, 201, 32'h04);

    // CU3: supervisor
    put(3, 0,  i_mem(OP_CL, 4'd3, 3'd0, 1'b0, 16'd200));
    put(3, 1,  i_mem(OP_CL, 4'd2, 3'd0, 1'b0, 16'd202));
    put(3, 2,  i_mem(OP_CL, 4'd1, 3'd3, 1'b0, 16'd2));
    put(3, 3,  i_br(OP_BXZ, 2'd0, 2'd1, 16'd2));
    put(3, 4,  i_mem(OP_LDSIG, 4'd0, 3'd0, 1'b0, 16'd203));
    put(3, 5,  i_mem(OP_LDINT, 4'd0, 3'd0, 1'b0, 16'd204));
    put(3, 6,  i_imm(OP_CLI, 4'd0, 32'h123));
    put(3, 7,  i_mem(OP_SIGNAL, 4'd0, 3'd0, 1'b0, 16'd0));
    put(3, 8,  i_mem(OP_CL, 4'd1, 3'd3, 1'b0, 16'd3));
    put(3, 9,  i_br(OP_BXZ, 2'd0, 2'd1, 16'd8));
    put(3, 10, i_mem(OP_LDSIG, 4'd0, 3'd0, 1'b0, 16'd205));
    put(3, 11, i_imm(OP_CLI, 4'd0, 32'h456));
    put(3, 12, i_mem(OP_PREEMPT, 4'd0, 3'd2, 1'b0, 16'd0));
    put(3, 13, i_mem(OP_LDSIG, 4'd0, 3'd0, 1'b0, 16'd206));
    put(3, 14, i_mem(OP_BINA, 4'd0, 3'd0, 1'b0, 16'd16));
    put(3, 15, i_mem(OP_BR, 4'd0, 3'd0, 1'b0, 16'd18));
    put(3, 16, i_imm(OP_CLI, 4'd1, 1));
    put(3, 17, i_mem(OP_CS, 4'd1, 3'd3, 1'b0, 16'd6));
    put(3, 18, i_mem(OP_LDSIG, 4'd0, 3'd0, 1'b0, 16'd201));
    put(3, 19, i_mem(OP_HALT, 4'd0, 3'd0, 1'b0, 16'd0));
    put(3, 200, word_t'(SH - base(3)));
    put(3, 201, 32'h0F);
    // PREEMPT's EA is relocated by CU3's base; CAC2 cancels that so CU2
    // lands on its own word 50
    put(3, 202, word_t'(mmaddr_t'(50) - base(3)));
    put(3, 203, 32'h02);
    put(3, 204, 32'd30);
    put(3, 205, 32'h04);
    put(3, 206, 32'h80);
    // shared area: flags start clear
    for (int a = 0; a < 8; a++) img[SH + mmaddr_t'(a)] = '0;
  endtask

  task automatic alloc_pe(int p, id_t owner);
    @(negedge clk);
    pe_alloc_we = 1'b1; pe_alloc_idx = PW'(p); pe_alloc_owner = owner;
    @(negedge clk);
    pe_alloc_we = 1'b0;
  endtask
  task automatic load_proc(int c, id_t id, logic [15:0] sec);
    @(negedge clk);
    cupi_load = 1'b1; cupi_load_cu = 3'(c); cupi_load_id = id; cupi_load_sector = sec;
    @(negedge clk);
    cupi_load = 1'b0;
  endtask

  int t_start, t_end;
  initial begin
    rst_n = 1'b0;
    cu_start = '0; pe_alloc_we = 1'b0; pe_alloc_idx = '0; pe_alloc_owner = '0;
    cupi_load = 1'b0; cupi_load_cu = '0; cupi_load_id = '0; cupi_load_sector = '0;
    io_req = 1'b0; io_we = 1'b0; io_addr = '0; io_wdata = '0;
    act_q = '0;
    for (int c = 0; c < NC; c++) begin cu_start_pc[c] = '0; cu_base[c] = base(c); end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    build_programs();
    foreach (img[a]) io_write(a, img[a]);

    alloc_pe(0, 8'h01); alloc_pe(1, 8'h01); alloc_pe(SP, 8'h01);
    alloc_pe(SP + 1, 8'h02); alloc_pe(2 * SP, 8'h02); alloc_pe(2 * SP + 1, 8'h02);
    for (int k = 0; k < 8; k++) alloc_pe((4 + k / 2) * SP + k % 2, 8'h04);
    load_proc(0, 8'h01, 16'h0003);
    load_proc(1, 8'h02, 16'h0006);
    load_proc(2, 8'h04, 16'h00F0);
    load_proc(3, 8'h0F, 16'h0000);

    @(negedge clk);
    cu_start = 8'h0F;
    t_start = cyc;
    @(negedge clk);
    cu_start = '0;
    @(negedge clk);
    chk("four CUs running", cu_running == 8'h0F);
    while (cu_running != '0) @(negedge clk);
    t_end = cyc;
    $display("programs finished after %0d cycles", t_end - t_start);

    expect_mm("CU0 PE loop sum via GM", SH + 0, 32'd12);
    expect_mm("CU1 PE loop sum via GM", SH + 1, 32'd24);
    expect_mm("SIGNAL routine got the sender's CAC0", SH + 4, 32'h123);
    expect_mm("PREEMPT routine got the sender's CAC0", SH + 5, 32'h456);
    expect_mm("BINA branched for an unused ID", SH + 6, 32'd1);
    for (int k = 0; k < 8; k++)
      expect_mm($sformatf("LSTR/SSTR word %0d", k), base(2) + mmaddr_t'(120 + k),
                word_t'(1000 + 10 * k + 1));
    expect_mm("BCTG1 taken with 4 PEs active", base(2) + 140, 32'd5);
    expect_mm("GS from the selected half", base(2) + 142, 32'h30);
    expect_mm("GL then GM over all PEs", base(2) + 143, 32'h50 | 32'h80);
    expect_mm("SIGNAL saved CU1's IC at 3FFFB0+1", SAVE_SIGNAL + 1, 32'd11);
    expect_mm("PREEMPT saved CU2's IC at 3FFFB8+2", SAVE_PREEMPT + 2, 32'd24);
    for (int k = 0; k < 8; k++)
      chk($sformatf("CU2 PE rank %0d active again", k), pe_active[(4 + k / 2) * SP + k % 2]);

    $display("mechanisms: xmit_conflict=%0d stall=%0d sector_conflict=%0d shared_bus=%0d",
             n_xmit, n_stall, n_sec, n_shared);
    $display("            cupi_call=%0d interrupt=%0d halt=%0d stream_in=%0d stream_out=%0d deactivate=%0d",
             n_call, n_irq, n_halt, n_sin, n_sout, n_deact);
    chk("transmission conflict happened", n_xmit > 0);
    chk("switch stall happened", n_stall > 0);
    chk("sector conflict seen", n_sec > 0);
    chk("shared MM bus used", n_shared > 0);
    chk("CUPI calls made", n_call > 0);
    chk("two interrupts taken", n_irq == 2);
    chk("four halts", n_halt >= 4);
    chk("stream input cycles", n_sin == 8 * 4);
    chk("stream output cycles", n_sout == 8 * 4);
    chk("PEs deactivated", n_deact == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
