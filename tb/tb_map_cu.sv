// tb_map_cu: self-checking test of one control unit (CU index 2, relocation
// base 0x100).  The testbench models main memory (random grant delays), the
// distribution switch (random grant delays, a logged bus, answers chosen
// here) and the CUPI (it recognises stores to the call window, checks the
// call word and answers with completion, branch and halt).  A program
// exercises register, immediate, memory, indexed and indirect addressing,
// compare-branches, SUBR, PUSH/PULL, PE broadcast with the PE_LAT wait,
// GL/GM global operations, LSTR/SSTR streams, BCT branches on the active
// count, CUPI calls with and without branch, HALT, and restart by an
// interrupt.  Results are checked in memory and on the bus log.
module tb_map_cu;
  import map_pkg::*;
  import map_asm_pkg::*;

  localparam mmaddr_t BASE = 22'h100;
  logic    clk = 0, rst_n = 0;
  logic    start = 0;
  logic    mm_req, mm_we, mm_gnt;
  mmaddr_t mm_addr;
  word_t   mm_wdata, mm_rdata;
  logic    sw_req, sw_gnt, sw_any, sw_many;
  bcmd_e   sw_cmd;
  word_t   sw_data, sw_ret;
  logic    done, branch, halt, irq, irq_ack, running, busy;
  mmaddr_t irq_pc, pc;
  word_t   irq_cac0, cac0;
  int checks = 0, failures = 0;

  map_cu #(.CU_INDEX(2)) dut (
    .clk, .rst_n, .start_i(start), .start_pc_i(22'd0), .base_i(BASE),
    .mm_req_o(mm_req), .mm_we_o(mm_we), .mm_addr_o(mm_addr), .mm_wdata_o(mm_wdata),
    .mm_gnt_i(mm_gnt), .mm_rdata_i(mm_rdata),
    .sw_req_o(sw_req), .sw_cmd_o(sw_cmd), .sw_data_o(sw_data), .sw_gnt_i(sw_gnt),
    .sw_ret_i(sw_ret), .sw_any_i(sw_any), .sw_many_i(sw_many),
    .cupi_done_i(done), .cupi_branch_i(branch), .halt_i(halt),
    .irq_i(irq), .irq_pc_i(irq_pc), .irq_cac0_i(irq_cac0), .irq_ack_o(irq_ack),
    .pc_o(pc), .cac0_o(cac0), .running_o(running), .busy_o(busy));

  always #5 clk = ~clk;
  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- memory model ----------------
  word_t mem [4096];
  wire   is_call = mm_req && mm_we && mm_addr[21:3] == CUPI_CALL[21:3];
  logic  mm_lucky;
  always @(negedge clk) mm_lucky = ($urandom_range(0, 2) != 0);
  assign mm_gnt   = mm_req && (is_call || mm_lucky);
  assign mm_rdata = mem[mm_addr[11:0]];
  always @(posedge clk)
    if (mm_gnt && mm_we && !is_call) mem[mm_addr[11:0]] <= mm_wdata;

  // ---------------- switch model ----------------
  bcmd_e log_cmd [256];
  word_t log_dat [256];
  longint log_t  [256];
  int    nlog = 0, nsout = 0;
  longint cyc = 0;
  logic  sw_lucky;
  always @(negedge clk) sw_lucky = ($urandom_range(0, 1) != 0);
  assign sw_gnt = sw_req && sw_lucky;
  assign sw_ret = (sw_cmd == BC_SOUT) ? 32'h500 + 32'(nsout) :
                  (sw_cmd == BC_QUERY) ? 32'hCAFE : '0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (sw_gnt) begin
      log_cmd[nlog] <= sw_cmd; log_dat[nlog] <= sw_data; log_t[nlog] <= cyc;
      nlog <= nlog + 1;
      if (sw_cmd == BC_SOUT) nsout <= nsout + 1;
    end
  end

  // ---------------- CUPI model ----------------
  word_t calls [16];
  int    ncall = 0;
  initial begin
    done = 0; branch = 0; halt = 0; irq = 0; irq_pc = '0; irq_cac0 = '0;
    forever begin
      @(posedge clk);
      if (is_call) begin
        word_t w;
        w = mm_wdata;
        calls[ncall] = w;
        ncall++;
        chk("call address is 3FFFF8 + CU index", mm_addr == CUPI_CALL + 2);
        repeat (3) @(posedge clk);
        #1 done = 1; branch = (w[31:24] == OP_BINA);
        if (w[31:24] == OP_HALT) halt = 1;
        @(posedge clk); #1 done = 0; branch = 0;
      end
      if (halt && !running) halt = 0;
    end
  end

  // program (addresses relative to BASE)
  function automatic void put(int a, word_t w); mem[BASE[11:0] + a] = w; endfunction

  initial begin
    for (int a = 0; a < 4096; a++) mem[a] = '0;
    put(0,  i_imm(OP_CLI, 4'd0, 5));
    put(1,  i_imm(OP_CLI, 4'd1, 7));
    put(2,  i_reg(OP_CAR, 4'd2, 4'd0, 4'd1));            // CAC2 = 12
    put(3,  i_mem(OP_CS, 4'd2, 3'd0, 1'b0, 16'd40));     // MM[40] = 12
    put(4,  i_imm(OP_CSI, 4'd1, 2));                     // CAC1 = 5
    put(5,  i_br(OP_BXEQ, 2'd0, 2'd1, 16'd7));           // taken
    put(6,  i_mem(OP_CS, 4'd0, 3'd0, 1'b0, 16'd47));     // skipped
    put(7,  i_mem(OP_CL, 4'd3, 3'd0, 1'b0, 16'd41));     // CAC3 = 0x1234
    put(8,  i_mem(OP_CAM, 4'd3, 3'd1, 1'b0, 16'd36));    // + MM[36+5]
    put(9,  i_mem(OP_CL, 4'd0, 3'd0, 1'b1, 16'd42));     // CAC0 = MM[MM[42]]
    put(10, i_imm(OP_LI, 4'd1, 3));                      // PE instruction
    put(11, i_mem(OP_GL, 4'd2, 3'd0, 1'b0, 16'd41));     // PEs get 0x1234
    put(12, i_reg(OP_GM, 4'd3, 4'd1, 4'd0, 1'b1));       // CAC3 = OR of PEs
    put(13, i_mem(OP_CS, 4'd3, 3'd0, 1'b0, 16'd43));
    put(14, i_mem(OP_SUBR, 4'd1, 3'd0, 1'b0, 16'd16));   // CAC1 = 15
    put(15, i_imm(OP_CLI, 4'd1, 999));
    put(16, i_mem(OP_PUSH, 4'd3, 3'd0, 1'b0, 16'd50));
    put(17, i_mem(OP_PULL, 4'd0, 3'd0, 1'b0, 16'd50));
    put(18, i_mem(OP_CS, 4'd0, 3'd0, 1'b0, 16'd44));
    put(19, i_mem(OP_SIGNAL, 4'd1, 3'd0, 1'b0, 16'd33));
    put(20, i_mem(OP_BINA, 4'd0, 3'd0, 1'b0, 16'd22));
    put(21, i_imm(OP_CLI, 4'd1, 999));
    put(22, i_imm(OP_CLI, 4'd0, 3));
    put(23, i_mem(OP_LSTR, 4'd2, 3'd0, 1'b0, 16'd70));
    put(24, i_mem(OP_SSTR, 4'd2, 3'd0, 1'b0, 16'd80));
    put(25, i_mem(OP_BCT1, 4'd0, 3'd0, 1'b0, 16'd27));
    put(26, i_imm(OP_CLI, 4'd1, 999));
    put(27, i_mem(OP_BCTG1, 4'd0, 3'd0, 1'b0, 16'd29));
    put(28, i_imm(OP_CLI, 4'd1, 77));
    put(29, i_mem(OP_CS, 4'd1, 3'd0, 1'b0, 16'd45));
    put(30, i_mem(OP_HALT, 4'd0, 3'd0, 1'b0, 16'd0));
    put(35, i_mem(OP_CS, 4'd0, 3'd0, 1'b0, 16'd46));
    put(36, i_mem(OP_HALT, 4'd0, 3'd0, 1'b0, 16'd0));
    put(41, 32'h1234);
    put(42, 32'd41);
    put(50, 32'd60);
    put(70, 32'hA0); put(71, 32'hA1); put(72, 32'hA2);
    sw_any = 1; sw_many = 0;

    repeat (2) @(posedge clk);
    rst_n = 1;
    chk("halted after reset", !running);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (ncall == 3 && !running);
    repeat (3) @(posedge clk);
    chk("halted by HALT", !running);
    chk("CAR/CS", mem[BASE + 40] == 12);
    chk("BXEQ taken on equal registers", mem[BASE + 47] == 0);
    chk("branch, indexed CAM, indirect CL, GM query", mem[BASE + 43] == 32'hCAFE);
    chk("PUSH wrote stack", mem[BASE + 60] == 32'hCAFE && mem[BASE + 50] == 60);
    chk("PULL read back", mem[BASE + 44] == 32'hCAFE);
    chk("BCT1 taken, BCTG1 not taken", mem[BASE + 45] == 77);
    chk("SSTR stored slots", mem[BASE + 80] == 32'h500 && mem[BASE + 81] == 32'h501 &&
                             mem[BASE + 82] == 32'h502);
    chk("SIGNAL call word", calls[0] == {OP_SIGNAL, 2'd1, BASE + 22'd33});
    chk("BINA call word", calls[1][31:24] == OP_BINA);
    chk("HALT call word", calls[2][31:24] == OP_HALT);
    // bus log: LI; GL instr + data; GM instr + query; LSTR instr + 3 words;
    // SSTR instr + 3 slots; BCT1 query; BCTG1 query
    chk("bus transfer count", nlog == 15);
    chk("PE instruction broadcast", log_cmd[0] == BC_INSTR && log_dat[0] == i_imm(OP_LI, 4'd1, 3));
    chk("GL instruction then operand", log_cmd[1] == BC_INSTR && log_cmd[2] == BC_DATA &&
                                       log_dat[2] == 32'h1234);
    chk("GM instruction then query", log_cmd[3] == BC_INSTR && log_cmd[4] == BC_QUERY);
    chk("LSTR words", log_cmd[6] == BC_SIN && log_dat[6] == 32'hA0 &&
                      log_cmd[8] == BC_SIN && log_dat[8] == 32'hA2);
    chk("SSTR slots", log_cmd[10] == BC_SOUT && log_cmd[12] == BC_SOUT);
    chk("PE latency respected", log_t[1] - log_t[0] >= PE_LAT);

    // restart by interrupt (as PREEMPT would)
    @(negedge clk);
    irq = 1; irq_pc = 22'd35; irq_cac0 = 32'h77;
    wait (irq_ack);
    chk("ack gives old PC", pc == 22'd31);
    @(posedge clk); #1 irq = 0;
    wait (ncall == 4 && !running);
    repeat (2) @(posedge clk);
    chk("interrupt loaded PC and CAC0", mem[BASE + 46] == 32'h77);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
