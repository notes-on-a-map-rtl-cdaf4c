// tb_map_pe: self-checking test of one processing element.
// The testbench plays the distribution switch: it puts instruction, data,
// query and stream cycles on the PE's sector bus and reads registers back
// through the PE->CU path (a GM "PE to CU" instruction followed by a query
// cycle).  Expected values are computed here from the instruction
// definitions.  It checks arithmetic, logic, shifts, PEM addressing
// (indexed and indirect), SET/SELECT/COMSEL activity rules, that inactive
// and foreign-owned PEs ignore work, global load/store and the ICTL/OCTL
// stream counters, and the 3-cycle local instruction latency.
module tb_map_pe;
  import map_pkg::*;
  import map_asm_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  alloc_we = 0;
  id_t   alloc_owner = '0;
  sbus_t bus;
  word_t ret;
  logic  act, active;
  id_t   owner;
  int    checks = 0, failures = 0;

  map_pe #(.PEM_WORDS(64)) dut (
    .clk, .rst_n, .alloc_we_i(alloc_we), .alloc_owner_i(alloc_owner),
    .bus_i(bus), .ret_data_o(ret), .ret_act_o(act), .active_o(active), .owner_o(owner));

  always #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam id_t ME = 8'h15;

  task automatic chk(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic cyc(bcmd_e c, word_t d, id_t id = ME);
    bus.valid = 1'b1; bus.cmd = c; bus.id = id; bus.data = d;
    @(posedge clk); #1;
    bus = '0;
  endtask
  task automatic idle(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask
  task automatic ins(word_t w, id_t id = ME);
    cyc(BC_INSTR, w, id);
    idle(PE_LAT - 1);
  endtask
  // read a PE register through GM (PE -> CU) and a query cycle
  task automatic rdreg(logic [3:0] rc, output word_t v);
    cyc(BC_INSTR, i_reg(OP_GM, 4'd0, rc, 4'd0, 1'b1));
    bus.valid = 1'b1; bus.cmd = BC_QUERY; bus.id = ME; bus.data = '0;
    #1 v = ret;
    @(posedge clk); #1;
    bus = '0;
  endtask
  task automatic expect_reg(string what, logic [3:0] rc, word_t exp);
    word_t v;
    rdreg(rc, v);
    chk(what, v, exp);
  endtask

  word_t v;
  initial begin
    bus = '0;
    idle(2);
    rst_n = 1;
    alloc_we = 1; alloc_owner = ME;
    idle(1);
    alloc_we = 0;
    chk("owner", word_t'(owner), word_t'(ME));
    chk("active after allocation", word_t'(active), 1);

    // arithmetic
    ins(i_imm(OP_LI, 4'd1, 100));
    ins(i_imm(OP_LI, 4'd2, -7));
    expect_reg("LI", 4'd2, 32'hFFFF_FFF9);
    ins(i_reg(OP_AR, 4'd3, 4'd1, 4'd2));
    expect_reg("AR", 4'd3, 93);
    ins(i_reg(OP_SR, 4'd4, 4'd1, 4'd2));
    expect_reg("SR", 4'd4, 107);
    ins(i_reg(OP_MR, 4'd5, 4'd1, 4'd2));
    expect_reg("MR", 4'd5, -700);
    ins(i_reg(OP_DR, 4'd6, 4'd1, 4'd2));
    expect_reg("DR quotient", 4'd6, -14);
    expect_reg("DR remainder", 4'd7, 2);
    ins(i_reg(OP_EORR, 4'd0, 4'd1, 4'd3));
    expect_reg("EORR", 4'd0, 100 ^ 93);
    ins(i_reg(OP_NOT, 4'd0, 4'd1, 4'd0));
    expect_reg("NOT", 4'd0, ~32'd100);
    ins(i_imm(OP_AI, 4'd1, 28));
    expect_reg("AI", 4'd1, 128);
    ins(i_imm(OP_SLI, 4'd1, 4));
    expect_reg("SLI left", 4'd1, 2048);
    ins(i_imm(OP_SLI, 4'd1, -8));
    expect_reg("SLI right", 4'd1, 8);
    ins(i_imm(OP_SAI, 4'd2, 1));
    expect_reg("SAI", 4'd2, 32'hFFFF_FFFC);
    ins(i_imm(OP_LI, 4'd0, 3));
    ins(i_imm(OP_SCI, 4'd0, -1));
    expect_reg("SCI", 4'd0, 32'h8000_0001);

    // PEM: direct, indexed, indirect
    ins(i_mem(OP_S, 4'd3, 3'd0, 1'b0, 16'd10));          // PEM[10] = 93
    ins(i_mem(OP_L, 4'd0, 3'd0, 1'b0, 16'd10));
    expect_reg("S/L direct", 4'd0, 93);
    ins(i_imm(OP_LI, 4'd1, 5));
    ins(i_mem(OP_S, 4'd4, 3'd1, 1'b0, 16'd10));          // PEM[15] = 107
    ins(i_imm(OP_LI, 4'd0, 15));
    ins(i_mem(OP_S, 4'd0, 3'd0, 1'b0, 16'd20));          // PEM[20] = 15
    ins(i_mem(OP_L, 4'd5, 3'd0, 1'b1, 16'd20));          // AC5 = PEM[PEM[20]]
    expect_reg("L indirect", 4'd5, 107);
    ins(i_mem(OP_AM, 4'd5, 3'd0, 1'b0, 16'd10));
    expect_reg("AM", 4'd5, 200);
    ins(i_mem(OP_MM, 4'd5, 3'd1, 1'b0, 16'd5));          // * PEM[10]
    expect_reg("MM indexed", 4'd5, 200 * 93);

    // ICTL / OCTL / SELECT as registers 8..10
    ins(i_reg(OP_M, RC_ICTL, 4'd5, 4'd0));
    expect_reg("MRIC truncates to 10 bits", RC_ICTL, (200 * 93) & 10'h3FF);

    // associative instructions
    ins(i_asc(OP_SET, 8'h05, 8'h07, 1'b0, 3'd0));
    expect_reg("SET", RC_SEL, 8'h05);
    ins(i_imm(OP_LI, 4'd3, 9));
    ins(i_asc(OP_SETPL, 8'h40, 8'h40, 1'b0, 3'd3));
    expect_reg("SETPL true", RC_SEL, 8'h45);
    ins(i_asc(OP_SETNG, 8'h80, 8'h80, 1'b0, 3'd3));
    expect_reg("SETNG false", RC_SEL, 8'h45);
    ins(i_imm(OP_LI, 4'd4, 9));
    ins(i_asc(OP_SETEQ, 8'h00, 8'h01, 1'b0, 3'd3, 3'd4));
    expect_reg("SETEQ clears bit 0", RC_SEL, 8'h44);
    ins(i_asc(OP_SELECT, 8'h44, 8'hFF, 1'b0, 3'd0));
    chk("SELECT match keeps active", word_t'(active), 1);
    ins(i_asc(OP_SELECT, 8'h01, 8'h01, 1'b1, 3'd0));
    chk("SELECT,R mismatch deactivates", word_t'(active), 0);
    ins(i_imm(OP_LI, 4'd3, 555));                        // must be ignored
    ins(i_asc(OP_SELECT, 8'h01, 8'h01, 1'b1, 3'd0));
    chk("SELECT,R keeps inactive", word_t'(active), 0);
    ins(i_asc(OP_SELECT, 8'h44, 8'hFF, 1'b1, 3'd0));
    chk("SELECT,R match does not wake an inactive PE", word_t'(active), 0);
    cyc(BC_QUERY, '0);
    ins(i_asc(OP_COMSEL, 8'h01, 8'h01, 1'b0, 3'd0));
    chk("COMSEL reactivates", word_t'(active), 1);
    expect_reg("inactive PE did not execute", 4'd3, 9);
    ins(i_asc(OP_COMSEL, 8'h44, 8'hFF, 1'b1, 3'd0));
    chk("COMSEL,R on match deactivates", word_t'(active), 0);
    ins(i_asc(OP_SELECT, 8'h00, 8'h00, 1'b0, 3'd0));
    chk("SELECT with empty mask activates all", word_t'(active), 1);

    // foreign ID
    ins(i_imm(OP_LI, 4'd3, 777), 8'h16);
    expect_reg("foreign instruction ignored", 4'd3, 9);

    // global load and store
    cyc(BC_INSTR, i_mem(OP_GL, 4'd2, 3'd0, 1'b0, 16'd0));
    cyc(BC_DATA, 32'hDEAD_BEEF);
    expect_reg("GL", 4'd2, 32'hDEAD_BEEF);
    cyc(BC_INSTR, i_mem(OP_GS, 4'd2, 3'd0, 1'b0, 16'd0));
    bus.valid = 1; bus.cmd = BC_QUERY; bus.id = ME;
    #1 chk("GS drives register", ret, 32'hDEAD_BEEF);
    checks++; if (!act) begin failures++; $display("FAIL act flag"); end
    @(posedge clk); #1 bus = '0;

    // streams: LSTR with ICTL = 2 takes the third word
    ins(i_imm(OP_LI, RC_ICTL, 2));
    cyc(BC_INSTR, i_mem(OP_LSTR, 4'd3, 3'd0, 1'b0, 16'd0));
    cyc(BC_SIN, 32'h1111);
    cyc(BC_SIN, 32'h2222);
    cyc(BC_SIN, 32'h3333);
    cyc(BC_SIN, 32'h4444);
    idle(1);
    expect_reg("LSTR takes word ICTL", 4'd3, 32'h3333);
    // SSTR with OCTL = 1 drives the second slot
    ins(i_imm(OP_LI, RC_OCTL, 1));
    cyc(BC_INSTR, i_mem(OP_SSTR, 4'd3, 3'd0, 1'b0, 16'd0));
    for (int s = 0; s < 3; s++) begin
      bus.valid = 1; bus.cmd = BC_SOUT; bus.id = ME; bus.data = '0;
      #1 chk($sformatf("SSTR slot %0d", s), ret, (s == 1) ? 32'h3333 : 32'h0);
      @(posedge clk); #1 bus = '0;
    end
    // XSTR: out of AC4, into AC5
    ins(i_imm(OP_LI, RC_ICTL, 0));
    ins(i_imm(OP_LI, RC_OCTL, 1));
    ins(i_imm(OP_LI, 4'd4, 4444));
    cyc(BC_INSTR, i_mem(OP_XSTR, 4'd4, 3'd0, 1'b0, 16'd0));
    bus.valid = 1; bus.cmd = BC_SXCH; bus.id = ME; bus.data = 32'hABCD;
    #1 chk("XSTR slot 0 not mine", ret, 0);
    @(posedge clk); #1;
    bus.data = 32'h9999;
    #1 chk("XSTR slot 1 drives AC4", ret, 4444);
    @(posedge clk); #1 bus = '0;
    expect_reg("XSTR input into AC5", 4'd5, 32'hABCD);

    // latency: a local instruction result is readable PE_LAT cycles later
    cyc(BC_INSTR, i_imm(OP_LI, 4'd6, 42));
    idle(PE_LAT - 1);
    expect_reg("result after PE_LAT cycles", 4'd6, 42);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
