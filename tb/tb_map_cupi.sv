// tb_map_cupi: self-checking test of the Control Unit Processor Interface.
// The testbench models main memory (an associative array, random grant
// delays) and the eight CUs (each acknowledges an interrupt a few cycles
// after it is raised, handing over its instruction counter, and stops when
// told to halt).  Calls are made as a CU would make them, and the results
// are checked against the document's rules: the privilege and cooperation
// predicates, the ID-load restriction, LDSIG/STSIG, LDSEC, LDINT, STID,
// SIGNAL delivery (and refusal when the receiver is not able), the IC save
// addresses, ENABLE/DISABLE, BDABL and BINA branches, PREEMPT and CLEAR,
// HALT, and round-robin service of simultaneous calls.
module tb_map_cupi;
  import map_pkg::*;
  localparam int NC = 8;
  logic          clk = 0, rst_n = 0;
  logic          load = 0;
  logic [2:0]    load_cu = '0;
  id_t           load_id = '0;
  logic [15:0]   load_sec = '0;
  logic [NC-1:0] call = '0, done, branch, halt, irq, ack = '0, running;
  word_t         call_word [NC];
  mmaddr_t       irq_pc [NC], cu_pc [NC];
  word_t         irq_cac0 [NC], cu_cac0 [NC];
  id_t           id [NC];
  logic [15:0]   sec [NC];
  logic [NC-1:0] arm, able;
  logic          mm_req, mm_we, mm_gnt;
  mmaddr_t       mm_addr;
  word_t         mm_wdata, mm_rdata;
  int checks = 0, failures = 0;

  map_cupi #(.N_CU(NC)) dut (
    .clk, .rst_n, .load_i(load), .load_cu_i(load_cu), .load_id_i(load_id),
    .load_sector_i(load_sec), .call_i(call), .call_word_i(call_word),
    .done_o(done), .branch_o(branch), .halt_o(halt), .irq_o(irq),
    .irq_pc_o(irq_pc), .irq_cac0_o(irq_cac0), .irq_ack_i(ack),
    .cu_pc_i(cu_pc), .cu_cac0_i(cu_cac0), .cu_running_i(running),
    .id_o(id), .sector_o(sec), .arm_o(arm), .able_o(able),
    .mm_req_o(mm_req), .mm_we_o(mm_we), .mm_addr_o(mm_addr), .mm_wdata_o(mm_wdata),
    .mm_gnt_i(mm_gnt), .mm_rdata_i(mm_rdata));

  always #5 clk = ~clk;
  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // memory
  word_t mem [mmaddr_t];
  logic  lucky;
  always @(negedge clk) lucky = ($urandom_range(0, 1) == 0);
  assign mm_gnt   = mm_req && lucky;
  assign mm_rdata = mem.exists(mm_addr) ? mem[mm_addr] : '0;
  always @(posedge clk) if (mm_gnt && mm_we) mem[mm_addr] = mm_wdata;

  // CU models
  int nirq [NC];
  int ndone [NC];
  initial for (int c = 0; c < NC; c++) begin
    nirq[c] = 0; ndone[c] = 0; cu_pc[c] = mmaddr_t'(22'h50 + c); cu_cac0[c] = 32'h1000 + c;
    call_word[c] = '0;
  end
  assign running = ~halt;
  always @(posedge clk) for (int c = 0; c < NC; c++) if (done[c]) ndone[c]++;
  for (genvar c = 0; c < NC; c++) begin : g_cu
    initial forever begin
      @(posedge clk);
      if (rst_n && irq[c] && !ack[c]) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1 ack[c] = 1;
        @(posedge clk);
        #1 cu_pc[c] = irq_pc[c]; cu_cac0[c] = irq_cac0[c];
        nirq[c]++;
        ack[c] = 0;
      end
    end
  end

  task automatic do_call(int c, logic [7:0] op, logic [1:0] r, mmaddr_t ea, output logic br);
    @(negedge clk);
    call[c] = 1; call_word[c] = {op, r, ea};
    @(negedge clk);
    call[c] = 0;
    while (!done[c]) @(negedge clk);
    br = branch[c];
  endtask
  task automatic cl(int c, logic [7:0] op, mmaddr_t ea);
    logic b;
    do_call(c, op, 2'd0, ea, b);
  endtask

  logic b;
  int   n0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // allocate processes
    @(negedge clk);
    load = 1; load_cu = 0; load_id = 8'hFF; load_sec = 16'h0003; @(negedge clk);
    load_cu = 1; load_id = 8'h0F; load_sec = 16'h000C; @(negedge clk);
    load_cu = 2; load_id = 8'h30; load_sec = 16'h0030; @(negedge clk);
    load_cu = 3; load_id = 8'h03; load_sec = 16'h0300; @(negedge clk);
    load = 0;
    chk("ID and SECTOR loaded", id[1] == 8'h0F && sec[3] == 16'h0300 && arm[1] && able[1]);

    mem[22'd100] = 32'h0F; mem[22'd102] = 32'h00F0; mem[22'd103] = 32'h200;
    mem[22'd104] = 32'h07; mem[22'd105] = 32'hFF;  mem[22'd106] = 32'h07;
    mem[22'd107] = 32'h0C; mem[22'd108] = 32'h03;  mem[22'd109] = 32'h99;

    cl(0, OP_LDSIG, 22'd100);
    cl(0, OP_STSIG, 22'd101);
    chk("LDSIG/STSIG", mem[22'd101] == 32'h0F);
    cl(0, OP_LDSEC, 22'd102);
    chk("privileged LDSEC", sec[1] == 16'h00F0);
    cl(1, OP_LDSIG, 22'd105);                  // CU1 points at CU0
    cl(1, OP_LDSEC, 22'd102);
    chk("unprivileged LDSEC refused", sec[0] == 16'h0003);
    cl(0, OP_LDID, 22'd106);                   // CU1's ID becomes 07
    chk("LDID within caller's bits", id[1] == 8'h07);
    cl(1, OP_LDSIG, 22'd108);                  // CU1 (07) points at CU3 (03)
    cl(1, OP_LDID, 22'd107);                   // 0C has a bit CU1 lacks
    chk("LDID restriction", id[3] == 8'h03);
    cl(0, OP_LDSIG, 22'd106);                  // CU0 points at CU1 (07)
    cl(0, OP_STID, 22'd110);
    chk("STID", mem[22'd110] == 32'h07);
    cl(0, OP_LDINT, 22'd103);
    cl(0, OP_STINT, 22'd111);
    chk("LDINT/STINT", mem[22'd111] == 32'h200);

    // SIGNAL from CU3 (03) to CU1 (07): cooperative
    cl(3, OP_LDSIG, 22'd104);
    cu_pc[1] = 22'h55;
    cl(3, OP_SIGNAL, 22'd0);
    wait (nirq[1] == 1);
    repeat (40) @(posedge clk);
    chk("SIGNAL redirects to INT", cu_pc[1] == 22'h200);
    chk("SIGNAL passes CAC0", cu_cac0[1] == 32'h1003);
    chk("SIGNAL saves IC at 3FFFB0+j", mem[SAVE_SIGNAL + 1] == 32'h55);
    chk("receiver re-armed but not able", arm[1] && !able[1]);
    cl(3, OP_SIGNAL, 22'd0);
    repeat (8) @(posedge clk);
    chk("SIGNAL to a disabled receiver is not delivered", nirq[1] == 1);
    do_call(3, OP_BDABL, 2'd0, 22'd0, b);
    chk("BDABL branches when not able", b);
    cl(1, OP_ENABLE, 22'd0);
    chk("ENABLE", able[1]);
    do_call(3, OP_BDABL, 2'd0, 22'd0, b);
    chk("BDABL falls through when able", !b);
    cl(1, OP_DISABLE, 22'd0);
    chk("DISABLE", !able[1]);

    // PREEMPT from CU0 (FF) to CU1 (07), then CLEAR
    cu_pc[1] = 22'h77;
    cl(0, OP_PREEMPT, 22'h300);
    wait (nirq[1] == 2);
    repeat (40) @(posedge clk);
    chk("PREEMPT redirects to EA", cu_pc[1] == 22'h300);
    chk("PREEMPT passes CAC0", cu_cac0[1] == 32'h1000);
    chk("PREEMPT saves IC at 3FFFB8+j", mem[SAVE_PREEMPT + 1] == 32'h77);
    chk("PREEMPT disarms", !arm[1]);
    n0 = nirq[1];
    cl(0, OP_PREEMPT, 22'h400);
    repeat (8) @(posedge clk);
    chk("disarmed process is not preempted", nirq[1] == n0);
    cu_cac0[1] = 32'h4242;
    cl(0, OP_CLEAR, 22'd0);
    wait (nirq[1] == n0 + 1);
    chk("CLEAR restores IC", cu_pc[1] == 22'h77);
    chk("CLEAR keeps CAC0", cu_cac0[1] == 32'h4242);
    chk("CLEAR re-arms", arm[1]);
    // unprivileged PREEMPT: CU3 (03) against CU1 (07)
    n0 = nirq[1];
    cl(3, OP_PREEMPT, 22'h500);
    repeat (8) @(posedge clk);
    chk("unprivileged PREEMPT refused", nirq[1] == n0);
    // DISARM and ARM
    cl(0, OP_DISARM, 22'd0);
    chk("DISARM", !arm[1] && !able[1]);
    cl(0, OP_ARM, 22'd0);
    chk("ARM", arm[1]);
    // BINA
    cl(2, OP_LDSIG, 22'd109);
    do_call(2, OP_BINA, 2'd0, 22'd0, b);
    chk("BINA branches when no process has that ID", b);
    do_call(0, OP_BINA, 2'd0, 22'd0, b);
    chk("BINA falls through when one has", !b);
    // HALT
    cl(0, OP_HALT, 22'd0);
    chk("HALT raised for the receiver", halt[1]);
    @(negedge clk);
    // round robin: simultaneous calls all answered once
    begin
      int d0 [NC];
      for (int c = 0; c < NC; c++) d0[c] = ndone[c];
      @(negedge clk);
      call = 8'b1010_1101;
      for (int c = 0; c < NC; c++) call_word[c] = {OP_ENABLE, 2'd0, 22'd0};
      @(negedge clk);
      call = '0;
      repeat (30) @(negedge clk);
      for (int c = 0; c < NC; c++)
        chk($sformatf("CU %0d answered once", c), ndone[c] - d0[c] == ((8'b1010_1101 >> c) & 1));
      chk("ENABLE on several CUs", able[0] && able[2] && able[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
