// tb_map_switch: self-checking test of the distribution switch at a reduced
// size (32 PEs, 2 per sector, still 16 sectors and 8 CUs).  Random CU
// requests, sector masks, PE answers and activity flags are applied; the
// testbench checks, from its own model, that each sector bus carries the
// valid/command/ID/word of the granted CU that owns it (and nothing when no
// granted CU does), that each granted CU gets back the OR of the words of
// the PEs in its sectors, and the "at least one" / "more than one active PE"
// answers.
module tb_map_switch;
  import map_pkg::*;
  localparam int NC = 8, NP = 32, SP = 2, NS = NP / SP;
  logic          clk = 0, rst_n = 0;
  logic [NC-1:0] req, gnt, any, many;
  bcmd_e         cmd  [NC];
  word_t         data [NC];
  id_t           id   [NC];
  logic [NS-1:0] sector [NC];
  word_t         ret  [NC];
  sbus_t         sbus [NS];
  word_t         pdat [NP];
  logic [NP-1:0] pact;
  logic          sconf, xconf;
  int checks = 0, failures = 0;

  map_switch #(.N_CU(NC), .N_PE(NP), .SEC_PES(SP)) dut (
    .clk, .rst_n, .req_i(req), .cmd_i(cmd), .data_i(data), .id_i(id), .sector_i(sector),
    .gnt_o(gnt), .ret_data_o(ret), .ret_any_o(any), .ret_many_o(many),
    .sbus_o(sbus), .pe_data_i(pdat), .pe_act_i(pact),
    .sector_conflict_o(sconf), .xmit_conflict_o(xconf));

  always #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int ngrant = 0;
  initial begin
    req = '0; pact = '0;
    for (int c = 0; c < NC; c++) begin cmd[c] = BC_NONE; data[c] = '0; id[c] = '0; sector[c] = '0; end
    for (int p = 0; p < NP; p++) pdat[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      req = 8'($urandom);
      for (int c = 0; c < NC; c++) begin
        cmd[c]    = bcmd_e'($urandom_range(1, 6));
        data[c]   = $urandom;
        id[c]     = 8'(c + 1);
        sector[c] = ($urandom_range(0, 1) == 0) ? 16'($urandom) & 16'($urandom)
                                                : (16'(1) << $urandom_range(0, 15));
      end
      for (int p = 0; p < NP; p++) pdat[p] = ($urandom_range(0, 3) == 0) ? $urandom : '0;
      pact = 32'($urandom) & 32'($urandom);
      #1;
      // sector buses
      for (int s = 0; s < NS; s++) begin
        int owner;
        owner = -1;
        for (int c = 0; c < NC; c++) if (gnt[c] && sector[c][s]) owner = c;
        if (owner < 0) chk("idle sector carries nothing", !sbus[s].valid);
        else chk($sformatf("sector %0d carries CU %0d", s, owner),
                 sbus[s].valid && sbus[s].cmd == cmd[owner] &&
                 sbus[s].id == id[owner] && sbus[s].data == data[owner]);
      end
      // returns
      for (int c = 0; c < NC; c++) if (gnt[c]) begin
        word_t e;
        int    na;
        e = '0; na = 0;
        ngrant++;
        for (int s = 0; s < NS; s++) if (sector[c][s])
          for (int q = 0; q < SP; q++) begin
            e |= pdat[s * SP + q];
            na += int'(pact[s * SP + q]);
          end
        chk("returned word", ret[c] == e);
        chk("any active", any[c] == (na > 0));
        chk("many active", many[c] == (na > 1));
      end
    end
    chk("grants happened", ngrant > 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
