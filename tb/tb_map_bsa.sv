// tb_map_bsa: self-checking test of the bus sector allocator.
// Random requests and sector masks are applied; each cycle the testbench
// checks, from its own reading of the rules: only requesters are granted,
// granted CUs never share a sector, every refused requester collides with a
// granted one, the route unit sends each sector exactly the granted CU that
// owns it, and the two conflict flags.  A directed part holds two colliding
// CUs requesting and checks that they alternate (a refused CU wins the next
// cycle), and that CUs on disjoint sectors transmit together.
module tb_map_bsa;
  localparam int NC = 8, NS = 16;
  logic          clk = 0, rst_n = 0;
  logic [NC-1:0] req;
  logic [NS-1:0] sector [NC];
  logic [NC-1:0] gnt;
  logic [2:0]    route_cu [NS];
  logic [NS-1:0] route_v;
  logic          sconf, xconf;
  int checks = 0, failures = 0;

  map_bsa #(.N_CU(NC), .N_SECTOR(NS)) dut (
    .clk, .rst_n, .req_i(req), .sector_i(sector), .gnt_o(gnt),
    .route_cu_o(route_cu), .route_v_o(route_v),
    .sector_conflict_o(sconf), .xmit_conflict_o(xconf));

  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic check_rules();
    logic exp_s, exp_x, ok;
    exp_s = 0; exp_x = 0;
    for (int a = 0; a < NC; a++)
      for (int b = a + 1; b < NC; b++)
        if ((sector[a] & sector[b]) != 0) exp_s = 1;
    chk("sector conflict flag", sconf == exp_s);
    for (int a = 0; a < NC; a++) begin
      if (gnt[a]) chk("grant without request", req[a]);
      for (int b = a + 1; b < NC; b++)
        if (gnt[a] && gnt[b]) chk("granted CUs share a sector", (sector[a] & sector[b]) == 0);
      if (req[a] && !gnt[a]) begin
        exp_x = 1;
        ok = 0;
        for (int b = 0; b < NC; b++)
          if (gnt[b] && (sector[a] & sector[b]) != 0) ok = 1;
        chk("refused CU collides with a granted one", ok);
      end
    end
    chk("transmission conflict flag", xconf == exp_x);
    for (int s = 0; s < NS; s++) begin
      logic       ev;
      logic [2:0] ec;
      ev = 0; ec = '0;
      for (int c = 0; c < NC; c++)
        if (gnt[c] && sector[c][s]) begin ev = 1; ec = 3'(c); end
      chk($sformatf("route of sector %0d", s), route_v[s] == ev && (!ev || route_cu[s] == ec));
    end
  endtask

  initial begin
    req = '0;
    for (int c = 0; c < NC; c++) sector[c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // disjoint sectors: everyone transmits together
    for (int c = 0; c < NC; c++) sector[c] = 16'(3) << (2 * c);
    req = '1;
    #1 chk("disjoint CUs all granted", gnt == '1);
    check_rules();
    @(negedge clk);
    // two CUs on sector 5 alternate
    for (int c = 0; c < NC; c++) sector[c] = '0;
    sector[2] = 16'h0020; sector[6] = 16'h0060;
    req = 8'b0100_0100;
    begin
      logic [NC-1:0] prev;
      #1 prev = gnt;
      chk("exactly one of two colliding CUs granted", $countones(gnt) == 1);
      for (int n = 0; n < 6; n++) begin
        @(negedge clk);
        chk("colliding CUs alternate", gnt != prev && $countones(gnt) == 1);
        prev = gnt;
      end
    end
    // random
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      req = 8'($urandom);
      for (int c = 0; c < NC; c++)
        sector[c] = ($urandom_range(0, 3) == 0) ? 16'($urandom) : (16'(1) << $urandom_range(0, 15));
      #1 check_rules();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
