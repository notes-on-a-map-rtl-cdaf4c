// tb_map_mm: self-checking test of main memory at a reduced module size
// (16 modules of 16 words; 9 units: CUs 0-7 and the CUPI as unit 8).
// Directed part: all units on their preferred modules are served in the
// same cycle; I/O beats a preferred path, a preferred path beats the shared
// bus; two units off their preferred modules take turns on the shared bus.
// Random part: every unit and the I/O port issue random reads and writes,
// held until granted; reads are checked against a testbench copy of the
// memory, and every cycle the testbench checks that a module serves at most
// one port, the shared bus carries at most one transfer and I/O is never
// refused.  It also checks that no unit waits more than a bounded time.
module tb_map_mm;
  import map_pkg::*;
  localparam int NU = 9, NM = 16, MW = 16;
  logic          clk = 0, rst_n = 0;
  logic [NU-1:0] req, we, gnt;
  mmaddr_t       addr  [NU];
  word_t         wdata [NU];
  word_t         rdata [NU];
  logic          io_req, io_we, io_gnt, shbusy;
  mmaddr_t       io_addr;
  word_t         io_wdata, io_rdata;
  word_t         model [NM * MW];
  int checks = 0, failures = 0;

  map_mm #(.N_U(NU), .N_MOD(NM), .MOD_WORDS(MW)) dut (
    .clk, .rst_n, .req_i(req), .we_i(we), .addr_i(addr), .wdata_i(wdata),
    .gnt_o(gnt), .rdata_o(rdata), .io_req_i(io_req), .io_we_i(io_we),
    .io_addr_i(io_addr), .io_wdata_i(io_wdata), .io_gnt_o(io_gnt), .io_rdata_o(io_rdata),
    .shared_busy_o(shbusy));

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
  function automatic int pref(int u); return (u == NU - 1) ? NM - 1 : u; endfunction
  function automatic mmaddr_t mk(int m, int w); return mmaddr_t'(m * MW + w); endfunction
  function automatic int modof(mmaddr_t a); return int'(a[7:4]); endfunction
  function automatic int idx(mmaddr_t a); return int'(a[7:0]); endfunction

  task automatic clear();
    req = '0; we = '0; io_req = 0; io_we = 0; io_addr = '0; io_wdata = '0;
    for (int u = 0; u < NU; u++) begin addr[u] = '0; wdata[u] = '0; end
  endtask

  int wait_cnt [NU];
  logic [NU-1:0] g;
  initial begin
    clear();
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // initialise through the I/O port
    for (int a = 0; a < NM * MW; a++) begin
      io_req = 1; io_we = 1; io_addr = mmaddr_t'(a); io_wdata = 32'(a * 7 + 1);
      model[a] = io_wdata;
      @(negedge clk);
    end
    clear();
    // preferred paths work in parallel
    for (int u = 0; u < NU; u++) begin req[u] = 1; addr[u] = mk(pref(u), 3); end
    #1 chk("all preferred accesses granted together", gnt == '1);
    for (int u = 0; u < NU; u++) chk("preferred read data", rdata[u] == model[idx(addr[u])]);
    chk("shared bus unused", !shbusy);
    @(negedge clk); clear();
    // I/O beats preferred
    req[2] = 1; addr[2] = mk(2, 1);
    io_req = 1; io_addr = mk(2, 4);
    #1 chk("I/O first", io_gnt && !gnt[2]);
    @(negedge clk); io_req = 0;
    #1 chk("preferred next", gnt[2]);
    @(negedge clk); clear();
    // preferred beats shared
    req[3] = 1; addr[3] = mk(3, 0);
    req[4] = 1; addr[4] = mk(3, 1);
    #1 chk("preferred before shared", gnt[3] && !gnt[4]);
    @(negedge clk); req[3] = 0;
    #1 chk("shared after", gnt[4] && shbusy);
    @(negedge clk); clear();
    // two shared-bus users alternate
    req[0] = 1; addr[0] = mk(9, 0);
    req[1] = 1; addr[1] = mk(10, 0);
    #1 chk("one shared transfer per cycle", $countones(gnt) == 1);
    begin
      logic [NU-1:0] g0;
      g0 = gnt;
      @(negedge clk);
      if (g0[0]) req[0] = 0; else req[1] = 0;
      #1 chk("other shared user next", $countones(gnt) == 1 && gnt != g0);
    end
    @(negedge clk); clear();

    // random traffic
    for (int u = 0; u < NU; u++) wait_cnt[u] = 0;
    for (int n = 0; n < 3000; n++) begin
      int served [NM];
      int nshared;
      for (int u = 0; u < NU; u++)
        if (!req[u]) begin
          req[u]   = ($urandom_range(0, 1) == 0);
          we[u]    = $urandom_range(0, 1);
          addr[u]  = ($urandom_range(0, 2) == 0) ? mmaddr_t'($urandom_range(0, NM * MW - 1))
                                                 : mk(pref(u), $urandom_range(0, MW - 1));
          wdata[u] = $urandom;
        end
      io_req = ($urandom_range(0, 7) == 0);
      io_we = 0; io_addr = mmaddr_t'($urandom_range(0, NM * MW - 1));
      #1;
      for (int m = 0; m < NM; m++) served[m] = 0;
      nshared = 0;
      if (io_req) begin
        chk("I/O never refused", io_gnt);
        chk("I/O read data", io_rdata == model[idx(io_addr)]);
        served[modof(io_addr)]++;
      end
      for (int u = 0; u < NU; u++) if (gnt[u]) begin
        chk("grant only on request", req[u]);
        served[modof(addr[u])]++;
        if (modof(addr[u]) != pref(u)) nshared++;
        if (!we[u]) chk($sformatf("unit %0d read data", u), rdata[u] == model[idx(addr[u])]);
      end
      for (int m = 0; m < NM; m++) chk("one access per module", served[m] <= 1);
      chk("one shared-bus transfer", nshared <= 1);
      g = gnt;
      @(posedge clk); #1;
      for (int u = 0; u < NU; u++)
        if (req[u] && g[u]) begin
          if (we[u]) model[idx(addr[u])] = wdata[u];
          wait_cnt[u] = 0;
          req[u] = 0;
        end else if (req[u]) begin
          wait_cnt[u]++;
          if (wait_cnt[u] == 40) chk($sformatf("unit %0d starved", u), 0);
        end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
