// tb_map_ram: self-checking test of the memory array used for PEM and MM
// modules.  Writes random words to random addresses, keeps a copy in a
// testbench array, and checks that every read returns the last word written
// there in the same cycle the address is applied; also checks that a write
// is not visible before its clock edge.
module tb_map_ram;
  localparam int DEPTH = 64;
  logic        clk = 0;
  logic        we = 0;
  logic [5:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [DEPTH];
  logic        known [DEPTH];
  int checks = 0, failures = 0;

  map_ram #(.DEPTH(DEPTH), .WIDTH(32)) dut (.clk, .we_i(we), .addr_i(addr),
                                            .wdata_i(wdata), .rdata_o(rdata));
  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) known[i] = 1'b0;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      addr  = 6'($urandom_range(0, DEPTH - 1));
      we    = ($urandom_range(0, 2) == 0);
      wdata = $urandom;
      #1;
      if (known[addr]) begin
        checks++;
        if (rdata !== model[addr]) begin
          failures++;
          $display("FAIL read %0d: got %h expected %h", addr, rdata, model[addr]);
        end
      end
      if (we) begin
        model[addr] = wdata;
        known[addr] = 1'b1;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
