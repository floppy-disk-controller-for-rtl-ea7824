// tb_scratch_ram -- writes a pseudo-random pattern to all 256 bytes through
// bus-style cycles (R/W low, select, falling E), checks that deselected
// writes and read cycles change nothing, then reads everything back and
// compares with a shadow copy kept by the testbench.
`timescale 1ns / 1ps
module tb_scratch_ram;
  logic       e_clk = 0, cs_n = 1, rw = 1;
  logic [7:0] addr = 0, wdata = 0, rdata;
  logic [7:0] shadow [256];
  int checks = 0, failures = 0;

  scratch_ram dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One M6800-style bus cycle: E high for 500 ns, write at its falling edge.
  task automatic cycle(input bit sel, input bit r, input logic [7:0] a, input logic [7:0] d);
    cs_n = !sel; rw = r; addr = a; wdata = d;
    #100 e_clk = 1;
    #500 e_clk = 0;
    #400;
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      shadow[i] = 8'($urandom);
      cycle(1, 0, 8'(i), shadow[i]);
    end
    // Writes while deselected and reads must not change the contents.
    for (int i = 0; i < 64; i++) begin
      cycle(0, 0, 8'($urandom), 8'($urandom));
      cycle(1, 1, 8'($urandom), 8'($urandom));
    end
    for (int i = 0; i < 256; i++) begin
      cs_n = 0; rw = 1; addr = 8'(i);
      #50;
      checks++;
      if (rdata !== shadow[i]) begin
        failures++;
        $display("FAIL addr=%h read %h expected %h", i, rdata, shadow[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
